// Testbench of the non-coherent adder: random inputs in add-all mode and in
// pass-one mode for every selection; output one cycle later.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_noncoherent_adder;
  logic clk = 0, rst = 1, add_all;
  logic [1:0] sel;
  logic [3:0][38:0] s_data;
  logic [3:0] s_valid = 0, s_last = 0;
  logic [40:0] m_data;
  logic m_valid, m_last;
  int checks = 0, failures = 0;

  noncoherent_adder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    add_all = 1; sel = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      longint e;
      logic l;
      e = 0;
      l = 1'($urandom);
      add_all = (i < 200);
      sel = 2'($urandom);
      for (int k = 0; k < 4; k++) s_data[k] = {7'($urandom), $urandom};
      if (add_all) for (int k = 0; k < 4; k++) e += longint'(s_data[k]);
      else e = longint'(s_data[sel]);
      s_valid = 4'hF;
      s_last = {4{l}};
      @(posedge clk);
      s_valid <= 0;
      #1;
      checks++;
      if (!m_valid || m_last != l || longint'(m_data) != e) begin
        failures++;
        $display("i=%0d got %0d expected %0d v%0d l%0d/%0d", i, m_data, e, m_valid, m_last, l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
