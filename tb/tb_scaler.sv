// Testbench of the scaler: random samples, shifts and directions under random
// back-pressure; each output compared with the shifted and saturated input.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_scaler;
  logic clk = 0, rst = 1;
  logic [3:0] shift;
  logic multiply;
  logic [1:0][15:0] s_data, m_data;
  logic s_valid = 0, s_last = 0, s_ready, m_valid, m_last, m_ready = 1;
  int checks = 0, failures = 0;
  logic [1:0][15:0] expq[$];

  scaler dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (!drain) m_ready <= 1'($urandom_range(3) != 0);
  bit drain = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref1(input logic signed [15:0] x, input int sh, input bit mul);
    longint y = mul ? longint'(x) * (longint'(1) << sh) : (longint'(x) >>> sh);
    if (y > 32767) y = 32767;
    if (y < -32768) y = -32768;
    return 16'(y);
  endfunction

  always @(posedge clk) begin
    if (!rst && s_valid && s_ready)
      expq.push_back({ref1(s_data[1], shift, multiply), ref1(s_data[0], shift, multiply)});
    if (!rst && m_valid && m_ready) begin
      logic [1:0][15:0] e;
      e = expq.pop_front();
      checks++;
      if (m_data !== e) begin
        failures++;
        $display("got %h expected %h", m_data, e);
      end
    end
  end

  initial begin
    shift = 0; multiply = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      s_data   <= {$urandom}[31:0] >> ($urandom_range(15));
      shift    <= 4'($urandom);
      multiply <= 1'($urandom);
      s_valid  <= 1'($urandom_range(3) != 0);
      @(posedge clk);
      while (s_valid && !s_ready) @(posedge clk);
    end
    s_valid <= 0;
    drain = 1;
    m_ready <= 1;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
