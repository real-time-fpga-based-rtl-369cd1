// Testbench of the 1:8 DDR deserializer: sends a random bit stream two bits
// per clock and checks every byte against the stream, and that a byte comes
// every fourth clock.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_data_deserializer;
  logic clk = 0, rst = 1, din_rise = 0, din_fall = 0;
  logic [7:0] dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  bit bits[$];
  int nbytes = 0, last_cycle = -1, cycle = 0;

  data_deserializer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle++;
    if (!rst && dout_valid) begin
      logic [7:0] exp_b;
      for (int i = 0; i < 8; i++) exp_b[7-i] = bits[nbytes * 8 + i];
      checks++;
      if (dout !== exp_b) begin
        failures++;
        $display("byte %0d: got %h expected %h", nbytes, dout, exp_b);
      end
      if (last_cycle >= 0) begin
        checks++;
        if (cycle - last_cycle != 4) failures++;
      end
      last_cycle = cycle;
      nbytes++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 400; i++) begin
      bit a, b;
      a = 1'($urandom);
      b = 1'($urandom);
      bits.push_back(a);
      bits.push_back(b);
      din_rise <= a;
      din_fall <= b;
      @(posedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (nbytes != 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
