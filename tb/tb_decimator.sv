// Testbench of the decimator: random windows and factors 1..7 under random
// back-pressure; a reference model keeps the last sample of every group of
// factor and the last sample of each window.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_decimator;
  logic clk = 0, rst = 1;
  logic [4:0] factor;
  logic [0:0][15:0] s_data, m_data;
  logic s_valid = 0, s_last = 0, s_ready, m_valid, m_last, m_ready = 1;
  int checks = 0, failures = 0;
  logic [16:0] expq[$];   // {last, data}
  bit drain = 0;

  decimator #(.LANES(1), .W(16)) dut (.clk, .rst, .factor, .s_data, .s_valid, .s_last, .s_ready, .m_data, .m_valid, .m_last, .m_ready);
  always #5 clk = ~clk;
  always @(posedge clk) if (!drain) m_ready <= 1'($urandom_range(3) != 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int phase = 0, cnt = 0;
  always @(posedge clk) begin
    if (!rst && s_valid && s_ready) model(s_data[0], s_last);
    if (!rst && m_valid && m_ready) begin
      logic [16:0] e;
      e = expq.pop_front();
      checks++;
      if ({m_last, m_data[0]} !== e) begin
        failures++;
        if (failures < 10) $display("got %h expected %h", {m_last, m_data[0]}, e);
      end
    end
  end

  task automatic model(input logic [15:0] d, input logic l);
    int f = (factor == 0) ? 1 : int'(factor);
    if (phase >= f - 1 || l) begin
      expq.push_back({l, d});
      phase = 0;
    end else phase++;
  endtask

  initial begin
    factor = 3; s_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 80; w++) begin
      factor <= 5'($urandom_range(7));
      @(posedge clk);
      for (int i = 0; i < 13; i++) begin
        s_data  <= 16'($urandom);
        s_last  <= (i == 12);
        s_valid <= 1'($urandom_range(3) != 0);
        @(posedge clk);
        while (s_valid && !s_ready) @(posedge clk);
        if (!s_valid) i--;
      end
      s_valid <= 0;
      repeat (2) @(posedge clk);
    end
    drain = 1;
    m_ready <= 1;
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
