// Testbench of the data counter (X_SIZE = 10): windows shorter and longer
// than X_SIZE; only the first X_SIZE samples of each pass, the X_SIZE-th
// flagged last, the rest dropped.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_data_counter;
  logic clk = 0, rst = 1;
  logic [4:0] factor;
  logic [0:0][15:0] s_data, m_data;
  logic s_valid = 0, s_last = 0, s_ready, m_valid, m_last, m_ready = 1;
  int checks = 0, failures = 0;
  logic [16:0] expq[$];   // {last, data}
  bit drain = 0;

  data_counter #(.X_SIZE(10), .LANES(1), .W(16)) dut (.clk, .rst, .s_data, .s_valid, .s_last, .s_ready, .m_data, .m_valid, .m_last, .m_ready, .dropping());
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
    if (cnt < 10) expq.push_back({l || cnt == 9, d});
    cnt = l ? 0 : (cnt < 10 ? cnt + 1 : cnt);
  endtask

  initial begin
    factor = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 60; w++) begin
      int len;
      len = int'($urandom_range(25)) + 1;
      for (int i = 0; i < len; i++) begin
        s_data  <= 16'($urandom);
        s_last  <= (i == len - 1);
        s_valid <= 1'($urandom_range(3) != 0);
        @(posedge clk);
        while (s_valid && !s_ready) @(posedge clk);
        if (!s_valid) i--;
      end
      s_valid <= 0;
      @(posedge clk);
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
