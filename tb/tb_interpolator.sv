// Testbench of the interpolator: random samples and factors 1..7 under random
// back-pressure; every accepted sample must come out factor times in a row,
// last only on the final repetition of a window's last sample. A steady
// stream with ready held high must run at one output per cycle.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_interpolator;
  logic clk = 0, rst = 1;
  logic [4:0] factor;
  logic [0:0][15:0] s_data, m_data;
  logic s_valid = 0, s_last = 0, s_ready, m_valid, m_last, m_ready = 1;
  int checks = 0, failures = 0;
  logic [16:0] expq[$];   // {last, data}
  bit drain = 0;

  interpolator #(.LANES(1), .W(16)) dut (.clk, .rst, .factor, .s_data, .s_valid, .s_last, .s_ready, .m_data, .m_valid, .m_last, .m_ready);
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
    for (int i = 0; i < f; i++) expq.push_back({l && i == f - 1, d});
  endtask

  int nout = 0;
  always @(posedge clk) if (m_valid && m_ready) nout++;

  initial begin
    factor = 3; s_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 60; w++) begin
      factor <= 5'($urandom_range(7));
      @(posedge clk);
      for (int i = 0; i < 12; i++) begin
        s_data  <= 16'($urandom);
        s_last  <= (i == 11);
        s_valid <= 1'($urandom_range(3) != 0);
        @(posedge clk);
        while (s_valid && !s_ready) @(posedge clk);
        if (!s_valid) i--;
      end
      s_valid <= 0;
      while (expq.size() != 0) @(posedge clk);
    end
    // throughput: factor 2, ready high, 20 samples -> 40 outputs in 40 cycles
    drain = 1;
    m_ready <= 1;
    factor <= 2;
    @(posedge clk);
    nout = 0;
    fork
      begin
        for (int i = 0; i < 20; i++) begin
          s_data <= 16'(i); s_last <= 0; s_valid <= 1;
          @(posedge clk);
          while (!s_ready) @(posedge clk);
        end
        s_valid <= 0;
      end
      begin
        int cyc = 0;
        while (nout < 40 && cyc < 100) begin @(posedge clk); cyc++; end
        checks++;
        if (cyc > 42) begin failures++; $display("throughput: 40 outputs took %0d cycles", cyc); end
      end
    join
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
