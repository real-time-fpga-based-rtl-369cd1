// Testbench of the asynchronous FIFO: two unrelated clocks, random valid on
// the write side and random ready on the read side; every word must come out
// once, in order. Also checks that the FIFO fills (s_ready falls) when the
// reader stops.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_async_fifo;
  logic wr_clk = 0, rd_clk = 0, wr_rst = 1, rd_rst = 1;
  logic [31:0] s_data, m_data;
  logic s_valid = 0, s_ready, m_valid, m_ready = 0;
  int checks = 0, failures = 0, nout = 0, nin = 0, full_seen = 0;
  logic [31:0] q[$];

  async_fifo #(.W(32), .DEPTH_LOG2(4)) dut (.*);
  always #5 wr_clk = ~wr_clk;
  always #7 rd_clk = ~rd_clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge wr_clk) begin
    if (!wr_rst && s_valid && s_ready) begin
      q.push_back(s_data);
      nin++;
    end
    if (!wr_rst && s_valid && !s_ready) full_seen++;
  end

  always @(posedge rd_clk) begin
    if (!rd_rst && m_valid && m_ready) begin
      logic [31:0] e;
      checks++;
      e = q.pop_front();
      if (m_data !== e) begin
        failures++;
        $display("word %0d got %h expected %h", nout, m_data, e);
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge rd_clk);
    rd_rst <= 0;
    // stalled reader first, then random
    repeat (60) @(posedge rd_clk);
    forever begin
      m_ready <= 1'($urandom_range(3) != 0);
      @(posedge rd_clk);
    end
  end

  initial begin
    repeat (3) @(posedge wr_clk);
    wr_rst <= 0;
    while (nin < 500) begin
      if (!s_valid || s_ready) begin
        s_valid <= 1'($urandom);
        s_data  <= $urandom;
      end
      @(posedge wr_clk);
    end
    s_valid <= 0;
    repeat (100) @(posedge rd_clk);
    checks++;
    if (nout != nin) failures++;
    checks++;
    if (full_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
