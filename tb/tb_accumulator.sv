// Testbench of the accumulator: windows of random values (window lengths
// from s_last, sizes 16 and 8), groups of 1, 3 and the maximum number of
// windows; each output bin must equal the sum of that bin over the group,
// one output window per group, m_last on the last bin.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_accumulator;
  localparam int LOG2N = 4, MFL = 3;
  logic clk = 0, rst = 1;
  logic [MFL:0] frames_cfg;
  logic [31:0] s_data;
  logic s_valid = 0, s_last = 0;
  logic [32+MFL-1:0] m_data;
  logic m_valid, m_last;
  int checks = 0, failures = 0;
  longint expq[$];
  int nwin_out = 0;

  accumulator #(.LOG2N(LOG2N), .MAX_FRAMES_LOG2(MFL), .IN_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && m_valid) begin
      longint e;
      e = expq.pop_front();
      checks++;
      if (longint'(m_data) != e) begin
        failures++;
        $display("got %0d expected %0d", m_data, e);
      end
      if (m_last) nwin_out++;
    end
  end

  task automatic group(input int n, input int frames, input bit gaps);
    longint sum[16];
    for (int k = 0; k < n; k++) sum[k] = 0;
    frames_cfg = (MFL+1)'(frames);
    for (int f = 0; f < frames; f++)
      for (int k = 0; k < n; k++) begin
        logic [31:0] v = $urandom;
        sum[k] += longint'(v);
        if (f == frames - 1) expq.push_back(sum[k]);
        s_data  <= v;
        s_valid <= 1;
        s_last  <= (k == n - 1);
        @(posedge clk);
        if (gaps && $urandom_range(1)) begin s_valid <= 0; @(posedge clk); end
      end
    s_valid <= 0;
    s_last  <= 0;
    @(posedge clk);
  endtask

  initial begin
    frames_cfg = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    group(16, 1, 0);
    group(16, 3, 1);
    group(8, 8, 0);
    group(16, 8, 1);
    group(8, 2, 0);
    repeat (5) @(posedge clk);
    checks++;
    if (nwin_out != 5 || expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
