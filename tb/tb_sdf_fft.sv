// Self-checking testbench of the SDF FFT.
//
// Streams random complex windows into a 64-point instance, computes each
// window's DFT in the testbench with real arithmetic, and compares every
// output bin (X[k]/n, within 2 LSB). Then switches to 16 points at run time
// and repeats. Also checks that each window leaves as a burst of n beats with
// m_last on the last one.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_sdf_fft;
  localparam int LOG2N = 6;
  localparam int N     = 2 ** LOG2N;
  localparam int NWIN  = 4;

  logic clk = 0, rst = 1;
  logic [3:0] log2n_cfg;
  logic signed [15:0] s_re, s_im, m_re, m_im;
  logic s_valid, m_valid, m_last;
  int checks = 0, failures = 0;

  sdf_fft #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [NWIN+1][N];
  int xi [NWIN+1][N];
  real er [NWIN][N];
  real ei [NWIN][N];

  task automatic reference(input int n);
    for (int w = 0; w < NWIN; w++)
      for (int k = 0; k < n; k++) begin
        real ar = 0.0, ai = 0.0;
        for (int t = 0; t < n; t++) begin
          real ang = -2.0 * 3.141592653589793 * k * t / n;
          ar += xr[w][t] * $cos(ang) - xi[w][t] * $sin(ang);
          ai += xr[w][t] * $sin(ang) + xi[w][t] * $cos(ang);
        end
        er[w][k] = ar / n;
        ei[w][k] = ai / n;
      end
  endtask

  // collect and compare outputs
  int win, bin, nsize;
  always @(posedge clk) begin
    if (!rst && m_valid) begin
      if (win < NWIN) begin
        real dr, di;
        dr = m_re - er[win][bin];
        di = m_im - ei[win][bin];
        checks++;
        if (dr > 2.0 || dr < -2.0 || di > 2.0 || di < -2.0) begin
          failures++;
          if (failures < 10) $display("n=%0d win %0d bin %0d: got %0d,%0d expected %f,%f",
                                      nsize, win, bin, m_re, m_im, er[win][bin], ei[win][bin]);
        end
        checks++;
        if (m_last != (bin == nsize - 1)) failures++;
      end
      if (bin == nsize - 1) begin bin = 0; win++; end
      else bin++;
    end
  end

  task automatic run(input int lg, input int amp);
    int n = 2 ** lg;
    nsize = n;
    win = 0; bin = 0;
    for (int w = 0; w <= NWIN; w++)
      for (int t = 0; t < n; t++) begin
        xr[w][t] = int'($urandom_range(2 * amp)) - amp;
        xi[w][t] = int'($urandom_range(2 * amp)) - amp;
      end
    // one window is a pure tone for a readable peak
    for (int t = 0; t < n; t++) begin
      xr[1][t] = $rtoi(amp * $cos(2.0 * 3.141592653589793 * 3 * t / n));
      xi[1][t] = $rtoi(amp * $sin(2.0 * 3.141592653589793 * 3 * t / n));
    end
    reference(n);
    log2n_cfg = 4'(lg);
    rst = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int w = 0; w <= NWIN; w++)
      for (int t = 0; t < n; t++) begin
        s_re    <= 16'(xr[w][t]);
        s_im    <= 16'(xi[w][t]);
        s_valid <= 1'b1;
        @(posedge clk);
        if ((t % 5) == 4) begin  // gaps in the input stream
          s_valid <= 1'b0;
          @(posedge clk);
        end
      end
    s_valid <= 1'b0;
    repeat (n + 10) @(posedge clk);
    checks++;
    if (win != NWIN) begin
      failures++;
      $display("n=%0d: %0d windows out, expected %0d", n, win, NWIN);
    end
  endtask

  initial begin
    s_valid = 0; s_re = 0; s_im = 0; log2n_cfg = 4'(LOG2N);
    win = 0; bin = 0; nsize = N;
    run(LOG2N, 30000);
    run(4, 20000);
    run(LOG2N, 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
