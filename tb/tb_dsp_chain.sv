// Testbench of one DSP chain (32-point FFT, exact magnitude, groups of 3
// chirps accumulated). Each chirp is a tone plus noise; the testbench computes
// each chirp's DFT/32 in real arithmetic, its magnitude, and the sum over each
// group, and compares every output bin (within 2 LSB per summed chirp). A
// second pass uses the JPL magnitude and checks the peak bin.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_dsp_chain;
  import radar_pkg::*;
  localparam int LOG2N = 5, N = 32, MFL = 3, G = 3, NGRP = 3;
  logic clk = 0, rst = 1;
  logic [3:0] log2n_cfg;
  logmag_sel_t logmag_sel;
  logic [MFL:0] frames_cfg;
  cplx16_t s_data;
  logic s_valid = 0;
  logic [32+MFL-1:0] m_data;
  logic m_valid, m_last;
  int checks = 0, failures = 0, nwin = 0, bin = 0, peak_bin = 0;
  longint peak = 0;
  real expv [NGRP][N];

  dsp_chain #(.LOG2N(LOG2N), .MAX_FRAMES_LOG2(MFL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && m_valid) begin
      if (logmag_sel == LM_MAG && nwin < NGRP) begin
        real d;
        d = real'(m_data) - expv[nwin][bin];
        checks++;
        if (d > 2.0 * G || d < -2.0 * G) begin
          failures++;
          if (failures < 10) $display("group %0d bin %0d: got %0d expected %f", nwin, bin, m_data, expv[nwin][bin]);
        end
      end
      if (longint'(m_data) > peak) begin peak = longint'(m_data); peak_bin = bin; end
      checks++;
      if (m_last != (bin == N - 1)) failures++;
      if (m_last) begin bin = 0; nwin++; end else bin++;
    end
  end

  task automatic run(input logmag_sel_t sel, input int tone);
    int xr[N], xi[N];
    nwin = 0; bin = 0; peak = 0;
    for (int g = 0; g < NGRP; g++) for (int k = 0; k < N; k++) expv[g][k] = 0.0;
    logmag_sel = sel;
    rst = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int c = 0; c <= G * NGRP; c++) begin
      for (int t = 0; t < N; t++) begin
        xr[t] = $rtoi(8000.0 * $cos(2.0 * 3.141592653589793 * tone * t / N)) + int'($urandom_range(2000)) - 1000;
        xi[t] = $rtoi(8000.0 * $sin(2.0 * 3.141592653589793 * tone * t / N)) + int'($urandom_range(2000)) - 1000;
      end
      if (c < G * NGRP)
        for (int k = 0; k < N; k++) begin
          real ar = 0.0, ai = 0.0;
          for (int t = 0; t < N; t++) begin
            real a = -2.0 * 3.141592653589793 * k * t / N;
            ar += xr[t] * $cos(a) - xi[t] * $sin(a);
            ai += xr[t] * $sin(a) + xi[t] * $cos(a);
          end
          expv[c / G][k] += $sqrt(ar * ar + ai * ai) / N;
        end
      for (int t = 0; t < N; t++) begin
        s_data.re <= 16'(xr[t]); s_data.im <= 16'(xi[t]); s_valid <= 1;
        @(posedge clk);
        s_valid <= 0;
        @(posedge clk);
      end
    end
    repeat (N + 10) @(posedge clk);
    checks++;
    if (nwin != NGRP) begin failures++; $display("%0d groups out", nwin); end
    checks++;
    if (peak_bin != tone) begin failures++; $display("peak at bin %0d, tone at %0d", peak_bin, tone); end
  endtask

  initial begin
    log2n_cfg = 4'(LOG2N); frames_cfg = G; logmag_sel = LM_MAG; s_data = '0;
    run(LM_MAG, 5);
    run(LM_MAG_JPL, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
