// Testbench of the frame buffer on a small geometry (16 columns, plots 16
// rows high). Writes an ADC window and an FFT window (with values beyond the
// plot to exercise clipping), then sweeps px/py over the screen and compares
// every pixel's colour, two cycles later, with a model of the drawing rules:
// connected traces (green real, yellow imaginary, cyan FFT), grey grid,
// black elsewhere. A second window must redraw the plot from column 0.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_frame_buffer;
  import radar_pkg::*;
  localparam int XS = 16, X0 = 4, PH = 16, AY = 2, FY = 20, DV = 4;
  logic clk = 0, rst = 1;
  cplx16_t adc_data;
  logic adc_valid = 0, adc_last = 0;
  logic signed [15:0] fft_data;
  logic fft_valid = 0, fft_last = 0;
  scale_cfg_t adc_scale = '0, fft_scale = '0;   // labels need a wider margin than this geometry has
  logic [11:0] px, py;
  logic [23:0] rgb;
  int checks = 0, failures = 0;
  int are[XS], aim[XS], afft[XS];   // model: stored rows

  frame_buffer #(.X_SIZE(XS), .X0(X0), .PLOT_H(PH), .ADC_Y0(AY), .FFT_Y0(FY), .DIVS(DV)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input int r);
    return r < 0 ? 0 : (r > PH - 1 ? PH - 1 : r);
  endfunction

  function automatic bit btw(input int y, input int a, input int b);
    return (y >= a && y <= b) || (y >= b && y <= a);
  endfunction

  function automatic logic [23:0] model(input int x, input int y);
    int c = x - X0, ya = y - AY, yf = y - FY, pc;
    bit inx = c >= 0 && c < XS;
    bit ina = inx && ya >= 0 && ya < PH, inf = inx && yf >= 0 && yf < PH;
    bit gx, gya, gyf;
    pc = (c > 0) ? c - 1 : 0;
    gx = (c % (XS / DV)) == 0 || c == XS - 1;
    gya = (ya % (PH / DV)) == 0 || ya == PH - 1;
    gyf = (yf % (PH / DV)) == 0 || yf == PH - 1;
    if (ina && btw(ya, are[pc], are[c])) return 24'h00FF00;
    if (ina && btw(ya, aim[pc], aim[c])) return 24'hFFFF00;
    if (inf && btw(yf, afft[pc], afft[c])) return 24'h00FFFF;
    if ((ina && (gx || gya)) || (inf && (gx || gyf))) return 24'h404040;
    return 24'h0;
  endfunction

  task automatic write_windows(input int n, input int seed);
    for (int i = 0; i < n; i++) begin
      int re, im, f;
      re = ((i * 5 + seed) % 24) - 12;
      im = ((i * 3 + seed * 2) % 20) - 10;
      f  = (i * 7 + seed) % 22 - 2;
      are[i] = clip(PH / 2 - re);
      aim[i] = clip(PH / 2 - im);
      afft[i] = clip(PH - 1 - f);
      adc_data.re <= 16'(re); adc_data.im <= 16'(im); adc_valid <= 1; adc_last <= (i == n - 1);
      fft_data <= 16'(f); fft_valid <= 1; fft_last <= (i == n - 1);
      @(posedge clk);
    end
    adc_valid <= 0; fft_valid <= 0;
    @(posedge clk);
  endtask

  task automatic sweep();
    logic [23:0] expq[$];
    int pend = 0;
    for (int y = 0; y < FY + PH + 2; y++) begin
      for (int x = 0; x < X0 + XS + 3; x++) begin
        px <= 12'(x); py <= 12'(y);
        expq.push_back(model(x, y));
        @(posedge clk);
        pend++;
        if (pend > 1) begin
          logic [23:0] e;
          #1;
          e = expq.pop_front();
          checks++;
          if (rgb !== e) begin
            failures++;
            if (failures < 10) $display("pixel before (%0d,%0d): got %h expected %h", x, y, rgb, e);
          end
        end
      end
    end
  endtask

  initial begin
    px = 0; py = 0; adc_data = '0; fft_data = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    write_windows(XS, 0);
    sweep();
    // a shorter window rewrites only the first columns
    begin
      int keep_re[XS], keep_im[XS], keep_f[XS];
      keep_re = are; keep_im = aim; keep_f = afft;
      write_windows(6, 9);
      for (int i = 6; i < XS; i++) begin are[i] = keep_re[i]; aim[i] = keep_im[i]; afft[i] = keep_f[i]; end
    end
    sweep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
