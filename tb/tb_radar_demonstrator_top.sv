// End-to-end testbench of the demonstrator at reduced size: 4 receivers,
// 32-point FFT, groups of 2 chirps, 24-column plots, a 30x70 raster.
// The radar LVDS model sends chirps with three targets (tones at bins 3, 7
// and 12); the HDMI output is deserialized and decoded back into frames.
// Checks: aligned samples and a corrected bit slip on every lane; trigger
// captures and ADC plot windows; accumulated spectra in both non-coherent
// adder modes (add all, then one receiver); the data counter truncating the
// stretched spectrum; real, imaginary and FFT traces and the grid all present
// in decoded frames, the FFT trace's highest point over bin 3 (plot columns
// 9..11 with L/M = 3); no FIFO overflow anywhere. Each mechanism must have
// happened at least once.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_radar_demonstrator_top;
  import radar_pkg::*;
  localparam int N_RX = 4, LOG2N = 5, MFL = 2, CL = 16, XS = 24, X0 = 2, PH = 32, AY = 1, FY = 36;
  localparam int HA = 30, HF = 2, HS = 2, HB = 2, VA = 70, VF = 1, VS = 1, VB = 1;

  logic lvds_clk = 0, dsp_clk = 0, pix_clk = 0, ser_clk = 0;
  logic lvds_rst = 1, dsp_rst = 1, pix_rst = 1, ser_rst = 1, inject_slip = 0;
  logic [N_RX-1:0] lvds_data_rise, lvds_data_fall;
  logic lvds_frame_rise, lvds_frame_fall, lvds_valid_rise, lvds_valid_fall;
  demo_cfg_t cfg;
  logic [3:0] tmds_rise, tmds_fall;
  logic [N_RX-1:0][15:0] bitslip_count;
  logic [N_RX-1:0] aligned;
  logic lvds_overflow, adc_overflow, fft_overflow, trig_fired, adc_window_done, fft_window_done;
  logic adc_truncating, fft_truncating, frame_start;
  logic sent, sent_lost;
  logic [N_RX-1:0][31:0] sent_data;
  int checks = 0, failures = 0;

  radar_lvds_model #(.N_RX(N_RX), .CHIRP(32), .TONE0(3), .TONE1(7), .TONE2(12)) u_radar (
    .clk(lvds_clk), .rst(lvds_rst), .inject_slip,
    .data_rise(lvds_data_rise), .data_fall(lvds_data_fall),
    .frame_rise(lvds_frame_rise), .frame_fall(lvds_frame_fall),
    .valid_rise(lvds_valid_rise), .valid_fall(lvds_valid_fall),
    .sent, .sent_data, .sent_lost
  );

  radar_demonstrator_top #(
    .N_RX(N_RX), .LOG2N(LOG2N), .MAX_FRAMES_LOG2(MFL), .CAPTURE_LEN(CL), .X_SIZE(XS),
    .X0(X0), .PLOT_H(PH), .ADC_Y0(AY), .FFT_Y0(FY),
    .HA(HA), .HF(HF), .HS(HS), .HB(HB), .VA(VA), .VF(VF), .VS(VS), .VB(VB)
  ) dut (.*);

  int frames, bad_frames, n_green, n_yellow, n_cyan, n_grid, n_white, fft_peak_col;
  hdmi_frame_checker #(.HA(HA), .VA(VA), .X0(X0), .X_SIZE(XS), .FFT_Y0(FY)) u_chk (
    .ser_clk, .tmds_rise, .tmds_fall, .frames, .bad_frames, .n_green, .n_yellow, .n_cyan,
    .n_grid, .n_white, .fft_peak_col
  );

  always #4 lvds_clk = ~lvds_clk;
  always #3.1 dsp_clk = ~dsp_clk;
  always #5 pix_clk = ~pix_clk;
  always #1 ser_clk = ~ser_clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_trig = 0, n_adc_win = 0, n_fft_add = 0, n_fft_sel = 0, n_trunc = 0, n_frames = 0, n_ovf = 0;
  always @(posedge pix_clk) begin
    if (!pix_rst && trig_fired) n_trig++;
    if (!pix_rst && adc_window_done) n_adc_win++;
    if (!pix_rst && fft_window_done) begin
      if (cfg.nca_add_all) n_fft_add++; else n_fft_sel++;
    end
    if (!pix_rst && fft_truncating) n_trunc++;
    if (!pix_rst && frame_start) n_frames++;
  end
  always @(posedge dsp_clk) if (!dsp_rst && (adc_overflow || fft_overflow)) n_ovf++;
  always @(posedge lvds_clk) if (!lvds_rst && lvds_overflow) n_ovf++;

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAILED: %s", what);
    end
  endtask

  task automatic wait_frames(input int n);
    int f0 = frames;
    while (frames < f0 + n) @(posedge pix_clk);
  endtask

  initial begin
    cfg = '0;
    cfg.align = '{width: ADC_W16, is_complex: 1'b1, lsb_first: 1'b0};
    cfg.fft_log2n = 4'(LOG2N);
    cfg.logmag_sel = LM_MAG_JPL;
    cfg.acc_frames = 8'd2;
    cfg.nca_add_all = 1'b1;
    cfg.nca_sel = 2'd1;
    cfg.adc_mux_sel = 2'd0;
    cfg.trig_level = 16'sd768;
    cfg.trig_falling = 1'b0;
    cfg.adc_scale = '{shift: 4'd7, multiply: 1'b0, interp: 5'd3, decim: 5'd2};
    cfg.fft_scale = '{shift: 4'd10, multiply: 1'b0, interp: 5'd6, decim: 5'd2};
    repeat (4) @(posedge pix_clk);
    lvds_rst <= 0; dsp_rst <= 0; pix_rst <= 0; ser_rst <= 0;
    // let a few spectra through in add-all mode, with a bit slip on the way
    repeat (1500) @(posedge lvds_clk);
    inject_slip <= 1;
    @(posedge lvds_clk);
    inject_slip <= 0;
    wait_frames(4);
    expect_true("frames have the full raster", bad_frames == 0 && frames >= 4);
    expect_true("real trace drawn", n_green >= XS / 2);
    expect_true("imaginary trace drawn", n_yellow >= XS / 2);
    expect_true("spectrum trace drawn", n_cyan >= XS / 2);
    expect_true("grid drawn", n_grid > 2 * XS);
    $display("picture: green %0d yellow %0d cyan %0d grid %0d, spectrum peak at column %0d",
             n_green, n_yellow, n_cyan, n_grid, fft_peak_col);
    expect_true("spectrum peak over bin 3", fft_peak_col >= 9 && fft_peak_col <= 11);
    // mode switch: one receiver only
    cfg.nca_add_all = 1'b0;
    wait_frames(4);
    expect_true("single-receiver spectrum peak over bin 3", fft_peak_col >= 9 && fft_peak_col <= 11);
    for (int r = 0; r < N_RX; r++) expect_true("lane aligned", aligned[r]);
    for (int r = 0; r < N_RX; r++) expect_true("bit slip corrected once", bitslip_count[r] == 1);
    expect_true("trigger fired", n_trig > 0);
    expect_true("ADC windows plotted", n_adc_win > 0);
    expect_true("spectra in add-all mode", n_fft_add > 0);
    expect_true("spectra in single-receiver mode", n_fft_sel > 0);
    expect_true("data counter truncated", n_trunc > 0);
    expect_true("frame starts", n_frames >= 8);
    expect_true("no FIFO overflow", n_ovf == 0);
    $display("mechanisms: slips %0d trigger %0d adc windows %0d spectra add %0d sel %0d truncations %0d frames %0d",
             bitslip_count[0], n_trig, n_adc_win, n_fft_add, n_fft_sel, n_trunc, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
