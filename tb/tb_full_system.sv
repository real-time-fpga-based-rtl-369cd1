// Full-size end-to-end testbench: the demonstrator top with every parameter
// at its default (4 receivers, 1024-point FFT, 1536-column plots, 1080p60
// raster), driven by the LVDS radar model with 1024-sample chirps and three
// targets at bins 40, 100 and 200. Run-time settings follow the demonstrator's
// reference setup: 16-bit complex samples,
// magnitude spectrum, add-all combining, ADC channel 1 on screen, rising
// trigger at 768, ADC path stretched 3/2 and spectrum path 6/2 so both fill
// 1536 columns, 128 chirps accumulated per spectrum, spectrum divided by
// 2^12 to fit the 480-row plot. Two complete HDMI frames are decoded;
// the second must show all traces with the spectrum's highest point over
// bin 40 (columns 120..122) and the division labels lit with the right
// number of pixels for X 128 / Y 960 (ADC) and X 64 / Y 245760 (FFT). Needs a few minutes of simulation.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_full_system;
  import radar_pkg::*;
  localparam int TONE0 = 40;

  logic lvds_clk = 0, dsp_clk = 0, pix_clk = 0, ser_clk = 0;
  logic lvds_rst = 1, dsp_rst = 1, pix_rst = 1, ser_rst = 1, inject_slip = 0;
  logic [3:0] lvds_data_rise, lvds_data_fall;
  logic lvds_frame_rise, lvds_frame_fall, lvds_valid_rise, lvds_valid_fall;
  demo_cfg_t cfg;
  logic [3:0] tmds_rise, tmds_fall;
  logic [3:0][15:0] bitslip_count;
  logic [3:0] aligned;
  logic lvds_overflow, adc_overflow, fft_overflow, trig_fired, adc_window_done, fft_window_done;
  logic adc_truncating, fft_truncating, frame_start;
  logic sent, sent_lost;
  logic [3:0][31:0] sent_data;
  int checks = 0, failures = 0;

  radar_lvds_model #(.N_RX(4), .CHIRP(1024), .TONE0(TONE0), .TONE1(100), .TONE2(200)) u_radar (
    .clk(lvds_clk), .rst(lvds_rst), .inject_slip,
    .data_rise(lvds_data_rise), .data_fall(lvds_data_fall),
    .frame_rise(lvds_frame_rise), .frame_fall(lvds_frame_fall),
    .valid_rise(lvds_valid_rise), .valid_fall(lvds_valid_fall),
    .sent, .sent_data, .sent_lost
  );

  radar_demonstrator_top dut (.*);

  int frames, bad_frames, n_green, n_yellow, n_cyan, n_grid, n_white, fft_peak_col;
  hdmi_frame_checker u_chk (
    .ser_clk, .tmds_rise, .tmds_fall, .frames, .bad_frames, .n_green, .n_yellow, .n_cyan,
    .n_grid, .n_white, .fft_peak_col
  );

  always #2 lvds_clk = ~lvds_clk;
  always #2.5 dsp_clk = ~dsp_clk;
  always #5 pix_clk = ~pix_clk;
  always #1 ser_clk = ~ser_clk;

  initial begin
    #80000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_trig = 0, n_fft = 0, n_ovf = 0;
  always @(posedge pix_clk) begin
    if (!pix_rst && trig_fired) n_trig++;
    if (!pix_rst && fft_window_done) n_fft++;
  end
  always @(posedge dsp_clk) if (!dsp_rst && (adc_overflow || fft_overflow)) n_ovf++;
  always @(posedge lvds_clk) if (!lvds_rst && lvds_overflow) n_ovf++;

  // Label pixels expected for a text: lit pixels per glyph of a 5x7 font,
  // drawn at twice the size (4 screen pixels per font pixel).
  function automatic int label_pixels(input string t);
    int ones [12] = '{19, 10, 14, 14, 14, 17, 15, 11, 17, 15, 13, 10};  // 0-9, X, Y
    int n = 0;
    for (int i = 0; i < t.len(); i++)
      n += 4 * (t[i] == "X" ? ones[10] : t[i] == "Y" ? ones[11] : ones[t[i] - "0"]);
    return n;
  endfunction

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAILED: %s", what);
    end
  endtask

  initial begin
    cfg = '0;
    cfg.align = '{width: ADC_W16, is_complex: 1'b1, lsb_first: 1'b0};
    cfg.fft_log2n = 4'd10;
    cfg.logmag_sel = LM_MAG;
    cfg.acc_frames = 8'd128;
    cfg.nca_add_all = 1'b1;
    cfg.nca_sel = 2'd0;
    cfg.adc_mux_sel = 2'd1;
    cfg.trig_level = 16'sd768;
    cfg.trig_falling = 1'b0;
    cfg.adc_scale = '{shift: 4'd4, multiply: 1'b0, interp: 5'd3, decim: 5'd2};
    cfg.fft_scale = '{shift: 4'd12, multiply: 1'b0, interp: 5'd6, decim: 5'd2};
    repeat (4) @(posedge pix_clk);
    lvds_rst <= 0; dsp_rst <= 0; pix_rst <= 0; ser_rst <= 0;
    while (frames < 2) @(posedge pix_clk);
    $display("picture: green %0d yellow %0d cyan %0d grid %0d, spectrum peak at column %0d",
             n_green, n_yellow, n_cyan, n_grid, fft_peak_col);
    $display("trigger %0d spectra %0d overflow %0d", n_trig, n_fft, n_ovf);
    expect_true("frames have the full 1920x1080 raster", bad_frames == 0);
    expect_true("real trace drawn", n_green >= 768);
    expect_true("imaginary trace drawn", n_yellow >= 768);
    expect_true("spectrum trace drawn", n_cyan >= 768);
    expect_true("grid drawn", n_grid > 10000);
    // X: 192 columns per division * M / L; Y: 60 rows per division * 2^shift
    $display("label pixels %0d", n_white);
    expect_true("division labels X 128, Y 960, X 64, Y 245760",
                n_white == label_pixels({"X", $sformatf("%0d", 192 * 2 / 3), "Y", $sformatf("%0d", 60 << 4),
                                         "X", $sformatf("%0d", 192 * 2 / 6), "Y", $sformatf("%0d", 60 << 12)}));
    expect_true("spectrum peak over bin 40", fft_peak_col >= 3 * TONE0 && fft_peak_col <= 3 * TONE0 + 2);
    for (int r = 0; r < 4; r++) expect_true("lane aligned without slips", aligned[r] && bitslip_count[r] == 0);
    expect_true("trigger fired", n_trig > 0);
    expect_true("spectra accumulated", n_fft > 0);
    expect_true("no FIFO overflow", n_ovf == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
