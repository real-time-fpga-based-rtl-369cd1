// Real-time FMCW range radar demonstrator with HDMI output: top level.
//
// Four clock domains, joined by asynchronous FIFOs:
//   lvds_clk  pre-processing: deserialize the radar's LVDS lanes and align
//             them into complex 16+16-bit samples, one stream per receiver;
//   dsp_clk   one DSP chain per receiver (SDF FFT -> LogMagMux ->
//             accumulator over chirps), the non-coherent adder that combines
//             the receivers, and the N:1 multiplexer that picks the receiver
//             whose raw samples are plotted;
//   pix_clk   the ADC and FFT scaling paths (trigger/scaler/interpolator/
//             decimator/data counter), the frame buffer that draws both plots
//             and the HDMI timing and TMDS encoding (148.5 MHz for 1080p60);
//   ser_clk   the 10:1 DDR serializers (5x pix_clk).
// The spectrum FIFO holds a full window, because the accumulated profile
// leaves the DSP chain as a burst of one bin per cycle while the FFT scaling
// path may consume one bin per L cycles.
//
// Control registers arrive as one radar_pkg::demo_cfg_t port (written by a
// host over JTAG in the system; they should change only while the affected
// path is idle). Status outputs report alignment, trigger and overflow
// events. Resets are synchronous, one per clock domain. The clocks come from
// a PLL outside this module.
//
// Origin: the block structure, the reference configuration and the 1080p60
// clocks follow the original demonstrator; FIFO depths, the struct control
// port and the status outputs are this design's.
module radar_demonstrator_top
  import radar_pkg::*;
#(
  parameter int N_RX            = 4,
  parameter int LOG2N           = 10,
  parameter int MAX_FRAMES_LOG2 = 7,
  parameter int CAPTURE_LEN     = 1024,
  parameter int X_SIZE          = 1536,
  parameter int X0              = 192,
  parameter int PLOT_H          = 480,
  parameter int ADC_Y0          = 40,
  parameter int FFT_Y0          = 560,
  parameter int HA = H_ACTIVE, parameter int HF = H_FP, parameter int HS = H_SYNC, parameter int HB = H_BP,
  parameter int VA = V_ACTIVE, parameter int VF = V_FP, parameter int VS = V_SYNC, parameter int VB = V_BP
) (
  // radar LVDS interface (bit pairs from input DDR registers)
  input  logic                  lvds_clk,
  input  logic                  lvds_rst,
  input  logic [N_RX-1:0]       lvds_data_rise,
  input  logic [N_RX-1:0]       lvds_data_fall,
  input  logic                  lvds_frame_rise,
  input  logic                  lvds_frame_fall,
  input  logic                  lvds_valid_rise,
  input  logic                  lvds_valid_fall,
  // processing, pixel and serial clocks
  input  logic                  dsp_clk,
  input  logic                  dsp_rst,
  input  logic                  pix_clk,
  input  logic                  pix_rst,
  input  logic                  ser_clk,
  input  logic                  ser_rst,
  // control registers
  input  demo_cfg_t             cfg,
  // HDMI: blue, green, red, clock lanes, bit pairs for output DDR registers
  output logic [3:0]            tmds_rise,
  output logic [3:0]            tmds_fall,
  // status
  output logic [N_RX-1:0][15:0] bitslip_count,
  output logic [N_RX-1:0]       aligned,
  output logic                  lvds_overflow,
  output logic                  adc_overflow,
  output logic                  fft_overflow,
  output logic                  trig_fired,
  output logic                  adc_window_done,
  output logic                  fft_window_done,
  output logic                  adc_truncating,
  output logic                  fft_truncating,
  output logic                  frame_start
);
  localparam int ACC_W = 32 + MAX_FRAMES_LOG2;
  localparam int NCA_W = ACC_W + $clog2(N_RX);

  // ---------------- pre-processing (lvds_clk)
  cplx16_t [N_RX-1:0] rx_data;
  logic               rx_valid;

  preprocessing #(.N_RX(N_RX)) u_pre (
    .lvds_clk, .lvds_rst,
    .data_rise(lvds_data_rise), .data_fall(lvds_data_fall),
    .frame_rise(lvds_frame_rise), .frame_fall(lvds_frame_fall),
    .valid_rise(lvds_valid_rise), .valid_fall(lvds_valid_fall),
    .cfg(cfg.align), .dsp_clk, .dsp_rst,
    .m_data(rx_data), .m_valid(rx_valid),
    .bitslip_count, .locked(aligned), .fifo_overflow(lvds_overflow)
  );

  // ---------------- DSP (dsp_clk)
  logic [N_RX-1:0][ACC_W-1:0] ch_data;
  logic [N_RX-1:0]            ch_valid, ch_last;

  for (genvar i = 0; i < N_RX; i++) begin : g_chain
    dsp_chain #(.LOG2N(LOG2N), .MAX_FRAMES_LOG2(MAX_FRAMES_LOG2), .IN_W(16)) u_chain (
      .clk(dsp_clk), .rst(dsp_rst),
      .log2n_cfg(cfg.fft_log2n), .logmag_sel(cfg.logmag_sel),
      .frames_cfg((MAX_FRAMES_LOG2+1)'(cfg.acc_frames)),
      .s_data(rx_data[i]), .s_valid(rx_valid),
      .m_data(ch_data[i]), .m_valid(ch_valid[i]), .m_last(ch_last[i])
    );
  end

  logic [NCA_W-1:0] nca_data;
  logic             nca_valid, nca_last, spec_ready;

  noncoherent_adder #(.N_IN(N_RX), .IN_W(ACC_W)) u_nca (
    .clk(dsp_clk), .rst(dsp_rst), .add_all(cfg.nca_add_all), .sel($clog2(N_RX)'(cfg.nca_sel)),
    .s_data(ch_data), .s_valid(ch_valid), .s_last(ch_last),
    .m_data(nca_data), .m_valid(nca_valid), .m_last(nca_last)
  );

  cplx16_t mux_data;
  logic    mux_valid, adc_fifo_ready;

  adc_channel_mux #(.N_IN(N_RX)) u_mux (
    .clk(dsp_clk), .rst(dsp_rst), .sel($clog2(N_RX)'(cfg.adc_mux_sel)),
    .s_data(rx_data), .s_valid({N_RX{rx_valid}}),
    .m_data(mux_data), .m_valid(mux_valid)
  );

  always_ff @(posedge dsp_clk) begin
    if (dsp_rst) begin
      adc_overflow <= 1'b0;
      fft_overflow <= 1'b0;
    end else begin
      adc_overflow <= mux_valid && !adc_fifo_ready;
      fft_overflow <= nca_valid && !spec_ready;
    end
  end

  // ---------------- clock domain crossings into pix_clk
  cplx16_t          adc_raw;
  logic             adc_raw_valid, adc_raw_ready;
  logic [NCA_W-1:0] spec_data;
  logic             spec_last, spec_valid, spec_rd_ready;

  async_fifo #(.W($bits(cplx16_t)), .DEPTH_LOG2(4)) u_cdc_adc (
    .wr_clk(dsp_clk), .wr_rst(dsp_rst), .s_data(mux_data), .s_valid(mux_valid), .s_ready(adc_fifo_ready),
    .rd_clk(pix_clk), .rd_rst(pix_rst), .m_data(adc_raw), .m_valid(adc_raw_valid), .m_ready(adc_raw_ready)
  );

  async_fifo #(.W(NCA_W + 1), .DEPTH_LOG2(LOG2N)) u_cdc_fft (
    .wr_clk(dsp_clk), .wr_rst(dsp_rst), .s_data({nca_last, nca_data}), .s_valid(nca_valid), .s_ready(spec_ready),
    .rd_clk(pix_clk), .rd_rst(pix_rst), .m_data({spec_last, spec_data}), .m_valid(spec_valid), .m_ready(spec_rd_ready)
  );

  // ---------------- scaling paths (pix_clk)
  cplx16_t            adc_plot;
  logic               adc_plot_valid, adc_plot_last;
  logic signed [15:0] fft_plot;
  logic               fft_plot_valid, fft_plot_last;

  adc_scaling #(.CAPTURE_LEN(CAPTURE_LEN), .X_SIZE(X_SIZE)) u_adc_scale (
    .clk(pix_clk), .rst(pix_rst), .cfg(cfg.adc_scale),
    .trig_level(cfg.trig_level), .trig_falling(cfg.trig_falling),
    .s_data(adc_raw), .s_valid(adc_raw_valid), .s_ready(adc_raw_ready),
    .m_data(adc_plot), .m_valid(adc_plot_valid), .m_last(adc_plot_last), .m_ready(1'b1),
    .trig_fired, .dropping(adc_truncating)
  );

  fft_scaling #(.IN_W(NCA_W), .X_SIZE(X_SIZE)) u_fft_scale (
    .clk(pix_clk), .rst(pix_rst), .cfg(cfg.fft_scale),
    .s_data(spec_data), .s_valid(spec_valid), .s_last(spec_last), .s_ready(spec_rd_ready),
    .m_data(fft_plot), .m_valid(fft_plot_valid), .m_last(fft_plot_last), .m_ready(1'b1),
    .dropping(fft_truncating)
  );

  assign adc_window_done = adc_plot_valid && adc_plot_last;
  assign fft_window_done = fft_plot_valid && fft_plot_last;

  // ---------------- frame buffer and HDMI (pix_clk, ser_clk)
  logic [11:0] px, py;
  logic [23:0] rgb;

  frame_buffer #(.X_SIZE(X_SIZE), .X0(X0), .PLOT_H(PLOT_H), .ADC_Y0(ADC_Y0), .FFT_Y0(FFT_Y0)) u_fb (
    .clk(pix_clk), .rst(pix_rst),
    .adc_data(adc_plot), .adc_valid(adc_plot_valid), .adc_last(adc_plot_last),
    .fft_data(fft_plot), .fft_valid(fft_plot_valid), .fft_last(fft_plot_last),
    .adc_scale(cfg.adc_scale), .fft_scale(cfg.fft_scale),
    .px, .py, .rgb
  );

  hdmi_serializer #(.FB_LATENCY(2), .HA(HA), .HF(HF), .HS(HS), .HB(HB),
                    .VA(VA), .VF(VF), .VS(VS), .VB(VB)) u_hdmi (
    .pix_clk, .ser_clk, .rst(pix_rst), .ser_rst, .rgb, .px, .py, .frame_start,
    .tmds_rise, .tmds_fall
  );
endmodule
