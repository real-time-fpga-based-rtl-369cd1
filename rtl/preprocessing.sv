// Pre-processing block: LVDS lanes in, aligned complex samples out.
//
// In the LVDS bit-clock domain, every lane (one data lane per receiver plus
// the shared frame-clock and data-valid lanes) is deserialized 1:8, and one
// word aligner per receiver turns its bytes into complex samples using the
// shared frame clock and valid bytes. All lanes are cut at the same instants,
// so the aligners produce their samples together; the N_RX samples are then
// carried into the processing clock domain by a single asynchronous FIFO,
// which keeps the receivers in lock-step for the non-coherent adder.
//
// Interface: lvds_* are the DDR bit pairs of each lane; m_data/m_valid carry
// one sample per receiver per beat in the dsp_clk domain (no back-pressure:
// the DSP chains always accept). fifo_overflow pulses if a sample set is
// lost because the FIFO is full (never at the intended clock ratios).
//
// Origin: deserializers on every LVDS lane plus word alignment follow the
// original pre-processing block; the shared FIFO into dsp_clk is this design's
// choice.
module preprocessing
  import radar_pkg::*;
#(
  parameter int N_RX = 4
) (
  input  logic                  lvds_clk,
  input  logic                  lvds_rst,
  input  logic [N_RX-1:0]       data_rise,
  input  logic [N_RX-1:0]       data_fall,
  input  logic                  frame_rise,
  input  logic                  frame_fall,
  input  logic                  valid_rise,
  input  logic                  valid_fall,
  input  align_cfg_t            cfg,
  input  logic                  dsp_clk,
  input  logic                  dsp_rst,
  output cplx16_t [N_RX-1:0]    m_data,
  output logic                  m_valid,
  output logic [N_RX-1:0][15:0] bitslip_count,
  output logic [N_RX-1:0]       locked,
  output logic                  fifo_overflow
);
  logic [7:0] frame_byte, valid_byte;
  logic [N_RX-1:0][7:0] data_byte;
  logic [N_RX-1:0] data_strobe, smp_valid;
  logic frame_strobe, valid_strobe;
  cplx16_t [N_RX-1:0] smp;
  logic fifo_ready;

  data_deserializer u_des_frame (
    .clk(lvds_clk), .rst(lvds_rst), .din_rise(frame_rise), .din_fall(frame_fall),
    .dout(frame_byte), .dout_valid(frame_strobe)
  );
  data_deserializer u_des_valid (
    .clk(lvds_clk), .rst(lvds_rst), .din_rise(valid_rise), .din_fall(valid_fall),
    .dout(valid_byte), .dout_valid(valid_strobe)
  );

  for (genvar i = 0; i < N_RX; i++) begin : g_lane
    data_deserializer u_des (
      .clk(lvds_clk), .rst(lvds_rst), .din_rise(data_rise[i]), .din_fall(data_fall[i]),
      .dout(data_byte[i]), .dout_valid(data_strobe[i])
    );
    word_aligner u_align (
      .clk(lvds_clk), .rst(lvds_rst), .cfg,
      .din(data_byte[i]), .frame(frame_byte), .valid(valid_byte), .din_strobe(data_strobe[i]),
      .sample(smp[i]), .sample_valid(smp_valid[i]),
      .locked(locked[i]), .bitslip_count(bitslip_count[i])
    );
  end

  // all deserializers share one reset and clock, so their strobes coincide
  assert property (@(posedge lvds_clk) disable iff (lvds_rst)
                   data_strobe[0] == frame_strobe && frame_strobe == valid_strobe);

  async_fifo #(.W($bits(cplx16_t) * N_RX), .DEPTH_LOG2(4)) u_cdc (
    .wr_clk(lvds_clk), .wr_rst(lvds_rst), .s_data(smp), .s_valid(smp_valid[0]), .s_ready(fifo_ready),
    .rd_clk(dsp_clk), .rd_rst(dsp_rst), .m_data(m_data), .m_valid, .m_ready(1'b1)
  );

  always_ff @(posedge lvds_clk) begin
    if (lvds_rst) fifo_overflow <= 1'b0;
    else          fifo_overflow <= smp_valid[0] && !fifo_ready;
  end
endmodule
