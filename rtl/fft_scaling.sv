// FFT scaling block: prepares the range profile for the FFT plot.
//
// scaler -> interpolator -> decimator -> data_counter.
// The profile (unsigned, IN_W bits) is scaled by 2**N and saturated to a
// 16-bit plot value, stretched by L/M along x, and cut by the data counter
// to the X_SIZE columns of the plot: with a 1024-bin window, L=6 and M=2
// give 3072 values, of which the first 1536 (bins 0..511) are shown.
//
// Interface: valid/ready streams with last; latency one cycle in the scaler
// and one in the interpolator.
//
// Origin: the scaler -> interpolator -> decimator -> data counter chain is the
// original FFT scaling path; the unsigned-to-16-bit conversion is this
// design's.
module fft_scaling
  import radar_pkg::*;
#(
  parameter int IN_W   = 41,
  parameter int X_SIZE = 1536
) (
  input  logic              clk,
  input  logic              rst,
  input  scale_cfg_t        cfg,
  input  logic [IN_W-1:0]   s_data,
  input  logic              s_valid,
  input  logic              s_last,
  output logic              s_ready,
  output logic [15:0]       m_data,
  output logic              m_valid,
  output logic              m_last,
  input  logic              m_ready,
  output logic              dropping
);
  logic [0:0][15:0] c_data, i_data, d_data, o_data;
  logic c_valid, c_last, c_ready, i_valid, i_last, i_ready, d_valid, d_last, d_ready;

  // one extra zero bit keeps the unsigned profile positive in the signed scaler
  scaler #(.LANES(1), .IN_W(IN_W + 1), .OUT_W(16)) u_scale (
    .clk, .rst, .shift(cfg.shift), .multiply(cfg.multiply),
    .s_data({1'b0, s_data}), .s_valid, .s_last, .s_ready,
    .m_data(c_data), .m_valid(c_valid), .m_last(c_last), .m_ready(c_ready)
  );

  interpolator #(.LANES(1), .W(16)) u_interp (
    .clk, .rst, .factor(cfg.interp),
    .s_data(c_data), .s_valid(c_valid), .s_last(c_last), .s_ready(c_ready),
    .m_data(i_data), .m_valid(i_valid), .m_last(i_last), .m_ready(i_ready)
  );

  decimator #(.LANES(1), .W(16)) u_decim (
    .clk, .rst, .factor(cfg.decim),
    .s_data(i_data), .s_valid(i_valid), .s_last(i_last), .s_ready(i_ready),
    .m_data(d_data), .m_valid(d_valid), .m_last(d_last), .m_ready(d_ready)
  );

  data_counter #(.X_SIZE(X_SIZE), .LANES(1), .W(16)) u_count (
    .clk, .rst,
    .s_data(d_data), .s_valid(d_valid), .s_last(d_last), .s_ready(d_ready),
    .m_data(o_data), .m_valid, .m_last, .m_ready, .dropping
  );

  assign m_data = o_data[0];
endmodule
