// ADC scaling block: prepares one receiver's raw samples for the ADC plot.
//
// trigger -> scaler -> interpolator -> decimator -> data_counter.
// The trigger picks a window that starts at a level crossing so the trace
// stands still on screen; the scaler sets the vertical scale (2**N); the
// interpolator and decimator set the horizontal scale (L/M screen columns per
// sample); the data counter cuts the window to the X_SIZE columns of the
// plot. Real and imaginary parts travel as two 16-bit lanes.
//
// Interface: valid/ready streams of radar_pkg::cplx16_t, all settings from
// radar_pkg::scale_cfg_t plus trigger level and edge. Latency: one cycle in
// the scaler and one in the interpolator.
//
// Origin: the chain trigger -> scaler -> interpolator -> decimator -> data
// counter is the original ADC scaling path; the valid/ready handshake between
// the stages is this design's.
module adc_scaling
  import radar_pkg::*;
#(
  parameter int CAPTURE_LEN = 1024,
  parameter int X_SIZE      = 1536
) (
  input  logic               clk,
  input  logic               rst,
  input  scale_cfg_t         cfg,
  input  logic signed [15:0] trig_level,
  input  logic               trig_falling,
  input  cplx16_t            s_data,
  input  logic               s_valid,
  output logic               s_ready,
  output cplx16_t            m_data,
  output logic               m_valid,
  output logic               m_last,
  input  logic               m_ready,
  output logic               trig_fired,
  output logic               dropping
);
  cplx16_t t_data;
  logic t_valid, t_last, t_ready;
  logic [1:0][15:0] c_data, i_data, d_data, o_data;
  logic c_valid, c_last, c_ready, i_valid, i_last, i_ready, d_valid, d_last, d_ready;

  trigger #(.CAPTURE_LEN(CAPTURE_LEN)) u_trig (
    .clk, .rst, .level(trig_level), .falling(trig_falling),
    .s_data, .s_valid, .s_ready,
    .m_data(t_data), .m_valid(t_valid), .m_last(t_last), .m_ready(t_ready),
    .fired(trig_fired)
  );

  scaler #(.LANES(2), .IN_W(16), .OUT_W(16)) u_scale (
    .clk, .rst, .shift(cfg.shift), .multiply(cfg.multiply),
    .s_data({t_data.re, t_data.im}), .s_valid(t_valid), .s_last(t_last), .s_ready(t_ready),
    .m_data(c_data), .m_valid(c_valid), .m_last(c_last), .m_ready(c_ready)
  );

  interpolator #(.LANES(2), .W(16)) u_interp (
    .clk, .rst, .factor(cfg.interp),
    .s_data(c_data), .s_valid(c_valid), .s_last(c_last), .s_ready(c_ready),
    .m_data(i_data), .m_valid(i_valid), .m_last(i_last), .m_ready(i_ready)
  );

  decimator #(.LANES(2), .W(16)) u_decim (
    .clk, .rst, .factor(cfg.decim),
    .s_data(i_data), .s_valid(i_valid), .s_last(i_last), .s_ready(i_ready),
    .m_data(d_data), .m_valid(d_valid), .m_last(d_last), .m_ready(d_ready)
  );

  data_counter #(.X_SIZE(X_SIZE), .LANES(2), .W(16)) u_count (
    .clk, .rst,
    .s_data(d_data), .s_valid(d_valid), .s_last(d_last), .s_ready(d_ready),
    .m_data(o_data), .m_valid, .m_last, .m_ready, .dropping
  );

  assign m_data.re = o_data[1];
  assign m_data.im = o_data[0];
endmodule
