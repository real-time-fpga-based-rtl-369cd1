// DSP chain of one radar receiver: FFT, LogMagMux, accumulator.
//
// Complex ADC samples (one chirp = one FFT window) enter the SDF FFT; each
// window of bins leaves in natural order, is turned into a magnitude-type
// value by the LogMagMux (selected at run time) and summed over frames_cfg
// consecutive chirps by the accumulator. The result is the receiver's range
// profile, one value per range bin.
//
// Timing: streams throughout, one sample per cycle at most, no back-pressure.
// A window's spectrum leaves the FFT while the next chirp enters, and the
// accumulated profile appears while the group's last window passes the
// accumulator. Output width 2*IN_W+MAX_FRAMES_LOG2 bits, unsigned.
//
// Origin: the FFT -> LogMagMux -> accumulator order per receiver follows the
// original processing chain.
module dsp_chain
  import radar_pkg::*;
#(
  parameter int LOG2N           = 10,
  parameter int MAX_FRAMES_LOG2 = 7,
  parameter int IN_W            = 16
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [3:0]                          log2n_cfg,
  input  logmag_sel_t                         logmag_sel,
  input  logic [MAX_FRAMES_LOG2:0]            frames_cfg,
  input  cplx16_t                             s_data,
  input  logic                                s_valid,
  output logic [2*IN_W+MAX_FRAMES_LOG2-1:0]   m_data,
  output logic                                m_valid,
  output logic                                m_last
);
  logic signed [IN_W-1:0] f_re, f_im;
  logic f_valid, f_last;
  logic [2*IN_W-1:0] l_data;
  logic l_valid, l_last;

  sdf_fft #(.LOG2N(LOG2N), .IN_W(IN_W)) u_fft (
    .clk, .rst, .log2n_cfg,
    .s_re(IN_W'(s_data.re)), .s_im(IN_W'(s_data.im)), .s_valid,
    .m_re(f_re), .m_im(f_im), .m_valid(f_valid), .m_last(f_last)
  );

  log_mag_mux #(.IN_W(IN_W), .OUT_W(2 * IN_W)) u_logmag (
    .clk, .rst, .sel(logmag_sel),
    .s_re(f_re), .s_im(f_im), .s_valid(f_valid), .s_last(f_last),
    .m_data(l_data), .m_valid(l_valid), .m_last(l_last)
  );

  accumulator #(.LOG2N(LOG2N), .MAX_FRAMES_LOG2(MAX_FRAMES_LOG2), .IN_W(2 * IN_W)) u_acc (
    .clk, .rst, .frames_cfg,
    .s_data(l_data), .s_valid(l_valid), .s_last(l_last),
    .m_data, .m_valid, .m_last
  );
endmodule
