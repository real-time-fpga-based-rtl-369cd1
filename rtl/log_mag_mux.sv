// LogMagMux: magnitude-type conversions of a complex stream, one selected.
//
// For every complex sample z = re + j*im this block computes
//   * the squared magnitude re^2 + im^2 (exact, 2*IN_W bits unsigned),
//   * the magnitude by the JPL approximation: with a = max(|re|,|im|) and
//     b = min(|re|,|im|), |z| ~ max(a, 7/8*a + 1/2*b), which needs only
//     shifts and adds (error below about 4 %),
//   * the exact magnitude, an integer square root of re^2 + im^2,
//   * log2|z| as unsigned Q5.8: half of log2(re^2+im^2), whose integer part
//     is the leading-one position and whose fraction is taken linearly from
//     the next 8 mantissa bits (log2(1+f) ~ f, error below 0.09).
// sel (radar_pkg::logmag_sel_t) picks the one sent out, zero-extended to
// OUT_W. The JPL form and the log2 approximation are this design's choices;
// the set of outputs follows the original block.
//
// Timing: fully combinational datapath with one output register: m_* follow
// s_* by one cycle, one sample per cycle, no back-pressure.
module log_mag_mux
  import radar_pkg::*;
#(
  parameter int IN_W  = 16,
  parameter int OUT_W = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logmag_sel_t            sel,
  input  logic signed [IN_W-1:0] s_re,
  input  logic signed [IN_W-1:0] s_im,
  input  logic                   s_valid,
  input  logic                   s_last,
  output logic [OUT_W-1:0]       m_data,
  output logic                   m_valid,
  output logic                   m_last
);
  localparam int SQ_W = 2 * IN_W;

  logic [IN_W:0]   ar, ai, a, b;
  logic [SQ_W-1:0] mag_sq;
  logic [IN_W+1:0] jpl, t78;
  logic [IN_W:0]   root;
  logic [12:0]     log2q;   // Q5.8 of log2 |z|

  always_comb begin
    ar = s_re[IN_W-1] ? (IN_W+1)'(-s_re) : (IN_W+1)'(s_re);
    ai = s_im[IN_W-1] ? (IN_W+1)'(-s_im) : (IN_W+1)'(s_im);
    mag_sq = SQ_W'(ar * ar) + SQ_W'(ai * ai);
    a = (ar > ai) ? ar : ai;
    b = (ar > ai) ? ai : ar;
    t78 = (IN_W+2)'(a) - (IN_W+2)'(a >> 3) + (IN_W+2)'(b >> 1);
    jpl = (t78 > (IN_W+2)'(a)) ? t78 : (IN_W+2)'(a);
  end

  // restoring integer square root of mag_sq
  always_comb begin
    logic [SQ_W+1:0] rem, trial;
    logic [SQ_W-1:0] x;
    rem  = '0;
    root = '0;
    x    = mag_sq;
    for (int i = SQ_W / 2 - 1; i >= 0; i--) begin
      rem   = (rem << 2) | (SQ_W+2)'(x[2*i+1 -: 2]);
      trial = ((SQ_W+2)'(root) << 2) | (SQ_W+2)'(1);
      if (rem >= trial) begin
        rem  = rem - trial;
        root = (root << 1) | (IN_W+1)'(1);
      end else begin
        root = root << 1;
      end
    end
  end

  // log2 via leading one and linear mantissa
  always_comb begin
    logic [4:0]      pos;
    logic [SQ_W+7:0] sh;
    logic [13:0]     l2sq;
    pos = '0;
    for (int i = 0; i < SQ_W; i++) if (mag_sq[i]) pos = 5'(i);
    sh    = (SQ_W+8)'(mag_sq) << 8;
    sh    = sh >> pos;                  // 1.fraction with 8 fraction bits
    l2sq  = {1'b0, pos, sh[7:0]};       // log2(mag_sq), Q5.8 (pos < 32)
    log2q = (mag_sq == 0) ? '0 : 13'(l2sq >> 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      m_data  <= '0;
    end else begin
      m_valid <= s_valid;
      m_last  <= s_last;
      if (s_valid) begin
        unique case (sel)
          LM_MAG_JPL: m_data <= OUT_W'(jpl);
          LM_MAG_SQ:  m_data <= OUT_W'(mag_sq);
          LM_LOG2:    m_data <= OUT_W'(log2q);
          default:    m_data <= OUT_W'(root);
        endcase
      end
    end
  end
endmodule
