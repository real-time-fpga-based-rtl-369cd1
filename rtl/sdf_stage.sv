// One radix-2 decimation-in-frequency stage of the single-path delay-feedback
// (SDF) FFT.
//
// Stage s of a 2**LOG2N-point FFT owns a feedback delay line of D = N/2**(s+1)
// complex words and a local counter over 2*D input samples:
//   * first half of the counter (fill phase): the incoming sample is stored in
//     the delay line while the word it replaces, the difference left there by
//     the previous butterfly, leaves the stage multiplied by the twiddle
//     W_2D^k = exp(-j*pi*k/D);
//   * second half (butterfly phase): the stored sample a and the incoming
//     sample b give a+b, which leaves at once, and a-b, which goes back into
//     the delay line.
// With bypass set, the stage is skipped (run-time reduction of the FFT size:
// the first, largest stages are the ones bypassed).
//
// Timing: one output per input sample; the output register updates on
// in_valid, so out_valid follows in_valid by one cycle and the pipeline moves
// only when samples arrive. The twiddle table is computed at elaboration
// (1.14 fixed point, 1.0 = 2**(TW_W-2)); the product is rounded to nearest.
module sdf_stage #(
  parameter int LOG2N = 10,
  parameter int STAGE = 0,
  parameter int W     = 27,
  parameter int TW_W  = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bypass,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic                in_valid,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                out_valid
);
  localparam int CW = LOG2N - STAGE;   // counter width, counts 2*D samples
  localparam int D  = 2 ** (CW - 1);
  localparam int FRAC = TW_W - 2;
  localparam int KW = (CW > 1) ? CW - 1 : 1;   // delay-line address width

  typedef logic signed [TW_W-1:0] tw_arr_t [D];
  function automatic tw_arr_t make_tw(input bit sine);
    tw_arr_t a;
    for (int k = 0; k < D; k++) begin
      real ang = 3.141592653589793 * k / D;
      real v   = sine ? -$sin(ang) : $cos(ang);
      a[k] = TW_W'($rtoi($floor(v * (2.0 ** FRAC) + 0.5)));
    end
    return a;
  endfunction
  localparam tw_arr_t TW_RE = make_tw(1'b0);
  localparam tw_arr_t TW_IM = make_tw(1'b1);

  logic [CW-1:0] cnt;
  logic signed [W-1:0] dl_re [D];
  logic signed [W-1:0] dl_im [D];

  wire             half = cnt[CW-1];
  wire [KW-1:0]    kw   = KW'(cnt & CW'(D - 1));
  wire signed [W-1:0] a_re = dl_re[kw];
  wire signed [W-1:0] a_im = dl_im[kw];

  // twiddle product of the stored difference
  logic signed [W+TW_W-1:0] p_re, p_im;
  logic signed [TW_W-1:0]   c, sn;
  always_comb begin
    c    = TW_RE[kw];
    sn   = TW_IM[kw];
    p_re = W'(a_re) * c - W'(a_im) * sn;
    p_im = W'(a_re) * sn + W'(a_im) * c;
  end
  wire signed [W+TW_W-1:0] rnd = (W + TW_W)'(2 ** (FRAC - 1));
  wire signed [W+TW_W-1:0] r_re = (p_re + rnd) >>> FRAC;
  wire signed [W+TW_W-1:0] r_im = (p_im + rnd) >>> FRAC;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (bypass) begin
          out_re <= in_re;
          out_im <= in_im;
        end else begin
          cnt <= cnt + 1'b1;
          if (!half) begin
            out_re <= W'(r_re);
            out_im <= W'(r_im);
          end else begin
            out_re <= a_re + in_re;
            out_im <= a_im + in_im;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !bypass) begin
      dl_re[kw] <= half ? a_re - in_re : in_re;
      dl_im[kw] <= half ? a_im - in_im : in_im;
    end
  end
endmodule
