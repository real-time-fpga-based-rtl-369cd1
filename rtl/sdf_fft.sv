// Streaming radix-2 decimation-in-frequency SDF FFT with run-time size.
//
// A chain of LOG2N delay-feedback stages (sdf_stage) computes a 2**LOG2N-point
// FFT of a continuous complex stream, one sample per input beat. The size is
// fixed at compile time; smaller power-of-two sizes 2**log2n_cfg are run by
// bypassing the first LOG2N-log2n_cfg stages. Inside, samples are
// sign-extended to IN_W+LOG2N+1 bits so no stage can overflow. The result is
// divided by the run-time size n, rounded and saturated back to IN_W bits
// (output = X[k]/n), then put into natural bin order by fft_reorder.
//
// Interface: s_re/s_im/s_valid, one sample per valid beat, windows back to
// back from reset. m_* carry one window at a time as a burst of n beats,
// m_last on the last bin. Latency: a window leaves once the following window
// has fully entered (the pipeline moves only on input samples), one cycle per
// bin. Writing a new log2n_cfg restarts the pipeline.
//
// Origin: a run-time sizable SDF FFT of 1024 points, DIF, complex input, as in
// the original; the radix-2 form, the 1/n scaling and the reorder are this
// design's.
module sdf_fft #(
  parameter int LOG2N = 10,
  parameter int IN_W  = 16,
  parameter int TW_W  = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [3:0]             log2n_cfg,
  input  logic signed [IN_W-1:0] s_re,
  input  logic signed [IN_W-1:0] s_im,
  input  logic                   s_valid,
  output logic signed [IN_W-1:0] m_re,
  output logic signed [IN_W-1:0] m_im,
  output logic                   m_valid,
  output logic                   m_last
);
  localparam int W = IN_W + LOG2N + 1;

  // restart on a change of size
  logic [3:0] log2n_q;
  always_ff @(posedge clk) log2n_q <= log2n_cfg;
  wire pipe_rst = rst || (log2n_q != log2n_cfg);

  logic signed [W-1:0] re [LOG2N+1];
  logic signed [W-1:0] im [LOG2N+1];
  logic                vl [LOG2N+1];

  assign re[0] = W'(s_re);
  assign im[0] = W'(s_im);
  assign vl[0] = s_valid;

  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    sdf_stage #(.LOG2N(LOG2N), .STAGE(s), .W(W), .TW_W(TW_W)) u_stage (
      .clk      (clk),
      .rst      (pipe_rst),
      .bypass   (s < LOG2N - int'(log2n_q)),
      .in_re    (re[s]),
      .in_im    (im[s]),
      .in_valid (vl[s]),
      .out_re   (re[s+1]),
      .out_im   (im[s+1]),
      .out_valid(vl[s+1])
    );
  end

  // scale by 1/n with rounding, saturate to IN_W bits
  function automatic logic signed [IN_W-1:0] scale(input logic signed [W-1:0] x,
                                                   input logic [3:0] sh);
    logic signed [W:0] y;
    y = (W+1)'(x);
    if (sh != 0) y = (y + ((W+1)'(1) <<< (sh - 1))) >>> sh;
    if (y > (W+1)'(2 ** (IN_W - 1) - 1)) return IN_W'(2 ** (IN_W - 1) - 1);
    if (y < -(W+1)'(2 ** (IN_W - 1)))    return IN_W'(-(2 ** (IN_W - 1)));
    return IN_W'(y);
  endfunction

  logic [2*IN_W-1:0] ro_data;
  fft_reorder #(.LOG2N(LOG2N), .W(2 * IN_W)) u_reorder (
    .clk      (clk),
    .rst      (pipe_rst),
    .log2n    (log2n_q),
    .in_data  ({scale(re[LOG2N], log2n_q), scale(im[LOG2N], log2n_q)}),
    .in_valid (vl[LOG2N]),
    .m_data   (ro_data),
    .m_valid  (m_valid),
    .m_last   (m_last)
  );
  assign m_re = ro_data[2*IN_W-1:IN_W];
  assign m_im = ro_data[IN_W-1:0];
endmodule
