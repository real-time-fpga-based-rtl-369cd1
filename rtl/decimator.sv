// Decimator: lowers the sample rate by a run-time factor M.
//
// Of every group of M input samples only the last is passed on. The phase
// restarts at each window, and the window's last sample is always passed
// (with its last flag) so that the next block sees where the window ends.
// factor 0 is treated as 1. No anti-alias filter is applied: this is a plot
// resampler, and picking samples is this design's choice.
//
// Interface: valid/ready stream of LANES x W bits with last; combinational,
// no added latency. Dropped samples are accepted at once.
module decimator #(
  parameter int LANES = 2,
  parameter int W     = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [4:0]                 factor,
  input  logic [LANES-1:0][W-1:0]    s_data,
  input  logic                       s_valid,
  input  logic                       s_last,
  output logic                       s_ready,
  output logic [LANES-1:0][W-1:0]    m_data,
  output logic                       m_valid,
  output logic                       m_last,
  input  logic                       m_ready
);
  logic [4:0] phase;
  wire  [4:0] m_m1 = (factor == 0) ? 5'd0 : factor - 1'b1;
  wire        keep = (phase >= m_m1) || s_last;

  assign m_data  = s_data;
  assign m_valid = s_valid && keep;
  assign m_last  = s_last;
  assign s_ready = keep ? m_ready : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else if (s_valid && s_ready) phase <= keep ? 5'd0 : phase + 1'b1;
  end
endmodule
