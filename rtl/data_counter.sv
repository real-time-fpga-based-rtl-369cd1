// DataCounter: sends exactly the plot's width of samples per window.
//
// Counts the samples of each window (windows end with s_last). The first
// X_SIZE samples are passed on, the X_SIZE-th one flagged as last; the rest
// of the window is accepted and dropped. So whatever the interpolation and
// decimation factors, the frame buffer receives at most one sample per grid
// column and a window never spills into the next refresh. A window shorter
// than X_SIZE is passed whole with its own last flag.
//
// Interface: valid/ready stream of LANES x W bits with last; combinational,
// no added latency. Dropped samples are accepted at once.
//
// Origin: truncation to the plot's x-axis size (1536) follows the original;
// the window restart on s_last and the dropping flag are this design's.
module data_counter #(
  parameter int X_SIZE = 1536,
  parameter int LANES  = 1,
  parameter int W      = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [LANES-1:0][W-1:0]    s_data,
  input  logic                       s_valid,
  input  logic                       s_last,
  output logic                       s_ready,
  output logic [LANES-1:0][W-1:0]    m_data,
  output logic                       m_valid,
  output logic                       m_last,
  input  logic                       m_ready,
  output logic                       dropping   // a sample is being discarded
);
  logic [$clog2(X_SIZE+1)-1:0] cnt;
  wire pass = int'(cnt) < X_SIZE;

  assign m_data   = s_data;
  assign m_valid  = s_valid && pass;
  assign m_last   = s_last || int'(cnt) == X_SIZE - 1;
  assign s_ready  = pass ? m_ready : 1'b1;
  assign dropping = s_valid && !pass;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else if (s_valid && s_ready) begin
      if (s_last)    cnt <= '0;
      else if (pass) cnt <= cnt + 1'b1;
    end
  end
endmodule
