// Window accumulator: bin-by-bin sum of consecutive FFT windows.
//
// Holds one running sum per bin in a memory of 2**LOG2N words. A window is a
// stream of up to 2**LOG2N unsigned values ended by s_last. The first window
// of a group is written into the memory as it is, each further window is
// added to it, and while the last window of the group (frames_cfg windows,
// 1..2**MAX_FRAMES_LOG2) streams in, each bin's complete sum leaves at once
// instead of being written back. So the output is one summed window per
// frames_cfg input windows, with no extra read-out pass. The window length is
// taken from s_last, so any run-time FFT size up to the memory depth works.
// frames_cfg may change between groups; 0 is treated as 1.
//
// Timing: m_* follow the input of the group's last window by one cycle; one
// sample per cycle, no back-pressure. Output width IN_W+MAX_FRAMES_LOG2 bits,
// enough for the largest group without overflow.
//
// Origin: the original demonstrator's accumulator (1024-bin depth, up to 128
// frames); the emit-during-the-last-window scheme and widths are this
// design's.
module accumulator #(
  parameter int LOG2N           = 10,
  parameter int MAX_FRAMES_LOG2 = 7,
  parameter int IN_W            = 32
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [MAX_FRAMES_LOG2:0]           frames_cfg,
  input  logic [IN_W-1:0]                    s_data,
  input  logic                               s_valid,
  input  logic                               s_last,
  output logic [IN_W+MAX_FRAMES_LOG2-1:0]    m_data,
  output logic                               m_valid,
  output logic                               m_last
);
  localparam int OUT_W = IN_W + MAX_FRAMES_LOG2;

  logic [OUT_W-1:0] mem [2**LOG2N];
  logic [LOG2N-1:0] idx;
  logic [MAX_FRAMES_LOG2:0] fcnt;

  wire [MAX_FRAMES_LOG2:0] frames = (frames_cfg == 0) ? 1 : frames_cfg;
  wire first_win = (fcnt == 0);
  wire last_win  = (fcnt >= frames - 1'b1);
  wire [OUT_W-1:0] sum = (first_win ? '0 : mem[idx]) + OUT_W'(s_data);

  always_ff @(posedge clk) begin
    if (rst) begin
      idx     <= '0;
      fcnt    <= '0;
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      m_data  <= '0;
    end else begin
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      if (s_valid) begin
        if (last_win) begin
          m_data  <= sum;
          m_valid <= 1'b1;
          m_last  <= s_last;
        end
        if (s_last) begin
          idx  <= '0;
          fcnt <= last_win ? '0 : fcnt + 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (s_valid && !last_win) mem[idx] <= sum;
  end
endmodule
