// Interpolator: raises the sample rate by a run-time factor L.
//
// Every accepted sample is sent out L times in a row (zero-order hold), which
// stretches a window along the plot's x axis by L. The window's last flag is
// put on the final repetition of the last sample. factor 0 is treated as 1.
// The hold (rather than a smoothing filter) is this design's choice.
//
// Interface: valid/ready stream of LANES x W bits with last. One holding
// register; a new sample is accepted on the cycle the previous one's last
// repetition is taken, so a steady stream runs at full output rate.
module interpolator #(
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
  logic [4:0] rep;
  logic       hold_last;
  wire  [4:0] l_m1 = (factor == 0) ? 5'd0 : factor - 1'b1;
  wire        final_rep = (rep == l_m1);

  assign s_ready = !m_valid || (m_ready && final_rep);
  assign m_last  = hold_last && final_rep;

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid   <= 1'b0;
      m_data    <= '0;
      hold_last <= 1'b0;
      rep       <= '0;
    end else begin
      if (s_ready) begin
        m_valid   <= s_valid;
        hold_last <= s_last;
        rep       <= '0;
        if (s_valid) m_data <= s_data;
      end else if (m_valid && m_ready) begin
        rep <= rep + 1'b1;
      end
    end
  end
endmodule
