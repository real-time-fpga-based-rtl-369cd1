// Scaler: multiplies or divides every sample by 2**N for the plot.
//
// Each of LANES signed lanes is shifted left (multiply) or arithmetically
// right (divide) by shift = N, N in 0..15, and saturated to OUT_W bits, so
// an oversized value pins to the edge of the plot instead of wrapping.
// Division rounds toward minus infinity; saturation is this design's choice.
//
// Interface: valid/ready stream with last, one register stage
// (s_ready = !m_valid || m_ready), latency 1 cycle, full throughput.
module scaler #(
  parameter int LANES = 2,
  parameter int IN_W  = 16,
  parameter int OUT_W = 16
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic [3:0]                        shift,
  input  logic                              multiply,
  input  logic [LANES-1:0][IN_W-1:0]        s_data,
  input  logic                              s_valid,
  input  logic                              s_last,
  output logic                              s_ready,
  output logic [LANES-1:0][OUT_W-1:0]       m_data,
  output logic                              m_valid,
  output logic                              m_last,
  input  logic                              m_ready
);
  localparam int XW = IN_W + 16;
  localparam logic signed [XW-1:0] MAXV = XW'(2 ** (OUT_W - 1) - 1);
  localparam logic signed [XW-1:0] MINV = -XW'(2 ** (OUT_W - 1));

  function automatic logic [OUT_W-1:0] scale1(input logic signed [IN_W-1:0] x);
    logic signed [XW-1:0] y;
    y = XW'(x);
    y = multiply ? (y <<< shift) : (y >>> shift);
    if (y > MAXV) return OUT_W'(MAXV);
    if (y < MINV) return OUT_W'(MINV);
    return OUT_W'(y);
  endfunction

  assign s_ready = !m_valid || m_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      m_data  <= '0;
    end else if (s_ready) begin
      m_valid <= s_valid;
      m_last  <= s_last;
      for (int i = 0; i < LANES; i++) m_data[i] <= scale1(s_data[i]);
    end
  end
endmodule
