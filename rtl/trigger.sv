// Trigger: captures one window of the ADC signal after a level crossing.
//
// While armed, the block accepts and discards samples and watches the real
// part: a rising-edge trigger fires when the previous sample is below level
// and the current one is at or above it; a falling-edge trigger when the
// previous sample is above level and the current one at or below it. The
// firing sample and the next CAPTURE_LEN-1 samples are passed on, the last
// one flagged with m_last, and the block re-arms. This keeps the plotted
// trace steady from one refresh to the next, like an oscilloscope trigger.
// Level and edge come from the control registers; testing the real part and
// the fixed window length are this design's choices.
//
// Interface: valid/ready streams of radar_pkg::cplx16_t. Armed, the input is
// always ready; capturing, ready follows the output. Combinational path from
// input to output (no added latency).
module trigger
  import radar_pkg::*;
#(
  parameter int CAPTURE_LEN = 1024
) (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [15:0] level,
  input  logic               falling,
  input  cplx16_t            s_data,
  input  logic               s_valid,
  output logic               s_ready,
  output cplx16_t            m_data,
  output logic               m_valid,
  output logic               m_last,
  input  logic               m_ready,
  output logic               fired       // one-cycle pulse per capture
);
  logic capturing, have_prev;
  logic signed [15:0] prev;
  logic [$clog2(CAPTURE_LEN+1)-1:0] cnt;

  wire crossing = have_prev &&
                  (falling ? (prev > level && s_data.re <= level)
                           : (prev < level && s_data.re >= level));
  wire pass = capturing || crossing;

  assign m_data  = s_data;
  assign m_valid = s_valid && pass;
  assign s_ready = pass ? m_ready : 1'b1;
  assign m_last  = pass && (capturing ? int'(cnt) == CAPTURE_LEN - 1 : CAPTURE_LEN == 1);
  assign fired   = s_valid && s_ready && !capturing && crossing;

  always_ff @(posedge clk) begin
    if (rst) begin
      capturing <= 1'b0;
      have_prev <= 1'b0;
      prev      <= '0;
      cnt       <= '0;
    end else if (s_valid && s_ready) begin
      prev      <= s_data.re;
      have_prev <= 1'b1;
      if (m_valid) begin
        if (m_last) begin
          capturing <= 1'b0;
          cnt       <= '0;
          have_prev <= 1'b0;   // a new capture needs a fresh crossing
        end else begin
          capturing <= 1'b1;
          cnt       <= capturing ? cnt + 1'b1 : 1;
        end
      end
    end
  end
endmodule
