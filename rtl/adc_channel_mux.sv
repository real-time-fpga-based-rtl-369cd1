// N:1 multiplexer choosing the receiver whose raw ADC samples are plotted.
//
// Each receiver lane delivers its own stream of complex samples; sel picks
// the one forwarded to the ADC scaling path. The choice of this multiplexer's
// place in front of the ADC plot is this design's reading of the original
// configuration table ("N:1 Multiplexer: pass channel 1").
//
// Timing: registered, latency 1 cycle, one sample per cycle.
module adc_channel_mux
  import radar_pkg::*;
#(
  parameter int N_IN = 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [$clog2(N_IN)-1:0] sel,
  input  cplx16_t [N_IN-1:0]      s_data,
  input  logic [N_IN-1:0]         s_valid,
  output cplx16_t                 m_data,
  output logic                    m_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      m_valid <= s_valid[sel];
      m_data  <= s_data[sel];
    end
  end
endmodule
