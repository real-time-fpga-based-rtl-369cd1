// Non-coherent adder: combines the magnitude spectra of all receivers.
//
// Takes one unsigned spectrum stream per receiver chain. With add_all set it
// outputs the sum of all N_IN inputs (non-coherent integration: magnitudes,
// not complex values, are added); otherwise it passes input sel alone. All
// chains run in lock-step from the same ADC timing, so in add mode all valid
// inputs must arrive together; an assertion checks that.
//
// Timing: registered output, latency 1 cycle. Output width IN_W+log2(N_IN).
//
// Origin: the add-all / pass-one operation follows the original configuration;
// registering and widths are this design's.
module noncoherent_adder #(
  parameter int N_IN = 4,
  parameter int IN_W = 39
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            add_all,
  input  logic [$clog2(N_IN)-1:0]         sel,
  input  logic [N_IN-1:0][IN_W-1:0]       s_data,
  input  logic [N_IN-1:0]                 s_valid,
  input  logic [N_IN-1:0]                 s_last,
  output logic [IN_W+$clog2(N_IN)-1:0]    m_data,
  output logic                            m_valid,
  output logic                            m_last
);
  localparam int OUT_W = IN_W + $clog2(N_IN);

  logic [OUT_W-1:0] total;
  always_comb begin
    total = '0;
    for (int i = 0; i < N_IN; i++) total += OUT_W'(s_data[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      m_data  <= '0;
    end else if (add_all) begin
      m_valid <= &s_valid;
      m_last  <= s_last[0];
      m_data  <= total;
    end else begin
      m_valid <= s_valid[sel];
      m_last  <= s_last[sel];
      m_data  <= OUT_W'(s_data[sel]);
    end
  end

  assert property (@(posedge clk) disable iff (rst) add_all && |s_valid |-> &s_valid);
endmodule
