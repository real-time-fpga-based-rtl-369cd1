// Testbench helper: receives one serialized TMDS lane and decodes it.
//
// Collects the two bits per serial clock of a data lane and of the clock lane,
// finds the symbol boundary from the clock lane (its symbol 0000011111 is
// sent as five ones followed by five zeros), and decodes each 10-bit symbol:
// control symbols give ctrl, data symbols are inverted back through the
// XOR/XNOR chain. Used only to check the HDMI output in simulation.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tmds_lane_decoder (
  input  logic       ser_clk,
  input  logic       d_rise,
  input  logic       d_fall,
  input  logic       c_rise,
  input  logic       c_fall,
  output logic       strobe,     // a symbol was decoded this cycle
  output logic       is_ctrl,
  output logic [1:0] ctrl,
  output logic [7:0] data,
  output logic [9:0] symbol
);
  logic [19:0] dsh = '0, csh = '0;
  int nbits = 0;

  function automatic logic [7:0] decode(input logic [9:0] q);
    logic [7:0] v = q[9] ? ~q[7:0] : q[7:0];
    logic [7:0] d;
    d[0] = v[0];
    for (int i = 1; i < 8; i++) d[i] = q[8] ? (v[i] ^ v[i-1]) : ~(v[i] ^ v[i-1]);
    return d;
  endfunction

  always @(posedge ser_clk) begin
    logic [19:0] dn, cn;
    // newest bits at the top: bit 0 of a symbol is the oldest
    dn = {d_fall, d_rise, dsh[19:2]};
    cn = {c_fall, c_rise, csh[19:2]};
    dsh <= dn;
    csh <= cn;
    strobe <= 1'b0;
    // a full clock symbol in the low ten bits when they read 0000011111
    if (cn[19:10] == 10'b0000011111 && nbits >= 20) begin
      strobe <= 1'b1;
      symbol <= dn[19:10];
      is_ctrl <= 1'b0;
      case (dn[19:10])
        10'b1101010100: begin is_ctrl <= 1'b1; ctrl <= 2'b00; end
        10'b0010101011: begin is_ctrl <= 1'b1; ctrl <= 2'b01; end
        10'b0101010100: begin is_ctrl <= 1'b1; ctrl <= 2'b10; end
        10'b1010101011: begin is_ctrl <= 1'b1; ctrl <= 2'b11; end
        default: data <= decode(dn[19:10]);
      endcase
    end
    nbits <= nbits + 2;
  end
endmodule
