// TMDS encoder: 8-bit colour to 10-bit DC-balanced symbol (DVI/HDMI).
//
// Stage one makes the byte transition-minimised: each bit is chained to the
// previous one by XOR (computed as a prefix parity), or by XNOR when the byte has more than four ones (or
// exactly four and bit 0 clear); bit 8 records which. Stage two keeps the
// line DC balanced: a running disparity (ones minus zeros sent so far) decides
// whether the nine bits go out as they are or with bits 0..7 inverted, and
// bit 9 records the inversion. During blanking (de low) one of four control
// symbols encodes the two control bits (hsync and vsync on the blue lane)
// and the disparity restarts at zero. This is the encoding defined by the
// DVI 1.0 specification.
//
// Timing: q is registered, one symbol per pixel clock, latency 1 cycle.
//
// Origin: TMDS coding as the HDMI output requires; the algorithm is the
// standard DVI 1.0 one, written here from its definition.
module tmds_encoder (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] d,
  input  logic [1:0] c,     // {c1, c0}
  input  logic       de,
  output logic [9:0] q
);
  logic signed [4:0] disp;   // running disparity, always even

  logic [8:0] qm;
  logic [3:0] n1d, n1q;
  always_comb begin
    logic use_xnor;
    logic [8:0] t;
    n1d = 4'($countones(d));
    use_xnor = (n1d > 4) || (n1d == 4 && !d[0]);
    // the XOR chain is a prefix parity; the XNOR chain flips every odd bit
    for (int i = 0; i < 8; i++) t[i] = (^(d & 8'((32'd1 << (i + 1)) - 1))) ^ (use_xnor & i[0]);
    t[8] = ~use_xnor;
    qm  = t;
    n1q = 4'($countones(t[7:0]));
  end

  wire signed [4:0] diff = 5'(n1q) - 5'(4'd8 - n1q);   // ones minus zeros of qm[7:0]

  always_ff @(posedge clk) begin
    if (rst) begin
      disp <= '0;
      q    <= '0;
    end else if (!de) begin
      disp <= '0;
      unique case (c)
        2'b00: q <= 10'b1101010100;
        2'b01: q <= 10'b0010101011;
        2'b10: q <= 10'b0101010100;
        default: q <= 10'b1010101011;
      endcase
    end else if (disp == 0 || diff == 0) begin
      q    <= {~qm[8], qm[8], qm[8] ? qm[7:0] : ~qm[7:0]};
      disp <= qm[8] ? disp + diff : disp - diff;
    end else if ((disp > 0 && diff > 0) || (disp < 0 && diff < 0)) begin
      q    <= {1'b1, qm[8], ~qm[7:0]};
      disp <= disp + (qm[8] ? 5'sd2 : 5'sd0) - diff;
    end else begin
      q    <= {1'b0, qm[8], qm[7:0]};
      disp <= disp - (qm[8] ? 5'sd0 : 5'sd2) + diff;
    end
  end
endmodule
