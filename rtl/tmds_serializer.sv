// 10:1 serializer of one HDMI lane, double data rate.
//
// The serial clock runs at five times the pixel clock (742.5 MHz for
// 148.5 MHz), and two bits leave per serial clock cycle, one for each edge,
// so a 10-bit symbol takes five cycles. A phase counter reloads the shift
// register with the current symbol every fifth cycle; between reloads it
// shifts by two. Bit 0 of the symbol is sent first, as TMDS requires. The
// two outputs feed an output DDR register (rising-edge bit, falling-edge
// bit). This is the function of the vendor OSERDESE2 pair in master-slave
// DDR mode on the FPGA, written as a plain shift register; it assumes the
// pixel and serial clocks come phase-aligned from one PLL, so the symbol is
// stable when it is sampled.
//
// Timing: a symbol is sampled on the serial clock edge at phase 0 and its
// first bit pair appears on the next cycle.
//
// Origin: 10:1 DDR serialization at 5x the pixel clock follows the original;
// the shift-register form replaces a vendor serializer primitive.
module tmds_serializer (
  input  logic       ser_clk,
  input  logic       rst,
  input  logic [9:0] word,
  output logic       q_rise,
  output logic       q_fall
);
  logic [9:0] shreg;
  logic [2:0] phase;

  always_ff @(posedge ser_clk) begin
    if (rst) begin
      phase <= '0;
      shreg <= '0;
    end else begin
      phase <= (phase == 3'd4) ? 3'd0 : phase + 1'b1;
      shreg <= (phase == 3'd0) ? word : {2'b00, shreg[9:2]};
    end
  end

  assign q_rise = shreg[0];
  assign q_fall = shreg[1];
endmodule
