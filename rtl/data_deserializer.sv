// 1:8 DDR deserializer for one LVDS lane of the radar front end.
//
// Each bit-clock cycle delivers two bits: the one sampled on the rising edge
// and the one sampled on the falling edge (taken by input DDR registers in
// front of this block). Four cycles give one byte. The byte is shifted in
// first-bit-first, so the earliest received bit ends up in dout[7]. This is
// the function of the vendor SelectIO deserializer used on the FPGA, written
// as a plain shift register. Byte boundaries are arbitrary here; the word
// aligner that follows finds the real sample boundaries from the frame clock.
//
// Timing: dout/dout_valid are registered; dout_valid pulses for one bit-clock
// cycle every FACTOR/2 cycles, in the bit-clock domain.
module data_deserializer #(
  parameter int FACTOR = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              din_rise,
  input  logic              din_fall,
  output logic [FACTOR-1:0] dout,
  output logic              dout_valid
);
  localparam int STEPS = FACTOR / 2;

  logic [FACTOR-1:0]        shreg;
  logic [$clog2(STEPS)-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg      <= '0;
      phase      <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      shreg      <= {shreg[FACTOR-3:0], din_rise, din_fall};
      dout_valid <= 1'b0;
      if (int'(phase) == STEPS - 1) begin
        phase      <= '0;
        dout       <= {shreg[FACTOR-3:0], din_rise, din_fall};
        dout_valid <= 1'b1;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end
endmodule
