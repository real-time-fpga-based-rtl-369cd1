// HDMI serializer block: timing generator, three TMDS encoders and four
// 10:1 serializers.
//
// The timing generator scans the 1080p60 raster and hands the pixel position
// to the frame buffer, which answers with the pixel's colour FB_LATENCY
// cycles later; data enable and the syncs are delayed by the same amount so
// they line up with the colour. Blue, green and red are each TMDS encoded
// (hsync and vsync ride on the blue lane's control bits) and serialized; a
// fourth serializer sends the constant symbol 0000011111, which produces the
// TMDS clock at the pixel rate on its own lane.
//
// Interface: tmds_rise/tmds_fall[0..3] = blue, green, red, clock, each a bit
// pair per serial clock for an output DDR register and LVDS buffer.
// pix_clk and ser_clk (5x) must come phase-aligned from one PLL.
//
// Origin: three colour serializers plus a clock serializer, 148.5 MHz pixel
// clock and 742.5 MHz serializer clock follow the original; the DDR shift-
// register serializers replace the vendor serializer primitives.
module hdmi_serializer
  import radar_pkg::*;
#(
  parameter int FB_LATENCY = 2,
  parameter int HA = H_ACTIVE, parameter int HF = H_FP, parameter int HS = H_SYNC, parameter int HB = H_BP,
  parameter int VA = V_ACTIVE, parameter int VF = V_FP, parameter int VS = V_SYNC, parameter int VB = V_BP
) (
  input  logic        pix_clk,
  input  logic        ser_clk,
  input  logic        rst,           // synchronous to pix_clk
  input  logic        ser_rst,       // synchronous to ser_clk
  input  logic [23:0] rgb,
  output logic [11:0] px,
  output logic [11:0] py,
  output logic        frame_start,
  output logic [3:0]  tmds_rise,
  output logic [3:0]  tmds_fall
);
  logic de, hs, vs;
  logic [FB_LATENCY-1:0] de_d, hs_d, vs_d;
  logic [9:0] sym [4];

  timing_generator #(.HA(HA), .HF(HF), .HS(HS), .HB(HB), .VA(VA), .VF(VF), .VS(VS), .VB(VB)) u_timing (
    .clk(pix_clk), .rst, .px, .py, .de, .hsync(hs), .vsync(vs), .frame_start
  );

  always_ff @(posedge pix_clk) begin
    if (rst) begin
      de_d <= '0; hs_d <= '0; vs_d <= '0;
    end else begin
      de_d <= {de_d[FB_LATENCY-2:0], de};
      hs_d <= {hs_d[FB_LATENCY-2:0], hs};
      vs_d <= {vs_d[FB_LATENCY-2:0], vs};
    end
  end

  wire de_a = de_d[FB_LATENCY-1];
  wire [1:0] ctl_blue = {vs_d[FB_LATENCY-1], hs_d[FB_LATENCY-1]};

  tmds_encoder u_enc_b (.clk(pix_clk), .rst, .d(rgb[7:0]),   .c(ctl_blue), .de(de_a), .q(sym[0]));
  tmds_encoder u_enc_g (.clk(pix_clk), .rst, .d(rgb[15:8]),  .c(2'b00),    .de(de_a), .q(sym[1]));
  tmds_encoder u_enc_r (.clk(pix_clk), .rst, .d(rgb[23:16]), .c(2'b00),    .de(de_a), .q(sym[2]));
  assign sym[3] = 10'b0000011111;

  for (genvar i = 0; i < 4; i++) begin : g_ser
    tmds_serializer u_ser (
      .ser_clk, .rst(ser_rst), .word(sym[i]), .q_rise(tmds_rise[i]), .q_fall(tmds_fall[i])
    );
  end
endmodule
