// Video timing generator for the HDMI output (1920x1080 at 60 Hz).
//
// Two counters run over the full raster, H_TOTAL pixels by V_TOTAL lines,
// clocked by the pixel clock (148.5 MHz for this mode). Active video is the
// top-left H_ACTIVE x V_ACTIVE corner; the blanking intervals hold front
// porch, sync pulse and back porch in that order. Syncs are active high,
// as in the standard 1080p60 timing. Besides the syncs and data enable, the
// block gives the current pixel position (px, py) so the frame buffer can
// compute that pixel's colour.
//
// Timing: all outputs are registered and refer to the same pixel; the
// frame's first active pixel follows reset by one cycle. Porch and sync
// widths are the standard CEA-861 values (defaults from radar_pkg).
module timing_generator
  import radar_pkg::*;
#(
  parameter int HA = H_ACTIVE,
  parameter int HF = H_FP,
  parameter int HS = H_SYNC,
  parameter int HB = H_BP,
  parameter int VA = V_ACTIVE,
  parameter int VF = V_FP,
  parameter int VS = V_SYNC,
  parameter int VB = V_BP
) (
  input  logic        clk,
  input  logic        rst,
  output logic [11:0] px,
  output logic [11:0] py,
  output logic        de,
  output logic        hsync,
  output logic        vsync,
  output logic        frame_start   // pulse with pixel (0,0)
);
  localparam int HT = HA + HF + HS + HB;
  localparam int VT = VA + VF + VS + VB;

  logic [11:0] h, v;

  always_ff @(posedge clk) begin
    if (rst) begin
      h <= '0;
      v <= '0;
    end else if (int'(h) == HT - 1) begin
      h <= '0;
      v <= (int'(v) == VT - 1) ? '0 : v + 1'b1;
    end else begin
      h <= h + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      px <= '0; py <= '0; de <= 1'b0; hsync <= 1'b0; vsync <= 1'b0; frame_start <= 1'b0;
    end else begin
      px          <= h;
      py          <= v;
      de          <= int'(h) < HA && int'(v) < VA;
      hsync       <= int'(h) >= HA + HF && int'(h) < HA + HF + HS;
      vsync       <= int'(v) >= VA + VF && int'(v) < VA + VF + VS;
      frame_start <= h == 0 && v == 0;
    end
  end
endmodule
