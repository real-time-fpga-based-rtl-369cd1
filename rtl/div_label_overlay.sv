// Division labels of the two plots: "X <n>" and "Y <n>" in white, left of
// each plot.
//
// Each plot has a DIVS x DIVS grid. The labels tell the viewer what one
// division stands for:
//   X: samples (ADC plot) or FFT bins (FFT plot) per division,
//      (X_SIZE/DIVS) * M / L, with L and M that path's interpolation and
//      decimation factors;
//   Y: input units per division, (PLOT_H/DIVS) * 2^N when the path's scaler
//      divides by 2^N, (PLOT_H/DIVS) / 2^N when it multiplies.
// The four values are recomputed from the scaling settings at the first pixel
// of every frame and turned into 7 decimal digits (leading zeros blanked).
// Characters come from a 5x7 font drawn at twice its size in 16-pixel cells,
// starting 16 pixels from the left screen edge: 9 cells, so the left margin
// X0 of the plots must be at least 160 pixels. Line positions: 8 and 28 rows
// below the top of each plot.
//
// Interface and timing: px/py of the pixel under the beam in; `on` is valid
// one clock later, from stage registers, so a caller that registers its
// colour on the next clock (as frame_buffer does) lines up with its own
// 2-cycle pipeline.
//
// Origin: the original display shows these DIV X / DIV Y values; the font,
// the placement and the number format are this design's choices.
module div_label_overlay
  import radar_pkg::*;
#(
  parameter int X_SIZE = 1536,
  parameter int PLOT_H = 480,
  parameter int ADC_Y0 = 40,
  parameter int FFT_Y0 = 560,
  parameter int DIVS   = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  scale_cfg_t  adc_scale,
  input  scale_cfg_t  fft_scale,
  input  logic [11:0] px,
  input  logic [11:0] py,
  output logic        on
);
  localparam int LX    = 16;   // left edge of the labels
  localparam int CELL  = 16;   // character cell width in pixels
  localparam int NCELL = 9;    // letter, blank, 7 digits
  localparam int GLYPH_BLANK = 12;

  // 5x7 glyphs, row 0 in bits 34..30, leftmost pixel in the MSB of a row.
  // Codes 0..9 digits, 10 'X', 11 'Y', 12 blank.
  localparam logic [34:0] FONT [13] = '{
    35'b01110_10001_10011_10101_11001_10001_01110,
    35'b00100_01100_00100_00100_00100_00100_01110,
    35'b01110_10001_00001_00010_00100_01000_11111,
    35'b11111_00010_00100_00010_00001_10001_01110,
    35'b00010_00110_01010_10010_11111_00010_00010,
    35'b11111_10000_11110_00001_00001_10001_01110,
    35'b00110_01000_10000_11110_10001_10001_01110,
    35'b11111_00001_00010_00100_01000_01000_01000,
    35'b01110_10001_10001_01110_10001_10001_01110,
    35'b01110_10001_10001_01111_00001_00010_01100,
    35'b10001_10001_01010_00100_01010_10001_10001,
    35'b10001_10001_01010_00100_00100_00100_00100,
    35'b00000_00000_00000_00000_00000_00000_00000
  };

  function automatic logic [20:0] xdiv(input scale_cfg_t c);
    logic [4:0] l, m;
    l = (c.interp == 0) ? 5'd1 : c.interp;
    m = (c.decim == 0) ? 5'd1 : c.decim;
    return 21'((X_SIZE / DIVS) * int'(m) / int'(l));
  endfunction

  function automatic logic [20:0] ydiv(input scale_cfg_t c);
    logic [20:0] base;
    base = 21'(PLOT_H / DIVS);
    return c.multiply ? (base >> c.shift) : (base << c.shift);
  endfunction

  // Binary to 7 BCD digits (double dabble).
  function automatic logic [27:0] to_bcd(input logic [20:0] v);
    logic [27:0] b;
    b = '0;
    for (int i = 20; i >= 0; i--) begin
      for (int d = 0; d < 7; d++) if (b[4*d +: 4] >= 4'd5) b[4*d +: 4] = b[4*d +: 4] + 4'd3;
      b = {b[26:0], v[i]};
    end
    return b;
  endfunction

  // line 0: ADC X, 1: ADC Y, 2: FFT X, 3: FFT Y
  logic [20:0] val [4];
  logic [27:0] bcd [4];

  always_ff @(posedge clk) begin
    if (rst || (px == 0 && py == 0)) begin
      val[0] <= xdiv(adc_scale);
      val[1] <= ydiv(adc_scale);
      val[2] <= xdiv(fft_scale);
      val[3] <= ydiv(fft_scale);
    end
    for (int k = 0; k < 4; k++) bcd[k] <= to_bcd(val[k]);
  end

  // Stage 1: which character and which glyph pixel is under the beam.
  logic [3:0] code1;
  logic [2:0] grow1, gcol1;
  logic       hit1;

  always_ff @(posedge clk) begin
    int xo, line, cidx, cx, ry;
    logic [3:0] code;
    xo = int'(px) - LX;
    line = -1;
    ry = 0;
    for (int k = 0; k < 4; k++) begin
      int top;
      top = ((k < 2) ? ADC_Y0 : FFT_Y0) + ((k % 2 == 0) ? 8 : 28);
      if (int'(py) >= top && int'(py) < top + 14) begin
        line = k;
        ry = (int'(py) - top) / 2;
      end
    end
    cidx = xo / CELL;
    cx = (xo % CELL) / 2;
    code = 4'(GLYPH_BLANK);
    if (line >= 0 && xo >= 0 && cidx < NCELL) begin
      if (cidx == 0) code = (line % 2 == 0) ? 4'd10 : 4'd11;
      else if (cidx >= 2) begin
        int d;
        logic [27:0] b;
        d = 8 - cidx;                      // digit index, 6 = most significant
        b = bcd[line];
        code = b[4*d +: 4];
        // blank leading zeros, keep the last digit
        if (d > 0 && (b >> (4 * d)) == 0) code = 4'(GLYPH_BLANK);
      end
    end
    if (rst) begin
      hit1 <= 1'b0; code1 <= 4'(GLYPH_BLANK); grow1 <= '0; gcol1 <= '0;
    end else begin
      hit1  <= line >= 0 && xo >= 0 && cidx < NCELL && cx < 5;
      code1 <= code;
      grow1 <= 3'(ry);
      gcol1 <= 3'(cx);
    end
  end

  // Glyph lookup from the stage registers.
  always_comb begin
    logic [34:0] g;
    g  = FONT[code1];
    on = hit1 && g[34 - 5 * int'(grow1) - int'(gcol1)];
  end
endmodule
