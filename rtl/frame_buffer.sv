// Frame buffer: draws the ADC plot and the FFT plot into the video stream.
//
// A full 1920x1080 RGB frame does not fit in FPGA block RAM, and a plot needs
// only one value per screen column, so the buffer keeps three column
// memories of X_SIZE entries: the real and imaginary ADC traces and the FFT
// trace. Incoming samples are converted at once to a row inside their plot
// (ADC: zero in the middle, positive up; FFT: zero at the bottom), clipped to
// the plot height, and written at the next column; a window's last sample
// sends the write pointer back to column 0, so every window redraws the plot
// from the left. The display side reads the column under the beam and lights
// a pixel when its row lies between the previous column's row and this one's,
// so the traces are drawn as connected lines. Each plot gets a grid of
// 8 x 8 divisions. Colours: real part green, imaginary part yellow, FFT
// magnitude cyan, grid grey, background black. Plot positions, sizes and
// colours other than green and yellow are this design's choices.
//
// Left of each plot, div_label_overlay writes in white what one grid
// division stands for (X: samples or bins, Y: input units), when the left
// margin X0 is at least 160 pixels.
//
// Interface: two write streams (always ready) and the pixel position from
// the timing generator. rgb = {r, g, b}, 8 bits each, two pixel clocks after
// px/py; only valid while the matching data-enable is high.
module frame_buffer
  import radar_pkg::*;
#(
  parameter int X_SIZE = 1536,
  parameter int X0     = 192,   // left edge of both plots
  parameter int PLOT_H = 480,   // height of each plot in rows
  parameter int ADC_Y0 = 40,    // top row of the ADC plot
  parameter int FFT_Y0 = 560,   // top row of the FFT plot
  parameter int DIVS   = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  cplx16_t            adc_data,
  input  logic               adc_valid,
  input  logic               adc_last,
  input  logic signed [15:0] fft_data,
  input  logic               fft_valid,
  input  logic               fft_last,
  input  scale_cfg_t         adc_scale,   // only for the division labels
  input  scale_cfg_t         fft_scale,
  input  logic [11:0]        px,
  input  logic [11:0]        py,
  output logic [23:0]        rgb
);
  localparam int CW = $clog2(X_SIZE);
  localparam int RW = $clog2(PLOT_H);
  localparam int XDIV = X_SIZE / DIVS;
  localparam int YDIV = PLOT_H / DIVS;

  logic [RW-1:0] mem_re  [X_SIZE];
  logic [RW-1:0] mem_im  [X_SIZE];
  logic [RW-1:0] mem_fft [X_SIZE];

  // ---------------- write side
  function automatic logic [RW-1:0] adc_row(input logic signed [15:0] v);
    int r = PLOT_H / 2 - int'(v);
    if (r < 0) r = 0;
    if (r > PLOT_H - 1) r = PLOT_H - 1;
    return RW'(r);
  endfunction

  function automatic logic [RW-1:0] fft_row(input logic signed [15:0] v);
    int r = PLOT_H - 1 - int'(v);
    if (r < 0) r = 0;
    if (r > PLOT_H - 1) r = PLOT_H - 1;
    return RW'(r);
  endfunction

  logic [CW-1:0] adc_col, fft_col;

  always_ff @(posedge clk) begin
    if (rst) begin
      adc_col <= '0;
      fft_col <= '0;
    end else begin
      if (adc_valid) adc_col <= (adc_last || int'(adc_col) == X_SIZE - 1) ? '0 : adc_col + 1'b1;
      if (fft_valid) fft_col <= (fft_last || int'(fft_col) == X_SIZE - 1) ? '0 : fft_col + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (adc_valid) begin
      mem_re[adc_col] <= adc_row(adc_data.re);
      mem_im[adc_col] <= adc_row(adc_data.im);
    end
    if (fft_valid) mem_fft[fft_col] <= fft_row(fft_data);
  end

  // ---------------- display side, stage 1: read the column under the beam
  wire in_x = int'(px) >= X0 && int'(px) < X0 + X_SIZE;
  wire [11:0] colx = px - 12'(X0);
  wire [CW-1:0] rcol = in_x ? CW'(colx) : '0;

  logic [RW-1:0] cur_re, cur_im, cur_fft, prv_re, prv_im, prv_fft;
  logic [11:0]   px1, py1;
  logic          in_x1;

  always_ff @(posedge clk) begin
    cur_re  <= mem_re[rcol];
    cur_im  <= mem_im[rcol];
    cur_fft <= mem_fft[rcol];
    // previous column (the same column at the left edge)
    prv_re  <= (px == 12'(X0)) ? mem_re[rcol]  : cur_re;
    prv_im  <= (px == 12'(X0)) ? mem_im[rcol]  : cur_im;
    prv_fft <= (px == 12'(X0)) ? mem_fft[rcol] : cur_fft;
    px1     <= px;
    py1     <= py;
    in_x1   <= in_x;
  end

  // ---------------- division labels, left of the plots (need a 160-pixel margin)
  logic lbl_on;
  if (X0 >= 160) begin : g_labels
    div_label_overlay #(.X_SIZE(X_SIZE), .PLOT_H(PLOT_H), .ADC_Y0(ADC_Y0), .FFT_Y0(FFT_Y0), .DIVS(DIVS)) u_lbl (
      .clk, .rst, .adc_scale, .fft_scale, .px, .py, .on(lbl_on)
    );
  end else begin : g_no_labels
    assign lbl_on = 1'b0;
  end

  // ---------------- stage 2: colour
  function automatic logic between(input int y, input logic [RW-1:0] a, input logic [RW-1:0] b);
    return (y >= int'(a) && y <= int'(b)) || (y >= int'(b) && y <= int'(a));
  endfunction

  always_ff @(posedge clk) begin
    int  xl, ya, yf;
    logic in_adc, in_fft, grid_x, grid_ya, grid_yf;
    xl = int'(px1) - X0;
    ya = int'(py1) - ADC_Y0;
    yf = int'(py1) - FFT_Y0;
    in_adc  = in_x1 && ya >= 0 && ya < PLOT_H;
    in_fft  = in_x1 && yf >= 0 && yf < PLOT_H;
    grid_x  = (xl % XDIV) == 0 || xl == X_SIZE - 1;
    grid_ya = (ya % YDIV) == 0 || ya == PLOT_H - 1;
    grid_yf = (yf % YDIV) == 0 || yf == PLOT_H - 1;
    if (rst) rgb <= '0;
    else if (lbl_on) rgb <= 24'hFFFFFF;
    else if (in_adc && between(ya, prv_re, cur_re))  rgb <= 24'h00FF00;
    else if (in_adc && between(ya, prv_im, cur_im))  rgb <= 24'hFFFF00;
    else if (in_fft && between(yf, prv_fft, cur_fft)) rgb <= 24'h00FFFF;
    else if ((in_adc && (grid_x || grid_ya)) || (in_fft && (grid_x || grid_yf))) rgb <= 24'h404040;
    else rgb <= 24'h000000;
  end
endmodule
