// Testbench helper: watches the four serialized HDMI lanes of the
// demonstrator, decodes them (tmds_lane_decoder) and rebuilds each frame's
// pixels in raster order, starting at every vsync. Per completed frame it
// reports how many pixels had each plot colour (white: the labels), and for the FFT plot the
// column whose cyan trace reaches highest (the strongest range bin on
// screen). Used only to check the demonstrator's picture in simulation.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module hdmi_frame_checker #(
  parameter int HA     = 1920,
  parameter int VA     = 1080,
  parameter int X0     = 192,
  parameter int X_SIZE = 1536,
  parameter int FFT_Y0 = 560
) (
  input  logic       ser_clk,
  input  logic [3:0] tmds_rise,
  input  logic [3:0] tmds_fall,
  output int         frames,        // complete frames seen
  output int         bad_frames,    // frames with a wrong pixel count
  output int         n_green,       // counts of the last complete frame
  output int         n_yellow,
  output int         n_cyan,
  output int         n_grid,
  output int         n_white,       // label pixels
  output int         fft_peak_col   // plot column of the highest cyan pixel
);
  logic [2:0] st, ic;
  logic [1:0] ctl [3];
  logic [7:0] dat [3];
  logic [9:0] sym [3];
  for (genvar i = 0; i < 3; i++) begin : g_dec
    tmds_lane_decoder u_dec (
      .ser_clk, .d_rise(tmds_rise[i]), .d_fall(tmds_fall[i]),
      .c_rise(tmds_rise[3]), .c_fall(tmds_fall[3]),
      .strobe(st[i]), .is_ctrl(ic[i]), .ctrl(ctl[i]), .data(dat[i]), .symbol(sym[i])
    );
  end

  int idx = -1, in_vs = 0, g = 0, y = 0, c = 0, gr = 0, wh = 0, best_row = 1 << 30, best_col = -1;
  initial begin
    frames = 0; bad_frames = 0; n_green = 0; n_yellow = 0; n_cyan = 0; n_grid = 0; n_white = 0; fft_peak_col = -1;
  end

  always @(posedge ser_clk) begin
    if (st[0]) begin
      if (ic[0]) begin
        if (ctl[0][1] && !in_vs) begin
          if (idx >= 0) begin
            frames++;
            if (idx != HA * VA) bad_frames++;
            n_green = g; n_yellow = y; n_cyan = c; n_grid = gr; n_white = wh; fft_peak_col = best_col;
          end
          idx = 0; g = 0; y = 0; c = 0; gr = 0; wh = 0; best_row = 1 << 30; best_col = -1;
        end
        in_vs = ctl[0][1];
      end else if (idx >= 0) begin
        logic [23:0] p;
        int px, py;
        p = {dat[2], dat[1], dat[0]};
        px = idx % HA;
        py = idx / HA;
        case (p)
          24'h00FF00: g++;
          24'hFFFF00: y++;
          24'h00FFFF: begin
            c++;
            if (py < best_row) begin best_row = py; best_col = px - X0; end
          end
          24'h404040: gr++;
          24'hFFFFFF: wh++;
          default: ;
        endcase
        idx++;
      end
    end
  end
endmodule
