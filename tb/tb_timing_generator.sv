// Testbench of the video timing generator at its default 1080p60 settings:
// over one whole frame it counts active pixels, hsync and vsync lengths and
// positions, the frame period (2200 x 1125 pixel clocks, i.e. 60 Hz at
// 148.5 MHz), and checks that px/py walk the raster.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_timing_generator;
  logic clk = 0, rst = 1;
  logic [11:0] px, py;
  logic de, hsync, vsync, frame_start;
  int checks = 0, failures = 0;

  timing_generator dut (.*);
  always #1 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, want);
    end
  endtask

  initial begin
    longint cyc = 0, n_de = 0, n_hs = 0, n_vs = 0, hs_rise = 0, bad_pos = 0, bad_de = 0;
    logic hs_q;
    longint hs_start_px = -1;
    repeat (2) @(posedge clk);
    rst <= 0;
    // wait for the first frame start
    do @(posedge clk); while (!frame_start);
    hs_q = hsync;
    do begin
      if (de) n_de++;
      if (hsync) n_hs++;
      if (vsync) n_vs++;
      if (hsync && !hs_q) begin
        hs_rise++;
        if (hs_start_px < 0) hs_start_px = px;
      end
      if (de != (px < 1920 && py < 1080)) bad_de++;
      if (px >= 2200 || py >= 1125) bad_pos++;
      hs_q = hsync;
      cyc++;
      @(posedge clk);
    end while (!frame_start);
    expect_eq("frame period", cyc, 2200 * 1125);
    expect_eq("active pixels", n_de, 1920 * 1080);
    expect_eq("hsync pixels", n_hs, 44 * 1125);
    expect_eq("hsync pulses", hs_rise, 1125);
    expect_eq("hsync start", hs_start_px, 1920 + 88);
    expect_eq("vsync pixels", n_vs, 5 * 2200);
    expect_eq("data enable outside active area", bad_de, 0);
    expect_eq("position out of raster", bad_pos, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
