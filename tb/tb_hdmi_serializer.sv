// Testbench of the HDMI serializer block on a small raster (16x6 active).
// A stand-in for the frame buffer answers each pixel position with a known
// colour two pixel clocks later. The three serialized colour lanes are
// deserialized and TMDS-decoded by the testbench, using the clock lane to
// find symbol boundaries; every active pixel of two frames must arrive with
// its colour, in raster order, and hsync/vsync must appear as control tokens
// on the blue lane with the right lengths.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_hdmi_serializer;
  localparam int HA = 16, HF = 3, HS = 4, HB = 5, VA = 6, VF = 1, VS = 2, VB = 2;
  localparam int HT = HA + HF + HS + HB;
  logic pix_clk = 0, ser_clk = 0, rst = 1, ser_rst = 1;
  logic [23:0] rgb, rgb1;
  logic [11:0] px, py;
  logic frame_start;
  logic [3:0] tmds_rise, tmds_fall;
  int checks = 0, failures = 0;

  hdmi_serializer #(.HA(HA), .HF(HF), .HS(HS), .HB(HB), .VA(VA), .VF(VF), .VS(VS), .VB(VB)) dut (.*);

  always #5 pix_clk = ~pix_clk;
  always #1 ser_clk = ~ser_clk;

  function automatic logic [23:0] colour(input int x, input int y);
    return {8'(x * 7 + y), 8'((x ^ y) * 3), 8'(y * 5 + x + 1)};
  endfunction

  always @(posedge pix_clk) begin
    rgb1 <= colour(int'(px), int'(py));
    rgb  <= rgb1;
  end

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

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int idx = -1, frames = 0, hs_syms = 0, vs_syms = 0, in_vs = 0;
  always @(posedge ser_clk) begin
    if (st[0]) begin
      checks++;
      if (st != 3'b111 || (ic != 3'b000 && ic != 3'b111)) failures++;
      if (ic[0]) begin
        if (ctl[0][1] && !in_vs) begin
          // vsync starts: a new frame follows
          if (idx >= 0) begin
            checks++;
            if (idx != HA * VA) begin failures++; $display("frame had %0d pixels", idx); end
            frames++;
          end
          idx = 0;
        end
        in_vs = ctl[0][1];
        if (ctl[0][0]) hs_syms++;
        if (ctl[0][1]) vs_syms++;
      end else if (idx >= 0) begin
        logic [23:0] e;
        e = colour(idx % HA, idx / HA);
        checks++;
        if ({dat[2], dat[1], dat[0]} !== e) begin
          failures++;
          if (failures < 10) $display("pixel %0d: got %h expected %h", idx, {dat[2], dat[1], dat[0]}, e);
        end
        idx++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge pix_clk);
    rst <= 0;
    ser_rst <= 0;
    wait (frames == 2);
    checks++;
    // two complete frames seen: HS symbols per line, VS lines per frame
    if (hs_syms < 2 * HS * (VA + VF + VS + VB) - HS || vs_syms < 2 * VS * HT - HT) begin
      failures++;
      $display("sync symbols: hsync %0d vsync %0d", hs_syms, vs_syms);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
