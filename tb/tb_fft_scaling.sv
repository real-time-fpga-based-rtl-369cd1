// Testbench of the FFT scaling path in the demonstrator's setting
// (divide by 2, interpolate by 6, decimate by 2) on 32-bin windows and a
// 48-column plot: 32 bval give 96 values of which the first 48 (bval 0..15,
// each three times) must be sent, the 48th flagged last, the rest dropped;
// also a value above the 16-bit range must saturate. Windows arrive as a
// burst of one bin per cycle, as they leave the accumulator.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_fft_scaling;
  import radar_pkg::*;
  localparam int NB = 32, XS = 48, IW = 41;
  logic clk = 0, rst = 1;
  scale_cfg_t cfg;
  logic [IW-1:0] s_data;
  logic s_valid = 0, s_last = 0, s_ready, m_valid, m_last, m_ready = 1, dropping;
  logic [15:0] m_data;
  int checks = 0, failures = 0, nwin = 0, nout = 0;
  longint bval[NB];

  fft_scaling #(.IN_W(IW), .X_SIZE(XS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && m_valid && m_ready) begin
      longint e;
      e = bval[nout / 3] >> 1;
      if (e > 32767) e = 32767;
      checks++;
      if (longint'(m_data) != e || m_last != (nout == XS - 1)) begin
        failures++;
        if (failures < 10) $display("out %0d: got %0d/%0d expected %0d", nout, m_data, m_last, e);
      end
      nout++;
      if (m_last) begin nwin++; nout = 0; end
    end
  end

  initial begin
    cfg = '{shift: 4'd1, multiply: 1'b0, interp: 5'd6, decim: 5'd2};
    s_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 4; w++) begin
      for (int k = 0; k < NB; k++) bval[k] = (k == 5) ? 64'd1 << 30 : longint'($urandom_range(40000));
      for (int k = 0; k < NB; k++) begin
        s_data <= IW'(bval[k]); s_valid <= 1; s_last <= (k == NB - 1);
        @(posedge clk);
        while (!s_ready) @(posedge clk);
      end
      s_valid <= 0;
      repeat (NB * 6 + 20) @(posedge clk);
    end
    checks++;
    if (nwin != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
