// Testbench of the LogMagMux: random complex samples (and the extreme
// values), each of the four outputs compared with a value computed in the
// testbench; the JPL approximation must also stay within 4 % of the true
// magnitude. Latency must be one cycle.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_log_mag_mux;
  import radar_pkg::*;
  logic clk = 0, rst = 1;
  logmag_sel_t sel;
  logic signed [15:0] s_re, s_im;
  logic s_valid = 0, s_last = 0;
  logic [31:0] m_data;
  logic m_valid, m_last;
  int checks = 0, failures = 0;

  log_mag_mux dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_val(input logmag_sel_t s, input int re, input int im);
    longint sq = longint'(re) * re + longint'(im) * im;
    longint a = (re < 0 ? -re : re), b = (im < 0 ? -im : im), mx, mn, t, r;
    mx = a > b ? a : b;
    mn = a > b ? b : a;
    case (s)
      LM_MAG_SQ: return sq;
      LM_MAG_JPL: begin
        t = mx - (mx >> 3) + (mn >> 1);
        return t > mx ? t : mx;
      end
      LM_MAG: begin
        r = longint'($floor($sqrt(real'(sq))));
        while (r * r > sq) r--;
        while ((r + 1) * (r + 1) <= sq) r++;
        return r;
      end
      default: begin
        int p = 0;
        longint frac;
        if (sq == 0) return 0;
        for (int i = 0; i < 32; i++) if ((sq >> i) & 1) p = i;
        frac = ((sq << 8) >> p) & 255;
        return ((longint'(p) << 8) + frac) >> 1;
      end
    endcase
  endfunction

  task automatic one(input logmag_sel_t s, input int re, input int im);
    longint e, got;
    sel     <= s;
    s_re    <= 16'(re);
    s_im    <= 16'(im);
    s_valid <= 1;
    s_last  <= 1'($urandom);
    @(posedge clk);
    s_valid <= 0;
    #1;
    checks++;
    if (!m_valid) failures++;
    e = expect_val(s, re, im);
    got = longint'(m_data);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("sel %0d (%0d,%0d): got %0d expected %0d", s, re, im, got, e);
    end
    if (s == LM_MAG_JPL && (re != 0 || im != 0)) begin
      real tm = $sqrt(real'(re) * re + real'(im) * im);
      checks++;
      if (got > tm * 1.04 + 1 || got < tm * 0.96 - 1) failures++;
    end
  endtask

  initial begin
    sel = LM_MAG_JPL; s_re = 0; s_im = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      one(logmag_sel_t'(k), -32768, -32768);
      one(logmag_sel_t'(k), 32767, -32768);
      one(logmag_sel_t'(k), 0, 0);
      one(logmag_sel_t'(k), 1, 0);
    end
    for (int i = 0; i < 2000; i++)
      one(logmag_sel_t'($urandom_range(3)), int'($urandom_range(65535)) - 32768,
          int'($urandom_range(65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
