// Testbench of the ADC scaling path with the configuration style of the
// demonstrator (rising-edge trigger, divide by 8, interpolate by 3, decimate
// by 2), on a 16-sample capture window and a 24-column plot: each captured
// window must give exactly 24 output samples, the last flagged, whose values
// follow from the samples after the trigger crossing; a second part checks
// that a wider setting (interpolate by 6) is cut at 24 columns.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_adc_scaling;
  import radar_pkg::*;
  localparam int CL = 16, XS = 24;
  logic clk = 0, rst = 1;
  scale_cfg_t cfg;
  logic signed [15:0] trig_level;
  logic trig_falling;
  cplx16_t s_data, m_data;
  logic s_valid = 0, s_ready, m_valid, m_last, m_ready = 1, trig_fired, dropping;
  int checks = 0, failures = 0, nwin = 0, ndrop = 0;

  adc_scaling #(.CAPTURE_LEN(CL), .X_SIZE(XS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: trigger, scale, repeat, keep every M-th (and the last), cut
  int prev = 0, hp = 0, cap = 0, cnt = 0;
  cplx16_t win[$];
  cplx16_t expq[$];
  bit lastq[$];
  cplx16_t gotq[$];
  bit glastq[$];

  // outputs stream out while a window is still being captured, so the
  // comparison runs once the model has built the window
  task automatic compare();
    while (expq.size() != 0 && gotq.size() != 0) begin
      cplx16_t e, g;
      bit el, gl;
      e = expq.pop_front(); el = lastq.pop_front();
      g = gotq.pop_front(); gl = glastq.pop_front();
      checks++;
      if (g !== e || gl != el) begin
        failures++;
        if (failures < 10) $display("got %h/%0d expected %h/%0d", g, gl, e, el);
      end
    end
  endtask

  function automatic logic signed [15:0] sc(input logic signed [15:0] v);
    return cfg.multiply ? 16'(v <<< cfg.shift) : 16'(v >>> cfg.shift);
  endfunction

  task automatic build();
    int L = int'(cfg.interp), M = int'(cfg.decim), n = 0, ph = 0, total;
    total = win.size() * L;
    for (int i = 0; i < total; i++) begin
      cplx16_t v;
      v.re = sc(win[i / L].re);
      v.im = sc(win[i / L].im);
      if (ph == M - 1 || i == total - 1) begin
        if (n < XS) begin
          expq.push_back(v);
          lastq.push_back(n == XS - 1 || i == total - 1);
        end
        n++;
        ph = 0;
      end else ph++;
    end
    win.delete();
  endtask

  always @(posedge clk) begin
    if (!rst && s_valid && s_ready) begin
      int cur;
      cur = int'(s_data.re);
      if (cap || (hp && prev < trig_level && cur >= trig_level)) begin
        win.push_back(s_data);
        cnt++;
        cap = 1;
        if (cnt == CL) begin cap = 0; cnt = 0; hp = 0; build(); end
        else hp = 1;
      end else hp = 1;
      prev = cur;
    end
    if (!rst && m_valid && m_ready) begin
      gotq.push_back(m_data);
      glastq.push_back(m_last);
      if (m_last) nwin++;
    end
    if (dropping) ndrop++;
  end

  task automatic stream(input int n);
    for (int i = 0; i < n; i++) begin
      s_data.re <= 16'($rtoi(3000.0 * $sin(i * 0.3)));
      s_data.im <= 16'($rtoi(3000.0 * $cos(i * 0.3)));
      s_valid <= 1;
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      s_valid <= 0;
      repeat (3) @(posedge clk);  // ADC sample rate well below the clock
    end
  endtask

  initial begin
    cfg = '{shift: 4'd3, multiply: 1'b0, interp: 5'd3, decim: 5'd2};
    trig_level = 768; trig_falling = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    stream(300);
    repeat (20) @(posedge clk);
    compare();
    checks++;
    if (nwin < 3 || expq.size() != 0) begin failures++; $display("windows %0d left %0d", nwin, expq.size()); end
    // new setting from a clean start
    rst <= 1;
    @(posedge clk);
    win.delete(); cap = 0; hp = 0; cnt = 0; gotq.delete(); glastq.delete(); expq.delete(); lastq.delete();
    cfg.interp = 5'd6;
    rst <= 0;
    stream(300);
    repeat (20) @(posedge clk);
    compare();
    checks++;
    if (ndrop == 0 || gotq.size() >= XS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
