// Testbench of the trigger: a noisy sine on the real part, rising and then
// falling edge at two levels, random back-pressure. A reference model in the
// testbench replays the accepted samples and predicts which are passed; the
// outputs, the last flags and the number of captures are compared.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_trigger;
  import radar_pkg::*;
  localparam int CL = 8;
  logic clk = 0, rst = 1;
  logic signed [15:0] level;
  logic falling;
  cplx16_t s_data, m_data;
  logic s_valid = 0, s_ready, m_valid, m_last, m_ready = 1, fired;
  int checks = 0, failures = 0, nfired = 0, nexp_fired = 0;

  trigger #(.CAPTURE_LEN(CL)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (!drain) m_ready <= 1'($urandom_range(3) != 0);
  bit drain = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  bit cap = 0, hp = 0;
  int prev = 0, cnt = 0;
  cplx16_t expq[$];
  bit lastq[$];

  always @(posedge clk) begin
    if (!rst && s_valid && s_ready) begin
      int cur;
      bit crs;
      cur = int'(s_data.re);
      crs = hp && (falling ? (prev > level && cur <= level) : (prev < level && cur >= level));
      prev = cur;
      hp = 1;
      if (cap || crs) begin
        if (!cap) nexp_fired++;
        expq.push_back(s_data);
        lastq.push_back(cnt == CL - 1);
        if (cnt == CL - 1) begin cap = 0; cnt = 0; hp = 0; end
        else begin cap = 1; cnt++; end
      end
    end
    if (!rst && m_valid && m_ready) begin
      cplx16_t e;
      bit el;
      e = expq.pop_front();
      el = lastq.pop_front();
      checks++;
      if (m_data !== e || m_last != el) begin
        failures++;
        $display("got %h/%0d expected %h/%0d", m_data, m_last, e, el);
      end
    end
    if (!rst && fired) nfired++;
  end

  initial begin
    level = 768; falling = 0; s_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      if (i == 1000) begin level <= -200; falling <= 1; end
      s_data.re <= 16'($rtoi(2000.0 * $sin(i * 0.21)) + int'($urandom_range(40)) - 20);
      s_data.im <= 16'(i);
      s_valid   <= 1'($urandom_range(3) != 0);
      @(posedge clk);
      while (s_valid && !s_ready) @(posedge clk);
    end
    s_valid <= 0;
    drain = 1;
    m_ready <= 1;
    repeat (3) @(posedge clk);
    checks++;
    if (nfired != nexp_fired || nfired < 20) begin
      failures++;
      $display("fired %0d expected %0d", nfired, nexp_fired);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
