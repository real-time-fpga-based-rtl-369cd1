// Testbench model of the radar front end's LVDS output (behavioural).
//
// Sends one complex 16-bit sample per receiver lane, MSB first, real word
// then imaginary word, with the frame-clock lane high for the first half of
// each sample and the data-valid lane high during its bits, followed by GAP
// idle bits. Two bits leave per bit clock (rising, falling edge). Each
// receiver sees the same echo: a sum of up to three tones (the targets) at
// bins TONE0..TONE2 of a CHIRP-sample chirp, with amplitudes that differ per
// receiver. A pulse on inject_slip drops one bit in the middle of the next
// sample on all lanes, as a bit slip on the link would. sent/sent_data report
// each sample as its transmission starts (sent_lost when it is the damaged
// one), so a testbench can predict the aligned output.
//
// Origin: the lane format (DDR bits, frame clock, data valid, complex 16-bit
// words) follows the radar front end as this design reads it; the signal
// content is invented for testing.
module radar_lvds_model #(
  parameter int N_RX  = 4,
  parameter int CHIRP = 32,
  parameter int GAP   = 4,
  parameter int TONE0 = 3,
  parameter int TONE1 = 7,
  parameter int TONE2 = 12,
  parameter real AMP  = 3000.0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  inject_slip,
  output logic [N_RX-1:0]       data_rise,
  output logic [N_RX-1:0]       data_fall,
  output logic                  frame_rise,
  output logic                  frame_fall,
  output logic                  valid_rise,
  output logic                  valid_fall,
  output logic                  sent,
  output logic [N_RX-1:0][31:0] sent_data,
  output logic                  sent_lost
);
  typedef logic [N_RX+1:0] slice_t;   // {valid, frame, data lanes}
  slice_t q[$];
  int t = 0;
  bit slip_pending = 0;

  function automatic logic [15:0] tone_sum(input int rx, input int n, input bit imag);
    real a = 0.0, g = 1.0 - 0.15 * rx;
    real w = 2.0 * 3.141592653589793 / CHIRP;
    a += AMP * g * (imag ? $sin(w * TONE0 * n) : $cos(w * TONE0 * n));
    a += 0.6 * AMP * g * (imag ? $sin(w * TONE1 * n + 0.5) : $cos(w * TONE1 * n + 0.5));
    a += 0.3 * AMP * g * (imag ? $sin(w * TONE2 * n + 1.0) : $cos(w * TONE2 * n + 1.0));
    return 16'($rtoi(a));
  endfunction

  always @(posedge clk) begin
    if (inject_slip) slip_pending = 1;
    sent <= 1'b0;
    if (rst) begin
      q.delete();
      t = 0;
      data_rise <= '0; data_fall <= '0;
      frame_rise <= 0; frame_fall <= 0; valid_rise <= 0; valid_fall <= 0;
    end else begin
      if (q.size() < 2) begin
        logic [N_RX-1:0][31:0] smp;
        int n;
        n = t % CHIRP;
        for (int r = 0; r < N_RX; r++) smp[r] = {tone_sum(r, n, 0), tone_sum(r, n, 1)};
        for (int b = 0; b < 32; b++) begin
          slice_t s;
          for (int r = 0; r < N_RX; r++) s[r] = smp[r][31 - b];
          s[N_RX] = (b < 16);
          s[N_RX+1] = 1'b1;
          if (!(slip_pending && b == 9)) q.push_back(s);
        end
        for (int g = 0; g < GAP; g++) q.push_back('0);
        sent <= 1'b1;
        sent_data <= smp;
        sent_lost <= slip_pending;
        slip_pending = 0;
        t++;
      end
      begin
        slice_t a, b;
        a = q.pop_front();
        b = q.pop_front();
        data_rise  <= a[N_RX-1:0];
        data_fall  <= b[N_RX-1:0];
        frame_rise <= a[N_RX];
        frame_fall <= b[N_RX];
        valid_rise <= a[N_RX+1];
        valid_fall <= b[N_RX+1];
      end
    end
  end
endmodule
