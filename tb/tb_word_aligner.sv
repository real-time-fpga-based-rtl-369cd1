// Testbench of the word aligner. Builds the lane bit streams of the radar
// front end (data, frame clock high for the first half of each sample, data
// valid during sample bits, idle gaps between samples) for several word
// formats, cuts them into bytes at an arbitrary offset and checks every
// sample. One run removes a bit in the middle of a sample to force a bit
// slip: that sample is lost, the slip is counted, and all later samples must
// again be right.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_word_aligner;
  import radar_pkg::*;
  logic clk = 0, rst = 1;
  align_cfg_t cfg;
  logic [7:0] din, frame, valid;
  logic din_strobe = 0;
  cplx16_t sample;
  logic sample_valid, locked;
  logic [15:0] bitslip_count;
  int checks = 0, failures = 0;

  word_aligner dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit qd[$], qf[$], qv[$];
  cplx16_t expq[$];

  task automatic add_word(input int w, input int value, input bit lsb, input bit first_half);
    for (int i = 0; i < w; i++) begin
      int bi = lsb ? i : w - 1 - i;
      qd.push_back(1'((value >> bi) & 1));
      qv.push_back(1'b1);
    end
  endtask

  task automatic run(input int w, input bit cplx, input bit lsb, input int nsmp, input int slip_at);
    int nbits;
    logic [15:0] slips0;
    cplx16_t got;
    qd.delete(); qf.delete(); qv.delete(); expq.delete();
    cfg.width      = (w == 12) ? ADC_W12 : (w == 14) ? ADC_W14 : ADC_W16;
    cfg.is_complex = cplx;
    cfg.lsb_first  = lsb;
    // idle lead-in of random length
    for (int i = 0; i < int'($urandom_range(13)) + 3; i++) begin
      qd.push_back(1'($urandom)); qf.push_back(1'b0); qv.push_back(1'b0);
    end
    for (int s = 0; s < nsmp; s++) begin
      int re = int'($urandom_range(2 ** w - 1)) - 2 ** (w - 1);
      int im = cplx ? int'($urandom_range(2 ** w - 1)) - 2 ** (w - 1) : 0;
      int len = cplx ? 2 * w : w;
      int start = qd.size();
      cplx16_t e;
      add_word(w, re, lsb, 1);
      if (cplx) add_word(w, im, lsb, 0);
      for (int i = 0; i < len; i++) qf.push_back(i < len / 2);
      if (s == slip_at) begin
        // lose one bit of this sample on all lanes
        qd.delete(start + 5); qf.delete(start + 5); qv.delete(start + 5);
      end else begin
        e.re = 16'(re);
        e.im = 16'(im);
        expq.push_back(e);
      end
      // an idle gap now and then
      if ((s % 3) == 2) begin
        qd.push_back(1'b0); qf.push_back(1'b0); qv.push_back(1'b0);
      end
    end
    for (int i = 0; i < 16; i++) begin qd.push_back(0); qf.push_back(0); qv.push_back(0); end
    slips0 = bitslip_count;
    nbits = qd.size() - qd.size() % 8;
    for (int b = 0; b < nbits; b += 8) begin
      for (int i = 0; i < 8; i++) begin
        din[7-i]   = qd[b+i];
        frame[7-i] = qf[b+i];
        valid[7-i] = qv[b+i];
      end
      din_strobe <= 1'b1;
      @(posedge clk);
      din_strobe <= 1'b0;
      @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("w=%0d cplx=%0d lsb=%0d: %0d samples missing", w, cplx, lsb, expq.size());
    end
    checks++;
    if (bitslip_count - slips0 != ((slip_at >= 0) ? 1 : 0)) begin
      failures++;
      $display("w=%0d: slip count %0d", w, bitslip_count - slips0);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && sample_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected sample");
      end else begin
        cplx16_t e;
        e = expq.pop_front();
        if (sample !== e) begin
          failures++;
          $display("sample got %h expected %h", sample, e);
        end
      end
    end
  end

  initial begin
    cfg = '0; din = 0; frame = 0; valid = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    run(16, 1, 0, 60, -1);
    run(12, 0, 1, 60, -1);
    run(14, 1, 1, 60, -1);
    run(16, 1, 0, 60, 20);
    run(12, 1, 0, 60, 33);
    checks++;
    if (!locked) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
