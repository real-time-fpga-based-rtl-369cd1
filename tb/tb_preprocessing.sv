// Testbench of the pre-processing block: the radar LVDS model drives four
// receiver lanes plus frame clock and valid; the aligned samples must come out
// in the processing clock domain (a different, unrelated clock), all four
// lanes together and in order. A bit slip injected midway must cost exactly
// the damaged sample, be counted on every lane, and leave later samples
// intact.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_preprocessing;
  import radar_pkg::*;
  localparam int N_RX = 4;
  logic lvds_clk = 0, dsp_clk = 0, lvds_rst = 1, dsp_rst = 1, inject_slip = 0;
  logic [N_RX-1:0] data_rise, data_fall;
  logic frame_rise, frame_fall, valid_rise, valid_fall;
  align_cfg_t cfg;
  cplx16_t [N_RX-1:0] m_data;
  logic m_valid, fifo_overflow;
  logic [N_RX-1:0][15:0] bitslip_count;
  logic [N_RX-1:0] locked;
  logic sent, sent_lost;
  logic [N_RX-1:0][31:0] sent_data;
  int checks = 0, failures = 0, nout = 0;
  logic [N_RX-1:0][31:0] expq[$];

  radar_lvds_model #(.N_RX(N_RX)) u_src (
    .clk(lvds_clk), .rst(lvds_rst), .inject_slip, .data_rise, .data_fall,
    .frame_rise, .frame_fall, .valid_rise, .valid_fall, .sent, .sent_data, .sent_lost
  );

  preprocessing #(.N_RX(N_RX)) dut (
    .lvds_clk, .lvds_rst, .data_rise, .data_fall, .frame_rise, .frame_fall,
    .valid_rise, .valid_fall, .cfg, .dsp_clk, .dsp_rst, .m_data, .m_valid,
    .bitslip_count, .locked, .fifo_overflow
  );

  always #4 lvds_clk = ~lvds_clk;
  always #3.1 dsp_clk = ~dsp_clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge lvds_clk) if (!lvds_rst && sent && !sent_lost) expq.push_back(sent_data);

  always @(posedge dsp_clk) begin
    if (!dsp_rst && m_valid) begin
      logic [N_RX-1:0][31:0] e;
      e = expq.pop_front();
      checks++;
      if (m_data !== e) begin
        failures++;
        if (failures < 10) $display("sample %0d: got %h expected %h (queue %0d)", nout, m_data, e, expq.size());
      end
      nout++;
    end
  end

  initial begin
    cfg = '{width: ADC_W16, is_complex: 1'b1, lsb_first: 1'b0};
    repeat (4) @(posedge lvds_clk);
    lvds_rst <= 0;
    dsp_rst <= 0;
    repeat (3000) @(posedge lvds_clk);
    inject_slip <= 1;
    @(posedge lvds_clk);
    inject_slip <= 0;
    repeat (3000) @(posedge lvds_clk);
    checks++;
    if (nout < 300) failures++;
    for (int r = 0; r < N_RX; r++) begin
      checks++;
      if (bitslip_count[r] != 1) begin failures++; $display("lane %0d slips %0d", r, bitslip_count[r]); end
    end
    checks++;
    if (fifo_overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
