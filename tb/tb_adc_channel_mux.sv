// Testbench of the ADC channel multiplexer: random samples on all lanes,
// the selected lane must appear one cycle later with its valid.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_adc_channel_mux;
  import radar_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] sel;
  cplx16_t [3:0] s_data;
  logic [3:0] s_valid;
  cplx16_t m_data;
  logic m_valid;
  int checks = 0, failures = 0;

  adc_channel_mux dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = 0; s_data = '0; s_valid = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 300; i++) begin
      cplx16_t e;
      logic ev;
      sel = 2'($urandom);
      for (int k = 0; k < 4; k++) s_data[k] = $urandom;
      s_valid = 4'($urandom);
      e = s_data[sel];
      ev = s_valid[sel];
      @(posedge clk);
      #1;
      checks++;
      if (m_valid != ev || (ev && m_data !== e)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
