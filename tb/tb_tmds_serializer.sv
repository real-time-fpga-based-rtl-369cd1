// Testbench of the 10:1 DDR serializer: a new random symbol every five serial
// clocks (pixel clock = serial clock / 5, phase-aligned); the bit pairs are
// gathered and every symbol must reappear, bit 0 first, two bits per cycle.
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_tmds_serializer;
  logic ser_clk = 0, rst = 1;
  logic [9:0] word;
  logic q_rise, q_fall;
  int checks = 0, failures = 0;
  logic [9:0] sent[$];

  tmds_serializer dut (.*);
  always #1 ser_clk = ~ser_clk;

  initial begin
    repeat (100000) @(posedge ser_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the pixel-clock side: word changes right after the phase-0 edge
  int cyc = 0;
  logic [9:0] rx;
  int nrx = -1;
  always @(posedge ser_clk) begin
    if (rst) cyc = 0;
    else begin
      if (cyc % 5 == 0) begin
        // word sampled at this edge; next word for five cycles later
        sent.push_back(word);
        word <= 10'($urandom);
      end
      // bits of the symbol loaded at the previous phase-0 edge
      if (cyc >= 1) begin
        int k;
        k = (cyc - 1) % 5;
        rx[2*k]   = q_rise;
        rx[2*k+1] = q_fall;
        if (k == 4) begin
          logic [9:0] e;
          e = sent.pop_front();
          checks++;
          if (rx !== e) begin
            failures++;
            $display("got %b expected %b", rx, e);
          end
        end
      end
      cyc++;
    end
  end

  initial begin
    word = 10'h2AA;
    repeat (3) @(posedge ser_clk);
    rst <= 0;
    repeat (5000) @(posedge ser_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
