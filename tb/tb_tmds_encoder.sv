// Testbench of the TMDS encoder: random bytes in data periods separated by
// blanking with random control bits. Every data symbol is decoded back and
// compared with its byte, every blanking symbol must be the control token of
// its control bits, and the running disparity of the symbols sent in a data
// period must stay bounded (DC balance).
//
// Origin: a verification aid written for this design; it does not model
// anything of the original demonstrator beyond the behaviour described above.
module tb_tmds_encoder;
  logic clk = 0, rst = 1;
  logic [7:0] d;
  logic [1:0] c;
  logic de;
  logic [9:0] q;
  int checks = 0, failures = 0, cum = 0, maxcum = 0;

  tmds_encoder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] decode(input logic [9:0] s);
    logic [7:0] v = s[9] ? ~s[7:0] : s[7:0];
    logic [7:0] r;
    r[0] = v[0];
    for (int i = 1; i < 8; i++) r[i] = s[8] ? (v[i] ^ v[i-1]) : ~(v[i] ^ v[i-1]);
    return r;
  endfunction

  initial begin
    d = 0; c = 0; de = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 20000; i++) begin
      logic [7:0] dd;
      logic [1:0] cc;
      logic ee;
      dd = (i % 7 == 0) ? 8'hFF : (i % 11 == 0) ? 8'h00 : 8'($urandom);
      cc = 2'($urandom);
      ee = (i % 300) < 250;
      d <= dd; c <= cc; de <= ee;
      @(posedge clk);
      #1;
      checks++;
      if (ee) begin
        if (decode(q) !== dd) begin
          failures++;
          if (failures < 10) $display("byte %h -> %b decodes to %h", dd, q, decode(q));
        end
        cum += 2 * $countones(q) - 10;
        if (cum > maxcum) maxcum = cum;
        if (-cum > maxcum) maxcum = -cum;
      end else begin
        logic [9:0] tok;
        case (cc)
          2'b00: tok = 10'b1101010100;
          2'b01: tok = 10'b0010101011;
          2'b10: tok = 10'b0101010100;
          default: tok = 10'b1010101011;
        endcase
        if (q !== tok) failures++;
        cum = 0;
      end
    end
    checks++;
    if (maxcum > 14) begin
      failures++;
      $display("running disparity reached %0d", maxcum);
    end
    $display("max disparity %0d", maxcum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
