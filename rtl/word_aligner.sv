// Word alignment block: turns deserialized LVDS bytes into complex samples.
//
// The radar front end sends 12-, 14- or 16-bit words, real-only or complex,
// MSB- or LSB-first, over a serial lane accompanied by a frame clock and a
// data-valid line. The deserializer cuts all three lanes into bytes at
// arbitrary bit positions, so the byte boundaries carry no meaning. This block
// walks the eight bits of each byte in arrival order (bit 7 first) and:
//   * starts a new sample at every rising edge of the frame clock,
//   * shifts data bits into a word register only while data-valid is high,
//   * closes a word after cfg.width bits, puts it in bit order, sign-extends
//     it to 16 bits, and
//   * in complex mode pairs the first word (real) with the second (imaginary).
// A frame-clock edge that arrives while a sample is only partly assembled is
// a bit slip: it is counted and corrected by restarting the sample at that
// edge, which re-locks the alignment at once. The word format is set by the
// control register cfg; edge meaning and real-before-imaginary order are this
// design's reading of the front end's LVDS format.
//
// Timing: one byte per din_strobe; sample/sample_valid are registered and
// appear the cycle after the strobe that completes the sample. At most one
// sample completes per byte since words are at least 12 bits long.
//
// Origin: word widths 12/14/16, real or complex, bit order and bit-slip
// handling via frame clock and data valid follow the original; the exact slip
// rule is this design's.
module word_aligner
  import radar_pkg::*;
#(
  parameter int DIN_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  align_cfg_t       cfg,
  input  logic [DIN_W-1:0] din,
  input  logic [DIN_W-1:0] frame,
  input  logic [DIN_W-1:0] valid,
  input  logic             din_strobe,
  output cplx16_t          sample,
  output logic             sample_valid,
  output logic             locked,
  output logic [15:0]      bitslip_count
);
  logic [15:0] word_q;
  logic [4:0]  bitcnt_q;
  logic        im_phase_q;     // waiting for the imaginary word
  logic signed [15:0] re_q;
  logic        prev_frame_q;
  logic        locked_q;

  logic [4:0] wbits;
  always_comb begin
    unique case (cfg.width)
      ADC_W12: wbits = 5'd12;
      ADC_W14: wbits = 5'd14;
      default: wbits = 5'd16;
    endcase
  end

  // Right-justify an LSB-first word and sign-extend it to 16 bits.
  function automatic logic signed [15:0] finish_word(input logic [15:0] w,
                                                     input logic [4:0] n,
                                                     input logic lsb_first);
    logic [15:0] r;
    r = lsb_first ? (w >> (5'd16 - n)) : w;
    r = r << (5'd16 - n);
    return $signed(r) >>> (5'd16 - n);
  endfunction

  always_ff @(posedge clk) begin
    logic [15:0] word;
    logic [4:0]  bitcnt;
    logic        im_phase, prevf, lck, emit;
    logic signed [15:0] re, val;
    cplx16_t     out;
    logic [15:0] slips;
    if (rst) begin
      word_q        <= '0;
      bitcnt_q      <= '0;
      im_phase_q    <= 1'b0;
      re_q          <= '0;
      prev_frame_q  <= 1'b0;
      locked_q      <= 1'b0;
      sample        <= '0;
      sample_valid  <= 1'b0;
      bitslip_count <= '0;
    end else begin
      sample_valid <= 1'b0;
      if (din_strobe) begin
        word     = word_q;
        bitcnt   = bitcnt_q;
        im_phase = im_phase_q;
        re       = re_q;
        prevf    = prev_frame_q;
        lck      = locked_q;
        slips    = bitslip_count;
        emit     = 1'b0;
        out      = '0;
        for (int i = DIN_W - 1; i >= 0; i--) begin
          if (frame[i] && !prevf) begin
            if (lck && (bitcnt != 0 || im_phase)) slips = slips + 1'b1;
            bitcnt   = '0;
            im_phase = 1'b0;
            lck      = 1'b1;
          end
          prevf = frame[i];
          if (lck && valid[i]) begin
            word   = cfg.lsb_first ? {din[i], word[15:1]} : {word[14:0], din[i]};
            bitcnt = bitcnt + 1'b1;
            if (bitcnt == wbits) begin
              val    = finish_word(word, wbits, cfg.lsb_first);
              bitcnt = '0;
              if (!cfg.is_complex) begin
                out.re = val;
                out.im = '0;
                emit   = 1'b1;
              end else if (!im_phase) begin
                re       = val;
                im_phase = 1'b1;
              end else begin
                out.re   = re;
                out.im   = val;
                im_phase = 1'b0;
                emit     = 1'b1;
              end
            end
          end
        end
        word_q        <= word;
        bitcnt_q      <= bitcnt;
        im_phase_q    <= im_phase;
        re_q          <= re;
        prev_frame_q  <= prevf;
        locked_q      <= lck;
        bitslip_count <= slips;
        if (emit) begin
          sample       <= out;
          sample_valid <= 1'b1;
        end
      end
    end
  end

  assign locked = locked_q;
endmodule
