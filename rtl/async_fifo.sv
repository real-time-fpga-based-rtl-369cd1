// Asynchronous stream FIFO for the clock-domain crossings of the demonstrator.
//
// Valid/ready streams on both sides. The write and read pointers are kept in
// binary and Gray code; each Gray pointer crosses to the other clock through
// a two-flop synchroniser, so only one bit changes per step and the crossing
// is safe. Full and empty are computed from the local pointer and the
// synchronised remote one (the usual one-extra-bit comparison), so both are
// conservative. The storage is an array read asynchronously at the read
// pointer. Depth is 2**DEPTH_LOG2 words.
//
// Timing: a word written at the write side becomes visible at the read side
// 2-3 read-clock cycles later. Resets are per domain, synchronous.
//
// Origin: the original crosses clock domains with FIFOs but does not describe
// them; this Gray-pointer FIFO is a standard design chosen here.
module async_fifo #(
  parameter int W          = 32,
  parameter int DEPTH_LOG2 = 4
) (
  input  logic         wr_clk,
  input  logic         wr_rst,
  input  logic [W-1:0] s_data,
  input  logic         s_valid,
  output logic         s_ready,
  input  logic         rd_clk,
  input  logic         rd_rst,
  output logic [W-1:0] m_data,
  output logic         m_valid,
  input  logic         m_ready
);
  localparam int A = DEPTH_LOG2;

  logic [W-1:0] mem [2**A];

  logic [A:0] wbin, wgray, rbin, rgray;
  logic [A:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [A:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [A:0] bin2gray(input logic [A:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side
  wire [A:0] wbin_next = wbin + 1'b1;
  assign s_ready = (bin2gray(wbin) != {~rgray_w2[A:A-1], rgray_w2[A-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (s_valid && s_ready) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (s_valid && s_ready) mem[wbin[A-1:0]] <= s_data;
  end

  // ---------------- read side
  wire [A:0] rbin_next = rbin + 1'b1;
  assign m_valid = (rgray != wgray_r2);
  assign m_data  = mem[rbin[A-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (m_valid && m_ready) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
    end
  end

  // A full FIFO never accepts and an empty one never presents data.
  assert property (@(posedge wr_clk) disable iff (wr_rst) s_valid && !s_ready |=> $stable(wbin));
endmodule
