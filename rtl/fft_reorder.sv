// Bit-reversal reorder buffer at the output of the SDF FFT.
//
// The delay-feedback pipeline delivers the bins of each window in bit-reversed
// order, n-1 samples after the window's first input (n = 2**log2n, the
// run-time size). This block drops those first n-1 warm-up outputs, writes
// each following window into one half of a ping-pong memory at the
// bit-reversed address, and, as soon as a half is full, reads it out in
// natural bin order at one word per cycle while the other half fills.
//
// Timing: the read burst of a window starts the cycle after its last bin is
// written and lasts n cycles; m_last marks bin n-1. Since the write side gets
// at most one sample per cycle, a burst always ends before the other half is
// full. A change of log2n must come with rst.
//
// Origin: this design's own output stage for the FFT; the original FFT core's
// output order is not relied on.
module fft_reorder #(
  parameter int LOG2N = 10,
  parameter int W     = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       log2n,
  input  logic [W-1:0]     in_data,
  input  logic             in_valid,
  output logic [W-1:0]     m_data,
  output logic             m_valid,
  output logic             m_last
);
  localparam int N = 2 ** LOG2N;

  logic [W-1:0] mem [2*N];

  logic             warm;        // warm-up samples dropped
  logic [LOG2N-1:0] wcnt, ridx;
  logic             wbank, rbank, reading;

  wire [LOG2N-1:0] nm1 = LOG2N'((N >> (LOG2N - int'(log2n))) - 1);

  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] v);
    for (int i = 0; i < LOG2N; i++) bitrev[i] = v[LOG2N-1-i];
  endfunction
  wire [LOG2N-1:0] waddr = bitrev(wcnt) >> (LOG2N - int'(log2n));

  always_ff @(posedge clk) begin
    if (rst) begin
      warm    <= 1'b0;
      wcnt    <= '0;
      wbank   <= 1'b0;
      rbank   <= 1'b0;
      reading <= 1'b0;
      ridx    <= '0;
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      m_data  <= '0;
    end else begin
      if (in_valid) begin
        if (!warm) begin
          // n-1 warm-up outputs (none when n = 1)
          if (wcnt == nm1 - 1'b1 || nm1 == 0) begin
            warm <= 1'b1;
            wcnt <= '0;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end else begin
          if (wcnt == nm1) begin
            wcnt    <= '0;
            wbank   <= ~wbank;
            rbank   <= wbank;
            reading <= 1'b1;
            ridx    <= '0;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
      end
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      if (reading && !(in_valid && warm && wcnt == nm1)) begin
        m_data  <= mem[{rbank, ridx}];
        m_valid <= 1'b1;
        m_last  <= (ridx == nm1);
        ridx    <= ridx + 1'b1;
        if (ridx == nm1) reading <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && warm) mem[{wbank, waddr}] <= in_data;
  end
endmodule
