# Real-time range radar display with HDMI output

An FMCW radar front end such as the TI AWR2243 streams raw ADC samples over
LVDS. The samples mean nothing to the eye until they are Fourier-transformed
into a range profile. This design does all of that on an FPGA, with no PC in the
data path. It takes the LVDS lanes of up to four receivers and computes one FFT
per chirp and receiver. Range profiles are averaged over many chirps and
combined across receivers. Two live plots go out on a 1080p60 HDMI monitor:

* upper plot: the raw complex ADC samples of one receiver, with the real part
  in green and the imaginary part in yellow, held steady by an oscilloscope-style
  trigger;
* lower plot: the range spectrum, in cyan. Each peak is a target, and its
  column gives the target's distance.

Every processing choice can be changed at run time through one control-register
structure: the sample format, FFT size, magnitude type, number of chirps
averaged, receiver combining, trigger, and the scale and stretch of each plot.
This structure is written over JTAG in a real system.

The SystemVerilog is synthesizable and written with no vendor primitives. It
covers everything between the LVDS input pins and the TMDS output bits. The
PLL, the radar chip and the JTAG register access are outside it.

## Signal path and clock domains

```
 LVDS lanes        lvds_clk                 dsp_clk                          pix_clk                      ser_clk
 data x4  ──► deserializer ─► word    ─┐                                                                 
 frame    ──► deserializer ─► aligner  ├► FIFO ─► 4 x [SDF FFT ─► LogMagMux ─► accumulator] ─► non-coherent ─► FIFO ─► FFT scaling ─┐
 valid    ──► deserializer ─►  (x4)   ─┘      │                                               adder       (1 window)            ├► frame ─► TMDS ─► 10:1 DDR ─► HDMI
                                              └► N:1 mux (one receiver's raw samples) ──────────────────────► FIFO ─► ADC scaling ─┘  buffer    encode   serializers
```

There are four clock domains. Asynchronous FIFOs with Gray-coded pointers join
them (`async_fifo`):

| clock | rate in the reference setup | what runs on it |
|---|---|---|
| `lvds_clk` | radar bit clock, 296 MHz for 18.5 MS/s complex 16-bit (2 bits per clock, DDR) | deserializers, word aligners |
| `dsp_clk` | anything ≥ the sample rate | FFT, LogMagMux, accumulator, adder, ADC multiplexer |
| `pix_clk` | 148.5 MHz | scaling paths, frame buffer, video timing, TMDS encoders |
| `ser_clk` | 742.5 MHz, exactly 5 × `pix_clk` and phase-aligned with it | TMDS serializers |

Each domain has its own synchronous reset. The receivers share one FIFO into
`dsp_clk`, so the four DSP chains run in lock-step. The spectrum FIFO holds a
whole window (2^LOG2N words), because of a rate mismatch between its two sides:

* the accumulator emits a window as a burst of one bin per `dsp_clk`;
* the FFT scaling path may take only one bin every *L* pixel clocks, where *L*
  is the interpolation factor.

## Pre-processing: from LVDS bits to complex samples

`preprocessing` bundles the parts below.

**Deserializer** (`data_deserializer`). Each LVDS lane arrives as two bits per
`lvds_clk`, sampled on the rising and the falling edge. The deserializer shifts
them into a byte with the first bit in bit 7. It raises `dout_valid` every 4
clocks. The three kinds of lane each get one: every data lane, the frame-clock
lane and the data-valid lane.

**Word aligner** (`word_aligner`). Byte boundaries fall anywhere in a sample, so
the aligner walks each byte bit by bit:

* A rising edge of the frame clock starts a new sample.
* Data bits are collected only while data-valid is high.
* After 12, 14 or 16 bits the word is put in bit order (MSB- or LSB-first) and
  sign-extended to 16 bits.
* In complex mode the first word is the real part and the second the imaginary
  part. In real mode the imaginary part is 0.

A frame edge that arrives while a sample is half built is a *bit slip*. The
partial sample is dropped, the slip is counted in `bitslip_count`, and the new
sample starts at that edge, so alignment recovers within one sample. `aligned`
goes high at the first frame edge.

`preprocessing` checks with an assertion that all lanes finish their samples on
the same clock. It raises `fifo_overflow` if the FIFO into `dsp_clk` ever
refuses a sample.

## DSP chain, one per receiver

`dsp_chain` runs `sdf_fft`, then `log_mag_mux`, then `accumulator`. It is the
costliest part of the design and the hardest to follow.

### SDF FFT (`sdf_fft`, `sdf_stage`, `fft_reorder`)

The FFT is a streaming radix-2 decimation-in-frequency (DIF) pipeline with
single-path delay feedback (SDF). It has one complex sample in and one out per
input beat, and no stalls between windows. Stage *s* of an N-point FFT holds a
delay line of D = N/2^(s+1) words and counts through 2D samples in two halves:

1. **Fill half.** Each incoming sample goes into the delay line. The word it
   pushes out is the difference a−b left by the previous butterfly. That word
   leaves the stage multiplied by the twiddle exp(−jπk/D).
2. **Butterfly half.** The stored sample a and the incoming sample b make a
   butterfly. a+b leaves at once; a−b goes back into the delay line.

The stages have delays N/2, N/4, …, 1, and together need N−1 words of
storage per receiver.

**Run-time size.** The size is fixed at build time (LOG2N = 10, 1024 points).
A smaller power-of-two size 2^`fft_log2n` is run by bypassing the first,
largest stages. Changing `fft_log2n` restarts the pipeline.

**Twiddles.** Twiddle tables are computed at elaboration in 1.14 fixed point.

**Word width and scaling.** Inside the pipeline samples grow to
16 + LOG2N + 1 bits, so no stage can overflow. The output is X[k]/n, rounded
and saturated back to 16 bits. A pure tone of amplitude A in a bin therefore
comes out with magnitude about A whatever the FFT size, which keeps the plot
scale independent of `fft_log2n`.

**Output order.** The pipeline delivers bins in bit-reversed order. The output
for window *w* appears while window *w+1* streams in: the pipeline only moves
when samples arrive, and the first n−1 outputs after reset are warm-up values
that are discarded. `fft_reorder` writes each window into one half of a 2n-word
ping-pong memory at the bit-reversed address. It reads the full half out in
natural order as a burst of n beats, with `m_last` on bin n−1.

### LogMagMux (`log_mag_mux`)

LogMagMux computes four magnitude forms in parallel and outputs the one
selected by `logmag_sel`:

* `LM_MAG_SQ`: the squared magnitude re² + im², exact.
* `LM_MAG`: the exact magnitude, from a bit-serial integer square root unrolled
  into logic.
* `LM_MAG_JPL`: the "alpha-max plus beta-min" approximation
  max(a, 7/8·a + 1/2·b), where a and b are the larger and smaller of |re| and
  |im|. It uses only shifts and adds, and its error is below about 4 %.
* `LM_LOG2`: log2|z| in unsigned Q5.8. The integer part is the leading-one
  position. The fraction is the next 8 mantissa bits, read linearly, with an
  error below 0.09.

The block has one register stage.

### Accumulator (`accumulator`)

The accumulator averages out noise by summing `acc_frames` consecutive windows
bin by bin (1..128, with 0 read as 1). It keeps one running sum per bin in a
2^LOG2N-word memory:

* the first window of a group is stored as it arrives;
* each middle window is added into the memory;
* during the last window, each bin's total is sent out immediately instead of
  being written back.

So there is no separate read-out pass, and the output is one summed window per
`acc_frames` input windows. The window length comes from the incoming `last` flag, so every
run-time FFT size works. The output width is 32 + 7 = 39 bits, which cannot
wrap even for 128 full-scale windows.

## Combining receivers

`noncoherent_adder` has two modes:

* with `nca_add_all` set, it adds the four accumulated spectra bin by bin. The
  result is 41 bits wide, and the receivers must be in step, which an assertion
  checks;
* otherwise it passes the single receiver chosen by `nca_sel`.

Adding magnitudes rather than complex values makes the combination
non-coherent. Receiver phase differences then do not matter.

`adc_channel_mux` chooses which receiver's raw samples (`adc_mux_sel`) go to
the ADC plot. This choice does not affect the spectrum.

## Scaling paths: fitting a window to the plot width

Each plot is X_SIZE = 1536 columns wide. The number of samples per window
varies: the chirp length on the ADC side, the FFT size on the spectrum side. So
each path resamples its stream with a chain of small valid/ready blocks:

| block | ADC path (`adc_scaling`) | FFT path (`fft_scaling`) |
|---|---|---|
| `trigger` | waits for the real part to cross `trig_level` (rising or falling edge, `trig_falling`), then passes CAPTURE_LEN = 1024 samples as one window and discards samples in between | — |
| `scaler` | ×2^N or ÷2^N (`shift`, `multiply`) with saturation to 16 bits, on both lanes | same, on the magnitude |
| `interpolator` | repeats each sample L times (zero-order hold) | same |
| `decimator` | keeps every M-th sample and always the last one of a window | same |
| `data_counter` | passes the first X_SIZE samples of a window, marks the X_SIZE-th as last, and drops the rest (`adc_truncating`) | same (`fft_truncating`) |

**Reference setup.** Both paths fill all 1536 columns:

* ADC path: 1024 samples × 3 / 2 = 1536, the whole chirp.
* FFT path: 1024 bins × 6 / 2 = 3072. The data counter keeps the first 1536
  samples, which are bins 0..511. In complex sampling these are the positive
  ranges.

The trigger re-arms only after a capture ends and needs a fresh crossing, so
each capture starts at the same phase of the signal.

## Frame buffer (`frame_buffer`)

A full 1920×1080 RGB frame would not fit in block RAM. A line plot needs only
one value per column, so the buffer keeps three column memories of X_SIZE
entries: ADC real, ADC imaginary and FFT.

**Writing.** Each incoming value is converted to a row as it arrives and
clipped to PLOT_H = 480 rows:

* ADC values: zero in the middle of the plot, positive up;
* FFT values: zero at the bottom.

The write pointer returns to column 0 on a window's last sample.

**Drawing.** While the screen is drawn, the buffer reads the memory for the
column under the beam. A pixel is lit when its row lies between the previous
column's value and this column's, which draws connected lines.

**Layout.** Both plots start at x = 192. The ADC plot spans rows 40–519 and
the FFT plot rows 560–1039. Each has an 8×8 grey grid. Lines are green (real),
yellow (imaginary) and cyan (FFT), on black.

**Division labels** (`div_label_overlay`). Left of each plot, two white lines
state what one grid division is worth:

* `X n`: samples (ADC plot) or FFT bins (FFT plot) per division, equal to
  (X_SIZE/8)·M/L with that path's interpolation L and decimation M;
* `Y n`: input units per division, equal to (PLOT_H/8)·2^N when the scaler
  divides by 2^N, and (PLOT_H/8)/2^N when it multiplies.

The values are recomputed from the settings at the start of each frame. They
are converted to up to 7 decimal digits and drawn in a 5×7 font at double
size. In the reference setup the FFT plot shows X 64: 192·2/6 = 64 bins per
division, 512 bins over 8 divisions. Labels need a left margin X0 of at least
160 pixels; smaller test geometries leave them out.

**Timing.** `rgb` follows the pixel position by two pixel clocks. The HDMI block
delays its sync and data-enable signals to match.

## HDMI transmitter (`hdmi_serializer`)

The HDMI transmitter has three parts:

* **`timing_generator`** counts the CEA-861 1080p60 raster: 2200 × 1125 pixels
  at 148.5 MHz, with positive syncs. It outputs the pixel position,
  data-enable, hsync, vsync and `frame_start`.
* **`tmds_encoder`**, one per colour, follows the DVI 1.0 algorithm.
  Transition minimisation uses XOR/XNOR chosen by ones count. DC balance keeps
  a running disparity and inverts the data when needed. The four control
  tokens are sent during blanking, and hsync/vsync travel on the blue
  channel's control bits.
* **`tmds_serializer`**, one per lane, plus a fourth lane for the TMDS clock
  pattern `0000011111`. It loads a 10-bit symbol every 5 `ser_clk` cycles and
  sends 2 bits per cycle, LSB first: `q_rise` on the rising edge, `q_fall` on
  the falling edge. `ser_clk` must be exactly 5 × `pix_clk`, with a `pix_clk`
  edge on every fifth `ser_clk` edge. An FPGA build connects `q_rise`/`q_fall`
  to a DDR output register and a differential output buffer.

Lanes 0, 1 and 2 carry blue, green and red; lane 3 carries the clock.

## Control registers and status

`cfg` is one packed `radar_pkg::demo_cfg_t`. Change a field only while the
block it controls is idle, or accept one corrupted window.

| field | meaning | reference setup |
|---|---|---|
| `align.width/is_complex/lsb_first` | LVDS word format | 16 bit, complex, MSB first |
| `fft_log2n` | FFT size 2^n, 1..LOG2N | 10 |
| `logmag_sel` | magnitude form | `LM_MAG` |
| `acc_frames` | windows per accumulation, 1..128 | 128 |
| `nca_add_all`, `nca_sel` | add all receivers, or pass one | add all |
| `adc_mux_sel` | receiver in the ADC plot | 1 |
| `trig_level`, `trig_falling` | trigger | 768, rising |
| `adc_scale` | shift/multiply/interp/decim of the ADC path | ÷8 (shift 3), 3, 2 |
| `fft_scale` | same for the spectrum | ÷2 (shift 1), 6, 2 |

The FFT shift of 1 in the reference setup suits the original system. There,
the magnitude is evidently scaled differently before the accumulator: a sum of
128 windows divided only by 2 would not fit 480 rows. In this design the
spectrum reaching the scaler is Σ|X/n| over the chirps and receivers. Choose
`fft_scale.shift` for your signal level; the full-system testbench uses 12 for
targets of amplitude 3000.

Status outputs of the top:

| output | meaning |
|---|---|
| `bitslip_count`, `aligned` | per lane |
| `lvds_overflow`, `adc_overflow`, `fft_overflow` | a clock-crossing FIFO refused data; this should never happen at sane clock ratios |
| `trig_fired` | the trigger started a capture |
| `adc_window_done`, `fft_window_done` | a plot's last column was written |
| `adc_truncating`, `fft_truncating` | the data counter is dropping samples |
| `frame_start` | a new video frame begins |

## Parameters of the top (`radar_demonstrator_top`)

| parameter | default | meaning |
|---|---|---|
| `N_RX` | 4 | receivers (LVDS data lanes) |
| `LOG2N` | 10 | maximum FFT size 2^LOG2N, also accumulator depth |
| `MAX_FRAMES_LOG2` | 7 | up to 128 windows per accumulation |
| `CAPTURE_LEN` | 1024 | samples per ADC capture |
| `X_SIZE` | 1536 | plot width in columns |
| `X0`, `PLOT_H`, `ADC_Y0`, `FFT_Y0` | 192, 480, 40, 560 | plot placement |
| `HA HF HS HB VA VF VS VB` | 1920 88 44 148 1080 4 5 36 | video timing |

Size estimate from a generic Yosys synthesis of the full default design, with
memories kept as arrays: about 8,800 cells (2,200 of them for the label text), 4,000 flip-flops and 0.86 Mbit of
memory. The memory is mostly the FFT delay lines, reorder buffers and
accumulators of the four chains, plus the spectrum FIFO.

## How this design relates to the original demonstrator

**Follows the original:**

* the block structure and order: pre-processing with deserializers and word
  alignment, one FFT → LogMagMux → accumulator chain per receiver,
  non-coherent adder, N:1 multiplexer, the two scaling chains, frame buffer,
  four serializers;
* the run-time configurable parameters and the reference configuration;
* the 1536-column plot width and the truncation in the data counter;
* the clock rates for 1080p60.

**This design's own choices:**

* **Vendor IP replaced by plain RTL.** The original used FPGA vendor IP for the
  LVDS deserializers (1:8 DDR) and the HDMI serializers (10:1 DDR, master/slave
  pair). Here a shift register fed by two edge samples replaces each.
* **FFT.** The original used a third-party parameterizable SDF FFT. This one is
  written from scratch: radix-2 DIF only, scaling by 1/n, output reordered to
  natural order.
* **Internal details.** The following are not taken from the original:
  * LogMagMux's approximations;
  * the accumulator's emit-during-last-window scheme;
  * the bit-slip rule;
  * real-before-imaginary word order;
  * the frame buffer's column-memory layout and line drawing, plot placement,
    the cyan/grey/white colours, and the label font and placement;
  * the handshakes (valid/ready with `last`);
  * the FIFO depths and the single shared pre-processing FIFO.
* **Control registers** are a struct port. The JTAG access logic is not part of
  this RTL.

**Not implemented, or different from the original:**

* **No binary-point parameters.** The original FFT, LogMagMux and accumulator
  have a binary-point (fractional bits) parameter as well as a width. Here all
  data are integers: 16-bit samples, 32-bit LogMagMux output and 39-bit sums.
  `LM_LOG2` is the only fractional format, Q5.8 zero-extended.
* **FFT variants.** The original FFT core can also be built as radix-4 or
  radix-2², and as DIT. Only the radix-2 DIF form used in the reference setup
  is provided.
* **Clock crossing order.** The receivers' samples cross into `dsp_clk` after
  word alignment, through one shared FIFO. The original's order of
  deserializer, clock crossing and aligner inside its pre-processing block may
  differ.
* **Scaler range.** The scaler accepts N = 0 (no scaling) as well as 1..15.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. To run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/radar_pkg.sv tb/tb_sdf_fft.sv \
          --top-module tb_sdf_fft
./obj_dir/Vtb_sdf_fft
```

The reference values are computed independently of the RTL:

* a floating-point DFT for the FFT and the DSP chain;
* a TMDS decoder for the encoder and the serializers;
* queue-based models for the streaming blocks.

Most testbenches shrink parameters such as the FFT size, plot width and raster
to keep runs short.

The two end-to-end tests use a behavioural LVDS radar model
(`tb/radar_lvds_model.sv`). It sends chirps with three targets, and each
receiver sees a different amplitude. `tb/hdmi_frame_checker.sv` decodes the
TMDS output back into pictures.

* **`tb_radar_demonstrator_top`** runs at reduced size: a 32-point FFT,
  24-column plots and a 30×70 raster. It takes about 10 s, and each mechanism
  must happen at least once:
  * an injected bit slip is corrected on all lanes;
  * the trigger fires;
  * ADC and FFT windows are plotted;
  * spectra are produced in both adder modes;
  * the data counter truncates;
  * complete frames are produced with all three traces and the grid;
  * the spectrum peak sits over the strongest target's bin;
  * no FIFO overflows.
* **`tb_full_system`** runs the top at its default parameters with the
  reference setup: 1024-point FFT, 128-chirp accumulation, four receivers and a
  full 1920×1080 raster. It decodes two complete frames and checks the traces
  and the spectrum peak column (bin 40 → columns 120..122). It also checks the
  number of lit label pixels against the expected texts. It takes about one
  minute.

`tb_timing_generator` also walks one full 1080p60 frame.

## Limits

* Only the digital path was simulated. There are no timing constraints and no
  FPGA build. At 148.5/742.5 MHz the TMDS encoder and the serializers may need
  pipelining on a given FPGA family.
* Control changes are not synchronized across clock domains. `cfg` is expected
  to be quasi-static.
* The ADC multiplexer, trigger and ADC plot use the samples as they come; there
  is no windowing or DC removal before the FFT.
