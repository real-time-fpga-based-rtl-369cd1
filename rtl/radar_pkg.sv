// Shared types and constants of the range radar demonstrator.
//
// The demonstrator turns the LVDS ADC stream of an FMCW radar front end into a
// live HDMI picture: raw complex ADC samples in the upper plot, the range
// spectrum (FFT magnitude, accumulated over chirps and summed over receivers)
// in the lower plot. This package holds the sample types passed between the
// blocks and the control-register structures that configure them at run time.
//
// Origin: the register fields mirror the run-time settings of the original
// demonstrator; their encodings and widths are this design's.
package radar_pkg;

  // One complex ADC sample: 16-bit signed real and imaginary parts.
  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx16_t;

  // ADC sample width on the LVDS lanes.
  typedef enum logic [1:0] {
    ADC_W12 = 2'd0,
    ADC_W14 = 2'd1,
    ADC_W16 = 2'd2
  } adc_width_t;

  // Word alignment control register.
  typedef struct packed {
    adc_width_t width;     // bits per ADC word on the lane
    logic       is_complex; // 1: real word then imaginary word; 0: real only
    logic       lsb_first;  // bit order of each word on the lane
  } align_cfg_t;

  // LogMagMux output selection.
  typedef enum logic [1:0] {
    LM_MAG_JPL = 2'd0,   // magnitude, JPL approximation
    LM_MAG_SQ  = 2'd1,   // squared magnitude
    LM_LOG2    = 2'd2,   // log2 of the magnitude, unsigned Q5.8
    LM_MAG     = 2'd3    // exact magnitude (integer square root)
  } logmag_sel_t;

  // Settings of one scaling path (ADC or FFT).
  typedef struct packed {
    logic [3:0] shift;      // N of 2^N
    logic       multiply;   // 1: multiply by 2^N, 0: divide by 2^N
    logic [4:0] interp;     // interpolation factor, 1..16
    logic [4:0] decim;      // decimation factor, 1..16
  } scale_cfg_t;

  // All control registers of the demonstrator.
  typedef struct packed {
    align_cfg_t  align;
    logic [3:0]  fft_log2n;     // run-time FFT size, 2^fft_log2n
    logmag_sel_t logmag_sel;
    logic [7:0]  acc_frames;    // FFT windows to accumulate, 1..128
    logic        nca_add_all;   // non-coherent adder: 1 add all, 0 pass one
    logic [1:0]  nca_sel;       // non-coherent adder: passed receiver
    logic [1:0]  adc_mux_sel;   // receiver shown in the ADC plot
    logic signed [15:0] trig_level;
    logic        trig_falling;  // 0 rising edge, 1 falling edge
    scale_cfg_t  adc_scale;
    scale_cfg_t  fft_scale;
  } demo_cfg_t;

  // 1080p60 display timing (CEA-861), pixel clock 148.5 MHz.
  localparam int H_ACTIVE = 1920;
  localparam int H_FP     = 88;
  localparam int H_SYNC   = 44;
  localparam int H_BP     = 148;
  localparam int V_ACTIVE = 1080;
  localparam int V_FP     = 4;
  localparam int V_SYNC   = 5;
  localparam int V_BP     = 36;

endpackage
