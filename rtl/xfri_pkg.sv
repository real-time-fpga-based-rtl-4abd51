// xfri_pkg: constants and types shared by the X-band FMCW radar baseband chain.
//
// The chain takes four receive channels of IF samples, runs an FFT along each
// frequency ramp (range), corner-turns the ramps of one observation frame,
// runs an FFT along the ramps (Doppler), a 4-point FFT across the channels
// (azimuth), and finishes with a cell-averaging CFAR detector. The sizes below
// (4 channels, 12-bit samples, 8192-point range FFT, 256 ramps) are those of
// the original design; the widths of the internal data paths and of the
// detection report are choices of this implementation.
package xfri_pkg;

  // Receive channels (one TX, four RX at the ADC).
  localparam int unsigned NCH        = 4;
  // ADC resolution and sample width after the 14 -> 12 bit reduction.
  localparam int unsigned ADC_W      = 14;
  localparam int unsigned SAMP_W     = 12;
  // FFT sizes: 8192-point range FFT, 256-point Doppler FFT, 4-point azimuth FFT.
  localparam int unsigned LOG2_NR    = 13;
  localparam int unsigned LOG2_ND    = 8;
  // Internal data-path width of the FFT lanes and twiddle width: one
  // 25 x 18 DSP multiplier per real product.
  localparam int unsigned DW         = 24;
  localparam int unsigned TW         = 18;
  // Gain, in bits, applied to the range-FFT result before it is rounded to
  // 12 bits for the transpose memory (the lanes scale by 1/8192; 2^6 is about
  // sqrt(8192), which keeps the noise floor above one LSB).
  localparam int unsigned RANGE_GAIN = 6;
  // Width of the CFAR threshold factor (unsigned, 4 fraction bits).
  localparam int unsigned ALPHA_W    = 12;

  // Stream of complex samples from four channels.
  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

endpackage
