// ecg_pkg: shared widths, types and constants of the wavelet ECG detector.
//
// The detector works on 8-bit two's-complement samples (the ADC is 8 bits
// wide and the datapath uses 8-bit comparators and an 8x8 multiplier). The
// multi-scaled product is reduced to an unsigned 8-bit value before it meets
// the 8-bit threshold. The zero-crossing counter is 8 bits, the noise interval
// counter 32 bits and the detection hold is 200 samples, as in the synthesis
// summary and the soft-threshold diagram of the design. The wavelet filter
// taps are this implementation's choice (quadratic spline wavelet).
package ecg_pkg;

  localparam int unsigned SAMPLE_W     = 8;   // ADC / wavelet sample width
  localparam int unsigned MP_W         = 8;   // multi-scaled product width after saturation
  localparam int unsigned ZC_CNT_W     = 8;   // zero-crossing counter width
  localparam int unsigned INTERVAL_W   = 32;  // noise-interval (reset) counter width
  localparam int unsigned HOLD_SAMPLES = 200; // detection hold, in input samples
  localparam int unsigned LEVELS       = 4;   // wavelet scales WF1..WF4

  typedef logic signed [SAMPLE_W-1:0] sample_t;  // signed ECG sample / wavelet coefficient
  typedef logic        [MP_W-1:0]     mp_t;      // unsigned multi-scaled product

  // Which pair of scales the hypothesis test multiplies.
  typedef enum logic {
    MODE_CLEAN = 1'b0,  // ND = 0: WF2 x WF2
    MODE_NOISY = 1'b1   // ND = 1: WF3 x WF4
  } msp_mode_e;

endpackage
