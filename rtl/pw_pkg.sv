// pw_pkg: number formats and pipeline latencies shared by the peak-windowing
// PAPR reduction datapath.
//
// All signals are 18-bit fixed point, as in the reference design.
//   * I/Q samples: signed, 17 fractional bits (full scale +/-1.0 = +/-2**17).
//   * Envelope and threshold Th: unsigned, same scale as I/Q (Th = 0.7 means
//     0.7 * 2**17). Th normalised to the I/Q full scale is this design's choice.
//   * Gains c(n), cp(n), b(n) and window data 1-cp(n): unsigned, 17 fractional
//     bits, 1.0 = 2**17.
//   * FIR coefficients: signed, 16 fractional bits (1.0 = 2**16), so that the
//     Hann peak of 1.0 fits in an 18x18 multiplier.
// The per-stage latencies are counted in samples (pipeline enables are the
// sample strobe Xen); papr_reduction uses them to delay I/Q to meet cp(n).
package pw_pkg;
  localparam int unsigned DW        = 18;           // data / sample width
  localparam int unsigned FRAC      = 17;           // fractional bits of data and gains
  localparam int unsigned CW        = 18;           // coefficient width
  localparam int unsigned COEF_FRAC = 16;           // fractional bits of coefficients
  localparam logic [DW-1:0] ONE     = DW'(1) << FRAC; // gain 1.0

  typedef logic signed [DW-1:0] sample_t;
  typedef logic        [DW-1:0] gain_t;
  typedef logic signed [CW-1:0] coef_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // Coefficient bank selection of the shared load port.
  typedef enum logic [1:0] {
    SEL_PWFIR1 = 2'd0,
    SEL_PWFIR2 = 2'd1,
    SEL_LPF    = 2'd2
  } coef_sel_e;

  // Latencies in samples from "input sampled on Xen" to "result in the
  // output register" (number of registers on the path).
  localparam int unsigned ENV_LAT  = 1 + DW;     // squarer stage + one stage per root bit
  localparam int unsigned CLIP_LAT = FRAC;       // one stage per quotient bit
  localparam int unsigned PEAK_LAT = 5;          // 4 window registers + output register
  localparam int unsigned PRE_LAT  = ENV_LAT + CLIP_LAT + PEAK_LAT;
endpackage
