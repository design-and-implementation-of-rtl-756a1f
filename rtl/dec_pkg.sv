// Shared types and constants of the hearing-aid decimation filter.
//
// The chain turns 6-bit samples at 1.28 MHz into 13-bit samples at 4 kHz in
// three stages: a 5-stage CIC decimating by 16 (11-bit output at 80 kHz), a
// half-band FIR decimating by 2 (12-bit output at 40 kHz) and a corrector FIR
// decimating by 10 (13-bit output at 4 kHz). Rates, stage count and word
// widths follow the design's block diagram. The FIR coefficients below are
// this design's own choice: small integers with at most two non-zero signed
// digits each, so that every tap is a canonic-signed-digit constant.
package dec_pkg;

  // Which distributed-arithmetic engine computes a FIR output.
  typedef enum logic {
    ARCH_OBC = 1'b0,   // offset-binary-coded DA, 2^(K-1)-word table (default)
    ARCH_BDA = 1'b1    // binary DA with add/subtract unit, 2^K-word table
  } da_arch_e;

  // Input and stage word widths.
  localparam int IN_SAMPLE_W  = 6;
  localparam int CIC_W  = 11;
  localparam int HB_W   = 12;
  localparam int OUT_SAMPLE_W  = 13;

  // Decimation factors: 1.28 MHz / 16 = 80 kHz, / 2 = 40 kHz, / 10 = 4 kHz.
  localparam int CIC_STAGES = 5;
  localparam int CIC_R      = 16;
  localparam int HB_DECIM   = 2;
  localparam int COR_DECIM  = 10;

  // Half-band filter, 7 taps, DC gain 32: (-1 0 9 16 9 0 -1)/32.
  // Every other tap but the centre one is zero, as in any half-band filter.
  localparam int HB_TAPS  = 7;
  localparam int HB_SHIFT = 5;
  localparam int HB_COEF [HB_TAPS] = '{-1, 0, 9, 16, 9, 0, -1};

  // Corrector filter, 8 taps, DC gain 32: (1 2 5 8 8 5 2 1)/32.
  localparam int COR_TAPS  = 8;
  localparam int COR_SHIFT = 5;
  localparam int COR_COEF [COR_TAPS] = '{1, 2, 5, 8, 8, 5, 2, 1};

endpackage
