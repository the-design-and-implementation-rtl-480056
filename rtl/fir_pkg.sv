// fir_pkg: sizes and coefficients shared by the blocks of the 16-tap
// distributed-arithmetic (DA) low-pass FIR filter.
//
// The filter is a linear-phase 16-tap low-pass design for a 10 MHz sample
// rate and a 1 MHz cut-off, with 8-bit two's-complement samples and 8-bit
// quantised coefficients. Because the impulse response is symmetric,
// h(k) = h(15-k), only eight distinct coefficients exist:
//   h(0..7) = 0, -1, -2, 4, 21, 49, 80, 100
// The first four are zero or a signed power of two and are applied by
// shifting and sign inversion; the last four ("general" coefficients) are
// applied by a 4-bits-at-a-time DA look-up table.
//
// Widths derived here (all two's complement):
//   pre-added sample   DATA_W+1 = 9 bits   (sum of two 8-bit samples)
//   LUT word           COEF_W+2 = 10 bits  (sum of up to four coefficients)
//   output y(n)        OUT_W    = 18 bits  (128 * sum|h| = 65792 < 2^17)
package fir_pkg;

  parameter int unsigned TAPS     = 16;           // filter length (order 16 design)
  parameter int unsigned DATA_W   = 8;            // input sample width
  parameter int unsigned COEF_W   = 8;            // quantised coefficient width
  parameter int unsigned HALF     = TAPS / 2;     // distinct coefficients
  parameter int unsigned N_SIMPLE = 4;            // h(0..3): shift / sign inversion
  parameter int unsigned N_GEN    = HALF - N_SIMPLE; // h(4..7): DA look-up
  parameter int unsigned SUM_W    = DATA_W + 1;   // pre-added sample width
  parameter int unsigned BAAT     = 4;            // bits looked up per clock
  parameter int unsigned MAG_W    = SUM_W - 1;    // non-sign bits of a pre-added sample
  parameter int unsigned PASSES   = MAG_W / BAAT; // LUT passes per sample
  parameter int unsigned LUT_W    = COEF_W + 2;   // LUT word width
  parameter int unsigned PROD_W   = SUM_W + 3;    // simple-tap product width (shift up to 2)
  parameter int unsigned ACC_W    = 18;           // DA sum width
  parameter int unsigned OUT_W    = 18;           // filter output width

  // Quantised coefficients h(0..7); h(15-k) = h(k).
  parameter int COEF_SIMPLE [N_SIMPLE] = '{0, -1, -2, 4};
  parameter int COEF_GEN    [N_GEN]    = '{21, 49, 80, 100};

endpackage
