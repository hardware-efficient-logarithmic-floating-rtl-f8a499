// fplm_pkg: types and small functions shared by the logarithmic FP multipliers.
//
// fp_flags_t is the exception report every multiplier returns next to its
// product. mul_e indexes the five multipliers in fplm_top. carry_e_m1()
// is the four-gate carry-in of the FPLM-1 exponent adder: it folds the
// nearest-one exponent conversion (+1 per operand whose mantissa MSB is set)
// and the -1 renormalisation of a negative logarithm sum into one bit.
package fplm_pkg;

  // Exception report. 'zero' marks a zero result (zero operand or underflow).
  typedef struct packed {
    logic invalid;    // NaN operand, or Inf x 0
    logic overflow;   // exponent too large: result is signed Inf
    logic underflow;  // exponent too small: result flushed to signed zero
    logic zero;       // result is a signed zero
  } fp_flags_t;

  typedef enum logic [2:0] {
    MUL_FPLM1    = 3'd0,
    MUL_FPLM2    = 3'd1,
    MUL_FPLM1_R4 = 3'd2,
    MUL_FPLM2_R4 = 3'd3,
    MUL_CLM_R4   = 3'd4
  } mul_e;

  localparam int unsigned NUM_MUL = 5;

  // Carry_E of FPLM-1. ma_msb/mb_msb are M_A[q-1], M_B[q-1]; s is the sign
  // bit M'_P[q] of the logarithm sum.
  //   00 -> 0 (no conversion, sum never negative)
  //   11 -> 1 (+1 +1 for the conversions, -1 because the sum is negative)
  //   01/10 -> NOT s (+1 for one conversion, -1 if the sum is negative)
  function automatic logic carry_e_m1(logic ma_msb, logic mb_msb, logic s);
    return ~((s | ~(ma_msb | mb_msb)) & ~(ma_msb & mb_msb));
  endfunction

endpackage
