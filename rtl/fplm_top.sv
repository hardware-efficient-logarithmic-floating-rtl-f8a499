// fplm_top: the five proposed logarithmic FP multipliers side by side.
//
// FPLM-1, FPLM-2, FPLM-1-r4, FPLM-2-r4 and CLM-r4 all receive the same
// operands a and b; p[i] and flags[i] are the product and exception report
// of multiplier i, indexed by fplm_pkg::mul_e. The five designs are
// alternatives that trade accuracy for area and energy; putting them in one
// top so they can be compared on the same inputs is this design's own
// choice. Default format is IEEE single precision (W=8, Q=23); half
// precision (5,10), bfloat16 (8,7) and FP8 (5,2) are parameter settings.
// Purely combinational, no clock.
module fplm_top
  import fplm_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned Q = 23
) (
  input  logic [W+Q:0]  a,
  input  logic [W+Q:0]  b,
  output logic [W+Q:0]  p     [NUM_MUL],
  output fp_flags_t     flags [NUM_MUL]
);
  fplm1    #(.W(W), .Q(Q)) u_fplm1    (.a(a), .b(b), .p(p[MUL_FPLM1]),    .flags(flags[MUL_FPLM1]));
  fplm2    #(.W(W), .Q(Q)) u_fplm2    (.a(a), .b(b), .p(p[MUL_FPLM2]),    .flags(flags[MUL_FPLM2]));
  fplm1_r4 #(.W(W), .Q(Q)) u_fplm1_r4 (.a(a), .b(b), .p(p[MUL_FPLM1_R4]), .flags(flags[MUL_FPLM1_R4]));
  fplm2_r4 #(.W(W), .Q(Q)) u_fplm2_r4 (.a(a), .b(b), .p(p[MUL_FPLM2_R4]), .flags(flags[MUL_FPLM2_R4]));
  clm_r4   #(.W(W), .Q(Q)) u_clm_r4   (.a(a), .b(b), .p(p[MUL_CLM_R4]),   .flags(flags[MUL_CLM_R4]));
endmodule
