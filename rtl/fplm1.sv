// fplm1: FPLM-1, logarithmic FP multiplier with approximation method 1.
//
// Each operand's mantissa goes through an FP-LE (fp_le1), which picks the
// nearest power of two (by M[q-1]) and returns the approximate logarithm as a
// (Q+1)-bit two's complement number. A (Q+1)-bit adder sums the two
// logarithms; antilog1 turns the sum into the product mantissa, doubling it
// when the sum is negative. The exponent conversion (+1 per operand rounded
// up to the next power of two) and the -1 for the doubling are merged into
// the carry-in Carry_E of one exponent adder (fplm_pkg::carry_e_m1), and
// fp_exp_exc adds the exponents, removes the bias, handles exceptions and
// packs the result. The error is double-sided: products can be over- or
// underestimated. All of this follows the document; exception handling is
// this design's own (see fp_exp_exc).
//
// Interface: a, b, p are {sign, W-bit biased exponent, Q-bit mantissa};
// flags is the exception report. Purely combinational, no clock.
module fplm1
  import fplm_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned Q = 23
) (
  input  logic [W+Q:0] a,
  input  logic [W+Q:0] b,
  output logic [W+Q:0] p,
  output fp_flags_t    flags
);
  logic [Q:0]   lg_a, lg_b, lg_sum;
  logic [Q-1:0] mant;
  logic         carry_e;

  fp_le1 #(.Q(Q)) u_le_a (.m(a[Q-1:0]), .lg(lg_a));
  fp_le1 #(.Q(Q)) u_le_b (.m(b[Q-1:0]), .lg(lg_b));

  assign lg_sum  = lg_a + lg_b;
  assign carry_e = carry_e_m1(a[Q-1], b[Q-1], lg_sum[Q]);

  antilog1 #(.Q(Q)) u_antilog (.sum(lg_sum), .mant(mant));

  fp_exp_exc #(.W(W), .Q(Q)) u_exp (
    .a(a), .b(b), .carry_e(carry_e), .mant(mant), .p(p), .flags(flags)
  );
endmodule
