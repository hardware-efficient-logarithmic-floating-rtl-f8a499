// fplm2: FPLM-2, logarithmic FP multiplier with approximation method 2.
//
// The FP-LEs (fp_le2) give log2(1+x) ~ x for x < 0.5 and (1+x)/2 for
// x >= 0.5 without converting the operand. A Q-bit adder with carry-out sums
// the two Q-bit logarithms; {C_out, sum} in [0,2) goes to antilog2, whose
// four-region anti-logarithm subtracts 0.25 or 0.125 from the normalised
// mantissa in the top two regions so that large sums are underestimated and
// errors tend to cancel. C_out is the exponent carry Carry_E. fp_exp_exc adds
// the exponents, removes the bias, handles exceptions and packs the result.
// The datapath follows the document; exception handling is this design's own.
//
// Interface: a, b, p are {sign, W-bit biased exponent, Q-bit mantissa};
// flags is the exception report. Purely combinational, no clock.
module fplm2
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
  logic [Q-1:0] lg_a, lg_b, lg_sum, mant;
  logic         cout;

  fp_le2 #(.Q(Q)) u_le_a (.m(a[Q-1:0]), .lg(lg_a));
  fp_le2 #(.Q(Q)) u_le_b (.m(b[Q-1:0]), .lg(lg_b));

  assign {cout, lg_sum} = {1'b0, lg_a} + {1'b0, lg_b};

  antilog2 #(.Q(Q)) u_antilog (.cout(cout), .sum(lg_sum), .mant(mant));

  fp_exp_exc #(.W(W), .Q(Q)) u_exp (
    .a(a), .b(b), .carry_e(cout), .mant(mant), .p(p), .flags(flags)
  );
endmodule
