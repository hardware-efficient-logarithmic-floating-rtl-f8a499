// fplm1_r4: FPLM-1-r4, FPLM-1 with the radix-4 logarithm.
//
// Since log2 N = 2 log4 N, the mantissa logarithm can be carried one bit
// narrower: the LSB of each (Q+1)-bit method-1 logarithm from fp_le1 is
// dropped, a Q-bit adder sums the remaining bits, and a 0 is appended to
// the sum before the anti-logarithm. Everything after the adder (antilog1,
// Carry_E from the sum's sign bit, fp_exp_exc) is as in FPLM-1. The
// exponent is not converted to radix 4. This follows the document's
// radix-4 procedure; exception handling is this design's own.
//
// Interface: a, b, p are {sign, W-bit biased exponent, Q-bit mantissa};
// flags is the exception report. Purely combinational, no clock.
module fplm1_r4
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
  logic [Q-1:0] r4_sum, mant;
  logic         carry_e;

  fp_le1 #(.Q(Q)) u_le_a (.m(a[Q-1:0]), .lg(lg_a));
  fp_le1 #(.Q(Q)) u_le_b (.m(b[Q-1:0]), .lg(lg_b));

  assign r4_sum  = lg_a[Q:1] + lg_b[Q:1];  // Q-bit adder on radix-4 logs
  assign lg_sum  = {r4_sum, 1'b0};         // back to radix 2
  assign carry_e = carry_e_m1(a[Q-1], b[Q-1], lg_sum[Q]);

  antilog1 #(.Q(Q)) u_antilog (.sum(lg_sum), .mant(mant));

  fp_exp_exc #(.W(W), .Q(Q)) u_exp (
    .a(a), .b(b), .carry_e(carry_e), .mant(mant), .p(p), .flags(flags)
  );
endmodule
