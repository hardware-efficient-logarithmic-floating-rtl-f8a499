// clm_r4: CLM-r4, the conventional (Mitchell) logarithmic FP multiplier with
// the radix-4 logarithm.
//
// Mitchell's method takes log2(1+x) ~ x, so the mantissa is its own
// logarithm. The LSB of each mantissa is dropped (radix 4), a (Q-1)-bit
// adder with carry-out sums the rest and a 0 is appended. The anti-logarithm
// 2^l ~ 1 + l needs no logic: for l < 1 the mantissa is the sum, and for
// l in [1,2) it is 2l, which after normalisation is again the sum bits with
// the exponent raised by the carry-out. So the product mantissa is
// {sum, 0} and Carry_E = C_out. The product is never overestimated. The
// radix-4 step follows the document; the conventional multiplier is built
// from Mitchell's equations; exception handling is this design's own.
//
// Interface: a, b, p are {sign, W-bit biased exponent, Q-bit mantissa};
// flags is the exception report. Purely combinational, no clock.
module clm_r4
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
  logic [Q-2:0] r4_sum;
  logic [Q-1:0] mant;
  logic         cout;

  assign {cout, r4_sum} = {1'b0, a[Q-1:1]} + {1'b0, b[Q-1:1]};
  assign mant           = {r4_sum, 1'b0};

  fp_exp_exc #(.W(W), .Q(Q)) u_exp (
    .a(a), .b(b), .carry_e(cout), .mant(mant), .p(p), .flags(flags)
  );
endmodule
