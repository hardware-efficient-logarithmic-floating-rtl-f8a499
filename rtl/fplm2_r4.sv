// fplm2_r4: FPLM-2-r4, FPLM-2 with the radix-4 logarithm.
//
// The method-2 logarithm from fp_le2 has a hidden integer bit that is always
// 0, so dropping its LSB leaves the Q-1 bits lg[Q-1:1]. A (Q-1)-bit adder
// with carry-out sums them; the carry-out takes the place of the integer bit
// and a 0 is appended to the sum, giving {C_out, sum, 0} for antilog2.
// C_out is the exponent carry, as in FPLM-2. This follows the document's
// radix-4 procedure; exception handling is this design's own.
//
// Interface: a, b, p are {sign, W-bit biased exponent, Q-bit mantissa};
// flags is the exception report. Purely combinational, no clock.
module fplm2_r4
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
  logic [Q-2:0] r4_sum;
  logic         cout;

  fp_le2 #(.Q(Q)) u_le_a (.m(a[Q-1:0]), .lg(lg_a));
  fp_le2 #(.Q(Q)) u_le_b (.m(b[Q-1:0]), .lg(lg_b));

  assign {cout, r4_sum} = {1'b0, lg_a[Q-1:1]} + {1'b0, lg_b[Q-1:1]};
  assign lg_sum         = {r4_sum, 1'b0};

  antilog2 #(.Q(Q)) u_antilog (.cout(cout), .sum(lg_sum), .mant(mant));

  fp_exp_exc #(.W(W), .Q(Q)) u_exp (
    .a(a), .b(b), .carry_e(cout), .mant(mant), .p(p), .flags(flags)
  );
endmodule
