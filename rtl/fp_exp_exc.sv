// fp_exp_exc: sign, exponent and exception stage shared by the five
// logarithmic FP multipliers.
//
// The sign is S_A xor S_B. The product exponent is formed by a single adder
// E_A + E_B + carry_e - bias, where carry_e is the multiplier-specific carry
// (nearest-one conversion and renormalisation folded into one bit, as in the
// document). The adder is W+2 bits wide and signed so that overflow
// (exponent >= 2^W - 1) and underflow (exponent <= 0) can be seen.
//
// Exception handling is this design's own choice; the document only says
// that inputs are checked first and that overflow, underflow and NaN are
// reported:
//   - an operand with exponent 0 (zero or subnormal) is treated as zero;
//   - a NaN operand, or Inf times zero, gives the quiet NaN and 'invalid';
//   - Inf times a finite non-zero number gives signed Inf;
//   - a zero operand gives signed zero;
//   - exponent overflow gives signed Inf and 'overflow';
//   - exponent underflow gives signed zero, 'underflow' and 'zero'.
// No rounding is done: the mantissa from the anti-logarithm block is used
// as it is. Combinational.
module fp_exp_exc
  import fplm_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned Q = 23
) (
  input  logic [W+Q:0] a,
  input  logic [W+Q:0] b,
  input  logic         carry_e,
  input  logic [Q-1:0] mant,
  output logic [W+Q:0] p,
  output fp_flags_t    flags
);
  if (W < 2 || Q < 1) begin : g_size_check
    $error("fp_exp_exc needs W >= 2 and Q >= 1");
  end

  localparam logic [W-1:0] EMAX = '1;
  localparam int           BIAS = (1 << (W - 1)) - 1;

  logic          sa, sb, sp;
  logic [W-1:0]  ea, eb;
  logic [Q-1:0]  ma, mb;
  logic          a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic signed [W+1:0] e_p;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sp     = sa ^ sb;
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == EMAX) && (ma == '0);
    b_inf  = (eb == EMAX) && (mb == '0);
    a_nan  = (ea == EMAX) && (ma != '0);
    b_nan  = (eb == EMAX) && (mb != '0);

    e_p = $signed({2'b00, ea}) + $signed({2'b00, eb}) + $signed({{(W+1){1'b0}}, carry_e})
          - (W+2)'(BIAS);

    flags = '0;
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      flags.invalid = 1'b1;
      p = {1'b0, EMAX, 1'b1, {(Q-1){1'b0}}};
    end else if (a_inf || b_inf) begin
      p = {sp, EMAX, {Q{1'b0}}};
    end else if (a_zero || b_zero) begin
      flags.zero = 1'b1;
      p = {sp, {(W+Q){1'b0}}};
    end else if (e_p >= $signed({2'b00, EMAX})) begin
      flags.overflow = 1'b1;
      p = {sp, EMAX, {Q{1'b0}}};
    end else if (e_p <= 0) begin
      flags.underflow = 1'b1;
      flags.zero      = 1'b1;
      p = {sp, {(W+Q){1'b0}}};
    end else begin
      p = {sp, e_p[W-1:0], mant};
    end
  end
endmodule
