// fp_le1: floating-point logarithm estimator, approximation method 1 (FPLM-1).
//
// Maps the explicit mantissa M (value x, 0 <= x < 1) to its nearest power of
// two and returns the approximate base-2 logarithm of the converted mantissa:
//   x <  0.5 : log = x             -> 0.M[q-1]..M[0]
//   x >= 0.5 : log = (1+x)/2 - 1   -> 1.1M[q-1]..M[1]   (two's complement)
// The output is Q+1 bits, two's complement, Q fraction bits, range
// [-0.25, 0.5). The choice is made by M[q-1] with one 2:1 multiplexer; the
// halving is wiring and M[0] is dropped in the upper case, as in the
// document. The matching exponent increment is applied in the exponent
// adder of the multiplier (see fplm_pkg::carry_e_m1). Combinational.
module fp_le1 #(
  parameter int unsigned Q = 23
) (
  input  logic [Q-1:0] m,
  output logic [Q:0]   lg
);
  always_comb begin
    if (m[Q-1]) lg = {2'b11, m[Q-1:1]};
    else        lg = {1'b0, m};
  end
endmodule
