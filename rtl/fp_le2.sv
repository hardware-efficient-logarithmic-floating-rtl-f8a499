// fp_le2: floating-point logarithm estimator, approximation method 2 (FPLM-2).
//
// Approximates log2(1+x) without converting the operand:
//   x <  0.5 : log = x        -> 0.M[q-1]..M[0]
//   x >= 0.5 : log = (1+x)/2  -> 0.1M[q-1]..M[1]
// Both results have integer bit 0, so only the Q fraction bits are output;
// M[0] is dropped in the upper case. One 2:1 multiplexer selected by M[q-1],
// as in the document. Combinational.
module fp_le2 #(
  parameter int unsigned Q = 23
) (
  input  logic [Q-1:0] m,
  output logic [Q-1:0] lg
);
  always_comb begin
    if (m[Q-1]) lg = {1'b1, m[Q-1:1]};
    else        lg = m;
  end
endmodule
