// antilog1: anti-logarithm and value adjustment of approximation method 1.
//
// Input is the (Q+1)-bit two's complement sum of two method-1 logarithms,
// l = X_A + X_B in [-0.5, 1). Mitchell's anti-logarithm 2^l ~ 1 + l is used:
//   l >= 0 (sum[Q]=0): mantissa 1.sum[Q-1:0]          -> M_P = sum[Q-1:0]
//   l <  0 (sum[Q]=1): 1+l = 0.1sum[Q-2:0] in [0.5,1), doubled to
//                      1.sum[Q-2:0]0                  -> M_P = {sum[Q-2:0],0}
// so one multiplexer selected by sum[Q] does both steps, as in the document.
// The exponent decrement for the doubling is in the exponent adder's carry.
// Requires Q >= 2. Combinational.
module antilog1 #(
  parameter int unsigned Q = 23
) (
  input  logic [Q:0]   sum,
  output logic [Q-1:0] mant
);
  if (Q < 2) begin : g_q_check
    $error("antilog1 needs Q >= 2");
  end

  always_comb begin
    if (sum[Q]) mant = {sum[Q-2:0], 1'b0};
    else        mant = sum[Q-1:0];
  end
endmodule
