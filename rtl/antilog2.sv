// antilog2: anti-logarithm and value adjustment of approximation method 2.
//
// Input is l = {cout, sum} in [0, 2), the sum of two method-2 logarithms.
// The anti-logarithm is 1+l for l < 1 and 2l - {0, 0.5, 0.25} on
// [1,1.5), [1.5,1.75), [1.75,2); after normalising to [1,2) the product
// mantissa is
//   cout=0            : 1.sum                       (1 + l)
//   cout,sum[Q-1]=10  : 1.sum                       (l)
//   cout,top2 = 1,10  : 1.01 sum[Q-3:0]             (l - 0.25)
//   cout,top2 = 1,11  : 1.101 sum[Q-4:0] if sum[Q-3]=0
//                       1.110 sum[Q-4:0] if sum[Q-3]=1 (l - 0.125)
// Only the top three mantissa bits depend on the region: they come from
// multiplexers selected by cout&sum[Q-1] (bits Q-1, Q-2) and
// cout&sum[Q-1]&sum[Q-2] (bit Q-3); the lower bits pass straight through,
// following the document. The exponent carry is cout.
// For Q < 3 (FP8 has Q = 2) the sum is padded with zero fraction bits to
// three bits and the result truncated back: this design's own choice.
// Combinational.
module antilog2 #(
  parameter int unsigned Q = 23
) (
  input  logic         cout,
  input  logic [Q-1:0] sum,
  output logic [Q-1:0] mant
);
  localparam int unsigned QE = (Q < 3) ? 3 : Q;

  logic [QE-1:0] s_ext, m_ext;
  logic          sel_hi, sel_mid;

  always_comb begin
    s_ext   = QE'(sum) << (QE - Q);
    sel_hi  = cout & s_ext[QE-1];
    sel_mid = sel_hi & s_ext[QE-2];
    m_ext   = s_ext;
    if (sel_hi) begin
      // l >= 1.5: top bits become 01 (l-0.25) or 1,sum[q-3] (l-0.125)
      m_ext[QE-1] = s_ext[QE-2];
      m_ext[QE-2] = s_ext[QE-2] ? s_ext[QE-3] : 1'b1;
    end
    if (sel_mid) m_ext[QE-3] = ~s_ext[QE-3];
    mant = m_ext[QE-1 -: Q];
  end
endmodule
