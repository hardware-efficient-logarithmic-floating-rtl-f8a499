// tb_antilog2: checks the method-2 four-region anti-logarithm.
// All {cout, sum} values are applied at Q=2 (FP8) and Q=8, and random values
// at Q=23. The expected mantissa is computed arithmetically, floored to Q
// bits: l < 1 -> l; [1,1.5) -> l - 1; [1.5,1.75) -> l - 1.25;
// [1.75,2) -> l - 1.125 (fraction of the normalised value). Each region is
// counted and must be hit.
module tb_antilog2;
  int checks = 0, failures = 0;
  int region_hits[4] = '{default: 0};
  logic clk = 0;
  always #5 clk = ~clk;

  logic        c2, c8, c23;
  logic [1:0]  s2, m2;
  logic [7:0]  s8, m8;
  logic [22:0] s23, m23;
  antilog2 #(.Q(2))  dut2  (.cout(c2),  .sum(s2),  .mant(m2));
  antilog2 #(.Q(8))  dut8  (.cout(c8),  .sum(s8),  .mant(m8));
  antilog2 #(.Q(23)) dut23 (.cout(c23), .sum(s23), .mant(m23));

  function automatic longint expect_mant(longint l, int q, output int region);
    longint one = longint'(1) << q;
    if (l < one) begin
      region = 0;
      return l;
    end
    if (2 * l < 3 * one) begin
      region = 1;
      return l - one;
    end
    if (4 * l < 7 * one) begin
      region = 2;
      return (4 * (l - one) - one) / 4;
    end
    region = 3;
    return (8 * (l - one) - one) / 8;
  endfunction

  task automatic check(longint got, longint l, int q);
    int r;
    longint exp = expect_mant(l, q, r);
    checks++;
    region_hits[r]++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL Q=%0d l=%0d: got %0d expected %0d", q, l, got, exp);
    end
  endtask

  initial begin
    longint l;
    for (int i = 0; i < 8; i++) begin
      {c2, s2} = 3'(i);
      #1;
      check(longint'(m2), i, 2);
    end
    for (int i = 0; i < 512; i++) begin
      {c8, s8} = 9'(i);
      #1;
      check(longint'(m8), i, 8);
    end
    for (int i = 0; i < 20000; i++) begin
      l = longint'($urandom_range(0, (1 << 24) - 1));
      {c23, s23} = 24'(l);
      #1;
      check(longint'(m23), l, 23);
    end
    foreach (region_hits[r]) begin
      checks++;
      if (region_hits[r] == 0) begin
        failures++;
        $display("FAIL region %0d never exercised", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
