// tb_antilog1: checks the method-1 anti-logarithm/adjustment block.
// Every legal sum l in [-0.5, 1) is applied at Q=8, and random legal sums at
// Q=23. Expected mantissa: l >= 0 -> fraction of 1 + l; l < 0 -> fraction
// of 2(1 + l), computed with integer arithmetic.
module tb_antilog1;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [8:0]  s8;
  logic [7:0]  m8;
  logic [23:0] s23;
  logic [22:0] m23;
  antilog1 #(.Q(8))  dut8  (.sum(s8),  .mant(m8));
  antilog1 #(.Q(23)) dut23 (.sum(s23), .mant(m23));

  function automatic longint expect_mant(longint l, int q);
    longint one = longint'(1) << q;
    return (l >= 0) ? l : 2 * (one + l) - one;
  endfunction

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint l;
    int neg = 0;
    for (int i = -128; i < 256; i++) begin
      s8 = 9'(i);
      #1;
      check(longint'(m8), expect_mant(i, 8), $sformatf("Q=8 l=%0d", i));
      if (i < 0) neg++;
    end
    for (int i = 0; i < 20000; i++) begin
      l = longint'($urandom_range(0, 3 * (1 << 22) - 1)) - (1 << 22);
      s23 = 24'(l);
      #1;
      check(longint'(m23), expect_mant(l, 23), $sformatf("Q=23 l=%0d", l));
    end
    checks++;
    if (neg != 128) failures++;
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
