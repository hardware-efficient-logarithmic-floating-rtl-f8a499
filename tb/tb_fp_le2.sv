// tb_fp_le2: checks the method-2 logarithm estimator exhaustively at Q=10
// and on random mantissas at Q=23 against log = x or (1+x)/2 computed
// with integer arithmetic, and checks that x >= 0.5 maps into [0.75, 1).
module tb_fp_le2;
  import fplm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [9:0]  m10;
  logic [9:0]  lg10;
  logic [22:0] m23;
  logic [22:0] lg23;
  fp_le2 #(.Q(10)) dut10 (.m(m10), .lg(lg10));
  fp_le2 #(.Q(23)) dut23 (.m(m23), .lg(lg23));

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      m10 = 10'(i);
      #1;
      check(longint'(lg10), log2m(i, 10), $sformatf("Q=10 m=%0d", i));
      checks++;
      if (i >= 512 && lg10 < 10'd512) failures++;
    end
    for (int i = 0; i < 20000; i++) begin
      m23 = 23'($urandom);
      #1;
      check(longint'(lg23), log2m(longint'(m23), 23), $sformatf("Q=23 m=%0h", m23));
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
