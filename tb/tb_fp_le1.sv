// tb_fp_le1: checks the method-1 logarithm estimator exhaustively at Q=10
// and on random mantissas at Q=23 against log = x or (1+x)/2 - 1 computed
// with integer arithmetic, and checks the output range [-0.25, 0.5).
module tb_fp_le1;
  import fplm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [9:0]  m10;
  logic [10:0] lg10;
  logic [22:0] m23;
  logic [23:0] lg23;
  fp_le1 #(.Q(10)) dut10 (.m(m10), .lg(lg10));
  fp_le1 #(.Q(23)) dut23 (.m(m23), .lg(lg23));

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
      check(longint'($signed(lg10)), log1(i, 10), $sformatf("Q=10 m=%0d", i));
      checks++;
      if ($signed(lg10) < -256 || $signed(lg10) >= 512) failures++;
    end
    for (int i = 0; i < 20000; i++) begin
      m23 = 23'($urandom);
      #1;
      check(longint'($signed(lg23)), log1(longint'(m23), 23), $sformatf("Q=23 m=%0h", m23));
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
