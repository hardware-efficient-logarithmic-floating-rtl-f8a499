// tb_clm_r4: checks CLM-r4 at single precision (W=8, Q=23) and at FP8
// (W=5, Q=2).
// Hand-worked products of exact binary values are checked first, then random
// operands (including zeros, subnormals, Inf, NaN and exponents near
// overflow/underflow) are compared bit for bit with an arithmetic reference
// model, and the relative error of every normal result against the real
// product must stay below 0.12. FP8 is checked exhaustively.
module tb_clm_r4;
  import fplm_pkg::*;
  import fplm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, p;
  fp_flags_t   flags;
  logic [7:0]  a8, b8, p8;
  fp_flags_t   flags8;
  clm_r4 #(.W(8), .Q(23)) dut   (.a(a),  .b(b),  .p(p),  .flags(flags));
  clm_r4 #(.W(5), .Q(2))  dut8  (.a(a8), .b(b8), .p(p8), .flags(flags8));

  task automatic hand(logic [31:0] ta, logic [31:0] tb_, logic [31:0] exp_p);
    a = ta;
    b = tb_;
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      $display("FAIL hand %h * %h: got %h expected %h", ta, tb_, p, exp_p);
    end
  endtask

  function automatic logic [31:0] rand_op();
    logic [7:0] e;
    int r = $urandom_range(0, 99);
    if (r < 2) e = 8'h00;
    else if (r < 4) e = 8'hff;
    else if (r < 10) e = 8'($urandom_range(1, 20));
    else if (r < 16) e = 8'($urandom_range(235, 254));
    else e = 8'($urandom_range(64, 190));
    return {1'($urandom), e, (r == 2 || r == 3) && (($urandom & 1) == 1) ? 23'h0 : 23'($urandom)};
  endfunction

  initial begin
    logic [3:0] ef;
    longint ep;
    real rel, exact;
    hand(32'h3fc0_0000, 32'h3fc0_0000, 32'h4000_0000);  // 1.5 * 1.5 = 2.0 (l=1)
    hand(32'h3fa0_0000, 32'h3fa0_0000, 32'h3fc0_0000);  // 1.25 * 1.25 = 1.5
    hand(32'h3fe0_0000, 32'h3fe0_0000, 32'h4040_0000);  // 1.75 * 1.75 = 3.0
    hand(32'hc040_0000, 32'h3f00_0000, 32'hbfc0_0000);  // -3 * 0.5 = -1.5
    hand(32'h3f80_0001, 32'h3f80_0001, 32'h3f80_0000);  // LSBs dropped: 1.0
    for (int i = 0; i < 50000; i++) begin
      a = rand_op();
      b = rand_op();
      #1;
      ep = fp_mul(K_CLM_R4, 8, 23, longint'(a), longint'(b), ef);
      checks++;
      if (longint'(p) != ep || flags !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL %h * %h: got %h/%b expected %h/%b", a, b, p, flags, ep, ef);
      end
      if (flags == '0 && p[30:23] != 8'hff) begin
        exact = to_real(8, 23, longint'(a)) * to_real(8, 23, longint'(b));
        rel = (exact - to_real(8, 23, longint'(p))) / exact;
        if (rel < 0) rel = -rel;
        checks++;
        if (rel > 0.12) begin
          failures++;
          $display("FAIL error %h * %h: relative error %f", a, b, rel);
        end
      end
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      ep = fp_mul(K_CLM_R4, 5, 2, longint'(a8), longint'(b8), ef);
      checks++;
      if (longint'(p8) != ep || flags8 !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL FP8 %h * %h: got %h expected %h", a8, b8, p8, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
