// tb_fp_exp_exc: checks the sign/exponent/exception stage at single
// precision. Directed cases cover NaN operands, Inf*0, Inf*x, zero and
// subnormal operands, exponent overflow and underflow at their boundaries;
// random normal operands check E_A + E_B + carry - 127 and mantissa packing.
module tb_fp_exp_exc;
  import fplm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, p;
  logic        carry_e;
  logic [22:0] mant;
  fp_flags_t   flags;
  fp_exp_exc #(.W(8), .Q(23)) dut (.*);

  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  task automatic apply(logic [31:0] ta, logic [31:0] tb_, logic c, logic [22:0] m,
                       logic [31:0] exp_p, logic [3:0] exp_f, string what);
    a = ta;
    b = tb_;
    carry_e = c;
    mant = m;
    #1;
    checks++;
    if (p !== exp_p || flags !== exp_f) begin
      failures++;
      $display("FAIL %s: p=%h flags=%b expected p=%h flags=%b", what, p, flags, exp_p, exp_f);
    end
  endtask

  initial begin
    logic [7:0] ea, eb;
    int e;
    logic s;
    // flags order: invalid, overflow, underflow, zero
    apply(32'h7fc0_0001, 32'h3f80_0000, 0, 23'h1, QNAN, 4'b1000, "NaN*1");
    apply(32'h3f80_0000, 32'hffa0_0000, 0, 23'h1, QNAN, 4'b1000, "1*NaN");
    apply(32'h7f80_0000, 32'h0000_0000, 0, 23'h1, QNAN, 4'b1000, "Inf*0");
    apply(32'h8000_0000, 32'hff80_0000, 0, 23'h1, QNAN, 4'b1000, "-0*-Inf");
    apply(32'h7f80_0000, 32'hc000_0000, 0, 23'h1, 32'hff80_0000, 4'b0000, "Inf*-2");
    apply(32'h0000_0000, 32'hc000_0000, 0, 23'h1, 32'h8000_0000, 4'b0001, "0*-2");
    apply(32'h0040_0000, 32'h4000_0000, 1, 23'h1, 32'h0000_0000, 4'b0001, "subnormal*2");
    // 127+127+0-127 = 127 -> exponent 127
    apply(32'h3f80_0000, 32'h3f80_0000, 0, 23'h12345, 32'h3f81_2345, 4'b0000, "1*1");
    // 254 + 128 - 127 = 255 -> overflow; 254 + 127 - 127 = 254 -> ok
    apply(32'h7f00_0000, 32'h4000_0000, 0, 23'h0, 32'h7f80_0000, 4'b0100, "max*2 overflow");
    apply(32'h7f00_0000, 32'h3f80_0000, 0, 23'h7, 32'h7f00_0007, 4'b0000, "max*1");
    apply(32'hff00_0000, 32'h3f80_0000, 1, 23'h0, 32'hff80_0000, 4'b0100, "carry overflow");
    // 1 + 126 - 127 = 0 -> underflow; with carry -> 1
    apply(32'h0080_0000, 32'h3f00_0000, 0, 23'h5, 32'h0000_0000, 4'b0011, "underflow");
    apply(32'h0080_0000, 32'hbf00_0000, 1, 23'h5, 32'h8080_0005, 4'b0000, "carry avoids underflow");
    apply(32'h0080_0000, 32'h0080_0000, 1, 23'h5, 32'h0000_0000, 4'b0011, "deep underflow");
    for (int i = 0; i < 20000; i++) begin
      ea = 8'($urandom_range(1, 254));
      eb = 8'($urandom_range(1, 254));
      s = 1'($urandom);
      carry_e = 1'($urandom);
      e = int'(ea) + int'(eb) + int'(carry_e) - 127;
      mant = 23'($urandom);
      if (e >= 255)
        apply({s, ea, 23'($urandom)}, {1'b0, eb, 23'($urandom)}, carry_e, mant,
              {s, 8'hff, 23'h0}, 4'b0100, "random");
      else if (e <= 0)
        apply({s, ea, 23'($urandom)}, {1'b1, eb, 23'($urandom)}, carry_e, mant,
              {~s, 31'h0}, 4'b0011, "random");
      else
        apply({s, ea, 23'($urandom)}, {1'b1, eb, 23'($urandom)}, carry_e, mant,
              {~s, 8'(e), mant}, 4'b0000, "random");
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
