// tb_fplm_top: end-to-end test of the five multipliers at the default
// single-precision parameters (W=8, Q=23).
//
// Phase 1: random operands with every kind of exponent (zero, subnormal,
// Inf, NaN, near overflow and underflow, normal) are applied to all five
// multipliers at once; each product and flag set is compared bit for bit
// with the arithmetic reference model. Each mechanism of the design is
// counted and must occur: FPLM-1 negative logarithm sum (doubling and
// exponent -1), all four FPLM-2 anti-logarithm regions, the CLM-r4 carry,
// the radix-4 LSB drop changing a result, NaN/invalid, Inf, zero operand,
// overflow and underflow.
//
// Phase 2: accuracy. 20000 operand pairs uniform in [1, 2) and 20000 from
// the standard normal distribution (truncated to single precision) give the
// mean relative error distance (MRED) and average error (AE, exact minus
// approximate) of each multiplier. They must match the single-precision
// figures published for this design: MRED 0.0288, 0.0368, 0.0288, 0.0368,
// 0.0384 (uniform) and 0.0288, 0.0373, 0.0288, 0.0373, 0.0381 (normal) for
// FPLM-1, FPLM-2, FPLM-1-r4, FPLM-2-r4, CLM-r4, within 5 %; |AE| (uniform)
// 0.0000, 0.0416, 0.0000, 0.0416, 0.0833 within 0.004.
module tb_fplm_top;
  import fplm_pkg::*;
  import fplm_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic [31:0] p     [NUM_MUL];
  fp_flags_t   flags [NUM_MUL];

  fplm_top dut (.a(a), .b(b), .p(p), .flags(flags));

  typedef enum int {
    EV_F1_NEG, EV_F2_R0, EV_F2_R1, EV_F2_R2, EV_F2_R3, EV_CLM_CARRY, EV_R4_DROP,
    EV_INVALID, EV_INF, EV_ZERO_IN, EV_OVERFLOW, EV_UNDERFLOW, EV_NUM
  } event_e;
  int events[EV_NUM] = '{default: 0};
  string ev_name[EV_NUM] = '{"FPLM-1 negative log sum", "FPLM-2 region l<1",
    "FPLM-2 region [1,1.5)", "FPLM-2 region [1.5,1.75)", "FPLM-2 region [1.75,2)",
    "CLM-r4 carry-out", "radix-4 LSB drop changes product", "invalid (NaN)", "Inf result",
    "zero operand", "exponent overflow", "exponent underflow"};

  localparam real MRED_U[NUM_MUL] = '{0.0288, 0.0368, 0.0288, 0.0368, 0.0384};
  localparam real MRED_N[NUM_MUL] = '{0.0288, 0.0373, 0.0288, 0.0373, 0.0381};
  localparam real AE_U[NUM_MUL]   = '{0.0, 0.0416, 0.0, 0.0416, 0.0833};
  string mul_name[NUM_MUL] = '{"FPLM-1", "FPLM-2", "FPLM-1-r4", "FPLM-2-r4", "CLM-r4"};

  function automatic logic [31:0] rand_op();
    logic [7:0] e;
    int r = $urandom_range(0, 99);
    if (r < 3) e = 8'h00;
    else if (r < 6) e = 8'hff;
    else if (r < 12) e = 8'($urandom_range(1, 20));
    else if (r < 18) e = 8'($urandom_range(235, 254));
    else e = 8'($urandom_range(64, 190));
    return {1'($urandom), e, (r >= 3 && r < 6 && ($urandom & 1) == 1) ? 23'h0 : 23'($urandom)};
  endfunction

  task automatic count_events();
    longint one = longint'(1) << 23;
    longint ma = longint'(a[22:0]), mb = longint'(b[22:0]);
    longint l2 = log2m(ma, 23) + log2m(mb, 23);
    logic ex_a = (a[30:23] == 8'h00) || (a[30:23] == 8'hff);
    logic ex_b = (b[30:23] == 8'h00) || (b[30:23] == 8'hff);
    if (!ex_a && !ex_b) begin
      if (log1(ma, 23) + log1(mb, 23) < 0) events[EV_F1_NEG]++;
      if (l2 < one) events[EV_F2_R0]++;
      else if (2 * l2 < 3 * one) events[EV_F2_R1]++;
      else if (4 * l2 < 7 * one) events[EV_F2_R2]++;
      else events[EV_F2_R3]++;
      if (fdiv2(ma) + fdiv2(mb) >= one / 2) events[EV_CLM_CARRY]++;
      if (p[MUL_FPLM1] != p[MUL_FPLM1_R4] || p[MUL_FPLM2] != p[MUL_FPLM2_R4]) events[EV_R4_DROP]++;
    end
    if (a[30:23] == 8'h00 || b[30:23] == 8'h00) events[EV_ZERO_IN]++;
    if (flags[MUL_FPLM1].invalid) events[EV_INVALID]++;
    if (!flags[MUL_FPLM1].invalid && !flags[MUL_FPLM1].overflow && p[MUL_FPLM1][30:23] == 8'hff)
      events[EV_INF]++;
    for (int k = 0; k < NUM_MUL; k++) begin
      if (flags[k].overflow) events[EV_OVERFLOW]++;
      if (flags[k].underflow) events[EV_UNDERFLOW]++;
    end
  endtask

  task automatic compare_all();
    logic [3:0] ef;
    longint ep;
    for (int k = 0; k < NUM_MUL; k++) begin
      ep = fp_mul(k, 8, 23, longint'(a), longint'(b), ef);
      checks++;
      if (longint'(p[k]) != ep || flags[k] !== ef) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s %h * %h: got %h/%b expected %h/%b", mul_name[k], a, b, p[k], flags[k], ep, ef);
      end
    end
  endtask

  task automatic accuracy(bit normal, int n);
    real sum_red[NUM_MUL], sum_err[NUM_MUL];
    real xa, xb, exact, ap, mred, ae;
    for (int k = 0; k < NUM_MUL; k++) begin
      sum_red[k] = 0.0;
      sum_err[k] = 0.0;
    end
    for (int i = 0; i < n; i++) begin
      if (normal) begin
        xa = randn();
        xb = randn();
      end else begin
        xa = randu12();
        xb = randu12();
      end
      a = 32'(from_real(8, 23, xa));
      b = 32'(from_real(8, 23, xb));
      #1;
      compare_all();
      exact = xa * xb;
      for (int k = 0; k < NUM_MUL; k++) begin
        ap = to_real(8, 23, longint'(p[k]));
        sum_red[k] += ((exact - ap) / exact >= 0.0) ? (exact - ap) / exact : (ap - exact) / exact;
        sum_err[k] += exact - ap;
      end
    end
    for (int k = 0; k < NUM_MUL; k++) begin
      mred = sum_red[k] / n;
      ae   = sum_err[k] / n;
      $display("%s %s MRED %.4f (published %.4f)  AE %.5f", normal ? "normal " : "uniform",
               mul_name[k], mred, normal ? MRED_N[k] : MRED_U[k], ae);
      checks++;
      if (mred < 0.95 * (normal ? MRED_N[k] : MRED_U[k]) || mred > 1.05 * (normal ? MRED_N[k] : MRED_U[k])) begin
        failures++;
        $display("FAIL MRED of %s", mul_name[k]);
      end
      if (!normal) begin
        checks++;
        if ((ae < 0.0 ? -ae : ae) < AE_U[k] - 0.004 || (ae < 0.0 ? -ae : ae) > AE_U[k] + 0.004) begin
          failures++;
          $display("FAIL AE of %s", mul_name[k]);
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 40000; i++) begin
      a = rand_op();
      b = rand_op();
      #1;
      compare_all();
      count_events();
    end
    // exact boundary cases of the exponent range
    a = 32'h7f00_0000; b = 32'h4000_0000; #1; compare_all(); count_events();
    a = 32'h0080_0000; b = 32'h3f00_0000; #1; compare_all(); count_events();
    for (int e = 0; e < EV_NUM; e++) begin
      $display("event %-34s %0d", ev_name[e], events[e]);
      checks++;
      if (events[e] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", ev_name[e]);
      end
    end
    accuracy(1'b0, 20000);
    accuracy(1'b1, 20000);
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
