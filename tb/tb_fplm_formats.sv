// tb_fplm_formats: the five multipliers in the three narrower formats of the
// accuracy study: half precision (W=5, Q=10), bfloat16 (W=8, Q=7) and FP8
// (W=5, Q=2).
//
// For each format, 20000 operand pairs uniform in [1, 2) are drawn as real
// numbers, truncated to the format and multiplied; the products are compared
// bit for bit with the arithmetic reference model and, as relative error
// against the exact product of the untruncated operands, give MRED and AE.
// These must match the published figures (MRED within 5 %, |AE| within
// 5 % + 0.004); the truncation error of the narrow format is therefore part
// of the figure, as in the published evaluation.
module tb_fplm_formats;
  import fplm_pkg::*;
  import fplm_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] ah, bh, ph [NUM_MUL];
  logic [15:0] abf, bbf, pbf [NUM_MUL];
  logic [7:0]  a8, b8, p8 [NUM_MUL];
  fp_flags_t   fh [NUM_MUL], fbf [NUM_MUL], f8 [NUM_MUL];

  fplm_top #(.W(5), .Q(10)) u_half (.a(ah),  .b(bh),  .p(ph),  .flags(fh));
  fplm_top #(.W(8), .Q(7))  u_bf16 (.a(abf), .b(bbf), .p(pbf), .flags(fbf));
  fplm_top #(.W(5), .Q(2))  u_fp8  (.a(a8),  .b(b8),  .p(p8),  .flags(f8));

  string mul_name[NUM_MUL] = '{"FPLM-1", "FPLM-2", "FPLM-1-r4", "FPLM-2-r4", "CLM-r4"};
  // published MRED and |AE|, uniform operands, rows: half, bfloat16, FP8
  localparam real MRED[3][NUM_MUL] = '{'{0.0289, 0.0365, 0.0290, 0.0362, 0.0397},
                                       '{0.0302, 0.0348, 0.0330, 0.0341, 0.0488},
                                       '{0.2311, 0.1626, 0.4367, 0.3201, 0.3201}};
  localparam real AE[3][NUM_MUL]   = '{'{0.0021, 0.0399, 0.0043, 0.0382, 0.0862},
                                       '{0.0175, 0.0280, 0.0351, 0.0143, 0.1066},
                                       '{0.5626, 0.3750, 1.0000, 0.7500, 0.7500}};
  string fmt_name[3] = '{"half", "bfloat16", "FP8"};
  localparam int FW[3] = '{5, 8, 5};
  localparam int FQ[3] = '{10, 7, 2};

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic run_format(int f, int n);
    real sum_red[NUM_MUL], sum_err[NUM_MUL];
    real xa, xb, exact, ap, mred, ae;
    longint va, vb, vp, ep;
    logic [3:0] ef;
    for (int k = 0; k < NUM_MUL; k++) begin
      sum_red[k] = 0.0;
      sum_err[k] = 0.0;
    end
    for (int i = 0; i < n; i++) begin
      xa = randu12();
      xb = randu12();
      va = from_real(FW[f], FQ[f], xa);
      vb = from_real(FW[f], FQ[f], xb);
      case (f)
        0: begin ah = 16'(va); bh = 16'(vb); end
        1: begin abf = 16'(va); bbf = 16'(vb); end
        default: begin a8 = 8'(va); b8 = 8'(vb); end
      endcase
      #1;
      exact = xa * xb;
      for (int k = 0; k < NUM_MUL; k++) begin
        case (f)
          0: vp = longint'(ph[k]);
          1: vp = longint'(pbf[k]);
          default: vp = longint'(p8[k]);
        endcase
        ep = fp_mul(k, FW[f], FQ[f], va, vb, ef);
        checks++;
        if (vp != ep) begin
          failures++;
          if (failures < 10) $display("FAIL %s %s: got %h expected %h", fmt_name[f], mul_name[k], vp, ep);
        end
        ap = to_real(FW[f], FQ[f], vp);
        sum_red[k] += absr(exact - ap) / exact;
        sum_err[k] += exact - ap;
      end
    end
    for (int k = 0; k < NUM_MUL; k++) begin
      mred = sum_red[k] / n;
      ae   = sum_err[k] / n;
      $display("%s %s MRED %.4f (published %.4f)  AE %.4f (published |AE| %.4f)",
               fmt_name[f], mul_name[k], mred, MRED[f][k], ae, AE[f][k]);
      checks += 2;
      if (absr(mred - MRED[f][k]) > 0.05 * MRED[f][k]) begin
        failures++;
        $display("FAIL MRED %s %s", fmt_name[f], mul_name[k]);
      end
      if (absr(absr(ae) - AE[f][k]) > 0.05 * AE[f][k] + 0.004) begin
        failures++;
        $display("FAIL AE %s %s", fmt_name[f], mul_name[k]);
      end
    end
  endtask

  initial begin
    for (int f = 0; f < 3; f++) run_format(f, 20000);
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
