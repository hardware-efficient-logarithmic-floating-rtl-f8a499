// tb_fplm_jpeg: JPEG-style compression of a 32x32 test image with every
// multiplication of the DCT and IDCT done by one of the five multipliers,
// in each of the four formats: single precision (default parameters), half
// precision, bfloat16 and FP8.
//
// The image is generated from a formula: smooth waves, a checkerboard of
// 8x8 tiles and pseudo-random texture, levels 0..255. Each 8x8 block is
// level-shifted by -128, transformed with F = C X C^T (C is the orthonormal
// DCT-II matrix), quantised with the standard JPEG luminance table at
// quality 50, dequantised and inverse transformed X = C^T F C. Every product
// in the four matrix multiplications goes through the multiplier; sums are
// exact. Operands are truncated to the format before each product.
// The PSNR of the reconstruction is computed for an exact multiplier (same
// truncated operands) and for each of the five designs. Checks, matching the
// qualitative results reported for this design on 256x256 photographs:
//   single, half, bfloat16: the exact multiplier gives the highest PSNR and
//     the four double-sided designs (FPLM-1, FPLM-2, FPLM-1-r4, FPLM-2-r4)
//     beat the one-sided CLM-r4 by at least 2 dB (published: about 30 dB
//     against 24-25 dB);
//   FP8: FPLM-1 and FPLM-2 beat the three radix-4 designs (published:
//     about 15.2-15.3 dB against 13.4-13.6 dB).
module tb_fplm_jpeg;
  import fplm_pkg::*;
  import fplm_ref_pkg::*;

  localparam int N = 32;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic [31:0] p     [NUM_MUL];
  fp_flags_t   flags [NUM_MUL];
  fplm_top dut (.a(a), .b(b), .p(p), .flags(flags));

  logic [15:0] ah, bh, ph [NUM_MUL];
  logic [15:0] abf, bbf, pbf [NUM_MUL];
  logic [7:0]  a8, b8, p8 [NUM_MUL];
  fp_flags_t   fh [NUM_MUL], fbf [NUM_MUL], f8 [NUM_MUL];
  fplm_top #(.W(5), .Q(10)) u_half (.a(ah),  .b(bh),  .p(ph),  .flags(fh));
  fplm_top #(.W(8), .Q(7))  u_bf16 (.a(abf), .b(bbf), .p(pbf), .flags(fbf));
  fplm_top #(.W(5), .Q(2))  u_fp8  (.a(a8),  .b(b8),  .p(p8),  .flags(f8));

  string fmt_name[4] = '{"single", "half", "bfloat16", "FP8"};
  localparam int FW[4] = '{8, 5, 8, 5};
  localparam int FQ[4] = '{23, 10, 7, 2};

  string mul_name[NUM_MUL] = '{"FPLM-1", "FPLM-2", "FPLM-1-r4", "FPLM-2-r4", "CLM-r4"};

  // standard JPEG luminance quantisation table (quality 50)
  localparam int QT[64] = '{16, 11, 10, 16, 24, 40, 51, 61,
                            12, 12, 14, 19, 26, 58, 60, 55,
                            14, 13, 16, 24, 40, 57, 69, 56,
                            14, 17, 22, 29, 51, 87, 80, 62,
                            18, 22, 37, 56, 68, 109, 103, 77,
                            24, 35, 55, 64, 81, 104, 113, 92,
                            49, 64, 78, 87, 103, 121, 120, 101,
                            72, 92, 95, 98, 112, 100, 103, 99};

  real img[N][N];
  real cm[8][8];
  int  nmul = 0;

  // value of an encoded number, zero for exponent 0 and Inf as a huge value
  function automatic real value(int f, longint v);
    if (((v >> FQ[f]) & ((longint'(1) << FW[f]) - 1)) == 0) return 0.0;
    return to_real(FW[f], FQ[f], v);
  endfunction

  // x * y in format f through multiplier k (k < 0: exact)
  task automatic mul(int f, int k, real x, real y, output real r);
    longint va = from_real(FW[f], FQ[f], x), vb = from_real(FW[f], FQ[f], y);
    if (k < 0 || x == 0.0 || y == 0.0) begin
      r = (k < 0) ? value(f, va) * value(f, vb) : 0.0;
      return;
    end
    case (f)
      0: begin a = 32'(va); b = 32'(vb); end
      1: begin ah = 16'(va); bh = 16'(vb); end
      2: begin abf = 16'(va); bbf = 16'(vb); end
      default: begin a8 = 8'(va); b8 = 8'(vb); end
    endcase
    #1;
    nmul++;
    case (f)
      0: r = value(f, longint'(p[k]));
      1: r = value(f, longint'(ph[k]));
      2: r = value(f, longint'(pbf[k]));
      default: r = value(f, longint'(p8[k]));
    endcase
  endtask

  // r = l * m (8x8), products through multiplier k
  task automatic matmul(int f, int k, input real l[8][8], input real m[8][8], output real r[8][8]);
    real t;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        r[i][j] = 0.0;
        for (int n = 0; n < 8; n++) begin
          mul(f, k, l[i][n], m[n][j], t);
          r[i][j] += t;
        end
      end
  endtask

  task automatic compress(int f, int k, output real psnr);
    real x[8][8], fc[8][8], t[8][8], ct[8][8];
    real se = 0.0, v;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) ct[i][j] = cm[j][i];
    for (int bi = 0; bi < N; bi += 8)
      for (int bj = 0; bj < N; bj += 8) begin
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) x[i][j] = img[bi+i][bj+j] - 128.0;
        matmul(f, k, cm, x, t);
        matmul(f, k, t, ct, fc);
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) fc[i][j] = real'($rtoi(fc[i][j] / QT[i*8+j] + ((fc[i][j] < 0.0) ? -0.5 : 0.5))) * QT[i*8+j];
        matmul(f, k, ct, fc, t);
        matmul(f, k, t, cm, x);
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            v = real'($rtoi(x[i][j] + 128.0 + ((x[i][j] + 128.0 < 0.0) ? -0.5 : 0.5)));
            if (v < 0.0) v = 0.0;
            if (v > 255.0) v = 255.0;
            se += (v - img[bi+i][bj+j]) * (v - img[bi+i][bj+j]);
          end
      end
    psnr = 10.0 * $log10(255.0 * 255.0 / (se / (N * N)));
  endtask

  initial begin
    real psnr_exact, psnr[NUM_MUL], v;
    for (int u = 0; u < 8; u++)
      for (int n = 0; n < 8; n++)
        cm[u][n] = ((u == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0)) * $cos((2 * n + 1) * u * 3.141592653589793 / 16.0);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        v = 128.0 + 60.0 * $sin(i / 5.0) * $cos(j / 7.0) + ((((i / 8) + (j / 8)) % 2 == 1) ? 25.0 : -25.0)
            + real'($urandom_range(0, 20)) - 10.0;
        if (v < 0.0) v = 0.0;
        if (v > 255.0) v = 255.0;
        img[i][j] = real'($rtoi(v));
      end
    for (int f = 0; f < 4; f++) begin
      compress(f, -1, psnr_exact);
      $display("%s exact multiplier PSNR %.2f dB", fmt_name[f], psnr_exact);
      for (int k = 0; k < NUM_MUL; k++) begin
        compress(f, k, psnr[k]);
        $display("%s %s PSNR %.2f dB", fmt_name[f], mul_name[k], psnr[k]);
      end
      if (f < 3) begin
        for (int k = 0; k < NUM_MUL; k++) begin
          checks++;
          if (psnr[k] > psnr_exact) begin
            failures++;
            $display("FAIL %s %s better than the exact multiplier", fmt_name[f], mul_name[k]);
          end
        end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (psnr[k] < psnr[MUL_CLM_R4] + 2.0) begin
            failures++;
            $display("FAIL %s %s not clearly better than CLM-r4", fmt_name[f], mul_name[k]);
          end
        end
      end else begin
        for (int k = MUL_FPLM1_R4; k < NUM_MUL; k++) begin
          checks += 2;
          if (psnr[MUL_FPLM1] <= psnr[k] || psnr[MUL_FPLM2] <= psnr[k]) begin
            failures++;
            $display("FAIL FP8 %s not worse than FPLM-1 and FPLM-2", mul_name[k]);
          end
        end
      end
    end
    checks++;
    if (nmul < 4 * 5 * 16 * 4 * 512 / 4) begin
      failures++;
      $display("FAIL too few multiplications went through the design: %0d", nmul);
    end
    $display("multiplications through the design: %0d", nmul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
