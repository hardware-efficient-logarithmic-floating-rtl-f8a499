// fplm_ref_pkg: arithmetic reference model of the five logarithmic FP
// multipliers, used by the testbenches.
//
// The model works on integers that count units of 2^-Q and follows the
// multiplication equations rather than the gate-level structure of the RTL:
//   FPLM-1   : log = x (x < 0.5) or (1+x)/2 - 1 (x >= 0.5, +1 on the exponent);
//              l = log_A + log_B; l >= 0 -> 1 + l, else 2(1 + l), exponent -1
//              (only the fraction of 2(1 + l) is kept).
//   FPLM-2   : log = x (x < 0.5) or (1+x)/2; l in [0,2);
//              l < 1 -> 1 + l; [1,1.5) -> l; [1.5,1.75) -> l - 0.25;
//              [1.75,2) -> l - 0.125; exponent +1 when l >= 1.
//   CLM      : log = x; l < 1 -> 1 + l; else l, exponent +1.
//   radix-4  : each logarithm is floored to an even number of units before
//              the sum (its LSB is dropped).
// Results below the LSB are floored. Exceptions: exponent 0 is zero,
// all-ones exponent is Inf (M = 0) or NaN; NaN or Inf*0 -> quiet NaN;
// overflow -> Inf; exponent <= 0 -> zero.
package fplm_ref_pkg;

  typedef enum int {K_FPLM1 = 0, K_FPLM2 = 1, K_FPLM1_R4 = 2, K_FPLM2_R4 = 3, K_CLM_R4 = 4} kind_e;

  // floor(v / 2) for signed values
  function automatic longint fdiv2(longint v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  function automatic longint log1(longint m, int q);
    longint one = longint'(1) << q;
    return (m < one / 2) ? m : ((one + m) / 2) - one;
  endfunction

  function automatic longint log2m(longint m, int q);
    longint one = longint'(1) << q;
    return (m < one / 2) ? m : (one + m) / 2;
  endfunction

  // Approximate mantissa product: returns the fraction bits and the exponent
  // adjustment (added to E_A + E_B - bias).
  function automatic void mant_mul(int kind, int q, longint ma, longint mb,
                                   output longint frac, output int adj);
    longint one = longint'(1) << q;
    longint la, lb, l;
    int conv;
    frac = 0;
    adj  = 0;
    case (kind)
      K_FPLM1, K_FPLM1_R4: begin
        la = log1(ma, q);
        lb = log1(mb, q);
        conv = int'(ma >= one / 2) + int'(mb >= one / 2);
        l = (kind == K_FPLM1) ? la + lb : 2 * (fdiv2(la) + fdiv2(lb));
        if (l >= 0) begin
          frac = l;
          adj  = conv;
        end else begin
          // 2(1 + l) in [1, 2) gives its fraction; at very small Q the
          // radix-4 floor can reach l = -1, where the hardware keeps only
          // the fraction bits and so returns 1.0 (hence the modulo).
          frac = (2 * (one + l)) % one;
          adj  = conv - 1;
        end
      end
      K_FPLM2, K_FPLM2_R4: begin
        la = log2m(ma, q);
        lb = log2m(mb, q);
        l = (kind == K_FPLM2) ? la + lb : 2 * (fdiv2(la) + fdiv2(lb));
        if (l < one) begin
          frac = l;
          adj  = 0;
        end else if (2 * l < 3 * one) begin
          frac = l - one;
          adj  = 1;
        end else if (4 * l < 7 * one) begin
          frac = (4 * (l - one) - one) / 4;
          adj  = 1;
        end else begin
          frac = (8 * (l - one) - one) / 8;
          adj  = 1;
        end
      end
      default: begin  // CLM-r4
        l = 2 * (fdiv2(ma) + fdiv2(mb));
        if (l < one) begin
          frac = l;
          adj  = 0;
        end else begin
          frac = l - one;
          adj  = 1;
        end
      end
    endcase
  endfunction

  // Full FP product. flags = {invalid, overflow, underflow, zero}.
  function automatic longint fp_mul(int kind, int w, int q, longint a, longint b,
                                    output logic [3:0] flags);
    longint emax = (longint'(1) << w) - 1;
    longint mmask = (longint'(1) << q) - 1;
    longint bias = (longint'(1) << (w - 1)) - 1;
    longint sa = (a >> (w + q)) & 1, sb = (b >> (w + q)) & 1;
    longint ea = (a >> q) & emax, eb = (b >> q) & emax;
    longint ma = a & mmask, mb = b & mmask;
    longint sp = sa ^ sb;
    longint frac, e;
    int adj;
    bit a_nan = (ea == emax) && (ma != 0), b_nan = (eb == emax) && (mb != 0);
    bit a_inf = (ea == emax) && (ma == 0), b_inf = (eb == emax) && (mb == 0);
    bit a_z = (ea == 0), b_z = (eb == 0);
    flags = '0;
    if (a_nan || b_nan || (a_inf && b_z) || (b_inf && a_z)) begin
      flags[3] = 1'b1;
      return (emax << q) | (longint'(1) << (q - 1));
    end
    if (a_inf || b_inf) return (sp << (w + q)) | (emax << q);
    if (a_z || b_z) begin
      flags[0] = 1'b1;
      return sp << (w + q);
    end
    mant_mul(kind, q, ma, mb, frac, adj);
    e = ea + eb + adj - bias;
    if (e >= emax) begin
      flags[2] = 1'b1;
      return (sp << (w + q)) | (emax << q);
    end
    if (e <= 0) begin
      flags[1] = 1'b1;
      flags[0] = 1'b1;
      return sp << (w + q);
    end
    return (sp << (w + q)) | (e << q) | frac;
  endfunction

  // Value of a normal number as a real.
  function automatic real to_real(int w, int q, longint v);
    longint emax = (longint'(1) << w) - 1;
    longint bias = (longint'(1) << (w - 1)) - 1;
    longint e = (v >> q) & emax;
    real m = 1.0 + real'(v & ((longint'(1) << q) - 1)) / real'(longint'(1) << q);
    real r = m * (2.0 ** real'(e - bias));
    return ((v >> (w + q)) & 1) ? -r : r;
  endfunction

  // Real to {sign, W-bit exponent, Q-bit mantissa}, mantissa truncated
  // (as when a single-precision value is cut to a narrower format). Values
  // below the normal range become signed zero, values above it signed Inf.
  function automatic longint from_real(int w, int q, real x);
    logic [63:0] d = $realtobits(x);
    longint bias = (longint'(1) << (w - 1)) - 1;
    longint e;
    if (x == 0.0) return 0;
    e = longint'(d[62:52]) - 1023 + bias;
    if (e <= 0) return longint'(d[63]) << (w + q);
    if (e >= (longint'(1) << w) - 1) return (longint'(d[63]) << (w + q)) | (((longint'(1) << w) - 1) << q);
    return (longint'(d[63]) << (w + q)) | (e << q) | longint'(d[51:0] >> (52 - q));
  endfunction

  // Standard normal sample (Box-Muller).
  function automatic real randn();
    real u1 = (real'($urandom_range(1, 32'hffff_fffe))) / 4294967296.0;
    real u2 = (real'($urandom)) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Uniform sample in [1, 2).
  function automatic real randu12();
    return 1.0 + real'({$urandom, $urandom} >> 12) / 4503599627370496.0;
  endfunction

endpackage
