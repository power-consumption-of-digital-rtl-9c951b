// ha_pkg: number formats, constants and shared arithmetic for the hearing aid channel.
//
// Three numerical representations are carried through the design:
//   * linear  : 16-bit two's complement Q0.15, range [-1, 1 - 2^-15].
//   * log     : 9 bits, sign-magnitude. The 8-bit magnitude L encodes |x| = 0.941^L, so a
//               larger code is a smaller value; code 0 is 1.0 and code 255 is about 1.84e-7.
//               There is no exact zero: 255 serves as the smallest value.
//   * float   : 10 bits {sign, exp[3:0], mant[4:0]}. The mantissa keeps its leading one
//               explicitly (mant[4] = 1 for every non-zero value), value = mant/32 * 2^(exp-15).
//               The all-zero word is zero. Magnitudes run from 2^-16 to 0.96875.
// The float gain operands of the non-linear amplifier use the same layout but their own
// exponent bias (FP_GAIN_BIAS), a choice of this design that lets a gain exceed one.
//
// The constant functions at the end build the look-up tables (log-domain addition table and
// float exponentiation tables) from real arithmetic at elaboration time; the formula of each
// table is given next to it.
package ha_pkg;

  localparam int NTAPS        = 21;   // FIR length
  localparam int LIN_W        = 16;   // linear word
  localparam int LOG_MAG_W    = 8;    // log magnitude
  localparam int FP_EXP_W     = 4;
  localparam int FP_MANT_W    = 5;
  localparam int FP_BIAS      = 15;   // exponent bias of the 10-bit float
  localparam int FP_GAIN_BIAS = 7;    // exponent bias of the float gain operands A_f, B_f
  localparam real LOG_BASE    = 0.941;

  // Log addition table: the difference of two codes beyond which the smaller term is below
  // half a quantisation step of the larger one, so the table is not read.
  localparam int LOG_LUT_N    = 64;

  typedef logic signed [LIN_W-1:0] lin_t;

  typedef struct packed {
    logic                 sign;
    logic [LOG_MAG_W-1:0] mag;
  } log9_t;

  typedef struct packed {
    logic                 sign;
    logic [FP_EXP_W-1:0]  exp;
    logic [FP_MANT_W-1:0] mant;
  } fp10_t;

  typedef struct packed {
    logic [FP_EXP_W-1:0]  exp;
    logic [FP_MANT_W-1:0] mant;
  } fpmag_t;

  localparam fpmag_t FP_MAX  = '{exp: '1, mant: '1};
  localparam fpmag_t FP_ZERO = '0;

  // Float magnitude multiply. ea/eb are biased exponents, bias_b the bias of operand b
  // (the result and operand a use FP_BIAS). The 10-bit mantissa product is normalised to a
  // leading one, rounded half-up to 5 bits, overflow saturates to FP_MAX, underflow flushes
  // to zero.
  function automatic fpmag_t fp_mul(fpmag_t a, fpmag_t b, int bias_b);
    logic [9:0] prod;
    logic [5:0] m;
    int         e;
    fpmag_t     r;
    if (a.mant == '0 || b.mant == '0) return FP_ZERO;
    prod = a.mant * b.mant;
    if (prod[9]) begin
      m = {1'b0, prod[9:5]} + 6'(prod[4]);
      e = int'(a.exp) + int'(b.exp) - bias_b;
    end else begin
      m = {1'b0, prod[8:4]} + 6'(prod[3]);
      e = int'(a.exp) + int'(b.exp) - bias_b - 1;
    end
    if (m[5]) begin
      m = 6'b010000;
      e = e + 1;
    end
    if (e > 15) return FP_MAX;
    if (e < 0)  return FP_ZERO;
    r.exp  = 4'(e);
    r.mant = m[4:0];
    return r;
  endfunction

  // Signed float addition: operands are aligned to the larger exponent with three guard
  // bits, added or subtracted in sign-magnitude form, renormalised and rounded half-up.
  function automatic fp10_t fp_add(fp10_t a, fp10_t b);
    fp10_t      hi_op, lo_op, r;
    logic [7:0] mb, ms;
    logic [8:0] sum;
    int         e, d, lz;
    logic [5:0] m;
    if (a[8:0] == '0) return b;
    if (b[8:0] == '0) return a;
    if (a[8:0] >= b[8:0]) begin hi_op = a; lo_op = b; end
    else begin hi_op = b; lo_op = a; end
    d  = int'(hi_op.exp) - int'(lo_op.exp);
    mb = {hi_op.mant, 3'b000};
    ms = (d > 8) ? 8'd0 : ({lo_op.mant, 3'b000} >> d);
    e  = int'(hi_op.exp);
    if (hi_op.sign == lo_op.sign) sum = {1'b0, mb} + {1'b0, ms};
    else                        sum = {1'b0, mb} - {1'b0, ms};
    if (sum == '0) return '0;
    if (sum[8]) begin
      sum = sum >> 1;
      e   = e + 1;
    end else begin
      lz = 0;
      for (int k = 7; k >= 0; k--) begin
        if (sum[k]) break;
        lz++;
      end
      sum = sum << lz;
      e   = e - lz;
    end
    m = {1'b0, sum[7:3]} + 6'(sum[2]);
    if (m[5]) begin
      m = 6'b010000;
      e = e + 1;
    end
    r.sign = hi_op.sign;
    if (e > 15) begin
      r.exp  = '1;
      r.mant = '1;
    end else if (e < 0) begin
      return '0;
    end else begin
      r.exp  = 4'(e);
      r.mant = m[4:0];
    end
    return r;
  endfunction

  // ---------------------------------------------------------------------------------------
  // Table construction (elaboration time only).
  // ---------------------------------------------------------------------------------------
  typedef logic signed [7:0] log_lut_t [LOG_LUT_N];

  // Same-sign accumulation: code correction round(log_b(1 + b^d)), always <= 0.
  function automatic log_lut_t log_add_lut();
    log_lut_t t;
    for (int d = 0; d < LOG_LUT_N; d++)
      t[d] = 8'($rtoi($floor($ln(1.0 + $pow(LOG_BASE, real'(d))) / $ln(LOG_BASE) + 0.5)));
    return t;
  endfunction

  // Opposite-sign accumulation: code correction round(log_b(1 - b^d)), >= 0; d = 0 is exact
  // cancellation and is handled outside the table.
  function automatic log_lut_t log_sub_lut();
    log_lut_t t;
    t[0] = '0;
    for (int d = 1; d < LOG_LUT_N; d++)
      t[d] = 8'($rtoi($floor($ln(1.0 - $pow(LOG_BASE, real'(d))) / $ln(LOG_BASE) + 0.5)));
    return t;
  endfunction

  // Float exponentiation tables for a compression ratio p.
  //   mantissa table, index k = mant[3:0]: round(((16+k)/32)^p * 256), an 8-bit mantissa
  //     in [128, 255] with implied exponent 0;
  //   exponent table, index e: 2^((e-15)p) written as m/256 * 2^E with m in [128, 255];
  //     an entry is {E[4:0] (two's complement), m[7:0]}.
  typedef logic [12:0] fp_lut_t [16];

  function automatic fp_lut_t fp_mant_lut(real p);
    fp_lut_t t;
    int      v;
    for (int k = 0; k < 16; k++) begin
      v = $rtoi($floor($pow(real'(16 + k) / 32.0, p) * 256.0 + 0.5));
      if (v > 255) v = 255;
      t[k] = 13'(v);
    end
    return t;
  endfunction

  function automatic fp_lut_t fp_exp_lut(real p);
    fp_lut_t t;
    real     k, fl;
    int      big_e, m;
    for (int e = 0; e < 16; e++) begin
      k     = real'(e - 15) * p;
      fl    = $floor(k);
      big_e = $rtoi(fl) + 1;
      m     = $rtoi($floor($pow(2.0, k - fl - 1.0) * 256.0 + 0.5));
      if (m > 255) begin
        m     = 128;
        big_e = big_e + 1;
      end
      t[e] = {5'(big_e), 8'(m)};
    end
    return t;
  endfunction

endpackage
