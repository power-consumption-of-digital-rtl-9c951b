// nla_float: non-linear (compressive) amplifier in the 10-bit floating-point representation.
//
//   y_f = sgn(x_f) * A_f * |x_f|      if |x_f| <= t_f
//   y_f = sgn(x_f) * B_f * |x_f|^p    if |x_f| >  t_f
//
// Because a value has only 16 possible exponents and 16 possible mantissas (the leading one
// is explicit), |x|^p = (mant/32)^p * 2^((exp-15)p) is taken from two 16-entry tables, one
// indexed by the mantissa and one by the exponent. A normaliser multiplies the two table
// mantissas, renormalises and adjusts the exponent, giving |x|^p as a float. The remaining
// structure (comparator, operand-isolated paths, output multiplexer) is that of the linear
// amplifier; the two gain multiplications are float multiplies (ha_pkg::fp_mul).
//
// Table formats (see ha_pkg::fp_mant_lut / fp_exp_lut): mantissa entry = 8-bit mantissa m
// (value m/256); exponent entry = {E[4:0], m[7:0]} meaning m/256 * 2^E. The tables are
// registers: they reset to the contents for the parameter P_INIT and can be rewritten for
// another compression ratio through the lut_* port (lut_sel = 1 for the exponent table).
// That write port, the reset contents and the 8-bit table precision are this design's
// choices; the document says only that p is fixed per patient and the tables hold 16
// entries each.
//
// Formats: t_f is a 9-bit magnitude {exp, mant}; A_f and B_f are 9-bit magnitudes with
// exponent bias FP_GAIN_BIAS (7), so a gain may reach 0.97 * 2^8. Results saturate to the
// largest magnitude and flush to zero below the smallest.
//
// Timing: dout_en pulses two cycles after din_en; a new sample may come every cycle.
module nla_float
  import ha_pkg::*;
#(
  parameter real P_INIT = 0.5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        din_en,
  input  fp10_t       din,
  input  fpmag_t      t_f,
  input  fpmag_t      a_f,
  input  fpmag_t      b_f,
  input  logic        lut_we,
  input  logic        lut_sel,
  input  logic [3:0]  lut_addr,
  input  logic [12:0] lut_wdata,
  output logic        dout_en,
  output fp10_t       dout
);

  localparam fp_lut_t MANT_INIT = fp_mant_lut(P_INIT);
  localparam fp_lut_t EXP_INIT  = fp_exp_lut(P_INIT);

  logic [7:0]  mant_lut [16];
  logic [12:0] exp_lut  [16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 16; k++) begin
        mant_lut[k] <= MANT_INIT[k][7:0];
        exp_lut[k]  <= EXP_INIT[k];
      end
    end else if (lut_we) begin
      if (lut_sel) exp_lut[lut_addr]  <= lut_wdata;
      else         mant_lut[lut_addr] <= lut_wdata[7:0];
    end
  end

  // ---------------- comparator ----------------
  logic compress;
  assign compress = din[8:0] > t_f;

  fpmag_t xa_q, xb_q;
  logic   sgn_q, sel_q, en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xa_q  <= '0;
      xb_q  <= '0;
      sgn_q <= 1'b0;
      sel_q <= 1'b0;
      en_q  <= 1'b0;
    end else begin
      en_q <= din_en;
      if (din_en) begin
        sel_q <= compress;
        sgn_q <= din.sign;
        if (compress) xb_q <= din[8:0];
        else          xa_q <= din[8:0];
      end
    end
  end

  // ---------------- lower path: table lookup, normaliser, B * x^p ----------------
  fpmag_t xp;
  always_comb begin
    logic [7:0]        mm, me;
    logic signed [4:0] be;
    logic [15:0]       prod;
    logic [5:0]        m;
    int                e;
    mm   = mant_lut[xb_q.mant[3:0]];
    me   = exp_lut[xb_q.exp][7:0];
    be   = signed'(exp_lut[xb_q.exp][12:8]);
    prod = mm * me;
    if (prod[15]) begin
      m = {1'b0, prod[15:11]} + 6'(prod[10]);
      e = int'(be) + FP_BIAS;
    end else begin
      m = {1'b0, prod[14:10]} + 6'(prod[9]);
      e = int'(be) + FP_BIAS - 1;
    end
    if (m[5]) begin
      m = 6'b010000;
      e = e + 1;
    end
    if (xb_q.mant == '0) xp = FP_ZERO;
    else if (e > 15)     xp = FP_MAX;
    else if (e < 0)      xp = FP_ZERO;
    else                 xp = '{exp: 4'(e), mant: m[4:0]};
  end

  fpmag_t ya, yb;
  assign ya = fp_mul(xa_q, a_f, FP_GAIN_BIAS);
  assign yb = fp_mul(xp, b_f, FP_GAIN_BIAS);

  // ---------------- output multiplexer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout    <= '0;
      dout_en <= 1'b0;
    end else begin
      dout_en <= en_q;
      if (en_q) begin
        if (sel_q) dout <= (yb == FP_ZERO) ? '0 : {sgn_q, yb};
        else       dout <= (ya == FP_ZERO) ? '0 : {sgn_q, ya};
      end
    end
  end

endmodule
