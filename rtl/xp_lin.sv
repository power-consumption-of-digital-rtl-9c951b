// xp_lin: exponentiation |x|^p in the 16-bit linear representation.
//
// x^p is computed as 2^(p*log2(x)):
//   normalizer : |x| = (1+u) * 2^m with u in [0,1) and m in [-15,-1] (leading-one detect);
//   log2(1+u)  : degree-6 polynomial c1*u + ... + c6*u^6, evaluated by Horner's rule with six
//                16x16 Baugh-Wooley multipliers;
//   w = p*(m + log2(1+u)) : one 20x20 Baugh-Wooley multiplier;
//   splitter   : w = i + f, i = floor(w) (a non-positive integer), f in [0,1);
//   2^f        : sixth-order Taylor series of e^(f ln 2), Horner's rule, six more multipliers;
//   shifter    : x^p = 2^f * 2^i by a right shift of -i places.
// This is the structure of the document (twelve 16-bit multipliers and one 20-bit one).
// The polynomial coefficients of log2(1+u) are this design's least-squares fit over [0,1]
// (constant term forced to zero, maximum error 5.2e-6 after quantisation); the document
// does not list its coefficients. The 2^f coefficients are (ln 2)^k / k!.
//
// Number formats (this design's choice): u, f, the polynomial accumulators and coefficients
// are Q2.14 (16-bit signed); m + log2(1+u) and w are Q5.14 (20-bit signed); p is unsigned
// Q2.14 (0.25 = 4096, 0.5 = 8192); the result is an unsigned Q0.15 magnitude, rounded, and
// saturated at 32767 when it would reach 1.0.
//
// Interface: mag = |x| as unsigned Q0.15 (1..32767), p, xp = |x|^p.
// Timing: purely combinational. mag = 0 gives 0.
module xp_lin (
  input  logic [14:0] mag,
  input  logic [15:0] p,
  output logic [14:0] xp
);

  // log2(1+u) ~ sum LC[k] u^k, k = 1..6, Q2.14
  localparam logic signed [15:0] LC [1:6] = '{16'sd23634, -16'sd11762, 16'sd7486,
                                              -16'sd4544, 16'sd1997, -16'sd427};
  // 2^f = sum EC[k] f^k, k = 0..6, EC[k] = (ln2)^k / k!, Q2.14
  localparam logic signed [15:0] EC [0:6] = '{16'sd16384, 16'sd11357, 16'sd3936, 16'sd909,
                                              16'sd158, 16'sd22, 16'sd3};

  // ---------------- normalizer ----------------
  logic [3:0]         lead;   // position of the leading one, 0..14
  logic [14:0]        norm;
  logic signed [15:0] u;
  logic signed [4:0]  m;

  always_comb begin
    lead = '0;
    for (int k = 0; k < 15; k++)
      if (mag[k]) lead = 4'(k);
    norm = mag << (4'd14 - lead);
    u    = {2'b00, norm[13:0]};
    m    = 5'(signed'({1'b0, lead}) - 5'sd15);
  end

  // ---------------- log2(1+u): Horner chain ----------------
  logic signed [15:0] lacc [7];   // lacc[0] = c6, ..., lacc[6] = u*(...)
  logic signed [31:0] lprod [6];

  assign lacc[0] = LC[6];
  for (genvar k = 0; k < 6; k++) begin : g_log
    bw_mult #(.AW(16), .BW(16)) u_mul (.a(lacc[k]), .b(u), .p(lprod[k]));
    if (k < 5) begin : g_add
      assign lacc[k+1] = 16'(lprod[k] >>> 14) + LC[5-k];
    end else begin : g_last
      assign lacc[k+1] = 16'(lprod[k] >>> 14);
    end
  end

  // ---------------- w = p * (m + log2(1+u)) ----------------
  logic signed [19:0] log2x;
  logic signed [19:0] p20;
  logic signed [39:0] wprod;
  logic signed [19:0] w;

  assign log2x = (20'(m) <<< 14) + 20'(lacc[6]);
  assign p20   = signed'({4'b0000, p});
  bw_mult #(.AW(20), .BW(20)) u_pmul (.a(log2x), .b(p20), .p(wprod));
  assign w = 20'(wprod >>> 14);

  // ---------------- splitter ----------------
  logic signed [5:0]  i_part;
  logic signed [15:0] f;
  assign i_part = 6'(w >>> 14);
  assign f      = {2'b00, w[13:0]};

  // ---------------- 2^f: Horner chain ----------------
  logic signed [15:0] eacc [7];
  logic signed [31:0] eprod [6];

  assign eacc[0] = EC[6];
  for (genvar k = 0; k < 6; k++) begin : g_exp
    bw_mult #(.AW(16), .BW(16)) u_mul (.a(eacc[k]), .b(f), .p(eprod[k]));
    assign eacc[k+1] = 16'(eprod[k] >>> 14) + EC[5-k];
  end

  // ---------------- shifter ----------------
  always_comb begin
    logic [16:0] q15;     // 2^f in Q1.15, [32768, 65535]
    logic [5:0]  sh;
    logic [16:0] r;
    q15 = {eacc[6], 1'b0};
    sh  = 6'(-i_part);
    r   = '0;
    if (mag == '0) begin
      xp = '0;
    end else if (sh == '0) begin
      xp = 15'h7fff;     // 2^f >= 1.0 saturates
    end else if (sh > 6'd16) begin
      xp = '0;
    end else begin
      r  = (q15 + (17'd1 << (sh - 6'd1))) >> sh;
      xp = (r > 17'h7fff) ? 15'h7fff : r[14:0];
    end
  end

endmodule
