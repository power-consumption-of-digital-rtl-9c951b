// nla_lin: non-linear (compressive) amplifier in the 16-bit linear representation.
//
//   y = sgn(x) * A * |x|      if |x| <= t   (linear region, high gain)
//   y = sgn(x) * B * |x|^p    if |x| >  t   (1:p compression)
//
// Structure (as in the document): a comparator decides the region; only the selected path
// gets the new operand, so the other path's multiplier inputs stay still; the select bit
// travels with the sample and steers the output multiplexer. The upper path is one 16x16
// Baugh-Wooley multiplier (A*x), the lower one is xp_lin followed by a second multiplier
// (B*x^p).
//
// Formats (this design's choice): x, y Q0.15; t unsigned Q0.15 magnitude; A and B unsigned
// Q8.8 held in 16 bits (a gain up to 127.99, top bit must be 0); p unsigned Q2.14. Products
// are truncated to Q0.15 and saturated to [-32767, 32767].
//
// Timing: a sample presented with din_en is registered into its path on the next edge; the
// result is registered on the following edge, so dout_en pulses two cycles after din_en.
// A new sample may be presented every cycle.
module nla_lin
  import ha_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        din_en,
  input  lin_t        din,
  input  logic [14:0] t,
  input  logic [15:0] a_gain,
  input  logic [15:0] b_gain,
  input  logic [15:0] p,
  output logic        dout_en,
  output lin_t        dout
);

  // ---------------- comparator ----------------
  logic [15:0] mag;
  logic        compress;
  assign mag      = din[15] ? 16'(-din) : din;
  assign compress = mag > {1'b0, t};

  // path operand registers (only the selected path is loaded)
  lin_t        xa_q;
  logic [14:0] xb_q;
  logic        sgn_q, sel_q, en_q;

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
        if (compress) begin
          xb_q  <= mag[15] ? 15'h7fff : mag[14:0];
          sgn_q <= din[15];
        end else begin
          xa_q <= din;
        end
      end
    end
  end

  // ---------------- upper path: A * x ----------------
  logic signed [31:0] ax;
  bw_mult #(.AW(16), .BW(16)) u_amul (.a(xa_q), .b(signed'(a_gain)), .p(ax));

  // ---------------- lower path: B * x^p ----------------
  logic [14:0]        xp;
  logic signed [31:0] bxp;
  xp_lin u_xp (.mag(xb_q), .p(p), .xp(xp));
  bw_mult #(.AW(16), .BW(16)) u_bmul (.a(signed'({1'b0, xp})), .b(signed'(b_gain)), .p(bxp));

  function automatic lin_t sat16(logic signed [31:0] v);
    if (v > 32'sd32767)  return 16'sd32767;
    if (v < -32'sd32767) return -16'sd32767;
    return 16'(v);
  endfunction

  lin_t ya, yb;
  assign ya = sat16(ax >>> 8);
  assign yb = sgn_q ? -sat16(bxp >>> 8) : sat16(bxp >>> 8);

  // ---------------- output multiplexer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout    <= '0;
      dout_en <= 1'b0;
    end else begin
      dout_en <= en_q;
      if (en_q) dout <= sel_q ? yb : ya;
    end
  end

endmodule
