// nla_log: non-linear (compressive) amplifier in the 9-bit logarithmic representation.
//
// With L = log_0.941 of a magnitude (a larger code is a smaller value):
//   y_l = sgn(x_l) * (A_l + |x_l|)       if |x_l| >= t_l   (linear region)
//   y_l = sgn(x_l) * (B_l + p * |x_l|)   if |x_l| <  t_l   (compression)
// A gain becomes an addition and the power law a multiplication by p, so the datapath is
// two adders and one small multiplier, arranged as in the linear amplifier: a comparator,
// two operand-isolated paths and an output multiplexer steered by the registered select.
//
// Formats (this design's choice): A_l and B_l are 10-bit two's complement code offsets
// (negative for a gain above one); p is unsigned Q0.8 (0.25 = 64, 0.5 = 128); p*|x_l| is
// rounded to the nearest code. The output magnitude is clamped to [0, 255]: 0 (the value
// 1.0) on overflow, 255 (the smallest value) on underflow.
//
// Timing: dout_en pulses two cycles after din_en; a new sample may come every cycle.
module nla_log
  import ha_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              din_en,
  input  log9_t             din,
  input  logic [7:0]        t_l,
  input  logic signed [9:0] a_l,
  input  logic signed [9:0] b_l,
  input  logic [7:0]        p,
  output logic              dout_en,
  output log9_t             dout
);

  logic compress;
  assign compress = din.mag < t_l;

  logic [7:0] xa_q, xb_q;
  logic       sgn_q, sel_q, en_q;

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
        if (compress) xb_q <= din.mag;
        else          xa_q <= din.mag;
      end
    end
  end

  // upper path: A_l + |x_l|
  logic signed [10:0] ya;
  assign ya = 11'(a_l) + 11'(signed'({1'b0, xa_q}));

  // lower path: B_l + p * |x_l|
  logic [15:0]        px;
  logic signed [10:0] yb;
  assign px = xb_q * p + 16'd128;
  assign yb = 11'(b_l) + 11'(signed'({1'b0, px[15:8]}));

  function automatic logic [7:0] clamp(logic signed [10:0] v);
    if (v < 0)       return 8'd0;
    if (v > 11'sd255) return 8'd255;
    return v[7:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout    <= '0;
      dout_en <= 1'b0;
    end else begin
      dout_en <= en_q;
      if (en_q) begin
        dout.sign <= sgn_q;
        dout.mag  <= sel_q ? clamp(yb) : clamp(ya);
      end
    end
  end

endmodule
