// channel_float: one hearing aid channel in the 10-bit floating-point representation.
//
// Band-pass FIR -> non-linear amplifier -> band-pass FIR, run in lock step by master_ctrl,
// exactly as channel_lin but with fir_float and nla_float. Each input sample is consumed on
// a din_en pulse (the source holds the next sample on din while din_en is high); one sample
// is accepted per NTAPS+4 cycles; dout_valid marks each output sample, which trails its
// input by three samples.
//
// coef_we[0] writes the first filter's coefficients, coef_we[1] the second's. Amplifier
// settings (t_f, A_f, B_f) are static inputs in the formats given in nla_float; the
// amplifier's exponentiation tables reset to the contents for P_INIT and can be rewritten
// through the lut_* port.
module channel_float
  import ha_pkg::*;
#(
  parameter int  N      = NTAPS,
  parameter real P_INIT = 0.5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  fp10_t                din,
  output logic                 din_en,
  input  fpmag_t               t_f,
  input  fpmag_t               a_f,
  input  fpmag_t               b_f,
  input  logic                 lut_we,
  input  logic                 lut_sel,
  input  logic [3:0]           lut_addr,
  input  logic [12:0]          lut_wdata,
  input  logic [1:0]           coef_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  fp10_t                coef_data,
  output fp10_t                dout,
  output logic                 dout_valid
);

  logic  d1_en, d2_en, d3_en;
  fp10_t d1, d2, d3, din_2, din_3;
  logic  busy1, busy3, al1, al3;

  fir_float #(.N(N)) u_fir1 (
    .clk, .rst_n, .din_en(din_en), .din(din),
    .coef_we(coef_we[0]), .coef_addr, .coef_data,
    .busy(busy1), .dout_en(d1_en), .dout(d1), .align(al1));

  nla_float #(.P_INIT(P_INIT)) u_nla (
    .clk, .rst_n, .din_en(din_en), .din(din_2), .t_f, .a_f, .b_f,
    .lut_we, .lut_sel, .lut_addr, .lut_wdata,
    .dout_en(d2_en), .dout(d2));

  fir_float #(.N(N)) u_fir2 (
    .clk, .rst_n, .din_en(din_en), .din(din_3),
    .coef_we(coef_we[1]), .coef_addr, .coef_data,
    .busy(busy3), .dout_en(d3_en), .dout(d3), .align(al3));

  master_ctrl #(.W(10)) u_ctrl (
    .clk, .rst_n,
    .dout_1_en(d1_en), .dout_1(d1), .dout_2_en(d2_en), .dout_2(d2),
    .dout_3_en(d3_en), .dout_3(d3),
    .din_en(din_en), .din_2(din_2), .din_3(din_3), .dout(dout), .out_valid(dout_valid));

endmodule
