// channel_lin: one hearing aid channel in the 16-bit linear representation.
//
// Band-pass FIR -> non-linear amplifier -> band-pass FIR, run in lock step by master_ctrl
// (see there). This is the channel of the highest band (32 kS/s) of the multirate hearing
// aid, as built in the document. Each input sample is consumed on a din_en pulse: the sample
// source must hold the next sample on din while din_en is high. One sample is accepted per
// NTAPS+4 clock cycles (the FIR time plus the controller's latch and release cycles), so a
// 32 kS/s stream needs a clock of at least 32e3 * (NTAPS+4) = 800 kHz at NTAPS = 21.
// dout_valid marks each output sample; outputs trail inputs by three samples.
//
// Both FIRs have their own coefficient memory, written through the shared coef_* port with
// coef_we[0] for the first filter and coef_we[1] for the second. The amplifier settings (t,
// A, B, p) are static inputs; their formats are given in nla_lin.
module channel_lin
  import ha_pkg::*;
#(
  parameter int N = NTAPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  lin_t                 din,
  output logic                 din_en,
  input  logic [14:0]          t,
  input  logic [15:0]          a_gain,
  input  logic [15:0]          b_gain,
  input  logic [15:0]          p,
  input  logic [1:0]           coef_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  lin_t                 coef_data,
  output lin_t                 dout,
  output logic                 dout_valid
);

  logic d1_en, d2_en, d3_en;
  lin_t d1, d2, d3, din_2, din_3;
  logic busy1, busy3, clip1, clip3;

  fir_lin #(.N(N)) u_fir1 (
    .clk, .rst_n, .din_en(din_en), .din(din),
    .coef_we(coef_we[0]), .coef_addr, .coef_data,
    .busy(busy1), .dout_en(d1_en), .dout(d1), .clipped(clip1));

  nla_lin u_nla (
    .clk, .rst_n, .din_en(din_en), .din(din_2), .t, .a_gain, .b_gain, .p,
    .dout_en(d2_en), .dout(d2));

  fir_lin #(.N(N)) u_fir2 (
    .clk, .rst_n, .din_en(din_en), .din(din_3),
    .coef_we(coef_we[1]), .coef_addr, .coef_data,
    .busy(busy3), .dout_en(d3_en), .dout(d3), .clipped(clip3));

  master_ctrl #(.W(16)) u_ctrl (
    .clk, .rst_n,
    .dout_1_en(d1_en), .dout_1(d1), .dout_2_en(d2_en), .dout_2(d2),
    .dout_3_en(d3_en), .dout_3(d3),
    .din_en(din_en), .din_2(din_2), .din_3(din_3), .dout(dout), .out_valid(dout_valid));

endmodule
