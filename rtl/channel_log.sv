// channel_log: one hearing aid channel in the 9-bit logarithmic representation.
//
// Band-pass FIR -> non-linear amplifier -> band-pass FIR, run in lock step by master_ctrl,
// exactly as channel_lin but with fir_log and nla_log. Each input sample is consumed on a
// din_en pulse (the source holds the next sample on din while din_en is high); one sample
// is accepted per NTAPS+4 cycles; dout_valid marks each output sample, which trails its
// input by three samples. The pipeline fills with code 255, the smallest magnitude.
//
// coef_we[0] writes the first filter's coefficients, coef_we[1] the second's. Amplifier
// settings (t_l, A_l, B_l, p) are static inputs in the formats given in nla_log.
module channel_log
  import ha_pkg::*;
#(
  parameter int N = NTAPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  log9_t                din,
  output logic                 din_en,
  input  logic [7:0]           t_l,
  input  logic signed [9:0]    a_l,
  input  logic signed [9:0]    b_l,
  input  logic [7:0]           p,
  input  logic [1:0]           coef_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  log9_t                coef_data,
  output log9_t                dout,
  output logic                 dout_valid
);

  localparam log9_t LOG_SMALLEST = '{sign: 1'b0, mag: 8'd255};

  logic  d1_en, d2_en, d3_en;
  log9_t d1, d2, d3, din_2, din_3;
  logic  busy1, busy3, lut1, lut3, byp1, byp3;

  fir_log #(.N(N)) u_fir1 (
    .clk, .rst_n, .din_en(din_en), .din(din),
    .coef_we(coef_we[0]), .coef_addr, .coef_data,
    .busy(busy1), .dout_en(d1_en), .dout(d1), .lut_used(lut1), .bypass(byp1));

  nla_log u_nla (
    .clk, .rst_n, .din_en(din_en), .din(din_2), .t_l, .a_l, .b_l, .p,
    .dout_en(d2_en), .dout(d2));

  fir_log #(.N(N)) u_fir2 (
    .clk, .rst_n, .din_en(din_en), .din(din_3),
    .coef_we(coef_we[1]), .coef_addr, .coef_data,
    .busy(busy3), .dout_en(d3_en), .dout(d3), .lut_used(lut3), .bypass(byp3));

  master_ctrl #(.W(9), .ZERO(LOG_SMALLEST)) u_ctrl (
    .clk, .rst_n,
    .dout_1_en(d1_en), .dout_1(d1), .dout_2_en(d2_en), .dout_2(d2),
    .dout_3_en(d3_en), .dout_3(d3),
    .din_en(din_en), .din_2(din_2), .din_3(din_3), .dout(dout), .out_valid(dout_valid));

endmodule
