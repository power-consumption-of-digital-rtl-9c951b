// hearing_aid_top: the hearing aid channel in its three numerical representations, side by
// side, and the complete six-channel multirate hearing aid in the linear representation.
//
// The three channels compute the same function (band-pass FIR, compressive non-linear
// amplifier, band-pass FIR, at the 32 kS/s rate of the highest band) in a 16-bit linear
// (lin_*), a 9-bit logarithmic (log_*) and a 10-bit floating-point (flt_*) number format.
// They share only the clock and reset; each has its own sample handshake, amplifier
// settings, coefficient write port and output. Comparing their switching activity on the
// same signal is the point of having all three; see channel_lin, channel_log and
// channel_float for the interface of each, and ha_pkg for the number formats.
//
// The fourth unit (mr_*) is the whole multirate hearing aid built from the same linear
// blocks: six channels at 32, 16, ..., 1 kS/s joined by decimating and interpolating
// lowpass filters, with equalisation delays (see multirate_lin). Its per-channel amplifier
// settings are arrays indexed by level, 0 being the 4-8 kHz channel.
module hearing_aid_top
  import ha_pkg::*;
#(
  parameter int  N      = NTAPS,
  parameter real P_INIT = 0.5,
  parameter int  NCH    = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // linear channel
  input  lin_t                 lin_din,
  output logic                 lin_din_en,
  input  logic [14:0]          lin_thr,
  input  logic [15:0]          lin_a,
  input  logic [15:0]          lin_b,
  input  logic [15:0]          lin_p,
  input  logic [1:0]           lin_coef_we,
  input  logic [$clog2(N)-1:0] lin_coef_addr,
  input  lin_t                 lin_coef_data,
  output lin_t                 lin_dout,
  output logic                 lin_dout_valid,
  // logarithmic channel
  input  log9_t                log_din,
  output logic                 log_din_en,
  input  logic [7:0]           log_thr,
  input  logic signed [9:0]    log_a,
  input  logic signed [9:0]    log_b,
  input  logic [7:0]           log_p,
  input  logic [1:0]           log_coef_we,
  input  logic [$clog2(N)-1:0] log_coef_addr,
  input  log9_t                log_coef_data,
  output log9_t                log_dout,
  output logic                 log_dout_valid,
  // floating-point channel
  input  fp10_t                flt_din,
  output logic                 flt_din_en,
  input  fpmag_t               flt_thr,
  input  fpmag_t               flt_a,
  input  fpmag_t               flt_b,
  input  logic                 flt_lut_we,
  input  logic                 flt_lut_sel,
  input  logic [3:0]           flt_lut_addr,
  input  logic [12:0]          flt_lut_wdata,
  input  logic [1:0]           flt_coef_we,
  input  logic [$clog2(N)-1:0] flt_coef_addr,
  input  fp10_t                flt_coef_data,
  output fp10_t                flt_dout,
  output logic                 flt_dout_valid,
  // multirate hearing aid, linear representation
  input  lin_t                 mr_din,
  output logic                 mr_din_en,
  input  logic [14:0]          mr_thr [NCH],
  input  logic [15:0]          mr_a   [NCH],
  input  logic [15:0]          mr_b   [NCH],
  input  logic [15:0]          mr_p   [NCH],
  input  logic                 mr_bp_we,
  input  logic                 mr_lp_we,
  input  logic [$clog2(N)-1:0] mr_coef_addr,
  input  lin_t                 mr_coef_data,
  output lin_t                 mr_dout,
  output logic                 mr_dout_valid
);

  channel_lin #(.N(N)) u_lin (
    .clk, .rst_n, .din(lin_din), .din_en(lin_din_en),
    .t(lin_thr), .a_gain(lin_a), .b_gain(lin_b), .p(lin_p),
    .coef_we(lin_coef_we), .coef_addr(lin_coef_addr), .coef_data(lin_coef_data),
    .dout(lin_dout), .dout_valid(lin_dout_valid));

  channel_log #(.N(N)) u_log (
    .clk, .rst_n, .din(log_din), .din_en(log_din_en),
    .t_l(log_thr), .a_l(log_a), .b_l(log_b), .p(log_p),
    .coef_we(log_coef_we), .coef_addr(log_coef_addr), .coef_data(log_coef_data),
    .dout(log_dout), .dout_valid(log_dout_valid));

  channel_float #(.N(N), .P_INIT(P_INIT)) u_flt (
    .clk, .rst_n, .din(flt_din), .din_en(flt_din_en),
    .t_f(flt_thr), .a_f(flt_a), .b_f(flt_b),
    .lut_we(flt_lut_we), .lut_sel(flt_lut_sel), .lut_addr(flt_lut_addr),
    .lut_wdata(flt_lut_wdata),
    .coef_we(flt_coef_we), .coef_addr(flt_coef_addr), .coef_data(flt_coef_data),
    .dout(flt_dout), .dout_valid(flt_dout_valid));

  multirate_lin #(.N(N), .NCH(NCH)) u_mr (
    .clk, .rst_n, .din(mr_din), .din_en(mr_din_en),
    .thr(mr_thr), .a_gain(mr_a), .b_gain(mr_b), .p(mr_p),
    .bp_we(mr_bp_we), .lp_we(mr_lp_we), .coef_addr(mr_coef_addr), .coef_data(mr_coef_data),
    .dout(mr_dout), .dout_valid(mr_dout_valid));

endmodule
