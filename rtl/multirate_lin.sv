// multirate_lin: the complete multirate hearing aid, NCH channels, in the 16-bit linear
// representation.
//
// The input at the full rate (32 kS/s) feeds the highest channel directly and a chain of
// lowpass-filter-and-downsample-by-2 stages, so each lower channel runs at half the rate of
// the one above it. Every channel is an equalisation delay, a band-pass FIR, the compressive
// amplifier and a second band-pass FIR. All channels use the same band-pass coefficients: at
// half the sample rate the same filter passes the octave below. On the way back, each
// channel's output is added to the upsampled sum of the channels below it; upsampling is
// zero insertion followed by a lowpass FIR at the higher rate and a gain of 2. All lowpass
// filters share one coefficient set as well. Level d (0..NCH-1) runs at 32/2^d kS/s: level 0
// is the 4-8 kHz channel, level NCH-1 the 125-250 Hz channel.
//
// Scheduling: a frame controller divides time into frames of N+4 cycles, one per input
// sample. At the start of a frame (tick) it requests an input sample (din_en) and starts
// every block whose level is due: level d blocks run when the frame number is a multiple of
// 2^d; a decimating and an interpolating lowpass filter between levels d-1 and d run at the
// rate of level d-1. Each block reads the outputs its neighbours hold from earlier frames,
// so all blocks of a frame work in parallel and every block adds one step of its own rate
// to the delay. The equalisation depths are chosen so that, with those steps and the
// group delay of (N-1)/2 samples of each FIR, every channel reaches its adder with the same
// delay; for N = 21 and six channels they are 1426, 690, 322, 138, 46 and 0 samples and the
// whole system delays the signal by LAT = 1450 frames.
//
// Follows the document: the channel and rate structure, 21-tap lowpass filters used for
// both decimation and interpolation, identical band-pass filters in every channel and
// circular delay buffers for equalisation. This design's own: the frame schedule, the
// delay depths (derived from the schedule), the gain of 2 after interpolation (saturating),
// saturating adders, and coefficient write ports (bp_we for all band-pass filters, lp_we
// for all lowpass filters). Only the linear representation is built as a full system.
//
// Interface: din is taken on the cycle din_en is high (once per frame); thr, a_gain,
// b_gain and p are per-level amplifier settings (index 0 = highest band) in the formats of
// nla_lin; dout is valid for one frame after each dout_valid pulse, which starts once
// the output reflects input sample 0.
module multirate_lin
  import ha_pkg::*;
#(
  parameter int N   = NTAPS,
  parameter int NCH = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  lin_t                 din,
  output logic                 din_en,
  input  logic [14:0]          thr    [NCH],
  input  logic [15:0]          a_gain [NCH],
  input  logic [15:0]          b_gain [NCH],
  input  logic [15:0]          p      [NCH],
  input  logic                 bp_we,
  input  logic                 lp_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  lin_t                 coef_data,
  output lin_t                 dout,
  output logic                 dout_valid
);

  localparam int G = (N - 1) / 2;          // group delay of one FIR, in its own samples
  localparam int F = N + 4;                // cycles per frame

  // delay of the level-d input relative to the system input, in frames
  function automatic int lag(int d);
    return (G + 1) * ((1 << d) - 1);
  endfunction

  // delay, in frames, at which channel d must reach its adder
  function automatic int ch_lag(int d);
    int l;
    l = lag(NCH - 1) + (2 * G + 4) * (1 << (NCH - 1));
    for (int k = NCH - 2; k >= d; k--) l += (G + 1) * (1 << k);
    return l;
  endfunction

  function automatic int eq_depth(int d);
    return (ch_lag(d) - lag(d)) / (1 << d) - (2 * G + 4);
  endfunction

  localparam int LAT = ch_lag(0);

  function automatic lin_t sat_add(lin_t a, lin_t b);
    logic signed [16:0] s;
    s = 17'(a) + 17'(b);
    if (s > 17'sd32767)       return 16'sd32767;
    else if (s < -17'sd32768) return -16'sd32768;
    else                      return s[15:0];
  endfunction

  // ---------------- frame controller ----------------
  logic [$clog2(F)-1:0]  cyc;
  logic                  tick;
  logic [NCH-2:0]        fcnt;
  logic [NCH-1:0]        act;             // level d due in this frame
  logic [$clog2(LAT+1)-1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc  <= $bits(cyc)'(F - 1);
      tick <= 1'b0;
    end else begin
      cyc  <= (cyc == $bits(cyc)'(F - 1)) ? '0 : cyc + 1'b1;
      tick <= (cyc == $bits(cyc)'(F - 1));
    end
  end

  for (genvar d = 0; d < NCH; d++) begin : g_act
    assign act[d] = ~|(fcnt & (NCH-1)'((1 << d) - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fcnt <= '0;
    end else if (tick) begin
      fcnt <= fcnt + 1'b1;
    end
  end

  assign din_en = tick;

  // ---------------- datapath ----------------
  lin_t lev  [NCH];      // input signal of each level
  lin_t eqo  [NCH];
  lin_t bp1o [NCH];
  lin_t nlao [NCH];
  lin_t bp2o [NCH];
  lin_t sum  [NCH];      // channel d plus everything below it
  lin_t up   [1:NCH-1];  // interpolated sum of level d and below, at the rate of level d-1

  assign lev[0] = din;

  for (genvar d = 0; d < NCH; d++) begin : g_ch
    logic go;
    logic b1_busy;
    assign go = tick && act[d];

    eq_delay #(.W(16), .DEPTH(eq_depth(d))) u_eq (
      .clk, .rst_n, .en(go), .din(lev[d]), .dout(eqo[d]));

    fir_lin #(.N(N)) u_bp1 (
      .clk, .rst_n, .din_en(go), .din(eqo[d]),
      .coef_we(bp_we), .coef_addr, .coef_data,
      .busy(b1_busy), .dout_en(), .dout(bp1o[d]), .clipped());

    nla_lin u_nla (
      .clk, .rst_n, .din_en(go), .din(bp1o[d]),
      .t(thr[d]), .a_gain(a_gain[d]), .b_gain(b_gain[d]), .p(p[d]),
      .dout_en(), .dout(nlao[d]));

    fir_lin #(.N(N)) u_bp2 (
      .clk, .rst_n, .din_en(go), .din(nlao[d]),
      .coef_we(bp_we), .coef_addr, .coef_data,
      .busy(), .dout_en(), .dout(bp2o[d]), .clipped());

    if (d == NCH - 1) begin : g_last
      assign sum[d] = bp2o[d];
    end else begin : g_add
      assign sum[d] = sat_add(bp2o[d], up[d+1]);
    end

    if (d > 0) begin : g_rate
      lin_t ip_o;
      logic go_hi;
      assign go_hi = tick && act[d-1];

      // lowpass filter at the rate of level d-1; level d takes every second output
      fir_lin #(.N(N)) u_dec (
        .clk, .rst_n, .din_en(go_hi), .din(lev[d-1]),
        .coef_we(lp_we), .coef_addr, .coef_data,
        .busy(), .dout_en(), .dout(lev[d]), .clipped());

      // zero insertion, lowpass filter at the rate of level d-1, gain 2
      fir_lin #(.N(N)) u_int (
        .clk, .rst_n, .din_en(go_hi), .din(act[d] ? sum[d] : '0),
        .coef_we(lp_we), .coef_addr, .coef_data,
        .busy(), .dout_en(), .dout(ip_o), .clipped());

      assign up[d] = sat_add(ip_o, ip_o);
    end
  end

  // ---------------- output ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
      fill       <= '0;
    end else begin
      dout_valid <= 1'b0;
      if (tick) begin
        dout <= sum[0];
        if (fill == $bits(fill)'(LAT)) dout_valid <= 1'b1;
        else                           fill <= fill + 1'b1;
      end
    end
  end

  // every block due in a frame has finished before the next frame starts
  assert property (@(posedge clk) disable iff (!rst_n)
                   tick |-> !g_ch[0].b1_busy);

endmodule
