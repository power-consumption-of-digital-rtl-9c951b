// tb_multirate_lin: end-to-end test of the six-channel multirate hearing aid (linear format).
//
// All band-pass filters get the 4-8 kHz band-pass coefficients and all lowpass filters a
// 21-tap lowpass with cutoff 0.3*pi; every amplifier gets t = 0.05, A = 2, p = 0.5 and
// B = A*t^(1-p). A speech-like signal (after a short silence that covers the coefficient
// loading) with one tone in each band is fed through the sample handshake.
//
// The reference (tb_ha_util::mr_model) is a real-valued model that runs the same frame
// schedule: in each frame the blocks due at each level read what their neighbours held
// from earlier frames. The RTL output must follow it to within 0.02 per sample and 40 dB
// overall.
//
// A second run of the model, with every amplifier linear and an impulse at the input,
// checks the equalisation depths: with the channels aligned, the largest output must
// appear exactly LAT = 1450 frames after the impulse.
//
// Also checked: one input request every NTAPS+4 cycles, the first dout_valid after exactly
// LAT frames, both amplifier regions used on every level, and every equalisation buffer
// wrapped at least once.
module tb_multirate_lin;
  import ha_pkg::*;
  import tb_ha_util::*;
  localparam int N    = NTAPS;
  localparam int NCH  = 6;
  localparam int LAT  = 1450;
  localparam int NS   = 4000;
  localparam int SIL  = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lin_t                 din, dout, coef_data;
  logic                 din_en, dout_valid, bp_we, lp_we;
  logic [14:0]          thr    [NCH];
  logic [15:0]          a_gain [NCH];
  logic [15:0]          b_gain [NCH];
  logic [15:0]          p      [NCH];
  logic [$clog2(N)-1:0] coef_addr;

  multirate_lin dut (.*);

  mr_model m = new();

  // ---------------- stimulus ----------------
  lin_t xs [NS];
  real  got [$];
  int   j = 0, frames = 0, first_valid = -1;
  int   n_lin [NCH], n_cmp [NCH];
  time  last_en = 0;

  assign din = xs[(j < NS) ? j : NS - 1];

  always @(posedge clk) if (rst_n && din_en) j <= j + 1;

  always @(negedge clk) begin
    if (rst_n && din_en) begin
      frames++;
      if (last_en != 0) begin
        checks++;
        if ($time - last_en != 10 * (N + 4)) begin
          failures++; $display("FAIL frame interval %0t", $time - last_en);
        end
      end
      last_en = $time;
    end
    if (dout_valid) begin
      if (first_valid < 0) first_valid = frames;
      got.push_back(lin_real(dout));
    end
  end

  // amplifier region use on every level
  always @(negedge clk) begin
    if (dut.g_ch[0].u_nla.en_q) begin if (dut.g_ch[0].u_nla.sel_q) n_cmp[0]++; else n_lin[0]++; end
    if (dut.g_ch[1].u_nla.en_q) begin if (dut.g_ch[1].u_nla.sel_q) n_cmp[1]++; else n_lin[1]++; end
    if (dut.g_ch[2].u_nla.en_q) begin if (dut.g_ch[2].u_nla.sel_q) n_cmp[2]++; else n_lin[2]++; end
    if (dut.g_ch[3].u_nla.en_q) begin if (dut.g_ch[3].u_nla.sel_q) n_cmp[3]++; else n_lin[3]++; end
    if (dut.g_ch[4].u_nla.en_q) begin if (dut.g_ch[4].u_nla.sel_q) n_cmp[4]++; else n_lin[4]++; end
    if (dut.g_ch[5].u_nla.en_q) begin if (dut.g_ch[5].u_nla.sel_q) n_cmp[5]++; else n_lin[5]++; end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real h [$], ref_out [NS], e, worst, peak;
    int  at;
    for (int d = 0; d < NCH; d++) begin n_lin[d] = 0; n_cmp[d] = 0; end
    for (int i = 0; i < NS; i++) xs[i] = (i < SIL) ? '0 : to_lin(wide_signal(i));
    for (int d = 0; d < NCH; d++) begin
      thr[d] = 15'd1638; a_gain[d] = 16'd512; p[d] = 16'd8192;      // 0.05, 2.0, 0.5
      b_gain[d] = 16'($rtoi($floor(2.0 * $pow(0.05, 0.5) * 256.0 + 0.5)));
    end
    bp_we = 1'b0; lp_we = 1'b0; coef_addr = '0; coef_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < N; k++) begin
      lin_t q;
      q = to_lin(bp_coef(k, N));
      m.cb[k] = lin_real(q);
      @(negedge clk);
      bp_we = 1'b1; lp_we = 1'b0; coef_addr = k[$clog2(N)-1:0]; coef_data = q;
    end
    for (int k = 0; k < N; k++) begin
      lin_t q;
      q = to_lin(lp_coef(k, N));
      m.cl[k] = lin_real(q);
      @(negedge clk);
      bp_we = 1'b0; lp_we = 1'b1; coef_addr = k[$clog2(N)-1:0]; coef_data = q;
    end
    @(negedge clk);
    lp_we = 1'b0;

    // equalisation: impulse through the all-linear model
    m.t = 1.0; m.a = 1.0; m.b = 1.0; m.p = 1.0;
    m.reset();
    for (int i = 0; i < 64 + LAT + 200; i++) h.push_back(m.step((i == 64) ? 0.5 : 0.0));
    peak = 0.0; at = -1;
    for (int i = 64 + LAT - 150; i < 64 + LAT + 150; i++) begin
      real v;
      v = (h[i] < 0.0) ? -h[i] : h[i];
      if (v > peak) begin peak = v; at = i - 64; end
    end
    checks++;
    if (at != LAT) begin failures++; $display("FAIL impulse peak at %0d frames, expected %0d", at, LAT); end

    // reference for the RTL run
    m.t = real'(thr[0]) / 32768.0; m.a = real'(a_gain[0]) / 256.0;
    m.b = real'(b_gain[0]) / 256.0; m.p = real'(p[0]) / 16384.0;
    m.reset();
    for (int i = 0; i < NS; i++) ref_out[i] = m.step(lin_real(xs[i]));

    wait (j >= NS);
    @(negedge clk);
    checks++;
    if (first_valid != LAT + 1) begin
      failures++; $display("FAIL first output in frame %0d, expected %0d", first_valid, LAT + 1);
    end
    worst = 0.0;
    begin
      real r [$], g [$];
      foreach (got[i]) begin
        if (LAT + i >= NS) break;
        e = got[i] - ref_out[LAT + i];
        if (e < 0) e = -e;
        if (e > worst) worst = e;
        checks++;
        if (e > 0.02) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d: %f expected %f", i, got[i], ref_out[LAT + i]);
        end
        r.push_back(ref_out[LAT + i]);
        g.push_back(got[i]);
      end
      checks++;
      if (ser_db(r, g) < 40.0) begin failures++; $display("FAIL signal-to-error %0.1f dB", ser_db(r, g)); end
      $display("outputs %0d, signal-to-error %0.1f dB, worst error %g", g.size(), ser_db(r, g), worst);
    end
    for (int d = 0; d < NCH; d++) begin
      checks++;
      if (n_lin[d] == 0 || n_cmp[d] == 0) begin
        failures++; $display("FAIL level %0d: linear %0d compressed %0d", d, n_lin[d], n_cmp[d]);
      end
    end
    $display("amplifier linear/compressed per level: %0d/%0d %0d/%0d %0d/%0d %0d/%0d %0d/%0d %0d/%0d",
             n_lin[0], n_cmp[0], n_lin[1], n_cmp[1], n_lin[2], n_cmp[2],
             n_lin[3], n_cmp[3], n_lin[4], n_cmp[4], n_lin[5], n_cmp[5]);
    checks++;
    if (!(dut.g_ch[0].u_eq.g_buf.full && dut.g_ch[1].u_eq.g_buf.full && dut.g_ch[2].u_eq.g_buf.full &&
          dut.g_ch[3].u_eq.g_buf.full && dut.g_ch[4].u_eq.g_buf.full)) begin
      failures++; $display("FAIL an equalisation buffer never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
