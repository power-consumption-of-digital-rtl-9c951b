// tb_speech_3s: the hearing aid on a three-second signal.
//
// The evaluation input of the channel is three seconds of speech sampled at 32 kS/s, that
// is 96,000 samples. This test streams that many samples of the speech-like test signal
// (tones under a level envelope sweeping 40 dB, see tb_ha_util) through all three channels
// and the six-channel multirate unit at their default size, with the same settings,
// reference models and checks as tb_hearing_aid_top: per-sample tolerance, signal-to-error
// ratio, sample interval of NTAPS+4 cycles and the mechanism counts. Recorded speech is not
// available, so the synthetic signal stands in for it.
module tb_speech_3s;
  import ha_pkg::*;
  import tb_ha_util::*;
  localparam int N  = NTAPS;
  localparam int NS = 96000;
  localparam int NCH = 6;
  localparam int LAT = 1450;     // frames from multirate input to output
  localparam int SIL = 8;        // silent frames at the start of the multirate input
  localparam int BURST = 48000;  // the full-scale burst ends here

  int checks = 0, failures = 0;
  int n_lin_l = 0, n_lin_c = 0, n_log_l = 0, n_log_c = 0, n_flt_l = 0, n_flt_c = 0;
  int n_clip = 0, n_lut = 0, n_bypass = 0, n_align = 0, n_lut_wr = 0, n_wait = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lin_t                 lin_din, lin_coef_data, lin_dout;
  logic                 lin_din_en, lin_dout_valid;
  logic [14:0]          lin_thr;
  logic [15:0]          lin_a, lin_b, lin_p;
  logic [1:0]           lin_coef_we;
  logic [$clog2(N)-1:0] lin_coef_addr;
  log9_t                log_din, log_coef_data, log_dout;
  logic                 log_din_en, log_dout_valid;
  logic [7:0]           log_thr, log_p;
  logic signed [9:0]    log_a, log_b;
  logic [1:0]           log_coef_we;
  logic [$clog2(N)-1:0] log_coef_addr;
  fp10_t                flt_din, flt_coef_data, flt_dout;
  logic                 flt_din_en, flt_dout_valid;
  fpmag_t               flt_thr, flt_a, flt_b;
  logic                 flt_lut_we, flt_lut_sel;
  logic [3:0]           flt_lut_addr;
  logic [12:0]          flt_lut_wdata;
  logic [1:0]           flt_coef_we;
  logic [$clog2(N)-1:0] flt_coef_addr;
  lin_t                 mr_din, mr_coef_data, mr_dout;
  logic                 mr_din_en, mr_dout_valid, mr_bp_we, mr_lp_we;
  logic [14:0]          mr_thr [NCH];
  logic [15:0]          mr_a [NCH], mr_b [NCH], mr_p [NCH];
  logic [$clog2(N)-1:0] mr_coef_addr;

  hearing_aid_top dut (.*);

  real   xr [NS];
  lin_t  x_lin [NS];
  log9_t x_log [NS];
  fp10_t x_flt [NS];
  lin_t  x_mr [NS];
  real   got_mr [$];
  int    j_mr = 0, n_mr_l [NCH], n_mr_c [NCH], n_eq_wrap = 0;
  time   last_mr = 0;
  mr_model mr = new();
  real   c_lin [N], c_log [N], c_flt [N];
  real   got_lin [$], got_log [$], got_flt [$];
  int    j_lin = 0, j_log = 0, j_flt = 0;
  time   last_lin = 0, last_log = 0, last_flt = 0;

  assign lin_din = x_lin[(j_lin < NS) ? j_lin : NS - 1];
  assign log_din = x_log[(j_log < NS) ? j_log : NS - 1];
  assign flt_din = x_flt[(j_flt < NS) ? j_flt : NS - 1];
  assign mr_din  = x_mr[(j_mr < NS) ? j_mr : NS - 1];

  always @(posedge clk) begin
    if (rst_n && lin_din_en) j_lin <= j_lin + 1;
    if (rst_n && log_din_en) j_log <= j_log + 1;
    if (rst_n && flt_din_en) j_flt <= j_flt + 1;
    if (rst_n && mr_din_en)  j_mr  <= j_mr + 1;
  end

  task automatic check_interval(logic en, inout time last);
    if (en) begin
      if (last != 0) begin
        checks++;
        if ($time - last != 10 * (N + 4)) begin
          failures++; $display("FAIL sample interval %0t", $time - last);
        end
      end
      last = $time;
    end
  endtask

  always @(negedge clk) begin
    check_interval(lin_din_en, last_lin);
    check_interval(log_din_en, last_log);
    check_interval(flt_din_en, last_flt);
    check_interval(mr_din_en, last_mr);
    if (dut.u_mr.g_ch[0].u_nla.en_q) begin if (dut.u_mr.g_ch[0].u_nla.sel_q) n_mr_c[0]++; else n_mr_l[0]++; end
    if (dut.u_mr.g_ch[1].u_nla.en_q) begin if (dut.u_mr.g_ch[1].u_nla.sel_q) n_mr_c[1]++; else n_mr_l[1]++; end
    if (dut.u_mr.g_ch[2].u_nla.en_q) begin if (dut.u_mr.g_ch[2].u_nla.sel_q) n_mr_c[2]++; else n_mr_l[2]++; end
    if (dut.u_mr.g_ch[3].u_nla.en_q) begin if (dut.u_mr.g_ch[3].u_nla.sel_q) n_mr_c[3]++; else n_mr_l[3]++; end
    if (dut.u_mr.g_ch[4].u_nla.en_q) begin if (dut.u_mr.g_ch[4].u_nla.sel_q) n_mr_c[4]++; else n_mr_l[4]++; end
    if (dut.u_mr.g_ch[5].u_nla.en_q) begin if (dut.u_mr.g_ch[5].u_nla.sel_q) n_mr_c[5]++; else n_mr_l[5]++; end
    // the highest channel's equalisation buffer starts its second round
    if (dut.u_mr.g_ch[0].u_eq.g_buf.full && dut.u_mr.g_ch[0].u_eq.g_buf.ptr == '0 &&
        dut.u_mr.g_ch[0].go) n_eq_wrap++;
    if (mr_dout_valid) got_mr.push_back(lin_real(mr_dout));
    if (dut.u_lin.u_nla.en_q) begin if (dut.u_lin.u_nla.sel_q) n_lin_c++; else n_lin_l++; end
    if (dut.u_log.u_nla.en_q) begin if (dut.u_log.u_nla.sel_q) n_log_c++; else n_log_l++; end
    if (dut.u_flt.u_nla.en_q) begin if (dut.u_flt.u_nla.sel_q) n_flt_c++; else n_flt_l++; end
    if (dut.u_lin.u_fir1.dout_en && dut.u_lin.u_fir1.clipped) n_clip++;
    if (dut.u_log.u_fir1.lut_used || dut.u_log.u_fir2.lut_used) n_lut++;
    if (dut.u_log.u_fir1.bypass || dut.u_log.u_fir2.bypass) n_bypass++;
    if (dut.u_flt.u_fir1.align || dut.u_flt.u_fir2.align) n_align++;
    if (flt_lut_we) n_lut_wr++;
    // the amplifier has reported, a filter is still running
    if (dut.u_lin.u_ctrl.seen == 3'b010 && dut.u_lin.u_fir1.busy) n_wait++;
    if (lin_dout_valid) got_lin.push_back(lin_real(lin_dout));
    if (log_dout_valid) got_log.push_back(log_real(log_dout));
    if (flt_dout_valid) got_flt.push_back(fp_real(flt_dout));
  end

  function automatic real clip1(real v);
    if (v > 1.0) return 1.0;
    if (v < -1.0) return -1.0;
    return v;
  endfunction

  // FIR, amplifier, FIR on real values; the result has one entry per input sample
  function automatic void chain(input real xq [NS], input real c [N], input real t, a, b, p,
                                output real y [NS]);
    real s2 [NS];
    for (int i = 0; i < NS; i++) begin
      real s;
      s = 0.0;
      for (int k = 0; k <= i && k < N; k++) s += c[k] * xq[i - k];
      s2[i] = nla_real(clip1(s), t, a, b, p);
    end
    for (int i = 0; i < NS; i++) begin
      real s;
      s = 0.0;
      for (int k = 0; k <= i && k < N; k++) s += c[k] * s2[i - k];
      y[i] = clip1(s);
    end
  endfunction

  task automatic compare(string name, real got [$], real refv [NS], real min_db, real tol);
    real r [$], db;
    checks++;
    if (got.size() < NS - 3) begin
      failures++; $display("FAIL %s: %0d outputs for %0d inputs", name, got.size(), NS);
    end
    while (got.size() > NS) void'(got.pop_back());
    for (int i = 0; i < got.size(); i++) begin
      real e;
      r.push_back(refv[i]);
      e = got[i] - refv[i];
      checks++;
      if (e > tol || e < -tol) begin
        failures++;
        if (failures < 10) $display("FAIL %s sample %0d: %f expected %f", name, i, got[i], refv[i]);
      end
    end
    db = ser_db(r, got);
    checks++;
    if (db < min_db) begin failures++; $display("FAIL %s: signal-to-error %0.1f dB", name, db); end
    $display("%s channel: %0d outputs, signal-to-error %0.1f dB", name, got.size(), db);
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real   xq [NS], y [NS];
    fp_lut_t m_lut, e_lut;
    // ---- input signal, with a full-scale burst matched to the coefficient signs ----
    for (int i = 0; i < NS; i++) xr[i] = test_signal(i);
    for (int i = BURST - N + 1; i <= BURST; i++)
      xr[i] = (bp_coef(BURST - i, N) < 0) ? -0.99 : 0.99;
    for (int i = 0; i < NS; i++) x_mr[i] = (i < SIL) ? '0 : to_lin(wide_signal(i));
    for (int d = 0; d < NCH; d++) begin
      n_mr_l[d] = 0; n_mr_c[d] = 0;
      mr_thr[d] = 15'd1638; mr_a[d] = 16'd512; mr_p[d] = 16'd8192;   // 0.05, 2.0, 0.5
      mr_b[d] = 16'($rtoi($floor(2.0 * $pow(0.05, 0.5) * 256.0 + 0.5)));
    end
    mr_bp_we = 1'b0; mr_lp_we = 1'b0; mr_coef_addr = '0; mr_coef_data = '0;
    for (int i = 0; i < NS; i++) begin
      x_lin[i] = to_lin(xr[i]);
      x_log[i] = to_log(xr[i]);
      x_flt[i] = to_fp(xr[i]);
    end
    // ---- amplifier settings: t = 0.05, A = 4, p = 0.25, B = A*t^0.75 ----
    lin_thr = 15'd1638; lin_a = 16'd1024; lin_p = 16'd4096;
    lin_b   = 16'($rtoi($floor(4.0 * $pow(0.05, 0.75) * 256.0 + 0.5)));
    log_thr = 8'd49; log_a = -10'sd23; log_p = 8'd64;
    log_b   = 10'($rtoi($floor($ln(4.0 * $pow(0.05, 0.75)) / $ln(LOG_BASE) + 0.5)));
    flt_thr = '{exp: 4'd11, mant: 5'd26};
    flt_a   = '{exp: 4'd10, mant: 5'd16};
    flt_b   = '{exp: 4'd6, mant: 5'd27};
    lin_coef_we = '0; lin_coef_addr = '0; lin_coef_data = '0;
    log_coef_we = '0; log_coef_addr = '0; log_coef_data = '0;
    flt_coef_we = '0; flt_coef_addr = '0; flt_coef_data = '0;
    flt_lut_we = 0; flt_lut_sel = 0; flt_lut_addr = '0; flt_lut_wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // ---- coefficients and float tables ----
    m_lut = fp_mant_lut(0.25);
    e_lut = fp_exp_lut(0.25);
    for (int k = 0; k < 2 * N; k++) begin
      @(negedge clk);
      mr_bp_we = k < N; mr_lp_we = k >= N;
      mr_coef_addr = (k < N) ? k[$clog2(N)-1:0] : $clog2(N)'(k - N);
      mr_coef_data = to_lin((k < N) ? bp_coef(k, N) : lp_coef(k - N, N));
      if (k < N) mr.cb[k] = lin_real(mr_coef_data);
      else       mr.cl[k - N] = lin_real(mr_coef_data);
      if (k < N) begin
        lin_coef_we = 2'b11; lin_coef_addr = k[$clog2(N)-1:0]; lin_coef_data = to_lin(bp_coef(k, N));
        log_coef_we = 2'b11; log_coef_addr = k[$clog2(N)-1:0]; log_coef_data = to_log(bp_coef(k, N));
        flt_coef_we = 2'b11; flt_coef_addr = k[$clog2(N)-1:0]; flt_coef_data = to_fp(bp_coef(k, N));
        c_lin[k] = lin_real(lin_coef_data);
        c_log[k] = log_real(log_coef_data);
        c_flt[k] = fp_real(flt_coef_data);
      end else begin
        lin_coef_we = '0; log_coef_we = '0; flt_coef_we = '0;
      end
      flt_lut_we = k < 32; flt_lut_sel = k[4]; flt_lut_addr = k[3:0];
      flt_lut_wdata = k[4] ? e_lut[k[3:0]] : m_lut[k[3:0]];
    end
    @(negedge clk);
    flt_lut_we = 1'b0; mr_bp_we = 1'b0; mr_lp_we = 1'b0;
    wait (j_lin >= NS && j_log >= NS && j_flt >= NS && j_mr >= NS);
    repeat (4 * (N + 4)) @(posedge clk);
    // ---- references and comparison ----
    for (int i = 0; i < NS; i++) xq[i] = lin_real(x_lin[i]);
    chain(xq, c_lin, real'(lin_thr) / 32768.0, real'(lin_a) / 256.0, real'(lin_b) / 256.0, 0.25, y);
    compare("linear", got_lin, y, 45.0, 0.01);
    for (int i = 0; i < NS; i++) xq[i] = log_real(x_log[i]);
    chain(xq, c_log, $pow(LOG_BASE, real'(log_thr)), $pow(LOG_BASE, real'(log_a)),
          $pow(LOG_BASE, real'(log_b)), 0.25, y);
    compare("log", got_log, y, 20.0, 0.15);
    for (int i = 0; i < NS; i++) xq[i] = fp_real(x_flt[i]);
    chain(xq, c_flt, fpmag_real(flt_thr, FP_BIAS), fpmag_real(flt_a, FP_GAIN_BIAS),
          fpmag_real(flt_b, FP_GAIN_BIAS), 0.25, y);
    compare("float", got_flt, y, 20.0, 0.15);
    mr.a = 2.0; mr.b = real'(mr_b[0]) / 256.0; mr.p = 0.5;
    mr.t = real'(mr_thr[0]) / 32768.0;
    mr.reset();
    begin
      real r [$], g [$], yr [NS], db;
      for (int i = 0; i < NS; i++) yr[i] = mr.step(lin_real(x_mr[i]));
      for (int i = 0; i < got_mr.size() && LAT + i < NS; i++) begin
        real e;
        r.push_back(yr[LAT + i]);
        g.push_back(got_mr[i]);
        e = got_mr[i] - yr[LAT + i];
        checks++;
        if (e > 0.02 || e < -0.02) begin
          failures++;
          if (failures < 10) $display("FAIL multirate output %0d: %f expected %f", i, got_mr[i], yr[LAT + i]);
        end
      end
      db = ser_db(r, g);
      checks++;
      if (g.size() < NS - LAT - 1 || db < 40.0) begin
        failures++; $display("FAIL multirate: %0d outputs, signal-to-error %0.1f dB", g.size(), db);
      end
      $display("multirate: %0d outputs, signal-to-error %0.1f dB", g.size(), db);
    end
    // ---- mechanisms ----
    $display("amplifier linear/compressed: lin %0d/%0d, log %0d/%0d, float %0d/%0d",
             n_lin_l, n_lin_c, n_log_l, n_log_c, n_flt_l, n_flt_c);
    $display("linear FIR clipping %0d, log table reads %0d, log bypasses %0d, float alignments %0d",
             n_clip, n_lut, n_bypass, n_align);
    $display("float table writes %0d, controller waits for a filter %0d", n_lut_wr, n_wait);
    checks++;
    if (n_lin_l == 0 || n_lin_c == 0 || n_log_l == 0 || n_log_c == 0 || n_flt_l == 0 || n_flt_c == 0) begin
      failures++; $display("FAIL an amplifier region was never used");
    end
    checks++;
    if (n_clip == 0) begin failures++; $display("FAIL no clipping"); end
    checks++;
    if (n_lut == 0 || n_bypass == 0) begin failures++; $display("FAIL log table or bypass unused"); end
    checks++;
    if (n_align == 0) begin failures++; $display("FAIL no float alignment"); end
    checks++;
    if (n_lut_wr != 32) begin failures++; $display("FAIL table rewrite"); end
    $display("multirate amplifier linear/compressed per level: %0d/%0d %0d/%0d %0d/%0d %0d/%0d %0d/%0d %0d/%0d",
             n_mr_l[0], n_mr_c[0], n_mr_l[1], n_mr_c[1], n_mr_l[2], n_mr_c[2],
             n_mr_l[3], n_mr_c[3], n_mr_l[4], n_mr_c[4], n_mr_l[5], n_mr_c[5]);
    $display("multirate equalisation buffer wraps %0d", n_eq_wrap);
    for (int d = 0; d < NCH; d++) begin
      checks++;
      if (n_mr_l[d] == 0 || n_mr_c[d] == 0) begin
        failures++; $display("FAIL multirate level %0d amplifier region unused", d);
      end
    end
    checks++;
    if (n_eq_wrap == 0) begin failures++; $display("FAIL equalisation buffer never wrapped"); end
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL controller never waited"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
