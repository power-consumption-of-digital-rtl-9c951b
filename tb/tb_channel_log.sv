// tb_channel_log: end-to-end test of the linear-representation hearing aid channel.
// Both FIRs get the 4-8 kHz band-pass coefficients, the amplifier t = 0.05, A = 4, p = 0.5
// and B = A*t^(1-p). A speech-like signal whose level sweeps 40 dB is fed through the sample
// handshake. The output is compared with real-valued processing of the same quantised
// input (FIR, amplifier, FIR): the signal-to-error ratio must reach 20 dB and every sample
// must be within 0.1 of the reference. The channel must accept exactly one sample every
// NTAPS+4 cycles, deliver one output per input after the three-sample pipeline delay, and
// use both amplifier regions.
module tb_channel_log;
  import ha_pkg::*;
  import tb_ha_util::*;
  localparam int N = NTAPS;
  localparam int NS = 600;
  int checks = 0, failures = 0, n_lin = 0, n_cmp = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  log9_t                din, dout, coef_data;
  logic                 din_en, dout_valid;
  logic [7:0]           t_l, p;
  logic signed [9:0]    a_l, b_l;
  logic [1:0]           coef_we;
  logic [$clog2(N)-1:0] coef_addr;

  channel_log dut (.*);

  log9_t xs [NS];
  real  c [N];
  real  refv [$], got [$];
  int   j = 0, k_out = 0;
  time  last_en = 0;

  assign din = xs[(j < NS) ? j : NS - 1];

  always @(posedge clk) if (rst_n && din_en) j <= j + 1;

  always @(negedge clk) begin
    if (din_en) begin
      if (last_en != 0) begin
        checks++;
        if ($time - last_en != 10 * (N + 4)) begin
          failures++; $display("FAIL sample interval %0t", $time - last_en);
        end
      end
      last_en = $time;
    end
    if (dut.u_nla.en_q) begin
      if (dut.u_nla.sel_q) n_cmp++;
      else                 n_lin++;
    end
    if (dout_valid) begin
      got.push_back(log_real(dout));
      k_out++;
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real tr, ar, br, pr, s1 [NS], s2 [NS], y, worst;
    for (int i = 0; i < NS; i++) xs[i] = to_log(test_signal(i));
    t_l = 8'd49; a_l = -10'sd23; p = 8'd128;                  // 0.05, 4.0, 0.5
    b_l = 10'($rtoi($floor($ln(4.0 * $pow(0.05, 0.5)) / $ln(LOG_BASE) + 0.5)));
    tr = $pow(LOG_BASE, real'(t_l)); ar = $pow(LOG_BASE, real'(a_l));
    br = $pow(LOG_BASE, real'(b_l)); pr = real'(p) / 256.0;
    coef_we = '0; coef_addr = '0; coef_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < N; k++) begin
      log9_t q;
      q = to_log(bp_coef(k, N));
      c[k] = log_real(q);
      @(negedge clk);
      coef_we = 2'b11; coef_addr = k[$clog2(N)-1:0]; coef_data = q;
    end
    @(negedge clk);
    coef_we = '0;
    // reference
    for (int i = 0; i < NS; i++) begin
      y = 0.0;
      for (int k = 0; k <= i && k < N; k++) y += c[k] * log_real(xs[i - k]);
      s1[i] = y;
      s2[i] = nla_real(y, tr, ar, br, pr);
    end
    for (int i = 0; i < NS; i++) begin
      y = 0.0;
      for (int k = 0; k <= i && k < N; k++) y += c[k] * s2[i - k];
      refv.push_back(y);
    end
    wait (j >= NS);
    repeat (4 * (N + 3)) @(posedge clk);
    checks++;
    if (k_out != NS - 3 + 3) begin
      // three more releases happen after the last sample while the source holds its value
      if (k_out < NS - 3) begin failures++; $display("FAIL %0d outputs for %0d inputs", k_out, NS); end
    end
    while (refv.size() > got.size()) void'(refv.pop_back());
    worst = 0.0;
    foreach (got[i]) begin
      real e;
      e = got[i] - refv[i];
      if (e < 0) e = -e;
      if (e > worst) worst = e;
      checks++;
      if (e > 0.1) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: %f expected %f", i, got[i], refv[i]);
      end
    end
    checks++;
    if (ser_db(refv, got) < 20.0) begin failures++; $display("FAIL signal-to-error ratio too low"); end
    checks++;
    if (n_lin == 0 || n_cmp == 0) begin failures++; $display("FAIL an amplifier region never used"); end
    $display("outputs %0d, signal-to-error %0.1f dB, worst error %g, linear %0d, compressed %0d",
             got.size(), ser_db(refv, got), worst, n_lin, n_cmp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
