// tb_fir_log: self-checking test of the logarithmic-representation FIR filter.
// The 21-tap 4-8 kHz band-pass coefficients and a tone-plus-noise signal are converted to
// 9-bit log codes (|v| = 0.941^code). The expected output of every sample is computed by a
// model of the log-domain multiply-accumulate written here from its definition: code
// addition for the product, and for the sum the larger term's code plus
// round(log_b(1 +- b^d)), evaluated with real arithmetic, when the code difference d is below
// 64, otherwise the larger term alone. Outputs must match exactly and arrive NTAPS+1 cycles
// after their inputs. The test also requires the table and its bypass to be used, and an
// exact cancellation to occur. As information it prints the signal-to-error ratio of the
// filter against real-valued filtering.
module tb_fir_log;
  import ha_pkg::*;
  localparam int N = NTAPS;
  int checks = 0, failures = 0;
  int n_lut = 0, n_bypass = 0, n_cancel = 0;
  real sig_pow = 0.0, err_pow = 0.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 din_en;
  log9_t                din;
  logic                 coef_we;
  logic [$clog2(N)-1:0] coef_addr;
  log9_t                coef_data;
  logic                 busy, dout_en, lut_used, bypass;
  log9_t                dout;

  fir_log dut (.*);

  log9_t c [N];
  log9_t hist [$];
  log9_t exp_q [$];
  real   ref_q [$];
  time   due_q [$];

  always @(negedge clk) begin
    if (lut_used) n_lut++;
    if (bypass)   n_bypass++;
    if (dout_en) begin
      log9_t e;
      real   r, got;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        r = ref_q.pop_front();
        if (due_q.pop_front() != $time) begin
          failures++; $display("FAIL latency at %0t", $time);
        end
        if (dout !== e) begin
          failures++;
          if (failures < 10) $display("FAIL dout=%0d/%0d expected %0d/%0d", dout.sign, dout.mag, e.sign, e.mag);
        end
        got = to_real(dout);
        sig_pow += r * r;
        err_pow += (got - r) * (got - r);
      end
    end
  end

  function automatic log9_t to_log(real v);
    log9_t r;
    real   a;
    int    code;
    a = (v < 0) ? -v : v;
    code = (a <= 0.0) ? 255 : $rtoi($floor($ln(a) / $ln(LOG_BASE) + 0.5));
    if (code < 0) code = 0;
    if (code > 255) code = 255;
    r.sign = v < 0;
    r.mag  = 8'(code);
    return r;
  endfunction

  function automatic real to_real(log9_t x);
    real a = $pow(LOG_BASE, real'(x.mag));
    return x.sign ? -a : a;
  endfunction

  // reference model of one output: returns {empty, sign, mag}
  function automatic log9_t model();
    logic  empty = 1'b1;
    log9_t acc = '0;
    for (int k = 0; k < N; k++) begin
      log9_t x, p, hi;
      int    m, d, corr, r;
      x = (k < hist.size()) ? hist[k] : '{sign: 1'b0, mag: 8'd255};
      m = int'(x.mag) + int'(c[k].mag);
      p.sign = x.sign ^ c[k].sign;
      p.mag  = (m > 255) ? 8'd255 : 8'(m);
      if (empty) begin
        acc = p; empty = 1'b0;
      end else begin
        hi = (p.mag <= acc.mag) ? p : acc;
        d  = (p.mag <= acc.mag) ? int'(acc.mag) - int'(p.mag) : int'(p.mag) - int'(acc.mag);
        if (d >= 64) begin
          acc = hi;
        end else if (p.sign != acc.sign && d == 0) begin
          empty = 1'b1; n_cancel++;
        end else begin
          if (p.sign == acc.sign)
            corr = $rtoi($floor($ln(1.0 + $pow(LOG_BASE, real'(d))) / $ln(LOG_BASE) + 0.5));
          else
            corr = $rtoi($floor($ln(1.0 - $pow(LOG_BASE, real'(d))) / $ln(LOG_BASE) + 0.5));
          r = int'(hi.mag) + corr;
          acc.sign = hi.sign;
          acc.mag  = (r < 0) ? 8'd0 : (r > 255) ? 8'd255 : 8'(r);
        end
      end
    end
    return empty ? '{sign: 1'b0, mag: 8'd255} : acc;
  endfunction

  task automatic send(log9_t x);
    real r;
    @(negedge clk);
    while (busy) @(negedge clk);
    din = x; din_en = 1'b1;
    hist.push_front(x);
    if (hist.size() > N) void'(hist.pop_back());
    exp_q.push_back(model());
    r = 0.0;
    for (int k = 0; k < hist.size(); k++) r += to_real(c[k]) * to_real(hist[k]);
    ref_q.push_back(r);
    due_q.push_back($time + 10 * (N + 2));
    @(posedge clk);
    #1 din_en = 1'b0;
  endtask

  task automatic load_coefs();
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = k[$clog2(N)-1:0]; coef_data = c[k];
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi = 3.141592653589793;
    din_en = 0; din = '0; coef_we = 0; coef_addr = '0; coef_data = '0;
    for (int k = 0; k < N; k++) begin
      real n, h, w;
      n = real'(k - (N - 1) / 2);
      h = (n == 0.0) ? 0.25 : ($sin(0.5 * pi * n) - $sin(0.25 * pi * n)) / (pi * n);
      w = 0.54 - 0.46 * $cos(2.0 * pi * real'(k) / real'(N - 1));
      c[k] = to_log(h * w);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_coefs();
    for (int j = 0; j < 400; j++) begin
      real v;
      v = 0.4 * $sin(2.0 * pi * 6000.0 * j / 32000.0) + 0.2 * $sin(2.0 * pi * 500.0 * j / 32000.0)
          + 0.05 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      send(to_log(v));
    end
    // equal and opposite terms: a constant input through coefficients +a, -a cancels exactly
    repeat (N + 4) @(posedge clk);
    for (int k = 0; k < N; k++) c[k] = '{sign: k[0], mag: 8'd20};
    load_coefs();
    for (int j = 0; j < N + 2; j++) send('{sign: 1'b0, mag: 8'd30});
    repeat (N + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (n_lut == 0 || n_bypass == 0 || n_cancel == 0) begin
      failures++; $display("FAIL table, bypass or cancellation never seen");
    end
    $display("table reads %0d, bypasses %0d, cancellations %0d", n_lut, n_bypass, n_cancel);
    $display("signal-to-error ratio against real filtering: %0.1f dB", 10.0 * $log10(sig_pow / err_pow));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
