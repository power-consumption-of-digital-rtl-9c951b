// tb_fir_float: self-checking test of the floating-point FIR filter.
// 1) Impulse response: the 21 band-pass coefficients are loaded and a single sample of
//    value 0.5 is sent among zeros; each output must equal the matching coefficient times
//    0.5 exactly (one exponent lower), because no rounding takes place.
// 2) A tone-plus-noise signal is filtered. Each output is compared with real-valued
//    filtering of the same quantised values. The allowed error is an error bound
//    accumulated along the sum: half a unit in the last place (ulp) of every product, two
//    ulps of the larger of the running sum and the product for every addition, and the
//    smallest magnitude for every flush to zero.
// Outputs must arrive NTAPS+1 cycles after their inputs, and the alignment shifter must be
// exercised.
module tb_fir_float;
  import ha_pkg::*;
  localparam int N = NTAPS;
  int checks = 0, failures = 0, n_align = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 din_en;
  fp10_t                din;
  logic                 coef_we;
  logic [$clog2(N)-1:0] coef_addr;
  fp10_t                coef_data;
  logic                 busy, dout_en, align;
  fp10_t                dout;

  fir_float dut (.*);

  fp10_t c [N];
  fp10_t hist [$];
  real   ref_q [$];
  real   tol_q [$];
  time   due_q [$];

  function automatic real to_real(fp10_t x);
    real a;
    if (x[8:0] == '0) return 0.0;
    a = real'(x.mant) / 32.0 * $pow(2.0, real'(int'(x.exp) - FP_BIAS));
    return x.sign ? -a : a;
  endfunction

  function automatic fp10_t to_fp(real v);
    fp10_t r;
    real   a;
    int    e, m;
    a = (v < 0) ? -v : v;
    if (a < $pow(2.0, -16.0)) return '0;
    e = $rtoi($floor($ln(a) / $ln(2.0))) + 16;   // a in [2^(e-16), 2^(e-15))
    m = $rtoi($floor(a / $pow(2.0, real'(e - 20)) + 0.5));
    if (m >= 32) begin m = 16; e++; end
    if (e > 15) begin e = 15; m = 31; end
    r.sign = v < 0;
    r.exp  = 4'(e);
    r.mant = 5'(m);
    return r;
  endfunction

  function automatic real ulp(real v);
    real a = (v < 0) ? -v : v;
    if (a <= 0.0) return 0.0;
    return $pow(2.0, $floor($ln(a) / $ln(2.0)) - 4.0);
  endfunction

  always @(negedge clk) begin
    if (align) n_align++;
    if (dout_en) begin
      real r, tol, got, err;
      checks++;
      if (ref_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        r   = ref_q.pop_front();
        tol = tol_q.pop_front();
        if (due_q.pop_front() != $time) begin
          failures++; $display("FAIL latency at %0t", $time);
        end
        got = to_real(dout);
        err = (got > r) ? got - r : r - got;
        if (err > tol) begin
          failures++;
          if (failures < 10) $display("FAIL dout=%h (%g) expected %g +- %g", dout, got, r, tol);
        end
      end
    end
  end

  // exact: tol = 0
  task automatic send(fp10_t x, bit exact);
    real s, p, tol, big;
    @(negedge clk);
    while (busy) @(negedge clk);
    din = x; din_en = 1'b1;
    hist.push_front(x);
    if (hist.size() > N) void'(hist.pop_back());
    s = 0.0; tol = 0.0;
    for (int k = 0; k < hist.size(); k++) begin
      p = to_real(c[k]) * to_real(hist[k]);
      big = (s < 0 ? -s : s);
      if ((p < 0 ? -p : p) > big) big = (p < 0 ? -p : p);
      s += p;
      if ((s < 0 ? -s : s) > big) big = (s < 0 ? -s : s);
      tol += 0.5 * ulp(p) + 2.0 * ulp(big) + $pow(2.0, -16.0);
    end
    ref_q.push_back(s);
    tol_q.push_back(exact ? 0.0 : tol);
    due_q.push_back($time + 10 * (N + 2));
    @(posedge clk);
    #1 din_en = 1'b0;
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
      c[k] = to_fp(h * w);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = k[$clog2(N)-1:0]; coef_data = c[k];
    end
    @(negedge clk);
    coef_we = 1'b0;
    // impulse response, exact
    send(to_fp(0.5), 1'b1);
    for (int j = 1; j < N + 2; j++) send('0, 1'b1);
    // tones and noise, within the error bound
    for (int j = 0; j < 400; j++) begin
      real v;
      v = 0.4 * $sin(2.0 * pi * 6000.0 * j / 32000.0) + 0.2 * $sin(2.0 * pi * 500.0 * j / 32000.0)
          + 0.05 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      send(to_fp(v), 1'b0);
    end
    repeat (N + 4) @(posedge clk);
    checks++;
    if (ref_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", ref_q.size()); end
    checks++;
    if (n_align == 0) begin failures++; $display("FAIL alignment never exercised"); end
    $display("accumulations with alignment %0d", n_align);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
