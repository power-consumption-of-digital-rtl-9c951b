// tb_nla_log: self-checking test of the logarithmic-representation non-linear amplifier.
// All 512 input codes, then random codes, are streamed through the amplifier for two
// settings that model t = 0.01, A = 10 and p = 0.5 or 0.25 (the code offsets A_l, B_l and
// threshold t_l are log_0.941 of the linear values). The expected output code is worked out
// from the real-valued function: in the linear region log_b(A*x) = A_l + |x_l|, in the
// compression region log_b(B*x^p) = B_l + p*|x_l|, rounded and clamped to [0, 255]. Each
// output must match exactly and arrive two cycles after its input; both regions and both
// clamps must occur.
module tb_nla_log;
  import ha_pkg::*;
  int checks = 0, failures = 0;
  int n_linear = 0, n_compress = 0, n_clamp_hi = 0, n_clamp_lo = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              din_en;
  log9_t             din;
  logic [7:0]        t_l;
  logic signed [9:0] a_l, b_l;
  logic [7:0]        p;
  logic              dout_en;
  log9_t             dout;

  nla_log dut (.*);

  log9_t exp_q [$];
  time   due_q [$];

  function automatic log9_t model(log9_t x);
    real   lin_val, y, code;
    int    c;
    log9_t r;
    // work in linear values and take the base-0.941 logarithm at the end
    lin_val = $pow(LOG_BASE, real'(x.mag));
    if (x.mag >= t_l) y = $pow(LOG_BASE, real'(a_l)) * lin_val;
    else              y = $pow(LOG_BASE, real'(b_l)) * $pow(lin_val, real'(p) / 256.0);
    code = $ln(y) / $ln(LOG_BASE);
    c = $rtoi($floor(code + 0.5 + 1e-9));
    if (c < 0) begin c = 0; n_clamp_hi++; end
    if (c > 255) begin c = 255; n_clamp_lo++; end
    r.sign = x.sign;
    r.mag  = 8'(c);
    return r;
  endfunction

  always @(negedge clk) begin
    if (dout_en) begin
      log9_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (due_q.pop_front() != $time) begin
          failures++; $display("FAIL latency at %0t", $time);
        end
        if (dout !== e) begin
          failures++;
          if (failures < 10) $display("FAIL dout=%0d/%0d expected %0d/%0d", dout.sign, dout.mag, e.sign, e.mag);
        end
      end
    end
  end

  task automatic send(log9_t x);
    @(negedge clk);
    din    = x;
    din_en = 1'b1;
    exp_q.push_back(model(x));
    due_q.push_back($time + 20);
    if (x.mag >= t_l) n_linear++;
    else              n_compress++;
    @(posedge clk);
    #1 din_en = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din_en = 0; din = '0;
    t_l = 8'd76; a_l = -10'sd38; b_l = 10'sd0; p = 8'd128;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 512; k++) send(9'(k));
    repeat (3) @(posedge clk);
    b_l = 10'sd19; p = 8'd64;
    for (int k = 0; k < 512; k++) send(9'(k));
    // extreme offsets drive the result past both ends of the code range
    repeat (3) @(posedge clk);
    t_l = 8'd200; a_l = 10'sd100; b_l = -10'sd150;
    for (int k = 0; k < 512; k += 3) send(9'(k));
    repeat (3) @(posedge clk);
    t_l = 8'd76; a_l = -10'sd38; b_l = 10'sd19;
    repeat (1000) begin
      send(9'($urandom));
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (n_linear == 0 || n_compress == 0 || n_clamp_hi == 0 || n_clamp_lo == 0) begin
      failures++; $display("FAIL a region or clamp never used");
    end
    $display("linear %0d, compression %0d, clamp at 1.0 %0d, clamp at smallest %0d",
             n_linear, n_compress, n_clamp_hi, n_clamp_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
