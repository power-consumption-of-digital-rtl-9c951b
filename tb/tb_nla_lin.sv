// tb_nla_lin: self-checking test of the linear-representation non-linear amplifier.
// Samples with log-uniformly spread magnitudes and random signs are streamed one per cycle
// (and, in a second phase, with gaps) for two settings: t = 0.01, A = 10, p = 0.5, B = 1 and
// t = 0.01, A = 10, p = 0.25, B = 0.316, where B makes the two curves meet at t. Each output
// is compared with the real-valued amplifier function (3 LSB + 0.2 % tolerance, saturation
// at +-32767), must appear exactly two cycles after its input, and both regions must be
// exercised.
module tb_nla_lin;
  import ha_pkg::*;
  int checks = 0, failures = 0;
  int n_linear = 0, n_compress = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        din_en;
  lin_t        din;
  logic [14:0] t;
  logic [15:0] a_gain, b_gain, p;
  logic        dout_en;
  lin_t        dout;

  nla_lin dut (.*);

  // expected results in flight
  real exp_q [$];
  time due_q [$];
  int  cycle = 0;   // counts falling edges; inputs change and outputs are sampled there

  function automatic real model(lin_t x);
    real xr, y, mag;
    xr  = real'(x) / 32768.0;
    mag = (xr < 0) ? -xr : xr;
    if (x > -16'sd32768 && mag <= real'(t) / 32768.0)
      y = real'(a_gain) / 256.0 * xr;
    else begin
      if (mag > 32767.0 / 32768.0) mag = 32767.0 / 32768.0;
      y = real'(b_gain) / 256.0 * $pow(mag, real'(p) / 16384.0);
      if (xr < 0) y = -y;
    end
    y = y * 32768.0;
    if (y > 32767.0) y = 32767.0;
    if (y < -32767.0) y = -32767.0;
    return y;
  endfunction

  always @(negedge clk) begin
    cycle++;
    if (dout_en) begin
      real e, err;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (due_q.pop_front() != $time) begin
          failures++; $display("FAIL latency at cycle %0d", cycle);
        end
        err = real'(dout) - e;
        if (err < 0) err = -err;
        if (err > 3.0 + 0.002 * ((e < 0) ? -e : e)) begin
          failures++;
          if (failures < 10) $display("FAIL dout=%0d expected %f", dout, e);
        end
      end
    end
  end

  task automatic send(lin_t x);
    @(negedge clk);
    din    = x;
    din_en = 1'b1;
    exp_q.push_back(model(x));
    due_q.push_back($time + 20);
    if (x > -16'sd32768 && ((x < 0) ? -x : x) <= 16'(t)) n_linear++;
    else n_compress++;
    @(posedge clk);
    #1 din_en = 1'b0;
  endtask

  function automatic lin_t rand_sample();
    int   e;
    lin_t v;
    e = $urandom_range(0, 15);
    v = 16'((1 << e) + ($urandom % (1 << e)));
    if (v < 0) v = 16'sd32767;
    return ($urandom % 2) ? -v : v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din_en = 0; din = '0;
    t = 15'd328; a_gain = 16'd2560; b_gain = 16'd256; p = 16'd8192;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    repeat (1500) send(rand_sample());
    send(16'sd328); send(-16'sd328); send(16'sd329); send(-16'sd32768); send(16'sd0);
    repeat (4) @(posedge clk);
    b_gain = 16'd81; p = 16'd4096;
    repeat (1500) begin
      send(rand_sample());
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (n_linear == 0 || n_compress == 0) begin failures++; $display("FAIL a region never used"); end
    $display("linear region %0d, compression region %0d", n_linear, n_compress);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
