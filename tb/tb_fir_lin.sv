// tb_fir_lin: self-checking test of the linear-representation FIR filter.
// The coefficients of a 21-tap 4-8 kHz band-pass (windowed ideal band-pass at 32 kS/s,
// Hamming window) are written through the coefficient port, then a signal made of tones
// and noise is filtered. Each output is compared with an exact integer convolution of the
// same quantised samples and coefficients (rounded to Q0.15 and clipped) and must arrive
// NTAPS+1 cycles after its input. A second run with all coefficients and samples at full
// scale drives the accumulator into clipping, which the clipped flag must report. Inputs
// offered while the filter is busy must be ignored.
module tb_fir_lin;
  import ha_pkg::*;
  localparam int N = NTAPS;
  int checks = 0, failures = 0, n_clip = 0, n_busy_drop = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 din_en;
  lin_t                 din;
  logic                 coef_we;
  logic [$clog2(N)-1:0] coef_addr;
  lin_t                 coef_data;
  logic                 busy, dout_en, clipped;
  lin_t                 dout;

  fir_lin dut (.*);

  lin_t  c [N];
  lin_t  hist [$];
  lin_t  exp_q [$];
  logic  clip_q [$];
  time   due_q [$];

  always @(negedge clk) begin
    if (dout_en) begin
      lin_t e;
      logic ec;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e  = exp_q.pop_front();
        ec = clip_q.pop_front();
        if (due_q.pop_front() != $time) begin
          failures++; $display("FAIL latency at %0t", $time);
        end
        if (dout !== e || clipped !== ec) begin
          failures++;
          if (failures < 10) $display("FAIL dout=%0d clip=%0d expected %0d clip=%0d", dout, clipped, e, ec);
        end
        if (clipped) n_clip++;
      end
    end
  end

  task automatic send(lin_t x);
    longint s;
    logic   ovf;
    @(negedge clk);
    while (busy) @(negedge clk);
    din = x; din_en = 1'b1;
    hist.push_front(x);
    if (hist.size() > N) void'(hist.pop_back());
    // newest sample first; the 32-bit accumulator clips at each step
    s = 0;
    ovf = 1'b0;
    for (int k = 0; k < N; k++) begin
      s += longint'(c[k]) * longint'((k < hist.size()) ? hist[k] : 16'sd0);
      if (s > 64'sh7fff_ffff)  begin s = 64'sh7fff_ffff;  ovf = 1'b1; end
      if (s < -64'sh8000_0000) begin s = -64'sh8000_0000; ovf = 1'b1; end
    end
    s = (s + 16384) >>> 15;
    if (s > 32767)  begin s = 32767;  ovf = 1'b1; end
    if (s < -32768) begin s = -32768; ovf = 1'b1; end
    exp_q.push_back(16'(s));
    clip_q.push_back(ovf);
    due_q.push_back($time + 10 * (N + 2));
    @(posedge clk);
    #1 din_en = 1'b0;
    // offer a spurious sample while busy: it must be ignored
    if ($urandom_range(0, 3) == 0) begin
      @(negedge clk);
      din = 16'($urandom); din_en = 1'b1;
      n_busy_drop++;
      @(posedge clk);
      #1 din_en = 1'b0;
    end
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
      c[k] = 16'($rtoi($floor(h * w * 32768.0 + 0.5)));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_coefs();
    for (int j = 0; j < 300; j++) begin
      real v;
      v = 0.4 * $sin(2.0 * pi * 6000.0 * j / 32000.0) + 0.2 * $sin(2.0 * pi * 500.0 * j / 32000.0)
          + 0.1 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      send(16'($rtoi(v * 32767.0)));
    end
    // full-scale stress: clipping in the accumulator and at the output
    repeat (N + 4) @(posedge clk);
    for (int k = 0; k < N; k++) c[k] = 16'sh7fff;
    load_coefs();
    for (int j = 0; j < 2 * N; j++) send((j % 7 == 3) ? -16'sd32768 : 16'sd32767);
    repeat (N + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (n_clip == 0 || n_busy_drop == 0) begin failures++; $display("FAIL clipping or busy drop never seen"); end
    $display("clipped outputs %0d, inputs ignored while busy %0d", n_clip, n_busy_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
