// tb_nla_float: self-checking test of the floating-point non-linear amplifier.
// Every one of the 1024 input words, then random words, is streamed through the amplifier
// with t = 0.01, A = 10, p = 0.5, B = 1 (the exponentiation tables as they come out of
// reset), then again after the tables have been rewritten for p = 0.25 with B = 0.316.
// Each output is compared with the real-valued amplifier function: within two units in the
// last place of the expected value, saturated at the largest magnitude, zero allowed only
// below the smallest one. Outputs must arrive two cycles after their inputs, and both
// regions as well as saturation must occur.
module tb_nla_float;
  import ha_pkg::*;
  int checks = 0, failures = 0;
  int n_linear = 0, n_compress = 0, n_sat = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        din_en;
  fp10_t       din;
  fpmag_t      t_f, a_f, b_f;
  logic        lut_we, lut_sel;
  logic [3:0]  lut_addr;
  logic [12:0] lut_wdata;
  logic        dout_en;
  fp10_t       dout;
  real         p_now;

  nla_float dut (.*);

  real exp_q [$];
  time due_q [$];

  function automatic real val(fpmag_t m, int bias);
    if (m.mant == '0) return 0.0;
    return real'(m.mant) / 32.0 * $pow(2.0, real'(int'(m.exp) - bias));
  endfunction

  function automatic real model(fp10_t x);
    real xv, y;
    xv = val(x[8:0], FP_BIAS);
    if (x[8:0] <= t_f) y = val(a_f, FP_GAIN_BIAS) * xv;
    else               y = val(b_f, FP_GAIN_BIAS) * $pow(xv, p_now);
    return x.sign ? -y : y;
  endfunction

  always @(negedge clk) begin
    if (dout_en) begin
      real e, got, mag, ulp, err;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (due_q.pop_front() != $time) begin
          failures++; $display("FAIL latency at %0t", $time);
        end
        got = val(dout[8:0], FP_BIAS);
        if (dout.sign) got = -got;
        mag = (e < 0) ? -e : e;
        err = (got > e) ? got - e : e - got;
        ulp = (mag > 0.0) ? $pow(2.0, $floor($ln(mag) / $ln(2.0)) - 4.0) : 0.0;
        if (mag >= 0.96875) begin
          n_sat++;
          if (dout[8:0] != FP_MAX || (dout.sign != (e < 0))) begin
            failures++; $display("FAIL no saturation: %h for %f", dout, e);
          end
        end else if (mag < $pow(2.0, -16.0)) begin
          if (dout[8:0] != '0 && err > $pow(2.0, -16.0)) begin
            failures++; $display("FAIL underflow: %h for %g", dout, e);
          end
        end else if (err > 2.0 * ulp || (got != 0.0 && (got < 0) != (e < 0))) begin
          failures++;
          if (failures < 10) $display("FAIL dout=%h (%g) expected %g", dout, got, e);
        end
      end
    end
  end

  task automatic send(fp10_t x);
    @(negedge clk);
    din    = x;
    din_en = 1'b1;
    exp_q.push_back(model(x));
    due_q.push_back($time + 20);
    if (x[8:0] <= t_f) n_linear++;
    else               n_compress++;
    @(posedge clk);
    #1 din_en = 1'b0;
  endtask

  // only normalised words (leading mantissa bit set) and zero are valid inputs
  function automatic fp10_t legal(logic [9:0] w);
    fp10_t r = w;
    if (r.mant[4] == 1'b0) r = '0;
    return r;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp_lut_t m_lut, e_lut;
    din_en = 0; din = '0; lut_we = 0; lut_sel = 0; lut_addr = '0; lut_wdata = '0;
    p_now = 0.5;
    t_f = '{exp: 4'd9, mant: 5'd20};     // 0.625 * 2^-6  ~ 0.0098
    a_f = '{exp: 4'd11, mant: 5'd20};    // 0.625 * 2^4   = 10
    b_f = '{exp: 4'd8, mant: 5'd16};     // 0.5   * 2^1   = 1
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1024; k++) if (legal(10'(k)) != '0 || k == 0) send(legal(10'(k)));
    repeat (300) send(legal(10'($urandom)));
    // rewrite the tables for p = 0.25
    repeat (3) @(posedge clk);
    m_lut = fp_mant_lut(0.25);
    e_lut = fp_exp_lut(0.25);
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      lut_we    = 1'b1;
      lut_sel   = k[4];
      lut_addr  = k[3:0];
      lut_wdata = k[4] ? e_lut[k[3:0]] : m_lut[k[3:0]];
    end
    @(negedge clk);
    lut_we = 1'b0;
    p_now = 0.25;
    b_f = '{exp: 4'd6, mant: 5'd20};     // 0.625 * 2^-1 = 0.3125
    for (int k = 0; k < 1024; k++) if (legal(10'(k)) != '0) send(legal(10'(k)));
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (n_linear == 0 || n_compress == 0 || n_sat == 0) begin
      failures++; $display("FAIL a region or saturation never used");
    end
    $display("linear %0d, compression %0d, saturated %0d", n_linear, n_compress, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
