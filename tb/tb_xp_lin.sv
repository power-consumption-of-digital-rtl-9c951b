// tb_xp_lin: self-checking test of the linear-representation exponentiation unit.
// For p = 0.25, 0.375 and 0.5 (the values the amplifier is specified for) every magnitude
// from a sweep over all octaves plus random magnitudes is applied, and |x|^p is compared
// with the real-valued power: the error must stay within 3 LSB plus 0.1 % of the value.
// Zero input and the saturation at 1.0 are checked separately.
module tb_xp_lin;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  logic [14:0] mag;
  logic [15:0] p;
  logic [14:0] xp;

  xp_lin dut (.mag(mag), .p(p), .xp(xp));

  task automatic check_one(logic [14:0] m, logic [15:0] pp);
    real ref_v, err, tol;
    mag = m; p = pp;
    #1;
    ref_v = $pow(real'(m) / 32768.0, real'(pp) / 16384.0) * 32768.0;
    if (ref_v > 32767.0) ref_v = 32767.0;
    err = (real'(xp) > ref_v) ? real'(xp) - ref_v : ref_v - real'(xp);
    tol = 3.0 + 0.001 * ref_v;
    if (err > max_err) max_err = err;
    checks++;
    if (err > tol) begin
      failures++;
      if (failures < 10) $display("FAIL mag=%0d p=%0d xp=%0d ref=%f", m, pp, xp, ref_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ps [3] = '{16'd4096, 16'd6144, 16'd8192};
    foreach (ps[k]) begin
      for (int b = 0; b < 15; b++) begin
        check_one(15'(1 << b), ps[k]);
        check_one(15'((1 << b) | ((1 << b) - 1)), ps[k]);
      end
      repeat (2000) check_one(15'($urandom_range(1, 32767)), ps[k]);
      repeat (500)  check_one(15'($urandom_range(1, 64)), ps[k]);
    end
    // zero gives zero
    mag = '0; p = 16'd8192; #1;
    checks++;
    if (xp !== '0) begin failures++; $display("FAIL zero input gives %0d", xp); end
    // p = 0 makes every x^p = 1.0, which saturates
    mag = 15'd1234; p = 16'd0; #1;
    checks++;
    if (xp !== 15'h7fff) begin failures++; $display("FAIL saturation gives %0d", xp); end
    $display("largest error %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
