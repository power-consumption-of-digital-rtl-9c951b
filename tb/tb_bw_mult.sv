// tb_bw_mult: self-checking test of the Baugh-Wooley multiplier.
// Three instances (16x16, 20x20 and an unequal 8x12) are driven with corner values (most
// negative, most positive, -1, 0, 1) and random operands; every product is compared with
// the simulator's own signed multiplication.
module tb_bw_mult;
  int checks = 0, failures = 0;

  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  logic signed [19:0] a20, b20;
  logic signed [39:0] p20;
  logic signed [7:0]  a8;
  logic signed [11:0] b12;
  logic signed [19:0] p8;

  bw_mult #(.AW(16), .BW(16)) u16 (.a(a16), .b(b16), .p(p16));
  bw_mult #(.AW(20), .BW(20)) u20 (.a(a20), .b(b20), .p(p20));
  bw_mult #(.AW(8),  .BW(12)) u8  (.a(a8),  .b(b12), .p(p8));

  task automatic check_all();
    #1;
    checks += 3;
    if (p16 !== 32'(a16 * b16)) begin
      failures++; $display("FAIL 16x16 %0d * %0d = %0d", a16, b16, p16);
    end
    if (p20 !== 40'(40'(a20) * 40'(b20))) begin
      failures++; $display("FAIL 20x20 %0d * %0d = %0d", a20, b20, p20);
    end
    if (p8 !== 20'(20'(a8) * 20'(b12))) begin
      failures++; $display("FAIL 8x12 %0d * %0d = %0d", a8, b12, p8);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] corner16 [5] = '{-16'sd32768, 16'sd32767, -16'sd1, 16'sd0, 16'sd1};
    foreach (corner16[i]) foreach (corner16[j]) begin
      a16 = corner16[i]; b16 = corner16[j];
      a20 = 20'(corner16[i]) <<< 4; b20 = 20'(corner16[j]) <<< 4;
      a8  = 8'(corner16[i] >>> 8);  b12 = 12'(corner16[j] >>> 4);
      check_all();
    end
    repeat (3000) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a20 = 20'($urandom); b20 = 20'($urandom);
      a8  = 8'($urandom);  b12 = 12'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
