// tb_master_ctrl: self-checking test of the channel master controller.
// Three stand-in stages answer each din_en pulse after their own random delay (1 to 30
// cycles) with a fresh random word. The test checks that din_en pulses for exactly one cycle,
// only after all three stages have answered since the previous pulse, and within two cycles
// of the last answer; that on each pulse din_2, din_3 and dout carry the words latched from
// stages 1, 2 and 3; and that out_valid is low for the first three releases and high from
// the fourth on. Releases where stage 1 (an FIR) and stage 2 (the amplifier) finish last are
// both counted and required.
module tb_master_ctrl;
  localparam int W = 16;
  int checks = 0, failures = 0, releases = 0;
  int last_is_1 = 0, last_is_2 = 0, last_is_3 = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         dout_1_en, dout_2_en, dout_3_en;
  logic [W-1:0] dout_1, dout_2, dout_3;
  logic         din_en, out_valid;
  logic [W-1:0] din_2, din_3, dout;

  master_ctrl #(.W(W), .ZERO(16'h5a5a)) dut (.*);

  logic [W-1:0] w1 = 16'h5a5a, w2 = 16'h5a5a, w3 = 16'h5a5a;
  int  pending = 0;      // stages that have not answered yet
  int  last_answer = 0;  // cycle of the last answer
  int  cycle = 0;
  int  delay [3];
  int  last_stage;

  always @(negedge clk) begin
    cycle++;
    dout_1_en = 0; dout_2_en = 0; dout_3_en = 0;
    if (din_en) begin
      releases++;
      checks += 4;
      if (pending != 0) begin failures++; $display("FAIL release with %0d stages running", pending); end
      if (releases > 1 && cycle - last_answer > 2) begin failures++; $display("FAIL slow release"); end
      if (din_2 !== w1 || din_3 !== w2 || dout !== w3) begin
        failures++; $display("FAIL released data %h %h %h expected %h %h %h", din_2, din_3, dout, w1, w2, w3);
      end
      if (out_valid !== (releases >= 4)) begin failures++; $display("FAIL out_valid at release %0d", releases); end
      if (releases > 1) begin
        if (last_stage == 0) last_is_1++;
        if (last_stage == 1) last_is_2++;
        if (last_stage == 2) last_is_3++;
      end
      for (int s = 0; s < 3; s++) delay[s] = $urandom_range(1, 30);
      pending = 3;
    end else begin
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid without release"); end
      for (int s = 0; s < 3; s++) begin
        if (delay[s] > 0) begin
          delay[s]--;
          if (delay[s] == 0) begin
            logic [W-1:0] v;
            v = W'($urandom);
            pending--;
            last_answer = cycle;
            last_stage = s;
            case (s)
              0: begin dout_1_en = 1; dout_1 = v; w1 = v; end
              1: begin dout_2_en = 1; dout_2 = v; w2 = v; end
              default: begin dout_3_en = 1; dout_3 = v; w3 = v; end
            endcase
          end
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dout_1_en = 0; dout_2_en = 0; dout_3_en = 0; dout_1 = '0; dout_2 = '0; dout_3 = '0;
    delay = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (releases == 500);
    @(negedge clk);
    checks++;
    if (last_is_1 == 0 || last_is_2 == 0 || last_is_3 == 0) begin
      failures++; $display("FAIL not every stage was the last to finish");
    end
    $display("releases %0d; last to finish: stage1 %0d, stage2 %0d, stage3 %0d",
             releases, last_is_1, last_is_2, last_is_3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
