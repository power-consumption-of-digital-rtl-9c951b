// fir_log: NTAPS-tap FIR filter in the 9-bit logarithmic representation.
//
// Multiplication is an addition of log codes (sign = XOR of the signs). Accumulation uses
// log(x + y) = log(x) + log(1 + y/x): with d = |code(y) - code(x)| and x the larger value
// (the smaller code), the result code is code(x) + LUT(d). Two tables of LOG_LUT_N entries
// are used, one for terms of equal sign, round(log_b(1 + b^d)), and one for terms of
// opposite sign, round(log_b(1 - b^d)); b = 0.941. A threshold comparator skips the table
// whenever d >= LOG_LUT_N: the smaller term is then below half a code step of the larger and
// the larger one passes to the accumulator unchanged, so the table is read only when needed.
//
// The document describes one table for the addition; the second table for terms of
// opposite sign, the zero flag of the accumulator (the format has no zero; the accumulator
// starts empty and exact cancellation empties it) and the saturation of codes to [0, 255]
// are this design's own. An empty result is output as code 255, the smallest magnitude,
// with a positive sign.
//
// Timing: as fir_lin. din_en is taken while busy is low; one tap per cycle; dout_en pulses
// NTAPS+1 cycles after din_en. lut_used pulses for each accumulation that read a table and
// bypass for each one that skipped it.
module fir_log
  import ha_pkg::*;
#(
  parameter int N = NTAPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 din_en,
  input  log9_t                din,
  input  logic                 coef_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  log9_t                coef_data,
  output logic                 busy,
  output logic                 dout_en,
  output log9_t                dout,
  output logic                 lut_used,
  output logic                 bypass
);

  localparam int AW = $clog2(N);
  localparam log_lut_t ADD_LUT = log_add_lut();
  localparam log_lut_t SUB_LUT = log_sub_lut();

  log9_t         coef [N];
  log9_t         buffer [N];
  logic [AW-1:0] wr_ptr, rd_ptr, tap;
  log9_t         acc;
  logic          acc_zero;

  // ---------------- multiply: code adder ----------------
  log9_t prod;
  always_comb begin
    logic [8:0] s;
    s         = {1'b0, buffer[rd_ptr].mag} + {1'b0, coef[tap].mag};
    prod.sign = buffer[rd_ptr].sign ^ coef[tap].sign;
    prod.mag  = s[8] ? 8'd255 : s[7:0];
  end

  // ---------------- accumulate: subtractor, threshold comparator, table, adder ----------------
  log9_t acc_next;
  logic  zero_next, use_lut, skip_lut;
  always_comb begin
    log9_t              hi;
    logic [7:0]         d;
    logic               same;
    logic signed [7:0]  corr;
    logic signed [9:0]  r;
    acc_next  = acc;
    zero_next = acc_zero;
    use_lut   = 1'b0;
    skip_lut  = 1'b0;
    hi        = (prod.mag <= acc.mag) ? prod : acc;
    d         = (prod.mag <= acc.mag) ? acc.mag - prod.mag : prod.mag - acc.mag;
    same      = prod.sign == acc.sign;
    corr      = '0;
    r         = '0;
    if (acc_zero) begin
      acc_next  = prod;
      zero_next = 1'b0;
    end else if (d >= 8'(LOG_LUT_N)) begin
      acc_next = hi;
      skip_lut = 1'b1;
    end else begin
      use_lut = 1'b1;
      if (!same && d == '0) begin
        zero_next = 1'b1;
      end else begin
        corr = same ? ADD_LUT[d[5:0]] : SUB_LUT[d[5:0]];
        r    = 10'(signed'({2'b00, hi.mag})) + 10'(corr);
        acc_next.sign = hi.sign;
        acc_next.mag  = (r < 0) ? 8'd0 : (r > 10'sd255) ? 8'd255 : r[7:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) coef[k] <= '0;
    end else if (coef_we) begin
      coef[coef_addr] <= coef_data;
    end
  end

  logic done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) buffer[k] <= '{sign: 1'b0, mag: 8'd255};
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      tap      <= '0;
      acc      <= '0;
      acc_zero <= 1'b1;
      busy     <= 1'b0;
      done     <= 1'b0;
      dout_en  <= 1'b0;
      dout     <= '{sign: 1'b0, mag: 8'd255};
      lut_used <= 1'b0;
      bypass   <= 1'b0;
    end else begin
      dout_en  <= 1'b0;
      done     <= 1'b0;
      lut_used <= 1'b0;
      bypass   <= 1'b0;
      if (!busy && din_en) begin
        buffer[wr_ptr] <= din;
        rd_ptr   <= wr_ptr;
        wr_ptr   <= (wr_ptr == AW'(N-1)) ? '0 : wr_ptr + 1'b1;
        tap      <= '0;
        acc_zero <= 1'b1;
        busy     <= 1'b1;
      end else if (busy) begin
        acc      <= acc_next;
        acc_zero <= zero_next;
        lut_used <= use_lut;
        bypass   <= skip_lut;
        rd_ptr   <= (rd_ptr == '0) ? AW'(N-1) : rd_ptr - 1'b1;
        tap      <= tap + 1'b1;
        if (tap == AW'(N-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (done) begin
        dout    <= acc_zero ? '{sign: 1'b0, mag: 8'd255} : acc;
        dout_en <= 1'b1;
      end
    end
  end

endmodule
