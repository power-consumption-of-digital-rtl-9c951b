// fir_float: NTAPS-tap FIR filter in the 10-bit floating-point representation.
//
// Each cycle one sample and one coefficient are split into sign, exponent and mantissa:
// the 5-bit mantissas are multiplied, the exponents added and the signs combined by
// exclusive-or; the product mantissa is normalised and its exponent adjusted
// (ha_pkg::fp_mul). The product is then added to the accumulator register: the mantissa of
// the operand with the smaller exponent is shifted right to align the two, the mantissas
// are added or subtracted, and the sum is renormalised with the exponent adjusted again
// (ha_pkg::fp_add). The accumulator itself is a 10-bit float, as in the document.
//
// This design's choices: round-half-up after the multiply and after the add (three guard
// bits in the adder), saturation to the largest magnitude, flush to zero below the smallest,
// and the coefficient write port.
//
// Timing: as fir_lin. din_en is taken while busy is low; one tap per cycle; dout_en pulses
// NTAPS+1 cycles after din_en. align pulses for each accumulation whose operands had
// different exponents, so that the alignment shifter did work.
module fir_float
  import ha_pkg::*;
#(
  parameter int N = NTAPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 din_en,
  input  fp10_t                din,
  input  logic                 coef_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  fp10_t                coef_data,
  output logic                 busy,
  output logic                 dout_en,
  output fp10_t                dout,
  output logic                 align
);

  localparam int AW = $clog2(N);

  fp10_t         coef [N];
  fp10_t         buffer [N];
  logic [AW-1:0] wr_ptr, rd_ptr, tap;
  fp10_t         acc;

  fp10_t  prod, acc_next;
  fpmag_t pmag;
  assign pmag     = fp_mul(buffer[rd_ptr][8:0], coef[tap][8:0], FP_BIAS);
  assign prod     = (pmag == FP_ZERO) ? '0 : {buffer[rd_ptr].sign ^ coef[tap].sign, pmag};
  assign acc_next = fp_add(acc, prod);

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
      for (int k = 0; k < N; k++) buffer[k] <= '0;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      tap     <= '0;
      acc     <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      dout_en <= 1'b0;
      dout    <= '0;
      align   <= 1'b0;
    end else begin
      dout_en <= 1'b0;
      done    <= 1'b0;
      align   <= 1'b0;
      if (!busy && din_en) begin
        buffer[wr_ptr] <= din;
        rd_ptr <= wr_ptr;
        wr_ptr <= (wr_ptr == AW'(N-1)) ? '0 : wr_ptr + 1'b1;
        tap    <= '0;
        acc    <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        acc    <= acc_next;
        align  <= (acc[8:0] != '0) && (prod[8:0] != '0) && (acc.exp != prod.exp);
        rd_ptr <= (rd_ptr == '0) ? AW'(N-1) : rd_ptr - 1'b1;
        tap    <= tap + 1'b1;
        if (tap == AW'(N-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (done) begin
        dout    <= acc;
        dout_en <= 1'b1;
      end
    end
  end

endmodule
