// fir_lin: NTAPS-tap FIR filter in the 16-bit linear representation.
//
//   y(j) = sum_{k=0}^{NTAPS-1} c(k) * x(j-k)
//
// One Baugh-Wooley multiplier and one accumulator are time-shared over the taps: a sample
// accepted with din_en is written into a circular sample buffer, and then one tap is
// multiplied and accumulated per clock cycle. The accumulator adds with saturation
// (clipping) at each step; the result is rounded to Q0.15 and clipped again on output.
// Coefficients are held in a register file written through the coef_* port.
//
// The document gives the structure (multiplier, accumulator with clipping logic, result
// after 21 cycles). Indexing the taps from the newest sample (k = 0), the 32-bit
// accumulator, the rounding and the coefficient write port are this design's choices.
//
// Timing: din_en is taken only while busy is low. The MAC then runs for NTAPS cycles and
// dout_en pulses NTAPS+1 cycles after din_en, with dout held until the next result.
module fir_lin
  import ha_pkg::*;
#(
  parameter int N = NTAPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 din_en,
  input  lin_t                 din,
  input  logic                 coef_we,
  input  logic [$clog2(N)-1:0] coef_addr,
  input  lin_t                 coef_data,
  output logic                 busy,
  output logic                 dout_en,
  output lin_t                 dout,
  output logic                 clipped
);

  localparam int AW = $clog2(N);

  lin_t          coef [N];
  lin_t          buffer [N];
  logic [AW-1:0] wr_ptr, rd_ptr, tap;
  logic signed [31:0] acc;

  // ---------------- multiplier and saturating accumulate ----------------
  logic signed [31:0] prod;
  logic signed [32:0] sum;
  logic signed [31:0] acc_next;
  logic               sat;

  bw_mult #(.AW(16), .BW(16)) u_mul (.a(buffer[rd_ptr]), .b(coef[tap]), .p(prod));

  always_comb begin
    sum = 33'(acc) + 33'(prod);
    sat = sum[32] != sum[31];
    if (sat) acc_next = sum[32] ? 32'sh8000_0000 : 32'sh7fff_ffff;
    else     acc_next = sum[31:0];
  end

  // output rounding and clipping to Q0.15
  lin_t y_round;
  logic y_clip;
  always_comb begin
    logic signed [32:0] r;
    r = (33'(acc) + 33'sd16384) >>> 15;
    y_clip = 1'b0;
    if (r > 33'sd32767) begin
      y_round = 16'sd32767;
      y_clip  = 1'b1;
    end else if (r < -33'sd32768) begin
      y_round = -16'sd32768;
      y_clip  = 1'b1;
    end else begin
      y_round = 16'(r);
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
      for (int k = 0; k < N; k++) buffer[k] <= '0;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      tap     <= '0;
      acc     <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      dout_en <= 1'b0;
      dout    <= '0;
      clipped <= 1'b0;
    end else begin
      dout_en <= 1'b0;
      done    <= 1'b0;
      if (!busy && din_en) begin
        buffer[wr_ptr] <= din;
        rd_ptr <= wr_ptr;
        wr_ptr <= (wr_ptr == AW'(N-1)) ? '0 : wr_ptr + 1'b1;
        tap    <= '0;
        acc    <= '0;
        busy   <= 1'b1;
        clipped <= 1'b0;
      end else if (busy) begin
        acc     <= acc_next;
        clipped <= clipped | sat;
        rd_ptr  <= (rd_ptr == '0) ? AW'(N-1) : rd_ptr - 1'b1;
        tap     <= tap + 1'b1;
        if (tap == AW'(N-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (done) begin
        dout    <= y_round;
        dout_en <= 1'b1;
        clipped <= clipped | y_clip;
      end
    end
  end

endmodule
