// bw_mult: combinational Baugh-Wooley multiplier for two's complement operands.
//
// The product of an AW-bit and a BW-bit signed number is formed from AW*BW partial-product
// bits without sign extension. Partial products that involve exactly one sign bit are
// inverted, the product of the two sign bits keeps its positive weight, and the constant
// 2^(AW-1) + 2^(BW-1) + 2^(AW+BW-1) corrects the inversions (modulo 2^(AW+BW)). All rows are
// therefore non-negative and are summed as plain unsigned numbers, which is what makes the
// scheme attractive for low power: no row toggles a long sign extension.
//
// Interface: a (AW bits), b (BW bits), p (AW+BW bits, full-precision signed product).
// Timing: purely combinational.
// The document names the Baugh-Wooley algorithm as the multiplier used in the linear
// datapaths; the row-wise summation below is this design's own arrangement.
module bw_mult #(
  parameter int AW = 16,
  parameter int BW = 16
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);

  localparam int PW = AW + BW;

  logic [PW-1:0] rows [BW];
  logic [PW-1:0] corr;

  always_comb begin
    for (int j = 0; j < BW; j++) begin
      rows[j] = '0;
      for (int i = 0; i < AW; i++) begin
        logic pp;
        pp = a[i] & b[j];
        // exactly one of the two bits is a sign bit: inverted partial product
        if ((i == AW-1) != (j == BW-1)) pp = ~pp;
        rows[j][i+j] = pp;
      end
    end
    corr = '0;
    corr[AW-1] = 1'b1;
    corr[BW-1] = 1'b1;
    corr[PW-1] = 1'b1;
    if (AW == BW) corr = (PW'(1) << AW) | (PW'(1) << (PW-1));
  end

  always_comb begin
    logic [PW-1:0] s;
    s = corr;
    for (int j = 0; j < BW; j++) s = s + rows[j];
    p = signed'(s);
  end

endmodule
