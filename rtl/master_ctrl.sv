// master_ctrl: synchronises the three stages of a hearing aid channel (FIR, non-linear
// amplifier, FIR).
//
// The stages take different times per sample (an FIR needs NTAPS+1 cycles, the amplifier
// two), so the controller runs them in lock step. It watches the three output enables;
// whenever one pulses, the matching output word is latched and the stage is marked done.
// When all three are done, the controller pulses din_en for one cycle and, on the same edge,
// releases the latched words downstream: stage 1's result becomes stage 2's input, stage 2's
// result stage 3's input, and stage 3's result the channel output. The same din_en tells the
// sample source to deliver the next input sample to stage 1. The three stages therefore
// form a pipeline with one sample in each.
//
// This follows the document's description. The start-up release after reset, the ZERO
// word that fills the pipeline, and out_valid (which marks outputs that derive from real
// input samples, from the fourth release on) are this design's own.
//
// Timing: din_en, din_2, din_3, dout and out_valid are registered and change together.
module master_ctrl #(
  parameter int          W    = 16,
  parameter logic [W-1:0] ZERO = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dout_1_en,
  input  logic [W-1:0] dout_1,
  input  logic         dout_2_en,
  input  logic [W-1:0] dout_2,
  input  logic         dout_3_en,
  input  logic [W-1:0] dout_3,
  output logic         din_en,
  output logic [W-1:0] din_2,
  output logic [W-1:0] din_3,
  output logic [W-1:0] dout,
  output logic         out_valid
);

  logic [W-1:0] lat1, lat2, lat3;
  logic [2:0]   seen;
  logic [1:0]   fill;
  logic         release_now;

  assign release_now = &seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat1      <= ZERO;
      lat2      <= ZERO;
      lat3      <= ZERO;
      seen      <= 3'b111;   // nothing is running after reset: start at once
      fill      <= '0;
      din_en    <= 1'b0;
      din_2     <= ZERO;
      din_3     <= ZERO;
      dout      <= ZERO;
      out_valid <= 1'b0;
    end else begin
      din_en    <= 1'b0;
      out_valid <= 1'b0;
      if (dout_1_en) lat1 <= dout_1;
      if (dout_2_en) lat2 <= dout_2;
      if (dout_3_en) lat3 <= dout_3;
      if (release_now) begin
        seen   <= 3'b000;
        din_en <= 1'b1;
        din_2  <= lat1;
        din_3  <= lat2;
        dout   <= lat3;
        if (fill == 2'd3) out_valid <= 1'b1;
        else              fill <= fill + 1'b1;
      end else begin
        seen <= seen | {dout_3_en, dout_2_en, dout_1_en};
      end
    end
  end

  // A stage must not report twice for one release.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(dout_1_en && seen[0]) && !(dout_2_en && seen[1]) && !(dout_3_en && seen[2]));

endmodule
