// eq_delay: equalisation delay of the multirate hearing aid, a circular delay buffer.
//
// Each enable writes din into a DEPTH-word circular buffer and loads the output register
// with the word written DEPTH enables earlier, so dout after an enable is din from DEPTH
// enables before it. With DEPTH = 0 the block is a plain register. Until the buffer has
// been filled once the output is zero, so the memory itself needs no reset.
//
// The document equalises the group delay of the channels with circular delay buffers and
// gives no sizes; the depths come from multirate_lin, and the empty-buffer handling is
// this design's own.
//
// Interface: en (one cycle per sample of the channel's rate), din, dout (registered).
// Timing: dout changes on the clock edge where en is high.
module eq_delay #(
  parameter int W     = 16,
  parameter int DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DEPTH == 0) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  dout <= '0;
      else if (en) dout <= din;
    end
  end else begin : g_buf
    localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    logic [W-1:0]  mem [DEPTH];
    logic [AW-1:0] ptr;
    logic          full;

    always_ff @(posedge clk) begin
      if (en) mem[ptr] <= din;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ptr  <= '0;
        full <= 1'b0;
        dout <= '0;
      end else if (en) begin
        dout <= full ? mem[ptr] : '0;
        if (ptr == AW'(DEPTH - 1)) begin
          ptr  <= '0;
          full <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

endmodule
