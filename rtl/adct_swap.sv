// adct_swap: permutation block ("R") of two product streams.
//
// Passes (a, b) straight to (y0, y1), or crossed, depending on the sample index
// n of the pair being processed: SWAP[n] = 1 crosses them. This lets one product
// serve different outputs on different sample indices, which is how the
// architecture shares its constant multipliers.
//
// Interface: combinational; SWAP is a four-bit pattern, one bit per sample index.
//
// The block is part of the architecture; the crossbar form and the per-index
// patterns, derived from the DCT matrices, are this design's.
module adct_swap
  import adct_pkg::*;
#(
  parameter int   W    = 22,
  parameter pat_t SWAP = 4'b0110
) (
  input  idx_t               n,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y0,
  output logic signed [W-1:0] y1
);

  always_comb begin
    if (SWAP[n]) begin
      y0 = b;
      y1 = a;
    end else begin
      y0 = a;
      y1 = b;
    end
  end

endmodule
