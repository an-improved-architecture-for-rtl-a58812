// adct_odd_perm: network of six 2x2 permutation blocks (R1..R6) that routes
// the four odd-coefficient products to the X(1), X(3), X(5), X(7) accumulators.
//
// Pair n needs, on lines X(1), X(3), X(5), X(7):
//   n=0: a1 a3 a5 a7   n=1: a3 a7 a1 a5   n=2: a5 a1 a7 a3   n=3: a7 a5 a3 a1
// The blocks sit on adjacent lines in four columns, R1 (lines 0,1) and R2 (2,3),
// then R3 (1,2), then R4 (0,1) and R5 (2,3), then R6 (1,2): an odd-even
// transposition network, which can realise any permutation of four lines. Each
// block's swap pattern is the one that sorts the four products into the order
// needed for that n.
//
// Interface: combinational; a[0..3] = a1, a3, a5, a7 products;
// y[0..3] feed X(1), X(3), X(5), X(7).
module adct_odd_perm
  import adct_pkg::*;
#(
  parameter int W = 22
) (
  input  idx_t                n,
  input  logic signed [W-1:0] a [4],
  output logic signed [W-1:0] y [4]
);

  logic signed [W-1:0] c1 [4];  // after R1, R2
  logic signed [W-1:0] c2 [4];  // after R3
  logic signed [W-1:0] c3 [4];  // after R4, R5

  adct_swap #(.W(W), .SWAP(4'b1010)) u_r1 (.n(n), .a(a[0]),  .b(a[1]),  .y0(c1[0]), .y1(c1[1]));
  adct_swap #(.W(W), .SWAP(4'b1010)) u_r2 (.n(n), .a(a[2]),  .b(a[3]),  .y0(c1[2]), .y1(c1[3]));
  assign c2[0] = c1[0];
  assign c2[3] = c1[3];
  adct_swap #(.W(W), .SWAP(4'b1110)) u_r3 (.n(n), .a(c1[1]), .b(c1[2]), .y0(c2[1]), .y1(c2[2]));
  adct_swap #(.W(W), .SWAP(4'b1100)) u_r4 (.n(n), .a(c2[0]), .b(c2[1]), .y0(c3[0]), .y1(c3[1]));
  adct_swap #(.W(W), .SWAP(4'b1100)) u_r5 (.n(n), .a(c2[2]), .b(c2[3]), .y0(c3[2]), .y1(c3[3]));
  assign y[0] = c3[0];
  assign y[3] = c3[3];
  adct_swap #(.W(W), .SWAP(4'b1000)) u_r6 (.n(n), .a(c3[1]), .b(c3[2]), .y0(y[1]),  .y1(y[2]));

endmodule
