// adct_butterfly: input stage of the adaptive DCT.
//
// For the sample pair (x[n], x[7-n]) it forms the sum x[n]+x[7-n], which feeds
// the even-coefficient products, and the difference x[n]-x[7-n], which feeds the
// odd-coefficient products and the difference side of the 4-point field
// transforms. Both results are one bit wider than the samples, so nothing
// overflows.
//
// Interface: combinational, a = x[n], b = x[7-n] (IN_W bits, signed).
//
// The sum/difference stage is part of the architecture; the widths are this
// design's choice.
module adct_butterfly #(
  parameter int IN_W = 9
) (
  input  logic signed [IN_W-1:0] a,
  input  logic signed [IN_W-1:0] b,
  output logic signed [IN_W:0]   sum,
  output logic signed [IN_W:0]   diff
);

  assign sum  = (IN_W+1)'(a) + (IN_W+1)'(b);
  assign diff = (IN_W+1)'(a) - (IN_W+1)'(b);

endmodule
