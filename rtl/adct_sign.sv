// adct_sign: sign change block ("S") of one product stream.
//
// Outputs a or -a depending on the sample index n: NEG[n] = 1 negates. The
// products fed to it never reach the most negative W-bit value, so negation
// cannot overflow.
//
// Interface: combinational; NEG is a four-bit pattern, one bit per sample index.
//
// The block is part of the architecture; its patterns are derived from the
// signs of the DCT matrices.
module adct_sign
  import adct_pkg::*;
#(
  parameter int   W   = 22,
  parameter pat_t NEG = 4'b1010
) (
  input  idx_t               n,
  input  logic signed [W-1:0] a,
  output logic signed [W-1:0] y
);

  assign y = NEG[n] ? -a : a;

endmodule
