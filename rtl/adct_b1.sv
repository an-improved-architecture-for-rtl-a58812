// adct_b1: even-coefficient product block ("B1").
//
// Forms a4*x, a2*x and a6*x for one input, where a_i = cos(i*pi/16) is held as
// round(a_i * 2^COEF_FRAC). Two copies are used: one on the butterfly sum (for
// X(0), X(2), X(4), X(6) and the sum side of the field transforms) and one on the
// butterfly difference (difference side of the field transforms). Every product
// is a shift-and-add network (adct_const_mult) rather than a multiplier.
//
// Interface: combinational. x is X_W bits signed; products are X_W+COEF_FRAC
// bits signed and carry COEF_FRAC fractional bits.
//
// The block is part of the architecture; the signed-digit multipliers and
// word lengths are this design's choices.
module adct_b1
  import adct_pkg::*;
#(
  parameter int X_W       = 10,
  parameter int COEF_FRAC = 12,
  localparam int P_W      = X_W + COEF_FRAC
) (
  input  logic signed [X_W-1:0] x,
  output logic signed [P_W-1:0] p_a2,
  output logic signed [P_W-1:0] p_a4,
  output logic signed [P_W-1:0] p_a6
);

  adct_const_mult #(.IN_W(X_W), .OUT_W(P_W), .C(coef(2, COEF_FRAC))) u_a2 (.x(x), .y(p_a2));
  adct_const_mult #(.IN_W(X_W), .OUT_W(P_W), .C(coef(4, COEF_FRAC))) u_a4 (.x(x), .y(p_a4));
  adct_const_mult #(.IN_W(X_W), .OUT_W(P_W), .C(coef(6, COEF_FRAC))) u_a6 (.x(x), .y(p_a6));

endmodule
