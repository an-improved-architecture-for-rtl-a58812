// adct_b2: odd-coefficient product block ("B2").
//
// Forms a1*x, a3*x, a5*x and a7*x for the butterfly difference x, where
// a_i = cos(i*pi/16) is held as round(a_i * 2^COEF_FRAC). Each product is a
// shift-and-add network (adct_const_mult).
//
// Interface: combinational. p[0..3] = a1, a3, a5, a7 times x, each
// X_W+COEF_FRAC bits signed with COEF_FRAC fractional bits.
//
// The block is part of the architecture; the signed-digit multipliers and
// word lengths are this design's choices.
module adct_b2
  import adct_pkg::*;
#(
  parameter int X_W       = 10,
  parameter int COEF_FRAC = 12,
  localparam int P_W      = X_W + COEF_FRAC
) (
  input  logic signed [X_W-1:0] x,
  output logic signed [P_W-1:0] p [4]
);

  for (genvar j = 0; j < 4; j++) begin : g_mul
    adct_const_mult #(.IN_W(X_W), .OUT_W(P_W), .C(coef(2*j+1, COEF_FRAC))) u_mul (
      .x(x), .y(p[j])
    );
  end

endmodule
