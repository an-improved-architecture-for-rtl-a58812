// adct_const_mult: multiplies a signed sample by one fixed coefficient using
// only shifts and adds (a primitive operator section).
//
// The constant C is recoded at elaboration into canonical signed digits; the
// product is the sum of x shifted by each +1 digit position minus x shifted by
// each -1 digit position, so no general multiplier is built. Each coefficient
// gets its own digit set: common sub-expressions between coefficients are not
// shared, which is this design's simplification.
//
// Interface: combinational, x (IN_W bits, signed) -> y (OUT_W bits, signed).
// OUT_W must hold IN_W plus the bit length of C.
module adct_const_mult
  import adct_pkg::*;
#(
  parameter int          IN_W  = 10,
  parameter int          OUT_W = 22,
  parameter int unsigned C     = 2896
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);

  localparam logic [31:0] POS = csd_mask(C, 1'b0);
  localparam logic [31:0] NEG = csd_mask(C, 1'b1);

  logic signed [OUT_W-1:0] xe;
  assign xe = OUT_W'(x);

  always_comb begin
    y = '0;
    for (int k = 0; k < OUT_W; k++) begin
      if (POS[k]) y = y + (xe <<< k);
      if (NEG[k]) y = y - (xe <<< k);
    end
  end

endmodule
