// adct_odd8: odd half of the 8-point DCT, X(1), X(3), X(5), X(7).
//
// Takes the a1, a3, a5, a7 products of the butterfly difference
// d_n = x[n] - x[7-n]. The permutation network R1..R6 (adct_odd_perm) hands each
// accumulator the coefficient it needs for pair n, and sign blocks Sd, Se, Sf
// apply the signs of the odd rows of the DCT matrix:
//   X(1): a1  a3  a5  a7     (+ + + +)
//   X(3): a3  a7  a1  a5     (+ - - -)  Sd
//   X(5): a5  a1  a7  a3     (+ - + +)  Se
//   X(7): a7  a5  a3  a1     (+ - + -)  Sf
//
// Interface and timing as adct_even8; X[k] holds X(2k+1).
//
// Block structure (R1..R6, Sd..Sf, accumulators) follows the architecture; the
// patterns are derived from the odd rows of the 8-point DCT matrix.
module adct_odd8
  import adct_pkg::*;
#(
  parameter int W = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  idx_t                n,
  input  logic                valid,
  input  logic                first,
  input  logic                last,
  input  logic signed [W-1:0] p [4],
  output logic signed [W+1:0] X [4],
  output logic                y_valid
);

  logic signed [W-1:0] r [4];
  logic signed [W-1:0] t [4];
  logic [3:0]          v;

  adct_odd_perm #(.W(W)) u_perm (.n(n), .a(p), .y(r));

  assign t[0] = r[0];
  adct_sign #(.W(W), .NEG(4'b1110)) u_sd (.n(n), .a(r[1]), .y(t[1]));
  adct_sign #(.W(W), .NEG(4'b0010)) u_se (.n(n), .a(r[2]), .y(t[2]));
  adct_sign #(.W(W), .NEG(4'b1010)) u_sf (.n(n), .a(r[3]), .y(t[3]));

  for (genvar k = 0; k < 4; k++) begin : g_acc
    adct_acc #(.W(W)) u_acc (
      .clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .last(last),
      .term(t[k]), .y(X[k]), .y_valid(v[k])
    );
  end

  assign y_valid = &v;  // all accumulators share the control, so they agree

endmodule
