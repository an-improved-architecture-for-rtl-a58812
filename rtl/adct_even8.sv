// adct_even8: even half of the 8-point DCT, X(0), X(4), X(2), X(6).
//
// Takes the a4, a2 and a6 products of the butterfly sum s_n = x[n] + x[7-n] and
// accumulates, over n = 0..3:
//   X(0) = sum  a4 * s_n
//   X(4) = sum  a4 * s_n * (+, -, -, +)      sign block Sa
//   X(2) = sum (a2, a6, a6, a2) * s_n * (+, +, -, -)   R0 output 0, sign block Sb
//   X(6) = sum (a6, a2, a2, a6) * s_n * (+, -, +, -)   R0 output 1, sign block Sc
// R0 exchanges the a2 and a6 streams on n = 1 and 2, so each product is used
// by both X(2) and X(6) in every cycle.
//
// Interface: n, valid, first, last describe the pair whose products are
// presented. X[k] holds X(2k) (k = 0..3), registered one cycle after the last
// pair, with y_valid.
//
// Block structure (R0, Sa..Sc, accumulators) follows the architecture; the
// patterns are derived from the even rows of the 8-point DCT matrix.
module adct_even8
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
  input  logic signed [W-1:0] p_a2,
  input  logic signed [W-1:0] p_a4,
  input  logic signed [W-1:0] p_a6,
  output logic signed [W+1:0] X [4],
  output logic                y_valid
);

  logic signed [W-1:0] r0_y0, r0_y1;
  logic signed [W-1:0] t [4];
  logic [3:0]          v;

  assign t[0] = p_a4;
  adct_sign #(.W(W), .NEG(4'b0110)) u_sa (.n(n), .a(p_a4), .y(t[2]));
  adct_swap #(.W(W), .SWAP(4'b0110)) u_r0 (.n(n), .a(p_a2), .b(p_a6), .y0(r0_y0), .y1(r0_y1));
  adct_sign #(.W(W), .NEG(4'b1100)) u_sb (.n(n), .a(r0_y0), .y(t[1]));
  adct_sign #(.W(W), .NEG(4'b1010)) u_sc (.n(n), .a(r0_y1), .y(t[3]));

  for (genvar k = 0; k < 4; k++) begin : g_acc
    adct_acc #(.W(W)) u_acc (
      .clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .last(last),
      .term(t[k]), .y(X[k]), .y_valid(v[k])
    );
  end

  assign y_valid = &v;  // all accumulators share the control, so they agree

endmodule
