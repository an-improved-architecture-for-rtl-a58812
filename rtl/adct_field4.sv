// adct_field4: the two 4-point DCTs of the field (4x8) mode.
//
// Xe is the 4-point DCT of the even samples x[0], x[2], x[4], x[6] and Xo that of
// the odd samples x[1], x[3], x[5], x[7]. Neither needs the samples themselves:
// since x[n] = (s_n + d_n)/2 and x[7-n] = (s_n - d_n)/2, with s_n and d_n the
// butterfly sum and difference, each output is half the sum over n of one
// a2/a4/a6 product of s_n and one of d_n, with signs set by n:
//   Xe(0) = 1/2 sum a4 s (+ + + +)             + a4 d (+ - + -)
//   Xe(2) = 1/2 sum a4 s (+ + - -)             + a4 d (+ - - +)
//   Xe(1) = 1/2 sum (a2 a2 a6 a6) s (+ - + -)  + (a2 a2 a6 a6) d (+ + + +)
//   Xe(3) = 1/2 sum (a6 a6 a2 a2) s (+ - - +)  + (a6 a6 a2 a2) d (+ + - -)
//   Xo(0) = 1/2 sum a4 s (+ + + +)             + a4 d (- + - +)
//   Xo(2) = 1/2 sum a4 s (+ + - -)             + a4 d (- + + -)
//   Xo(1) = 1/2 sum (a2 a2 a6 a6) s (- + - +)  + (a2 a2 a6 a6) d (+ + + +)
//   Xo(3) = 1/2 sum (a6 a6 a2 a2) s (- + + -)  + (a6 a6 a2 a2) d (+ + - -)
// R7 (sum side) and R8 (difference side) exchange the a2 and a6 streams on
// n = 2 and 3. Ten sign blocks cover the sixteen terms: two terms need none and
// two signed streams are each shared by an Xe and an Xo output.
//
// Interface and timing as adct_even8; Xe[k] = Xe(k), Xo[k] = Xo(k).
//
// R7, R8, the sign blocks and the accumulators with /2 follow the
// architecture; the assignment of the sign blocks to terms is this design's.
module adct_field4
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
  input  logic signed [W-1:0] ps_a2,
  input  logic signed [W-1:0] ps_a4,
  input  logic signed [W-1:0] ps_a6,
  input  logic signed [W-1:0] pd_a2,
  input  logic signed [W-1:0] pd_a4,
  input  logic signed [W-1:0] pd_a6,
  output logic signed [W+1:0] Xe [4],
  output logic signed [W+1:0] Xo [4],
  output logic                y_valid
);

  logic signed [W-1:0] r7_y0, r7_y1, r8_y0, r8_y1;
  // sum-side and difference-side terms per output
  logic signed [W-1:0] se [4], de [4], so [4], do_ [4];
  logic [7:0]          v;

  adct_swap #(.W(W), .SWAP(4'b1100)) u_r7 (.n(n), .a(ps_a2), .b(ps_a6), .y0(r7_y0), .y1(r7_y1));
  adct_swap #(.W(W), .SWAP(4'b1100)) u_r8 (.n(n), .a(pd_a2), .b(pd_a6), .y0(r8_y0), .y1(r8_y1));

  // k = 0
  assign se[0] = ps_a4;
  assign so[0] = ps_a4;
  adct_sign #(.W(W), .NEG(4'b1010)) u_s_de0 (.n(n), .a(pd_a4), .y(de[0]));
  adct_sign #(.W(W), .NEG(4'b0101)) u_s_do0 (.n(n), .a(pd_a4), .y(do_[0]));
  // k = 2
  adct_sign #(.W(W), .NEG(4'b1100)) u_s_s2  (.n(n), .a(ps_a4), .y(se[2]));
  assign so[2] = se[2];
  adct_sign #(.W(W), .NEG(4'b0110)) u_s_de2 (.n(n), .a(pd_a4), .y(de[2]));
  adct_sign #(.W(W), .NEG(4'b1001)) u_s_do2 (.n(n), .a(pd_a4), .y(do_[2]));
  // k = 1
  adct_sign #(.W(W), .NEG(4'b1010)) u_s_se1 (.n(n), .a(r7_y0), .y(se[1]));
  adct_sign #(.W(W), .NEG(4'b0101)) u_s_so1 (.n(n), .a(r7_y0), .y(so[1]));
  assign de[1]  = r8_y0;
  assign do_[1] = r8_y0;
  // k = 3
  adct_sign #(.W(W), .NEG(4'b0110)) u_s_se3 (.n(n), .a(r7_y1), .y(se[3]));
  adct_sign #(.W(W), .NEG(4'b1001)) u_s_so3 (.n(n), .a(r7_y1), .y(so[3]));
  adct_sign #(.W(W), .NEG(4'b1100)) u_s_d3  (.n(n), .a(r8_y1), .y(de[3]));
  assign do_[3] = de[3];

  for (genvar k = 0; k < 4; k++) begin : g_acc
    adct_acc_half #(.W(W)) u_acc_e (
      .clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .last(last),
      .ts(se[k]), .td(de[k]), .y(Xe[k]), .y_valid(v[k])
    );
    adct_acc_half #(.W(W)) u_acc_o (
      .clk(clk), .rst_n(rst_n), .valid(valid), .first(first), .last(last),
      .ts(so[k]), .td(do_[k]), .y(Xo[k]), .y_valid(v[4+k])
    );
  end

  assign y_valid = &v;  // all accumulators share the control, so they agree

endmodule
