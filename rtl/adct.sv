// adct: adaptive 1-D discrete cosine transform (top level).
//
// From one vector x[0..7] it computes, at the same time and with shared
// multipliers, the 8-point DCT X(0..7) (frame mode) and the 4-point DCTs Xe of
// x[0],x[2],x[4],x[6] and Xo of x[1],x[3],x[5],x[7] (field mode), so a coder can
// pick the better of the two for each block of an interlaced picture.
//
// Datapath: the butterfly forms s_n = x[n]+x[7-n] and d_n = x[n]-x[7-n]. One B1
// block multiplies s_n by a4, a2, a6, a second B1 multiplies d_n by the same
// three coefficients and B2 multiplies d_n by a1, a3, a5, a7 (a_i = cos(i*pi/16)),
// all by shift-and-add. The products are registered (one pipeline stage), then
// permuted (R blocks), sign-changed (S blocks) and accumulated over the four
// pairs of the vector in 16 accumulators: adct_even8, adct_odd8, adct_field4.
//
// Scaling: outputs are the unnormalised sums of the matrix rows, i.e.
//   X(k)  = sum_m  c_k(m) x[m]   with c_0 = a4 and c_k(m) = cos((2m+1)k*pi/16),
//   Xe(k) = sum_m  c'_k(m) x[2m], Xo(k) = sum_m c'_k(m) x[2m+1], c'_0 = a4 and
//   c'_k(m) = cos((2m+1)k*pi/8),
// times 2^COEF_FRAC. The orthonormal DCT is X/2 (8-point) and Xe*sqrt(1/2)
// (4-point); that scaling is left to the quantiser.
//
// Interface: present pair n = 0..3 as (x_lo, x_hi) = (x[n], x[7-n]) with
// in_valid; pairs may be separated by idle cycles and vectors may follow each
// other back to back (one vector per four cycles). All 16 results are
// registered, with a one-cycle out_valid, on the clock edge after the one that
// samples pair 3: the products register and then the accumulators. Reset is
// asynchronous, active low.
//
// The word lengths (IN_W sample bits, COEF_FRAC coefficient fraction bits), the
// single pipeline register, the pair interface and the reset are this design's
// choices; the decomposition, the block structure (B1, B2, R0..R8, sign blocks,
// accumulators, /2) and the sharing follow the architecture it implements.
module adct
  import adct_pkg::*;
#(
  parameter int  IN_W      = 9,
  parameter int  COEF_FRAC = 12,
  localparam int X_W       = IN_W + 1,
  localparam int P_W       = X_W + COEF_FRAC,
  localparam int OUT_W     = P_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_lo,
  input  logic signed [IN_W-1:0]  x_hi,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] X8 [8],
  output logic signed [OUT_W-1:0] Xe [4],
  output logic signed [OUT_W-1:0] Xo [4]
);

  typedef struct packed {
    logic                  valid;
    logic                  first;
    logic                  last;
    idx_t                  n;
    logic signed [P_W-1:0] s_a2, s_a4, s_a6;    // lower B1: products of the sum
    logic signed [P_W-1:0] d_a2, d_a4, d_a6;    // upper B1: products of the difference
    logic signed [P_W-1:0] d_a1, d_a3, d_a5, d_a7;  // B2
  } prod_t;

  idx_t                  n;
  logic                  first, last;
  logic signed [X_W-1:0] s, d;
  prod_t                 pc, pq;
  logic signed [P_W-1:0] b2_p [4];
  logic signed [P_W-1:0] odd_p [4];
  logic signed [OUT_W-1:0] ev [4], od [4];
  logic                  v_even, v_odd, v_field;

  adct_ctrl u_ctrl (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .n(n), .first(first), .last(last));

  adct_butterfly #(.IN_W(IN_W)) u_bfly (.a(x_lo), .b(x_hi), .sum(s), .diff(d));

  adct_b1 #(.X_W(X_W), .COEF_FRAC(COEF_FRAC)) u_b1_sum (
    .x(s), .p_a2(pc.s_a2), .p_a4(pc.s_a4), .p_a6(pc.s_a6)
  );
  adct_b1 #(.X_W(X_W), .COEF_FRAC(COEF_FRAC)) u_b1_diff (
    .x(d), .p_a2(pc.d_a2), .p_a4(pc.d_a4), .p_a6(pc.d_a6)
  );
  adct_b2 #(.X_W(X_W), .COEF_FRAC(COEF_FRAC)) u_b2 (.x(d), .p(b2_p));

  assign pc.valid = in_valid;
  assign pc.first = first;
  assign pc.last  = last;
  assign pc.n     = n;
  assign pc.d_a1  = b2_p[0];
  assign pc.d_a3  = b2_p[1];
  assign pc.d_a5  = b2_p[2];
  assign pc.d_a7  = b2_p[3];

  // Pipeline register between the constant multipliers and the accumulators.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pq <= '0;
    else        pq <= pc;
  end

  assign odd_p[0] = pq.d_a1;
  assign odd_p[1] = pq.d_a3;
  assign odd_p[2] = pq.d_a5;
  assign odd_p[3] = pq.d_a7;

  adct_even8 #(.W(P_W)) u_even8 (
    .clk(clk), .rst_n(rst_n), .n(pq.n), .valid(pq.valid), .first(pq.first), .last(pq.last),
    .p_a2(pq.s_a2), .p_a4(pq.s_a4), .p_a6(pq.s_a6), .X(ev), .y_valid(v_even)
  );

  adct_odd8 #(.W(P_W)) u_odd8 (
    .clk(clk), .rst_n(rst_n), .n(pq.n), .valid(pq.valid), .first(pq.first), .last(pq.last),
    .p(odd_p), .X(od), .y_valid(v_odd)
  );

  adct_field4 #(.W(P_W)) u_field4 (
    .clk(clk), .rst_n(rst_n), .n(pq.n), .valid(pq.valid), .first(pq.first), .last(pq.last),
    .ps_a2(pq.s_a2), .ps_a4(pq.s_a4), .ps_a6(pq.s_a6),
    .pd_a2(pq.d_a2), .pd_a4(pq.d_a4), .pd_a6(pq.d_a6),
    .Xe(Xe), .Xo(Xo), .y_valid(v_field)
  );

  for (genvar k = 0; k < 4; k++) begin : g_out
    assign X8[2*k]   = ev[k];
    assign X8[2*k+1] = od[k];
  end

  assign out_valid = v_even;

  // The three sections see the same control and must finish together.
  a_sections_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (v_even == v_odd) && (v_even == v_field));

endmodule
