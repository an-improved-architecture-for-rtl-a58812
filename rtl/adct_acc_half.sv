// adct_acc_half: accumulator of one 4-point field DCT output ("+", "Acc", "/2").
//
// Each sample pair contributes one term from the products of the butterfly
// sum (ts) and one from the products of the butterfly difference (td). They are
// added, accumulated over the four pairs of the vector, and the total is halved.
// Because ts + td always equals twice a coefficient times a single sample, the
// total is even and the halving (an arithmetic shift) loses nothing.
//
// Timing and reset as adct_acc: the term of pair 0 (first) restarts the sum and
// y / y_valid are registered on the edge that takes the term of pair 3 (last).
//
// The adder, accumulator and halving are part of the architecture; the
// restart on the first term and the widths are this design's choices.
module adct_acc_half #(
  parameter int W = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,
  input  logic                first,
  input  logic                last,
  input  logic signed [W-1:0] ts,
  input  logic signed [W-1:0] td,
  output logic signed [W+1:0] y,
  output logic                y_valid
);

  logic signed [W+2:0] acc;
  logic signed [W+2:0] nxt;

  assign nxt = (first ? '0 : acc) + (W+3)'(ts) + (W+3)'(td);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= valid && last;
      if (valid) begin
        acc <= nxt;
        if (last) y <= (W+2)'(nxt >>> 1);
      end
    end
  end

endmodule
