// adct_acc: accumulator ("Acc") of one 8-point DCT output.
//
// Adds the signed term of each of the four sample pairs of a vector. The term
// of pair 0 (first) restarts the sum, so vectors can follow each other with no
// idle cycle. When the term of pair 3 (last) arrives, the finished sum is
// registered on y and y_valid pulses for one cycle. Two guard bits hold the sum
// of four terms.
//
// Timing: y appears on the clock edge that takes the last term (one cycle
// latency). Reset (asynchronous, active low) clears the state.
//
// The accumulator is part of the architecture; restarting on the first term
// instead of a separate clear, and the guard bits, are this design's choices.
module adct_acc #(
  parameter int W = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid,
  input  logic                first,
  input  logic                last,
  input  logic signed [W-1:0] term,
  output logic signed [W+1:0] y,
  output logic                y_valid
);

  logic signed [W+1:0] acc;
  logic signed [W+1:0] nxt;

  assign nxt = (first ? '0 : acc) + (W+2)'(term);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= valid && last;
      if (valid) begin
        acc <= nxt;
        if (last) y <= nxt;
      end
    end
  end

endmodule
