// adct_ctrl: sample index controller.
//
// Counts the sample pairs of the vector being received. n is the index of the
// pair presented now (0 for (x[0], x[7]) up to 3 for (x[3], x[4])); first and
// last flag pairs 0 and 3. The count advances only on cycles with in_valid, so
// the source may pause between pairs. Reset (asynchronous, active low) starts a
// new vector; after it, every fourth valid pair closes a vector.
//
// The architecture sets its permutations by sample index; this counter and
// its flags are this design's way of providing that index.
module adct_ctrl
  import adct_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output idx_t n,
  output logic first,
  output logic last
);

  idx_t cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (in_valid) cnt <= cnt + 2'd1;
  end

  assign n     = cnt;
  assign first = (cnt == 2'd0);
  assign last  = (cnt == 2'd3);

endmodule
