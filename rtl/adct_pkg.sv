// adct_pkg: types and constants shared by the adaptive DCT datapath.
//
// The transform works on one 8-sample vector x[0..7] delivered as four mirrored
// pairs (x[n], x[7-n]), n = 0..3. The pair number n is the "sample index" that
// sets every permutation (R) and sign (S) block and the accumulators.
//
// Coefficients a_i = cos(i*pi/16) are held as integers round(a_i * 2^frac).
// The word length (frac) is this design's choice; the transform itself does not
// fix it. Constant multiplication is done with canonical signed digit (CSD)
// shift-and-add networks, whose digit masks are computed here at elaboration.
package adct_pkg;

  // Sample index of a pair within a vector: n selects (x[n], x[7-n]).
  typedef logic [1:0] idx_t;

  // A four-entry pattern, one bit per sample index n (bit n is used for pair n).
  typedef logic [3:0] pat_t;

  localparam real PI = 3.14159265358979323846;

  // round(cos(i*pi/16) * 2^frac), i = 0..8
  function automatic int unsigned coef(input int i, input int frac);
    real v;
    v = $cos(real'(i) * PI / 16.0) * (2.0 ** frac);
    return int'($floor(v + 0.5));
  endfunction

  // CSD recoding of a non-negative constant. Returns the positive-digit mask
  // (neg == 0) or the negative-digit mask (neg == 1); value = pos - neg.
  function automatic logic [31:0] csd_mask(input int unsigned c, input bit neg);
    logic [31:0] pos_m;
    logic [31:0] neg_m;
    logic [33:0] v;
    pos_m = '0;
    neg_m = '0;
    v     = 34'(c);
    for (int k = 0; k < 32; k++) begin
      if (v[0]) begin
        if (v[1]) begin
          neg_m[k] = 1'b1;          // ...11 -> digit -1, carry up
          v = v + 34'd1;
        end else begin
          pos_m[k] = 1'b1;          // ...01 -> digit +1
          v = v - 34'd1;
        end
      end
      v = v >> 1;
    end
    return neg ? neg_m : pos_m;
  endfunction

endpackage
