// tb_adct_odd_perm: tags the four inputs (a1, a3, a5, a7 products) with
// distinct values and checks, for every sample index n, that each output line
// carries the coefficient the odd rows of the 8-point DCT matrix need there.
module tb_adct_odd_perm;
  localparam int W = 22;
  logic [1:0]          n;
  logic signed [W-1:0] a [4];
  logic signed [W-1:0] y [4];
  int checks = 0, failures = 0;
  // coefficient index (1, 3, 5 or 7) wanted on output line X(2j+1) for pair n:
  // |cos((2n+1)(2j+1) pi/16)| = a_i with i folded into 0..8
  function automatic int want(input int j, input int nn);
    int i;
    i = ((2*nn + 1) * (2*j + 1)) % 32;
    if (i > 16) i = 32 - i;
    if (i > 8) i = 16 - i;
    return i;
  endfunction

  adct_odd_perm #(.W(W)) dut (.n(n), .a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 40; r++) begin
      int base;
      base = int'($urandom_range(0, 100000));
      for (int j = 0; j < 4; j++) a[j] = W'(base + 2*j + 1);   // a[j] tagged with its index 2j+1
      for (int nn = 0; nn < 4; nn++) begin
        n = 2'(nn);
        #1;
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (int'(y[j]) - base != want(j, nn)) begin
            failures++;
            $display("FAIL n=%0d line X(%0d) carries a%0d, wants a%0d", nn, 2*j+1, int'(y[j]) - base, want(j, nn));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
