// tb_adct_odd8: drives the odd 8-point section with the a1, a3, a5, a7 products of the
// butterfly differences of random and extreme vectors and checks X(1), X(3),
// X(5), X(7) against the 8-point DCT of the samples, and one result per vector.
module tb_adct_odd8;
  import adct_ref_pkg::*;
  localparam int F = 12, W = 22;
  logic clk = 0, rst_n = 0, valid = 0, first = 0, last = 0;
  logic [1:0] n = '0;
  logic signed [W-1:0] p [4];
  logic signed [W+1:0] X [4];
  logic y_valid;
  int checks = 0, failures = 0, results = 0, vectors = 0;
  int x [8];
  int xbuf [16][8];   // vectors sent and not yet checked
  int wr = 0, rd = 0;

  adct_odd8 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare every finished vector with the reference transform of its samples
  always @(posedge clk) begin
    #1;
    if (y_valid) begin
      int xr [8];
      results++;
      if (rd == wr) begin
        failures++;
        $display("FAIL result without a vector");
      end else begin
        xr = xbuf[rd % 16];
        rd++;
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (longint'(X[j]) != dct8(2*j+1, xr, F)) begin
            failures++;
            $display("FAIL X(%0d)=%0d expected %0d", 2*j+1, X[j], dct8(2*j+1, xr, F));
          end
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 200; v++) begin
      for (int m = 0; m < 8; m++)
        x[m] = (v == 0) ? 255 : (v == 1) ? ((m % 2) ? -256 : 255) : int'($urandom_range(0, 511)) - 256;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        if (v % 4 == 3) begin
          valid = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
        valid = 1;
        n     = 2'(k);
        first = (k == 0);
        last  = (k == 3);
        for (int j = 0; j < 4; j++) p[j] = W'(cq(2*j+1, F) * (x[k] - x[7-k]));
        if (k == 3) begin
          xbuf[wr % 16] = x;
          wr++;
        end
      end
      vectors++;
    end
    @(negedge clk);
    valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (results != vectors) begin
      failures++;
      $display("FAIL %0d results for %0d vectors", results, vectors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
