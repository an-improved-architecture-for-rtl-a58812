// tb_adct_swap: checks that the permutation block crosses its two streams
// exactly on the sample indices its pattern selects, for two patterns.
module tb_adct_swap;
  localparam int W = 22;
  logic [1:0]          n;
  logic signed [W-1:0] a, b, y0, y1, z0, z1;
  int checks = 0, failures = 0;

  adct_swap #(.W(W), .SWAP(4'b0110)) dut  (.n(n), .a(a), .b(b), .y0(y0), .y1(y1));
  adct_swap #(.W(W), .SWAP(4'b1000)) dut2 (.n(n), .a(a), .b(b), .y0(z0), .y1(z1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      n = 2'(i);
      a = W'($urandom);
      b = W'($urandom);
      #1;
      checks++;
      if ((n == 1 || n == 2) ? (y0 != b || y1 != a) : (y0 != a || y1 != b)) begin
        failures++;
        $display("FAIL n=%0d", n);
      end
      checks++;
      if ((n == 3) ? (z0 != b || z1 != a) : (z0 != a || z1 != b)) begin
        failures++;
        $display("FAIL second pattern n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
