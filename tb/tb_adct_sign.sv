// tb_adct_sign: checks that the sign block negates exactly on the sample
// indices its pattern selects, for two patterns.
module tb_adct_sign;
  localparam int W = 22;
  logic [1:0]          n;
  logic signed [W-1:0] a, y, z;
  int checks = 0, failures = 0;

  adct_sign #(.W(W), .NEG(4'b1010)) dut  (.n(n), .a(a), .y(y));
  adct_sign #(.W(W), .NEG(4'b0110)) dut2 (.n(n), .a(a), .y(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      n = 2'(i);
      a = W'(int'($urandom_range(0, 2000000)) - 1000000);
      #1;
      checks++;
      if (int'(y) != ((n == 1 || n == 3) ? -int'(a) : int'(a))) begin
        failures++;
        $display("FAIL n=%0d a=%0d y=%0d", n, a, y);
      end
      checks++;
      if (int'(z) != ((n == 1 || n == 2) ? -int'(a) : int'(a))) begin
        failures++;
        $display("FAIL second pattern n=%0d a=%0d y=%0d", n, a, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
