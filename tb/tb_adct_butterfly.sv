// tb_adct_butterfly: checks sum and difference of the input butterfly on the
// extreme sample values and on random pairs.
module tb_adct_butterfly;
  localparam int IN_W = 9;
  logic signed [IN_W-1:0] a, b;
  logic signed [IN_W:0]   sum, diff;
  int checks = 0, failures = 0;

  adct_butterfly #(.IN_W(IN_W)) dut (.a(a), .b(b), .sum(sum), .diff(diff));

  task automatic try(input int va, input int vb);
    a = IN_W'(va);
    b = IN_W'(vb);
    #1;
    checks++;
    if (int'(sum) != va + vb || int'(diff) != va - vb) begin
      failures++;
      $display("FAIL a=%0d b=%0d sum=%0d diff=%0d", va, vb, sum, diff);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(255, 255); try(-256, -256); try(255, -256); try(-256, 255); try(0, 0);
    for (int i = 0; i < 500; i++) try(int'($urandom_range(0, 511)) - 256, int'($urandom_range(0, 511)) - 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
