// tb_adct_ctrl: checks the sample index counter: it advances only with
// in_valid, wraps every four pairs, flags pairs 0 and 3, and restarts on reset.
module tb_adct_ctrl;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [1:0] n;
  logic first, last;
  int checks = 0, failures = 0, model = 0;

  adct_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (int'(n) != model || first != (model == 0) || last != (model == 3)) begin
      failures++;
      $display("FAIL n=%0d first=%0b last=%0b model=%0d", n, first, last, model);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      #1;
      check();
      @(posedge clk);
      if (in_valid) model = (model + 1) % 4;
      if (i == 150) begin
        #1;
        rst_n = 0;
        model = 0;
        #1;
        check();
        @(negedge clk);
        in_valid = 0;
        rst_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
