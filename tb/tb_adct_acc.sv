// tb_adct_acc: feeds vectors of four signed terms, back to back and with idle
// cycles between terms, and checks each finished sum and that y_valid pulses
// exactly once, on the edge that takes the last term.
module tb_adct_acc;
  localparam int W = 22;
  logic clk = 0, rst_n = 0, valid = 0, first = 0, last = 0;
  logic signed [W-1:0] term = '0;
  logic signed [W+1:0] y;
  logic y_valid;
  int checks = 0, failures = 0, pulses = 0, expected_pulses = 0;
  longint exp_sum;
  bit     expect_now = 0;

  adct_acc #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // after every rising edge: y_valid must be high exactly when a last term was taken
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (y_valid !== expect_now) begin
        failures++;
        $display("FAIL y_valid=%0b expected %0b at %0t", y_valid, expect_now, $time);
      end
      if (y_valid) begin
        pulses++;
        checks++;
        if (longint'(y) != exp_sum) begin
          failures++;
          $display("FAIL y=%0d expected %0d", y, exp_sum);
        end
      end
    end
  end

  initial begin
    longint s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 60; v++) begin
      s = 0;
      for (int n = 0; n < 4; n++) begin
        @(negedge clk);
        expect_now = 0;
        if (v % 3 == 1) begin   // idle cycles between terms on every third vector
          valid = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
        valid = 1;
        first = (n == 0);
        last  = (n == 3);
        term  = (v == 0) ? W'(-(1 << (W-1)) + 1) : W'(int'($urandom_range(0, 4000000)) - 2000000);
        s += longint'(term);
        if (n == 3) begin
          exp_sum = s;
          expected_pulses++;
        end
        @(posedge clk);
        expect_now = (n == 3);
      end
    end
    @(negedge clk);
    valid = 0;
    expect_now = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("FAIL pulses=%0d expected %0d", pulses, expected_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
