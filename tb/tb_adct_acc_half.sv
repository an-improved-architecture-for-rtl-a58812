// tb_adct_acc_half: feeds vectors of four (sum-side, difference-side) term
// pairs, back to back and with idle cycles, and checks the halved total and
// the single y_valid pulse on the edge that takes the last pair. Odd totals are
// included: they must round toward minus infinity (arithmetic shift).
module tb_adct_acc_half;
  localparam int W = 22;
  logic clk = 0, rst_n = 0, valid = 0, first = 0, last = 0;
  logic signed [W-1:0] ts = '0, td = '0;
  logic signed [W+1:0] y;
  logic y_valid;
  int checks = 0, failures = 0, pulses = 0, expected_pulses = 0;
  longint exp_y;
  bit     expect_now = 0;

  adct_acc_half #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
        if (longint'(y) != exp_y) begin
          failures++;
          $display("FAIL y=%0d expected %0d", y, exp_y);
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
        if (v % 3 == 2) begin
          valid = 0;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
        valid = 1;
        first = (n == 0);
        last  = (n == 3);
        if (v == 0) begin
          ts = W'(-(1 << (W-1)) + 1);
          td = W'(-(1 << (W-1)) + 1);
        end else begin
          ts = W'(int'($urandom_range(0, 4000000)) - 2000000);
          td = W'(int'($urandom_range(0, 4000000)) - 2000000);
        end
        s += longint'(ts) + longint'(td);
        if (n == 3) begin
          exp_y = (s >= 0) ? s / 2 : -((-s + 1) / 2);   // floor(s / 2)
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
