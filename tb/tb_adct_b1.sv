// tb_adct_b1: checks the three even-coefficient products a2*x, a4*x, a6*x
// against the reference coefficients for extreme and random inputs.
module tb_adct_b1;
  import adct_ref_pkg::*;
  localparam int X_W = 10, F = 12, P_W = X_W + F;
  logic signed [X_W-1:0] x;
  logic signed [P_W-1:0] p2, p4, p6;
  int checks = 0, failures = 0;

  adct_b1 #(.X_W(X_W), .COEF_FRAC(F)) dut (.x(x), .p_a2(p2), .p_a4(p4), .p_a6(p6));

  task automatic try(input int v);
    x = X_W'(v);
    #1;
    checks++;
    if (longint'(p2) != cq(2, F) * v || longint'(p4) != cq(4, F) * v || longint'(p6) != cq(6, F) * v) begin
      failures++;
      $display("FAIL x=%0d p2=%0d p4=%0d p6=%0d", v, p2, p4, p6);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(1); try(-1); try(511); try(-512); try(0);
    for (int i = 0; i < 500; i++) try(int'($urandom_range(0, 1023)) - 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
