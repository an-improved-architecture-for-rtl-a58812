// tb_adct_b2: checks the four odd-coefficient products a1*x, a3*x, a5*x, a7*x
// against the reference coefficients for extreme and random inputs.
module tb_adct_b2;
  import adct_ref_pkg::*;
  localparam int X_W = 10, F = 12, P_W = X_W + F;
  logic signed [X_W-1:0] x;
  logic signed [P_W-1:0] p [4];
  int checks = 0, failures = 0;

  adct_b2 #(.X_W(X_W), .COEF_FRAC(F)) dut (.x(x), .p(p));

  task automatic try(input int v);
    x = X_W'(v);
    #1;
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (longint'(p[j]) != cq(2*j+1, F) * v) begin
        failures++;
        $display("FAIL x=%0d a%0d product=%0d", v, 2*j+1, p[j]);
      end
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
    for (int i = 0; i < 300; i++) try(int'($urandom_range(0, 1023)) - 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
