// tb_adct_interlace: runs the adaptive DCT, at its default parameters, over the
// eight columns of 8x8 picture blocks taken from an interlaced frame, as the
// vertical pass of a coder would. The picture is a horizontal sine of period
// 32 pixels plus a gentle vertical ramp. In the "moving" block the odd field is
// shifted 16 pixels against the even field (a half period, so the odd lines are
// inverted). The "still" block has no shift.
//
// Every result is checked exactly against the reference transforms. Then, per
// block, the share of energy in the upper half of the vertical spectrum is
// compared: frame mode X(4..7) of the orthonormal 8-point DCT against field
// mode Xe(2..3), Xo(2..3) of the orthonormal 4-point DCTs. For the moving block
// the frame share must be far larger (field mode is the better choice); for the
// still block it must be small (frame mode is fine).
module tb_adct_interlace;
  import adct_ref_pkg::*;
  localparam int IN_W = 9, F = 12, OUT_W = IN_W + 1 + F + 2;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IN_W-1:0]  x_lo = '0, x_hi = '0;
  logic                    out_valid;
  logic signed [OUT_W-1:0] X8 [8];
  logic signed [OUT_W-1:0] Xe [4];
  logic signed [OUT_W-1:0] Xo [4];

  adct dut (.*);

  int checks = 0, failures = 0;
  int col [8][8];          // col[c][r]: sample of line r, column c
  int got = 0;
  real e_frame_hi, e_frame, e_field_hi, e_field;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pixel(input int r, input int c, input int shift);
    real v;
    v = 100.0 * $sin(2.0 * PI * real'(c + ((r % 2) ? shift : 0)) / 32.0) + 2.0 * real'(r);
    return int'($floor(v + 0.5));
  endfunction

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      int xr [8];
      real v;
      xr = col[got];
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (longint'(X8[k]) != dct8(k, xr, F)) begin
          failures++;
          $display("FAIL column %0d X(%0d)", got, k);
        end
        v = real'(X8[k]) / (2.0 ** (F + 1));
        e_frame += v * v;
        if (k >= 4) e_frame_hi += v * v;
      end
      for (int k = 0; k < 4; k++) begin
        checks += 2;
        if (longint'(Xe[k]) != dct4(k, xr, 1'b0, F) || longint'(Xo[k]) != dct4(k, xr, 1'b1, F)) begin
          failures++;
          $display("FAIL column %0d field coefficient %0d", got, k);
        end
        v = real'(Xe[k]) * $sqrt(0.5) / (2.0 ** F);
        e_field += v * v;
        if (k >= 2) e_field_hi += v * v;
        v = real'(Xo[k]) * $sqrt(0.5) / (2.0 ** F);
        e_field += v * v;
        if (k >= 2) e_field_hi += v * v;
      end
      got++;
    end
  end

  task automatic run_block(input int shift, input int c0);
    e_frame_hi = 0.0; e_frame = 0.0; e_field_hi = 0.0; e_field = 0.0;
    got = 0;
    for (int c = 0; c < 8; c++)
      for (int r = 0; r < 8; r++) col[c][r] = pixel(r, c0 + c, shift);
    for (int c = 0; c < 8; c++)
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        in_valid = 1;
        x_lo = IN_W'(col[c][k]);
        x_hi = IN_W'(col[c][7-k]);
      end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (got != 8) begin
      failures++;
      $display("FAIL %0d columns returned", got);
    end
  endtask

  initial begin
    real frame_share, field_share;
    repeat (3) @(negedge clk);
    rst_n = 1;

    run_block(16, 3);
    frame_share = e_frame_hi / e_frame;
    field_share = e_field_hi / e_field;
    $display("moving block: high-band energy share frame %0.3f field %0.3f", frame_share, field_share);
    checks++;
    if (!(frame_share > 0.5 && field_share < 0.05)) begin
      failures++;
      $display("FAIL moving block does not favour field mode");
    end

    run_block(0, 3);
    frame_share = e_frame_hi / e_frame;
    field_share = e_field_hi / e_field;
    $display("still block:  high-band energy share frame %0.3f field %0.3f", frame_share, field_share);
    checks++;
    if (!(frame_share < 0.05)) begin
      failures++;
      $display("FAIL still block has high-band energy in frame mode");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
