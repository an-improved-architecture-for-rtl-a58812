// tb_adct: end-to-end test of the adaptive DCT at its default parameters.
//
// Sends vectors x[0..7] as mirrored pairs and checks, for each one:
//   - X(0..7), Xe(0..3), Xo(0..3) exactly against the rounded-coefficient
//     transforms computed from the DCT definitions;
//   - X(k) / 2^(COEF_FRAC+1), the orthonormal 8-point DCT, against the same DCT
//     in real arithmetic (within 0.25), and Xe, Xo scaled by sqrt(1/2) likewise;
//   - that out_valid pulses on the clock edge right after the one that took
//     pair 3 (products register, then accumulator register).
// It counts, and requires, each mechanism at least once: back-to-back vectors,
// pauses between pairs, every sample index (each R/S setting), full-scale
// inputs, a reset in the middle of a vector, and an "interlaced" vector whose
// even and odd samples come from two different pictures, for which the field
// transforms have no AC energy while the frame transform does.
module tb_adct;
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
  int xbuf [16][8];
  int wr = 0, rd = 0;
  int cycle = 0, last_edge [16];
  int n_b2b = 0, n_pause = 0, n_fullscale = 0, n_reset = 0, n_interlace = 0;
  int n_idx [4] = '{0, 0, 0, 0};
  int results = 0, sent = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real dct_real(input int npt, input int k, input int xs [8], input int sel);
    // npt = 8: whole vector; npt = 4: even (sel 0) or odd (sel 1) samples; orthonormal
    real acc = 0.0, e;
    e = (k == 0) ? $sqrt(0.5) : 1.0;
    for (int m = 0; m < npt; m++)
      acc += $cos(real'((2*m+1)*k) * PI / real'(2*npt)) * real'((npt == 8) ? xs[m] : xs[2*m+sel]);
    return $sqrt(2.0 / real'(npt)) * e * acc;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s", what);
  endtask

  always @(posedge clk) begin
    #1;
    if (out_valid && rst_n) begin
      int xr [8];
      bit ac_field, ac_frame;
      results++;
      if (rd == wr) fail("result without a vector");
      else begin
        xr = xbuf[rd % 16];
        checks++;
        if (cycle - last_edge[rd % 16] != 1)
          fail($sformatf("latency %0d edges, expected 1", cycle - last_edge[rd % 16]));
        rd++;
        for (int k = 0; k < 8; k++) begin
          checks += 2;
          if (longint'(X8[k]) != dct8(k, xr, F)) fail($sformatf("X(%0d)=%0d expected %0d", k, X8[k], dct8(k, xr, F)));
          if (fabs(real'(X8[k]) / (2.0 ** (F + 1)) - dct_real(8, k, xr, 0)) > 0.25)
            fail($sformatf("X(%0d) far from the real DCT", k));
        end
        for (int k = 0; k < 4; k++) begin
          checks += 4;
          if (longint'(Xe[k]) != dct4(k, xr, 1'b0, F)) fail($sformatf("Xe(%0d)=%0d expected %0d", k, Xe[k], dct4(k, xr, 1'b0, F)));
          if (longint'(Xo[k]) != dct4(k, xr, 1'b1, F)) fail($sformatf("Xo(%0d)=%0d expected %0d", k, Xo[k], dct4(k, xr, 1'b1, F)));
          if (fabs(real'(Xe[k]) * $sqrt(0.5) / (2.0 ** F) - dct_real(4, k, xr, 0)) > 0.25) fail($sformatf("Xe(%0d) far from the real DCT", k));
          if (fabs(real'(Xo[k]) * $sqrt(0.5) / (2.0 ** F) - dct_real(4, k, xr, 1)) > 0.25) fail($sformatf("Xo(%0d) far from the real DCT", k));
        end
        // interlaced pattern: field AC must vanish, frame X(7) must not
        ac_field = 0;
        for (int k = 1; k < 4; k++) ac_field |= (Xe[k] != 0) || (Xo[k] != 0);
        ac_frame = (X8[7] != 0);
        if (xr[0] == xr[2] && xr[2] == xr[4] && xr[4] == xr[6] && xr[1] == xr[3] && xr[3] == xr[5]
            && xr[5] == xr[7] && xr[0] != xr[1]) begin
          checks++;
          if (ac_field || !ac_frame) fail("interlaced vector: field AC not zero or frame X(7) zero");
          else n_interlace++;
        end
      end
    end
  end

  // send one vector; pause = 1 inserts idle cycles between pairs
  task automatic send(input int xs [8], input bit pause);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk);
      if (pause && k > 0) begin
        in_valid = 0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      in_valid = 1;
      x_lo = IN_W'(xs[k]);
      x_hi = IN_W'(xs[7-k]);
      n_idx[k]++;
      if (k == 3) begin
        xbuf[wr % 16] = xs;
        last_edge[wr % 16] = cycle + 1;
        wr++;
      end
    end
    sent++;
  endtask

  task automatic idle(input int c);
    @(negedge clk);
    in_valid = 0;
    repeat (c - 1) @(negedge clk);
  endtask

  initial begin
    int xs [8];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // full-scale vectors
    xs = '{255, 255, 255, 255, 255, 255, 255, 255}; send(xs, 0); n_fullscale++;
    xs = '{-256, -256, -256, -256, -256, -256, -256, -256}; send(xs, 0); n_fullscale++;
    xs = '{255, -256, 255, -256, 255, -256, 255, -256}; send(xs, 0); n_fullscale++;
    xs = '{-256, 255, 255, -256, -256, 255, 255, -256}; send(xs, 0); n_fullscale++;
    idle(3);

    // interlaced picture: even lines from one field, odd lines shifted content
    xs = '{200, 40, 200, 40, 200, 40, 200, 40}; send(xs, 0);
    xs = '{-30, 90, -30, 90, -30, 90, -30, 90}; send(xs, 1);
    idle(2);

    // random vectors, back to back, with occasional pauses and idles
    for (int v = 0; v < 300; v++) begin
      bit pause;
      for (int m = 0; m < 8; m++) xs[m] = int'($urandom_range(0, 511)) - 256;
      pause = ($urandom_range(0, 4) == 0);
      if (pause) n_pause++;
      send(xs, pause);
      if ($urandom_range(0, 9) == 0) idle(int'($urandom_range(1, 4)));
      else if (!pause) n_b2b++;
    end

    // reset in the middle of a vector, then carry on
    @(negedge clk);
    in_valid = 1;
    x_lo = 9'sd17;
    x_hi = -9'sd3;
    @(negedge clk);
    x_lo = 9'sd5;
    @(negedge clk);
    in_valid = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    n_reset++;
    for (int v = 0; v < 10; v++) begin
      for (int m = 0; m < 8; m++) xs[m] = int'($urandom_range(0, 511)) - 256;
      send(xs, 0);
    end
    idle(6);

    checks++;
    if (results != sent || rd != wr) fail($sformatf("%0d results for %0d vectors", results, sent));
    checks++;
    if (n_b2b == 0 || n_pause == 0 || n_fullscale == 0 || n_reset == 0 || n_interlace < 2
        || n_idx[0] == 0 || n_idx[1] == 0 || n_idx[2] == 0 || n_idx[3] == 0)
      fail("a mechanism was not exercised");
    $display("vectors=%0d back_to_back=%0d paused=%0d fullscale=%0d interlaced=%0d resets=%0d pairs_per_index=%0d,%0d,%0d,%0d",
             sent, n_b2b, n_pause, n_fullscale, n_interlace, n_reset, n_idx[0], n_idx[1], n_idx[2], n_idx[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
