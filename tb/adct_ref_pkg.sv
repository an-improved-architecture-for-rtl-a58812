// adct_ref_pkg: reference model for the adaptive DCT testbenches.
//
// Works straight from the transform definitions, not from the decomposition the
// hardware uses: every matrix entry cos((2m+1)k*pi/2N) is evaluated in real
// arithmetic and rounded to COEF_FRAC fractional bits (row 0 uses cos(pi/4)),
// and the outputs are plain sums over the samples.
package adct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic longint rnd(input real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  // round(cos(i*pi/16) * 2^frac)
  function automatic longint cq(input int i, input int frac);
    return rnd($cos(real'(i) * PI / 16.0) * (2.0 ** frac));
  endfunction

  // entry (k, m) of the unnormalised N-point DCT matrix, N = 8 or 4
  function automatic longint cmat(input int npt, input int k, input int m, input int frac);
    if (k == 0) return cq(4, frac);
    return rnd($cos(real'((2*m+1)*k) * PI / real'(2*npt)) * (2.0 ** frac));
  endfunction

  // 8-point transform X(k) of x[0..7]
  function automatic longint dct8(input int k, input int x [8], input int frac);
    longint acc = 0;
    for (int m = 0; m < 8; m++) acc += cmat(8, k, m, frac) * x[m];
    return acc;
  endfunction

  // 4-point transform of the even (odd = 0) or odd (odd = 1) samples of x
  function automatic longint dct4(input int k, input int x [8], input bit odd, input int frac);
    longint acc = 0;
    for (int m = 0; m < 4; m++) acc += cmat(4, k, m, frac) * x[2*m + int'(odd)];
    return acc;
  endfunction

endpackage
