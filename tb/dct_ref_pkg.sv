// dct_ref_pkg: reference arithmetic for the DCT testbenches.
//
// Works the expected results out from the definition, not from the RTL:
// weights are computed with $cos and rounded to nearest in units of 1/64,
// a 1D transform is the direct 8-term sum x_i * w(p,i) followed by a floor
// division by 64, and dct2_real gives the exact real-valued unnormalised
// 2D sum for a tolerance check.
package dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // round(64*cos((2i+1)p*pi/(2n))), half away from zero; rows p > 0 hold
  // at most 63/64 in magnitude (6-bit fraction), row 0 is exactly 1.
  function automatic int wn(input int n, input int p, input int i);
    real v;
    int  m;
    v = $cos((2.0 * i + 1.0) * p * PI / (2.0 * n)) * 64.0;
    m = int'($floor(rabs(v) + 0.5));
    if (p != 0 && m > 63) m = 63;
    return (v >= 0.0) ? m : -m;
  endfunction

  function automatic int w(input int p, input int i);
    return wn(8, p, i);
  endfunction

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // floor(a / 64) for signed a
  function automatic int fdiv64(input int a);
    return a >>> 6;
  endfunction

  // bit-exact 1D transform of 8 integers
  function automatic void dct1(input int x[8], output int z[8]);
    for (int p = 0; p < 8; p++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < 8; i++) acc += x[i] * w(p, i);
      z[p] = fdiv64(acc);
    end
  endfunction

  // bit-exact 1D transform of n <= 16 integers
  function automatic void dct1n(input int n, input int x[16], output int z[16]);
    for (int p = 0; p < 16; p++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < n; i++) acc += x[i] * wn(n, p, i);
      z[p] = (p < n) ? fdiv64(acc) : 0;
    end
  endfunction

  // exact real unnormalised 2D sum S_pq = sum_ij X_ij cos() cos()
  function automatic real dct2_real(input int x[8][8], input int p, input int q);
    real acc;
    acc = 0.0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        acc += x[i][j] * $cos((2.0 * i + 1.0) * p * PI / 16.0)
                       * $cos((2.0 * j + 1.0) * q * PI / 16.0);
    return acc;
  endfunction

endpackage
