// dct_pkg: cosine weights shared by the N-point DCT datapath.
//
// Every multiplier of the DCT works with a constant weight
// C_pi = cos((2i+1)*p*pi/(2N)), stored as a sign and a 6-bit fraction
// magnitude (value = magnitude / 64). The magnitude is
// min(63, round(64*|cos(k*pi/32)|)) for the folded angle index k = 0..16,
// which for N = 4, 8 and 16 covers every weight:
//   64 64 63 61 59 56 53 49 45 41 36 30 24 19 12 6 0.
// Row p = 0 has weight 1 everywhere and is handled by the dedicated Z0 unit
// (dct_vi0_unit), so only the other entries reach the 6-bit multipliers;
// cos(pi/32) (N = 16 only) rounds to 64 and is clamped to 63/64 there.
// The 6-bit fraction follows the source design; rounding to nearest and the
// clamp are this design's choices. Supported sizes: N = 4, 8, 16.
package dct_pkg;

  // round(64*cos(k*pi/32)) for k = 0..16
  function automatic int cos32(input int k);
    case (k)
      0, 1:    return 64;
      2:       return 63;
      3:       return 61;
      4:       return 59;
      5:       return 56;
      6:       return 53;
      7:       return 49;
      8:       return 45;
      9:       return 41;
      10:      return 36;
      11:      return 30;
      12:      return 24;
      13:      return 19;
      14:      return 12;
      15:      return 6;
      default: return 0;
    endcase
  endfunction

  // Angle (2i+1)*p*pi/(2N) reduced to 0..pi, in units of pi/(2N).
  function automatic int half_turn(input int n, input int p, input int i);
    int a;
    a = ((2 * i + 1) * p) % (4 * n);
    return (a > 2 * n) ? 4 * n - a : a;  // cos(2pi - x) = cos(x)
  endfunction

  // Signed weight of row p, input i, in units of 1/64 (|weight| <= 63).
  function automatic int coef(input int n, input int p, input int i);
    int a, m;
    a = half_turn(n, p, i);
    // cos(pi - x) = -cos(x): fold into the first quadrant, remember the sign
    m = cos32(((a > n) ? 2 * n - a : a) * (16 / n));
    if (m > 63) m = 63;
    return (a > n) ? -m : m;
  endfunction

endpackage
