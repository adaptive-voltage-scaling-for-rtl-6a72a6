// dct_ref_pkg: reference model for the DCT testbenches. It builds the 8x8
// DCT matrix entry by entry from the angle (2i+1)k*pi/16, folding the angle
// into the first quadrant to find which of the seven coefficient magnitudes
// (and which sign) applies, and multiplies directly. Coefficient values are
// the integer codes (value * 128) of the three coefficient sets, written out
// here independently of the design's package.
package dct_ref_pkg;
  // index 0..6 = a..g ; a = cos(pi/16)/2 ... d = cos(pi/4)/2 ... g = cos(7pi/16)/2
  function automatic int coef_val(input int mode, input int idx);
    int orig [7] = '{63, 59, 53, 45, 36, 24, 12};
    int t1   [7] = '{63, 60, 51, 44, 35, 24, 11};
    int t2   [7] = '{60, 56, 52, 44, 36, 24, 12};
    case (mode)
      1: return t1[idx];
      2: return t2[idx];
      default: return orig[idx];
    endcase
  endfunction

  // Signed matrix entry T[k][i] (scaled by 128).
  function automatic int entry(input int mode, input int k, input int i);
    int m, sgn;
    if (k == 0) return coef_val(mode, 3);           // d for the DC row
    m = ((2 * i + 1) * k) % 32;
    sgn = 1;
    if (m > 16) m = 32 - m;                         // cos(2pi - t) = cos(t)
    if (m > 8) begin m = 16 - m; sgn = -1; end      // cos(pi - t) = -cos(t)
    return sgn * coef_val(mode, m - 1);             // m = 1..7 -> a..g
  endfunction

  function automatic int dct_ref(input int mode, input int k, input int x [8]);
    int acc = 0;
    for (int i = 0; i < 8; i++) acc += entry(mode, k, i) * x[i];
    return acc;
  endfunction
endpackage
