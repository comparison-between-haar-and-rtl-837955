// tb_ref_pkg: reference arithmetic for the filter-bank testbenches.
//
// Holds the wavelet filter coefficients as real numbers (Haar 2-tap and
// Daubechies 4-tap), quantises them to 14 fraction bits by rounding, and
// computes filter outputs with 64-bit integer arithmetic, independently of
// the design's coefficient function and data path.
package tb_ref_pkg;

  // w: 0 = Haar, 1 = Daubechies-4; f: 0 = H0, 1 = H1, 2 = G0, 3 = G1.
  function automatic real coef_real(int w, int f, int k);
    real haar [4][2] = '{'{0.5, 0.5}, '{1.0, -1.0}, '{1.0, 1.0}, '{-0.5, 0.5}};
    real daub [4][4] = '{'{0.4830, 0.8365, 0.2241, -0.1294},
                         '{0.1294, 0.2241, -0.8365, 0.4830},
                         '{-0.1294, 0.2241, 0.8365, 0.4830},
                         '{0.4830, -0.8365, 0.2241, 0.1294}};
    if (w == 0) return (k < 2) ? haar[f][k] : 0.0;
    return (k < 4) ? daub[f][k] : 0.0;
  endfunction

  function automatic longint qcoef(int w, int f, int k);
    real c = coef_real(w, f, k) * 16384.0;
    return (c >= 0.0) ? longint'($floor(c + 0.5)) : -longint'($floor(-c + 0.5));
  endfunction

  function automatic int ntaps(int w);
    return (w == 0) ? 2 : 4;
  endfunction

  // Round half up by 'shift' bits (arithmetic), then saturate to 'w' bits.
  function automatic longint round_sat(longint acc, int shift, int w);
    longint r = (shift > 0) ? ((acc + (longint'(1) <<< (shift - 1))) >>> shift) : acc;
    longint hi = (longint'(1) <<< (w - 1)) - 1;
    longint lo = -(longint'(1) <<< (w - 1));
    if (r > hi) return hi;
    if (r < lo) return lo;
    return r;
  endfunction

endpackage
