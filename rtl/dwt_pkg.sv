// dwt_pkg: types and constants shared by the two-band wavelet filter bank.
//
// The filter bank splits a sample stream into a low band (analysis filter H0)
// and a high band (H1), each down-sampled by 2, and rebuilds it through the
// synthesis filters G0 and G1 (perfect reconstruction). Two wavelets are
// provided: the Haar 2-tap and the Daubechies 4-tap bank.
//
// Coefficients are signed fixed point, COEF_W bits with COEF_FRAC fraction
// bits: each entry is round(c * 2^14) of the published real value, e.g.
// 0.4830 -> 7913, 0.8365 -> 13705, 0.2241 -> 3672, -0.1294 -> -2120.
// Entry k multiplies the sample k steps old: y[n] = sum_k c[k] * x[n-k].
//
// The Haar and Daubechies analysis filters and the Daubechies synthesis
// filters are the published ones. The Haar high-pass synthesis filter is used
// as (-0.5, +0.5): with the published row order (0.5, -0.5) the bank would
// keep an alias term, while the time-reversed order, the same relation that
// links every other synthesis filter to its analysis filter, gives perfect
// reconstruction with a delay of one sample. The fixed-point word widths
// are this design's choice.
package dwt_pkg;

  typedef enum logic {
    HAAR  = 1'b0,
    DAUB4 = 1'b1
  } wavelet_e;

  typedef enum logic [1:0] {
    H0 = 2'd0,   // analysis low pass
    H1 = 2'd1,   // analysis high pass
    G0 = 2'd2,   // synthesis low pass
    G1 = 2'd3    // synthesis high pass
  } filter_e;

  localparam int DEF_SAMPLE_W  = 8;   // unsigned input / output samples
  localparam int DEF_SUB_W     = 12;  // L and H sub-band words
  localparam int DEF_SUB_FRAC  = 2;   // fraction bits of L and H
  localparam int COEF_W    = 16;
  localparam int COEF_FRAC = 14;
  localparam int MAX_TAPS  = 4;

  typedef logic signed [COEF_W-1:0] coef_t;

  // Number of taps of each wavelet's filters.
  function automatic int taps(wavelet_e w);
    return (w == HAAR) ? 2 : 4;
  endfunction

  // Coefficient k of filter f of wavelet w (0 beyond the filter's length).
  function automatic coef_t coef(wavelet_e w, filter_e f, int k);
    coef_t c;
    c = '0;
    if (w == HAAR) begin
      unique case (f)
        H0: c = (k == 0) ?  16'sd8192  : (k == 1) ?  16'sd8192  : 16'sd0;  //  0.5,  0.5
        H1: c = (k == 0) ?  16'sd16384 : (k == 1) ? -16'sd16384 : 16'sd0;  //  1,   -1
        G0: c = (k == 0) ?  16'sd16384 : (k == 1) ?  16'sd16384 : 16'sd0;  //  1,    1
        G1: c = (k == 0) ? -16'sd8192  : (k == 1) ?  16'sd8192  : 16'sd0;  // -0.5,  0.5
      endcase
    end else begin
      unique case (f)
        H0: c = (k == 0) ?  16'sd7913 : (k == 1) ?  16'sd13705 : (k == 2) ?  16'sd3672  : (k == 3) ? -16'sd2120 : 16'sd0;
        H1: c = (k == 0) ?  16'sd2120 : (k == 1) ?  16'sd3672  : (k == 2) ? -16'sd13705 : (k == 3) ?  16'sd7913 : 16'sd0;
        G0: c = (k == 0) ? -16'sd2120 : (k == 1) ?  16'sd3672  : (k == 2) ?  16'sd13705 : (k == 3) ?  16'sd7913 : 16'sd0;
        G1: c = (k == 0) ?  16'sd7913 : (k == 1) ? -16'sd13705 : (k == 2) ?  16'sd3672  : (k == 3) ?  16'sd2120 : 16'sd0;
      endcase
    end
    return c;
  endfunction

  // Reconstruction delay of the filter bank in samples (sum of the centre
  // delays of H0*G0), before any pipeline stages.
  function automatic int bank_delay(wavelet_e w);
    return taps(w) - 1;
  endfunction

endpackage
