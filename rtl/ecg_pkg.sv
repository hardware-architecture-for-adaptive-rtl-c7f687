// ecg_pkg: types and constants shared by the hybrid ADTF + DWT ECG denoiser.
//
// Number formats. An ECG sample is an 11-bit unsigned code (the 11-bit
// resolution of the MIT-BIH recordings). Every value after the ADTF stage is a
// 16-bit unsigned fixed-point number with 11 integer and 5 fraction bits
// (Q11.5). The threshold coefficient alpha is held with 1 integer and 10
// fraction bits. These widths follow the published architecture; reading the
// sample as unsigned is this design's choice.
//
// Daubechies-4 (8 taps) analysis low-pass filter DB4_H[m] = h[m] * 2^16, where
// h is the standard orthonormal db4 decomposition low-pass filter
//   h = -0.0105974018, 0.0328830117, 0.0308413818, -0.1870348117,
//       -0.0279837694, 0.6308807679, 0.7148465706, 0.2303778133.
// Each tap is rounded to nearest, except the two that lie closest to half way
// (-694.51 and -12257.51), which are rounded up so that the even and the odd
// taps each sum to 46341 = round(2^16 / sqrt(2)): a constant signal then
// passes the quantised filters with no gain error.
// The high-pass filter is the quadrature mirror g[m] = (-1)^m h[7-m]. The
// coefficient values and their 16-bit fraction are this design's choice; the
// architecture only names the db4 wavelet and its eight coefficients.
package ecg_pkg;

  localparam int unsigned SAMPLE_W = 11;  // input sample width
  localparam int unsigned FRAC_W   = 5;   // fraction bits of Q11.5
  localparam int unsigned Q_W      = SAMPLE_W + FRAC_W;  // 16

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [Q_W-1:0]      q11_5_t;

  // Which value the ADTF thresholding stage put on its output.
  typedef enum logic [1:0] {
    ADTF_PASS = 2'd0,  // middle sample lay between Lt and Ht
    ADTF_HIGH = 2'd1,  // middle sample above Ht: output Ht
    ADTF_LOW  = 2'd2   // middle sample below Lt: output Lt
  } adtf_sel_e;

  // Threshold coefficient alpha = 0.1 in Q1.10: round(0.1 * 1024) = 102.
  localparam int unsigned ALPHA_W       = 11;
  localparam int unsigned ALPHA_FRAC    = 10;
  localparam int unsigned ALPHA_DEFAULT = 102;

  // db4 filters, and fraction bits of a coefficient (18-bit signed words).
  localparam int unsigned COEF_FRAC = 16;
  localparam int DB4_TAPS = 8;
  localparam int DB4_H [DB4_TAPS] = '{-694, 2155, 2021, -12257, -1834, 41345, 46848, 15098};

  // Analysis/synthesis low-pass tap m of the filter periodised to length p
  // (p = 8 at level 1, p = 4 at level 2): sum of h[m + j*p].
  function automatic int db4_lo(input int m, input int p);
    int acc = 0;
    for (int j = m; j < DB4_TAPS; j += p) acc += DB4_H[j];
    return acc;
  endfunction

  // High-pass tap m, periodised to length p: g[n] = (-1)^n h[7-n].
  function automatic int db4_hi(input int m, input int p);
    int acc = 0;
    for (int j = m; j < DB4_TAPS; j += p)
      acc += (j % 2 == 0) ? DB4_H[DB4_TAPS-1-j] : -DB4_H[DB4_TAPS-1-j];
    return acc;
  endfunction

  typedef int coef_tab_t [DB4_TAPS];

  // Whole periodised filter as a table (entries p..7 are zero).
  function automatic coef_tab_t db4_tab(input bit hi, input int p);
    coef_tab_t t;
    for (int m = 0; m < DB4_TAPS; m++)
      t[m] = (m >= p) ? 0 : (hi ? db4_hi(m, p) : db4_lo(m, p));
    return t;
  endfunction

endpackage
