// tb_ecg_model_pkg: reference models for the denoiser testbenches.
//
// adtf_ref    - the ADTF thresholding of one 10-sample window, in integer
//               arithmetic with the fixed-point rules of the design's
//               specification (mean = round(sum * 13107 / 4096) in Q11.5,
//               alpha = 102/1024, products rounded to nearest, comparison
//               against the thresholds' integer parts).
// dwt_ref     - two-level periodic db4 analysis, optional detail
//               elimination and synthesis of one output sample, in floating
//               point with the exact (unquantised) db4 taps.
// ecg_sample  - a synthetic ECG-like waveform (P, QRS, T bumps on a
//               baseline) at 360 samples/s, in 11-bit codes, for stimulus.
package tb_ecg_model_pkg;

  localparam real DB4_REAL [8] = '{-0.010597401785069032, 0.0328830116668852,
                                   0.030841381835560764, -0.18703481171909309,
                                   -0.027983769416859854, 0.6308807679298589,
                                   0.7148465705529157, 0.2303778133088965};

  typedef enum int {SEL_PASS = 0, SEL_HIGH = 1, SEL_LOW = 2} ref_sel_e;

  function automatic void adtf_ref(input int win [10], input int mid,
                                   output int out_q5, output ref_sel_e sel);
    int sum = 0, mx = win[0], mn = win[0];
    int mean, ht, lt;
    foreach (win[i]) begin
      sum += win[i];
      if (win[i] > mx) mx = win[i];
      if (win[i] < mn) mn = win[i];
    end
    mean = (sum * 13107 + 2048) / 4096;
    ht = mean + ((mx * 32 - mean) * 102 + 512) / 1024;
    lt = mean - ((mean - mn * 32) * 102 + 512) / 1024;
    if (win[mid] > ht / 32) begin
      out_q5 = ht;  sel = SEL_HIGH;
    end else if (win[mid] < lt / 32) begin
      out_q5 = lt;  sel = SEL_LOW;
    end else begin
      out_q5 = win[mid] * 32;  sel = SEL_PASS;
    end
  endfunction

  // Low/high-pass tap m periodised to length p.
  function automatic real lo_p(input int m, input int p);
    real acc = 0.0;
    for (int j = m; j < 8; j += p) acc += DB4_REAL[j];
    return acc;
  endfunction

  function automatic real hi_p(input int m, input int p);
    real acc = 0.0;
    for (int j = m; j < 8; j += p)
      acc += ((j % 2 == 0) ? 1.0 : -1.0) * DB4_REAL[7-j];
    return acc;
  endfunction

  // x[0..7] in time order (x[0] oldest), values in sample units.
  function automatic real dwt_ref(input real x [8], input int out_idx,
                                  input bit elim_d1, input bit elim_d2);
    real a1 [4], d1 [4], a2 [2], d2 [2], r1 [4], y;
    for (int k = 0; k < 4; k++) begin
      a1[k] = 0.0; d1[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        a1[k] += x[n] * lo_p((n - 2*k + 8) % 8, 8);
        d1[k] += x[n] * hi_p((n - 2*k + 8) % 8, 8);
      end
    end
    for (int j = 0; j < 2; j++) begin
      a2[j] = 0.0; d2[j] = 0.0;
      for (int k = 0; k < 4; k++) begin
        a2[j] += a1[k] * lo_p((k - 2*j + 4) % 4, 4);
        d2[j] += a1[k] * hi_p((k - 2*j + 4) % 4, 4);
      end
    end
    if (elim_d2) d2 = '{0.0, 0.0};
    if (elim_d1) d1 = '{0.0, 0.0, 0.0, 0.0};
    for (int k = 0; k < 4; k++) begin
      r1[k] = 0.0;
      for (int j = 0; j < 2; j++)
        r1[k] += a2[j] * lo_p((k - 2*j + 4) % 4, 4) + d2[j] * hi_p((k - 2*j + 4) % 4, 4);
    end
    y = 0.0;
    for (int k = 0; k < 4; k++)
      y += r1[k] * lo_p((out_idx - 2*k + 8) % 8, 8) + d1[k] * hi_p((out_idx - 2*k + 8) % 8, 8);
    return y;
  endfunction

  function automatic real gauss_bump(input real t, input real c, input real w, input real a);
    real z = (t - c) / w;
    return a * $exp(-0.5 * z * z);
  endfunction

  // Clean synthetic ECG at 360 Hz, 72 beats/min (300 samples per beat),
  // baseline at code 1024, R peak about 400 codes above it.
  function automatic int ecg_sample(input int n);
    real t = real'(n % 300);
    real v = 1024.0
           + gauss_bump(t,  60.0, 9.0,   40.0)   // P
           + gauss_bump(t,  99.0, 3.5,  -60.0)   // Q
           + gauss_bump(t, 106.0, 4.5,  400.0)   // R
           + gauss_bump(t, 114.0, 4.0,  -90.0)   // S
           + gauss_bump(t, 190.0, 16.0,  80.0);  // T
    return $rtoi(v + 0.5);
  endfunction

endpackage
