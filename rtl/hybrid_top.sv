// hybrid_top: hybrid ADTF + DWT ECG denoiser.
//
// An 11-bit ECG sample stream (360 samples/s in the intended use) passes two
// denoising stages in series. The ADTF stage replaces the middle sample of a
// 10-sample window by a value clipped to an adaptive band [Lt, Ht] around the
// window mean, removing high-frequency and muscle noise. The DWT stage
// decomposes the last eight ADTF outputs over two db4 wavelet levels, drops
// the two finest detail bands D1 and D2 (the band above about 45 Hz at
// 360 Hz sampling) and rebuilds the signal. The output is a 16-bit Q11.5
// sample (11 integer, 5 fraction bits).
//
// Interface: clk is the processing clock (50 kHz in the reference timing),
// sample_valid a one-clock strobe per acquired sample (at least two clocks
// apart), sample_in the sample, signal_out the denoised sample, updated when
// out_valid pulses. adtf_sel tells which branch the threshold stage took for
// the sample now in the DWT stage (for monitoring); adtf_out is the
// intermediate ADTF result.
//
// Timing: out_valid follows sample_valid by eight clocks (160 us at 50 kHz,
// within the 0.3 ms response of the reference implementation); throughput is
// one output per input sample. In signal terms the output lags the input by
// about six samples: four from taking the middle of the ADTF window, about
// two from the DWT stage's output position.
module hybrid_top
  import ecg_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sample_valid,
  input  sample_t   sample_in,
  output q11_5_t    signal_out,
  output logic      out_valid,
  output q11_5_t    adtf_out,
  output adtf_sel_e adtf_sel
);

  logic adtf_valid;

  adtf_filter u_adtf (
    .clk, .rst_n, .in_valid(sample_valid), .sample_in,
    .adtf_out, .adtf_sel, .out_valid(adtf_valid)
  );

  dwt_filter u_dwt (
    .clk, .rst_n, .in_valid(adtf_valid), .adtf_in(adtf_out),
    .signal_out, .out_valid
  );

endmodule
