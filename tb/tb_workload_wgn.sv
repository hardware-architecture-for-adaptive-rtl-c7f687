// tb_workload_wgn: denoising workload at three noise levels.
// The evaluation the design is meant for adds white Gaussian noise at 5, 10
// and 20 dB SNR to ECG recordings sampled at 360 Hz with 11-bit resolution.
// Recorded ECGs are not available here, so the synthetic ECG of
// tb_ecg_model_pkg stands in (twelve beats, 3600 samples per level). For each
// level the noise (Box-Muller from $urandom) is scaled to the clean signal's
// variance, the design is reset and run at 50 kHz with 360 Hz strobes, and
// every output is checked against the reference chain (exact ADTF model, then
// floating-point db4 model, two Q11.5 LSB tolerance). The input SNR, output
// SNR and their difference (SNR improvement, output aligned by its
// six-sample delay) are reported; at 5 and 10 dB the denoiser must improve
// the SNR. At 20 dB the result is only reported: there the smoothing of the
// QRS complex can outweigh the noise removed.
module tb_workload_wgn;
  timeunit 1ns;
  timeprecision 1ps;
  import ecg_pkg::*;
  import tb_ecg_model_pkg::*;

  localparam int FCLK = 50000, FS = 360, N = 3600, DELAY = 6;
  localparam real SNR_DB [3] = '{5.0, 10.0, 20.0};

  logic clk = 0, rst_n = 0, sample_valid = 0;
  sample_t sample_in = '0;
  q11_5_t signal_out, adtf_out;
  logic out_valid;
  adtf_sel_e adtf_sel;
  int checks = 0, failures = 0;
  real model_q [$];
  int  idx_q [$];
  int  clean [N];
  real err_out = 0.0;
  int  n_out = 0;

  hybrid_top dut (.*);

  always #10us clk = ~clk;

  initial begin
    #60s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (model_q.size() == 0) check("unexpected out_valid", 0);
      else begin
        automatic real m = model_q.pop_front();
        automatic int  i = idx_q.pop_front();
        automatic real d = real'(signal_out) - m * 32.0;
        check($sformatf("signal_out %0d vs model %f", signal_out, m * 32.0), d <= 2.0 && d >= -2.0);
        if (i >= 2 * DELAY) begin
          err_out += (real'(signal_out) / 32.0 - real'(clean[i - DELAY])) ** 2;
          n_out++;
        end
      end
    end
  end

  function automatic real gauss();
    real u1 = (real'($urandom_range(1, 1 << 30))) / real'(1 << 30);
    real u2 = (real'($urandom_range(0, 1 << 30))) / real'(1 << 30);
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial begin
    real mean_c = 0.0, var_c = 0.0;
    for (int n = 0; n < N; n++) begin
      clean[n] = ecg_sample(n);
      mean_c += real'(clean[n]);
    end
    mean_c /= real'(N);
    for (int n = 0; n < N; n++) var_c += (real'(clean[n]) - mean_c) ** 2;
    var_c /= real'(N);

    foreach (SNR_DB[l]) begin
      automatic real sigma = $sqrt(var_c / (10.0 ** (SNR_DB[l] / 10.0)));
      automatic real err_in = 0.0;
      automatic int  whist [10] = '{default: 0};
      automatic int  ahist [8]  = '{default: 0};
      automatic int  phase = 0;
      automatic real snr_in, snr_out;
      err_out = 0.0;
      n_out = 0;
      rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      repeat (2) @(negedge clk);
      for (int n = 0; n < N; n++) begin
        automatic int v, o;
        automatic ref_sel_e s;
        automatic real x [8];
        do begin
          @(negedge clk);
          phase += FS;
        end while (phase < FCLK);
        phase -= FCLK;
        v = $rtoi($floor(real'(clean[n]) + sigma * gauss() + 0.5));
        if (v < 0) v = 0;
        if (v > 2047) v = 2047;
        if (n >= 2 * DELAY) err_in += real'(v - clean[n]) ** 2;
        sample_in    = sample_t'(v);
        sample_valid = 1;
        for (int i = 9; i > 0; i--) whist[i] = whist[i-1];
        whist[0] = v;
        adtf_ref(whist, 4, o, s);
        for (int i = 7; i > 0; i--) ahist[i] = ahist[i-1];
        ahist[0] = o;
        for (int k = 0; k < 8; k++) x[k] = real'(ahist[7-k]) / 32.0;
        model_q.push_back(dwt_ref(x, 4, 1'b1, 1'b1));
        idx_q.push_back(n);
        @(negedge clk);
        sample_valid = 0;
      end
      repeat (20) @(negedge clk);
      check("all outputs produced", model_q.size() == 0 && n_out == N - 2 * DELAY);
      snr_in  = 10.0 * $log10(var_c / (err_in / real'(N - 2 * DELAY)));
      snr_out = 10.0 * $log10(var_c / (err_out / real'(n_out)));
      $display("noise %4.1f dB: input SNR %6.2f dB, output SNR %6.2f dB, improvement %6.2f dB",
               SNR_DB[l], snr_in, snr_out, snr_out - snr_in);
      if (SNR_DB[l] < 15.0) check($sformatf("SNR improves at %0.1f dB", SNR_DB[l]), snr_out > snr_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
