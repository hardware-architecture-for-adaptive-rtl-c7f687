// tb_hybrid_top: end-to-end test of the whole denoiser at its default
// parameters, in real time units.
// The clock runs at 50 kHz and a phase accumulator issues sample strobes at
// 360 Hz (every 138 or 139 clocks). The stimulus is ten seconds (3600
// samples, twelve beats) of a synthetic ECG with added noise (sum of four
// uniform variables, standard deviation about 30 codes), followed by a
// stretch of uniform random codes. Every output is checked against the
// reference chain: exact ADTF model, then the floating-point two-level db4
// model of the last eight ADTF results (two Q11.5 LSB tolerance); the ADTF
// branch reported on adtf_sel must match too. The response time from strobe
// to output must be eight clocks, within the 0.3 ms budget. Counted
// mechanisms, each of which must occur: pass-through, clip to Ht, clip to Lt,
// and outputs changed by the elimination of D1/D2 (model with and without
// elimination differ by more than one code). The mean squared error against
// the clean waveform (output aligned by its six-sample delay) must be lower
// after denoising than before; both are reported.
module tb_hybrid_top;
  timeunit 1ns;
  timeprecision 1ps;
  import ecg_pkg::*;
  import tb_ecg_model_pkg::*;

  localparam int   FCLK = 50000, FS = 360;
  localparam int   N_ECG = 3600, N_RAND = 400;
  localparam int   DELAY = 6;             // samples from input to output (4 + about 2)
  localparam realtime T_BUDGET = 300us;   // reference response time

  logic clk = 0, rst_n = 0, sample_valid = 0;
  sample_t sample_in = '0;
  q11_5_t signal_out, adtf_out;
  logic out_valid;
  adtf_sel_e adtf_sel;
  int checks = 0, failures = 0;
  int n_sel [3] = '{0, 0, 0};
  int n_elim = 0, n_out = 0;
  int whist [10] = '{default: 0};
  int ahist [8]  = '{default: 0};
  int clean [$];
  real mse_in = 0.0, mse_out = 0.0;
  int n_mse = 0;

  typedef struct { real model; ref_sel_e sel; realtime t_in; int idx; } exp_t;
  exp_t q [$];

  hybrid_top dut (.*);

  always #10us clk = ~clk;   // 50 kHz

  initial begin
    #20s;
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
      if (q.size() == 0) check("unexpected out_valid", 0);
      else begin
        automatic exp_t e = q.pop_front();
        automatic real d = real'(signal_out) - e.model * 32.0;
        automatic realtime lat = $realtime - e.t_in;
        check($sformatf("response time %0t", lat), lat > 155us && lat < 165us && lat <= T_BUDGET);
        check($sformatf("sample %0d: signal_out %0d vs model %f", e.idx, signal_out, e.model * 32.0),
              d <= 2.0 && d >= -2.0);
        // adtf_sel belongs to the ADTF result of this sample (3 clocks in)
        // and still holds: strobes are far apart.
        check("adtf_sel", int'(adtf_sel) == int'(e.sel));
        n_sel[int'(e.sel)]++;
        n_out++;
        if (e.idx >= 2 * DELAY && e.idx < N_ECG) begin
          automatic real ref_v = real'(clean[e.idx - DELAY]);
          mse_out += (real'(signal_out) / 32.0 - ref_v) ** 2;
          n_mse++;
        end
      end
    end
  end

  function automatic int noise();
    int acc = 0;
    for (int i = 0; i < 4; i++) acc += $urandom_range(0, 52);
    return acc - 104;           // std. dev. about 30
  endfunction

  initial begin
    int phase = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < N_ECG + N_RAND; n++) begin
      automatic int v, o, c;
      automatic ref_sel_e s;
      automatic real x [8];
      automatic real y_el, y_full;
      // Wait for the next 360 Hz tick of the 50 kHz clock.
      do begin
        @(negedge clk);
        phase += FS;
      end while (phase < FCLK);
      phase -= FCLK;
      if (n < N_ECG) begin
        c = ecg_sample(n);
        v = c + noise();
        if (v < 0) v = 0;
        if (v > 2047) v = 2047;
        if (n >= 2 * DELAY) mse_in += real'(v - c) ** 2;
      end else begin
        c = 0;
        v = $urandom_range(0, 2047);
      end
      clean.push_back(c);
      sample_in    = sample_t'(v);
      sample_valid = 1;
      for (int i = 9; i > 0; i--) whist[i] = whist[i-1];
      whist[0] = v;
      adtf_ref(whist, 4, o, s);
      for (int i = 7; i > 0; i--) ahist[i] = ahist[i-1];
      ahist[0] = o;
      for (int k = 0; k < 8; k++) x[k] = real'(ahist[7-k]) / 32.0;
      y_el   = dwt_ref(x, 4, 1'b1, 1'b1);
      y_full = dwt_ref(x, 4, 1'b0, 1'b0);
      if (y_el - y_full > 1.0 || y_full - y_el > 1.0) n_elim++;
      q.push_back('{y_el, s, $realtime, n});
      @(negedge clk);
      sample_valid = 0;
    end
    repeat (20) @(posedge clk);
    check("every sample produced an output", q.size() == 0 && n_out == N_ECG + N_RAND);
    check("pass-through occurred", n_sel[0] > 0);
    check("clip to Ht occurred", n_sel[1] > 0);
    check("clip to Lt occurred", n_sel[2] > 0);
    check("D1/D2 elimination changed outputs", n_elim > 0);
    check("denoising lowers the error against the clean ECG",
          mse_out / real'(n_mse) < mse_in / real'(N_ECG - 2 * DELAY));
    $display("mechanisms: pass=%0d clip_Ht=%0d clip_Lt=%0d detail_elimination_effective=%0d",
             n_sel[0], n_sel[1], n_sel[2], n_elim);
    $display("MSE vs clean ECG: noisy input %f, denoised output %f (codes^2)",
             mse_in / real'(N_ECG - 2 * DELAY), mse_out / real'(n_mse));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
