// tb_adtf_filter: self-checking test of the ADTF stage (FB1 + FB2 + FB3).
// Feeds a noisy synthetic ECG and stretches of uniform random codes with
// strobes two to six clocks apart. An independent queue keeps the last ten
// samples (zeros after reset) and tb_ecg_model_pkg::adtf_ref computes the
// expected output and branch of every window; both must match exactly, and
// the result must appear exactly three clocks after its strobe. All three
// branches (pass, clip to Ht, clip to Lt) must occur.
module tb_adtf_filter;
  import ecg_pkg::*;
  import tb_ecg_model_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t sample_in = '0;
  q11_5_t adtf_out;
  adtf_sel_e adtf_sel;
  logic out_valid;
  int checks = 0, failures = 0;
  int n_sel [3] = '{0, 0, 0};
  int hist [10] = '{default: 0};
  longint cyc = 0;

  typedef struct { int out_q5; ref_sel_e sel; longint t_in; } exp_t;
  exp_t q [$];

  adtf_filter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
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
        check($sformatf("latency %0d", cyc - e.t_in), cyc - e.t_in == 3);
        check($sformatf("adtf_out %0d exp %0d", adtf_out, e.out_q5), int'(adtf_out) == e.out_q5);
        check($sformatf("sel %0d exp %0d", adtf_sel, e.sel), int'(adtf_sel) == int'(e.sel));
        n_sel[int'(e.sel)]++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 6000; n++) begin
      automatic int v;
      automatic int o;
      automatic ref_sel_e s;
      if ((n / 1000) % 2 == 1) v = $urandom_range(0, 2047);
      else v = ecg_sample(n) + $urandom_range(0, 60) - 30;
      @(negedge clk);
      sample_in = sample_t'(v);
      in_valid  = 1;
      for (int i = 9; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = v;
      adtf_ref(hist, 4, o, s);
      q.push_back('{o, s, cyc});
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    check("every sample produced an output", q.size() == 0);
    check("pass branch seen", n_sel[0] > 0);
    check("clip-to-Ht branch seen", n_sel[1] > 0);
    check("clip-to-Lt branch seen", n_sel[2] > 0);
    $display("branches: pass=%0d high=%0d low=%0d", n_sel[0], n_sel[1], n_sel[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
