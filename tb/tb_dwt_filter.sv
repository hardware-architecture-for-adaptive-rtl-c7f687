// tb_dwt_filter: self-checking test of the DWT stage (FB4 + FB5).
// Feeds Q11.5 words (a smooth wave plus random steps, and stretches of
// uniform random words) with strobes one to five clocks apart. An
// independent queue keeps the last eight inputs; the expected output is the
// floating-point two-level db4 model (tb_ecg_model_pkg::dwt_ref) of that
// window in time order, D1 and D2 eliminated, output position 4. Each
// result must match within two Q11.5 LSB and appear five clocks after its
// strobe.
module tb_dwt_filter;
  import ecg_pkg::*;
  import tb_ecg_model_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  q11_5_t adtf_in = '0, signal_out;
  logic out_valid;
  int checks = 0, failures = 0;
  int hist [8] = '{default: 0};
  longint cyc = 0;

  typedef struct { real model; longint t_in; } exp_t;
  exp_t q [$];

  dwt_filter dut (.*);

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
        automatic real d = real'(signal_out) - e.model * 32.0;
        check($sformatf("latency %0d", cyc - e.t_in), cyc - e.t_in == 5);
        check($sformatf("signal_out %0d vs model %f", signal_out, e.model * 32.0), d <= 2.0 && d >= -2.0);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 6000; n++) begin
      automatic int v;
      automatic real x [8];
      if ((n / 1000) % 2 == 1) v = $urandom_range(0, 65535);
      else v = 32768 + $rtoi(12000.0 * $sin(real'(n) * 0.05)) + $urandom_range(0, 2000);
      @(negedge clk);
      adtf_in  = q11_5_t'(v);
      in_valid = 1;
      for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = v;
      for (int k = 0; k < 8; k++) x[k] = real'(hist[7-k]) / 32.0;
      q.push_back('{dwt_ref(x, 4, 1'b1, 1'b1), cyc});
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    check("every sample produced an output", q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
