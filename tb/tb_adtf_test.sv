// tb_adtf_test: self-checking test of FB3 (dual thresholds and clipping).
// Random consistent inputs (min <= mean <= max, middle sample inside
// [min, max]). The expected thresholds are worked out from the equations
//   Ht = mean + (max - mean) * alpha,  Lt = mean - (mean - min) * alpha
// in floating point with alpha = 0.1 and must match the design within the
// rounding of its Q1.10 alpha (one LSB plus the alpha quantisation); the
// branch is checked wherever the middle sample is clearly inside or outside
// the band. All three branches must occur. Latency: one clock.
module tb_adtf_test;
  import ecg_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t data_5 = '0, max_in = '0, min_in = '0;
  q11_5_t mean_in = '0, adtf_out;
  adtf_sel_e sel;
  logic out_valid;
  int checks = 0, failures = 0;
  int n_pass = 0, n_high = 0, n_low = 0;

  adtf_test dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 5000; t++) begin
      automatic int mn = $urandom_range(0, 2000);
      automatic int mx = mn + $urandom_range(0, 2047 - mn);
      automatic int mean = mn * 32 + $urandom_range(0, (mx - mn) * 32);
      automatic int d5 = mn + $urandom_range(0, mx - mn);
      real ht, lt, outr;
      automatic real tol = 1.5 + 0.0025 * real'((mx - mn) * 32);  // |102/1024 - 0.1| < 0.0004
      max_in  <= sample_t'(mx);
      min_in  <= sample_t'(mn);
      mean_in <= q11_5_t'(mean);
      data_5  <= sample_t'(d5);
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      @(negedge clk);
      ht = real'(mean) + real'(mx * 32 - mean) * 0.1;
      lt = real'(mean) - real'(mean - mn * 32) * 0.1;
      check("out_valid one clock after in_valid", out_valid);
      outr = real'(adtf_out);
      case (sel)
        ADTF_HIGH: begin
          n_high++;
          check($sformatf("Ht %0d vs %f", adtf_out, ht), outr - ht <= tol && ht - outr <= tol);
          check("HIGH only above Ht", real'(d5) * 32.0 >= ht - tol - 32.0);
        end
        ADTF_LOW: begin
          n_low++;
          check($sformatf("Lt %0d vs %f", adtf_out, lt), outr - lt <= tol && lt - outr <= tol);
          check("LOW only below Lt", real'(d5) * 32.0 <= lt + tol);
        end
        default: begin
          n_pass++;
          check("PASS output is the sample", int'(adtf_out) == d5 * 32);
          check("PASS only inside band", real'(d5) * 32.0 <= ht + tol && real'(d5) * 32.0 >= lt - tol - 32.0);
        end
      endcase
      // Clear-cut cases must take the right branch.
      if (real'(d5) * 32.0 > ht + tol + 32.0) check("sample far above Ht -> HIGH", sel == ADTF_HIGH);
      if (real'(d5) * 32.0 < lt - tol - 32.0) check("sample far below Lt -> LOW", sel == ADTF_LOW);
      if (real'(d5) * 32.0 < ht - tol - 32.0 && real'(d5) * 32.0 > lt + tol)
        check("sample well inside -> PASS", sel == ADTF_PASS);
      @(posedge clk);
    end
    check("all three branches seen", n_pass > 0 && n_high > 0 && n_low > 0);
    $display("branches: pass=%0d high=%0d low=%0d", n_pass, n_high, n_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
