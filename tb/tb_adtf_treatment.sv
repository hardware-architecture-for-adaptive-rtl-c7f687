// tb_adtf_treatment: self-checking test of FB2 (window max, min and mean).
// Random windows, including all-equal and full-scale corner cases. Max and
// min must be exact; the Q11.5 mean must be within 1.5 fraction LSB of the
// ideal sum * 32 / 10 computed in floating point. Results must appear with
// out_valid exactly one clock after in_valid.
module tb_adtf_treatment;
  import ecg_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t win [10];
  sample_t max_out, min_out;
  q11_5_t mean_out;
  logic out_valid;
  int checks = 0, failures = 0;

  adtf_treatment dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (win[i]) win[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      automatic int sum = 0, mx = -1, mn = 4096;
      real ideal;
      for (int i = 0; i < 10; i++) begin
        automatic int v;
        case (t)
          0: v = 2047;
          1: v = 0;
          2: v = 777;
          default: v = (t % 3 == 0) ? 1000 + $urandom_range(0, 60) : $urandom_range(0, 2047);
        endcase
        win[i] = sample_t'(v);
        sum += v;
        if (v > mx) mx = v;
        if (v < mn) mn = v;
      end
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      @(negedge clk);
      ideal = real'(sum) * 32.0 / 10.0;
      check("out_valid one clock after in_valid", out_valid == 1'b1);
      check($sformatf("max %0d exp %0d", max_out, mx), int'(max_out) == mx);
      check($sformatf("min %0d exp %0d", min_out, mn), int'(min_out) == mn);
      check($sformatf("mean %0d ideal %f", mean_out, ideal),
            (real'(mean_out) - ideal <= 1.5) && (ideal - real'(mean_out) <= 1.5));
      @(negedge clk);
      check("out_valid is a single pulse", out_valid == 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
