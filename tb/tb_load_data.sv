// tb_load_data: self-checking test of the FB4 ADTF-output window.
// Drives random samples with random gaps (two or more clocks) and checks, one
// clock after each strobe, that out_valid pulses and that the window equals
// the last eight samples (newest first) kept by an independent queue; also
// checks that out_valid stays low between strobes and that the window holds.
module tb_load_data;
  import ecg_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  q11_5_t adtf_in = '0;
  q11_5_t win [8];
  logic out_valid;
  int checks = 0, failures = 0;
  int hist [$];

  load_data dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_window();
    for (int i = 0; i < 8; i++) begin
      automatic int exp_v = (i < hist.size()) ? hist[i] : 0;
      checks++;
      if (int'(win[i]) != exp_v) begin
        failures++;
        $display("window[%0d] = %0d, expected %0d", i, win[i], exp_v);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < 300; s++) begin
      automatic q11_5_t v = q11_5_t'($urandom);
      in_valid  <= 1;
      adtf_in <= v;
      hist.push_front(int'(v));
      @(posedge clk);
      in_valid <= 0;
      adtf_in <= q11_5_t'($urandom);
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("out_valid missing"); end
      check_window();
      repeat (1 + $urandom_range(0, 3)) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("spurious out_valid"); end
        check_window();
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
