// tb_dwt_idwt: self-checking test of FB5 (two-level db4 DWT, detail
// elimination, inverse DWT).
// Two instances: the default one (D1 and D2 eliminated) and one with
// elimination switched off. Windows are random, constant or smooth ramps and
// are fed back to back and with gaps. Checks:
//  - default: output within two Q11.5 LSB of a floating-point model of the
//    periodic two-level transform with D1, D2 zeroed and exact db4 taps
//    (tb_ecg_model_pkg); the margin covers the 16-bit taps and rounding;
//  - constant windows come out unchanged (db4 has no detail for a constant);
//  - no elimination: the output reproduces the input sample s[4] (perfect
//    reconstruction) within 4 LSB, the effect of the 16-bit coefficients;
//  - out_valid exactly four clocks after in_valid, in order.
module tb_dwt_idwt;
  import ecg_pkg::*;
  import tb_ecg_model_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  q11_5_t s [8];
  q11_5_t y_dn, y_pr;
  logic v_dn, v_pr;
  int checks = 0, failures = 0;
  longint cyc = 0;
  real maxerr = 0.0;

  typedef struct { real model; int orig; int kind; longint t_in; } exp_t;
  exp_t q [$];

  dwt_idwt dut (.clk, .rst_n, .in_valid, .s, .signal_out(y_dn), .out_valid(v_dn));
  dwt_idwt #(.ELIM_D1(1'b0), .ELIM_D2(1'b0)) dut_pr (
    .clk, .rst_n, .in_valid, .s, .signal_out(y_pr), .out_valid(v_pr));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("largest deviation from the model: %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Output side: compare each result with the oldest expectation.
  always @(negedge clk) begin
    if (rst_n) begin
      check("both instances in step", v_dn == v_pr);
      if (v_dn) begin
        exp_t e;
        real d;
        if (q.size() == 0) begin
          check("unexpected out_valid", 0);
        end else begin
          e = q.pop_front();
          check($sformatf("latency %0d", cyc - e.t_in), cyc - e.t_in == 4);
          d = real'(y_dn) - e.model * 32.0;
          if (d > maxerr) maxerr = d;
          if (-d > maxerr) maxerr = -d;
          check($sformatf("denoised %0d vs model %f", y_dn, e.model * 32.0), d <= 2.0 && d >= -2.0);
          if (e.kind == 1) check($sformatf("constant %0d kept, got %0d", e.orig, y_dn),
                                 int'(y_dn) - e.orig <= 1 && e.orig - int'(y_dn) <= 1);
          check($sformatf("reconstruction %0d vs %0d", y_pr, e.orig),
                int'(y_pr) - e.orig <= 4 && e.orig - int'(y_pr) <= 4);
        end
      end
    end
  end

  initial begin
    foreach (s[i]) s[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      automatic int kind = t % 3;     // 0 random, 1 constant, 2 ramp
      automatic real x [8];
      automatic int base = $urandom_range(0, 65535);
      automatic int step = $urandom_range(0, 400);
      @(negedge clk);
      for (int n = 0; n < 8; n++) begin
        automatic int v;
        case (kind)
          0: v = $urandom_range(0, 65535);
          1: v = base;
          default: v = (base % 30000) + step * n;
        endcase
        s[n] = q11_5_t'(v);
        x[n] = real'(v) / 32.0;
      end
      in_valid = 1;
      q.push_back('{dwt_ref(x, 4, 1'b1, 1'b1), int'(s[4]), kind, cyc});
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 1) == 1) repeat ($urandom_range(1, 5)) @(negedge clk);
      // Otherwise the next window follows in the next clock.
    end
    repeat (10) @(posedge clk);
    check("every window produced an output", q.size() == 0);
    $display("largest deviation from the model: %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
