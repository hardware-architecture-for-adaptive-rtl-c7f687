// adtf_treatment (FB2): window statistics for the ADTF thresholds.
//
// From the W-sample window it computes, in one clock, the maximum and minimum
// (11 bits each) and the mean in Q11.5. The mean is the window sum times a
// reciprocal constant: sum * RECIP, RECIP = round(2^17 / W), is a 30-bit
// product, and rounding away its low 12 bits leaves sum * 32 / W, i.e. the
// mean with 5 fraction bits (error at most 1.5 fraction LSB, i.e.
// under 0.05 of a sample code, from the truncated reciprocal). Outputs are
// registered and appear with out_valid one clock after in_valid; they hold
// until the next strobe.
//
// Follows the architecture: mean, max and min of the window, a 30-bit mean
// reduced to 16 bits (11 integer, 5 fraction), 11-bit max/min found by a loop
// of comparisons. Multiplying by the reciprocal instead of dividing is this
// design's choice.
module adtf_treatment
  import ecg_pkg::*;
#(
  parameter int unsigned W = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t win [W],
  output sample_t max_out,
  output q11_5_t  mean_out,
  output sample_t min_out,
  output logic    out_valid
);

  localparam int unsigned SUM_W   = SAMPLE_W + $clog2(W);
  localparam int unsigned SHIFT   = 17 - FRAC_W;               // 12
  localparam int unsigned RECIP   = ((1 << 17) + W / 2) / W;   // 13107 for W = 10
  localparam int unsigned PROD_W  = 30;

  logic [SUM_W-1:0]  sum;
  logic [PROD_W-1:0] prod;
  sample_t           mx, mn;
  logic [PROD_W-1:0] mean_full;

  always_comb begin
    sum = '0;
    mx  = win[0];
    mn  = win[0];
    for (int i = 0; i < W; i++) begin
      sum = sum + SUM_W'(win[i]);
      if (win[i] > mx) mx = win[i];
      if (win[i] < mn) mn = win[i];
    end
    prod      = PROD_W'(sum) * PROD_W'(RECIP);
    mean_full = (prod + PROD_W'(1 << (SHIFT - 1))) >> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      max_out   <= '0;
      mean_out  <= '0;
      min_out   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        max_out  <= mx;
        min_out  <= mn;
        mean_out <= q11_5_t'(mean_full);
      end
    end
  end

endmodule
