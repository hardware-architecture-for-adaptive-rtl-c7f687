// adtf_test (FB3): dual-threshold correction of the window's middle sample.
//
// Thresholds, all in Q11.5:
//   Ht = mean + (max - mean) * alpha,   Lt = mean - (mean - min) * alpha
// with alpha in Q1.10 (0.1 -> 102/1024); each product is rounded to 5 fraction
// bits. The middle sample of the window (Data 5) is compared with the integer
// parts of Ht and Lt: above Ht the output is Ht, below Lt it is Lt, otherwise
// the sample itself with five zero fraction bits. sel reports which of the
// three was chosen. Registered: adtf_out, sel and out_valid appear one clock
// after in_valid and hold until the next strobe.
//
// Follows the architecture: the threshold equations, alpha = 0.1 in an 11-bit
// register (1 integer, 10 fraction bits), comparison against the thresholds'
// integer parts and the three-way output in Q11.5. Rounding the alpha
// products to nearest, and alpha as a parameter, are this design's choices.
module adtf_test
  import ecg_pkg::*;
#(
  parameter int unsigned ALPHA_Q10 = ALPHA_DEFAULT
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  sample_t   data_5,
  input  sample_t   max_in,
  input  q11_5_t    mean_in,
  input  sample_t   min_in,
  output q11_5_t    adtf_out,
  output adtf_sel_e sel,
  output logic      out_valid
);

  localparam int unsigned P_W = Q_W + ALPHA_W;  // 27-bit products
  localparam logic [ALPHA_W-1:0] ALPHA = ALPHA_W'(ALPHA_Q10);

  q11_5_t         max_q, min_q, ht, lt;
  logic [P_W-1:0] p_hi, p_lo;
  q11_5_t         d_hi, d_lo;
  q11_5_t         nxt_out;
  adtf_sel_e      nxt_sel;

  always_comb begin
    max_q = {max_in, FRAC_W'(0)};
    min_q = {min_in, FRAC_W'(0)};
    // max >= mean >= min holds for FB2's results; clamp anyway so a stray
    // input cannot wrap the difference.
    p_hi  = (max_q > mean_in) ? P_W'(max_q - mean_in) * P_W'(ALPHA) : '0;
    p_lo  = (mean_in > min_q) ? P_W'(mean_in - min_q) * P_W'(ALPHA) : '0;
    d_hi  = q11_5_t'((p_hi + P_W'(1 << (ALPHA_FRAC - 1))) >> ALPHA_FRAC);
    d_lo  = q11_5_t'((p_lo + P_W'(1 << (ALPHA_FRAC - 1))) >> ALPHA_FRAC);
    ht    = mean_in + d_hi;
    lt    = mean_in - d_lo;
    if (data_5 > ht[Q_W-1:FRAC_W]) begin
      nxt_out = ht;
      nxt_sel = ADTF_HIGH;
    end else if (data_5 < lt[Q_W-1:FRAC_W]) begin
      nxt_out = lt;
      nxt_sel = ADTF_LOW;
    end else begin
      nxt_out = {data_5, FRAC_W'(0)};
      nxt_sel = ADTF_PASS;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      adtf_out  <= '0;
      sel       <= ADTF_PASS;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        adtf_out <= nxt_out;
        sel      <= nxt_sel;
      end
    end
  end

endmodule
