// adtf_load (FB1): sliding window of the raw ECG samples for the ADTF stage.
//
// A W-deep shift register. Each in_valid strobe shifts the new 11-bit sample
// into win[0] (Data 1) and moves the older ones one place up, so win[W-1]
// (Data W) is the oldest. The window is held between strobes, which lets the
// later ADTF stages read it directly. out_valid is in_valid delayed by one
// clock: the cycle in which the updated window is visible.
//
// Follows the architecture: a 10-sample shift register of 11-bit samples.
// This design's choices: the strobe (clock enable) interface, win[0] as the
// newest sample, and a synchronous active-low reset that clears the window.
module adtf_load
  import ecg_pkg::*;
#(
  parameter int unsigned W = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t sample_in,
  output sample_t win [W],
  output logic    out_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) win[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        win[0] <= sample_in;
        for (int i = 1; i < W; i++) win[i] <= win[i-1];
      end
    end
  end

endmodule
