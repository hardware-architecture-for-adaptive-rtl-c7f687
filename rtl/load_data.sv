// load_data (FB4): eight-sample window of the ADTF output for the DWT.
//
// An N-deep shift register of Q11.5 words. Each in_valid strobe shifts adtf_in
// into win[0] (Signal_Data_1); win[N-1] (Signal_Data_8) is the oldest. The
// window holds between strobes; out_valid marks the clock in which the
// updated window is visible (in_valid delayed by one clock).
//
// Follows the architecture: eight 16-bit samples, the length of the db4
// filters. The strobe interface, the ordering and the synchronous reset to
// zero are this design's choices.
module load_data
  import ecg_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  q11_5_t adtf_in,
  output q11_5_t win [N],
  output logic   out_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) win[i] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        win[0] <= adtf_in;
        for (int i = 1; i < N; i++) win[i] <= win[i-1];
      end
    end
  end

endmodule
