// dwt_filter: the DWT denoising stage (FB4 -> FB5).
//
// FB4 (load_data) keeps the last eight ADTF outputs, newest in win[0]; FB5
// (dwt_idwt) takes them in time order (oldest first: s[n] = win[7-n]),
// decomposes them over two db4 levels, eliminates D1 and D2 and rebuilds one
// denoised sample. The published block diagram wires FB4's Signal_Data_k to
// FB5's inputs through a crossing whose exact order is not legible; time order
// is this design's choice.
//
// Timing: signal_out / out_valid follow in_valid by five clocks; one output
// per input strobe.
module dwt_filter
  import ecg_pkg::*;
#(
  parameter int unsigned OUT_IDX = 4,
  parameter bit          ELIM_D1 = 1'b1,
  parameter bit          ELIM_D2 = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  q11_5_t adtf_in,
  output q11_5_t signal_out,
  output logic   out_valid
);

  q11_5_t win [8];
  q11_5_t s   [8];
  logic   win_valid;

  load_data #(.N(8)) u_fb4 (
    .clk, .rst_n, .in_valid, .adtf_in,
    .win, .out_valid(win_valid)
  );

  always_comb for (int n = 0; n < 8; n++) s[n] = win[7-n];

  dwt_idwt #(.OUT_IDX(OUT_IDX), .ELIM_D1(ELIM_D1), .ELIM_D2(ELIM_D2)) u_fb5 (
    .clk, .rst_n, .in_valid(win_valid), .s,
    .signal_out, .out_valid
  );

endmodule
