// adtf_filter: the ADTF denoising stage (FB1 -> FB2 -> FB3).
//
// FB1 (adtf_load) keeps the last W samples; FB2 (adtf_treatment) computes
// their mean, maximum and minimum; FB3 (adtf_test) derives the thresholds and
// corrects the window's middle sample (Data 5, win[4]), which it reads
// straight from FB1 as in the published block diagram. Because of that direct
// path FB3 uses Data 5 two clocks after the strobe, so strobes must be at
// least two clocks apart (at 50 kHz and 360 Hz they are about 139 apart).
//
// Timing: adtf_out / out_valid follow in_valid by three clocks.
module adtf_filter
  import ecg_pkg::*;
#(
  parameter int unsigned W         = 10,
  parameter int unsigned ALPHA_Q10 = ALPHA_DEFAULT
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  sample_t   sample_in,
  output q11_5_t    adtf_out,
  output adtf_sel_e adtf_sel,
  output logic      out_valid
);

  localparam int unsigned MID = W / 2 - 1;   // Data 5 of 10

  sample_t win [W];
  logic    win_valid, stat_valid;
  sample_t max_v, min_v;
  q11_5_t  mean_v;

  adtf_load #(.W(W)) u_fb1 (
    .clk, .rst_n, .in_valid, .sample_in,
    .win, .out_valid(win_valid)
  );

  adtf_treatment #(.W(W)) u_fb2 (
    .clk, .rst_n, .in_valid(win_valid), .win,
    .max_out(max_v), .mean_out(mean_v), .min_out(min_v), .out_valid(stat_valid)
  );

  adtf_test #(.ALPHA_Q10(ALPHA_Q10)) u_fb3 (
    .clk, .rst_n, .in_valid(stat_valid), .data_5(win[MID]),
    .max_in(max_v), .mean_in(mean_v), .min_in(min_v),
    .adtf_out, .sel(adtf_sel), .out_valid
  );

  // The FB1 -> FB3 path is only valid with strobes two or more clocks apart.
  a_strobe_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |=> !in_valid)
    else $error("adtf_filter: sample strobes on consecutive clocks");

endmodule
