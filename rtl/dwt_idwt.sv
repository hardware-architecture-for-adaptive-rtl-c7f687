// dwt_idwt (FB5): two-level db4 wavelet denoising of an eight-sample window.
//
// The window s[0..7] (s[0] oldest) is treated as one period of a periodic
// signal, so the transform is an orthonormal 8x8 matrix and needs no border
// handling:
//   level 1:  A1[k] = sum_n x[n] h8[(n-2k) mod 8],  D1[k] likewise with g8
//   level 2:  A2[j] = sum_k A1[k] h4[(k-2j) mod 4], D2[j] likewise with g4
// where h8/g8 are the db4 low/high-pass filters and h4/g4 the same filters
// periodised to length 4. The details D1 and D2 are then eliminated (zeroed)
// and the inverse transform runs the same matrices transposed:
//   A1'[k] = sum_j A2[j] h4[(k-2j) mod 4] + D2'[j] g4[(k-2j) mod 4]
//   y      = sum_k A1'[k] h8[(OUT_IDX-2k) mod 8] + D1'[k] g8[(OUT_IDX-2k) mod 8]
// Only the reconstructed sample at position OUT_IDX is produced, one output
// per window. With ELIM_D1 = ELIM_D2 = 0 the block reconstructs its input
// (perfect reconstruction), which the testbench uses to check the transform.
//
// Arithmetic: signed, 9 fraction bits inside (the 5 of Q11.5 plus 4 guard
// bits), coefficients with 16 fraction bits, each stage rounded to nearest.
// The output is rounded to Q11.5 and saturated to 0..2047.97.
//
// Timing: four register stages (analysis level 1, analysis level 2,
// synthesis level 2, synthesis level 1); out_valid follows in_valid by four
// clocks, one result per strobe, a new window accepted every clock.
//
// Follows the architecture: eight Q11.5 inputs, db4 mother wavelet, two
// decomposition levels, elimination of D1 and D2, inverse DWT, one 16-bit
// Q11.5 output. This design's choices: periodic extension of the window,
// the output position, the internal precision and the four-stage pipeline.
module dwt_idwt
  import ecg_pkg::*;
#(
  parameter int unsigned OUT_IDX = 4,
  parameter bit          ELIM_D1 = 1'b1,
  parameter bit          ELIM_D2 = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  q11_5_t s [8],
  output q11_5_t signal_out,
  output logic   out_valid
);

  localparam int unsigned GUARD = 4;
  localparam coef_tab_t   H8 = db4_tab(1'b0, 8);
  localparam coef_tab_t   G8 = db4_tab(1'b1, 8);
  localparam coef_tab_t   H4 = db4_tab(1'b0, 4);
  localparam coef_tab_t   G4 = db4_tab(1'b1, 4);

  typedef logic signed [31:0] ival_t;   // internal value, IFRAC fraction bits

  // Multiply-accumulate result (COEF_FRAC extra fraction bits) back to ival_t.
  function automatic ival_t rescale(input longint acc);
    longint r;
    r = (acc + (longint'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    return ival_t'(r);
  endfunction

  // Stage registers.
  ival_t a1_q [4], d1_q [4];          // after stage 1
  ival_t a2_q [2], d2_q [2];          // after stage 2
  ival_t d1_q2 [4];
  ival_t r1_q [4];                    // after stage 3 (A1 rebuilt)
  ival_t d1_q3 [4];
  logic [3:0] v_q;

  // Combinational stage results.
  ival_t x [8];
  ival_t a1_n [4], d1_n [4], a2_n [2], d2_n [2], r1_n [4];
  ival_t y_n;
  logic signed [31:0] y_q5;
  longint acc_a, acc_d;

  always_comb begin
    for (int n = 0; n < 8; n++) x[n] = ival_t'({1'b0, s[n]}) <<< GUARD;

    // Level-1 analysis.
    for (int k = 0; k < 4; k++) begin
      acc_a = 0;
      acc_d = 0;
      for (int n = 0; n < 8; n++) begin
        acc_a += longint'(x[n]) * longint'(H8[(n - 2*k + 8) % 8]);
        acc_d += longint'(x[n]) * longint'(G8[(n - 2*k + 8) % 8]);
      end
      a1_n[k] = rescale(acc_a);
      d1_n[k] = rescale(acc_d);
    end

    // Level-2 analysis of A1.
    for (int j = 0; j < 2; j++) begin
      acc_a = 0;
      acc_d = 0;
      for (int k = 0; k < 4; k++) begin
        acc_a += longint'(a1_q[k]) * longint'(H4[(k - 2*j + 4) % 4]);
        acc_d += longint'(a1_q[k]) * longint'(G4[(k - 2*j + 4) % 4]);
      end
      a2_n[j] = rescale(acc_a);
      d2_n[j] = rescale(acc_d);
    end

    // Level-2 synthesis, D2 eliminated unless ELIM_D2 is cleared.
    for (int k = 0; k < 4; k++) begin
      acc_a = 0;
      for (int j = 0; j < 2; j++) begin
        acc_a += longint'(a2_q[j]) * longint'(H4[(k - 2*j + 4) % 4]);
        if (!ELIM_D2) acc_a += longint'(d2_q[j]) * longint'(G4[(k - 2*j + 4) % 4]);
      end
      r1_n[k] = rescale(acc_a);
    end

    // Level-1 synthesis of the output sample, D1 eliminated unless ELIM_D1
    // is cleared.
    acc_a = 0;
    for (int k = 0; k < 4; k++) begin
      acc_a += longint'(r1_q[k]) * longint'(H8[(OUT_IDX - 2*k + 8) % 8]);
      if (!ELIM_D1) acc_a += longint'(d1_q3[k]) * longint'(G8[(OUT_IDX - 2*k + 8) % 8]);
    end
    y_n  = rescale(acc_a);
    y_q5 = (y_n + ival_t'(1 << (GUARD - 1))) >>> GUARD;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q        <= '0;
      signal_out <= '0;
      for (int k = 0; k < 4; k++) begin
        a1_q[k] <= '0; d1_q[k] <= '0; d1_q2[k] <= '0; d1_q3[k] <= '0; r1_q[k] <= '0;
      end
      for (int j = 0; j < 2; j++) begin
        a2_q[j] <= '0; d2_q[j] <= '0;
      end
    end else begin
      v_q <= {v_q[2:0], in_valid};
      if (in_valid) begin
        a1_q <= a1_n;
        d1_q <= d1_n;
      end
      if (v_q[0]) begin
        a2_q  <= a2_n;
        d2_q  <= d2_n;
        d1_q2 <= d1_q;
      end
      if (v_q[1]) begin
        r1_q  <= r1_n;
        d1_q3 <= d1_q2;
      end
      if (v_q[2]) begin
        if (y_q5 < 0)                       signal_out <= '0;
        else if (y_q5 > 32'(2**Q_W - 1))    signal_out <= '1;
        else                                signal_out <= q11_5_t'(y_q5);
      end
    end
  end

  assign out_valid = v_q[3];

endmodule
