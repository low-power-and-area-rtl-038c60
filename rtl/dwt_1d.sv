// dwt_1d -- one 1-D 9/7 analysis stage: a 9-tap low-pass and a 7-tap
// high-pass NEDA filter sharing one tap delay line, decimated by two.
//
// Samples enter with a valid/ready handshake. Every accepted sample shifts
// the 8-stage delay line (shift_register), so together with the incoming
// sample the nine values X(n) .. X(n-8) are on hand. Every second accepted
// sample (n = 1, 3, 5, .. counted from the last clear) also starts both
// NEDA units at the same clock edge: the low-pass unit on the five folded
// inputs r(1) = X(n)+X(n-8) .. r(5) = X(n-4), the high-pass unit on
// r(1) = X(n)+X(n-6) .. r(4) = X(n-3). The two units run concurrently and
// finish together, COEF_W + 1 clocks after the start cycle, with one
// out_valid pulse:
//   out_lo = sum_k LP_COEFS[k] * r_lp(k+1),  out_hi = sum_k HP_COEFS[k] * r_hp(k+1).
// A sample marked in_last ends a line: instead of shifting, the delay line
// and the pair phase are cleared, so each line is filtered from zero
// history (X(m) = 0 before its first sample). Lines must have even length.
//
// Rate: a pair-starting sample is accepted only while the units are ready,
// so a line streams at two samples per COEF_W + 1 clocks. out_valid has no
// back-pressure. The folding and the coefficients follow the document; the
// handshake, line clearing, decimation phase and the alignment of both
// filters to the same n are this design's choices.
module dwt_1d #(
  parameter int unsigned DATA_W = neda_pkg::DATA_W,
  parameter int unsigned COEF_W = neda_pkg::COEF_W,
  parameter logic [neda_pkg::LP_NR-1:0][COEF_W-1:0] LP_COEFS = neda_pkg::LP_COEFS,
  parameter logic [neda_pkg::HP_NR-1:0][COEF_W-1:0] HP_COEFS = neda_pkg::HP_COEFS,
  localparam int unsigned RW  = DATA_W + 1,
  localparam int unsigned Y_W = RW + $clog2(neda_pkg::LP_NR + 1) + COEF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_last,
  output logic              out_valid,
  output logic [Y_W-1:0]    out_lo,
  output logic [Y_W-1:0]    out_hi
);
  import neda_pkg::*;

  localparam int unsigned DEPTH = LP_TAPS - 1;
  localparam int unsigned HY_W  = RW + $clog2(HP_NR + 1) + COEF_W;

  logic                         phase;    // 1: next sample completes a pair
  logic                         accept, start;
  logic [DEPTH:1][DATA_W-1:0]   line;
  logic [LP_TAPS-1:0][DATA_W-1:0] taps;
  logic [LP_NR-1:0][RW-1:0]     r_lp;
  logic [HP_NR-1:0][RW-1:0]     r_hp;
  logic                         lp_ready, hp_ready, lp_done, hp_done;
  logic [Y_W-1:0]               y_lp;
  logic [HY_W-1:0]              y_hp;

  assign in_ready = !phase || (lp_ready && hp_ready);
  assign accept   = in_valid && in_ready;
  assign start    = accept && phase;

  shift_register #(.W(DATA_W), .DEPTH(DEPTH)) u_line (
    .clk(clk), .rst_n(rst_n), .shift_en(accept && !in_last),
    .clr(accept && in_last), .x(in_data), .y(line)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                phase <= 1'b0;
    else if (accept && in_last) phase <= 1'b0;
    else if (accept)           phase <= !phase;
  end

  // taps[j] = X(n-j), X(n) being the sample on the input
  always_comb begin
    taps[0] = in_data;
    for (int j = 1; j < LP_TAPS; j++) taps[j] = line[j];
  end

  symmetric_preadder #(.W(DATA_W), .TAPS(LP_TAPS)) u_fold_lp (
    .taps(taps), .r(r_lp)
  );
  symmetric_preadder #(.W(DATA_W), .TAPS(HP_TAPS)) u_fold_hp (
    .taps(taps[HP_TAPS-1:0]), .r(r_hp)
  );

  neda_unit #(.RW(RW), .NR(LP_NR), .COEF_W(COEF_W), .COEFS(LP_COEFS)) u_lp (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(lp_ready),
    .r(r_lp), .done(lp_done), .y(y_lp)
  );
  neda_unit #(.RW(RW), .NR(HP_NR), .COEF_W(COEF_W), .COEFS(HP_COEFS)) u_hp (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(hp_ready),
    .r(r_hp), .done(hp_done), .y(y_hp)
  );

  assign out_valid = lp_done;
  assign out_lo    = y_lp;
  assign out_hi    = Y_W'(signed'(y_hp));

  // both units are started together and take the same number of steps
  a_units_in_step: assert property (@(posedge clk) disable iff (!rst_n) lp_done == hp_done);
endmodule
