// symmetric_preadder -- folds the taps of a symmetric odd-length filter.
//
// taps[j] is X(n-j), j = 0 .. TAPS-1. For k = 1 .. NR-1 the output is
// r(k) = X(n-k+1) + X(n-TAPS+k), and the centre tap passes alone:
// r(NR) = X(n-(TAPS-1)/2). For TAPS = 9 this is r(1) = X(n) + X(n-8) ..
// r(5) = X(n-4); for TAPS = 7 it is r(1) = X(n) + X(n-6) .. r(4) = X(n-3).
// Inputs are signed; outputs are one bit wider. Combinational, built from
// ripple_adder. r(k) is returned in element [k-1].
module symmetric_preadder #(
  parameter int unsigned W    = 4,
  parameter int unsigned TAPS = 9,
  localparam int unsigned NR  = (TAPS + 1) / 2
) (
  input  logic [TAPS-1:0][W-1:0] taps,
  output logic [NR-1:0][W:0]     r
);
  for (genvar k = 0; k < NR - 1; k++) begin : g_pair
    logic [W:0] a, b;
    assign a = {taps[k][W-1], taps[k]};
    assign b = {taps[TAPS-1-k][W-1], taps[TAPS-1-k]};
    ripple_adder #(.W(W + 1)) u_add (
      .a(a), .b(b), .cin(1'b0), .sum(r[k]), .cout()
    );
  end
  assign r[NR-1] = {taps[NR-1][W-1], taps[NR-1]};
endmodule
