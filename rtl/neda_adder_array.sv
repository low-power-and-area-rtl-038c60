// neda_adder_array -- sign extension and adder array of a NEDA inner-product
// unit.
//
// NEDA writes the inner product Z = sum_k C_k * r(k) with fixed two's
// complement coefficients C_k as Z = sum_i m(i+1) * 2^i, where
// m(i+1) = sum_k bit_i(C_k) * r(k) for the value bits i = 0 .. COEF_W-2 and
// the sign row m(COEF_W) = -(sum_k bit_{COEF_W-1}(C_k) * r(k)). Each m is a
// sum of only those inputs whose coefficient has a one in that bit (the
// columns of the DA matrix), so the block needs no ROM and no multiplier,
// and the only negation is one inverter plus an adder with carry-in 1 on the
// sign row. The inputs r are sign-extended to M_W bits first.
//
// Combinational. r(k) is r[k-1], m(i) is m[i-1], both signed. The DA matrix
// is derived from the COEFS parameter at elaboration: rows with a single one
// reduce to wires and rows of zeros to constants once synthesis propagates
// them. With COEFS = neda_pkg::LP_COEFS_6B and COEF_W = 6 this is exactly
// the published 6x5 matrix and gives m = (r3+r4, r2+r4+r5, r1, r1+r2+r3,
// r1+r2, -r1).
module neda_adder_array #(
  parameter int unsigned RW     = 5,
  parameter int unsigned NR     = neda_pkg::LP_NR,
  parameter int unsigned COEF_W = neda_pkg::COEF_W,
  parameter logic [NR-1:0][COEF_W-1:0] COEFS = neda_pkg::LP_COEFS,
  localparam int unsigned M_W   = RW + $clog2(NR + 1)
) (
  input  logic [NR-1:0][RW-1:0]      r,
  output logic [COEF_W-1:0][M_W-1:0] m
);
  // sign extension
  logic [NR-1:0][M_W-1:0] s;
  for (genvar k = 0; k < NR; k++) begin : g_sext
    assign s[k] = M_W'(signed'(r[k]));
  end

  for (genvar i = 0; i < COEF_W; i++) begin : g_row
    // running sum over the columns k with bit i of C_k set
    logic [NR:0][M_W-1:0] acc;
    assign acc[0] = '0;
    for (genvar k = 0; k < NR; k++) begin : g_col
      if (COEFS[k][i]) begin : g_add
        ripple_adder #(.W(M_W)) u_add (
          .a(acc[k]), .b(s[k]), .cin(1'b0), .sum(acc[k+1]), .cout()
        );
      end else begin : g_skip
        assign acc[k+1] = acc[k];
      end
    end
    if (i == COEF_W - 1) begin : g_sign
      // sign row: two's complement negation, inverter and +1
      ripple_adder #(.W(M_W)) u_neg (
        .a(~acc[NR]), .b('0), .cin(1'b1), .sum(m[i]), .cout()
      );
    end else begin : g_value
      assign m[i] = acc[NR];
    end
  end
endmodule
