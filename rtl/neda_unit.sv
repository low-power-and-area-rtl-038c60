// neda_unit -- one NEDA inner-product engine: Z = sum_k COEFS[k] * r(k+1).
//
// On a start pulse taken while ready, the folded inputs r are registered;
// neda_adder_array turns them into the COEF_W partial sums of the DA matrix
// and neda_accumulator shift-accumulates those, one bit row per clock. No
// ROM, no multiplier and no subtractor are used: the one negation (the sign
// row) is an inverter plus carry-in.
//
// Interface: r[k] is r(k+1), signed RW bits; y is the signed product,
// Y_W = RW + clog2(NR+1) + COEF_W bits, valid from the done pulse until the
// next start. Timing: done follows the start cycle by COEF_W + 1 clocks; a new
// start is accepted in the done cycle at the earliest (ready), so the unit
// delivers one result every COEF_W + 1 clocks. The register in front of the
// adder array is this design's own choice.
module neda_unit #(
  parameter int unsigned RW     = 5,
  parameter int unsigned NR     = neda_pkg::LP_NR,
  parameter int unsigned COEF_W = neda_pkg::COEF_W,
  parameter logic [NR-1:0][COEF_W-1:0] COEFS = neda_pkg::LP_COEFS,
  localparam int unsigned M_W   = RW + $clog2(NR + 1),
  localparam int unsigned Y_W   = M_W + COEF_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  ready,
  input  logic [NR-1:0][RW-1:0] r,
  output logic                  done,
  output logic [Y_W-1:0]        y
);
  logic [NR-1:0][RW-1:0]      r_q;
  logic [COEF_W-1:0][M_W-1:0] m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               r_q <= '0;
    else if (start && ready)  r_q <= r;
  end

  neda_adder_array #(.RW(RW), .NR(NR), .COEF_W(COEF_W), .COEFS(COEFS)) u_array (
    .r(r_q), .m(m)
  );

  neda_accumulator #(.M_W(M_W), .W(COEF_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready),
    .m(m), .done(done), .y(y)
  );
endmodule
