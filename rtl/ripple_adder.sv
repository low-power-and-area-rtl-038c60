// ripple_adder -- W-bit ripple-carry adder made of full_adder cells.
//
// sum = a + b + cin (mod 2^W), cout is the carry out of the top bit. Operands
// are plain bit vectors; callers sign-extend them first, so the same adder
// serves signed two's complement sums. Combinational. Building the adders
// from full-adder cells follows the document's adder/full-adder view of the
// datapath; the ripple structure is this design's choice.
module ripple_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a2(a[i]), .b2(b[i]), .c2(c[i]), .s2(sum[i]), .car(c[i+1]));
  end
  assign cout = c[W];
endmodule
