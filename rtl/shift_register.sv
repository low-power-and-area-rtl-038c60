// shift_register -- tap delay line of a 1-D filter stage.
//
// On every clock with shift_en the input sample x enters y[1] and every
// y[i] moves to y[i+1], so y[i] holds X(n-i) while x is X(n). With
// DEPTH = 8 the line offers the nine samples X(n) .. X(n-8) that the 9-tap
// low-pass filter needs; the 7-tap high-pass filter uses X(n) .. X(n-6).
// clr (synchronous, has priority) zeroes every stage; it is used between
// image rows so that each row starts from zero history. Reset also zeroes
// the line. Depth 8 and width 4 follow the published shift-register
// waveform (x[3:0] moving through y1..y8 one stage per clock); the shift
// enable and clear are this design's own.
module shift_register #(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shift_en,
  input  logic                    clr,
  input  logic [W-1:0]            x,
  output logic [DEPTH:1][W-1:0]   y
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0;
    end else if (clr) begin
      y <= '0;
    end else if (shift_en) begin
      y[1] <= x;
      for (int i = 2; i <= DEPTH; i++) y[i] <= y[i-1];
    end
  end
endmodule
