// full_adder -- one-bit full adder, the cell from which every adder of the
// NEDA datapath (pre-adders, adder array, shift-accumulator) is built.
//
// s2 = a2 ^ b2 ^ c2, car = majority(a2, b2, c2). Purely combinational.
// Port names follow the published full-adder waveform (a2, b2, c2 in;
// s2, car out); the gate-level form is this design's own.
module full_adder (
  input  logic a2,
  input  logic b2,
  input  logic c2,
  output logic s2,
  output logic car
);
  always_comb begin
    s2  = a2 ^ b2 ^ c2;
    car = (a2 & b2) | (a2 & c2) | (b2 & c2);
  end
endmodule
