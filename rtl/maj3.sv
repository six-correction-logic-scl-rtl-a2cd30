// maj3: three-input majority voter (MV), the basic QCA logic gate.
//
// In QCA the voter is five cells: three input cells around a central device
// cell, which settles to the polarization held by the majority of its
// neighbours and drives the output cell. Its Boolean function is
//   MV(A, B, C) = AB + AC + BC.
// Fixing one input to p = -1 (logic 0) turns it into a 2-input AND, fixing it
// to p = +1 (logic 1) into a 2-input OR; the SCL gate uses it in all three
// ways.
//
// Interface: inputs a, b, c; output y. Purely combinational, no clock.
// The function is the one given for the QCA gate; writing it as a
// sum of products is this design's choice.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (a & c) | (b & c);

endmodule
