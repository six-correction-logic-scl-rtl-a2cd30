// qca_inv: QCA inverter.
//
// In QCA the inverter splits the input wire into two branches that rejoin
// diagonally, so the output cell takes the reverse polarization of the input
// cell (p = +1 becomes p = -1 and back). As a logic gate it is a NOT.
//
// Interface: input a; output y = ~a. Purely combinational, no clock.
// Only the function is modelled; the cell arrangement has no counterpart in
// RTL.
module qca_inv (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
