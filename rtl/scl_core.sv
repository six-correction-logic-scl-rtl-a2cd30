// scl_core: the Six-Correction Logic (SCL) gate as a majority-voter network.
//
// The SCL gate is a 4x4 gate. Three outputs copy their inputs (P=A, Q=B,
// R=C) and the fourth computes S = A(B+C) xor D; P, Q and R are the two
// "garbage" outputs plus the pass-through that keep the mapping one-to-one.
// In a BCD adder the S function is what decides when 6 must be added to a
// binary sum.
//
// The network uses five majority voters (maj3) and two inverters (qca_inv):
//   u_or_bc  : MV(B, C, 1)        = B + C
//   u_and_a  : MV(A, B+C, 0)      = X = A(B+C)
//   u_and_nx : MV(~X, D, 0)       = ~X & D
//   u_and_nd : MV(X, ~D, 0)       = X & ~D
//   u_or_s   : MV(t1, t2, 1)      = S = X xor D
// The five voters, their fixed inputs (1, 0, 0, 0, 1) and the place of D
// between the two AND voters follow the published block diagram; which input
// of each lower AND voter carries an inverter is this design's reading of the
// diagram, chosen because the two AND terms and the final OR must form the
// stated XOR.
//
// Interface: in (A, B, C, D) and out (P, Q, R, S) as scl_pkg structs.
// Purely combinational; the clock-zone delay of the QCA layout is added by
// scl_gate.
module scl_core
  import scl_pkg::*;
(
  input  scl_in_t  in,
  output scl_out_t out
);

  logic b_or_c;  // B + C
  logic x;       // A(B + C)
  logic x_n;     // inverted X
  logic d_n;     // inverted D
  logic t_nx_d;  // ~X & D
  logic t_x_nd;  // X & ~D
  logic s;

  maj3 u_or_bc  (.a(in.b),   .b(in.c),   .c(POL_POS), .y(b_or_c));
  maj3 u_and_a  (.a(in.a),   .b(b_or_c), .c(POL_NEG), .y(x));

  qca_inv u_inv_x (.a(x),    .y(x_n));
  qca_inv u_inv_d (.a(in.d), .y(d_n));

  maj3 u_and_nx (.a(x_n),    .b(in.d),   .c(POL_NEG), .y(t_nx_d));
  maj3 u_and_nd (.a(x),      .b(d_n),    .c(POL_NEG), .y(t_x_nd));
  maj3 u_or_s   (.a(t_nx_d), .b(t_x_nd), .c(POL_POS), .y(s));

  always_comb begin
    out.p = in.a;
    out.q = in.b;
    out.r = in.c;
    out.s = s;
  end

endmodule
