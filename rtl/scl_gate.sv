// scl_gate: the complete QCA Six-Correction Logic gate, with its clock delay.
//
// The gate takes (A, B, C, D) and returns P=A, Q=B, R=C and
// S = A(B+C) xor D. The logic is the five-majority-voter network of
// scl_core; behind it the output vector passes through ZONES clock zones
// (qca_zone_pipe), which stand for the clock zones the QCA layout crosses
// between its inputs and its S output.
//
// Timing: clk ticks once per QCA clock phase (four ticks per QCA clock
// cycle). A vector presented with in_valid on tick n appears with out_valid
// on tick n+ZONES. The default of three zones is the published delay of
// 0.75 QCA clock cycle (three clock zones used); the description of the
// layout also speaks of a full cycle through four zones, which ZONES = 4
// gives. P, Q and R are delayed as much as S so the four outputs of one
// vector appear together, as the description of the outputs states; in the
// physical layout they are tapped earlier. A new vector may be presented on
// every tick. rst_n (asynchronous, active low) clears the zones; it is this
// design's addition.
module scl_gate
  import scl_pkg::*;
#(
  parameter int unsigned ZONES = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  scl_in_t  in,
  output logic     out_valid,
  output scl_out_t out
);

  scl_out_t core_out;

  scl_core u_core (
    .in  (in),
    .out (core_out)
  );

  qca_zone_pipe #(
    .WIDTH ($bits(scl_out_t)),
    .ZONES (ZONES)
  ) u_zones (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (core_out),
    .out_valid (out_valid),
    .out_data  (out)
  );

endmodule
