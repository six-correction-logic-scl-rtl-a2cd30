// scl_pkg: types and constants shared by the Six-Correction Logic (SCL) gate.
//
// A QCA cell holds one of two polarizations, p = -1 or p = +1, read as the
// binary values 0 and 1. The constants below name those two levels; they are
// what the fixed (programming) input of a majority voter is tied to when the
// voter is used as an AND (p = -1) or an OR (p = +1).
//
// The SCL gate is a 4-input, 4-output gate with input vector (A, B, C, D) and
// output vector (P, Q, R, S). Both vectors are packed structs so a whole
// vector can be moved through the clock-zone delay as one value.
//
// QCA circuits are clocked in four phases; in this RTL one tick of the clock
// is one phase, so a full QCA clock cycle is PHASES_PER_CYCLE ticks.
package scl_pkg;

  // Binary value of the two cell polarizations.
  localparam logic POL_NEG = 1'b0;  // p = -1
  localparam logic POL_POS = 1'b1;  // p = +1

  // Clock phases (clock zones 0..3) in one QCA clock cycle.
  localparam int unsigned PHASES_PER_CYCLE = 4;

  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
  } scl_in_t;

  typedef struct packed {
    logic p;
    logic q;
    logic r;
    logic s;
  } scl_out_t;

endpackage
