# Six-Correction Logic (SCL) gate built from majority voters

The Six-Correction Logic gate is a 4-input, 4-output gate. It passes three of
its inputs straight through and computes one function on the fourth output:

    P = A      Q = B      R = C      S = A(B + C) xor D

The mapping from (A, B, C, D) to (P, Q, R, S) is one-to-one, so the gate is
reversible. The term A(B + C) is true for binary sums of 10 and above, the
case in which a BCD adder must add 6 to the binary sum to correct it. The gate
is meant for Quantum-dot Cellular Automata (QCA). In QCA the only primitives
are the three-input majority voter and the inverter, and data moves through
the circuit in clock zones, one clock phase at a time. This RTL models the
gate at that level: five majority voters and two inverters form the logic,
and a chain of clock zones gives the output delay.

## Truth table

| A B C D | S | | A B C D | S |
|---------|---|-|---------|---|
| 0 0 0 0 | 0 | | 1 0 0 0 | 0 |
| 0 0 0 1 | 1 | | 1 0 0 1 | 1 |
| 0 0 1 0 | 0 | | 1 0 1 0 | 1 |
| 0 0 1 1 | 1 | | 1 0 1 1 | 0 |
| 0 1 0 0 | 0 | | 1 1 0 0 | 1 |
| 0 1 0 1 | 1 | | 1 1 0 1 | 0 |
| 0 1 1 0 | 0 | | 1 1 1 0 | 1 |
| 0 1 1 1 | 1 | | 1 1 1 1 | 0 |

P, Q and R always equal A, B and C. When A = 0, S is just D. Packed into 16
bits, with bit A*8+B*4+C*2+D holding S, the table is `16'h56AA`. The
testbenches use this constant as their reference.

## The majority-voter network

The majority voter computes MV(a, b, c) = ab + ac + bc. If one input is fixed
at 0 (cell polarization p = -1), the voter is a two-input AND. If it is fixed
at 1 (p = +1), the voter is a two-input OR. `scl_core` uses the voter in both
roles:

    B ─┐
    C ─┤ MV(.,.,1) ── B+C ─┐
       └───────────────────┤
    A ─────────────────────┤ MV(.,.,0) ── X = A(B+C)
                                         │
            ┌──── NOT ── ~X ─┐           │
            │    D ──────────┤ MV(.,.,0) ── ~X & D ─┐
            X                                       ├ MV(.,.,1) ── S
            │    D ── NOT ── ~D ─┐                  │
            └────────────────────┤ MV(.,.,0) ── X & ~D ┘

The last three voters build the XOR as (~X & D) | (X & ~D). The published
block diagram gives the voters, their fixed inputs (1, 0, 0, 0, 1) and the
place of D. It draws the two inversions as unlabelled symbols. Here one
inverter is placed on X in the upper branch and one on D in the lower branch,
because only that placement gives X xor D. P, Q and R are taken from the A, B
and C lines.

## Clock zones and timing

QCA cells are grouped into clock zones. A four-phase clock switches the zones
one after another, and each zone passes its data on one phase later. In this
RTL:

* `clk` ticks once per QCA clock phase, so one QCA clock cycle is four ticks
  (`scl_pkg::PHASES_PER_CYCLE`).
* `qca_zone_pipe` is a chain of `ZONES` register stages, one per zone.
* `scl_gate` puts the combinational network first and the zone chain after
  it. A vector taken with `in_valid` on tick *n* leaves with `out_valid` on
  tick *n* + `ZONES`.

The default is `ZONES = 3`. This is the gate's stated delay of 0.75 clock
cycle, with three clock zones used by the layout. Another description of the
same layout says the signal crosses four zones and takes a full clock cycle.
If that reading is preferred, set `ZONES = 4`.

Differences from the physical circuit:

* The delay is lumped after the logic. In the QCA layout it is spread between
  the gates. The delay from input to output is the same either way.
* P, Q and R are delayed as much as S, so the four outputs of one vector
  appear together. In the layout, P, Q and R leave from the first zone.
* A new vector may be presented on every tick. A QCA circuit takes one vector
  per clock cycle, every four ticks. That slower rate is a special case of
  this model and is tested.
* `rst_n` and the valid bit are additions of this design. A QCA circuit has
  neither. `rst_n` is asynchronous and active low. It empties the zones, and
  any vector still in flight is lost.

## Modules

| File | Role |
|------|------|
| `rtl/scl_pkg.sv` | The `scl_in_t {a,b,c,d}` and `scl_out_t {p,q,r,s}` structs, the polarization constants `POL_NEG`/`POL_POS`, and `PHASES_PER_CYCLE` |
| `rtl/maj3.sv` | Three-input majority voter |
| `rtl/qca_inv.sv` | Inverter |
| `rtl/scl_core.sv` | Combinational SCL gate: five `maj3` and two `qca_inv` |
| `rtl/qca_zone_pipe.sv` | `ZONES` clock zones, `WIDTH` bits wide, with a valid bit |
| `rtl/scl_gate.sv` | Top: `scl_core` followed by `qca_zone_pipe` |

Top-level ports of `scl_gate`: `clk`, `rst_n`, `in_valid`, `in`
(`scl_in_t`), `out_valid`, `out` (`scl_out_t`). Its one parameter is `ZONES`
(default 3).

Parts of the QCA technology that have no RTL form are not modelled:

* The cell, with its four dots and two electrons, is a logic value here.
* The QCA wire is a plain net.
* The physical layout figures of 61 cells and 0.095 µm² have no counterpart
  in RTL.

The BCD adder that would use the gate is not included.

## Verification

Each testbench checks its results, ends with a line
`TB_RESULT checks=N failures=M`, and has a watchdog.

* `tb/tb_maj3.sv`: all 8 input combinations, plus AND and OR programming.
* `tb/tb_qca_inv.sv`: both polarizations.
* `tb/tb_scl_core.sv`: all 16 vectors against the truth table.
* `tb/tb_qca_zone_pipe.sv`: a random stream through chains of 3 and 4 zones.
  It checks data and delay on every tick, and a reset while data is in
  flight.
* `tb/tb_scl_gate.sv`: the top at its default parameters, end to end. It
  runs in three phases:
  1. All 16 vectors, one per QCA cycle.
  2. 64 random vectors, mostly back to back.
  3. A reset with vectors in flight.

  Every output is checked for value and for a delay of exactly three ticks.
  The test also counts four events and fails if any of them never happens:
  outputs delivered, S set through the ~X&D branch, S set through the X&~D
  branch, and vectors flushed by reset.

To run one testbench with plain Verilator:

    verilator --binary --timing --assert rtl/scl_pkg.sv rtl/maj3.sv rtl/qca_inv.sv \
        rtl/scl_core.sv rtl/qca_zone_pipe.sv rtl/scl_gate.sv tb/tb_scl_gate.sv \
        --top-module tb_scl_gate -o sim
    ./obj_dir/sim

Verilator reports unused package constants when it lints a module that does
not need all of `scl_pkg`. These warnings are harmless.
