# Online-testable reversible circuits with a single parity line

A reversible circuit is a cascade of gates from the Toffoli family (NOT, CNOT,
multi-control Toffoli, with positive or negative controls). It has as many
outputs as inputs and no fan-out. This RTL models two ways of making such a
cascade check itself while it runs. Both add one extra line, the parity line
`L`, which starts at 0. A few cheap gates are added, and every Toffoli gate
is widened so that it also writes into `L`. With no fault, `L` ends at 0. A
single bit fault (one line's value inverted at one point of the cascade)
leaves `L` at 1. No checker circuit is needed and no garbage line is added.

The gates are modelled as Boolean logic: each gate is an AND of its controls
XORed onto its target. So the circuits simulate and synthesise like ordinary
combinational logic. Every point between gates also has injectors that can
invert any line there or force it to a constant. They let you exercise the
detection.

## The extended Toffoli gate and why `L` works

The key element is the *extended Toffoli gate* (ETG). It is a Toffoli gate
with two targets. When all controls are active, both targets are inverted.
In the testable circuits the first target is the line the original gate
drove, and the second target is always `L`. So every change a gate makes to
a data line is also made to `L`, and the two changes are driven by the same
AND term.

The bookkeeping works as follows. A row of CNOTs XORs every checked line
into `L` before the gates, and a second row does the same after them. If
nothing goes wrong, `L` ends as

    L = (start values of the lines) ^ (all ETG terms) ^ (end values of the lines)

A line's end value is its start value XOR the ETG terms that targeted it, so
everything cancels and `L = 0`. Now invert one line at some point between its
two CNOTs:

* **Fault on a target line.** That line's end value gains an extra 1, and
  nothing else changes. `L` becomes 1.
* **Fault on a control line.** Some ETGs may now fire, or stop firing. Each
  such ETG changes its data target and `L` by the same amount, so those
  changes still cancel. The faulty line's own end value still differs from
  its start value by the extra 1, and `L` becomes 1. This holds even when
  the fault has spread to several data lines (the `rev_cascade` testbench
  replays such a case).
* **Fault on `L`.** It lands directly in the result. No gate uses `L` as a
  control, so a fault on `L` cannot spread.

The argument needs every line to be checked twice, once at the start and
once at the end. A fault that comes before a line's first check, or after
its last check, is invisible to `L`. For an input line, a fault before its
first check cannot be told apart from a different input value. For a line
leaving the circuit, a fault after its last check never reaches `L`. The
testbenches check this span exactly. `err` must be 1 for every single fault
inside a line's checked span and 0 for every fault outside it.

NOT gates need one correction. A NOT inverts its line, so the end value no
longer matches the start value plus the ETG terms. One NOT on `L` for each
NOT in the source circuit restores the balance. An even number of NOTs
cancels out, so one NOT on `L` is enough when the count is odd.

## The two constructions

Both constructions are built at elaboration time. Each takes the gate list of
an ordinary (non-testable) circuit as a parameter, and its functions compute
the testable cascade from it.

### `esop_testable`: circuits from ESOP synthesis

Here the source circuit has `P` input lines and `Q` output lines. The output
lines start at 0. Every Toffoli gate has its controls on input lines and its
target on an output line (one gate per product term). The testable cascade
on `P+Q+1` lines is, in order:

1. a CNOT from each input line to `L`;
2. the source gates: each Toffoli gate as an ETG onto `L`, and each NOT
   followed by a NOT on `L`;
3. a CNOT from each output line to `L`;
4. a CNOT from each input line to `L`.

The output lines need no opening CNOT, because they are known to start at 0.
This adds `2P + Q` CNOTs and one NOT per source NOT. The default is a
4-input, 2-output circuit:

    y0 (I5) = I1 I2 ^ I1 I3 ^ I2 I3      (majority of I1..I3)
    y1 (I6) = I4

Its 14-gate testable cascade is `c1..c4 | e1..e4 | c5 c6 | c7..c10`.

### `toffoli_testable`: any Toffoli circuit

Here the `P` lines may each be both input and output, and gates may target
any line. The testable cascade on `P+1` lines is, in order:

1. a CNOT from every line to `L`;
2. the source gates: each Toffoli or CNOT gate as an ETG onto `L`, NOTs
   unchanged;
3. one NOT on `L` if the number of NOTs is odd;
4. a CNOT from every line to `L`.

This adds `2P` CNOTs and at most one NOT. The default is a 5-line circuit:

    t1: I3 ^= I1 I2     t2: I3 ^= I2     t3: I5 ^= I2 I4     t4: I2 ^= I1 I3

Its 14-gate testable cascade is `c1..c5 | e1..e4 | c6..c10`.

## Gate descriptors

`rev_pkg::gate_t` describes one gate with three masks over the lines (bit
`i` is line `I(i+1)`):

| field  | meaning |
|--------|---------|
| `ctrl` | control lines |
| `neg`  | the controls that are active at 0 (subset of `ctrl`) |
| `tgt`  | one target bit (NOT, CNOT, Toffoli), or two (ETG) |

The helpers `not_g(t)`, `cnot_g(c, t)`, `mk_gate(ctrl, neg, tgt)` and
`bit_of(i)` build descriptors. A gate list is a packed array
`gate_t [NG-1:0]`. Element 0 acts first, so in a `{...}` concatenation the
first gate is written last. Malformed gates are rejected at elaboration:
a target that is also a control, a negative control that is no control, or
a line beyond the circuit. `esop_testable` also rejects a source circuit
that breaks the ESOP structure.

To make your own circuit testable, instantiate one of the constructions with
your list, for example:

```systemverilog
import rev_pkg::*;
localparam gate_t [1:0] MY = {
  mk_gate(bit_of(0) | bit_of(1), bit_of(1), bit_of(2)),  // I3 ^= I1 & ~I2
  not_g(0)                                               // NOT I1 (first)
};
toffoli_testable #(.P(3), .NG(2), .GATES(MY)) u (
  .lines_in(d), .flip('0), .stuck_en('0), .stuck_val('0),
  .lines_out(q), .err(fault));
```

The width of `flip`, `stuck_en` and `stuck_val` follows from the construction. It is `(NT+1) x W`, with
`NT = 2P + Q + NG + m` gates for `esop_testable` and `NT = 2P + NG + (m mod 2)`
for `toffoli_testable`, where `m` is the number of NOT gates.

## Modules

| module | role |
|--------|------|
| `rev_pkg` | gate descriptor type, constructors, checks, NOT counter |
| `toffoli_gate` | one Toffoli-family gate (NOT, CNOT, n-bit, negative controls) |
| `etg_gate` | one extended Toffoli gate with two targets |
| `rev_cascade` | a gate list as a cascade, with a fault injector at every point |
| `esop_testable` | the ESOP-circuit construction |
| `toffoli_testable` | the general Toffoli-circuit construction |
| `online_testable_top` | both default circuits side by side, all ports brought out |

All modules are combinational, with no clock and no reset. A cascade of `NT`
gates is `NT` levels of AND-then-XOR logic.

## Fault injection

Every point between gates has two injectors:

* `flip[s][l]` inverts line `l` at point `s` (a bit fault).
* `stuck_en[s][l]` forces line `l` at point `s` to `stuck_val[s][l]`
  (a stuck-at fault). Forcing takes priority over `flip`.

Point 0 is the circuit input, and point `s` is the output of gate `s`,
counted from 1. Line `W-1` is `L`. A stuck-at fault acts as a bit fault
wherever the fault-free value differs from the stuck value, and does
nothing elsewhere, so `L` flags it under the same rule. Set one bit to model
a single fault; any mask models several at once. Tie `flip` and `stuck_en`
to zero for normal use. The injectors are test access for simulation and
are not part of the construction itself. A synthesis flow that ties them to
zero removes them.

## Testbenches

Each testbench in `tb/` checks itself and ends with a `TB_RESULT` line.

* `toffoli_gate_tb`, `etg_gate_tb`: every input of several gate shapes
  against the gate equations. Also checks that a Toffoli gate is its own
  inverse, and that for every fault on an ETG's inputs both targets change
  together.
* `rev_cascade_tb`: gate order, bijectivity of a cascade, random multi-bit
  flip and stuck-at masks against a hand-written model, and the
  fault-spreading case:
  inputs 0,1,0,1 with `L` = 0, and `I1` inverted before the first ETG, must
  end at 1,1,1,0 with `L` = 0.
* `esop_testable_tb`, `toffoli_testable_tb`: the default circuit plus one
  with NOT gates and negative controls. Each checks the function for all
  inputs, `err` for every single fault, and the gate count of the cascade.
* `online_testable_top_tb`: the whole top at its default size. It runs all
  inputs of both circuits, and for each input every single bit fault,
  stuck-at-0 fault and stuck-at-1 fault (27464 checks). Every output is
  compared with a small gate-list reference model, and `err` with the
  checked-span rule. It counts how often each case occurred: fault-free
  operation, detected faults on input, output and parity lines, faults that
  spread to further lines, detected stuck-at faults, stuck-at faults that
  changed nothing, and faults outside the checked span.

* `random_circuits_tb`: larger circuits produced at elaboration time by a
  fixed-seed generator. Two are general 8-line, 48-gate Toffoli circuits,
  one with an odd and one with an even NOT count. The third is a 6-input,
  3-output, 24-gate ESOP circuit. Each is pushed through its construction.
  The testbench checks the function against the source gate list, and
  checks `err` for every single bit fault.

Running one with plain verilator:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module online_testable_top_tb rtl/rev_pkg.sv tb/online_testable_top_tb.sv
./obj_dir/Vonline_testable_top_tb
```

Each testbench finishes in well under a second.

## Limits and departures

* **Checked span.** `L` can only detect a fault between a line's first and
  last check. The proofs of the method are written for a fault "on any
  line", but they assume the fault lies between the two checks. The RTL
  and testbenches make the span explicit.
* **Where the extra NOTs go.** No gate reads `L`, so the position of a NOT
  on `L` does not change the result. `esop_testable` puts each extra NOT
  right after its source NOT. `toffoli_testable` puts its single NOT after
  the source gates and before the closing CNOTs.
* **CNOTs become ETGs.** In the general construction a CNOT is treated as a
  2-bit Toffoli gate and widened to an ETG, like every other Toffoli gate.
* **Sizes.** Gate masks cover at most 64 lines (`MAX_LINES`). Circuits whose
  NOTs are counted for sizing may have at most 1024 source gates
  (`MAX_GATES`). Both are package constants and can be raised.
* **Not modelled.** This RTL does not compute cost metrics (quantum cost,
  garbage count), and it includes no benchmark netlists.
