// etg_gate: one (n+1)-bit extended Toffoli gate (ETG) on a W-line bus.
//
// An ETG is a Toffoli gate with two targets: when every control is active
// both target lines TGT1 and TGT2 are inverted, otherwise all lines pass
// through. Controls may be positive or negative, as for toffoli_gate. In the
// online testable circuits the first target is the line the original
// Toffoli gate drove and the second is the parity line L, so the value the
// gate adds to its functional output is also added to L. Because both
// targets use one product term, a bit fault on a control inverts both
// targets together and a fault on a target line stays on that line. The
// gate function follows the ETG definition; the default size (two controls,
// four lines) is only an example.
//
// Interface: k enters the gate, o leaves it. Combinational, no clock.
module etg_gate
  import rev_pkg::*;
#(
  parameter int unsigned W    = 4,          // number of lines
  parameter line_mask_t  CTRL = 'b0011,     // control lines
  parameter line_mask_t  NEG  = '0,         // negative controls (subset of CTRL)
  parameter int unsigned TGT1 = 2,          // first (functional) target
  parameter int unsigned TGT2 = 3           // second target, the parity line
) (
  input  logic [W-1:0] k,
  output logic [W-1:0] o
);

  logic [W-1:0] sat;
  logic         fire;

  always_comb begin
    sat  = (k ^ NEG[W-1:0]) | ~CTRL[W-1:0];
    fire = &sat;
    o    = k;
    o[TGT1] = k[TGT1] ^ fire;
    o[TGT2] = k[TGT2] ^ fire;
  end

  initial begin
    assert (TGT1 < W && TGT2 < W && TGT1 != TGT2 && !CTRL[TGT1] && !CTRL[TGT2]
            && (NEG & ~CTRL) == '0)
      else $error("etg_gate: bad target or control masks");
  end

endmodule
