// toffoli_gate: one n-bit Toffoli gate on a W-line bus.
//
// The gate passes every line through unchanged except the target line TGT,
// which is inverted when every control is active. A positive control (bit
// set in CTRL only) is active at 1, a negative control (bit set in CTRL and
// NEG) is active at 0. With CTRL = 0 the gate is a NOT, with one control a
// CNOT (Feynman gate); this follows the gate definitions of the Toffoli
// family. The lines not named in CTRL or TGT pass through, which is how a
// gate sits in a cascade drawn across all lines. The default (a 3-bit
// Toffoli gate) is only an example.
//
// Interface: k is the line vector entering the gate, o the vector leaving
// it. Purely combinational, no clock; one gate is one level of AND logic
// followed by an XOR.
module toffoli_gate
  import rev_pkg::*;
#(
  parameter int unsigned W    = 3,          // number of lines
  parameter line_mask_t  CTRL = 'b011,      // control lines
  parameter line_mask_t  NEG  = '0,         // negative controls (subset of CTRL)
  parameter int unsigned TGT  = 2           // target line
) (
  input  logic [W-1:0] k,
  output logic [W-1:0] o
);

  // Each line is "satisfied" if it is no control or its control is active.
  logic [W-1:0] sat;
  logic         fire;

  always_comb begin
    sat  = (k ^ NEG[W-1:0]) | ~CTRL[W-1:0];
    fire = &sat;
    o    = k;
    o[TGT] = k[TGT] ^ fire;
  end

  initial begin
    assert (TGT < W && !CTRL[TGT] && (NEG & ~CTRL) == '0)
      else $error("toffoli_gate: bad target or control masks");
  end

endmodule
