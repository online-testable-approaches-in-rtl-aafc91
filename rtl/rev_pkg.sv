// rev_pkg: types and helpers shared by the reversible-gate models.
//
// A reversible circuit here is a cascade of gates acting on a vector of
// lines. Every gate is described by one gate_t: a mask of the lines it uses
// as controls, a mask marking which of those controls are negative (the gate
// fires when such a line is 0), and a mask of its target lines. One target
// bit gives a NOT (no controls), a CNOT (one control) or an n-bit Toffoli
// gate; two target bits give an extended Toffoli gate (ETG), whose two
// targets are inverted by the same control product. Line i of a circuit is
// bit i of every mask, so the masks bound circuits to MAX_LINES lines; the
// value 64 is this design's choice.
package rev_pkg;

  localparam int unsigned MAX_LINES = 64;

  typedef logic [MAX_LINES-1:0] line_mask_t;

  typedef struct packed {
    line_mask_t ctrl;  // lines that control the gate
    line_mask_t neg;   // subset of ctrl that acts on value 0
    line_mask_t tgt;   // one target line, or two for an ETG
  } gate_t;

  // Bit mask with only line i set.
  function automatic line_mask_t bit_of(int unsigned i);
    return line_mask_t'(1) << i;
  endfunction

  // NOT gate on line t.
  function automatic gate_t not_g(int unsigned t);
    return '{ctrl: '0, neg: '0, tgt: bit_of(t)};
  endfunction

  // CNOT gate from line c onto line t.
  function automatic gate_t cnot_g(int unsigned c, int unsigned t);
    return '{ctrl: bit_of(c), neg: '0, tgt: bit_of(t)};
  endfunction

  // General gate from masks.
  function automatic gate_t mk_gate(line_mask_t ctrl, line_mask_t neg, line_mask_t tgt);
    return '{ctrl: ctrl, neg: neg, tgt: tgt};
  endfunction

  function automatic int unsigned count_ones(line_mask_t m);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < MAX_LINES; i++) n += int'(m[i]);
    return n;
  endfunction

  // Index of the lowest (k = 0) or second lowest (k = 1) set bit; 0 if none.
  function automatic int unsigned nth_one(line_mask_t m, int unsigned k);
    int unsigned seen;
    seen = 0;
    for (int unsigned i = 0; i < MAX_LINES; i++) begin
      if (m[i]) begin
        if (seen == k) return i;
        seen++;
      end
    end
    return 0;
  endfunction

  // A descriptor is well formed if it has one or two targets, no target is
  // also a control, and every negative control is a control.
  function automatic bit gate_ok(gate_t g, int unsigned lines);
    line_mask_t used;
    used = g.ctrl | g.tgt;
    if (count_ones(g.tgt) < 1 || count_ones(g.tgt) > 2) return 1'b0;
    if ((g.ctrl & g.tgt) != '0) return 1'b0;
    if ((g.neg & ~g.ctrl) != '0) return 1'b0;
    for (int unsigned i = lines; i < MAX_LINES; i++) if (used[i]) return 1'b0;
    return 1'b1;
  endfunction

  // Longest gate list whose NOT gates count_nots can count.
  localparam int unsigned MAX_GATES = 1024;
  typedef gate_t [MAX_GATES-1:0] gate_list_t;

  // Number of NOT gates (gates without controls) among the first n of gl.
  function automatic int unsigned count_nots(gate_list_t gl, int unsigned n);
    int unsigned c;
    c = 0;
    for (int unsigned g = 0; g < n && g < MAX_GATES; g++) if (gl[g].ctrl == '0) c++;
    return c;
  endfunction

endpackage
