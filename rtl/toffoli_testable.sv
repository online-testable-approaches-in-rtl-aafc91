// toffoli_testable: online testable form of any Toffoli circuit.
//
// The source circuit is a cascade of NOT, CNOT and (negative-control)
// Toffoli gates on P lines, each of which may be both input and output. The
// module rebuilds it at elaboration time with one parity line L (bit P,
// starting at 0):
//   1. a CNOT from every line onto L, ahead of the circuit;
//   2. every Toffoli and CNOT gate becomes an ETG whose second target is L;
//   3. every NOT gate is kept, and if the circuit has an odd number of NOT
//      gates one NOT is added on L after the last source gate;
//   4. a CNOT from every line onto L at the end.
// The overhead is 2P CNOTs and at most one NOT, and no garbage line. Both
// CNOT rows make L the XOR of every line's start and end value plus the
// changes the ETGs wrote to it, which cancel against the changes they wrote
// to their functional targets. With no fault L ends at 0; a single bit fault
// on any line between the two CNOT rows, or anywhere on L, leaves it at 1.
// No control is ever placed on L, so a fault on L cannot spread.
//
// The construction follows the second, general approach; where the extra
// NOT goes on L (after the source gates, before the closing CNOTs) is this
// design's reading of "at the end of line L". The default source circuit is
// the 5-line, 4-gate example: t1 = I1 I2 -> I3, t2 = I2 -> I3,
// t3 = I2 I4 -> I5, t4 = I1 I3 -> I2.
//
// Interface: lines_in/lines_out are the P circuit lines, err the final value
// of L, flip, stuck_en and stuck_val the fault injectors of the testable
// cascade (see rev_cascade; flip and stuck_en zero in normal use).
// Combinational.
module toffoli_testable
  import rev_pkg::*;
#(
  parameter int unsigned    P     = 5,   // circuit lines
  parameter int unsigned    NG    = 4,   // gates of the source circuit
  parameter gate_t [NG-1:0] GATES = {
    mk_gate(bit_of(0) | bit_of(2), '0, bit_of(1)),   // t4: I1 I3 -> I2
    mk_gate(bit_of(1) | bit_of(3), '0, bit_of(4)),   // t3: I2 I4 -> I5
    mk_gate(bit_of(1),             '0, bit_of(2)),   // t2: I2    -> I3
    mk_gate(bit_of(0) | bit_of(1), '0, bit_of(2))    // t1: I1 I2 -> I3
  },
  // derived sizes, not to be overridden
  localparam int unsigned   W      = P + 1,
  localparam int unsigned   LINE_L = P,
  localparam int unsigned   N_NOT  = count_nots(gate_list_t'(GATES), NG),
  localparam int unsigned   NT     = 2 * P + NG + (N_NOT % 2)
) (
  input  logic [P-1:0]       lines_in,
  input  logic [NT:0][W-1:0] flip,
  input  logic [NT:0][W-1:0] stuck_en,
  input  logic [NT:0][W-1:0] stuck_val,
  output logic [P-1:0]       lines_out,
  output logic               err
);

  typedef gate_t [NG-1:0] src_list_t;
  typedef gate_t [NT-1:0] tst_list_t;

  function automatic bit src_ok(src_list_t gl);
    for (int unsigned g = 0; g < NG; g++)
      if (!gate_ok(gl[g], P) || count_ones(gl[g].tgt) != 1) return 1'b0;
    return 1'b1;
  endfunction

  function automatic tst_list_t build(src_list_t gl);
    tst_list_t   t;
    int unsigned n;
    t = '0;
    n = 0;
    for (int unsigned i = 0; i < P; i++) t[n++] = cnot_g(i, LINE_L);
    for (int unsigned g = 0; g < NG; g++) begin
      if (gl[g].ctrl == '0) t[n++] = gl[g];
      else t[n++] = mk_gate(gl[g].ctrl, gl[g].neg, gl[g].tgt | bit_of(LINE_L));
    end
    if (N_NOT % 2 == 1) t[n++] = not_g(LINE_L);
    for (int unsigned i = 0; i < P; i++) t[n++] = cnot_g(i, LINE_L);
    return t;
  endfunction

  localparam tst_list_t TGATES = build(GATES);

  if (NG > MAX_GATES || !src_ok(GATES)) begin : g_bad
    $error("toffoli_testable: malformed source gate");
  end

  logic [W-1:0] cas_out;

  rev_cascade #(.W(W), .NG(NT), .GATES(TGATES)) u_cascade (
    .lines_in ({1'b0, lines_in}),   // L starts at 0
    .flip     (flip),
    .stuck_en (stuck_en),
    .stuck_val(stuck_val),
    .lines_out(cas_out)
  );

  assign lines_out = cas_out[P-1:0];
  assign err       = cas_out[LINE_L];

endmodule
