// esop_testable: online testable form of an ESOP-based reversible circuit.
//
// The source circuit has P input lines (bits 0..P-1) and Q output lines
// (bits P..P+Q-1) that start at 0. Each of its Toffoli gates has controls
// only on input lines (positive or negative) and its target on an output
// line, one gate per ESOP product term; NOT gates may sit on any line. The
// module rebuilds that circuit at elaboration time, adding one parity line
// L (bit P+Q, starting at 0):
//   1. a CNOT from every input line onto L, ahead of the circuit;
//   2. every Toffoli gate becomes an ETG whose second target is L;
//   3. every NOT gate is kept and followed by one extra NOT on L;
//   4. a CNOT from every output line onto L;
//   5. a CNOT from every input line onto L again.
// The extra gates are P + P + Q CNOTs and one NOT per NOT of the source
// circuit; no garbage line is added. Without a fault L ends at 0. A single
// bit fault on an input line after step 1 has fed it into L, on an output
// line before its step-4 CNOT, or anywhere on L, leaves L at 1, so err
// flags it. A fault that comes after the last gate reading a line (or on an
// input before its first CNOT, where it is indistinguishable from another
// input value) lies outside what L can see.
//
// The procedure and its gate order follow the first construction described
// for ESOP circuits; the placement of each extra NOT right after its NOT is
// this design's choice (L has no controls, so any place on L gives the same
// result). The default source circuit is the 4-input, 2-output example:
// y0 = I1 I2 ^ I1 I3 ^ I2 I3 and y1 = I4.
//
// Interface: x are the primary inputs, x_out the input lines as they leave
// the circuit (equal to x), y the outputs, err the final value of L. flip,
// stuck_en and stuck_val inject bit faults and stuck-at faults at every
// point of the testable cascade (see rev_cascade); tie flip and stuck_en to
// zero in normal use. Combinational.
module esop_testable
  import rev_pkg::*;
#(
  parameter int unsigned    P     = 4,   // input lines
  parameter int unsigned    Q     = 2,   // output lines
  parameter int unsigned    NG    = 4,   // gates of the source circuit
  parameter gate_t [NG-1:0] GATES = {
    mk_gate(bit_of(3),             '0, bit_of(5)),   // t4: I4       -> I6
    mk_gate(bit_of(1) | bit_of(2), '0, bit_of(4)),   // t3: I2 I3    -> I5
    mk_gate(bit_of(0) | bit_of(2), '0, bit_of(4)),   // t2: I1 I3    -> I5
    mk_gate(bit_of(0) | bit_of(1), '0, bit_of(4))    // t1: I1 I2    -> I5
  },
  // derived sizes, not to be overridden
  localparam int unsigned   W     = P + Q + 1,
  localparam int unsigned   LINE_L = P + Q,
  localparam int unsigned   N_NOT = count_nots(gate_list_t'(GATES), NG),
  localparam int unsigned   NT    = 2 * P + Q + NG + N_NOT
) (
  input  logic [P-1:0]       x,
  input  logic [NT:0][W-1:0] flip,
  input  logic [NT:0][W-1:0] stuck_en,
  input  logic [NT:0][W-1:0] stuck_val,
  output logic [P-1:0]       x_out,
  output logic [Q-1:0]       y,
  output logic               err
);

  typedef gate_t [NG-1:0] src_list_t;
  typedef gate_t [NT-1:0] tst_list_t;

  // Source-circuit rules: controls on inputs, Toffoli targets on outputs.
  function automatic bit esop_ok(src_list_t gl);
    line_mask_t in_m, out_m;
    in_m  = (line_mask_t'(1) << P) - 1;
    out_m = ((line_mask_t'(1) << (P + Q)) - 1) & ~in_m;
    for (int unsigned g = 0; g < NG; g++) begin
      if (!gate_ok(gl[g], P + Q) || count_ones(gl[g].tgt) != 1) return 1'b0;
      if ((gl[g].ctrl & ~in_m) != '0) return 1'b0;
      if (gl[g].ctrl != '0 && (gl[g].tgt & ~out_m) != '0) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic tst_list_t build(src_list_t gl);
    tst_list_t   t;
    int unsigned n;
    t = '0;
    n = 0;
    for (int unsigned i = 0; i < P; i++) t[n++] = cnot_g(i, LINE_L);
    for (int unsigned g = 0; g < NG; g++) begin
      if (gl[g].ctrl == '0) begin
        t[n++] = gl[g];
        t[n++] = not_g(LINE_L);
      end else begin
        t[n++] = mk_gate(gl[g].ctrl, gl[g].neg, gl[g].tgt | bit_of(LINE_L));
      end
    end
    for (int unsigned j = 0; j < Q; j++) t[n++] = cnot_g(P + j, LINE_L);
    for (int unsigned i = 0; i < P; i++) t[n++] = cnot_g(i, LINE_L);
    return t;
  endfunction

  localparam tst_list_t TGATES = build(GATES);

  if (NG > MAX_GATES || !esop_ok(GATES)) begin : g_bad
    $error("esop_testable: source circuit is not in ESOP form");
  end

  logic [W-1:0] lines_in, lines_out;

  assign lines_in = {1'b0, {Q{1'b0}}, x};   // L and outputs start at 0

  rev_cascade #(.W(W), .NG(NT), .GATES(TGATES)) u_cascade (
    .lines_in (lines_in),
    .flip     (flip),
    .stuck_en (stuck_en),
    .stuck_val(stuck_val),
    .lines_out(lines_out)
  );

  assign x_out = lines_out[P-1:0];
  assign y     = lines_out[P+Q-1:P];
  assign err   = lines_out[LINE_L];

endmodule
