// rev_cascade: a reversible circuit built as a cascade of NG gates on W lines.
//
// Gate GATES[0] acts first and GATES[NG-1] last; there is no fan-out and no
// feedback, as in any reversible circuit. A descriptor with one target bit
// becomes a toffoli_gate, one with two target bits an etg_gate.
//
// For online-test experiments every point between gates carries a fault
// injector. flip[s] is XORed onto the line vector after gate s-1 (flip[0]
// onto the inputs, before the first gate): a set bit models a bit fault,
// the line's value inverted at that point, which is the fault model the
// circuits are designed against. Where stuck_en[s] has a bit set, that line
// is instead forced to the matching bit of stuck_val, a stuck-at fault.
// Drive flip and stuck_en with zeros for normal operation. The injectors
// are this design's own test access, not part of the circuits themselves.
//
// Interface: lines_in enters, lines_out leaves; combinational, NG gate
// levels deep. The default gate list is the two-ETG circuit used to show how
// one fault spreads to several lines (lines I1..I4 are bits 0..3, the parity
// line L bit 4).
module rev_cascade
  import rev_pkg::*;
#(
  parameter int unsigned      W     = 5,
  parameter int unsigned      NG    = 2,
  parameter gate_t [NG-1:0]   GATES = {
    mk_gate(bit_of(0), '0, bit_of(3) | bit_of(4)),               // ETG: I1 -> I4, L
    mk_gate(bit_of(0) | bit_of(1), '0, bit_of(2) | bit_of(4))    // ETG: I1 I2 -> I3, L
  }
) (
  input  logic [W-1:0]       lines_in,
  input  logic [NG:0][W-1:0] flip,
  input  logic [NG:0][W-1:0] stuck_en,
  input  logic [NG:0][W-1:0] stuck_val,
  output logic [W-1:0]       lines_out
);

  logic [NG:0][W-1:0] pre;   // vector before the fault injector of point s
  logic [NG:0][W-1:0] post;  // vector after it (the next gate's input)

  assign pre[0] = lines_in;

  for (genvar s = 0; s <= NG; s++) begin : g_fault
    assign post[s] = (stuck_en[s] & stuck_val[s]) | (~stuck_en[s] & (pre[s] ^ flip[s]));
  end

  for (genvar g = 0; g < NG; g++) begin : g_stage
    localparam gate_t G = GATES[g];
    if (!gate_ok(G, W)) begin : g_bad
      $error("rev_cascade: gate %0d is malformed", g);
    end
    if (count_ones(G.tgt) == 1) begin : g_tof
      toffoli_gate #(
        .W(W), .CTRL(G.ctrl), .NEG(G.neg), .TGT(nth_one(G.tgt, 0))
      ) u_gate (
        .k(post[g]), .o(pre[g+1])
      );
    end else begin : g_etg
      etg_gate #(
        .W(W), .CTRL(G.ctrl), .NEG(G.neg),
        .TGT1(nth_one(G.tgt, 0)), .TGT2(nth_one(G.tgt, 1))
      ) u_gate (
        .k(post[g]), .o(pre[g+1])
      );
    end
  end

  assign lines_out = post[NG];

endmodule
