// toffoli_gate_tb: exhaustive check of the Toffoli gate family.
//
// Five instances cover a NOT, a CNOT, a 3-bit Toffoli gate, a 3-bit gate
// with a negative control on its first line, and a 5-line gate with three
// controls and the target in the middle. Every input vector is applied and
// the output compared with the gate's closed-form equation. A second copy of
// the 3-bit gate behind the first checks that each gate is its own inverse,
// which is what makes it reversible.
module toffoli_gate_tb;
  import rev_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [0:0] k_not, o_not;
  logic [1:0] k_cn,  o_cn;
  logic [2:0] k_t3,  o_t3, o_t3b;
  logic [2:0] k_ng,  o_ng;
  logic [4:0] k_t5,  o_t5;

  toffoli_gate #(.W(1), .CTRL('0),    .NEG('0),    .TGT(0)) u_not (.k(k_not), .o(o_not));
  toffoli_gate #(.W(2), .CTRL('b01),  .NEG('0),    .TGT(1)) u_cn  (.k(k_cn),  .o(o_cn));
  toffoli_gate #(.W(3), .CTRL('b011), .NEG('0),    .TGT(2)) u_t3  (.k(k_t3),  .o(o_t3));
  toffoli_gate #(.W(3), .CTRL('b011), .NEG('0),    .TGT(2)) u_t3b (.k(o_t3),  .o(o_t3b));
  toffoli_gate #(.W(3), .CTRL('b011), .NEG('b001), .TGT(2)) u_ng  (.k(k_ng),  .o(o_ng));
  toffoli_gate #(.W(5), .CTRL('b11001), .NEG('0),  .TGT(2)) u_t5  (.k(k_t5),  .o(o_t5));

  task automatic check(string what, logic [4:0] got, logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 32; v++) begin
      k_not = v[0:0];
      k_cn  = v[1:0];
      k_t3  = v[2:0];
      k_ng  = v[2:0];
      k_t5  = v[4:0];
      #1;
      // NOT: o1 = ~k1
      if (v < 2)  check("not", 5'(o_not), 5'({~v[0]}));
      // CNOT: o1 = k1, o2 = k1 ^ k2
      if (v < 4)  check("cnot", 5'(o_cn), 5'({v[0] ^ v[1], v[0]}));
      if (v < 8) begin
        // Toffoli: o3 = k1 k2 ^ k3
        check("toffoli3", 5'(o_t3), 5'({(v[0] & v[1]) ^ v[2], v[1], v[0]}));
        check("self-inverse", 5'(o_t3b), 5'(v[2:0]));
        // negative control on k1: o3 = ~k1 k2 ^ k3
        check("negctrl", 5'(o_ng), 5'({(~v[0] & v[1]) ^ v[2], v[1], v[0]}));
      end
      // 5 lines, controls k1 k4 k5, target k3
      check("toffoli5", o_t5, {v[4], v[3], (v[0] & v[3] & v[4]) ^ v[2], v[1], v[0]});
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
