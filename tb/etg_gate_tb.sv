// etg_gate_tb: exhaustive check of the extended Toffoli gate.
//
// A 5-line ETG (controls k1 k2 k3, targets k4 and k5) and a 4-line ETG with
// a negative control (controls ~k1 k2, targets k3 and k4) get every input
// vector; both targets must equal the control product XOR their own input.
// Then, for every input of the first gate and every nonempty set of control
// lines and targets inverted before it (bit faults), the two targets must
// still have received the same change, the property the parity line relies
// on: control faults change both targets together, target faults stay on
// their own line.
module etg_gate_tb;
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

  logic [4:0] k5, o5, kf, of5;
  logic [3:0] k4, o4;

  etg_gate #(.W(5), .CTRL('b00111), .NEG('0),   .TGT1(3), .TGT2(4)) u_etg (.k(k5), .o(o5));
  etg_gate #(.W(5), .CTRL('b00111), .NEG('0),   .TGT1(3), .TGT2(4)) u_etf (.k(kf), .o(of5));
  etg_gate #(.W(4), .CTRL('b0011),  .NEG('b01), .TGT1(2), .TGT2(3)) u_neg (.k(k4), .o(o4));

  task automatic check(string what, logic [4:0] got, logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic f;
    for (int v = 0; v < 32; v++) begin
      k5 = v[4:0];
      k4 = v[3:0];
      kf = v[4:0];
      #1;
      f = v[0] & v[1] & v[2];
      check("etg", o5, {v[4] ^ f, v[3] ^ f, v[2:0]});
      if (v < 16) begin
        f = ~v[0] & v[1];
        check("etg negctrl", 5'(o4), 5'({v[3] ^ f, v[2] ^ f, v[1:0]}));
      end
      // faults: flip any nonempty subset of the five input lines
      for (int m = 1; m < 32; m++) begin
        kf = v[4:0] ^ m[4:0];
        #1;
        // change each target received from the gate
        check("targets agree", 5'(of5[3] ^ kf[3]), 5'(of5[4] ^ kf[4]));
        // a control fault that completes or breaks the product flips both
        f = (v[0] ^ m[0]) & (v[1] ^ m[1]) & (v[2] ^ m[2]);
        check("product", 5'(of5[3] ^ kf[3]), 5'(f));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
