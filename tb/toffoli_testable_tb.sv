// toffoli_testable_tb: function and single-fault coverage of the general construction.
//
// u_ex is the default 5-line circuit (t1 = I1 I2 -> I3, t2 = I2 -> I3,
// t3 = I2 I4 -> I5, t4 = I1 I3 -> I2). Its testable cascade has 14 gates:
// CNOTs c1..c5 (gates 1-5), ETGs e1..e4 (6-9), CNOTs c6..c10 (10-14). For
// all 32 inputs the lines must follow the source circuit with err = 0, and
// a single bit fault on line Ii must set err exactly when it lies between
// point i and point 8+i (between the line's two CNOTs); a fault on L always.
// u_odd is a 3-line circuit with one NOT and a negative control (NOT I1;
// ~I1 I2 -> I3; I3 -> I1), where the construction must add the one NOT on
// L: 2p + 1 extra gates.
module toffoli_testable_tb;
  import rev_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0]       li, lo_;
  logic             err;
  logic [14:0][5:0] flip;

  toffoli_testable u_ex (.lines_in(li), .flip(flip), .stuck_en('0), .stuck_val('0),
                        .lines_out(lo_), .err(err));

  localparam gate_t [2:0] ODD = {
    cnot_g(2, 0),
    mk_gate(bit_of(0) | bit_of(1), bit_of(0), bit_of(2)),
    not_g(0)
  };
  logic [2:0]       oi, oo;
  logic             oerr;
  logic [10:0][3:0] oflip;

  toffoli_testable #(.P(3), .NG(3), .GATES(ODD)) u_odd (
    .lines_in(oi), .flip(oflip), .stuck_en('0), .stuck_val('0),
    .lines_out(oo), .err(oerr));

  localparam int EX_POINTS  = $bits(flip)  / 6;
  localparam int ODD_POINTS = $bits(oflip) / 4;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic i1, i2, i3, i4, i5, c;
    logic [4:0] e;
    check("example gate count 4 + 2*5", EX_POINTS - 1, 4 + 2 * 5);
    check("odd gate count 3 + 2*3 + 1", ODD_POINTS - 1, 3 + 2 * 3 + 1);

    for (int v = 0; v < 32; v++) begin
      li   = v[4:0];
      flip = '0;
      {i5, i4, i3, i2, i1} = v[4:0];
      #1;
      i3 = i3 ^ (i1 & i2) ^ i2;
      i5 = i5 ^ (i2 & i4);
      i2 = i2 ^ (i1 & i3);
      e  = {i5, i4, i3, i2, i1};
      check("lines", int'(lo_), int'(e));
      check("no fault, no error", int'(err), 0);
      for (int s = 0; s <= 14; s++) begin
        for (int l = 0; l < 6; l++) begin
          flip = '0;
          flip[s][l] = 1'b1;
          #1;
          check($sformatf("ex fault s%0d l%0d", s, l), int'(err),
                (l == 5) ? 1 : int'(s >= l + 1 && s <= l + 9));
        end
      end
      @(posedge clk);
    end

    // u_odd order: c1 c2 c3 | NOT I1 | ETG | ETG | NOT L | c4 c5 c6
    for (int v = 0; v < 8; v++) begin
      oi    = v[2:0];
      oflip = '0;
      {i3, i2, i1} = v[2:0];
      #1;
      c = i3 ^ (i1 & i2);
      check("odd lines", int'(oo), int'({c, i2, ~i1 ^ c}));
      check("odd no error", int'(oerr), 0);
      for (int s = 0; s <= 10; s++) begin
        for (int l = 0; l < 4; l++) begin
          oflip = '0;
          oflip[s][l] = 1'b1;
          #1;
          check($sformatf("odd fault s%0d l%0d", s, l), int'(oerr),
                (l == 3) ? 1 : int'(s >= l + 1 && s <= l + 7));
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
