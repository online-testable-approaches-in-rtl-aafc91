// esop_testable_tb: function and single-fault coverage of the ESOP construction.
//
// u_ex is the default 4-input, 2-output circuit. Its testable cascade has
// 14 gates: CNOTs c1..c4 (gates 1-4), ETGs e1..e4 (5-8), output CNOTs c5 c6
// (9-10) and closing CNOTs c7..c10 (11-14). Point s is the line vector after
// gate s. For all 16 inputs the outputs must be y0 = maj(I1,I2,I3), y1 = I4
// with err = 0, and for every single bit fault (point, line) err must be 1
// exactly when the fault lies between the line's two checks: input line Ii
// from point i to point 9+i, I5 up to point 8, I6 up to point 9, L anywhere.
// u_neg is a 2-input, 2-output circuit with NOT gates on an input and an
// output line and a negative control (14 gates), covered the same way.
// Both check the gate count the construction must produce, 2p + q + m extra
// gates for p inputs, q outputs and m NOTs.
module esop_testable_tb;
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

  // default example
  logic [3:0]       x, x_out;
  logic [1:0]       y;
  logic             err;
  logic [14:0][6:0] flip;

  esop_testable u_ex (.x(x), .flip(flip), .stuck_en('0), .stuck_val('0),
                     .x_out(x_out), .y(y), .err(err));

  // NOT gates and a negative control: inputs I1 I2 (bits 0,1), outputs O1 O2
  // (bits 2,3). NOT I1; I1 I2 -> O1; NOT I1; ~I2 -> O2; NOT O2.
  // So O1 = ~I1 I2 and O2 = ~(~I2) = I2.
  localparam gate_t [4:0] NEGC = {
    not_g(3),
    mk_gate(bit_of(1), bit_of(1), bit_of(3)),
    not_g(0),
    mk_gate(bit_of(0) | bit_of(1), '0, bit_of(2)),
    not_g(0)
  };
  logic [1:0]       nx, nx_out, ny;
  logic             nerr;
  logic [14:0][4:0] nflip;

  esop_testable #(.P(2), .Q(2), .NG(5), .GATES(NEGC)) u_neg (
    .x(nx), .flip(nflip), .stuck_en('0), .stuck_val('0),
    .x_out(nx_out), .y(ny), .err(nerr));

  // Gate counts: the flip port has one entry per point, gates + 1.
  localparam int EX_POINTS  = $bits(flip)  / 7;
  localparam int NEG_POINTS = $bits(nflip) / 5;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int lo [7], hi [7];
    int nlo [5], nhi [5];
    logic a, b, c;
    check("example gate count 4 + 2*4 + 2", EX_POINTS - 1, 4 + 2 * 4 + 2);
    check("neg gate count 5 + 2*2 + 2 + 3", NEG_POINTS - 1, 5 + 2 * 2 + 2 + 3);

    lo = '{1, 2, 3, 4, 0, 0, 0};
    hi = '{10, 11, 12, 13, 8, 9, 14};
    for (int v = 0; v < 16; v++) begin
      x    = v[3:0];
      flip = '0;
      #1;
      a = v[0]; b = v[1]; c = v[2];
      check("maj", int'(y[0]), int'((a & b) | (a & c) | (b & c)));
      check("y1", int'(y[1]), int'(v[3]));
      check("x passes", int'(x_out), v);
      check("no fault, no error", int'(err), 0);
      for (int s = 0; s <= 14; s++) begin
        for (int l = 0; l < 7; l++) begin
          flip = '0;
          flip[s][l] = 1'b1;
          #1;
          check($sformatf("ex fault s%0d l%0d", s, l), int'(err),
                int'(s >= lo[l] && s <= hi[l]));
        end
      end
      @(posedge clk);
    end

    // u_neg order: cI1 cI2 | NOT I1, NOT L | ETG | NOT I1, NOT L | ETG |
    // NOT O2, NOT L | cO1 cO2 | cI1 cI2   (gates 1..14)
    nlo = '{1, 2, 0, 0, 0};
    nhi = '{12, 13, 10, 11, 14};
    for (int v = 0; v < 4; v++) begin
      nx    = v[1:0];
      nflip = '0;
      #1;
      a = v[0]; b = v[1];
      check("neg O1", int'(ny[0]), int'(~a & b));
      check("neg O2", int'(ny[1]), int'(v[1]));
      check("neg x passes", int'(nx_out), v);
      check("neg no error", int'(nerr), 0);
      for (int s = 0; s <= 14; s++) begin
        for (int l = 0; l < 5; l++) begin
          nflip = '0;
          nflip[s][l] = 1'b1;
          #1;
          check($sformatf("neg fault s%0d l%0d", s, l), int'(nerr),
                int'(s >= nlo[l] && s <= nhi[l]));
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
