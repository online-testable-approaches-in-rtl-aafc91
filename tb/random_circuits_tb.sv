// random_circuits_tb: both constructions applied to larger generated circuits.
//
// Three source circuits are generated at elaboration time by a fixed-seed
// xorshift generator (no data files): two general Toffoli circuits on 8
// lines with 48 gates each, one with an odd and one with an even number of
// NOT gates (NOTs, CNOTs and 2- to 4-control Toffoli gates,
// some controls negative), and one ESOP-structured circuit with 6 inputs,
// 3 outputs and 24 gates (controls on inputs only, targets on outputs, NOTs
// on either). Each goes through toffoli_testable or esop_testable. The
// testbench then checks, for a set of input vectors:
//  * fault-free, the data lines match a step-through of the source gate
//    list and err = 0;
//  * for every single bit fault, err = 1 exactly when the fault lies between
//    the line's opening and closing check (general: line i between points
//    i+1 and P+NG+n+i, n = 1 if the NOT count is odd; ESOP: input i between
//    i+1 and P+NG+m+Q+i, output j from 0 to P+NG+m+j, m = NOT count), and
//    on L always.
// The gate counts used for the expected port widths are computed here from
// the source lists, independently of the modules.
module random_circuits_tb;
  import rev_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int GP  = 8,  GNG = 48;              // general circuits
  localparam int EP  = 6,  EQ = 3, ENG = 24;      // ESOP circuit
  typedef gate_t [GNG-1:0] glist_t;
  typedef gate_t [ENG-1:0] elist_t;

  // next state of a 32-bit xorshift generator
  function automatic int unsigned xs(int unsigned st);
    int unsigned y;
    y = st ^ (st << 13);
    y = y ^ (y >> 17);
    return y ^ (y << 5);
  endfunction

  function automatic glist_t gen_general(int unsigned seed);
    glist_t gl;
    int unsigned st;
    int t, kind, nc;
    line_mask_t c;
    int i, got;
    st = seed;
    for (int g = 0; g < GNG; g++) begin
      st = xs(st); t    = int'(st % GP);
      st = xs(st); kind = int'(st % 8);
      if (kind == 0) gl[g] = not_g(t);
      else begin
        st = xs(st);
        nc = (kind < 3) ? 1 : 2 + int'(st % 3);
        c  = '0;
        got = 0;
        while (got < nc) begin          // nc distinct controls, none on t
          st = xs(st); i = int'(st % GP);
          if (i != t && !c[i]) begin
            c[i] = 1'b1;
            got++;
          end
        end
        st = xs(st);
        gl[g] = mk_gate(c, c & line_mask_t'(st) & line_mask_t'(st >> 7), bit_of(t));
      end
    end
    return gl;
  endfunction

  function automatic elist_t gen_esop(int unsigned seed);
    elist_t gl;
    int unsigned st;
    int kind;
    line_mask_t c;
    int i, got, nc, t;
    st = seed;
    for (int g = 0; g < ENG; g++) begin
      st = xs(st); kind = int'(st % 8);
      st = xs(st);
      if (kind == 0) gl[g] = not_g(int'(st % (EP + EQ)));
      else begin
        nc = 1 + int'(st % 3);
        c  = '0;
        got = 0;
        while (got < nc) begin          // nc distinct controls on inputs
          st = xs(st); i = int'(st % EP);
          if (!c[i]) begin
            c[i] = 1'b1;
            got++;
          end
        end
        st = xs(st); t = EP + int'(st % EQ);
        st = xs(st);
        gl[g] = mk_gate(c, c & line_mask_t'(st), bit_of(t));
      end
    end
    return gl;
  endfunction

  function automatic int nots_g(glist_t gl);
    int n = 0;
    for (int g = 0; g < GNG; g++) if (gl[g].ctrl == '0) n++;
    return n;
  endfunction
  function automatic int nots_e(elist_t gl);
    int n = 0;
    for (int g = 0; g < ENG; g++) if (gl[g].ctrl == '0) n++;
    return n;
  endfunction

  // step through a source list (source lines only, no L)
  function automatic line_mask_t step(gate_t g, line_mask_t x);
    if (((x ^ g.neg) & g.ctrl) == g.ctrl) return x ^ g.tgt;
    return x;
  endfunction

  localparam glist_t G1 = gen_general(32'h0bad_cafe);
  localparam glist_t G2 = gen_general(32'h1357_9bdf);
  localparam elist_t E1 = gen_esop(32'h7777_0001);
  localparam int G1N = nots_g(G1), G2N = nots_g(G2), E1N = nots_e(E1);
  localparam int G1T = 2 * GP + GNG + (G1N % 2);
  localparam int G2T = 2 * GP + GNG + (G2N % 2);
  localparam int E1T = 2 * EP + EQ + ENG + E1N;

  logic [GP-1:0]            g1_in, g1_out, g2_in, g2_out;
  logic                     g1_err, g2_err;
  logic [G1T:0][GP:0]       g1_flip;
  logic [G2T:0][GP:0]       g2_flip;
  logic [EP-1:0]            e1_x, e1_xo;
  logic [EQ-1:0]            e1_y;
  logic                     e1_err;
  logic [E1T:0][EP+EQ:0]    e1_flip;

  toffoli_testable #(.P(GP), .NG(GNG), .GATES(G1)) u_g1 (
    .lines_in(g1_in), .flip(g1_flip), .stuck_en('0), .stuck_val('0),
    .lines_out(g1_out), .err(g1_err));
  toffoli_testable #(.P(GP), .NG(GNG), .GATES(G2)) u_g2 (
    .lines_in(g2_in), .flip(g2_flip), .stuck_en('0), .stuck_val('0),
    .lines_out(g2_out), .err(g2_err));
  esop_testable #(.P(EP), .Q(EQ), .NG(ENG), .GATES(E1)) u_e1 (
    .x(e1_x), .flip(e1_flip), .stuck_en('0), .stuck_val('0),
    .x_out(e1_xo), .y(e1_y), .err(e1_err));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    line_mask_t x;
    int v, hi;
    g1_flip = '0; g2_flip = '0; e1_flip = '0;
    g1_in = '0; g2_in = '0; e1_x = '0;
    $display("general circuits: %0d and %0d NOT gates, %0d and %0d testable gates",
             G1N, G2N, G1T, G2T);
    $display("ESOP circuit: %0d NOT gates, %0d testable gates", E1N, E1T);
    // one general circuit with an odd and one with an even NOT count, so
    // both cases of the extra NOT on L occur; the ESOP one has NOTs at all
    check("odd and even NOT counts", int'((G1N % 2) != (G2N % 2)), 1);
    check("ESOP circuit has NOTs", int'(E1N > 0), 1);

    // general circuit 1 and 2, 24 inputs each
    for (int r = 0; r < 24; r++) begin
      v = int'($urandom % 256);
      g1_in = v[GP-1:0];
      g2_in = 8'(v * 37 + 11);
      g1_flip = '0; g2_flip = '0;
      #1;
      x = line_mask_t'(g1_in);
      for (int g = 0; g < GNG; g++) x = step(G1[g], x);
      check("g1 function", int'(g1_out), int'(x[GP-1:0]));
      check("g1 no error", int'(g1_err), 0);
      x = line_mask_t'(g2_in);
      for (int g = 0; g < GNG; g++) x = step(G2[g], x);
      check("g2 function", int'(g2_out), int'(x[GP-1:0]));
      check("g2 no error", int'(g2_err), 0);
      for (int s = 0; s <= G1T; s++) begin
        for (int l = 0; l <= GP; l++) begin
          g1_flip = '0;
          g1_flip[s][l] = 1'b1;
          #1;
          hi = GP + GNG + (G1N % 2) + l;
          check($sformatf("g1 fault s%0d l%0d", s, l), int'(g1_err),
                (l == GP) ? 1 : int'(s >= l + 1 && s <= hi));
        end
      end
      g1_flip = '0;
      for (int s = 0; s <= G2T; s++) begin
        for (int l = 0; l <= GP; l++) begin
          g2_flip = '0;
          g2_flip[s][l] = 1'b1;
          #1;
          hi = GP + GNG + (G2N % 2) + l;
          check($sformatf("g2 fault s%0d l%0d", s, l), int'(g2_err),
                (l == GP) ? 1 : int'(s >= l + 1 && s <= hi));
        end
      end
      g2_flip = '0;
      @(posedge clk);
    end

    // ESOP circuit, every input
    for (int u = 0; u < 64; u++) begin
      e1_x = u[EP-1:0];
      e1_flip = '0;
      #1;
      x = line_mask_t'(e1_x);
      for (int g = 0; g < ENG; g++) x = step(E1[g], x);
      check("e1 inputs pass", int'(e1_xo), int'(x[EP-1:0]));
      check("e1 function", int'(e1_y), int'(x[EP+EQ-1:EP]));
      check("e1 no error", int'(e1_err), 0);
      for (int s = 0; s <= E1T; s++) begin
        for (int l = 0; l <= EP + EQ; l++) begin
          e1_flip = '0;
          e1_flip[s][l] = 1'b1;
          #1;
          if (l == EP + EQ)  hi = E1T;
          else if (l < EP)   hi = EP + ENG + E1N + EQ + l;
          else               hi = EP + ENG + E1N + (l - EP);
          check($sformatf("e1 fault s%0d l%0d", s, l), int'(e1_err),
                int'(s >= ((l < EP) ? l + 1 : 0) && s <= hi));
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
