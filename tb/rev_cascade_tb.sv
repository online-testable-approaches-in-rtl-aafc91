// rev_cascade_tb: checks gate ordering, fault injection and reversibility.
//
// Instance u_fig uses the default list: two ETGs on lines I1..I4 and L
// (bits 0..4), the first controlled by I1 I2 with targets I3 and L, the
// second by I1 with targets I4 and L. It is checked against its equations
// for all 32 inputs, shown to be a bijection (no two inputs give the same
// output), and replayed with the fault-spreading scenario: inputs
// I1..I4, L = 0, 1, 0, 1, 0 and I1 inverted before the first gate must give
// L = 1 between the gates and I1 I2 I3 I4 L = 1 1 1 0 0 at the end.
// Instance u_mix holds a NOT, a CNOT, a negative-control Toffoli gate and
// an ETG on 4 lines; random multi-bit flip masks, half of the time with
// random stuck-at lines as well, are applied and the result compared with a
// hand-written stage-by-stage model.
module rev_cascade_tb;
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

  logic [4:0]      fig_in, fig_out;
  logic [2:0][4:0] fig_flip;

  rev_cascade u_fig (.lines_in(fig_in), .flip(fig_flip), .stuck_en('0), .stuck_val('0),
                     .lines_out(fig_out));

  // the first ETG alone, to observe the lines between the two gates
  logic [4:0] fig1_out;
  rev_cascade #(.W(5), .NG(1),
                .GATES(mk_gate(bit_of(0) | bit_of(1), '0, bit_of(2) | bit_of(4))))
    u_fig1 (.lines_in(fig_in), .flip(fig_flip[1:0]), .stuck_en('0), .stuck_val('0),
            .lines_out(fig1_out));

  localparam gate_t [3:0] MIX = {
    mk_gate(bit_of(0), '0, bit_of(2) | bit_of(3)),        // ETG I1 -> I3, I4
    mk_gate(bit_of(1) | bit_of(2), bit_of(1), bit_of(3)), // ~I2 I3 -> I4
    cnot_g(0, 1),                                         // I1 -> I2
    not_g(0)                                              // NOT I1
  };
  logic [3:0]      mix_in, mix_out;
  logic [4:0][3:0] mix_flip, mix_sen, mix_sval;

  rev_cascade #(.W(4), .NG(4), .GATES(MIX)) u_mix (
    .lines_in(mix_in), .flip(mix_flip), .stuck_en(mix_sen), .stuck_val(mix_sval),
    .lines_out(mix_out));

  task automatic check(string what, logic [4:0] got, logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // point s: invert where f is set, then force where e is set to sv
  function automatic logic [3:0] inj(logic [3:0] x, logic [3:0] f, logic [3:0] e,
                                     logic [3:0] sv);
    logic [3:0] y;
    y = x ^ f;
    for (int i = 0; i < 4; i++) if (e[i]) y[i] = sv[i];
    return y;
  endfunction

  function automatic logic [3:0] mix_model(logic [3:0] v, logic [4:0][3:0] f,
                                           logic [4:0][3:0] e, logic [4:0][3:0] sv);
    logic [3:0] x;
    x = inj(v, f[0], e[0], sv[0]);
    x[0] = ~x[0];                 x = inj(x, f[1], e[1], sv[1]);
    x[1] = x[1] ^ x[0];           x = inj(x, f[2], e[2], sv[2]);
    x[3] = x[3] ^ (~x[1] & x[2]); x = inj(x, f[3], e[3], sv[3]);
    x[2] = x[2] ^ x[0];
    x[3] = x[3] ^ x[0];           x = inj(x, f[4], e[4], sv[4]);
    return x;
  endfunction

  initial begin
    bit [31:0] seen;
    logic [4:0] e;
    seen     = '0;
    fig_flip = '0;
    for (int v = 0; v < 32; v++) begin
      fig_in = v[4:0];
      #1;
      e    = v[4:0];
      e[2] = e[2] ^ (v[0] & v[1]);
      e[4] = e[4] ^ (v[0] & v[1]);
      e[3] = e[3] ^ v[0];
      e[4] = e[4] ^ v[0];
      check("fig equations", fig_out, e);
      seen[fig_out] = 1'b1;
      @(posedge clk);
    end
    check("bijective", 5'(seen == '1), 5'd1);

    // single fault on I1 before the first ETG
    fig_in = 5'b01010;            // L I4 I3 I2 I1 = 0 1 0 1 0
    fig_flip = '0;
    fig_flip[0][0] = 1'b1;
    #1;
    check("spread: L after first ETG", 5'(fig1_out[4]), 5'd1);
    check("spread: I3 after first ETG", 5'(fig1_out[2]), 5'd1);
    check("spread: final lines", fig_out, 5'b00111);
    fig_flip = '0;
    #1;
    check("spread: fault-free", fig_out, 5'b01010);

    mix_sen  = '0;
    mix_sval = '0;
    for (int v = 0; v < 16; v++) begin
      mix_in   = v[3:0];
      mix_flip = '0;
      mix_sen  = '0;
      #1;
      check("mix fault-free", 5'(mix_out), 5'(mix_model(v[3:0], '0, '0, '0)));
      for (int r = 0; r < 40; r++) begin
        mix_flip = 20'($urandom) & 20'($urandom);
        mix_sen  = (r % 2 == 1) ? 20'($urandom) & 20'($urandom) & 20'($urandom) : '0;
        mix_sval = 20'($urandom);
        #1;
        check("mix faulted", 5'(mix_out),
              5'(mix_model(v[3:0], mix_flip, mix_sen, mix_sval)));
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
