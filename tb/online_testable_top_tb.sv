// online_testable_top_tb: end-to-end run of both testable circuits at full size.
//
// For every input vector of each circuit the testbench applies the
// fault-free case and then, at every point between gates and on every line
// (L included), a bit fault, a stuck-at-0 and a stuck-at-1 fault. Expected
// values come from two sources written here, independently of the RTL:
//  * a small reference model that steps through the testable gate lists
//    (ESOP circuit: c1..c4, e1..e4, c5 c6, c7..c10 on I1..I6, L; Toffoli
//    circuit: c1..c5, e1..e4, c6..c10 on I1..I5, L) and gives every line's
//    final value under the fault, plus the fault-free value at the fault;
//  * the detection rule: err = 1 exactly when the fault changes the value
//    at a point between the line's two checks (ESOP: input Ii at points
//    i..9+i, I5 at 0..8, I6 at 0..9; Toffoli: Ii at points i..8+i; L at
//    every point). A stuck-at fault changes the value only where the
//    fault-free value differs from the stuck value.
// The fault-free outputs are also checked against the circuits' equations
// (y0 = maj(I1,I2,I3), y1 = I4; I3' = I3 ^ I1 I2 ^ I2, I5' = I5 ^ I2 I4,
// I2' = I2 ^ I1 I3').
// It counts how often each mechanism occurred: fault-free operation, a
// detected bit fault on an input (or circuit) line, on an output line, on
// the parity line, a single fault that spread to further data lines and was
// still detected, a detected stuck-at fault, a stuck-at fault that matched
// the fault-free value and so changed nothing, and a fault outside the
// checked span that L does not see. A mechanism that never occurred counts
// as a failure.
module online_testable_top_tb;

  int checks = 0, failures = 0;
  int n_clean = 0, n_det_in = 0, n_det_out = 0, n_det_l = 0;
  int n_spread = 0, n_unseen = 0, n_stuck_det = 0, n_stuck_silent = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0]       esop_x, esop_x_out;
  logic [14:0][6:0] esop_flip, esop_stuck_en, esop_stuck_val;
  logic [1:0]       esop_y;
  logic             esop_err;
  logic [4:0]       tof_in, tof_out;
  logic [14:0][5:0] tof_flip, tof_stuck_en, tof_stuck_val;
  logic             tof_err;

  online_testable_top dut (.*);

  // testable gate lists: control mask and target mask per gate
  localparam int NG = 14;
  typedef int list_t [NG];
  localparam list_t E_CTRL = '{1, 2, 4, 8, 'b0011, 'b0101, 'b0110, 'b1000,
                               'h10, 'h20, 1, 2, 4, 8};
  localparam list_t E_TGT  = '{'h40, 'h40, 'h40, 'h40, 'h50, 'h50, 'h50, 'h60,
                               'h40, 'h40, 'h40, 'h40, 'h40, 'h40};
  localparam list_t T_CTRL = '{1, 2, 4, 8, 'h10, 'b00011, 'b00010, 'b01010, 'b00101,
                               1, 2, 4, 8, 'h10};
  localparam list_t T_TGT  = '{'h20, 'h20, 'h20, 'h20, 'h20, 'h24, 'h24, 'h30, 'h22,
                               'h20, 'h20, 'h20, 'h20, 'h20};

  // Apply one fault (mode 1: invert, 2: stuck at 0, 3: stuck at 1) to line fl
  // at point fs and step through the list; ffv returns the fault-free value
  // of that line at that point.
  function automatic int run(list_t ctrl, list_t tgt, int v, int fs, int fl,
                             int mode, output int ffv);
    int x;
    x = v;
    ffv = 0;
    for (int s = 0; s <= NG; s++) begin
      if (s > 0 && (x & ctrl[s-1]) == ctrl[s-1]) x = x ^ tgt[s-1];
      if (s == fs) begin
        ffv = (x >> fl) & 1;
        case (mode)
          1: x = x ^ (1 << fl);
          2: x = x & ~(1 << fl);
          3: x = x | (1 << fl);
          default: ;
        endcase
      end
    end
    return x;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int ones(int v);
    int n = 0;
    for (int i = 0; i < 8; i++) n += (v >> i) & 1;
    return n;
  endfunction

  initial begin
    int lo [7], hi [7];
    int clean, exp_v, got, ffv, chg, det;
    logic a, b, c, d, e5, covered;
    lo = '{1, 2, 3, 4, 0, 0, 0};
    hi = '{10, 11, 12, 13, 8, 9, 14};
    {esop_flip, esop_stuck_en, esop_stuck_val} = '0;
    {tof_flip, tof_stuck_en, tof_stuck_val}    = '0;
    tof_in = '0;

    // ESOP-based circuit
    for (int v = 0; v < 16; v++) begin
      esop_x = v[3:0];
      {esop_flip, esop_stuck_en, esop_stuck_val} = '0;
      {d, c, b, a} = v[3:0];
      #1;
      clean = {25'd0, 1'b0, d, (a & b) | (a & c) | (b & c), d, c, b, a};
      got   = {25'd0, esop_err, esop_y, esop_x_out};
      check("esop clean vs equations", got, clean);
      check("esop clean vs model", got, run(E_CTRL, E_TGT, v, 0, 0, 0, ffv));
      if (got == clean) n_clean++;
      for (int s = 0; s <= NG; s++) begin
        for (int l = 0; l < 7; l++) begin
          covered = (s >= lo[l] && s <= hi[l]);
          for (int mode = 1; mode <= 3; mode++) begin
            {esop_flip, esop_stuck_en, esop_stuck_val} = '0;
            if (mode == 1) esop_flip[s][l] = 1'b1;
            else begin
              esop_stuck_en[s][l]  = 1'b1;
              esop_stuck_val[s][l] = (mode == 3);
            end
            #1;
            got   = {25'd0, esop_err, esop_y, esop_x_out};
            exp_v = run(E_CTRL, E_TGT, v, s, l, mode, ffv);
            chg   = (mode == 1) || (ffv != (mode == 3 ? 1 : 0));
            det   = int'(covered) & chg;
            check($sformatf("esop m%0d s%0d l%0d lines", mode, s, l), got, exp_v);
            check($sformatf("esop m%0d s%0d l%0d err", mode, s, l), int'(esop_err), det);
            if (mode == 1 && det == 1 && esop_err) begin
              if (l < 4) n_det_in++;
              else if (l < 6) n_det_out++;
              else n_det_l++;
              if (l < 6 && ones((got ^ clean) & 'h3f) > 1) n_spread++;
            end
            if (mode == 1 && !covered && !esop_err) n_unseen++;
            if (mode > 1 && det == 1 && esop_err) n_stuck_det++;
            if (mode > 1 && chg == 0 && got == clean) n_stuck_silent++;
          end
        end
      end
      @(posedge clk);
    end

    // general Toffoli circuit
    {esop_flip, esop_stuck_en, esop_stuck_val} = '0;
    for (int v = 0; v < 32; v++) begin
      tof_in = v[4:0];
      {tof_flip, tof_stuck_en, tof_stuck_val} = '0;
      {e5, d, c, b, a} = v[4:0];
      c  = c ^ (a & b) ^ b;
      e5 = e5 ^ (b & d);
      b  = b ^ (a & c);
      #1;
      clean = {26'd0, 1'b0, e5, d, c, b, a};
      got   = {26'd0, tof_err, tof_out};
      check("tof clean vs equations", got, clean);
      check("tof clean vs model", got, run(T_CTRL, T_TGT, v, 0, 0, 0, ffv));
      if (got == clean) n_clean++;
      for (int s = 0; s <= NG; s++) begin
        for (int l = 0; l < 6; l++) begin
          covered = (l == 5) || (s >= l + 1 && s <= l + 9);
          for (int mode = 1; mode <= 3; mode++) begin
            {tof_flip, tof_stuck_en, tof_stuck_val} = '0;
            if (mode == 1) tof_flip[s][l] = 1'b1;
            else begin
              tof_stuck_en[s][l]  = 1'b1;
              tof_stuck_val[s][l] = (mode == 3);
            end
            #1;
            got   = {26'd0, tof_err, tof_out};
            exp_v = run(T_CTRL, T_TGT, v, s, l, mode, ffv);
            chg   = (mode == 1) || (ffv != (mode == 3 ? 1 : 0));
            det   = int'(covered) & chg;
            check($sformatf("tof m%0d s%0d l%0d lines", mode, s, l), got, exp_v);
            check($sformatf("tof m%0d s%0d l%0d err", mode, s, l), int'(tof_err), det);
            if (mode == 1 && det == 1 && tof_err) begin
              if (l < 5) n_det_in++;
              else n_det_l++;
              if (l < 5 && ones((got ^ clean) & 'h1f) > 1) n_spread++;
            end
            if (mode == 1 && !covered && !tof_err) n_unseen++;
            if (mode > 1 && det == 1 && tof_err) n_stuck_det++;
            if (mode > 1 && chg == 0 && got == clean) n_stuck_silent++;
          end
        end
      end
      @(posedge clk);
    end

    $display("mechanisms: clean=%0d det_in=%0d det_out=%0d det_L=%0d spread=%0d",
             n_clean, n_det_in, n_det_out, n_det_l, n_spread);
    $display("mechanisms: stuck_detected=%0d stuck_silent=%0d unseen=%0d",
             n_stuck_det, n_stuck_silent, n_unseen);
    check("fault-free operation seen", int'(n_clean > 0), 1);
    check("input-line fault detected", int'(n_det_in > 0), 1);
    check("output-line fault detected", int'(n_det_out > 0), 1);
    check("parity-line fault detected", int'(n_det_l > 0), 1);
    check("spread fault detected", int'(n_spread > 0), 1);
    check("stuck-at fault detected", int'(n_stuck_det > 0), 1);
    check("stuck-at fault without effect seen", int'(n_stuck_silent > 0), 1);
    check("unchecked span seen", int'(n_unseen > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
