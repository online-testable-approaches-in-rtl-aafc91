// online_testable_top: the two online testable reversible circuits side by side.
//
// Both circuits add a single parity line L to a cascade of Toffoli gates so
// that any single bit fault, or stuck-at fault that changes a value,
// striking between the line's checks ends with L = 1, read out here as an
// error flag. The first instance is the ESOP-based construction on its
// 4-input, 2-output example (y0 is the majority of I1..I3, y1 = I4); the
// second is the general construction on its 5-line, 4-gate example. They
// share no signals. Each brings out its data lines, its error flag and its
// fault injection inputs: bit flips and stuck-at forcing at every point
// between gates (flip and stuck_en zero in normal use). Everything is
// combinational.
module online_testable_top
  import rev_pkg::*;
(
  // ESOP-based circuit: 4 inputs, 2 outputs, 14 gates on 7 lines
  input  logic [3:0]       esop_x,
  input  logic [14:0][6:0] esop_flip,
  input  logic [14:0][6:0] esop_stuck_en,
  input  logic [14:0][6:0] esop_stuck_val,
  output logic [3:0]       esop_x_out,
  output logic [1:0]       esop_y,
  output logic             esop_err,
  // general Toffoli circuit: 5 lines, 14 gates on 6 lines
  input  logic [4:0]       tof_in,
  input  logic [14:0][5:0] tof_flip,
  input  logic [14:0][5:0] tof_stuck_en,
  input  logic [14:0][5:0] tof_stuck_val,
  output logic [4:0]       tof_out,
  output logic             tof_err
);

  esop_testable u_esop (
    .x        (esop_x),
    .flip     (esop_flip),
    .stuck_en (esop_stuck_en),
    .stuck_val(esop_stuck_val),
    .x_out    (esop_x_out),
    .y        (esop_y),
    .err      (esop_err)
  );

  toffoli_testable u_tof (
    .lines_in (tof_in),
    .flip     (tof_flip),
    .stuck_en (tof_stuck_en),
    .stuck_val(tof_stuck_val),
    .lines_out(tof_out),
    .err      (tof_err)
  );

endmodule
