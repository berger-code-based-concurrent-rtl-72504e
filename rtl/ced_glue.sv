// ced_glue - glue logic G1-G3 forming the error output.
//
// The Berger checker's error indication chk_err only counts when the checked
// signals are known to be steady:
//   * G1: after an input burst that moved the machine (tpf = 1) the machine
//     and its code predictor settle on their own, and their result is only
//     guaranteed once the first input of the next burst arrives, so the
//     checker is sampled when the change detector reports an input change;
//   * G2: while tpf = 0 nothing is changing, so the checker counts at all
//     times.
// G3 joins both with the hazard detector's output into the single error
// signal.
//
// The connections (checker, TPF and input change into G1; checker and the
// inverted TPF into G2; G1, G2 and the hazard signal into G3) follow the
// method; the gate functions are this design's reading of the checking
// rule that goes with them.
//
// Interface: purely combinational.
module ced_glue (
  input  logic chk_err,
  input  logic tpf,
  input  logic change,
  input  logic hazard,
  output logic error
);

  logic g1, g2;

  assign g1    = chk_err & tpf & change;
  assign g2    = chk_err & ~tpf;
  assign error = g1 | g2 | hazard;

endmodule
