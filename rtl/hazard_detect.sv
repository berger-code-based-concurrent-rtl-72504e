// hazard_detect - detection of error-induced hazards on the outputs.
//
// After every input change each output may make at most one transition. For
// every output bit a transition detector (compare with a delayed copy) feeds
// a feedback loop (seen) that latches 1 once the output has made a
// transition. A change of the inputs clears every loop. If an output makes
// a transition while its loop already holds 1, that is a second transition
// since the last input change: hazard_vec for that bit is raised and the
// n-input OR of all bits raises hazard.
//
// The structure (per-output transition detector, latch cleared by the input
// change signal, AND with the latched value, n-input OR) follows the method.
// In this clocked emulation the delay is one cycle; a transition that is
// seen in the same cycle as an input change is still compared with the
// latched value and then the loop is cleared (clear has priority), and
// hazard is a combinational pulse lasting the cycle of the offending
// transition. Those details are this design's choices.
//
// Interface: clk, active-low asynchronous rst_n, in_change (from
// change_detect), mon[N] the monitored outputs, INIT their reset value.
module hazard_detect #(
  parameter int unsigned N    = 2,
  parameter logic [N-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_change,
  input  logic [N-1:0] mon,
  output logic [N-1:0] hazard_vec,
  output logic         hazard
);

  logic [N-1:0] mon_dly;
  logic [N-1:0] trans;
  logic [N-1:0] seen;

  assign trans      = mon ^ mon_dly;
  assign hazard_vec = trans & seen;
  assign hazard     = |hazard_vec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mon_dly <= INIT;
      seen    <= '0;
    end else begin
      mon_dly <= mon;
      seen    <= in_change ? '0 : (seen | trans);
    end
  end

endmodule
