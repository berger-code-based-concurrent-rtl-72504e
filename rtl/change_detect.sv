// change_detect - input change detection circuit.
//
// Each input bit is compared with a delayed copy of itself; the bit-wise
// difference marks the bits that have just changed (change_vec) and their
// OR (change) signals that some input changed. In the asynchronous circuit
// the delayed copy comes from an inverter chain and the comparison from a
// pair of pass transistors (an exclusive-OR); here the delay is one clock
// cycle, so change is high for exactly the one cycle in which a new input
// value is first seen.
//
// The per-bit compare with a delayed copy and the n-input OR follow the
// method; the one-cycle register delay and the reset value INIT (the inputs
// the environment holds while reset is applied) are this design's choices.
//
// Interface: clk, active-low asynchronous rst_n, in[N] sampled every cycle;
// change_vec[N] and change are combinational from in and the delayed copy.
module change_detect #(
  parameter int unsigned N    = 2,
  parameter logic [N-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic [N-1:0] change_vec,
  output logic         change
);

  logic [N-1:0] in_dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_dly <= INIT;
    else        in_dly <= in;
  end

  assign change_vec = in ^ in_dly;
  assign change     = |change_vec;

endmodule
