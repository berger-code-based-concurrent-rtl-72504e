// tpf_abmm - transition prediction function (TPF) of a burst-mode machine.
//
// The TPF tells whether the inputs seen so far, in the current state, make
// up a burst that leads to a state transition and/or an output change. It
// runs as a burst-mode machine of its own: it tracks the specification state
// in a private one-hot register and reacts to every input change, like a
// burst-mode machine, by driving a new value of tpf:
//   * 1 after an input change that completes a burst that moves the
//     machine (the protected machine and its code predictor are now
//     changing, and their outputs can only be trusted once the first input
//     of the next burst arrives);
//   * 0 after an input change that leaves a burst incomplete (nothing
//     changes, the outputs stay steady).
// tpf keeps its value while the inputs are still. The glue logic uses it to
// choose when the Berger checker counts: continuously while tpf is 0, and
// only at the next input change while tpf is 1. With single-change bursts
// only, tpf is 1 after every burst.
//
// What the TPF signals follows the method. The one-hot state register, the
// input copy used to see an input change, the reset value 0 and the clocked
// emulation are this design's choices.
//
// Interface: clk, active-low asynchronous rst_n (state 0, tpf = 0, input
// copy = INIT_IN), in[N_IN] sampled every cycle. tpf is registered: it
// changes at the clock edge that ends the cycle in which the input change
// is first seen, the same edge at which the protected machine moves.
module tpf_abmm
  import berger_pkg::*;
#(
  parameter int unsigned N_IN  = QE_N_IN,
  parameter int unsigned N_OUT = QE_N_OUT,
  parameter int unsigned N_ST  = QE_N_ST,
  parameter int unsigned N_BR  = QE_N_BR,
  parameter logic [N_ST*N_BR-1:0]        BR_VALID = QE_BR_VALID,
  parameter logic [N_ST*N_BR*N_IN-1:0]   BR_TERM  = QE_BR_TERM,
  parameter logic [N_ST*N_BR*SIDX_W-1:0] BR_NEXT  = QE_BR_NEXT,
  parameter logic [N_ST*N_OUT-1:0]       ST_OUT   = QE_ST_OUT,
  parameter logic [N_IN-1:0]             INIT_IN  = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_IN-1:0] in,
  output logic            tpf
);

  // A branch predicts a transition if it leaves its state or changes an
  // output (a branch that does neither is not reported).
  function automatic logic [N_ST*N_BR-1:0] build_pred();
    logic [N_ST*N_BR-1:0] r;
    int unsigned          n;
    r = '0;
    for (int unsigned s = 0; s < N_ST; s++) begin
      for (int unsigned b = 0; b < N_BR; b++) begin
        n = 32'(BR_NEXT[(s*N_BR+b)*SIDX_W +: SIDX_W]);
        r[s*N_BR+b] = BR_VALID[s*N_BR+b] &&
                      ((n != s) || (ST_OUT[n*N_OUT +: N_OUT] != ST_OUT[s*N_OUT +: N_OUT]));
      end
    end
    return r;
  endfunction

  localparam logic [N_ST*N_BR-1:0] PRED = build_pred();

  logic [N_ST-1:0] st_q;
  logic [N_ST-1:0] st_d;
  logic [N_IN-1:0] in_q;
  logic            tpf_q;
  logic            fire;
  logic            pred;

  always_comb begin
    pred = 1'b0;
    fire = 1'b0;
    st_d = st_q;
    for (int unsigned s = 0; s < N_ST; s++) begin
      for (int unsigned b = 0; b < N_BR; b++) begin
        if (st_q[s] && BR_VALID[s*N_BR+b] && !fire &&
            (in == BR_TERM[(s*N_BR+b)*N_IN +: N_IN])) begin
          fire = 1'b1;
          pred = PRED[s*N_BR+b];
          st_d = '0;
          for (int unsigned t = 0; t < N_ST; t++)
            st_d[t] = (32'(BR_NEXT[(s*N_BR+b)*SIDX_W +: SIDX_W]) == t);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= N_ST'(1);
      in_q  <= INIT_IN;
      tpf_q <= 1'b0;
    end else begin
      st_q <= st_d;
      in_q <= in;
      if (in != in_q) tpf_q <= pred;
    end
  end

  assign tpf = tpf_q;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(st_q))
    else $error("tpf_abmm: state register not one-hot");

endmodule
