// abmm - inverter-free burst-mode machine, clocked emulation.
//
// The machine follows a burst-mode specification (see berger_pkg for the
// table layout). In each specification state it waits until the inputs
// equal the terminal vector of one of the state's input bursts; the burst is
// then complete and, at the next clock edge, the machine moves to the
// branch's next state and so drives that state's output vector. Outputs are
// therefore steady during an input burst and change only once the burst is
// complete, as burst-mode operation requires.
//
// The state register holds the re-encoded, inverter-free state code: the
// base code of every state plus a complement companion for each base bit
// that is needed as a negative identifier (berger_pkg::aug_code). With that
// code every state is recognised by an AND of state bits that are 1 in its
// code, so no state bit is ever inverted; only the inputs are compared in
// both polarities. The outputs are an OR of the recognised states' output
// vectors. The path from state bits to outputs is thus AND-OR of positive
// literals: a state bit stuck at 1 can only turn outputs from 0 to 1, and
// one stuck at 0 only from 1 to 0, so the error is unidirectional and a
// Berger code sees it. An assertion checks that exactly one state is
// recognised at every clock edge.
//
// The re-encoding rule follows the method; the clocked emulation of the
// asynchronous machine, the binary default base code and the Q-element
// default specification are this design's own choices.
//
// Interface: clk, active-low asynchronous rst_n (to specification state 0),
// in[N_IN] sampled every cycle (assumed synchronous to clk), out[N_OUT]
// decoded from the state register (changes only at clock edges), fire high
// in the cycle in which an input burst completes (the
// state and outputs change at the end of that cycle), st_hit one bit per
// specification state.
module abmm
  import berger_pkg::*;
#(
  parameter int unsigned N_IN  = QE_N_IN,
  parameter int unsigned N_OUT = QE_N_OUT,
  parameter int unsigned N_ST  = QE_N_ST,
  parameter int unsigned N_BR  = QE_N_BR,
  parameter int unsigned SB    = QE_SB,
  parameter logic [N_ST*N_BR-1:0]        BR_VALID = QE_BR_VALID,
  parameter logic [N_ST*N_BR*N_IN-1:0]   BR_TERM  = QE_BR_TERM,
  parameter logic [N_ST*N_BR*SIDX_W-1:0] BR_NEXT  = QE_BR_NEXT,
  parameter logic [N_ST*N_OUT-1:0]       ST_OUT   = QE_ST_OUT,
  parameter logic [N_ST*SB-1:0]          ST_CODE  = QE_ST_CODE
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  in,
  output logic [N_OUT-1:0] out,
  output logic             fire,
  output logic [N_ST-1:0]  st_hit
);

  localparam int unsigned CW = aug_width(4096'(ST_CODE), N_ST, SB);

  function automatic logic [N_ST*CW-1:0] build_codes();
    logic [N_ST*CW-1:0] r;
    r = '0;
    for (int unsigned s = 0; s < N_ST; s++)
      r[s*CW +: CW] = CW'(aug_code(4096'(ST_CODE), N_ST, SB, s));
    return r;
  endfunction

  localparam logic [N_ST*CW-1:0] CODES = build_codes();

  logic [CW-1:0]          code_q;
  logic [N_ST*N_BR-1:0]   br_hit;
  logic [SIDX_W-1:0]      nxt;

  // State recognition with positive state literals only: state s is present
  // when every bit that is 1 in its code is 1 in the register.
  always_comb begin
    for (int unsigned s = 0; s < N_ST; s++)
      st_hit[s] = &(code_q | ~CODES[s*CW +: CW]);
  end

  // Burst completion: a branch fires when its state is present and the
  // inputs have reached the branch's terminal vector.
  always_comb begin
    fire = 1'b0;
    nxt  = '0;
    for (int unsigned s = 0; s < N_ST; s++) begin
      for (int unsigned b = 0; b < N_BR; b++) begin
        br_hit[s*N_BR+b] = st_hit[s] && BR_VALID[s*N_BR+b] &&
                           (in == BR_TERM[(s*N_BR+b)*N_IN +: N_IN]);
        if (br_hit[s*N_BR+b] && !fire) begin
          fire = 1'b1;
          nxt  = BR_NEXT[(s*N_BR+b)*SIDX_W +: SIDX_W];
        end
      end
    end
  end

  // Output logic: OR of the output vectors of the recognised states.
  always_comb begin
    out = '0;
    for (int unsigned s = 0; s < N_ST; s++)
      if (st_hit[s]) out = out | ST_OUT[s*N_OUT +: N_OUT];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    code_q <= CODES[0 +: CW];
    else if (fire) code_q <= CODES[32'(nxt)*CW +: CW];
  end

  // Exactly one specification state is recognised by the re-encoded code.
  a_one_state: assert property (@(posedge clk) disable iff (!rst_n) $onehot(st_hit))
    else $error("abmm: state code recognised as %0d states", $countones(st_hit));

endmodule
