// berger_predictor - Berger code predictor (code generator) of a burst-mode
// machine.
//
// The predictor is a burst-mode machine with the same states, input bursts
// and state transitions as the protected machine, but every output burst is
// replaced by the Berger check symbol of the protected machine's outputs:
// on entry to state s it drives K = ceil(log2(N_OUT+1)) bits holding the
// binary count of zeros of ST_OUT[s]. It keeps its own state register, so a
// fault in the protected machine does not reach the prediction.
//
// Building the predictor from the protected machine's specification with the
// output bursts substituted follows the method; using the plain Berger code
// (count of zeros, full width K) is this design's choice.
//
// Interface and timing are those of abmm: check changes at the clock edge
// that ends the cycle in which an input burst completes, together with the
// protected machine's outputs.
module berger_predictor
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
  parameter logic [N_ST*SB-1:0]          ST_CODE  = QE_ST_CODE,
  parameter int unsigned K = berger_width(N_OUT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N_IN-1:0] in,
  output logic [K-1:0]  check
);

  // Output table of the predictor: Berger symbol of each state's outputs.
  function automatic logic [N_ST*K-1:0] build_check_table();
    logic [N_ST*K-1:0] r;
    r = '0;
    for (int unsigned s = 0; s < N_ST; s++)
      r[s*K +: K] = K'(berger_code(256'(ST_OUT[s*N_OUT +: N_OUT]), N_OUT));
    return r;
  endfunction

  localparam logic [N_ST*K-1:0] CHECK_OUT = build_check_table();

  logic            fire_unused;
  logic [N_ST-1:0] st_unused;

  abmm #(
    .N_IN(N_IN), .N_OUT(K), .N_ST(N_ST), .N_BR(N_BR), .SB(SB),
    .BR_VALID(BR_VALID), .BR_TERM(BR_TERM), .BR_NEXT(BR_NEXT),
    .ST_OUT(CHECK_OUT), .ST_CODE(ST_CODE)
  ) u_gen (
    .clk(clk), .rst_n(rst_n), .in(in), .out(check),
    .fire(fire_unused), .st_hit(st_unused)
  );

endmodule
