// berger_ced_top - burst-mode machine with Berger code-based concurrent
// error detection.
//
// The protected machine (abmm, inverter-free state code) drives the
// information outputs out[N_OUT]. Alongside it run three further machines
// and detectors, all fed by the same inputs:
//   * berger_predictor - a second machine with the same bursts whose outputs
//     are the Berger check bits check[K] of the expected outputs;
//   * berger_checker   - compares out with check, two-rail result z and
//     error indication chk_err;
//   * tpf_abmm         - transition prediction function, 1 after an input
//     change that completes a burst moving the machine, 0 after one that
//     leaves a burst incomplete;
//   * change_detect    - marks every input change;
//   * hazard_detect    - flags a second transition of an output between
//     two input changes;
//   * ced_glue         - G1-G3, forming error: the checker counts at all
//     times while tpf is 0, and only in the cycle of an input change while
//     tpf is 1 (the outputs of a finished burst are trusted once the next
//     burst starts); a hazard always counts.
// Because every single fault inside the inverter-free machine can only move
// its outputs in one direction (all 0->1 or all 1->0), the count of zeros
// of a faulty output vector always differs from the predicted count, and
// the checker sees a non-codeword.
//
// The block structure and its connections follow the method. The clocked
// emulation of the asynchronous parts (one clock per delay element), the
// Q-element default specification and the plain Berger code are this
// design's choices.
//
// Timing: in is sampled every cycle. change is high in the first cycle
// that shows a new input value; if that value completes a burst, out, check
// and tpf change at the end of that cycle. error is combinational. The
// environment must keep the inputs still for at least two cycles after a
// burst completes (fundamental mode).
module berger_ced_top
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
  parameter logic [N_IN-1:0]             INIT_IN  = QE_ST_IN[0 +: QE_N_IN],
  parameter int unsigned K = berger_width(N_OUT)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  in,
  output logic [N_OUT-1:0] out,
  output logic [K-1:0]     check,
  output logic [1:0]       z,
  output logic             chk_err,
  output logic             tpf,
  output logic [N_IN-1:0]  change_vec,
  output logic             change,
  output logic [N_OUT-1:0] hazard_vec,
  output logic             hazard,
  output logic             error
);

  logic            fire;
  logic [N_ST-1:0] st_hit;

  abmm #(
    .N_IN(N_IN), .N_OUT(N_OUT), .N_ST(N_ST), .N_BR(N_BR), .SB(SB),
    .BR_VALID(BR_VALID), .BR_TERM(BR_TERM), .BR_NEXT(BR_NEXT),
    .ST_OUT(ST_OUT), .ST_CODE(ST_CODE)
  ) u_ifc (
    .clk(clk), .rst_n(rst_n), .in(in), .out(out), .fire(fire), .st_hit(st_hit)
  );

  berger_predictor #(
    .N_IN(N_IN), .N_OUT(N_OUT), .N_ST(N_ST), .N_BR(N_BR), .SB(SB),
    .BR_VALID(BR_VALID), .BR_TERM(BR_TERM), .BR_NEXT(BR_NEXT),
    .ST_OUT(ST_OUT), .ST_CODE(ST_CODE), .K(K)
  ) u_pred (
    .clk(clk), .rst_n(rst_n), .in(in), .check(check)
  );

  tpf_abmm #(
    .N_IN(N_IN), .N_OUT(N_OUT), .N_ST(N_ST), .N_BR(N_BR),
    .BR_VALID(BR_VALID), .BR_TERM(BR_TERM), .BR_NEXT(BR_NEXT),
    .ST_OUT(ST_OUT), .INIT_IN(INIT_IN)
  ) u_tpf (
    .clk(clk), .rst_n(rst_n), .in(in), .tpf(tpf)
  );

  berger_checker #(.R(N_OUT), .K(K)) u_chk (
    .info(out), .check(check), .z(z), .err(chk_err)
  );

  change_detect #(.N(N_IN), .INIT(INIT_IN)) u_chg (
    .clk(clk), .rst_n(rst_n), .in(in), .change_vec(change_vec), .change(change)
  );

  hazard_detect #(.N(N_OUT), .INIT(ST_OUT[0 +: N_OUT])) u_haz (
    .clk(clk), .rst_n(rst_n), .in_change(change), .mon(out),
    .hazard_vec(hazard_vec), .hazard(hazard)
  );

  ced_glue u_glue (
    .chk_err(chk_err), .tpf(tpf), .change(change), .hazard(hazard), .error(error)
  );

  // The protected machine and its transition prediction must agree on when
  // a burst completes (both are fault free unless a fault is injected).
  a_tpf_fire: assert property (@(posedge clk) disable iff (!rst_n) $rose(tpf) |-> $past(fire))
    else $warning("berger_ced_top: tpf rose without burst completion in the machine");

endmodule
