// tb_berger_ced_top - end-to-end testbench of the Berger code-based CED
// design at its default parameters (Q-element specification).
//
// The environment walks the Q-element through its four-phase handshake
// (one input change per burst), with random idle cycles. Every cycle the
// testbench compares against its own reference of the Q-element:
//   out     = entry outputs of the current state, updated one cycle after
//             the burst completes;
//   check   = number of zeros of those outputs;
//   tpf     = 0 after reset, then the value predicted by the last input
//             change (1 after every Q-element burst);
//   change  = 1 exactly in the cycle in which the inputs take a new value;
//   chk_err = 0, hazard = 0, error = 0 while no fault is injected.
// It injects faults by forcing the design's out and check nets:
//   * right after reset (tpf = 0) a wrong check symbol: error at once (G2);
//   * while resting after a burst (tpf = 1) a wrong check symbol or a
//     unidirectional 0->1 output error: the checker sees it but error stays
//     low (masked), and error rises in the cycle of the next input change
//     (G1), with the fault still present;
//   * a glitch that swaps the two outputs of a state with one output high:
//     the Berger code stays valid, but each output makes a second
//     transition, so hazard and error rise (G3).
// Each mechanism is counted; one that never happened counts as a failure.
module tb_berger_ced_top;

  localparam int NROUNDS = 200;

  // Independent reference of the Q-element (li = in[0], ri = in[1],
  // lo = out[0], ro = out[1]).
  localparam int REF_TERM [4] = '{1, 3, 1, 0};
  localparam int REF_NEXT [4] = '{1, 2, 3, 0};
  localparam int REF_OUT  [4] = '{0, 2, 0, 1};

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] in;
  logic [1:0] out;
  logic [1:0] check;
  logic [1:0] z;
  logic       chk_err, tpf, change, hazard, error;
  logic [1:0] change_vec, hazard_vec;

  int checks = 0, failures = 0;
  int ref_st = 0;
  bit tpf_ref = 1'b0;
  logic [1:0] prev_in;
  logic [1:0] fv;
  int n_bursts = 0, n_change = 0;
  int n_g2 = 0, n_masked_chk = 0, n_masked_out = 0, n_g1_chk = 0, n_g1_out = 0, n_hazard = 0;

  berger_ced_top dut (
    .clk, .rst_n, .in, .out, .check, .z, .chk_err, .tpf,
    .change_vec, .change, .hazard_vec, .hazard, .error
  );

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t (state %0d)", what, $time, ref_st);
    end
  endtask

  function automatic int zeros2(int v);
    return (((v & 1) == 0) ? 1 : 0) + (((v & 2) == 0) ? 1 : 0);
  endfunction

  // Advance the reference at the clock edge that ends a cycle with input v.
  task automatic advance(logic [1:0] v);
    bit f;
    f = (int'(v) == REF_TERM[ref_st]);
    if (v != prev_in) begin
      tpf_ref = f;
      n_change++;
    end
    prev_in = v;
    if (f) begin
      ref_st = REF_NEXT[ref_st];
      n_bursts++;
    end
  endtask

  // One fault-free cycle with full comparison against the reference.
  task automatic cycle(logic [1:0] v);
    @(negedge clk);
    in = v;
    #1;
    chk(out == 2'(REF_OUT[ref_st]), "out");
    chk(int'(check) == zeros2(REF_OUT[ref_st]), "check");
    chk(tpf == tpf_ref, "tpf");
    chk(change == (v != prev_in), "change");
    chk(change_vec == (v ^ prev_in), "change_vec");
    chk(!chk_err && !hazard && !error, "no error without fault");
    @(posedge clk);
    advance(v);
  endtask

  // Idle cycle without comparison (used while a fault is being removed).
  task automatic idle();
    @(negedge clk);
    @(posedge clk);
  endtask

  // A fault on out (is_out) or check, present in a resting cycle and in the
  // cycle of the next input change v.
  task automatic held_fault(bit is_out, logic [1:0] value, logic [1:0] v);
    @(negedge clk);
    fv = value;
    if (is_out) force dut.out = fv;
    else        force dut.check = fv;
    #1;
    chk(tpf && chk_err, "checker sees the fault");
    chk(!hazard && !error, "masked while tpf = 1 and inputs still");
    if (tpf && chk_err && !error) begin
      if (is_out) n_masked_out++;
      else        n_masked_chk++;
    end
    @(posedge clk);
    @(negedge clk);
    in = v;
    #1;
    chk(change && tpf && chk_err && error, "detected at the next input change");
    if (change && tpf && error) begin
      if (is_out) n_g1_out++;
      else        n_g1_chk++;
    end
    #1;
    if (is_out) release dut.out;
    else        release dut.check;
    @(posedge clk);
    advance(v);
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] v;
    int kind;
    in = 2'b00;
    prev_in = 2'b00;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk);
    cycle(2'b00);
    // After reset tpf = 0: the checker counts at all times (G2).
    @(negedge clk);
    fv = ~check;
    force dut.check = fv;
    #1;
    chk(!tpf && !change && chk_err && error, "checker counts while tpf = 0");
    if (!tpf && !change && error) n_g2++;
    #1;
    release dut.check;
    @(posedge clk);
    v = 2'b00;
    for (int n = 0; n < NROUNDS; n++) begin
      repeat ($urandom_range(0, 2)) cycle(v);
      v = 2'(REF_TERM[ref_st]);
      kind = $urandom_range(0, 3);
      if (kind == 0 && n > 0) begin
        held_fault(1'b0, ~check, v);
      end else if (kind == 1 && n > 0 && (out == 2'b01 || out == 2'b10)) begin
        held_fault(1'b1, 2'b11, v);
      end else begin
        cycle(v);
      end
      cycle(v);
      if (kind == 2 && (out == 2'b01 || out == 2'b10)) begin
        // Swap glitch: same weight, so the Berger code stays valid, but the
        // output that just rose falls again (second transition).
        @(negedge clk);
        fv = ~out;
        force dut.out = fv;
        #1;
        chk(!chk_err, "swap keeps a valid codeword");
        chk(hazard && error, "second transition flagged as hazard");
        if (!chk_err && hazard && error) n_hazard++;
        #1;
        release dut.out;
        idle();
        idle();
      end
    end
    $display("bursts=%0d changes=%0d g2=%0d masked_chk=%0d masked_out=%0d g1_chk=%0d g1_out=%0d hazard=%0d",
             n_bursts, n_change, n_g2, n_masked_chk, n_masked_out, n_g1_chk, n_g1_out, n_hazard);
    chk(n_bursts == NROUNDS, "every burst completed");
    chk(n_change == NROUNDS, "one input change per burst");
    chk(n_g2 > 0, "checking while tpf = 0 exercised");
    chk(n_masked_chk > 0 && n_masked_out > 0, "masking while tpf = 1 exercised");
    chk(n_g1_chk > 0 && n_g1_out > 0, "checking at the next input change exercised");
    chk(n_hazard > 0, "hazard detection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
