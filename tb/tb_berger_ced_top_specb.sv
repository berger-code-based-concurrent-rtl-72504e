// tb_berger_ced_top_specb - end-to-end testbench of the CED design on test
// spec B (tb_spec_pkg): two-input bursts, a state with two branches and
// three outputs, so the Berger check symbol has two bits.
//
// The environment applies random bursts (inputs of a burst toggled one at a
// time in random order, random idle cycles) and checks every cycle out,
// check, tpf, change and that no error is raised without a fault. It
// injects random unidirectional output errors (a non-empty subset of the
// 0 outputs forced to 1, or of the 1 outputs forced to 0), which always
// change the count of zeros:
//   * inside a two-input burst, after its first input change (tpf = 0):
//     the error must raise chk_err and error at once, and as the first
//     transition since that input change it must not count as a hazard;
//     when the fault is removed the forced outputs make their second
//     transition, which must raise hazard;
//   * while resting after a burst (tpf = 1): the checker sees the error but
//     error stays low unless the forced outputs are ones that just made
//     their response transition (then hazard rises); with the fault still
//     present, error rises in the cycle of the next input change.
module tb_berger_ced_top_specb;
  import tb_spec_pkg::*;

  localparam int NBURSTS = 300;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [B_N_IN-1:0]  in;
  logic [B_N_OUT-1:0] out;
  logic [1:0]         check;
  logic [1:0]         z;
  logic               chk_err, tpf, change, hazard, error;
  logic [B_N_IN-1:0]  change_vec;
  logic [B_N_OUT-1:0] hazard_vec;

  int checks = 0, failures = 0;
  int ref_st = 0;
  bit tpf_ref = 1'b0;
  logic [B_N_IN-1:0]  prev_in;
  logic [B_N_OUT-1:0] resp;       // outputs that changed in the last response
  logic [B_N_OUT-1:0] fv;
  int n_bursts = 0, n_multi = 0, n_g2 = 0, n_second = 0;
  int n_masked = 0, n_g1 = 0, n_up = 0, n_down = 0;

  berger_ced_top #(
    .N_IN(B_N_IN), .N_OUT(B_N_OUT), .N_ST(B_N_ST), .N_BR(B_N_BR), .SB(B_SB),
    .BR_VALID(B_BR_VALID), .BR_TERM(B_BR_TERM), .BR_NEXT(B_BR_NEXT),
    .ST_OUT(B_ST_OUT), .ST_CODE(B_ST_CODE), .INIT_IN('0)
  ) dut (
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

  task automatic advance(logic [B_N_IN-1:0] v);
    bit f;
    int nxt;
    f = ref_fire(ref_st, int'(v), nxt);
    if (v != prev_in) begin
      tpf_ref = f;
      resp = '0;
    end
    prev_in = v;
    if (f) begin
      resp = B_N_OUT'(B_OUT_A[ref_st] ^ B_OUT_A[nxt]);
      ref_st = nxt;
      n_bursts++;
    end
  endtask

  task automatic cycle(logic [B_N_IN-1:0] v);
    @(negedge clk);
    in = v;
    #1;
    chk(out == B_N_OUT'(B_OUT_A[ref_st]), "out");
    chk(int'(check) == ref_zeros(B_OUT_A[ref_st], B_N_OUT), "check");
    chk(tpf == tpf_ref, "tpf");
    chk(change == (v != prev_in), "change");
    chk(!chk_err && !hazard && !error, "no error without fault");
    @(posedge clk);
    advance(v);
  endtask

  task automatic idle();
    @(negedge clk);
    @(posedge clk);
  endtask

  // Random unidirectional error pattern for the current outputs.
  function automatic logic [B_N_OUT-1:0] uni_error(output logic [B_N_OUT-1:0] moved);
    logic [B_N_OUT-1:0] m;
    m = B_N_OUT'($urandom);
    if ($urandom_range(1) == 0 && (out != '1)) begin
      moved = m & ~out;
      if (moved == '0) moved = ~out & (out + 1'b1);                    // lowest 0
      n_up++;
      return out | moved;
    end else if (out != '0) begin
      moved = m & out;
      if (moved == '0) moved = out & (~out + 1'b1);                     // lowest 1
      n_down++;
      return out & ~moved;
    end else begin
      moved = m | B_N_OUT'(1);
      n_up++;
      return out | moved;
    end
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [B_N_IN-1:0] v, rem;
    logic [B_N_OUT-1:0] moved;
    int j;
    bit injected;
    in = '0;
    prev_in = '0;
    resp = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk);
    v = '0;
    for (int n = 0; n < NBURSTS; n++) begin
      rem = B_N_IN'(ref_pick_term(ref_st)) ^ v;
      injected = 1'b0;
      if ($countones(rem) > 1) n_multi++;
      // Fault while resting after the previous burst, held into the first
      // input change of this burst.
      if (n > 0 && $urandom_range(2) == 0) begin
        repeat ($urandom_range(0, 2)) cycle(v);
        @(negedge clk);
        fv = uni_error(moved);
        force dut.out = fv;
        #1;
        chk(tpf && chk_err, "resting fault seen by the checker");
        chk(hazard == ((moved & resp) != '0), "hazard only for a second transition");
        chk(error == hazard, "checker masked while tpf = 1 and inputs still");
        if (!error) n_masked++;
        @(posedge clk);
        do j = $urandom_range(B_N_IN - 1); while (!rem[j]);
        v[j] = ~v[j];
        rem[j] = 1'b0;
        @(negedge clk);
        in = v;
        #1;
        chk(change && tpf && chk_err && error, "detected at the next input change");
        if (change && error) n_g1++;
        #1;
        release dut.out;
        @(posedge clk);
        advance(v);
      end
      while (rem != 0) begin
        repeat ($urandom_range(0, 2)) cycle(v);
        do j = $urandom_range(B_N_IN - 1); while (!rem[j]);
        v[j] = ~v[j];
        rem[j] = 1'b0;
        cycle(v);
        // Inside a two-input burst (tpf = 0): immediate detection.
        if (rem != 0 && !injected && $urandom_range(1) == 0) begin
          injected = 1'b1;
          @(negedge clk);
          fv = uni_error(moved);
          force dut.out = fv;
          #1;
          chk(!tpf && chk_err && error, "fault inside a burst detected at once");
          chk(!hazard, "first transition after an input change is no hazard");
          if (!tpf && error) n_g2++;
          @(posedge clk);
          @(negedge clk);
          release dut.out;
          #1;
          chk(hazard && error, "removing the fault is a second transition");
          if (hazard) n_second++;
          @(posedge clk);
          idle();
        end
      end
      repeat (2) cycle(v);
    end
    $display("bursts=%0d multi_input=%0d g2=%0d second=%0d masked=%0d g1=%0d up=%0d down=%0d",
             n_bursts, n_multi, n_g2, n_second, n_masked, n_g1, n_up, n_down);
    chk(n_bursts == NBURSTS, "every burst completed");
    chk(n_multi > 0, "multi-input bursts exercised");
    chk(n_g2 > 0 && n_second > 0, "faults inside bursts exercised");
    chk(n_masked > 0 && n_g1 > 0, "resting faults exercised");
    chk(n_up > 0 && n_down > 0, "both error directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
