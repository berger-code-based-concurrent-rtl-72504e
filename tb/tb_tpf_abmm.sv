// tb_tpf_abmm - self-checking testbench of the transition prediction function.
//
// Runs the machine on test spec B (tb_spec_pkg) and walks it through random
// input bursts: for each burst a valid branch of the current state is
// picked and its inputs are toggled one at a time, in random order, with
// random idle cycles in between. Every cycle the testbench checks against
// a reference register: after an input change that completes a burst
// (every branch of spec B leaves its state) tpf becomes 1, after an input
// change that leaves a burst incomplete it becomes 0, and without an input
// change it keeps its value. tpf is 0 after reset.
module tb_tpf_abmm;
  import tb_spec_pkg::*;

  localparam int NBURSTS = 400;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [B_N_IN-1:0]  in;
  logic               tpf;
  int                 tpf_high = 0, tpf_low_in_burst = 0;
  bit                 tpf_ref = 1'b0;
  logic [B_N_IN-1:0]  prev_in = '0;

  int checks = 0, failures = 0;
  int ref_st = 0;
  int fires = 0, multi_bursts = 0;

  tpf_abmm #(
    .N_IN(B_N_IN), .N_OUT(B_N_OUT), .N_ST(B_N_ST), .N_BR(B_N_BR),
    .BR_VALID(B_BR_VALID), .BR_TERM(B_BR_TERM), .BR_NEXT(B_BR_NEXT),
    .ST_OUT(B_ST_OUT)
  ) dut (.clk, .rst_n, .in, .tpf);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic cycle(logic [B_N_IN-1:0] v);
    bit f;
    int nxt;
    @(negedge clk);
    in = v;
    #1;
    f = ref_fire(ref_st, int'(v), nxt);
    check(tpf == tpf_ref, "tpf");
    @(posedge clk);
    if (v != prev_in) begin
      tpf_ref = f;
      if (f) tpf_high++;
      else tpf_low_in_burst++;
    end
    prev_in = v;
    if (f) begin
      ref_st = nxt;
      fires++;
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [B_N_IN-1:0] v, rem;
    int j;
    in = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    v = '0;
    for (int n = 0; n < NBURSTS; n++) begin
      rem = B_N_IN'(ref_pick_term(ref_st)) ^ v;
      if ($countones(rem) > 1) multi_bursts++;
      while (rem != 0) begin
        repeat ($urandom_range(0, 2)) cycle(v);
        do j = $urandom_range(B_N_IN - 1); while (!rem[j]);
        v[j] = ~v[j];
        rem[j] = 1'b0;
        cycle(v);
      end
      repeat (2) cycle(v);
    end
    check(fires == NBURSTS, "burst count");
    check(tpf_high == NBURSTS, "tpf set by every burst");
    check(tpf_low_in_burst > 0, "tpf cleared inside multi-input bursts");
    check(multi_bursts > 0, "multi-input bursts exercised");
    $display("bursts=%0d multi_input=%0d", fires, multi_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
