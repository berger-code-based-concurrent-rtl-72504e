// tb_abmm - self-checking testbench of the inverter-free burst-mode machine.
//
// Runs the machine on test spec B (tb_spec_pkg) and walks it through random
// input bursts: for each burst a valid branch of the current state is
// picked and its inputs are toggled one at a time, in random order, with
// random idle cycles in between. Every cycle the testbench checks against
// the reference model that
//   * out equals the entry outputs of the current state (steady during a
//     burst, changed one cycle after the burst completes),
//   * fire is high exactly in the cycle in which the burst completes,
//   * st_hit recognises exactly the current state.
// It also checks the inverter-free re-encoding of spec B's 3-bit binary base
// code: code 000 has no bit at 1, so every bit needs a companion (6 bits).
module tb_abmm;
  import tb_spec_pkg::*;

  localparam int NBURSTS = 400;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [B_N_IN-1:0]  in;
  logic [B_N_OUT-1:0] out;
  logic               fire;
  logic [B_N_ST-1:0]  st_hit;

  int checks = 0, failures = 0;
  int ref_st = 0;
  int fires = 0, multi_bursts = 0;

  abmm #(
    .N_IN(B_N_IN), .N_OUT(B_N_OUT), .N_ST(B_N_ST), .N_BR(B_N_BR), .SB(B_SB),
    .BR_VALID(B_BR_VALID), .BR_TERM(B_BR_TERM), .BR_NEXT(B_BR_NEXT),
    .ST_OUT(B_ST_OUT), .ST_CODE(B_ST_CODE)
  ) dut (.clk, .rst_n, .in, .out, .fire, .st_hit);

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
    check(out == B_N_OUT'(B_OUT_A[ref_st]), "out");
    check(fire == f, "fire");
    check(st_hit == B_N_ST'(1 << ref_st), "st_hit");
    @(posedge clk);
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
    // Re-encoding of the binary base code 000..100: every bit needs a
    // companion, so S0 = 111_000 and S3 = 100_011 (companions above).
    check(berger_pkg::aug_width(4096'(B_ST_CODE), B_N_ST, B_SB) == 6, "re-encoded width");
    check(berger_pkg::aug_code(4096'(B_ST_CODE), B_N_ST, B_SB, 0) == 256'b111_000, "code S0");
    check(berger_pkg::aug_code(4096'(B_ST_CODE), B_N_ST, B_SB, 3) == 256'b100_011, "code S3");
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
    check(multi_bursts > 0, "multi-input bursts exercised");
    $display("bursts=%0d multi_input=%0d", fires, multi_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
