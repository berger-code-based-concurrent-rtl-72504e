// tb_berger_ced_top_stuck - state-bit faults in the inverter-free machine,
// followed from the machine's outputs to the error output.
//
// The CED design runs test spec B (tb_spec_pkg) with random bursts. At the
// cycle in which the first input of a burst changes, one random bit of the
// protected machine's re-encoded state register is flipped (forced, and
// restored before the clock edge, so the machine's next state is not
// disturbed). This models a stuck-at fault on that state bit at the moment
// the outputs are checked. The testbench expects:
//   * a bit forced to 1 turns outputs only from 0 to 1, a bit forced to 0
//     turns outputs only from 1 to 0 (state decoding and output logic use
//     positive state literals only);
//   * chk_err is high exactly when the outputs differ from the fault-free
//     ones (a unidirectional error always changes the count of zeros), and
//     so is error, through G1 (tpf = 1 and an input change);
//   * with the fault removed, the design continues without any error.
// Faults that change the outputs in each direction must each happen.
// Forcing the register from here makes Verilator note that code_q is
// driven by two processes; that note is expected.
module tb_berger_ced_top_stuck;
  import tb_spec_pkg::*;

  localparam int NBURSTS = 300;
  localparam int CW = 6;          // re-encoded state width of spec B

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
  logic [B_N_IN-1:0] prev_in;
  logic [CW-1:0]     cq;
  int n_bursts = 0, n_up = 0, n_down = 0, n_none = 0;

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
    int nxt;
    if (ref_fire(ref_st, int'(v), nxt)) begin
      ref_st = nxt;
      n_bursts++;
    end
    prev_in = v;
  endtask

  task automatic cycle(logic [B_N_IN-1:0] v);
    @(negedge clk);
    in = v;
    #1;
    chk(out == B_N_OUT'(B_OUT_A[ref_st]), "out");
    chk(!chk_err && !hazard && !error, "no error without fault");
    @(posedge clk);
    advance(v);
  endtask

  // Input change v with state bit i flipped during the cycle.
  task automatic stuck_cycle(logic [B_N_IN-1:0] v, int i);
    logic [CW-1:0]      good;
    logic [B_N_OUT-1:0] exp;
    @(negedge clk);
    exp  = out;
    good = dut.u_ifc.code_q;
    cq   = good;
    cq[i] = ~cq[i];
    force dut.u_ifc.code_q = cq;
    in = v;
    #1;
    if (cq[i]) chk((exp & ~out) == '0, "state bit at 1 moves outputs only 0->1");
    else       chk((out & ~exp) == '0, "state bit at 0 moves outputs only 1->0");
    chk(tpf && change, "fault meets an input change after a burst");
    chk(chk_err == (out != exp), "checker flags every output change");
    chk(error == (out != exp), "error raised through G1");
    if (out == exp) n_none++;
    else if (cq[i]) n_up++;
    else            n_down++;
    cq = good;
    #1;
    release dut.u_ifc.code_q;
    #1;
    chk(out == exp && !chk_err, "state restored");
    @(posedge clk);
    advance(v);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [B_N_IN-1:0] v, rem;
    int j;
    bit first;
    in = '0;
    prev_in = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk);
    chk(berger_pkg::aug_width(4096'(B_ST_CODE), B_N_ST, B_SB) == CW, "re-encoded width");
    v = '0;
    for (int n = 0; n < NBURSTS; n++) begin
      rem = B_N_IN'(ref_pick_term(ref_st)) ^ v;
      first = 1'b1;
      while (rem != 0) begin
        repeat ($urandom_range(0, 2)) cycle(v);
        do j = $urandom_range(B_N_IN - 1); while (!rem[j]);
        v[j] = ~v[j];
        rem[j] = 1'b0;
        if (first && n > 0) stuck_cycle(v, $urandom_range(CW - 1));
        else                cycle(v);
        first = 1'b0;
      end
      repeat (2) cycle(v);
    end
    $display("bursts=%0d stuck_up=%0d stuck_down=%0d stuck_no_effect=%0d",
             n_bursts, n_up, n_down, n_none);
    chk(n_bursts == NBURSTS, "every burst completed");
    chk(n_up > 0 && n_down > 0, "output errors in both directions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
