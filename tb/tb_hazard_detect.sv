// tb_hazard_detect - self-checking testbench of the output hazard detector.
//
// Part 1 is directed: after an input change one transition per output is
// accepted, a second transition of the same output before the next input
// change raises hazard_vec for that bit (and hazard), and an input change
// clears the record. Part 2 drives random in_change and random output flips
// and compares with a reference that counts the transitions of each output
// since the last input change: hazard_vec[i] is high when output i makes a
// transition while its count is already 1 or more.
module tb_hazard_detect;

  localparam int N = 3;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_change;
  logic [N-1:0] mon;
  logic [N-1:0] hazard_vec;
  logic         hazard;

  int checks = 0, failures = 0, hazards = 0;
  int cnt [N];
  logic [N-1:0] prev;

  hazard_detect #(.N(N), .INIT('0)) dut (.clk, .rst_n, .in_change, .mon, .hazard_vec, .hazard);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One cycle: apply, compare with the reference, advance the reference.
  task automatic cycle(bit chg, logic [N-1:0] m);
    logic [N-1:0] exp_h;
    @(negedge clk);
    in_change = chg;
    mon = m;
    #1;
    for (int i = 0; i < N; i++) exp_h[i] = (mon[i] != prev[i]) && (cnt[i] > 0);
    check(hazard_vec == exp_h, "hazard_vec");
    check(hazard == (exp_h != 0), "hazard");
    if (hazard) hazards++;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      if (chg) cnt[i] = 0;
      else if (mon[i] != prev[i]) cnt[i]++;
    end
    prev = m;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_change = 1'b0;
    mon = '0;
    prev = '0;
    foreach (cnt[i]) cnt[i] = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Directed: input change, outputs 0 and 2 rise once: no hazard.
    cycle(1'b1, 3'b000);
    cycle(1'b0, 3'b101);
    check(hazard == 1'b0, "single transition accepted");
    cycle(1'b0, 3'b101);
    // Output 0 falls again before any input change: hazard on bit 0 only.
    cycle(1'b0, 3'b100);
    check(hazard_vec == 3'b001, "second transition flagged");
    // New input change clears; one transition each is fine again.
    cycle(1'b1, 3'b100);
    cycle(1'b0, 3'b011);
    check(hazard == 1'b0, "cleared by input change");
    // Random part.
    for (int n = 0; n < 2000; n++) begin
      cycle($urandom_range(3) == 0, ($urandom_range(2) == 0) ? N'($urandom) : prev);
    end
    check(hazards > 50, "hazards seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
