// tb_change_detect - self-checking testbench of the input change detector.
//
// Drives a 4-bit input with random values (held for a random number of
// cycles, sometimes changing several bits at once) and checks every cycle
// that change_vec marks exactly the bits that differ from the previous
// cycle's value and that change is their OR. After reset the reference
// previous value is the INIT parameter.
module tb_change_detect;

  localparam int N = 4;
  localparam logic [N-1:0] INIT = 4'b1010;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] in;
  logic [N-1:0] change_vec;
  logic         change;

  int checks = 0, failures = 0, changes = 0;
  logic [N-1:0] prev;

  change_detect #(.N(N), .INIT(INIT)) dut (.clk, .rst_n, .in, .change_vec, .change);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = INIT;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev = INIT;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if ($urandom_range(2) == 0) in = N'($urandom);
      #1;
      check(change_vec == (in ^ prev), "change_vec");
      check(change == (in != prev), "change");
      if (change) changes++;
      @(posedge clk);
      prev = in;
    end
    check(changes > 100, "changes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
