// tb_ced_glue - self-checking testbench of the error glue logic G1-G3.
//
// Applies all 16 combinations of chk_err, tpf, change and hazard. error
// must be high when hazard is high; when chk_err is high while tpf is low
// (the checker counts at all times); and when chk_err is high while tpf is
// high only in a cycle with an input change. A checker error while tpf is
// high and the inputs are still is masked.
module tb_ced_glue;

  logic chk_err, tpf, change, hazard, error;

  int checks = 0, failures = 0;

  ced_glue dut (.chk_err, .tpf, .change, .hazard, .error);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {hazard, change, tpf, chk_err} = 4'(i);
      #1;
      check(error == (hazard || (chk_err && (!tpf || change))), "error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
