// tb_berger_checker - self-checking testbench of the Berger code checker.
//
// Applies every combination of information bits and check bits to a checker
// with R = 5 (K = 3) and one with R = 2 (K = 2). A pair is a codeword when
// the check bits equal the number of zeros in the information bits; the
// checker must then give a complementary two-rail output (01 or 10) and
// err = 0, and a non-complementary one (00 or 11) with err = 1 for every
// other pair.
module tb_berger_checker;

  logic [4:0] info5;
  logic [2:0] check5;
  logic [1:0] z5;
  logic       err5;
  logic [1:0] info2;
  logic [1:0] check2;
  logic [1:0] z2;
  logic       err2;

  int checks = 0, failures = 0;

  berger_checker #(.R(5)) dut5 (.info(info5), .check(check5), .z(z5), .err(err5));
  berger_checker #(.R(2)) dut2 (.info(info2), .check(check2), .z(z2), .err(err2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int zeros(int v, int r);
    int c = 0;
    for (int i = 0; i < r; i++) if (((v >> i) & 1) == 0) c++;
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit cw;
    for (int i = 0; i < 32; i++) begin
      for (int c = 0; c < 8; c++) begin
        info5 = 5'(i);
        check5 = 3'(c);
        #1;
        cw = (zeros(i, 5) == c);
        check(err5 == !cw, "err R=5");
        check((z5[1] != z5[0]) == cw, "two-rail R=5");
      end
    end
    for (int i = 0; i < 4; i++) begin
      for (int c = 0; c < 4; c++) begin
        info2 = 2'(i);
        check2 = 2'(c);
        #1;
        cw = (zeros(i, 2) == c);
        check(err2 == !cw, "err R=2");
        check((z2[1] != z2[0]) == cw, "two-rail R=2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
