// tb_majority_voter: exhaustive check of the three-input majority voter.
//
// Applies all eight input combinations and compares y with the number of
// ones among the inputs (two or more gives 1). Then checks the two uses of
// the voter in QCA: with one input tied to 0 it must behave as AND, tied to
// 1 as OR. A watchdog ends the run with a failure if it ever hangs.
module tb_majority_voter;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  majority_voter dut (.a(a), .b(b), .c(c), .y(y));

  task automatic check(logic exp, string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b y=%b expected %b", what, a, b, c, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(((v & 1) + ((v >> 1) & 1) + ((v >> 2) & 1)) >= 2, "majority");
    end
    for (int v = 0; v < 4; v++) begin
      a = 1'b0; {b, c} = 2'(v); #1;
      check(b & c, "AND with a=0");
      a = 1'b1; #1;
      check(b | c, "OR with a=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
