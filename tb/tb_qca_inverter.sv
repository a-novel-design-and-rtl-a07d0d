// tb_qca_inverter: checks that the QCA inverter outputs the complement of
// its input for both input values, a few times over.
module tb_qca_inverter;
  logic a, y;
  int checks = 0, failures = 0;

  qca_inverter dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 6; n++) begin
      a = n[0];
      #1;
      checks++;
      if (y !== !n[0]) begin
        failures++;
        $display("FAIL a=%b y=%b", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
