// tb_peres_gate: exhaustive check of the Peres gate.
//
// For all eight input vectors it checks P = A, Q = A xor B and
// R = AB xor C against values written out here, then checks that the eight
// outputs are all different (the gate is reversible).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  // Expected {P,Q,R} for input index {A,B,C} = 0..7.
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                     3'b110, 3'b111, 3'b101, 3'b100};

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== EXP[v]) begin
        failures++;
        $display("FAIL abc=%b pqr=%b expected %b", {a, b, c}, {p, q, r}, EXP[v]);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b produced twice", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
