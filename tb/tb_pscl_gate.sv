// tb_pscl_gate: exhaustive check of the combinational PSCL gate.
//
// For all sixteen input vectors it compares P, Q, R, S with the equations
// P = A, Q = A xor B, R = AB xor C, S = A(B+C) xor D, evaluated here bit by
// bit. It checks the two cases spelled out for S (ABCD = 0000 gives S = 0,
// 0001 gives S = 1), that no output vector repeats, and that the inputs can
// be recovered from the outputs (A = P, B = Q xor P, C = R xor AB,
// D = S xor A(B+C)).
module tb_pscl_gate;
  import pscl_pkg::*;
  pscl_in_t  abcd;
  pscl_out_t pqrs;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  pscl_gate dut (.abcd(abcd), .pqrs(pqrs));

  task automatic expect_bit(logic got, logic exp, string name);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL abcd=%b %s=%b expected %b", abcd, name, got, exp);
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
    logic a, b, c, d, ra, rb, rc, rd;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      abcd = '{a: a, b: b, c: c, d: d};
      #1;
      expect_bit(pqrs.p, a, "P");
      expect_bit(pqrs.q, a != b, "Q");
      expect_bit(pqrs.r, (a && b) != c, "R");
      expect_bit(pqrs.s, (a && (b || c)) != d, "S");
      // Invert the gate from its outputs.
      ra = pqrs.p;
      rb = pqrs.q ^ ra;
      rc = pqrs.r ^ (ra & rb);
      rd = pqrs.s ^ (ra & (rb | rc));
      checks++;
      if ({ra, rb, rc, rd} !== 4'(v)) begin
        failures++;
        $display("FAIL inverse of %b gives %b, not %b", pqrs, {ra, rb, rc, rd}, 4'(v));
      end
      checks++;
      if (seen[pqrs]) begin
        failures++;
        $display("FAIL output %b produced twice", pqrs);
      end
      seen[pqrs] = 1'b1;
    end
    abcd = 4'b0000; #1;
    expect_bit(pqrs.s, 1'b0, "S at 0000");
    abcd = 4'b0001; #1;
    expect_bit(pqrs.s, 1'b1, "S at 0001");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
