// tb_scl_gate: exhaustive check of the Six-Correction Logic gate.
//
// For all sixteen input vectors it checks P = A, Q = B, R = C and
// S = A(B+C) xor D, the last one computed here from a truth table written
// out bit by bit. It then checks that the sixteen outputs are all different,
// i.e. that the gate is reversible.
module tb_scl_gate;
  import pscl_pkg::*;
  pscl_in_t  abcd;
  pscl_out_t pqrs;
  int checks = 0, failures = 0;
  logic [15:0] seen;


  scl_gate dut (.abcd(abcd), .pqrs(pqrs));

  function automatic logic s_expected(int v);
    logic a = v[3], b = v[2], c = v[1], d = v[0];
    logic f;
    case ({a, b, c})
      3'b101, 3'b110, 3'b111: f = 1'b1;
      default:                f = 1'b0;
    endcase
    return f ? !d : d;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      abcd = pscl_in_t'(v);
      #1;
      checks++;
      if (pqrs.p !== abcd.a || pqrs.q !== abcd.b || pqrs.r !== abcd.c || pqrs.s !== s_expected(v)) begin
        failures++;
        $display("FAIL abcd=%b pqrs=%b expected %b%b%b%b", abcd, pqrs, abcd.a, abcd.b, abcd.c, s_expected(v));
      end
      checks++;
      if (seen[pqrs]) begin
        failures++;
        $display("FAIL output %b produced twice: not one-to-one", pqrs);
      end
      seen[pqrs] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
