// scl_gate: Six-Correction Logic (SCL) gate, a 4x4 reversible gate.
//
// P = A, Q = B, R = C, S = A(B+C) xor D. P, Q and R pass A, B and C on;
// S is built from five majority voters and two inverters:
//   x  = MV(0, A, MV(1, B, C))          A AND (B OR C)
//   S  = MV(1, MV(0, ~x, D), MV(0, x, ~D))   x XOR D
// Every input vector gives a different output vector, so the gate can be
// undone (A, B, C are on the outputs, and D = S xor A(B+C)).
// Interface: abcd in, pqrs out, as the pscl_pkg structs. Combinational.
// The equations and the MV/inverter network follow the published gate; the
// order in which lines enter each voter is read from its drawing.
module scl_gate
  import pscl_pkg::*;
(
  input  pscl_in_t  abcd,
  output pscl_out_t pqrs
);

  logic b_or_c;   // B + C
  logic x;        // A(B + C)
  logic x_n;      // not x
  logic d_n;      // not D
  logic t0;       // ~x AND D
  logic t1;       // x AND ~D
  logic s;

  majority_voter u_or_bc  (.a(MV_OR),  .b(abcd.b), .c(abcd.c), .y(b_or_c));
  majority_voter u_and_a  (.a(b_or_c), .b(MV_AND), .c(abcd.a), .y(x));
  qca_inverter   u_inv_x  (.a(x),      .y(x_n));
  qca_inverter   u_inv_d  (.a(abcd.d), .y(d_n));
  majority_voter u_and_t0 (.a(x_n),    .b(MV_AND), .c(abcd.d), .y(t0));
  majority_voter u_and_t1 (.a(x),      .b(MV_AND), .c(d_n),    .y(t1));
  majority_voter u_or_s   (.a(MV_OR),  .b(t0),     .c(t1),     .y(s));

  always_comb begin
    pqrs.p = abcd.a;
    pqrs.q = abcd.b;
    pqrs.r = abcd.c;
    pqrs.s = s;
  end

endmodule
