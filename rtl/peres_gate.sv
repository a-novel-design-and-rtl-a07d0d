// peres_gate: Peres gate, a 3x3 reversible gate.
//
// P = A, Q = A xor B, R = AB xor C, from seven majority voters:
//   Q  = MV(1, MV(0, A, ~B), MV(0, ~A, B))                three voters
//   ab = MV(0, A, B)
//   R  = MV(1, MV(0, ab, ~C), MV(0, ~ab, C))              four voters
// Each XOR is two AND-voters on one inverted input each and an OR-voter.
// The equations and the voter count per output follow the published gate.
// Where the inverters sit is this design's reading, as the published block
// diagram marks them only as dots on voter inputs; for R the diagram's
// wiring is replaced by the network that computes the printed equation.
// Interface: one-bit a, b, c in; p, q, r out. Combinational.
module peres_gate
  import pscl_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  logic a_n, b_n, c_n;
  logic q0, q1;              // A~B, ~AB
  logic ab, ab_n;            // AB and its inverse
  logic r0, r1;              // AB~C, ~(AB)C

  qca_inverter   u_inv_a  (.a(a),  .y(a_n));
  qca_inverter   u_inv_b  (.a(b),  .y(b_n));
  qca_inverter   u_inv_c  (.a(c),  .y(c_n));
  qca_inverter   u_inv_ab (.a(ab), .y(ab_n));

  majority_voter u_q0  (.a(MV_AND), .b(a),    .c(b_n), .y(q0));
  majority_voter u_q1  (.a(MV_AND), .b(a_n),  .c(b),   .y(q1));
  majority_voter u_q   (.a(MV_OR),  .b(q0),   .c(q1),  .y(q));

  majority_voter u_ab  (.a(MV_AND), .b(a),    .c(b),   .y(ab));
  majority_voter u_r0  (.a(MV_AND), .b(ab),   .c(c_n), .y(r0));
  majority_voter u_r1  (.a(MV_AND), .b(ab_n), .c(c),   .y(r1));
  majority_voter u_r   (.a(MV_OR),  .b(r0),   .c(r1),  .y(r));

  assign p = a;

endmodule
