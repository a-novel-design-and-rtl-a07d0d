// pscl_gate: combinational Peres and Six-Correction (PSCL) gate, 4x4.
//
// P = A, Q = A xor B, R = AB xor C, S = A(B+C) xor D.
// An SCL gate computes S and passes A, B, C straight through to a Peres
// gate, which forms P, Q and R. The whole network is twelve majority voters
// (five in the SCL gate, seven in the Peres gate) and six inverters. The
// mapping from inputs to outputs is one-to-one: A = P, B = Q xor P,
// C = R xor AB, D = S xor A(B+C).
// Interface: abcd in, pqrs out, as the pscl_pkg structs. Combinational; the
// clocked version with the QCA clock-zone latency is pscl_qca.
// Structure and equations follow the published gate, taking its SCL-into-
// Peres block diagram as the definition of R (= AB xor C).
module pscl_gate
  import pscl_pkg::*;
(
  input  pscl_in_t  abcd,
  output pscl_out_t pqrs
);

  pscl_out_t scl;

  scl_gate   u_scl   (.abcd(abcd), .pqrs(scl));

  peres_gate u_peres (
    .a(scl.p), .b(scl.q), .c(scl.r),
    .p(pqrs.p), .q(pqrs.q), .r(pqrs.r)
  );

  assign pqrs.s = scl.s;

endmodule
