// qca_inverter: QCA inverter gate, Y = not A.
//
// In QCA a signal is inverted by letting a wire split into two branches whose
// cells meet a further cell only at their corners; diagonal coupling flips
// the polarisation. Logically it is a NOT gate, which is what this module is.
// Interface: one-bit input a, one-bit output y. Combinational.
module qca_inverter (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
