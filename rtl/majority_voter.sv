// majority_voter: three-input majority voter, the basic QCA logic gate.
//
// MV(A,B,C) = AB + AC + BC. In QCA it is five cells in a cross: the centre
// cell takes the polarisation held by the majority of its three input
// neighbours. Tying one input to 0 gives a two-input AND, tying it to 1 gives
// a two-input OR; every gate of the PSCL network is built this way.
// Interface: three one-bit inputs, one one-bit output. Purely combinational;
// the QCA propagation delay is modelled by the clock zones in pscl_qca.
module majority_voter (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (a & c) | (b & c);

endmodule
