// pscl_qca: the PSCL gate as a clocked QCA circuit (top level).
//
// The combinational PSCL network (P = A, Q = A xor B, R = AB xor C,
// S = A(B+C) xor D, twelve majority voters) feeds the clock zones of the
// layout. With the default four zones each output vector appears one full
// QCA clock after its input vector, and a new vector may enter every zone
// phase. A valid bit travels alongside the data so that the caller can pair
// outputs with inputs.
// Interface: clk ticks once per clock zone (four times per QCA clock);
// rst_n is a synchronous active-low reset; in_valid/abcd in; out_valid/pqrs
// out, ZONES clk cycles later.
// The equations, the twelve-voter network and the four-zone, one-clock
// latency follow the published design. The zone-per-register model, the
// placement of all logic before the first zone, the reset and the valid bit
// are this design's choices; all four outputs get the same latency.
module pscl_qca
  import pscl_pkg::*;
#(
  parameter int unsigned ZONES = QCA_CLOCK_ZONES
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  pscl_in_t  abcd,
  output logic      out_valid,
  output pscl_out_t pqrs
);

  pscl_out_t pqrs_comb;

  pscl_gate u_gate (.abcd(abcd), .pqrs(pqrs_comb));

  qca_clock_zones #(
    .ZONES (ZONES),
    .WIDTH ($bits(pscl_out_t) + 1)
  ) u_zones (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({in_valid, pqrs_comb}),
    .q     ({out_valid, pqrs})
  );

endmodule
