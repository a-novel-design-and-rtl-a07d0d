// qca_clock_zones: the QCA clock zones a signal crosses, as a register chain.
//
// QCA circuits are clocked in zones. A zone's cells are latched for one
// quarter of the clock and hand their values on to the next zone, so a
// signal that crosses four zones arrives one full clock later. This module
// models each zone as one register stage on a clock that ticks once per
// zone: q equals d delayed by ZONES rising edges of clk.
// Interface: clk (one edge per zone), rst_n (synchronous, active low, clears
// every stage to 0), d and q of WIDTH bits. Latency: ZONES cycles,
// throughput one vector per cycle.
// ZONES = 4 is the published layout's zone count; WIDTH and the reset are
// this design's choices.
module qca_clock_zones #(
  parameter int unsigned ZONES = pscl_pkg::QCA_CLOCK_ZONES,
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  initial assert (ZONES >= 1) else $fatal(1, "qca_clock_zones: ZONES must be at least 1");

  logic [ZONES-1:0][WIDTH-1:0] zone;   // zone[0] is the first zone

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      zone <= '0;
    end else begin
      zone[0] <= d;
      for (int unsigned z = 1; z < ZONES; z++) zone[z] <= zone[z-1];
    end
  end

  assign q = zone[ZONES-1];

endmodule
