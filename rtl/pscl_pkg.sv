// pscl_pkg: types and constants shared by the PSCL gate modules.
//
// A PSCL gate maps an input vector I(A,B,C,D) to an output vector O(P,Q,R,S).
// Both vectors are carried as packed structs so that the bit order is named
// rather than implied. The two constants give the value tied to the third
// input of a majority voter to make it an AND (0) or an OR (1), the way QCA
// builds those gates. QCA_CLOCK_ZONES is the number of clock zones the gate's
// layout passes through, which makes its latency one full QCA clock.
package pscl_pkg;

  // Input vector I(A, B, C, D); a is the most significant bit.
  typedef struct packed {
    logic a;
    logic b;
    logic c;
    logic d;
  } pscl_in_t;

  // Output vector O(P, Q, R, S); p is the most significant bit.
  typedef struct packed {
    logic p;
    logic q;
    logic r;
    logic s;
  } pscl_out_t;

  // Fixed third input of a majority voter: 0 gives AND, 1 gives OR.
  localparam logic MV_AND = 1'b0;
  localparam logic MV_OR  = 1'b1;

  // Clock zones crossed between the inputs and the outputs of the layout.
  localparam int unsigned QCA_CLOCK_ZONES = 4;

  // Reference function of the PSCL gate, used by the testbenches.
  function automatic pscl_out_t pscl_ref(pscl_in_t i);
    pscl_out_t o;
    o.p = i.a;
    o.q = i.a ^ i.b;
    o.r = (i.a & i.b) ^ i.c;
    o.s = (i.a & (i.b | i.c)) ^ i.d;
    return o;
  endfunction

endpackage
