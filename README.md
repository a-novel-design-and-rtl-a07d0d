# PSCL gate: a Peres and Six-Correction reversible gate built from majority voters

The PSCL gate is a 4-input, 4-output reversible logic gate. It is meant for
quantum-dot cellular automata (QCA), a nanotechnology where the native gates
are the three-input majority voter and the inverter. It chains two known
reversible gates. A **Six-Correction Logic (SCL) gate** computes the BCD
"add six" condition. A **Peres gate** then takes the SCL gate's pass-through
outputs:

| output | function              | produced by |
|--------|-----------------------|-------------|
| P      | A                     | Peres (wire) |
| Q      | A xor B               | Peres |
| R      | (A and B) xor C       | Peres |
| S      | (A and (B or C)) xor D | SCL |

Each input vector gives a different output vector, so the gate loses no
information. The inputs can be recovered as A = P, B = Q xor P,
C = R xor AB and D = S xor A(B+C).

This repository gives that gate as synthesizable SystemVerilog. The logic is
written with the same twelve majority voters that the QCA realisation uses.
It is followed by a register model of the QCA clock zones, which makes every
result appear one full QCA clock after its inputs.

## Majority-voter logic

A majority voter computes MV(a,b,c) = ab + ac + bc. Tying one input to 0
gives AND, and tying it to 1 gives OR. No other gate type is used apart from
the inverter. An XOR therefore costs three voters:
`x xor y = MV(1, MV(0, x, ~y), MV(0, ~x, y))`.

The network in `pscl_gate` is:

| group | voters | what it computes |
|-------|--------|------------------|
| S (in `scl_gate`) | 5 | `MV(1,B,C)` = B+C; `MV(0,A,·)` = x = A(B+C); x xor D as above (inverters on x and D) |
| Q (in `peres_gate`) | 3 | A xor B (inverters on A and B) |
| R (in `peres_gate`) | 4 | `MV(0,A,B)` = AB, then AB xor C (inverters on AB and C) |

That makes 12 voters and 6 inverters. P is a plain wire.

Where this departs from the published block diagram:

- **Inverters.** The diagram draws only the two inverters of the S group. The
  XORs of Q and R need inverted inputs too. Those are shown only as dots where
  lines meet the voters, and they are placed explicitly here.
- **R.** The wiring drawn for the R group would compute A + (B xor C). That is
  not the equation given for R anywhere. This design keeps that group's count
  of four voters but wires them to compute R = AB xor C. This is the Peres
  gate's R and the function of the SCL-into-Peres structure.
- **R and Q in the prose.** The gate's prose description elsewhere also gives
  R = C. In one place it gives Q = B and R = C, which are the SCL gate's
  outputs, not the PSCL gate's. The equations in the table above are the ones
  the gate's block diagram prints, and they are the ones implemented.

## Clock zones and timing

QCA logic is clocked in zones. The cells of a zone are held for a quarter of
the QCA clock and then pass their values to the next zone. The published
layout crosses four zones, so its outputs are valid one QCA clock after the
inputs are applied.

`qca_clock_zones` models each zone as one register stage. `clk` ticks once
per zone, which is four times per QCA clock. In `pscl_qca` all the logic sits
in front of the first zone stage, and all four outputs cross the same
`ZONES = 4` stages. As a result:

- **Latency.** A vector applied in one `clk` cycle shows its result on
  `pqrs` four cycles later: one QCA clock.
- **Throughput.** A new vector can enter every `clk` cycle. Four vectors are
  in flight at once, one per zone.
- **`in_valid` / `out_valid`.** These are carried through the same stages, so
  a caller can tell which outputs are results. They do not affect the logic.
- **Reset.** `rst_n` is a synchronous, active-low reset. It clears every
  stage, which drops anything in flight.

Departures and choices to know about:

- **S latency.** The published simulation also reports S as delayed by only
  0.75 of a clock. That contradicts the stated four-zone, full-clock delay for
  all outputs. This design follows the full-clock figure for all four
  outputs.
- **Zone assignment of the logic.** Which voter sits in which zone is not
  given. Placing all logic before the first stage is this design's choice. It
  changes no result and no latency.
- **Reset and the valid bit** are additions of this design. The QCA circuit
  has neither.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/pscl_pkg.sv` | package | `pscl_in_t` {a,b,c,d} and `pscl_out_t` {p,q,r,s} structs (a/p is the MSB), `MV_AND`/`MV_OR` tie-off constants, `QCA_CLOCK_ZONES = 4`, reference function `pscl_ref` |
| `rtl/majority_voter.sv` | `majority_voter` | MV(a,b,c) |
| `rtl/qca_inverter.sv` | `qca_inverter` | NOT |
| `rtl/scl_gate.sv` | `scl_gate` | SCL gate: P=A, Q=B, R=C, S=A(B+C) xor D (5 voters) |
| `rtl/peres_gate.sv` | `peres_gate` | Peres gate: P=A, Q=A xor B, R=AB xor C (7 voters) |
| `rtl/pscl_gate.sv` | `pscl_gate` | combinational PSCL gate: SCL feeding Peres |
| `rtl/qca_clock_zones.sv` | `qca_clock_zones` | `ZONES` register stages of `WIDTH` bits |
| `rtl/pscl_qca.sv` | `pscl_qca` | **top**: `pscl_gate` + clock zones + valid bit |

Top-level ports of `pscl_qca` (parameter `ZONES`, default 4):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | one rising edge per clock zone |
| `rst_n` | in | 1 | synchronous active-low reset |
| `in_valid` | in | 1 | `abcd` holds a vector this cycle |
| `abcd` | in | 4 (`pscl_in_t`) | A, B, C, D |
| `out_valid` | out | 1 | `pqrs` holds a result this cycle |
| `pqrs` | out | 4 (`pscl_out_t`) | P, Q, R, S, `ZONES` cycles after the input |

The physical QCA cell and the QCA wire have no module. The cell only holds a
bit, and the wire is a connection. Their timing role is covered by the clock
zones. The QCA layout's cell count (61 cells) and area (0.095 µm²) have no
counterpart in this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_majority_voter`, `tb_qca_inverter`: exhaustive truth tables. The voter
  test also checks its AND (tie 0) and OR (tie 1) uses.
- `tb_scl_gate`, `tb_peres_gate`, `tb_pscl_gate`: exhaustive over all input
  vectors, against equations written out in the testbench. They also check
  that no output vector repeats. `tb_pscl_gate` also inverts the gate from
  its outputs and checks the two S cases 0000 → 0 and 0001 → 1.
- `tb_qca_clock_zones`: checks reset, that a single pulse arrives after
  exactly `ZONES` cycles, a 200-word random stream against a delay-line
  model, and a mid-stream reset.
- `tb_pscl_qca`: the top at its default parameters, end to end. Its stimulus:
  - a slow sweep of all 16 vectors, each held for one QCA clock;
  - the 16 vectors back to back;
  - 300 random vectors with random gaps;
  - a reset in the middle of a stream.
  A scoreboard checks every result and its four-cycle latency. The test also
  counts each mechanism (full-clock latency, back-to-back issue, gaps, reset
  flush, each output seen at 0 and at 1) and fails if any of them never
  happened.

Simulate one testbench with plain Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pscl_pkg.sv tb/tb_pscl_qca.sv --top-module tb_pscl_qca -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second. Lint any module with
`verilator --lint-only -Wall -Irtl rtl/pscl_pkg.sv rtl/<module>.sv`. The only
warnings are about package constants a given module does not use.

## Changing it

- **Latency.** Set `ZONES` on `pscl_qca`, for example `ZONES = 3` to model
  the 0.75-clock S delay reported for the layout. This applies to all outputs.
  To give outputs different latencies, split the `qca_clock_zones` instance
  into one per output.
- **Logic only.** Use `pscl_gate` on its own for a purely combinational gate.
- **Gate-level style.** The voter-level structure is kept on purpose. A
  synthesis tool will flatten it to the same AND/OR/XOR logic anyway.
