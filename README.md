# Scan justification: a three-latch scan cell for path delay testing

A path delay test needs two patterns applied back to back at functional
speed. The first (P1) sets up the circuit, the second (P2) launches a
transition along the path, and the response is captured one functional clock
period later. In a scan design only one pattern can sit in the scan cells. With
the usual *functional justification*, the cells hold P1, and P2 is whatever the
circuit's own next-state logic makes of P1. That rarely equals the P2 a path
needs. The fix sketched in this design goes the other way round:

* the **second** state pattern, Ps2, is scanned in directly and parked in an
  extra latch in every scan cell (*scan justification*);
* the **first** state pattern, Ps1, is produced by the circuit itself, from a
  scanned-in Ps0 and a primary input Pp0 clocked once at low speed.

Ps2 can then be any value. Ps1 only has to be reachable in one clock, and Ps1
usually has more don't-care bits than Ps2. The price is one latch and one
multiplexer per scan cell. The cell keeps full standard-scan behaviour, so the
older functional-justification tests can still be run on the same hardware.

This repository holds the scan cell as latch-level RTL, a scan chain built from
it, and the ISCAS'89 S27 benchmark built with these cells. It also holds the
modified S27 logic used to search for the Pp0/Ps0 that produce a required Ps1.

## The scan cell (`sj_scan_ff`)

```
             test_mode                              test_opt
                 |                                      |
 data_in --0|\   |                 +--[Latch 2]--q2--0|\|
            |M|--d1--[Latch 1]--q1-+                  |M|-- data_out
 scan_in --1|/        (Clock low)  +--[Latch 3]--q3--1|/
                                   (Clock high)
                                   Latch 3: Clock high AND test_opt high
```

* **Latch 1** (master) is transparent while Clock is low.
* **Latch 2** (slave) is transparent while Clock is high. Together with
  Latch 1 it forms an ordinary positive-edge master/slave flip-flop.
* **Latch 3** is also fed from Latch 1, but it opens only while Clock **and**
  test_opt are both high. It is a second slave that can keep a value while
  Latch 2 goes on working.
* The **output mux** shows Latch 3 while test_opt is high, and Latch 2
  otherwise. data_out feeds both the logic and the next cell's scan_in.

The clock is buffered as CLKA = ~Clock and CLKB = Clock. The RTL keeps these
names.

### Operation modes

| test_mode | test_opt | mode | what happens |
|---|---|---|---|
| 0 | 0 | normal | positive-edge flip-flop on Clock, output from Latch 2 |
| 0 | 1 | clocking | Clock held low. The output switches to Latch 3. Latch 1 is open and captures the response |
| 1 | 0 | L2-scan shifting | shift through Latch 1 and Latch 2. Latch 3 holds |
| 1 | 1 | L3-scan shifting | shift through Latch 1 and Latch 3 (Latch 2 follows as well) |

`sj_pkg::op_mode_e` encodes these modes as `{test_mode, test_opt}`.

### Why clocking mode works

Clocking mode is what needs the most care. Once Ps2 sits in Latch 3, raising
test_opt switches every cell's output from Latch 2 (which holds Ps1) to
Latch 3 (which holds Ps2) at the same moment. That switch is the launch edge. So
test_opt acts as the functional clock, and its high time must be one functional
clock period. During this time:

* Clock must stay **low**. If Clock were high while test_opt is high, Latch 3
  would open and lose Ps2. An assertion in `sj_scan_ff` flags a rising Clock in
  clocking mode.
* Latch 1 is open (Clock low), so it follows the circuit's response Rs2.
* When test_opt falls, Clock must rise at the same moment. Latch 1 then
  closes on Rs2, and Latch 2 opens and passes Rs2 to the output. The timing
  is tight in both directions:
  * if Clock rises first, Latch 3 opens and Ps2 is overwritten (the assertion
    catches this);
  * if test_opt falls first, the output mux puts Ps1 back on the state lines
    while Latch 1 is still open. Latch 1 then captures the response to Ps1
    instead of Rs2.

  In the S27 testbenches both edges happen in the same time step. In silicon the
  delay through the logic must cover the skew between the two pins.

Rs2 is then in Latch 2 and is shifted out in L2-scan shifting mode.

## The scan-justification sequence

For a circuit with primary inputs Pp and state Ps (implemented in `s27_sj`,
exercised in `tb_s27_sj` and `tb_sj_top`):

1. **L3 shift**: scan Ps2 into Latch 3 of every cell. One bit per rising
   Clock. The bit shifted first ends in the last cell.
2. **L2 shift**: scan Ps0 into Latch 2. Latch 3 keeps Ps2.
3. **Normal mode, first slow period**: apply Pp0. At the rising edge the
   circuit's next state, Ps1, moves into Latch 2 and onto the state lines.
4. **Second slow period**: apply Pp1 and keep Clock low. The circuit settles
   in (Pp1, Ps1).
5. **Clocking mode**: apply Pp2 and raise test_opt for one functional period.
   The state lines jump from Ps1 to Ps2, which launches the transition. Latch 1
   captures Rs2, and the primary output shows Rp2.
6. Drop test_opt and raise Clock. Rs2 moves to Latch 2.
7. **L2 shift**: shift Rs2 out on scan_out and compare it with the expected
   response.

In step 4 Clock stays low, and this is a reading of the method, not something
it spells out. A second rising edge would load the response Rs1 into Latch 2,
and the launch would then start from Rs1 instead of Ps1.

### Functional justification on the same cells

With test_opt held low the cell is a standard scan cell. Ps1 is shifted into
Latch 2, then one slow Clock period launches the circuit's own next state as
Ps2. One functional Clock period then captures Rs2, which is shifted out.
`tb_s27_sj` and `tb_sj_top` run this sequence too.

## Finding Ps0 for a required Ps1 (`s27_ps1_target`)

Ps1 must come out of the logic, so one (Pp0, Ps0) has to be found that drives
the next-state lines to the required values. This is cast as a stuck-at test:

* a next-state line that must be 1 goes straight into an AND gate;
* a line that must be 0 goes through an inverter first;
* a don't-care line is left out. The primary output is never used.

Any input that sets the AND output to 1 detects a stuck-at-0 on that output,
and it is a justifying (Pp0, Ps0). In practice a stuck-at ATPG finds it. For
S27 the testbench simply tries all 128 inputs.

The module's parameters `CARE` and `VALUE` (in next-state order {G13, G11,
G10}) say which pattern is required. The defaults are the worked example:
G11 = 1, G10 = 0, G13 = don't care, which is `CARE = 3'b011, VALUE = 3'b010`.
For this target, 22 of the 128 inputs justify it, with G13 coming out as
both 0 and 1.

## The S27 example (`s27_comb`, `s27_sj`)

S27 has inputs G0–G3, output G17 and three flip-flops: G5 ← G10, G6 ← G11,
G7 ← G13. The gate functions are those of the standard ISCAS'89 netlist, and
the `s27_comb` header lists them. `s27_sj` puts the three state bits in one
chain of `sj_scan_ff` cells. G5 sits next to scan_in and G7 drives scan_out.

## Files

| file | contents |
|---|---|
| `rtl/sj_pkg.sv` | mode enum `op_mode_e`, `decode_mode()` |
| `rtl/sj_latch.sv` | transparent D latch (Latch 1, Latch 2) |
| `rtl/sj_bypass_latch.sv` | Latch 3, enabled by CLKB AND test_opt |
| `rtl/sj_scan_ff.sv` | the scan cell |
| `rtl/sj_scan_chain.sv` | N cells in one chain (`N` default 3) |
| `rtl/s27_comb.sv` | S27 combinational logic |
| `rtl/s27_sj.sv` | S27 with a 3-cell chain |
| `rtl/s27_ps1_target.sv` | S27 logic with inverters and the AND gate, for the Ps0 search |
| `rtl/sj_top.sv` | `s27_sj` and `s27_ps1_target` side by side, with separate ports |
| `tb/s27_ref_pkg.sv` | reference S27 evaluation used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_sj_scan_chain_large.sv` | the test sequence on chains of 6, 597 and 669 cells (the state sizes of s1494, s15850 and s13207), with a random vector on d standing in for the logic |

`tb_sj_top` is the end-to-end test at default parameters. It searches for all
inputs that justify the example Ps1. For each one and each of the 8 Ps2 values
it runs the full scan-justification sequence and checks the launch, Rp2 and
the shifted-out Rs2. It then runs 50 functional-justification tests. It counts
how often each shift mode, normal clocks, clocking pulses and launched
transitions occurred, and fails if any of them never happened.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sj_pkg.sv tb/s27_ref_pkg.sv tb/tb_sj_top.sv --top-module tb_sj_top
./obj_dir/Vtb_sj_top
```

Replace `tb_sj_top` with any other testbench name. Lint one module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/sj_pkg.sv rtl/<module>.sv`.

Notes for simulation and synthesis:

* The cells are built from level-sensitive latches (`always_latch`), so
  synthesis reports latches. This is intended.
* Lint and synthesis report a combinational loop through `s27_comb` and the
  cells. The loop runs through Latch 1 and then Latch 2 or Latch 3, and these
  are never open at the same time, so it never closes.
* Nothing has a reset, just as in the cell itself. Scan in known values before
  you read anything.
* Testbenches change inputs only while Clock is low. At the end of clocking
  mode the S27 testbenches drop test_opt and raise Clock in the same time
  step, as the cell requires (see above).

## How far to trust it, and where it departs

* **Latch level, not transistor level.** The cell is modelled as three ideal
  latches and two muxes. Its switches, inverter loops and the I/O buffering
  inverters are not modelled. Each buffering inverter pair is taken as
  non-inverting.
* **Latch 3 enable.** Latch 3's switches are reduced to one enable,
  CLKB AND test_opt. This is the simplest logic that loads in L3-scan shifting
  and holds in clocking mode.
* **Latch 2 in L3 shifting.** Latch 2 is clocked by Clock alone, so it also
  takes the shifted data in L3-scan shifting mode. Only the output mux hides
  this.
* **Chain order and reset** are this design's choices.
* **Test sequencing is external.** test_opt is a chip pin, and no on-chip
  controller for the sequence exists. The testbenches play the tester.
* **Test generation is not hardware.** The full flow runs off-line: delay test
  generation, a stuck-at ATPG run on the modified logic for each first pattern,
  and the optional functional-justification pass. Only the modified logic is
  given here, for S27.
* **Benchmarks.** The method was evaluated on the larger ISCAS'89 circuits
  s420 … s15850. Their netlists are not included. `sj_scan_chain` can be given
  their flip-flop counts (for example 597 cells for s15850), but the logic
  around the chain would have to be supplied.
* **Reported cost.** The original cell is reported at about 50% more area than
  a standard scan cell, against about 70% for an enhanced-scan cell. It adds
  only one mux delay on the functional path. None of this can be seen from RTL.
