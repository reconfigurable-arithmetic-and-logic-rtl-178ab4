# R-ALU: an ALU that reconfigures between integer and floating-point work

A superscalar core with fixed functional units loses throughput whenever
the instruction mix does not match the units: integer code leaves the FP
adder idle while integer instructions queue for the ALUs. The
reconfigurable ALU (R-ALU) answers this with one unit that can be switched,
on the fly, between

* a **64-bit integer ALU**: ADD, SUB, SLL, SRL, AND, OR, XOR, NOR, in one
  pipeline stage, and
* a **double-precision floating-point adder** (FP-ADD), in three stages.

It is built from the datapath of a conventional FP adder, with a few
changes: the significand adder is widened to 64 bits, the alignment shifter
becomes a 64-bit barrel shifter, a logic unit is added, and four
programmable switches re-route operands depending on the mode. In the
processor it replaces the FP adder, gets its own 8-entry reservation
station, and steering logic at dispatch decides which instructions it
receives.

This repository holds synthesizable SystemVerilog for the R-ALU datapath,
its reconfiguration control, its reservation station, the steering logic
and a top level (`ralu_cluster`) that wires them together. The rest of the
processor (decode, rename, the other reservation stations and units,
register files) is outside; it connects through the top's ports.

## The datapath and its four switches

```
 A, B ─► [A1,B1 regs] ─┬─► exponent B-A / A-B ─► shift mux ─(RS1b)─┐
                       │                                          ▼
                       ├─► SWAP (enabled by RS1a) ──► A path   BARREL SHIFTER ─► B path
                       │                                  │              │
                       └─► LOGIC UNIT ─► int bus     [A2 reg]        [B2 reg]
                                                          │              │
                                 A1 ─(RS2a)─► ADD/SUB ◄─(RS2b)─ B1
                                              │ sum, sum+1, CY    LOP (parallel)
                                         [regs] ─► sel 1comp ─► SHIFT LEFT ─► fraction
                                                   SIGN, exponent update ─► sign, exponent
```

| switch | FP mode | integer mode |
|---|---|---|
| RS1a | swap controlled by the exponent compare | swap forced off: A1 on the A path, B1 into the shifter |
| RS1b | shifter gets the exponent difference, shifts right | shifter gets the instruction's shift field, SLL or SRL |
| RS2a/RS2b | adder inputs are the pipeline registers A2/B2 | adder inputs are A1/B1 straight from the input registers |

RS1a/RS1b make up the setting of **stage 1** (swap and barrel shifter),
RS2a/RS2b that of **stage 2** (the adder). In integer mode an operation
reads A1/B1 and its result (adder `sum`, shifter output or logic unit) goes
to the integer result port in the same cycle. In FP mode:

1. **Stage 1**: both exponent differences are formed; the sign of A-B picks
   the larger exponent and decides the swap; the smaller significand is
   shifted right by the difference (saturated at 63).
2. **Stage 2**: the adder adds, or for an effective subtraction computes
   A2 + ~B2 (no carry in), returning both `sum` and `sum+1`. In parallel
   the leading-one predictor (LOP) estimates the normalisation shift from
   A2 and B2.
3. **Stage 3**: *sel 1comp* takes `sum+1` (= A2-B2) when there was a carry
   and `~sum` (= B2-A2) when there was not, so no second subtraction is
   needed when the significands come out in the wrong order (only possible
   for equal exponents). The left shifter normalises by the LOP count,
   the exponent becomes `e_big + 1 - shift`, and the sign logic flips the
   sign of the larger-exponent operand when the carry says the result
   changed sign.

### Significand window

The significand (hidden bit plus 52 fraction bits) sits in bits 54..2 of
the 64-bit adder and shifter, with bit 55 for the carry of an addition and
bits 1..0 as guard bits; `ralu_pkg::SIG_W = 56` bits are used. The paper
this design follows uses 54 bits, which leaves no guard bit. That version
was built first and failed the random tests: when the exponents differ by
one and the subtraction cancels many leading bits, the bit shifted out of
the smaller operand is multiplied up by the normalisation, and the result
can be 8 units in the last place (ulp) off. Two guard bits remove that
case.

### Leading-one prediction

The LOP forms an indicator string from the per-bit propagate, generate and
zero signals of the two adder inputs (the Schmookler-Nowka formula) and
encodes its leading one. The count can be one too high or one too low. The
left shifter shifts by the predicted count into a window one bit wider,
then corrects by one position either way. It also limits the shift so the
exponent never drops below 1: the result then comes out subnormal.

### Numerical behaviour: read this before relying on FP results

* **Rounding is truncation** of the normalised result. The paper's
  datapath has no rounding step. Results are within 2 ulp of the correctly
  rounded IEEE 754 sum (tests check this), and exact whenever the exact
  sum is representable (tests check this too). It is *not*
  round-to-nearest-even.
* Subnormal inputs and outputs work. Exponent overflow gives infinity.
* NaN and infinity **inputs are not handled**: they are added as if they
  were ordinary numbers.
* An exact zero from a subtraction is +0; (-0) + (-0) is -0.
* Only addition: an FP subtract would need its B sign flipped before issue.

## Reconfiguration cost

A switch of a stage's setting takes one cycle, during which that stage
must be idle. The resources each operation needs:

| operation | stage 1 (shifter) | stage 2 (adder) |
|---|---|---|
| FP-ADD issued for cycle e | e, FP mode | e+1, FP mode |
| SHIFT | e, integer mode | – |
| ADD/SUB (also address generation) | – | e, integer mode |
| logic | – | – |

`ralu_reconfig_ctrl` tracks, per stage, its current setting, the mode of
the last operation scheduled on it and whether it is busy this cycle or
the next. From that it raises `cls_ok` for each class of operation that
can start now. That one rule gives every entry of the paper's switching
table, and the testbenches measure each:

| sequence | lost cycles |
|---|---|
| ADD or logic, then FP-ADD | 0 (stage 1 is switched while the ADD runs) |
| SHIFT, then FP-ADD | 1 |
| FP-ADD, logic, then not ADD | 0 |
| FP-ADD, logic, then ADD | 1 |
| FP-ADD, SHIFT | 1 |
| FP-ADD, ADD | 2 (the adder is busy the next cycle, then must switch) |

Successive FP-ADDs, and successive integer operations, issue every cycle.

## The cluster: steering, reservation station, R-ALU

`ralu_cluster` contains:

* **`ralu_steer`**: looks at a dispatch group of `W` = 4 renamed
  instructions. FP adds must go to the R-ALU, since it has replaced the FP
  adder. Other FP operations go to the FP station. Integer operations the
  R-ALU cannot do go to the integer station. An integer add/sub/logic/shift
  goes to the R-ALU station when that station is at least as empty,
  relative to its size (8), as the integer station is (16). Otherwise it
  goes to the integer station. A load/store always goes to the address
  station and, by the same rule, may also go to the R-ALU, which then only
  computes its address. Dispatch is in order: the first instruction that
  finds no room stops itself and the rest of the group.
* **`ralu_rs`**: 8 entries kept oldest-first. Waiting operands compare
  their tags with all result buses, including those of an instruction in
  the cycle it is enqueued. The oldest entry with both operands is offered
  to the R-ALU. If the R-ALU cannot take it this cycle because a stage is
  reconfiguring, the station waits rather than bypass it. That is where
  the switching cost shows up.
* **`ralu_core`**: the datapath above, with `ralu_reconfig_ctrl` inside.

The R-ALU's own integer and FP results wake up its station. Generated
addresses come out on the integer port with `int_agen` set, addressed by
`int_tag` to the address station's entry; they wake up nothing.

### Timing at the top

| event | cycle |
|---|---|
| group dispatched (accepted) | t |
| earliest issue from the station | t+1 |
| integer / address result on `int_*` | issue + 1 |
| FP result on `fp_*` | issue + 3 |

Result ports are driven for one cycle with a valid bit, and are not held.
The tags are 7 bits. Reset (`rst_n`) is synchronous and active low. It
clears the control state and puts both stages in integer mode.

## Where this departs from the paper, and what is own choice

Taken from the paper: the operation set (except NOR); the 64-bit adder and
barrel shifter; the four switches and what they select; the one-stage
integer and three-stage FP pipelines; the placement of LOP, sel 1comp,
shift-left and sign logic; the switching costs; the 8-entry R-ALU station
and 16-entry integer station sizes; steering at dispatch; and address
generation for memory instructions.

Own choices: two guard bits (56 instead of 54 bits used); truncation; the
subnormal, overflow and zero-sign handling; no NaN or infinity handling;
NOR; the LOP formula and its one-bit correction; the shift amount as an
instruction field; the stage-usage reading of the switching table; the
steering balance rule and in-order stop; the oldest-ready, wait-on-switch
issue policy; dispatch width 4; 7-bit tags; 4 external result buses;
synchronous reset; separate valid-qualified result ports instead of
tri-state bus drivers.

Not built: the host processor around the cluster. The paper takes it from
the R10000 and does not design it. The paper's evaluation (IPC on SPEC95
programs and k-means) needs that whole processor and a simulator, so it is
not reproduced.

## Files

| file | contents |
|---|---|
| `rtl/ralu_pkg.sv` | widths, operation and class enums, reservation-station entry and dispatch-slot structs |
| `rtl/ralu_cluster.sv` | top: steering + reservation station + R-ALU |
| `rtl/ralu_steer.sv` | steering logic |
| `rtl/ralu_rs.sv` | reservation station |
| `rtl/ralu_core.sv` | R-ALU datapath, pipeline registers, switches |
| `rtl/ralu_reconfig_ctrl.sv` | stage settings and issue permission |
| `rtl/ralu_expdiff.sv`, `ralu_swap.sv`, `ralu_barrel_shifter.sv`, `ralu_logic_unit.sv` | stage 1 and logic unit |
| `rtl/ralu_addsub.sv`, `ralu_lop.sv` | stage 2 |
| `rtl/ralu_sel1comp.sv`, `ralu_shift_left.sv`, `ralu_sign.sv` | stage 3 |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ralu_pkg.sv rtl/*.sv \
          tb/tb_ralu_cluster.sv --top-module tb_ralu_cluster -o sim
./obj_dir/sim
```

Use the same command with another `tb_*.sv` for the other modules and for
the workload run.

What the testbenches establish:

* `tb_ralu_core`: 3000 FP additions against the simulator's IEEE
  addition (exact where the sum is representable, including cancelling
  operands one exponent apart; otherwise within 2 ulp). Also 3000 integer
  operations against reference expressions. Result latency is 1 cycle
  (integer) and 3 cycles (FP). All switching penalties of the table are
  measured.
* `tb_ralu_reconfig_ctrl`: the switching table against the control alone,
  stage settings and switch counts. It then runs 4000 cycles of random
  issue against a separate model. In that model each operation books its
  stage cycles, and a changed mode needs a free cycle just before the
  booking. The run checks `cls_ok` every cycle, the setting in every
  booked cycle, and the switch count.
* `tb_ralu_rs`: directed cases for issue order, wakeup, waiting while the
  unit switches, and a full station. Then 3000 random cycles are compared
  with a queue model of the station.
* `tb_ralu_cluster`: the full default-size cluster (no parameter
  overrides) runs 3000 dispatch groups. Integer-heavy, FP-heavy and mixed
  phases alternate, with dependences through tags. The testbench plays the
  rest of the core. Every R-ALU result is checked. It also requires that
  each mechanism happened: switches of both stages in both directions,
  issue held for reconfiguration, dispatch stopped by a full station,
  integer work steered both ways, address generation, wakeup by own and by
  external results, and every operation.
* `tb_ralu_workloads`: the default-size cluster under the switching
  pressure of seven published applications. These are SPEC95 swim, wave5,
  su2cor, compress, jpeg and li, plus k-means. Each is described by its
  average number of instructions between changes from integer work to FP
  additions or back. The stream alternates phases at exactly that rate.
  The mix inside a phase is this testbench's own choice. It checks every
  result, that the R-ALU switches no more often than the stream changes,
  that it never switches without FP additions, and that issue is held at
  most 2 cycles per stage switch. One run gave:

  | application | instr. per change | stream changes | adder-stage switches | held cycles |
  |---|---|---|---|---|
  | swim | 40.5 | 49 | 49 | 33 |
  | wave5 | 16.5 | 121 | 89 | 75 |
  | su2cor | 21.1 | 94 | 80 | 60 |
  | compress | 370 | 11 | 11 | 9 |
  | k-means | 325 | 11 | 11 | 6 |
  | jpeg, li | no FP add | 0 | 0 | 0 |

  With short phases, some integer phases send nothing to the R-ALU: the
  steering gives that work to the integer station. The R-ALU then skips a
  switch. The held cycles stay under one per switch. This does not
  simulate the programs themselves, which need the whole processor.
* One testbench each for the leaf blocks (random and exhaustive checks
  against independent reference arithmetic).

Assertions in `ralu_core`, `ralu_reconfig_ctrl` and `ralu_rs` check that
no stage is used in the wrong setting, that a stage is only switched while
idle, and that the reservation station never overflows. Run with
`--assert` to enable them.

## Changing it

* The FP window width is `SIG_W` and `GUARD_W` in `ralu_pkg`. The LOP,
  left shifter and select stage follow them.
* `RS_DEPTH`, `W`, `INT_DEPTH` and `NUM_EXT_WB` are parameters of
  `ralu_cluster`. `TAG_W` is in the package.
* To add rounding, extend the stage-3 logic in `ralu_shift_left`: the
  guard bits are already in the window. A sticky bit from the barrel
  shifter would also be needed for round-to-nearest-even.
