# 64-bit single-cycle full comparator in Dual Mode Logic

A full comparator tells, for two unsigned numbers A and B, which of the three
relations A > B, A < B or A = B holds. This design does it for 64-bit operands
in one clock cycle, using a radix-4 parallel-prefix tree so that the number of
logic levels grows with log4 of the width instead of linearly. Each gate of the
tree (except the XOR/XNOR cells) is a Dual Mode Logic (DML) gate: a CMOS gate
with one extra clocked transistor that lets the same gate run either as plain
static CMOS (slower, less energy) or as a pre-charged dynamic gate (faster,
more energy), chosen at run time by one control signal.

The RTL models the comparator at gate level: the prefix tree is built from
instances of a logic-level DML gate model, so both the comparison and the
static/dynamic behaviour of the gates can be simulated. Transistor sizing,
delay and energy are electrical properties and are not part of the RTL.

## Result encoding

| `out[1]` | `out[0]` | meaning                                          |
|----------|----------|--------------------------------------------------|
| 0        | 0        | A > B                                            |
| 0        | 1        | A < B                                            |
| 1        | 0        | A = B                                            |
| 1        | 1        | never a result; the comparator is pre-charging   |

`out[0]` is the "less than" flag and `out[1]` the "equal" flag. The original
design description states the output equations once with the two indices the
other way round (`OUT[0] = P1·P2`, `OUT[1] = G2 + G1·P2`); its result table,
its reference waveforms and its delay measurement all use the assignment
above, and the RTL follows them.

## How the prefix tree compares

The comparison is decided by the most significant position where A and B
differ. The tree finds it by summarising groups of bits with two flags:

* **generate** (`G`): inside this group, A is less than B;
* **propagate** (`P`): inside this group, A equals B.

Both at 0 means the A group is greater. (`G`,`P`) = (1,1) cannot occur.

**Stage 1 – pre-processing (`cmp_pe`, 32 instances).** Element *i* looks at
the 2-bit slices `A[2i+1:2i]` and `B[2i+1:2i]`:

    GP[i] = xnor(A1,B1) · xnor(A0,B0)
    GG[i] = B1·( B0·(A0⊕B0) + ~A1·(A1⊕B1) ) + B0·~A1·(A0⊕B0)

The GG expression is a factored form of "A slice < B slice" that reuses the
XOR/XNOR outputs; it is verified exhaustively against that definition.

**Stage 2 – parallel recursive (`cmp_dot`, 8 instances).** A DOT operator
merges four adjacent groups, index 3 being the most significant:

    GGG = GG3 + GG2·GP3 + GG1·GP3·GP2 + GG0·GP3·GP2·GP1
    GGP = GP3·GP2·GP1·GP0

"The merged group is less if the top sub-group is less, or it is equal and
the next one is less, ..." — the usual prefix recurrence. DOT *i* covers
`GG/GP[4i+3:4i]`, i.e. bits `8i+7 .. 8i` of the operands.

**Stage 3 – post-processing.** Two more DOT operators reduce
`GGG/GGP[3:0]` to (G1,P1) for bits 31..0 and `GGG/GGP[7:4]` to (G2,P2) for
bits 63..32. The output gate (`cmp_out`) then forms

    out[0] = G2 + G1·P2      (A < B)
    out[1] = P1·P2           (A = B)

So the whole tree is 32 → 8 → 2 → 1 groups: every stage is the same
"first non-equal group from the top decides" rule applied at a coarser grain.

## Dual Mode Logic gates (`dml_gate`)

A Type A DML gate adds a pMOS transistor, gated by the control `CLKA`
(active low), between the output and the supply, in parallel with the
pull-up network. A Type B gate adds an nMOS, gated by `CLKB` (active high),
between the output and ground.

| mode    | control                  | behaviour                                                        |
|---------|--------------------------|------------------------------------------------------------------|
| static  | held at CLKA = 1 / CLKB = 0 | ordinary CMOS gate                                           |
| dynamic | driven by a clock        | pre-charge phase: output = 1 (Type A) or 0 (Type B), whatever the inputs; evaluation phase: CMOS function |

Unlike domino logic, a DML gate keeps its complete pull-up and pull-down
networks, so it evaluates correctly even if its inputs change during
evaluation; pre-charge only gives it a head start.

`dml_gate` keeps exactly this logic behaviour. It is parameterised by the
function (`GATE_INV`, `GATE_NAND`, `GATE_NOR`), the input count (inverter,
NAND2–NAND5, NOR2–NOR3, the cell set sized for the original transistor-level
design) and the type. Footed and unfooted variants differ only electrically,
so there is no parameter for them.

The comparator uses Type A gates throughout, all on one control `clka_i`. The
XOR/XNOR cells (`xor_xnor`) are static cells with no control input, as in the
original design. The mapping of each equation onto NAND/NOR/INV cells (for
example GP as an inverter after a NAND2 of the two XNORs, GGG as a NAND4 of
an inverter, a NAND2, a NAND3 and a NAND4) is this implementation's choice;
only the equations come from the original design.

In this zero-delay model, every Type A gate output is 1 during pre-charge,
so the comparator's outputs read `2'b11` while `clka_i = 0` and the result
while `clka_i = 1`.

## The bench: registers, clocking and mode control (`dml_comparator_bench`)

The top module is the comparator in its measurement setting:

```
 a_i ──► REG_A (falling edge) ──┐
                                 ├─► dml_comparator ──► FF (rising edge) ──► out_q_o
 b_i ──► REG_B (falling edge) ──┘        ▲
                                   dml_ctrl_i (CLKA)
```

| port          | dir | width | meaning                                          |
|---------------|-----|-------|--------------------------------------------------|
| `clk`         | in  | 1     | register clock                                   |
| `dml_ctrl_i`  | in  | 1     | DML control of every gate in the comparator      |
| `a_i`, `b_i`  | in  | 64    | operands                                         |
| `out_q_o`     | out | 2     | registered result, encoding as above             |

Timing: the operand registers load on the falling edge of `clk`; the
comparator evaluates during the low phase; the result flip-flops load on the
next rising edge. A pair presented before a falling edge therefore appears on
`out_q_o` right after the following rising edge — half a clock period later —
and a new pair can be accepted every cycle. There is no reset; `out_q_o` is
meaningful from the first rising edge after a load.

Mode control:

* **Static mode:** hold `dml_ctrl_i = 1`.
* **Dynamic mode:** drive `dml_ctrl_i` with the inverse of `clk`, so the
  comparator pre-charges while `clk` is high and evaluates while it is low.
  The control must change *after* each clock edge (a small skew), so that it
  is still 1 when the result flip-flops sample. An assertion in the bench
  checks that `dml_ctrl_i` is 1 at every rising edge of `clk`.

The mode can be switched between cycles at run time.

The falling-edge operand registers and rising-edge result flip-flops follow
the original benchmark arrangement. Which clock phase the dynamic comparator
evaluates in, and the skew rule for the control, are choices made here to
make a zero-delay model work with that arrangement.

## Where this RTL departs from the original design or goes beyond it

* **Single evaluation phase.** The original design's speed measurement times
  the front end (up to `GGG[0]`) and the post-processing stage (up to
  `OUT[0]`) separately and takes twice the larger as the cycle time,
  which suggests the two parts evaluate in opposite clock phases. How the
  stage outputs are held across that phase boundary is not specified, so
  this RTL lets all DML gates share one control and evaluate together.
* **Output index order.** As explained above, the RTL follows the result
  table (`out[0]` = less, `out[1]` = equal), not the swapped algebraic form.
* **Tree naming.** The reduction is a plain radix-4 tree (32 → 8 → 2 → 1),
  the structure the equations and the block diagram describe, although the
  original text calls it Brent–Kung style.
* **Not modelled:** 32 nm transistor sizing, delay (159 ps at 1.2 V, i.e.
  6.29 GHz), energy (0.69 µW/MHz at 1.2 V), the supply-voltage sweep from
  0.3 V to 1.2 V, the flip-flop load sizing, and Type B or static-mode
  operation as alternatives to measure. Type B gates are supported by
  `dml_gate` and tested, but the comparator is built only with Type A.
* **Width.** The stage structure fixes the width at 64 bits; it is a package
  constant (`cmp_pkg::CMP_WIDTH`), not a module parameter.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops with a watchdog if it hangs.

| testbench                  | what it checks                                                                 |
|----------------------------|--------------------------------------------------------------------------------|
| `tb_dml_gate`              | every cell, all input combinations, both control levels, Type A and Type B     |
| `tb_xor_xnor`              | all four input pairs                                                           |
| `tb_cmp_pe`                | all 16 slice pairs against integer `<` / `==`; pre-charge value                |
| `tb_cmp_dot`               | all 81 legal group-code combinations against a scan-from-the-top reference     |
| `tb_cmp_out`               | all 9 half-code combinations; pre-charge value                                 |
| `tb_dml_comparator`        | ~2,600 operand pairs (single-bit differences at every position, shared prefixes, random, the B[0] worst case) in static mode and through a pre-charge/evaluate sequence; also `GGG[0]`/`GGP[0]` |
| `tb_input_reg`, `tb_output_ff` | capture on the correct clock edge only                                    |
| `tb_dml_comparator_bench`  | end to end at full size: ~800 comparisons, one per cycle, in blocks alternating static and dynamic mode; result must appear exactly half a period after capture and not before; counts and requires static and dynamic comparisons, mode switches, observed pre-charge phases and all three results |

Expected values are always computed from the operands directly (SystemVerilog
unsigned comparison or small reference loops), never from the design's own
equations.

## Simulating

All files use SystemVerilog-2017. The package `rtl/cmp_pkg.sv` must be read
first. With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -y rtl +libext+.sv rtl/cmp_pkg.sv \
    tb/tb_dml_comparator_bench.sv --top-module tb_dml_comparator_bench -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each run takes a few seconds.

## Files

| file                          | contents                                              |
|-------------------------------|-------------------------------------------------------|
| `rtl/cmp_pkg.sv`              | width constants, gate/type enums, result encoding     |
| `rtl/dml_gate.sv`             | logic-level DML gate (INV, NAND2–5, NOR2–3; Type A/B) |
| `rtl/xor_xnor.sv`             | static XOR/XNOR cell                                  |
| `rtl/cmp_pe.sv`               | pre-processing element (2-bit slice)                  |
| `rtl/cmp_dot.sv`              | radix-4 DOT operator                                  |
| `rtl/cmp_out.sv`              | post-processing output gate                           |
| `rtl/dml_comparator.sv`       | 64-bit comparator (the three stages)                  |
| `rtl/input_reg.sv`            | falling-edge operand register                         |
| `rtl/output_ff.sv`            | rising-edge result flip-flops                         |
| `rtl/dml_comparator_bench.sv` | top: registers + comparator + result flip-flops       |
