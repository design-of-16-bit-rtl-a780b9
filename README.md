# 16-bit Vedic multiplier with carry-select adders

This is an unsigned 16 × 16 → 32-bit multiplier built on the *Urdhva
Tiryakbhyam* ("vertically and crosswise") rule of Vedic arithmetic. The rule
splits each operand into two halves. The product then comes from two
"vertical" products (low × low, high × high) and two "crosswise" products
(low × high, high × low). All four can be computed at the same time. Applied
recursively, it turns a 16-bit multiplication into 8-bit, then 4-bit, then
2-bit multiplications that all work in parallel. Carry-select adders then
sum the partial products. The whole multiplier is combinational. The top
level registers the 32-bit product on a clock edge.

## Hierarchy

```
vedic_mul16_top        clock, A[15:0], B[15:0] -> OUT[31:0] (registered)
└─ vedic_mul16         combinational 16x16
   ├─ 4 × vedic_mul8   AL·BL, AL·BH, AH·BL, AH·BH
   │   ├─ 4 × vedic_mul4
   │   │   ├─ 4 × vedic_mul2      4 AND gates + 2 half_adder
   │   │   └─ uts_combine #(H=2)
   │   └─ uts_combine #(H=4)
   └─ uts_combine #(H=8)          3 × carry_select_adder (16 bit)
                                    └─ ripple_adder sections of full_adder
```

In all there are 64 2×2 leaf multipliers, 21 combiners and 63 carry-select
adders.

## The 2×2 leaf

For `a = a1a0` and `b = b1b0` (`vedic_mul2`):

| step | meaning | bit |
|------|---------|-----|
| vertical | `a0·b0` | `p[0]` |
| crosswise | `a1·b0 + a0·b1` in a half adder | `p[1]` + carry |
| vertical | `a1·b1 +` that carry in a second half adder | `p[2]`, `p[3]` |

The half adder (`half_adder`) has the ports `in_x`, `in_y`, `out_sum` and
`out_carry`. Its carry is an AND gate and its sum is an XOR.

## Combining the partial products (`uts_combine`)

This is the step to understand. With `H`-bit halves, the four sub-products
`p_ll = AL·BL`, `p_lh = AL·BH`, `p_hl = AH·BL` and `p_hh = AH·BH` are `2H`
bits each. The product is

```
P = p_hh << 2H  +  (p_lh + p_hl) << H  +  p_ll
```

For `H = 8` the bits are produced like this:

| product bits | source |
|--------------|--------|
| `C[7:0]` | `p_ll[7:0]` unchanged; nothing is added below bit 8 |
| `C[15:8]` | low byte of stage 1: `p_lh + p_hl + p_ll[15:8]` |
| `C[31:16]` | stage 2: `p_hh +` the upper 9 bits of stage 1 |

Stage 1 adds three operands. It is built from two 16-bit carry-select adders
in a row: the first takes the crosswise sum, the second adds `p_ll[15:8]` to
it. Both can carry out, but not together. The largest possible stage-1
result is `2·255² + 255 = 130305 < 2¹⁷`. The two carries are therefore ORed
into bit 8 of the 9-bit word passed up to stage 2. For the same reason
stage 2 never carries out of bit 31. Immediate assertions in `uts_combine`
check both facts during simulation.

The same module, with the same wiring, is used at every level (`H` = 2, 4, 8).
It fails elaboration when `H < 2`.

## Carry-select adder (`carry_select_adder`)

Parameters: `WIDTH` (default 16) and `BLOCK`, the section size (default 4).
The lowest section is a ripple-carry adder fed by `cin`. Every higher section
holds two ripple-carry adders, one computing with carry in 0 and one with
carry in 1. The carry from the section below drives a 2:1 multiplexer that
picks the right sum and carry. The carry therefore crosses one multiplexer
per section instead of one full adder per bit. If `WIDTH` is not a multiple
of `BLOCK`, the top section is narrower. Inside the multiplier the
combiners use 4-bit sections, or `H`-bit sections when `H < 4`: sections of
2 bits at the 4×4 level and 4 bits above it.

## Top level and timing (`vedic_mul16_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `a` | in | 16 | multiplicand, unsigned |
| `b` | in | 16 | multiplier, unsigned |
| `out` | out | 32 | `a·b`, registered |

The product of the operands present at a rising edge of `clk` appears on
`out` just after that edge. Latency is one cycle and one product is accepted
per cycle. There is no reset, so `out` is undefined until the first edge. The
clock period must cover the combinational path through `vedic_mul16`.
`vedic_mul16` can also be used alone as a purely combinational multiplier
(`a`, `b` → `c`).

## What is specified and what is chosen here

Taken from the description of the architecture:
- The 16-bit operands split into 8-bit halves.
- Four 8-bit multipliers.
- Two 16-bit carry-select stages, with the bit ranges C0–C7, C8–C15 and
  C16–C31.
- Recursive halving down to a 2-bit multiplier.
- The three-step 2-bit rule.
- The half-adder cell.
- The top-level pins CLK, A, B and OUT.
- The test vectors `1·0, 2·1, 3·2, 4·3 = 0, 2, 6, 0xC`.

Choices made here, where the description is silent:
- Operands are unsigned.
- The clock drives only a single output register, with no reset.
- Carry-select sections are 4 bits wide, built from duplicated ripple adders
  and a multiplexer. The excess-one converter variant is not used.
- The three-operand first stage is built as two adders.
- The 8- and 4-bit levels use the same combiner as the 16-bit level.

Not reproduced: the reported FPGA figures, an 84 ns delay and 1220 slices
against a 108 ns conventional multiplier. They depend on a particular vendor
flow and cannot be checked in simulation. The conventional multiplier they
compare with is not part of this design.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_half_adder` | all 4 input pairs |
| `tb_vedic_mul2` | all 16 input pairs |
| `tb_vedic_mul4` | all 256 input pairs |
| `tb_vedic_mul8` | all 65,536 input pairs |
| `tb_carry_select_adder` | 16-bit instance: corners and 20,000 random cases; 10-bit instance with an uneven top section; counts how often a section takes its carry-1 result |
| `tb_uts_combine` | `H` = 8 (random), 4 and 2 (exhaustive); counts the crosswise and middle-stage carries, both must occur |
| `tb_vedic_mul16` | corners, walking-bit patterns, the four reference vectors and 200,000 random pairs |
| `tb_vedic_mul16_top` | one pair per cycle: checks one-cycle latency, that `out` holds while the inputs change mid-cycle, and the reference vectors; counts stage-1 carries and carry-select selections; runs at the default (only) configuration |

A broken copy of each module has been run against its testbench, and every
testbench failed on it. All expected values come from the simulator's
integer `*` and `+`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl tb/tb_vedic_mul16_top.sv \
          --top-module tb_vedic_mul16_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other one. Lint one module with
`verilator --lint-only -Wall -Irtl rtl/vedic_mul16_top.sv`. To try another
adder section size, change the `SEC` localparam in `uts_combine.sv`. To
change the pipeline, change the register in `vedic_mul16_top.sv`.
