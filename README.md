# A reconfigurable fixed-point datapath for the algebraic codebook search

The algebraic codebook search (ACS) of CELP speech codecs such as AMR is a deep
loop nest. Its innermost body is a short dataflow graph of 16/32-bit fixed-point
operations: a few scaled correlation terms are summed, rounded, squared, multiplied
crosswise and compared. A DSP runs such a body one instruction at a time, and a
VLIW machine can only bundle operations that do not depend on each other.

This design takes a different route. It provides a pool of arithmetic units and puts
a multiplexer in front of every operand. A configuration word says where each
operand comes from: a memory word, a word the host drives directly, a result
register, or the output of another unit.
Dependent operations are wired one after the other in the same clock cycle. A
chain like `s = a + b; s = s + c` therefore costs one cycle, not two. The host
processor rewrites the configuration every cycle, so one piece of hardware runs
a different dataflow graph in each cycle.

The datapath is built around shift-accumulate (SAC) units. The codec scales its
correlation terms by constant powers of two (1/2, 1/4, 1/8, 1/16). Each such
multiply-accumulate becomes a shift and an add, with no multiplier. A real
multiplier and a squaring unit remain for the two true products of the search.

## System

```
            +-------------------+   write port    +--------------+
            |  host controller  |---------------->|  acs_memory  |  dn[], rr[][], code vector
            |  (DSP, external)  |  10 read addr.  |  2048 x 16   |
            |                   |---------------->|  10 rd ports |
            |                   |                 +------+-------+
            |                   |                        | h[0..9] (16 bit)
            |                   |  cfg, cfg_valid, +-----v-------+
            |                   |  host_data[0..1] |  acs_core   |
            |                   |----------------->|             |
            |                   |<-----------------|             |
            +-------------------+ reg1 reg2 reg3   +-------------+
                                  o_cmp
```

`acs_top` contains the memory and the core. The host is not part of the RTL.
Its ports are the ports of `acs_top`.

Timing: in cycle *t* the host drives the ten read addresses, a configuration
word, `cfg_valid` and up to two direct operand words (`host_data`). At the edge
that ends cycle *t*, the memory delivers the ten words and the core loads the
configuration register and the direct words. During cycle *t+1* the whole
configured graph settles combinationally. The edge that ends *t+1* writes REG1,
REG2, REG3 and `o_cmp`. The host can issue a new configuration every cycle, so the
two stages overlap. A configuration can use the registers written by the one just
before it. A cycle without `cfg_valid` loads an all-zero configuration: all units
idle, no register written.

## The units

All data are two's-complement fractions: Q15 in 16 bits, Q31 in 32 bits. Every
result saturates to 7FFFh/8000h (16 bit) or 7FFFFFFFh/80000000h (32 bit). It never
wraps. This matches the codec's reference arithmetic bit for bit.

| unit | module | function |
|---|---|---|
| SAC1..SAC9 | `acs_sac` | `y = sat32(acc + x * 2^(16-n))`: Q31 accumulate of a Q15 word times the constant 2^-n |
| SHIFT | `acs_shift` | `y = x * 2^(16-n)`: Q15 word times 2^-n as a Q31 value, never overflows |
| ROUND1, ROUND2 | `acs_round` | `y = upper 16 bits of sat32(x + 8000h)` |
| SQUARE | `acs_square` | `y = sat16((x*x) >> 15)`, one input |
| MULT | `acs_booth_mult` | `y = sat32(2*a*b)`, radix-4 Booth recoding, 8 partial products |
| ADD16A, ADD16B | `acs_add16` | `sat16(a ± b)` |
| ADD32 | `acs_add32` | `sat32(a ± b)` |
| CMP | `acs_cmp` | `a > b`, signed 32 bit, registered into `o_cmp` |

On the shift encoding: the codec computes a term like `L_mac(acc, x, 1/8)` as
`acc + 2 * x * 4096`, which is `acc + (x << 13)`. A configuration field
`n = 3` means "times 1/8" and gives exactly this. In general, `n` selects the
constant 2^-n and the hardware shifts by 16-n. `n = 0` gives `x << 16`.

## Operand routing: what can feed what

This is the part to understand before writing a configuration. The units are
evaluated in one fixed order:

```
ADD16A -> ADD16B -> SQUARE -> SHIFT -> SAC1..SAC4 -> ROUND1 -> SAC5..SAC9 -> ROUND2 -> MULT -> ADD32 -> CMP
```

Every operand multiplexer can select the primary sources, plus the outputs of the
units to its left. The primary sources are:

* memory words `H0..H9`;
* word pairs `HP0..HP4`, where `HPi = {H(2i+1), H(2i)}`, used as 32-bit operands;
* the direct host words `HD0`, `HD1`, and their pair `HDP = {HD1, HD0}`;
* the result registers REG1, REG2 and REG3.

A multiplexer cannot select a unit to its right. Selecting one gives zero, and
in the SAC accumulators an assertion flags it. So no configuration can close a
combinational loop, and a chain of any length along this order settles in one
cycle.

16-bit sources (`acs_pkg::src16_e`): `ZERO, H0..H9, HD0, HD1, REG3, ADD16A,
ADD16B, SQ, RND1, RND2`. 32-bit sources (`src32_e`): `ZERO, HP0..HP4, HDP, REG1,
REG2, SHIFT, SAC1..SAC9, MULT, ADD32`.

| unit operand | may select |
|---|---|
| ADD16A a/b | H, HD, REG3 |
| ADD16B a/b | as above + ADD16A |
| SQUARE, SHIFT | as above + ADD16B (+ SQ for SHIFT) |
| SAC k data | 16-bit sources up to SQ; for k ≥ 5 also RND1 |
| SAC k accumulator | ZERO, HP, HDP, REG1, REG2, SHIFT, SAC1..SAC(k-1) |
| ROUND1 | 32-bit sources up to SAC4 |
| ROUND2 | 32-bit sources up to SAC9 |
| MULT a/b | all 16-bit sources |
| ADD32 a/b | 32-bit sources up to MULT |
| CMP a/b | all 32-bit sources |

Result registers:

* **REG1** (32 bit) takes SAC1..SAC9 or ROUND1 (sign-extended), selected by 0..9.
* **REG2** (32 bit) takes MULT, ADD32, ADD16A (sign-extended), SHIFT, SAC3, SAC5,
  SAC7 or SAC9.
* **REG3** (16 bit) takes ADD16B, SQUARE or ROUND2.

The SAC chain is split by ROUND1. A rounded partial sum can then become the data
operand of a later SAC in the same cycle. The codebook search needs exactly this.

## The configuration word

`acs_pkg::acs_cfg_t` is a packed struct with one sub-struct per unit:

* an enable bit;
* one select field per operand;
* where the unit has them, a shift field `n` and a `sub` bit;
* the write enables and selects of the three result registers (`regs`).

The CMP enable is also the write enable of `o_cmp`.

**Operand isolation.** A unit whose enable is clear sees zero on all its operands
(`acs_opmux` forces its output to zero). Idle units therefore do not toggle. The
same applies to a result multiplexer whose register is not written.

## Mapping the search: one pulse pair

The end-to-end testbench (`tb/tb_acs_top.sv`) acts as the host. It searches the
best pair (i2, i3) for two tracks of a 40-sample subframe. It uses three
configurations, each fetching its operands through the ten read ports in one
cycle.

**Outer step, once per i2, one cycle.** Two independent graphs run side by side:

* `ps1 = dn[i0] + dn[i1] + dn[i2]` uses ADD16A and ADD16B and goes to REG3;
* `alp1` = the six scaled rr terms uses SAC1 to SAC6 and goes to REG1.

That is eight operations in one cycle. The host copies `ps1` and `alp1` into
memory.

**Step A, per i3:**

| result | computed by | written to |
|---|---|---|
| `ps2 = ps1 + dn[i3]` | ADD16A | |
| `sq2 = ps2²` | SQUARE | REG3 |
| `rrv = round(rr33/8 + rr03/4 + rr13/4)` | SAC1..SAC3, ROUND1 | |
| `alp2 = alp1 + rrv/2 + rr23/8` | SAC5, SAC6 | REG1 |
| `alp16 = round(alp2)` | ROUND2 | |
| `sq·alp16`, `sq` from HD0 | MULT | REG2 |

**Step B, issued in the next cycle:**

| result | computed by | written to |
|---|---|---|
| `alp·sq2`, `alp` from HD1 | MULT, operands HD1 and REG3 | |
| `s = alp·sq2 − REG2` | ADD32 | REG2 |
| `s > 0` | CMP | `o_cmp` |
| `alp16 = round(REG1)` | ROUND2 | REG3 |

The best `sq` and `alp` found so far live in the host and reach the datapath on
the direct inputs. When `o_cmp` is set, the host replaces them with `sq2` (read
from REG3 after step A) and `alp16` (read from REG3 after step B).

There is only one general multiplier, and the inner body needs two products plus
a square. So one inner iteration takes two configurations.

## Files

`rtl/`:

| file | contents |
|---|---|
| `acs_pkg.sv` | source encodings, configuration struct, saturation helpers |
| `acs_top.sv` | memory plus core |
| `acs_core.sv` | unit pool, operand and result multiplexers, configuration register, REG1–3 |
| `acs_sac.sv`, `acs_shift.sv`, `acs_round.sv`, `acs_square.sv`, `acs_booth_mult.sv`, `acs_add16.sv`, `acs_add32.sv`, `acs_cmp.sv` | the arithmetic units |
| `acs_opmux.sv` | multiplexer with isolation |
| `acs_memory.sv` | 2048×16 memory, one write port, ten synchronous read ports |

`tb/`: one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`.

* The unit testbenches compare against 64-bit integer models. The square is
  tested exhaustively.
* `tb_acs_core` runs 3000 random configurations against a behavioural model that
  evaluates the units in datapath order. It also checks the two-edge latency and
  that an idle cycle writes nothing.
* `tb_acs_top` runs the pair search above for three data sets, at full size, and
  compares every intermediate register and the chosen pair with a reference
  search. One data set is built to saturate the correlation sums. The test counts
  each of these events and fails if any never happens: direct host operands, parallel graphs, chaining,
  per-cycle reconfiguration, register feedback, comparator outcomes both ways,
  saturation and isolation.

To simulate a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/acs_pkg.sv tb/tb_acs_top.sv --top-module tb_acs_top
./obj_dir/Vtb_acs_top
```

To run another testbench, use its file and module name instead. Every testbench
finishes in well under a second.

## Design choices beyond the architecture description

The original description fixes the overall architecture:

* the unit pool, with nine SACs, a shifter, two rounders, a square unit, a Booth
  multiplier, two 16-bit adders, a 32-bit adder and a comparator;
* the widths;
* MUXREG1 with ten 32-bit inputs, MUXREG2 with eight (including SAC3, SAC5, SAC7
  and SAC9), and MUXREG3 with the 16-bit units;
* saturation in every unit, and operand isolation;
* a configuration that the host rewrites and that takes effect one cycle later.

The following are this implementation's own:

* **Multiplexer source lists and unit order.** The description says every unit
  has an input multiplexer but not what each one can reach. The order above was
  chosen so that the dataflow of the codebook search maps onto it and no loop is
  possible.
* **Position of ROUND1** between SAC4 and SAC5.
* **MUXREG1 inputs.** They are SAC1..SAC9 and ROUND1. The shifter output and the
  memory words are offered to the SAC accumulator multiplexers instead.
* **Memory and host data.** The memory's size, its ten read ports, 32-bit
  operands built from word pairs, and its one-cycle read latency. The number of
  direct host words (two), and their registration together with the
  configuration. It is written as a register array, where a chip
  would use SRAM.
* **Small extensions.** Subtract modes on the adders, and REG1 to REG3 usable as
  operands.
* **Reset.** A synchronous, active-low reset that clears the configuration and
  the result registers.
* **Multiplier internals.** The Booth multiplier uses radix-4 recoding. The
  square unit, specified as a library multiplier, is a plain signed multiply here.

## Limits

* **Cycle count.** The architecture was reported to need about 1,600 cycles for
  a full frame. With one multiplier, this datapath needs two cycles per inner
  search iteration, plus host time for bookkeeping. The full 12.2 kbit/s search
  (about 4,096 inner iterations per frame) would need about 8,200 datapath
  cycles. The loop counts behind the 1,600-cycle figure are not known, so the two
  numbers cannot be reconciled here.
* **Host program.** Only one pair search is exercised. The other loop levels
  (the choice of i0 and i1, and the further pulse pairs) are host programs of the
  same kind and are not included.
* **Area and power.** Nothing here models area or power. Isolation is functional
  only: a disabled unit sees constant zero operands.
