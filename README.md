# 32x32-bit multiply-accumulate unit on a Vedic multiplier

This is a multiply-accumulate (MAC) unit for 32-bit unsigned operands. Each
clock cycle it multiplies `operand_1` by `operand_2` and adds the 64-bit
product to a 64-bit accumulator. The multiplier uses the Urdhva
Tiryakbhyam ("vertically and crosswise") method of Vedic arithmetic. The
method splits a product into four smaller products that are all formed at
the same time. Applied recursively, this gives a tree of 2x2-bit
multipliers joined by adders. Every adder, both inside the multiplier and in
the accumulation, is a carry lookahead adder, chosen because it is the fastest
option.

```
 operand_1 ─┐   operand_2 ─┐
            v              v
      ┌──────────────────────────┐
      │ vedic_mul32 (32x32 tree) │  combinational
      └────────────┬─────────────┘
                   │ product[63:0]
      ┌────────────v─────────────┐
      │ cla_adder, 64 bits       │<──────────┐ result (feedback)
      └────────────┬─────────────┘           │
                   │ sum, cout               │
      ┌────────────v─────────────┐           │
      │ mac_accumulator (64 + 1) │───────────┘
      └──────┬──────────┬────────┘
             v          v
           carry      result[63:0]
```

## The multiplier tree

### The 2x2 leaf (`vedic_mul2`)

Take a = a1 a0 and b = b1 b0. The product comes out in three steps:

1. **Vertical:** `q0 = a0·b0`.
2. **Crosswise:** a half adder adds `a1·b0` and `a0·b1`. Its sum is `q1`.
3. **Vertical:** a second half adder adds `a1·b1` and the carry from step 2.
   Its sum is `q2` and its carry is `q3`.

A one-bit product is an AND gate. The leaf is therefore 4 AND gates and 2
half adders, with no carry chain longer than two bits.

### Splitting an N x N product (`vedic_mul4` ... `vedic_mul32`, `vedic_combine`)

An N x N block (N = 2H) splits each operand into a high half and a low
half. Four H x H blocks then form all four partial products in parallel:

| name | operands          | weight |
|------|-------------------|--------|
| q0   | a_lo × b_lo       | 1      |
| q1   | a_hi × b_lo       | 2^H    |
| q2   | a_lo × b_hi       | 2^H    |
| q3   | a_hi × b_hi       | 2^2H   |

The three adders are not arranged as a plain "sum the four shifted products"
step. This is the part of the design that is easiest to misread:

- The low H bits of the result are `q0[H-1:0]` directly. Nothing is ever
  added to them.
- The **left adder** (3H bits) computes `{q3, H zeros} + q2`, which is
  `q3·2^H + q2`.
- The **right adder** (2H bits) computes `q1 + q0[2H-1:H]`.
- The **bottom adder** (3H bits) adds the two. Its output is result bits
  `[4H-1:H]`.

Every sum fits its adder: `q3·2^H + q2 < 2^3H`, `q1 + (q0 >> H) < 2^2H`, and
the total divided by 2^H is below 2^3H. So no adder in the tree ever carries
out, and the carry outputs are left open (Verilator reports them as
`PINCONNECTEMPTY`). The left and right adders work in parallel. Each level
of the tree therefore adds two adder delays to the critical path of the
level below it.

`vedic_combine #(H)` is this three-adder stage. The fixed-width modules
`vedic_mul4`, `vedic_mul8`, `vedic_mul16` and `vedic_mul32` each consist of
four copies of the next smaller multiplier plus one `vedic_combine`. The
adder widths per level are:

| block  | H  | left / bottom adder | right adder |
|--------|----|---------------------|-------------|
| 4x4    | 2  | 6                   | 4           |
| 8x8    | 4  | 12                  | 8           |
| 16x16  | 8  | 24                  | 16          |
| 32x32  | 16 | 48                  | 32          |

The full 32x32 multiplier holds 256 2x2 leaves and 85 `vedic_combine`
stages (1 + 4 + 16 + 64), so 255 carry lookahead adders. The accumulation
adder brings the total to 256.

## The carry lookahead adder (`cla_adder`, `cla_tree`, `cla_lookahead4`)

Each bit forms a generate `G = A·B` and a propagate `P = A xor B`.
`cla_lookahead4` is the classic 4-bit lookahead unit. It computes

```
C1 = G0 + P0·C0
C2 = G1 + P1·G0 + P1·P0·C0
C3 = G2 + P2·G1 + P2·P1·G0 + P2·P1·P0·C0
C4 = G3 + P3·G2 + P3·P2·G1 + P3·P2·P1·G0 + P3·P2·P1·P0·C0
```

It also outputs the group generate and group propagate of its four inputs.
The sum is `S = P xor C`.

For words wider than 4 bits, `cla_tree` pads the word to a power of four
using G = 0 and P = 1 (a neutral element) and builds levels of these units:

- Level 0 works on bits, in groups of four.
- Level 1 works on the level-0 group terms, again in groups of four.
- This continues until one unit remains. That unit takes the adder's carry in.

Carries flow down from the top unit. A 64-bit adder has three levels:
16 + 4 + 1 units. `WIDTH` may be any positive number. The tests cover
4, 6, 8, 12, 16, 24, 32, 48 and 64 bits.

## Accumulation, carry and timing (`mac_accumulator`, `vedic_mac32`)

- `result` is the 64-bit accumulator register.
- `carry` is a 1-bit register. It holds the carry out of the most recent
  accumulation, meaning that this addition wrapped past 2^64. It is not
  sticky: the next accumulation that does not wrap clears it. The
  accumulator itself keeps the sum modulo 2^64.
- On every rising `clk` edge with `reset_low` high, the register loads
  `result + operand_1 × operand_2`. The unit accumulates every cycle; there
  is no enable.
- While `reset_low` is low, the edge clears both registers (synchronous
  reset).
- Operands set up before an edge are included in `result` right after that
  edge. That is one product per clock, with one cycle of latency.
- The critical path runs through the whole multiplier tree and the 64-bit
  adder. There is no pipelining.

Shared widths (`OPERAND_W = 32`, `ACC_W = 64`) and the types `operand_t` and
`acc_t` are in `vedic_mac_pkg`.

## Where this RTL departs from or adds to the original design

- **Clock and register.** The original unit was reported as fully
  combinational, with no clock. A real accumulator must hold state, so this
  version adds `clk` and a register. It also adds a synchronous active-low
  reset, because the original had no asynchronous controls.
- **Adder choice inside the multiplier.** One description of the original
  names a carry save adder for the partial products. The final design
  choice was the carry lookahead adder for all additions, and that is what
  is built here.
- **Two labels in the original block diagrams were corrected:**
  - In the 8x8 diagram, the right adder input is labelled with a 9-bit slice
    `q0[8:4]`. It is `q0[7:4]` here.
  - In the 32x32 diagram, the left adder's second input is labelled with
    `q0`. It is `q2` here, as at every other level.
- **Lookahead above 4 bits.** Only the 4-bit lookahead equations are given.
  The multi-level tree for wider words is this design's own construction.
- **Not specified, chosen here:**
  - operands are unsigned
  - the adder carry in is 0
  - the carry output is registered and not sticky
- **Not built:** the ripple carry, carry skip and carry save adders. They
  served only as points of comparison when choosing the adder. FPGA delay,
  area and power figures are not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_vedic_mul2/4/8`  | every operand pair, against the simulator's `*` |
| `tb_vedic_mul16/32`  | single-bit and all-ones corner cases, plus 20,000 random pairs |
| `tb_cla_adder`       | 9 widths, full-length carry ripples from `cin`, plus 20,000 random triples |
| `tb_mac_accumulator` | load, clear and carry storage with one-cycle latency |
| `tb_vedic_mac32`     | end to end at default sizes, against a 65-bit reference sum |

`tb_vedic_mac32` checks `result` and `carry` after every edge. It mixes
random operands, runs of all-ones operands (to force `carry`), small
operands, and resets in the middle of a run. It counts reset clears, plain
accumulations and accumulations with carry out, and fails if any of the
three never happened.

Each testbench was also run against a copy of its module with one
deliberate bug. Every one of those bugs was caught. All RTL lints cleanly
with `verilator --lint-only -Wall`, apart from the open carry-out pins noted
above and unused padding bits in `cla_tree`.

## Simulating

From the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/vedic_mac_pkg.sv tb/tb_vedic_mac32.sv --top-module tb_vedic_mac32 -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The package file must come
first, and `-y rtl` finds the other modules by file name. The 32x32 build
takes about 20 s to compile, and each simulation runs in well under a
second.

## Files

- `rtl/vedic_mac_pkg.sv`: widths and types
- `rtl/vedic_mac32.sv`: top-level MAC unit
- `rtl/mac_accumulator.sv`: 64-bit accumulator and carry register
- `rtl/vedic_mul2.sv` ... `rtl/vedic_mul32.sv`: multiplier tree levels
- `rtl/vedic_combine.sv`: three-adder join stage used by every level
- `rtl/cla_adder.sv`, `rtl/cla_tree.sv`, `rtl/cla_lookahead4.sv`: carry lookahead adder
- `tb/tb_*.sv`: one self-checking testbench per module above (the helpers
  are covered by the testbenches of the modules that use them)
