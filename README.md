# mul8: an 8 × 8 shift-and-add binary multiplier

This is a small sequential multiplier for two unsigned 8-bit numbers. It works the
way multiplication is done with pencil and paper. It looks at the multiplier one
bit at a time, least significant bit first. When the bit is 1, it adds the
multiplicand into the upper half of a 16-bit accumulator. Then it shifts the whole
accumulator one place to the right. Eight add/shift pairs take 16 clocks and leave
the product in the accumulator.

The design was drawn as a gate-level schematic for a small FPGA of the Altera
FLEX8000 family. The RTL keeps that structure block for block: full adders, 4-bit
registers built from AND/OR gates and D flip-flops, a 4-bit counter and a few
gates of control. Little is abstracted away, so it is a readable reference for how
such a multiplier is wired. It is not meant as a fast multiplier.

```
 start ─► clkkey ─pulse─► mul8sta ─┬─ ld ──────────────► AND ─ ld_acc ─┐
                                   ├─ sh ──┬──────────────┼────────────┤
                                   └─ done ┼─► NOT ─ load │            │
                                           ▼              │ mbit       ▼
 a[7:0] ──────────────────────────► mplr_shreg ───────────┘        mul8acc ─► c[15:0]
                                                                   ▲   ▲  │
 b[7:0] ─► add8.x    add8.s[7:0] ─────────────────────────── d_hi ─┘   │  │
           add8.co ─────────────────────────────────────────── carry ──┘  │
           add8.y ◄────────────────────────────────────────── c[15:8] ────┘
```

## The algorithm, step by step

The accumulator holds 17 bits: a carry flip-flop `cy` on top of the product
register `c[15:0]`. One add/shift pair for multiplier bit `a[k]` does this:

| clock | counter | control | effect |
|-------|---------|---------|--------|
| 2k    | even    | `ld`    | if `a[k]` = 1: `{cy, c[15:8]} <= c[15:8] + b` (the lower half holds). If `a[k]` = 0: nothing changes. |
| 2k+1  | odd     | `sh`    | `{cy, c} <= {0, cy, c[15:1]}`, and the multiplier register shifts so `a[k+1]` is next. |

After the eighth shift, `c` holds `a * b`. The lower half `c[7:0]` is never loaded.
It only receives the bits that the shifts move down from the upper half.

Worked example: multiplier `a` = 13 (1101), multiplicand `b` = 10 (1010).

| step | bit | after add | after shift |
|------|-----|-----------|-------------|
| 0 | 1 | 0x0A00 | 0x0500 |
| 1 | 0 | (none)    | 0x0280 |
| 2 | 1 | 0x0C80 | 0x0640 |
| 3 | 1 | 0x1040 | 0x0820 |
| 4-7 | 0 | (none) | 0x0410, 0x0208, 0x0104, 0x0082 = 130 |

An add can overflow 8 bits: 0xFF + 0xFF gives carry 1. That carry is why the
carry flip-flop exists. The next shift moves it into `c[15]`, so no bit is lost.
The carry flip-flop then takes 0.

## Blocks

### Datapath

- **`fadd`**: one-bit full adder. Sum is `x ^ y ^ ci`. Carry is the majority of the three inputs.
- **`add4`**: four `fadd` cells in a ripple chain.
- **`add8`**: two `add4` blocks chained through the carry. In the multiplier, `x` = `b`,
  `y` = `c[15:8]` and `ci` = 0. The sum goes to the accumulator's parallel inputs and
  the carry out to its `carry` input.
- **`pipo4`**: 4-bit parallel-in/parallel-out shift register. The next state of each bit is
  `sh & (previous bit) | ld & d[i] | ~sh & ~ld & q[i]`. The previous bit of `q[0]` is
  the serial input `si`. Shifts move from `q[0]` towards `q[3]`. `nclr` clears it
  asynchronously. If `sh` and `ld` were both high, each bit would take the OR of the
  two values. The control never does this.
- **`mul8acc`**: the accumulator. It has four `pipo4` registers and the carry flip-flop.
  Each register's `q[3]` feeds the next register's `si`, and the carry flip-flop
  feeds the first register's `si`. In the registers' own pin numbering, pin `Q0` of
  the top register is product bit 15. The wrapper maps the pins so that its `q`
  port uses product bit numbering. The two lower registers have `ld` tied low.
- **`mplr_shreg`**: the multiplier register. It has two `pipo4` registers that load `a`
  and present it on `mbit`, LSB first, with zeros entering at the top. It also
  holds the AND gate `ld_acc = mbit & ld`, which lets the add happen only for 1 bits.

### Control

- **`clkkey`**: turns the `start` key into a pulse one clock long. It uses two flip-flops:
  `q1 <= key` and `pulse <= key & ~q1`. A key held down gives one pulse only. To
  start again, the key must be released first.
- **`counter4`**: 4-bit synchronous up counter with enable, active-low synchronous clear
  and carry out.
- **`mul8sta`**: the control pulse generator. The run flip-flop `Q` has the next state
  `start & ~Q | Q & ~(&count)`. `Q` enables the counter and releases its clear. The
  outputs are `ld = Q & ~count[0]` and `sh = Q & count[0]`. `Q` rises on the edge
  after the start pulse and falls on the edge that wraps the counter from 15 to 0,
  16 clocks later. A start pulse during a run is ignored. Its output pin is called
  `ndone` and is high while busy.

## Using it

Ports of `mul8`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `nclr` | in | 1 | asynchronous clear of every flip-flop, active low |
| `start` | in | 1 | start key (level, synchronous to `clk`) |
| `a` | in | 8 | multiplier |
| `b` | in | 8 | multiplicand |
| `c` | out | 16 | product |
| `done` | out | 1 | high while a multiplication runs |

To multiply:

1. Pulse `nclr` low. **The accumulator is not cleared by `start`.** Starting without a
   clear adds the new product on top of what is left of the old one.
2. Set `a` and `b`. While idle, the multiplier register reloads `a` on every clock.
3. Raise `start`. The first clock edge that sees it high makes the start pulse. The
   second edge raises `done`. `a` is captured on that second edge and may change
   afterwards. `b` must be held until `done` falls.
4. `done` stays high for 16 clocks. From the edge that lowers it, `c` = `a * b`, and
   `c` holds that value until the next `nclr`.
5. Release `start` before the next multiplication.

From the first clock edge that sees `start`, the product is ready after 17 clock
edges.

## How this RTL relates to the original schematic

It follows the original closely:

- the block structure and every connection of the top level;
- the gate equations of `pipo4`, of the carry flip-flop and of `clkkey`;
- the control equations;
- the LSB-first bit order and the 16-clock run.

Choices made here, where the original is silent or unclear:

- **Full-adder carry.** It is written as `x&y | x&ci | y&ci`. The original draws three
  AND gates into an OR but does not say which inputs feed which gate.
- **Counter.** The original gives only its function and pins. The clear is active low and
  synchronous. It behaves the same at every edge as an asynchronous clear would,
  because the flip-flop that drives it changes only on clock edges. The carry out is
  `en & (&q)` and is unused.
- **Stop condition.** One description of the original gives the stop condition as
  `~Q0 & Q1 & Q2 & ~Q3`. This RTL uses the all-ones NAND from the original's equation
  and gate drawing, which gives the stated 16 clocks per multiplication.
- **Order of operations.** Each run is load first, then shift, because the counter
  starts at 0. A shift first would discard `a[0]` before it is used.
- **Operand names.** The original names the operands two ways. Here `a` is the
  multiplier, which gates the adds, and `b` is the multiplicand, which feeds the
  adder. That matches the schematic.
- **`done` output.** This port is added here. In the original, the busy signal is used
  only inside the design.
- **Constant inputs.** The unconnected parallel inputs of the two lower accumulator
  registers are tied to 0.
- **Parameters.** `pipo4` and `counter4` take a `WIDTH` parameter, default 4. The top
  has no parameters. `mul8_pkg` holds the widths (`OPW` = 8, `PRODW` = 16) and the run
  length (`RUN_CYCLES` = 16).

The original was built on an Altera EPF8282A FLEX8000 device. That device has 208
logic elements; the figure is general knowledge, not from the original. This design
has 32 flip-flops and a few dozen lookup tables of logic, so it fits easily. The
board, the switches and the push-button clock used to exercise it are not part of
this RTL.

## Files

`rtl/`: `mul8_pkg.sv` (shared constants), `fadd.sv`, `add4.sv`, `add8.sv`, `pipo4.sv`,
`mul8acc.sv`, `mplr_shreg.sv`, `clkkey.sv`, `counter4.sv`, `mul8sta.sv`, and `mul8.sv`
(the top).

`tb/`: one self-checking testbench per module, named `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops. Each has a watchdog that counts a failure
if the test hangs.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_mul8 \
    -y rtl -y tb +libext+.sv rtl/mul8_pkg.sv tb/tb_mul8.sv
./obj_dir/Vtb_mul8
```

Replace `tb_mul8` with any other testbench name to run that test. The package file
must come first on the command line.

## What the tests check

- `tb_fadd`, `tb_add4` and `tb_add8` are exhaustive. `tb_add8` runs all 2^17 input
  combinations.
- `tb_pipo4`, `tb_counter4`, `tb_clkkey`, `tb_mul8sta`, `tb_mul8acc` and
  `tb_mplr_shreg` drive random stimulus and compare against reference models,
  clock by clock.
- `tb_mul8sta` also checks the exact 16-clock run length and the ld/sh alternation. It
  checks that a start during a run is ignored.
- `tb_mul8acc` also performs multiplications by driving the accumulator's ports by
  hand.
- `tb_mul8` runs the whole multiplier on all 65,536 operand pairs at its default size,
  starting with 13 × 10. It checks the product, the clock at which `done` rises and
  how long it stays high. It checks that a held or re-pressed key does not start a
  second run. It also counts how often each mechanism occurs: start pulse, add,
  skipped add, adder carry, carry shifted into `c[15]`, idle reload of `a`, and key
  press ignored while busy. If any of them never occurs, that counts as a failure.
  The test takes about a second.
- `tb_mul8_trace` follows 13 × 10 and 255 × 255 through the complete multiplier
  clock by clock. It compares `c` after every load and shift with the partial
  product of the pencil-and-paper method.
