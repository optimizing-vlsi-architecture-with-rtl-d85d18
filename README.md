# Pipelined inexact speculative adder on carry look-ahead blocks

A wide binary adder is slow because a carry may have to travel from the
least to the most significant bit. This design gives up exactness in rare
cases to break that chain. The N-bit addition is cut into blocks of X bits
(32 and 4 by default). Each block is a small carry look-ahead adder. Its
carry-in does not come from the block below. A speculator guesses it from
only the two top operand bit pairs of the block below. So no carry travels
further than one block plus two bits.

When a guess is wrong, a compensator on that block boundary repairs the
result exactly if it can. If it cannot, it makes the error smaller. The
whole adder is then cut into five short pipeline stages, one operation per
clock. Each stage's registers get a gated clock, so stages with nothing to do
draw no clock power.

The architecture (block structure, speculator, compensator rules, five
stages, per-stage clock gating) follows a published inexact speculative
adder design. Where that description stops, this RTL makes its own choices.
They are listed in [Own choices and departures](#own-choices-and-departures).

## Structure

```
          a[31:28] b[31:28]   a[27:24] b[27:24]  ...   a[3:0] b[3:0]
              |                   |                        |
  pspec(blk6)-+->  pcla blk7      pcla blk6  <-pspec(blk5)  pcla blk0 <- cin
                     |  \           |  \                     |  \
                     |   c_o        |   c_o                  |   c_o
                  pcomp(6)  ...  pcomp(5) ...             pcomp(0)
                     |                                        |
                  cout, sum[31:0]
```

For N = 32 and X = 4 there are:

- 8 blocks, `pcla`.
- 7 speculators, `pspec`. Speculator i reads bits 4i+3 and 4i+2 of `a` and
  `b`.
- 7 compensators, `pcomp`. Compensator i sits between block i and block i+1.

The guess of speculator i is the carry-in of block i+1. Compensator i
compares that guess with the real carry-out of block i. Block 0 takes the
external `cin`. The carry-out of block 7 is `cout`.

## The speculator

With G = A & B and P = A ^ B on the two top bits of a block, the guess is

    C_so = G[msb] | P[msb] & G[msb-1]

This is the look-ahead carry of the top two bits, with the carry into them
taken as 0. The real carry-out of the block is the same expression plus the
term `P[msb] & P[msb-1] & c`, where c is the carry into bit msb-1. So the
guess is either right or **one too low, never too high**. Everything
downstream relies on this.

## Compensation: correction and balancing

Suppose speculator i guessed 0 and block i really produced a carry. Block i+1
then added one too little. Its sum is short by exactly 2^(X(i+1)).
Compensator i sees the mismatch one stage after the block sums exist. Then
one of two things happens.

- **Correction.** A 1-bit incrementer adds 1 to the LSB of block i+1's sum.
  If that bit is 0, the increment cannot carry any further. The bit is set,
  and the result at this boundary is now exact.
- **Balancing.** If that bit is 1, the increment would ripple upward, which
  is the slow carry chain the design avoids. Instead, the two top sum bits
  of block i are forced to `11`.

Why balancing works: whenever a wrong guess happens, those two bits are
always `00`. The carry was produced by propagating through both of them, so
both sum bits came out 0. Forcing them to `11` adds 3·2^(X(i+1)-2). That
leaves the boundary short by exactly 2^(X(i+1)-2), a quarter of the original
error.

The bits the compensators touch never overlap, because X ≥ 3. Compensator i
corrects bit X(i+1) and balances bits X(i+1)-1 and X(i+1)-2. So for every
operation:

    {cout, sum} = a + b + cin − Σ over balanced boundaries i of 2^(X(i+1) − 2)

If no boundary is balanced, the result is exact. The testbenches check this
identity directly on every result. The `corrected` and `balanced` outputs
show what each compensator did.

In the RTL, the compensator has two parts:

- an XOR error detector and a 1-bit incrementer (stage 4);
- a de-multiplexer steered by the incrementer's carry, which picks
  correction or balancing, and two multiplexers that choose between the
  original bits and the repaired ones (stage 5).

### Accuracy

These figures come from a bit-exact model of the rules above, over 200,000
uniformly random operand pairs with `cin` = 0:

| width | results exact | operations with at least one correction | mean relative error | largest error |
|------:|------:|------:|------:|------:|
| 8  | 95.4 % | 4.7 %  | 9.6e-4 | 4 |
| 16 | 84.2 % | 15.6 % | 1.3e-3 | 1092 |
| 32 | 65.7 % | 33.7 % | 1.3e-3 | 71,581,696 |

At each boundary, a wrong guess has probability of about 1/8. Half of
those are corrected exactly and half are balanced. The error is always
below the true sum (the adder never overshoots).

## Pipeline and clock gating

The design has six register ranks with five logic stages between them:

| rank | clock | holds | logic in front of it |
|---|---|---|---|
| R0 | `gclk[0]` | `a`, `b`, `cin` | none (input capture) |
| R1 | `gclk[1]` | per-bit P and G; speculated carries; `cin` | XOR/AND per bit; speculators |
| R2 | `gclk[2]` | look-ahead carries of every block | flattened sum-of-products carries (two gate levels) |
| R3 | `gclk[3]` | block sums, block carry-outs | P XOR C |
| R4 | `gclk[4]` | error flags, incremented LSBs | XOR detector, 1-bit incrementer |
| R5 | `gclk[5]` | `sum`, `cout`, `corrected`, `balanced` | de-multiplexer and multiplexers |

The look-ahead carries are fully flattened, with no ripple inside a block.
For example, with X = 4:

    C4 = G3 | P3·G2 | P3·P2·G1 | P3·P2·P1·G0 | P3·P2·P1·P0·cin

The carry-in is used in stage 2, one clock after the operands. That is why
it can be the registered guess of a speculator. The speculated carries are
delayed through R2 and R3, so each compensator compares the guess and the
carry-out of the same operation.

**Clock gating.** A one-bit valid shift register runs on the free-running
clock. It is the only state that reset touches. Each rank R_k has its own
`clock_gate` cell, enabled by the valid bit of the rank before it (R0 uses
`in_valid`). A rank therefore gets exactly one clock edge per operation
passing through it, and none otherwise. Data registers are never reset. They
simply keep their last value while gated, so the outputs hold between
results.

`clock_gate` is the standard latch-based integrated clock gate. A latch is
open while `clk` is low and holds the enable while `clk` is high. The gated
clock is `clk & held_enable`. An enable that changes just after a rising
edge therefore cannot chop or glitch the gated clock. Synthesis reports one
latch per gate; that latch is intended.

## Interface and timing (`isa_adder`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | free-running clock |
| `rst_n` | in | 1 | synchronous, active-low; clears the valid chain only |
| `in_valid` | in | 1 | `a`, `b`, `cin` hold an operation this cycle |
| `a`, `b` | in | N | operands |
| `cin` | in | 1 | carry into block 0 |
| `out_valid` | out | 1 | `sum`/`cout`/flags hold a new result |
| `sum` | out | N | compensated sum |
| `cout` | out | 1 | carry-out of the top block (computed with its speculated carry-in) |
| `corrected` | out | N/X−1 | bit i: compensator i corrected the LSB of block i+1 |
| `balanced` | out | N/X−1 | bit i: compensator i balanced the top two bits of block i |

Timing:

- An operation sampled at a rising edge appears at the outputs, with
  `out_valid` high, right after the fifth following rising edge.
- Throughput is one operation per clock, with no back-pressure.
- Parameters: `N` (default 32) and `X` (default 4). `N` must be a multiple of
  `X`, with at least two blocks and `X ≥ 3`. Elaboration stops with an error
  otherwise.
- The speculation window is fixed at two bits, and the correction width at
  one bit.

## Files

| file | contents |
|---|---|
| `rtl/isa_pkg.sv` | default sizes and the stage/rank counts |
| `rtl/isa_adder.sv` | top: blocks, speculators, compensators, delay registers, valid chain, clock gates; assertion that a guess is never too high |
| `rtl/pcla.sv` | X-bit carry look-ahead block, three ranks (P/G, carries, sums) |
| `rtl/pspec.sv` | two-bit carry speculator with output register |
| `rtl/pcomp.sv` | compensator, two ranks |
| `rtl/clock_gate.sv` | latch-based clock gate |
| `tb/tb_isa_adder.sv` | end-to-end test of the default 32-bit adder |
| `tb/tb_isa_widths.sv` | the same at 16 and 8 bits |
| `tb/isa_check.sv` | scoreboard used by both: reference model, error identity, latency, output hold, event counts |
| `tb/tb_pcla.sv`, `tb/tb_pcla_x3.sv`, `tb/tb_pspec.sv`, `tb/tb_pcomp.sv`, `tb/tb_clock_gate.sv` | exhaustive unit tests |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
From the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/isa_pkg.sv tb/tb_isa_adder.sv --top-module tb_isa_adder
./obj_dir/Vtb_isa_adder
```

Swap in any other `tb_*` file and top module to run that test. Each one
finishes in well under a second.

## What the tests establish

- **`tb_isa_adder`** runs 20,000 operations through the default 32-bit adder.
  The stimulus mixes random operands, all-ones-plus-small operands (every
  boundary mis-speculates), all-propagate operands, random gaps in
  `in_valid`, and 20-cycle idle stretches. Every result is checked three
  ways:
  - against a reference model written from the rules above;
  - against the error identity;
  - for exact latency and order.

  Outputs must hold while `out_valid` is low. Each rank's gated clock must
  pulse exactly 20,000 times. The run fails if any of these never happens:
  an exact result, a correction, a balancing, a fully gated cycle,
  back-to-back operations, or `cin` = 1.
- **`tb_isa_widths`** does the same at 16 and 8 bits.
- **Unit tests.** `tb_pcla` covers all 512 operand/carry combinations of a
  4-bit block and its 3-cycle latency; `tb_pcla_x3` covers all 128 of a
  3-bit block. `tb_pspec` covers all 16 bit-pair
  combinations. `tb_pcomp` covers all 32 input combinations. `tb_clock_gate`
  changes the enable at random points of both clock phases and checks that
  only low-phase values reach the gated clock.

Not established: timing and power. The published work reports FPGA and
0.12 µm CMOS figures for its own implementation. Nothing here was
synthesized to a timing or power target.

## Own choices and departures

- **Pipeline stages.** The published design says there are five stages and
  six register ranks. It does not say which logic goes where. The split in
  the rank table is this design's choice. So is the one-cycle-late carry-in
  of `pcla`, and the delay registers that align guesses with carry-outs.
- **Clock gating.** The published design gates each pipeline stage's clock.
  The latch-based cell and the valid chain that drives it are this design's
  own.
- **Handshake, reset and flags.** The `in_valid`/`out_valid` handshake, the
  reset scheme and the `corrected`/`balanced` outputs are additions.
- **Speculator.** It assumes no carry into its two-bit window. Only the
  "guess too low" error is repaired. This matches the compensator's fixed
  `+1` and `11` constants.
- **Block width.** `X ≥ 3` is required so that corrected and balanced bits
  never overlap. The published design uses X = 4 only.
- **Not built.** The non-pipelined speculative adder (used only as a
  comparison baseline) and the transistor-level layouts of the published
  work.
