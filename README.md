# 16x16 Vedic multiplier with memory-based adders

This is a 16x16-bit unsigned multiplier. It forms the product by the
*Urdhva Tiryakbhyam* ("vertically and crosswise") rule of Vedic
arithmetic, applied recursively to binary operands. A 2x2 product is a
handful of gates. A 4x4 product is four 2x2 products of the operand halves,
added together. The same step builds 8x8 from 4x4 and 16x16 from 8x8.

What sets this version apart is its adder. Every adder in the tree is a
chain of one-bit multiplexer full adders in which **the carry between
neighbouring bits is stored in a flip-flop**. The logic between two clock
edges is therefore one full adder, whatever the width. The cost is
latency: a carry moves one bit position per clock. The multiplier's output
is correct only after its carries have had time to pass through every
adder. A small sequencer at the top holds the operands for a fixed,
proven-safe number of cycles and then captures the product.

## The multiplication tree

For an N x N block, split the operands into N/2-bit halves, `a = {aH, aL}`
and `b = {bH, bL}`. Four half-size blocks compute, all at the same time:

    q0 = aL*bL    q1 = aH*bL    q2 = aL*bH    q3 = aH*bH

Three adders then combine them (`vedic_combine`):

    s1 = q1 + {N/2 zeros, q0[N-1:N/2]}          N-bit adder
    s2 = {q3, N/2 zeros} + {N/2 zeros, q2}      3N/2-bit adder
    s3 = s2 + {zeros, s1}                       3N/2-bit adder
    product = {s3, q0[N/2-1:0]}

The low N/2 bits of `q0` are already final product bits, so they skip the
adders. The adder widths are the smallest that hold each sum. No carry-out
can be set when the inputs are real products, so the carry-outs are left
unconnected. For the 16-bit top level, the adders are 16, 24 and 24 bits
wide.

The hierarchy is:

    vedic16                 top: operand registers + start/busy/done sequencer
    └─ vedic_mult16         4 x vedic_mult8  + vedic_combine #(16)
       └─ vedic_mult8       4 x vedic_mult4  + vedic_combine #(8)
          └─ vedic_mult4    4 x vedic_2x2    + vedic_combine #(4)
             └─ vedic_2x2   4 AND gates, 2 half adders (combinational)
    vedic_combine           3 x mem_mux_adder
    mem_mux_adder           (W-1) x mem_fa + 1 x mux_full_adder
    mem_fa                  mux_full_adder + carry flip-flop
    vedic_pkg               settling-time functions, MULT_WIDTH = 16

At 16 bits this gives 64 `vedic_2x2` leaves and 21 `vedic_combine` stages
(1 + 4 + 16). There are 63 adders with 385 carry flip-flops in total.
Synthesis removes 56 of them: in the low half of each `s2` adder one
operand is zero, so those carries can never be 1. That leaves 329.

`vedic_2x2`: `q0 = a0 b0`. The two cross products `a1 b0` and `a0 b1` go
into a half adder, which gives `q1` and a carry. That carry and `a1 b1` go
into a second half adder, which gives `q2` and `q3`.

## The adder: multiplexer full adder plus a stored carry

**`mux_full_adder`** uses `x = b ^ c` as the select of two 2:1
multiplexers:

| x = b ^ c | sum | carry |
|-----------|-----|-------|
| 0         | a   | b     |
| 1         | ~a  | a     |

When `b == c`, those two inputs alone decide the carry. When they differ,
the carry equals `a`.

**`mem_fa`** puts a D flip-flop (the "memory element") on this adder's
carry output. The stored carry is the cell's output `c_q`. There are two
ways to use the cell:

* Feed `c_q` back into the cell's own carry input. This gives a classic
  bit-serial adder: operands go in one bit per clock, least significant bit
  first, and one sum bit comes out per clock. `tb_mem_fa` tests the cell
  this way.
* Feed `c_q` into the carry input of the next cell. This is how
  `mem_mux_adder` uses it.

**`mem_mux_adder`** (W bits, default 16) chains W cells. Each stage's carry
is registered before it reaches the next stage. The last stage drives only
the carry-out, so it has no flip-flop. Facts a user must know:

* **Settling time.** Hold the operands stable. Stage *i* then receives its
  final carry after *i* clock edges. Sum and carry-out are final after
  **W-1 cycles**: 15 for 16 bits, 23 for 24 bits. Before then, the output
  can show intermediate values.
* **No clear is needed between additions.** The settled result does not
  depend on what the flip-flops held before. Each stage's carry becomes
  correct in order, starting from bit 0. Reset (`rst_n`, asynchronous,
  active low) exists only to start from a known state.
* The critical path is one full adder. This is the point of the design.
  The adder spends clock cycles instead of a long ripple path.

## Settling time of the whole multiplier

The tree is a feed-forward network of such adders. Its settling time is
therefore bounded by the slowest path through the adders.
`vedic_pkg::mult_latency(N)` gives that bound:

    L(2) = 0
    L(N) = L(N/2) + max(N-1, 3N/2-1) + (3N/2-1)

| block          | bound L(N) (cycles) | worst seen in simulation |
|----------------|---------------------|--------------------------|
| `vedic_mult4`  | 10                  | 5 (all 256 pairs)        |
| `vedic_mult8`  | 32                  | 13 (all 65 536 pairs)    |
| `vedic_mult16` | 78                  | 15 (2 005 pairs)         |

The bound adds the full width of every adder along the path. Real carry
chains are much shorter, which is why measured settling is far below it.
The top uses the bound, not the measured figure, because it must be right
for every operand pair. It has not been proven that any pair reaches the
bound. A tighter bound would shorten the top's latency. Any tighter bound
would need its own proof.

## Top level `vedic16`: interface and timing

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | clock, rising edge |
| `rst_n` | in  | 1     | asynchronous reset, active low; clears all registers |
| `start` | in  | 1     | sampled while idle: load `a`, `b` and start a multiplication |
| `a`,`b` | in  | 16    | unsigned operands |
| `busy`  | out | 1     | a multiplication is running; `start` is ignored |
| `done`  | out | 1     | one-cycle pulse: `c` has just been loaded |
| `c`     | out | 32    | product of the last completed multiplication, held until the next |

Sequence:

1. On a rising edge with `start = 1` and `busy = 0`, `a` and `b` are
   loaded into operand registers, and `busy` rises.
2. The operands stay put for `LATENCY = 78` cycles while the tree settles.
3. On the next edge, the product is loaded into `c`, `busy` falls and
   `done` pulses high for one cycle.

`done` rises **79 cycles** after the edge that sampled `start`. A new
`start` is accepted in the cycle right after `done`, so back-to-back
multiplications take 80 cycles each. `start` is ignored while `busy` is
high, and so is any change on `a` or `b`. An assertion checks that `done`
is a single pulse that ends a busy period.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With plain Verilator
5:

    verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
        --top-module tb_vedic16 rtl/vedic_pkg.sv tb/tb_vedic16.sv -o sim
    obj_dir/sim

To run another testbench, replace `tb_vedic16` with its name. The package
must come first on the command line. `-y rtl` finds the other modules.

What the testbenches check:

* `tb_mux_full_adder`, `tb_vedic_2x2`: exhaustive truth tables.
* `tb_mem_fa`: the cell's sum, carry and stored carry. Also 16-bit
  bit-serial additions, LSB first, with the carry fed back.
* `tb_mem_mux_adder`: sum and carry-out must settle within W-1 cycles and
  stay there. A carry through all 16 stages must take exactly 15 cycles.
* `tb_vedic_combine`: the adder stage on products of random operand
  halves. It must settle within 46 cycles.
* `tb_vedic_mult4`, `tb_vedic_mult8`: every operand pair. Each product
  must settle within the bound.
* `tb_vedic_mult16`: the example 49982 x 30397 = 1519302854, extreme
  operands and 2000 random pairs.
* `tb_vedic16`: the top at its default size, end to end. It runs 400
  multiplications and checks each product and the exact 79-cycle latency.
  It also checks that `c` holds between results and that `start` pulses
  while busy are ignored. Back-to-back starts are included. It counts each
  of these events and fails if one never happened.

## Where this design goes beyond, or differs from, the source architecture

* **Placement of the flip-flops.** The source combines a memory-element
  full adder (a full adder with its carry stored in a D flip-flop) with
  multiplexer full adders cascaded into a 16-bit adder. It does not draw
  where the flip-flops sit in the cascade. This design puts one on every
  carry between stages. Everything about timing above follows from that
  reading.
* **The sequencer is this design's own.** This includes the operand
  registers, `start`/`busy`/`done` and the 78-cycle bound. The source gives
  only the operands, a clock and the product.
* The same four-blocks-plus-three-adders arrangement is used at every level
  (4, 8 and 16 bits). The source draws it only for 16 bits and says the
  structure extends from the 2x2 block.
* In the multiplexer full adder, which data input sits on select value 0
  was derived from the full-adder truth table.
* The flip-flop's set input is not used. Reset is asynchronous and active
  low.
* Only the multiplexer/memory-element adder is included. The other adder
  styles the architecture was compared against are not part of this RTL.
  These are the plain full adder, the NAND-only full adder, the NAND-only
  carry-lookahead / carry-increment carry-select adder and a BEC-based
  adder. The same holds for a multiplier built from conventional adders.
* Operands are unsigned.

## Lint notes

Verilator `-Wall` reports these warnings, and they are expected:

* `PINCONNECTEMPTY` for the unused carry-outs in `vedic_combine`, and for
  the combinational carry output of `mem_fa` inside `mem_mux_adder`, where
  only the stored carry is used.
* `SYNCASYNCNET` on `rst_n` in `vedic16`: the reset is asynchronous for
  the registers and is also used to disable the `done` assertion.
