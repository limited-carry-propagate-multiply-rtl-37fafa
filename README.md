# Limited carry-propagate multiply-accumulate unit

A signed fused multiply-accumulate (MAC) unit for FPGAs: `acc <= acc + x*y`,
one operation per clock, with 16-bit operands and a 40-bit accumulator by default.

On an FPGA a ripple-carry adder is cheap, because it maps onto the dedicated
fast carry chain. But its delay grows linearly with its width. Counter or
compressor trees (full carry-save reduction) have a short, width-independent
delay, but they cost about three times the LUTs. This design takes a middle
course:

* The partial products of a radix-4 Booth multiplier and the fed-back
  accumulator are cut into **four column blocks** of roughly equal delay.
* Each block is summed by an ordinary **carry-propagate multi-operand adder**
  (a short chain of `+`). Carries therefore only ripple across 10, 13 or 17
  columns, never across all 40.
* The blocks' sums and carry-outs are *not* added together. They are packed,
  without any further addition, into three 40-bit words: `sum_x`, `carry_a`
  and `carry_b`. This is a **double carry-save** number: its value is
  `sum_x + carry_a + carry_b`.
* The three words are registered, reduced to two by a single row of (3,2)
  counters, and fed back into the blocks as the accumulator for the next
  operation. A ternary adder turns the redundant result into an ordinary
  binary number in one extra clock cycle.

The critical path of the loop is therefore one (3,2) counter plus the slowest
block adder. A full-width carry-propagate adder never appears in the loop.

## The dot diagram

With N-bit operands, Booth recoding gives NPP = N/2 digits d_i in {−2..2}. Digit
i comes from bits `y[2i+1], y[2i], y[2i-1]`, with `y[-1] = 0`. For each digit,
`booth_pp_gen` selects 0, x or 2x as an (N+1)-bit value. It inverts that value
when the digit is negative. The "+1" that completes the negation is the
separate bit `s_i`. The sign of partial product i is `e_i`, its bit N.

Sign-extending eight products to 40 bits would make the centre of the diagram
needlessly tall. Instead, the sign extension is folded into a constant and
spread over the rows. For N=16, W=40:

| row | columns | contents |
|-----|---------|----------|
| 0 | 0..19 | pp0 at 0..16; `e0, e0, ~e0` at 17, 18, 19 |
| i = 1..6 | 2i−2 .. 2i+18 | `s_{i-1}` at 2i−2; pp_i at 2i..2i+16; `~e_i` at 2i+17; constant 1 at 2i+18 |
| 7 | 12..39 | `s6` at 12; pp7 at 14..30; `~e7` at 31; ones at 32..39 |
| — | 14 | `s7`, which has no free slot in any row |

Modulo 2^40, the sum of the rows plus `s7·2^14` equals `x*y`. The
`tb_booth_pp_gen` testbench checks this for corner cases and for 3000 random pairs.

## The four blocks

Two more rows join the diagram: the accumulator, fed back in carry-save form as
`fb_s` (sum row) and `fb_c` (carry row). The columns are then split at C1 = 10
and C2 = 23. The middle columns are split again by row, at SPLIT = 3:

| block | columns | operands (16×16) | result |
|-------|---------|------------------|--------|
| 1st | 0..9 | `fb_s` + rows 0..5 → 7 | 10-bit sum + 3-bit carry |
| 2nd | 10..22 | `fb_s`, `fb_c` + rows 0..2 → 5 | 13-bit sum + 3-bit carry |
| 4th | 10..22 | rows 3..7 → 5 | 13-bit sum + 3-bit carry |
| 3rd | 23..39 | `fb_s`, `fb_c` + rows 3..7 → 7 | 17-bit sum, carry-out dropped |

A block takes each row that reaches into its columns, cut to those columns. The
carry width of a block is clog2(operands). `lcp_mac_pkg` works all of this out
from the parameters, so no operand list is written by hand.

`fb_c` is left out of the 1st block. This is safe because `carry_a` and
`carry_b` are always zero below column 10, so the counter row's carry word is
zero up to and including column 10. An assertion in `lcp_mac` watches this.

## Packing the three words

This is the step that avoids a carry-propagate merge. Every block output goes
into columns of the three words that are empty by construction:

```
column:     39 ........ 26 25 24 23 22 ........ 15 14 13 12 11 10 9 ..... 0
sum_x   :   [------ 3rd block sum -------][---- 2nd block sum ------][1st sum]
carry_a :    0 .......  0 [2nd carry ]  0 .........  0 s7  0 [1st carry] 0 ... 0
carry_b :    0 .......  0 [4th carry ][------- 4th block sum -------] 0 ... 0
```

Each block sum lies at its own column position, and each block carry lies
directly above its block. So `sum_x + carry_a + carry_b` is exactly the sum of
all the dots. The lone bit `s7` uses the free column 14 of `carry_a`. This lets
the 4th block stay a 5-operand adder instead of needing a sixth row for a
single bit.

## Accumulate loop, pipeline and timing

```
 x,y ─► booth_pp_gen ─► [PIPE reg] ─► 4 × mo_adder ─► pack ─► redundant_reg ─┬─► red2bin ─► bin_out
                                           ▲                                 │
                                           └──── csa32 ((3,2) row) ◄─────────┘
```

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset (accumulator ← 0) |
| `in_valid` | in | 1 | `x`, `y` hold an operand pair; low = accumulator holds |
| `clr` | in | 1 | with `in_valid`: start a new sum (`acc <= x*y`) |
| `x`, `y` | in | N | signed operands |
| `sum_x`, `carry_a`, `carry_b` | out | W | redundant accumulator |
| `red_valid` | out | 1 | the redundant words were just updated |
| `bin_out`, `bin_valid` | out | W, 1 | binary accumulator, one cycle after the redundant value |

With `PIPE = 1` (the default), the Booth rows are registered before the
adders. The loop from `redundant_reg` through `csa32` and the block adders back
to `redundant_reg` is still one cycle. One operand pair is accepted every
clock, back to back, and `clr` travels down the pipeline with its operands.

Latency is counted from the clock edge at which the pair is presented:

* `PIPE = 1`: the redundant result appears 2 edges later and the binary result 3 edges later ("2+1").
* `PIPE = 0`: 1 and 2 edges ("1+1").

All arithmetic is modulo 2^W. The largest 16×16 product is 2^30, so the
40-bit signed range holds at least 511 worst-case products before the
accumulator wraps.

After generic logic synthesis, which removes constant flip-flops, the default design keeps 268 flip-flops. Of these, 160 hold
the registered Booth rows. With `PIPE = 0` it keeps 105.

## Other sizes

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 16 | operand width (even) |
| `W` | 40 | accumulator width |
| `C1`, `C2` | 10, 23 | first column of the middle blocks and of the 3rd block |
| `SPLIT` | 3 | first Booth row that goes to the 4th block |
| `PIPE` | 1 | 1 = register the Booth rows before the adders |

Elaboration-time assertions reject a choice whose carries would not fit into
empty columns. The conditions are:

* the 1st block's carry must end below the lone sign bit at column N−2;
* that bit must lie below C2;
* the 2nd and 4th block carries must fit below W.

The published architecture fixes block boundaries only for the 16×16/40-bit unit. For a
32×32-bit unit with a 72-bit accumulator, this design uses `C1 = 18`,
`C2 = 41`, `SPLIT = 7`, giving blocks of 11, 9, 9 and 14 operands. These values
satisfy the constraints but were not tuned for equal delay.

## What is this design's own choice

The following come from the published architecture: the row layout with its
sign-extension bits, the block boundaries and operand groups for 16×16, the
packing of the three words, the (3,2) counter in the feedback path, the
registered ternary-adder conversion, and the latencies.

The following are choices made for this RTL:

* The control interface (`in_valid`, `clr`, the valid outputs) and the synchronous reset.
* The position of the pipeline register.
* Booth digit selection, which is the textbook one.
* The adder chain order inside a block.
* The 32×32 block boundaries.
* The 1st block is fed whole row slices, 7 operands. The published diagram
  packs its dots more tightly. The sum is identical, but an FPGA tool may map
  the two versions differently.

Sizes and speeds are not reproduced. This RTL has not been run through an FPGA
flow.

## Files and simulation

`rtl/`: `lcp_mac_pkg` (layout helper functions), `booth_pp_gen`, `mo_adder`,
`csa32`, `redundant_reg`, `red2bin`, `lcp_mac` (top).

`tb/`: one self-checking testbench per module, named `tb_<module>`. The shared
MAC stimulus and scoreboard is `mac_stim_check`.

* `tb_lcp_mac` runs the default unit. It runs 4000 random cycles of operations,
  clears and idle cycles, then 700 maximum products that wrap past 2^39.
  It checks every redundant and binary result and its exact latency. It also
  counts how often each mechanism occurs: clear, hold, accumulate, the `s7`
  slot, and the 1st, 2nd and 4th block carries.
* `tb_lcp_mac_variants` does the same for `PIPE = 0` and for the 32×32/72-bit unit.

Every testbench ends with the line `TB_RESULT checks=<n> failures=<n>`.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lcp_mac_pkg.sv tb/tb_lcp_mac.sv --top-module tb_lcp_mac
./obj_dir/Vtb_lcp_mac
```
