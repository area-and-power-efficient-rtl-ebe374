# 16×16 multiplier with symmetric bit-stacking counters

In a parallel multiplier, most of the delay and power is spent in the
partial-product reduction tree. That is the stage that squeezes the columns
of partial-product bits down to two rows. A tree built from full adders or
conventional n:2 compressors needs many XOR gates on its critical path. This
design reduces the tallest columns with **6:3 and 7:3 counters built by bit
stacking** instead. Such a counter first sorts its input bits into a
"stack", with all the ones grouped together. It then reads the binary count
off the stack with AND/OR logic. The 6:3 counter has a single XOR, and it is
off the critical path. The remaining short columns are handled by
conventional 4:2 compressors.

The multiplier is exact, unsigned, and purely combinational:

    p[31:0] = a[15:0] * b[15:0]

The top module is `mult16x16`. It has no clock, no reset and no handshake.

## Hierarchy

```
mult16x16                       16x16 -> 32, four 8x8 sub-products in parallel
├── mult8x8  (x4)               P1 = aH*bH, P2 = aL*bH, P3 = aH*bL, P4 = aL*bL
│   ├── counter73  (x3)         columns 6, 7, 8 (column 7: 7 of its 8 bits)
│   │   └── stacker6
│   │       ├── stacker3 (x4)
│   │       └── stack_merge
│   ├── counter63  (x8)         columns 2-5 and 9-12 (3 to 6 bits)
│   │   ├── stacker3 (x2)
│   │   └── stack_merge
│   ├── compressor42 (x15)      one per column, chained horizontal carry
│   │   └── full_adder (x2)
│   └── cpa #(16)               final carry-propagate adder
└── product_combiner #(N=8)     P1<<16 + (P2+P3)<<8 + P4
    ├── full_adder (x16)        one Wallace layer over columns 8..23
    └── cpa #(32)
```

## Bit stacking

A *stack* of n bits is a thermometer code: output bit m is 1 exactly when
at least m+1 of the inputs are 1.

**3-bit stacker** (`stacker3`). It has three outputs:

- `y[0]` is the OR of the inputs.
- `y[1]` is their majority.
- `y[2]` is their AND.

**Symmetric merge** (`stack_merge`). Two 3-bit stacks are merged into one
6-bit count:

- H is the stack of `x[2:0]`, I is the stack of `x[5:3]`.
- Write H backwards in front of I: `H2 H1 H0 I0 I1 I2`. The ones now form a
  single unbroken run, which reaches left into H and right into I.
- Combine each pair of positions that are three apart:

```
J0 = H2 | I0    J1 = H1 | I1    J2 = H0 | I2
K0 = H2 & I0    K1 = H1 & I1    K2 = H0 & I2
```

Let n be the length of the run:

- If n ≤ 3, the run never covers both positions of a pair. J then holds all
  n ones and K holds none.
- If n > 3, J is all ones and K holds exactly n − 3 ones.

Neither J nor K is sorted. Still, J is "filled first", and that is all the
counters need.

**6-bit stacker** (`stacker6`). It stacks J into `y[2:0]` and K into
`y[5:3]` with two more 3-bit stackers. This yields a proper 6-bit stack.

## From stack to count

**6:3 counter** (`counter63`). Its output is `{c2,c1,s}` = number of ones
in `x[5:0]`. It uses only H, I and K, not the bottom layer of stackers.

| output | meaning | logic |
|---|---|---|
| `s`  | odd parity | `He ^ Ie`, with `He = ~H0 \| (H1 & ~H2)` (a 3-bit stack holds 0 or 2 ones), `Ie` likewise |
| `c2` | count ≥ 4 | `K0 \| K1 \| K2` |
| `c1` | count ∈ {2, 3, 6} | `(H1 \| I1 \| H0&I0) & ~c2  \|  H2 & I2` |

`H1 | I1 | H0&I0` means "at least two ones". `H2 & I2` means "all six
ones".

**7:3 counter** (`counter73`). It counts `x[5:0]` with the 6-bit stacker,
so the thresholds count ≥ 1 … count ≥ 6 are all available as `y[0..5]`.
The seventh bit `x[6]` comes in last:

```
s  = parity(x[5:0]) ^ x[6]
c2 = x[6] ? (count >= 3)              : (count >= 4)
c1 = x[6] ? (count in {1,2,5,6})      : (count in {2,3,6})
```

As a result, `x[6]` only drives the select lines of two 2:1 multiplexers and
one XOR. The 7:3 counter has two XOR gates in all: the parity of `x[5:0]`
and the fold-in of `x[6]`.

## The 8×8 reduction tree (`mult8x8`)

The partial product `a[i] & b[j]` goes to column k = i + j. Column heights
are 1, 2, …, 8, …, 2, 1 for k = 0…14. Reduction has two layers.

**1. Counter layer.** Every column with three or more bits is counted once:

- Columns 6, 7 and 8 use a 7:3 counter. Column 7 has eight bits, so its
  eighth bit bypasses the counter.
- Columns 2 to 5 and 9 to 12 use a 6:3 counter. Unused inputs are tied
  to 0.
- Columns 0, 1, 13 and 14 pass through.

A counter in column k sends S to column k, C1 to column k+1 and C2 to
column k+2. After this layer, no column holds more than four bits:

- Column 7 holds exactly four: S7, the bypassed bit, C1 from column 6 and
  C2 from column 5.
- Column 13 also holds four: two raw bits, C1 from column 12 and C2 from
  column 11.

An elaboration-time `$error` fires if the schedule would ever put more than
four bits in a column.

**2. Compressor layer.** Each column k goes through one 4:2 compressor:

- The compressor's horizontal `cout` feeds `cin` of column k+1.
- Each compressor is two cascaded full adders, and `cout` comes from the
  first of them. `cout` therefore never depends on `cin`, so the horizontal
  carry crosses one column and stops.

The result is a sum row and a carry row. A 16-bit carry-propagate adder
merges them.

The bit-to-slot wiring is generated from three elaboration-time functions:
`col_height`, `col_lo` and `has_counter`. To try a different schedule, edit
the `H >= 7` / `H >= 3` thresholds in the `g_col` loop. The overflow
`$error` tells you if a column outgrows its 4:2 compressor.

## Assembling 16×16 from 8×8 (`mult16x16`, `product_combiner`)

Each operand is split into bytes. The four byte products

```
P1 = aH*bH   P2 = aL*bH   P3 = aH*bL   P4 = aL*bL
```

are computed in parallel and combined as
`p = P1·2^16 + (P2 + P3)·2^8 + P4`. The shifts are plain wiring:

- Columns 8 to 23 then hold three bits each, and all other columns hold
  one.
- One Wallace layer of full adders over columns 8 to 23 leaves two rows.
- A 32-bit carry-propagate adder merges the two rows.

`product_combiner` is parameterized by the half-width `N` (default 8). It
works unchanged for any 2N×2N composition.

## Design choices and departures

- **The reduction schedule of the 8×8 multiplier is this design's own.**
  The architecture calls for 6:3 and 7:3 counters together with 4:2
  compressors, but the exact column assignment is not published. The same
  holds for the one-layer Wallace arrangement in `product_combiner`.
- **An alternative description builds the 8×8 multiplier from four 4×4
  multipliers.** It is not followed: a 4×4 array has no column taller than
  four, so it would need no 6:3 or 7:3 counter at all.
- **The 6:3 parity and count-6 terms are derived here.** The parity
  equation `He = ~H0 | H1&~H2` comes from the stated rule ("a 3-bit stack
  has even parity when it holds zero or two ones"). The count-6 term of `c1`
  is `H2 & I2`.
- **How `counter73` folds in `x[6]` is an interpretation.** The published
  circuit uses two 0/1-selected multiplexers; the `x[6]`-selected
  multiplexers here are a reading of that circuit.
- **The 5:2 and 7:2 compressors are not part of this RTL.** They are the
  compressors that the stacking counters replace in the reduction tree.
- **Exact, unsigned, combinational.** The design has no pipeline registers,
  and no signed mode.
- **Adders.** The final carry-propagate adders are ripple chains of full
  adders. Replacing `cpa` with a faster adder changes nothing else.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end.

| testbench | what it checks |
|---|---|
| `tb_stacker3`, `tb_stacker6` | all inputs; outputs are the thermometer code of the popcount; stacker6 also checks its H, I and K outputs |
| `tb_stack_merge` | all pairs of proper stacks; J holds min(n,3) ones, K holds max(n−3,0) ones, and K ⊆ J |
| `tb_counter63`, `tb_counter73` | all 64 / 128 inputs against the popcount |
| `tb_full_adder`, `tb_compressor42` | all inputs; the compressor's `cout` is also checked to be independent of `cin` |
| `tb_cpa`, `tb_product_combiner` | corner cases and 20 000 random vectors |
| `tb_mult8x8` | all 65 536 operand pairs |
| `tb_mult16x16` | corners, walking ones, and 100 000 random pairs at full size; also counts how often each mechanism is exercised |

`tb_mult16x16` counts six mechanisms:

- the 7:3 count-plus-one path
- `c2` of a 6:3 counter
- a full column 7 with its bypass bit
- a 4:2 horizontal carry
- a Wallace-layer carry
- a full 32-bit product

It fails if any of them never occurs. It reads these through hierarchical
names inside the `aL*bL` sub-multiplier (`dut.u_p4`) and the combiner.

To run one with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl tb/tb_mult16x16.sv --top-module tb_mult16x16
./obj_dir/Vtb_mult16x16
```

All testbenches pass. Each one has also been shown to fail on a
deliberately broken copy of its module.

## Size

After generic synthesis to single-bit gates, `mult16x16` comes to about
2 600 cells:

- 1 256 AND
- 794 OR
- 350 XOR
- 200 NOT
- 24 MUX

The published FPGA results for this multiplier are a gate count of 1792,
a delay of 16.871 ns and a power of 156.41 mW. They come from a vendor FPGA
flow and cannot be compared directly with a generic gate count.
