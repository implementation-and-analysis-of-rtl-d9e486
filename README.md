# 16 x 16 Wallace tree multiplier with a Kogge-Stone or Sklansky final adder

A fast multiplier spends most of its logic on the partial products: a 16 x 16
multiplication produces 256 partial-product bits that have to be added. This
design adds them in three steps, all of them combinational:

1. **Partial products.** Every bit of `a` is ANDed with every bit of `b`.
2. **Wallace tree.** The 256 bits are sorted by weight into 32 columns and
   compressed in parallel, stage by stage, by bit counters: 15:4 compressors,
   5:3 compressors, full adders (3:2) and half adders. After six stages no
   column holds more than two bits, so the product is the sum of two 32-bit rows.
3. **Final adder.** A parallel prefix adder adds the two rows. There are two
   variants: a **Kogge-Stone** adder (low fan-out, many prefix nodes and wires)
   and a **Sklansky** adder (half the prefix nodes, but high fan-out).

The two variants give identical products. They differ only in the area and
delay of the final adder. In the original FPGA evaluation of this
architecture (Spartan-3 XC3S200), the Sklansky variant was slightly smaller
and faster: 615 against 632 four-input LUTs, and 67.54 ns against 68.722 ns.
Sklansky is therefore the default wherever a single multiplier is instantiated.

A small byte selector lets the 32-bit product be read on eight LEDs, one byte
at a time.

```
 a[15:0] ─┐
          ├─ partial_product_gen ── 16x16 bits ── wallace_reducer ── row0[31:0] ──┐
 b[15:0] ─┘                                      (6 stages of          row1[31:0] ─┤
                                                  15:4, 5:3, FA, HA)               │
                                  ┌──────────────────────────────────────────────┘
                                  ├─ kogge_stone_adder ── p_ks[31:0] ── led_byte_select ── led_ks[7:0]
                                  └─ sklansky_adder    ── p_sk[31:0] ── led_byte_select ── led_sk[7:0]
                                                                          ▲ sel[1:0]
```

(In `wallace_top` each variant has its own partial products and its own tree.
The drawing merges them only to save space.)

## Files

| file | module | what it is |
|---|---|---|
| `rtl/wtm_pkg.sv` | package | `final_adder_e` (KOGGE_STONE / SKLANSKY), the `gp_t` generate/propagate pair and the prefix operator `gp_merge` |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | cells | 2:2 and 3:2 counters |
| `rtl/compressor_5_3.sv` | `compressor_5_3` | 5-input bit counter |
| `rtl/compressor_15_4.sv` | `compressor_15_4` | 15-input bit counter |
| `rtl/partial_product_gen.sv` | `partial_product_gen` | N x N AND array |
| `rtl/wallace_reducer.sv` | `wallace_reducer` | the Wallace tree, generated from N |
| `rtl/kogge_stone_adder.sv` | `kogge_stone_adder` | W-bit Kogge-Stone adder |
| `rtl/sklansky_adder.sv` | `sklansky_adder` | W-bit Sklansky adder |
| `rtl/wallace_multiplier.sv` | `wallace_multiplier` | one complete multiplier, `FINAL_ADDER` chooses the adder |
| `rtl/led_byte_select.sv` | `led_byte_select` | byte-wide view of the product for eight LEDs |
| `rtl/wallace_top.sv` | `wallace_top` | both multipliers side by side, each with its LED display |

## The bit counters

A compressor here is a *counter*. It takes k bits of the same weight and
outputs their count as a binary number, whose bits go to the column itself
and the columns above it.

**5:3 compressor.** It takes five bits and outputs a 3-bit count (0..5). One
full adder sums three inputs. A second full adder adds that sum to the other
two inputs. A half adder merges the two carries, which both have weight 2.

**15:4 compressor.** It takes fifteen bits and outputs a 4-bit count (0..15).
It works in three layers:

- Five full adders take the inputs three at a time. They give five sum bits
  of weight 1 and five carry bits of weight 2.
- One 5:3 compressor counts the five sums, giving weights 1, 2 and 4.
- A second 5:3 compressor counts the five carries, giving weights 2, 4 and 8.
- A half adder, a full adder and a half adder then add the two 3-bit counts,
  the second one shifted up by one place.

The top half adder's carry would have weight 16. It can never be set, so only
its sum (an XOR) is kept.

**Both compressors are exact.** The 15:4 compressor of this architecture was
originally described as *approximate*, but no approximate logic was given for
it. The reported test product (123 x 123 = 15129) is also exact. An
approximate variant would change only `compressor_15_4`. Note that in a
16 x 16 tree, 15:4 compressors sit only in the three middle columns of the
first stage (see below).

## The Wallace tree (`wallace_reducer`)

This is the least obvious part of the design. The tree is not written out by
hand. It is generated from `N` at elaboration time by constant functions
inside the module.

**Columns.** Partial product `pp[i][j] = a[j] & b[i]` has weight `2^(i+j)`.
Column `c` holds all bits of weight `2^c`. For N = 16 the column heights rise
1, 2, …, 16 and fall back to 1.

**One stage.** In every stage, each column of height `h` is cut greedily:

1. `h / 15` groups go to 15:4 compressors. Their outputs go to columns c, c+1,
   c+2 and c+3.
2. Of the rest, groups of 5 go to 5:3 compressors. Their outputs go to
   columns c, c+1 and c+2.
3. Of the rest, groups of 3 go to full adders (columns c and c+1).
4. A pair that is left over goes to a half adder, but only if the column held
   more than two bits.
5. Any bit still left passes to the next stage unchanged.

Stages repeat until every column holds at most two bits.

**Wiring order.** Inside the next stage's column, bits are packed in a fixed
order, computed by the function `dst()`:

1. the pass-through bits;
2. then, for each kind of cell (15:4, 5:3, FA, HA) and each output weight `j`,
   the outputs of the cells sitting in column `c - j`.

This fixed order is what lets every instance find its input and output bit
positions from constants alone.

**Stages for N = 16:**

| stage | tallest column after it | 15:4 | 5:3 | FA | HA |
|---|---|---|---|---|---|
| input | 16 | | | | |
| 1 | 9 | 3 | 30 | 12 | 4 |
| 2 | 6 | 0 | 18 | 13 | 3 |
| 3 | 4 | 0 | 7 | 15 | 0 |
| 4 | 3 | 0 | 0 | 16 | 0 |
| 5 | 3 | 0 | 0 | 6 | 0 |
| 6 | 2 | 0 | 0 | 2 | 0 |
| total | | 3 | 55 | 64 | 7 |

**Dropped bits.** Outputs that would land in column 2N or above are dropped.
The product of two N-bit numbers is below `2^(2N)`, so the sum of all the
bits is too, and every such bit must be 0. As a result, `row0 + row1` equals
the product exactly, not only modulo `2^(2N)`.

**Constant row bits.** Several low bits of `row1` are constant 0, because some
low columns end with a single bit. Synthesis removes them.

**Structure.** Each stage keeps its input columns (`cur`) and output columns
(`nxt`) in its own generate scope, and the next stage reads
`g_stage[s-1].nxt`. Keeping the stages apart stops a lint tool from seeing one
large array that feeds itself. The tree needs `N >= 3`.

**Changing the rule.** The greedy rule and the packing order are this
design's own choices; the original description names the cells but not the
schedule. To try another rule, edit `n15`/`n53`/`nfa`/`nha`/`npass`. The
wiring follows the new rule automatically.

## The final adders

Both adders are parameterized by width `W` (default 32) and have `cin` and
`cout` ports. The multiplier ties `cin` to 0 and ignores `cout`, which is
always 0 here. In both adders the carry-in is folded into bit 0's generate
before the prefix tree. Both use `wtm_pkg::gp_merge`:

```
G(hi:lo) = G(hi) | P(hi) & G(lo)
P(hi:lo) = P(hi) & P(lo)
```

**Kogge-Stone.**

- Pre-processing: `P = a ^ b` and `G = a & b`.
- Prefix tree: at level `l`, every bit `i >= 2^l` merges with bit `i - 2^l`.
- Sum: `S(i) = P(i) ^ C(i-1)`.
- Cost: `log2 W` levels and `W·log2 W − W + 1` prefix nodes (129 for W = 32).
  Every node drives at most two nodes of the next level.

**Sklansky.**

- Pre-processing: `G = a & b` and an OR propagate `P = a | b`. This is valid
  because a generating bit also propagates.
- Prefix tree: at level `l`, every bit in the upper half of each
  `2^(l+1)`-bit block merges with the top bit of the lower half. Groups of 2,
  4, 8, 16 and 32 bits are formed in turn.
- Sum: `S(i) = (a(i) ^ b(i)) ^ G(i−1:−1)`, where position −1 is the carry-in.
- Cost: `log2 W` levels and `(W/2)·log2 W` nodes (80 for W = 32). The top bit
  of a lower half drives up to W/2 nodes.

## LED display (`led_byte_select`)

`sel` picks one byte of the product, most significant first:

| `sel` | byte shown |
|---|---|
| `00` | `p[31:24]` |
| `01` | `p[23:16]` |
| `10` | `p[15:8]` |
| `11` | `p[7:0]` |

For 123 x 123 = 0x00003B19 the four bytes are 00000000, 00000000, 00111011
and 00011001.

Each LED pin carries its product bit unchanged. The board these displays were
used on has active-low LEDs, so a lit LED means 0. For an active-high board,
invert `led`.

## Interface and timing

`wallace_top #(N = 16)` has these ports:

- `a[N-1:0]`, `b[N-1:0]`: unsigned operands;
- `sel[1:0]`: LED byte select;
- `p_ks`, `p_sk` `[2N-1:0]`: the products of the Kogge-Stone and Sklansky
  variants;
- `led_ks`, `led_sk` `[7:0]`: the selected bytes of those products.

The whole design is combinational. There is no clock, no reset and no
handshake. A product is valid one propagation delay after the operands
settle. To use it in a clocked system, register the inputs and outputs, and
pipeline between the tree and the adder if needed.

On its own, `wallace_multiplier` (ports `a`, `b`, `p`) is the unit that was
evaluated: 16 + 16 + 32 = 64 I/O pins.

Putting both variants into one top is a choice made for simulation and side
by side comparison. For an implementation, instantiate one
`wallace_multiplier` with the `FINAL_ADDER` you want.

After generic synthesis with yosys (word-level cells, before technology
mapping), the sizes are:

| block | cells |
|---|---|
| one multiplier | about 1,425 |
| the Wallace tree | 1,165 |
| Kogge-Stone adder | 423 |
| Sklansky adder | 339 |

## Where this design departs from the original description

- **Exact compressors.** The 15:4 compressor is exact, not approximate (see
  above). The internal gates of the 5:3 compressor, and the adder chain that
  combines the two 5:3 counts in the 15:4 compressor, are this design's own.
- **Tree schedule.** The greedy cutting rule, the order of bits inside a
  column and the resulting six-stage tree are this design's own.
- **Signedness.** Operands are unsigned. Signed operands were never discussed,
  and the worked example is unsigned.
- **Adder ports.** The prefix adders have `cin` and `cout` ports. The adder
  width of 32 is the product width.
- **Top level.** Both multipliers sit in one top, with one shared select line.
- **FPGA figures not reproduced.** LUT counts, delays and logic levels depend
  on the vendor flow and device, and are not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a clock-count watchdog. All
expected values come from the testbench's own arithmetic (`*`, `+`,
`$countones`).

| testbench | what it covers |
|---|---|
| `tb_compressor_5_3` | all 32 inputs |
| `tb_compressor_15_4` | all 32,768 inputs; every count 0..15 must occur |
| `tb_partial_product_gen` | corner and 2,000 random operand pairs; rows and their weighted sum |
| `tb_wallace_reducer` | 16-bit tree: 20,000 random pairs plus corners, `row0 + row1 == a*b`; 8-bit tree: all 65,536 pairs |
| `tb_kogge_stone_adder`, `tb_sklansky_adder` | 32 bits: corners (full carry chains) and 20,000 random sums; 4 and 6 bits (6 is not a power of two): all operands with both carry-ins |
| `tb_wallace_multiplier` | both variants at 16 bits (123 x 123, corners, 20,000 random) and at 8 bits (all pairs) |
| `tb_led_byte_select` | the 123 x 123 example and random products, all four selects |
| `tb_wallace_top` | the whole design at default parameters. 5,004 operand pairs × 4 selects; both products and both LED bytes are checked. It also counts, and requires at least once: a 15:4 compressor counting 8 or more, a carry through the final adder, a non-zero top byte, and each select value |

To run a testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/wtm_pkg.sv tb/tb_wallace_top.sv \
          --top-module tb_wallace_top -j 0
./obj_dir/Vtb_wallace_top
```

Replace `wallace_top` with any other testbench name. The package must be
listed first. The other files are found through `-Irtl`.

Run times:

- The two 16-bit multiplier testbenches take up to a minute or two to build.
- `tb_wallace_multiplier` runs in about 30 s and `tb_wallace_reducer` in about
  12 s. The others finish in seconds.

Each testbench was also run against a deliberately broken copy of its module
(for example a swapped half-adder output, a missing prefix node, or a reversed
byte order). Every one of them then reported failures.

## Changing the design

- **`N`** (on `wallace_top`, `wallace_multiplier`, `wallace_reducer` and
  `partial_product_gen`) sets the operand width. The tree regenerates itself.
  This has been simulated for 8 and 16 bits.
- **`FINAL_ADDER`** on `wallace_multiplier` chooses `wtm_pkg::KOGGE_STONE` or
  `wtm_pkg::SKLANSKY`.
- **`W`** on the adders works for any width, including widths that are not a
  power of two.
- **`led_byte_select.PW`** must be a multiple of 8. The select width is
  `log2(PW/8)`.
