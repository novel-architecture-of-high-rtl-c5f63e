# Pipelined merged MAC with a hybrid CSA tree and a BEC carry select adder

A multiply-accumulate unit computes `P <- X*Y + P` over and over. Built the
usual way, it multiplies (Booth recoding, partial-product reduction, a final
carry-propagate add) and then accumulates with a second carry-propagate
adder. The two wide carry-propagate adders form the critical path, and the
accumulator adder sits inside the feedback loop.

This design removes both adders from the loop:

* The previous result goes back into the **same carry save tree** that
  reduces the Booth partial products. It is fed back *unresolved*: the
  multiplication and accumulation are merged into one tree.
* Inside the tree, the **low N result bits are finished early**. Each Booth
  row is shifted up by 2 (radix-4) or 3 (radix-8) columns. Once a row has
  been added, the columns below the next row's start get no more inputs. A
  2- or 3-bit carry lookahead adder (CLA) resolves them right there, chained
  to the CLA of the row before. By the bottom of the tree the low N bits are
  plain binary.
* The **upper N bits stay in carry save form**: a sum word, a carry word and
  the last carry of the CLA chain. These three are what the accumulator
  registers hold, and they go straight back into the tree.
* An N-bit **carry select adder** resolves the upper half one pipeline stage
  later, outside the loop. Its carry-in-1 half uses a binary to excess-1
  converter (BEC) instead of a second adder.

The default is an 8 x 8 bit signed MAC with radix-4 Booth recoding. A
radix-8 variant of the same architecture can be selected with a parameter.

## Interface and timing (`pmac`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset; clears the accumulator and `p` |
| `en` | in | 1 | accept `x`, `y` at this edge |
| `clr` | in | 1 | with `en`: start a new sum (`P = x*y`) instead of adding to it |
| `x` | in | N | multiplier (the operand that is Booth recoded), two's complement |
| `y` | in | N | multiplicand, two's complement |
| `p` | out | 2N | accumulated value, two's complement, wraps modulo 2^(2N) |
| `p_valid` | out | 1 | `p` holds the result of at least one accepted pair |
| `acc_s`, `acc_c`, `acc_ci` | out | N, N, 1 | upper half of the accumulator in carry save form; `acc_s + acc_c + acc_ci` (mod 2^N) is the upper half of the value |

Parameters: `N = 8` (operand width) and `RADIX = 4` (4 or 8).

One pair is accepted per clock. A pair accepted at rising edge *k* changes
the accumulator registers at edge *k*, and `p` at edge *k+1*. With `en` low
the accumulator holds. `p` keeps the last value until the next accepted pair
reaches it.

Example: with `clr = 1`, `x = 8'h19` (25) and `y = 8'hDD` (-35), `p` becomes
`16'hFC95` (-875) two edges later.

## Pipeline

```
            stage 1                                    | stage 2
 x ─► Booth recoder ─► R rows ─►┐                      |
 y ─►                           ├► hybrid CSA tree ─► [zlo_q] ──────────────► p[N-1:0]
          ┌── zlo_q, c_q, ci_q ─┤   (+ CLA chain)   ─► [s_q, c_q, ci_q] ─► CSLA ─► p[2N-1:N]
          └── s_q ──────────────┘                           │
                 ▲ (zeroed when clr)                        │
                 └──────────────────────────────────────────┘
```

`zlo_q`, `s_q`, `c_q` and `ci_q` together are the accumulator. The value
they hold is `zlo_q + 2^N * (s_q + c_q + ci_q)`, modulo 2^(2N). The loop
from these registers back to themselves passes only through the CSA rows and
the short CLA chain. The carry select adder and the output register are
outside it.

## Booth stages (`booth_r4`, `booth_r8`)

**Radix-4.** `x` is read in overlapping groups `(x[2i+1], x[2i], x[2i-1])`,
with `x[-1] = 0`. Each group gives a digit
`d_i = -2 x[2i+1] + x[2i] + x[2i-1]` in {-2..2}, so there are N/2 rows. A
row selects 0, `y` or `2y` as an N+1-bit number.

**Radix-8.** Groups are `(x[3i+2], x[3i+1], x[3i], x[3i-1])` of the
sign-extended `x`, giving digits in {-4..4}. There are ceil((N+1)/3) rows,
which is 3 for N = 8. A row selects 0, `y`, `2y`, `3y` or `4y` as an
N+2-bit number. The odd multiple `3y = y + 2y` is formed once by a CLA and
shared by all rows. This extra adder, and the one extra bit per row, are the
price of having fewer rows.

**Negative digits.** For a negative digit the row is only *inverted*, that
is, written in one's complement. The missing +1 leaves the row as a separate
negate bit `neg[i]`, which the tree adds in the row's lowest column. This
takes the increment out of the partial-product path. A zero digit from an
all-ones group gives an all-zero row with `neg = 0`.

## Hybrid CSA tree (`csa_tree`)

This is the core of the design and the part that takes the most care to
follow. The tree is 2N columns wide. Let K be the row shift (2 or 3), R the
number of rows and W the row width.

| step | full-adder row adds | then resolved by a CLA |
|---|---|---|
| row 0 | Booth row 0 with its sign extension; `{c_fb, zlo_fb}`; a word holding every `neg[i]` at column K·i and `ci_fb` at column N | columns 0..K-1, carry in 0 |
| row i (1..R-1) | running sum, running carry, Booth row i shifted K·i columns | columns K·i..K·i+K-1 (the last row takes everything up to N-1), carry in from the previous CLA |
| accumulation row | running sum, running carry, `s_fb` at columns N..2N-1 | — |

Every row is a plain row of full adders: the sum word is the XOR of the
three inputs, and the carry word is their majority shifted up one column.
Columns with only two live inputs reduce to half adders in synthesis. After
each row, the resolved columns are cleared, so no later row sees them.

Resulting CLA groups at N = 8:

* radix-4: `[1:0]`, `[3:2]`, `[5:4]`, `[7:6]`, all 2-bit;
* radix-8: `[2:0]`, `[5:3]`, `[7:6]`, that is 3-, 3- and 2-bit.

There are five full-adder rows for radix-4 (four Booth rows and the
accumulation row) and four for radix-8.

The tree computes
`zlo + 2^N (s + c + co) = sum_i (pp_i + neg_i) 2^(K i) + zlo_fb + 2^N (s_fb + c_fb + ci_fb)`,
modulo 2^(2N). `s` and `c` carry the same column weights; the carry word is
already shifted.

**Sign extension without extension columns.** A one's-complement row `pp_i`
with sign bit `s_i` at bit W-1 is worth `pp_i[W-2:0] - 2^(W-1) s_i`. That
equals `pp_i[W-2:0] + 2^(W-1) ~s_i - 2^(W-1)`. So each row contributes only
its low bits plus the inverted sign. The constants `-2^(W-1+K i)` of all
rows add up to one constant, which is computed at elaboration (the
`sign_const` function). It is added to row 0's inverted sign, so row 0's
upper part is `~s0 + constant`. For radix-4 at N = 8, that upper part is
`~s0 s0 s0` followed by constant ones, the familiar `S̄ S S` / `1 S̄`
pattern, but with all the constant ones gathered into row 0.

## Final adder (`csla`, `cla`, `bec`)

The carry select adder adds `s_q + c_q + ci_q` in G = 2-bit groups:

* The lowest group is a 2-bit CLA that takes `ci_q` as its carry in.
* Each higher group has a 2-bit CLA with carry in 0. A 2-bit BEC turns that
  result into the carry-in-1 result: it adds one, and its carry out is the
  CLA carry OR an all-ones sum.
* A 3-bit multiplexer (sum and carry) picks one of the two, selected by the
  carry out of the group below.

The serial path is one multiplexer per group. The BEC replaces the
duplicated carry-in-1 adder of a classic carry select adder.

`cla` computes each carry as a flat sum of products of generate, propagate
and carry in, without rippling. It is used at widths 2 and 3 in the tree,
at width 2 in the final adder, and at width N+2 for `3y`.

## What is fixed by the architecture and what is this implementation's choice

Taken from the architecture:

* the merged tree, with feedback of the unresolved sum and carry;
* the 2-bit CLAs (radix-4) and 3/3/2-bit CLAs (radix-8) on the low bits;
* five full-adder rows for radix-4;
* the BEC carry select final adder with 2-bit groups and its carry input;
* one's-complement rows with separate negate bits;
* the 8-bit size, the 2N-bit accumulator and the worked example.

Choices made here:

* **Where the feedback enters.** The whole fed-back carry word enters row 0
  and the sum word enters the accumulation row. The reference structure
  spreads the carry bits over the first rows.
* **Where the negate bits and the CLA carry enter.** They go into row 0 as a
  third input word, which makes those row-0 columns full adders rather than
  half adders.
* **How the CLA carry is handled.** The CLA chain's last carry is kept as
  its own register bit, `acc_ci`. It is the final adder's carry in and is
  fed back as `ci_fb`. Bit for bit, the carry save words therefore differ
  from other wirings of the same tree: for the worked example this design
  holds `S = F8`, `C = 04` (sum `FC`), not `FA`/`01`. The resolved result
  is the same.
* **Sign-extension constants.** They are all folded into row 0.
* **The Booth encoding signals** (one-hot magnitude plus sign,
  `pmac_pkg::booth_r4_t`, `booth_r8_t`) and the single shared `3y` adder.
* **Pipeline.** The two register stages and the two-cycle latency, the
  `en`/`clr` handshake, the asynchronous reset and wrap-around at 2N bits.
* **Signed operands.** They are two's complement, as the worked example
  requires.

Not modelled: timing. The reference design reports combinational delays of
about 9.5 ns (radix-4) and 12.6 ns (radix-8) on a small FPGA; these numbers
depend on the technology and are not a property of this RTL.

## Files

| file | content |
|---|---|
| `rtl/pmac_pkg.sv` | Booth digit types; row count, width and shift as functions of N and radix |
| `rtl/pmac.sv` | top: Booth stage, tree, accumulator registers, final adder, output register |
| `rtl/booth_r4.sv`, `rtl/booth_r8.sv` | Booth recoding and one's-complement row generation |
| `rtl/csa_tree.sv` | hybrid CSA tree with the low-bit CLA chain |
| `rtl/csla.sv`, `rtl/bec.sv`, `rtl/cla.sv` | final carry select adder and its parts |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_pmac_r8` runs the top in radix-8 |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
through a watchdog if it hangs.

* `tb_cla`, `tb_bec`, `tb_csla`: exhaustive (all 2^17 inputs for the 8-bit
  carry select adder).
* `tb_booth_r4`, `tb_booth_r8`: all 2^16 operand pairs. The weighted rows
  plus negate bits must equal `x*y`, and each row must stay within its
  digit's range.
* `tb_csa_tree`: both radixes, with extreme operands and 200,000 random
  operand and feedback combinations, checking the identity above and the
  resolved low bits.
* `tb_pmac` (default parameters, radix-4) and `tb_pmac_r8`: the worked
  example, then all 2^16 pairs as fresh products, then 100,000 random cycles
  mixing accumulation, clears and idle cycles, then a run of
  `(-128)*(-128)` products that wraps the accumulator. They compare `p`,
  `p_valid` and the carry save outputs against an integer model every cycle.
  They also count how often each of these happened and fail if any never
  did: clears, accumulations, holds, a CLA carry into the final adder, BEC
  selections and wrap-arounds.

Running with Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/pmac_pkg.sv tb/tb_pmac.sv --top-module tb_pmac
./obj_dir/Vtb_pmac
```

Use any other `tb/tb_<name>.sv` the same way. `-Irtl` lets Verilator find
the modules by file name. The package is listed first because the modules
import it.

## Changing it

* **Width.** `N` must be even for radix-4. The tree requires `K*(R-1) < N`,
  which holds for the usual sizes. The final adder needs `N` to be a
  multiple of its group width `G = 2`.
* **Radix.** Set `RADIX` to 8 for three rows (at N = 8), at the cost of the
  `3y` adder.
* **Wider accumulation.** To get guard bits against wrap-around, widen the
  accumulator. This means growing the tree's upper part and the final adder
  beyond N bits; as written, both are exactly N bits wide.
