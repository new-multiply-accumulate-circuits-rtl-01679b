# Variable-latency speculative multiply-accumulate units

A multiply-accumulate (MAC) unit computes `acc += A * B` over and over. The
fast way to build one is to keep the accumulator in carry-save form: the
running sum is stored as two vectors (a sum vector and a carry vector), and
the products' partial products are added into those two vectors by rows of
full adders (carry-save adders, CSAs) inside the loop. The carry-propagate
adder (CPA) that turns two vectors into one number then sits outside the
loop and is only needed when the result is read. The more of the
multiplier's reduction tree is moved out of the loop, the shorter the loop
becomes, at the price of more accumulator registers.

This RTL adds one idea on top of that: **the loop contains two data paths,
a short one and a long one, and the multiplier operand B decides which one
is used.** Every bit `b_i` of B that is zero makes a whole partial-product
level `pps_(i+1) = b_i * A` zero. When enough levels are known to be zero,
fewer CSA rows are needed to add the product exactly, so a shorter path of
gates produces the same, exact sum. A multiplexer, steered by a small
function of the B bits, picks the path. Nothing is approximated: both paths
always give the exact result. Only the time the loop needs changes, which
is why the unit has a variable latency.

Five ways of building such a loop are implemented, all as unsigned
N x N MACs with a 2N-bit accumulator, and placed side by side in one top
level (`vls_mac_top`).

## Levels, blocks and accumulator pairs

Throughout, the N partial-product levels are numbered 1..N: level
`pps_(i+1)` is A shifted left by i and gated by `b_i`. In the RTL the array
`pps[i]` (0-based) holds level `pps_(i+1)`.

A *block* is a set of levels that owns one *accumulator pair*: two
`ACC_W`-bit registers holding a sum and a carry vector. Each loop
iteration adds the block's levels and its two stored vectors and writes two
new vectors back. All arithmetic is modulo `2^ACC_W`: carries out of the
top column are dropped, exactly as the final sum would wrap.

At the output, `acc_merge` adds every stored vector of every block with a
Wallace-style CSA tree followed by a CPA. This happens outside the loop and
is purely combinational from the registers.

## The five architectures

| Module | Blocks | Long path in the loop | Short path in the loop | Short when |
|---|---|---|---|---|
| `mac_type1a` | pairs of levels (`pps_1,pps_2`), (`pps_3,pps_4`), ... | 2 CSA rows | OR of the two levels, 1 CSA row | `b_i & b_(i+1)` = 0 in every pair |
| `mac_type1b` | threes of levels from the top (`pps_N..pps_(N-2)`, ...); the `N mod 3` lowest levels form a plain block | 1 CSA row (3 levels to 2) + 2 CSA rows | OR of the three levels, 1 CSA row | at most one 1 among each block's three B bits |
| `mac_type2a` | one accumulator pair for everything | lower and upper half each reduced to 2 vectors, 2 CSA rows merge them, 2 CSA rows add the accumulators | lower half's 2 vectors, 2 CSA rows add the accumulators | upper N/2 bits of B all zero |
| `mac_type2b` | as Type-II-A | as Type-II-A, but the multiplexer sits *before* the 2 accumulator rows, which both paths share | as Type-II-A | upper N/2 bits of B all zero |
| `mac_type3` | groups of four levels, each with its own pair | row of VLS 4:2 compressors (conventional path) + 2 CSA rows | same compressor row on its short path + 2 CSA rows | the two upper B bits of every group are zero |

Why the OR gates are exact (Type-I): if at most one level of a block is
non-zero, the bitwise OR of the levels *is* their sum, so one merged level
replaces two or three. In Type-I-A an AND of the two B bits detects "both
levels non-zero"; in Type-I-B three ANDs and an OR detect "two or more
levels non-zero". Each block has its own multiplexer pair.

Why skipping the upper half is exact (Type-II): if `b_(N-1)..b_(N/2)` are
zero, levels `pps_(N/2+1)..pps_N` are zero, and the lower half alone is the
product. Type-II-B trades a little delay flexibility for area: the two CSA
rows that add the accumulators are shared by both paths.

In Type-I and Type-III every block has its own short/long choice. The
loop as a whole is only faster when **all** blocks are on their short path
at the same time, and that is what the `short_path` output reports.

## The VLS 4:2 compressor (Type-III)

A conventional 4:2 compressor (`comp42`) adds four bits `x1..x4` of one
column and a carry `cin` from the column below:

```
cout  = (x4 ^ x3) ? x2  : x4          (does not depend on cin)
carry = (x4 ^ x3 ^ x2 ^ x1) ? cin : x1
sum   =  x4 ^ x3 ^ x2 ^ x1 ^ cin
x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout)
```

Its slowest outputs go through two or three gate levels after the XORs.
The VLS version (`vls_comp42`) takes `x3` and `x4` from the two upper levels
of a group of four. If their B bits (`b_hi`, `b_lo`) are both zero, `x3` and
`x4` are zero in every column, hence so are every `cout` and `cin` of the
row, and the exact outputs collapse to

```
sum = x1 ^ x2        carry = x1 & x2
```

Two multiplexers selected by `b_hi | b_lo` choose between these one-gate
results and the conventional ones. `cout` always comes from the
conventional cell. `vls_comp42_row` places W cells in a row and chains
`cout` to the next column's `cin` (0 into column 0, the top `cout` dropped).
The row outputs a sum vector and a carry vector already shifted one column
left. Level `pps_(4k+1)` goes to `x1` and level `pps_(4k+4)` to `x4`.

## Variable latency: how the short path is used

The paths are combinational; what makes the latency variable is the
sequencer `vls_ctrl`, shared by all five MACs. This timing scheme is this
design's own choice: the architecture only says that the short path allows
early completion.

* The clock period is meant to be set by the **short** path.
* If `short_path` is 1 for the offered operands, the accumulators load at
  the end of the cycle in which the pair is offered: latency 1.
* Otherwise the long path is a multicycle path. The sequencer holds
  `in_ready` low for `LONG_CYCLES - 1` extra cycles (`long_busy` = 1), then
  loads the accumulators. Default `LONG_CYCLES = 2`. Published 90 nm results
  for these architectures give long-to-short delay ratios between about
  1.15 and 1.26, so two short-path cycles always cover the long path.
* `short_path` is a function of B only, so it is known at the start of the
  cycle.

Handshake (per MAC, or per lane of the top):

```
cycle        0        1        2        3
in_valid     1        1        1        0      pair X (long), then pair Y (short)
a, b         X        X        Y
short_path   0        0        1
long_busy    0        1        0
in_ready     0        1        1               X consumed end of 1, Y end of 2
done         0        0        1        1      result includes X from 2, Y from 3
```

Rules: hold `a`, `b` and `in_valid` steady until `in_ready` is seen (an
assertion in `vls_ctrl` checks `in_valid` stays high during a long
operation). `clear` zeros the accumulators, blocks acceptance in that cycle,
and abandons a long operation in progress. `result` is always the CPA sum of
the current registers; `done` marks the cycle after a load.

## Interfaces

`mac_type1a`, `mac_type1b`, `mac_type2a`, `mac_type2b`, `mac_type3`:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (accumulators to 0) |
| `clear` | in | 1 | synchronous: zero the accumulators |
| `in_valid` | in | 1 | operand pair offered |
| `a`, `b` | in | N | unsigned multiplicand and multiplier |
| `in_ready` | out | 1 | pair consumed this cycle |
| `short_path` | out | 1 | the offered B selects the short path everywhere |
| `done` | out | 1 | `result` now includes the last consumed product |
| `long_busy` | out | 1 | a long operation is settling |
| `result` | out | ACC_W | running sum of `a*b` modulo `2^ACC_W` |

`vls_mac_top` has the same signals as 5-bit vectors (control and status) or
unpacked arrays of 5 (`a`, `b`, `result`), indexed by
`vls_mac_pkg::mac_type_e` (`MAC_TYPE1A`=0 ... `MAC_TYPE3`=4). The lanes share
only the clock and reset.

Parameters (all modules that have them): `N` operand width, default 8;
`ACC_W` accumulator width, default `2*N`; `LONG_CYCLES`, default 2.
Type-II needs an even N, Type-III a multiple of 4. The architectures were
evaluated at N = 8, 16 and 32; all three sizes are simulated here.

## Building blocks

| Module | What it is |
|---|---|
| `vls_mac_pkg` | defaults, sequencer state enum, lane enum |
| `pp_gen` | partial-product levels `pps[i] = b_i ? A << i : 0` |
| `csa` | one CSA row: `s = x^y^z`, `c = maj(x,y,z) << 1` |
| `csa_tree` | Wallace-style reduction of M rows to two, recursive by stage |
| `acc_merge` | `csa_tree` + CPA over all accumulator vectors |
| `comp42`, `vls_comp42`, `vls_comp42_row` | 4:2 compressor cells and the VLS row |
| `vls_ctrl` | variable-latency sequencer |

## Departures and choices to be aware of

* **Synchronous, not self-timed.** The short and long paths are meant for
  asynchronous or early-completion timing. Here they are sequenced by a
  clock, with the long path as a 2-cycle multicycle path. Static timing
  needs a multicycle constraint from the operand and accumulator registers,
  through the long-path CSA rows, to the accumulators. The gain only
  appears if the clock is set by the short path.
* **Unsigned operands.** Partial products are a plain AND array. No sign
  handling (Booth or Baugh-Wooley) is included.
* **Accumulator wraps** modulo `2^ACC_W` (default 2N bits). Widen `ACC_W` if
  long sums must not overflow.
* **Type-I-B grouping.** Blocks of three are taken from the most
  significant level down, and the `N mod 3` lowest levels form a plain
  non-speculative block (for N = 8: `{8,7,6}`, `{5,4,3}`, `{2,1}`). Grouping
  from the bottom (`{1,2,3}`, `{4,5,6}`, `{7,8}`) is an equally exact
  alternative. Only the short-path probability changes.
* **Reduction-tree shapes** for N > 8 (the two halves in Type-II, the final
  merge) are Wallace-style trees of CSA rows. The CPA is a behavioural `+`
  left to synthesis.
* **Clear, reset, handshake, `done`, `long_busy`** are additions needed to
  use the units; the architectures do not define them.
* Within a cycle both paths are always computed. Only the multiplexers and
  the sequencer depend on the B bits, so switching power is not reduced on
  the short path.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/vls_mac_pkg.sv tb/tb_vls_mac_top.sv --top-module tb_vls_mac_top
./obj_dir/Vtb_vls_mac_top
```

Replace the testbench for other blocks:

* `tb_<module>` for each building block. `tb_comp42` and `tb_vls_comp42`
  are exhaustive.
* `tb_mac_type*` run 3000 random operations. B is drawn to hit both paths.
  They check the short-path flag against an independently written
  condition, the latency (1 or `LONG_CYCLES`), `done`, and the running sum.
* `tb_vls_mac_top` drives all five lanes at default parameters with the
  same operand stream. Each lane runs on its own schedule. The testbench
  checks every result after every operation. It counts short operations,
  long operations (stalls), clears, idle cycles and accumulator wrap-around,
  and fails if any of them never happened.
* `tb_vls_mac_top_n16` and `tb_vls_mac_top_n32` run the same test at
  N = 16 and N = 32.
* `tb_vls_mac_top_kbit` feeds 4-bit operands to the default 8-bit MACs.
  This is the case where a wide MAC serves a narrower word length, or the
  operands are small positive numbers. Type-II must then always be on its
  short path (1.00 cycles per operation). The other lanes report their
  average: about 1.6 to 1.8 cycles per operation with that operand mix.

All of them pass. Timing (actual path delays) is not verified by
simulation. The exactness of both paths and the cycle behaviour are.
