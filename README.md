# Defect tolerant parallel prefix adder

When manufacturing defect rates are high, a chip may not yield a single adder
that is entirely free of defects. This adder is built so that a defect-free
*part* is enough. Its carry network is split into **K groups of disjoint
hardware**. Every group can rebuild the results of all the others. After test,
the adder is told which groups are defect free. Each bit then takes its carry
from a copy that only defect-free hardware computed. The sum is exact as long
as **any one** of the K groups has no defect.

The scheme works with any parallel prefix adder (PPA) structure. The group
count K and the prefix network used inside each group (the *Sub-Adder*) are
two independent parameters. The RTL supports Kogge-Stone, Han-Carlson,
Ladner-Fischer, Brent-Kung and ripple-carry Sub-Adders. The default is a
64-bit adder with 4 groups of Brent-Kung Sub-Adders.

Everything is combinational SystemVerilog (IEEE 1800-2017). It has no clock
and no state.

## Prefix addition in one paragraph

Each bit pair gives a generate/propagate pair, `g_i = a_i & b_i` and
`p_i = a_i ^ b_i`. For a span of bits i..j, `(G_{i:j}, P_{i:j})` says whether
the span produces a carry and whether it passes one through. Two adjacent spans
merge with the prefix operator:

    (G_hi, P_hi) o (G_lo, P_lo) = (G_hi | P_hi & G_lo,  P_hi & P_lo)

The operator is associative, so any merge order gives the same result. The
merge orders are the different PPA types. Once every `G_{i:0}` is known, the
carry into bit i is `G_{i-1:0}` and the sum bit is `s_i = p_i ^ G_{i-1:0}`. A
node that merges n spans at once is an *n-input GP Block*
(`rtl/gp_block.sv`).

## The datapath

    a, b ──► gp_bitgen ──► group_split ──► sub_adder  x K ──► redundancy_gen ──► copy_select ──► sum_gen ──► sum, cout
                 │          (radix-K KSA    (one per group,    (K-1 extra GP       ▲ group_ok
                 │           first level)    any PPA type)      Blocks per bit)
                 └──────────── bit-level (g,p) ────────────────────┴─────────────────────────────────┘

Bit i belongs to group `i mod K`.

1. **Group-Split** (`group_split`). This is the first level of a radix-K
   Kogge-Stone adder. Bit i merges bits i, i-1, ..., i-K+1 in one K-input
   block, which gives `(G_{i:i-K+1}, P_{i:i-K+1})`. That span ends exactly
   where the span of bit i-K begins. From this level on, bit i therefore only
   needs bits i-K, i-2K, ..., all of which are in its own group. The bits below
   K-1 use (i+1)-input blocks and already hold `G_{i:0}`.
2. **Sub-Adders** (`sub_adder` and `*_prefix`). Each group runs an ordinary
   prefix network over its own bits. Element j of group r is bit `r + j*K`,
   and element 0 already holds `G_{r:0}`. Merging all elements gives
   `G_{i:0}` for every bit of the group. No signal crosses between groups, so
   a defect here corrupts only its own group's results.
3. **Redundancy-Generation** (`redundancy_gen`). Every bit gets K-1 more
   copies of its prefix, one rebuilt from each other group:

        copy c of bit i = (g_i,p_i) o ... o (g_{i-c+1},p_{i-c+1}) o (G_{i-c:0},P_{i-c:0}),   c = 1..K-1

   Copy c is a (c+1)-input GP Block. Its only group-computed input comes from
   bit i-c, which is in group `(i-c) mod K`. Copy 0 is the bit's own result.
   The K copies of a bit thus come from K different groups. Each copy's block
   counts as hardware of the group it extends. A defect confined to one group
   therefore spoils at most one copy of each bit.
4. **Copy selection** (`copy_select`). `group_ok[r] = 1` marks group r as
   defect free. For each bit, the selector takes the copy from the *nearest*
   good group at or below the bit: the smallest c with `group_ok[(i-c) mod K]`.
   A bit whose own group is good uses its own result and adds no delay.
   Otherwise the selected block has c+1 inputs, so the extra delay grows with
   the number of consecutive bad groups. Like the output MUXes of any
   redundancy scheme, this block must itself be built defect free.
5. **Sum** (`sum_gen`): `s_0 = p_0`, `s_i = p_i ^ G_{i-1:0}`, and
   `cout = G_{WIDTH-1:0}`.

### Worked example (24 bits, K = 3)

Bit 12 is in group 0, and its own Sub-Adder gives `G_{12:0}`. Copy 1 is
`(g_12,p_12) o (G_{11:0},P_{11:0})`, built from bit 11 in group 2. Copy 2 is
`(g_12,p_12) o (g_11,p_11) o (G_{10:0},P_{10:0})`, built from bit 10 in
group 1. Suppose groups 0 and 2 are defective (`group_ok = 3'b010`). Bit 12
then takes copy 2, bit 13 (group 1) takes its own result, and bit 14
(group 2) takes copy 1, which comes from bit 13.

## Sub-Adder types

`SUB` selects the network in every group (type `dtppa_pkg::sub_adder_e`). All
five give the same function. For N elements they differ as follows:

| `SUB`     | network                                               | depth (2-input levels) | blocks (N = 16) |
|-----------|-------------------------------------------------------|------------------------|-----------------|
| `SUB_KSA` | Kogge-Stone: level l merges j with j-2^l              | log2 N                 | 49              |
| `SUB_HCA` | Han-Carlson: Kogge-Stone on the odd elements, plus one level before and one after | log2 N + 1 | 32   |
| `SUB_LFA` | Ladner-Fischer, minimum-depth (Sklansky-type) form    | log2 N                 | 32              |
| `SUB_BKA` | Brent-Kung: up-sweep tree, then down-sweep tree       | 2 log2 N - 1           | 26              |
| `SUB_RCA` | ripple chain                                          | N - 1                  | 15              |

Any N ≥ 1 works. N need not be a power of two, so WIDTH need not be a
multiple of K: group r holds `ceil((WIDTH-r)/K)` bits. A 64-bit adder with 3,
5 or 6 groups is therefore valid.

## Cost and delay

Size is conventionally estimated as `6n + 2` transistors per n-input GP Block.
Delay is estimated as the sum of block fan-ins along the critical path. For
the default (64 bits, K = 4, Brent-Kung), the GP Blocks are:

| stage                  | 2-input | 3-input | 4-input |
|------------------------|---------|---------|---------|
| Group-Split            | 1       | 1       | 61      |
| Sub-Adders (4 x 26)    | 104     | –       | –       |
| Redundancy-Generation  | 65      | 63      | 61      |

That is about 6,800 transistors of GP Blocks, against 1,680 for one plain
64-bit Brent-Kung adder. For comparison, four whole spare adders would need
6,720 and would fail as soon as every adder had one defect. With K = 2 the
GP Blocks total 3,360 transistors; with K = 6, 11,636.

The delay grows only slightly. Group-Split adds one K-input level, and the
Sub-Adders are K times narrower. The selected redundant copy adds nothing when
the bit's own group is good, and c+1 otherwise. For example, a 64-bit 4-group
ripple design has a fan-in sum of 4 + 15 x 2 = 34, plus 0, 2, 3 or 4 for the
copy. A plain 64-bit ripple adder has 126.

Generic synthesis of the default configuration gives about 1,600 gates
(AND/OR/XOR/MUX).

## Interface

`dtppa_adder #(WIDTH = 64, K = 4, SUB = SUB_BKA)`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `a`, `b`    | in  | WIDTH | operands |
| `group_ok`  | in  | K     | bit r = 1: group r (bits with i mod K = r) is defect free |
| `sum`       | out | WIDTH | a + b, low WIDTH bits |
| `cout`      | out | 1     | carry out |
| `tolerated` | out | 1     | `|group_ok`: the result is guaranteed only when this is 1 |

`group_ok` is a static configuration. The post-manufacturing test that finds
defective groups, and the fuses or register that hold the result, are outside
this RTL. With `group_ok = '1` (nothing known bad) every bit uses its own
group's result, which is the fastest path. There is no carry input.

## Where this RTL makes its own choices

The following follow the published scheme: the group split, the interleaved
disjoint groups, the free choice of Sub-Adder, the redundancy equations and
the selection of copies by output MUXes. These are this design's own choices:

- **The selection rule.** The scheme only says that the correct copy is
  selected. This RTL uses the nearest good group below each bit, from a K-bit
  mask. That rule matches the stated delay behaviour (no extra delay when
  defect free, more with more defective groups). It needs only K
  configuration bits, not a select per bit.
- **`tolerated` output, and all-zero `group_ok`.** With `group_ok = 0`, copy 0
  is passed on and `tolerated` is 0.
- **Shared cells outside the groups.** The bit-level g/p cells and the sum XORs
  are shared by all groups, so the group structure does not cover them.
  Defects there are not tolerated.
- **The Ladner-Fischer network.** It uses the minimum-depth (fan-out doubling)
  form. Brent-Kung, Han-Carlson and Kogge-Stone use their textbook forms.
- **Default K = 4 and SUB = Brent-Kung.** The scheme is evaluated for 2 to 6
  groups and five Sub-Adder types, and no single configuration is primary.
- **No transistor-level model.** The published reliability figures come from a
  statistical transistor-level defect model. That model is not part of this
  RTL. Testing here uses stuck-at faults on GP Block outputs instead.
- **No spare-adder baseline.** The "N spare adders plus MUX" baseline that the
  scheme is compared against is not included.

## Verification

Each module has a self-checking testbench in `tb/`. It compares against
references computed independently, mostly with the simulator's own `+` on
operand slices. Each one ends with the line
`TB_RESULT checks=<n> failures=<n>`.

- `tb_<block>`: one per module. The prefix networks are checked against a
  serial fold at N = 1, 2, 3, 5, 8, 11, 16 and 23, and the GP Block
  exhaustively for fan-ins 1 to 6. Redundancy-Generation is also checked with
  one group's prefixes corrupted: every copy from another group must stay
  exact.
- `tb_dtppa_adder`: the full default adder, end to end. In each of 300 trials,
  stuck-at-0/1 defects are forced (with `force`) onto a Group-Split output, a
  Sub-Adder output or a redundant copy, in each group of a random set of
  "bad" groups. The trial then checks four things. With `group_ok` set to the
  good groups, and with `group_ok` set to any single good group, every sum
  must be exact. With `group_ok = '1`, the defect must be visible. With
  `group_ok = 0`, `tolerated` must be 0. The testbench counts each of these
  events and every copy distance 0..K-1, and fails if any never happened. The
  fault injection lives in `tb/tb_dtppa_body.svh`.
- `tb_dtppa_{ksa,hca,lfa,bka,rca}_groups`: the same run for 64-bit adders with
  2, 3, 4, 5 and 6 groups of each Sub-Adder type. They also cover the 16-bit
  2-group Kogge-Stone and Brent-Kung adders and the 24-bit 3-group
  Kogge-Stone adder.

To run one, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/dtppa_pkg.sv tb/tb_dtppa_adder.sv --top-module tb_dtppa_adder
    ./obj_dir/Vtb_dtppa_adder

Building the full-size testbench takes about 20 s, mostly because of the many
fault-injection processes. The multi-configuration testbenches take about
1.5 minutes each. Each simulation runs in about a second.

## Files

| file | contents |
|------|----------|
| `rtl/dtppa_pkg.sv` | `gp_t`, the prefix operator `gp_combine`, `sub_adder_e`, size helpers |
| `rtl/dtppa_adder.sv` | top level |
| `rtl/gp_bitgen.sv`, `rtl/gp_block.sv` | bit-level g/p; n-input GP Block |
| `rtl/group_split.sv` | Group-Split stage |
| `rtl/sub_adder.sv`, `rtl/{ksa,hca,lfa,bka,rca}_prefix.sv` | Sub-Adder selector and the five prefix networks |
| `rtl/redundancy_gen.sv` | Redundancy-Generation stage |
| `rtl/copy_select.sv` | output copy selection |
| `rtl/sum_gen.sv` | carries and sum |
| `tb/*.sv`, `tb/*.svh` | testbenches and the shared fault-injection body |
