# Vedic multiply-accumulate unit with parallel-prefix adders

A multiply-accumulate (MAC) unit computes `c <= c + a*b` once per clock. It is the
inner loop of FIR filters, convolutions and dot products. Its speed depends on two
carry paths: the one inside the multiplier, where partial products are summed, and the
feedback adder of the accumulator.

This RTL shortens both paths in two ways:

* **Multiplier.** It uses the *Urdhva Tiryakbhyam* ("vertically and crosswise")
  scheme from Vedic arithmetic. An NxN product is split into four (N/2)x(N/2)
  products that are all formed at once, and this is repeated down to a 2x2 cell
  made of AND gates and two half adders.
* **Adders.** Every adder, both where the four sub-products are merged and in the
  accumulator, is a *parallel-prefix* adder instead of a ripple-carry adder. Its
  carries are computed in O(log N) levels.

Four prefix networks are provided: Kogge-Stone, Brent-Kung, Ladner-Fischer and
Han-Carlson. One parameter switches the whole unit between them.

The main configuration has 16-bit unsigned operands and a 32-bit accumulator. It
follows the design published in *"FPGA Implementation of Multiplication and
Accumulation Unit using Vedic Multiplier and Parallel Prefix adders in SPARTAN 3E"*.
The 4- and 8-bit versions reported there are available through a parameter.

```
   a[15:0]  b[15:0]
      |        |
  +---v--------v---+
  |   vedic16 (q1) |  combinational 16x16 -> 32
  +-------+--------+
          | prod[31:0]
  +-------v--------------------+
  |  accumulator (q2)          |
  |   rout + rin --> register -+---> c[31:0]
  |     ^  (prefix adder)      |
  |     +----------------------+
  +----------------------------+
```

## The Vedic multiplier

### The 2x2 cell (`vedic2`)

For two-bit operands `a = a1a0` and `b = b1b0`:

| output | how it is formed |
|---|---|
| `s[0]` | `a0 & b0`, the vertical product of the LSBs |
| `s[1]` | sum bit of a half adder on the two crosswise products `a0 & b1` and `a1 & b0` |
| `s[2]` | sum bit of a second half adder on that carry and the vertical MSB product `a1 & b1` |
| `s[3]` | carry out of the second half adder |

Example: `11 x 11`. The LSB product is 1. The crosswise products 1 + 1 give 10, so
`s[1]` = 0 with a carry of 1. That carry plus the MSB product 1 gives 10, so `s[3:2]` = 10.
The result is `1001`.

### Doubling the width (`vedic4`, `vedic8`, `vedic16`, `vedic_combine`)

Write `A = {Ah, Al}`, `B = {Bh, Bl}` and let `H = N/2`. Four half-size multipliers form
these products at the same time:

* `q_hh = Ah*Bh` and `q_ll = Al*Bl`, the vertical products;
* `q_lh = Al*Bh` and `q_hl = Ah*Bl`, the crosswise products.

The product is then

```
A*B = q_hh << N  +  (q_lh + q_hl) << H  +  q_ll
```

`vedic_combine` adds these terms with three N-bit prefix adders and one OR gate:

```
adder 1:  s1, c1 = q_lh + q_hl
adder 2:  s2, c2 = s1 + {H'b0, q_ll[N-1:H]}
adder 3:  s3     = q_hh + {(H-1)'b0, c1|c2, s2[N-1:H]}

product  = { s3, s2[H-1:0], q_ll[H-1:0] }
```

The low H bits of `q_ll` are already final, so they go straight to the output. The
upper half of `q_ll` is aligned with the cross sum. The carries out of adders 1 and 2
both weigh 2^(N+H). They enter adder 3 as one bit at position H of its second operand.

An OR is enough to merge them because they are never both 1. If `c1` = 1, then
`s1 = q_lh + q_hl - 2^N <= 2^N - 2^(H+2) + 2`. Adding at most `2^H - 1` to that
cannot carry out of adder 2. Adder 3 never carries out either, because the full
product fits in 2N bits. Its carry is left unused. Both facts are checked by
immediate assertions in `vedic_combine`.

`vedic4` is built from four `vedic2`, `vedic8` from four `vedic4` and `vedic16` from
four `vedic8`. Each uses one `vedic_combine` of its own width. A 16x16 multiply
therefore contains 64 2x2 cells and 63 prefix adders: 48 of 4 bits, 12 of 8 bits and
3 of 16 bits.

## Parallel-prefix adders

All four adders (`ks_adder`, `bk_adder`, `lf_adder`, `hc_adder`) share the same outer
structure:

1. **Preprocessing, per bit:** `P[i] = a[i] ^ b[i]` and `G[i] = a[i] & b[i]`. The
   carry-in is folded into bit 0: `G[0] |= P[0] & cin`.
2. **Prefix network:** a set of levels. At each level a position either passes its
   (G,P) pair on unchanged or merges it with the pair of a lower position, using the
   associative operator

   ```
   (G, P) o (G', P') = (G | P & G',  P & P')
   ```

   This operator is `mac_pkg::pg_dot`. After the last level, position i holds `G[i:0]`,
   which is the carry out of bit i.
3. **Sum, per bit:** `sum[i] = P[i] ^ carry[i-1]`, with `sum[0] = P[0] ^ cin`. The carry
   out is `carry[N-1]`.

The networks differ only in which lower position a node takes at each level. Each
module states this as a small constant function, `partner(level, position)`. That
function is the first thing to read, or to change, in any of the four files.

| adder | levels (N=16) | merge cells (N=16) | rule |
|---|---|---|---|
| Kogge-Stone | log2 N = 4 | 49 | at level k, every position i >= 2^k takes i - 2^k. Fan-out 2, most wires. |
| Brent-Kung | 2 log2 N - 1 = 7 | 26 | up-sweep: at level k, positions with (i+1) divisible by 2^(k+1) take i - 2^k. Down-sweep: at distance d, positions 3d-1, 5d-1, ... take i - d. Fewest cells. |
| Ladner-Fischer | log2 N + 1 = 5 | 27 | odd positions take their even neighbour. A Sklansky tree (minimum depth, high fan-out) runs over the odd positions. A last level gives the even positions their carries. |
| Han-Carlson | log2 N + 1 = 5 | 32 | like Ladner-Fischer, but a Kogge-Stone tree runs over the odd positions (low fan-out). |

`ppa_adder` picks one of the four with the `KIND` parameter, of type
`mac_pkg::adder_e`: `ADDER_KS`, `ADDER_BK`, `ADDER_LF` or `ADDER_HC`. Every adder in
the multiplier and the accumulator is a `ppa_adder`. The width must be a power of two.

## Accumulator and timing

`accumulator` is a W-bit register (W = 2N = 32) fed by a prefix adder, `rout + rin`.
Its behaviour on each rising clock edge:

* **Normal operation:** it loads the sum.
* **Reset:** `rst` is synchronous and active high. When it is high at an edge, the
  register is cleared.
* **Overflow:** the adder's carry out is dropped, so the sum wraps modulo 2^32.

`vedic_mac` connects the combinational multiplier straight to the accumulator:

* The operands present before a rising edge have their product added at that edge.
* `c` shows the new sum right after that edge.
* Latency is one clock, and a new product can be accumulated every clock.
* There is no enable input. The unit accumulates on every clock that reset is low.
* The critical path runs from `a`/`b` through the 16x16 multiplier and the 32-bit
  adder into the register.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `vedic_mac` | `N` | 16 | operand width: 4, 8 or 16 (an assertion rejects others). The accumulator is 2N bits. |
| all multipliers, `vedic_combine`, `accumulator`, `vedic_mac`, `ppa_adder` | `KIND` | `ADDER_LF` | prefix network used by every adder below that module |
| `ks_adder`, `bk_adder`, `lf_adder`, `hc_adder`, `ppa_adder`, `vedic_combine` | `N` | 16 | adder width, a power of two |
| `accumulator` | `W` | 32 | register and adder width |

## Files

| file | contents |
|---|---|
| `rtl/mac_pkg.sv` | `adder_e` enum, `pg_t` struct and the `pg_dot` prefix operator |
| `rtl/vedic_mac.sv` | top level: multiplier plus accumulator |
| `rtl/accumulator.sv` | accumulate register with a prefix adder |
| `rtl/vedic16.sv`, `vedic8.sv`, `vedic4.sv` | NxN Vedic multipliers |
| `rtl/vedic_combine.sv` | three adders and the OR gate that merge four sub-products |
| `rtl/vedic2.sv`, `half_adder.sv` | 2x2 cell and its half adder |
| `rtl/ppa_adder.sv` | selects a prefix network |
| `rtl/ks_adder.sv`, `bk_adder.sv`, `lf_adder.sv`, `hc_adder.sv` | the four prefix networks |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_mac_configs.sv` | the MAC at N = 4, 8, 16 with each adder kind |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and calls `$finish`. Each
also has a watchdog that counts a failure if the run hangs. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/mac_pkg.sv tb/tb_vedic_mac.sv --top-module tb_vedic_mac
./obj_dir/Vtb_vedic_mac
```

Substitute any other `tb_*` name. The testbenches use only two-state values and
`$urandom`.

* **`tb_vedic_mac`** runs the unit at its default parameters (N=16,
  Ladner-Fischer) in two phases, checking `c` after every clock against a model:
  1. It replays the operand sequence of the published simulation: 56x98, 50x20,
     100x50, 30x20, 80x90, 126x79, 256x56, 36x96, 32x25, then a reset. The expected
     sums are worked out from those operands.
  2. It runs 50,000 random cycles with bursts of `FFFF x FFFF` and random resets.
     It counts how often accumulation, reset during accumulation, 32-bit wrap-around
     and the maximum product occur, and fails if any of them never occurs.
* **`tb_mac_configs`** runs the ten configurations side by side: N = 4, 8, 16 with
  Kogge-Stone, Brent-Kung and Ladner-Fischer, plus Han-Carlson at 16 bits.
* **Multiplier testbenches:** `tb_vedic4` and `tb_vedic8` are exhaustive for all
  adder kinds. `tb_vedic16` uses the published example products (25x25=625,
  56x89=4984, 256x58=14848, 156x65=10140, 78x45=3510, 36x54=1944, 200x200=40000),
  extreme values, walking ones and 20,000 random pairs.
* **Adder testbenches** check 16-bit corner cases and random operands. They are
  exhaustive at 8 bits and include the 4-bit worked example 1001 + 1100 = 10101.

All of these testbenches run in a few seconds.

## Where this RTL departs from, or goes beyond, the published design

* **Accumulator width.** The published block diagram labels the adder and
  accumulator output as 33 bits. Its schematic, waveform and flip-flop count (32 for
  the 16-bit unit) show 32 bits. The 32-bit version is built, so the sum wraps
  modulo 2^32 and no overflow flag is brought out. The published I/O counts for the
  4- and 8-bit units (19 and 35) are one higher than 2N + 2N + clock + reset, and are
  not reproduced.
* **Which adder the MAC uses** is not stated in the source. `ADDER_LF` is the default
  because its multiplier size plus an accumulator adder best matches the reported MAC
  LUT count. Kogge-Stone alone would exceed it.
* **Prefix operator.** The black cell uses the standard operator given above.
* **Ladner-Fischer network.** This is the textbook network: an odd/even split with a
  Sklansky tree, log2 N + 1 levels. It matches the source's description of the adder
  as low-depth with high fan-out.
* **Brent-Kung network.** The published 16-bit drawing has 6 levels because it
  places two tree nodes (15 <- 7 and 11 <- 7) in one level. Here they are on
  successive levels. The function is identical and the depth is one level more.
* **Han-Carlson** is named in the source but not drawn or evaluated. The textbook
  network is provided as a fourth `KIND`.
* **Choices made in this RTL:**
  * reset is synchronous and active high;
  * operands are unsigned;
  * there is no accumulate-enable, since the source accumulates every clock;
  * adders have a carry-in port, tied to 0 everywhere in the MAC;
  * the 4- and 8-bit multipliers reuse the 16-bit splitting scheme at smaller sizes.
* **Not included:**
  * the conventional MAC (ripple-carry adders with an array multiplier), which the
    source uses only as a baseline for comparison;
  * the FPGA board and on-chip logic analyser used for measurement;
  * timing and area results. These come from a vendor FPGA flow, and nothing in the
    RTL is tuned to them.

## Trust

Every module has a self-checking testbench that compares it with an independent
arithmetic model. Each testbench has also been shown to fail on a deliberately broken
copy of its module. The multipliers are checked exhaustively up to 8x8 and by
extreme-value and random testing at 16x16. The MAC is checked cycle by cycle over tens
of thousands of cycles in all ten configurations. Everything is synthesizable: it
lints cleanly under Verilator `-Wall`, and elaborates and synthesizes under Yosys with
the slang front end, with no latches or combinational loops.

Generic synthesis at the defaults gives these sizes:

| block | size |
|---|---|
| `vedic16` | about 2,000 gate-level cells |
| 16-bit Kogge-Stone adder | 182 cells |
| 16-bit Brent-Kung adder | 113 cells |
| 16-bit Ladner-Fischer adder | 116 cells |
| 16-bit Han-Carlson adder | 131 cells |
| `vedic_mac` | 32 flip-flops in total |
