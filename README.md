# Rectangular decoder for combined linear / non-linear test compression

A linear test decompressor (LFSR reseeding, an XOR expander, a ring generator)
can only produce as many specified bits as it is fed: its tester data grows
roughly linearly with the number of care bits in the test cubes. Test cubes,
however, are strongly correlated: across a group of similar cubes, some scan
chains hold the same value (or a don't-care) over long runs of consecutive
scan slices. This design is a small **rectangular decoder** placed between any
linear decompressor and the scan chains. It fills such regions with a constant,
so the linear decompressor no longer has to produce the care bits inside them.
The decoder does not depend on the test set: the same hardware decodes any
encoded test set, which lets it be shared between cores and kept unchanged when
patterns change late.

```
 tester -> linear decompressor --lin_slice--> rect_decoder --scan_in--> N scan chains
                 (not included)                    ^
 tester/decompressor ------------ctl_data----------+  (rectangle control words)
```

## Rectangles

View the test set as a matrix: one row per test cube, one column per scan
slice (the N bits shifted into the N chains in one clock). The encoder (software,
not part of this RTL) does three things:

1. It groups the cubes into **clusters** of cubes that agree on many bit
   positions. Cubes of a cluster are applied one after the other.
2. It cuts the slices of a cluster into consecutive runs, the **rectangles**.
   Every cube of the cluster is cut the same way. A rectangle is therefore
   *width* slices wide and as tall as the cluster.
3. Inside each rectangle, it marks the chains that hold only one value v or X
   in every cube of the cluster. Those chains are loaded with the **fill
   value** v. The rest are loaded from the linear decompressor.

Each rectangle is described by one control word, most significant field first:

| field              | bits (default)        | meaning                                            |
|--------------------|-----------------------|----------------------------------------------------|
| width              | `W_BITS` = 4          | rectangle width in slices, 1 .. 15 (0 is invalid)  |
| chain select mask  | `N_CHAINS/K_SHARE` = 15 | bit g = 1: chains g*k .. g*k+k-1 take the fill value |
| fill               | 1                     | the constant                                        |

A mask bit covers `K_SHARE` = 2 adjacent chains. This halves the mask, and two
neighbouring chains are often compatible anyway. A rectangle narrower than
`MIN_WIDTH` (2) ignores its mask and fill: every chain comes from the
decompressor. For one-slice rectangles, describing a mask costs more than it
saves, and the encoder can leave those fields unspecified.

Example with 4 chains and k = 1. A rectangle whose mask reads `1011` for
chains sc1..sc4, with fill 1, loads sc1, sc3 and sc4 with 1. It loads sc2 from
the decompressor. In the RTL, mask bit 0 belongs to chain 0 (sc1).

The decompressor must still produce all the control-word bits that matter, plus
one flag bit per cube. The gain is the care bits covered by fill values, less
those bits.

## How a session runs

Every test cube takes `cfg_cube_len + 1` slices from the decompressor.

* **Flag slice.** The first slice of each cube carries one bit, bit 0. It says
  whether the cube starts a new cluster. Nothing is shifted into the chains in
  this cycle.
  * **Same cluster:** the RAM pointer goes back to the cluster's first
    rectangle.
  * **New cluster, preloaded RAM** (`cfg_preload` = 1): the words of all
    clusters were written before `start`, in cluster order. The next cluster
    starts right after the last word of the previous one, so the pointer
    simply moves on and that position becomes the cluster start.
  * **New cluster, incremental loading** (`cfg_preload` = 0): the decoder
    takes this cluster's control words on `ctl_*` and writes them from address
    0. It holds off the decompressor (`lin_ready` low) while it loads. It knows
    the cluster is complete when the widths loaded add up to the cube length.
    The RAM therefore only needs to hold the largest cluster.
* **Data slices.** The control register holds the current rectangle. The chain
  multiplexers apply it to each slice, which goes out on `scan_in` with
  `scan_en` high. The width counter counts the slice. On a rectangle's last
  slice, the next word is read from the RAM into the control register and the
  pointer advances. The next rectangle is then active on the very next slice.
  After `cfg_cube_len` slices, the next flag slice is expected.

**Timing.** The RAM has a combinational read port, so moving from one
rectangle to the next costs no cycle. With a decompressor that never stalls,
a cube takes exactly `cfg_cube_len + 1` clocks: continuous-flow decompression
with one extra clock per cube. Incremental loading adds one clock per control
word, at the start of each cluster only. `lin_valid` may drop at any time; the
decoder then simply waits.

## Blocks

| module            | role                                                                 |
|-------------------|----------------------------------------------------------------------|
| `rect_pkg`        | default sizes, control-word width function, pointer-operation and state enums |
| `rect_controller` | FSM (`IDLE`, `FLAG`, `LOAD`, `SHIFT`), RAM write address, cube slice counter, overflow flag |
| `rect_ctrl_ram`   | `DEPTH` x control word; synchronous write, combinational read        |
| `ram_addr_ptr`    | next-rectangle pointer plus cluster-start register; restart / advance / next |
| `rect_ctrl_reg`   | control word of the current rectangle, split into width, mask, fill  |
| `width_counter`   | slices of the current rectangle; `last` on the rectangle's final slice |
| `chain_mux`       | per-chain 2:1 mux (fill or decompressor bit), mask bit fan-out by k, less-than comparator for narrow rectangles |
| `rect_decoder`    | top: wires the above together                                        |

## Interface of `rect_decoder`

| port                 | dir | width                  | meaning |
|----------------------|-----|------------------------|---------|
| `clk`, `rst_n`       | in  | 1                      | clock; asynchronous active-low reset |
| `start`              | in  | 1                      | pulse: leave `IDLE`, begin the session at the first flag slice |
| `cfg_preload`        | in  | 1                      | 1: RAM filled before `start`; 0: loaded per cluster. Keep it stable during a session |
| `cfg_cube_len`       | in  | `LEN_W` = 16           | scan slices per cube (scan cells / chains, rounded up) |
| `lin_valid/lin_ready/lin_slice` | in/out/in | 1/1/`N_CHAINS` | slice from the linear decompressor |
| `ctl_valid/ctl_ready/ctl_data`  | in/out/in | 1/1/20 | control word; in `IDLE` only when `cfg_preload`=1 |
| `scan_en`            | out | 1                      | shift the scan chains this cycle |
| `scan_in`            | out | `N_CHAINS`             | scan chain inputs |
| `cube_done`          | out | 1                      | the cube's last slice is being shifted |
| `new_cluster`        | out | 1                      | the flag slice being taken starts a new cluster |
| `overflow`           | out | 1                      | sticky: a cluster or test set had more words than `DEPTH` |
| `busy`               | out | 1                      | session started (not in `IDLE`) |

A transfer happens on a clock edge where valid and ready are both high. A
control word offered in `LOAD` must stay valid until it is taken.

## Parameters

| parameter   | default | origin |
|-------------|---------|--------|
| `N_CHAINS`  | 30      | the main configuration evaluated (30 scan chains) |
| `K_SHARE`   | 2       | k = 2 gave the best results and is used throughout |
| `W_BITS`    | 4       | 4-bit widths were best on three of four benchmarks (3 on the fourth) |
| `DEPTH`     | 16      | the largest single cluster at 30 chains needs 16 words of 20 bits (320 bits) |
| `MIN_WIDTH` | 2       | own choice: only one-slice rectangles bypass the mask |
| `LEN_W`     | 16      | own choice: cube length counter |

The control word is `W_BITS + ceil(N_CHAINS/K_SHARE) + 1` = 20 bits by default.
The synthesized default holds 320 RAM bits, 53 flip-flops and about 190
word-level cells.

## What is fixed by the scheme and what is this design's choice

Taken from the scheme:

* the block structure and the control-word contents;
* the mask polarity (1 = fill), the k-fold mask fan-out and the narrow-rectangle
  bypass by a width comparator;
* one flag cycle per cube, with the pointer going back for a repeated cluster
  and moving on for a new preloaded cluster;
* both RAM loading modes;
* the width counter behaviour.

Choices made here:

* the valid/ready handshakes and the separate control-word port. Words can come
  from the tester or from the decompressor;
* bit 0 of the flag slice as the flag;
* the end of incremental loading found by summing widths;
* the combinational RAM read. A synchronous functional RAM reused for this
  purpose would need one word of prefetch;
* the field order {width, mask, fill};
* width 0 being illegal, so 15 is the largest width with 4 bits;
* `MIN_WIDTH` = 2;
* the overflow flag;
* the run-time cube length;
* the reset style.

Assertions check that rectangles end exactly with each cube and that no zero
width is decoded. If rectangles overrun the cube, the rest of the rectangle is
dropped at the cube's end. If they stop short, the pointer runs into whatever
follows in the RAM. Both are encoder errors.

## Capacity against the evaluated configurations

All of the following assume incremental loading. "Words" is the size of the
largest cluster.

* **30 chains (s13207, s15850, s38417, s38584):** 9, 8, 14 and 16 words. All
  fit the default.
* **10 chains:** up to 13 words. This fits: the decoder uses its first outputs
  and mask bits.
* **20 chains:** up to 20 words. s13207 and s15850 fit. s38417 (17 words) and
  s38584 (20 words) need `DEPTH` >= 20.
* **40 chains:** needs `N_CHAINS` = 40 and 25-bit words.
* **Preloading a whole test set:** needs `DEPTH` at least the total number of
  rectangles, for example 71 for s38417 at 30 chains.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rect_pkg.sv rtl/<deps>.sv \
          tb/tb_<block>.sv --top-module tb_<block> -o sim && obj_dir/sim
```

For the top:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rect_pkg.sv rtl/*.sv \
          tb/tb_rect_decoder.sv --top-module tb_rect_decoder
```

Put `rect_pkg.sv` first; Verilator warns that the package is declared twice
when `rtl/*.sv` lists it again, and that warning is harmless.

`tb_rect_decoder` runs the top at its default parameters, end to end. It
contains:

* a generator of correlated random test cubes, 20 cubes x 56 slices;
* a software encoder: greedy clustering by a compatibility benefit, and an
  optimal dynamic-programming cut into at most `DEPTH` rectangles;
* an ideal linear decompressor that stalls at random.

It checks every slice against the expected value and every cube's care bits in
the modelled scan chains. The test sets have 15 % and 2 % care bits. It covers
incremental loading, preloading (including the `cfg_cube_len + 1` cycle rate)
and RAM overflow. It counts each mechanism and fails if one never occurs. It
also prints the care-bit reduction. That number depends on the random test
set and says nothing about the benchmark circuits. The run takes a few seconds.

The unit testbenches:

* `tb_rect_controller` checks the FSM cycle by cycle, including stalls, a
  one-word cluster and overflow.
* `tb_chain_mux` checks the mask fan-out, the narrow bypass and the worked
  example above.
* The others compare the RAM, the pointer, the register and the counter with
  reference models.

## Not included

The linear decompressor itself is not included: the scheme works with any
linear decompressor, and none is specified here. Nor are the scan chains of
the core under test, or the software that clusters and encodes a test set. The
testbench contains a simple version of the encoder only to produce stimulus.
