# 3-D Daubechies wavelet transform by the transpose method

Volumetric medical images (CT, MRI, PET, ultrasound) are compressed by
transforming them into wavelet coefficients, quantising them and
entropy-coding them. This RTL is the transform stage. It computes a 3-D
Daubechies wavelet transform, either Daub4 (4 taps) or Daub6 (6 taps), of an
N x N x N volume.

The design relies on the transform being separable. A 3-D transform is a 1-D
transform along x, then along y, then along z. So the hardware is three
identical N-point 1-D units in a chain, with two transpose memories between
them:

```
pixels ─► 1-D along x ─► T1 ─► 1-D along y ─► T2 ─► 1-D along z ─► coefficients
 (rows)   daub_1d        transpose  daub_1d    transpose  daub_1d
                         (slice)               (volume)
```

Each 1-D unit is *direct-mapped*: all N samples of a vector enter in one
cycle. Every decomposition level is a bank of multipliers, shifters and
adders followed by one register stage. The default size is N = 4. The top,
`daub3d_top`, holds two complete engines side by side, one for Daub4 and one
for Daub6. Each engine has its own ports.

## The 1-D unit (`daub_1d`)

### Filters

The scaling (low-pass) filter `h` is the standard Daubechies filter:

* Daub4: `h = {1+√3, 3+√3, 3−√3, 1−√3} / (4√2)`
* Daub6: with `z1 = √10` and `z2 = √(5+2·z1)`,
  `h = {1+z1+z2, 5+z1+3z2, 10−2z1+2z2, 10−2z1−2z2, 5+z1−3z2, 1+z1−z2} / (16√2)`

The wavelet (high-pass) filter is `g_k = (−1)^k · h_(T−1−k)`. For Daub4 this
gives `g = {h3, −h2, h1, −h0}`.

`daub_pkg` stores each tap as `round(h_k · 256)`:

| filter | h0  | h1  | h2  | h3  | h4  | h5 |
|--------|-----|-----|-----|-----|-----|----|
| Daub4  | 124 | 214 | 57  | −33 |     |    |
| Daub6  | 85  | 207 | 118 | −35 | −22 | 9  |

### One level

A level works on the first `n` elements of its input vector. It writes
`n/2` low-pass values followed by `n/2` high-pass values:

```
low[k]  = Σ_j ( x[(2k + j) mod n] · h_j ) >>> 8        k = 0 … n/2−1
high[k] = Σ_j ( x[(2k + j) mod n] · g_j ) >>> 8
```

Elements `n … N−1` pass through unchanged. The `mod n` is a periodic
extension of the vector. It handles a filter that would otherwise run past
the end of the data. At the last level of an N = 4 Daub6 transform, the six
taps wrap three times around two samples.

### Levels

Level 0 transforms all N samples. Each further level transforms only the low
half left by the previous level. With the default `LEVELS = log2(N)`, the
result is the full pyramid:

```
out = { a_L, d_L, d_(L−1)[0..1], …, d_1[0..N/2−1] }
```

For N = 4 this is `{a2, d2, d1[0], d1[1]}`.

### Number format

Samples are signed and `DW` = 24 bits wide, with 8 fraction bits. Each
product is shifted right arithmetically by 8 bits before it is summed, which
truncates. Results wrap at `DW` bits; the unit does not saturate.

At N = 4, 8-bit pixels need at most about 16 integer bits through all three
passes. The worst-case gain is the sum of the absolute tap values over 2
levels, cubed: about 41 for Daub6. For larger N, either widen `DW` or accept
wrap-around on extreme inputs.

### Pipeline

The unit has `LEVELS` register stages and accepts one vector per cycle. The
handshake is valid/ready. All stages advance together whenever the output
register is empty or being taken, so `in_ready = out_ready || !out_valid`.

## Data order through the cascade (`daub3d`, `transpose_mem`, `fetch_unit`)

This is the part that takes the most care.

### Input

The input is one row of N pixels per cycle (`in_pix[x]`). Rows arrive in
order: slice `z` outer, row `y` inner. Pixels are unsigned, `PIX_W` = 8 bits.
They are scaled by 2^8 to match the number format.

### Transpose memory

Each transpose memory has two banks that alternate (ping-pong). A block of
`VECS` vectors of N words is written row-major: element `i` of input vector
`v` goes to word `v·N + i`. Once the block is complete, the fetch unit reads
it back as `VECS` vectors. Element `j` of read vector `r` is word `j·VECS + r`.
Meanwhile the writer fills the other bank.

* **T1** (`VECS = N`) holds one N x N slice. The rule above is a plain
  matrix transpose, so row vectors (along x) go in and column vectors
  (along y) come out, for x = 0 … N−1.
* **T2** (`VECS = N²`) holds the whole volume. Its inputs are vectors along
  y, in order (z, x). Word `j·N² + r` with `r = x·N + y` is the
  coefficient at (x, y) in slice `j`. So read vector `r` collects one
  (x, y) position through all N slices, which is a vector along z.

### Output

The output is N² vectors. Vector number `x·N + y` holds the coefficients
`W[z][y][x]` for z = 0 … N−1, in element order z. Each index of `W` is in the
pyramid order of the 1-D unit. For example, `W[0][0][0]` is the
all-low-pass (approximation) coefficient of the volume.

The memories are register arrays, not RAM, because each cycle writes N words
and reads N words along a different axis.

### Fetch unit

The fetch unit is a small sequencer. It waits until the bank it is due to
read is full. It then steps through the bank's `VECS` vectors, one per cycle
in which the output register can take data. On the last vector it signals
the memory to free the bank, and it moves to the other bank.

## Timing

All latencies count clock edges, from the edge that accepts the first input
to the edge at which the first result is taken.

| unit | latency | throughput |
|------|---------|------------|
| `daub_1d` | `LEVELS` (2 at N = 4) | 1 vector/cycle |
| `transpose_mem` | 1 cycle after the block's last vector is written | 1 vector/cycle |
| `daub3d` | `3·LEVELS + N + N² + 2` (28 at N = 4, 83 at N = 8) | 1 vector/cycle |

T2 must hold a complete volume before any z-transform can start, so the
N² term dominates the engine latency. Volumes can follow each other with no
gap. The input stalls (`in_ready` low) only when a transpose memory still
owns both of its banks. With the output always ready, that does not happen
at full input rate. The engine output has no backpressure.

The `t1_swap` and `t2_swap` outputs pulse each time T1 or T2 has filled a
bank: N times and once per volume.

## Size

Per engine at N = 4 and DW = 24:

* T1: 2 × 16 words (768 bits).
* T2: 2 × 64 words (3072 bits).
* Pipeline and control: about 790 flip-flops.
* Arithmetic: three 1-D units. Each has `TAPS` multiplies per output per
  level.

## How this relates to the published architecture

These points follow the published architecture:

* the three cascaded direct-mapped N-point 1-D units;
* the two transpose modules, each read back by a fetch unit;
* the order of the passes (rows, then columns, then across slices);
* the filter formulas and the periodic edge handling;
* the multi-level decomposition;
* Daub4 and Daub6 as two engines, with N = 4.

These are the design's own choices:

* **Word lengths.** The 8 fraction bits, 24-bit samples, 10-bit taps and
  per-product truncation.
* **Handshakes and reset.** The valid/ready handshakes and the asynchronous
  active-low reset. Only valid bits and control are reset; data registers
  are not.
* **Transpose memories.** The ping-pong banks and the exact read orders of T1
  and T2.
* **Pixel format.** Unsigned 8-bit pixels.
* **Where the wrap falls.** The periodic extension wraps at the *end* of
  each vector: the last outputs use `x[0], x[1], …`. The published worked
  example writes the extension at the front instead, which rotates the
  outputs of a level. This design uses the end wrap, as in the transform
  matrix.
* **Resources and latency.** The publication reports, for N = 4, a latency
  of 130 ns, about 30 MHz and roughly 900–1050 registers per
  architecture on a Cyclone II. This RTL is not tuned to those numbers. Its
  latency is 28 cycles, and it uses register arrays for both transpose
  memories.

The quantiser and entropy coder of the full compression system are not part
of this RTL.

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog.

* `tb_daub_1d` tests the 1-D unit.
  * Daub4 and Daub6 at N = 4 and N = 8 are compared bit for bit with a
    reference model. The model derives its taps from the closed-form
    formulas with `$sqrt`, not from the design's table.
  * Inputs are random and extreme, with random input gaps and output stalls.
  * The pipeline latency is checked.
  * The first level of the 8-point Daub4 example `f = (2,5,8,9,7,4,−1,1)`
    is checked against hand-computed values:
    `(5.78, 12.4, 6.37, 0.155 | 0.966, 0.871, −3.12, −0.837)`.
* `tb_fetch_unit` checks the read sequence under random `bank_full` and
  `rd_allow` patterns.
* `tb_transpose_mem` tests T1 and T2 geometry.
  * Blocks stream back to back, with random stalls on both sides.
  * Data order, latency and bank-swap counts are checked.
  * The test also checks that the input was stalled at least once.
* `tb_daub3d` tests full 3-D engines: Daub4 at N = 4, and Daub6 at N = 4
  and N = 8.
  * Outputs are compared with a bit-exact 3-D reference (`tb/daub3d_ref.sv`).
  * The volumes are random, all-zero and constant, and the latency is
    checked.
  * Bank swaps, idle input cycles and back-to-back volumes are counted.
* `tb_daub3d_top` runs the top at its default parameters. Both engines
  transform eight volumes each, and every coefficient is checked.

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/daub_pkg.sv tb/tb_daub3d_top.sv --top-module tb_daub3d_top -o sim
./obj_dir/sim
```

Replace `tb_daub3d_top` with any other testbench name. Each one runs in well
under a second.

## Files

| file | contents |
|------|----------|
| `rtl/daub_pkg.sv` | number format and filter taps |
| `rtl/daub_1d.sv` | N-point 1-D Daub4/Daub6 unit, one stage per level |
| `rtl/fetch_unit.sv` | read sequencer of a transpose memory |
| `rtl/transpose_mem.sv` | two-bank transpose memory (T1 and T2) |
| `rtl/daub3d.sv` | one 3-D engine: three 1-D units, T1 and T2 |
| `rtl/daub3d_top.sv` | Daub4 and Daub6 engines side by side |
| `tb/tb_*.sv` | self-checking testbenches |
| `tb/*_harness.sv`, `tb/daub3d_driver.sv`, `tb/daub3d_ref.sv` | stimulus and reference models used by the testbenches |

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 4 | transform size per dimension (power of two) |
| `TAPS` | 4 / 6 | filter length (`daub_1d`, `daub3d`) |
| `LEVELS` | log2(N) | decomposition levels per dimension |
| `DW` | 24 | coefficient width (8 fraction bits) |
| `PIX_W` | 8 | pixel width |
