# HEVC de-quantization and inverse transform with data reuse and reordering

An HEVC encoder or decoder runs a reconstruction loop. Coded coefficient
levels are de-quantized (DQ) and inverse transformed (IT) back into
residuals, which are added to the prediction. The inverse transform is
expensive for two reasons:

- The transforms are large, up to 32x32 points.
- A 2D transform needs a transpose memory between its row pass and its
  column pass.

This RTL puts two engines for that job side by side, plus a 1D forward DCT
for the mode-decision side of an encoder. The two main engines are built on
the same idea: **reorder data so that every memory port and every multiplier is
busy every cycle, and skip work on data known to be zero.**

| Engine | Rate | Sizes | Main trick |
|---|---|---|---|
| `idct2d_4p`: area-efficient 2D IDCT | 4 residuals/cycle | 4x4 .. 32x32 | RPISO 1D engine that needs only part of the odd constants; a transpose memory of exactly one 32x32 block, shared between successive blocks by alternating address modes |
| `dqit_system`: DQ + IT for the reconstruction loop | 16 residuals/cycle per path (luma and chroma paths in parallel) | luma 4x4 .. 32x32 (4x4 DST for intra), chroma 4x4 .. 16x16 | DQ with 4 multipliers instead of 16; SRAM buffers whose bank mapping allows 16-wide reads in any direction; zero flags that skip three kinds of memory access |

The engines share only clock and reset in `hevc_recon_top`. The 4-pixel
engine is sized for 4Kx2K at 60 frames/s, at about 200 MHz. The 16-pixel
system is aimed at 8K (7680x4320) at 120 frames/s: that needs 250 MHz when
nothing stalls, and the target clock is 300 MHz.

All transforms are HEVC's integer transforms:

- the DCT matrices with constants 64, 83, 36, 89, 75, 50, 18, ...;
- the 4x4 DST with 29, 55, 74, 84.

The intermediate rounding is HEVC's: a shift by 7 after the row pass, a
shift by 20 - bit depth after the column pass, and clipping to 16 bit in
between and at the end.

## Module hierarchy

```
hevc_recon_top
├── idct2d_4p                   4-pixel 2D IDCT
│   ├── idct1d_rpiso  (x2)      row pass IT1, column pass IT2
│   │   └── idct4_core          4-point IDCT, separate
│   └── tpose_mem4              4 x (256 x 16) two-port SRAMs
│       └── sram_1r1w (x4)
├── fwd_dct1d                   1D forward DCT, 4 outputs/cycle
└── dqit_system                 DQ + 16-pixel IT
    ├── dq                      two-stage de-quantizer, 4 multipliers
    │   └── dq_align  (x2)
    ├── dqit_path  luma (buffers 16 x 192)
    └── dqit_path  chroma (buffers 16 x 96)
        ├── qt_buffer           16 banks, DQ -> IT1
        ├── it_multishape (x2)  IT1, IT2: 16 pixels/cycle, all sizes
        │   ├── idct4_core (x4), dst4_core (x4)
        │   └── idct_odd   (x4) odd parts O8 (x2), O16, O32
        ├── tr_buffer16         16 banks, IT1 -> IT2
        └── tu_fifo   (x2)      TU information and zero flags
```

`hevc_tr_pkg` holds what the modules share:

- the TU size enum;
- the transform constants. Entry (k, n) of the N-point matrix is HEVC's
  rounded `64·√2·cos((2n+1)·k·π/(2N))`, looked up in a 33-entry table of
  |cos(m·π/64)| values with the sign of its quadrant;
- every bank and address mapping, as functions.

Each mapping is therefore written once and used by the RTL and the
testbenches alike.

## The 4-pixel 2D IDCT

### RPISO: one row in, four results per cycle

`idct1d_rpiso` takes a whole row of N coefficients at once (parallel in). It
returns the N results four per cycle over N/4 cycles (serial out).

A plain serial-out engine would need the full odd part, that is N/2
constant-multiplier dot products, in every cycle. Chen's decomposition
writes each result as a butterfly:

- `X[b] = E[b] + O[b]`
- `X[N-1-b] = E[b] - O[b]`

The engine picks the four results of a cycle as two such pairs. Each cycle
then needs only two odd sums and two even values.

The engines nest:

- The 32-point odd part O32 is two engines. Each has 16 multipliers, whose
  constants come from an 8-way choice per input.
- The even part is the 16-point engine, which has two O16 engines
  (4-way constant choice).
- The 16-point engine's even part is the 8-point engine.

The order in which the results come out is `rpiso_idx(size, cycle, slot)`.
It is carried on `out_idx`, so later stages never have to guess it.

- 4-point rows go through `idct4_core` in one cycle, outside the unified
  engine. Folding them in would cost more than a separate 4-point butterfly.
- No intermediate result is registered.

### Transpose memory with alternating modes

IT1 writes rows, and IT2 needs columns. `tpose_mem4` holds exactly one 32x32
block of 16-bit IT1 results: 4 banks x 256 words = 16384 bits. It still
never makes IT1 wait for IT2 to drain the previous block.

In the memory, v is the column slot (IT1 output slot 4k+i). Element (r, v)
goes to bank `(r + v) mod 4`, at this address:

| Mode | Address |
|---|---|
| mode 0 | `r*8 + v/4` |
| mode 1 | `v*8 + r/4` |

How the mapping works:

- Any four results of one row, or four results of one column (rows
  4m..4m+3), fall into four different banks. Each cycle therefore writes one
  word into every bank and reads one word from every bank, which is 100%
  port use.
- Successive blocks alternate between mode 0 and mode 1. Element (r, c) of
  block N+1 lands on the word that held element (c, r) of block N.
- So row r of the new block may be written as soon as column r of the old
  block has been read.

The scheduler in `tpose_mem4` enforces exactly these two rules. They hold
for any mix of block sizes:

- A write of row r waits until column r of the previous block has been read.
- A read of rows 4m..4m+3 of a column waits until those words have been
  written in an earlier cycle.

For a stream of 32x32 blocks this gives the intended pipelined schedule:

- Column 0 of block N is read while the last row of block N is written.
- Column k+1 of block N is read while row k of block N+1 is written.

The test checks that such a stream runs with no gap at all: one 32x32 block
every 256 cycles.

IT2 needs a whole column (parallel in), while the memory gives four values
per cycle. `idct2d_4p` puts two column registers between them, so one
column is collected while IT2 works on the other.

### Timing of `idct2d_4p`

- **Input:** one row per `in_valid`/`in_ready` beat. An N-point row occupies
  the row engine for N/4 cycles, and a 4-point row for 1 cycle.
- **Output:** four residuals per cycle. The column is given by `out_col` and
  the rows by `out_row[0..3]`. The output cannot be stalled.
- **Throughput:** 4 residuals/cycle for streams of 32x32 blocks. This is
  checked: four 32x32 blocks back to back with no gap.
- **Latency:** a 32x32 block leaves about 256 + 16 cycles after its first
  row enters.

## The 1D forward DCT (`fwd_dct1d`)

The forward transform runs the inverse one backwards:

- The butterfly comes first, when a row is accepted:
  `a[n] = x[n] + x[N-1-n]` and `b[n] = x[n] - x[N-1-n]`.
- The selection of outputs comes last, so results leave in natural order
  with no reordering: X[0..3] in the first cycle, X[4..7] in the next, and
  so on. An N-point row takes N/4 cycles (4 points: 1 cycle).
- In each cycle, the even outputs X[4c] and X[4c+2] are dot products of a[],
  and the odd ones X[4c+1] and X[4c+3] are dot products of b[]. Each of the
  four output engines has 16 constant multipliers, with constants chosen by
  size and cycle.
- Outputs are full precision. HEVC's forward scaling shifts are left to the
  user.

The interface is valid/ready on both sides, like `idct1d_rpiso`.

## The 16-pixel DQ + IT system

### Data flow

```
syntax elements of one coded 4x4 sub-block (SBLK)
      │  max(1, ceil(M/4)) beats, M = number of remaining values
      ▼
     dq ──────────┬──────────────────────────────┐
                  ▼ luma                         ▼ chroma (Cb, Cr)
  qt_buffer ─► IT1 ─► tr_buffer16 ─► IT2    (same path, 96-deep buffers)
      FIFO1 (TU info)      FIFO2 (TU info + non-zero row map)
                                  ▼
                16 residuals/cycle as column units
```

Luma and chroma share one de-quantizer, used in series. Most sub-blocks are
all zero and are never sent, so one DQ keeps up. The two IT paths run in
parallel.

### De-quantization with four multipliers (`dq`, `dq_align`)

A coefficient level is `baseLevel + coeff_abs_level_remaining`:

- `baseLevel` = 1 + greater1 flag + greater2 flag. It is at most 3.
- The remaining value is only present for some coefficients. These are the
  ones whose flags reached their limit: greater1 is only coded for the first
  8 significant coefficients, and greater2 only for the first greater1 one.

The product `level * scale` is split into two parts:

- `baseLevel * scale` comes from a four-entry table {0, s, 2s, 3s}, so no
  multiplier is needed.
- `remaining * scale` needs real multipliers. Few coefficients carry a
  remaining value, so four multipliers are enough.

The remaining values enter four per cycle, so a sub-block with M of them
takes max(1, ceil(M/4)) cycles.

The two stages are:

1. **Multiply.** The products of each beat are ORed into a 16-entry
   register. Products are zero outside their beat's four slots, so no
   adders are needed to merge them.
2. **Align and finish.** `dq_align` finds which coefficient each remaining
   value belongs to: a prefix count over the "has remaining" vector, then
   one multiplexer per position. Then stage 2:
   - adds the table value;
   - applies the sign;
   - rounds and shifts by `bitDepth + log2(size) - 5`;
   - clips;
   - reorders from scan order (diagonal, horizontal or vertical) to raster
     order.

Scaling is HEVC's flat scaling list: `16 * levelScale[qP%6] << (qP/6)`.

### QT buffer: writing sub-blocks, reading rows

DQ produces 4x4 sub-blocks. IT1 wants one row unit of 16 coefficients per
cycle. The row unit depends on the TU size:

| TU size | Row unit |
|---|---|
| TU4 | four 4-point rows (a whole 4x4) |
| TU8 | two 8-point rows |
| TU16 | one 16-point row |
| TU32 | half of a 32-point row |

`qt_buffer` has 16 two-port banks. Coefficient n (raster index in the
sub-block) of the sub-block at (sx, sy) goes to this bank and address:

| TU size | Bank | Address |
|---|---|---|
| TU16 | `(n + 4*sx) mod 16` | `n/4 + 4*sy` |
| TU32 | `(n + 4*(sx mod 4)) mod 16` | `n/4 + 4*(sx/4) + 8*sy` |
| TU8 | `n` (sx = 0) or `n + 8 mod 16` (sx = 1) | `n/8 + 2*sy` |

Both shapes, a sub-block and a row unit, hit all 16 banks exactly once. The
buffer is therefore written at 16 coefficients/cycle and read at 16
coefficients/cycle with no conflict.

Each bank quad and address also has a zero flag for its 4x1 row, so zeros
cost neither writes nor reads:

- Zero rows are not written.
- A quad whose flag is set is not read and returns zeros.
- Flags are set at reset, and set again by every read. A region of the ring
  is therefore "all zero" when it is handed to the next TU. Sub-blocks that
  were never coded read as zero without ever being written.

### Multiple-shape inverse transform (`it_multishape`)

IT1 and IT2 are the same module. It is one 32-point IDCT built by Chen's
decomposition, plus one more 8-point IDCT and two more 4-point IDCTs. Inside
the 32-point IDCT sit the 16-point, 8-point and 4-point ones. The same
hardware therefore transforms any of these per cycle:

- four 4-point rows: the 4-point core inside, the one inside the extra
  8-point, and the two extra ones; 4-point DSTs for intra luma;
- two 8-point rows;
- one 16-point row;
- one 32-point row every two cycles.

It has four pipeline stages:

1. 4-point results and all odd parts.
2. 8-point butterflies.
3. 16-point butterfly.
4. 32-point butterfly, shift, clip and select.

Results of small sizes are complete early. They ride to stage 4 in the
32-point odd-part registers, which are idle for those sizes.

A 32-point row arrives as two halves:

- The first half is held.
- The second half launches the whole row.
- The 32 results leave in two consecutive cycles.

The cycle after a TU32 therefore has no free output slot. The path controller
leaves one idle cycle when a smaller TU follows, and an assertion checks
this. The latency is 4 cycles.

### Transpose buffer (`tr_buffer16`)

`tr_buffer16` has 16 two-port banks and a rotated mapping. Element (r, c) of
the IT1 result goes to these banks:

| TU size | Bank |
|---|---|
| TU16 and TU32 | `(c + r) mod 16` |
| TU8 | `(c + 8*(r mod 2) + 2*(r/2)) mod 16` |
| TU4 | `c + 4r` |

Row units written by IT1 and column units read by IT2 then both use all 16
banks.

Two zero skips work here:

- **Write skip.** An all-zero input row of IT1 gives an all-zero output row.
  Its flag travels down the IT1 pipeline with the unit, and the write is
  suppressed.
- **Read skip.** FIFO2 carries a 32-bit map of the TU's non-zero rows. IT2
  reads only the banks whose element lies in a non-zero row, and the others
  return zero.

### Flow control and stalls (`dqit_path`)

This is the least obvious part of the design. There are three agents:

- **DQ side.**
  - On the first coded sub-block of a TU, a region for the whole TU is
    taken from the QT buffer, which is used as a ring: 64 addresses for a
    TU32, 16 for a TU16, 4 for a TU8 and 1 for a TU4.
  - If the region is not free, `in_ready` drops. This is the pipeline
    stall: DQ waits for IT.
  - On the last coded sub-block, the TU's size, base and DST flag go into
    FIFO1, which has 4 entries.
- **IT1 reader.**
  - Takes a TU from FIFO1.
  - Takes a region of the transpose buffer (also a ring).
  - Reads one row unit per cycle and feeds IT1.
  - Returns the QT region after its last read.
  - When the last unit is written, pushes the TU and its row map into
    FIFO2, which has 8 entries. Room in FIFO2 is reserved for every TU
    inside IT1, so FIFO2 never overflows.
- **IT2 reader.**
  - Takes a TU from FIFO2.
  - Reads one column unit per cycle and feeds IT2.
  - Returns the transpose region.

With a 192-deep luma buffer (three TU32), DQ can write the next two TU32s
while IT reads one. A dense 32x32 stream runs with no stall: 12 TUs in 909
cycles for 768 units of work, which includes the pipeline fill.

Stalls remain in sparse mixed streams for this reason:

- IT1 always reads every unit of a TU.
- DQ only spends cycles on the coded sub-blocks.

A TU32 with only a quarter of its sub-blocks coded therefore takes about 26
DQ cycles but 64 IT cycles. Back-pressure then reaches DQ once three such
TUs are queued. The skips save memory accesses (power), not cycles.

Each path counts stall cycles, QT quads skipped, and transpose slots not
written and not read. The counters are on the top's ports.

### Interface of `dqit_system`

**Upstream**, for each coded sub-block:

- It presents, for the whole sub-block:
  - `sig`, `gt1`, `gt2` and `sign` (16 bits each, in scan order);
  - the scan type and qP;
  - the TU size;
  - the component (0 = Y, 1 = Cb, 2 = Cr);
  - the position `(sx, sy)`;
  - `first`/`last` (first and last coded sub-block of the TU);
  - `dst`.
- On each beat it presents four remaining values.
- `in_last_beat` (an output) tells it which beat completes the sub-block.
- The coded sub-blocks of a TU are sent one after another; the tests use
  raster order of sub-blocks. Uncoded ones are not sent.

**Output**, for each path:

- One 16-residual column unit per cycle: `y_*` for luma, `c_*` for chroma.
- `unit` and `size` label the unit. Slot p is residual row
  `unit_col(size, unit, p)` and column `unit_row(size, unit, p)`.
- `last` marks the last unit of a TU.
- The output cannot be stalled.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`. The tests compare
against `tb_ref_pkg`:

- a plain matrix-multiply HEVC inverse transform;
- HEVC de-quantization from the syntax elements.

Neither reference shares code with the RTL except the mapping functions of
the package. What the tests cover:

- Each testbench also checks the rates it can see:
  - `it_multishape` latency;
  - 4-pixel IDCT gaps;
  - DQ cycles per sub-block;
  - dense 32x32 throughput of a path.
- `tb_hevc_recon_top` runs the top at its default parameters. It runs
  random luma, chroma, DST and 32x32 TUs through DQ + IT, a mixed block
  stream through the 4-pixel IDCT, and random rows through the forward DCT.
  It checks every output.
- It fails if any of these mechanisms never happened:
  - multi-beat sub-blocks;
  - DQ back-pressure;
  - path stalls;
  - the three kinds of skip;
  - 4-pixel input stalls;
  - the full-rate 32x32 run.

What has **not** been shown:

- timing closure at 300 MHz;
- behaviour on real bit streams (the tests use random sparse coefficient
  data).

## Differences from the original architecture

| Area | This design |
|---|---|
| IT1 register activity | All-zero rows still pass through the IT1 pipeline registers. They are not gated to save switching power; only the memory accesses are skipped. |
| Transpose read skip | Uses a full map of non-zero rows, not only the number of the last non-zero row. It skips at least as much. |
| Mapping rules | The QT-buffer and transpose-buffer bank rules are stated above. They are conflict-free and tested, but their exact form is this design's. |
| Rounding and clipping | HEVC's shifts (7, then 20 - bit depth), 16-bit clipping and the flat scaling list. Scaling lists other than flat are not supported. |
| Sizes this design chose | FIFO depths (4 and 8), the two column registers in front of the 4-pixel IT2, the idle cycle after a TU32, and the ring allocation of both buffers. |
| Upstream protocol | The sub-block interface of the de-quantizer is this design's. |
| `tpose_mem4` scheduling | Generalised from the 32x32 pipeline to any mix of sizes. |
| Forward DCT | Only the 1D core (`fwd_dct1d`) is provided. A 2D forward DCT would pair two of them around `tpose_mem4`, as `idct2d_4p` does; that is not assembled. |
| Not included | The fast PU size and mode decision, an encoder algorithm, has no hardware here. |

## Simulating

Any testbench builds with plain Verilator 5. Put the package files first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hevc_recon_top \
    rtl/hevc_tr_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_hevc_recon_top.sv
./obj_dir/Vtb_hevc_recon_top
```

About `rtl/*.sv`:

- It contains the package again. Either list the package once, or drop it
  from the glob.
- `tb_dqit_path` also needs `tb/dqit_path_harness.sv`.

Every test ends with a line of this form, and has a watchdog:

```
TB_RESULT checks=<n> failures=<n>
```

### Parameters

| Parameter | Module | Meaning |
|---|---|---|
| `BIT_DEPTH` | top, `dqit_system` | Sample bit depth (default 8). Sets the final shift, 20 - BIT_DEPTH. |
| `LUMA_DEPTH`, `CHROMA_DEPTH` | `dqit_system` | Words per bank of the luma and chroma buffers: 192 (three TU32) and 96. Smaller values still work (the ring allocation adapts, down to one TU32 region for luma), but the paths stall more. |
| `DEPTH` | `tpose_mem4` | Must hold one 32x32 block (256 per bank) if 32x32 is used. |
