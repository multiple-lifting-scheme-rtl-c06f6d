# Multiple-lifting line-based 2-D (9,7) DWT

A one-level 2-D discrete wavelet transform with the (9,7) lifting filter, in
column-row order as JPEG2000 uses it, built around one idea: the memory that a
line-based DWT needs for the column filter (the *temporal buffer*, one set of
lifting-core registers per image column) should be touched as rarely as
possible, and never twice in one cycle.

In a conventional line-based column DWT every step of the lifting core reads a
column's four registers from the temporal buffer and writes them back in the
same cycle, so the buffer must be a two-port RAM accessed twice per cycle. Here
the column filter instead performs **N consecutive lifting steps on the same
column in N consecutive cycles** (the *N-lifting* scheme). The column's
registers are read from the RAM once, kept in a local register set for the N
steps, and written back once. The RAM then sees one access every N/2 cycles on
average, at most one per cycle, and can be single-port, while a single
processing element (PE) still does one lifting step per cycle.

Feeding N row pairs of one column before moving to the next column requires a
matching scan of the image: the **M-scan**. It walks the image in horizontal
stripes 2N rows high, column by column, top to bottom inside each column. The
column coefficients of a stripe can then go straight into the row filter
through only 4N registers, so no line-sized data buffer is needed between the
column and row transforms. The row filter keeps one lifting-core register set
per row of the stripe (8N words).

Default configuration: 128 x 128 images, 8-bit pixels, N = 2 (the two-lifting
scheme). N = 4 (four-lifting) and other sizes are parameters.

## Block structure

```
 pixel pairs ──► column_dwt ──► coef_buffer ──► row_dwt ──► coefficient pairs
 (M-scan order)   │  PE + 4 regs   (4N regs)     PE + 2N x 4 regs
                  ▼
            temporal_buffer (single-port, IMG_W words of 4 x 16 bit)

            mscan_ctrl: scan order, RAM schedule, row steps, handshake
```

| File | Role |
|---|---|
| `rtl/dwt_pkg.sv` | widths, (9,7) constants, `lift_state_t` (the four core registers), boundary flags |
| `rtl/lifting_pe.sv` | combinational (9,7) lifting step, shared by column and row filters |
| `rtl/temporal_buffer.sv` | single-port RAM, synchronous read |
| `rtl/column_dwt.sv` | column filter: PE, local register set, temporal buffer |
| `rtl/coef_buffer.sv` | 4N coefficient registers between the two filters |
| `rtl/row_dwt.sv` | row filter: PE, 2N x 4 register array, output register |
| `rtl/mscan_ctrl.sv` | M-scan sequencer and N-lifting scheduler |
| `rtl/ml_dwt2d_top.sv` | top level |

## The lifting step

Each PE call consumes one sample pair, odd `x(2n-1)` and even `x(2n)`, plus the
four core registers (previous even sample, and the previous results of the
first three lifting steps). It evaluates the four lifting nodes in one
combinational chain:

```
d1(2n-1) = x(2n-1)  + α·(x(2n-2)  + x(2n))
s1(2n-2) = x(2n-2)  + β·(d1(2n-3) + d1(2n-1))
d2(2n-3) = d1(2n-3) + γ·(s1(2n-4) + s1(2n-2))
s2(2n-4) = s1(2n-4) + δ·(d2(2n-5) + d2(2n-3))
```

It outputs `low = s2(2n-4)/K` and `high = K·d2(2n-3)`, the coefficient pair of
sample pair n-2. The new registers are `x(2n), d1, s1, d2`. A line of length L
therefore takes L/2 + 2 steps: step 0 carries only `x(0)`, and the last two
steps complete the lifting at the far edge.

Arithmetic: α..δ and K are the JPEG2000 irreversible constants as signed
16-bit numbers with 12 fractional bits (−6497, −217, 3616, 1817; K = 5039,
1/K = 3330). Each product is floored to 12 fractional bits. All values are
16-bit signed, which is enough for one level on 8-bit images.

Image edges use whole-sample symmetric extension. The PE does not extend the
data. Four flags substitute the mirrored neighbour at the one node that needs
it:

| flag | step | substitution |
|---|---|---|
| `first1` | 1 | `d1(-1) := d1(1)` |
| `first2` | 2 | `d2(-1) := d2(1)` |
| `last` | L/2 | `x(L) := x(L-2)` |
| `flush` | L/2+1 | `s1(L) := s1(L-2)` |

Steps 0 and 1 produce no output. The garbage they compute is never used, so
the registers need no clearing between lines.

## The N-lifting column schedule

Input rows are paired as (2k−1, 2k), k = 0 … IMG_H/2, plus one more step
(k = IMG_H/2+1) with no input. A column needs NSTEP = IMG_H/2 + 2 steps, split
into NSTRIPE = ⌈NSTEP/N⌉ stripes of N steps. Stripe s covers steps sN … sN+N−1
of every column.

Time inside a stripe is counted in *slots* of 2N cycles. In slot m the column
filter works on column 2m in cycles 0…N−1 and on column 2m+1 in cycles N…2N−1.
The RAM has a synchronous read, so a column's registers are fetched in the last
cycle of the previous column's group. Its final registers are written back from
the local register set in the first cycle of the next group. For N = 2:

| cycle of slot m | column PE | temporal buffer | row PE (step m) |
|---|---|---|---|
| 0 | column 2m, step 2s (registers from RAM) | write column 2m−1 | row 3 of step m−1 |
| 1 | column 2m, step 2s+1 (local registers) | read column 2m+1 | row 0 |
| 2 | column 2m+1, step 2s (registers from RAM) | write column 2m | row 1 |
| 3 | column 2m+1, step 2s+1 (local registers) | read column 2m+2 | row 2 |

Every column costs one read and one write per stripe, i.e. 2 accesses per N
lifting steps, against 2 per step for a conventional line-based core. A read
and a write never share a cycle (asserted in `mscan_ctrl`). For N = 1 they
would, so the design requires N ≥ 2.

## The M-scan and the row filter

Each column step yields a lowpass/highpass pair, which makes two intermediate
rows. A stripe therefore holds 2N intermediate rows: row 2q is the L-band row
and row 2q+1 the H-band row of step sN+q. The row filter takes column pairs
(2m−1, 2m), the same odd/even pairing as the column filter. It runs one cycle
behind the column side: in slot m it performs row step m for rows 0…2N−1, one
row per cycle. Each row's four core registers live in `row_dwt`'s 2N x 4 array.

`coef_buffer` holds the coefficients of the even column (`ev[]`) and the odd
column (`od[]`) of the pair, 4N registers in total. A single fixed assignment of
those registers does not work. The next odd column overwrites `od[2N−1]` one cycle
before row 2N−1 reads it. So in the last cycle of every slot that value is copied
into `ev[2N−2]`, which row 2N−2 has just read and which stays free for another
N cycles. Row 2N−1 then reads its odd operand from there. This keeps the
buffer at exactly 4N registers.

Each stripe ends with two slots in which the column side is idle (`in_ready`
low). The row filter uses them to finish the right image edge: row steps
IMG_W/2 and IMG_W/2+1. A stripe therefore takes (IMG_W/2 + 2)·2N cycles, of
which IMG_W·N consume input.

## Interface and timing

`ml_dwt2d_top #(IMG_W = 128, IMG_H = 128, NLIFT = 2)`

* **Input.** The design tells the pixel source which pair it needs next:
  column `in_col`, rows `2*in_pair−1` (`in_pix_a`) and `2*in_pair`
  (`in_pix_b`). When `in_ready` is high, the pair is taken if `in_valid` is
  high. Otherwise the whole datapath holds. The source must still supply the
  ignored lanes: row −1 (lane a, pair 0) and row IMG_H (lane b, pair
  IMG_H/2), with any value. A row step that is pending during a hold is still
  carried out once, so its output is not delayed by the stall.
* **Output.** `out_valid` marks one coefficient pair. `out_band` (L/H) is the
  vertical band, `out_j`/`out_i` the subband row and column. `out_lo` is the
  horizontal lowpass (LL for band L, LH for band H), `out_hi` the horizontal
  highpass (HL or HH). One image gives IMG_W·IMG_H/2 pairs, stripe by stripe.
  Inside a stripe they come column by column, cycling through the rows.
* **Timing.** An image takes NSTRIPE·(IMG_W/2+2)·2N cycles without stalls:
  8712 cycles for 128 x 128 at N = 2, 8976 at N = 4. Images follow each other
  without a gap. The last output of an image appears at most one cycle after
  its final cycle. No output back-pressure exists.
* **Reset.** `rst_n` is asynchronous and active low. The RAM contents are not
  reset and need not be.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=… failures=…`.
The reference, `tb/dwt_ref_pkg.sv`, transforms whole arrays with explicit
symmetric extension and the same fixed-point rules. It has no streaming,
registers or boundary flags.

| Testbench | What it covers |
|---|---|
| `tb_lifting_pe` | 1-D signals of many lengths stepped through the PE |
| `tb_temporal_buffer` | read latency, hold, writes, disabled accesses |
| `tb_mscan_ctrl` | scan order, RAM read/write addresses, no double access, output tags, cycle count, draining during stalls |
| `tb_column_dwt` | column coefficients against the reference, with stalls |
| `tb_coef_buffer` | operand delivery, including the relocation, for N = 2 and 3 |
| `tb_row_dwt` | four interleaved rows against the reference |
| `tb_ml_dwt2d_top` | default size: three 128 x 128 images back to back (ramp, 0/255 checkerboard, random); random stalls after the first |
| `tb_ml_dwt2d_top_n4` | four-lifting, 128 x 128, with stalls |
| `tb_ml_dwt2d_top_n3` | N = 3 on 12 x 10 (partly empty last stripe) |

The top-level tests compare every output with the reference and check that
each one appears exactly once. They also check the stall-free cycle count and
that the temporal buffer is read and written exactly IMG_W·NSTRIPE times per
image (4224 at N = 2, 2176 at N = 4). Each mechanism must occur at least once:
stalls, draining, every boundary flag on both sides, and the relocation.
They also confirm that no value of the reference overflows its 16-bit word,
including on the checkerboard, which gives the largest highpass response.

Run one with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv \
    rtl/*.sv tb/tb_ml_dwt2d_top.sv --top-module tb_ml_dwt2d_top
./obj_dir/Vtb_ml_dwt2d_top
```

## Where this design departs from the N-lifting scheme as published, or fills gaps

* **RAM timing.** The published schedule reads the temporal buffer in the
  first cycle of a column's N cycles and writes it in the last. This design
  uses a synchronous-read RAM, so the read moves one cycle earlier and the
  write one cycle later, made from the register set. The access counts and
  the single port are unchanged.
* **PE structure.** The published implementation uses the *flipping
  structure* of the lifting filter, which shortens the critical path. This
  design uses the plain lifting chain: four multiply-adds plus scaling in one
  cycle. Results are the same to within rounding. Only timing would differ.
* **Left as synthesis options.** Clock gating of the register sets, which the
  published results rely on for power, is not built in. The registers have
  enables and can be gated by synthesis.
* **Chosen here.** The following are this design's own choices: word widths,
  fixed-point format, symmetric extension, the row pairing and the per-stripe
  edge slots, the relocation inside the coefficient buffer, the input/output
  protocol and the image height. One decomposition level is built; further
  levels would need another instance working on the LL band.
* **Throughput overhead.** The two edge slots cost 4N cycles per stripe, and
  the last stripe may be padded. For 128 x 128 images this is 6 % (N = 2) or
  10 % (N = 4) over the ideal of two pixels per cycle.

## Changing it

`IMG_W`, `IMG_H` (even, ≥ 4) and `NLIFT` (≥ 2) are parameters of the top. The
temporal buffer depth follows `IMG_W`. The coefficient buffer (4N) and the
row-register array (8N words) follow `NLIFT`. Word widths and constants sit
in `dwt_pkg`. Widening `DATA_W` for more levels or larger pixels also needs
matching limits in the reference model, which wraps at 16 bits.
