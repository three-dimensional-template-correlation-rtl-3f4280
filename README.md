# 3D template correlation pipeline

This RTL finds a small 3D pattern (the *template*, up to 12×12×12 voxels) inside a
larger 3D voxel image (up to 50×50×50 voxels), such as a confocal-microscopy stack or a
protein grid in molecular docking. It scores every placement of the template by direct
correlation, at any three-axis orientation, and reports the best placements. The scoring
function may be nonlinear.

Three ideas carry the design:

* **The image is read in rotated order; nothing is rotated in memory.** The template
  stays loaded in the processing elements, and the image stays in its RAM, for every
  orientation. An address generator walks a padded bounding box of the rotated image
  and maps each step back to an unrotated image address, or to padding.
* **Direct correlation in a systolic chain.** Each template voxel sits in its own
  processing element (1728 of them at the default size). Each image voxel is broadcast
  to all of them, and one finished score leaves the chain every clock.
* **Peak filtering instead of shipping results.** One orientation of a 50³ image against
  a 12³ template gives 227 000 to 940 000 scores. The filter keeps only the best score
  (and its position) in each 8×8×8 sub-block of the result grid, so several separate
  matches survive and the host reads at most 2197 records per orientation.

```
 params ──► rotated_traversal ──addr/pad──► image_memory ──voxel──► [voxel_rotation] ──►
            (i,j,k) ─────────────────── delayed alongside ─────────────────────────────┐
                                                                                      ▼
      correlation_array ──score──► sub-block number + tag ──► peak_filter ◄──► host port
```

Throughput is one voxel in and one score out per clock, with no stalls. A run over a
box of `ni×nj×nk` traversal steps takes `ni·nj·nk + 5` clocks from `start` to `done`.

## Rotated traversal (`rotated_traversal`)

The traversal indices `(i, j, k)` run in raster order, `k` fastest, over a box of
`ni × nj × nk` steps. Each step maps to an image coordinate

```
(x, y, z) = i·b_i + j·b_j + k·b_k + X0
```

where `b_i`, `b_j` and `b_k` are the columns of a 3×3 matrix. No multiplier is used.
The unit keeps three running positions per axis: the current voxel, the start of the
row and the start of the plane. Each step adds one matrix column to one of them, for
x, y and z in parallel. The coordinates are rounded to the nearest voxel. A voxel is
*padding* if its coordinate falls outside six inclusive limits (`xmin … zmax`) or
outside the 50³ memory. Otherwise its address is `x + 50·y + 2500·z`.

One orientation is set up by a `rot_params_t` struct:

| field | meaning | format |
|---|---|---|
| `bix … bkz` | 9 matrix coefficients, column per traversal index | signed Q3.12, 16 bits |
| `x0, y0, z0` | offset X0 | signed Q11.12, 24 bits |
| `xmin … zmax` | 6 inclusive image range limits | signed 12-bit integers |
| `ni, nj, nk` | traversal extents | 7 bits, 1…127 (the array needs 12…98) |

The matrix is whatever maps traversal space to image space, so this one mechanism
covers several cases:

* rotation: the inverse of the template's rotation;
* non-cubical voxels, for example a z step of 0.25 for a microscope with four times
  coarser z resolution;
* isotropic scaling;
* mirroring and shear.

To rotate about the image centre `c` with the box centre at `(n−1)/2`, set
`X0 = c − R·((n−1)/2)·(1,1,1)`.

The fixed-point format keeps the accumulated error below 1/16 voxel over 3×97 steps.
That is well inside the half-voxel budget. A host that needs exact half-voxel behaviour
should compute `X0` in the same Q.12 format. `start` captures the struct, so the host
may load the next orientation while a run is in progress.

## The correlation array (`correlation_array`, `correlation_pe`, `sum_delay_line`)

This is the part to understand before changing anything.

**Scores.** A processing element at template offset `(di, dj, dk)` holds template voxel
`B[di][dj][dk]`. The element with chain index `n = (di·T + dj)·T + dk` takes the partial
sum of element `n−1`, adds `F(a, B)` for the current broadcast image voxel `a`, and
registers the result. The sum is signed and saturates at the 10-bit limits.
`F` is a table of 16 signed 4-bit entries indexed `{a, b}`, loaded through `ftab`, so
any function of two 2-bit voxels is possible: a product, `|a−b|`, or a penalty for
colliding interiors.

**Delays.** The image arrives as a 1-D stream, so the template offset `(di, dj, dk)` is
the stream distance `d = (di·nj + dj)·nk + dk`. Between neighbours in a template row,
the element register supplies the one-clock delay. At the end of each template row the
partial sum passes through a delay line of `nk − T` clocks; at the end of each template
plane, through one of `nj·nk − (T−1)·nk − T` clocks. Both lengths are programmed from
`nj` and `nk` when `clear` is pulsed at the start of a run. The delay lines are circular
buffers sized for the largest box (86 and 8514 words). The score leaving the last
element one clock after voxel `q` enters is

```
S(q) = Σ F( A[q − D + d(di,dj,dk)], B[di][dj][dk] ),   D = (T−1)·(nj·nk + nk + 1)
```

This is the window whose *last* voxel is `q`. The terms are accumulated in chain order
with saturation after each addition, which matters only when a sum saturates.

**Wrap-around and the result grid.** Windows near the start of a row reach back into
the end of the previous row. A box with at least `T−1` padding voxels at the end of each
row and plane therefore gives exactly a zero-padded *full* correlation. For an
unrotated 50³ image the box is 61³ (50 + 12 − 1), which is the 2.4 ms run at 95 MHz.
The first `D` scores of a run use partial sums from before the stream started. The top
marks them `res_window = 0` and does not pass them to the peak filter. The result index
of a score is the traversal index `(i, j, k)` of the window's last voxel, so the placement
offset in the box is `(i, j, k) − (T−1)`.

**Template loading.** Pulse `tload` for T³ clocks, giving `tdata` in raster order
(`di`, `dj`, `dk`; `dk` fastest). Data enters at the last element and shifts toward
element 0. Do not load while `busy`.

**Saturation.** The `ev_sat` output reports the clocks in which any element clipped.

## Peak filter (`peak_filter`)

A fixed threshold has two problems. One broad peak yields many reports, while a
slightly lower peak elsewhere may yield none. The filter instead keeps one record per
sub-block: the best score so far and its tag (the full `(i, j, k)` position).

* The sub-block number is `(i>>3, j>>3, k>>3)`, numbered `(bi·13 + bj)·13 + bk`, which
  gives 13³ records per bank.
* A record is replaced when it is empty or when the new score is strictly greater.
  Equal scores therefore keep the first position seen.
* Each score is read, compared and written back in one clock, so consecutive scores
  for the same sub-block need no forwarding.

Two distinct peaks in one sub-block still yield only one report, and one broad peak
spanning a boundary yields one report per sub-block. Clean-up of these cases is left
to the host.

The record RAM is double-buffered. Host protocol per orientation:

1. Pulse `start`. This launches the run and swaps the banks: the bank that collected
   the previous orientation becomes readable.
2. While the new run computes, read the previous orientation's records. Drive
   `pk_rd_addr` and get `pk_rd_full`, `pk_rd_score` and `pk_rd_tag` one clock later.
3. Pulse `pk_clear` to empty that bank before the next `start`.
4. Wait for `done` (`busy` falls in the same clock), then start the next orientation.

Event pulses `ev_peak_empty`, `ev_peak_better` and `ev_peak_kept` say what each score
did to its record.

## Optional voxel rotation (`voxel_rotation`, `VOXEL_ROTATION = 1`)

If voxels carry directions (surface normals, bond directions), the vectors must turn
with the image. With `VOXEL_ROTATION = 1` the voxel word becomes
`{z, y, x (8-bit signed each), class (2 bits)}`. The voxel rotation stage then sits
between memory and array:

* it multiplies each vector by `vrot_matrix`, with nine multipliers, 18-bit Q1.16
  coefficients, rounding and saturation;
* it delays the class bits by the same two clocks;
* each processing element adds the vector opposition term `−(a·b) >>> 4` to its table
  score.

The stage supports several vectors per voxel (`NVEC`), but the top uses one. The default
build leaves this stage out; the 2-bit accelerator the design follows did not have it.

## Sizes and timing

| parameter (top) | default | meaning |
|---|---|---|
| `T_DIM` | 12 | template edge, T³ processing elements |
| `IMG` | 50 | image edge, IMG³ voxels of RAM |
| `TMAX` | 98 | largest traversal extent: ⌈50·√3⌉ = 87 for any rotation, plus 11 padding |
| `SBS` | 3 | sub-block edge 2^SBS; 4 gives 16³ sub-blocks and 343 records |
| `SUM_BITS` | 10 | saturating score width |
| `VOXEL_ROTATION`, `COMP_W` | 0, 8 | vector voxels and their component width |

Fixed in `corr3d_pkg`: 2-bit voxel classes, 4-bit score table entries, the traversal
fixed-point formats, 7-bit traversal indices.

The first raw score appears 4 clocks after the clock that samples `start` (6 with voxel
rotation). `done` follows the last score by two clocks, once it has been filed.

At 95 MHz, an unrotated 61³ run takes 226 986 clocks (2.39 ms). A rotated run with
about 66 % extra padding averages about 4 ms. The largest box, 98³, takes 9.9 ms.

Memory at default size:

* image RAM: 250 kbit;
* delay lines: 1.05 Mbit;
* peak RAM: 2 × 2197 × 31 bits.

A 100³ image with a 14³ template does not fit the defaults. It needs `IMG=100`,
`T_DIM=14`, `TMAX≥186` and wider traversal indices (`CW` in the package).

## What is this design's own

The following follow the published accelerator:

* the pipeline order;
* the 18-value rotation set-up;
* strength-reduced traversal with padding by range tests;
* the template held one voxel per element, one voxel per clock, general scoring;
* 2-bit voxels, 10-bit saturating sums, 12³ template and 50³ image;
* per-8³-sub-block maxima with tags, replacement when empty or better, double buffering;
* nine multipliers per vector, with the scalar delay.

The following are choices made here, because the published description does not fix
them:

* the traversal extents as explicit set-up fields;
* the fixed-point formats and rounding;
* the padding value as a host input;
* the table form of `F`, signed sums and the vector opposition term;
* the chain and delay-line arrangement of the array (its detailed design was published
  separately), the template load order and the wrap-around convention;
* the result coordinate (last voxel of the window) and the window flag;
* the start/busy/done handshake and the bank swap on `start`;
* the 98-voxel traversal limit.

The following are not included:

* the board's PCI host interface: its signals are the top's ports;
* off-chip image RAM;
* replicating the traversal and image RAM for two or more voxels per clock;
* sub-block numbering in unrotated image coordinates, which the original describes as
  future work;
* splitting large images or templates into pieces.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `rotated_traversal_tb` | every index, address, padding flag and last flag against direct evaluation of the matrix formula, for identity, a three-axis rotation, mirror plus anisotropic scaling, and a step of length two; one voxel per clock; latency |
| `image_memory_tb` | random writes and reads, padding substitution, one-clock latency |
| `sum_delay_line_tb` | lengths 0, 1, 5, 12 and 13 with random enable gaps |
| `correlation_pe_tb` | table scores, saturation at both limits, the `sat` flag, hold, template shift, vector opposition |
| `correlation_array_tb` | 3³ template, three box shapes, random stalls, every windowed score against direct summation, saturation reached |
| `voxel_rotation_tb` | two vectors per voxel, rotation and random matrices, saturation, scalar delay |
| `peak_filter_tb` | random bursts, every record after swap, clear, event counts |
| `corr3d_top_tb` | end to end at 3³/8³/7-bit, details below |
| `corr3d_vrot_tb` | the same flow with `VOXEL_ROTATION = 1` |
| `corr3d_full_tb` | all defaults (1728 elements, 50³ image), details below |

`corr3d_top_tb` runs four orientations: identity, a three-axis rotation about the centre,
mirror with z at half steps, and a short run. For each it checks:

* every raw score, its position and its window flag;
* one score per clock and a constant latency;
* every peak record, read while the next run computes.

It also requires that padding, saturation, record fill, record improvement,
out-of-window scores, rotation and bank swaps each occur at least once.

`corr3d_full_tb` runs at the default sizes. It checks:

* a full unrotated 61³ correlation: all 226 981 scores, the 226 986-clock run time, and
  all 2197 peak records;
* a three-axis rotation over the largest 98³ box, which puts every delay line at full
  length: every 16th score.

It uses a sparse score table (+1 only for class 3 against class 3), so that the two
planted copies of the template stand out. It takes about 3 minutes to simulate and
about 20 s to compile.

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/corr3d_pkg.sv tb/corr3d_top_tb.sv \
          -y rtl --top-module corr3d_top_tb && ./obj_dir/Vcorr3d_top_tb
```

Verilator has only two signal states and does not reset the large RAMs. The design
relies on that being harmless:

* the delay lines are only read after being written in the same run;
* the peak records carry their own valid bits, which are reset.
