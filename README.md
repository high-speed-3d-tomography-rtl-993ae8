# 3PA-PET: a pipelined, prefetching, parallel back-projector for 3D PET

Back-projection is the most expensive step of 3D PET image reconstruction.
To reconstruct one voxel, every segment and angle of the sinogram contribute
one bilinearly interpolated bin. In a 4D sinogram (segment, angle, bin u,
plane v), the bins one voxel needs lie along a 3D sinusoid. That path has
poor address locality, because consecutive references are far apart in
memory. It does have strong *index* locality: neighbouring voxels at
neighbouring angles need neighbouring bins.

This design turns that index locality into throughput in three steps:

- **Loop reordering.** The volume is cut into blocks of voxels. For one block,
  the loops run over segments, then angles, then the voxels of the block. For a
  fixed angle, the block projects onto a small patch of the sinogram, and that
  patch drifts slowly from angle to angle.
- **A 3D adaptive and predictive (3D-AP) cache.** It keeps a box of the sinogram
  (a few angle planes × a few bins × a few planes) on chip. Per axis, it tracks
  a low-pass filtered mean of the coordinates the pipeline references. It slides
  the box to follow that mean, and loads the new part of the box while the
  pipeline keeps running.
- **Parallel pipelines over neighbouring blocks.** Several pipelines work on
  neighbouring blocks and share the angle loop, so their patches overlap. Each
  pipeline has a small leaf cache. The leaf caches are fed by one root cache,
  which holds the union of their patches and is the only one that reads
  external memory.

Each pipeline does one voxel update per clock cycle whenever its four bins are
in its leaf cache.

```
 host ──coef_*──► coef_table ──► bp_fsm ──► bp_unit[0..N-1] ◄──► ap_cache_leaf[0..N-1]
                                                                        │ word requests
 external memory ◄── mem_bus_sim ◄── ap_cache_root ◄────────────────────┘ (round-robin)
   (sinogram)         (latency/BW)     (line prefetch)
```

## The arithmetic: eq. (3) in fixed point

For segment Δ and angle ψ, the projection of voxel (x, y, z) is affine:

```
u = a00·x + a01·y + a03
v = a10·x + a11·y + a12·z + a13
```

- In parallel-beam PET, a00 = cos ψ and a01 = sin ψ.
- a10 and a11 are the segment tilt times sin ψ and −cos ψ.
- a12 is 1, and a03 and a13 are offsets.

The host computes these seven coefficients and the segment's jacobian J_Δ once
per (segment, angle), and writes them into `coef_table` at angle index
a = Δ·NPSI + ψ.

Number formats (`bp_pkg`):

| quantity | format |
|---|---|
| coefficients a_ij | signed 24 bit, 12 fractional bits |
| sinogram bins | signed 16 bit (two per 32-bit memory word, even bin in the low half) |
| interpolation weights du, dv | 8 bits, the fraction bits 11:4 of u and v |
| jacobian | unsigned 16 bit, Q2.14 |
| voxel value | signed 32 bit, 4 fractional bits |

One update adds this term to the voxel:

```
((b00·(256−du)(256−dv) + b10·du(256−dv) + b01·(256−du)dv + b11·du·dv) · J) >>> 26
```

Here b_ij is the bin at (u0+i, v0+j), with u0 = ⌊u⌋ and v0 = ⌊v⌋. A bin outside
the sinogram counts as zero.

### `bp_unit`: seven stages, one global freeze

| stage | work |
|---|---|
| S1 | five products a00·x, a01·y, a10·x, a11·y, a12·z |
| S2 | sums, giving u and v in Q12 |
| S3 | `mem_bridge`: looks up the four bins (u0,v0) … (u0+1,v0+1) in the leaf cache and marks the ones inside the sinogram |
| S4 | the four bilinear weights, formed from the single product du·dv |
| S5 | weighted sum of the four bins |
| S6 | jacobian |
| S7 | read-modify-write of the block's voxel memory (BLK entries) |

The unit uses 11 multipliers.

The lookup in S3 is combinational. If a needed bin is missing, `stall` freezes
every stage at once (`in_ready` drops). The cache then fetches the bin, and the
same packet retries on the next cycle.

Each packet carries two flags, `first` and `last`:

- The first update of a voxel (segment 0, angle 0) overwrites its entry, so the
  memory is reused by the next block without clearing it.
- The last update puts the final value on `res_*` for one cycle.

Without stalls, a result leaves 7 cycles after its last update entered.

## The loop nest: `bp_fsm`

```
for each block group g (raster order, x fastest)        -- cfg_ngroups groups
  for Δ < cfg_nseg
    for ψ < cfg_npsi                                     -- shared by all units
      every unit k in parallel: for each voxel of its block (z fastest, then y, x)
        f(voxel) += bin(Δ, ψ, u, v)
```

A group is GX × GY × GZ neighbouring blocks of BX × BY × BZ voxels, one block
per unit. The default is 4 × 2 × 1 blocks of 8 × 8 × 9, which tiles the
128 × 128 × 63 volume into 224 groups.

Each unit has its own voxel counter and can be frozen by its own cache. The
angle only advances once every unit has issued its whole block. This is what
keeps the units' sinogram patches together, and it costs one cycle per angle.
After the last group, the FSM waits until every pipeline is empty and then
pulses `done`.

## The 3D-AP cache

This is the part that makes the design work, and the part with the most
design freedom. It is built from three modules:

- `zone_tracker`: one axis of prediction.
- `ap_zone_ctrl`: three trackers and the prefetch walker.
- `ap_cache_leaf` and `ap_cache_root`: storage and miss handling around an
  `ap_zone_ctrl`.

### Tracking one axis (`zone_tracker`)

The cached zone covers ZSIZE coordinates [origin, origin+ZSIZE) on each axis.
The tracker sees every reference the cache serves, and it is configured by
five numbers per axis:

- **Sampling:** every 2^S_LOG2-th reference updates the mean.
- **Cut-off:** the update is mean += (c − mean) / 2^K_CUT. This is a
  first-order IIR low-pass filter, kept with 8 fractional bits and rounded for
  use.
- **Zone size** ZSIZE, and **HALF**: where in the zone the mean should sit.
- **Guard zone:** when |mean − (origin + HALF)| > GUARD, the zone moves toward
  the mean.
- **Speed:** a move is at most SPEED coordinates.

The mean updates the cycle after a sampled reference, and the origin one cycle
later.

### Filling the zone (`ap_zone_ctrl`)

Three trackers, for angle index a, bin u and plane v, place the zone. A
*walker* lists the zone's load units one per cycle:

- a unit is one word for a leaf cache, and one memory line for the root;
- the order is u fastest, then v, then angle plane;
- the walk starts at the angle plane of the mean, so the next angles come
  first.

The parent cache skips units it already holds, so data shared by the old and
the new zone stays readable during a move. A move of the angle axis restarts
the walk. A u or v move only extends the current walk by one full pass.
Restarting on every small u/v move would keep the walker from ever reaching
the far angle planes.

### Leaf cache (`ap_cache_leaf`)

The leaf zone is 4 angle planes × 16 bins × 16 planes of 16-bit bins (2 KB).

**Banking.** The zone is split into four banks by the parity of the bin
coordinates, bank = {v[0], u[0]}. Any 2 × 2 interpolation square touches each
bank exactly once, so all four bins are read in the same cycle with no
conflict. An incoming 32-bit word holds bins 2·up and 2·up+1 of one plane, and
is split into the two banks of that plane's parity.

**Placement and tags.** Inside a bank, the entry is (a mod ZP, (v/2) mod ZV/2,
(u/2) mod ZU/2). When the zone slides, only the entries that leave it are
overwritten. Each entry stores its full word coordinate as a tag, so a hit is
exact regardless of history.

**Demand miss.** When a lookup misses a needed bin:

1. prefetching pauses;
2. the missing words are requested (up to four, or fewer when two bins share a
   word);
3. the cache waits until every outstanding word has arrived, then the lookup
   hits.

Waiting for all outstanding words keeps a late prefetch from evicting a demand
word before it is used.

The leaf uses these settings:

| axis | HALF | GUARD | SPEED |
|---|---|---|---|
| a | 1 | 0 | 4 |
| u | 8 | 2 | 16 |
| v | 8 | 2 | 16 |

K_CUT is 4 and S_LOG2 is 2. With HALF = 1 on the angle axis, one angle plane
behind the mean and two ahead are kept.

### Root cache (`ap_cache_root`)

The root zone is 4 angle planes × 32 words (64 bins) × 32 planes (16 KB), one
word per entry, tagged the same way as the leaf. Its trackers follow the mean
of the words the leaves request, and its walker loads whole memory lines of
LINE = 8 words.

- **Serving leaves.** The root serves one leaf request per cycle, chosen
  round-robin. A hit answers the next cycle on a response bus shared by all
  leaves; `lrsp_valid` has one bit per leaf.
- **Misses.** A miss blocks the root. It requests the missing line ahead of
  any prefetch, waits for every line in flight, and then serves the request.

### Memory bus model (`mem_bus_sim`)

This module models the external memory bus with a settable latency LAT and a
setting BEAT (cycles per word). It accepts one line at a time:

- the first word arrives LAT+1 cycles after the request is accepted;
- each further word arrives BEAT cycles after the previous one;
- the bus is busy for 1 + LAT + (LINE−1)·BEAT cycles per line.

This is t = l_mem + (S_line − 1)/BW per line, rounded up.

It addresses the external memory as (a·NV + v)·NUP + up, where NUP = NU/2
words per view row. The memory must return data one cycle after `ext_rd`.

## Using the top (`bp3pa_top`)

1. Hold `rst_n` low, then release it.
2. Write the NSEG·NPSI coefficient entries through `coef_we`, `coef_waddr` and
   `coef_wdata`.
3. Pulse `start` with `cfg_ngroups`, `cfg_nseg` and `cfg_npsi`.
4. Collect one `res_valid` pulse per voxel per unit, with the voxel's
   coordinate and value.
5. Wait for `done`.

The sinogram lives in the external memory behind `ext_rd`, `ext_addr` and
`ext_rdata`. Put the segments' planes in that memory padded to NV planes.

Main parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| N, GX, GY, GZ | 8, 4, 2, 1 | units, and the group shape in blocks |
| BX, BY, BZ | 8, 8, 9 | block size in voxels |
| VOL_X, VOL_Y, VOL_Z | 128, 128, 63 | volume |
| NSEG, NPSI | 5, 96 | segments and angles |
| NU, NV | 288, 63 | bins per view row, planes |
| LEAF_ZP, LEAF_ZU, LEAF_ZV | 4, 16, 16 | leaf zone (angle planes, bins, planes) |
| ROOT_ZP, ROOT_ZUP, ROOT_ZV | 4, 32, 32 | root zone (angle planes, words, planes) |
| LINE, LAT, BEAT | 8, 5, 1 | memory line in words, latency in cycles, cycles per word |

N must equal GX·GY·GZ. The group size must divide the volume, and the
elaboration-time assertion in `bp_fsm` checks both.

## How far it is verified

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_zone_tracker` | origin cycle by cycle against a model of the filter, guard and speed |
| `tb_ap_zone_ctrl` | one walk covers the zone exactly once, starting at the mean's plane; restart on an angle move |
| `tb_ap_cache_leaf` | every bin returned against a hashed next level with random latency; misses, prefetches and moves occur |
| `tb_ap_cache_root` | 5 active leaf ports; each answer one cycle after acceptance with the right word; round-robin serves all ports |
| `tb_mem_bus_sim` | data, coordinates and the arrival cycle of every word |
| `tb_coef_table` | read-back after random writes |
| `tb_mem_bridge` | floor, in-sinogram mask, weights, zeroing, freeze behaviour |
| `tb_bp_unit` | voxel values against a reference with random cache stalls; 7-cycle latency without stalls |
| `tb_bp_fsm` | every request against a model of the loop nest, with random back-pressure; `done` waits for busy pipelines |
| `tb_bp3pa_top` | whole design at default parameters, 2 groups × 2 segments × 12 angles |
| `tb_bp3pa_full` | whole design at default parameters, one group over the whole 5 × 96 sinogram |
| `tb_bp3pa_lat` | one unit (N = 1) behind a 30-cycle memory, one block over the whole sinogram |

The two end-to-end tests use a synthetic sinogram (a hash of the word address)
and a parallel-beam geometry with four segment tilts. They compare every voxel
with a reference back-projection written in the testbench, using the same
fixed-point rules. They also count pipeline freezes, leaf and root misses,
prefetches and zone moves, lookups that touch the sinogram edge, angle steps,
and group changes, and fail if any of these never happens.

The largest run simulated is one full block group: 8 blocks × 576 voxels ×
480 angle indices, about 2.2 M updates. The complete 128 × 128 × 63 volume
(224 groups, about 495 M updates) is the same loop repeated, but too long to
simulate here.

To simulate, for example, the full-size test:

```
verilator --binary --timing -y rtl -y tb +libext+.sv rtl/bp_pkg.sv \
          tb/tb_bp3pa_full.sv --top-module tb_bp3pa_full -o sim
./obj_dir/sim
```

Any other testbench runs the same way with its own name. `bp_pkg.sv` must come
first.

## Performance, and where this RTL departs from the original design

- **Throughput.** With 8 units and a 5-cycle latency, the full-size run takes
  2.06 cycles per update per unit (about 3.9 updates per cycle overall). The
  short run takes 2.39, because it has more start-up per update. The original
  design reports 1.7 cycles per update per unit for 8 units and about 1 for a
  single unit.
- **Single unit.** One unit over the whole sinogram takes 1.33 cycles per
  update at a 5-cycle latency and 2.84 at 30 cycles, where the original stays
  near 1. Longer memory lines (16 words) made both numbers worse in a trial;
  the blocking demand misses, not bandwidth alone, are the main cost.

  The limits here are the root-to-leaf path (one word per cycle shared by 8
  leaves), the blocking misses in both cache levels, and a memory bandwidth of
  4 bytes per cycle, which is half of the 8 bytes per cycle the original
  evaluation used. A wider memory word, a second root response port, or
  non-blocking misses are the obvious next steps.
- **Cache sizes.** The leaf is 2 KB, as in the original. The root is 16 KB
  instead of 18 KB, because powers of two keep the modulo placement simple.
- **Things not given by the method, chosen here:**
  - how the zones divide among the three axes;
  - the tracker constants, the walk order, tags, and the miss policy;
  - the line size;
  - the group shape and block size;
  - the voxel order;
  - all number formats;
  - the sinogram width of 288 bins and 63 planes per segment (the size of an
    HR+ view);
  - the memory layout.
- **Multipliers.** The pipeline uses 11 multipliers per unit, where the
  original reports 12.
- **Not built:**
  - The PCI host link and the SDRAM controller. The top exposes plain host
    ports and a synchronous word-read port instead.
  - FPGA resource figures.
  - The prospective multi-bank version (5 memory banks × 8 units), which would
    be several copies of this top.
  - A 9-unit configuration. It does not tile a 128-voxel axis with 8-voxel
    blocks in this FSM; 1, 4, 8 and 16 units do.

## Files

- `rtl/bp_pkg.sv`: widths, number formats, coordinate and request types.
- `rtl/bp3pa_top.sv`, `bp_fsm.sv`, `coef_table.sv`, `bp_unit.sv`,
  `mem_bridge.sv`: the pipelines and their control.
- `rtl/zone_tracker.sv`, `ap_zone_ctrl.sv`, `ap_cache_leaf.sv`,
  `ap_cache_root.sv`: the 3D-AP cache.
- `rtl/mem_bus_sim.sv`: the memory bus model.
- `tb/`: one testbench per module, plus `bp3pa_harness.sv`, which is shared by
  the two end-to-end tests.
