# BT cache: a low power search-range cache for fast H.264/AVC motion estimation

A motion estimation (ME) engine usually keeps a *search-range (SR) memory*.
It holds every reference pixel that the current macroblock (MB) could be
matched against: (2·SR_H+16) × (2·SR_V+16) pixels. With "Level C" data reuse,
each new MB loads one new 16-pixel-wide column of the search range. A fast
search such as four-step search looks at only a small part of that area. Most
of the pixels written into the SR memory are never read, yet they still cost
write power, external memory bandwidth, and the leakage of a large array.

This RTL replaces the SR memory with a small cache, the **Block Translation
(BT) cache**. Only 8×8 blocks of reference pixels that the search is likely to
visit are loaded. Four mechanisms make this work:

* **BT cache organisation.** One tag covers a whole 8×8 block. Tags are kept
  as coordinates relative to the moving search range, which makes them short
  and easy to age out.
* **STP prefetching (Search Trajectory Prediction).** Before the search
  starts, the blocks along the *predicted* search path are fetched. The
  prediction reuses the path that the previous MB took from the same kind of
  predictor.
* **CMH (Cache Miss Hiding).** When the search touches a block that is not
  in the cache, the cache can simply tell the ME to stop. The ME then keeps
  its best result so far, and nothing is fetched. Fast ME only refines an
  initial guess, so stopping early costs little quality.
* **Way power gating.** The number of ways in use can be lowered at run time
  (fewer ways for smaller frames), and the unused memory is switched off.

The ME logic (a four-step search) and the external reference frame memory are
not part of this RTL. They connect to the top module through ports.

## Cache organisation

### Blocks, indices and tags

The cache stores 8×8 pixel blocks. Each block falls into one of four **cache
indices**, set by where the block lies inside the 16×16 MB grid:

```
            column parity 0   column parity 1
row par. 0      index 0           index 1
row par. 1      index 2           index 3
```

So `index = {block_row[0], block_col[0]}`. Any 2×2 group of neighbouring
blocks holds exactly one block of each index, wherever the group starts. The
data memory has one bank per index. A 16×16 window made of any 2×2 blocks is
therefore read from four banks in the same cycle ("MB-based access").

Each index is one set of an **n-way set associative** cache, so n is the
cache capacity in MBs (4 blocks per way). The default is n = 15, the size
chosen for D1 video. The cache holds 4 × 15 × 64 pixels = 3840 bytes of data.

The **tag** of a block is `(tx, ty) = (block_col/2, block_row/2)`: the MB-grid
coordinate of the block, counted from the top-left corner of the current
search range, not from the frame origin (*virtual addressing*). For the D1
search range of ±64 × ±32 (144 × 80 pixels, 9 × 5 MB cells), a tag is 4 + 3
bits plus a valid bit. A lookup compares the requested tag with all n ways of
the selected set at once. The number of the way that hits gives the physical
data address `way*8 + row` inside the bank.

### Moving search range: shift, invalidate, replace

Coding follows raster order. When the next MB is the right neighbour of the
current one, the search range moves one MB (16 pixels) to the right:

* every tag's `tx` is decreased by 1, so the same pixels keep a valid tag in
  the new coordinate frame;
* a block whose `tx` was already 0 has left the search range, and its valid
  bit is cleared.

Any other MB change (start of a new MB row, first MB, any jump) flushes all
tags.

On a miss, the block goes to the set of its index. An empty way is used
first. Otherwise the valid block with the **smallest `tx`** is replaced: it is
the left-most block, the one least likely to be used by later MBs. Ways that
are switched off are neither looked up nor used for replacement. A way loses
its tags when it is switched off.

## What happens for one macroblock

1. **`mb_start`** carries the new MB position and the motion vectors of the
   left, top and top-right neighbours. The controller waits until it is idle,
   then shifts or flushes the tags and starts the prefetching engine.
2. **Prefetch.** The engine forms six MV predictors from the neighbour MVs:
   (min x, min y), (max x, min y), (median x, median y), (min x, max y),
   (max x, max y) and (0, 0). Each predictor kind has a stored **search
   trajectory (ST) vector**: the straight line from where the previous search
   started to where it ended. For each predictor P with vector S, the engine
   takes the 16×16 candidates at P and at P+S (both clamped into the search
   range). It then requests every 8×8 block of the smallest rectangle that
   covers both candidates. The engine handles one predictor at a time and
   walks the rectangle row by row. Blocks already in the cache hit at once.
   Misses are fetched from the reference frame memory over the system bus.
3. **Search.** The ME logic reads 2×2 block groups (`me_req_bx/by` = the
   top-left block of the group, in SR block units). A 16×16 candidate that is
   not aligned to 8 pixels needs up to four groups.
   * All four blocks hit: 8 beats follow. Each beat carries one row of the
     TL, TR, BL and BR blocks.
   * A block misses and CMH is on: one beat with `me_resp_miss=1` is sent and
     nothing is fetched. The ME should stop and keep its best candidate.
   * A block misses and CMH is off: the missing blocks are fetched one after
     another, then the 8 beats follow.
   ME requests are served before prefetch requests, so prefetching and search
   may overlap.
4. **`me_done`** reports which predictor kind the search started from and its
   final MV. The engine stores `final MV − predictor` as the new ST vector of
   that kind. The other kinds keep their old vectors.

## Interface of `bt_cache_top`

| group | signals | notes |
|---|---|---|
| configuration | `cfg_load`, `cfg_ways`, `cfg_cmh_en`, `way_pwr` | `cfg_ways` (clamped to 1..N_WAYS) takes effect one cycle after `cfg_load`; `way_pwr` shows the powered ways |
| MB sequencing | `mb_start`, `mb_x`, `mb_y`, `nb_mv[3]`, `pred[6]`, `stv[6]`, `pf_busy` | `nb_mv` is sampled when prefetching starts; give unavailable neighbours as 0 |
| ME read | `me_req_valid/ready/bx/by`, `me_resp_valid/miss/row/last/data[4]` | valid/ready request; response beats cannot be stalled |
| ME end | `me_done`, `me_init_type`, `me_final_mv` | one-cycle pulse |
| system bus | `ref_req_valid/ready/bx/by`, `ref_rdata_valid`, `ref_rdata` | absolute block coordinates (signed, may be outside the frame); 8 row beats per request, gaps allowed |
| status | `idle`, `stats` | `stats` counts prefetch and ME lookups and misses, CMH terminations, refilled blocks, evictions, shifts and flushes |

Pixels are 8 bits. A block row is 64 bits, with the leftmost pixel in bits 7:0.

**Timing.** The controller serves one request at a time. Clock edges are
counted from the edge that accepts a request.
* ME hit: row 0 is sampled at edge 3 and row 7 at edge 10.
* CMH miss: the single miss beat is sampled at edge 2.
* Prefetch hit: takes 2 cycles.
* Refill: one bus request, then one write per arriving row. The block is
  usable once row 7 is written.
* MB change: the tag shift or flush takes one cycle once the controller is
  idle.
* Prefetching engine: one cycle per predictor to compute its rectangle, then
  one request per cycle while the controller accepts them.

## Parameters and configurations

| parameter | default | meaning |
|---|---|---|
| `N_WAYS` | 15 | ways = cache capacity in MBs (15 for D1, 10 for CIF) |
| `SR_H`, `SR_V` | 64, 32 | horizontal / vertical search range (D1); CIF uses 32, 16 |

Tag, address and counter widths follow from these parameters. Fixed sizes
(8×8 blocks, 8-bit pixels, 9-bit MVs, 7-bit MB coordinates, so frames of up to
127 × 127 MBs) are in `bt_cache_pkg`. The D1 build also runs a CIF setting at
run time: use `cfg_ways = 10`, and have the ME keep its candidates within
±32 × ±16.

Rough size of the default build after generic synthesis: about 1050
flip-flops, of which 480 are tag bits, plus 30 720 bits of data memory.

## Files

| file | contents |
|---|---|
| `rtl/bt_cache_pkg.sv` | constants, `mv_t`, predictor kinds, statistics struct |
| `rtl/bt_cache_top.sv` | top: controller, prefetching engine, data memory |
| `rtl/bt_cache_ctrl.sv` | cache controller: lookups, refills, CMH, MB shift/flush, counters |
| `rtl/bt_tag_mem.sv` | tag memory, parallel compare, virtual-address update |
| `rtl/bt_victim_sel.sv` | replacement choice (free way, else smallest x) |
| `rtl/bt_addr_gen.sv` | index / tag / absolute address / bank address of a block |
| `rtl/bt_data_mem.sv` | four-bank data memory with per-way power gating |
| `rtl/bt_power_ctrl.sv` | way count to per-way power enables |
| `rtl/stp_prefetch.sv` | STP prefetching engine, ST vector storage and update |
| `rtl/mv_pred_gen.sv` | the six MV predictors |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_bt_cache_workload.sv`, `tb/bt_wl_driver.sv` | CIF and D1 builds, each run with CMH off and on on the same synthetic motion |
| `tb/ref_frame_mem_model.sv`, `tb/tb_ref_pkg.sv` | behavioural reference frame memory; frame content is a formula of (x, y) |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test at the default size:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bt_cache_pkg.sv tb/tb_ref_pkg.sv tb/tb_bt_cache_top.sv \
  --top-module tb_bt_cache_top -o sim && ./obj_dir/sim
```

For a unit test, replace the last file and the top module name. `-Irtl -Itb`
lets Verilator find the other modules by file name.

* `tb_bt_cache_top`: end-to-end test at the default size (15 ways, ±64 ×
  ±32). It runs 26 MBs over two MB rows with a trajectory-following search
  model. Every pixel returned is checked against the frame formula, and the
  predictors and response latencies are checked too. It also checks that
  each mechanism happened at least once: shift, flush, prefetch hit and miss,
  ME hit, ME miss refilled, ME miss hidden, eviction, arbitration between ME
  and prefetch, ME stalled by a refill, power gating to 10 ways, and ST
  vector update.
* `tb_bt_cache_workload`: runs the same synthetic motion through a CIF build
  and a D1 build, once with CMH off and once with CMH on. It reports the
  cache write bandwidth in MBs per MB and checks that CMH never fetches more.
  On its 40-MB sequence it measures, in MBs written per MB:

  | build | CMH off | CMH on |
  |---|---|---|
  | CIF, 10 ways | 2.25 | 2.17 |
  | D1, 15 ways | 2.59 | 2.19 |

  For comparison, a Level C SR memory writes 3 (CIF) or 5 (D1) MBs per MB.
* The unit tests compare each module with a reference model or a directed
  scenario. Examples: the tag memory against an array model under random
  writes, shifts, flushes and gating; the prefetching engine's exact request
  sequence and cycle count; the controller's refill addresses, CMH answer,
  shift behaviour, replacement victim and latencies.

The bandwidth figures from these tests come from synthetic motion, not from
real video. They show that the mechanisms work, not the power savings.

## Where this RTL makes its own choices

The organisation comes from the published algorithm: 8×8 blocks, four
position-based indices, n ways = n MBs, relative (x, y) tags decremented per
MB, smallest-x replacement, STP prefetching around predictor and ST vector,
CMH, and way power gating. The following points are not specified there and
were chosen for this RTL:

* **Tag x unit.** The tag x is the MB column inside the search range, so one
  MB step is exactly "x − 1". The column parity of the block is the index
  bit.
* **Search range boundary.** At an MB row change or any non-consecutive MB,
  all tags are flushed.
* **Prefetch region.** The region is the bounding rectangle of the 16×16
  candidates at P and P+S. All six predictor kinds are prefetched every MB.
  Vectors of kinds that were not used stay as they were, and all vectors
  start at zero.
* **Neighbours.** The neighbour set P is left, top and top-right.
* **ME port.** The ME logic reads one 2×2 block group per request. CMH
  answers with a single miss beat. A refill with CMH off is retried until the
  whole group hits.
* **Handshakes and priorities.** All handshakes are valid/ready, one request
  is in flight at a time, and the ME path has priority over prefetching.
* **Replacement details.** Empty ways are used before any eviction, and ties
  go to the lowest way.
* **Power gating.** Ways 0..n−1 stay powered. A gated way reads as zero and
  its tags are dropped.
* **Statistics.** The counters in `stats` are an addition for measurement.

Not included:

* The four-step-search ME logic and the Level C SR memory that the cache
  replaces.
* The real reference frame memory. The testbenches use a behavioural model
  of it.
* An SRAM macro for the data memory. The banks are plain arrays that
  synthesis keeps as memories.
