# Reference-centered memory hierarchy for motion and disparity estimation in multiview video coding

In multiview video coding, every frame is predicted from several reference frames:
earlier frames of the same view (motion estimation, ME) and frames of neighbouring
views (disparity estimation, DE). The usual order is "current-MB centred": take one
macroblock (MB, 16x16 pixels) of the frame being coded, fetch a search window around
it in each of its reference frames, search, and move on. Because one reference frame
serves many frames, the same reference pixels then cross the external memory bus many
times.

This design turns the order around. The **reference frame is the centre of
processing**. One search window of the reference frame is loaded on chip. Every MB of
every *dependent frame* that needs this window is then searched while the window is
there. The window slides over the reference frame in raster order, one MB per
*search step*. Only one new window column is fetched per step, plus the D current MBs
that the window "calls". The window pixels are read once per reference frame, not once
per dependent frame.

The price is that the search of an MB against one reference finishes long before the
MB is coded. Every partial result (best vector and SAD) must therefore be parked in
external memory. The design compresses these results to keep that traffic small.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The processing elements
that compute SADs, the external DRAM and the rest of the encoder are outside it; the
top brings their interfaces out as ports.

## Block map

```
                 +-----------------+  candidate bursts   +-------------------+
   config ------>| search_control  |-------------------->| candidates_merger |--> to PEs (cand_*)
                 |  window steps,  |<-- best pos/SAD ----+-------------------+
                 |  TZ-style search|        (pe_res_*)
                 +-----------------+---- records ---->  partial_results_compressor
                   |   |   |                                   | 512-bit buffers
       step_start  |   |   +-- apply/frame --> power_gating_ctrl --> pstate per line
                   v   |                                   v
           ext_mem_scheduler  <--- agu_current_mb ---> current_mb_buffer ---> PEs (pe_cb_*)
             (fixed order)    <--- agu_search_window -> onchip_video_memory -> PEs (pe_vm_*)
                  |           <--- agu_partial_results
                  v
            external memory port (mem_*)
```

| Module | Role |
|---|---|
| `mvc_mem_hier_top` | Wires the hierarchy and brings out the PE, memory and encoder ports and statistics counters |
| `search_control` | Steps the window, calls the dependent MBs, generates candidate bursts, keeps the best results, emits records |
| `candidates_merger` | Merges repeated candidates, emits them column by column, holds back the column still being loaded |
| `onchip_video_memory` | 16 banks x 128 bits; one line per MB; N_SW x N_SW lines in rotating sectors; line power states |
| `power_gating_ctrl` | Per-frame statistics, mean/σ thresholds, four power states, wake-up handling |
| `current_mb_buffer` | The current MBs of all called dependent frames |
| `agu_search_window`, `agu_current_mb`, `agu_partial_results` | Translate window positions, MB positions and result buffers into external memory beats |
| `ext_mem_scheduler` | One fixed schedule per step for the shared memory port |
| `partial_results_compressor` | Vector prediction, SAD quantization, variable-length codes, 512-bit packing |
| `mvc_pkg` | Shared constants, types (`pos_t`, `mb_t`, `pr_rec_t`, `mem_req_t`, `pstate_e`) and code functions |

## The search step

For window position (X, Y) of the reference frame, dependent frame d searches with MB
(X − gdv_x[d], Y − gdv_y[d]). Here gdv is the frame's global disparity vector in MBs,
and it is 0 for temporal references. MBs outside their frame are not called. A step
runs as follows:

1. `search_control` rotates the memory sectors, lets the power gating re-apply its
   map, and starts the schedule.
2. The scheduler lets `agu_current_mb` fetch the called MBs (16 beats each). Then
   `agu_search_window` fetches the missing column: 13 MBs x 16 rows = 208 beats. At the
   start of each frame line it fetches the whole window instead: 13 x 13 MBs.
3. The search starts as soon as the current MBs are on chip. Most of the window is
   already there. Only at a line start does it wait for the whole window.
4. The search is done in rounds, in lock step for all called MBs.
   - Each MB asks for an expanding diamond around its centre: distance 1 (4 points),
     then distances 2, 4, … 64 (8 points each). The first round also asks for the
     centre itself, which gives 53 points.
   - The burst goes through the merger to the PEs. The PEs return the best position
     and SAD per MB.
   - An MB whose result improved moves its centre there and runs another round. It
     stops when a round brings no improvement or after `MAX_ROUNDS`.
5. One record per called MB goes to the compressor: the vector relative to the window
   centre and the SAD.

Candidate positions are the top-left pixel of a 16x16 block inside the window,
0 … (N_SW−1)·16 on both axes. The window centre is ((N_SW−1)/2)·16 = 96. The default
N_SW = 13 gives a ±96 pixel (193x193) search area.

## On-chip video memory and sector rotation

Each memory line holds one whole MB: bank k holds pixel row k (16 pixels = 128 bits).
A single line address therefore delivers a full MB to the PEs in one cycle. The
N_SW² lines form N_SW sectors of N_SW lines, and each sector holds one window column.

The window is a circular buffer. When the window slides one MB to the right, no data
moves. Instead the sectors are renamed: logical column c lives in sector
(c + base) mod N_SW, and `step` increments `base`. The sector that held the old
leftmost column becomes the new rightmost column and is overwritten by the fetch.

PEs address the memory in logical (column, row) coordinates. A read is granted only
when the addressed line is on. Data follows one cycle after the grant.

## Power gating

Every line has one of four states:

| State | Meaning |
|---|---|
| S0 | off; the data is lost |
| S1 | retention at 0.3·Vdd |
| S2 | retention at 0.5·Vdd |
| S3 | on |

At each frame start `power_gating_ctrl` builds a statistics map with one entry per
window position:

- **First frame:** offline maps (loaded through `off_*`) weighted by the number of ME
  and DE dependent frames: D_ME·map_ME + D_DE·map_DE.
- **Later frames:** the access counts gathered during the previous frame. Every
  granted read counts for its logical position.

From the map's mean μ and standard deviation σ each position gets a state:

| Condition | State |
|---|---|
| count 0, or position outside the used window (`sw_used`) | S0 |
| count ≤ μ−2σ | S1 |
| μ−2σ < count ≤ μ−σ | S2 |
| otherwise | S3 |

The comparisons are exact integer arithmetic on the sum S and sum of squares Q, with no
square root. With M positions, "count ≤ μ−kσ" is (S − M·count) > 0 and
(S − M·count)² ≥ k²·(M·Q − S²). Building the map takes 2·N_SW² cycles.

Two points are easy to miss:

- **Data reuse across steps.** The map is in logical window coordinates. A physical
  line's data moves left by one logical column every step and is needed again there.
  So a line gets the most-on state of all positions from its own column leftwards in
  its row (a prefix maximum). Otherwise a line switched off at column c would have
  discarded data that column c−1 needs in the next step.
- **Wake-up.** A read of a gated line is not served. The memory raises `wake_req` for
  the physical line, and the controller reports the line on after 1 (S2), 2 (S1) or
  4 (S0) cycles. Woken lines stay on until the next search step re-applies the map.
  A line woken from S0 reads as zero, with `rd_lost`, until it is rewritten.

## Candidate merging

With D MBs searching the same window, the same candidate position is often requested
several times. This always happens in the first diamond, which has the same centre for
all MBs.

`candidates_merger` stores each distinct position once, together with a mask of the
MBs that asked for it. The PEs read that memory line once for all of them. The merger
then emits the positions sorted by x and then y, which gives two benefits:

- Neighbouring candidates share memory lines, so there is less line switching.
- Candidates that touch the rightmost column (x ≥ (N_SW−1)·16−15 = 177) come last.
  The merger holds them back while `col_ready` (the scheduler's `sw_loaded`) is low.
  This is what lets the search start before the new column has arrived.

## Fixed external memory schedule

The three AGUs share one port. Instead of an arbiter, each step follows the same order:

1. current MBs;
2. the missing window column;
3. one partial results buffer, only if one is full;
4. the port is free for the rest of the encoder (`enc_slot`) until the next step.

The interval lengths change with D and N_SW; the order never does. At the end of a
frame, remaining full buffers are written in extra schedule slots.

## Partial results compression

Each record holds a vector (vx, vy) and a SAD. It is coded most significant bit first
as:

`code(dx) [raw vx]  code(dy) [raw vy]  code(q) [raw SAD]`

- **Vector prediction.** The predictor is the median of the left and above MB vectors
  of the same dependent frame. The median of two values is their mean, rounded down.
  With one neighbour that one is used; with none the predictor is 0. A small line
  memory per frame slot and MB column remembers the last vector and its MB row.
- **Vector code.** The difference e is mapped to a rank: 2e−1 for e > 0, −2e
  otherwise. Ranks 0…53 (54 table values) are coded. Rank 54 is the escape symbol,
  followed by the vector component itself in 8-bit two's complement.
- **SAD quantizer.** There are 512 levels, symmetric around 1024. Going outward, they
  come in segments of 32 levels whose step doubles: 16, 32, 64, … pixels. The steps
  are fine where SADs are frequent and coarse in the tails.
- **SAD code.** The level q is ranked by distance from the mean. Ranks 0…188
  (189 values) are coded. Rank 189 is the escape, followed by the SAD in 14 bits,
  saturated.
- **Code tables.** The codes are exp-Golomb codes of the rank: code = rank + 2^k,
  length = 2·⌊log2(rank+2^k)⌋ + 1 − k. The order k is 0 for ME vectors, 1 for DE
  vectors (a wider distribution) and 2 for SADs.
- **Packing.** Records are appended to a 512-bit buffer; the first stream bit is bit 511.
  - A full buffer is handed to the scheduler. Filling continues at once in a second
    register, and the tail of a record that did not fit goes there.
  - The input stalls (`rec_ready` low) only if a full buffer is still waiting and the
    next record could overflow.
  - `agu_partial_results` writes a buffer as four 128-bit beats at consecutive
    addresses of a dedicated region, advancing 64 bytes per buffer and wrapping at
    the region size.

## Where this RTL departs from the original description

- **Huffman tables and quantizer levels.** The original uses trained Huffman tables
  and a Lloyd-Max quantizer whose entries are not published. Here they are replaced by
  exp-Golomb codes and the doubling-step quantizer described above. The table sizes
  (54, 189, 512 levels) and escape widths (8, 14 bits) are kept.
- **Search algorithm.** Only the diamond rounds of the TZ search are generated. The
  raster-search and predictor stages of the full algorithm are not implemented.
- **Power-gating thresholds.** The published algorithm's threshold bounds are
  inconsistent. They are read as S1 ≤ μ−2σ and S2 ≤ μ−σ.
  - Later frames use the previous frame's access counts.
  - The prefix-maximum rule that protects data still needed after the window slides
    is this design's own.
  - Wake-up latencies in cycles are assumptions; only energies are published.
- **Own choices where the original is silent:**
  - border handling (pixels outside the frame repeat the border);
  - the 128-bit memory beat and in-order responses;
  - the record bit layout;
  - region wrapping;
  - merger depth (512 entries);
  - `MAX_ROUNDS` = 8;
  - `W_MAX` = 120 MBs per line (1920 pixels).

## Parameters and sizes

| Parameter | Default | Meaning |
|---|---|---|
| `N_SW` | 13 | window edge in MBs: ±96 pixels |
| `MAX_D` | 9 | dependent frames per reference: 8 views with B-view prediction |
| `W_MAX` | 120 | MBs per frame line kept by the vector predictor |
| `CAND_DEPTH` | 512 | merger entries: ≥ 9 MBs x 53 points |
| `MAX_ROUNDS` | 8 | search rounds per step |

At the defaults the video memory is 169 lines x 2048 bits (43 KB).

Fit at the defaults:

- Frames up to 1920 pixels wide (120 MBs) and 255 MB rows fit, including
  640x480, 1024x768 and 1920x1080 at 4 or 8 views.
- Smaller search windows use `sw_used` < N_SW; the unused lines stay off.
- A ±128 window needs N_SW = 17. Its vectors would also exceed the 8-bit vector
  fields.

## Top-level interface and timing

- **Configuration** (static during a frame):
  - frame size in MBs (`frame_w_mb`, `frame_h_mb`);
  - `stride` in bytes per pixel row;
  - reference and dependent frame base addresses;
  - `dep_en`, `dep_is_de` and global disparity vectors per dependent frame slot;
  - the partial results region;
  - `sw_used`;
  - `first_frame`, which selects the offline statistics.
- **Frame control.** `start` begins one reference frame and `done` pulses after the
  last partial results are written.
- **PE interface:**
  - `cand_valid/ready/pos/mask/last` carries the merged candidates;
  - `pe_vm_rd_*` reads a video memory line (grant, then data one cycle later, plus a
    lost flag);
  - `pe_cb_rd_*` reads a current MB;
  - `pe_res_valid` with `pe_res_pos[]`/`pe_res_sad[]` ends a burst with the best
    position and SAD per slot.
- **Memory interface.** `mem_req_valid/ready` carries a `mem_req_t` (`we`, `addr`,
  128-bit `wdata`). `mem_rsp_valid` with `mem_rsp_data` returns reads in order.
- **Statistics counters:** steps, search rounds, merged candidates, hold cycles,
  wake-ups, partial results buffers, escapes, compressor stalls and records.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the module
against a reference written independently in the testbench and ends with a
`TB_RESULT checks=… failures=…` line.

The end-to-end test `tb_mvc_mem_hier_top` runs the top at its default parameters. The
models it provides:

- **External memory:** pixels from a formula, in-order reads, heavy random back-pressure.
- **Processing elements:** they read every memory line a candidate covers and check it
  against the reference frame, check the current MBs, and compute real SADs.
- **Partial results decoder:** an independent decoder for the results written to
  memory.

It runs two frames of 8x2 MBs with three dependent frames: two temporal and one
inter-view. It checks every line read and every decoded record. It fails if any of the
following never happened: full-window and single-column loads, sector rotation,
merged candidates, candidates held for the arriving column, wake-ups, full buffers,
escape codes and encoder slots.

Simulate with Verilator, for example:

```
verilator --binary --timing -Irtl rtl/mvc_pkg.sv tb/tb_mvc_mem_hier_top.sv \
          --top-module tb_mvc_mem_hier_top -o sim && ./obj_dir/sim
```

(`-Irtl` lets Verilator find each module in `rtl/<module>.sv`.) Use the same command
with another `tb_<module>.sv` and `--top-module tb_<module>` for a unit test. Every testbench finishes in seconds.
