# Locality-aware thread block and warp scheduling for a GPU

A GPU core (SM) runs more than a thousand threads over a 16 KB L1 data cache,
so one thread gets about ten bytes of cache. Two thread blocks that read the
same cache lines only help each other if they run on the same SM, and two
warps that share lines only help each other if they run at about the same
time. The usual round-robin block scheduler ignores this, and it spreads
neighbouring blocks over different SMs.

This RTL schedules by predicted locality. Before a block runs, the scheduler
knows which cache lines it will touch. The kernel's index arithmetic
(`blockIdx * BLOCK_SIZE + threadIdx` and the like) can be run ahead of time
for the first and last thread of a block or warp. From those footprints:

* the **block dispatcher** sends each waiting block to the SM whose running
  blocks share the most cache lines with it;
* each SM's **two-level warp scheduler** keeps warps that share lines
  together in its small active group.

The scheme follows a published master's thesis on locality-aware GPU
scheduling. The original work was evaluated in a cycle simulator; this
repository is an RTL rendering of its scheduler hardware. Sizes not given in
the thesis, and the cycle-level sequencing, are this design's own choices.
They are listed below.

## Footprints in cache-line coordinates

A data array is treated as a 2-D grid of cache lines. A byte at column `x`
and row `y` sits in line `(x / 128, y)`.

**Block footprint: a rectangle per data array.** The rectangle spans from
the first thread's line to the last thread's line. It is stored as
`(x, y, dx, dy)`, one byte each (`rect_t`). It covers `dx+1` by `dy+1`
lines. `line_range_calc` does this conversion.

**Block-to-block locality** is the number of lines two rectangles share,
summed over the data arrays of the kernel (`overlap_area`,
`inter_block_locality`). On each axis the overlap is
`min(end_a, end_b) - max(start_a, start_b) + 1`, or 0 if that is negative.
For two rectangles of the same size this is the thesis formula
`(width - distance)`.

**Warp footprint: a hierarchical code per data array** (`warp_range_encoder`).
Warps do not have rectangular footprints, and one bit per cache line would
cost too much. The code is built in two steps:

* The line grid (256 x 256 lines) is cut into 2^10 regions: 32 x 32 regions
  of 8 x 8 lines. The 10-bit **region vector** is the index of the region
  that holds the block's upper-left line, `row * 32 + column`.
* That region is cut into 16 sub-regions of 2 x 2 lines. The 16-bit
  **sub-region vector** has a bit set for each sub-region the warp's
  rectangle touches. The MSB is the upper-left sub-region, and the bits go
  row by row.

**Warp-to-warp locality** (`inter_warp_locality`) is computed per array. It
is 0 if the two region vectors differ. Otherwise it is the number of 1 bits
the two sub-region vectors have in common. The per-array values are summed
over the arrays. The maximum is 5 x 16 = 80, which fits the 1-byte table
entry.

## The block dispatcher (`block_dispatcher`)

The dispatcher keeps a table of the 15 x 8 running blocks and their
rectangles. The block queue (`block_queue`, 16 slots) shows every waiting
block at once. When some SM `x` has a free block slot and a block is
waiting, the dispatcher makes one decision:

| state  | cycles | work |
|--------|--------|------|
| IDLE   | 1      | pick SM `x` (round robin over SMs with a free slot) and its lowest free slot |
| SCAN   | 120    | walk the running-block table one entry per cycle. For all 16 candidates in parallel, add the entry's locality to `same[c]` if it runs on `x`, else to `other[c]` |
| SELECT | 1      | if some `same[c] > 0`, take the largest; otherwise take the smallest `other[c]`, to leave other SMs' reuse intact. Ties go to the lowest block id. The block is removed from the queue |
| WARPS  | 1 per warp | ask for the warp's first/last thread coordinates on the `warp_req`/`warp_addr` port (answered in the same cycle), encode the warp and write the code into SM `x`'s warp queue |
| LAUNCH | 1      | enter the block in the running table; pulse `launch_valid`. `launch_by_locality` tells which rule chose it |

A decision therefore takes `123 + warps` cycles. The queue takes no new
blocks from SCAN to the end of WARPS, so the candidate set stays fixed. An
SM reports a finished block with `tb_done`/`tb_done_slot`, and that frees
the slot at the next edge.

Block slot `t` of an SM owns warp slots `6t .. 6t+5`. A block therefore has
at most 6 warps (192 threads). `cfg_warps_per_block` sets 1 to 6.

## Warp queue and locality degree table (`warp_queue`)

Each SM stores the code of each of its 48 warp slots. It also stores one
byte for each pair of slots: the upper triangle of 48 x 47 / 2 = 1128
entries. When a warp's code is written, 48 comparison units compute its
locality with every other valid warp. Its whole row is rewritten in that
cycle. The table is read as a full symmetric 48 x 48 matrix `ldt`, with a
zero diagonal and zeros for invalid warps.

## Two-level warp scheduler (`two_level_warp_scheduler`)

The resident warps are split into two groups: an active group of at most 8
warps and a pending group of the rest. One warp issues per cycle, only from
the active group. The rules:

* **Issue.** A starved ready active warp goes first. Otherwise the last
  issued warp issues again while it is ready (greedy). Otherwise the
  scheduler issues the ready active warp with the highest `ldt[last][w]`
  (a short stall).
* **Demote.** A warp reported on `long_stall_*` (an off-chip access)
  leaves the active group at once.
* **Promote.** Whenever the active group has room, one ready pending warp
  per cycle is moved to it. This includes the cycle of a demotion. A
  starved warp goes first. Otherwise the scheduler promotes the warp with
  the highest sum of `ldt[p][a]` over the warps still active.
* **Starvation.** Each block launch on the SM takes the next value of an
  8-bit counter as that block's age. A warp is starved when its block's age
  lags the newest block's age by more than `2 * 8` (modulo 256).
* **Ties** go to the lowest warp slot.

`issue_valid/issue_warp` is combinational from the state and from
`warp_ready`. Group changes take effect at the next rising edge.

## Top level (`las_top`)

`las_top` joins the pieces: block range calculation on the enqueue path,
the block queue, the dispatcher, and per SM a warp queue plus a warp
scheduler. Three things stay outside and connect through ports:

* the SM pipelines, which drive `warp_ready`, `warp_exit`, `long_stall_*`
  and `tb_done*`;
* the memory system;
* the processor that runs the kernel's address arithmetic, which drives
  `enq_addr` and `warp_addr`.

All reset is synchronous and active low. The shared types and sizes are in
`las_pkg`.

| parameter | default | origin |
|-----------|---------|--------|
| SMs `N_SM` | 15 | thesis |
| block slots per SM `N_TB` | 8 | thesis |
| warps per SM `W` | 48 | thesis (1536 threads / 32) |
| line size | 128 B | thesis |
| rectangle fields | 1 byte each | thesis |
| region / sub-region vector | 10 / 16 bits per array | thesis |
| locality table entry | 1 byte | thesis |
| data arrays per kernel | 5 | from the thesis's storage figures (6 + 10 bytes of warp code = 5 x (10 + 16) bits) |
| block queue depth `BQ_DEPTH` | 16 | this design |
| active group `ACTIVE` | 8 | this design |
| block id width | 20 bits | this design |
| warps per block | 6 max | this design (48 / 8) |

## Where this departs from, or goes beyond, the thesis

* The thesis runs the dispatching algorithm as software on a small
  in-order processor in the block scheduler. Here it is fixed logic, and
  the processor only supplies thread coordinates through ports.
* The thesis gives 15 bytes per block queue entry. Five arrays of a
  two-coordinate rectangle at 1 byte per field take 20 bytes, so an entry
  here is 20 bytes of rectangles plus the block id.
* The overlap formula is generalised to rectangles of different sizes.
* The way the array is cut into regions is this design's choice. So is
  using the block's upper-left line as the region, and dropping parts of a
  warp outside that region.
* SM resources other than block slots (registers, shared memory, thread
  count) are not checked. A block also cannot have more than 6 warps. Many
  common kernels use 256-thread blocks and would need a different
  warp-slot allocation.
* Coordinates are 1 byte. An array more than 256 lines (32 KB) wide or 256
  rows tall wraps around in line coordinates.
* Promotion also fills an active group that has room for other reasons
  (kernel start, exits). Starved warps also go first at issue.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -y rtl +libext+.sv rtl/las_pkg.sv \
        tb/tb_two_level_warp_scheduler.sv --top-module tb_two_level_warp_scheduler
    obj_dir/Vtb_two_level_warp_scheduler

* `tb_las_top` runs the full-size design (15 SMs, 48 warps each) through a
  480-block kernel on two data arrays:
  * array 0 is read row-major, with neighbouring blocks sharing a line;
  * array 1 is read column-major.

  A behavioural SM model issues, short-stalls, long-stalls and retires
  warps. A few blocks carry one very slow warp, to trigger starvation. The
  testbench checks that:
  * every block launches once and finishes;
  * every issued warp was active, valid and ready;
  * launched warps' table entries match a reference;
  * each mechanism happened at least once: both decision rules, queue
    back-pressure, greedy issue, locality switch, demotion, promotion and
    starvation.

  It takes about 100 000 cycles, a few minutes to build and under two
  minutes to run.
* The block tests compare against independent reference models. These
  include brute-force line counting, a per-cycle model of the warp
  scheduler rules, and a reference dispatcher decision on a 2-SM
  configuration.
