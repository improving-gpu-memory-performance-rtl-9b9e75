// las_top: locality-aware thread block and warp scheduling for a GPU of N_SM
// streaming multiprocessors.
//
// Blocks of a kernel enter with the byte coordinates of their first and last
// thread on each data array (the result of the kernel's address calculation
// code). line_range_calc turns these into cache-line rectangles, which are
// stored with the block in the block queue. The block dispatcher picks, for
// an SM with a free block slot, the waiting block that shares the most cache
// lines with the blocks already on that SM (or, if none shares any, the one
// that shares the fewest with the other SMs), fetches and encodes the access
// ranges of its warps into that SM's warp queue, and launches it. In each SM
// the warp queue keeps the locality degree table up to date and the
// two-level warp scheduler issues one warp per cycle from its active group.
//
// The SM pipelines themselves, the caches and the processor that runs the
// address calculation code are outside this module: their signals are ports.
//   enq_*        new thread blocks (valid/ready)
//   warp_req_* / warp_addr  address calculation of one warp, answered in the
//                same cycle
//   launch_*     a block starts on an SM (one-cycle pulse)
//   tb_done*     an SM reports a finished block slot
//   warp_ready, warp_exit, long_stall_*  per-SM pipeline state
//   issue_*      per-SM warp issued this cycle
// Reset: synchronous, active low, for the whole design.
module las_top
  import las_pkg::*;
#(
  parameter int unsigned N_SM     = NUM_SM,
  parameter int unsigned N_TB     = MAX_TB,
  parameter int unsigned W        = MAX_WARPS,
  parameter int unsigned BQ_DEPTH = 16,
  parameter int unsigned ACTIVE   = 8,
  localparam int unsigned W_PER_TB = W / N_TB,
  localparam int unsigned SM_W    = (N_SM > 1) ? $clog2(N_SM) : 1,
  localparam int unsigned SLOT_W  = (N_TB > 1) ? $clog2(N_TB) : 1,
  localparam int unsigned WIDX_W  = (W_PER_TB > 1) ? $clog2(W_PER_TB) : 1,
  localparam int unsigned WID_W   = $clog2(W)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WIDX_W:0]    cfg_warps_per_block,
  // kernel launch: thread blocks
  input  logic               enq_valid,
  output logic               enq_ready,
  input  logic [BID_W-1:0]   enq_bid,
  input  byte_ranges_t       enq_addr,
  // warp address calculation
  output logic               warp_req_valid,
  output logic [BID_W-1:0]   warp_req_bid,
  output logic [WIDX_W-1:0]  warp_req_idx,
  input  byte_ranges_t       warp_addr,
  // block launch
  output logic               launch_valid,
  output logic [SM_W-1:0]    launch_sm,
  output logic [SLOT_W-1:0]  launch_slot,
  output logic [BID_W-1:0]   launch_bid,
  output logic               launch_by_locality,
  // per-SM pipeline interface
  input  logic [N_SM-1:0]    tb_done,
  input  logic [SLOT_W-1:0]  tb_done_slot [N_SM],
  input  logic [W-1:0]       warp_ready [N_SM],
  input  logic [W-1:0]       warp_exit [N_SM],
  input  logic [N_SM-1:0]    long_stall_valid,
  input  logic [WID_W-1:0]   long_stall_warp [N_SM],
  output logic [N_SM-1:0]    issue_valid,
  output logic [WID_W-1:0]   issue_warp [N_SM],
  output logic [W-1:0]       warp_valid [N_SM],
  output logic [W-1:0]       active [N_SM],
  output logic [W-1:0]       starved [N_SM],
  output logic [N_SM*N_TB-1:0] running_valid,   // occupied block slots, SM-major
  // per-SM scheduler events
  output logic [N_SM-1:0]    ev_greedy,
  output logic [N_SM-1:0]    ev_locality,
  output logic [N_SM-1:0]    ev_demote,
  output logic [N_SM-1:0]    ev_promote,
  output logic [N_SM-1:0]    ev_starve
);

  // --------------------------------------- thread-block-level access ranges
  bq_entry_t enq_entry;
  assign enq_entry.bid = enq_bid;

  for (genvar a = 0; a < NUM_ARRAYS; a++) begin : g_blk_range
    line_range_calc u_lrc (.in_range(enq_addr[a]), .out_rect(enq_entry.range[a]));
  end

  // ---------------------------------------------------------- block queue
  logic [BQ_DEPTH-1:0]         bq_valid;
  bq_entry_t                   bq_entry [BQ_DEPTH];
  logic                        bq_hold, bq_deq_valid;
  logic [$clog2(BQ_DEPTH)-1:0] bq_deq_idx;

  block_queue #(.DEPTH(BQ_DEPTH)) u_bq (
    .clk, .rst_n,
    .enq_valid, .enq_ready, .enq_entry,
    .hold       (bq_hold),
    .slot_valid (bq_valid),
    .slot_entry (bq_entry),
    .deq_valid  (bq_deq_valid),
    .deq_idx    (bq_deq_idx)
  );

  // ------------------------------------------------------- block dispatcher
  logic                 wq_wr_valid;
  logic [SM_W-1:0]      wq_wr_sm;
  logic [WID_W-1:0]     wq_wr_warp;
  warp_range_t          wq_wr_code;

  block_dispatcher #(
    .N_SM(N_SM), .N_TB(N_TB), .W_PER_TB(W_PER_TB), .BQ_DEPTH(BQ_DEPTH)
  ) u_disp (
    .clk, .rst_n, .cfg_warps_per_block,
    .bq_valid, .bq_entry, .bq_hold, .bq_deq_valid, .bq_deq_idx,
    .tb_done, .tb_done_slot,
    .warp_req_valid, .warp_req_bid, .warp_req_idx, .warp_addr,
    .wq_wr_valid, .wq_wr_sm, .wq_wr_warp, .wq_wr_code,
    .launch_valid, .launch_sm, .launch_slot, .launch_bid, .launch_by_locality,
    .running_valid
  );

  // ------------------------------------------------------------------ SMs
  for (genvar s = 0; s < N_SM; s++) begin : g_sm
    logic [LDT_W-1:0] ldt [W][W];
    warp_range_t      code [W];

    warp_queue #(.W(W)) u_wq (
      .clk, .rst_n,
      .wr_valid   (wq_wr_valid && wq_wr_sm == SM_W'(s)),
      .wr_warp    (wq_wr_warp),
      .wr_code    (wq_wr_code),
      .warp_exit  (warp_exit[s]),
      .warp_valid (warp_valid[s]),
      .code       (code),
      .ldt        (ldt)
    );

    two_level_warp_scheduler #(.W(W), .N_TB(N_TB), .ACTIVE(ACTIVE)) u_ws (
      .clk, .rst_n,
      .warp_valid       (warp_valid[s]),
      .warp_ready       (warp_ready[s]),
      .ldt              (ldt),
      .long_stall_valid (long_stall_valid[s]),
      .long_stall_warp  (long_stall_warp[s]),
      .launch_valid     (launch_valid && launch_sm == SM_W'(s)),
      .launch_slot      (launch_slot),
      .issue_valid      (issue_valid[s]),
      .issue_warp       (issue_warp[s]),
      .active           (active[s]),
      .starved          (starved[s]),
      .ev_greedy        (ev_greedy[s]),
      .ev_locality      (ev_locality[s]),
      .ev_demote        (ev_demote[s]),
      .ev_promote       (ev_promote[s]),
      .ev_starve        (ev_starve[s])
    );
  end

endmodule
