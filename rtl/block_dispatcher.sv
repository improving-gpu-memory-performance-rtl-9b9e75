// block_dispatcher: the locality-aware thread-block dispatching decision and
// the warp-level access range calculation that follows it.
//
// The dispatcher keeps a table of the blocks running on every SM (one entry
// per block slot, NUM_SM x MAX_TB, holding the block's rectangles). When an
// SM has a free block slot and the block queue holds a block, it makes a
// decision for that SM, x:
//   1. SCAN: for every waiting block c, sum its inter-block locality (shared
//      cache lines over all data arrays) with the blocks running on SM x,
//      and separately with the blocks running on all other SMs. All queue
//      slots are evaluated in parallel; the running-block table is walked one
//      entry per cycle, so a scan takes NUM_SM*MAX_TB cycles.
//   2. SELECT: the waiting block with the highest locality to SM x is chosen.
//      If that locality is zero for every waiting block, the block with the
//      lowest locality to the other SMs is chosen instead, to leave their
//      reuse opportunities intact. Ties go to the lowest block id.
//   3. WARPS: for each warp of the chosen block, the first and last thread's
//      byte coordinates are requested on the warp address port (answered in
//      the same cycle), turned into line rectangles and encoded into the
//      hierarchical region/sub-region code, which is written into warp slot
//      slot*WARPS_PER_TB + i of SM x's warp queue. One warp per cycle.
//   4. LAUNCH: the block enters the running table and a one-cycle launch
//      pulse tells the SM.
// The scan, the selection rule and the encoding follow the thesis. The
// walking order, the one-decision-at-a-time sequencing, the round-robin
// choice of which SM with a free slot is served next, the tie rule and the
// warp address port are this design's choices. SMs report a finished block
// with tb_done/tb_done_slot, which frees its table entry at the next edge.
// The queue is held (no new blocks) from SCAN to the end of WARPS.
// Reset: synchronous, active low; all block slots free.
module block_dispatcher
  import las_pkg::*;
#(
  parameter int unsigned N_SM      = NUM_SM,
  parameter int unsigned N_TB      = MAX_TB,
  parameter int unsigned W_PER_TB  = WARPS_PER_TB,
  parameter int unsigned BQ_DEPTH  = 16,
  localparam int unsigned SM_W     = (N_SM > 1) ? $clog2(N_SM) : 1,
  localparam int unsigned SLOT_W   = (N_TB > 1) ? $clog2(N_TB) : 1,
  localparam int unsigned WIDX_W   = (W_PER_TB > 1) ? $clog2(W_PER_TB) : 1,
  localparam int unsigned WARP_W   = $clog2(N_TB * W_PER_TB),
  localparam int unsigned QIDX_W   = $clog2(BQ_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [WIDX_W:0]       cfg_warps_per_block,   // 1..W_PER_TB
  // block queue
  input  logic [BQ_DEPTH-1:0]   bq_valid,
  input  bq_entry_t             bq_entry [BQ_DEPTH],
  output logic                  bq_hold,
  output logic                  bq_deq_valid,
  output logic [QIDX_W-1:0]     bq_deq_idx,
  // finished blocks, one port per SM
  input  logic [N_SM-1:0]       tb_done,
  input  logic [SLOT_W-1:0]     tb_done_slot [N_SM],
  // warp address port (address calculation of one warp)
  output logic                  warp_req_valid,
  output logic [BID_W-1:0]      warp_req_bid,
  output logic [WIDX_W-1:0]     warp_req_idx,
  input  byte_ranges_t          warp_addr,
  // warp queue write
  output logic                  wq_wr_valid,
  output logic [SM_W-1:0]       wq_wr_sm,
  output logic [WARP_W-1:0]     wq_wr_warp,
  output warp_range_t           wq_wr_code,
  // block launch
  output logic                  launch_valid,
  output logic [SM_W-1:0]       launch_sm,
  output logic [SLOT_W-1:0]     launch_slot,
  output logic [BID_W-1:0]      launch_bid,
  output logic                  launch_by_locality,   // chosen for locality with SM x (else fallback)
  output logic [N_SM*N_TB-1:0]  running_valid
);

  localparam int unsigned N_RUN = N_SM * N_TB;
  localparam int unsigned RUN_W = (N_RUN > 1) ? $clog2(N_RUN) : 1;

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_SELECT, S_WARPS, S_LAUNCH} state_e;

  state_e              state;
  block_range_t        run_range [N_RUN];
  logic [RUN_W-1:0]    scan_idx;
  logic [SM_W-1:0]     sel_sm, rr_sm;
  logic [SLOT_W-1:0]   sel_slot;
  bq_entry_t           pick_entry;
  logic                pick_by_loc;
  logic [WIDX_W-1:0]   warp_i;
  logic [ACC_W-1:0]    acc_same  [BQ_DEPTH];
  logic [ACC_W-1:0]    acc_other [BQ_DEPTH];

  // ---------------------------------------------------------------- free slots
  logic [N_SM-1:0]   sm_has_free;
  logic [SLOT_W-1:0] sm_free_slot [N_SM];

  always_comb begin
    for (int s = 0; s < N_SM; s++) begin
      sm_has_free[s]  = 1'b0;
      sm_free_slot[s] = '0;
      for (int t = N_TB - 1; t >= 0; t--)
        if (!running_valid[s*N_TB+t]) begin
          sm_has_free[s]  = 1'b1;
          sm_free_slot[s] = t[SLOT_W-1:0];
        end
    end
  end

  // Round robin over SMs with a free slot, starting after the last one served.
  logic            any_free;
  logic [SM_W-1:0] next_sm;

  always_comb begin
    any_free = 1'b0;
    next_sm  = '0;
    for (int k = N_SM; k >= 1; k--)
      if (sm_has_free[(int'(rr_sm) + k) % N_SM]) begin
        any_free = 1'b1;
        next_sm  = SM_W'((int'(rr_sm) + k) % N_SM);
      end
  end

  // ------------------------------------------------------- locality of a scan step
  logic [BLOC_W-1:0] step_loc [BQ_DEPTH];
  logic [SM_W-1:0]   scan_sm;

  assign scan_sm = SM_W'(scan_idx / RUN_W'(N_TB));

  for (genvar c = 0; c < BQ_DEPTH; c++) begin : g_cand
    inter_block_locality u_loc (
      .a        (bq_entry[c].range),
      .b        (run_range[scan_idx]),
      .locality (step_loc[c])
    );
  end

  // ------------------------------------------------------------------ selection
  logic [QIDX_W-1:0] best_same_idx, best_other_idx;
  logic [ACC_W-1:0]  best_same, best_other;
  logic              best_found;

  always_comb begin
    best_same_idx  = '0;
    best_other_idx = '0;
    best_same      = '0;
    best_other     = '1;
    best_found     = 1'b0;
    for (int c = 0; c < BQ_DEPTH; c++) begin
      if (bq_valid[c]) begin
        if (!best_found ||
            acc_same[c] > best_same ||
            (acc_same[c] == best_same && bq_entry[c].bid < bq_entry[best_same_idx].bid)) begin
          best_same     = acc_same[c];
          best_same_idx = c[QIDX_W-1:0];
        end
        if (!best_found ||
            acc_other[c] < best_other ||
            (acc_other[c] == best_other && bq_entry[c].bid < bq_entry[best_other_idx].bid)) begin
          best_other     = acc_other[c];
          best_other_idx = c[QIDX_W-1:0];
        end
        best_found = 1'b1;
      end
    end
  end

  // ------------------------------------------------------ warp-level encoding
  block_range_t warp_rect;

  for (genvar a = 0; a < NUM_ARRAYS; a++) begin : g_warp_rect
    line_range_calc u_lrc (.in_range(warp_addr[a]), .out_rect(warp_rect[a]));
  end

  warp_range_encoder u_enc (
    .blk_range (pick_entry.range),
    .warp_rect (warp_rect),
    .code      (wq_wr_code)
  );

  assign warp_req_valid = (state == S_WARPS);
  assign warp_req_bid   = pick_entry.bid;
  assign warp_req_idx   = warp_i;
  assign wq_wr_valid    = (state == S_WARPS);
  assign wq_wr_sm       = sel_sm;
  assign wq_wr_warp     = WARP_W'(sel_slot) * WARP_W'(W_PER_TB) + WARP_W'(warp_i);

  assign launch_valid       = (state == S_LAUNCH);
  assign launch_sm          = sel_sm;
  assign launch_slot        = sel_slot;
  assign launch_bid         = pick_entry.bid;
  assign launch_by_locality = pick_by_loc;

  assign bq_hold      = (state != S_IDLE) && (state != S_LAUNCH);
  assign bq_deq_valid = (state == S_SELECT);
  assign bq_deq_idx   = (best_same != '0) ? best_same_idx : best_other_idx;

  // ------------------------------------------------------------------ control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      running_valid <= '0;
      rr_sm         <= SM_W'(N_SM - 1);
      scan_idx      <= '0;
      sel_sm        <= '0;
      sel_slot      <= '0;
      pick_by_loc   <= 1'b0;
      warp_i        <= '0;
      pick_entry    <= '0;
    end else begin
      for (int s = 0; s < N_SM; s++)
        if (tb_done[s])
          running_valid[s*N_TB + int'(tb_done_slot[s])] <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (any_free && (bq_valid != '0)) begin
            sel_sm   <= next_sm;
            sel_slot <= sm_free_slot[next_sm];
            rr_sm    <= next_sm;
            scan_idx <= '0;
            state    <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (scan_idx == RUN_W'(N_RUN - 1))
            state <= S_SELECT;
          else
            scan_idx <= scan_idx + 1'b1;
        end
        S_SELECT: begin
          pick_entry  <= bq_entry[bq_deq_idx];
          pick_by_loc <= (best_same != '0);
          warp_i      <= '0;
          state       <= S_WARPS;
        end
        S_WARPS: begin
          if ((WIDX_W+1)'(warp_i) + 1'b1 >= cfg_warps_per_block ||
              warp_i == WIDX_W'(W_PER_TB - 1))
            state <= S_LAUNCH;
          else
            warp_i <= warp_i + 1'b1;
        end
        S_LAUNCH: begin
          running_valid[int'(sel_sm)*N_TB + int'(sel_slot)] <= 1'b1;
          run_range[int'(sel_sm)*N_TB + int'(sel_slot)]     <= pick_entry.range;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Locality accumulators: cleared when a scan starts, summed during it.
  always_ff @(posedge clk) begin
    for (int c = 0; c < BQ_DEPTH; c++) begin
      if (state == S_IDLE) begin
        acc_same[c]  <= '0;
        acc_other[c] <= '0;
      end else if (state == S_SCAN && running_valid[scan_idx]) begin
        if (scan_sm == sel_sm)
          acc_same[c]  <= acc_same[c] + ACC_W'(step_loc[c]);
        else
          acc_other[c] <= acc_other[c] + ACC_W'(step_loc[c]);
      end
    end
  end

  // A block is launched only into a slot that is free.
  assert property (@(posedge clk) disable iff (!rst_n)
                   launch_valid |-> !running_valid[int'(launch_sm)*N_TB + int'(launch_slot)])
    else $error("block_dispatcher: launch into an occupied slot");

endmodule
