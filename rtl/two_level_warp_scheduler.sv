// two_level_warp_scheduler: the locality-aware two-level warp scheduler of
// one SM.
//
// The resident warps are split into an active group (at most ACTIVE warps)
// and a pending group (all other valid warps). Only active warps issue.
//   Issue (one warp per cycle, "greedy then locality"): the warp issued last
//   is issued again while it is active and ready. When it cannot issue (a
//   short stall), the ready active warp with the highest inter-warp locality
//   with it, read from the locality degree table, is issued instead.
//   Demotion: a warp reported on long_stall (it has started an off-chip
//   access) leaves the active group at once.
//   Promotion: whenever the active group has room (at most one warp per
//   cycle, so also in the cycle of a demotion), the ready pending warp whose
//   summed locality with all warps left in the active group is highest moves
//   to the active group.
//   Starvation: every block slot gets an age when its block is launched (a
//   counter that counts launches on this SM). A warp whose block's age lags
//   the age of the most recently launched block by more than 2*N_TB is
//   starved and takes first priority, both for promotion and for issue.
// Ties are broken towards the lowest warp slot, which is also the oldest warp
// of a block. Warp slot w belongs to block slot w / (W / N_TB).
//
// Interface: warp_valid comes from the warp queue, warp_ready (the warp has
// an instruction free of hazards this cycle) and long_stall from the SM
// pipeline. issue_valid/issue_warp is combinational from the current state
// and inputs. Demotion, promotion and the last-issued register change at the
// rising edge. Event outputs pulse for one cycle for monitoring.
// Follows the thesis: the two groups, the issue order, the demotion and the
// promotion rule and the 2N starvation test. This design's choices: the
// active group size, one promotion per cycle, the tie rule, the age counter
// width (ages compare modulo 2^AGE_W) and that starved warps also go first
// at issue. Reset (synchronous, active low) empties the active group.
module two_level_warp_scheduler
  import las_pkg::*;
#(
  parameter int unsigned W      = MAX_WARPS,
  parameter int unsigned N_TB   = MAX_TB,
  parameter int unsigned ACTIVE = 8,
  localparam int unsigned WID_W  = $clog2(W),
  localparam int unsigned SLOT_W = (N_TB > 1) ? $clog2(N_TB) : 1,
  localparam int unsigned SCORE_W = LDT_W + $clog2(W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [W-1:0]      warp_valid,
  input  logic [W-1:0]      warp_ready,
  input  logic [LDT_W-1:0]  ldt [W][W],
  input  logic              long_stall_valid,
  input  logic [WID_W-1:0]  long_stall_warp,
  input  logic              launch_valid,
  input  logic [SLOT_W-1:0] launch_slot,
  output logic              issue_valid,
  output logic [WID_W-1:0]  issue_warp,
  output logic [W-1:0]      active,
  output logic [W-1:0]      starved,
  // one-cycle event pulses
  output logic              ev_greedy,     // last warp issued again
  output logic              ev_locality,   // switch to the best-locality active warp
  output logic              ev_demote,
  output logic              ev_promote,
  output logic              ev_starve      // a starved warp was issued or promoted first
);

  localparam int unsigned WPB = W / N_TB;

  logic [WID_W-1:0] last_warp;
  logic             last_valid;
  logic [AGE_W-1:0] age [N_TB];
  logic [AGE_W-1:0] age_ctr, newest_age;

  // ---------------------------------------------------------------- starvation
  logic [AGE_W-1:0] lag [N_TB];
  always_comb begin
    for (int t = 0; t < N_TB; t++)
      lag[t] = newest_age - age[t];
    for (int w = 0; w < W; w++)
      starved[w] = warp_valid[w] && (lag[w / WPB] > AGE_W'(2 * N_TB));
  end

  // ------------------------------------------------- groups after this cycle's demotion
  logic [W-1:0] act_now, demote_mask;
  always_comb begin
    demote_mask = '0;
    if (long_stall_valid)
      demote_mask[long_stall_warp] = 1'b1;
    act_now = active & warp_valid & ~demote_mask;
  end

  // ------------------------------------------------------------------- issue
  logic [W-1:0] can_issue;
  logic         any_starved_issue;
  logic [WID_W-1:0] starve_pick, loc_pick;
  logic [LDT_W-1:0] loc_best;
  logic             loc_found;
  logic [LDT_W-1:0] last_loc [W];   // locality of each warp with the last issued one

  always_comb
    for (int w = 0; w < W; w++)
      last_loc[w] = last_valid ? ldt[last_warp][w] : '0;

  always_comb begin
    can_issue = act_now & warp_ready;
    any_starved_issue = 1'b0;
    starve_pick = '0;
    for (int w = W - 1; w >= 0; w--)
      if (can_issue[w] && starved[w]) begin
        any_starved_issue = 1'b1;
        starve_pick = w[WID_W-1:0];
      end
    loc_found = 1'b0;
    loc_best  = '0;
    loc_pick  = '0;
    for (int w = 0; w < W; w++)
      if (can_issue[w] && (!loc_found || last_loc[w] > loc_best)) begin
        loc_found = 1'b1;
        loc_best  = last_loc[w];
        loc_pick  = w[WID_W-1:0];
      end

    issue_valid = (can_issue != '0);
    ev_greedy   = 1'b0;
    ev_locality = 1'b0;
    if (any_starved_issue) begin
      issue_warp = starve_pick;
    end else if (last_valid && can_issue[last_warp]) begin
      issue_warp = last_warp;
      ev_greedy  = 1'b1;
    end else begin
      issue_warp  = loc_pick;
      ev_locality = issue_valid;
    end
  end

  // --------------------------------------------------------------- promotion
  logic [W-1:0]        can_promote;
  logic [SCORE_W-1:0]  score [W];
  logic                any_starved_prom, prom_found, room;
  logic [WID_W-1:0]    prom_pick, starve_prom;
  logic [SCORE_W-1:0]  prom_best;

  always_comb begin
    room = $countones(act_now) < ACTIVE;
    can_promote = warp_valid & ~act_now & ~demote_mask & warp_ready;
    for (int p = 0; p < W; p++) begin
      score[p] = '0;
      for (int a = 0; a < W; a++)
        if (act_now[a])
          score[p] += SCORE_W'(ldt[p][a]);
    end
    any_starved_prom = 1'b0;
    starve_prom = '0;
    for (int p = W - 1; p >= 0; p--)
      if (can_promote[p] && starved[p]) begin
        any_starved_prom = 1'b1;
        starve_prom = p[WID_W-1:0];
      end
    prom_found = 1'b0;
    prom_best  = '0;
    prom_pick  = '0;
    for (int p = 0; p < W; p++)
      if (can_promote[p] && (!prom_found || score[p] > prom_best)) begin
        prom_found = 1'b1;
        prom_best  = score[p];
        prom_pick  = p[WID_W-1:0];
      end
    if (any_starved_prom)
      prom_pick = starve_prom;
  end

  logic [W-1:0] promote_mask;
  always_comb begin
    promote_mask = '0;
    if (ev_promote)
      promote_mask[prom_pick] = 1'b1;
  end

  assign ev_demote  = long_stall_valid && active[long_stall_warp] && warp_valid[long_stall_warp];
  assign ev_promote = room && prom_found;
  assign ev_starve  = (issue_valid && any_starved_issue) || (ev_promote && any_starved_prom);

  // ------------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active     <= '0;
      last_valid <= 1'b0;
      last_warp  <= '0;
      age_ctr    <= '0;
      newest_age <= '0;
      for (int t = 0; t < N_TB; t++)
        age[t] <= '0;
    end else begin
      active <= act_now | promote_mask;
      if (issue_valid) begin
        last_valid <= 1'b1;
        last_warp  <= issue_warp;
      end
      if (launch_valid) begin
        age[launch_slot] <= age_ctr;
        newest_age       <= age_ctr;
        age_ctr          <= age_ctr + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $countones(active) <= ACTIVE)
    else $error("two_level_warp_scheduler: active group overflow");
  assert property (@(posedge clk) disable iff (!rst_n) issue_valid |-> active[issue_warp])
    else $error("two_level_warp_scheduler: issued warp not active");

endmodule
