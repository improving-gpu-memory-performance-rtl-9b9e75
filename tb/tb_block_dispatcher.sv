// tb_block_dispatcher: a dispatcher for 2 SMs x 2 block slots with a 4-entry
// candidate set. The testbench plays the block queue (refilled whenever the
// dispatcher does not hold it), the warp address calculation (a fixed
// function of block id and warp index) and the SMs (blocks finish at random).
// Every decision is checked against a reference computed from the
// testbench's own record of candidates and running blocks: the block with the
// most shared lines with the target SM, or, if that is zero for all, the one
// with the fewest shared lines with the other SMs (ties to the lowest id).
// Every warp code written is checked against a reference encoding, and the
// decision latency against NUM_SM*MAX_TB scan cycles plus one per warp plus
// three. Both decision paths must occur.
module tb_block_dispatcher;
  import las_pkg::*;

  localparam int N_SM = 2, N_TB = 2, WPB = 2, DEPTH = 4, N_RUN = N_SM * N_TB;
  localparam int REG_SIDE = 1 << (COORD_W - REG_AXIS_W);
  localparam int SUB_LINES = REG_SIDE / SUB_SIDE;

  logic clk = 0, rst_n = 0;
  logic [1:0] cfg_warps_per_block = 2'd2;
  logic [DEPTH-1:0] bq_valid = '0;
  bq_entry_t bq_entry [DEPTH];
  logic bq_hold, bq_deq_valid;
  logic [1:0] bq_deq_idx;
  logic [N_SM-1:0] tb_done = '0;
  logic [0:0] tb_done_slot [N_SM];
  logic warp_req_valid;
  logic [BID_W-1:0] warp_req_bid;
  logic [0:0] warp_req_idx;
  byte_ranges_t warp_addr;
  logic wq_wr_valid;
  logic [0:0] wq_wr_sm;
  logic [1:0] wq_wr_warp;
  warp_range_t wq_wr_code;
  logic launch_valid;
  logic [0:0] launch_sm, launch_slot;
  logic [BID_W-1:0] launch_bid;
  logic launch_by_locality;
  logic [N_RUN-1:0] running_valid;
  int checks = 0, failures = 0, n_by_loc = 0, n_fallback = 0, n_launch = 0;

  block_dispatcher #(.N_SM(N_SM), .N_TB(N_TB), .W_PER_TB(WPB), .BQ_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t %s", $time, msg); end
  endtask

  // ---------------------------------------------------------- workload
  // Block b: array 0 is a row-major strip (neighbours share a line), array 1
  // a column-major strip (blocks b and b+4 share lines), array 2 random,
  // arrays 3 and 4 unused.
  function automatic block_range_t blk_rect(int b);
    block_range_t r = '0;
    r[0] = '{v:1, x:COORD_W'((3 * b) % 240), y:0, dx:3, dy:0};
    r[1] = '{v:1, x:COORD_W'(b % 4), y:COORD_W'(4 * (b / 4)), dx:0, dy:5};
    r[2] = '{v:1, x:COORD_W'($urandom_range(0, 60)), y:COORD_W'($urandom_range(0, 60)),
             dx:COORD_W'($urandom_range(0, 3)), dy:COORD_W'($urandom_range(0, 3))};
    return r;
  endfunction

  function automatic byte_ranges_t warp_bytes(int b, int i);
    byte_ranges_t r = '0;
    for (int a = 0; a < 3; a++) begin
      r[a].v = 1;
      r[a].first.x = BYTE_X_W'(((b * 7 + i * 3 + a) % 64) * 128 + 5);
      r[a].first.y = COORD_W'((b + i * 2 + a) % 64);
      r[a].last.x  = r[a].first.x + BYTE_X_W'(128 * i + 200);
      r[a].last.y  = r[a].first.y + COORD_W'(i + 1);
    end
    return r;
  endfunction

  always_comb warp_addr = warp_bytes(int'(warp_req_bid), int'(warp_req_idx));

  function automatic int ov(rect_t p, rect_t q);
    int n = 0;
    if (!(p.v && q.v)) return 0;
    for (int y = int'(p.y); y <= int'(p.y) + int'(p.dy); y++)
      for (int x = int'(p.x); x <= int'(p.x) + int'(p.dx); x++)
        if (x >= int'(q.x) && x <= int'(q.x) + int'(q.dx) &&
            y >= int'(q.y) && y <= int'(q.y) + int'(q.dy)) n++;
    return n;
  endfunction

  function automatic int bloc(block_range_t p, block_range_t q);
    int n = 0;
    for (int a = 0; a < NUM_ARRAYS; a++) n += ov(p[a], q[a]);
    return n;
  endfunction

  function automatic warp_code_t ref_code(rect_t blk, rect_t wr);
    warp_code_t c = '0;
    int rx, ry;
    if (!blk.v) return c;
    rx = int'(blk.x) / REG_SIDE; ry = int'(blk.y) / REG_SIDE;
    c.region = REGION_BITS'(ry * (1 << REG_AXIS_W) + rx);
    if (!wr.v) return c;
    for (int y = int'(wr.y); y <= int'(wr.y) + int'(wr.dy); y++)
      for (int x = int'(wr.x); x <= int'(wr.x) + int'(wr.dx); x++)
        if (x / REG_SIDE == rx && y / REG_SIDE == ry)
          c.sub[SUB_BITS - 1 - (((y % REG_SIDE) / SUB_LINES) * SUB_SIDE + (x % REG_SIDE) / SUB_LINES)] = 1'b1;
    return c;
  endfunction

  function automatic rect_t line_rect(byte_range_t r);
    rect_t o;
    o.v = r.v;
    o.x = COORD_W'(r.first.x / 128);
    o.dx = COORD_W'(r.last.x / 128 - r.first.x / 128);
    o.y = r.first.y;
    o.dy = r.last.y - r.first.y;
    return o;
  endfunction

  // ---------------------------------------------------------- SM side model
  bit           run_v [N_RUN];
  block_range_t run_r [N_RUN];
  int           run_bid [N_RUN];
  int           next_bid = 0;
  // snapshot at decision time
  bit           snap_v [DEPTH];
  bq_entry_t    snap_e [DEPTH];
  int           snap_pick, start_cycle, cycle_no = 0;
  bq_entry_t    picked;
  bit           deciding = 0;

  always @(posedge clk) cycle_no++;

  task automatic check_decision(int sm, int pick_idx, bit by_loc);
    int best_same = -1, best_other = -1, want = -1;
    int same [DEPTH], other [DEPTH];
    for (int c = 0; c < DEPTH; c++) begin
      same[c] = 0; other[c] = 0;
      if (snap_v[c])
        for (int s = 0; s < N_RUN; s++)
          if (run_v[s]) begin
            if (s / N_TB == sm) same[c] += bloc(snap_e[c].range, run_r[s]);
            else other[c] += bloc(snap_e[c].range, run_r[s]);
          end
    end
    for (int c = 0; c < DEPTH; c++)
      if (snap_v[c] && (want < 0 || same[c] > best_same ||
          (same[c] == best_same && snap_e[c].bid < snap_e[want].bid))) begin
        want = c; best_same = same[c];
      end
    if (best_same == 0) begin
      want = -1;
      for (int c = 0; c < DEPTH; c++)
        if (snap_v[c] && (want < 0 || other[c] < best_other ||
            (other[c] == best_other && snap_e[c].bid < snap_e[want].bid))) begin
          want = c; best_other = other[c];
        end
    end
    check(pick_idx == want, $sformatf("SM %0d picked slot %0d (bid %0d), want slot %0d (bid %0d)",
          sm, pick_idx, snap_e[pick_idx].bid, want, snap_e[want].bid));
    check(by_loc == (best_same > 0), "decision path flag");
    if (best_same > 0) n_by_loc++; else n_fallback++;
  endtask

  initial begin
    int widx;
    for (int s = 0; s < N_RUN; s++) run_v[s] = 0;
    for (int s = 0; s < N_SM; s++) tb_done_slot[s] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;
    while (n_launch < 150) begin
      // testbench-side work before the edge
      tb_done = '0;
      if (!bq_hold) begin
        for (int c = 0; c < DEPTH; c++)
          if (!bq_valid[c] && $urandom_range(0, 1)) begin
            bq_entry[c].bid = BID_W'(next_bid);
            bq_entry[c].range = blk_rect(next_bid);
            bq_valid[c] = 1; next_bid++;
          end
        for (int s = 0; s < N_SM; s++) begin
          automatic int t = $urandom_range(0, N_TB - 1);
          if (run_v[s * N_TB + t] && $urandom_range(0, 7) == 0 &&
              !(launch_valid && int'(launch_sm) == s)) begin
            tb_done[s] = 1; tb_done_slot[s] = 1'(t);
          end
        end
      end
      #1;
      if (bq_deq_valid) begin
        for (int c = 0; c < DEPTH; c++) begin snap_v[c] = bq_valid[c]; snap_e[c] = bq_entry[c]; end
        snap_pick = int'(bq_deq_idx);
        picked = bq_entry[bq_deq_idx];
        widx = 0;
        start_cycle = cycle_no;
      end
      if (wq_wr_valid) begin
        byte_ranges_t wb;
        warp_range_t  want;
        wb = warp_bytes(int'(picked.bid), widx);
        for (int a = 0; a < NUM_ARRAYS; a++) want[a] = ref_code(picked.range[a], line_rect(wb[a]));
        check(wq_wr_code == want, $sformatf("warp %0d code of block %0d", widx, picked.bid));
        check(int'(wq_wr_warp) == int'(dut.sel_slot) * WPB + widx, "warp slot");
        check(int'(warp_req_bid) == int'(picked.bid), "warp request block id");
        widx++;
      end
      if (launch_valid) begin
        automatic int rs = int'(launch_sm) * N_TB + int'(launch_slot);
        check(int'(launch_bid) == int'(picked.bid), "launched block is the picked one");
        check(!run_v[rs], "launch into a free slot");
        check(widx == int'(cfg_warps_per_block), "all warps written");
        // select (1) + warps + launch, after N_RUN scan cycles
        check(cycle_no - start_cycle == int'(cfg_warps_per_block) + 1, "warp phase length");
        check_decision(int'(launch_sm), snap_pick, launch_by_locality);
        n_launch++;
      end
      begin
        bit dq, lv;
        int dqi, rs;
        dq = bq_deq_valid; lv = launch_valid;
        dqi = int'(bq_deq_idx); rs = int'(launch_sm) * N_TB + int'(launch_slot);
        @(posedge clk);
        #1;
        if (dq) bq_valid[dqi] = 0;
        for (int s = 0; s < N_SM; s++)
          if (tb_done[s]) run_v[s * N_TB + int'(tb_done_slot[s])] = 0;
        if (lv) begin
          run_v[rs] = 1; run_r[rs] = picked.range; run_bid[rs] = int'(picked.bid);
        end
      end
      if (n_launch == 75) cfg_warps_per_block = 2'd1;
    end
    // scan length: from leaving IDLE to SELECT is N_RUN cycles
    begin
      int t0;
      // wait for an idle dispatcher with room and a queued block
      while (bq_hold || launch_valid) @(posedge clk);
      tb_done = '0;
      for (int s = 0; s < N_RUN; s++) run_v[s] = 0;
      @(posedge clk);
      #1;
      t0 = cycle_no;
      while (!bq_deq_valid) begin @(posedge clk); #1; end
      check(cycle_no - t0 <= N_RUN + 2 && cycle_no - t0 >= N_RUN, $sformatf("scan took %0d cycles", cycle_no - t0));
    end
    $display("decisions: by locality=%0d fallback=%0d", n_by_loc, n_fallback);
    check(n_by_loc > 0 && n_fallback > 0, "both decision paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
