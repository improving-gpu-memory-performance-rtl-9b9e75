// tb_las_top: the whole scheduler at its default size (15 SMs, 8 block slots
// and 48 warps per SM) running one kernel end to end.
//
// The kernel is a GX x GY grid of thread blocks with 6 warps each, touching
// two data arrays: array 0 row-major (block (bx,by) reads a 4-line wide strip
// of 6 rows, neighbouring blocks in x share one line) and array 1
// column-major (the transposed strip, so blocks of the same bx column share
// lines). Warp i of a block reads row i of the block's strip. The testbench
// acts as the kernel launcher (valid/ready into the block queue), as the
// address calculation (warp_addr answered from warp_req_*), and as every SM:
// each warp executes a number of instructions; an issued instruction may
// start an off-chip access (the warp is reported on long_stall and waits
// 40-90 cycles) or cause a 1-3 cycle short stall. Some blocks hold one very
// slow warp, so that younger blocks overtake them and the starvation rule
// fires. When every warp of a block slot has exited the SM reports the slot
// done.
//
// Checks: every block is launched exactly once and finishes; an issued warp
// is active, valid and ready; a launched block goes to a free slot; after a
// launch its warps are valid in that SM's warp queue; the locality degree
// table of a launched block's warps matches a reference computed from the
// reference warp codes; each mechanism (decision by locality, fallback
// decision, queue back-pressure, greedy issue, locality switch, demotion,
// promotion, starvation) happens at least once.
module tb_las_top;
  import las_pkg::*;

  localparam int N_SM = NUM_SM, N_TB = MAX_TB, W = MAX_WARPS, WPB = W / N_TB;
  localparam int GX = 16, GY = 30, NBLK = GX * GY;
  localparam int REG_SIDE = 1 << (COORD_W - REG_AXIS_W);
  localparam int SUB_LINES = REG_SIDE / SUB_SIDE;
  localparam int MAX_CYCLES = 400000;

  logic clk = 0, rst_n = 0;
  logic [3:0] cfg_warps_per_block = 4'(WPB);
  logic enq_valid = 0, enq_ready;
  logic [BID_W-1:0] enq_bid = '0;
  byte_ranges_t enq_addr;
  logic warp_req_valid;
  logic [BID_W-1:0] warp_req_bid;
  logic [2:0] warp_req_idx;
  byte_ranges_t warp_addr;
  logic launch_valid;
  logic [3:0] launch_sm;
  logic [2:0] launch_slot;
  logic [BID_W-1:0] launch_bid;
  logic launch_by_locality;
  logic [N_SM-1:0] tb_done = '0;
  logic [2:0] tb_done_slot [N_SM];
  logic [W-1:0] warp_ready [N_SM];
  logic [W-1:0] warp_exit [N_SM];
  logic [N_SM-1:0] long_stall_valid = '0;
  logic [5:0] long_stall_warp [N_SM];
  logic [N_SM-1:0] issue_valid;
  logic [5:0] issue_warp [N_SM];
  logic [W-1:0] warp_valid [N_SM];
  logic [W-1:0] active [N_SM];
  logic [W-1:0] starved [N_SM];
  logic [N_SM*N_TB-1:0] running_valid;
  logic [N_SM-1:0] ev_greedy, ev_locality, ev_demote, ev_promote, ev_starve;

  las_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle_no = 0;
  int n_loc_dec = 0, n_fallback = 0, n_backpressure = 0, n_greedy = 0, n_switch = 0;
  int n_demote = 0, n_promote = 0, n_starve = 0, n_issue = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s", cycle_no, msg);
    end
  endtask

  task automatic report();
    $display("cycles=%0d issues=%0d decisions: locality=%0d fallback=%0d backpressure=%0d",
             cycle_no, n_issue, n_loc_dec, n_fallback, n_backpressure);
    $display("warp events: greedy=%0d switch=%0d demote=%0d promote=%0d starve=%0d",
             n_greedy, n_switch, n_demote, n_promote, n_starve);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    report();
    $finish;
  end

  // ------------------------------------------------------------ the kernel
  function automatic byte_ranges_t blk_bytes(int b, int first_warp, int last_warp);
    byte_ranges_t r = '0;
    int bx = b % GX, by = b / GX;
    r[0].v = 1;
    r[0].first.x = BYTE_X_W'(bx * 384);
    r[0].first.y = COORD_W'(by * WPB + first_warp);
    r[0].last.x  = BYTE_X_W'(bx * 384 + 511);
    r[0].last.y  = COORD_W'(by * WPB + last_warp);
    r[1].v = 1;
    r[1].first.x = BYTE_X_W'(by * 384);
    r[1].first.y = COORD_W'(bx * WPB + first_warp);
    r[1].last.x  = BYTE_X_W'(by * 384 + 511);
    r[1].last.y  = COORD_W'(bx * WPB + last_warp);
    return r;
  endfunction

  always_comb warp_addr = blk_bytes(int'(warp_req_bid), int'(warp_req_idx), int'(warp_req_idx));

  function automatic rect_t line_rect(byte_range_t r);
    rect_t o;
    o.v = r.v;
    o.x = COORD_W'(r.first.x / 128);
    o.dx = COORD_W'(r.last.x / 128 - r.first.x / 128);
    o.y = r.first.y;
    o.dy = r.last.y - r.first.y;
    return o;
  endfunction

  function automatic warp_range_t ref_code(int b, int i);
    warp_range_t c = '0;
    byte_ranges_t bb = blk_bytes(b, 0, WPB - 1), wb = blk_bytes(b, i, i);
    for (int a = 0; a < NUM_ARRAYS; a++) begin
      rect_t blk = line_rect(bb[a]), wr = line_rect(wb[a]);
      int rx = int'(blk.x) / REG_SIDE, ry = int'(blk.y) / REG_SIDE;
      if (!blk.v) continue;
      c[a].region = REGION_BITS'(ry * (1 << REG_AXIS_W) + rx);
      for (int y = int'(wr.y); y <= int'(wr.y) + int'(wr.dy); y++)
        for (int x = int'(wr.x); x <= int'(wr.x) + int'(wr.dx); x++)
          if (x / REG_SIDE == rx && y / REG_SIDE == ry)
            c[a].sub[SUB_BITS - 1 - (((y % REG_SIDE) / SUB_LINES) * SUB_SIDE + (x % REG_SIDE) / SUB_LINES)] = 1'b1;
    end
    return c;
  endfunction

  function automatic int ref_loc(warp_range_t p, warp_range_t q);
    int n = 0;
    for (int a = 0; a < NUM_ARRAYS; a++)
      if (p[a].region == q[a].region)
        for (int k = 0; k < SUB_BITS; k++)
          if (p[a].sub[k] && q[a].sub[k]) n++;
    return n;
  endfunction

  // ------------------------------------------------------------- SM models
  int  w_left  [N_SM][W];   // instructions left
  int  w_wait  [N_SM][W];   // cycles until ready again
  bit  w_live  [N_SM][W];
  int  w_bid   [N_SM][W];
  bit  pend_ls [N_SM];
  int  pend_ls_w [N_SM];
  bit  slot_busy [N_SM][N_TB];
  int  launched [NBLK], finished [NBLK];
  int  n_done = 0, next_enq = 0;

  // pending SM-side updates taken from one cycle's outputs
  bit  c_launch;
  int  c_lsm, c_lslot, c_lbid;

  initial begin
    for (int s = 0; s < N_SM; s++) begin
      warp_exit[s] = '0; warp_ready[s] = '0; long_stall_warp[s] = '0; tb_done_slot[s] = '0;
      pend_ls[s] = 0;
      for (int t = 0; t < N_TB; t++) slot_busy[s][t] = 0;
      for (int w = 0; w < W; w++) begin w_live[s][w] = 0; w_left[s][w] = 0; w_wait[s][w] = 0; end
    end
    for (int b = 0; b < NBLK; b++) begin launched[b] = 0; finished[b] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    while (n_done < NBLK) begin
      // ---- drive inputs (one time unit after the edge)
      enq_valid = (next_enq < NBLK);
      enq_bid   = BID_W'(next_enq);
      enq_addr  = blk_bytes(next_enq, 0, WPB - 1);
      tb_done = '0;
      for (int s = 0; s < N_SM; s++) begin
        warp_exit[s] = '0;
        long_stall_valid[s] = pend_ls[s];
        long_stall_warp[s]  = 6'(pend_ls_w[s]);
        pend_ls[s] = 0;
        for (int w = 0; w < W; w++) begin
          if (w_live[s][w] && w_left[s][w] == 0 && w_wait[s][w] == 0) begin
            warp_exit[s][w] = 1'b1;
            w_live[s][w] = 0;
          end
          warp_ready[s][w] = w_live[s][w] && w_left[s][w] > 0 && w_wait[s][w] == 0;
        end
        for (int t = 0; t < N_TB && !tb_done[s]; t++) begin
          automatic bit any = 0;
          for (int w = t * WPB; w < (t + 1) * WPB; w++) any |= w_live[s][w] | warp_valid[s][w];
          if (slot_busy[s][t] && !any) begin
            tb_done[s] = 1; tb_done_slot[s] = 3'(t); slot_busy[s][t] = 0;
            finished[w_bid[s][t * WPB]]++;
            n_done++;
          end
        end
      end
      #1;
      // ---- sample outputs
      if (enq_valid && !enq_ready) n_backpressure++;
      c_launch = launch_valid;
      if (launch_valid) begin
        c_lsm = int'(launch_sm); c_lslot = int'(launch_slot); c_lbid = int'(launch_bid);
        check(!slot_busy[c_lsm][c_lslot], "launch into a busy slot");
        check(c_lbid < next_enq + 1, "launched block was enqueued");
        launched[c_lbid]++;
        if (launch_by_locality) n_loc_dec++; else n_fallback++;
        // warps already written: valid, and their table entries match
        for (int i = 0; i < WPB; i++) begin
          automatic int wi = c_lslot * WPB + i;
          check(warp_valid[c_lsm][wi], "warp of launched block valid");
          for (int j = 0; j < WPB; j++)
            if (i != j)
              check(int'(ldt_of(c_lsm, wi, c_lslot * WPB + j)) == ref_loc(ref_code(c_lbid, i), ref_code(c_lbid, j)),
                    $sformatf("ldt of block %0d warps %0d,%0d", c_lbid, i, j));
        end
      end
      for (int s = 0; s < N_SM; s++) begin
        n_greedy += ev_greedy[s]; n_switch += ev_locality[s]; n_demote += ev_demote[s];
        n_promote += ev_promote[s]; n_starve += ev_starve[s];
        if (issue_valid[s]) begin
          automatic int w = int'(issue_warp[s]);
          n_issue++;
          check(active[s][w] && warp_valid[s][w] && warp_ready[s][w], "issued warp active, valid, ready");
          // the SM executes the instruction
          w_left[s][w]--;
          if (w_left[s][w] > 0) begin
            automatic int r = $urandom_range(0, 99);
            if (r < 12 || (w_bid[s][w] % 7 == 3 && w % WPB == 0)) begin
              w_wait[s][w] = $urandom_range(40, 90);
              pend_ls[s] = 1; pend_ls_w[s] = w;
            end else if (r < 25) begin
              w_wait[s][w] = $urandom_range(1, 3);
            end
          end
        end
      end
      // ---- clock edge
      @(posedge clk);
      cycle_no++;
      #1;
      if (enq_valid && enq_ready) next_enq++;
      for (int s = 0; s < N_SM; s++)
        for (int w = 0; w < W; w++)
          if (w_wait[s][w] > 0) w_wait[s][w]--;
      if (c_launch) begin
        slot_busy[c_lsm][c_lslot] = 1;
        for (int i = 0; i < WPB; i++) begin
          automatic int wi = c_lslot * WPB + i;
          w_live[c_lsm][wi] = 1;
          w_bid[c_lsm][wi] = c_lbid;
          w_wait[c_lsm][wi] = 0;
          w_left[c_lsm][wi] = (c_lbid % 7 == 3 && i == 0) ? 600 : $urandom_range(20, 50);
        end
      end
    end
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (launched[b] != 1 || finished[b] != 1) begin
        failures++;
        if (failures < 20) $display("FAIL block %0d launched %0d finished %0d", b, launched[b], finished[b]);
      end
    end
    check(running_valid == '0, "no block left running");
    check(n_loc_dec > 0, "decision by locality happened");
    check(n_fallback > 0, "fallback decision happened");
    check(n_backpressure > 0, "block queue back-pressure happened");
    check(n_greedy > 0, "greedy issue happened");
    check(n_switch > 0, "locality switch happened");
    check(n_demote > 0, "demotion happened");
    check(n_promote > 0, "promotion happened");
    check(n_starve > 0, "starvation priority happened");
    report();
    $finish;
  end

  // locality degree table entry of SM s, read through the hierarchy
  function automatic int ldt_of(int s, int i, int j);
    int v = 0;
    case (s)
      0:  v = int'(dut.g_sm[0].ldt[i][j]);
      1:  v = int'(dut.g_sm[1].ldt[i][j]);
      2:  v = int'(dut.g_sm[2].ldt[i][j]);
      3:  v = int'(dut.g_sm[3].ldt[i][j]);
      4:  v = int'(dut.g_sm[4].ldt[i][j]);
      5:  v = int'(dut.g_sm[5].ldt[i][j]);
      6:  v = int'(dut.g_sm[6].ldt[i][j]);
      7:  v = int'(dut.g_sm[7].ldt[i][j]);
      8:  v = int'(dut.g_sm[8].ldt[i][j]);
      9:  v = int'(dut.g_sm[9].ldt[i][j]);
      10: v = int'(dut.g_sm[10].ldt[i][j]);
      11: v = int'(dut.g_sm[11].ldt[i][j]);
      12: v = int'(dut.g_sm[12].ldt[i][j]);
      13: v = int'(dut.g_sm[13].ldt[i][j]);
      default: v = int'(dut.g_sm[14].ldt[i][j]);
    endcase
    return v;
  endfunction
endmodule
