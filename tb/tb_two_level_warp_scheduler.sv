// tb_two_level_warp_scheduler: a small scheduler (8 warps, 2 block slots,
// active group of 2) against a cycle-level reference model of the rules:
// starved warps first, then greedy re-issue of the last warp, then the ready
// active warp with most locality to the last one; demotion on a long stall;
// one promotion per cycle into free room, starved first, else the ready
// pending warp with the highest locality summed over the active group;
// starvation when a block's age lags the newest by more than 2*N_TB.
// A directed start checks the first promotions and greedy issue; random
// stimulus (readiness, long stalls, exits, launches, table values) then runs
// for several thousand cycles while every mechanism is counted.
module tb_two_level_warp_scheduler;
  import las_pkg::*;

  localparam int W = 8, N_TB = 2, ACTIVE = 2, WPB = W / N_TB;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] warp_valid = '0, warp_ready = '0;
  logic [LDT_W-1:0] ldt [W][W];
  logic long_stall_valid = 0;
  logic [2:0] long_stall_warp = 0;
  logic launch_valid = 0;
  logic [0:0] launch_slot = 0;
  logic issue_valid;
  logic [2:0] issue_warp;
  logic [W-1:0] active, starved;
  logic ev_greedy, ev_locality, ev_demote, ev_promote, ev_starve;
  int checks = 0, failures = 0;
  int n_greedy = 0, n_loc = 0, n_demote = 0, n_promote = 0, n_starve = 0;

  two_level_warp_scheduler #(.W(W), .N_TB(N_TB), .ACTIVE(ACTIVE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- reference model
  bit m_active [W];
  bit m_last_v;
  int m_last;
  int m_age [N_TB];
  int m_ctr, m_newest;

  function automatic bit m_starved(int w);
    return warp_valid[w] && (((m_newest - m_age[w / WPB]) & 8'hff) > 2 * N_TB);
  endfunction

  task automatic model_step(output bit iv, output int iw, output bit pv, output int pw,
                            output bit act_now [W]);
    int cnt, best, bs;
    bit found;
    for (int w = 0; w < W; w++)
      act_now[w] = m_active[w] && warp_valid[w] && !(long_stall_valid && long_stall_warp == 3'(w));
    // issue
    iv = 0; iw = 0;
    for (int w = 0; w < W; w++) if (act_now[w] && warp_ready[w]) iv = 1;
    found = 0;
    for (int w = 0; w < W && !found; w++)
      if (act_now[w] && warp_ready[w] && m_starved(w)) begin iw = w; found = 1; end
    if (!found && m_last_v && act_now[m_last] && warp_ready[m_last]) begin iw = m_last; found = 1; end
    if (!found) begin
      best = -1;
      for (int w = 0; w < W; w++)
        if (act_now[w] && warp_ready[w]) begin
          int l = m_last_v ? int'(ldt[m_last][w]) : 0;
          if (l > best) begin best = l; iw = w; end
        end
    end
    // promotion
    cnt = 0;
    for (int w = 0; w < W; w++) cnt += act_now[w];
    pv = 0; pw = 0;
    if (cnt < ACTIVE) begin
      found = 0;
      for (int p = 0; p < W && !found; p++)
        if (warp_valid[p] && !act_now[p] && warp_ready[p] &&
            !(long_stall_valid && long_stall_warp == 3'(p)) && m_starved(p)) begin
          pv = 1; pw = p; found = 1;
        end
      if (!found) begin
        bs = -1;
        for (int p = 0; p < W; p++)
          if (warp_valid[p] && !act_now[p] && warp_ready[p] &&
              !(long_stall_valid && long_stall_warp == 3'(p))) begin
            int s = 0;
            for (int a = 0; a < W; a++) if (act_now[a]) s += int'(ldt[p][a]);
            if (s > bs) begin bs = s; pw = p; pv = 1; end
          end
      end
    end
  endtask

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t %s", $time, msg); end
  endtask

  // compare one cycle, then advance model and DUT together
  task automatic cycle();
    bit iv, pv;
    int iw, pw;
    bit act_now [W];
    #1;
    model_step(iv, iw, pv, pw, act_now);
    check(issue_valid == iv, $sformatf("issue_valid %0d want %0d", issue_valid, iv));
    if (iv) check(int'(issue_warp) == iw, $sformatf("issue_warp %0d want %0d", issue_warp, iw));
    check(ev_promote == pv, $sformatf("promote %0d want %0d", ev_promote, pv));
    for (int w = 0; w < W; w++)
      check(active[w] == m_active[w], $sformatf("active[%0d]", w));
    n_greedy += ev_greedy; n_loc += ev_locality; n_demote += ev_demote;
    n_promote += ev_promote; n_starve += ev_starve;
    @(posedge clk);
    for (int w = 0; w < W; w++) m_active[w] = act_now[w];
    if (pv) m_active[pw] = 1;
    if (iv) begin m_last_v = 1; m_last = iw; end
    if (launch_valid) begin
      m_age[launch_slot] = m_ctr; m_newest = m_ctr; m_ctr = (m_ctr + 1) & 8'hff;
    end
    #1;
  endtask

  task automatic set_ldt(int i, int j, int v);
    ldt[i][j] = LDT_W'(v); ldt[j][i] = LDT_W'(v);
  endtask

  initial begin
    for (int i = 0; i < W; i++) begin
      m_active[i] = 0;
      for (int j = 0; j < W; j++) ldt[i][j] = '0;
    end
    m_last_v = 0; m_last = 0; m_ctr = 0; m_newest = 0;
    for (int t = 0; t < N_TB; t++) m_age[t] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // directed: warp 0 has most locality with warp 5, then with warp 3
    set_ldt(0, 5, 9); set_ldt(0, 3, 4); set_ldt(0, 1, 1); set_ldt(5, 3, 2);
    warp_valid = '1; warp_ready = '1;
    #1;
    check(ev_promote && active == '0, "first promotion from an empty group");
    cycle();                       // empty active group: lowest slot, warp 0
    #1;
    check(active == 8'b0000_0001, "warp 0 active");
    cycle();                       // warp 5 has most locality with {0}
    #1;
    check(active == 8'b0010_0001, "warps 0 and 5 active");
    check(issue_valid && issue_warp == 0 && ev_greedy, "greedy issue of warp 0");
    cycle();
    // short stall of warp 0: warp 5 (locality 9) issues
    warp_ready[0] = 0;
    #1;
    check(issue_warp == 5 && ev_locality, "locality pick after short stall");
    cycle();
    warp_ready[0] = 1;
    // long stall of warp 5: demoted, warp 3 (4 with warp 0) promoted same cycle
    long_stall_valid = 1; long_stall_warp = 5;
    warp_ready[5] = 0;
    #1;
    check(ev_demote && ev_promote, "demotion and promotion in one cycle");
    cycle();
    long_stall_valid = 0;
    #1;
    check(active == 8'b0000_1001, "warp 5 demoted, warp 3 promoted");
    cycle();
    // random phase
    for (int t = 0; t < 6000; t++) begin
      warp_ready = W'($urandom) | W'($urandom);
      long_stall_valid = ($urandom_range(0, 5) == 0);
      long_stall_warp = 3'($urandom_range(0, W - 1));
      launch_valid = ($urandom_range(0, 6) == 0);
      launch_slot = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 30) == 0) warp_valid[$urandom_range(0, W - 1)] = 1'b0;
      if ($urandom_range(0, 10) == 0) warp_valid[$urandom_range(0, W - 1)] = 1'b1;
      if ($urandom_range(0, 20) == 0) set_ldt($urandom_range(0, W - 1), $urandom_range(0, W - 1), $urandom_range(0, 20));
      for (int w = 0; w < W; w++) ldt[w][w] = '0;
      cycle();
    end
    $display("events: greedy=%0d locality=%0d demote=%0d promote=%0d starve=%0d",
             n_greedy, n_loc, n_demote, n_promote, n_starve);
    check(n_greedy > 0 && n_loc > 0 && n_demote > 0 && n_promote > 0 && n_starve > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
