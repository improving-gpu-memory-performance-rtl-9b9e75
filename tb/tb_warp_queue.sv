// tb_warp_queue: random warp codes are written into random slots; after
// every write the whole locality degree table is compared with a reference
// computed from the tb's own copy of the codes (region equal -> count of
// common sub-region bits, summed over arrays; zero for invalid warps and on
// the diagonal). Warp exits are mixed in.
module tb_warp_queue;
  import las_pkg::*;

  localparam int W = 12;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0;
  logic [3:0] wr_warp = 0;
  warp_range_t wr_code;
  logic [W-1:0] warp_exit = '0, warp_valid;
  warp_range_t code [W];
  logic [LDT_W-1:0] ldt [W][W];
  int checks = 0, failures = 0;

  warp_range_t m_code [W];
  bit          m_valid [W];

  warp_queue #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_loc(warp_range_t p, warp_range_t q);
    int n = 0;
    for (int i = 0; i < NUM_ARRAYS; i++)
      if (p[i].region == q[i].region)
        for (int k = 0; k < SUB_BITS; k++)
          if (p[i].sub[k] && q[i].sub[k]) n++;
    return n;
  endfunction

  task automatic compare_table();
    int want;
    for (int i = 0; i < W; i++) begin
      checks++;
      if (warp_valid[i] != m_valid[i]) begin failures++; $display("FAIL valid %0d", i); end
      for (int j = 0; j < W; j++) begin
        want = (i != j && m_valid[i] && m_valid[j]) ? ref_loc(m_code[i], m_code[j]) : 0;
        checks++;
        if (int'(ldt[i][j]) != want) begin
          failures++;
          $display("FAIL ldt[%0d][%0d] = %0d want %0d", i, j, ldt[i][j], want);
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < W; i++) m_valid[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare_table();
    for (int t = 0; t < 300; t++) begin
      if ($urandom_range(0, 4) == 0) begin
        automatic int k = $urandom_range(0, W - 1);
        warp_exit = '0; warp_exit[k] = 1'b1;
        @(posedge clk); #1; warp_exit = '0;
        m_valid[k] = 0;
      end else begin
        automatic int k = $urandom_range(0, W - 1);
        for (int a = 0; a < NUM_ARRAYS; a++) begin
          wr_code[a].region = REGION_BITS'($urandom_range(0, 1));
          wr_code[a].sub    = SUB_BITS'($urandom);
        end
        wr_warp = 4'(k); wr_valid = 1;
        @(posedge clk); #1; wr_valid = 0;
        m_code[k] = wr_code; m_valid[k] = 1;
      end
      compare_table();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
