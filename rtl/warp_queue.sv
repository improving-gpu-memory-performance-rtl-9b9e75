// warp_queue: per-SM store of the running warps' hierarchical access-range
// codes and the locality degree table computed from them.
//
// The table holds one LDT_W-bit entry for every unordered pair of warp slots
// (W*(W-1)/2 entries, the upper triangle), the inter-warp locality of the two
// warps. When the dispatcher writes the code of warp k, the locality of the
// new code against the codes of all other valid warps is computed in
// parallel by W inter_warp_locality units, and all entries of row/column k
// are rewritten in the same cycle (entries against invalid warps become 0).
// A warp that exits clears its valid bit; its table entries are then masked
// to 0 on the read side until the slot is written again.
//
// The full table is presented as a W x W matrix (`ldt`, zero diagonal,
// symmetric), read combinationally by the warp scheduler.
//
// Timing: write and exit take effect at the next rising edge. A write has
// priority over an exit of the same slot. Reset (synchronous, active low)
// invalidates every slot. The thesis gives the table, its contents and its
// entry size; computing a whole row in one cycle is this design's choice.
module warp_queue
  import las_pkg::*;
#(
  parameter int unsigned W      = MAX_WARPS,
  localparam int unsigned WID_W = $clog2(W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  logic [WID_W-1:0]  wr_warp,
  input  warp_range_t       wr_code,
  input  logic [W-1:0]      warp_exit,
  output logic [W-1:0]      warp_valid,
  output warp_range_t       code [W],
  output logic [LDT_W-1:0]  ldt [W][W]
);

  localparam int unsigned N_PAIRS = W * (W - 1) / 2;

  // index of the pair (i, j), i < j, in the upper triangle
  function automatic int unsigned pair_idx(int unsigned i, int unsigned j);
    return i * W - (i * (i + 1)) / 2 + (j - i - 1);
  endfunction

  logic [LDT_W-1:0] tri_mem [N_PAIRS];
  logic [LDT_W-1:0] new_loc [W];

  for (genvar j = 0; j < W; j++) begin : g_loc
    inter_warp_locality u_iwl (.a(wr_code), .b(code[j]), .locality(new_loc[j]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      warp_valid <= '0;
    end else begin
      warp_valid <= warp_valid & ~warp_exit;
      if (wr_valid)
        warp_valid[wr_warp] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid)
      code[wr_warp] <= wr_code;
  end

  for (genvar i = 0; i < W; i++) begin : g_row
    for (genvar j = i + 1; j < W; j++) begin : g_col
      always_ff @(posedge clk) begin
        if (!rst_n)
          tri_mem[pair_idx(i, j)] <= '0;
        else if (wr_valid && wr_warp == WID_W'(i))
          tri_mem[pair_idx(i, j)] <= warp_valid[j] ? new_loc[j] : '0;
        else if (wr_valid && wr_warp == WID_W'(j))
          tri_mem[pair_idx(i, j)] <= warp_valid[i] ? new_loc[i] : '0;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++)
        if (i == j || !warp_valid[i] || !warp_valid[j])
          ldt[i][j] = '0;
        else if (i < j)
          ldt[i][j] = tri_mem[pair_idx(i, j)];
        else
          ldt[i][j] = tri_mem[pair_idx(j, i)];
  end

endmodule
