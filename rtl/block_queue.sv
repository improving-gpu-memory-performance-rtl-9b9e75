// block_queue: thread blocks of the running kernel that wait to be
// dispatched, each entry extended with the block's access-range rectangle on
// every data array.
//
// The queue is a set of DEPTH slots rather than a FIFO, because the
// dispatcher may pick any waiting block. All slots are visible to the
// dispatcher at once. A new block is written into the lowest free slot; the
// dispatcher removes a block by naming its slot. While `hold` is high the
// queue takes no new blocks, so that the candidate set does not change while
// the dispatcher evaluates it.
//
// Timing: a write (enq_valid && enq_ready) and a removal (deq_valid) take
// effect at the next rising clock edge and may happen in the same cycle.
// Reset (active low, synchronous) empties the queue. The thesis gives the
// entry contents; the depth, slot organisation and handshake are this
// design's own.
module block_queue
  import las_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // new blocks
  input  logic                     enq_valid,
  output logic                     enq_ready,
  input  bq_entry_t                enq_entry,
  input  logic                     hold,
  // dispatcher view
  output logic      [DEPTH-1:0]    slot_valid,
  output bq_entry_t                slot_entry [DEPTH],
  input  logic                     deq_valid,
  input  logic [$clog2(DEPTH)-1:0] deq_idx
);

  logic [$clog2(DEPTH)-1:0] free_idx;
  logic                     has_free;

  always_comb begin
    has_free = 1'b0;
    free_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (!slot_valid[i]) begin
        has_free = 1'b1;
        free_idx = i[$clog2(DEPTH)-1:0];
      end
  end

  assign enq_ready = has_free && !hold;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_valid <= '0;
    end else begin
      if (deq_valid)
        slot_valid[deq_idx] <= 1'b0;
      if (enq_valid && enq_ready)
        slot_valid[free_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (enq_valid && enq_ready)
      slot_entry[free_idx] <= enq_entry;
  end

  // The dispatcher only removes a waiting block.
  assert property (@(posedge clk) disable iff (!rst_n) deq_valid |-> slot_valid[deq_idx])
    else $error("block_queue: removal of an empty slot");

endmodule
