// tb_block_queue: fills the queue, checks that it refuses blocks when full
// and while held, removes blocks from chosen slots and checks that new
// blocks go to the lowest free slot with their contents intact.
module tb_block_queue;
  import las_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 0, rst_n = 0;
  logic enq_valid = 0, enq_ready, hold = 0, deq_valid = 0;
  bq_entry_t enq_entry;
  logic [DEPTH-1:0] slot_valid;
  bq_entry_t slot_entry [DEPTH];
  logic [1:0] deq_idx = 0;
  int checks = 0, failures = 0;
  bq_entry_t model [DEPTH];
  bit        model_v [DEPTH];

  block_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic bq_entry_t mk(int id);
    bq_entry_t e;
    e.bid = BID_W'(id);
    for (int a = 0; a < NUM_ARRAYS; a++)
      e.range[a] = '{v:1, x:COORD_W'(id + a), y:COORD_W'(id * 3), dx:COORD_W'(a), dy:1};
    return e;
  endfunction

  // push one block; returns whether it was taken
  task automatic push(int id, output bit taken);
    enq_entry = mk(id);
    enq_valid = 1;
    #1;
    taken = enq_ready;
    @(posedge clk); #1;
    enq_valid = 0;
  endtask

  task automatic compare_all();
    for (int i = 0; i < DEPTH; i++) begin
      check(slot_valid[i] == model_v[i], $sformatf("slot %0d valid", i));
      if (model_v[i]) check(slot_entry[i] == model[i], $sformatf("slot %0d entry", i));
    end
  endtask

  initial begin
    bit t;
    for (int i = 0; i < DEPTH; i++) model_v[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(slot_valid == '0, "empty after reset");
    for (int i = 0; i < DEPTH; i++) begin
      push(10 + i, t);
      check(t, "taken while not full");
      model[i] = mk(10 + i); model_v[i] = 1;
    end
    compare_all();
    push(99, t);
    check(!t, "refused when full");
    compare_all();
    // remove slot 2 and slot 0
    deq_idx = 2; deq_valid = 1; @(posedge clk); #1;
    deq_idx = 0; @(posedge clk); #1; deq_valid = 0;
    model_v[2] = 0; model_v[0] = 0;
    compare_all();
    hold = 1;
    push(50, t);
    check(!t, "refused while held");
    hold = 0;
    push(51, t);
    check(t, "taken after hold");
    model[0] = mk(51); model_v[0] = 1;
    compare_all();
    // removal and write in the same cycle
    enq_entry = mk(52); enq_valid = 1; deq_idx = 1; deq_valid = 1;
    @(posedge clk); #1; enq_valid = 0; deq_valid = 0;
    model[2] = mk(52); model_v[2] = 1; model_v[1] = 0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
