// tb_inter_block_locality: locality of two blocks over all data arrays
// against the per-array brute-force count of shared lines, summed.
module tb_inter_block_locality;
  import las_pkg::*;

  block_range_t a, b;
  logic [BLOC_W-1:0] locality;
  int checks = 0, failures = 0;

  inter_block_locality dut (.a, .b, .locality);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int brute(rect_t p, rect_t q);
    int n = 0;
    if (!(p.v && q.v)) return 0;
    for (int y = int'(p.y); y <= int'(p.y) + int'(p.dy); y++)
      for (int x = int'(p.x); x <= int'(p.x) + int'(p.dx); x++)
        if (x >= int'(q.x) && x <= int'(q.x) + int'(q.dx) &&
            y >= int'(q.y) && y <= int'(q.y) + int'(q.dy))
          n++;
    return n;
  endfunction

  function automatic rect_t rnd_rect();
    rect_t r;
    r.v  = ($urandom_range(0, 4) != 0);
    r.x  = COORD_W'($urandom_range(0, 40));
    r.y  = COORD_W'($urandom_range(0, 40));
    r.dx = COORD_W'($urandom_range(0, 15));
    r.dy = COORD_W'($urandom_range(0, 15));
    return r;
  endfunction

  initial begin
    int want;
    // row-major neighbours: two 1-D blocks sharing their boundary line on
    // every array give NUM_ARRAYS shared lines
    for (int i = 0; i < NUM_ARRAYS; i++) begin
      a[i] = '{v:1, x:0, y:0, dx:2, dy:0};
      b[i] = '{v:1, x:2, y:0, dx:2, dy:0};
    end
    #1;
    checks++;
    if (int'(locality) != NUM_ARRAYS) begin failures++; $display("FAIL boundary: %0d", locality); end
    for (int t = 0; t < 1000; t++) begin
      want = 0;
      for (int i = 0; i < NUM_ARRAYS; i++) begin
        a[i] = rnd_rect();
        b[i] = rnd_rect();
        want += brute(a[i], b[i]);
      end
      #1;
      checks++;
      if (int'(locality) != want) begin
        failures++;
        $display("FAIL t=%0d: got %0d want %0d", t, locality, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
