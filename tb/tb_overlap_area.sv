// tb_overlap_area: overlap of two line rectangles against a brute-force count
// of the lines lying in both, plus the (width - distance) products of the
// equal-size case.
module tb_overlap_area;
  import las_pkg::*;

  rect_t a, b;
  logic [AREA_W-1:0] area;
  int checks = 0, failures = 0;

  overlap_area dut (.a, .b, .area);

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

  task automatic run(input rect_t p, input rect_t q, input int want);
    a = p; b = q;
    #1;
    checks++;
    if (int'(area) != want) begin
      failures++;
      $display("FAIL a=(%0d,%0d,+%0d,+%0d) b=(%0d,%0d,+%0d,+%0d): got %0d want %0d",
               p.x, p.y, p.dx, p.dy, q.x, q.y, q.dx, q.dy, area, want);
    end
  endtask

  initial begin
    rect_t p, q;
    // equal-size rectangles 4x4 lines, distance (1,2): (4-1)*(4-2) = 6
    p = '{v:1, x:10, y:10, dx:3, dy:3};
    q = '{v:1, x:11, y:12, dx:3, dy:3};
    run(p, q, 6);
    run(q, p, 6);
    // distance equal to the width: no overlap
    q = '{v:1, x:14, y:10, dx:3, dy:3};
    run(p, q, 0);
    // far corner of the address space
    p = '{v:1, x:200, y:250, dx:55, dy:5};
    q = '{v:1, x:255, y:255, dx:0, dy:0};
    run(p, q, 1);
    // unused array
    p.v = 0;
    run(p, p, 0);
    for (int i = 0; i < 3000; i++) begin
      p.v = ($urandom_range(0, 9) != 0); q.v = ($urandom_range(0, 9) != 0);
      p.x = COORD_W'($urandom_range(0, 63)); p.y = COORD_W'($urandom_range(0, 63));
      q.x = COORD_W'($urandom_range(0, 63)); q.y = COORD_W'($urandom_range(0, 63));
      p.dx = COORD_W'($urandom_range(0, 20)); p.dy = COORD_W'($urandom_range(0, 20));
      q.dx = COORD_W'($urandom_range(0, 20)); q.dy = COORD_W'($urandom_range(0, 20));
      run(p, q, brute(p, q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
