// tb_line_range_calc: random first/last thread byte coordinates are turned
// into cache-line rectangles and compared with a reference that divides by
// the line size and orders the corners. Includes the documented mapping of
// bytes 0..127 of a row to line 0 and 128..255 to line 1.
module tb_line_range_calc;
  import las_pkg::*;

  byte_range_t in_range;
  rect_t       out_rect;
  int checks = 0, failures = 0;

  line_range_calc dut (.in_range, .out_rect);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int fx, fy, lx, ly, input bit v);
    int ex, ey, edx, edy, a, b;
    in_range.v = v;
    in_range.first.x = BYTE_X_W'(fx);
    in_range.first.y = COORD_W'(fy);
    in_range.last.x  = BYTE_X_W'(lx);
    in_range.last.y  = COORD_W'(ly);
    #1;
    a = fx / 128; b = lx / 128;
    ex  = (a < b) ? a : b;
    edx = (a < b) ? b - a : a - b;
    ey  = (fy < ly) ? fy : ly;
    edy = (fy < ly) ? ly - fy : fy - ly;
    checks++;
    if (out_rect.v !== v || int'(out_rect.x) != ex || int'(out_rect.y) != ey ||
        int'(out_rect.dx) != edx || int'(out_rect.dy) != edy) begin
      failures++;
      $display("FAIL (%0d,%0d)-(%0d,%0d): got x=%0d y=%0d dx=%0d dy=%0d, want %0d %0d %0d %0d",
               fx, fy, lx, ly, out_rect.x, out_rect.y, out_rect.dx, out_rect.dy, ex, ey, edx, edy);
    end
  endtask

  initial begin
    // bytes (0,0)..(127,0) -> line (0,0); (128,2)..(255,2) -> line (1,2)
    check(0, 0, 127, 0, 1);
    if (out_rect.dx != 0) begin failures++; $display("FAIL: 0..127 not one line"); end
    check(128, 2, 255, 2, 1);
    if (out_rect.x != 1 || out_rect.y != 2) begin failures++; $display("FAIL: (128,2)"); end
    check(127, 0, 128, 0, 1);
    check(300, 9, 4000, 40, 1);
    check(4000, 40, 300, 9, 1);
    for (int i = 0; i < 2000; i++)
      check($urandom_range(0, 32767), $urandom_range(0, 255),
            $urandom_range(0, 32767), $urandom_range(0, 255), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
