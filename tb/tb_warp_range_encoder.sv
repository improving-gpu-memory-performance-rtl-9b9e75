// tb_warp_range_encoder: the hierarchical code of random warps is compared
// with a reference that walks every line of the warp's rectangle, keeps the
// lines inside the block's region (8x8 lines with the default sizes) and
// sets the bit of the 2x2-line sub-region each falls in (MSB = upper left).
module tb_warp_range_encoder;
  import las_pkg::*;

  localparam int REG_SIDE = 1 << (COORD_W - REG_AXIS_W);   // lines per region side
  localparam int SUB_LINES = REG_SIDE / SUB_SIDE;          // lines per sub-region side

  block_range_t blk_range, warp_rect;
  warp_range_t  code;
  int checks = 0, failures = 0;

  warp_range_encoder dut (.blk_range, .warp_rect, .code);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic warp_code_t ref_code(rect_t blk, rect_t wr);
    warp_code_t c;
    int rx, ry;
    c = '0;
    if (!blk.v) return c;
    rx = int'(blk.x) / REG_SIDE;
    ry = int'(blk.y) / REG_SIDE;
    c.region = REGION_BITS'(ry * (1 << REG_AXIS_W) + rx);
    if (!wr.v) return c;
    for (int y = int'(wr.y); y <= int'(wr.y) + int'(wr.dy); y++)
      for (int x = int'(wr.x); x <= int'(wr.x) + int'(wr.dx); x++)
        if (x / REG_SIDE == rx && y / REG_SIDE == ry)
          c.sub[SUB_BITS - 1 - (((y % REG_SIDE) / SUB_LINES) * SUB_SIDE + (x % REG_SIDE) / SUB_LINES)] = 1'b1;
    return c;
  endfunction

  task automatic compare(string tag);
    warp_code_t w;
    #1;
    for (int a = 0; a < NUM_ARRAYS; a++) begin
      w = ref_code(blk_range[a], warp_rect[a]);
      checks++;
      if (code[a] != w) begin
        failures++;
        $display("FAIL %s array %0d: got %h-%h want %h-%h", tag, a,
                 code[a].region, code[a].sub, w.region, w.sub);
      end
    end
  endtask

  initial begin
    // region of row 2, column 3 on a 32x32 grid: index 67; a warp on the
    // upper-left and lower-right sub-regions only touches bits 15 and 0
    for (int a = 0; a < NUM_ARRAYS; a++) begin
      blk_range[a] = '{v:1, x:24, y:16, dx:7, dy:7};
      warp_rect[a] = '{v:1, x:24, y:16, dx:1, dy:1};
    end
    warp_rect[1] = '{v:1, x:30, y:22, dx:1, dy:1};
    #1;
    checks++;
    if (code[0].region != 10'd67 || code[0].sub != 16'h8000 || code[1].sub != 16'h0001) begin
      failures++;
      $display("FAIL directed: %h %h %h", code[0].region, code[0].sub, code[1].sub);
    end
    compare("directed");
    for (int t = 0; t < 1500; t++) begin
      for (int a = 0; a < NUM_ARRAYS; a++) begin
        blk_range[a].v  = ($urandom_range(0, 5) != 0);
        blk_range[a].x  = COORD_W'($urandom_range(0, 255));
        blk_range[a].y  = COORD_W'($urandom_range(0, 255));
        blk_range[a].dx = COORD_W'($urandom_range(0, 15));
        blk_range[a].dy = COORD_W'($urandom_range(0, 15));
        warp_rect[a].v  = ($urandom_range(0, 5) != 0);
        warp_rect[a].x  = COORD_W'(int'(blk_range[a].x) - 4 + $urandom_range(0, 12));
        warp_rect[a].y  = COORD_W'(int'(blk_range[a].y) - 4 + $urandom_range(0, 12));
        warp_rect[a].dx = COORD_W'($urandom_range(0, 9));
        warp_rect[a].dy = COORD_W'($urandom_range(0, 9));
        if (int'(warp_rect[a].x) + int'(warp_rect[a].dx) > 255) warp_rect[a].dx = 0;
        if (int'(warp_rect[a].y) + int'(warp_rect[a].dy) > 255) warp_rect[a].dy = 0;
      end
      compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
