// warp_range_encoder: hierarchical encoding of a warp's access range on every
// data array of the kernel.
//
// Step 1 (block level): the array's line grid is cut into 2^REGION_BITS
// regions, 2^(REGION_BITS/2) per axis. The region holding the upper-left
// corner of the thread block's rectangle gives the REGION_BITS-bit region
// vector, numbered row by row (region = row * regions_per_row + column), so a
// 4x4 grid puts row 2, column 3 at region 11 (1011).
// Step 2 (warp level): that region is cut into SUB_BITS sub-regions, a
// SUB_SIDE x SUB_SIDE grid. A sub-region's bit is set when the warp's
// rectangle touches it; the most significant bit is the upper-left
// sub-region, so upper-left plus lower-right of a 2x2 grid reads 1001.
// Parts of the warp's rectangle outside the block's region are not encoded.
// The region size is fixed by the line coordinate width: each axis of
// 2^COORD_W lines gives 2^REG_AXIS_W regions of 2^(COORD_W-REG_AXIS_W) lines.
// An array that the kernel does not use gets an all-zero code.
//
// Purely combinational.
module warp_range_encoder
  import las_pkg::*;
(
  input  block_range_t blk_range,   // rectangles of the warp's thread block
  input  block_range_t warp_rect,   // rectangles of the warp itself
  output warp_range_t  code
);


  always_comb begin
    for (int a = 0; a < NUM_ARRAYS; a++) begin
      logic [REG_AXIS_W-1:0] rx, ry;
      logic [COORD_W:0]      wx0, wy0, wx1, wy1;
      logic [COORD_W:0]      sx0, sy0, sx1, sy1;
      rx = blk_range[a].x[COORD_W-1 -: REG_AXIS_W];
      ry = blk_range[a].y[COORD_W-1 -: REG_AXIS_W];
      wx0 = {1'b0, warp_rect[a].x};
      wy0 = {1'b0, warp_rect[a].y};
      wx1 = {1'b0, warp_rect[a].x} + {1'b0, warp_rect[a].dx};
      wy1 = {1'b0, warp_rect[a].y} + {1'b0, warp_rect[a].dy};
      code[a].region = blk_range[a].v ? {ry, rx} : '0;
      code[a].sub    = '0;
      for (int sy = 0; sy < SUB_SIDE; sy++) begin
        for (int sx = 0; sx < SUB_SIDE; sx++) begin
          // sub-region bounds in line coordinates (inclusive)
          sx0 = (COORD_W+1)'({rx, SUB_AXIS_W'(sx)}) << SUB_SHIFT;
          sy0 = (COORD_W+1)'({ry, SUB_AXIS_W'(sy)}) << SUB_SHIFT;
          sx1 = sx0 + (COORD_W+1)'((1 << SUB_SHIFT) - 1);
          sy1 = sy0 + (COORD_W+1)'((1 << SUB_SHIFT) - 1);
          if (blk_range[a].v && warp_rect[a].v &&
              wx0 <= sx1 && wx1 >= sx0 && wy0 <= sy1 && wy1 >= sy0)
            code[a].sub[SUB_BITS-1-(sy*SUB_SIDE+sx)] = 1'b1;
        end
      end
    end
  end

endmodule
