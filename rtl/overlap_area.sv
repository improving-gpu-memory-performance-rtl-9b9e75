// overlap_area: number of cache lines shared by two access-range rectangles
// on one data array.
//
// Following the thesis, the distance between the two upper-left corners is
// taken on each axis; if it exceeds the extent of the rectangle that starts
// first, the two do not overlap, otherwise the overlap is the product of the
// remaining widths. The remaining width on an axis is computed as
// min(end_a, end_b) - max(start_a, start_b) + 1, which is the thesis formula
// (width - distance) for two rectangles of equal size and also stays correct
// when one rectangle is smaller than the other (this design's
// generalisation). The rectangles are inclusive: extent dx covers dx+1 lines.
// A rectangle whose valid bit is clear shares nothing.
//
// Purely combinational.
module overlap_area
  import las_pkg::*;
(
  input  rect_t             a,
  input  rect_t             b,
  output logic [AREA_W-1:0] area
);

  logic [COORD_W:0] a_end_x, a_end_y, b_end_x, b_end_y;
  logic [COORD_W:0] lo_x, lo_y, hi_x, hi_y;
  logic [COORD_W:0] ov_x, ov_y;

  always_comb begin
    a_end_x = {1'b0, a.x} + {1'b0, a.dx};
    a_end_y = {1'b0, a.y} + {1'b0, a.dy};
    b_end_x = {1'b0, b.x} + {1'b0, b.dx};
    b_end_y = {1'b0, b.y} + {1'b0, b.dy};
    lo_x = (a.x > b.x) ? {1'b0, a.x} : {1'b0, b.x};
    lo_y = (a.y > b.y) ? {1'b0, a.y} : {1'b0, b.y};
    hi_x = (a_end_x < b_end_x) ? a_end_x : b_end_x;
    hi_y = (a_end_y < b_end_y) ? a_end_y : b_end_y;
    ov_x = (hi_x >= lo_x) ? hi_x - lo_x + 1'b1 : '0;
    ov_y = (hi_y >= lo_y) ? hi_y - lo_y + 1'b1 : '0;
    if (a.v && b.v)
      area = AREA_W'(ov_x) * AREA_W'(ov_y);
    else
      area = '0;
  end

endmodule
