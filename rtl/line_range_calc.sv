// line_range_calc: access range of a thread block (or a warp) on one data
// array, in cache-line coordinates.
//
// The inputs are the byte coordinates touched by the first and the last
// thread of the group, as produced by running the kernel's address
// calculation code for those two threads. A byte column x maps to the line
// column x / LINE_BYTES (bytes 0..127 of a row are line 0, 128..255 line 1);
// the row is kept. The rectangle's upper-left point is the smaller of the two
// line coordinates on each axis and its extent (dx, dy) is their difference,
// as in the thesis. Taking the smaller corner, rather than always the first
// thread's, is this design's choice so that a group whose last thread lies
// above or left of its first still gets a valid rectangle.
//
// Purely combinational; no clock.
module line_range_calc
  import las_pkg::*;
(
  input  byte_range_t in_range,   // first/last thread byte coordinates
  output rect_t       out_rect    // cache-line rectangle
);

  logic [COORD_W-1:0] lx_first, lx_last;

  always_comb begin
    lx_first = in_range.first.x[BYTE_X_W-1:LINE_OFF_W];
    lx_last  = in_range.last.x[BYTE_X_W-1:LINE_OFF_W];

    out_rect.v = in_range.v;
    if (lx_first <= lx_last) begin
      out_rect.x  = lx_first;
      out_rect.dx = lx_last - lx_first;
    end else begin
      out_rect.x  = lx_last;
      out_rect.dx = lx_first - lx_last;
    end
    if (in_range.first.y <= in_range.last.y) begin
      out_rect.y  = in_range.first.y;
      out_rect.dy = in_range.last.y - in_range.first.y;
    end else begin
      out_rect.y  = in_range.last.y;
      out_rect.dy = in_range.first.y - in_range.last.y;
    end
  end

endmodule
