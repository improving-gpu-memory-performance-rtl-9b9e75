// las_pkg: types and constants shared by the locality-aware scheduler.
//
// The scheduler describes what each thread block and each warp touches in
// memory in cache-line coordinates. A data array is seen as a 2-D grid of
// cache lines: x is the line column (byte column divided by the line size),
// y is the row. A thread block's footprint on one array is a rectangle given
// by its upper-left line and its extent. A warp's footprint is given by a
// hierarchical code: the index of the region of the array the block falls in
// and a bit per sub-region of that region.
//
// Sizes that follow the thesis: 15 SMs, 8 thread blocks and 48 warps per SM,
// 128-byte lines, 1-byte rectangle fields, a 10-bit region vector and a
// 16-bit sub-region vector per data array, 1-byte locality degree entries.
// Five data arrays per kernel is derived from the storage figures it gives
// (6 bytes of region bits and 10 bytes of sub-region bits per warp). The
// queue depth, active group size and identifier widths are this design's own.
package las_pkg;

  // ---- GPU organisation ---------------------------------------------------
  localparam int unsigned NUM_SM        = 15;  // cores
  localparam int unsigned MAX_TB        = 8;   // thread blocks per SM
  localparam int unsigned MAX_WARPS     = 48;  // warps per SM (1536 / 32)
  localparam int unsigned WARPS_PER_TB  = MAX_WARPS / MAX_TB; // warp slots per block slot

  // ---- access ranges ------------------------------------------------------
  localparam int unsigned NUM_ARRAYS    = 5;   // data arrays tracked per kernel
  localparam int unsigned COORD_W       = 8;   // one byte per rectangle field
  localparam int unsigned LINE_BYTES    = 128; // L1 line size
  localparam int unsigned LINE_OFF_W    = $clog2(LINE_BYTES);
  localparam int unsigned BYTE_X_W      = COORD_W + LINE_OFF_W; // byte column
  localparam int unsigned BID_W         = 20;  // thread block id (up to 1M blocks)

  // ---- hierarchical warp encoding ----------------------------------------
  localparam int unsigned REGION_BITS   = 10;  // M: 2^M regions per array
  localparam int unsigned SUB_BITS      = 16;  // N: sub-regions per region
  localparam int unsigned REG_AXIS_W    = REGION_BITS / 2;      // region index bits per axis
  localparam int unsigned SUB_SIDE      = 4;                    // sqrt(SUB_BITS)
  localparam int unsigned SUB_AXIS_W    = $clog2(SUB_SIDE);
  localparam int unsigned SUB_SHIFT     = COORD_W - REG_AXIS_W - SUB_AXIS_W; // log2 lines per sub-region side

  // ---- locality values ----------------------------------------------------
  localparam int unsigned LDT_W         = 8;   // locality degree table entry
  localparam int unsigned AREA_W        = 2 * (COORD_W + 1);   // overlap of one array
  localparam int unsigned BLOC_W        = AREA_W + $clog2(NUM_ARRAYS + 1); // inter-block locality
  localparam int unsigned ACC_W         = 32;  // locality summed over running blocks
  localparam int unsigned AGE_W         = 8;   // thread block age counter

  // Cache-line rectangle of one block on one data array. dx/dy are the
  // differences between the last and the first thread's line coordinates,
  // so the rectangle covers dx+1 columns and dy+1 rows.
  typedef struct packed {
    logic               v;   // array is used by the kernel
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] dx;
    logic [COORD_W-1:0] dy;
  } rect_t;

  typedef rect_t [NUM_ARRAYS-1:0] block_range_t;

  // A point of a 2-D data array in bytes (column) and rows.
  typedef struct packed {
    logic [BYTE_X_W-1:0] x;
    logic [COORD_W-1:0]  y;
  } byte_pt_t;

  // Addresses of the first and last thread of a block or a warp on one array.
  typedef struct packed {
    logic     v;
    byte_pt_t first;
    byte_pt_t last;
  } byte_range_t;

  typedef byte_range_t [NUM_ARRAYS-1:0] byte_ranges_t;

  // Hierarchical warp code on one data array.
  typedef struct packed {
    logic [REGION_BITS-1:0] region;
    logic [SUB_BITS-1:0]    sub;   // MSB is the upper-left sub-region
  } warp_code_t;

  typedef warp_code_t [NUM_ARRAYS-1:0] warp_range_t;

  // A pending thread block in the block queue.
  typedef struct packed {
    logic [BID_W-1:0] bid;
    block_range_t     range;
  } bq_entry_t;

endpackage
