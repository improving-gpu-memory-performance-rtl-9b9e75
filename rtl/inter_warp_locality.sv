// inter_warp_locality: locality between two warps from their hierarchical
// access-range codes.
//
// On each data array, two warps whose region vectors differ share nothing;
// otherwise they share as many sub-regions as their sub-region vectors have
// common 1 bits. The result is the sum over the data arrays, saturated to
// the LDT_W-bit width of a locality degree table entry (with 5 arrays of 16
// sub-regions the maximum, 80, fits without saturation).
//
// Purely combinational.
module inter_warp_locality
  import las_pkg::*;
(
  input  warp_range_t      a,
  input  warp_range_t      b,
  output logic [LDT_W-1:0] locality
);

  localparam int unsigned SUM_W = $clog2(NUM_ARRAYS * SUB_BITS + 1);

  logic [SUM_W-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < NUM_ARRAYS; i++)
      if (a[i].region == b[i].region)
        sum += SUM_W'($countones(a[i].sub & b[i].sub));
    if (SUM_W > LDT_W && sum > SUM_W'((1 << LDT_W) - 1))
      locality = '1;
    else
      locality = LDT_W'(sum);
  end

endmodule
