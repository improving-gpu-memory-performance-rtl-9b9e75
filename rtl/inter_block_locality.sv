// inter_block_locality: locality between two thread blocks, defined by the
// thesis as the number of cache lines their access ranges share, summed over
// all data arrays of the kernel.
//
// One overlap_area unit per data array feeds an adder tree. Purely
// combinational.
module inter_block_locality
  import las_pkg::*;
(
  input  block_range_t      a,
  input  block_range_t      b,
  output logic [BLOC_W-1:0] locality
);

  logic [AREA_W-1:0] area [NUM_ARRAYS];

  for (genvar i = 0; i < NUM_ARRAYS; i++) begin : g_arr
    overlap_area u_ov (.a(a[i]), .b(b[i]), .area(area[i]));
  end

  always_comb begin
    locality = '0;
    for (int i = 0; i < NUM_ARRAYS; i++)
      locality += BLOC_W'(area[i]);
  end

endmodule
