// tb_inter_warp_locality: inter-warp locality of hierarchical codes, with the
// worked examples of equal region vectors (two common sub-region bits give
// 2) and different region vectors (0), then random codes against a bit-wise
// reference sum.
module tb_inter_warp_locality;
  import las_pkg::*;

  warp_range_t a, b;
  logic [LDT_W-1:0] locality;
  int checks = 0, failures = 0;

  inter_warp_locality dut (.a, .b, .locality);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_loc(warp_range_t p, warp_range_t q);
    int n = 0;
    for (int i = 0; i < NUM_ARRAYS; i++)
      if (p[i].region == q[i].region)
        for (int k = 0; k < SUB_BITS; k++)
          if (p[i].sub[k] && q[i].sub[k]) n++;
    return n;
  endfunction

  task automatic expect_loc(int want, string tag);
    #1;
    checks++;
    if (int'(locality) != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", tag, locality, want);
    end
  endtask

  initial begin
    // warp 0 and warp 1: region 1001, sub-regions 001001 on one array
    a = '0; b = '0;
    a[0] = '{region: 10'b1001, sub: 16'b001001};
    b[0] = '{region: 10'b1001, sub: 16'b001001};
    expect_loc(2, "same region");
    b[0].region = 10'b1011;
    expect_loc(0, "different region");
    // all arrays, all sub-regions shared: 5 * 16
    for (int i = 0; i < NUM_ARRAYS; i++) begin
      a[i] = '{region: 10'd5, sub: '1};
      b[i] = '{region: 10'd5, sub: '1};
    end
    expect_loc(NUM_ARRAYS * SUB_BITS, "maximum");
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NUM_ARRAYS; i++) begin
        a[i].region = REGION_BITS'($urandom_range(0, 3));
        b[i].region = REGION_BITS'($urandom_range(0, 3));
        a[i].sub = SUB_BITS'($urandom);
        b[i].sub = SUB_BITS'($urandom);
      end
      expect_loc(ref_loc(a, b), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
