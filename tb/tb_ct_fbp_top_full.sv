// tb_ct_fbp_top_full: one complete reconstruction with the top at its default
// parameters (1024 projections of 1024 samples, 5 groups of 205/204
// projections, 512x512 image in eight 256x128 segments); see ct_fbp_top_bench.
module tb_ct_fbp_top_full;
  ct_fbp_top_bench #(.FULL(1'b1)) u_bench ();
endmodule
