// tb_ct_fbp_top: end-to-end reconstruction at reduced size (20 projections
// of 128 samples in 5 groups, 64x64 image in eight 32x16 segments); see
// ct_fbp_top_bench.
module tb_ct_fbp_top;
  ct_fbp_top_bench #(.FULL(1'b0)) u_bench ();
endmodule
