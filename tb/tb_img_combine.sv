// tb_img_combine: 3 groups, 16x16 image in 2x4 segments of 8x4. The
// accumulator read ports are modelled with one clock of latency and a known
// value per (group, segment, address). Checks that every raster position is
// produced exactly once with the sum over the groups, one pixel per clock,
// and that done marks the last pixel.
module tb_img_combine;
  localparam int G = 3, IMG = 16, SW_ = 8, SH = 4, NSEG = 8, D = 32;
  logic clk = 0, rst_n = 0, start = 0, pix_valid, done;
  logic [4:0] rd_addr;
  logic signed [15:0] rd_data [G][NSEG];
  logic [7:0] pix_index;
  logic signed [17:0] pix_value;
  int checks = 0, failures = 0, seen [IMG*IMG], npix = 0, first_cyc = -1, last_cyc = 0, cyc = 0;
  function automatic int val(input int g, input int s, input int a);
    return ((g * 7919 + s * 104729 + a * 31) % 60000) - 30000;
  endfunction
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk)
    for (int g = 0; g < G; g++) for (int s = 0; s < NSEG; s++) rd_data[g][s] <= 16'(val(g, s, int'(rd_addr)));
  img_combine #(.NGRP(G), .IMG(IMG), .SEG_W(SW_), .SEG_H(SH)) dut (.*);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (pix_valid && rst_n) begin
    int row, col, s, a, e;
    row = int'(pix_index) / IMG; col = int'(pix_index) % IMG;
    s = (row / SH) * (IMG / SW_) + col / SW_;
    a = (row % SH) * SW_ + col % SW_;
    e = 0;
    for (int g = 0; g < G; g++) e += val(g, s, a);
    checks++;
    if (int'(pix_value) != e) begin
      failures++;
      if (failures < 10) $display("idx=%0d got %0d exp %0d", pix_index, pix_value, e);
    end
    seen[pix_index]++;
    if (first_cyc < 0) first_cyc = cyc;
    last_cyc = cyc; npix++;
    if (done != (npix == IMG * IMG)) begin failures++; $display("done misplaced at %0d", npix); end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (IMG * IMG + 10) @(posedge clk);
    foreach (seen[i]) begin checks++; if (seen[i] != 1) failures++; end
    checks++;
    if (last_cyc - first_cyc != IMG * IMG - 1) begin failures++; $display("not one pixel per clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
