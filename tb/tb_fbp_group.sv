// tb_fbp_group: one FBP block at reduced size (64-sample projections, 32x32
// image in eight 16x8 segments, projections 4..9 of 16). A synchronous
// memory model holds a random sinogram; behavioural FFT/IFFT cores do the
// transforms. The partial image read back after done is compared pixel by
// pixel with a fixed-point reference (filter, interpolate, drop 4 bits,
// saturating sum). Also checks that back-projection waited for filtration
// (stall_bp) and the total time against NPROJ_GRP filtration periods.
module tb_fbp_group;
  import tb_ref_pkg::*;
  localparam int NS = 64, NP = 16, FIRST = 4, NPG = 6, IMG = 32, SW_ = 16, SH = 8, OFF = 24;
  localparam int LAT = 10, SWB = 6, PWB = 4, XW = 16 + SWB + 1;
  localparam int SEGX = IMG / SW_, NSEG = SEGX * (IMG / SH), D = SW_ * SH;
  logic clk = 0, rst_n = 0, start = 0, done, stall_bp, stall_filt;
  logic proj_mem_rd;
  logic [PWB+SWB-1:0] proj_mem_addr;
  logic signed [15:0] proj_mem_rdata;
  logic fft_start, fft_rfd, fft_dv, ifft_start, ifft_rfd, ifft_dv;
  logic signed [15:0] fft_xn_re, fft_xn_im, ifft_xn_re, ifft_xn_im;
  logic [SWB-1:0] fft_xn_index, fft_xk_index, ifft_xn_index, ifft_xk_index;
  logic signed [XW-1:0] fft_xk_re, fft_xk_im, ifft_xk_re, ifft_xk_im;
  logic [6:0] rd_addr = 0;
  logic signed [15:0] rd_data [NSEG];
  longint sino [NP][];
  longint ref_img [IMG][IMG];
  int checks = 0, failures = 0, cyc = 0, n_stall_bp = 0, n_stall_filt = 0, t0, t_end, maxerr = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    proj_mem_rdata <= 16'(sino[proj_mem_addr / NS][proj_mem_addr % NS]);
    if (stall_bp && rst_n) n_stall_bp++;
    if (stall_filt && rst_n) n_stall_filt++;
  end

  fbp_group #(.NSAMP(NS), .NPROJ(NP), .PROJ_FIRST(FIRST), .NPROJ_GRP(NPG), .IMG(IMG),
              .SEG_W(SW_), .SEG_H(SH), .OFFSET(OFF)) dut (.*);
  fft_core_model #(.N(NS), .OUT_W(XW), .LATENCY(LAT), .INV(1'b0)) u_fft (
    .clk, .rst_n, .start(fft_start), .xn_re(fft_xn_re), .xn_im(fft_xn_im), .rfd(fft_rfd),
    .xn_index(fft_xn_index), .dv(fft_dv), .xk_index(fft_xk_index), .xk_re(fft_xk_re), .xk_im(fft_xk_im));
  fft_core_model #(.N(NS), .OUT_W(XW), .LATENCY(LAT), .INV(1'b1)) u_ifft (
    .clk, .rst_n, .start(ifft_start), .xn_re(ifft_xn_re), .xn_im(ifft_xn_im), .rfd(ifft_rfd),
    .xn_index(ifft_xn_index), .dv(ifft_dv), .xk_index(ifft_xk_index), .xk_re(ifft_xk_re), .xk_im(ifft_xk_im));

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint pf[];
    int tf, period;
    // sinogram: a bright off-centre disc plus noise
    for (int p = 0; p < NP; p++) begin
      sino[p] = new[NS];
      for (int k = 0; k < NS; k++) sino[p][k] = ((k > 20 + p % 5 && k < 34) ? 2000 : 0) + $signed(8'($urandom));
    end
    // reference partial image
    for (int j = 0; j < NPG; j++) begin
      int c, s;
      filter_ref(NS, sino[FIRST + j], pf);
      c = trig_q14(FIRST + j, NP, 0); s = trig_q14(FIRST + j, NP, 1);
      for (int r = 0; r < IMG; r++) for (int q = 0; q < IMG; q++) begin
        longint v;
        v = bp_pixel(q - IMG / 2, IMG / 2 - 1 - r, c, s, OFF, NS, pf) >>> 4;
        ref_img[r][q] = (j == 0) ? v : sat_w(ref_img[r][q] + v, 16);
      end
    end
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    wait (done); t_end = cyc;
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      @(negedge clk); rd_addr = 7'(a);
      @(posedge clk); #1;
      for (int sg = 0; sg < NSEG; sg++) begin
        int r, q, e;
        r = (sg / SEGX) * SH + a / SW_;
        q = (sg % SEGX) * SW_ + a % SW_;
        e = int'(ref_img[r][q]) - int'(rd_data[sg]);
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > 1) begin
          failures++;
          if (failures < 10) $display("r=%0d q=%0d got %0d exp %0d", r, q, rd_data[sg], ref_img[r][q]);
        end
      end
    end
    // filtration-bound here: one filtration per projection plus the last BP
    tf = 2 * (NS + 3 + LAT) + NS + 4;
    period = tf + 2;
    checks++;
    if (t_end - t0 < NPG * tf || t_end - t0 > NPG * period + D + 20) begin
      failures++; $display("total time %0d outside [%0d, %0d]", t_end - t0, NPG * tf, NPG * period + D + 20);
    end
    checks++;
    if (n_stall_bp == 0) begin failures++; $display("BP never waited for filtration"); end
    $display("time %0d clocks, stall_bp %0d, stall_filt %0d, max error %0d LSB", t_end - t0, n_stall_bp, n_stall_filt, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
