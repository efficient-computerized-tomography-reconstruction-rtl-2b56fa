// ct_fbp_top_bench: end-to-end test of the reconstructor, shared by the
// reduced-size test (FULL = 0) and the full-size one (FULL = 1, the top at its
// default parameters: 1024 projections of 1024 samples, 5 groups, 512x512
// image in 8 segments).
//
// Each group gets a projection memory model holding the same synthetic
// sinogram (a bright band whose position drifts with the angle, plus noise)
// and its own behavioural FFT and IFFT cores. In the reduced test group 0's
// cores are slow, so that group is filtration-bound (back-projection waits),
// while the other groups are back-projection-bound (a filtered projection
// waits); both stalls must occur. At full size every group uses the same
// cores, filtration is the faster step, and only the filtration-side wait
// can occur, so only that one is required there. The streamed image is compared with a
// fixed-point reference: per group, filter each projection, back-project with
// linear interpolation, drop four bits and sum with saturation; then add the
// groups. The test also counts PPDM bank swaps, odd and even accumulator
// writes and checks the reconstruction time against
// one filtration + ceil(NPROJ/NGRP) back-projections + readout (or, when
// filtration is the slower, ceil(NPROJ/NGRP) filtrations + one back-projection).
module ct_fbp_top_bench #(
  parameter bit FULL = 1'b0
);
  import tb_ref_pkg::*;
  localparam int NS   = FULL ? 1024 : 128;
  localparam int NP   = FULL ? 1024 : 20;
  localparam int G    = 5;
  localparam int IMG  = FULL ? 512 : 64;
  localparam int SGW  = FULL ? 256 : 32;
  localparam int SGH  = FULL ? 128 : 16;
  localparam int OFF  = FULL ? 364 : 46;
  localparam int SWB  = $clog2(NS), PWB = $clog2(NP), XW = 16 + SWB + 1;
  localparam int NPG  = (NP + G - 1) / G;
  localparam int IW   = $clog2(IMG * IMG), OW = 16 + $clog2(G + 1);
  localparam int SEGP = SGW * SGH;
  // Rows compared with the reference: all of them in the reduced test, every
  // 16th (32 rows crossing every segment) at full size to bound the time
  // spent in the reference model.
  localparam int RSTEP = FULL ? 16 : 1;
  // FFT model latency: FULL uses a core whose start-to-last-output time is
  // 12320 clocks (the lite FFT of the reference design).
  function automatic int fft_lat(input int g);
    if (FULL) return 12320 - 2 * NS - 4;
    return (g == 0) ? 300 : 5;
  endfunction

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [G-1:0] stall_bp, stall_filt, proj_mem_rd;
  logic [G-1:0][PWB+SWB-1:0] proj_mem_addr;
  logic [G-1:0][15:0] proj_mem_rdata;
  logic [G-1:0] fft_start, fft_rfd, fft_dv, ifft_start, ifft_rfd, ifft_dv;
  logic [G-1:0][15:0] fft_xn_re, fft_xn_im, ifft_xn_re, ifft_xn_im;
  logic [G-1:0][SWB-1:0] fft_xn_index, fft_xk_index, ifft_xn_index, ifft_xk_index;
  logic [G-1:0][XW-1:0] fft_xk_re, fft_xk_im, ifft_xk_re, ifft_xk_im;
  logic pix_valid;
  logic [IW-1:0] pix_index;
  logic signed [OW-1:0] pix_value;

  longint sino [NP][];
  longint ref_img [IMG][IMG];
  longint grp_img [IMG][IMG];
  int seen [IMG*IMG];
  int checks = 0, failures = 0, cyc = 0, t0 = 0, t_grp = 0, t_end = 0, maxerr = 0, npix = 0;
  int n_stall_bp = 0, n_stall_filt = 0, n_swap = 0, n_odd = 0, n_even = 0;

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc++;

  if (FULL) begin : g_full
    ct_fbp_top dut (.*);
  end else begin : g_red
    ct_fbp_top #(.NSAMP(NS), .NPROJ(NP), .NGRP(G), .IMG(IMG), .SEG_W(SGW), .SEG_H(SGH),
                 .OFFSET(OFF)) dut (.*);
  end

  for (genvar g = 0; g < G; g++) begin : g_ext
    always @(posedge clk)
      proj_mem_rdata[g] <= 16'(sino[proj_mem_addr[g] / NS][proj_mem_addr[g] % NS]);
    fft_core_model #(.N(NS), .OUT_W(XW), .LATENCY(fft_lat(g)), .INV(1'b0)) u_fft (
      .clk, .rst_n, .start(fft_start[g]), .xn_re(fft_xn_re[g]), .xn_im(fft_xn_im[g]),
      .rfd(fft_rfd[g]), .xn_index(fft_xn_index[g]), .dv(fft_dv[g]),
      .xk_index(fft_xk_index[g]), .xk_re(fft_xk_re[g]), .xk_im(fft_xk_im[g]));
    fft_core_model #(.N(NS), .OUT_W(XW), .LATENCY(fft_lat(g)), .INV(1'b1)) u_ifft (
      .clk, .rst_n, .start(ifft_start[g]), .xn_re(ifft_xn_re[g]), .xn_im(ifft_xn_im[g]),
      .rfd(ifft_rfd[g]), .xn_index(ifft_xn_index[g]), .dv(ifft_dv[g]),
      .xk_index(ifft_xk_index[g]), .xk_re(ifft_xk_re[g]), .xk_im(ifft_xk_im[g]));
  end

  // Mechanism counters: stalls per group, PPDM bank swaps and accumulator
  // writes to the odd and the even RAM (group 0, segment 0).
  logic wb_q;
  always @(posedge clk) begin
    if (rst_n && |stall_bp) n_stall_bp++;
    if (rst_n && |stall_filt) n_stall_filt++;
  end
  if (FULL) begin : g_mon_full
    always @(posedge clk) begin
      wb_q <= g_full.dut.g_grp[0].u_grp.g_seg[0].u_ppdm.wbank;
      if (wb_q != g_full.dut.g_grp[0].u_grp.g_seg[0].u_ppdm.wbank) n_swap++;
      if (g_full.dut.g_grp[0].u_grp.g_seg[0].u_acc.va) begin
        if (g_full.dut.g_grp[0].u_grp.g_seg[0].u_acc.odd_a) n_odd++; else n_even++;
      end
    end
  end else begin : g_mon_red
    always @(posedge clk) begin
      wb_q <= g_red.dut.g_grp[0].u_grp.g_seg[0].u_ppdm.wbank;
      if (wb_q != g_red.dut.g_grp[0].u_grp.g_seg[0].u_ppdm.wbank) n_swap++;
      if (g_red.dut.g_grp[0].u_grp.g_seg[0].u_acc.va) begin
        if (g_red.dut.g_grp[0].u_grp.g_seg[0].u_acc.odd_a) n_odd++; else n_even++;
      end
    end
  end

  // Image stream check.
  always @(posedge clk) if (pix_valid && rst_n) begin
    int r, q, e;
    r = int'(pix_index) / IMG; q = int'(pix_index) % IMG;
    if (r % RSTEP == RSTEP / 3) begin
      e = int'(ref_img[r][q]) - int'(pix_value);
      if (e < 0) e = -e;
      if (e > maxerr) maxerr = e;
      checks++;
      if (e > G) begin
        failures++;
        if (failures < 10) $display("pixel (%0d,%0d) got %0d exp %0d", r, q, pix_value, ref_img[r][q]);
      end
    end
    seen[pix_index]++;
    npix++;
    if (done) t_end = cyc;
  end

  initial begin
    if (FULL) #400ms; else #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint pf[];
    int tf, tbp, period, lo, hi;
    for (int p = 0; p < NP; p++) begin
      int c0;
      sino[p] = new[NS];
      c0 = OFF - IMG / 8 + (p * 7) % (IMG / 4);
      for (int k = 0; k < NS; k++)
        sino[p][k] = ((k > c0 && k < c0 + IMG / 8) ? 1500 : 0) + $signed(7'($urandom));
    end
    foreach (ref_img[r, q]) ref_img[r][q] = 0;
    for (int g = 0; g < G; g++) begin
      int first, cnt;
      first = g * NPG;
      cnt = (NP - first < NPG) ? NP - first : NPG;
      for (int j = 0; j < cnt; j++) begin
        int c, s;
        filter_ref(NS, sino[first + j], pf);
        c = trig_q14(first + j, NP, 0); s = trig_q14(first + j, NP, 1);
        for (int r = RSTEP / 3; r < IMG; r += RSTEP) for (int q = 0; q < IMG; q++) begin
          longint v;
          v = bp_pixel(q - IMG / 2, IMG / 2 - 1 - r, c, s, OFF, NS, pf) >>> 4;
          grp_img[r][q] = (j == 0) ? v : sat_w(grp_img[r][q] + v, 16);
        end
      end
      foreach (ref_img[r, q]) ref_img[r][q] += grp_img[r][q];
    end
    $display("reference image ready");
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    wait (done);
    repeat (3) @(posedge clk);
    checks++;
    if (npix != IMG * IMG) begin failures++; $display("%0d pixels out", npix); end
    foreach (seen[i]) if (seen[i] != 1) begin
      failures++; checks++;
      if (failures < 10) $display("pixel %0d seen %0d times", i, seen[i]);
    end
    // time: the slowest group, filtration first, then per projection the
    // longer of back-projection and filtration, then the readout
    tbp = SEGP;
    lo = 0;
    for (int g = 0; g < G; g++) begin
      int l;
      tf = 2 * (NS + 3 + fft_lat(g)) + NS + 4;
      // filtration-bound: NPG filtrations then the last back-projection;
      // back-projection-bound: the first filtration then NPG back-projections
      l = ((tf > tbp) ? NPG * tf + tbp : tf + NPG * tbp) + IMG * IMG;
      if (l > lo) lo = l;
    end
    hi = lo + NPG * 12 + 40;
    checks++;
    if (t_end - t0 < lo || t_end - t0 > hi) begin
      failures++; $display("time %0d clocks, expected about %0d", t_end - t0, lo);
    end
    if (!FULL) begin
      checks++; if (n_stall_bp == 0)   begin failures++; $display("no back-projection stall"); end
    end
    checks++; if (n_stall_filt == 0) begin failures++; $display("no filtration stall"); end
    checks++; if (n_swap < NPG)      begin failures++; $display("PPDM swapped %0d times", n_swap); end
    checks++; if (n_odd == 0 || n_even == 0) begin failures++; $display("odd/even RAM not both used"); end
    $display("reconstruction + readout: %0d clocks (%0d us at 50 MHz); expected about %0d",
             t_end - t0, (t_end - t0) / 50, lo);
    $display("stall_bp %0d, stall_filt %0d, swaps %0d, odd writes %0d, even writes %0d, max error %0d LSB",
             n_stall_bp, n_stall_filt, n_swap, n_odd, n_even, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
