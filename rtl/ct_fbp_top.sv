// ct_fbp_top: parallel-beam filtered back-projection reconstructor with
// combined projection and pixel parallelism.
//
// The NPROJ projections are split into NGRP groups of ceil(NPROJ/NGRP)
// consecutive projections (5 groups of 205, the last one 204, for 1024
// projections). Each group has its own FBP block (fbp_group): projection
// fetch, filtration through its own FFT/IFFT cores, and eight back-projectors
// working on disjoint 256 x 128 segments of the 512 x 512 image. All groups
// run at the same time. When every group has finished, img_combine adds the
// partial images pixel by pixel and streams the final image out in raster
// order.
//
// External parts, one set per group and indexed by group: the projection
// buffering memory (read port proj_mem_*, one clock read latency, address =
// projection * NSAMP + sample) and the FFT and IFFT cores (fft_*, ifft_*,
// protocol in filtration.sv).
//
// Interface: start (one clock) begins a reconstruction with the sinogram
// already in the projection memories; busy is high until done pulses with the
// last output pixel. pix_valid/pix_index/pix_value carry the image
// ((1,8,7) sums of NGRP partial images, 3 bits wider). stall_bp/stall_filt
// report, per group, clocks in which back-projection waits for filtration or
// the reverse.
// Time: about ceil(NPROJ/NGRP) * (SEG_W*SEG_H + a few) clocks + one
// filtration + IMG*IMG clocks of readout.
module ct_fbp_top #(
  parameter int NSAMP  = 1024,
  parameter int NPROJ  = 1024,
  parameter int NGRP   = 5,
  parameter int IMG    = 512,
  parameter int SEG_W  = 256,
  parameter int SEG_H  = 128,
  parameter int OFFSET = 364,
  localparam int SW    = $clog2(NSAMP),
  localparam int PW    = $clog2(NPROJ),
  localparam int XK_W  = ct_pkg::P_W + SW + 1,
  localparam int NPG   = (NPROJ + NGRP - 1) / NGRP,
  localparam int SEGX  = IMG / SEG_W,
  localparam int NSEG  = SEGX * (IMG / SEG_H),
  localparam int AW    = $clog2(SEG_W * SEG_H),
  localparam int IW    = $clog2(IMG * IMG),
  localparam int OW    = ct_pkg::ACC_W + $clog2(NGRP + 1)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start,
  output logic                                 busy,
  output logic                                 done,
  output logic [NGRP-1:0]                      stall_bp,
  output logic [NGRP-1:0]                      stall_filt,
  // projection buffering memories
  output logic [NGRP-1:0]                      proj_mem_rd,
  output logic [NGRP-1:0][PW+SW-1:0]           proj_mem_addr,
  input  logic [NGRP-1:0][ct_pkg::P_W-1:0]     proj_mem_rdata,
  // forward FFT cores
  output logic [NGRP-1:0]                      fft_start,
  output logic [NGRP-1:0][ct_pkg::P_W-1:0]     fft_xn_re,
  output logic [NGRP-1:0][ct_pkg::P_W-1:0]     fft_xn_im,
  input  logic [NGRP-1:0]                      fft_rfd,
  input  logic [NGRP-1:0][SW-1:0]              fft_xn_index,
  input  logic [NGRP-1:0]                      fft_dv,
  input  logic [NGRP-1:0][SW-1:0]              fft_xk_index,
  input  logic [NGRP-1:0][XK_W-1:0]            fft_xk_re,
  input  logic [NGRP-1:0][XK_W-1:0]            fft_xk_im,
  // inverse FFT cores
  output logic [NGRP-1:0]                      ifft_start,
  output logic [NGRP-1:0][ct_pkg::P_W-1:0]     ifft_xn_re,
  output logic [NGRP-1:0][ct_pkg::P_W-1:0]     ifft_xn_im,
  input  logic [NGRP-1:0]                      ifft_rfd,
  input  logic [NGRP-1:0][SW-1:0]              ifft_xn_index,
  input  logic [NGRP-1:0]                      ifft_dv,
  input  logic [NGRP-1:0][SW-1:0]              ifft_xk_index,
  input  logic [NGRP-1:0][XK_W-1:0]            ifft_xk_re,
  input  logic [NGRP-1:0][XK_W-1:0]            ifft_xk_im,
  // reconstructed image
  output logic                                 pix_valid,
  output logic [IW-1:0]                        pix_index,
  output logic signed [OW-1:0]                 pix_value
);
  import ct_pkg::*;

  logic [NGRP-1:0]         grp_done;
  logic [AW-1:0]           rd_addr;
  logic signed [ACC_W-1:0] rd_data [NGRP][NSEG];
  logic                    running, comb_start, comb_done;

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    localparam int FIRST = g * NPG;
    localparam int CNT   = (NPROJ - FIRST < NPG) ? NPROJ - FIRST : NPG;
    fbp_group #(
      .NSAMP(NSAMP), .NPROJ(NPROJ), .PROJ_FIRST(FIRST), .NPROJ_GRP(CNT),
      .IMG(IMG), .SEG_W(SEG_W), .SEG_H(SEG_H), .OFFSET(OFFSET)
    ) u_grp (
      .clk, .rst_n, .start, .done(grp_done[g]),
      .stall_bp(stall_bp[g]), .stall_filt(stall_filt[g]),
      .proj_mem_rd(proj_mem_rd[g]), .proj_mem_addr(proj_mem_addr[g]),
      .proj_mem_rdata(proj_mem_rdata[g]),
      .fft_start(fft_start[g]), .fft_xn_re(fft_xn_re[g]), .fft_xn_im(fft_xn_im[g]),
      .fft_rfd(fft_rfd[g]), .fft_xn_index(fft_xn_index[g]), .fft_dv(fft_dv[g]),
      .fft_xk_index(fft_xk_index[g]), .fft_xk_re(fft_xk_re[g]), .fft_xk_im(fft_xk_im[g]),
      .ifft_start(ifft_start[g]), .ifft_xn_re(ifft_xn_re[g]), .ifft_xn_im(ifft_xn_im[g]),
      .ifft_rfd(ifft_rfd[g]), .ifft_xn_index(ifft_xn_index[g]), .ifft_dv(ifft_dv[g]),
      .ifft_xk_index(ifft_xk_index[g]), .ifft_xk_re(ifft_xk_re[g]), .ifft_xk_im(ifft_xk_im[g]),
      .rd_addr, .rd_data(rd_data[g])
    );
  end

  // Start the combination once, when all groups report done.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      comb_start <= 1'b0;
    end else begin
      comb_start <= 1'b0;
      if (start) running <= 1'b1;
      else if (running && (&grp_done) && !comb_start) begin
        running    <= 1'b0;
        comb_start <= 1'b1;
      end
    end
  end

  logic comb_run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          comb_run <= 1'b0;
    else if (comb_start) comb_run <= 1'b1;
    else if (comb_done)  comb_run <= 1'b0;
  end

  img_combine #(.NGRP(NGRP), .IMG(IMG), .SEG_W(SEG_W), .SEG_H(SEG_H)) u_comb (
    .clk, .rst_n, .start(comb_start), .rd_addr, .rd_data,
    .pix_valid, .pix_index, .pix_value, .done(comb_done)
  );

  assign busy = running || comb_start || comb_run;
  assign done = comb_done;
endmodule
