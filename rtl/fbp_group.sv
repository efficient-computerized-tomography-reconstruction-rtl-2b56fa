// fbp_group: one FBP block; reconstructs the partial image of a group of
// projections with eight-way pixel parallelism.
//
// Per projection the block fetches the samples (proj_acq), filters them
// (filtration, with external FFT/IFFT cores) into the write side of the
// ping-pong memories, then back-projects them. The image is cut into NSEG
// disjoint segments of SEG_W x SEG_H pixels (2 x 4 segments of 256 x 128 for
// a 512 x 512 image), each with its own PPDM copy, back_projection block and
// img_accum; all segments run in lock step from the same angle. The cos/sin
// of the angle come from one trig_rom.
//
// Sequencing: filtration of projection k+1 overlaps back-projection of
// projection k. A new back-projection is launched when the next filtered
// projection is complete and the previous back-projection has drained; at
// that clock the PPDM banks swap and filtration of the following projection
// is requested. Total time is about NPROJ_GRP * max(t_BP, t_filt) + t_filt.
// stall_bp marks a clock in which the back-projectors idle waiting for the
// filtration, stall_filt one in which a filtered projection waits for the
// back-projectors.
//
// Projection numbers: the group handles projections PROJ_FIRST ..
// PROJ_FIRST+NPROJ_GRP-1 of NPROJ, angle k*pi/NPROJ. Interface: start (one
// clock) begins; done rises when the partial image is complete and stays
// high until the next start. rd_addr/rd_data then read pixel rd_addr of
// every segment (segment-local address, row by row), one clock of latency.
module fbp_group #(
  parameter int NSAMP      = 1024,
  parameter int NPROJ      = 1024,
  parameter int PROJ_FIRST = 0,
  parameter int NPROJ_GRP  = 205,
  parameter int IMG        = 512,
  parameter int SEG_W      = 256,
  parameter int SEG_H      = 128,
  parameter int OFFSET     = 364,
  localparam int SW   = $clog2(NSAMP),
  localparam int PW   = $clog2(NPROJ),
  localparam int XK_W = ct_pkg::P_W + SW + 1,
  localparam int SEGX = IMG / SEG_W,
  localparam int NSEG = SEGX * (IMG / SEG_H),
  localparam int DEPTH = SEG_W * SEG_H,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  output logic                              done,
  output logic                              stall_bp,
  output logic                              stall_filt,
  // projection buffering memory (external)
  output logic                              proj_mem_rd,
  output logic [PW+SW-1:0]                  proj_mem_addr,
  input  logic signed [ct_pkg::P_W-1:0]     proj_mem_rdata,
  // forward FFT core (external)
  output logic                              fft_start,
  output logic signed [ct_pkg::P_W-1:0]     fft_xn_re,
  output logic signed [ct_pkg::P_W-1:0]     fft_xn_im,
  input  logic                              fft_rfd,
  input  logic [SW-1:0]                     fft_xn_index,
  input  logic                              fft_dv,
  input  logic [SW-1:0]                     fft_xk_index,
  input  logic signed [XK_W-1:0]            fft_xk_re,
  input  logic signed [XK_W-1:0]            fft_xk_im,
  // inverse FFT core (external)
  output logic                              ifft_start,
  output logic signed [ct_pkg::P_W-1:0]     ifft_xn_re,
  output logic signed [ct_pkg::P_W-1:0]     ifft_xn_im,
  input  logic                              ifft_rfd,
  input  logic [SW-1:0]                     ifft_xn_index,
  input  logic                              ifft_dv,
  input  logic [SW-1:0]                     ifft_xk_index,
  input  logic signed [XK_W-1:0]            ifft_xk_re,
  input  logic signed [XK_W-1:0]            ifft_xk_im,
  // readout of the finished partial image
  input  logic [AW-1:0]                     rd_addr,
  output logic signed [ct_pkg::ACC_W-1:0]   rd_data [NSEG]
);
  import ct_pkg::*;

  // ---------------- acquisition and filtration ----------------
  logic          acq_req;
  logic [PW-1:0] acq_proj;
  logic          start_filt, d_wind, filt_busy_unused, filt_done;
  logic [SW-1:0] xn_index;
  logic signed [P_W-1:0]  xn_re;
  logic                   pf_dv;
  logic [SW-1:0]          pf_ind;
  logic signed [PF_W-1:0] pf;

  proj_acq #(.NSAMP(NSAMP), .NPROJ(NPROJ)) u_acq (
    .clk, .rst_n, .acq_req, .proj_num(acq_proj), .start_filt, .d_wind, .xn_index,
    .mem_rd(proj_mem_rd), .mem_addr(proj_mem_addr), .mem_rdata(proj_mem_rdata), .xn_re
  );

  filtration #(.NSAMP(NSAMP)) u_filt (
    .clk, .rst_n, .start_filt, .d_wind, .xn_index, .xn_re, .busy(filt_busy_unused),
    .fft_start, .fft_xn_re, .fft_xn_im, .fft_rfd, .fft_xn_index, .fft_dv,
    .fft_xk_index, .fft_xk_re, .fft_xk_im,
    .ifft_start, .ifft_xn_re, .ifft_xn_im, .ifft_rfd, .ifft_xn_index, .ifft_dv,
    .ifft_xk_index, .ifft_xk_re, .ifft_xk_im,
    .pf_dv, .pf_ind, .pf, .filt_done
  );

  // ---------------- angle ROM ----------------
  logic [PW:0]              n_bp, n_filt;   // projections launched to BP / to filtration
  logic signed [TRIG_W-1:0] cos_v, sin_v;

  trig_rom #(.NPROJ(NPROJ)) u_trig (
    .clk, .addr(PW'(PROJ_FIRST) + n_bp[PW-1:0]), .cos_o(cos_v), .sin_o(sin_v)
  );

  // ---------------- controller ----------------
  logic running, filt_active, filt_ready, bp_launch, first_img;
  logic [NSEG-1:0] seg_busy, acc_busy;
  logic bp_active;

  assign bp_active = (|seg_busy) || (|acc_busy);
  assign bp_launch = running && filt_ready && !(|seg_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      filt_active <= 1'b0;
      filt_ready  <= 1'b0;
      n_bp        <= '0;
      n_filt      <= '0;
      acq_req     <= 1'b0;
      acq_proj    <= '0;
      done        <= 1'b0;
      first_img   <= 1'b0;
    end else begin
      acq_req <= 1'b0;
      if (start) begin
        running     <= 1'b1;
        done        <= 1'b0;
        n_bp        <= '0;
        n_filt      <= (PW+1)'(1);
        acq_req     <= 1'b1;
        acq_proj    <= PW'(PROJ_FIRST);
        filt_active <= 1'b1;
        filt_ready  <= 1'b0;
        first_img   <= 1'b1;
      end else if (running) begin
        if (filt_done) begin
          filt_active <= 1'b0;
          filt_ready  <= 1'b1;
        end
        if (bp_launch) begin
          filt_ready <= 1'b0;
          first_img  <= 1'b0;
          n_bp       <= n_bp + 1'b1;
          if (32'(n_filt) < NPROJ_GRP) begin
            acq_req     <= 1'b1;
            acq_proj    <= PW'(PROJ_FIRST) + n_filt[PW-1:0];
            n_filt      <= n_filt + 1'b1;
            filt_active <= 1'b1;
          end
        end
        if (32'(n_bp) == NPROJ_GRP && !bp_active && !bp_launch) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  assign stall_bp   = running && !bp_active && !filt_ready && filt_active && (n_bp != '0);
  assign stall_filt = running && filt_ready && (|seg_busy);

  // ---------------- segments ----------------
  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    localparam int X0 = -(IMG / 2) + (s % SEGX) * SEG_W;
    localparam int Y0 = (IMG / 2 - 1) - (s / SEGX) * SEG_H;

    logic [SW-1:0]          add0, add1;
    logic [PF_W-1:0]        d0, d1;
    logic                   imn_valid, imn_last;
    logic signed [PF_W-1:0] imn;
    logic [AW-1:0]          imn_addr;
    logic                   wbank;

    ppdm #(.DEPTH(NSAMP), .DW(PF_W)) u_ppdm (
      .clk, .rst_n, .swap(bp_launch), .we(pf_dv), .waddr(pf_ind), .wdata(pf),
      .raddr0(add0), .raddr1(add1), .rdata0(d0), .rdata1(d1), .wbank
    );

    back_projection #(.NSAMP(NSAMP), .OFFSET(OFFSET), .X0(X0), .Y0(Y0),
                      .W(SEG_W), .H(SEG_H)) u_bp (
      .clk, .rst_n, .start(bp_launch), .cos_i(cos_v), .sin_i(sin_v),
      .rd_add0(add0), .rd_add1(add1), .rd_d0(d0), .rd_d1(d1),
      .imn_valid, .imn_last, .imn, .imn_addr, .busy(seg_busy[s])
    );

    img_accum #(.DEPTH(DEPTH)) u_acc (
      .clk, .rst_n, .frame_start(bp_launch), .first(first_img),
      .in_valid(imn_valid), .in_pix(imn), .in_addr(imn_addr),
      .rd_addr, .rd_data(rd_data[s]), .odd_even(), .busy(acc_busy[s])
    );
  end
endmodule
