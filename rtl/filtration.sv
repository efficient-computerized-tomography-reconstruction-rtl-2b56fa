// filtration: frequency-domain ramp filtering of one projection.
//
// The projection is transformed by an FFT core, each bin is multiplied by the
// filter coefficient of its index, and the product is transformed back by an
// IFFT core. The two cores are external IP; this module sequences them and
// holds the datapath between and after them:
//   * start_filt starts the FFT; d_wind (the FFT's input window) and
//     xn_index go back to the projection memory controller, the samples
//     xn_re are fed to the FFT real input, its imaginary input is zero.
//   * FFT outputs (1,19,7) for N = 1024 are multiplied by coef[xk_index],
//     (0,0,9), read from a ROM; the (1,19,16) products are rounded and
//     saturated to (1,8,7). The ROM read plus the three-stage multiplier give
//     four clocks from an FFT output to the IFFT input.
//   * The IFFT is started in the clock of the FFT's first output. Its output
//     real part (1,19,7) is rounded to (1,14,1); read as (1,4,11) this is the
//     filtered sample divided by N = 1024 (a 10-bit shift for free).
//   * pf, pf_ind and pf_dv write the filtered projection into the PPDM.
//     filt_done pulses after the last sample has been written.
// The coefficient ROM is the Ram-Lak ramp of ct_pkg::ramp_table.
//
// FFT core protocol assumed: start (one clock) opens an input window of N
// clocks starting next clock with rfd=1 and xn_index = 0..N-1; the core
// takes the sample for index k three clocks after it shows k. Results come
// later in natural order with dv=1, xk_index, xk_re, xk_im.
module filtration #(
  parameter int NSAMP = 1024,
  localparam int SW   = $clog2(NSAMP),
  localparam int XK_W = ct_pkg::P_W + SW + 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start_filt,
  output logic                            d_wind,
  output logic [SW-1:0]                   xn_index,
  input  logic signed [ct_pkg::P_W-1:0]   xn_re,
  output logic                            busy,
  // forward FFT core
  output logic                            fft_start,
  output logic signed [ct_pkg::P_W-1:0]   fft_xn_re,
  output logic signed [ct_pkg::P_W-1:0]   fft_xn_im,
  input  logic                            fft_rfd,
  input  logic [SW-1:0]                   fft_xn_index,
  input  logic                            fft_dv,
  input  logic [SW-1:0]                   fft_xk_index,
  input  logic signed [XK_W-1:0]          fft_xk_re,
  input  logic signed [XK_W-1:0]          fft_xk_im,
  // inverse FFT core
  output logic                            ifft_start,
  output logic signed [ct_pkg::P_W-1:0]   ifft_xn_re,
  output logic signed [ct_pkg::P_W-1:0]   ifft_xn_im,
  input  logic                            ifft_rfd,
  input  logic [SW-1:0]                   ifft_xn_index,
  input  logic                            ifft_dv,
  input  logic [SW-1:0]                   ifft_xk_index,
  input  logic signed [XK_W-1:0]          ifft_xk_re,
  input  logic signed [XK_W-1:0]          ifft_xk_im,
  // filtered projection, to the PPDM
  output logic                            pf_dv,
  output logic [SW-1:0]                   pf_ind,
  output logic signed [ct_pkg::PF_W-1:0]  pf,
  output logic                            filt_done
);
  import ct_pkg::*;

  localparam logic [NSAMP_MAX*COEF_W-1:0] COEF_TAB = ramp_table(NSAMP);
  localparam int PROD_W = XK_W + COEF_W + 1;
  localparam int IFFT_SH = SW - 4;   // (1,19,7) -> (1,14,1) for N = 1024

  logic [COEF_W-1:0] coef_rom [NSAMP];
  for (genvar k = 0; k < NSAMP; k++) begin : g_rom
    assign coef_rom[k] = COEF_TAB[k*COEF_W +: COEF_W];
  end

  typedef enum logic [1:0] {IDLE, FFT_RUN, IFFT_RUN} state_t;
  state_t state;

  // Sequencing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      filt_done <= 1'b0;
    end else begin
      filt_done <= 1'b0;
      case (state)
        IDLE:     if (start_filt) state <= FFT_RUN;
        FFT_RUN:  if (ifft_start) state <= IFFT_RUN;
        IFFT_RUN: if (pf_dv && pf_ind == SW'(NSAMP - 1)) begin
                    state     <= IDLE;
                    filt_done <= 1'b1;
                  end
        default:  state <= IDLE;
      endcase
    end
  end

  assign fft_start  = (state == IDLE) && start_filt;
  assign ifft_start = (state == FFT_RUN) && fft_dv && (fft_xk_index == '0);
  assign d_wind     = fft_rfd;
  assign xn_index   = fft_xn_index;
  assign fft_xn_re  = xn_re;
  assign fft_xn_im  = '0;
  assign busy       = (state != IDLE);

  // Coefficient ROM read + three-stage multiplier.
  logic [COEF_W-1:0]        c1;
  logic signed [XK_W-1:0]   re1, im1;
  logic signed [PROD_W-1:0] re2, im2, re3, im3;
  logic signed [P_W-1:0]    re4, im4;

  always_ff @(posedge clk) begin
    c1  <= coef_rom[fft_xk_index];
    re1 <= fft_xk_re;
    im1 <= fft_xk_im;
    re2 <= re1 * $signed({1'b0, c1});
    im2 <= im1 * $signed({1'b0, c1});
    re3 <= re2;
    im3 <= im2;
    // (1,19,16) -> (1,8,7): drop 9 fraction bits with rounding, saturate
    re4 <= P_W'(sat(shr_round(longint'(re3), COEF_W), P_W));
    im4 <= P_W'(sat(shr_round(longint'(im3), COEF_W), P_W));
  end
  assign ifft_xn_re = re4;
  assign ifft_xn_im = im4;

  // IFFT output scaling.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_dv  <= 1'b0;
      pf_ind <= '0;
      pf     <= '0;
    end else begin
      pf_dv  <= ifft_dv && (state == IFFT_RUN);
      pf_ind <= ifft_xk_index;
      pf     <= PF_W'(sat(shr_round(longint'(ifft_xk_re), IFFT_SH), PF_W));
    end
  end

  // ifft_rfd, ifft_xn_index and ifft_xk_im are not needed: the IFFT input is
  // already aligned with its index by construction, and only the real part
  // of the filtered projection is kept.
endmodule
