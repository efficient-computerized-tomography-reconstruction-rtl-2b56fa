// tb_filtration: filters three random 64-sample projections through the
// filtration block with behavioural FFT/IFFT cores, and compares every
// filtered sample written towards the PPDM with the fixed-point reference
// (DFT, ramp coefficient, rounding, IDFT, scaling). Also checks that every
// index is written once, the IFFT start alignment, and the filtration time.
module tb_filtration;
  import tb_ref_pkg::*;
  localparam int N = 64, SW = 6, XW = 16 + SW + 1, LAT = 20;
  logic clk = 0, rst_n = 0, start_filt = 0;
  logic d_wind, busy, filt_done;
  logic [SW-1:0] xn_index;
  logic signed [15:0] xn_re;
  logic fft_start, fft_rfd, fft_dv, ifft_start, ifft_rfd, ifft_dv;
  logic signed [15:0] fft_xn_re, fft_xn_im, ifft_xn_re, ifft_xn_im;
  logic [SW-1:0] fft_xn_index, fft_xk_index, ifft_xn_index, ifft_xk_index;
  logic signed [XW-1:0] fft_xk_re, fft_xk_im, ifft_xk_re, ifft_xk_im;
  logic pf_dv;
  logic [SW-1:0] pf_ind;
  logic signed [15:0] pf;
  longint proj[], pf_exp[];
  logic signed [15:0] got [N];
  int written [N];
  logic signed [15:0] dly [3];
  int checks = 0, failures = 0, cyc = 0, t0, t_done;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // projection memory: sample for xn_index appears three clocks later
  always @(posedge clk) begin
    dly[0] <= 16'(proj[xn_index]);
    dly[1] <= dly[0];
    dly[2] <= dly[1];
  end
  assign xn_re = dly[2];

  filtration #(.NSAMP(N)) dut (.*);
  fft_core_model #(.N(N), .OUT_W(XW), .LATENCY(LAT), .INV(1'b0)) u_fft (
    .clk, .rst_n, .start(fft_start), .xn_re(fft_xn_re), .xn_im(fft_xn_im), .rfd(fft_rfd),
    .xn_index(fft_xn_index), .dv(fft_dv), .xk_index(fft_xk_index), .xk_re(fft_xk_re), .xk_im(fft_xk_im));
  fft_core_model #(.N(N), .OUT_W(XW), .LATENCY(LAT), .INV(1'b1)) u_ifft (
    .clk, .rst_n, .start(ifft_start), .xn_re(ifft_xn_re), .xn_im(ifft_xn_im), .rfd(ifft_rfd),
    .xn_index(ifft_xn_index), .dv(ifft_dv), .xk_index(ifft_xk_index), .xk_re(ifft_xk_re), .xk_im(ifft_xk_im));

  always @(posedge clk) if (pf_dv && rst_n) begin got[pf_ind] <= pf; written[pf_ind] <= written[pf_ind] + 1; end
  always @(posedge clk) if (filt_done && rst_n) t_done <= cyc;
  // the IFFT must be started on the FFT's first output
  always @(posedge clk) if (ifft_start && rst_n) begin
    checks++;
    if (!(fft_dv && fft_xk_index == 0)) failures++;
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    proj = new[N];
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      foreach (proj[i]) proj[i] = (r == 0) ? ((i > 20 && i < 40) ? 4000 : 0) : $signed(16'($urandom)) / (r * 2);
      filter_ref(N, proj, pf_exp);
      foreach (written[i]) written[i] = 0;
      @(negedge clk); start_filt = 1; t0 = cyc;
      @(negedge clk); start_filt = 0;
      wait (filt_done);
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (longint'(got[i]) != pf_exp[i] || written[i] != 1) begin
          failures++;
          if (failures < 10) $display("r=%0d i=%0d pf=%0d exp=%0d n=%0d", r, i, got[i], pf_exp[i], written[i]);
        end
      end
      // time: FFT (1 + N + 3 + LAT + N) overlapped with IFFT load, then
      // IFFT (1 + N + 3 + LAT + N) from the first FFT output, plus the output
      // register and the done flag
      checks++;
      if (t_done - t0 != 2 * (N + 3 + LAT) + N + 4) begin
        failures++; $display("filtration time %0d", t_done - t0);
      end
      $display("filtration time %0d clocks", t_done - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
