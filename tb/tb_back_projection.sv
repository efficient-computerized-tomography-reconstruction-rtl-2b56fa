// tb_back_projection: back-projects random filtered projections over a
// 32x16 segment at several angles, with a synchronous-read memory standing in
// for the PPDM. Every pixel is compared with the fixed-point reference of
// imn = P(a) + f (P(a+1) - P(a)); also checks the six-clock start-to-pixel
// latency and the pixel count.
module tb_back_projection;
  import tb_ref_pkg::*;
  localparam int N = 1024, X0 = -48, Y0 = 100, W = 32, H = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [15:0] cos_i, sin_i, rd_d0, rd_d1, imn;
  logic [9:0] rd_add0, rd_add1;
  logic imn_valid, imn_last, busy;
  logic [8:0] imn_addr;
  longint pf[];
  int checks = 0, failures = 0, cyc = 0, start_cyc, n;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    rd_d0 <= 16'(pf[rd_add0]);
    rd_d1 <= 16'(pf[rd_add1]);
  end
  back_projection #(.NSAMP(N), .OFFSET(364), .X0(X0), .Y0(Y0), .W(W), .H(H)) dut (.*);
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int angs[5] = '{0, 128, 511, 700, 1023};
    pf = new[N];
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (angs[j]) begin
      int c, s;
      longint e;
      foreach (pf[i]) pf[i] = (j == 4) ? 32767 - (i % 3) : $signed(16'($urandom));
      c = trig_q14(angs[j], 1024, 0);
      s = trig_q14(angs[j], 1024, 1);
      @(negedge clk); start = 1; cos_i = 16'(c); sin_i = 16'(s); start_cyc = cyc;
      @(negedge clk); start = 0;
      n = 0;
      while (n < W * H) begin
        @(posedge clk); #1;
        if (imn_valid) begin
          if (n == 0) begin
            checks++;
            if (cyc - start_cyc != 6) begin failures++; $display("latency %0d", cyc - start_cyc); end
          end
          e = bp_pixel(X0 + n % W, Y0 - n / W, c, s, 364, N, pf);
          checks++;
          if (longint'(imn) != e || int'(imn_addr) != n || imn_last != (n == W * H - 1)) begin
            failures++;
            if (failures < 10) $display("ang %0d n=%0d imn=%0d exp=%0d", angs[j], n, imn, e);
          end
          n++;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (imn_valid || busy) begin failures++; $display("extra output"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
