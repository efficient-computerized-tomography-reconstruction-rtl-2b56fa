// tb_t_gen: one 256x128 segment at several angles; checks every pixel's
// tint/tfr against x*cos + y*sin, the row-by-row scan order and address,
// the two-clock start latency and the W*H pixel count.
module tb_t_gen;
  localparam int X0 = 0, Y0 = 127, W = 256, H = 128;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [15:0] cos_i, sin_i;
  logic valid, last, busy;
  logic signed [10:0] tint;
  logic [13:0] tfr;
  logic [14:0] addr;
  int checks = 0, failures = 0, cyc = 0, start_cyc, n;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  t_gen #(.X0(X0), .Y0(Y0), .W(W), .H(H)) dut (.*);
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int angs[4] = '{0, 300, 512, 901};
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (angs[j]) begin
      int c, s, x, y;
      longint t;
      c = tb_ref_pkg::trig_q14(angs[j], 1024, 0);
      s = tb_ref_pkg::trig_q14(angs[j], 1024, 1);
      @(negedge clk); start = 1; cos_i = 16'(c); sin_i = 16'(s); start_cyc = cyc;
      @(negedge clk); start = 0; cos_i = '0; sin_i = '0;
      n = 0;
      while (n < W * H) begin
        @(posedge clk); #1;
        if (valid) begin
          if (n == 0) begin
            checks++;
            if (cyc - start_cyc != 2) begin failures++; $display("latency %0d", cyc - start_cyc); end
          end
          x = X0 + n % W; y = Y0 - n / W;
          t = longint'(x) * c + longint'(y) * s;
          checks++;
          if (longint'(tint) != (t >>> 14) || longint'(tfr) != (t & 16383) ||
              int'(addr) != n || last != (n == W * H - 1)) begin
            failures++;
            if (failures < 10) $display("n=%0d tint=%0d tfr=%0d exp t=%0d", n, tint, tfr, t);
          end
          n++;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (valid || busy) begin failures++; $display("extra pixels"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
