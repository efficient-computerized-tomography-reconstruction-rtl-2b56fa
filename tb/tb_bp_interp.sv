// tb_bp_interp: random samples and fractions; checks imn = sat(P0 + round(f*(P1-P0)/2^14))
// and the three-clock latency, including back-to-back pixels.
module tb_bp_interp;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, out_valid, out_last;
  logic [13:0] tfr;
  logic signed [15:0] d0, d1, imn;
  logic [17:0] in_addr, out_addr;
  int checks = 0, failures = 0;
  longint exp_q[$];
  int addr_q[$];
  int cyc = 0, in_cyc[$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  bp_interp #(.AW(18)) dut (.*);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (out_valid && rst_n) begin
    longint e;
    int a, c0;
    e = exp_q.pop_front();
    a = addr_q.pop_front();
    c0 = in_cyc.pop_front();
    checks++;
    if (longint'(imn) != e || int'(out_addr) != a || cyc - c0 != 3) begin
      failures++;
      if (failures < 10) $display("imn=%0d exp=%0d addr %0d/%0d lat %0d", imn, e, out_addr, a, cyc - c0);
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      d0 = 16'($urandom); d1 = 16'($urandom);
      if (i < 20) begin d0 = 16'sd32767; d1 = 16'sd32767 - 16'(i); end
      if (i % 7 == 0) d1 = d0 + 16'($signed(6'($urandom)));
      tfr = 14'($urandom); if (i % 11 == 0) tfr = '1;
      in_addr = 18'(i);
      if (in_valid) begin
        exp_q.push_back(sat_w(longint'(d0) + rnd_div((longint'(d1) - longint'(d0)) * longint'(tfr), 16384), 16));
        addr_q.push_back(i); in_cyc.push_back(cyc + 1);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
