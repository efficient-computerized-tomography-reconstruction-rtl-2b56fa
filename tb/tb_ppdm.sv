// tb_ppdm: writes projections into one bank while reading the other, swaps,
// and checks that both read ports return the data written before the swap,
// one clock after the address, and that a write never reaches the read bank.
module tb_ppdm;
  localparam int D = 1024;
  logic clk = 0, rst_n = 0, swap = 0, we = 0, wbank;
  logic [9:0] waddr, raddr0, raddr1;
  logic [15:0] wdata, rdata0, rdata1;
  int checks = 0, failures = 0;
  logic [15:0] ref_mem [2][D];   // [bank][addr]
  always #5 clk = ~clk;
  ppdm #(.DEPTH(D), .DW(16)) dut (.*);
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      // write projection r into the write bank while reading the read bank
      for (int i = 0; i < D; i++) begin
        int a0, a1;
        @(negedge clk);
        we = 1; waddr = 10'(i); wdata = 16'($urandom);
        a0 = $urandom % D; a1 = (a0 + 1) % D;
        raddr0 = 10'(a0); raddr1 = 10'(a1);
        @(posedge clk); #1;
        ref_mem[r % 2][i] = wdata;
        if (r > 0) begin
          checks++;
          if (rdata0 != ref_mem[(r + 1) % 2][a0] || rdata1 != ref_mem[(r + 1) % 2][a1]) begin
            failures++;
            if (failures < 10) $display("r=%0d a=%0d got %h %h", r, a0, rdata0, rdata1);
          end
        end
      end
      checks++;
      if (wbank != 1'(r % 2)) failures++;
      @(negedge clk); we = 0; swap = 1;
      @(negedge clk); swap = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
