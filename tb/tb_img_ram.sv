// tb_img_ram: random writes and reads against a reference array; checks the
// one-clock read latency and read-before-write on the same address.
module tb_img_ram;
  localparam int D = 4096;
  logic clk = 0, we = 0;
  logic [11:0] waddr, raddr;
  logic [15:0] wdata, rdata, exp_d;
  logic [15:0] ref_mem [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  img_ram #(.DEPTH(D), .DW(16)) dut (.*);
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; waddr = 12'(i); wdata = 16'($urandom); raddr = 0;
      ref_mem[i] = wdata;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      we = $urandom % 2; waddr = 12'($urandom); wdata = 16'($urandom);
      raddr = (i % 5 == 0) ? waddr : 12'($urandom);
      exp_d = ref_mem[raddr];
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata != exp_d) begin
        failures++;
        if (failures < 10) $display("raddr=%0d got %h exp %h", raddr, rdata, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
