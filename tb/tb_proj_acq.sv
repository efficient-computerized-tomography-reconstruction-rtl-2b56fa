// tb_proj_acq: requests projections of a 16 x 64 sinogram held in a
// synchronous memory model; checks the start_filt pulse, the addresses and
// that each sample reaches xn_re exactly three clocks after its xn_index.
module tb_proj_acq;
  localparam int NS = 64, NP = 16;
  logic clk = 0, rst_n = 0, acq_req = 0, start_filt, d_wind = 0, mem_rd;
  logic [3:0] proj_num;
  logic [5:0] xn_index;
  logic [9:0] mem_addr;
  logic signed [15:0] mem_rdata, xn_re;
  int checks = 0, failures = 0, cyc = 0, nstart = 0;
  int idx_cyc [int];
  function automatic logic [15:0] sample(input int a);
    return 16'(a * 37 + 5);
  endfunction
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) mem_rdata <= (mem_rd ? sample(int'(mem_addr)) : 16'hdead);
  always @(posedge clk) if (start_filt && rst_n) nstart++;
  proj_acq #(.NSAMP(NS), .NPROJ(NP)) dut (.*);
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int pr[3] = '{3, 0, 15};
    logic [15:0] hist [$];
    repeat (3) @(posedge clk); rst_n = 1;
    foreach (pr[j]) begin
      @(negedge clk); acq_req = 1; proj_num = 4'(pr[j]);
      @(negedge clk); acq_req = 0; proj_num = 4'($urandom);
      checks++;
      if (!start_filt) begin failures++; $display("no start_filt"); end
      repeat (2) @(negedge clk);
      // the FFT input window: index k in clock k, its sample on xn_re in clock k+3, seen here right after the edge that ends clock k+2
      for (int k = 0; k < NS + 2; k++) begin
        d_wind = (k < NS); xn_index = 6'(k);
        @(posedge clk); #1;
        if (k >= 2) begin
          checks++;
          if (xn_re !== $signed(sample(pr[j] * NS + k - 2))) begin
            failures++;
            if (failures < 10) $display("p=%0d k=%0d got %h", pr[j], k - 2, xn_re);
          end
        end
        @(negedge clk);
      end
      d_wind = 0;
    end
    checks++;
    if (nstart != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
