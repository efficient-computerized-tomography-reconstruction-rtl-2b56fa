// tb_trig_rom: checks that every cos/sin entry equals round(2^14 cos/sin(k*pi/NPROJ)),
// worked out here in floating point, and the one-clock read latency.
module tb_trig_rom;
  import tb_ref_pkg::*;
  localparam int NPROJ = 1024;
  logic clk = 0, rst_n = 0;
  logic [9:0] addr;
  logic signed [15:0] c, s;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  trig_rom #(.NPROJ(NPROJ)) dut (.clk, .addr, .cos_o(c), .sin_o(s));
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int ec, es;
    addr = 0;
    for (int k = 0; k < NPROJ; k++) begin
      @(negedge clk); addr = 10'(k);
      @(posedge clk); #1;
      ec = trig_q14(k, NPROJ, 0); es = trig_q14(k, NPROJ, 1);
      checks++;
      if (c != ec || s != es) begin
        failures++;
        if (failures < 10) $display("k=%0d cos %0d/%0d sin %0d/%0d", k, c, ec, s, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
