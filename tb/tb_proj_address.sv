// tb_proj_address: sweeps tint over its range and checks a = tint + 364 and a+1.
module tb_proj_address;
  logic signed [10:0] tint;
  logic [9:0] a0, a1;
  int checks = 0, failures = 0;
  proj_address #(.NSAMP(1024), .OFFSET(364)) dut (.tint, .add0(a0), .add1(a1));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = -364; t <= 600; t++) begin
      tint = 11'(t); #1;
      checks++;
      if (int'(a0) != ((t + 364) & 1023) || int'(a1) != ((t + 365) & 1023)) begin
        failures++;
        if (failures < 10) $display("tint=%0d a0=%0d a1=%0d", t, a0, a1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
