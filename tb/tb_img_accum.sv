// tb_img_accum: accumulates six random images (the first written, the rest
// added, back to back with no idle clock between images) and after the third
// and sixth image reads the finished sum back and compares it with
// sum(sat16(prev + (pix >> 4))). Also checks the odd/even alternation.
module tb_img_accum;
  import tb_ref_pkg::*;
  localparam int D = 256;
  logic clk = 0, rst_n = 0, frame_start = 0, first = 0, in_valid = 0, odd_even, busy;
  logic signed [15:0] in_pix, rd_data;
  logic [7:0] in_addr, rd_addr = 0;
  longint acc [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  img_accum #(.DEPTH(D)) dut (.*);
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic readback();
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    for (int a = 0; a < D; a++) begin
      @(negedge clk); rd_addr = 8'(a);
      @(posedge clk); #1;
      checks++;
      if (longint'(rd_data) != acc[a]) begin
        failures++;
        if (failures < 10) $display("a=%0d got %0d exp %0d", a, rd_data, acc[a]);
      end
    end
  endtask
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); frame_start = 1; first = 1;
    for (int img = 0; img < 6; img++) begin
      // frame_start is either alone (after a readback) or shares the clock
      // with the previous image's last pixel
      @(negedge clk); frame_start = 0; first = 0;
      checks++;
      if (odd_even != (img % 2 == 0)) begin failures++; $display("odd_even wrong at %0d", img); end
      for (int a = 0; a < D; a++) begin
        int p;
        p = $signed(16'($urandom));
        if (img == 1 && a < 8) p = 32767;      // drive some pixels to saturation
        in_valid = 1; in_addr = 8'(D - 1 - a); in_pix = 16'(p);
        acc[D - 1 - a] = (img == 0) ? (longint'(p) >>> 4) : sat_w(acc[D - 1 - a] + (longint'(p) >>> 4), 16);
        if (a == D - 1 && img != 2 && img != 5) frame_start = 1;
        if (a != D - 1) @(negedge clk);
      end
      if (img == 2 || img == 5) begin
        readback();
        @(negedge clk); frame_start = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
