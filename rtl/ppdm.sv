// ppdm: ping-pong dual-port memory between filtration and back-projection.
//
// Two RAMs, M1 and M2, of DEPTH filtered samples. At any time one of them is
// in write mode (filled by the filtration output: we/waddr/wdata) and the
// other in read mode, where two addresses are read at once so that the
// back-projector gets P(a) and P(a+1) in the same clock. A swap pulse
// exchanges the roles at the next clock edge. After reset M1 is written.
//
// Timing: reads are synchronous, rdata0/rdata1 appear one clock after
// raddr0/raddr1. wbank shows which RAM is being written (0 = M1).
module ppdm #(
  parameter int DEPTH = 1024,
  parameter int DW    = 16,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr0,
  input  logic [AW-1:0] raddr1,
  output logic [DW-1:0] rdata0,
  output logic [DW-1:0] rdata1,
  output logic          wbank
);
  logic [DW-1:0] m1 [DEPTH];
  logic [DW-1:0] m2 [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wbank <= 1'b0;
    else if (swap) wbank <= ~wbank;
  end

  always_ff @(posedge clk) begin
    if (we && !wbank) m1[waddr] <= wdata;
    if (we &&  wbank) m2[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata0 <= wbank ? m1[raddr0] : m2[raddr0];
    rdata1 <= wbank ? m1[raddr1] : m2[raddr1];
  end
endmodule
