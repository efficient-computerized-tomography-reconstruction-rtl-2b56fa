// img_ram: one image summation RAM (the "odd" or the "even" RAM of an image
// accumulator), DEPTH words of DW bits, one write port and one read port.
//
// Synchronous read: rdata shows the word at raddr one clock later. A write
// and a read of the same address in one clock return the old word. In the
// original system these RAMs are external memory devices; here they are an
// on-chip array so that the accumulator can be simulated and synthesized.
module img_ram #(
  parameter int DEPTH = 32768,
  parameter int DW    = 16,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
