// img_accum: image memory accumulator of one image segment, with its
// controller (img_mem_cont).
//
// Back-projected images arrive pixel by pixel. They are summed in two RAMs
// used in turn: image 1 is written to the odd RAM; image 2 is added to the
// odd RAM's contents and the sum written to the even RAM; image 3 is added to
// the even RAM and written to the odd RAM, and so on, so one RAM is read
// while the other is written. To keep the sum in 16 bits, the four least
// significant bits of each (1,4,11) pixel are dropped and the rest sign
// extended to the (1,8,7) accumulator format; the addition saturates.
//
// Interface: frame_start (one clock, before the first pixel of an image)
// advances the odd/even selection; first tells that the image is the first
// one, written without adding. Pixels come on in_valid/in_pix/in_addr. The
// odd/even choice travels with each pixel, so a new image may follow the
// previous one without a gap. rd_addr/rd_data read the most recently written
// RAM (the finished image) when no image is being accumulated; rd_data
// appears one clock after rd_addr.
// Timing: each pixel is written two clocks after it arrives.
module img_accum #(
  parameter int DEPTH = 32768,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             frame_start,
  input  logic                             first,
  input  logic                             in_valid,
  input  logic signed [ct_pkg::PF_W-1:0]   in_pix,
  input  logic [AW-1:0]                    in_addr,
  input  logic [AW-1:0]                    rd_addr,
  output logic signed [ct_pkg::ACC_W-1:0]  rd_data,
  output logic                             odd_even,
  output logic                             busy
);
  import ct_pkg::*;

  // odd_even = 1 while an odd-numbered image is accumulated (written to the
  // odd RAM, reading the even RAM).
  logic cur_odd, cur_first;
  logic last_odd;   // RAM holding the latest finished sum (1 = odd)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_odd   <= 1'b0;
      cur_first <= 1'b0;
    end else if (frame_start) begin
      cur_odd   <= first ? 1'b1 : ~cur_odd;
      cur_first <= first;
    end
  end
  assign odd_even = cur_odd;

  // Stage A: read the previous sum.
  logic                    va, odd_a, first_a;
  logic [AW-1:0]           addr_a;
  logic signed [ACC_W-1:0] pix_a;
  // Stage B: add and write.
  logic signed [ACC_W-1:0] dout_odd, dout_even, prev, din;
  logic signed [ACC_W+1:0] s;
  logic [AW-1:0]           raddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va       <= 1'b0;
      last_odd <= 1'b0;
    end else begin
      va <= in_valid;
      if (va) last_odd <= odd_a;
    end
  end
  always_ff @(posedge clk) begin
    odd_a   <= cur_odd;
    first_a <= cur_first;
    addr_a  <= in_addr;
    pix_a   <= ACC_W'(in_pix >>> 4);   // (1,4,11) -> (1,4,7), sign extended
  end

  assign raddr = in_valid ? in_addr : rd_addr;
  assign prev  = odd_a ? dout_even : dout_odd;
  assign s     = first_a ? (ACC_W+2)'(pix_a) : (ACC_W+2)'(prev) + (ACC_W+2)'(pix_a);
  assign din   = ACC_W'(sat(longint'(s), ACC_W));

  img_ram #(.DEPTH(DEPTH), .DW(ACC_W)) u_odd (
    .clk, .we(va && odd_a), .waddr(addr_a), .wdata(din),
    .raddr, .rdata(dout_odd)
  );
  img_ram #(.DEPTH(DEPTH), .DW(ACC_W)) u_even (
    .clk, .we(va && !odd_a), .waddr(addr_a), .wdata(din),
    .raddr, .rdata(dout_even)
  );

  assign rd_data = last_odd ? dout_odd : dout_even;
  assign busy    = in_valid || va;
endmodule
