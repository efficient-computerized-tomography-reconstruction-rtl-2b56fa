// img_combine: forms the final image from the partial images of the
// projection groups.
//
// Every group holds a partial image split into NSEG segments, each stored
// row by row in its own accumulator. After start, this block walks through
// the segments and their pixels, reads the same address of every segment of
// every group at once (rd_addr), adds the NGRP partial values of the current
// segment and emits the sum with its position in the full image, as a raster
// index pix_index = row * IMG + col counted from the top-left pixel. The sum
// is NGRP bits wider so it cannot overflow.
//
// Timing: one pixel per clock, the first pix_valid two clocks after start;
// done pulses with the last pixel. IMG*IMG clocks in all.
module img_combine #(
  parameter int NGRP  = 5,
  parameter int IMG   = 512,
  parameter int SEG_W = 256,
  parameter int SEG_H = 128,
  localparam int SEGX  = IMG / SEG_W,
  localparam int NSEG  = SEGX * (IMG / SEG_H),
  localparam int DEPTH = SEG_W * SEG_H,
  localparam int AW    = $clog2(DEPTH),
  localparam int SGW   = (NSEG > 1) ? $clog2(NSEG) : 1,
  localparam int IW    = $clog2(IMG * IMG),
  localparam int OW    = ct_pkg::ACC_W + $clog2(NGRP + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  output logic [AW-1:0]                    rd_addr,
  input  logic signed [ct_pkg::ACC_W-1:0]  rd_data [NGRP][NSEG],
  output logic                             pix_valid,
  output logic [IW-1:0]                    pix_index,
  output logic signed [OW-1:0]             pix_value,
  output logic                             done
);
  import ct_pkg::*;

  logic           run, v1, last1;
  logic [SGW-1:0] seg, seg1;
  logic [AW-1:0]  addr1;
  logic           at_end;
  logic signed [OW-1:0] sum;
  int unsigned    row, col;

  assign at_end = (rd_addr == AW'(DEPTH - 1)) && (seg == SGW'(NSEG - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      seg     <= '0;
      rd_addr <= '0;
      v1      <= 1'b0;
      last1   <= 1'b0;
      seg1    <= '0;
      addr1   <= '0;
    end else begin
      v1    <= run;
      last1 <= run && at_end;
      seg1  <= seg;
      addr1 <= rd_addr;
      if (start) begin
        run     <= 1'b1;
        seg     <= '0;
        rd_addr <= '0;
      end else if (run) begin
        if (rd_addr == AW'(DEPTH - 1)) begin
          rd_addr <= '0;
          seg     <= seg + 1'b1;
          if (at_end) run <= 1'b0;
        end else begin
          rd_addr <= rd_addr + 1'b1;
        end
      end
    end
  end

  always_comb begin
    sum = '0;
    for (int g = 0; g < NGRP; g++) sum = sum + OW'(rd_data[g][seg1]);
    row = (32'(seg1) / SEGX) * SEG_H + 32'(addr1) / SEG_W;
    col = (32'(seg1) % SEGX) * SEG_W + 32'(addr1) % SEG_W;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_valid <= 1'b0;
      pix_index <= '0;
      pix_value <= '0;
      done      <= 1'b0;
    end else begin
      pix_valid <= v1;
      pix_index <= IW'(row * IMG + col);
      pix_value <= sum;
      done      <= last1;
    end
  end
endmodule
