// bp_interp: linear interpolation of the back-projector with one multiplier.
//
// Computes imn = P(a) + f * (P(a+1) - P(a)), f = tfr / 2^14, on (1,4,11)
// samples. The difference is kept one bit wider than the samples so that it
// cannot wrap; the product (1,5,25) is rounded to 11 fraction bits, added to
// P(a) and saturated to the 16-bit (1,4,11) result.
//
// Timing: three register stages. A pixel presented with in_valid (d0/d1
// being the PPDM outputs for that pixel, tfr and addr delayed to match)
// leaves on out_valid/imn/out_addr three clocks later; one pixel per clock.
module bp_interp #(
  parameter int AW = 18
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic                               in_last,
  input  logic        [ct_pkg::TFR_W-1:0]    tfr,
  input  logic signed [ct_pkg::PF_W-1:0]     d0,
  input  logic signed [ct_pkg::PF_W-1:0]     d1,
  input  logic        [AW-1:0]               in_addr,
  output logic                               out_valid,
  output logic                               out_last,
  output logic signed [ct_pkg::PF_W-1:0]     imn,
  output logic        [AW-1:0]               out_addr
);
  import ct_pkg::*;

  logic signed [PF_W:0]          diff1;
  logic signed [PF_W-1:0]        p0_1, p0_2;
  logic        [TFR_W-1:0]       f1;
  logic signed [PF_W+TFR_W+1:0]  prod2;
  logic signed [PF_W+TFR_W+1:0]  rnd;
  logic signed [PF_W+2:0]        sum;
  logic [2:0]                    v, l;
  logic [AW-1:0]                 a1, a2;

  assign rnd = (prod2 + (1 <<< (TFR_W - 1))) >>> TFR_W;
  assign sum = (PF_W+3)'(p0_2) + (PF_W+3)'(rnd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      l <= '0;
    end else begin
      v <= {v[1:0], in_valid};
      l <= {l[1:0], in_last && in_valid};
    end
  end

  always_ff @(posedge clk) begin
    // stage 1: subtract
    diff1 <= (PF_W+1)'(d1) - (PF_W+1)'(d0);
    p0_1  <= d0;
    f1    <= tfr;
    a1    <= in_addr;
    // stage 2: multiply by the interpolation factor
    prod2 <= diff1 * $signed({1'b0, f1});
    p0_2  <= p0_1;
    a2    <= a1;
    // stage 3: round, add, saturate
    imn      <= PF_W'(sat(longint'(sum), PF_W));
    out_addr <= a2;
  end

  assign out_valid = v[2];
  assign out_last  = l[2];
endmodule
