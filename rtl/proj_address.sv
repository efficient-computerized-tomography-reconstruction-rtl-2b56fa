// proj_address: turns the integer part of T into two PPDM read addresses.
//
// tint is signed (about -363 .. 362 for a 512x512 image), so it is moved into
// the positive address range by adding OFFSET, the magnitude of the most
// negative value plus one, so that no address is zero. The two outputs are
// the successive sample addresses a and a+1 that linear interpolation needs.
// Purely combinational. A tint whose shifted address falls outside the
// projection wraps modulo 2^AW; with the default sizes this cannot happen.
module proj_address #(
  parameter int NSAMP  = 1024,
  parameter int OFFSET = 364,
  localparam int AW = $clog2(NSAMP)
) (
  input  logic signed [ct_pkg::TINT_W-1:0] tint,
  output logic        [AW-1:0]             add0,
  output logic        [AW-1:0]             add1
);
  import ct_pkg::*;
  logic signed [TINT_W+1:0] a;
  assign a    = (TINT_W+2)'(tint) + (TINT_W+2)'(OFFSET);
  assign add0 = a[AW-1:0];
  assign add1 = add0 + 1'b1;
endmodule
