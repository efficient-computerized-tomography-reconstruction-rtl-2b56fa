// trig_rom: the COS and SIN ROMs of the back-projector.
//
// Holds cos(theta_k) and sin(theta_k) in (1,1,14) format for the NPROJ
// projection angles theta_k = k*pi/NPROJ. Both ROMs share one address and
// are read synchronously: cos_o/sin_o show the entry of addr one clock
// after it is presented. The contents are computed at elaboration by
// ct_pkg::trig_table (round(2^14 cos), round(2^14 sin)); in an FPGA they
// would be the initial contents of two block ROMs.
module trig_rom #(
  parameter int NPROJ = 1024
) (
  input  logic                         clk,
  input  logic [$clog2(NPROJ)-1:0]     addr,
  output logic signed [ct_pkg::TRIG_W-1:0] cos_o,
  output logic signed [ct_pkg::TRIG_W-1:0] sin_o
);
  import ct_pkg::*;

  localparam logic [NPROJ_MAX*TRIG_W-1:0] COS_TAB = trig_table(NPROJ, 1'b0);
  localparam logic [NPROJ_MAX*TRIG_W-1:0] SIN_TAB = trig_table(NPROJ, 1'b1);

  logic signed [TRIG_W-1:0] cos_rom [NPROJ];
  logic signed [TRIG_W-1:0] sin_rom [NPROJ];

  for (genvar k = 0; k < NPROJ; k++) begin : g_init
    assign cos_rom[k] = COS_TAB[k*TRIG_W +: TRIG_W];
    assign sin_rom[k] = SIN_TAB[k*TRIG_W +: TRIG_W];
  end

  always_ff @(posedge clk) begin
    cos_o <= cos_rom[addr];
    sin_o <= sin_rom[addr];
  end
endmodule
