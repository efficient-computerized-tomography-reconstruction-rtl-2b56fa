// back_projection: one BP block, smearing a filtered projection over one
// image segment with linear interpolation.
//
// It chains the three parts of the back-projector: t_gen scans the segment
// and produces T = X cos + Y sin per pixel, proj_address turns floor(T) into
// the two PPDM read addresses a and a+1, and bp_interp blends the two samples
// read back with the fraction of T. The PPDM itself sits outside (it is
// shared with the filtration write side), so its read port is on this
// module's boundary.
//
// Timing: start (with cos_i/sin_i) begins a segment. Read addresses leave two
// clocks after start, the PPDM answers one clock later, and imn/imn_addr
// appear with imn_valid six clocks after start, one pixel per clock for
// W*H clocks; imn_last marks the final pixel. busy covers the whole run.
module back_projection #(
  parameter int NSAMP  = 1024,
  parameter int OFFSET = 364,
  parameter int X0 = -256,
  parameter int Y0 = 255,
  parameter int W  = 512,
  parameter int H  = 512,
  localparam int AW = $clog2(W*H),
  localparam int SW = $clog2(NSAMP)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  logic signed [ct_pkg::TRIG_W-1:0] cos_i,
  input  logic signed [ct_pkg::TRIG_W-1:0] sin_i,
  output logic [SW-1:0]                    rd_add0,
  output logic [SW-1:0]                    rd_add1,
  input  logic signed [ct_pkg::PF_W-1:0]   rd_d0,
  input  logic signed [ct_pkg::PF_W-1:0]   rd_d1,
  output logic                             imn_valid,
  output logic                             imn_last,
  output logic signed [ct_pkg::PF_W-1:0]   imn,
  output logic [AW-1:0]                    imn_addr,
  output logic                             busy
);
  import ct_pkg::*;

  logic                     t_valid, t_last, t_busy;
  logic signed [TINT_W-1:0] tint;
  logic [TFR_W-1:0]         tfr, tfr_d;
  logic [AW-1:0]            taddr, taddr_d;
  logic                     v_d, l_d;

  t_gen #(.X0(X0), .Y0(Y0), .W(W), .H(H)) u_tgen (
    .clk, .rst_n, .start, .cos_i, .sin_i,
    .valid(t_valid), .last(t_last), .tint, .tfr, .addr(taddr), .busy(t_busy)
  );

  proj_address #(.NSAMP(NSAMP), .OFFSET(OFFSET)) u_addr (
    .tint, .add0(rd_add0), .add1(rd_add1)
  );

  // Match the one-clock PPDM read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= 1'b0;
      l_d <= 1'b0;
    end else begin
      v_d <= t_valid;
      l_d <= t_last;
    end
  end
  always_ff @(posedge clk) begin
    tfr_d   <= tfr;
    taddr_d <= taddr;
  end

  bp_interp #(.AW(AW)) u_interp (
    .clk, .rst_n, .in_valid(v_d), .in_last(l_d), .tfr(tfr_d),
    .d0(rd_d0), .d1(rd_d1), .in_addr(taddr_d),
    .out_valid(imn_valid), .out_last(imn_last), .imn, .out_addr(imn_addr)
  );

  logic [3:0] tail;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tail <= '0;
    else        tail <= {tail[2:0], t_busy};
  end
  assign busy = t_busy || (|tail);
endmodule
