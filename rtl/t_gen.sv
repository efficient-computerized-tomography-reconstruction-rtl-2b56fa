// t_gen: matrix generator of the back-projector, T = X cos(theta) + Y sin(theta).
//
// Two counters scan the pixels of one image segment from its top-left corner,
// row by row: X runs X0 .. X0+W-1, and Y steps down from Y0 to Y0-H+1 each
// time X wraps. For each pixel T is formed from the latched cos/sin of the
// current angle and split into its integer part tint (floor, 11 bits) and
// fraction tfr (14 bits). A pixel address counter runs 0 .. W*H-1 in the same
// order. With X0=-256, Y0=255, W=H=512 this is the whole 512x512 image; the
// pixel-parallel design gives each segment its own X0/Y0.
//
// Timing: start (one cycle, cos_i/sin_i valid) loads the counters; the first
// pixel appears on valid/tint/tfr/addr two cycles later and one pixel follows
// per clock. last marks the final pixel; busy is high from start until the
// last pixel has left. A single clock edge is used for the product stage (the
// original design multiplied on the falling edge); this adds one register.
module t_gen #(
  parameter int X0 = -256,
  parameter int Y0 = 255,
  parameter int W  = 512,
  parameter int H  = 512,
  localparam int AW = $clog2(W*H)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                start,
  input  logic signed [ct_pkg::TRIG_W-1:0]    cos_i,
  input  logic signed [ct_pkg::TRIG_W-1:0]    sin_i,
  output logic                                valid,
  output logic                                last,
  output logic signed [ct_pkg::TINT_W-1:0]    tint,
  output logic        [ct_pkg::TFR_W-1:0]     tfr,
  output logic        [AW-1:0]                addr,
  output logic                                busy
);
  import ct_pkg::*;

  logic                     run;
  logic signed [XY_W-1:0]   x, y;
  logic        [AW-1:0]     cnt;
  logic signed [TRIG_W-1:0] c_q, s_q;
  logic signed [T_W-1:0]    t_next;
  logic                     x_end, y_end;

  assign x_end = (x == XY_W'(X0 + W - 1));
  assign y_end = (y == XY_W'(Y0 - H + 1));

  // Scan counters (stage 0).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      x   <= '0;
      y   <= '0;
      cnt <= '0;
      c_q <= '0;
      s_q <= '0;
    end else if (start) begin
      run <= 1'b1;
      x   <= XY_W'(X0);
      y   <= XY_W'(Y0);
      cnt <= '0;
      c_q <= cos_i;
      s_q <= sin_i;
    end else if (run) begin
      cnt <= cnt + 1'b1;
      if (x_end) begin
        x <= XY_W'(X0);
        y <= y - 1'b1;
        if (y_end) run <= 1'b0;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  // |X cos + Y sin| <= 363 * 2^14 fits the 25-bit (1,10,14) result.
  assign t_next = T_W'(x * c_q + y * s_q);

  // Product stage (stage 1).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      last  <= 1'b0;
      tint  <= '0;
      tfr   <= '0;
      addr  <= '0;
    end else begin
      valid <= run;
      last  <= run && x_end && y_end;
      tint  <= t_next[T_W-1 -: TINT_W];
      tfr   <= t_next[TFR_W-1:0];
      addr  <= cnt;
    end
  end

  assign busy = run || valid;
endmodule
