// fft_core_model: behavioural model of a burst-I/O FFT/IFFT core (not
// synthesizable; stands for the vendor core in simulation).
//
// start (one clock) opens an input window: for N clocks rfd=1 and xn_index
// counts 0..N-1; the sample for index k is taken from xn_re/xn_im three
// clocks after xn_index shows k. LATENCY clocks after the last sample, the
// unscaled transform (INV=1: inverse, no 1/N) is output in natural order:
// N clocks of dv=1 with xk_index, xk_re, xk_im.
module fft_core_model #(
  parameter int N       = 1024,
  parameter int IN_W    = 16,
  parameter int OUT_W   = 27,
  parameter int LATENCY = 100,
  parameter bit INV     = 1'b0,
  localparam int SW = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [IN_W-1:0]  xn_re,
  input  logic signed [IN_W-1:0]  xn_im,
  output logic                    rfd,
  output logic [SW-1:0]           xn_index,
  output logic                    dv,
  output logic [SW-1:0]           xk_index,
  output logic signed [OUT_W-1:0] xk_re,
  output logic signed [OUT_W-1:0] xk_im
);
  import tb_ref_pkg::*;

  typedef enum logic [1:0] {IDLE, LOAD, WAIT, UNLOAD} ph_t;
  ph_t ph;
  int cnt;
  logic [2:0] vd;
  logic [SW-1:0] id [3];
  longint ir[], ii[], orr[], oi[];
  int ntaken;

  initial begin
    ir = new[N]; ii = new[N];
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= IDLE; rfd <= 0; dv <= 0; xn_index <= '0; xk_index <= '0;
      xk_re <= '0; xk_im <= '0; vd <= '0; cnt <= 0; ntaken = 0;
    end else begin
      // delayed sampling of the input
      if (vd[2]) begin
        ir[id[2]] = longint'(xn_re);
        ii[id[2]] = longint'(xn_im);
        ntaken++;
      end
      vd    <= {vd[1:0], rfd};
      id[0] <= xn_index; id[1] <= id[0]; id[2] <= id[1];
      dv <= 1'b0;
      case (ph)
        IDLE: if (start) begin
          ph <= LOAD; rfd <= 1'b1; xn_index <= '0; cnt <= 0; ntaken = 0;
        end
        LOAD: begin
          if (cnt == N - 1) begin
            rfd <= 1'b0; ph <= WAIT; cnt <= 0;
          end else begin
            cnt <= cnt + 1; xn_index <= SW'(cnt + 1);
          end
        end
        WAIT: begin
          if (ntaken == N && cnt == 0) begin
            dft(N, INV, OUT_W, ir, ii, orr, oi);
          end
          if (ntaken == N) begin
            if (cnt >= LATENCY - 1) begin
              ph <= UNLOAD; cnt <= 0;
            end else cnt <= cnt + 1;
          end
        end
        UNLOAD: begin
          dv <= 1'b1;
          xk_index <= SW'(cnt);
          xk_re <= OUT_W'(orr[cnt]);
          xk_im <= OUT_W'(oi[cnt]);
          if (cnt == N - 1) ph <= IDLE;
          cnt <= cnt + 1;
        end
        default: ph <= IDLE;
      endcase
    end
  end
endmodule
