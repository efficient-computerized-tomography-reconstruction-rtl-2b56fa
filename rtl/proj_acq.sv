// proj_acq: projection memory controller (projection acquisition).
//
// Fetches one projection of the sinogram from the projection buffering
// memory into the filtration. acq_req (with proj_num) asks for projection
// proj_num; the controller raises start_filt for one clock to tell the
// filtration that a projection is ready. The filtration answers with d_wind
// (the FFT's input window) and xn_index, the sample it wants; the controller
// turns that into the memory address proj_num*NSAMP + xn_index and passes the
// returned sample on as xn_re.
//
// Timing: the memory is read synchronously with one clock of latency. The
// sample for an xn_index shows on xn_re three clocks after it: one clock to
// register the address, one in the memory, one in the output register. This
// matches an FFT core that takes its input three clocks after the index.
module proj_acq #(
  parameter int NSAMP = 1024,
  parameter int NPROJ = 1024,
  localparam int SW = $clog2(NSAMP),
  localparam int PW = $clog2(NPROJ)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             acq_req,
  input  logic [PW-1:0]                    proj_num,
  output logic                             start_filt,
  input  logic                             d_wind,
  input  logic [SW-1:0]                    xn_index,
  output logic                             mem_rd,
  output logic [PW+SW-1:0]                 mem_addr,
  input  logic signed [ct_pkg::P_W-1:0]    mem_rdata,
  output logic signed [ct_pkg::P_W-1:0]    xn_re
);
  import ct_pkg::*;

  logic [PW-1:0] proj_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      proj_q     <= '0;
      start_filt <= 1'b0;
      mem_rd     <= 1'b0;
      mem_addr   <= '0;
      xn_re      <= '0;
    end else begin
      start_filt <= acq_req;
      if (acq_req) proj_q <= proj_num;
      mem_rd   <= d_wind;
      mem_addr <= {proj_q, xn_index};
      xn_re    <= mem_rdata;
    end
  end
endmodule
