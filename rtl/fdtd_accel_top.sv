// fdtd_accel_top: FPGA accelerator for the 2-D FDTD method with overlapped tiling.
//
// The grid of N x N cells (Ez, Hx, Hy in single precision) lives in external global memory. The
// controller (fdtd_controller) walks the time loop in passes of TSTEP steps; in each pass every
// TILE_W x TILE_H tile is handed to one of NP kernel pipelines (fdtd_tile_pipeline), which loads
// the tile with its ghost zone into its local memories, advances it TSTEP steps without touching
// global memory, and writes the tile core back. The pipelines share the memory-controller port
// through the global-memory interconnection (gmem_interconnect).
//
// Host side: pulse `start` with total_steps, grid_n (N, a multiple of TILE_W and TILE_H, at most
// MAX_N), the source half period 2**src_half_log2 and the coefficients; `done` pulses at the end
// and result_buf names the buffer with the final fields. Memory side: the port of a memory
// controller: m_req_valid/m_req_ready with m_req (write enable, cell address, 96-bit cell), read
// data returned in order on m_resp_valid/m_resp_rdata. Cell address = buf*MAX_N*MAX_N +
// y*MAX_N + x. The host PC, PCI Express core, memory controller and DDR3 are outside this RTL.
//
// Defaults follow the evaluated configuration: one kernel pipeline, 32 x 8 tiles, five time
// steps per pass, grids up to 512 x 512.
module fdtd_accel_top
  import fdtd_pkg::*;
#(
  parameter int unsigned NP         = 1,
  parameter int unsigned TILE_W     = TILE_W_DEF,
  parameter int unsigned TILE_H     = TILE_H_DEF,
  parameter int unsigned TSTEP      = TSTEP_DEF,
  parameter int unsigned MAX_N      = MAX_N_DEF,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned CW        = $clog2(MAX_N) + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  // host control
  input  logic          start,
  input  logic [31:0]   total_steps,
  input  logic [CW-1:0] grid_n,
  input  logic [4:0]    src_half_log2,
  input  coef_t         coef,
  output logic          busy,
  output logic          done,
  output logic          result_buf,
  // memory-controller port
  output logic          m_req_valid,
  input  logic          m_req_ready,
  output gmem_req_t     m_req,
  input  logic          m_resp_valid,
  input  cell_t         m_resp_rdata
);

  localparam int unsigned SW = $clog2(TSTEP + 1);

  logic          p_idle  [NP];
  logic          p_start [NP];
  logic [CW-1:0] tile_x0, tile_y0;
  logic [SW-1:0] steps;
  logic [31:0]   t_base;
  logic          src_buf;

  logic          p_req_valid  [NP];
  logic          p_req_ready  [NP];
  gmem_req_t     p_req        [NP];
  logic          p_resp_valid [NP];
  cell_t         p_resp_rdata [NP];

  fdtd_controller #(.NP(NP), .TILE_W(TILE_W), .TILE_H(TILE_H), .TSTEP(TSTEP), .MAX_N(MAX_N)) u_ctrl (
    .clk, .rst_n, .start, .total_steps, .grid_n, .busy, .done, .result_buf,
    .p_idle, .p_start, .tile_x0, .tile_y0, .steps, .t_base, .src_buf
  );

  for (genvar p = 0; p < NP; p++) begin : g_pipe
    logic unused_done;
    fdtd_tile_pipeline #(.TILE_W(TILE_W), .TILE_H(TILE_H), .TSTEP(TSTEP), .MAX_N(MAX_N)) u_pipe (
      .clk, .rst_n,
      .start(p_start[p]), .tile_x0, .tile_y0, .steps, .t_base, .grid_n, .src_buf,
      .src_half_log2, .coef,
      .idle(p_idle[p]), .done(unused_done),
      .mem_req_valid(p_req_valid[p]), .mem_req_ready(p_req_ready[p]), .mem_req(p_req[p]),
      .mem_resp_valid(p_resp_valid[p]), .mem_resp_rdata(p_resp_rdata[p])
    );
  end

  gmem_interconnect #(.NP(NP), .FIFO_DEPTH(FIFO_DEPTH)) u_ic (
    .clk, .rst_n,
    .p_req_valid, .p_req_ready, .p_req, .p_resp_valid, .p_resp_rdata,
    .m_req_valid, .m_req_ready, .m_req, .m_resp_valid, .m_resp_rdata
  );

endmodule
