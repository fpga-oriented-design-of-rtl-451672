// fdtd_tile_pipeline: one FDTD kernel pipeline working on one overlapped tile at a time.
//
// For a tile of TILE_W x TILE_H cells it runs the three phases of the overlapped-tiling flow:
//  1. LOAD: read the tile and its ghost zone, LW x LH = (TILE_W+2*TSTEP) x (TILE_H+2*TSTEP)
//     cells, from the source buffer in global memory into field copy 0 of the local memory
//     (tile_mem, one per field). Ghost-zone cells outside the N x N grid are not read.
//  2. COMPUTE: TSTEP time steps entirely in local memory, by TSTEP chained step stages
//     (fdtd_step_stage), the time-step loop unrolled in hardware. Stage k reads field copy k
//     and writes copy k+1; it streams over the local area one cell per clock and starts a fixed
//     lag after stage k-1, so all stages work at once on different rows (a wavefront in time).
//     Neighbours outside the local area read as zero; the error this causes moves inwards by
//     one cell per step, so after TSTEP steps the TILE_W x TILE_H core is exact. A pass with
//     fewer steps sets the last stages to copy their input unchanged.
//  3. STORE: write the core cells (Ez, Hx, Hy) of copy TSTEP to the destination buffer, one
//     per clock; the local read address runs one cell ahead whenever a write is accepted.
//
// Global memory cell address = buf*MAX_N*MAX_N + y*MAX_N + x. Requests use a valid/ready
// handshake (mem_req_valid/ready, mem_req); read data returns in request order on
// mem_resp_valid/mem_resp_rdata with any latency. `start` is taken only while `idle`; `done`
// pulses for one clock when the tile is stored.
//
// Timing: LOAD takes one clock per accepted request plus the memory latency; COMPUTE takes
// COMP_CYC = (TSTEP-1)*(LW+14) + (LW+8) + LW*LH + 6 clocks whatever the number of steps
// (1036 for the defaults); STORE takes one clock per core cell plus one when the memory does not stall.
//
// Following the document: the 32 x 8 tile, TSTEP = 5, the (n+2t) x (m+2t) local area, the
// unrolled time-step loop with one E and two H update units (four multipliers) per step, the
// E-then-H order of a step, the perfect-conductor edge and the +/-1 source at (N/2, N/2). This
// design's own: a separate field copy per step, the streaming order and lags, the store rate,
// ping-pong buffers in global memory and the source period as a power of two.
module fdtd_tile_pipeline
  import fdtd_pkg::*;
#(
  parameter int unsigned TILE_W = TILE_W_DEF,
  parameter int unsigned TILE_H = TILE_H_DEF,
  parameter int unsigned TSTEP  = TSTEP_DEF,
  parameter int unsigned MAX_N  = MAX_N_DEF,
  localparam int unsigned CW    = $clog2(MAX_N) + 2,
  localparam int unsigned SW    = $clog2(TSTEP + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // tile command
  input  logic              start,
  input  logic [CW-1:0]     tile_x0,        // global x of the tile's first core cell
  input  logic [CW-1:0]     tile_y0,
  input  logic [SW-1:0]     steps,          // time steps for this pass, 1..TSTEP
  input  logic [31:0]       t_base,         // global time step of the first of them
  input  logic [CW-1:0]     grid_n,         // N
  input  logic              src_buf,        // buffer read; the other one is written
  input  logic [4:0]        src_half_log2,  // source half period = 2**src_half_log2 steps
  input  coef_t             coef,
  output logic              idle,
  output logic              done,
  // global memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output gmem_req_t         mem_req,
  input  logic              mem_resp_valid,
  input  cell_t             mem_resp_rdata
);

  localparam int unsigned LW        = TILE_W + 2 * TSTEP;
  localparam int unsigned LH        = TILE_H + 2 * TSTEP;
  localparam int unsigned DEPTH     = LW * LH;
  localparam int unsigned AW        = $clog2(DEPTH);
  localparam int unsigned XW        = $clog2(LW + 1);
  localparam int unsigned YW        = $clog2(LH + 1);
  localparam int unsigned H_LAG     = LW + 8;
  localparam int unsigned STAGE_LAG = H_LAG + 6;
  localparam int unsigned COMP_CYC  = (TSTEP - 1) * STAGE_LAG + H_LAG + DEPTH + 6;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMP, S_STORE} state_t;
  state_t state;

  // latched command
  logic signed [CW:0] ox, oy;          // global coordinate of local (0,0)
  logic [CW-1:0]      n_q;
  logic [SW-1:0]      steps_q;
  logic [31:0]        tb_q;
  logic               buf_q;
  logic [4:0]         hl_q;
  coef_t              coef_q;

  // load clip window (local coordinates, inclusive)
  logic [XW-1:0] lx_lo, lx_hi;
  logic [YW-1:0] ly_hi;

  // iterators
  logic [XW-1:0] rq_x, rs_x, st_x;
  logic [YW-1:0] rq_y, rs_y, st_y;
  logic          rq_done;
  logic          st_have;
  logic          st_fire;
  logic [XW-1:0] st_nx, st_rx;
  logic [YW-1:0] st_ny, st_ry;
  logic [15:0]   comp_t;
  logic          comp_run;

  function automatic logic [AW-1:0] laddr(input logic [XW-1:0] x, input logic [YW-1:0] y);
    return AW'(y * LW + x);
  endfunction

  function automatic logic [GADDR_W-1:0] gaddr(input logic b, input logic signed [CW:0] gx,
                                               input logic signed [CW:0] gy);
    return GADDR_W'(b) * GADDR_W'(MAX_N * MAX_N) + GADDR_W'(gy) * GADDR_W'(MAX_N) + GADDR_W'(gx);
  endfunction

  // ---------------------------------------------------------------- local memory: copies 0..TSTEP
  logic [AW-1:0] ez_ra [TSTEP+1][4];
  logic [31:0]   ez_rd [TSTEP+1][4];
  logic [AW-1:0] hx_ra [TSTEP+1][3];
  logic [31:0]   hx_rd [TSTEP+1][3];
  logic [AW-1:0] hy_ra [TSTEP+1][3];
  logic [31:0]   hy_rd [TSTEP+1][3];
  logic          ez_we [TSTEP+1];
  logic          h_we  [TSTEP+1];
  logic [AW-1:0] ez_wa [TSTEP+1];
  logic [AW-1:0] h_wa  [TSTEP+1];
  logic [31:0]   ez_wd [TSTEP+1];
  logic [31:0]   hx_wd [TSTEP+1];
  logic [31:0]   hy_wd [TSTEP+1];

  for (genvar j = 0; j <= TSTEP; j++) begin : g_copy
    tile_mem #(.DEPTH(DEPTH), .NRD(4)) u_ez (.clk, .we(ez_we[j]), .wr_addr(ez_wa[j]),
                                             .wr_data(ez_wd[j]), .rd_addr(ez_ra[j]), .rd_data(ez_rd[j]));
    tile_mem #(.DEPTH(DEPTH), .NRD(3)) u_hx (.clk, .we(h_we[j]), .wr_addr(h_wa[j]),
                                             .wr_data(hx_wd[j]), .rd_addr(hx_ra[j]), .rd_data(hx_rd[j]));
    tile_mem #(.DEPTH(DEPTH), .NRD(3)) u_hy (.clk, .we(h_we[j]), .wr_addr(h_wa[j]),
                                             .wr_data(hy_wd[j]), .rd_addr(hy_ra[j]), .rd_data(hy_rd[j]));
  end

  // copy 0 is written by LOAD
  assign ez_we[0] = (state == S_LOAD) && mem_resp_valid;
  assign h_we[0]  = (state == S_LOAD) && mem_resp_valid;
  assign ez_wa[0] = laddr(rs_x, rs_y);
  assign h_wa[0]  = laddr(rs_x, rs_y);
  assign ez_wd[0] = mem_resp_rdata.ez;
  assign hx_wd[0] = mem_resp_rdata.hx;
  assign hy_wd[0] = mem_resp_rdata.hy;

  // copy 0 has no H part writing it, so its extra Ez ports are idle; copy TSTEP is read by STORE
  assign ez_ra[0][1] = '0;
  assign ez_ra[0][2] = '0;
  assign ez_ra[0][3] = '0;
  // STORE reads the cell it will present next clock: the next one when a write is accepted
  assign st_fire = (state == S_STORE) && st_have && mem_req_ready;
  assign st_nx   = (st_x == XW'(TSTEP + TILE_W - 1)) ? XW'(TSTEP) : st_x + 1'b1;
  assign st_ny   = (st_x == XW'(TSTEP + TILE_W - 1)) ? st_y + 1'b1 : st_y;
  assign st_rx   = st_fire ? st_nx : st_x;
  assign st_ry   = st_fire ? st_ny : st_y;
  assign ez_ra[TSTEP][0] = laddr(st_rx, st_ry);
  assign hx_ra[TSTEP][0] = laddr(st_rx, st_ry);
  assign hy_ra[TSTEP][0] = laddr(st_rx, st_ry);
  assign hx_ra[TSTEP][1] = '0;
  assign hx_ra[TSTEP][2] = '0;
  assign hy_ra[TSTEP][1] = '0;
  assign hy_ra[TSTEP][2] = '0;

  // ---------------------------------------------------------------- step stages
  for (genvar k = 0; k < TSTEP; k++) begin : g_stage
    fdtd_step_stage #(.K(k), .LW(LW), .LH(LH), .CW(CW)) u_stage (
      .clk, .rst_n, .comp_t, .comp_run, .ox, .oy, .grid_n(n_q),
      .n_step(tb_q + 32'(k)), .src_half_log2(hl_q), .bypass(32'(steps_q) <= k), .coef(coef_q),
      .e_ra_ez(ez_ra[k][0]), .e_ra_hx_c(hx_ra[k][0]), .e_ra_hx_m(hx_ra[k][1]),
      .e_ra_hy_c(hy_ra[k][0]), .e_ra_hy_m(hy_ra[k][1]),
      .e_rd_ez(ez_rd[k][0]), .e_rd_hx_c(hx_rd[k][0]), .e_rd_hx_m(hx_rd[k][1]),
      .e_rd_hy_c(hy_rd[k][0]), .e_rd_hy_m(hy_rd[k][1]),
      .h_ra_ez_c(ez_ra[k+1][1]), .h_ra_ez_yp(ez_ra[k+1][2]), .h_ra_ez_xp(ez_ra[k+1][3]),
      .h_ra_hx(hx_ra[k][2]), .h_ra_hy(hy_ra[k][2]),
      .h_rd_ez_c(ez_rd[k+1][1]), .h_rd_ez_yp(ez_rd[k+1][2]), .h_rd_ez_xp(ez_rd[k+1][3]),
      .h_rd_hx(hx_rd[k][2]), .h_rd_hy(hy_rd[k][2]),
      .ez_we(ez_we[k+1]), .ez_wa(ez_wa[k+1]), .ez_wd(ez_wd[k+1]),
      .h_we(h_we[k+1]), .h_wa(h_wa[k+1]), .hx_wd(hx_wd[k+1]), .hy_wd(hy_wd[k+1])
    );
  end

  // ---------------------------------------------------------------- global memory requests
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req.we    = 1'b0;
    mem_req.addr  = gaddr(buf_q, ox + $signed((CW+1)'(rq_x)), oy + $signed((CW+1)'(rq_y)));
    mem_req.wdata = '{ez: ez_rd[TSTEP][0], hx: hx_rd[TSTEP][0], hy: hy_rd[TSTEP][0]};
    if (state == S_LOAD) begin
      mem_req_valid = !rq_done;
    end else if (state == S_STORE) begin
      mem_req_valid = st_have;
      mem_req.we    = 1'b1;
      mem_req.addr  = gaddr(!buf_q, ox + $signed((CW+1)'(st_x)), oy + $signed((CW+1)'(st_y)));
    end
  end

  assign idle     = (state == S_IDLE);
  assign comp_run = (state == S_COMP);

  // ---------------------------------------------------------------- control
  logic signed [CW:0]   ox_d, oy_d;
  logic signed [CW+1:0] hx_d, hy_d;
  assign ox_d = $signed((CW+1)'(tile_x0)) - (CW+1)'(TSTEP);
  assign oy_d = $signed((CW+1)'(tile_y0)) - (CW+1)'(TSTEP);
  // last in-grid local coordinate: N - 1 - o
  assign hx_d = $signed((CW+2)'(grid_n)) - 1 - ox_d;
  assign hy_d = $signed((CW+2)'(grid_n)) - 1 - oy_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      rq_done <= 1'b1;
      st_have <= 1'b0;
      comp_t  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ox      <= ox_d;
          oy      <= oy_d;
          n_q     <= grid_n;
          steps_q <= steps;
          tb_q    <= t_base;
          buf_q   <= src_buf;
          hl_q    <= src_half_log2;
          coef_q  <= coef;
          lx_lo   <= (ox_d < 0) ? XW'(-ox_d) : '0;
          lx_hi   <= (hx_d > $signed((CW+2)'(LW - 1))) ? XW'(LW - 1) : XW'(hx_d);
          ly_hi   <= (hy_d > $signed((CW+2)'(LH - 1))) ? YW'(LH - 1) : YW'(hy_d);
          rq_x    <= (ox_d < 0) ? XW'(-ox_d) : '0;
          rq_y    <= (oy_d < 0) ? YW'(-oy_d) : '0;
          rs_x    <= (ox_d < 0) ? XW'(-ox_d) : '0;
          rs_y    <= (oy_d < 0) ? YW'(-oy_d) : '0;
          rq_done <= 1'b0;
          state   <= S_LOAD;
        end
        S_LOAD: begin
          if (mem_req_valid && mem_req_ready) begin
            if (rq_x == lx_hi) begin
              rq_x <= lx_lo;
              if (rq_y == ly_hi) rq_done <= 1'b1;
              else               rq_y    <= rq_y + 1'b1;
            end else begin
              rq_x <= rq_x + 1'b1;
            end
          end
          if (mem_resp_valid) begin
            if (rs_x == lx_hi) begin
              rs_x <= lx_lo;
              if (rs_y == ly_hi) begin
                comp_t <= '0;
                state  <= S_COMP;
              end else begin
                rs_y <= rs_y + 1'b1;
              end
            end else begin
              rs_x <= rs_x + 1'b1;
            end
          end
        end
        S_COMP: begin
          comp_t <= comp_t + 1'b1;
          if (comp_t == 16'(COMP_CYC - 1)) begin
            st_x    <= XW'(TSTEP);
            st_y    <= YW'(TSTEP);
            st_have <= 1'b0;
            state   <= S_STORE;
          end
        end
        S_STORE: begin
          st_have <= 1'b1;
          if (st_fire) begin
            st_x <= st_nx;
            st_y <= st_ny;
            if (st_x == XW'(TSTEP + TILE_W - 1) && st_y == YW'(TSTEP + TILE_H - 1)) begin
              st_have <= 1'b0;
              done    <= 1'b1;
              state   <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A response may only arrive for a read that was requested.
  a_resp_in_load: assert property (@(posedge clk) disable iff (!rst_n)
                                   mem_resp_valid |-> state == S_LOAD);
  a_steps_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == S_IDLE && start) |-> (steps >= 1 && steps <= SW'(TSTEP)));

endmodule
