// fdtd_controller: the time-step and tile loops of the overlapped-tiling FDTD flow.
//
// After `start` it runs the outer loop of the flow: while fewer than total_steps time steps are
// done, it hands every tile of the N x N grid (tiles of TILE_W x TILE_H, x fastest) to a free
// kernel pipeline with steps = min(TSTEP, total_steps - n), waits until all pipelines are idle,
// adds `steps` to n and swaps the two field buffers in global memory (the pass reads one and
// writes the other, so no tile reads a ghost zone that a neighbour has already overwritten).
// When n reaches total_steps it pulses `done` and reports in result_buf the buffer that holds
// the final fields. The fields must be in buffer 0 before `start` (the host's initial transfer).
//
// Dispatch: at most one tile per clock. A pipeline is given a tile when its `p_idle` is high and
// it was not started in the clock before; p_start is a one-clock pulse and the command signals
// (tile origin, steps, t_base, src_buf) are valid with it.
//
// The loop structure (load, TSTEP steps in local memory, store, repeat until the last time step)
// follows the flowchart; running it in hardware rather than from the host, the ping-pong
// buffers and the handling of a last pass shorter than TSTEP are this design's own choices.
module fdtd_controller
  import fdtd_pkg::*;
#(
  parameter int unsigned NP     = 1,
  parameter int unsigned TILE_W = TILE_W_DEF,
  parameter int unsigned TILE_H = TILE_H_DEF,
  parameter int unsigned TSTEP  = TSTEP_DEF,
  parameter int unsigned MAX_N  = MAX_N_DEF,
  localparam int unsigned CW    = $clog2(MAX_N) + 2,
  localparam int unsigned SW    = $clog2(TSTEP + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [31:0]    total_steps,
  input  logic [CW-1:0]  grid_n,
  output logic           busy,
  output logic           done,
  output logic           result_buf,
  // to the kernel pipelines
  input  logic           p_idle  [NP],
  output logic           p_start [NP],
  output logic [CW-1:0]  tile_x0,
  output logic [CW-1:0]  tile_y0,
  output logic [SW-1:0]  steps,
  output logic [31:0]    t_base,
  output logic           src_buf
);

  typedef enum logic [1:0] {C_IDLE, C_DISPATCH, C_WAIT} cstate_t;
  cstate_t state;

  logic [31:0]   n_q, tot_q;
  logic [CW-1:0] gn_q;
  logic [CW-1:0] tx, ty;
  logic          buf_q;
  logic [SW-1:0] pass_steps;
  logic [31:0]   remain;
  logic          found;
  int unsigned   sel;
  logic          all_idle;

  assign remain     = tot_q - n_q;
  assign pass_steps = (remain >= 32'(TSTEP)) ? SW'(TSTEP) : SW'(remain);
  assign busy       = (state != C_IDLE);

  always_comb begin
    found    = 1'b0;
    sel      = 0;
    all_idle = 1'b1;
    for (int p = 0; p < NP; p++) begin
      if (!p_idle[p] || p_start[p]) all_idle = 1'b0;
      if (!found && p_idle[p] && !p_start[p]) begin
        found = 1'b1;
        sel   = p;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      done       <= 1'b0;
      result_buf <= 1'b0;
      for (int p = 0; p < NP; p++) p_start[p] <= 1'b0;
    end else begin
      done <= 1'b0;
      for (int p = 0; p < NP; p++) p_start[p] <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          n_q   <= '0;
          tot_q <= total_steps;
          gn_q  <= grid_n;
          tx    <= '0;
          ty    <= '0;
          buf_q <= 1'b0;
          state <= (total_steps == 0) ? C_WAIT : C_DISPATCH;
        end
        C_DISPATCH: if (found) begin
          p_start[sel] <= 1'b1;
          tile_x0      <= tx;
          tile_y0      <= ty;
          steps        <= pass_steps;
          t_base       <= n_q;
          src_buf      <= buf_q;
          if (tx + CW'(TILE_W) >= gn_q) begin
            tx <= '0;
            if (ty + CW'(TILE_H) >= gn_q) state <= C_WAIT;
            else                          ty    <= ty + CW'(TILE_H);
          end else begin
            tx <= tx + CW'(TILE_W);
          end
        end
        C_WAIT: if (all_idle) begin
          if (n_q + 32'(pass_steps) >= tot_q) begin
            done       <= 1'b1;
            result_buf <= (tot_q == 0) ? buf_q : !buf_q;
            state      <= C_IDLE;
          end else begin
            n_q   <= n_q + 32'(pass_steps);
            buf_q <= !buf_q;
            tx    <= '0;
            ty    <= '0;
            state <= C_DISPATCH;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
