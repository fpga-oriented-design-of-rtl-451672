// gmem_interconnect: global-memory interconnection between NP kernel pipelines and one
// memory-controller port.
//
// A round-robin arbiter passes one pipeline's request per clock to the memory port (valid/ready).
// For every read it passes, it pushes the pipeline's index into an order FIFO of FIFO_DEPTH
// entries; since the memory answers reads in order, each read response is routed to the
// pipeline at the FIFO's head, which is then popped. Reads are held back while the FIFO is full.
// Writes need no response and are not recorded.
//
// Timing: a granted request reaches the memory port combinationally; the grant pointer moves
// past the winner after each accepted request. A response is routed in the clock it arrives.
//
// The existence of this interconnect between the kernel pipelines and the memory controller
// follows the architecture model; the arbitration policy and the ordering FIFO are this
// design's own.
module gmem_interconnect
  import fdtd_pkg::*;
#(
  parameter int unsigned NP         = 1,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned IW        = (NP > 1) ? $clog2(NP) : 1,
  localparam int unsigned FW        = $clog2(FIFO_DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  // pipeline side
  input  logic        p_req_valid [NP],
  output logic        p_req_ready [NP],
  input  gmem_req_t   p_req       [NP],
  output logic        p_resp_valid [NP],
  output cell_t       p_resp_rdata [NP],
  // memory-controller side
  output logic        m_req_valid,
  input  logic        m_req_ready,
  output gmem_req_t   m_req,
  input  logic        m_resp_valid,
  input  cell_t       m_resp_rdata
);

  logic [IW-1:0] rr_q;            // highest-priority requester
  logic [IW-1:0] gnt;
  logic          any;
  logic [IW-1:0] ord [FIFO_DEPTH];
  logic [FW-1:0] wp, rp;
  logic [FW:0]   cnt;
  logic          fifo_full;
  logic          push, pop;

  assign fifo_full = (cnt == (FW+1)'(FIFO_DEPTH));

  // round-robin choice among requests that may go now
  always_comb begin
    any = 1'b0;
    gnt = rr_q;
    for (int k = 0; k < NP; k++) begin
      int unsigned idx;
      idx = (int'(rr_q) + k) % NP;
      if (!any && p_req_valid[idx] && !(fifo_full && !p_req[idx].we)) begin
        any = 1'b1;
        gnt = IW'(idx);
      end
    end
  end

  assign m_req_valid = any;
  assign m_req       = p_req[gnt];

  always_comb begin
    for (int k = 0; k < NP; k++) p_req_ready[k] = any && (gnt == IW'(k)) && m_req_ready;
  end

  assign push = any && m_req_ready && !m_req.we;
  assign pop  = m_resp_valid;

  always_comb begin
    for (int k = 0; k < NP; k++) begin
      p_resp_valid[k] = m_resp_valid && (ord[rp] == IW'(k));
      p_resp_rdata[k] = m_resp_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0;
      wp   <= '0;
      rp   <= '0;
      cnt  <= '0;
    end else begin
      if (any && m_req_ready) rr_q <= (int'(gnt) == NP - 1) ? '0 : gnt + 1'b1;
      if (push) wp <= (int'(wp) == FIFO_DEPTH - 1) ? '0 : wp + 1'b1;
      if (pop)  rp <= (int'(rp) == FIFO_DEPTH - 1) ? '0 : rp + 1'b1;
      cnt <= cnt + (FW+1)'(push) - (FW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) ord[wp] <= gnt;
  end

  // A response must belong to an outstanding read.
  a_no_orphan_resp: assert property (@(posedge clk) disable iff (!rst_n) m_resp_valid |-> cnt != 0);

endmodule
