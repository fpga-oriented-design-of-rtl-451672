// gmem_model: behavioural model of the global memory behind the memory controller.
//
// WORDS cells of 96 bits (Ez, Hx, Hy). A request is accepted when req_ready is high; req_ready
// drops at random on about one clock in STALL_PCT percent. A read returns its cell exactly
// LATENCY clocks after acceptance, in order. Writes take effect when accepted. Testbenches read
// and write `mem` directly for the host's transfers. Counts accepted reads, writes and stalls.
module gmem_model
  import fdtd_pkg::*;
#(
  parameter int unsigned WORDS     = 4096,
  parameter int unsigned LATENCY   = 12,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  gmem_req_t  req,
  output logic       resp_valid,
  output cell_t      resp_rdata
);

  cell_t mem [WORDS];

  logic [LATENCY-1:0] v_pipe;
  cell_t              d_pipe [LATENCY];
  int unsigned        n_reads = 0, n_writes = 0, n_stalls = 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ready <= 1'b0;
      v_pipe    <= '0;
    end else begin
      req_ready <= ($urandom % 100) >= STALL_PCT;
      v_pipe    <= {v_pipe[LATENCY-2:0], req_valid && req_ready && !req.we};
      if (req_valid && !req_ready) n_stalls++;
      if (req_valid && req_ready) begin
        if (req.we) begin
          mem[req.addr] <= req.wdata;
          n_writes++;
        end else begin
          n_reads++;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    d_pipe[0] <= mem[req.addr % WORDS];
    for (int k = 1; k < LATENCY; k++) d_pipe[k] <= d_pipe[k-1];
  end

  assign resp_valid = v_pipe[LATENCY-1];
  assign resp_rdata = d_pipe[LATENCY-1];

  a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                               (req_valid && req_ready) |-> req.addr < WORDS);
endmodule
