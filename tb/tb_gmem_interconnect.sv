// tb_gmem_interconnect: three requesters share one memory port through the interconnect.
//
// Each requester issues random reads and writes in its own address region and holds a request
// until it is accepted. Checked: every read returns, to the right requester and in order, the
// data the memory held when the read was accepted; the order FIFO (4 entries, memory latency
// 10) fills and holds reads back; several requesters contend in the same clock; no requester
// waits longer than a bound while others are served.
module tb_gmem_interconnect;
  import fdtd_pkg::*;

  localparam int NP = 3, FD = 4, WORDS = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      p_req_valid [NP];
  logic      p_req_ready [NP];
  gmem_req_t p_req       [NP];
  logic      p_resp_valid [NP];
  cell_t     p_resp_rdata [NP];
  logic      m_req_valid, m_req_ready, m_resp_valid;
  gmem_req_t m_req;
  cell_t     m_resp_rdata;

  gmem_interconnect #(.NP(NP), .FIFO_DEPTH(FD)) dut (.*);
  gmem_model #(.WORDS(WORDS), .LATENCY(10), .STALL_PCT(15)) u_mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .resp_valid(m_resp_valid), .resp_rdata(m_resp_rdata));

  cell_t shadow [WORDS];
  cell_t expq [NP][$];
  int    wait_cyc [NP];
  int    checks = 0, failures = 0;
  int    n_contend = 0, n_fifo_full = 0, n_reads = 0, n_writes = 0, max_wait = 0;

  function automatic gmem_req_t new_req(input int p);
    gmem_req_t r;
    r.we    = ($urandom % 3) == 0;
    r.addr  = GADDR_W'(p * 64 + int'($urandom % 64));
    r.wdata = {$urandom, $urandom, $urandom};
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int nv;
    nv = 0;
    for (int p = 0; p < NP; p++) if (p_req_valid[p]) nv++;
    if (nv > 1) n_contend++;
    if (dut.fifo_full) n_fifo_full++;
    for (int p = 0; p < NP; p++) begin
      if (p_req_valid[p] && p_req_ready[p]) begin
        if (p_req[p].we) begin
          shadow[p_req[p].addr] = p_req[p].wdata;
          n_writes++;
        end else begin
          expq[p].push_back(shadow[p_req[p].addr]);
          n_reads++;
        end
        wait_cyc[p] = 0;
      end else if (p_req_valid[p]) begin
        wait_cyc[p]++;
        if (wait_cyc[p] > max_wait) max_wait = wait_cyc[p];
      end
      if (p_resp_valid[p]) begin
        checks++;
        if (expq[p].size() == 0 || p_resp_rdata[p] != expq[p][0]) begin
          failures++;
          if (failures < 10) $display("FAIL requester %0d: wrong or unexpected response", p);
        end
        if (expq[p].size() != 0) void'(expq[p].pop_front());
      end
    end
  end

  // requesters: new request after acceptance, at random
  bit running = 1'b1;
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (!p_req_valid[p] || p_req_ready_q[p]) begin
        p_req_valid[p] = running && ($urandom % 4) != 0;
        p_req[p]       = new_req(p);
      end
    end
  end

  logic p_req_ready_q [NP];
  always @(posedge clk) for (int p = 0; p < NP; p++) p_req_ready_q[p] <= p_req_valid[p] && p_req_ready[p];

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      shadow[a] = {32'(a), ~32'(a), 32'(a) ^ 32'h5A5A_5A5A};
      u_mem.mem[a] = shadow[a];
    end
    for (int p = 0; p < NP; p++) begin
      p_req_valid[p] = 0; p_req[p] = '0; wait_cyc[p] = 0; p_req_ready_q[p] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (8000) @(negedge clk);
    running = 1'b0;
    repeat (100) @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (expq[p].size() != 0) begin
        failures++;
        $display("FAIL requester %0d: %0d responses missing", p, expq[p].size());
      end
    end
    $display("reads %0d writes %0d contended clocks %0d fifo-full clocks %0d longest wait %0d",
             n_reads, n_writes, n_contend, n_fifo_full, max_wait);
    checks += 4;
    if (n_contend == 0)   begin failures++; $display("FAIL no contention seen"); end
    if (n_fifo_full == 0) begin failures++; $display("FAIL order FIFO never full"); end
    if (n_reads < 1000 || n_writes < 500) begin failures++; $display("FAIL too little traffic"); end
    if (max_wait > 60)    begin failures++; $display("FAIL a requester waited %0d clocks", max_wait); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
