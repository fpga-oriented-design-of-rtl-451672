// tb_fdtd_accel_top: end-to-end run of the accelerator with two kernel pipelines on a 64 x 64
// grid (MAX_N = 64) and random initial fields, 12 time steps (passes of 5, 5 and 2 steps).
//
// The host's initial transfer writes buffer 0 of the memory model; after `done` the buffer named
// by result_buf is compared cell by cell with the reference FDTD model. Each mechanism of the
// design is counted and must occur: memory back-pressure, two pipelines contending for the
// interconnect, the read-order FIFO filling up, ghost zones clipped at the grid edge, a pass
// shorter than TSTEP with its step stages bypassed, buffer swaps, the source cell and the
// perfect-conductor override.
module tb_fdtd_accel_top;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int MAX_N = 64, NP = 2, N = 64, STEPS = 12, HL = 1;
  localparam int CW = $clog2(MAX_N) + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0;
  coef_t         coef;
  logic          busy, done, result_buf;
  logic          m_req_valid, m_req_ready, m_resp_valid;
  gmem_req_t     m_req;
  cell_t         m_resp_rdata;

  fdtd_accel_top #(.NP(NP), .MAX_N(MAX_N), .FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .start, .total_steps(32'(STEPS)), .grid_n(CW'(N)), .src_half_log2(5'(HL)),
    .coef, .busy, .done, .result_buf,
    .m_req_valid, .m_req_ready, .m_req, .m_resp_valid, .m_resp_rdata
  );

  gmem_model #(.WORDS(2 * MAX_N * MAX_N), .LATENCY(14), .STALL_PCT(20)) u_mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .resp_valid(m_resp_valid), .resp_rdata(m_resp_rdata)
  );

  int checks = 0, failures = 0;
  int n_stall = 0, n_contend = 0, n_fifo_full = 0, n_clipped = 0, n_short = 0, n_swap = 0;
  int n_src = 0, n_pec = 0, n_bypass = 0, cycles = 0;
  fa_t rez, rhx, rhy;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (m_req_valid && !m_req_ready) n_stall++;
    if (dut.p_req_valid[0] && dut.p_req_valid[1]) n_contend++;
    if (dut.u_ic.fifo_full) n_fifo_full++;
    // overrides in the first step stage of each pipeline; the bypass of the last stage
    if (dut.g_pipe[0].u_pipe.g_stage[0].u_stage.e_ov && dut.g_pipe[0].u_pipe.g_stage[0].u_stage.e_otag.src) n_src++;
    if (dut.g_pipe[1].u_pipe.g_stage[0].u_stage.e_ov && dut.g_pipe[1].u_pipe.g_stage[0].u_stage.e_otag.src) n_src++;
    if (dut.g_pipe[0].u_pipe.g_stage[0].u_stage.e_ov && dut.g_pipe[0].u_pipe.g_stage[0].u_stage.e_otag.pec) n_pec++;
    if (dut.g_pipe[1].u_pipe.g_stage[0].u_stage.e_ov && dut.g_pipe[1].u_pipe.g_stage[0].u_stage.e_otag.pec) n_pec++;
    if (dut.g_pipe[0].u_pipe.g_stage[4].u_stage.e_ov && dut.g_pipe[0].u_pipe.g_stage[4].u_stage.bypass) n_bypass++;
    if (dut.g_pipe[1].u_pipe.g_stage[4].u_stage.e_ov && dut.g_pipe[1].u_pipe.g_stage[4].u_stage.bypass) n_bypass++;
    for (int p = 0; p < NP; p++) if (dut.p_start[p]) begin
      if (dut.steps < 3'(5)) n_short++;
      if (dut.tile_x0 == 0 || dut.tile_y0 == 0) n_clipped++;
    end
    if (dut.u_ctrl.state == 2'd2 && dut.u_ctrl.all_idle && !dut.done) n_swap++;
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef = '{px: 32'h3F000000, py: 32'h3F000000, qx: 32'h3F000000, qy: 32'h3F000000};
    rez = new[N * N]; rhx = new[N * N]; rhy = new[N * N];
    for (int c = 0; c < N * N; c++) begin
      rez[c] = frand(110, 125); rhx[c] = frand(110, 125); rhy[c] = frand(110, 125);
      u_mem.mem[(c / N) * MAX_N + (c % N)] = '{ez: rez[c], hx: rhx[c], hy: rhy[c]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int s = 0; s < STEPS; s++) step(rez, rhx, rhy, N, coef.px, coef.py, coef.qx, coef.qy, s, HL);
    begin
      int bad = 0;
      for (int c = 0; c < N * N; c++) begin
        cell_t m;
        m = u_mem.mem[int'(result_buf) * MAX_N * MAX_N + (c / N) * MAX_N + (c % N)];
        checks += 3;
        if (!feq(m.ez, rez[c]) || !feq(m.hx, rhx[c]) || !feq(m.hy, rhy[c])) begin
          bad++;
          if (bad < 6) $display("FAIL cell (%0d,%0d): ez %h/%h hx %h/%h hy %h/%h", c % N, c / N,
                                m.ez, rez[c], m.hx, rhx[c], m.hy, rhy[c]);
        end
      end
      failures += bad;
    end
    checks++;
    if (result_buf !== 1'b1) begin failures++; $display("FAIL result buffer"); end
    $display("clocks %0d; stalls %0d, contention %0d, fifo full %0d, clipped tiles %0d, short-pass tiles %0d, swaps %0d, source writes %0d, conductor writes %0d, bypassed cells %0d",
             cycles, n_stall, n_contend, n_fifo_full, n_clipped, n_short, n_swap, n_src, n_pec, n_bypass);
    need("memory back-pressure", n_stall);
    need("interconnect contention", n_contend);
    need("read-order FIFO full", n_fifo_full);
    need("ghost zone clipped at grid edge", n_clipped);
    need("pass shorter than TSTEP", n_short);
    need("step-stage bypass", n_bypass);
    need("buffer swap", n_swap);
    need("source excitation", n_src);
    need("perfect-conductor override", n_pec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
