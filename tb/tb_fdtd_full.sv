// tb_fdtd_full: the accelerator at its default parameters (one kernel pipeline, 32 x 8 tiles,
// five steps per pass, grids up to 512 x 512) running the evaluated simulation model: an
// N x N grid at rest, perfect-conductor edges and a +/-1 square-wave source at (N/2, N/2).
//
// N = 128 and STEPS time steps. After `done` every cell of the result buffer is compared with the
// reference FDTD model, and the clock count is checked against the pipeline's schedule: per tile
// and pass, the load of (up to) 42 x 18 cells, 1036 compute clocks and 256 stores at one clock
// each, with memory back-pressure and latency on top (so the count must lie at or above the
// compute part and within 2x the full ideal schedule).
//
// Qx is negative: the H updates are both written H - Q*(difference of Ez), so the Yee scheme's
// + sign of the Hy update is carried by the coefficient (Qx = -dt/(mu*dx)).
module tb_fdtd_full;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int MAX_N = 512, N = 128, STEPS = 10, HL = 2;
  localparam int CW = $clog2(MAX_N) + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      start = 0;
  coef_t     coef;
  logic      busy, done, result_buf;
  logic      m_req_valid, m_req_ready, m_resp_valid;
  gmem_req_t m_req;
  cell_t     m_resp_rdata;

  fdtd_accel_top dut (
    .clk, .rst_n, .start, .total_steps(32'(STEPS)), .grid_n(CW'(N)), .src_half_log2(5'(HL)),
    .coef, .busy, .done, .result_buf,
    .m_req_valid, .m_req_ready, .m_req, .m_resp_valid, .m_resp_rdata
  );

  gmem_model #(.WORDS(2 * MAX_N * MAX_N), .LATENCY(20), .STALL_PCT(10)) u_mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .resp_valid(m_resp_valid), .resp_rdata(m_resp_rdata)
  );

  int  checks = 0, failures = 0;
  longint cycles = 0;
  fa_t rez, rhx, rhy;

  always @(posedge clk) if (rst_n && busy) cycles++;

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // a Courant-stable uniform medium: |P| = |Q| = 0.5, the sign of the Hy update in Qx
    coef = '{px: 32'h3F000000, py: 32'h3F000000, qx: 32'hBF000000, qy: 32'h3F000000};
    rez = new[N * N]; rhx = new[N * N]; rhy = new[N * N];
    for (int c = 0; c < N * N; c++) begin
      rez[c] = '0; rhx[c] = '0; rhy[c] = '0;
      u_mem.mem[(c / N) * MAX_N + (c % N)] = '0;
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
      int bad = 0, nonzero = 0;
      for (int c = 0; c < N * N; c++) begin
        cell_t m;
        m = u_mem.mem[int'(result_buf) * MAX_N * MAX_N + (c / N) * MAX_N + (c % N)];
        checks += 3;
        if (m.ez[30:0] != 0) nonzero++;
        if (!feq(m.ez, rez[c]) || !feq(m.hx, rhx[c]) || !feq(m.hy, rhy[c])) begin
          bad++;
          if (bad < 6) $display("FAIL cell (%0d,%0d): ez %h/%h hx %h/%h hy %h/%h", c % N, c / N,
                                m.ez, rez[c], m.hx, rhx[c], m.hy, rhy[c]);
        end
      end
      failures += bad;
      checks++;
      if (nonzero < 20) begin failures++; $display("FAIL the wave did not spread (%0d cells)", nonzero); end
    end
    begin
      longint passes, tiles, comp, ideal;
      passes = (STEPS + 4) / 5;
      tiles  = (N / 32) * (N / 8);
      comp   = 0;
      comp   = passes * tiles * 1036;
      ideal  = comp + passes * tiles * (756 + 256);
      $display("N=%0d steps=%0d: %0d clocks (compute part %0d, ideal schedule %0d)", N, STEPS, cycles, comp, ideal);
      checks++;
      if (cycles < comp || cycles > 2 * ideal) begin failures++; $display("FAIL clock count out of range"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
