// tb_fdtd_workloads: the evaluated simulation model on the accelerator at its default
// parameters: grids of 128 x 128, 256 x 256 and 512 x 512 cells at rest, perfect-conductor
// edges, a +/-1 square-wave source at (N/2, N/2), |P| = |Q| = 0.5 with Qx negative (the sign of
// the Yee Hy update is carried by the coefficient).
//
// The 128 x 128 grid runs the full 1000 time steps of the evaluation; the two larger grids run
// 10 steps each to keep the simulation short. Each run is compared cell by cell with the
// reference FDTD model, and its clock count is printed with the clock frequency at which it
// would take the processing time measured for the OpenCL implementation.
module tb_fdtd_workloads;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int MAX_N = 512, HL = 3;
  localparam int CW = $clog2(MAX_N) + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0;
  logic [31:0]   total_steps = '0;
  logic [CW-1:0] grid_n = '0;
  coef_t         coef;
  logic          busy, done, result_buf;
  logic          m_req_valid, m_req_ready, m_resp_valid;
  gmem_req_t     m_req;
  cell_t         m_resp_rdata;

  fdtd_accel_top dut (
    .clk, .rst_n, .start, .total_steps, .grid_n, .src_half_log2(5'(HL)),
    .coef, .busy, .done, .result_buf,
    .m_req_valid, .m_req_ready, .m_req, .m_resp_valid, .m_resp_rdata
  );

  gmem_model #(.WORDS(2 * MAX_N * MAX_N), .LATENCY(20), .STALL_PCT(5)) u_mem (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .resp_valid(m_resp_valid), .resp_rdata(m_resp_rdata)
  );

  int     checks = 0, failures = 0;
  longint cycles = 0;

  always @(posedge clk) if (rst_n && busy) cycles++;

  task automatic run(input int n, input int steps, input real paper_seconds);
    fa_t rez, rhx, rhy;
    int  bad = 0, nonzero = 0;
    rez = new[n * n]; rhx = new[n * n]; rhy = new[n * n];
    for (int c = 0; c < n * n; c++) begin
      rez[c] = '0; rhx[c] = '0; rhy[c] = '0;
      u_mem.mem[(c / n) * MAX_N + (c % n)] = '0;
    end
    cycles = 0;
    @(negedge clk);
    grid_n = CW'(n); total_steps = 32'(steps); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int s = 0; s < steps; s++) step(rez, rhx, rhy, n, coef.px, coef.py, coef.qx, coef.qy, s, HL);
    for (int c = 0; c < n * n; c++) begin
      cell_t m;
      m = u_mem.mem[int'(result_buf) * MAX_N * MAX_N + (c / n) * MAX_N + (c % n)];
      checks += 3;
      if (m.ez[30:0] != 0) nonzero++;
      if (!feq(m.ez, rez[c]) || !feq(m.hx, rhx[c]) || !feq(m.hy, rhy[c])) begin
        bad++;
        if (bad < 6) $display("FAIL N=%0d cell (%0d,%0d): ez %h/%h hx %h/%h hy %h/%h", n, c % n, c / n,
                              m.ez, rez[c], m.hx, rhx[c], m.hy, rhy[c]);
      end
    end
    failures += bad;
    checks++;
    if (nonzero < 20) begin failures++; $display("FAIL N=%0d: the wave did not spread", n); end
    $display("N=%0d steps=%0d: %0d clocks, %0d cells with Ez != 0; %0.1f MHz would match %0.3f s for 1000 steps",
             n, steps, cycles, nonzero, real'(cycles) * (1000.0 / steps) / paper_seconds / 1.0e6, paper_seconds);
  endtask

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef = '{px: 32'h3F000000, py: 32'h3F000000, qx: 32'hBF000000, qy: 32'h3F000000};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128, 1000, 0.070);
    run(256, 10, 0.250);
    run(512, 10, 1.050);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
