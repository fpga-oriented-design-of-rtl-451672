// tb_fdtd_tstep_configs: the accelerator built with 1, 3 and 6 time steps per pass, side by
// side on a 64 x 64 grid at rest with the source running, 14 time steps each. Three and six are
// the other unrolling depths of the resource comparison; one step per pass goes through global
// memory on every time step, as a kernel without tiling does. Every result is compared cell by
// cell with the reference FDTD model, and the builds must take 14, 5 and 3 passes. The clock
// counts are printed to show what the tiling saves.
module tb_fdtd_tstep_configs;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int MAX_N = 64, N = 64, STEPS = 14, HL = 1, NB = 3;
  localparam int CW = $clog2(MAX_N) + 2;
  localparam int TS [NB] = '{1, 3, 6};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  start = 0;
  coef_t coef;
  logic  busy [NB], done [NB], result_buf [NB];
  int    passes [NB];
  int    clocks [NB];

  for (genvar w = 0; w < NB; w++) begin : g_b
    logic        m_req_valid, m_req_ready, m_resp_valid;
    gmem_req_t   m_req;
    cell_t       m_resp_rdata;
    logic [31:0] last = 32'hFFFF_FFFF;

    fdtd_accel_top #(.TSTEP(TS[w]), .MAX_N(MAX_N)) dut (
      .clk, .rst_n, .start, .total_steps(32'(STEPS)), .grid_n(CW'(N)), .src_half_log2(5'(HL)),
      .coef, .busy(busy[w]), .done(done[w]), .result_buf(result_buf[w]),
      .m_req_valid, .m_req_ready, .m_req, .m_resp_valid, .m_resp_rdata
    );
    gmem_model #(.WORDS(2 * MAX_N * MAX_N), .LATENCY(8), .STALL_PCT(10)) u_mem (
      .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
      .resp_valid(m_resp_valid), .resp_rdata(m_resp_rdata));

    // a pass begins when the first tile of a t_base is dispatched
    always @(posedge clk) if (rst_n) begin
      if (dut.p_start[0] && dut.t_base != last) begin passes[w]++; last <= dut.t_base; end
      if (busy[w]) clocks[w]++;
    end
  end

  function automatic cell_t rd(input int which, input int a);
    case (which)
      0:       return g_b[0].u_mem.mem[a];
      1:       return g_b[1].u_mem.mem[a];
      default: return g_b[2].u_mem.mem[a];
    endcase
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int checks = 0, failures = 0;
  fa_t rez, rhx, rhy;

  initial begin
    bit fin [NB];
    coef = '{px: 32'h3F000000, py: 32'h3F000000, qx: 32'hBF000000, qy: 32'h3F000000};
    for (int w = 0; w < NB; w++) begin passes[w] = 0; clocks[w] = 0; fin[w] = 0; end
    rez = new[N * N]; rhx = new[N * N]; rhy = new[N * N];
    for (int c = 0; c < N * N; c++) begin
      rez[c] = '0; rhx[c] = '0; rhy[c] = '0;
      g_b[0].u_mem.mem[(c / N) * MAX_N + (c % N)] = '0;
      g_b[1].u_mem.mem[(c / N) * MAX_N + (c % N)] = '0;
      g_b[2].u_mem.mem[(c / N) * MAX_N + (c % N)] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!(fin[0] && fin[1] && fin[2])) begin
      @(negedge clk);
      for (int w = 0; w < NB; w++) if (done[w]) fin[w] = 1;
    end
    for (int s = 0; s < STEPS; s++) step(rez, rhx, rhy, N, coef.px, coef.py, coef.qx, coef.qy, s, HL);
    for (int w = 0; w < NB; w++) begin
      int bad = 0;
      for (int c = 0; c < N * N; c++) begin
        cell_t m;
        m = rd(w, int'(result_buf[w]) * MAX_N * MAX_N + (c / N) * MAX_N + (c % N));
        checks += 3;
        if (!feq(m.ez, rez[c]) || !feq(m.hx, rhx[c]) || !feq(m.hy, rhy[c])) begin
          bad++;
          if (bad < 4) $display("FAIL TSTEP=%0d cell (%0d,%0d)", TS[w], c % N, c / N);
        end
      end
      failures += bad;
      checks++;
      if (passes[w] != (STEPS + TS[w] - 1) / TS[w]) begin
        failures++;
        $display("FAIL TSTEP=%0d made %0d passes", TS[w], passes[w]);
      end
      $display("TSTEP=%0d: %0d passes, %0d clocks", TS[w], passes[w], clocks[w]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
