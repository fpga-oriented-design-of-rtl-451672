// tb_fdtd_tile_pipeline: one kernel pipeline, driven tile by tile over a 96 x 96 grid.
//
// Buffer 0 is filled with random fields. Pass 1 runs every 32 x 8 tile for 5 steps (buffer 0 to
// 1), pass 2 for 3 steps from global step 5 (buffer 1 to 0). After each pass the whole grid is
// compared with the reference FDTD model. Also checked: an interior tile reads exactly
// (32+2*5) x (8+2*5) = 756 cells, every tile writes 256 cells, edge tiles read fewer, and the
// compute phase lasts 4*56 + 50 + 756 + 6 = 1036 clocks (five stages, each 56 clocks behind the
// one before). Pass 2 has fewer steps than stages, so the last two stages copy their input.
module tb_fdtd_tile_pipeline;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;
  import fdtd_ref_pkg::*;

  localparam int unsigned MAX_N = 128;
  localparam int          N     = 96;
  localparam int          TW = 32, TH = 8, T = 5;
  localparam int          CW = $clog2(MAX_N) + 2;
  localparam int          HL = 1;   // source half period 2 steps

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0;
  logic [CW-1:0] tile_x0 = '0, tile_y0 = '0;
  logic [2:0]    steps = '0;
  logic [31:0]   t_base = '0;
  logic          src_buf = 0;
  coef_t         coef;
  logic          idle, done;
  logic          req_valid, req_ready, resp_valid;
  gmem_req_t     req;
  cell_t         resp_rdata;

  fdtd_tile_pipeline #(.MAX_N(MAX_N)) dut (
    .clk, .rst_n, .start, .tile_x0, .tile_y0, .steps, .t_base, .grid_n(CW'(N)), .src_buf,
    .src_half_log2(5'(HL)), .coef, .idle, .done,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req(req),
    .mem_resp_valid(resp_valid), .mem_resp_rdata(resp_rdata)
  );

  gmem_model #(.WORDS(2 * MAX_N * MAX_N), .LATENCY(9), .STALL_PCT(25)) u_mem (
    .clk, .rst_n, .req_valid, .req_ready, .req, .resp_valid, .resp_rdata
  );

  int checks = 0, failures = 0;
  fa_t rez, rhx, rhy;
  int  n_rd, n_wr, n_comp;

  always @(posedge clk) begin
    if (req_valid && req_ready) begin
      if (req.we) n_wr++;
      else        n_rd++;
    end
    if (int'(dut.state) == 2) n_comp++;   // compute phase
  end

  task automatic expect_eq(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  task automatic run_pass(input int nsteps, input int tbase, input logic sbuf);
    for (int ty = 0; ty < N; ty += TH) begin
      for (int tx = 0; tx < N; tx += TW) begin
        int lo_x, hi_x, lo_y, hi_y;
        n_rd = 0; n_wr = 0; n_comp = 0;
        @(negedge clk);
        tile_x0 = CW'(tx); tile_y0 = CW'(ty); steps = 3'(nsteps); t_base = tbase; src_buf = sbuf;
        start = 1;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        lo_x = (tx - T < 0) ? 0 : tx - T;  hi_x = (tx + TW + T > N) ? N : tx + TW + T;
        lo_y = (ty - T < 0) ? 0 : ty - T;  hi_y = (ty + TH + T > N) ? N : ty + TH + T;
        expect_eq($sformatf("reads of tile %0d,%0d", tx, ty), n_rd, (hi_x - lo_x) * (hi_y - lo_y));
        expect_eq($sformatf("writes of tile %0d,%0d", tx, ty), n_wr, TW * TH);
        // the unrolled stages take the same time whatever the number of steps
        expect_eq("compute clocks", n_comp, (T - 1) * ((TW + 2*T) + 14) + (TW + 2*T) + 8 + (TW + 2*T) * (TH + 2*T) + 6);
        if (tx == 32 && ty == 40) expect_eq("ghost-zone reads of an interior tile", n_rd, 756);
      end
    end
  endtask

  task automatic compare(input logic b);
    int bad = 0;
    for (int c = 0; c < N * N; c++) begin
      cell_t m;
      m = u_mem.mem[int'(b) * MAX_N * MAX_N + (c / N) * MAX_N + (c % N)];
      checks += 3;
      if (!feq(m.ez, rez[c]) || !feq(m.hx, rhx[c]) || !feq(m.hy, rhy[c])) begin
        bad++;
        if (bad < 6) $display("FAIL cell (%0d,%0d): ez %h/%h hx %h/%h hy %h/%h", c % N, c / N,
                              m.ez, rez[c], m.hx, rhx[c], m.hy, rhy[c]);
      end
    end
    failures += bad;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef = '{px: 32'h3F000000, py: 32'h3EC00000, qx: 32'h3EE00000, qy: 32'h3EA00000};
    rez = new[N * N]; rhx = new[N * N]; rhy = new[N * N];
    for (int c = 0; c < N * N; c++) begin
      rez[c] = frand(115, 126); rhx[c] = frand(115, 126); rhy[c] = frand(115, 126);
      u_mem.mem[(c / N) * MAX_N + (c % N)] = '{ez: rez[c], hx: rhx[c], hy: rhy[c]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("idle after reset", int'(idle), 1);

    run_pass(5, 0, 1'b0);
    for (int s = 0; s < 5; s++) step(rez, rhx, rhy, N, coef.px, coef.py, coef.qx, coef.qy, s, HL);
    compare(1'b1);

    run_pass(3, 5, 1'b1);
    for (int s = 5; s < 8; s++) step(rez, rhx, rhy, N, coef.px, coef.py, coef.qx, coef.qy, s, HL);
    compare(1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
