// tb_fdtd_step_stage: one step stage (K = 1) on a 12 x 6 local area, with behavioural models of
// its two field copies (synchronous read, one clock).
//
// Copy K holds random fields; the area spans global x = -1..10, y = 0..5 of a 10 x 10 grid, so
// it covers cells beyond the grid, the perfect-conductor ring and the source at (5, 5). After
// the sweep, copy K+1 is compared with one FDTD step computed here over the same area (zero
// beyond the area, Ez = 0 on and beyond the grid edge, source value of step 6). Also checked:
// the first Ez write comes K*STAGE_LAG + 5 clocks after the start and the first H write
// H_LAG - 1 clocks after it; a second sweep with `bypass` copies every field unchanged.
module tb_fdtd_step_stage;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  localparam int LW = 12, LH = 6, CW = 8, K = 1, D = LW * LH, AW = $clog2(D);
  localparam int H_LAG = LW + 8, STAGE_LAG = H_LAG + 6;
  localparam int OX = -1, OY = 0, GN = 10, NSTEP = 6, HLOG = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] comp_t = '0;
  logic        comp_run = 0, bypass = 0;
  coef_t       coef;
  logic [AW-1:0] e_ra_ez, e_ra_hx_c, e_ra_hx_m, e_ra_hy_c, e_ra_hy_m;
  logic [31:0]   e_rd_ez, e_rd_hx_c, e_rd_hx_m, e_rd_hy_c, e_rd_hy_m;
  logic [AW-1:0] h_ra_ez_c, h_ra_ez_yp, h_ra_ez_xp, h_ra_hx, h_ra_hy;
  logic [31:0]   h_rd_ez_c, h_rd_ez_yp, h_rd_ez_xp, h_rd_hx, h_rd_hy;
  logic          ez_we, h_we;
  logic [AW-1:0] ez_wa, h_wa;
  logic [31:0]   ez_wd, hx_wd, hy_wd;

  fdtd_step_stage #(.K(K), .LW(LW), .LH(LH), .CW(CW)) dut (
    .clk, .rst_n, .comp_t, .comp_run, .ox((CW+1)'(OX)), .oy((CW+1)'(OY)), .grid_n(CW'(GN)),
    .n_step(32'(NSTEP)), .src_half_log2(5'(HLOG)), .bypass, .coef, .*
  );

  // field copies K (read only) and K+1
  logic [31:0] ez0 [D], hx0 [D], hy0 [D];
  logic [31:0] ez1 [D], hx1 [D], hy1 [D];
  always_ff @(posedge clk) begin
    e_rd_ez   <= ez0[e_ra_ez];
    e_rd_hx_c <= hx0[e_ra_hx_c];
    e_rd_hx_m <= hx0[e_ra_hx_m];
    e_rd_hy_c <= hy0[e_ra_hy_c];
    e_rd_hy_m <= hy0[e_ra_hy_m];
    h_rd_ez_c  <= ez1[h_ra_ez_c];
    h_rd_ez_yp <= ez1[h_ra_ez_yp];
    h_rd_ez_xp <= ez1[h_ra_ez_xp];
    h_rd_hx    <= hx0[h_ra_hx];
    h_rd_hy    <= hy0[h_ra_hy];
    if (ez_we) ez1[ez_wa] <= ez_wd;
    if (h_we) begin
      hx1[h_wa] <= hx_wd;
      hy1[h_wa] <= hy_wd;
    end
  end

  int checks = 0, failures = 0;
  int first_e = -1, first_h = -1;
  always @(posedge clk) if (comp_run) begin
    if (ez_we && first_e < 0) first_e = int'(comp_t);
    if (h_we && first_h < 0)  first_h = int'(comp_t);
  end

  task automatic sweep();
    first_e = -1; first_h = -1;
    for (int a = 0; a < D; a++) begin ez1[a] = 32'h7F80_0001; hx1[a] = 32'h7F80_0001; hy1[a] = 32'h7F80_0001; end
    @(negedge clk);
    comp_run = 1; comp_t = 0;
    repeat (K * STAGE_LAG + H_LAG + D + 8) begin
      @(negedge clk);
      comp_t++;
    end
    comp_run = 0;
    @(negedge clk);
  endtask

  task automatic cmp(input string what, input int a, input logic [31:0] got, input logic [31:0] exp_v);
    checks++;
    if (!feq(got, exp_v)) begin
      failures++;
      if (failures < 10) $display("FAIL %s at (%0d,%0d): got %h expected %h", what, a % LW, a / LW, got, exp_v);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ee [D];
    coef = '{px: 32'h3F000000, py: 32'h3EC00000, qx: 32'hBEE00000, qy: 32'h3EA00000};
    for (int a = 0; a < D; a++) begin ez0[a] = frand(115, 126); hx0[a] = frand(115, 126); hy0[a] = frand(115, 126); end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // sweep 1: one time step
    sweep();
    for (int a = 0; a < D; a++) begin
      int x, y, gx, gy;
      x = a % LW; y = a / LW; gx = OX + x; gy = OY + y;
      if (gx <= 0 || gy <= 0 || gx >= GN - 1 || gy >= GN - 1) ee[a] = '0;
      else if (gx == GN / 2 && gy == GN / 2) ee[a] = ((NSTEP >> HLOG) & 1) != 0 ? 32'hBF80_0000 : 32'h3F80_0000;
      else ee[a] = fadd(ez0[a], fsub(fmul(coef.px, fsub(hy0[a], x > 0 ? hy0[a - 1] : 32'h0)),
                                    fmul(coef.py, fsub(hx0[a], y > 0 ? hx0[a - LW] : 32'h0))));
    end
    for (int a = 0; a < D; a++) begin
      int x, y;
      x = a % LW; y = a / LW;
      cmp("Ez", a, ez1[a], ee[a]);
      cmp("Hx", a, hx1[a], fsub(hx0[a], fmul(coef.qy, fsub(y < LH - 1 ? ee[a + LW] : 32'h0, ee[a]))));
      cmp("Hy", a, hy1[a], fsub(hy0[a], fmul(coef.qx, fsub(x < LW - 1 ? ee[a + 1] : 32'h0, ee[a]))));
    end
    checks += 2;
    if (first_e != K * STAGE_LAG + 5) begin failures++; $display("FAIL first Ez write at %0d", first_e); end
    if (first_h != K * STAGE_LAG + H_LAG + 4) begin failures++; $display("FAIL first H write at %0d", first_h); end

    // sweep 2: bypass
    bypass = 1;
    sweep();
    for (int a = 0; a < D; a++) begin
      cmp("bypassed Ez", a, ez1[a], ez0[a]);
      cmp("bypassed Hx", a, hx1[a], hx0[a]);
      cmp("bypassed Hy", a, hy1[a], hy0[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
