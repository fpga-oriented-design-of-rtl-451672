// tb_fdtd_controller: the time and tile loops, with two model pipelines that stay busy for a
// random number of clocks per tile.
//
// Run 1: N = 64, 12 steps, so passes of 5, 5 and 2 steps. Checked per pass: every 32 x 8 tile
// is dispatched exactly once, with the pass's steps, t_base and source buffer; the source
// buffer alternates; no pipeline is started while busy; both pipelines get work; done pulses
// once after the last tile and names buffer 1 (three passes). Run 2: 0 steps, done at once with
// the fields still in buffer 0.
module tb_fdtd_controller;
  localparam int NP = 2, TW = 32, TH = 8, T = 5, MAX_N = 512, CW = $clog2(MAX_N) + 2;
  localparam int SW = $clog2(T + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0;
  logic [31:0]   total_steps = '0;
  logic [CW-1:0] grid_n = '0;
  logic          busy, done, result_buf;
  logic          p_idle  [NP];
  logic          p_start [NP];
  logic [CW-1:0] tile_x0, tile_y0;
  logic [SW-1:0] steps;
  logic [31:0]   t_base;
  logic          src_buf;

  fdtd_controller #(.NP(NP)) dut (.*);

  int busy_left [NP];
  int checks = 0, failures = 0;
  int seen [int];           // key: pass*100000 + y*1000 + x
  int per_pipe [NP];
  int pass_steps [$], pass_base [$], pass_buf [$];
  int n_done = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  // model pipelines
  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (p_start[p]) begin
        checks++;
        if (!p_idle[p]) fail($sformatf("pipeline %0d started while busy", p));
        busy_left[p] = 3 + int'($urandom % 40);
        per_pipe[p]++;
        seen[int'(t_base) * 100000 + int'(tile_y0) * 1000 + int'(tile_x0)]++;
        if (pass_base.size() == 0 || pass_base[$] != int'(t_base)) begin
          pass_steps.push_back(int'(steps)); pass_base.push_back(int'(t_base));
          pass_buf.push_back(int'(src_buf));
        end else begin
          checks++;
          if (pass_steps[$] != int'(steps) || pass_buf[$] != int'(src_buf)) fail("command changed within a pass");
        end
      end else if (busy_left[p] > 0) begin
        busy_left[p]--;
      end
    end

  end
  always_comb for (int p = 0; p < NP; p++) p_idle[p] = (busy_left[p] == 0);
  always @(negedge clk) if (done) n_done++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin busy_left[p] = 0; per_pipe[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    grid_n = CW'(64); total_steps = 12; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (result_buf !== 1'b1) fail("result buffer after three passes");
    // three passes: base 0, 5, 10; steps 5, 5, 2; buffers 0, 1, 0
    checks++;
    if (pass_base.size() != 3) fail($sformatf("%0d passes", pass_base.size()));
    else begin
      int eb[3] = '{0, 5, 10}, es[3] = '{5, 5, 2}, ebuf[3] = '{0, 1, 0};
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (pass_base[k] != eb[k] || pass_steps[k] != es[k] || pass_buf[k] != ebuf[k])
          fail($sformatf("pass %0d: base %0d steps %0d buf %0d", k, pass_base[k], pass_steps[k], pass_buf[k]));
      end
    end
    for (int b = 0; b <= 10; b += 5)
      for (int y = 0; y < 64; y += TH)
        for (int x = 0; x < 64; x += TW) begin
          checks++;
          if (!seen.exists(b * 100000 + y * 1000 + x) || seen[b * 100000 + y * 1000 + x] != 1)
            fail($sformatf("tile (%0d,%0d) of pass at %0d not dispatched once", x, y, b));
        end
    checks++;
    if (seen.num() != 3 * 16) fail($sformatf("%0d distinct dispatches", seen.num()));
    checks++;
    if (per_pipe[0] == 0 || per_pipe[1] == 0) fail("a pipeline got no tile");
    // every pipeline must be idle when done pulses
    checks++;
    if (busy_left[0] != 0 || busy_left[1] != 0) fail("done before all pipelines finished");

    // run 2: nothing to do
    @(negedge clk);
    total_steps = 0; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (result_buf !== 1'b0) fail("result buffer with zero steps");
    @(posedge clk);
    checks++;
    if (n_done != 2) fail($sformatf("done pulsed %0d times", n_done));
    $display("tiles per pipeline: %0d %0d", per_pipe[0], per_pipe[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
