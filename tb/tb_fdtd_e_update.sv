// tb_fdtd_e_update: streams random cells through the Ez update unit, one per clock with gaps,
// and checks each result against Ez + (Px*(Hy_c-Hy_m) - Py*(Hx_c-Hx_m)) in reference fp32
// arithmetic, that results come out exactly 4 clocks after their inputs, and that tags follow.
module tb_fdtd_e_update;
  import fp_ref_pkg::*;

  localparam int TAG_W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_valid = 0;
  logic [TAG_W-1:0] in_tag = '0;
  logic [31:0]      ez, hx_c, hx_m, hy_c, hy_m, px, py;
  logic             out_valid;
  logic [TAG_W-1:0] out_tag;
  logic [31:0]      ez_new;

  fdtd_e_update #(.TAG_W(TAG_W)) dut (.*);

  typedef struct { logic [31:0] v; logic [TAG_W-1:0] tag; int cyc; } exp_t;
  exp_t q[$];
  int checks = 0, failures = 0, cyc = 0;

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      e = q.pop_front();
      if (!feq(ez_new, e.v) || out_tag != e.tag || cyc - e.cyc != 4) begin
        failures++;
        if (failures < 10) $display("FAIL got %h tag %h after %0d, expected %h tag %h after 4",
                                    ez_new, out_tag, cyc - e.cyc, e.v, e.tag);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    px = 32'h3F000000; py = 32'h3EC00000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // six blocks of 500 cells; the coefficients are constant within a block, as within a tile
    for (int blk = 0; blk < 6; blk++) begin
      @(negedge clk);
      in_valid = 0;
      repeat (6) @(negedge clk);
      if (blk > 0) begin px = frand(120, 127); py = frand(120, 127); end
      for (int k = blk * 500; k < blk * 500 + 500; k++) begin
        @(negedge clk);
        in_valid = ($urandom % 4) != 0;
        ez = frand(110, 130); hx_c = frand(110, 130); hx_m = frand(110, 130);
        hy_c = frand(110, 130); hy_m = frand(110, 130);
        in_tag = TAG_W'(k);
        if (in_valid) q.push_back('{fadd(ez, fsub(fmul(px, fsub(hy_c, hy_m)), fmul(py, fsub(hx_c, hx_m)))),
                                    in_tag, cyc});
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
