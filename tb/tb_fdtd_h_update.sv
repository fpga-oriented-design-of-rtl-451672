// tb_fdtd_h_update: streams random samples through the H update unit and checks each result
// against H - Q*(E1 - E0) in reference fp32 arithmetic, its 3-clock latency and its tag.
module tb_fdtd_h_update;
  import fp_ref_pkg::*;

  localparam int TAG_W = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_valid = 0;
  logic [TAG_W-1:0] in_tag = '0;
  logic [31:0]      h, e1, e0, q;
  logic             out_valid;
  logic [TAG_W-1:0] out_tag;
  logic [31:0]      h_new;

  fdtd_h_update #(.TAG_W(TAG_W)) dut (.*);

  typedef struct { logic [31:0] v; logic [TAG_W-1:0] tag; int cyc; } exp_t;
  exp_t eq[$];
  int checks = 0, failures = 0, cyc = 0;

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (eq.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      e = eq.pop_front();
      if (!feq(h_new, e.v) || out_tag != e.tag || cyc - e.cyc != 3) begin
        failures++;
        if (failures < 10) $display("FAIL got %h tag %h after %0d, expected %h tag %h after 3",
                                    h_new, out_tag, cyc - e.cyc, e.v, e.tag);
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    // six blocks of 500 samples; Q is constant within a block, as within a tile
    for (int blk = 0; blk < 6; blk++) begin
      @(negedge clk);
      in_valid = 0;
      repeat (5) @(negedge clk);
      q = (blk == 0) ? 32'h3EE00000 : frand(118, 127);
      for (int k = blk * 500; k < blk * 500 + 500; k++) begin
        @(negedge clk);
        in_valid = ($urandom % 3) != 0;
        h  = frand(110, 130); e1 = frand(110, 130);
        e0 = (k % 7 == 0) ? e1 : frand(110, 130);   // equal fields: no change to H
        in_tag = TAG_W'(k);
        if (in_valid) eq.push_back('{fsub(h, fmul(q, fsub(e1, e0))), in_tag, cyc});
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (eq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", eq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
