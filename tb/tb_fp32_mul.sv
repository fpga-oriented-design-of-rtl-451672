// tb_fp32_mul: self-checking test of the single-precision multiplier against the
// double-precision product rounded to fp32, including zeros, ties and results near underflow.
module tb_fp32_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  task automatic check(input logic [31:0] ta, input logic [31:0] tb);
    logic [31:0] exp_y;
    a = ta; b = tb;
    #1;
    exp_y = fmul(ta, tb);
    checks++;
    if (!feq(y, exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", ta, tb, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F800000, 32'h40490FDB);   // 1 * pi
    check(32'h3FC00000, 32'h3FC00000);   // 1.5 * 1.5
    check(32'h00000000, 32'h40490FDB);   // 0 * pi
    check(32'hBF800000, 32'h3F000000);   // -1 * 0.5
    check(32'h3F800001, 32'h3F800001);
    repeat (5000) check(frand(100, 154), frand(100, 154));
    repeat (2000) check(frand(40, 90), frand(40, 90));     // around and below underflow
    repeat (1000) check(frand(1, 254), frand(1, 254));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
