// tb_fp32_addsub: self-checking test of the single-precision adder/subtractor.
// Random operands of close and distant exponents, exact cancellations, zeros and the carry out
// of rounding are compared against the double-precision reference rounded to fp32.
module tb_fp32_addsub;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp32_addsub dut (.a, .b, .sub, .y);

  task automatic check(input logic [31:0] ta, input logic [31:0] tb, input logic ts);
    logic [31:0] exp_y;
    a = ta; b = tb; sub = ts;
    #1;
    exp_y = ts ? fsub(ta, tb) : fadd(ta, tb);
    checks++;
    if (!feq(y, exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h: got %h expected %h", ta, ts ? "-" : "+", tb, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fixed cases
    check(32'h3F800000, 32'h3F800000, 1'b0);  // 1 + 1
    check(32'h3F800000, 32'h3F800000, 1'b1);  // 1 - 1 = +0
    check(32'h3F800000, 32'h00000000, 1'b1);
    check(32'h00000000, 32'h40490FDB, 1'b1);  // 0 - pi
    check(32'h3F800000, 32'h33800000, 1'b0);  // 1 + 2^-24 tie -> even
    check(32'h3F800001, 32'h33800000, 1'b0);  // tie -> up
    check(32'h3F7FFFFF, 32'h33800000, 1'b0);  // carry into exponent
    check(32'h3F800000, 32'h33000000, 1'b1);  // 1 - 2^-25
    repeat (3000) check(frand(100, 160), frand(100, 160), 1'($urandom));
    repeat (3000) begin
      logic [31:0] x;
      x = frand(120, 130);
      check(x, {x[31:8] ^ 24'($urandom % 2), 8'($urandom)}, 1'($urandom));  // near cancellation
    end
    repeat (1000) check(frand(1, 254), frand(1, 254), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
