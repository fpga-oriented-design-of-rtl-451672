// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Values are carried as 64-bit reals. f2r() widens an fp32 word exactly (subnormals read as
// zero); r2f() rounds a real to the nearest fp32, ties to even, flushing results below the
// normal range to a signed zero, as the datapath does. Because the exact sum, difference or
// product of two fp32 numbers is representable in a double (or lies far from a rounding tie),
// r2f(f2r(a) op f2r(b)) is the correctly rounded fp32 result. This is an independent route to
// the same answer: it works on the IEEE double format, not on mantissa alignment.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    if (e <= 0) return {d[63], 31'd0};
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] fsub(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // Equal as numbers: +0 and -0 count as equal.
  function automatic bit feq(input logic [31:0] a, input logic [31:0] b);
    if (a[30:0] == 31'd0 && b[30:0] == 31'd0) return 1'b1;
    return a == b;
  endfunction

  // A random normal fp32 number with exponent in [lo, hi] (biased).
  function automatic logic [31:0] frand(input int lo, input int hi);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(lo + int'($urandom % 32'(hi - lo + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

endpackage
