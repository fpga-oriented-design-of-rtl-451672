// fp32_mul: combinational IEEE-754 single-precision multiplier, y = a * b.
//
// The 24 x 24-bit mantissa product is normalised by at most one place and rounded to nearest,
// ties to even, from a guard bit and a sticky bit. Subnormal inputs count as zero and results
// below the normal range are flushed to a signed zero (the decision uses the exponent before
// rounding). An infinite or NaN operand gives infinity of the product's sign; an exponent
// overflow gives infinity.
//
// The kernel arithmetic of the accelerator is single precision; the structure and the handling
// of special values are this design's own choices.
//
// Interface: a, b (fp32) in, y (fp32) out, no clock.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st, rup;
  logic [24:0] rm;
  logic [9:0]  e, epre;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e  = {2'b00, ea} + {2'b00, eb} - 10'd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 10'd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    epre = e;
    rup = g & (st | m[0]);
    rm  = {1'b0, m} + {24'd0, rup};
    if (rm[24]) begin
      rm = rm >> 1;
      e  = e + 10'd1;
    end

    if (ea == 8'hFF || eb == 8'hFF) begin
      y = {s, 8'hFF, 23'd0};
    end else if (ea == 8'd0 || eb == 8'd0) begin
      y = {s, 31'd0};
    end else if ($signed(epre) <= 10'sd0) begin
      y = {s, 31'd0};
    end else if ($signed(e) >= 10'sd255) begin
      y = {s, 8'hFF, 23'd0};
    end else begin
      y = {s, e[7:0], rm[22:0]};
    end
  end

endmodule
