// fp32_addsub: combinational IEEE-754 single-precision adder/subtractor, y = a + b or a - b.
//
// The smaller operand is aligned to the larger one with guard, round and sticky bits; an effective
// subtraction is renormalised with a leading-zero count; the result is rounded to nearest, ties
// to even. Subnormal inputs are read as zero and subnormal results are flushed to a zero of the
// result's sign, as FPGA floating-point cores commonly do. An exact cancellation gives +0. An
// infinite or NaN operand is passed through (its sign flipped for b when subtracting) and an
// exponent overflow gives infinity; NaN payloads are not generated.
//
// The kernel arithmetic of the accelerator is single precision; this unit's structure, its
// subnormal and special-value handling are this design's own choices.
//
// Interface: a, b (fp32), sub (1: a - b). Output y (fp32), no clock: pipelining is done by the
// update units that use it.
module fp32_addsub (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [23:0] ma, mb, ml, msm;
  logic [7:0]  d;
  logic [26:0] xl, xs;       // 24-bit mantissa + guard, round, sticky
  logic [27:0] acc;
  logic [26:0] nv;           // normalised, bit 26 is the hidden one
  logic [9:0]  en, epre;     // signed working exponent, before and after rounding
  logic [4:0]  lz;
  logic [24:0] rm;
  logic        rup;
  logic        swap;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};

    swap = {eb, mb} > {ea, ma};
    sl   = swap ? sb : sa;
    ss   = swap ? sa : sb;
    el   = swap ? eb : ea;
    es   = swap ? ea : eb;
    ml   = swap ? mb : ma;
    msm  = swap ? ma : mb;
    d    = el - es;

    xl = {ml, 3'b000};
    if (d >= 8'd27) begin
      xs = {26'd0, |msm};
    end else begin
      xs = {msm, 3'b000} >> d;
      // sticky: any bit shifted out below the kept 27 bits
      if (d > 8'd3) xs[0] = xs[0] | |(msm & ((24'd1 << (d - 8'd3)) - 24'd1));
    end

    en  = {2'b00, el};
    nv  = '0;
    lz  = '0;
    acc = '0;
    if (sl == ss) begin
      acc = {1'b0, xl} + {1'b0, xs};
      if (acc[27]) begin
        nv = {acc[27:2], acc[1] | acc[0]};
        en = en + 10'd1;
      end else begin
        nv = acc[26:0];
      end
    end else begin
      acc = {1'b0, xl} - {1'b0, xs};
      lz  = 5'd0;
      for (int k = 26; k >= 0; k--) begin
        if (acc[k]) begin
          lz = 5'(26 - k);
          break;
        end
      end
      nv = acc[26:0] << lz;
      en = en - {5'd0, lz};
    end

    epre = en;
    rup = nv[2] & (nv[1] | nv[0] | nv[3]);
    rm  = {1'b0, nv[26:3]} + {24'd0, rup};
    if (rm[24]) begin
      rm = rm >> 1;
      en = en + 10'd1;
    end

    if (ea == 8'hFF) begin
      y = a;
    end else if (eb == 8'hFF) begin
      y = {sb, b[30:0]};
    end else if (ml == 24'd0 || (sl != ss && acc == 28'd0)) begin
      y = 32'h0000_0000;
    end else if ($signed(epre) <= 10'sd0) begin
      y = {sl, 31'd0};
    end else if ($signed(en) >= 10'sd255) begin
      y = {sl, 8'hFF, 23'd0};
    end else begin
      y = {sl, en[7:0], rm[22:0]};
    end
  end

endmodule
