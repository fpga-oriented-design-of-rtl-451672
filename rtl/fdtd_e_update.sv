// fdtd_e_update: pipelined electric-field update of one grid cell per clock.
//
//   Ez' = Ez + ( Px * (Hy(i+1/2,j) - Hy(i-1/2,j)) - Py * (Hx(i,j+1/2) - Hx(i,j-1/2)) )
//
// which is the FDTD electric-field equation of the 2-D TM mode, with the two curl terms summed
// before they are added to Ez. Four register stages: (1) the two H differences, (2) the two
// coefficient products, (3) their difference, (4) the sum with the old Ez. Every stage rounds
// to single precision. A tag (the cell's local address and flags) travels with the data.
//
// Interface: in_valid with ez, hx_c = Hx(i,j+1/2), hx_m = Hx(i,j-1/2), hy_c = Hy(i+1/2,j),
// hy_m = Hy(i-1/2,j), the coefficients px, py and in_tag. out_valid, ez_new and out_tag follow
// exactly LATENCY = 4 cycles later. There is no stall: the unit accepts a cell every clock.
// The equation follows the document; the operation order and stage split are this design's.
module fdtd_e_update #(
  parameter int unsigned TAG_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [TAG_W-1:0]  in_tag,
  input  logic [31:0]       ez,
  input  logic [31:0]       hx_c,
  input  logic [31:0]       hx_m,
  input  logic [31:0]       hy_c,
  input  logic [31:0]       hy_m,
  input  logic [31:0]       px,
  input  logic [31:0]       py,
  output logic              out_valid,
  output logic [TAG_W-1:0]  out_tag,
  output logic [31:0]       ez_new
);

  localparam int unsigned LATENCY = 4;

  logic [LATENCY-1:0] v_q;
  logic [TAG_W-1:0]   tag_q [LATENCY];
  logic [31:0]        ez_q  [LATENCY-1];

  logic [31:0] dhx, dhy, dhx_q, dhy_q;
  logic [31:0] p1, p2, p1_q, p2_q;
  logic [31:0] s, s_q;
  logic [31:0] e_sum;

  fp32_addsub u_dhx (.a(hx_c), .b(hx_m), .sub(1'b1), .y(dhx));
  fp32_addsub u_dhy (.a(hy_c), .b(hy_m), .sub(1'b1), .y(dhy));
  fp32_mul    u_p1  (.a(py),   .b(dhx_q), .y(p1));
  fp32_mul    u_p2  (.a(px),   .b(dhy_q), .y(p2));
  fp32_addsub u_s   (.a(p2_q), .b(p1_q),  .sub(1'b1), .y(s));
  fp32_addsub u_e   (.a(ez_q[2]), .b(s_q), .sub(1'b0), .y(e_sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    tag_q[0] <= in_tag;
    for (int k = 1; k < LATENCY; k++) tag_q[k] <= tag_q[k-1];
    ez_q[0] <= ez;
    for (int k = 1; k < LATENCY - 1; k++) ez_q[k] <= ez_q[k-1];
    dhx_q  <= dhx;
    dhy_q  <= dhy;
    p1_q   <= p1;
    p2_q   <= p2;
    s_q    <= s;
    ez_new <= e_sum;
  end

  assign out_valid = v_q[LATENCY-1];
  assign out_tag   = tag_q[LATENCY-1];

endmodule
