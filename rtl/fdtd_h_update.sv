// fdtd_h_update: pipelined magnetic-field update of one staggered H sample per clock.
//
//   H' = H - Q * (E1 - E0)
//
// With H = Hx(i,j+1/2), Q = Qy, E1 = Ez(i,j+1), E0 = Ez(i,j) this is the Hx equation; with
// H = Hy(i+1/2,j), Q = Qx, E1 = Ez(i+1,j) it is the Hy equation. The kernel pipeline uses one
// instance for each, so both H components of a cell are updated in the same clock. Three
// register stages: (1) the E difference, (2) the product with Q, (3) the subtraction from H.
//
// Interface: in_valid, in_tag, h, e1, e0, q. out_valid, out_tag and h_new follow exactly
// LATENCY = 3 cycles later; there is no stall. The equation follows the document; the stage
// split is this design's.
module fdtd_h_update #(
  parameter int unsigned TAG_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [TAG_W-1:0]  in_tag,
  input  logic [31:0]       h,
  input  logic [31:0]       e1,
  input  logic [31:0]       e0,
  input  logic [31:0]       q,
  output logic              out_valid,
  output logic [TAG_W-1:0]  out_tag,
  output logic [31:0]       h_new
);

  localparam int unsigned LATENCY = 3;

  logic [LATENCY-1:0] v_q;
  logic [TAG_W-1:0]   tag_q [LATENCY];
  logic [31:0]        h_q   [LATENCY-1];
  logic [31:0]        de, de_q, p, p_q, hs;

  fp32_addsub u_de (.a(e1), .b(e0), .sub(1'b1), .y(de));
  fp32_mul    u_p  (.a(q),  .b(de_q), .y(p));
  fp32_addsub u_h  (.a(h_q[1]), .b(p_q), .sub(1'b1), .y(hs));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    tag_q[0] <= in_tag;
    for (int k = 1; k < LATENCY; k++) tag_q[k] <= tag_q[k-1];
    h_q[0] <= h;
    h_q[1] <= h_q[0];
    de_q   <= de;
    p_q    <= p;
    h_new  <= hs;
  end

  assign out_valid = v_q[LATENCY-1];
  assign out_tag   = tag_q[LATENCY-1];

endmodule
