// fdtd_step_stage: one unrolled time step of the kernel pipeline.
//
// Stage K advances the local tile by one time step, streaming over the
// LW x LH local area in row-major order (x fastest), one cell per clock:
//  - its E part (one fdtd_e_update) reads Ez, Hx, Hx(y-1), Hy, Hy(x-1) of step K from the
//    field copy K and writes the new Ez into copy K+1;
//  - its H part (two fdtd_h_update) trails the E part by H_LAG cells, reads the new Ez at the
//    cell, at x+1 and at y+1 from copy K+1 and the old Hx, Hy from copy K, and writes the new
//    Hx, Hy into copy K+1.
// The E part starts STAGE_LAG clocks after stage K-1's, so every value it reads has been written.
// Neighbours outside the local area read as zero (the ghost zone absorbs the error). The new Ez
// is forced to 0 on and beyond the grid edge and to the +/-1 source value at (N/2, N/2). With
// `bypass` set (a pass with fewer steps than stages), the stage copies Ez, Hx, Hy unchanged.
//
// Interface: comp_go starts the sweep (the clock counter comp_t counts from 0 after it);
// read addresses are driven combinationally and their data is expected one clock later; the
// writes leave the update units LATENCY clocks after the data. Timing: E part active in clocks
// K*STAGE_LAG .. K*STAGE_LAG+LW*LH-1 of comp_t, H part H_LAG clocks later.
//
// One E and two H update units per time step (four multipliers per step) follow the resource
// figures of the evaluated design; the streaming order, the lags, the separate copy of the
// fields per step and the bypass are this design's own choices.
module fdtd_step_stage
  import fdtd_pkg::*;
#(
  parameter int unsigned K      = 0,
  parameter int unsigned LW     = 42,
  parameter int unsigned LH     = 18,
  parameter int unsigned CW     = 11,
  localparam int unsigned DEPTH = LW * LH,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned XW    = $clog2(LW + 1),
  localparam int unsigned YW    = $clog2(LH + 1),
  localparam int unsigned H_LAG     = LW + 8,
  localparam int unsigned STAGE_LAG = H_LAG + 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        comp_t,        // clocks since the compute phase began
  input  logic               comp_run,      // compute phase in progress
  input  logic signed [CW:0] ox,            // global coordinate of local (0,0)
  input  logic signed [CW:0] oy,
  input  logic [CW-1:0]      grid_n,
  input  logic [31:0]        n_step,        // global time step computed by this stage
  input  logic [4:0]         src_half_log2,
  input  logic               bypass,
  input  coef_t              coef,
  // E part reads: copy K (ez, hx_c, hx_m, hy_c, hy_m)
  output logic [AW-1:0]      e_ra_ez, e_ra_hx_c, e_ra_hx_m, e_ra_hy_c, e_ra_hy_m,
  input  logic [31:0]        e_rd_ez, e_rd_hx_c, e_rd_hx_m, e_rd_hy_c, e_rd_hy_m,
  // H part reads: new Ez from copy K+1 (c, y+1, x+1), old H from copy K
  output logic [AW-1:0]      h_ra_ez_c, h_ra_ez_yp, h_ra_ez_xp, h_ra_hx, h_ra_hy,
  input  logic [31:0]        h_rd_ez_c, h_rd_ez_yp, h_rd_ez_xp, h_rd_hx, h_rd_hy,
  // writes into copy K+1
  output logic               ez_we,
  output logic [AW-1:0]      ez_wa,
  output logic [31:0]        ez_wd,
  output logic               h_we,
  output logic [AW-1:0]      h_wa,
  output logic [31:0]        hx_wd,
  output logic [31:0]        hy_wd
);

  typedef struct packed {
    logic          pec;
    logic          src;
    logic [AW-1:0] addr;
  } tag_t;
  localparam int unsigned TAG_W = AW + 2;

  // ---------------------------------------------------------------- E part sweep
  logic [XW-1:0] ex;
  logic [YW-1:0] ey;
  logic          e_act, h_act;
  logic [XW-1:0] hx_i;
  logic [YW-1:0] hy_i;

  assign e_act = comp_run && (comp_t >= 16'(K * STAGE_LAG)) && (comp_t < 16'(K * STAGE_LAG + DEPTH));
  assign h_act = comp_run && (comp_t >= 16'(K * STAGE_LAG + H_LAG)) &&
                 (comp_t < 16'(K * STAGE_LAG + H_LAG + DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex <= '0; ey <= '0; hx_i <= '0; hy_i <= '0;
    end else if (!comp_run) begin
      ex <= '0; ey <= '0; hx_i <= '0; hy_i <= '0;
    end else begin
      if (e_act) begin
        if (ex == XW'(LW - 1)) begin ex <= '0; ey <= ey + 1'b1; end
        else                           ex <= ex + 1'b1;
      end
      if (h_act) begin
        if (hx_i == XW'(LW - 1)) begin hx_i <= '0; hy_i <= hy_i + 1'b1; end
        else                             hx_i <= hx_i + 1'b1;
      end
    end
  end

  logic [AW-1:0] ec, hc;
  assign ec = AW'(ey * LW + ex);
  assign hc = AW'(hy_i * LW + hx_i);

  // neighbour masks
  logic e_mxm, e_mym, h_mxp, h_myp;
  assign e_mxm = (ex == '0);
  assign e_mym = (ey == '0);
  assign h_mxp = (hx_i == XW'(LW - 1));
  assign h_myp = (hy_i == YW'(LH - 1));

  always_comb begin
    e_ra_ez   = ec;
    e_ra_hx_c = ec;
    e_ra_hx_m = e_mym ? ec : ec - AW'(LW);
    e_ra_hy_c = ec;
    e_ra_hy_m = e_mxm ? ec : ec - AW'(1);
    h_ra_ez_c  = hc;
    h_ra_ez_yp = h_myp ? hc : hc + AW'(LW);
    h_ra_ez_xp = h_mxp ? hc : hc + AW'(1);
    h_ra_hx    = hc;
    h_ra_hy    = hc;
  end

  // cell flags for the E result
  logic signed [CW:0] gx, gy, nn;
  tag_t e_tag_d, e_tag_q, h_tag_q;
  assign gx = ox + $signed((CW+1)'(ex));
  assign gy = oy + $signed((CW+1)'(ey));
  assign nn = $signed((CW+1)'(grid_n));

  always_comb begin
    e_tag_d.addr = ec;
    e_tag_d.pec  = (gx <= 0) || (gy <= 0) || (gx >= nn - 1) || (gy >= nn - 1);
    e_tag_d.src  = (gx == (nn >>> 1)) && (gy == (nn >>> 1));
  end

  logic e_v_q, h_v_q, e_mxm_q, e_mym_q, h_mxp_q, h_myp_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_v_q <= 1'b0;
      h_v_q <= 1'b0;
    end else begin
      e_v_q <= e_act;
      h_v_q <= h_act;
    end
  end
  always_ff @(posedge clk) begin
    e_tag_q      <= e_tag_d;
    h_tag_q.addr <= hc;
    h_tag_q.pec  <= 1'b0;
    h_tag_q.src  <= 1'b0;
    e_mxm_q <= e_mxm;
    e_mym_q <= e_mym;
    h_mxp_q <= h_mxp;
    h_myp_q <= h_myp;
  end

  // ---------------------------------------------------------------- update units
  logic             e_ov, hx_ov, hy_ov;
  logic [TAG_W-1:0] e_ot, hx_ot, hy_ot;
  logic [31:0]      e_new, hx_new, hy_new;
  tag_t             e_otag, h_otag;

  fdtd_e_update #(.TAG_W(TAG_W)) u_e (
    .clk, .rst_n, .in_valid(e_v_q), .in_tag(e_tag_q),
    .ez(e_rd_ez),
    .hx_c(e_rd_hx_c), .hx_m(e_mym_q ? FP_ZERO : e_rd_hx_m),
    .hy_c(e_rd_hy_c), .hy_m(e_mxm_q ? FP_ZERO : e_rd_hy_m),
    .px(coef.px), .py(coef.py),
    .out_valid(e_ov), .out_tag(e_ot), .ez_new(e_new)
  );

  fdtd_h_update #(.TAG_W(TAG_W)) u_hx (
    .clk, .rst_n, .in_valid(h_v_q), .in_tag(h_tag_q),
    .h(h_rd_hx), .e1(h_myp_q ? FP_ZERO : h_rd_ez_yp), .e0(h_rd_ez_c), .q(coef.qy),
    .out_valid(hx_ov), .out_tag(hx_ot), .h_new(hx_new)
  );

  fdtd_h_update #(.TAG_W(TAG_W)) u_hy (
    .clk, .rst_n, .in_valid(h_v_q), .in_tag(h_tag_q),
    .h(h_rd_hy), .e1(h_mxp_q ? FP_ZERO : h_rd_ez_xp), .e0(h_rd_ez_c), .q(coef.qx),
    .out_valid(hy_ov), .out_tag(hy_ot), .h_new(hy_new)
  );

  assign e_otag = tag_t'(e_ot);
  assign h_otag = tag_t'(hx_ot);

  // old values delayed alongside the units, for the bypass
  localparam int unsigned EL = 4, HL = 3;
  logic [31:0] ez_old [EL];
  logic [31:0] hx_old [HL], hy_old [HL];
  always_ff @(posedge clk) begin
    ez_old[0] <= e_rd_ez;
    for (int k = 1; k < EL; k++) ez_old[k] <= ez_old[k-1];
    hx_old[0] <= h_rd_hx;
    hy_old[0] <= h_rd_hy;
    for (int k = 1; k < HL; k++) begin
      hx_old[k] <= hx_old[k-1];
      hy_old[k] <= hy_old[k-1];
    end
  end

  logic [31:0] src_val;
  assign src_val = n_step[src_half_log2] ? FP_MINUS1 : FP_ONE;

  always_comb begin
    ez_we = e_ov;
    ez_wa = e_otag.addr;
    if (bypass)           ez_wd = ez_old[EL-1];
    else if (e_otag.pec)  ez_wd = FP_ZERO;
    else if (e_otag.src)  ez_wd = src_val;
    else                  ez_wd = e_new;
    h_we  = hx_ov;
    h_wa  = h_otag.addr;
    hx_wd = bypass ? hx_old[HL-1] : hx_new;
    hy_wd = bypass ? hy_old[HL-1] : hy_new;
  end

  // The two H units run in lock step (tags are compared only while valid: they are not reset).
  a_h_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                 hx_ov == hy_ov && (!hx_ov || hx_ot == hy_ot));

endmodule
