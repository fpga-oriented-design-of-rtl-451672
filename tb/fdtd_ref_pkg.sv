// fdtd_ref_pkg: reference 2-D FDTD time step for the testbenches, on whole N x N arrays.
//
// Arrays are indexed y*N + x. One step is the E update of every cell (Ez forced to 0 on the
// outermost ring, the +/-1 square-wave source at (N/2, N/2)), then the Hx and Hy update of every
// cell, with Ez read as 0 beyond the grid. Every operation is rounded to fp32 in the same order
// as the datapath: Ez + (Px*(Hy - Hy[x-1]) - Py*(Hx - Hx[y-1])) and H - Q*(E1 - E0).
package fdtd_ref_pkg;
  import fp_ref_pkg::*;

  typedef logic [31:0] fa_t [];

  function automatic logic [31:0] src_value(input int n, input int half_log2);
    return ((n >> half_log2) & 1) != 0 ? 32'hBF80_0000 : 32'h3F80_0000;
  endfunction

  // One time step (global step number n) on ez/hx/hy.
  function automatic void step(ref fa_t ez, ref fa_t hx, ref fa_t hy, input int nn,
                               input logic [31:0] px, input logic [31:0] py,
                               input logic [31:0] qx, input logic [31:0] qy,
                               input int n, input int half_log2);
    for (int y = 0; y < nn; y++) begin
      for (int x = 0; x < nn; x++) begin
        int c;
        c = y * nn + x;
        if (x == 0 || y == 0 || x == nn - 1 || y == nn - 1) begin
          ez[c] = 32'h0;
        end else if (x == nn / 2 && y == nn / 2) begin
          ez[c] = src_value(n, half_log2);
        end else begin
          logic [31:0] dhx, dhy;
          dhx   = fsub(hx[c], hx[c - nn]);
          dhy   = fsub(hy[c], hy[c - 1]);
          ez[c] = fadd(ez[c], fsub(fmul(px, dhy), fmul(py, dhx)));
        end
      end
    end
    for (int y = 0; y < nn; y++) begin
      for (int x = 0; x < nn; x++) begin
        int c;
        logic [31:0] ey, ex;
        c  = y * nn + x;
        ey = (y == nn - 1) ? 32'h0 : ez[c + nn];
        ex = (x == nn - 1) ? 32'h0 : ez[c + 1];
        hx[c] = fsub(hx[c], fmul(qy, fsub(ey, ez[c])));
        hy[c] = fsub(hy[c], fmul(qx, fsub(ex, ez[c])));
      end
    end
  endfunction

endpackage
