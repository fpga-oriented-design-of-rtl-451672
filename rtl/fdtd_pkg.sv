// fdtd_pkg: types and constants shared by the 2-D FDTD overlapped-tiling accelerator.
//
// Field values are IEEE-754 single precision words (fp32_t). One grid cell of the global field
// arrays holds the three 2-D TM fields Ez, Hx and Hy together (cell_t, 96 bits), so that one
// global-memory word moves one cell. Hx at index (i,j) is the staggered sample Hx(i, j+1/2) and
// Hy at (i,j) is Hy(i+1/2, j). The update coefficients Px, Py, Qx, Qy are taken as uniform over
// the grid (coef_t). The global-memory request bundle (gmem_req_t) is a valid/ready request
// with in-order read responses.
//
// The tile of 32 x 8 cells and the five time steps per tile pass (TSTEP_LOOP) follow the
// evaluated configuration; the word layout and the uniform coefficients are this design's own.
package fdtd_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t ez;
    fp32_t hx;
    fp32_t hy;
  } cell_t;

  typedef struct packed {
    fp32_t px;
    fp32_t py;
    fp32_t qx;
    fp32_t qy;
  } coef_t;

  localparam int unsigned GADDR_W = 20;  // cell address: 2 buffers x 512 x 512 cells

  typedef struct packed {
    logic                 we;
    logic [GADDR_W-1:0]   addr;
    cell_t                wdata;
  } gmem_req_t;

  localparam fp32_t FP_ZERO    = 32'h0000_0000;
  localparam fp32_t FP_ONE     = 32'h3F80_0000;
  localparam fp32_t FP_MINUS1  = 32'hBF80_0000;

  // Defaults of the evaluated configuration.
  localparam int unsigned TILE_W_DEF = 32;
  localparam int unsigned TILE_H_DEF = 8;
  localparam int unsigned TSTEP_DEF  = 5;
  localparam int unsigned MAX_N_DEF  = 512;

endpackage
