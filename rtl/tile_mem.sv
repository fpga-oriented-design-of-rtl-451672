// tile_mem: one field of a kernel pipeline's local memory (the on-chip M9K block RAMs).
//
// Holds one field (Ez, Hx or Hy) of a tile together with its ghost zone: DEPTH words of 32 bits.
// It has one write port and NRD read ports. Each read port is synchronous: the word at
// rd_addr[k] appears on rd_data[k] one clock later. A read and a write of the same address in
// the same clock return the old word. On an FPGA every read port becomes a copy of the block
// RAM that shares the write port, which is how an OpenCL compiler gives a kernel several
// parallel local-memory reads.
//
// That the local memory is built from M9K blocks behind a local-memory interconnect follows the
// architecture model; the port count and read timing are this design's own choices.
module tile_mem #(
  parameter int unsigned DEPTH  = 756,
  parameter int unsigned NRD    = 3,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [ADDR_W-1:0]  wr_addr,
  input  logic [31:0]        wr_data,
  input  logic [ADDR_W-1:0]  rd_addr [NRD],
  output logic [31:0]        rd_data [NRD]
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  for (genvar k = 0; k < NRD; k++) begin : g_rd
    always_ff @(posedge clk) rd_data[k] <= mem[rd_addr[k]];
  end

endmodule
