# 2-D FDTD accelerator with overlapped tiling

This is a synthesizable SystemVerilog implementation of an FPGA accelerator for the
two-dimensional finite-difference time-domain (FDTD) method. It follows the architecture of
"FPGA-Oriented Design of an FDTD Accelerator Based on Overlapped Tiling" (Takei, Waidyasooriya,
Hariyama, Kameyama). That design was produced by an OpenCL compiler. Here it is written out as
RTL, and the sections below mark each point where that required a choice of its own.

The problem it solves is memory bandwidth. A plain FDTD kernel reads and writes every field value
in external memory on every time step, so on an FPGA board with a few tens of GB/s it is limited
by memory, not by arithmetic. Overlapped tiling breaks that link. Each small tile of the grid is
loaded once together with a margin (the *ghost zone*) as wide as the number of time steps to be
taken. Several time steps are then computed entirely in on-chip memory, and only the tile's core
is written back. External traffic per time step drops by roughly the number of steps taken per
load, at the price of recomputing the margins, which neighbouring tiles share.

## The computation

The grid holds the 2-D TM fields: Ez at integer points, Hx at (i, j+1/2), Hy at (i+1/2, j). In
memory, index (x, y) of Hx means Hx(x, y+1/2), and index (x, y) of Hy means Hy(x+1/2, y). One
time step is an E update of every cell followed by an H update of every cell:

    Ez'(x,y) = Ez + ( Px*(Hy(x,y) - Hy(x-1,y)) - Py*(Hx(x,y) - Hx(x,y-1)) )
    Hx'(x,y) = Hx - Qy*(Ez'(x,y+1) - Ez'(x,y))
    Hy'(x,y) = Hy - Qx*(Ez'(x+1,y) - Ez'(x,y))

All arithmetic is IEEE-754 single precision. Every operation is rounded to nearest even, in
exactly the order written above. Subnormal values are flushed to zero.

- **Coefficient sign.** Both H updates subtract. The standard Yee scheme adds in the Hy update,
  so for a physical simulation Qx must be negative (Qx = -dt/(mu*dx)). With all four
  coefficients positive, the scheme grows without bound. The testbenches that run many steps
  use |P| = |Q| = 0.5 with Qx < 0; that setting is stable.
- **Coefficients are uniform.** The four coefficients are run-time inputs that apply to the
  whole grid. Per-cell coefficients, needed for inhomogeneous media, are not implemented.
- **Boundary.** Ez is forced to 0 on the outermost ring of cells and everywhere outside the
  grid, which models a perfect electric conductor. Ez beyond the grid reads as 0 in the H update.
- **Source.** A hard source drives Ez at (N/2, N/2) with a square wave of +1 and -1. The wave
  starts at +1 and flips sign every 2^`src_half_log2` steps. Time step n uses +1 when bit
  `src_half_log2` of n is 0. The period is this design's own choice.

## Overlapped tiling and why the tile core is exact

The grid is cut into tiles of TILE_W x TILE_H = 32 x 8 cells. One *pass* advances every tile by
TSTEP = 5 time steps. It loads an LW x LH = (32+2*5) x (8+2*5) = 42 x 18 = 756-cell area
(the tile plus a 5-cell ghost zone all round) and works on that area in isolation.

Inside the area, a cell whose neighbour lies outside the area reads that neighbour as zero. The
result at that cell is wrong. After each time step the wrong region has grown by exactly one
cell inwards:

- on the low side through Hy(x-1) and Hx(y-1) in the E update;
- on the high side through Ez(x+1) and Ez(y+1) in the H update.

After TSTEP steps the wrong region is exactly the ghost zone, so the 32 x 8 core equals what a
whole-grid computation would give, bit for bit. Only the core is stored.

Ghost-zone cells beyond the grid edge are not loaded at all, which saves memory traffic for edge
tiles. Their stale contents cannot reach the core: Ez there is forced to 0 on every step, and H
outside the grid feeds only those forced cells.

Each pass reads one of two field buffers in global memory and writes the other; the two swap
after every pass. Without this, a tile could load a ghost zone that a neighbouring tile had
already advanced. The final fields end up in the buffer reported by `result_buf`.

## Architecture

```
 host control ──► fdtd_controller ──tile commands──► fdtd_tile_pipeline x NP ──┐
                  (pass loop, tile                   (load / compute / store)   │ requests
                   dispatch, buffer swap)                                       ▼
                                                              gmem_interconnect ──► memory-controller port
```

| Module | Role |
|---|---|
| `fdtd_accel_top` | Top level. Host control inputs and the memory-controller port. |
| `fdtd_controller` | Time loop in passes of TSTEP steps. Hands each tile to an idle pipeline, waits for all pipelines, swaps buffers, reports `done`. |
| `fdtd_tile_pipeline` | One kernel pipeline. LOAD, then COMPUTE through TSTEP step stages, then STORE. |
| `fdtd_step_stage` | One unrolled time step: one E update unit and two H update units. |
| `fdtd_e_update`, `fdtd_h_update` | Pipelined field updates, 4 and 3 clocks, one cell per clock. |
| `fp32_addsub`, `fp32_mul` | Combinational single-precision arithmetic. |
| `tile_mem` | Local memory of one field: one write port, several synchronous read ports. |
| `gmem_interconnect` | Round-robin arbiter of NP pipelines onto one memory port. Routes in-order read data back through an order FIFO. |
| `fdtd_pkg` | Shared types: `cell_t` (Ez, Hx, Hy), `coef_t`, `gmem_req_t`, and the default sizes. |

The default build has one kernel pipeline (NP = 1), which is the configuration of the published
resource figures. The interconnect and controller also work with several pipelines; the
end-to-end testbench uses two.

## Inside the kernel pipeline: unrolled time steps as a wavefront

This is the part that takes the most care. The published design unrolls the time-step loop, and
its resource table shows four DSP blocks per unrolled step (12, 20 and 24 for 3, 5 and 6 steps).
That matches one E update (two multipliers) plus an Hx and an Hy update (one multiplier each).
This RTL has the same structure: TSTEP chained `fdtd_step_stage` instances, so TSTEP*4 `fp32_mul`
in all. How the stages share work is this design's own choice.

**Field copies.** The pipeline holds TSTEP+1 copies of the local area. Each copy is three
`tile_mem` instances, one for each of Ez, Hx and Hy.

- Copy 0 is written by LOAD.
- Stage k reads copy k and writes copy k+1.
- STORE reads copy TSTEP.

No copy is written by more than one stage, so there are no write conflicts and no
write-after-read hazards.

**Streaming order.** Every stage sweeps the 756 cells in row-major order (x fastest), one cell
per clock. A clock counter `comp_t`, shared by all stages, starts when COMPUTE begins. Stage k
works as follows:

- Its **E part** handles cell `comp_t - k*STAGE_LAG`. It reads Ez, Hx, Hx(y-1), Hy and Hy(x-1)
  from copy k and writes the new Ez into copy k+1.
- Its **H part** trails by H_LAG = LW+8 cells. It reads the new Ez at (x, y), (x+1, y) and
  (x, y+1) from copy k+1, and the old Hx and Hy from copy k. It writes the new Hx and Hy into
  copy k+1.
- Stage k+1 starts STAGE_LAG = H_LAG+6 = 56 clocks after stage k.

The lags are the smallest ones with margin that make every read follow its write:

- A new Ez is readable 6 clocks after its cell is issued: 1 clock to read, 4 clocks in the E
  unit, 1 clock to write. The H part needs Ez one row ahead (+LW), so H_LAG >= LW+6.
- A new H is readable 5 clocks after issue. The next stage's E part needs H at the same cell,
  so STAGE_LAG >= H_LAG+5.

In steady state all stages are busy at once on different rows: a wavefront in time. The compute
phase lasts COMP_CYC = (TSTEP-1)*STAGE_LAG + H_LAG + LW*LH + 6 clocks, which is 1036 for the
defaults. A step-by-step schedule with one set of units would take about 7,600.

**Short passes.** When total_steps is not a multiple of TSTEP, the last pass has fewer steps.
Stages at index `steps` and above are put in *bypass*: they copy their input to copy k+1
unchanged, and the source override is disabled. The compute time is the same as a full pass.

**Overrides.** The E part computes each cell's global coordinates. It replaces the result with 0
for perfect-conductor cells, and with the source value for the source cell. Global step t_base+k
chooses the source sign.

## Global memory interface

- One memory word is one cell: `{ez, hx, hy}`, 96 bits.
- The cell address is `buf*MAX_N*MAX_N + y*MAX_N + x`, 20 bits (`GADDR_W`).
- Requests (`m_req_valid`/`m_req_ready`, `m_req = {we, addr, wdata}`) use a valid/ready
  handshake. The payload must stay stable while valid is high and ready is low.
- Read data comes back on `m_resp_valid`/`m_resp_rdata` in request order, with any latency.
  There is no response back-pressure.
- A pipeline issues one load request or one store per clock.

## Host control

1. Write the initial fields into buffer 0.
2. Pulse `start` for one clock. Hold these inputs for the whole run:
   - `total_steps`;
   - `grid_n`: N, a multiple of 32 and of 8, at most MAX_N;
   - `src_half_log2`;
   - `coef`: Px, Py, Qx, Qy.
3. `busy` stays high until `done` pulses. `result_buf` then names the buffer holding the fields
   after `total_steps` steps.

A run of 0 steps finishes at once, with `result_buf` = 0.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NP` | 1 | Kernel pipelines. |
| `TILE_W`, `TILE_H` | 32, 8 | Tile core size. |
| `TSTEP` | 5 | Time steps per pass, which is also the number of unrolled stages. 5 was the fastest setting measured for the original design. |
| `MAX_N` | 512 | Largest grid; it also sets the address layout. |
| `FIFO_DEPTH` | 16 | Outstanding reads in the interconnect. |

TSTEP is fixed when the design is built. To run 3 or 6 steps per pass, build with `TSTEP=3` or
`TSTEP=6`; a testbench does exactly this. `TSTEP=1` also works. It goes to global memory on
every step, like a kernel without tiling.

## Performance

Per tile and pass, the pipeline spends:

- about 756 clocks loading, plus the memory latency;
- 1036 clocks computing;
- 256 clocks storing, plus one.

These phases run one after another. For a 128 x 128 grid and 1000 time steps, that comes to
28.6 M clocks with one pipeline, simulated with a memory model of 20-clock latency and 5 %
stalls. The 256 x 256 and 512 x 512 grids take 1.17 M and 4.72 M clocks per 10 steps. The
original design's measured times (0.070, 0.25 and 1.05 s for 1000 steps) would need a clock of
about 410-470 MHz here. At a usual FPGA clock of 200-250 MHz this RTL is therefore about twice
as slow as the original, whose clock rate is not given. Two gains are left open:

- overlap the next tile's load with the current tile's compute (double-buffer copy 0);
- use more pipelines (NP).

The memory bandwidth of the board (25.6 GB/s) is not modelled.

## Departures from the original design and open points

- **Outside this RTL.** The host PC, the PCI Express core, the DDR3 memory controller and the
  DDR3 memory are not part of it. The memory-controller port is brought out at the top, and
  the host's transfers are done by the testbenches.
- **The pass loop.** In the original design the host launches the kernel once per pass. Here
  `fdtd_controller` runs the same loop in hardware.
- **The kernel pipeline's insides.** The original is compiler-generated and not described. The
  per-step field copies, the wavefront schedule, the bypass and the ping-pong buffers are this
  design's own.
- **Coefficients.** They are uniform over the grid, and Qx carries the sign of the Hy update
  (see above).
- **Source.** Its period is a power of two, chosen at run time.
- **Arithmetic.** Subnormal numbers are flushed to zero. Infinity and NaN operands are passed
  on or give infinity; NaN is never generated. FPGA floating-point cores may differ in these
  corner cases.
- **Local memory.** The original's M9K blocks and local-memory interconnect are modelled as one
  RAM per field and per copy, with replicated read ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Field results are compared bit for bit with a reference model
(`tb/fdtd_ref_pkg.sv`). That model does the same step in the same operation order, but rounds
through IEEE double (`tb/fp_ref_pkg.sv`) instead of mantissa alignment.

| Testbench | What it shows |
|---|---|
| `tb_fp32_addsub`, `tb_fp32_mul` | About 15,000 random and corner-case operations against correctly rounded results. |
| `tb_fdtd_e_update`, `tb_fdtd_h_update` | The update equations, the 4- and 3-clock latencies, and tag alignment. |
| `tb_tile_mem` | Every read port, one-clock reads, and old data on a read-during-write. |
| `tb_fdtd_step_stage` | One stage on a 12 x 6 area: exact step, conductor and source cells, first-write timing, bypass. |
| `tb_fdtd_tile_pipeline` | All tiles of a 96 x 96 grid for a 5-step and then a 3-step pass. Also checks read counts (756 for an interior tile, fewer at edges) and the 1036-clock compute phase. |
| `tb_gmem_interconnect` | Three requesters: in-order routing, a full order FIFO, contention, a bound on waiting. |
| `tb_fdtd_controller` | Passes of 5, 5 and 2 steps; each tile dispatched once per pass; buffer alternation; a zero-step run. |
| `tb_fdtd_accel_top` | End to end: two pipelines, a 64 x 64 grid with random fields, 12 steps. Counts that every mechanism occurred: back-pressure, contention, a full FIFO, clipped ghost zones, a short pass with bypass, buffer swaps, source, conductor. |
| `tb_fdtd_full` | The top at its default parameters, a 128 x 128 grid, 10 steps, plus a bound on the clock count. |
| `tb_fdtd_workloads` | The evaluated cases at defaults: N = 128 for the full 1000 steps (about 1.5 min of simulation), and N = 256 and 512 for 10 steps each. |
| `tb_fdtd_tstep_configs` | Builds with TSTEP = 1, 3 and 6 side by side on a 64 x 64 grid for 14 steps. TSTEP = 1 stands in for a kernel without tiling: it needs about twice the clocks of the others. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/fdtd_pkg.sv tb/fp_ref_pkg.sv tb/fdtd_ref_pkg.sv tb/tb_fdtd_full.sv \
    --top-module tb_fdtd_full -o sim && ./obj_dir/sim
```

Replace the testbench name as needed. Unit testbenches that do not use the FDTD reference can
leave out `tb/fdtd_ref_pkg.sv`. `tb/gmem_model.sv` is the behavioural global memory; set its
latency and stall rate there.
