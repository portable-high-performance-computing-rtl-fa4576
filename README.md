# FDTD/FIT machine: a memory-architecture Maxwell solver in SystemVerilog

This is RTL for a dedicated computer that runs finite-difference time-domain
(FDTD), or finite-integration (FIT), simulation of electromagnetic fields on a
3D Yee grid. It rests on one observation. All six field updates of the
leapfrog scheme have the same form:

    X(n+1) = X(n-1) ± C · [ (f1 − f2) − (f3 − f4) ]

X is one field component at one cell. f1..f4 are two pairs of neighbouring
values of the other field, and C is a material constant of the cell. A small
dataflow tree computes this form: two subtractors, a third subtractor, a
multiplier and an adder. It needs no instruction stream and no bus, and it
turns out one result per clock. The machine puts three such trees side by
side for the x, y and z components. It then sweeps the grid one cell per
clock.

The hard part is feeding the trees. One cell needs twelve field values in
the same clock, and most of them come from neighbouring cells. The machine
gets them from a **parallel-access memory**: every field component is stored
three times, and each copy is read at a different neighbour.

Unlike a fully spatial array, where each grid cell has its own hardware, the
grid size here is limited only by memory. The active grid is set at run time.

## The update equations as built

The fields are `e_x e_y e_z` (electric) and `b_x b_y b_z` (magnetic). One
time step is an **E half step** followed by a **b half step**:

    e_x += Ce·[(b_z − b_z(j−1)) − (b_y − b_y(k−1))]
    e_y += Ce·[(b_x − b_x(k−1)) − (b_z − b_z(i−1))]
    e_z += Ce·[(b_y − b_y(i−1)) − (b_x − b_x(j−1))]

    b_x −= Ch·[(e_z(j+1) − e_z) − (e_y(k+1) − e_y)]
    b_y −= Ch·[(e_x(k+1) − e_x) − (e_z(i+1) − e_z)]
    b_z −= Ch·[(e_y(i+1) − e_y) − (e_x(j+1) − e_x)]

`Ce = Δt/(εΔl)` and `Ch = Δt/(μΔl)` are stored for every cell. This is how
dielectric and magnetic materials are modelled.

The number format is this design's choice. Fields are 16-bit signed integers
(`DATA_W`). Constants are 18-bit unsigned with 16 fraction bits, so 1.0 is
65536. A product is rounded half up: `floor((C·d + 2^15) / 2^16)`. Every
stored result saturates to the 16-bit range.

## The parallel-access memory (the core of the design)

Each component column of the memory module holds four memories. All four
are addressed by cell, `{k, j, i}`:

| component | Memory1 | Memory2   | Memory3   | Memory4 (PML split) |
|-----------|---------|-----------|-----------|---------------------|
| e_x       | (i,j,k) | (i,j+1,k) | (i,j,k+1) | e_xy                |
| e_y       | (i,j,k) | (i+1,j,k) | (i,j,k+1) | e_yz                |
| e_z       | (i,j,k) | (i+1,j,k) | (i,j+1,k) | e_zx                |
| b_x       | (i,j,k) | (i,j−1,k) | (i,j,k−1) | b_xy                |
| b_y       | (i,j,k) | (i−1,j,k) | (i,j,k−1) | b_yz                |
| b_z       | (i,j,k) | (i−1,j,k) | (i,j−1,k) | b_zx                |

Memory1..3 always hold the same data: a write of cell (i,j,k) goes to all
three at address (i,j,k). Each copy is *read* at a different address, so
while the machine works on cell (i,j,k), it reads:

- the b copies at the cell and at its −1 neighbours, which the E half step
  needs;
- the e copies at the cell and at its +1 neighbours, which the b half step
  needs.

The read addresses do not depend on the half step. Both half steps are
served by the same reads, and the data selector only changes which words
go to which lane. Each table entry was checked against the equations above.
For example, e_x needs `b_z(i,j−1,k)` and `b_y(i,j,k−1)`, which are
Memory3 of b_z and Memory3 of b_y.

Every cell also has three more words:

- **Boundary condition** (`bound_t`, 14 bits):
  - `vac`: 1 means vacuum or material, 0 means perfect conductor;
  - `pml`: the cell is in the absorbing layer;
  - `px`, `py`, `pz`: the cell's depth index into the PML along each axis.
- **Grid information** (`grid_t`, 36 bits): `Ce` and `Ch`.
- **Input signal**: a separate memory with one excitation sample per time
  step (4096 samples).

A neighbour that lies outside the active grid reads as zero. The grid edge
therefore behaves like a conductor, unless the host lines the edge with PML
cells.

## Pipeline and timing

One cell enters per clock. A sweep never waits on memory:

| clock | what happens                                                                 |
|-------|------------------------------------------------------------------------------|
| t     | the controller issues (i,j,k); the selector drives 18 field read addresses   |
| t+1   | the words arrive; zero substitution; lane routing; source added; PML table lookup |
| t+2   | lane stage 1: curl differences                                               |
| t+3   | lane stage 2: multiply and accumulate; normal/PML select; conductor AND; write-back |

During the E sweep the machine reads b and the old E of the cell itself, and
writes E. No cell's result is read again within the sweep, so there is no
hazard inside a sweep. Between the E and b sweeps the controller stalls for
`DRAIN = 3` clocks. This makes sure the last E values are written before the
b sweep reads them.

**One time step takes `2 · (nx·ny·nz + 3)` clocks.** At the 51 MHz clock of
the built machine, that is about 25 million cell updates per second, each
updating all six components. For the full 256 × 256 × 64 grid, one step
takes 8,388,614 clocks, or 0.16 s.

## Boundary conditions

**Conductors.** The `vac` bit of a cell is ANDed with every bit of the new
E components, so a conductor cell stays at zero. The AND sits on the
result path, so it costs no clock. It applies to the E half step only.

**PML (split-field perfectly matched layer).** Inside the PML a component is
the sum of two parts, one driven by each derivative. For e_x:
`e_x = e_xy + e_xz`. Memory1 holds the total and Memory4 holds the first
part, so the second part is the total minus Memory4. Each part has its own
loss:

    Xa(n+1) = ca_a·Xa(n) + s·cb_a·(f1 − f2)      (s = +1 for E, −1 for b)
    Xb(n+1) = ca_b·Xb(n) − s·cb_b·(f3 − f4)
    X(n+1)  = Xa(n+1) + Xb(n+1)

The first part of lane x takes its constants from the y axis and the second
from z. Lane y uses z then x, and lane z uses x then y. The constants
`{ca, cb}` come from `pml_coef_table`, indexed by the cell's depth index on
that axis. There is one table for the E half step and one for the b half
step, each with 16 entries loaded by the host. The normal circuit and the
PML circuit run in parallel every clock, and the cell's `pml` flag picks
one. Memory4 is written only for PML cells.

The host computes the constants from the conductivity profile it wants. For
a lossy part with `σΔt/2ε = g`, the usual choice is `ca = (1−g)/(1+g)` and
`cb = C/(1+g)`.

## Excitation

`power_input` compares each cell on the data side with the programmed
source cell. At that cell, during the source component's half step, it adds
`input_signal[step mod 4096]` to the component's old value. This is a soft,
additive source. Any of the six components can be the source, so a magnetic
dipole is a b source.

## Host interface (top-level ports of `fdtd_machine`)

All host accesses are accepted only while `busy` is low.

- `host_cell_we`, `host_addr`, `host_wcell`: write a whole cell in one clock.
  `cell_t` holds the six fields, the six PML split parts, the boundary word
  and the grid word.
- `host_rd_en`, `host_addr`: read a whole cell. `host_rdata` is valid with
  `host_rvalid` one clock later.
- `host_sig_we`, `host_sig_addr`, `host_sig_data`: load the input signal.
- `host_coef_we`, `host_coef_phase`, `host_coef_idx`, `host_coef`: load the
  PML table.
- `nx`, `ny`, `nz`: set the active grid, anchored at cell (0,0,0).
  `n_steps` and a one-clock `start` run the simulation. `done` pulses at the
  end, and `step` counts the time steps.
- `src_en`, `src_addr`, `src_comp`: set the source.
- `src_hit`, `edge_zeroed`, `draining`: activity outputs for monitoring.

## Parameters

| parameter  | default | meaning |
|------------|---------|---------|
| `XW, YW, ZW` | 8, 8, 6 | grid capacity 2^XW × 2^YW × 2^ZW = 256 × 256 × 64 cells (the machine's stated size) |
| `TW`       | 12      | input-signal memory depth 2^TW |
| `SW`       | 16      | time-step counter width |
| `DATA_W`, `COEF_W`, `COEF_FRAC`, `PML_IW` | 16, 18, 16, 4 | in `fdtd_pkg`: field word, constant word, fraction bits, PML depth index |

At full size the memory module holds 24 field arrays of 4M × 16 bits, plus
the boundary and grid arrays. That is about 1.8 Gbit, far beyond any
on-chip RAM. On real hardware these arrays are external memories. In RTL
they are plain arrays (`field_ram`), written so that an FPGA tool can map a
smaller configuration to block RAM.

## Files

Package:

- `rtl/fdtd_pkg.sv`: types (`cell_t`, `bound_t`, `grid_t`, `lane_in_t`,
  …), sizes and the saturate/round helpers.

Top:

- `rtl/fdtd_machine.sv`: wires the blocks into the pipeline and owns the
  write-back and host multiplexing.

Memory:

- `rtl/memory_module.sv`: six field memories plus the boundary,
  grid-information and input-signal memories.
- `rtl/field_memory.sv`: one component column (three copies and the PML
  split memory).
- `rtl/field_ram.sv`: one bank, with separate write and clocked read ports.

Datapath:

- `rtl/data_selector.sv`: neighbour addresses, edge zeroing and lane
  routing.
- `rtl/calculation_module.sv`: three lanes.
- `rtl/component_calc.sv`: one lane (normal circuit, PML circuit, selector,
  conductor AND).
- `rtl/update_unit.sv`: the normal dataflow circuit, two clocks.
- `rtl/pml_unit.sv`: the split-field PML circuit, two clocks.
- `rtl/pml_coef_table.sv`: PML constants.
- `rtl/power_input.sv`: the source.

Control:

- `rtl/master_controller.sv`: time steps, sweeps and drain stall.

Testbenches are in `tb/`. Each block's testbench is named `tb_<module>.sv`.
The workload testbench is `tb_waveguide_pml.sv`, and `tb/fdtd_ref_pkg.sv`
holds the reference arithmetic they all share.

## Simulating

Every testbench checks itself and prints one
`TB_RESULT checks=N failures=M` line. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fdtd_pkg.sv tb/fdtd_ref_pkg.sv rtl/*.sv tb/tb_fdtd_machine.sv \
        --top-module tb_fdtd_machine
    ./obj_dir/Vtb_fdtd_machine

Replace `tb_fdtd_machine` with any other testbench name.

- `tb_fdtd_machine` is the end-to-end test. It builds an 8 × 8 × 8 memory
  and fills every cell with random fields, random split parts, random
  constants, conductor cells and PML cells. It runs three time steps on a
  7 × 6 × 5 active grid with a source, then reads back every cell. It
  compares them with a reference model written directly from the equations
  above. It also checks the clock count, and it checks that each mechanism
  happened: PML, conductor, edge zeroing, source, drain stall, host load
  and read-back.
- `tb_fdtd_machine_full` uses the default 256 × 256 × 64 configuration. It
  loads all 4M cells, runs one time step with a point source, and checks
  the source cell, its neighbours, the grid corners and the step time
  (8,388,614 clocks). It takes about 15 s and 250 MB.
- `tb_waveguide_pml` is a scaled-down version of the waveguide workload. It
  uses a 24 × 12 × 12 grid with a metal guide along x, two PML cells on
  every face and a sinusoidal e_z source. It runs 40 steps, compares every
  cell with the reference model, and checks that the wave reached the end
  of the guide and the PML.
- The block testbenches drive random and saturating operands and check
  latencies.

## How far to trust it, and where it is this design's own

The following follow the machine's description:

- the form of the update and its dataflow tree;
- three components computed in parallel;
- the memory map: three shifted copies per component, PML split parts in
  Memory4, and per-cell boundary, grid-information and input-signal
  memories;
- the 0/1 conductor bit applied through an AND gate at no clock cost;
- the split-field PML running beside the normal circuit behind a selector;
- the list of FPGA blocks (data selector, calculation module, master
  controller, power input, PML constants);
- the 256 × 256 × 64 capacity.

The following were not specified and were chosen here. Change them freely:

- all word widths and the fixed-point format, with rounding and saturation;
- the lane pipeline depth of 2 and the drain stall of 3;
- storing the PML total plus one part, rather than two parts;
- discretising the PML with `{ca, cb}` per depth index, and the 16-entry
  table;
- the soft single-point source;
- zero at the grid edge;
- raster order with i fastest;
- the conductor mask applying to E only;
- the host port and word formats;
- synchronous reset of control state only (the memories are loaded, not
  reset).

Known departures and limits:

- The built machine keeps its fields in external asynchronous SRAM chips.
  The board has fewer chips than there are logical memories here, so it
  must share chips between memories in some way that is not known. Here
  each logical memory is a separate synchronous array with its own read
  and write port. A
  port to real SRAM would need a memory controller that time-shares the
  chips. That controller would change the cell rate.
- Mur's absorbing boundary, used in the earlier 2D full-dataflow machine,
  is not provided. The PML is the absorbing boundary.
- There is no link between several boards and no PC-side interface.
- The numerical accuracy of the fixed-point format against a floating-point
  solver has not been evaluated. The testbenches check the RTL against the
  same fixed-point rules, not against physics.
