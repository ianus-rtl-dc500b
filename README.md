# IANUS spin-glass processor

This is RTL for a board of many-core processors that run Metropolis Monte Carlo
on 3D Edwards–Anderson spin glasses. A spin glass is a cubic lattice of ±1
spins. Each pair of neighbouring spins is joined by a random ±1 coupling. One
Monte Carlo sweep visits every spin. For each one it computes what flipping
the spin would cost in energy, and accepts the flip with probability
`min(1, exp(-β·ΔE))`. The work is all bit manipulation and table look-ups, and
a huge number of sweeps is needed. So the design goes as wide as it can: one
SP (processing FPGA) updates a whole `L × L` plane of spins, 256 spins at
`L = 16`, in every clock cycle. The lattice lives in on-chip RAM, so the
memory bandwidth that this takes is available.

A board (`ianus_board`) has 16 SPs (`spin_engine`). Each one runs an
independent simulation with its own couplings, temperature and random seeds.
All of them sit behind one IO processor (`iop`), the host's only way in.

## Two replicas, two artificial lattices

No two neighbouring spins may be updated at the same time. On a cubic lattice
that allows at most the white or the black half of a checkerboard. To keep
every update cell busy, each SP simulates **two replicas** of the same sample,
sharing the same couplings, and regroups their sites:

* bank A holds the white sites of replica 1 and the black sites of replica 2;
* bank B holds the black sites of replica 1 and the white sites of replica 2.

Every neighbour of a bank-A site is in bank B and vice versa. Each bank is
therefore a full `L × L × L` lattice with the original torus topology. All of
one bank can be updated while the other is only read. The bank being updated
is called **S** and the other **N**. A *half-sweep* updates all of S. After
it, S and N swap roles. A full sweep is two half-sweeps, so every run ends with
the banks back in their original roles.

## Storage

Each lattice (bank A, bank B, and the couplings along x, y and z) is a
`lattice_mem`: `L` RAM blocks (`plane_ram`), one per x coordinate. Each block
is `L` bits wide (bit = y) and `L` words deep (address = z). Reading address
`z` from all blocks returns the whole xy plane `z` in one cycle. In every
`L·L`-bit plane vector, bit `x*L + y` is site `(x, y)`.

Couplings are stored at the site a bond starts from. The bond
`(x,y,z)–(x+1,y,z)` is bit `(x,y)` of plane `z` in the Jx memory, and
likewise for y and z. A site's `-x` bond is therefore `Jx(x-1,y,z)` and its
`-z` bond is `Jz(x,y,z-1)`. Both banks use the same coupling memories.

## The plane pipeline (sweep_ctrl + spin_engine)

To update S plane `z`, the cells need N planes `z-1`, `z` and `z+1`, the
coupling planes `z`, and Jz plane `z-1`. At regime only **one** new N plane
is fetched per cycle. Planes `z-1` and `z` are still in two plane registers
(`nbuf_m`, `nbuf_c`) from the previous steps, and Jz `z-1` is in a register
(`jzp`). The RAMs have a one-cycle synchronous read. The controller therefore
issues reads in one cycle and tells the datapath one cycle later, through a
registered tag `act`, what the RAM outputs now hold:

| cycle of half-sweep | reads issued                          | action on RAM outputs (tag of previous cycle) |
|---------------------|---------------------------------------|-----------------------------------------------|
| PRE0                | N plane L-1, Jz plane L-1             | –                                             |
| PRE1                | N plane 0                             | `LOADM`: nbuf_m ← N(L-1), jzp ← Jz(L-1)        |
| RUN z = 0           | N plane 1, S plane 0, J planes 0      | `LOADC`: nbuf_c ← N(0)                          |
| RUN z (1 … L-1)     | N plane z+1 mod L, S plane z, J z     | `COMP` for plane z-1                           |
| DRAIN               | –                                     | `COMP` for plane L-1                           |

In a `COMP` cycle the update array uses `nbuf_m` (z-1), `nbuf_c` (z), the N
RAM output (z+1), the S RAM output, the three coupling RAM outputs and `jzp`.
The new S plane is written back at address `z` in the same cycle. Then the
plane registers shift, and the random wheels advance. The wrap-around in z
comes from fetching plane `L-1` in the prologue and plane `0` again in the
last step. The wrap in x and y is fixed wiring in the array.

The DRAIN cycle issues no reads, so the next half-sweep's first read (of the
old S plane `L-1`, now N) comes one cycle after that plane is written. A
half-sweep therefore takes **L + 3 cycles** and a sweep **2·(L + 3)**: 38
cycles at `L = 16`. The RUN phase does `L·L` updates per cycle, and the sweep
as a whole averages 215.6 updates per cycle. Runs are not overlapped with each
other.

## Update cell and probability table

`update_cell` is purely combinational. Spin bits are 1 = +1 and 0 = −1, and so
are coupling bits. A bond is *satisfied* (`J·s·s' = +1`) exactly when
`s ^ s' ^ j = 1`. The cell counts its satisfied bonds `u ∈ 0…6`. This is its
local energy index: `E = 6 − 2u`, and a flip costs `ΔE = 4u − 12`. `u`
addresses a 32-bit probability table, where 1.0 is stored as `2³² − 1`. The
cell flips the spin when `rnd ≤ P[u]`, so an entry of `2³²−1` flips
unconditionally.

The host fills the table with `P[u] = min(1, exp(−β(4u−12)))` scaled to
`2³²−1`. Entry 7 is never read. Each `boltzmann_lut` is a small
distributed-RAM array with two asynchronous read ports, shared by cells `2i`
and `2i+1`. All tables of an SP hold the same values and are written
together.

## Random numbers

Every update consumes one 32-bit random number. `pr_rng_wheel` is a
Parisi–Rapuano generator:

    I(k) = I(k−24) + I(k−55)  (mod 2³²)
    R(k) = I(k) ⊕ I(k−61)

It keeps the last 61 elements in registers. The recurrence is unrolled into a
combinational cascade of `NOUT` = 128 elements per cycle: element `n` of a
cycle takes its `k−24` tap from earlier in the same cycle once `n ≥ 24`, and
its `k−55` tap once `n ≥ 55`. An SP has `ceil(L²/128)` wheels, two at `L = 16`.
Cell `i = x*L + y` uses output `i mod 128` of wheel `i div 128`. A wheel
advances only in `COMP` cycles. Its 61 history words must be seeded by the
host before the first run. Nothing resets them.

## Host interface

The board's ports (`ianus_board`, passed on by `iop`) are a plain parallel
port. All of it is this design's own protocol:

| operation | signals | notes |
|-----------|---------|-------|
| write     | `h_we`, `h_sp`, `h_sel`, `h_addr`, `h_wdata` | one per cycle; ignored by an SP while it is busy |
| read      | `h_rd_req`, `h_rd_sp`, `h_rd_sel`, `h_rd_addr` → `h_rd_valid`, `h_rd_src`, `h_rd_data` | answer two clock edges after the request is sampled; only while the SP is idle |
| run       | `h_start`, `h_start_mask`, `h_n_sweeps` → `h_busy`, `h_done` | `h_done[i]` is held until SP i is started again |

`h_sel` (`ianus_pkg::mem_sel_e`) selects one of:

* `SEL_SPIN_A`, `SEL_SPIN_B`, `SEL_JX`, `SEL_JY`, `SEL_JZ`: a whole plane,
  with `h_addr` = z.
* `SEL_LUT`: table entry `h_addr[2:0]`, data in `h_wdata[31:0]`.
* `SEL_SEED`: history word `h_addr[5:0]` (0 = oldest) of wheel `h_addr[15:6]`.

A run of `n` sweeps on an SP takes `2n(L+3)` cycles. Add one IOP register
stage on the way in and one on the way out, plus the controller's start
cycle. A run of zero sweeps finishes at once. Reset (`rst_n`, asynchronous,
active low) clears control state only. Memories, tables and wheels must be
loaded.

A typical session: write both spin banks, the three coupling lattices, 7
table entries and `61 × wheels` seed words into each SP; start all SPs; wait
for `h_done`; read the spin planes back.

## Files

| file | contents |
|------|----------|
| `rtl/ianus_pkg.sv` | shared constants, `mem_sel_e`, `dp_act_e` |
| `rtl/ianus_board.sv` | top: IOP + `NSP` SPs |
| `rtl/iop.sv` | host/SP routing, merged read-back, status |
| `rtl/spin_engine.sv` | one SP: memories, plane registers, wheels, update array, host port |
| `rtl/sweep_ctrl.sv` | half-sweep sequencing, S/N role swap |
| `rtl/update_array.sv` | `L×L` cells, neighbour wiring, shared tables |
| `rtl/update_cell.sv` | one Metropolis decision |
| `rtl/boltzmann_lut.sv` | dual-read probability table |
| `rtl/pr_rng_wheel.sv` | unrolled Parisi–Rapuano generator |
| `rtl/lattice_mem.sv`, `rtl/plane_ram.sv` | plane-wide lattice storage |
| `tb/ianus_ref_pkg.sv` | reference models (sequential wheel, ±1-arithmetic half-sweep) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workload_models` |

Parameters and their defaults: `NSP = 16` SPs, `L = 16` lattice side, and
`RND_PER_WHEEL = 128` random numbers per wheel per cycle.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. For example, the whole board at its default
size:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ianus_board \
        -y rtl -y tb +libext+.sv rtl/ianus_pkg.sv tb/ianus_ref_pkg.sv tb/tb_ianus_board.sv
    ./obj_dir/Vtb_ianus_board

Use the same command with `tb_spin_engine`, `tb_sweep_ctrl`, `tb_update_array`,
`tb_update_cell`, `tb_boltzmann_lut`, `tb_pr_rng_wheel`, `tb_lattice_mem`,
`tb_plane_ram`, `tb_iop` or `tb_workload_models`.

`tb_ianus_board` runs at the default parameters: 16 SPs with `L = 16`. Each SP
gets a different coupling mix, temperature and seed set. Runs are started on
all SPs, then on a masked subset (with a write attempted while busy, which
must be refused), then with zero sweeps. Every spin plane is read back and
compared with the reference model. The test also counts the mechanisms
(prologue fetches, plane updates, role swaps, refused writes, masked starts,
held done flags, read-back from every SP) and checks the run time. It builds
in about 20 s and runs in under a second. `tb_spin_engine` checks one SP in
the same way, including the exact cycle counts `2(L+3)` per sweep.

`tb_workload_models` runs the two physical models on one SP at the default
size, reading every lattice back after every sweep. At infinite temperature
every spin must flip in one sweep. An Ising ferromagnet (all couplings +1) is
quenched to β = 0.5, and an Edwards–Anderson glass to β = 1.0. In both the
energy per spin, computed from the read-back state, must fall from about 0 to
below −2.0 and −1.2 respectively. Typical values are −2.59 and −1.65 after 10
sweeps.

The reference model in `tb/ianus_ref_pkg.sv` is written independently of the
RTL. It generates the random stream one element at a time, and computes
`ΔE = 2·s·Σ J·s'` with signed arithmetic. A match over several sweeps
therefore checks the wiring of neighbours, couplings, random-number
assignment, tables and pipeline timing together.

## How far this follows the original design, and where it departs

Taken from the original architecture:

* the 16-SP board behind an IO processor;
* the two-replica S/N split and the role swap;
* the L-block plane storage with x as block, y as bit and z as address;
* three coupling lattices, one per axis;
* the plane-parallel update with one new N fetch per step at regime;
* the table look-up by local energy, with tables in distributed RAM shared by
  two cells;
* the 32-bit Parisi–Rapuano wheel with taps 24/55/61 in a cascade of about a
  hundred outputs per cycle.

This design's own choices:

* all bit encodings, the bond-to-memory assignment and the `rnd ≤ P`
  comparison;
* the pairing of cells on tables and the mapping of wheel outputs to cells;
* the prologue/drain schedule (L+3 cycles per half-sweep);
* the whole host protocol and the IOP's internals.

Known differences and omissions:

* **Update cells per SP.** Each SP updates one full plane per cycle, `L²`
  cells: 256 at `L = 16`. The original LX160 SP had 512 cells, and the larger
  LX200 had 1024. The original also mentions updating only part of a plane
  for lattices too large for the chip, without describing how; that is not
  built. `L` is a parameter, and `L = 32` would give 1024 cells per plane, but
  that size has not been simulated.
* **Lattice size.** The default `L = 16` is the original's worked example. The
  physics target of `48³` would need partial-plane updates, which are not
  built.
* **Throughput.** At 62.5 MHz and `L = 16` an SP averages about 74 ps per spin
  update (215.6 updates/cycle). A 16-SP board averages about 4.6 ps per spin,
  against 2 ps quoted for the LX160 board (512 cells per SP).
* **Not modelled:** the nearest-neighbour links between SPs (a 4×4 torus on
  the board, unused by independent per-SP simulations, with no signalling
  specified); the two Gigabit-Ethernet host links (replaced by the parallel
  port); FPGA reconfiguration of the SPs by the IOP; the host computer.
* The table write port, seed port and read-back port are additions, needed to
  load and observe the machine.

## Lint notes

Verilator reports `SYNCASYNCNET` on `rst_n`. Reset is asynchronous in the
flip-flops, and the `disable iff` clauses of the assertions sample it on the
clock. This is intended. The `flip` outputs of `update_array` are left
unconnected in `spin_engine`: they are for observation and are used by the
array's testbench.
