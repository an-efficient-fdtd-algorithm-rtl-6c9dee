# Strip-parallel 2-D FDTD engine for photonic structures

This is a hardware engine for the finite-difference time-domain (FDTD) method
in two dimensions (TMz polarisation: fields Ez, Hx and Hy on a Yee grid). It
is meant for photonic devices such as photonic-crystal waveguides, where a
software FDTD run takes minutes to hours and a design study needs many runs.

The engine rests on three ideas:

1. **Precompute everything that does not change in time.** Material,
   cell size, time step and absorbing-boundary loss all fold into six
   *multiplication factors* per cell. The host computes them once and loads
   them into block RAM, together with the sampled excitation. The engine
   itself only runs the update equations, in fixed point.
2. **Compute E and H of the same time step at once.** Ez is updated one
   grid column ahead of Hx/Hy. By the time an H cell is updated, the new Ez
   values it depends on already exist. One clock then produces one Ez update
   and one Hx/Hy update.
3. **Split the grid into M strips processed in lockstep.** Each strip has
   its own compute pipeline and memories, so a clock produces 2·M cell
   updates.

The default build is a 124 × 124 grid, 4 strips and 32-bit words. A time
step takes 3 886 clocks, which is 19.4 µs at 200 MHz. 1000 steps take about
19 ms.

## Update equations and number format

With per-cell factors, one time step is:

```
Ez'(i,j) = Ceze·Ez(i,j) + Cezh·[(Hy(i,j) − Hy(i−1,j)) − (Hx(i,j) − Hx(i,j−1))]   (+ source)
Hx'(i,j) = Chxh·Hx(i,j) − Chxe·(Ez'(i,j+1) − Ez'(i,j))
Hy'(i,j) = Chyh·Hy(i,j) + Chye·(Ez'(i+1,j) − Ez'(i,j))
```

- `i` is the column (x) and `j` the row (y).
- Ez' is the new electric field. The H update uses it (leapfrog).
- A field outside the grid reads as zero, which puts a conducting wall
  around the grid.
- Absorbing boundaries are not special-cased: they are a border of cells
  whose factors include a loss. The test benches use a graded, matched
  lossy layer 10 cells wide.

All numbers are W-bit two's complement fixed point with FRAC fraction bits.
The default is W = 32 and FRAC = 24 (sign, 7 integer bits, 24 fraction
bits). The 40- and 48-bit configurations use FRAC = W − 8.

- A product keeps the full 2W bits, is shifted right by FRAC bits
  (truncation toward −∞) and is cut back to W bits.
- Sums wrap; nothing saturates. Choose the integer bits so that fields and
  factors stay in range.
- Truncating the products is the main source of error against double
  precision. The word-length bench below measures it.

## Grid partition and scan order

```
 y ^   strip M-1   | ↑ ↑ ↑ ↑ ... ↑ |      each strip: R = N/M rows
   |   ...         |               |      scan: column 0 → N-1 (then one
   |   strip 1     | ↑ ↑ ↑ ↑ ... ↑ |            H-only column N),
   |   strip 0     | ↑ ↑ ↑ ↑ ... ↑ |            each column bottom → top
   +-------------------------------> x
```

- All strips receive the same slot (column c, row r) in the same clock.
- A strip's memory address for a cell is `c·R + r`.
- The controller (`fdtd_ctrl`) issues (N+1)·R slots per step. It then
  waits for the pipelines to drain, swaps the field memories and starts the
  next step.
- A step takes `(N+1)·R + ENGINE_LAT + 3` clocks, with `ENGINE_LAT = 8`.

## The E-ahead-of-H schedule (strip_engine)

This is the part that needs the most care. In slot (c, r) a strip engine
updates Ez(c, r) and, one column behind, Hx(c−1, r) and Hy(c−1, r).

- Slot column 0 updates Ez only.
- The extra slot column N updates H only; it finishes column N−1, whose
  right-hand Ez neighbour is outside the grid and reads as 0.

Pipeline, counted in clocks after the slot leaves the controller:

| clock | what happens |
|---|---|
| t0 | Read addresses go to the field memories (previous step) and to the two coefficient RAMs. The Ez factors are read at cell (c, r) and the H factors at (c−1, r). |
| t1 | Old Ez, Hx and Hy of (c, r) arrive. Two column line buffers return old Hy(c−1, r) and Hx(c−1, r). Hx(c, r−1) is the previous slot's read; in row 0 it is the top-row Hx of the strip below. `ez_pipe` starts. |
| t4 | New Ez leaves `ez_pipe` (3 stages: curl, products, sum). |
| t5 | `src_add` adds the source sample if (c, r) is the source cell. Ez is written to the current memory and pushed into the Ez line buffer. The buffer returns Ez'(c−1, r) and Ez'(c−1, r+1). In the top row, Ez'(c−1, r+1) belongs to the strip above, which holds its bottom-row value for one column (`ez_bot_prev`). `hx_pipe` and `hy_pipe` start. |
| t8 | New Hx and Hy of (c−1, r) are written to the current memories. |

Notes on the schedule:

- *Passing registers* carry the slot indices, the old H of column c−1 and
  the H factors from t1 to t5.
- Each field memory has a second read port. It fetches the strip's top row
  for the strip above.
- Because all strips run in lockstep, both hand-overs arrive exactly when
  they are needed. No stall or handshake exists anywhere in the engine.

## Memories

- **Field memories (`field_bank`)**: one ping-pong pair per field and
  strip. The engine reads the previous step from one copy and writes the new
  step to the other. `sel` flips after every step, so nothing is copied.
  Host writes (the initial field) go into the previous copy, and host reads
  return the latest step. On a very large grid these would be off-chip
  memory; here they are synchronous RAM arrays.
- **Coefficient RAMs (`coef_ram`)**: per strip, a 2-lane RAM (Ceze, Cezh)
  and a 4-lane RAM (Chxh, Chxe, Chyh, Chye). Two RAMs are needed because
  Ez and H are read at different cells in the same clock.
- **Source RAM (`src_ram`)**: one sample per time step, NT = 1000 deep.
  The same sample is broadcast to every strip. Only the strip that holds
  the source cell (`src_x`, `src_y`) adds it to its Ez.
- **Monitors (`field_monitor`)**: two cells (`mon_x`, `mon_y`). Each
  records its Ez once per step into a record that is NT words deep. The
  host computes reflection and transmission (S11, S21) from these time
  signals.

At the defaults the RAMs total about 6 Mbit: fields 2.95, factors 2.95,
source and monitors 0.09.

## Host port and operation

All host accesses are synchronous and allowed only while `busy` is low.
`host_sel` (type `host_sel_e` in `fdtd_pkg`) picks the target:

| code | target | address |
|---|---|---|
| 0–2 | Ez, Hx, Hy | `host_x`, `host_y` |
| 3–8 | Ceze, Cezh, Chxh, Chxe, Chyh, Chye | `host_x`, `host_y` |
| 9 | source sample | `host_n` |
| 10–11 | monitor 0 / 1 record (read only) | `host_n` |

To use the engine:

1. Pulse `host_we` for each word to load the factors, the initial fields
   and the source table.
2. Set `src_x`, `src_y`, `mon_x` and `mon_y`.
3. Pulse `start` with `n_steps`.
4. Wait for the one-clock `done` pulse. `step` counts the completed steps.
5. Read back with `host_re`. Data appears on `host_rdata` one clock later,
   with `host_rvalid`.

A second `start` continues from the fields the previous run left. The
source table and the monitor records are indexed from 0 again for each run.

## Files

| module | role |
|---|---|
| `fdtd_top` | top level: controller, M strips with their field memories, source RAM, monitors, host port |
| `fdtd_ctrl` | slot generator, drain wait, memory swap, step counter (IDLE/SCAN/DRAIN_WAIT) |
| `strip_engine` | one strip: coefficient RAMs, line buffers, Ez/Hx/Hy pipelines, source adder, passing registers, edge hand-overs |
| `ez_pipe`, `hx_pipe`, `hy_pipe` | 3-stage update pipelines, one cell per clock |
| `fxp_mul` | registered fixed-point multiplier |
| `src_add` | source injection into the Ez stream |
| `field_bank`, `coef_ram`, `src_ram`, `line_buffer`, `field_monitor` | memories described above |
| `fdtd_pkg` | default sizes, pipeline latencies, host select codes |

Parameters of `fdtd_top`:

- `N`: grid size, default 124.
- `M`: number of strips, default 4. N must be a multiple of M, and N/M ≥ 2.
- `W`: word width, default 32.
- `FRAC`: fraction bits, default 24.
- `NT`: source and monitor depth, default 1000.

## Verification

Every module has a self-checking bench in `tb/`. Each bench ends with a
`TB_RESULT checks=… failures=…` line. The reference for all field values is
`tb/fdtd_ref_pkg.sv`, a software model of the same arithmetic (bit-exact,
up to 48-bit words) plus a double-precision model.

- `tb_fdtd_top`: an 8 × 8 grid in 2 strips with random factors and random
  initial fields. It runs 5 steps, then 3 more. Every field value and both
  monitor records must match bit for bit, and the run length in clocks is
  checked. It also checks that each mechanism happened: the hand-overs
  between strips, source injection, memory swaps, the H-only column and
  monitor capture.
- `tb_fdtd_full`: the default build (124 × 124, M = 4, 32 bit) on a 7 × 7
  photonic-crystal bend. The crystal uses silicon rods 0.15 µm wide on a
  0.45 µm pitch, with a 37.5 nm cell; the 90° guide is made by removing
  rods. A 1.55 µm sine source drives it for 1000 steps, and everything is
  compared bit-exactly. It takes about 15 s under Verilator.
- `tb_fdtd_wordlen`: the same structure at 32, 40 and 48 bits side by side
  (about 1 min). Each width is bit-exact against its reference. The Ez
  error against double precision after 1000 steps is:

  | word | mean abs. Ez error | relative error |
  |---|---|---|
  | 32 bit | 2.3e-6 | 4.0e-4 |
  | 40 bit | 8.9e-9 | 1.6e-6 |
  | 48 bit | 3.5e-11 | 6.2e-9 |

To run a bench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fdtd_pkg.sv tb/fdtd_ref_pkg.sv tb/tb_fdtd_top.sv --top-module tb_fdtd_top
./obj_dir/Vtb_fdtd_top
```

## Design choices and limits

These points are choices made for this RTL rather than fixed by the
architecture:

- **Strips.** M = 4, and the split into horizontal strips with a
  column-wise scan.
- **Number format.** FRAC = W − 8, with truncating multiplies and no
  saturation.
- **Update form.** The standard Yee TMz form given above. Absorbing
  boundaries are left to the factors (a lossy layer, not a split-field PML
  in hardware), and the grid edge is a conducting wall.
- **Source.** Additive (soft), at a single cell.
- **Monitors.** They sample single cells, not lines, and the S-parameters
  are computed off-chip.
- **Memory.** Field memories are on-chip RAM arrays. A board-memory
  controller and the PC link are not included; the plain host port stands
  in for them.
- **Time.** One pipeline latency is fixed (3 stages per update). There is a
  fixed drain wait between steps instead of overlapping consecutive steps.
- **Resources.** The per-strip resource use of an FPGA build has not been
  measured. The RAM sizes above come from the parameters.
