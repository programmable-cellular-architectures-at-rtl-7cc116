# NAPA: a template-programmable cellular processor for nanowire fabrics

NAPA (NAnodevice-based Programmable Architecture) is a massively parallel array
of identical, very small cells, one per image pixel, each talking only to its
four nearest neighbours. The cells implement a discrete-time **digital cellular
neural network (CNN)**: every iteration each cell recomputes its state from its
own and its neighbours' outputs and inputs, weighted by a small set of
**templates**. The templates are not stored in the cells. They are driven from
peripheral CMOS onto a few global **template rails** that reach every cell, so
the same hardware runs edge detection, noise removal or any other CNN task just
by changing the values on those rails.

The target fabric is a NASIC-style nanowire grid: two-level NAND-NAND logic
built from one transistor type, with every logic stage clocked dynamically
(precharge, evaluate, hold) by control lines from CMOS. Nothing in the array
makes a decision. All sequencing is done by the order in which the CMOS
controller pulses those control lines. This RTL keeps that structure. Every
stage in the array is a dynamic register driven by global precharge and
evaluate strobes, and one strobe lasts one clock cycle.

## The computation

For a cell with input `u`, output bit `y` and state `x`:

    x(n+1) = C + sum over d in {self, N, E, S, W} of  a_d * y_d(n) + b_d * u_d
    y(n+1) = MSB of x(n+1)

The terms `a_d*y_d + b_d*u_d` are the **partial sums**. The output bit is used
as a sign: `y = 0` stands for +1 and `y = 1` for -1. So `y` is 1 exactly when
the state is negative. At the array edge a missing neighbour contributes 0. At
load time `y(0)` is set to the MSB of `u`, which makes the initial state equal
to the input.

Numbers (`napa_pkg`): templates `a`, `b` are 4-bit signed, `C` is 8-bit signed,
pixels are 4-bit signed, partial sums are 10 bits and the state is 12 bits. The
state is wide enough that five partial sums plus `C` can never overflow, so the
MSB is always the true sign.

## How one iteration is executed: 28 phases

The hard part of the design is that the cell has no multiplexers and no local
control. It has dynamic stages, and the control lines decide which stages
evaluate. One iteration is 28 clock cycles:

| phases | action |
|---|---|
| 4 per direction, for SELF, N, E, S, W | template rails precharge; template rails evaluate (take a_d, b_d and, for SELF only, C); partial-sum register d precharge; partial-sum register d evaluate |
| 2 per accumulator, for k = 0..3 | accumulator k precharge; accumulator k evaluate |

The 28 matches the 28:1 ratio of output-generation time to template-rail time
in the architecture's delay estimates. How those 28 phases divide into steps is
this implementation's reading.

**Partial-sum generation and broadcast.** With template `d` on the rails, every
cell computes `a_d*y + b_d*u (+C for SELF)` from *its own* `y` and `u`. It keeps
the result in broadcast register `d`. Register `d` is wired to the neighbour
that sees this cell in direction `d`. For example, the N partial sum goes to the
cell below, because that cell's north neighbour is the sender. After five steps,
every cell finds the four contributions it needs waiting on its inputs. They are
held there because the broadcast wires stay in hold.

**Accumulation.** Four accumulator tiles sit at the corners of the cell and
form an anticlockwise chain (N, W, S, E). Accumulator 0 adds the N contribution
to the cell's own partial sum, and each later one adds the next direction. When
the last one evaluates, the cell's `y` takes the MSB of the new state. The
adders are ripple chains of NAND-NAND full adders (`nasic_fa`).

**Precharge** drives a stage to all ones, as a NAND plane precharges high. A
stage is only read while it holds an evaluated value. The testbenches check the
all-ones value, so a mis-ordered control sequence shows up.

## Loading and reading images

Each row has an input rail and an output rail. Both run from the IO controller
on the west edge through every cell of the row. All rows move in parallel.

- **Load:** the host offers `COLS` columns of `ROWS` pixels (`in_col`,
  `in_valid`/`in_ready`), **last column first**. Each accepted column takes
  `IO_PHASES` = 4 cycles to move one cell east. A final `u_load` strobe makes
  every cell take its pixel and set `y(0)`.
- **Read:** `out_capture` copies every `y` into the output rails. Columns then
  leave **column 0 first** on `out_col`, `out_valid`/`out_ready`, and each
  accepted column shifts the rails over 4 cycles.

Withholding `in_valid` or `out_ready` stalls the transfer. The factor 4
reproduces the architecture's IO delay, which is the array width times four
single-phase IO delays. Only the last of the four phases moves data.

## Jobs and programmability

`napa_sequencer` follows the data-flow chart: load, then iterate (assert
template, generate and broadcast partial sums, accumulate), then read out. A job
(`job_valid`/`job_ready`) carries a full template set `job_tmpl = {a[5], b[5],
C}`, indexed by direction SELF=0, N=1, E=2, S=3, W=4. It also carries three
flags, `job_load`, `job_run` and `job_read`, and the enabled steps run in that
order. Running a second job without `job_load` applies a new template to the
same image. It starts from the outputs the previous job left, which is how
several tasks are chained. `job_done` pulses at the end of a job.

Without stalls, a full job takes
`2 + COLS*(IO_PHASES+1) + 1 + 28*ITERATIONS + 2 + COLS*(IO_PHASES+1)` cycles.
At the defaults that is 2855 cycles.

## Modules

| module | role |
|---|---|
| `napa_pkg` | widths, `tmpl_t`, `tmpl_set_t`, `cell_ctrl_t`, direction enum, accumulation order |
| `napa_top` | sequencer + IO controller + template rails + array; also the stand-alone NASIC full-adder tile |
| `napa_sequencer` | CMOS control: jobs, 28-phase iteration, iteration count, template selection |
| `napa_io_ctrl` | serial row-parallel load and readout with valid/ready streams |
| `napa_template_rails` | dynamic template rails (precharge, evaluate, hold); `SETS` copies for large arrays |
| `napa_array` | `ROWS x COLS` cells, nearest-neighbour broadcast wiring, zero boundary, row rails |
| `napa_cell` | partial-sum generator, five broadcast registers, four chained accumulators, `u`, `y`, rail stages |
| `napa_psg` | `a*y + b*u + c` (combinational) |
| `napa_accumulator` | NAND-NAND ripple adder and its dynamic output stage |
| `nasic_fa` | 1-bit full adder as two NAND planes over dual-rail inputs (eight minterm lines) |
| `nasic_fa_tile`, `nasic_phase_gen` | the same adder as a dynamically clocked tile with the three-phase hpre / heva+vpre / veva rotation |

The full-adder tile and its phase generator sit in `napa_top` beside the
processor with their own `fa_*` ports. They illustrate the basic fabric tile and
are not connected to the array.

Parameters of `napa_top`: `ROWS = 5`, `COLS = 5` (the array size used for the
area comparison), `ITERATIONS = 100` (the iteration count taken as enough for
convergence), `IO_PHASES = 4`.

## Where this RTL departs from or goes beyond the architecture

- **Widths, sign reading of `y`, the way `C` enters, the initial state, the
  zero boundary, the accumulation order, the job and stream handshakes** are
  choices of this implementation. The architecture leaves them open.
- **Image size:** the architecture is meant for one cell per pixel of
  megapixel images (1024x768 up to 1920x1600). The default here is 5x5.
  `ROWS`/`COLS` are free parameters, but a megapixel array is far beyond
  practical simulation.
- **Clocking:** one clock drives IO and cell operation. Separate IO and cell
  clocks would be possible.
- **Not modelled:** defect and fault tolerance (two-way redundancy, TMR,
  nanoscale voting), which would be added inside the tiles; an optional
  nanosensor focal-plane input; power and supply microwires. The partial-sum
  multiplier is written behaviourally (`*`), not as a NAND-NAND array.
- Dynamic stages are modelled as clocked registers. Analog effects such as
  charge leakage during long holds are outside the model.

## Simulation

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.
`napa_ref_pkg` is an independent reference model of the CNN equation, used by
the array and top testbenches. With plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_napa_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/napa_pkg.sv tb/napa_ref_pkg.sv tb/tb_napa_top.sv
    ./obj_dir/Vtb_napa_top

`tb_napa_top` runs the processor at its default parameters: four jobs of 100
iterations each, with host stalls, a template change, a run without reload and a
read-only job. It compares every output with the reference model and checks
that each iteration takes 28 cycles, that a full job takes exactly 2855 cycles,
and that every mechanism occurred. The unit testbenches cover each module, and
the array is tested at 3x4 against the reference model after every iteration.

`tb_napa_image_workload` runs an image job on a 12x16 array, which is a 1024x768
camera frame scaled down by 64 in each direction. It loads a generated
grey-level image with a rectangle and a disc, runs 100 iterations of an
edge-detection template (`a` = 2 at the centre; `b` = 4 at the centre and -1 at
the neighbours; `C` = -7), and reads back the outline. It checks every pixel
against the reference model and against the expected outline, and checks the
job length: 2965 cycles, of which 80 are load, 2800 are run and 80 are read.
The run part does not depend on the image size. Load and read grow with the
image width. Build time grows quickly with array size, because Verilator
specialises edge cells, so expect minutes for a few hundred cells.
