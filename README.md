# Black-Scholes finite-difference accelerators (explicit stencil and implicit Thomas solvers)

Pricing a European option with the one-factor Black-Scholes equation is a
one-dimensional parabolic PDE problem, much like the heat equation. Marching it
backwards in time on a price grid of K points can be done in two ways:

* **explicit**: every new value is a three-point stencil of the old ones,
  `u_k' = a_k u_{k-1} + b_k u_k + c_k u_{k+1}`;
* **implicit**: every time step solves a tridiagonal system
  `a_k u'_{k-1} + b_k u'_k + c_k u'_{k+1} = u_k` with the Thomas algorithm.

The coefficients `a_k, b_k, c_k` depend on the volatility, the interest rate, the
time step and the price index, and are set up once per option (formulas in
`tb/bs_ref_pkg.sv`). Real workloads price many independent options, and both
accelerators here get their speed from that independence.

This RTL implements both solvers as FPGA-style processors in IEEE-754 single
precision (default) or double precision, and a top level, `bs_fpga_top`, that
holds an array of each. In single precision the arrays are:

| Processor | Count in top | Size of each | Throughput per processor |
|---|---|---|---|
| `stencil_processor` (explicit) | `NEXP = 3` | `P = 80` stacked stencil elements | 80 grid-point updates per cycle |
| `thomas_processor` (implicit) | `NIMP = 11` | `L = 67` interleaved options | 1 grid point per cycle per sweep (2 cycles per point and step) |

The counts (3 and 11), the 80 elements and the 67-deep loop are the figures of
the accelerator this design follows. They were given as what fits a Xilinx
Virtex-7 VX690T. The two arrays are alternative configurations of one device, so
together they would not fit. The top places them side by side only so that both
can be built and tested from one module.

With `DOUBLE = 1` the top switches every unit to binary64 and uses the
double-precision figures instead: 1 explicit processor of 85 elements and 5
implicit processors. `L = 67` is kept in both cases.

## Explicit solver: systolic stack of stencil elements

`stencil_pe` advances one time step. Grid points arrive as a stream, one per
cycle, in increasing `k`. Each point is a `stencil_elem_t` that carries the value
`u`, its own coefficients `a, b, c`, and `first`/`last` markers for the ends of
the grid, packed as `{u, a, b, c, first, last}`. The element keeps the last two points in a two-entry FIFO. When the
third point arrives, it computes the middle point's new value as
`(a*u_{k-1} + b*u_k) + c*u_{k+1}` (three multipliers, two adders) and registers it.

The output stream has the same format as the input, so elements stack. Element
`p+1` receives the results of element `p` and computes the next time step. It
lags `p` by two cycles, not by a whole grid. A stack of `P` elements thus
advances a grid by `P` time steps in one sweep:

```
memory --u,a,b,c--> [PE 1] --step 1--> [PE 2] --step 2--> ... [PE P] --step P--> memory
```

Timing facts worth knowing:

* A point leaves an element 2 cycles after it was presented. It waits one cycle
  for its right neighbour and spends one cycle in the output register. The stack
  therefore has a warm-up of `2*P` cycles, after which all `P` elements are busy
  at once.
* The last point of a grid has no right neighbour. A tail register sends it one
  cycle after it arrived. That is the slot the next grid's first point leaves
  free, because a first point produces no output. Grids of different options can
  therefore follow each other with no gap. The stream may also have idle cycles.
* Boundaries are Dirichlet: the first and last point of each grid pass through
  unchanged. This is a choice of this design.
* The coefficients travel with the values. This costs a `4*W+2`-bit wide stream (130 bits in single precision), but
  every element always has the coefficients of the point it is working on, and
  no element needs its own memory.

`stencil_processor` wraps the stack with four memories (`u, a, b, c`) of
`OPTS*K` words each, at address `opt*K + k`. A run of `n_passes` passes streams
all stored grids through the stack once per pass. The results are written back
in place, because a point is written long after it was read. The run advances
every option by `n_passes * P` time steps. A pass takes `OPTS*K + 2*P + 1`
cycles, and the next pass starts when the last result is written. The number of
time steps must be a multiple of `P`.

## Implicit solver: hiding a recurrence by interleaving options

The Thomas algorithm is two recurrences. For element `i` of one option:

```
forward : r = 1 / (b_i - a_i c*_{i-1})      c*_i = r c_i      d*_i = r (d_i - a_i d*_{i-1})
backward: u_{K-1} = d*_{K-1}                u_i = d*_i - c*_i u_{i+1}
```

Element `i` cannot start until element `i-1` (or `i+1`) of the same option is
finished. A pipelined floating-point datapath therefore cannot be kept busy with
one option. `thomas_processor` feeds it `L` different options in turn: the cycle
after option `o` it works on `o+1`, and it reaches `o` again after `L` cycles.
The loop through the datapath is made exactly `L` cycles deep. When an option's
next element enters, the result for its previous element is leaving the loop at
that moment and is fed straight back.

* The forward loop holds four arithmetic register stages (products, differences,
  reciprocal, final products) and `L-4` balancing registers. The backward loop
  holds two arithmetic stages and `L-2` balancing registers. The two sweeps never
  run at the same time, so they share one delay line.
* `c*` and `d*` of all `L` options (`L*K` words each) are kept in on-chip memory
  between the sweeps. With `a, b, c` and `u` this makes six arrays of `L*K` words,
  at address `i*L + o`. A row `i` of all options is therefore a contiguous block.
* The right-hand side of each step is `u` from the previous step. The backward
  sweep overwrites `u` in place.
* For `i = 0` the datapath forces `a_0` and the fed-back values to zero. It then
  computes `c*_0 = (1/b_0) c_0` and `d*_0 = (1/b_0) d_0`. The textbook form divides
  directly; this form costs one extra rounding. `c_{K-1}` is ignored, as the
  algorithm requires.
* The forward sweep, the backward sweep and the next time step follow each other
  with no gap. The data they depend on was written at least `L-5` cycles earlier.
  One time step of `L` options costs `2*L*K` cycles, and `done` pulses 4 cycles
  after the last element is issued.

At the 4.26 ns clock quoted for this processor, 11 processors give
2 × 4.26 ns / 11 ≈ 0.77 ns per grid element and time step. That matches the
throughput reported for the reference implementation.

## Arithmetic

`fp_add`, `fp_mul` and `fp_div` are combinational units with parameters `EW`
(exponent width) and `MW` (fraction width): 8/23 for binary32, 11/52 for binary64.
They round to nearest even, flush subnormals to zero, and assume finite inputs. `fp_add` aligns
with a sticky bit and renormalises with a leading-zero count. `fp_mul` and
`fp_div` use integer multiply and divide of the significands. Rounding and packing
are shared in the module `fp_round`. The units are not pipelined; the
processors place registers around them. A real FPGA build would use deeper
pipelined operators. In the implicit solver, deeper operators shrink the
balancing registers and leave the loop depth `L` unchanged.

## Interfaces

Each processor has the same host-side interface, an assumption of this design:

| Signal | Meaning |
|---|---|
| `host_we`, `host_sel`, `host_addr`, `host_wdata` | write one word while idle; `sel` 0 = `u`, 1 = `a`, 2 = `b`, 3 = `c` |
| `host_rdata` | word at `host_addr` of array `host_sel`, one cycle after the address |
| `start`, `n_passes` / `n_steps` | start a run while idle (a zero count is ignored) |
| `busy`, `done` | run in progress; one-cycle pulse when all results are written |

`bs_fpga_top` brings these out as arrays indexed by processor (`e_*` for explicit
processors, `i_*` for implicit ones). Reset `rst_n` is asynchronous and active low.
Memory contents are not reset.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `DOUBLE` | 0 | 0 = binary32, 1 = binary64 (top only) |
| `NEXP`, `P` | 3, 80 (1, 85 if `DOUBLE`) | explicit configuration |
| `NIMP`, `L` | 11, 67 (5, 67 if `DOUBLE`) | implicit configuration; `L` is the forward-loop depth |
| `EW`, `MW` | 8, 23 (11, 52 if `DOUBLE`) | floating-point format of every unit below the top |
| `KE`, `KI` (`K`) | 256 | grid size, chosen here |
| `OPTS_E` (`OPTS`) | 2 | options stored per explicit processor, chosen here |

`L` must be at least 5 and `K` at least 2.

## Departures and limits

* The loop depth of 67 cycles was stated without a precision. The binary64
  configuration keeps it, since the combinational units here fit in any depth.
* The arithmetic units are combinational. Timing closure at the 4 ns clock of the
  reference design would need them pipelined, and the stencil stack would then need
  matching delay on the coefficient path.
* The host, the link to it, and the set-up of the coefficient arrays are outside
  the design.
* The reference HLS implementation kept an extra copy of the temporary arrays to
  work around its compiler. The explicit pipeline here does not need it.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The references (`tb/fp_ref_pkg.sv`,
`tb/bs_ref_pkg.sv`) repeat the computations in real arithmetic, rounded to the
target format after each operation, and compare bit for bit. They also check cycle counts: 2
cycles per stencil element, a `2*P` warm-up, and `2*L*K` cycles per implicit step.

| Testbench | What it runs |
|---|---|
| `fp_add_tb`, `fp_mul_tb`, `fp_div_tb` | 40 000 random operand pairs each in binary32 and in binary64, including cancellation |
| `stencil_pe_tb` | 40 grids, back to back and with idle gaps; exact 2-cycle latency |
| `stencil_processor_tb` | P=4, K=10, 3 options, 2 + 1 passes, warm-up and run time |
| `thomas_processor_tb` | L=7, K=12, 3 + 1 time steps, run time |
| `bs_fpga_top_tb` | whole top at reduced size, two runs; counts every mechanism |
| `bs_fpga_top_dp_tb` | the same with `DOUBLE = 1` (1 explicit, 2 implicit processors) |
| `bs_fpga_top_full_tb` | whole top at default size: 1 explicit pass (80 steps) on 3 processors, 2 implicit steps on 11 × 67 options |

Example with Verilator (the packages first):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bs_pkg.sv tb/fp_ref_pkg.sv tb/bs_ref_pkg.sv rtl/fp_round.sv rtl/fp_add.sv rtl/fp_mul.sv rtl/fp_div.sv \
  rtl/stencil_pe.sv rtl/stencil_processor.sv rtl/thomas_processor.sv rtl/bs_fpga_top.sv \
  tb/bs_fpga_top_tb.sv --top-module bs_fpga_top_tb -o sim && ./obj_dir/sim
```

The full-size testbench takes about a minute and a half to build and a few seconds
to run.
