# Streaming solvers for structured meshes: an explicit stencil engine and a batched Thomas solver

Numerical codes on regular ("structured") meshes spend most of their time in
two kinds of loops:

* **Explicit time stepping.** Every mesh point gets a new value from a
  fixed pattern of neighbours in the previous time step (a *stencil*). All
  points of a step are independent, so the work parallelises freely. The
  limit is memory bandwidth: each step reads and writes the whole mesh.
* **Implicit solves along a dimension.** Schemes such as the Alternating
  Direction Implicit (ADI) method solve one tridiagonal system per mesh line,
  many thousands of them, all with the same size. Inside one system each row
  depends on the previous one, so a single system cannot be pipelined.
  Many independent systems can.

This RTL has one accelerator for each class. Both are written in FP32, and
both keep their data moving through on-chip buffers and FIFOs rather than
through external memory.

* `stencil_solver` streams a batch of 2D meshes from external memory through
  a chain of `P` identical stencil kernels. One pass through the chain
  advances the mesh by `P` time steps. A fused read/write loop runs the
  time-marching loop on the device and swaps two memory buffers between
  passes.
* `tridiag_solver` solves a stream of tridiagonal systems with the Thomas
  algorithm. Each word carries `V` systems. `G` words are interleaved so that
  consecutive words belong to independent systems. The coefficients are
  generated on chip.

`mesh_solvers_top` places the two side by side. They share only clock and
reset.

The architecture follows a published high-level-synthesis design for Intel
Stratix 10 FPGAs (kernels joined by pipes, window buffers, cell- and
step-parallel replication, Thomas solver with interleaving and a separate
`r` generator). The RTL here is a fresh implementation of that architecture.
The places where it differs from the published design are listed at the end.

---

## 1. The explicit stencil engine

### 1.1 The scheme

Each kernel applies one time step of the five-point scheme

    U'(x,y) = a·U(x-1,y) + b·U(x+1,y) + c·U(x,y-1) + d·U(x,y+1) + e·U(x,y)

The coefficients `a..e` are run-time FP32 inputs (`ca..ce`). Boundary
cells are copied through unchanged: the first and last column, and the
first and last row of each mesh. So are padding lanes beyond the row
length.

### 1.2 Data layout, vectorisation and batching

A mesh of `nx × ny` cells is stored row after row. Each word holds `V`
cells (`V = 8` by default), and a row takes `nwords = ceil(nx/V)` words.
Every kernel has `V` copies of the arithmetic, one per lane, so it
updates `V` cells per cycle (*cell-parallel* operation).

To amortise pipeline fill and start-up cost over small meshes, `B` meshes
of the same size are stacked along `y` into one stream of
`nrows = ny·B` rows. The kernel's row counter restarts every `ny` rows, so
the first and last row of every mesh are still treated as boundaries.

### 1.3 The window buffer (`stencil_kernel`)

Every input word is read from the stream exactly once and reused for all
five taps. The kernel keeps:

| storage | holds (at iteration k) | used as |
|---|---|---|
| register `r_down` | word k-1 | lower neighbour (row y+1) |
| row buffer 1, length W-1 | word k-W comes out | right word (lane V-1's right tap) |
| register `r_ctr` | word k-W-1 | centre word |
| register `r_left` | word k-W-2 | left word (lane 0's left tap) |
| row buffer 2, length W | word k-2W-1 comes out | upper neighbour (row y-1) |

`W = nwords`. Iteration `k` accepts input word `k` and produces output word
`k-W-1`. A pass therefore runs `W·R + W + 1` iterations (`R = nrows`):
`W + 1` iterations fill the window and the rest stream through it. After a
pass the kernel starts the next one by itself, so a chain can carry pass
after pass without a restart. The row buffers are circular arrays of
`DMAX/V` words. `DMAX = 4096` cells is the longest row that fits. A row
must be at least two words long.

### 1.4 Unrolling the time loop (`stencil_chain`)

`P` kernels are joined by `P+1` FIFOs (`pipe_fifo`). Kernel `i` reads pipe
`i` and writes pipe `i+1`. The result of one time step goes straight into
the next step's window buffer and never leaves the chip. This multiplies the
work per external-memory word by `P` (the *step-parallel* method).

### 1.5 The memory loop and the read delay (`mem_rw_loop`)

This is the subtle part of the explicit engine.

A single kernel both reads and writes external memory. Its outer loop runs
`npass = n_iter / P` passes. Its inner loop runs `total + delay`
iterations, where `total = nwords · nrows`:

* while `i < total`: read word `i` of the source buffer and push it into
  pipe 0;
* once `i ≥ delay`: pop one result from pipe `P` and write it to word
  `i - delay` of the destination buffer.

The two buffers (`base0`, `base1`) swap roles every pass. After an odd
number of passes the result is in buffer 1, after an even number in
buffer 0.

Both pipe accesses *block*, and they belong to the same iteration. The
iteration only completes when the push is accepted **and** the pop has
data. So `delay` decides the behaviour:

| delay | behaviour |
|---|---|
| ≥ latency of the chain | no iteration waits; a run takes `npass·(total + delay)` cycles plus 1 |
| ≥ `P·(W+1) + 1` but below the latency | iterations wait for results (`stall_cycles` counts them); the result is still correct |
| < `P·(W+1) + 1` | **deadlock**: the loop waits for a result that needs more input than it has pushed |

`P·(W+1)` is the buffer delay: every kernel must hold one row plus one word
before it produces anything. The chain latency adds about three cycles per
kernel for the output register and the pipe.

The cycle count matches the analytic model

    cycles ≈ (n_iter / p) · (ceil(m/V) · n · B + delay)

and the testbenches check this count when there are no stalls.

Memory port: `rd_data` must be valid in the same cycle as `rd_addr`
(asynchronous read). The write (`wr_en`, `wr_addr`, `wr_data`) takes effect
at the clock edge. Addresses are word addresses. The DRAM and its
controller are not part of this design. A real DDR interface would need a
prefetching read FIFO in front of `rd_data`.

---

## 2. The batched tridiagonal solver

### 2.1 The algorithm

Each system is `a_i u_{i-1} + b_i u_i + c_i u_{i+1} = d_i` for `i = 0..N-1`,
with `a_0 = c_{N-1} = 0`. The Thomas algorithm solves it in two sweeps:

    forward:  r_i = 1/(b_i - a_i c*_{i-1})   c*_i = r_i c_i   d*_i = r_i (d_i - a_i d*_{i-1})
    backward: u_{N-1} = d*_{N-1}             u_i = d*_i - c*_i u_{i+1}

Here `a`, `b` and `c` are constants that are the same for every system
(inputs `ca`, `cb`, `cc`), as in an ADI heat-equation step. Only `d` is
streamed in.

### 2.2 Kernels and data orders

```
in ──► transpose8x8 ──► tri_interleave ──► pipe ──► thomas_forward ──► pipe ──► thomas_backward ──► out
                                                         ▲
                                    r_generator ──► pipe ┘
```

1. **Input order.** Systems lie one after another in memory, so a wide read
   returns `V` consecutive rows of *one* system. The solver input is grouped
   as follows. For each group of `G·V` systems, for each word-group `g` of
   `V` systems, for each block of `V` rows, there are `V` words. Word `s`
   holds rows `r..r+V-1` of system `g·V+s`. `N` must be a multiple of `V`.
2. **`transpose8x8`** turns each `V × V` block around, so that each output
   word holds one row of `V` different systems. It uses two register blocks
   as ping-pong buffers (2·8·8·32 = 4096 bits) and adds `V` words of latency.
3. **`tri_interleave`** collects a group of `G` words × `N` rows and sends it
   out row by row: row 0 of words `0..G-1`, then row 1, and so on. After
   this, the previous row of any system is exactly `G` words back in the
   stream. Two banks of `G·NMAX` words let one group fill while the previous
   one drains.
4. **`r_generator`** computes `r_i` and `c*_i` from the constant
   coefficients. They do not depend on `d`, so they are kept out of the
   forward kernel's loop, where they would sit on the slow division. One
   `(r_i, c*_i)` pair is computed per row and sent with each of the `G`
   words of that row.
5. **`thomas_forward`** joins the `d` stream and the `(r, c*)` stream. It
   computes `d*` with a `G`-word shift register of earlier results, whose
   oldest entry is `d*_{i-1}` of the same system. It passes `(c*_i, d*_i)`
   on.
6. **`thomas_backward`** stores a whole group. Two ping-pong banks of
   `G·NMAX` entries let it sweep one group backwards while the next one
   arrives. It emits `u` for rows `N-1` down to `0`, `G` words per row.
   Each word is tagged with `out_row` (the row `i`) and `out_grp` (the word
   `g` within the group). Lane `l` of word `g` is system `g·V + l` of the
   group.

In steady state one word (`V` solutions) leaves per cycle. A group of
`G·N` words comes out about two groups after it went in, once through each
ping-pong buffer.

Why interleave at all, when the arithmetic here finishes in one cycle? On
the target device the forward loop body takes tens of cycles, and the
division alone takes 26. A new row of the *same* system can only start when
the previous row is finished. Interleaving `G` systems fills that gap. The
RTL keeps the interleaved structure, the buffers and the group size `G = 9`,
so a pipelined arithmetic unit of up to `G` cycles can be dropped in
without changing the data flow.

---

## 3. Arithmetic

`fp32_pkg` provides `fp_add`, `fp_sub`, `fp_mul` and `fp_div` as
combinational functions on IEEE-754 single-precision bit patterns.
Subnormals are flushed to zero, results are truncated (round toward zero),
overflow gives infinity, and NaNs get no special treatment. Each operation
is within 2⁻²³ relative error. All kernels do their arithmetic within one
clock cycle. On an FPGA you would replace these functions with pipelined
floating-point cores and deepen the kernels' pipelines to match. The pipes
and handshakes already allow for that.

---

## 4. Interfaces and parameters

All streams are valid/ready: a word moves on a rising edge when both are
high. All control state has an active-low asynchronous reset (`rst_n`). Data
arrays are not reset. Configuration inputs (`n`, `nx`, `nwords`, `ny`,
`nrows`, the coefficients, `delay`, the bases) must stay constant while an
engine is working. `clear` restarts the stencil kernels and the
`r_generator`/`thomas_forward` pair at their first iteration.

| module | parameters (default) |
|---|---|
| `stencil_kernel` | `V` = 8 cells/word, `DMAX` = 4096 cells/row |
| `stencil_chain`, `stencil_solver` | `P` = 2 kernels, `V` = 8, `DMAX` = 4096, `PIPE_DEPTH` = 16, `AW` = 32 |
| `tridiag_solver` | `V` = 8 systems/word, `G` = 9 words/group, `NMAX` = 64 rows, `PIPE_DEPTH` = 16 |
| `transpose8x8` | `T` = 8, `EW` = 32 |
| `mesh_solvers_top` | `ST_P`, `ST_V`, `ST_DMAX`, `ST_AW`, `TD_V`, `TD_G`, `TD_NMAX` (same values) |

`mesh_solvers_top` port groups:

* `st_*`: start/busy/done, the configuration, `st_stall_cycles`, and the
  external memory port of the stencil engine.
* `td_*`: the configuration, the input stream and the tagged output stream
  of the tridiagonal solver.

Sizing notes:

* Rows of up to 4096 cells (512 words of 8 lanes) fit the stencil window.
* Systems of up to 64 rows fit the tridiagonal solver. That covers meshes
  of 32×32 to 64×64, with any number of meshes streamed group by group.
* A 3D mesh of 10³ to 40³ points would need a 3D window (two planes instead
  of two rows). That is not part of this RTL.

---

## 5. Simulation

Every module has a self-checking testbench in `tb/`. Each compares against
reference values computed in `real` arithmetic and prints
`TB_RESULT checks=N failures=M`. `tb/tb_fp_pkg.sv` converts between bit
patterns and `real`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tridiag_solver \
  rtl/fp32_pkg.sv tb/tb_fp_pkg.sv rtl/pipe_fifo.sv rtl/transpose8x8.sv \
  rtl/tri_interleave.sv rtl/r_generator.sv rtl/thomas_forward.sv \
  rtl/thomas_backward.sv rtl/tridiag_solver.sv tb/tb_tridiag_solver.sv
./obj_dir/Vtb_tridiag_solver
```

| testbench | what it shows |
|---|---|
| `tb_fp32_pkg` | 16,000 random add/sub/mul/div against `real` arithmetic |
| `tb_pipe_fifo` | order, blocking when full or empty, 1 word/cycle |
| `tb_stencil_kernel` | batched meshes with stalls; a pass takes `W·R + W + 2` cycles to its last output |
| `tb_stencil_chain` | 3 kernels = 3 time steps, with stalls on both sides |
| `tb_mem_rw_loop` | ping-pong result placement; `npass·(total+delay)+1` cycles without stalls; stalls with a short delay |
| `tb_stencil_solver` | end-to-end: no-stall, stalled and deadlocked runs |
| `tb_transpose8x8`, `tb_tri_interleave`, `tb_r_generator`, `tb_thomas_forward`, `tb_thomas_backward` | data order, recurrences, tags, back-to-back throughput |
| `tb_tridiag_solver` | 4 groups of systems against a double-precision Thomas solve, plus a throughput bound |
| `tb_mesh_solvers_top` | both engines at the default parameters: two 64×64 meshes for 4 time steps, the three delay regimes, and two groups of 72 systems of 64 rows under back-pressure. It counts that every mechanism occurred (no-stall, stall, deadlock, buffer swap, batching, back-pressure, overlapping groups) |

The top-level testbench runs in about half a minute.

---

## 6. Departures from the published design, and what is missing

* **Not included:** the Reverse Time Migration kernel (a 25-point,
  8th-order stencil on six-component points inside a four-stage update).
  Its stencil function is not specified well enough to implement.
* **Not included:** the complete ADI application pipeline: right-hand-side
  stencil, x-solve, transpose of the whole mesh, y-solve, accumulation,
  unrolled 8 times with on-chip delay buffers. Only its solver and a
  stencil kernel exist here.
* **Not included:** the FP64 form of the transpose (4 systems per read).
* **Single-cycle arithmetic** (section 3). The published `r` generator
  interleaves 37 systems to hide its divider and its backward kernel uses
  groups of about 6. Here every tridiagonal kernel uses one group size `G`
  (default 9, the forward kernel's). `r_generator` computes each row's pair
  once, because the coefficients are the same for all systems.
* **Boundary handling** of the stencil (first and last column and row of
  every stacked mesh copied through) is this design's reading of the
  published kernel's boundary test.
* **Read and write addresses in the memory loop.** The loop reads word `i`
  and writes word `i - delay`. A variant that reads at `i + delay` and
  writes at `i` would store results before they exist.
* **Window delay.** The window adds one word to the one-row delay, because
  the horizontal taps need it. The shortest delay that does not deadlock is
  therefore `P·(W+1)+1` rather than `P·W`.
* **Default unroll factor.** `P = 2` is the unroll factor used for the
  published 3D application. No default is given for the generic 2D kernel.
* **Group padding.** The tridiagonal solver needs the number of systems in
  a stream to be a multiple of `G·V = 72`. The caller pads with dummy
  systems where needed.
* **Synthesis.** All modules are synthesizable SystemVerilog. Because the
  FP operators are combinational, the stencil kernels (45 FP operators per
  kernel at `V = 8`) make large netlists and take a long time in
  synthesis.
