# SACC: an LSTM accelerator that reads the recurrent weights once per two time steps

An LSTM layer with N hidden units multiplies the previous hidden state h by a
4N x N recurrent weight matrix R at every time step. For realistic N (1024 units
give 8 MiB of 16-bit weights) R does not fit on chip. A small accelerator must
then stream all of R from DRAM at every step, and that traffic dominates its
energy. Weight reuse across steps looks impossible, because step t+1 needs
h_t, and h_t needs all of R at step t.

The split-and-combine (SACC) schedule gets around this. It splits every row sum
`S[k] = sum_n R[k][n] * h[n]` into a lower part (columns up to the diagonal) and
an upper part (columns past it). Whenever a block of R is on chip, it is used
for two time steps at once:

* with h_t, it completes the partial sum of step t+1;
* with h_t+1, it starts the partial sum of step t+2.

Step t+1 sweeps only the lower-triangular blocks. Step t+2 sweeps only the
upper-triangular ones, and so on, alternating. Each step therefore reads half
of R, whatever the on-chip buffer size. This repository holds synthesizable
SystemVerilog for one LSTM layer built around this schedule. It has:

* a 4 x B^2-word block buffer;
* a B-lane matrix-vector unit;
* an LSTM gate unit;
* on-chip h, c, q and partial-sum vectors;
* a 64-bit AXI read master.

Defaults: N = 1024 hidden units, L = 1024 inputs, block size B = 32.

## The schedule in detail

R is cut into blocks of B columns, and the four gates of a row slice are kept together.
Block (r, m) holds the 4B rows of row slice r (units rB .. rB+B-1 of gates i,
f, g, o) and the B columns of slice m. There are NB = N/B row slices.

A single 4N-word vector `s` (32-bit) carries state from step to step. When a
step starts, s[r] holds the part of step t+1's sum that the previous sweep
already collected. That part is the upper blocks if the previous step was an
upper sweep, and the lower blocks otherwise.

**Lower sweep** (row slices r = 0, 1, ..., NB-1; inside a row, m = 0 .. r):

1. Load s[r] into accumulator `acc1` and clear accumulator `acc2`.
2. For each block (r, m): fetch it, then run *pass A*: `acc1 += R(r,m) * h_t[m]`.
3. If m == r (the diagonal block), acc1 now holds the complete sum for slice r.
   The LSTM unit turns it into h_t+1[r] and c_t+1[r] *before* pass B.
4. *Pass B*: `acc2 += R(r,m) * h_t+1[m]`. Slice m of h_t+1 exists already,
   because m <= r.
5. At the end of the row, acc2 is written over s[r]. That slice of s now holds
   the lower half of step t+2's sum.

**Upper sweep** (row slices r = NB-1 down to 0; inside a row, m = NB-1 down to r+1):

1. Steps 1, 2 and 4 are the same as in the lower sweep. Pass B can use h_t+1[m]
   because rows are processed bottom-up, so every slice m > r is already done.
2. The LSTM equations for slice r run after the last block of the row. The
   bottom row has no upper blocks, so its LSTM runs at once.
3. acc2 (the upper half of step t+2's sum) overwrites s[r].

The diagonal blocks belong to the lower sweep. Over two consecutive steps every
block of R is fetched exactly once, and each fetch is used twice. After `init`
(h = c = s = 0), the first step is an upper sweep. Its pass A multiplies by
h = 0, which is harmless.

Before the sweep, each step computes the input projection q = W.x + b for all
4N rows. The bias is loaded into acc1 (scaled to the accumulator format). The
4B x B blocks of W then pass through the same weight buffer and MXV unit, and
the result is kept in a 4N-word q buffer.

## Architecture

```
            +-------------+   req/stream   +---------------+  AXI AR/R (64 bit)
            |  sacc_ctrl  |<-------------->| axi_rd_master |<==================> DRAM
            | (sequencer, |                +---------------+
            |  acc1, acc2)|--> weight_buf (4B rows x B words, B/4 banks)
            +-------------+--> mxv_unit   (B multipliers + adder tree)
               |  |  |   --> lstm_eqn   (gates, c' and h')
               |  |  +-----> slice_buf x4 (h_t / h_t+1 ping-pong, c, x)
               |  +--------> gate_buf  s (4N x 32 bit, partial sums)
               +-----------> gate_buf  q (4N x 32 bit, W.x + b)
```

| block | role | timing |
|---|---|---|
| `sacc_ctrl` | runs the whole step; holds the two 4B-word accumulators | — |
| `axi_rd_master` | turns (address, beat count) into INCR bursts of at most 16 beats, never across 4 KiB, with up to 4 outstanding; always accepts data | one beat per cycle |
| `weight_buf` | one block of W or R; filled beat by beat, read one full row per cycle | registered read |
| `mxv_unit` | dot product of one block row with a B-word vector slice | 2-cycle latency, one row per cycle |
| `lstm_eqn` | four pre-activations s+q, activations, c' = f*c + i*g, h' = o*tanh(c') | 1-cycle latency, one unit per cycle |
| `slice_buf` | vector of 16-bit words; masked 4-word writes, combinational B-word slice read | — |
| `gate_buf` | four gate banks of 32-bit words, so the i/f/g/o values of one unit move together | registered read |

There are two h buffers because pass A reads h_t while the LSTM unit writes
h_t+1 in the same sweep. They swap roles after every step. c is updated in
place: slice r of c is read and rewritten only while slice r is processed.

### Command interface (`sacc_top`)

* `cmd_valid` / `cmd_ready` / `cmd_op`: op 0 = init (clear h, c, s; the next
  step is an upper sweep), op 1 = one time step.
* `w_base`, `r_base`, `b_base`, `x_addr`: byte addresses. They must stay stable
  while a command runs.
* `done`: pulses for one cycle at the end of a command.
* `stage_odd`: shows which sweep comes next (1 = lower).
* While the accelerator is idle, `h_slice` selects B words of the newest h,
  which appear on `h_out` combinationally.
* `m_axi_*`: the AXI read channels, with the AR payload as a packed struct
  (`sacc_pkg::axi_ar_t`).

One instance is one layer. A two-layer model uses one instance per layer, or
the host runs the layers in turn. In both cases the host copies h of layer 1
into the x location of layer 2.

### Off-chip layout (16-bit words, byte addresses)

| data | address | contents |
|---|---|---|
| W block (r, mx), 0 <= mx < L/B | `w_base + (r*L/B + mx) * 8*B*B` | 4B rows of B words; row i is gate i/B, unit r*B + i%B |
| R block (r, m) | `r_base + (r*N/B + m) * 8*B*B` | same row order as W |
| bias of slice r | `b_base + r * 8*B` | 4B words, same order |
| x | `x_addr` | L words (8-byte aligned) |

N and L need not be multiples of B. The number of slices is rounded up
(NB = ceil(N/B)), and the last row and column slice is then a partial block.
Blocks in memory keep their full 4B x B size, and their padding rows and
columns may hold anything. On chip:

* the vectors are rounded up to whole slices;
* the padded units of h and c are forced to zero;
* the padded part of x is cleared by `init`.

L must be a multiple of 4, so that x fills whole bus beats.

## Number format

All data are Q8.8 (16-bit two's complement, 8 fraction bits). Products are
accumulated at full precision in 32-bit words, which is also the format of s
and q. Pre-activations are `(s + q) >>> 8`, saturated to 16 bits. Sigmoid is
the four-segment piecewise-linear PLAN curve:

| input range | sigmoid value |
|---|---|
| \|x\| < 1 | 0.5 + \|x\|/4 |
| 1 <= \|x\| < 2.375 | 0.625 + \|x\|/8 |
| 2.375 <= \|x\| < 5 | 0.84375 + \|x\|/32 |
| \|x\| >= 5 | 1 |

Negative inputs use 1 - y. tanh(x) is computed as 2*sigm(2x) - 1. Products of
Q8.8 values are shifted back by 8 bits and saturated. The format, the widths
and the activation curves are choices made for this implementation. The
schedule does not depend on them: any format works with SACC.

## Performance and traffic

The datapath is bus-bound. Fetching a block takes B^2 beats (1024 at B = 32).
Using it takes 2 x 4B cycles for the two passes. Block loads and passes are
not overlapped.

At the default size (N = L = 1024, B = 32), one upper sweep plus one lower
sweep take 3.70 M cycles with a memory that never stalls. That is about 18.5 ms
per two steps at 100 MHz.

Off-chip beats, measured in simulation, compared with a schedule that reads all
of R every step. Both schedules read the same W, b and x:

| model | steps | layer-1 input (assumed) | SACC beats | conventional beats | reduction |
|---|---|---|---|---|---|
| 2 x 128 units (character LM) | 4 | 64 | 165 056 | 230 592 | 28.4 % |
| 2 x 512 units (TIMIT-512) | 2 | 64 | 1 116 448 | 1 640 736 | 32.0 % |

R traffic alone is exactly 50 % over any even number of steps. The totals
depend on the input width, which is an assumption here.

## Where this departs from the original accelerator and what to trust

* The original was generated by high-level synthesis. Here, everything below
  the schedule is this implementation's own design:
  * the number format and activation curves;
  * the one-row-per-cycle MXV;
  * the banked buffers;
  * the off-chip layout;
  * the AXI master;
  * the command and read-out ports.
* On-chip memory is larger than the 4N + 4B words the schedule needs for
  partial sums. Besides s (4N) and the two 4B accumulators, this design keeps:
  * q (4N words of 32 bits);
  * two copies of h;
  * c;
  * x.
* No double buffering: fetching the next block waits until the current one has
  been used.
* Read-only memory port. h leaves through the `h_out` slice port, not through a
  write to DRAM.
* In the published pseudocode of the schedule, the slice read for the partial sum is indexed
  by the column block, and pass B of an upper sweep reads the row slice of
  h_t+1. Taken literally, both give wrong sums. This design uses row slice r
  for the partial sum and column slice m of h_t+1 for pass B, which is what the
  block equations require. The testbenches show that the result then equals a
  plain LSTM bit for bit.
* Not included:
  * the conventional and TSI-WR reference schedules (they exist only for
    comparison);
  * the DRAM and its controller;
  * the bus performance monitor used for measurement;
  * the host processor.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it shows |
|---|---|
| `tb_sacc_top` | N = 64, L = 32, B = 16, random AXI stalls, init + 5 steps + re-init + 2 steps. Every h word after every step equals a golden model that computes R.h in full each step (same fixed-point arithmetic). Off-chip beats per step are exact, each pair of steps reads R exactly once, and every mechanism occurs (upper/lower sweep, diagonal LSTM, empty bottom row, reuse pass, AXI back-pressure and gaps, 4 KiB split, re-init). |
| `tb_sacc_full` | The default size (N = L = 1024, B = 32), one upper and one lower sweep, all 1024 h words checked after each step. Takes about 6 s in Verilator. |
| `tb_sacc_partial` | A two-layer model with N = 72 and an input of 36 at B = 32, so the last slices are partial blocks. The padding holds non-zero junk in memory; every h word is still exact. |
| `tb_sacc_workloads` | Two-layer models at 128 and 512 units, with h of layer 1 fed as x of layer 2. Checks h of both layers and reports the traffic reduction. |
| `tb_sacc_ctrl` | The sequencer with simple models around it. The exact order of loads, passes and LSTM slices is compared with a list built directly from the schedule, together with the accumulator contents. |
| `tb_mxv_unit`, `tb_lstm_eqn`, `tb_weight_buf`, `tb_slice_buf`, `tb_gate_buf`, `tb_axi_rd_master` | Unit checks against independent models, including latencies, saturation and AXI burst rules. |

The testbench helpers are:

* `tb/sacc_ref_pkg.sv`: golden model and pseudo-random memory contents. Each
  word is a hash of its address, so no data files are needed.
* `tb/axi_ddr_model.sv`: behavioural AXI memory.
* `tb/lstm2_run.sv`: two-layer harness.

To run a testbench with Verilator 5, list the two packages first and let
Verilator find the modules in `rtl/` and `tb/` by name:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/sacc_pkg.sv tb/sacc_ref_pkg.sv tb/tb_sacc_top.sv --top-module tb_sacc_top \
  -o sim && ./obj_dir/sim
```

Replace `tb_sacc_top` with any other testbench name.

## Changing the size

N, L and B are parameters of `sacc_top`. B and L must be multiples of 4. Storage grows as:

* weight buffer: 4B^2 words;
* s and q: 2 x 4N 32-bit words;
* h, c and x: 3N + L words.

The MXV unit grows with B multipliers. The data width and format live in
`rtl/sacc_pkg.sv`. The burst length and the number of outstanding bursts are
parameters of `axi_rd_master`.
