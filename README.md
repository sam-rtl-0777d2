# SAM: a scalable NTT accelerator built from small fixed-size NTTs

Zero-knowledge proof and homomorphic encryption systems spend much of their
time in number theoretic transforms (NTTs). These are DFTs over a prime field
Z_p. The transform size N runs from 2^16 up to 2^28, and the elements are
64 to 256 bits wide. An accelerator sized for one N wastes resources on
smaller sizes, and it cannot run larger ones at all.

This design handles every size with the same fixed hardware. A size-N NTT is
viewed as a d-dimensional hypercube, N = m · n^(d-1), with m ≤ n. It is
computed as a sequence of small n-point (or m-point) NTTs along one dimension
at a time. Between dimensions the data is multiplied by twiddle factors. The
hardware consists of:

- t lanes, each a pipelined n-point NTT;
- on-chip buffers holding a few 2-D planes of the hypercube;
- a shared twiddle-factor generator;
- a controller that streams planes between external DDR and the buffers.

Only the number of rounds and the external memory depend on N. The on-chip
resources do not.

Default configuration (the 256-bit one):

| symbol | parameter | default | meaning |
|---|---|---|---|
| W | `sam_pkg::W` | 256 | element width |
| p | `sam_pkg::P` | BN254 scalar field prime | modulus; its 2-adicity is 28 |
| N_max | `sam_pkg::LMAX` | 2^28 | largest transform |
| n | `N_PT` | 64 | points per NTT pipeline = size of one dimension |
| t | `T` | 4 | number of lanes |
| b | `B` | 8 | planes per lane buffer half |

## The decomposition and its rounds

Write an element address A in mixed radix as (a_{d-1}, …, a_1, a_0). Digit
a_{d-1} has radix m, and every other digit has radix n. The current dimension
d_c starts at d-1.

Each **round** works on 2-D planes:

- **Rows** run along dimension d_c. A row has R entries (R = m in the first
  round, n later), with address stride n^d_c.
- **Columns** run along dimension d_c-1: n entries with stride n^(d_c-1).

A round does the following:

1. It multiplies each element by a **pre-column** twiddle factor.
2. It runs n-point NTTs along d_c. (These are called "column NTTs": each one
   transforms the R entries of one column of the plane.)
3. It multiplies by a **pre-row** twiddle factor.
4. It runs NTTs along d_c-1.
5. It lowers d_c by 2.

If d is odd, the first round is **special**: it does only the column half and
lowers d_c by 1. The **last** round always has d_c = 1 and ends with the
dimension-0 NTTs.

Example: N = 2^16 with n = 64 gives d = 3 and m = 16. There is one special
round along the m dimension, then one normal round along dimensions 1 and 0.

Twiddle factors for the first pass of a round (element in plane row r,
column c):

- Pre-column factor: ω_{N/n^d_c}^(E·r).
- Pre-row factor: ω_{N/n^(d_c-1)}^(E·c) · ω_{R·n}^(r·c).

ω_k denotes a primitive k-th root of unity. E is the number formed by the
address digits above d_c, read in reversed order:
E = a_{d-1} + m·a_{d-2} + ….

Planes that share the digits above d_c form a **set**, and they share their
factors. The controller visits sets in increasing E. Moving to the next set
therefore multiplies every pre-column factor by a constant ω^r and every
pre-row factor by ω^c. Nothing is recomputed from scratch.

**Output order.** There is no final transpose, so the result comes out
digit-reversed. The element at address A holds output index
k = a_{d-1} + m·a_{d-2} + m·n·a_{d-3} + … + m·n^(d-2)·a_0.

## Planes, fetches and the circular layout

This is the part of the design that is hardest to follow.

**Natural rounds (d_c > 1).** One plane has R·n elements, and each lane
buffer holds n·n·b of them. A **fetch** loads t·BE consecutive planes, where:

- BE = min(b, planes per set / t, planes per round / t);
- plane l of each group of t goes to lane l.

DDR is read in beats of t consecutive addresses. Those addresses belong to t
different planes, so one beat feeds all t lanes at once. The controller then:

1. runs the column pass over all BE groups;
2. lets the pipelines drain;
3. runs the row pass;
4. stores the fetch back in place.

**The last round (d_c = 1).** Here a plane's n^2 elements are contiguous in
DDR. A DDR beat (t consecutive elements) now lies inside one row of one
plane. All t lanes work on the same plane, each on a different row or
column.

To make this work without bank conflicts, the plane is stored **rotated**
across the t buffers. Let p be the lane, and (r_base, c_base) the row and
column the access starts from. Then:

- k = (p + r_base + c_base) mod t;
- buffer j serves lane (j − k) mod t;
- the element sits at row (p·R + r) / t of that buffer, and its column is
  unchanged.

This layout has two properties:

- A DDR beat, a row access across t lanes, and a column access across t lanes
  each hit t different buffers.
- Element i of a T-vector only ever needs a circular shift by k.

Two circular shift networks do this shifting:

- The write network rotates by −k on the way into the buffers.
- The read network rotates by +k on the way out.

`buf_addr_gen` computes k and the buffer address for one buffer. The
controller uses t instances on the read side and t on the write side.

In the last round each plane gets, in order:

1. a column pass;
2. a drain;
3. a row pass;
4. a drain;
5. a twiddle update.

## Twiddle generation (`twiddle_gen`)

The generator holds two tables:

- a column table of n pre-column factors, indexed by row;
- a row table of n×n pre-row factors, with t independent read ports.

It has a single modular multiplier that produces one product per cycle.

On `init` it builds, from a small ROM of the roots ω_{2^k} (k = 0..28):

- the per-row and per-column step values;
- the initial tables.

This takes 2n + n² cycles (4,224 at n = 64). On `next` it multiplies every
entry by its step, which takes n + n² cycles. `busy` is high while it works.
The controller waits for `busy` to fall before it reads the new tables. The
three root orders come in as log2 values (`lg_cstep`, `lg_rstep`,
`lg_rinit`) computed by the controller for each round.

## Lanes: multiplier and NTT pipeline

Each lane has two parts:

- A modular multiplier (`mod_mul`, one register stage). It applies the
  pre-column or pre-row twiddle factor.
- A radix-2 decimation-in-frequency **single-path delay-feedback** pipeline
  (`ntt_pipeline`) of log2 n stages (`ntt_stage`).

Each stage works like this:

- It holds a delay line of S = n/2^(i+1) elements.
- In its first phase it stores inputs.
- In its second phase it forms the sum and the difference of stored and
  incoming values. Sums go out directly. Differences go into the stage
  multiplier and come out during the next first phase.

A butterfly multiply is needed only every other cycle. So each stage uses
`half_mod_mul`, a multiplier that is half as wide (W/2 × W). It takes two
cycles per product and keeps its operands in small FIFOs.

Smaller NTTs (m < n points in the first round) enter at a later stage. The
earlier stages are bypassed, selected by `log_size`. Output is in
bit-reversed order. The controller undoes this when it writes results back
into the buffers.

## Interfaces and timing (`sam_top`)

All signals are synchronous to `clk`, with an active-low asynchronous reset
`rst_n`.

| group | signals | behaviour |
|---|---|---|
| host | `start`, `log_n[4:0]`, `busy`, `done` | Pulse `start` with log2 N. `done` is a one-cycle pulse. |
| DDR read | `rd_req_valid/addr/ready`, `rd_resp_valid`, `rd_resp_data[T]` | A request is one beat of T consecutive elements starting at `addr`, a multiple of T. Responses come back in order, with any latency and no backpressure. |
| DDR write | `wr_valid`, `wr_addr`, `wr_data[T]` | One beat of T consecutive elements. The channel always accepts. |

Input is at element addresses 0..N−1, and the transform is done in place.

Supported sizes: d ≥ 3 and N ≥ t·n² (2^14 … 2^28 at the defaults). An
assertion checks this.

Internal pipeline timing:

- Read side: buffer read in cycle 0, read-network output in cycle 2,
  multiplier output and pipeline input in cycle 3.
- Write side: the network input is registered in cycle 0, and the buffer write
  happens in cycle 1.

## Departures from the SAM architecture, and limits

- **No load/compute overlap.** Each fetch runs LOAD, compute and STORE one
  after another. The buffers have the bank bit for double buffering, but the
  schedule does not use it. A 2^16-point 256-bit NTT takes 188,029 cycles in
  simulation (1.88 ms at 100 MHz). The published figure is 1.24 ms, and most
  of the difference is this overlap.
- **Twiddle tables are computed, not stored.** The initial row table and the
  step values are computed at each round start instead of being held in ROM.
  The row table is single-buffered, so the controller stalls for n + n² cycles
  at each set change.
- **Forward NTT only.** There is no inverse mode: that would need inverse
  roots and a scaling by N^-1.
- **256-bit field only.** The 64-bit configuration (t = 16) needs a different
  `sam_pkg` (W, P, ROOT). The lane count is a parameter, but the field is not.
- **Plain-operator arithmetic.** Modular multiplication is written as a
  product followed by `%`. This is functionally exact but is not a tuned
  Barrett or Montgomery circuit. For timing closure, replace `mul_mod` in
  `sam_pkg` and add pipeline registers.
- **Not built.** The host CPU with its PCIe link, and the DDR controller. Their
  ports are brought out on `sam_top`. The testbenches use a behavioural memory
  (`tb/ddr_model.sv`) with configurable latency and random stalls.

## Files

- `rtl/sam_pkg.sv`: field constants and arithmetic functions.
- `rtl/sam_top.sv`: the top level.
- `rtl/sam_ctrl.sv`: rounds, fetches and addresses.
- `rtl/twiddle_gen.sv`: the twiddle generator.
- `rtl/buf_addr_gen.sv`: buffer addresses and the rotation k.
- `rtl/circular_noc.sv`: the circular shift network.
- `rtl/lane_buffer.sv`: a lane buffer.
- `rtl/mod_mul.sv`: the lane multiplier.
- `rtl/ntt_pipeline.sv`, `rtl/ntt_stage.sv`, `rtl/half_mod_mul.sv`: the NTT
  pipeline.

Each block has a self-checking testbench, `tb/tb_<block>.sv`. The
testbenches share `tb/tb_util_pkg.sv`, an independent reference
implementation of the field arithmetic written with shift-and-add.

- `tb/tb_sam_top.sv` runs the whole design at n = 4, t = 2, b = 2 for
  N = 2^5 … 2^9 against a direct DFT. It counts every mechanism and fails if
  one never occurs:
  - special rounds;
  - circular-layout rounds;
  - incomplete planes;
  - multi-group fetches;
  - twiddle updates;
  - non-zero rotations;
  - DDR stalls.
- `tb/tb_sam_full.sv` runs the default configuration (n = 64, t = 4, b = 8,
  256 bits) on a 2^16-point NTT. It checks every output against a reference
  FFT, plus direct sums at a few indices. It takes a few seconds of simulation
  after the build.

## Simulating

With Verilator 5, put the package first:

```
verilator --binary --timing --assert --top-module tb_sam_top \
  rtl/sam_pkg.sv rtl/mod_mul.sv rtl/half_mod_mul.sv rtl/ntt_stage.sv \
  rtl/ntt_pipeline.sv rtl/twiddle_gen.sv rtl/circular_noc.sv \
  rtl/lane_buffer.sv rtl/buf_addr_gen.sv rtl/sam_ctrl.sv rtl/sam_top.sv \
  tb/tb_util_pkg.sv tb/ddr_model.sv tb/tb_sam_top.sv
./obj_dir/Vtb_sam_top
```

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`. Unit
benches need only the package, `tb/tb_util_pkg.sv`, the block and its
sub-blocks. The 256-bit C++ model builds slowly, so expect about a minute of
compile time per bench.
