# A multi-pipe dataflow engine for the Himeno Jacobi stencil

The Himeno benchmark solves a 3-D Poisson equation by point-Jacobi iteration.
Each sweep replaces every interior point of the pressure array `p` with a
weighted sum of its 19 neighbours: the point itself, its 6 face neighbours and
its 12 edge neighbours. On a processor the sweep is bound by memory bandwidth,
because every point is fetched about 19 times. This engine reads each value of
`p` once. The array enters as a one-dimensional stream. A window of on-chip
FIFOs holds the planes around the current point, so each value is reused from
the window instead of being fetched again. `P` pipes side by side each update
one point per clock, so the engine retires `P` points per cycle.

The organisation follows a published evaluation of the Himeno benchmark on an
FPGA dataflow engine (Maxeler MAX3, Virtex-6, 100 MHz kernel clock):

- the array becomes a stream and the stencil window is built from stream offsets;
- the kernel holds a configurable number of pipes;
- the benchmark's other arrays (`a`, `b`, `c`, `wrk1`, `bnd`) are not streamed;
  they are generated from the point's indices;
- there are three ways to move `p` between the host, the board and the kernel.

That work used a high-level dataflow compiler. It gives no RTL, so all the
micro-architecture below is this design's own. Wherever this README says "this
design's choice", the original is silent.

The defaults are its headline configuration: 48 pipes on the benchmark's
"S" array of 65 x 65 x 129 points.

## The stream

`p[i][j][k]` is streamed with `k` fastest, in the C order of the benchmark
(`IMAX x JMAX x KMAX`, with `i` slowest). Every clock, one **vector** of `P`
consecutive stream elements moves, 32 bits per element. One array is therefore
`NV = ceil(IMAX*JMAX*KMAX / P)` vectors.

For S with `P = 48`, `NV = 11355`, so the array has 545040 slots for 545025
points. The last vector is padded; the padding lanes are treated as boundary
points and come out unchanged.

In the stream, the neighbours of element `e` sit at fixed distances:

- `±1` for k;
- `±KMAX` for j;
- `±JMAX*KMAX` for i;
- sums of two of these for the 12 edge points.

## The stencil window (`stencil_window`, `delay_line`)

This is the least obvious part of the design.

A single-pipe window would be a chain of FIFOs with one tap per offset. With
`P` lanes, an offset `d` that is not a multiple of `P` does not land in one
vector. Lane `l` needs element `l + d`, which lies in the vector
`floor((l+d)/P)` positions away, and that vector differs from lane to lane.

The window therefore works on whole vectors:

- The 19 offsets are sorted. The vector stream passes a chain of `delay_line`s
  whose lengths are the gaps between consecutive offsets, measured in vectors.
- Each offset has **two taps, one vector apart**: tap A, and tap B one register
  later.
- Let `R = d mod P`. Lane `l` takes element `l + R` of tap B when `l + R < P`.
  Otherwise it takes element `l + R - P` of tap A.
- The centre vector sits `DC = floor((JMAX*KMAX + KMAX) / P) + 1` vectors
  behind the input. `DC` is the largest forward offset, in vectors, plus one.
  For S, `DC = 178`, which is 178 x 48 words of window storage.

A valid bit travels with each vector. A `delay_line` is a wire, a short shift
register (up to `SHIFT_MAX` words), or a circular RAM of `DELAY-1` words with a
registered read. The RAM pointer has a declaration initialiser but no reset, so
verilator reports `PROCASSINIT` on it. This is deliberate: the window's data
needs no reset, and the kernel does not trust the window until it has been
filled once (below).

## The pipe (`stencil_pipe`, `fp32_add`, `fp32_mul`)

One pipe evaluates the benchmark update for one point:

```
s0   = a0*p(i+1) + a1*p(j+1) + a2*p(k+1)
     + b0*(p(i+1,j+1) - p(i+1,j-1) - p(i-1,j+1) + p(i-1,j-1))
     + b1*(p(j+1,k+1) - p(j-1,k+1) - p(j+1,k-1) + p(j-1,k-1))
     + b2*(p(i+1,k+1) - p(i-1,k+1) - p(i+1,k-1) + p(i-1,k-1))
     + c0*p(i-1) + c1*p(j-1) + c2*p(k-1) + wrk1
ss   = (s0*a3 - p) * bnd
wrk2 = p + omega*ss
```

The pipe is a fixed dataflow graph of 13 multipliers and 19 adders/subtractors.
Each operator is its own IEEE-754 single-precision unit:

- round to nearest even;
- subnormals flushed to zero;
- NaN results are the quiet NaN `0x7FC00000`.

The additions are kept in the **left-to-right order of the C source**. Results
are therefore bit-identical to a CPU run of the benchmark in single precision;
the testbenches compare bit for bit.

Operands that are ready early wait in `delay_line`s for their partners, so a
new point enters every enabled cycle. The latency is
`4*LAT_MUL + 12*LAT_ADD + 1` cycles, which is 33 at the defaults of 2 and 2.

Each arithmetic unit is one combinational block followed by `LAT` registers, so
that synthesis can retime it. For boundary points (`interior = 0`) the pipe
outputs `p` unchanged through a final select.

The benchmark's residual `gosa` (the sum of `ss*ss`) is **not** computed, as in
the original. It is a post-processing step on the host.

## Constants from indices (`coeff_gen`)

Only `p` is streamed. The kernel keeps the lane-0 index `(i0, j0, k0)` of the
window's centre vector. Each lane's `coeff_gen` derives its own `(i, j, k)` from
that index, with a single carry from k into j and j into i (so `P <= KMAX`).
From the index it gives:

- `interior`: `1 <= i <= IMAX-2`, `1 <= j <= JMAX-2`, `1 <= k <= KMAX-2`, and
  the point is not padding;
- the coefficient set `COEF`, with `bnd = 0` outside the interior.

`COEF` defaults to the benchmark's initial values (`HIMENO_COEF` in
`himeno_pkg`):

- `a0..a2 = 1`, `a3 = 1/6`;
- `b0..b2 = 0`;
- `c0..c2 = 1`;
- `wrk1 = 0`, `bnd = 1`;
- `omega = 0.8`.

Any other constant set can be passed as a parameter. The end-to-end testbench
uses one in which every term is non-zero.

## The kernel (`himeno_kernel`)

The kernel combines the window, the index counter, and `P` instances of
`coeff_gen` and `stencil_pipe`.

- **Single enable.** Every register of the kernel advances only when `en` is
  high. A stall anywhere in the system freezes the kernel as a whole, and no
  data is lost. This is this design's choice.
- **Priming.** After reset, the first `DC` enabled cycles only fill the window.
  Until then the centre's valid bit is ignored.
- **Latency.** Result vector `n` belongs to input vector `n - (DC + pipe latency
  + 1)`. At the defaults that is 178 + 33 + 1 = 212 enabled cycles.
- **Back-to-back sweeps.** The stream of sweep `n+1` may follow sweep `n`
  directly. The index counter wraps at the array's last vector, so the window
  briefly holds the tail of one sweep and the head of the next. The boundary
  select keeps them from mixing: a point near the wrap uses neighbours from the
  other sweep only when it is a boundary point, and its value is passed through
  anyway.
- **Flush.** A vector with `in_valid = 0` is a flush vector. Feeding such
  vectors pushes the last results out.

## Three ways to feed the kernel (`stream_ctrl`, `stream_fifo`, `dram_addr_gen`)

The original built three separate designs. Here one engine selects among them
at run time with `mode` (`himeno_pkg::mode_e`); that run-time selection is this
design's choice.

| `mode` | name | array path per sweep | host traffic for `n` sweeps |
|---|---|---|---|
| 0 `MODE_PCIE` | PCIe | host → kernel → host; the host feeds each result back in | `2·n` arrays |
| 1 `MODE_NNITR` | internal buffer | kernel → on-chip FIFO (one array deep) → kernel | 2 arrays |
| 2 `MODE_DRAM` | on-board DRAM | DRAM → kernel → same DRAM addresses | 2 arrays (load, unload) |

- **MODE_PCIE.** Each sweep is its own activation: `NV` vectors in, a flush,
  and `NV` result vectors out.
- **MODE_NNITR.** The `u_loop` FIFO (`stream_fifo`, depth `NV`, 17.4 Mbit at S)
  holds a sweep's output, which becomes the next sweep's input with no gap and
  no flush. Only the last sweep's result goes to the host. This needs the array
  to be longer than the kernel latency. An elaboration-time assertion checks it.
- **MODE_DRAM.**
  - LOAD writes the host stream to DRAM words `DRAM_BASE ..`.
  - Each sweep then restarts two `dram_addr_gen`s. One issues read commands;
    the other supplies the write address of each result, so the sweep writes
    in place.
  - Each sweep is flushed completely before the next one starts. This is
    required, because the next sweep reads what this one wrote.
  - UNLOAD streams the final array back to the host.

`stream_ctrl` is a small state machine: IDLE, LOAD, RUN, FLUSH, UNLOAD, DONE.

- It keeps separate input and output counts of vectors and sweeps.
- It raises the kernel enable when the kernel's source has a vector (or the
  kernel is flushing) and the sink can take any result vector waiting at the
  kernel's output.
- `stalled` and `flushing` expose those two conditions.
- An assertion checks that a result is never dropped.

## Top level (`himeno_dfe`)

| group | ports | protocol |
|---|---|---|
| command | `start`, `mode[1:0]`, `n_iter[15:0]` → `busy`, `done`, `sweeps_done`, `stalled`, `flushing` | pulse `start` while `busy` is low; `done` pulses at the end (`n_iter = 0` runs 1 sweep) |
| host in | `host_in_valid/ready/data[P][32]` | valid/ready; `NV` vectors per sweep in PCIe mode, `NV` once otherwise |
| host out | `host_out_valid/ready/data[P][32]` | valid/ready; `NV` per sweep in PCIe mode, `NV` once otherwise |
| DRAM read | `dram_rd_cmd_valid/ready/addr`, `dram_rd_valid/ready/data` | address commands, then in-order data, both valid/ready |
| DRAM write | `dram_wr_valid/ready/addr/data` | one `P*32`-bit word per handshake |

The host streams pass through 16-deep FIFOs (`HOST_FIFO`). The PCIe core, the
DDR3 controller and the host software are not part of this RTL; their streams
are the ports above. DRAM addresses count in vector words (`P*32` bits = 192
bytes at the defaults).

Parameters: `P`, `IMAX`, `JMAX`, `KMAX`, `LAT_ADD`, `LAT_MUL`, `HOST_FIFO`,
`DRAM_AW` (28), `DRAM_BASE` (0) and `COEF`.

## Sizes and what fits

The grid is fixed when the engine is built; the window depth and the loop
buffer follow from it.

| run | fits at defaults | why |
|---|---|---|
| S (65x65x129), any mode | yes | `NV = 11355`; window 178 vectors; loop buffer 11355 vectors |
| M (129x129x257), DRAM mode | rebuild with `IMAX=129 JMAX=129 KMAX=257` | window needs 697 vectors; 89099 DRAM words |
| L (257x257x513), DRAM mode | rebuild with `IMAX=257 JMAX=257 KMAX=513` | window needs 2758 vectors; 705899 DRAM words |
| M or L in internal-buffer mode | not realistic | the loop FIFO would be the whole array (16 MB / 129 MB) on chip |

Fewer pipes (the original's 1 to 32 pipe builds) are simply other values of `P`.
`tb_himeno_dfe_dram` builds the engine for M with 32 pipes and runs the DRAM
scenario on it: load, two in-place sweeps and unload take 907,423 cycles.
With its size localparams set to L (257 x 257 x 513) and one sweep, the same
testbench also passes. That run has 1,058,849 vectors and takes 5.2 million
cycles, about 70 s of simulation and 0.8 GB of memory.

For scale: at S, the loop buffer alone is 17.4 Mbit. That is about 45% of the
1064 36-kbit block RAMs of the Virtex-6 SX475T the original used, which
reported about 52% block RAM use for its internal-buffer builds.

Throughput is one vector per enabled cycle. The full-size test runs two S sweeps
back to back through the loop buffer in 22,925 cycles, against 2 x 11355 vectors
plus latency, and one sweep over the host streams in 11,570 cycles.
At 100 MHz and 34 flop per point (the benchmark's count), that is about
163 GFLOPS while streaming.

## How far to trust it, and where it departs from the original

- **Checked bit for bit.** Every floating-point result in the testbenches is
  compared against a double-precision model. The model rounds to single
  precision after each operation and applies the update in the benchmark's
  operand order.
- **Full-size coverage.** The whole engine is run at its defaults (48 pipes,
  S array) in all three modes, one after another, and every point is compared.
  Stalls, back-pressure, padding and mode switches are also run at a reduced
  size (`P = 4`, grid 6 x 5 x 7) with random data and coefficients.
- **Operator latencies.** `LAT_ADD` and `LAT_MUL` are this design's choice;
  real 100 MHz timing would need them tuned per device.
- **One engine, three modes.** The original built three bitstreams.
- **Synthesis size.** The default engine is large: 1536 floating-point units,
  a 178-vector window and a 17.4 Mbit loop buffer. A generic synthesis flow
  without vendor RAM and DSP mapping needs a great deal of memory for the
  full-size kernel and top. The individual blocks synthesise readily, and lint
  and elaboration pass at full size.
- **Not built.** The PCIe interface, the DRAM and its controller, and the host
  CPU are outside the RTL. `tb/dram_model.sv` is a behavioural DRAM for
  simulation only. `gosa` is not computed.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/himeno_pkg.sv tb/tb_fp_pkg.sv tb/tb_himeno_ref.sv tb/dram_model.sv \
    tb/tb_himeno_dfe.sv --top-module tb_himeno_dfe -Mdir obj_dfe
./obj_dfe/Vtb_himeno_dfe
```

Substitute any testbench name for `tb_himeno_dfe`:

| testbench | what it covers |
|---|---|
| `tb_fp32_add`, `tb_fp32_mul` | directed corner cases and random operands against the reference rounding |
| `tb_delay_line` | all three implementations, with random enables |
| `tb_stencil_window` | every tap of every lane on a small grid (`P = 3`) |
| `tb_coeff_gen` | index, interior flag and coefficients of every lane |
| `tb_stencil_pipe` | random points, with the latency checked |
| `tb_himeno_kernel` | several back-to-back sweeps with stalls |
| `tb_stream_fifo` | FIFO behaviour |
| `tb_dram_addr_gen` | address sequences with back-pressure |
| `tb_stream_ctrl` | the controller, with a stand-in kernel |
| `tb_himeno_dfe` | end to end, all modes |
| `tb_himeno_dfe_dram` | DRAM scenario on the M array (129 x 129 x 257), 32 pipes, 2 sweeps |
| `tb_himeno_dfe_full` | default size, the benchmark's initial `p`: 2 sweeps via the loop buffer, 1 over the host streams, 1 through a behavioural DRAM; cycle budgets checked |

`tb_himeno_dfe_full` takes about a minute to build, because it elaborates all 48
pipes, and well under a minute to run (most of it the reference model).

## Files

| file | role |
|---|---|
| `rtl/himeno_pkg.sv` | types, stencil offsets, coefficients, float add/multiply functions |
| `rtl/fp32_add.sv`, `rtl/fp32_mul.sv` | pipelined single-precision operators |
| `rtl/delay_line.sv` | fixed-delay FIFO with enable |
| `rtl/stencil_window.sv` | the 19-point multi-lane window |
| `rtl/coeff_gen.sv` | per-lane index, boundary flag, coefficients |
| `rtl/stencil_pipe.sv` | one point update |
| `rtl/himeno_kernel.sv` | window + `P` pipes |
| `rtl/stream_fifo.sv` | host FIFOs and the loop buffer |
| `rtl/dram_addr_gen.sv` | linear DRAM addresses |
| `rtl/stream_ctrl.sv` | mode sequencing and flow control |
| `rtl/himeno_dfe.sv` | top |
| `tb/tb_fp_pkg.sv`, `tb/tb_himeno_ref.sv` | reference arithmetic and point update |
| `tb/dram_model.sv` | behavioural DRAM with random latency and back-pressure |
