# Float32 MLP inference engine with a table sigmoid

This RTL computes the forward pass of a small multi-layer perceptron in IEEE-754
single precision (float32), so a network trained in float32 runs without any
retraining or quantisation. The network it is sized for takes the two coordinates
of a pixel, (x, y), and predicts whether that pixel belongs to the Mandelbrot set.

    inputs (x, y) ──► hidden 1: 50 sigmoid ──┐
          │                                   ├─► hidden 2: 43 sigmoid ──► output: 1 sigmoid
          └──────────── skip connection ──────┘

The second hidden layer sees the 50 outputs of the first hidden layer and also,
through a skip connection, the two raw inputs. Every neuron applies the sigmoid
σ(v) = 1 / (1 + e^-v).

The engine's structure follows a kernel-based design that ran on a vector
processor array. That design had three kernels: a matrix-vector product built on
an eight-wide float32 multiply-accumulate, a sigmoid read from a 1024-entry
table, and a scalar shift that builds the skip-connected vector. Here each
kernel is a dedicated hardware unit, and a small sequencer runs them in turn.

## One inference, step by step

Two 56-element float32 buffers, A and B, take turns as the input and the output
of a step. A weight memory holds all three layers.

| step | unit | reads | writes | cycles |
|------|------|-------|--------|--------|
| load | sequencer | `in_vec` | A = (x, y) | 2 |
| L1 | `matvec_kernel` → `sigmoid_lut` | A, weights of layer 1 | B[0..49] = h1 | 78 + 4 |
| skip | `skip_kernel` | B | B = (x, y, h1₀ … h1₄₉) | 53 + 1 |
| L2 | `matvec_kernel` → `sigmoid_lut` | B, weights of layer 2 | A[0..42] = h2 | 367 + 4 |
| L3 | `matvec_kernel` → `sigmoid_lut` | A, weights of layer 3 | `out_vec` | 46 + 4 |
| out | sequencer | | `out_valid` pulse | 1 |

A sample taken in cycle 0 gives `out_valid` in cycle **561**, for every sample.
The engine takes the next sample in that same cycle, so a stream of samples
runs at one result per 561 cycles. Nothing in the engine depends on the data,
so the latency is fixed, and the testbenches check that.

The "+4" after each layer has two parts. One cycle is the state change. The
other three let the sigmoid pipeline empty before the next unit reads the
buffer.

## Weight memory layout

This is the part a user must get right. `weight_mem` has 1024 words, and each
word holds eight float32 values, with lane *l* in bits `[32l+31 : 32l]`. That is
32 KiB. Each layer is an R × (C+1) matrix. Column 0 is the bias, and the
hardware multiplies it by a constant 1.0. Columns 1..C multiply the layer's
inputs in buffer order. The rows are split into groups of eight, and the last
group is padded with zero rows. The layer takes ⌈R/8⌉·(C+1) consecutive words:

    word(base + g·(C+1) + j), lane l  =  W[8g + l][j]      (0 for rows ≥ R)

| layer | rows R | columns C+1 | column order | base | words |
|-------|--------|-------------|--------------|------|-------|
| 1 | 50 | 3 | bias, x, y | 0 | 7 × 3 = 21 |
| 2 | 43 | 53 | bias, x, y, h1₀ … h1₄₉ | 21 | 6 × 53 = 318 |
| 3 | 1 | 44 | bias, h2₀ … h2₄₂ | 339 | 1 × 44 = 44 |

In total the network uses 383 of the 1024 words. The bases follow from the
parameters: `L2_BASE` and `L3_BASE` in `mlp_graph` compute them from the layer
sizes. Load the weights through `wl_we/wl_addr/wl_data` while the engine is idle.
A padding row is computed along with the rest of its group, but it never reaches
the sigmoid or a buffer, so its contents do not matter. Keeping it zero is still
the clean choice.

If you export weights from a framework that uses `y = x·K + b` with K of shape
(inputs, units), note that W[r][0] = b[r] and W[r][j] = K[j-1][r]. For layer 2,
the first two of the 52 inputs must be the skip-connected x and y.

## The matrix-vector unit (`matvec_kernel`, `fpmac`)

`fpmac` has eight float32 lanes. In every enabled cycle each lane does
`acc[l] ← acc[l] + w[l]·x`, with one scalar x sent to all eight lanes. That is
eight multiplies and eight adds per cycle, sixteen floating-point operations in
all. `matvec_kernel` handles a group of eight rows by walking the columns, one
per cycle. Each cycle it reads a weight word and the matching vector element,
and both memories have one cycle of read latency. After the last column it
waits one cycle for the final accumulate. It then sends the group's real rows
out one per cycle, with their row index. A group therefore takes
`(C+1) + 1 + rows_in_group` cycles. The `first` flag replaces the accumulator
with +0 on the bias column, so no separate clear cycle is needed.

Both arithmetic units are combinational and work in the same cycle:

* `fp32_mul` forms the 48-bit significand product, normalises it by at most one
  place, and rounds to nearest even.
* `fp32_add` aligns the operands using guard, round and sticky bits. It then adds
  or subtracts, normalises with a leading-zero count, and rounds to nearest even.
* Multiply and add are rounded separately: this is not a fused multiply-add.
* Subnormal inputs and results are flushed to signed zero.
* Overflow gives infinity. NaN and ∞−∞ give the quiet NaN `7fc00000`.

The sum is accumulated in a fixed order: bias first, then columns 1, 2, …
A software model that keeps that order and rounds every step to float32 gives
the same bits.

## The sigmoid table (`sigmoid_lut`)

The table holds 1024 float32 samples of σ, evenly spaced over [-7.5, 7.5] with
both ends included:

    entry k = float32( σ(-7.5 + k·15/1023) ),   k = 0 … 1023   (step ≈ 0.01466)

The table is filled from this formula at start-up, using integer arithmetic
only. No data file and no real-number support is needed, so synthesis tools can
build the table into a ROM. Each entry is computed as follows. Write
|x_k| = m·c, with c = 7.5/1023 and m = |2k − 1023|. The value e^-c comes from
its Taylor series in Q2.62 fixed point and is raised to the power m by repeated
multiplication. The entry is then 1/(1+e^-|x|) or e^-|x|/(1+e^-|x|), rounded
exactly to float32. Across the whole table, this matches a double-precision
`$exp` evaluation bit for bit.

An input v is mapped to an entry in three pipeline stages, with float32
arithmetic:

1. t = v + 7.5
2. u = t × 68.2 (that is, 1023/15 rounded to float32)
3. k = round(u), with halves rounded up and the result clamped to 0 … 1023; then the table is read.

Inputs below -7.5 give σ(-7.5) ≈ 0.00055, and inputs above 7.5 give
σ(7.5) ≈ 0.99945. The error against the true sigmoid is at most half a step
times the slope, about 0.0018 near v = 0. This approximation is the reason the
engine's outputs differ slightly from a float32 framework that uses the exact
exponential. The unit takes one input per cycle and its latency is 3 cycles. A
tag, the element index, travels with each value so the result can be written
to the right place in the buffer. The parameters are `DEPTH` and the range end `XMAX_NUM / XMAX_DEN`; the range is always symmetric.

## The skip connection (`skip_kernel`)

After layer 1, buffer B holds h1₀ … h1₄₉ in elements 0..49. The skip kernel
moves each element k to k + 2, one element per cycle. It works from element 49
down, so the move is safe in place through one read port and one write port.
It then writes x and y into elements 0 and 1. This takes 50 + 1 + 2 = 53 cycles.
Working element by element is deliberate: the vector hardware this design
follows had no vector-wide element shift either.

## Top-level interface (`mlp_graph`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `wl_we`, `wl_addr`, `wl_data` | in | 1, 10, 8×32 | weight memory write port |
| `in_valid`, `in_ready` | in/out | 1 | a sample is taken when both are high; `in_ready` is high only while idle |
| `in_vec[N_IN]` | in | 32 each | float32 inputs (x, y) |
| `out_valid` | out | 1 | one-cycle pulse |
| `out_vec[N_OUT]` | out | 32 each | float32 network output, held until the next result |

The parameters `N_IN, N_H1, N_H2, N_OUT` (default 2, 50, 43, 1), `LANES` (8),
`WDEPTH` (1024) and `VDEPTH` (56) can be changed. Elaboration stops with an
error if the network no longer fits the weight memory or the buffers. The
weight-load bus is `LANES` × 32 bits wide. Shared types and constants are in
`mlp_pkg`.

## How far it can be trusted

Each unit has a self-checking testbench that compares it with a model worked out
independently. The float32 reference (`tb/fp_ref_pkg.sv`) widens values to
double precision, uses the simulator's real arithmetic, and rounds back to
float32. For products and sums this gives exactly the IEEE result.

* `tb_fpmac`: about 3,800 random dot-product steps on all eight lanes, with wide
  exponent gaps, plus directed cases: cancellation, signed zeros and rounding
  carries. Every step is bit-exact.
* `tb_matvec_kernel`: the three real layer shapes plus 60 random shapes. It
  checks bit-exact results, that padding rows never appear, and the exact cycle
  count.
* `tb_sigmoid_lut`: one input at each of the 1024 sample points, so every
  entry is read, then about 3,000 inputs inside and outside the range. It checks
  the entry value against σ computed in the testbench with `$exp`, the index
  against the ideal position, saturation at both ends, the latency and the tags.
* `tb_skip_kernel`, `tb_weight_mem`, `tb_vector_buffer`: contents and timing
  against a shadow copy.
* `tb_mlp_graph`: the whole engine at full size, with random weights and 60
  samples, back to back. It compares every output bit-exactly with a model of the
  network and checks the 561-cycle latency. It counts padded groups, skip
  shifts, saturation at both table ends and back-to-back acceptance, and fails
  if any of these never happens.
* `tb_mlp_mandelbrot`: the full plotting workload, 100 × 100 pixels over
  x ∈ [-2, 1], y ∈ [-1.5, 1.5], for 10,000 inferences and 5.61 M cycles. All
  outputs are bit-exact, with 561 cycles per prediction.

The weights of the trained network are not part of this design. All tests use
random weights, so they show that the engine computes the network as specified,
not that any particular set of weights classifies the Mandelbrot set well.

To run one, for example the full engine:

    verilator --binary --timing --assert --Mdir build -Irtl -y rtl -y tb \
        rtl/mlp_pkg.sv tb/fp_ref_pkg.sv tb/tb_mlp_graph.sv --top-module tb_mlp_graph
    ./build/Vtb_mlp_graph

Each testbench ends with `TB_RESULT checks=N failures=M`. The same command with
another `tb_*` file runs the other tests.

## Where this design departs from the kernel design it follows

* **Dedicated units replace processor kernels.** The original ran each kernel as
  software on a vector processor tile and gave its speed as time per prediction
  (about 15.7 µs in simulation). Here each kernel is its own unit and the cost is
  561 clock cycles; the clock frequency depends on the target.
* **One sample at a time.** Kernels run strictly one after another and do not
  overlap across samples. Pipelining layer 1 of sample n+1 under layer 2 of
  sample n would raise throughput, but it is not built.
* **Arithmetic details.** Separately rounded multiply and add, subnormals flushed
  to zero, and halves rounded up when the table index is formed are this design's
  choices. The original says only "float32" and "multiply-accumulate".
* **Table spacing.** The samples are at a step of 15/1023, which includes both
  ends of the range. A step of 15/1024 would also match "about 0.014 apart"; the
  difference moves the samples by less than one step.
* **Padding rows are dropped.** Rows that exist only for padding are never sent
  through the sigmoid or stored. Their sigmoid would be σ(0) = 0.5, not zero,
  and it would feed the next layer if the padding weights there were not zero.
* **Memories.** One shared weight memory and two ping-pong buffers stand in for
  the per-tile local memories, and the host loads the weights through a plain
  write port.
* **Scalar activation.** The sigmoid unit handles one element per cycle, which
  matches the one-row-per-cycle output of the matrix-vector unit. It does not
  look up eight values at once.

## Files

`rtl/`: `mlp_pkg` (types, network shape), `fp32_mul`, `fp32_add`, `fpmac`,
`weight_mem`, `vector_buffer`, `matvec_kernel`, `sigmoid_lut`, `skip_kernel`,
`mlp_graph` (top).
`tb/`: `fp_ref_pkg` (reference float32 arithmetic and sigmoid table) and one
`tb_*` per unit, plus `tb_mlp_graph` and `tb_mlp_mandelbrot`.
