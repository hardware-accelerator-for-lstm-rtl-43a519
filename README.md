# Bank-balanced sparse LSTM accelerator

This is a SystemVerilog accelerator for one LSTM layer. Its weight matrix has
been pruned to 50 % sparsity.

The pruning is *bank-balanced*:

- Every row of the weight matrix is cut into equal banks of `BANK_SIZE` columns.
- Every bank keeps exactly `NNZ_BANK` weights.
- Every row therefore has the same number of non-zeros, spread evenly.

The hardware can then fetch one weight from every bank of a row in the same
clock, with no index decoding and no load imbalance between rows.

The weights are stored in CSB ("compressed sparse bank") order. A
processing element only needs a small bank-internal index per weight to
find the matching vector element.

The design follows the architecture of a published HLS (C++ to hardware)
accelerator for the Zynq-7020:

- a controller
- a matrix memory
- a vector memory
- a sparse matrix-vector (SpMxV) unit with parallel processing elements
- an element-wise operation (EWOP) unit with piecewise-linear sigmoid and tanh

Here the architecture is written directly as RTL. Where this RTL departs
from the reference, the section "Departures from the reference design"
below lists it.

## What one time step computes

The vector operand is `v = [x_t ; h_(t-1)]`, which has `VEC = INPUT_SIZE + HIDDEN`
elements. The weight matrix `W` has `4*HIDDEN` rows, four blocks of `HIDDEN`
rows each, in the order **i, g, f, o**.

```
z        = W * v + bias                     (SpMxV unit, 4*HIDDEN results)
i, g, f, o = sigmoid(z) split into 4 blocks (EWOP unit)
c_t      = f * c_(t-1) + i * g
h_t      = o * tanh(c_t)
```

- Sigmoid is applied to all four blocks, including the cell input `g`. This
  follows the reference architecture. The textbook LSTM applies tanh to `g`
  instead. Parameter `G_TANH = 1` selects tanh for `g`.
- `h_t` is written back into the `h` part of the vector memory, ready for the
  next step.
- `h_t` and `c_t` are streamed out, `h_t` first.

## CSB storage (matrix_mem)

Consider one row with `NB = VEC/BANK_SIZE` banks. Its `NB*NNZ_BANK`
non-zeros are stored *slice by slice*: slice `p` holds the `p`-th kept weight
of bank 0, then of bank 1, and so on up to bank `NB-1`. Two arrays are
kept:

- `VALUES[a]`: the weight.
- `INDEX[a]`: its column inside its bank, `0 .. BANK_SIZE-1`.

The address of slice `p`, bank `b` of row `r` is

```
a = r*NB*NNZ_BANK + p*NB + b
```

Example with 4 banks of 4 columns. The row keeps these weights:

| bank | weights (column inside the bank) |
|------|----------------------------------|
| 0    | A (0), B (2)                     |
| 1    | C (0), D (1)                     |
| 2    | E (2), F (3)                     |
| 3    | G (1), H (3)                     |

It is stored as `VALUES = A C E G B D F H` and `INDEX = 0 0 2 1 2 1 3 3`.

Reading one slice therefore returns exactly one weight per bank. The matrix
memory is a register array, so it can return one slice for `NUM_PE` rows at
once (`NUM_PE*NB` entries). Reads are registered and take one clock.

The host must do the pruning and the CSB encoding. `tb/tb_bbs_host.sv`
shows how: it draws a random bank-balanced matrix and encodes it in this
order.

## SpMxV unit and processing elements (spmxv, pe, pvb, adder_tree)

The rows are handled in groups of `NUM_PE`: PE `p` takes row
`g*NUM_PE + p`. For each group, the SpMxV unit issues the `NNZ_BANK` slices
one per clock, and the groups follow back to back. In every clock, each PE:

1. **pvb (private vector buffer).** For each bank `b`, it selects vector
   element `b*BANK_SIZE + INDEX[b]`. This is one `BANK_SIZE`-to-1
   multiplexer per bank, all working in parallel. It replaces a random
   vector access, which a single-ported memory could not serve for all banks
   at once.
2. It multiplies the `NB` weights by the selected elements.
3. **adder_tree.** It sums the `NB` products in a balanced tree, padded to a
   power of two.
4. It accumulates the tree output over the row's slices. With the last slice
   it adds the row's bias, which comes from the vector memory. The row result
   is registered one clock later.

The results are collected into the `4*HIDDEN`-element output vector `y`.
SpMxV latency, from `start` to `done`:

```
SPMXV = 4*HIDDEN/NUM_PE * NNZ_BANK + 2        (34 clocks at the defaults)
```

## EWOP unit and activation functions (ewop, sigmoid_pwl, tanh_pwl)

EWOP handles one hidden element per clock in a three-stage pipeline:

1. Sigmoid of `i`, `g`, `f` and `o`.
2. `c = f*c + i*g`.
3. `h = o*tanh(c)`.

- The unit holds `h` and `c` in registers.
- It raises `en_wr_v` (its "output ready" status) `HIDDEN+2` clocks after
  `start`.
- `clr_state` zeroes the cell state.

Both activation functions are piecewise linear over equal intervals of 0.1:

| function | linear range | intervals | below range | above range |
|----------|--------------|-----------|-------------|-------------|
| sigmoid  | (-8, 8]      | 160       | 0           | 1           |
| tanh     | (-6, 6]      | 120       | -1          | 1           |

On interval `k`, the output is `y = a_k*x + b_k`. The coefficients are the
chord of the exact curve over the interval:

```
a_k = (f(x_k+0.1) - f(x_k)) / 0.1
b_k = f(x_k) - a_k*x_k
```

Constant functions in `bbs_pkg` compute them at elaboration, using `$exp`,
and store them as Q8.24. No table file is read. The interval index is
`floor((x + RANGE) * 10)`, computed with one constant multiply.

Maximum measured error over the whole input range:

- sigmoid: 3.3e-4
- tanh: 9.7e-4

## Controller and host protocol (controller, vector_mem, bbs_accel)

The host talks to `bbs_accel` through three valid/ready ports:

- **Instruction port (`ir_*`).** One instruction at a time; `ir_ready` is
  high only while the controller is idle.
- **Input stream (`para_in_*`).** Carries weights, biases and vector words.
  During `LOAD_WEIGHTS`, `tindex` carries the CSB index.
- **Output stream (`ewop_o_*`).** Carries `2*HIDDEN` words per step, `h_t`
  then `c_t`, with `tlast` on the last word and `tkeep`/`tstrb` all ones.
  It holds its data while `tready` is low, which an assertion checks.

| code | instruction   | effect |
|------|---------------|--------|
| 1    | READ_PARA     | copy the stored vector into the SpMxV operand, clear `c`, run one time step |
| 2    | NO_READ       | run one time step on the operand as it stands, i.e. with `h_(t-1)` merged in |
| 3    | LOAD_WEIGHTS  | stream `4*HIDDEN*NB*NNZ_BANK` (value, index) pairs in CSB order |
| 4    | LOAD_BIAS     | stream `4*HIDDEN` biases |
| 5    | LOAD_VECTOR   | stream `ir_len` words to vector addresses `0..ir_len-1` (0 = the whole vector) |

The vector memory keeps two copies of the vector:

- the stored vector, written by `LOAD_VECTOR`;
- the working operand, which the SpMxV unit reads.

A load writes both copies. A partial `LOAD_VECTOR` can therefore replace
only `x_t` and keep the fed-back `h`. This is how a sequence is run:

```
LOAD_WEIGHTS, LOAD_BIAS, LOAD_VECTOR (x_1, h_0)
READ_PARA                          -> h_1, c_1
LOAD_VECTOR len=INPUT_SIZE (x_2)
NO_READ                            -> h_2, c_2
...
```

A time step goes through these stages: SpMxV, then EWOP, then one
write-back clock (`h_t` into the operand), then the output stream.

- The first output word appears `SPMXV + HIDDEN + 7` clocks after the
  instruction is accepted. At the defaults that is 49 clocks.
- The controller is ready one clock after the last output word is taken.
- Loads take one clock per word offered.

Reset is asynchronous and active low. It clears the control state and the
working operand. The memories are not reset; they must be loaded before
use.

## Number format

Every datapath word is 32-bit signed fixed point, Q16.16:

- Products are taken at full width and shifted back, with truncation.
- Sums wrap and do not saturate.

The weights, biases and inputs used in the testbenches stay well inside the
range.

## Parameters

| parameter  | default | meaning |
|------------|---------|---------|
| INPUT_SIZE | 8       | length of `x_t` |
| HIDDEN     | 8       | length of `h_t`, `c_t`; the matrix has `4*HIDDEN` rows |
| BANK_SIZE  | 4       | columns per bank; must divide `INPUT_SIZE + HIDDEN` |
| NNZ_BANK   | 2       | kept weights per bank (2 of 4 = 50 % sparsity) |
| NUM_PE     | 2       | processing elements; must divide `4*HIDDEN` |
| G_TANH     | 0       | 1 applies tanh instead of sigmoid to the cell input |

The defaults give a 32 x 16 weight matrix with 256 stored non-zeros. This
is the smallest of the evaluated sizes of the reference design.

The reference also evaluated two larger sizes at 50 % sparsity:

- hidden 32: 128 x 64 matrix, bank size 8;
- hidden 64: 256 x 128 matrix, bank size 16.

Both run here when the parameters are set accordingly; see the testbenches.

## Departures from the reference design

- **Arithmetic.** The reference computes in 32-bit floating point. Here it
  is Q16.16 fixed point, with the same word width.
- **Activation coefficients.** The reference stores fitted slope/intercept
  tables. Here the chords are computed at elaboration. The ranges and the
  interval width are the same.
- **Gate order.** The order i, g, f, o follows the reference's
  implementation code; one of its diagrams draws the gates as f, g, i, o.
  The order only decides which weight rows belong to which gate.
- **Cell state across steps.** Here `c` is kept between `NO_READ` steps and
  cleared by `READ_PARA`. The reference's code clears it on every call, which
  would drop `c_(t-1)` from the recurrence.
- **Write-back.** Only `h_t` is merged into the vector, into its `h` part.
  The reference's code overwrites the last `2*HIDDEN` vector elements with
  both `h_t` and `c_t`.
- **Host interface.** The reference drives its core through a generated
  AXI-Lite register block, or through AXI DMA streams. Here there is an
  instruction port plus AXI4-Stream-style valid/ready streams. The output
  stream drives `tkeep` and `tstrb` all ones and has no `tuser`, `tid` or
  `tdest`. The input stream has an added `tindex` field.
  Instruction codes 4 and 5 are this design's choice.
- **Schedule.** The reference's cycle schedule came from the HLS tool. The
  one-slice-per-clock PE schedule here is this design's own choice.
- **Not included.** The processor system, the DMA engine, the interconnect,
  the timers and the software that prunes and encodes the weights.
- **Timing closure.** The reference targeted 125 MHz on a Zynq-7020. This
  RTL has not been run through FPGA timing analysis.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `bbs_pkg.sv` | word formats, instruction codes, fixed-point and activation-coefficient functions |
| `bbs_accel.sv` | top level |
| `controller.sv` | instruction decoding and step sequencing |
| `matrix_mem.sv`, `vector_mem.sv` | on-chip storage |
| `spmxv.sv`, `pe.sv`, `pvb.sv`, `adder_tree.sv` | sparse matrix-vector product |
| `ewop.sv`, `sigmoid_pwl.sv`, `tanh_pwl.sv` | element-wise LSTM update |

`tb/`:

- **`tb_<block>.sv`** is one self-checking testbench per block. Each ends
  by printing `TB_RESULT checks=N failures=M`.
- **`tb_bbs_accel.sv`** runs the top at its default parameters through
  loads and six time steps. The steps are READ_PARA, NO_READ with new input,
  NO_READ, a READ_PARA restart, and two more NO_READ steps. It checks:
  - every output word, against a real-arithmetic LSTM (tolerance 0.02);
  - the 49-clock latency;
  - that input stalls, output stalls, partial loads, fed-back steps,
    restarts and `tlast` all occurred.
- **`tb_bbs_workloads.sv`** runs the same checks at three other sizes:
  - hidden 32;
  - hidden 64;
  - hidden 4 with input 12 (a 16 x 16 matrix with 128 non-zeros).
- **`tb_bbs_host.sv`** is the shared host model and reference.

## Simulating

With Verilator 5, run from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bbs_pkg.sv tb/tb_bbs_accel.sv --top-module tb_bbs_accel
./obj_dir/Vtb_bbs_accel
```

To run another testbench, replace `tb_bbs_accel` with its name. Each
testbench has a watchdog, and ends by printing its check and failure counts.
