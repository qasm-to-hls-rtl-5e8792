# Layer-matrix quantum circuit emulator in double-precision complex arithmetic

This RTL emulates a quantum circuit the most direct way: it multiplies a
state vector by a series of matrices. Host software cuts a circuit of `n`
qubits into layers. Each layer is the tensor product of the gates acting at
that step, with idle qubits given an identity gate, and an entangling gate
such as CNOT standing as a layer by itself. Each layer becomes one
`2^n x 2^n` complex matrix. The hardware holds these matrices and the `2^n`
amplitudes of the state in on-chip buffers. It multiplies them in IEEE-754
double precision and hands the final state back to the host.

Two ways of organising that work are provided, side by side in the top:

* **Matrix-vector (Type-1 / Type-2).** A kernel with `K` matrix buffers applies
  up to `K` layers to the state per call. The output state stays in the
  kernel and is the input of the next call. `K = 1` (the Type-1 design) needs
  one host transfer per layer. `K > 1` (Type-2) cuts the number of calls to
  `r = L/K` for `L` layers, at the cost of `K` matrix buffers.
* **Matrix-matrix, then matrix-vector (Type-3).** A kernel takes `K` layer
  matrices per call and multiplies them into a single circuit matrix
  `M_total`. The host then gives `M_total` to a matrix-vector kernel, which
  applies it to the input state once.

The circuit layering, the tensor products and the host program are software
and are not part of this RTL. The testbenches do that work themselves.

## Number format and the arithmetic unit

Every amplitude and matrix element is a 128-bit `cplx_t` (`qemu_pkg`). Bits
`[127:64]` hold the real part and bits `[63:0]` the imaginary part, both
IEEE-754 binary64. A state vector therefore takes `2^(n+4)` bytes and a
matrix `2^(2n+4)` bytes.

All arithmetic goes through one unit, `cmac`, which computes `y = acc + a*b`
in one clock (it is combinational). It uses four `fp64_mul` and four
`fp64_add` in a fixed order:

    t_re = a.re*b.re - a.im*b.im        t_im = a.re*b.im + a.im*b.re
    y.re = acc.re + t_re                y.im = acc.im + t_im

Every operation rounds to nearest, ties to even. Because the order is fixed,
a software model that performs the same double-precision operations in the
same order matches the hardware bit for bit. The testbenches rely on this.

The floating-point units differ from full IEEE-754 in two ways:

* Subnormal inputs are read as zero, and results below the normal range
  become a signed zero. Quantum amplitudes that small do not occur in
  practice.
* Every NaN result is the quiet NaN `0x7FF8_0000_0000_0000`.

Infinities, signed zeros and overflow follow the standard. An exact
cancellation such as `x - x` gives `+0`.

## Matrix-vector kernel (`mv_kernel`)

The kernel has one matrix buffer of `K*N*N` words (`N = 2^N_QUBITS`). The
state buffer holds `2*N` words split into two halves, and a one-bit pointer
`cur` marks the half holding the current state.

A call is started with `start` and `n_layers` (1 to `K`). It streams matrix
`l`, row `r`, column `c`, in that order, one element per clock, with no
bubbles:

* **Issue stage.** It presents the matrix address `{l, r, c}` and the state
  address `{half, c}`. Both buffers answer one clock later.
* **MAC stage.** It accumulates `M[r][c] * S[c]` into a running sum. At
  `c = 0` the sum starts from zero. At `c = N-1` it writes the row's result
  into the other half of the state buffer.

After each layer, the read and write halves swap. At the end of the call,
`cur` points at the half that was written last. That state is what the host
reads, and it is the input of the next call. This is how the state "feeds
back" between calls.

Layer `l+1` never reads a state word that layer `l` is still writing, as
long as `N >= 2`. Layer `l`'s last row is written one
clock after its last issue, and layer `l+1` does not read element `N-1`
until `N-1` clocks into its first row.

**Timing.** `done` pulses `n_layers*N*N + 1` clocks after the clock edge that
samples `start`. `busy` is high from that edge until `done`.

**Host ports.** `m_we/m_sel/m_addr/m_wdata` write matrix element
`m_addr = row*N + col` of buffer `m_sel`. `s_we/s_addr/s_wdata` write the
current state. `s_raddr` reads it, with the data on `s_rdata` one clock
later. Writes are ignored while `busy` is high, and an assertion flags any
attempt.

## Matrix-matrix kernel (`mm_kernel`)

This kernel reduces `K` layer matrices (with `K` a power of two) to one
matrix. It works pairwise, in a tree of `log2 K` levels, with the later layer
always on the left:

    P0 = M1*M0,  P1 = M3*M2,  ...   then   P1*P0, ...   down to the root R

The products of one level are independent, so they run at the same time on
`K/2` complex MAC units. The units step through the same `i, j, k` loop in
lockstep, one MAC each per clock. Every matrix slot is a buffer of its own,
so no two units ever share a port. There are `2K+1` slots, laid out like a
heap:

| slots      | contents                                      |
|------------|-----------------------------------------------|
| `0..K-1`   | the `K` input layers, loaded by the host      |
| `K..2K-2`  | the intermediate products; the root is `2K-2` |
| `2K-1, 2K` | `M_total`, ping-pong                          |

Level `v` starts at slot `b = 2K - 2*(K >> v)`. Its unit `u` reads slots
`b+2u+1` (left) and `b+2u` (right) and writes slot `b + (K >> v) + u`. For
`K = 4`, level 0 computes slots 4 and 5 from 1·0 and 3·2 in parallel, and
level 1 computes slot 6 from 5·4.

A final stage on unit 0 then updates the circuit matrix:

* `accumulate = 1`: `M_total <- R * M_total_old`
* `accumulate = 0`: `M_total <- R`. In this case the right operand is an
  identity matrix generated on the fly rather than read from a buffer.

Each call writes the other `M_total` slot and flips the pointer. A circuit of
`L` layers therefore takes `L/K` calls, the first without `accumulate`. The
host pads `L` up to a multiple of `K` with identity layers.

A level never reads a word that the previous level is still writing, as long
as `N >= 2`. The last element a level writes is not read by the next level
until late in that level's loop.

**Timing.** A call has `log2 K` tree levels and the final stage, each of
`N^3` clocks. `done` pulses `(log2 K + 1)*N^3 + 1` clocks after `start` is
sampled. `t_raddr` reads `M_total` when the kernel is idle, with the data on
`t_rdata` one clock later.

## Top (`qasm_emu_top`)

The top holds three kernels:

* `u_mv`: the Type-1/2 matrix-vector kernel, with `K_MV` buffers and ports
  `mv_*`.
* `u_mm`: the Type-3 matrix-matrix kernel, with `K_MM` buffers and ports
  `mm_*`.
* `u_t3mv`: the Type-3 matrix-vector kernel, with one buffer and ports
  `t3_*`.

Nothing connects the kernels inside the top. In the Type-3 flow the host
reads `M_total` from `mm_t_rdata` and writes it to `t3_m_wdata`, as a host
would over the card's bus. That bus itself (PCIe and the vendor runtime) is
not modelled. Each kernel instead has plain one-word-per-clock ports.

| parameter  | default | meaning                                      |
|------------|---------|----------------------------------------------|
| `N_QUBITS` | 7       | qubits; buffers are sized for `2^N_QUBITS` amplitudes |
| `K_MV`     | 1       | matrices per matrix-vector call (1 = Type-1) |
| `K_MM`     | 4       | matrices per matrix-matrix call (power of two) |

At the defaults:

* The Type-1 kernel holds 256 KiB of matrix and 4 KiB of state, and takes
  16,385 clocks per layer.
* The Type-3 matrix-matrix kernel holds 9 x 256 KiB, has two MAC units, and
  takes 3 x 128^3 + 1 = 6,291,457 clocks per call.

In synthesis the buffers stay memories, about 23 Mbit in all.

A circuit smaller than `N_QUBITS` runs on a larger kernel if the host pads
each layer with identity on the unused qubits. Circuits of 3, 5 and 7 qubits
all fit the default build.

## Where this differs from the architecture it follows

* **Type-3 timing.** The products of a tree level run concurrently, as in
  the source design. The final multiplication into `M_total` is a separate
  stage of the same call here, so a call costs `log2 K + 1` product times.
* **Type-3 buffer count.** The Type-3 buffer count here is `2K+1` matrices,
  not the `K*(K/2+1)` of the source design's space estimate.
* **One MAC per clock per unit.** Each product is computed by one complex
  MAC at one element step per clock. The source design is built with
  high-level synthesis, and its internal parallelism, pipelining and clock
  rate are not specified, so the cycle counts here are this design's own.
  The measured speed of the original (milliseconds per circuit on a
  data-centre FPGA card) cannot be compared with them.
* **Unpipelined arithmetic.** The MAC path (a 53x53-bit multiply, then two
  binary64 adds) is combinational between the buffer outputs and the
  accumulator. It is functionally complete, but it would limit the clock
  rate on a real FPGA. Pipelining `cmac` would need the accumulation to
  interleave rows (or columns) so that one sum is not needed again before
  it is ready. That changes the schedule, but not the operation order per
  element. No timing analysis has been done on this RTL.
* **Choices not fixed by the source.** The `n_layers` input (for `L` not a
  multiple of `K`) is an addition. So are the `accumulate` input and the
  exact host-port protocol, the reset behaviour, the rounding mode and
  flush-to-zero.
* **Default sizes.** `N_QUBITS = 7` and `K_MV = 1` are the largest measured
  configuration. `K_MM = 4` is a free choice.

## Files

| file | contents |
|------|----------|
| `rtl/qemu_pkg.sv` | `cplx_t`, binary64 constants |
| `rtl/fp64_mul.sv`, `rtl/fp64_add.sv` | binary64 multiplier and adder |
| `rtl/cmac.sv` | complex multiply-accumulate |
| `rtl/cplx_ram.sv` | complex-word buffer, 1 write and `NRD` read ports |
| `rtl/mv_kernel.sv` | matrix-vector kernel |
| `rtl/mm_kernel.sv` | matrix-matrix kernel |
| `rtl/qasm_emu_top.sv` | top |
| `tb/qemu_tb_pkg.sv` | reference models (same operation order), random stimulus |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_qasm_emu_full.sv` | end-to-end test at the default sizes |
| `tb/tb_workload_random.sv` | random 3-, 5- and 7-qubit circuits on the default build |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Build and
run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/qemu_pkg.sv tb/qemu_tb_pkg.sv tb/tb_qasm_emu_top.sv \
      --top-module tb_qasm_emu_top -o sim
    ./obj_dir/sim

The testbenches:

* **`tb_fp64_mul`, `tb_fp64_add`, `tb_cmac`.** These compare tens of
  thousands of random operations bit for bit with the simulator's `real`
  arithmetic. They also cover rounding ties, signed zeros, infinities and
  NaN.
* **`tb_cplx_ram`.** Checks read latency, the two read ports and
  read-during-write.
* **`tb_mv_kernel`** (3 qubits, `K = 2`) and **`tb_mm_kernel`** (2 qubits,
  `K = 4`). These check random matrices bit for bit against the models, and
  check the exact clock count of every call.
* **`tb_qasm_emu_top`** (3 qubits, `K_MV = 2`, `K_MM = 4`). This is the end
  to end test. It builds the layers of a GHZ circuit from H, CNOT and X gates
  and runs them through both the Type-2 path and the Type-3 path. It
  compares both results bit for bit with the models and, within `1e-12`,
  with the ideal state `(|0..0> + |1..1>)/sqrt(2)`. It also checks that
  every mechanism occurs: full and partial batches, state feedback, fresh
  and accumulated `M_total`, and the `M_total` hand-over.
* **`tb_workload_random`.** Random circuits of constant depth 8 on 3, 5 and
  7 qubits run on the default 7-qubit Type-1 build, with idle qubits padded
  by identity. Each layer is either random single-qubit gates (I, H, X, Z,
  S, T) or one CNOT. The result is checked bit for bit against the model,
  and against an independent gate-by-gate state-vector simulation.
* **`tb_qasm_emu_full`.** The same test at the default parameters: 7 qubits,
  9 layers, padded to 12 for Type-3. It takes about a minute.

The reference models use the same operation order as the hardware, so they
are exact, but only while no value becomes subnormal. The stimulus keeps
magnitudes between about `2^-6` and 1.

To change the size, override `N_QUBITS`, `K_MV` and `K_MM` on `qasm_emu_top`.
Simulation time grows as `N^2` per Type-1 layer and as `(log2 K + 1)*N^3` per Type-3
call.
