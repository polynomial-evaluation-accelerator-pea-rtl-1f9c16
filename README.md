# Polynomial Evaluation Accelerator (PEA)

The PEA is a small hardware actor for dataflow systems that evaluates
polynomials over streams of numbers. It keeps up to eight polynomials of
degree at most 10 in on-chip registers. It evaluates any of them at 16-bit
signed arguments and returns 32-bit signed results. It talks to the rest of the
system only through FIFOs: instruction words and data words go in, and result
words and status words come out.

The design comes in three variants that trade hardware for speed. All three
give bit-identical results:

| Variant | Core (`CORE`) | How it evaluates | Multipliers | Throughput on long blocks, degree N |
|---|---|---|---|---|
| Design 1 | `pea_core_horner` (1) | Horner's rule, one step per cycle | 1 | N+2 cycles per argument |
| Design 2 | `pea_core_pipe2` (2) | Horner's rule, multiply and add in separate pipeline stages, 2 lanes with 2 arguments each | 2 | (2N+1)/4 cycles per argument |
| Design 3 | `pea_core_direct` (3) | all powers x^2..x^10 in a pipelined chain, all terms in parallel | 19 | 1 cycle per argument |

Each variant sits at a different point on the resource/performance curve, so
none is best on every count. Design 1 is the smallest. Design 3 is the fastest
on large blocks because its 8-cycle fill time is spread over many arguments.
Design 2 is the middle point: its short multiply-or-add critical path was
reported as giving the highest clock frequency of the three. It is the default
of `pea`.

## Instruction set

An instruction is one 16-bit word:

| Bits | Field | Meaning |
|---|---|---|
| [1:0] | opcode | 0 = STP, 1 = EVP, 2 = EVB, 3 = RST |
| [4:2] | A | coefficient vector (CV) address, 0..7 |
| [9:5] | operand | N (degree) for STP, b (block size) for EVB, unused otherwise |
| [15:10] | — | ignored |

| Instruction | Consumes from the data FIFO | Produces (result, status) |
|---|---|---|
| `STP A N`: store polynomial | N+1 coefficients c[0], c[1], …, c[N] (16-bit signed) | (0, OK) |
| `EVP A`: evaluate at one argument | 1 argument x | (P_A(x), OK) |
| `EVB A b`: evaluate over a block | b arguments | b × (P_A(x_i), OK) |
| `RST`: clear all CVs | nothing | nothing |

The status codes are in `pea_pkg::status_e`, one 8-bit word per result:

| Code | Name | When |
|---|---|---|
| 0 | `ST_OK` | success |
| 1 | `ST_ERR_UNINIT` | EVP or EVB on a CV that holds no polynomial (never stored, or cleared by RST) |
| 2 | `ST_ERR_DEGREE` | STP with N > 10 |
| 3 | `ST_ERR_BLOCK` | EVB with b = 0 |

A failing instruction consumes no data words. It writes exactly one result
word, 0, together with its error code. EVB checks b = 0 before it checks the
CV. Because nothing is consumed on an error, the producer must not send the
data words of an instruction that will fail. Otherwise the data stream falls
out of step with the instruction stream.

Arithmetic is 32-bit two's complement and wraps. The result is the exact
polynomial value reduced modulo 2^32. That is why Horner's rule and direct
evaluation agree bit for bit, whatever the overflow.

## How one instruction runs

`pea` is built as a dataflow actor with two nested state machines.

The **outer firing FSM** (`pea_firing_fsm`) has three states: IDLE,
FIRING_START and FIRING_WAIT. The actor is *enabled* whenever the
instruction FIFO is not empty. When enabled in IDLE, it spends one cycle in
FIRING_START, sending a one-cycle `invoke` to the control FSM. It then waits
in FIRING_WAIT for the control FSM's one-cycle `done`. While the instruction
FIFO is empty, the actor stalls in IDLE.

The **control FSM** (`pea_ctrl`) processes exactly one instruction per
firing:

```
IDLE --invoke--> FETCH --> DECODE --STP--> STP_LOAD --(N+1 loaded)--> OUTPUT --> IDLE
                                  --EVP--> EVP_EXEC --(result)------> OUTPUT --> IDLE
                                  --EVB--> EVB_EXEC --(b results written)-----> IDLE
                                  --RST--> RST_EXEC ----------------(no output)--> IDLE
                                  --error------------------------------> OUTPUT --> IDLE
```

- **FETCH** reads the instruction FIFO and latches opcode, A and operand.
- **DECODE** checks for errors and branches.
- **STP_LOAD** moves one coefficient per cycle from the data FIFO into CV[A],
  waiting whenever the data FIFO is empty. It then marks CV[A] valid with
  degree N.
- **EVP_EXEC** hands one argument to the core and latches the result.
- **OUTPUT** waits until *both* the result FIFO and the status FIFO have
  space, then writes one word to each.
- **EVB_EXEC** does not go through OUTPUT for each result. Two activities run
  in parallel there:
  - Issuing: whenever the data FIFO has a word and the core is ready, the next
    argument goes to the core, with `in_last` on the b-th.
  - Collecting: whenever the core has a result and both output FIFOs have
    space, the result is written with status OK.

  After the b-th write the FSM returns to IDLE. This is what lets Design 3
  take a new argument every cycle. With a slow consumer the core simply holds
  its result, and a pipelined core freezes.

From the fetch, an instruction costs 2 cycles (FETCH and DECODE) before its
work starts. The actor then needs 2 cycles of firing overhead before it
can fetch the next instruction.

## The three evaluation cores

All three cores have the same ports, so `pea` picks one with a `generate`
on `CORE`.

- `coef[0:10]` and `degree` describe the polynomial. They come straight from
  the CV store and stay stable while arguments are in flight.
- `in_valid/in_ready/in_x/in_last` pass arguments; `in_last` marks the end of a block.
- `out_valid/out_ready/out_result` return results in argument order.

### Design 1: sequential Horner (`pea_core_horner`)

The core loads `acc = c[N]` and then does `acc = acc*x + c[k]` for k = N−1
down to 0, one step per cycle. It takes one argument at a time. An argument
accepted at clock edge t gives `out_valid` after edge t+N. Counting the
hand-over cycles, each argument costs N+2 cycles.

### Design 2: two-stage pipelined Horner (`pea_core_pipe2`)

This is the least obvious of the three. One Horner step is split across a
pipeline register:

- **stage 1:** `prod = acc * x` (the lane's single multiplier), registered
- **stage 2:** `acc = prod + c[k]`

A register between multiplier and adder shortens the critical path. But a
single argument cannot use the pipeline every cycle, because step k+1 needs
the sum of step k. Each lane therefore **interleaves two arguments**:

- On even cycles it multiplies phase 0's accumulator while it adds phase 1's
  product.
- On odd cycles it does the reverse.

With two lanes, four arguments (a *group*) advance together. The following
schedule applies to every lane, compute cycle t = 0 … 2N:

| t | multiplier (stage 1) | adder (stage 2) |
|---|---|---|
| even, < 2N | phase 0: `prod = acc0 * x0` | phase 1: `acc1 = prod + c[N − t/2]` (t ≥ 2) |
| odd | phase 1: `prod = acc1 * x1` | phase 0: `acc0 = prod + c[N − 1 − t/2]` |
| 2N | — | phase 1's last add goes straight into the result buffer |

A group is therefore computed in 2N+1 cycles, about N/2 cycles per argument
(5 at N = 10). Two buffers keep the lanes busy in a long block:

- A **load buffer** collects the next group while the lanes compute. A group
  is complete at 4 arguments or at `in_last`.
- A **result buffer** holds the finished group while it is read out.

For N ≥ 2, a block of b arguments in m groups (g1 arguments in the first,
gm in the last) takes g1 + m·(2N+1) + gm cycles from first argument to last
result. For N = 0 a group bypasses the lanes and goes straight to the result
buffer as c[0].

### Design 3: direct evaluation with a power chain (`pea_core_direct`)

The core forms every term c[i]·x^i at once instead of nesting.

- **Power chain:** nine chain multipliers compute x², x³, …, x¹⁰, each from
  the previous power and x.
- **Terms:** ten term multipliers form c[1]·x … c[10]·x¹⁰.
- **Pipeline:** the chain is spread over 9 register stages. Stage k holds x,
  x^(k+1) and the running sum c[0] + … + c[k]·x^k. The last term,
  c[10]·x¹⁰, is added at the output.
- **Masking:** coefficients above the stored degree count as zero.

A new argument enters every cycle. An argument accepted at edge t is
delivered at edge t+9, so a block of b arguments passes through the core in
8 + b cycles. The whole pipeline stalls while its output result is not taken.

### Measured block timing

The table gives cycles from instruction fetch to the last result write, for
EVB on a degree-10 polynomial. Data and output FIFOs never hold the
accelerator up (`tb_pea_workload`).

| b | Design 1 | Design 2 | Design 3 |
|---|---|---|---|
| 1 | 13 | 25 | 11 |
| 4 | 49 | 31 | 14 |
| 16 | 193 | 94 | 26 |
| 31 | 373 | 177 | 41 |

The figures published with the design count only evaluation cycles: 10b for
Design 1, 5b for Design 2 and 8 + b for Design 3. This RTL reaches them up to
the following overheads:

- Design 1 adds 2 hand-over cycles per argument.
- Design 2 adds the fill and drain of its first and last group.
- Design 3 adds the 2 decode cycles.

## Modules

| File | Module | Role |
|---|---|---|
| `rtl/pea_pkg.sv` | package | sizes, instruction struct `instr_t`, `opcode_e`, `status_e`, `coef_vec_t`, `make_instr()` |
| `rtl/pea_top.sv` | `pea_top` | the three variants side by side (index 0/1/2 = Design 1/2/3 on every port array); shared clock and reset only |
| `rtl/pea.sv` | `pea` | one accelerator: 4 FIFOs, firing FSM, control FSM, CV store, one core (`CORE` = 1, 2 or 3, default 2) |
| `rtl/pea_firing_fsm.sv` | `pea_firing_fsm` | outer actor FSM |
| `rtl/pea_ctrl.sv` | `pea_ctrl` | control FSM |
| `rtl/pea_cv_store.sv` | `pea_cv_store` | 8 × 11 coefficients, degree and valid flag per CV; one write port, one whole-vector read port |
| `rtl/pea_core_horner.sv` | `pea_core_horner` | Design 1 core |
| `rtl/pea_core_pipe2.sv` | `pea_core_pipe2` | Design 2 core |
| `rtl/pea_core_direct.sv` | `pea_core_direct` | Design 3 core |
| `rtl/sync_fifo.sv` | `sync_fifo` | first-word fall-through FIFO used for all four streams |

The parameters are `pea.CORE` (default 2) and `FIFO_DEPTH` (default 16, a
power of two) on `pea` and `pea_top`. The architectural sizes are fixed in
`pea_pkg`: 8 CVs, maximum degree 10, 16-bit data, 32-bit results. Reset
`rst_n` is active-low and asynchronous. It empties the FIFOs and invalidates
all CVs.

The FIFO ports on `pea` follow the usual conventions:

- **Writing:** assert `*_wr` with data while `*_full` is low.
- **Reading:** `*_rdata` shows the oldest word while `*_empty` is low, and
  `*_rd` removes it.

Read the result and status FIFOs together: each holds one word per output.
Assertions flag writes into a full FIFO, reads from an empty one, and
out-of-range degrees.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. To build and run one with Verilator 5,
list the packages first and let the search path find the modules:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/pea_pkg.sv tb/tb_pea_ref_pkg.sv tb/tb_pea_prog_pkg.sv tb/tb_pea_top.sv \
  --top-module tb_pea_top
./obj_dir/Vtb_pea_top
```

| Testbench | What it checks |
|---|---|
| `tb_pea_top` | All three variants at default sizes, each with a random program of about 210 instructions. It checks every output word and requires each mechanism at least once: stalls, waits for data, waits on full output FIFOs, all four status codes, RST, Design 1 refusing arguments while busy, Design 2 full and partial groups, Design 3 pipeline stalls and back-to-back streaming. |
| `tb_pea_workload` | Degree-10 EVB with b = 1, 4, 16, 31 on all three variants: results and exact cycle counts (the table above). |
| `tb_pea` | One `pea` at its defaults (Design 2), end to end. |
| `tb_pea_ctrl` | Control FSM with the Design 3 core. Every transition is checked against the state table, plus one `done` per instruction. |
| `tb_pea_core_horner`, `tb_pea_core_pipe2`, `tb_pea_core_direct` | Each core alone: 300 random polynomials and blocks, with and without back-pressure, and the latencies and rates given above. |
| `tb_pea_cv_store`, `tb_pea_firing_fsm`, `tb_sync_fifo` | The remaining blocks against small models. |

Three packages hold the shared testbench code:

- `tb_pea_ref_pkg` has the reference model, a term-by-term evaluation that
  differs from both hardware methods.
- `tb_pea_prog_pkg` generates programs together with their expected output.
- `tb_pea_agent` drives one accelerator's FIFO ports.

All testbenches finish in well under a second of simulation time.

## Choices made in this RTL

The published description of the PEA fixes:

- the four instructions;
- 8 CVs, degree ≤ 10, 16-bit signed inputs and 32-bit signed results;
- the 2/3/5-bit instruction fields;
- the three kinds of error;
- the outer and inner state machines and their transitions;
- the structure of the three cores (one MAC; two pipeline stages with two
  multipliers; 9 + 10 multipliers with an 8 + b block time).

Everything below is this implementation's own choice. Check it before
connecting the RTL to an existing software driver.

- **Encodings:** the bit positions of the instruction fields, the opcode
  values, and the status code values and 8-bit width.
- **Error handling:** an erroneous instruction consumes no data and writes
  result 0. STP answers with (0, OK).
- **Coefficients** are 16-bit signed, the same width as arguments.
- **Overflow** wraps modulo 2^32; there is no saturation or overflow flag.
- **Instruction fetch:** the instruction word is read from its FIFO in FETCH,
  not on the IDLE→FETCH transition.
- **EVB results** are written directly from EVB_EXEC, not through OUTPUT for
  each result, so pipelined cores can stream.
- **Design 2 scheduling:** interleaving two arguments per lane, groups of
  four, and the load and result buffers are this design's way of reaching the
  "two-stage pipeline, two multipliers, 5b cycles" figures. The original
  description also says a degree-N polynomial needs N pipeline cycles, which
  does not fit the 5b figure with a single argument in flight. Here the 5b
  rate was taken as the target. With the buffers, long blocks come close to
  it (5.7 cycles per argument at b = 31, 5.25 asymptotically).
- **Design 3 power chain:** the nine chain multipliers produce x²…x¹⁰. A
  degree-10 polynomial needs x¹⁰, although the chain was described as reaching
  x⁹.
- **Storage:** the FIFOs (depth 16) and the register-based CV store are sized
  and built here. The description only names them.

The FPGA results reported for the original implementation are not reproduced
here:

| | Design 1 | Design 2 | Design 3 |
|---|---|---|---|
| LUTs | 653 | 1141 | 997 |
| flip-flops | 1622 | 1688 | 2818 |
| DSP blocks | 3 | 3 | 19 |
| max. clock | 127 MHz | 228 MHz | 210 MHz |

Area and speed of this RTL depend on the target and its multiplier mapping.
The relative order of the variants should carry over, but this RTL has not
been put through an FPGA flow.
