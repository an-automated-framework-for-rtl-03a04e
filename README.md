# An N-body interaction accelerator with a generated fixed-point kernel

This design computes pairwise interactions for N-body problems. Every target particle t_i
collects a weighted sum over a set of source particles s_j:

    acc_i = sum_j  m_j * (t_i - s_j) / (|t_i - s_j|^2 + e1)^(3/2)

The sum is 2-D, so it has two components. This is softened gravity in the plane. Counting all
pairs is O(N·M), which makes the problem compute-bound.

The accelerator splits each interaction into two parts:

- **The kernel:** a deep, fully pipelined **fixed-point kernel**. Every node of its dataflow
  graph has its own bit width, and every operator is scheduled to a fixed clock cycle.
- **The accumulation:** a **single-precision floating-point multiply-accumulate**. It applies
  the source weight and sums over all sources.

Several kernel pipelines share one stream of sources. Targets are processed in tiles. Data moves
between host memory and the device as one command stream over a DMA (direct memory access)
engine that issues its own burst transactions.

The architecture follows a published framework that generates accelerators of this kind from a
high-level description of the interaction function. This RTL is a hand-written instance of the
framework's worked example: the kernel above, in the configuration with 15 fraction bits.

## Block diagram

```
 host memory
     ^  |
     |  v            PCI Express endpoint (not included; its side is brought out as ports)
 +---+--+----------------------------------------------------------------------+
 | pci_if_ctrl  registers RX_ADDR/RX_LEN/TX_ADDR/CTRL, read & write DMA, irq    |
 +---+--------------------------------------------------------------------+----+
     | 64-bit words                                                       ^
     v                                                                    |
 IN (RX) buffer  sync_fifo 512                               OUT (TX) buffer  sync_fifo 512
     |                                                                    ^
 +---v--------------------------------------------------------------------+----+
 | dataflow_ctrl                                                                |
 |  input FSM: CONST -> e1 register, TGT -> target RAM (2 x spram, ping-pong), |
 |             SRC -> source FIFO (mass converted to float on entry)            |
 |  run FSM:   for each source, K cycles: pipeline p gets target p*K+k         |
 |   N_PIPE x [ kernel_pipeline -> mac_unit(op1), mac_unit(op2) -> ACC FIFO ]   |
 |  output FSM: drains the ACC FIFOs in target order, pulses tile_done          |
 +-----------------------------------------------------------------------------+
```

## The kernel pipeline (`kernel_pipeline`)

This is the core of the design. The interaction is written as a graph of primitive operators:

| node | operation | format (sign + I.F) | done at cycle |
|---|---|---|---|
| t1, s1, t2, s2 | inputs | Q6.15 | 0 |
| rd1, rd2 | t − s | Q7.15 | 1 |
| rd3, rd4 | rd1², rd2² | Q11.15 | 6 |
| rd5 | rd3 + rd4 | Q12.15 | 7 |
| rd6 | rd5 + e1 (e1 is Q0.15) | Q12.15 | 8 |
| rd7 | √rd6 | Q6.15 | 32 |
| rd8 | 1/rd7 | Q7.15 | 42 |
| rd9 | 1/rd6 | Q13.15 | 66 |
| rd10 | rd8 · rd9 | Q19.15 | 71 |
| op1, op2 | rd1 · rd10, rd2 · rd10 | Q25.15 | 76 |

Each operator's latency depends on its operand widths:

| operator | latency (cycles) |
|---|---|
| add / subtract | 1 |
| multiply | 3 + ⌊W1/18⌋ + ⌊W2/18⌋, counting 18×18 multiplier tiles |
| square root | 3 + F_out + I_in/2 |
| reciprocal | min(36, 4 + F_in + F_out) |

The schedule is as-soon-as-possible. Operands that are ready early wait in delay lines
(`shift_reg`):

- rd1 and rd2 wait 70 cycles before the final multiplies.
- e1 waits 7 cycles.
- rd9 waits 24 cycles for rd8.

The module computes every completion time and delay length from the latency functions in
`tanor_pkg`. An elaboration-time assertion checks that the total is 76 cycles. One interaction
enters per clock. A tag travels alongside, so the caller gets its indices back with the result.

How the fixed-point operators behave:

- A format "Q I.F" has a sign bit, I integer bits and F fraction bits.
- Every operator computes its exact result, then aligns it to the output format
  (`fx_round`):
  - extra fraction bits are truncated toward −∞;
  - values outside the range saturate.
- `fx_sqrt` uses a restoring, digit-by-digit root.
- `fx_recip` is a restoring division of 2^(F_in+F_out) by the magnitude. A zero input
  gives the largest value.

Both are true pipelines. Each register stage settles one result bit: 21 stages for the square
root and 31 for each reciprocal. A short delay line then pads the total to the library latency
(24 and 34 cycles). If a latency were ever set below the number of result bits, each stage would
settle several bits instead.

The multipliers work differently. They form the full product in one step, then pass it through a
delay line of the library latency. A synthesis tool can retime those registers into the
multiplier.

## Accumulation (`mac_unit`, `fx2fp`, `fp_mult`, `fp_add`)

Each kernel output feeds its own MAC unit:

1. `fx2fp` converts the Q25.15 value to e8m23 floating point (2 cycles).
2. `fp_mult` multiplies it by the source mass, which is already in float (6 cycles).
3. `fp_add` adds the result to the partial sum of the same target (11 cycles).

The partial sums live in a FIFO, the local buffer. The adder takes 11 cycles, so one target's
terms must never arrive back to back. The data-flow controller interleaves K = 16 targets, which
gives each target one term every 16 cycles:

- The partial sum at the head of the FIFO always belongs to the target whose product is arriving.
- For the first source of a target, a multiplexer writes the product itself into the FIFO instead
  of a sum. This is the bypass.
- For the last source, the sum goes to the output instead of back into the FIFO.

An assertion fires if the FIFO is read while empty, which happens when K is too small for the
adder latency.

The floating-point units use the format {sign, EW exponent bits, MW mantissa bits}, with
e8m23 by default. Their behaviour:

- no subnormals, infinities or NaN;
- zero has an all-zero exponent;
- results are truncated toward zero;
- overflow saturates to the largest finite value.

Their latencies follow the operator library's table, and depend on the mantissa width:

| mantissa width | ≤4 | 5–13 | 14–16 | 17–28 | 29–33 | 34–50 | 51–61 | >61 |
|---|---|---|---|---|---|---|---|---|
| fp_add | 9 | 10 | 11 | 11 | 12 | 12 | 12 | 13 |
| fp_mult | 4 | 4 | 4 | 6 | 6 | 7 | 8 | 8 |

## Data flow and the command stream (`dataflow_ctrl`)

The host sends one stream of 64-bit words. Bits [63:60] hold the command:

| cmd | name | payload |
|---|---|---|
| 1 | CONST | e1 in [15:0] (Q0.15) |
| 2 | TGT | x in [21:0], y in [43:22] (Q6.15 each) |
| 3 | SRC | x [21:0], y [43:22], mass [59:44] (Q0.15) |
| 4 | SRC_LAST | like SRC, and ends the tile |

**Tiles.** A tile has exactly N_PIPE·K = 48 TGT words, followed by any number of sources. The
last source is sent as SRC_LAST. The host pads a short final tile with dummy targets.

**Target RAMs.** Targets go into one of two single-port target RAMs (`spram`, one lane per
pipeline):

- While one RAM's tile runs, the next tile's targets load into the other RAM.
- Each RAM keeps its own copy of e1, taken when its tile is loaded. A CONST word in the stream
  therefore never changes a tile that is still running.

**Sources.** Sources pass through a 16-entry FIFO. Their mass is converted to float as it enters.

**Run order.** The run state machine holds each source for K cycles. In cycle k, pipeline p gets
target p·K + k. Execution stalls when:

- the source FIFO is empty;
- the next tile's targets are not all loaded;
- two tiles' results are already waiting in the ACC FIFOs (depth 2K), which are full when the
  output side is blocked.

**Output.** The output state machine reads the ACC FIFOs in target order. For each target it
writes one word, {op2 sum, op1 sum} as two floats. After each tile it pulses `tile_done`. The top
leaves that pulse unused: the host interrupt comes from the write engine, once the tile's results
have actually reached host memory.

## Host interface and DMA (`pci_if_ctrl`)

The host programs four registers:

| register | contents |
|---|---|
| 0 | input address (bytes) |
| 1 | input length (words) |
| 2 | output address (bytes) |
| 3 | bit 0 starts the job |

**Read engine.** It requests bursts of up to BURST = 16 words. Only one burst is outstanding at a
time, and a burst is issued only when the IN buffer has room for all of it. Completions arrive in
order and are pushed into the buffer.

**Write engine.** It sends results in bursts of up to 16 words that never cross a tile. One cycle
after each full tile of 48 words, it raises `irq`.

**Endpoint ports.** The endpoint side is a simple transaction interface, not a vendor core's:

- read request: addr/len with valid/ready;
- completion words with a valid strobe;
- write beats with valid/ready and first/last markers.

Assertions check three protocol rules: no completion without a request, no TX underrun, and no
write beat withdrawn.

## Parameters of the top (`tanor_accel`)

| parameter | default | meaning |
|---|---|---|
| N_PIPE | 3 | kernel pipelines (the pipeline count of the reference gravitational design) |
| K | 16 | targets per pipeline per tile; must be > fp_add latency |
| BURST | 16 | DMA burst length in words |
| BUF_DEPTH | 512 | IN and OUT buffer depth in words |
| SRC_DEPTH | 16 | source FIFO depth |
| EW, MW | 8, 23 | accumulation float format |

The fixed-point formats of the kernel are constants in `tanor_pkg`. The graph's schedule depends
on them, so changing them means revisiting `kernel_pipeline`.

## Departures from the reference architecture

These points are this design's own choices, or simplifications:

- **Operator insides.** The reference maps the operators to vendor cores: an adder, a
  multiplier, a divider for the reciprocal and a CORDIC core for the square root. Here they are
  plain RTL with the same latencies:
  - restoring bit-per-stage pipelines for the square root and the reciprocal;
  - a single-step product followed by a delay line for the multipliers.
  The floating-point adder has three working stages (align, add, normalise) and the
  floating-point multiplier two (product, normalise). Each pads to its library latency with a
  delay line.
- **Stream format.** The command encoding, the fixed tile size with padding, the two-tile limit
  on results in flight, the register map and the endpoint interface are all invented here. The
  reference describes only what these do.
- **PCI Express endpoint core and host software.** Neither is included. The testbench includes a
  behavioural host-memory model, `tb/pcie_ep_model.sv`, which plays both parts. It answers
  reads with random delay and accepts writes with random back-pressure.
- **Other kernels not built.** Only the 2-D kernel above exists. The reference framework also
  builds:
  - Gaussian, 3-D gravitational (seven outputs) and molecular-dynamics kernels;
  - LUT-based Taylor-series function evaluation, used for exp() and Bessel J0.

  None of these is part of this RTL.
- **MAC bypass point.** The reference block diagram branches the multiplexer's second input off
  the format converter, ahead of the weight multiplier. Here the branch is taken after the
  multiplier, so that the first source of each target is also weighted by its mass.
- **Rounding.** The fixed-point operators truncate and saturate. The floating-point operators
  truncate. The reference does not specify rounding.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come from
models in `tb/tb_ref_pkg.sv`, which are written independently of the RTL:

- an integer model of the kernel, bit-exact;
- real-number models of the floating-point units.

| testbench | what it checks |
|---|---|
| tb_kernel_pipeline | 1200 random interactions, bit-exact, latency 76 |
| tb_fx_ops | add/sub, mult, sqrt, recip, round, delay line, each against its latency formula |
| tb_fx2fp, tb_fp_mult, tb_fp_add | against real arithmetic, latency checked |
| tb_mac_unit | interleaved accumulation, bypass on the first term |
| tb_sync_fifo, tb_spram | random traffic against a model |
| tb_dataflow_ctrl | several tiles with stalls, RAM overlap, back-pressure and a CONST word arriving mid-tile |
| tb_pci_if_ctrl | reduced burst and tile sizes, random endpoint timing |
| tb_tanor_accel | whole design at default parameters (see below) |
| tb_workload_5k | a full 5000 × 5000 job at default parameters, results and cycle count (see "Sizing a job") |

**End-to-end test.** `tb_tanor_accel` runs the whole design at its default parameters: 20 tiles,
one of them with 1500 sources, plus a change of e1 between tiles. It checks every result word
against the reference and counts the design's mechanisms, each of which must occur:

- read and write bursts;
- interrupts;
- loading one RAM while the other runs;
- source-FIFO underrun;
- IN-buffer full;
- OUT-buffer back-pressure;
- a CONST arriving while a tile runs.

To run a testbench with Verilator, for example:

```
verilator --binary --timing --assert rtl/tanor_pkg.sv tb/tb_ref_pkg.sv tb/tb_tanor_accel.sv \
          -y rtl -y tb --top-module tb_tanor_accel -Mdir obj_tb
./obj_tb/Vtb_tanor_accel
```

Testbenches that do not use the reference models leave out `tb/tb_ref_pkg.sv`. The end-to-end
test runs in well under a second of wall-clock time.

## Sizing a job

Targets are processed 48 per tile. Sources are streamed, not stored, so their number has no
limit.

Take 5000 targets and 5000 sources as an example:

- **Tiles:** 105. The last one is padded.
- **Input:** 530,041 words, or 4.2 MB.
- **Output:** 5040 words.
- **Run time:** about 8.4 M cycles, since each source occupies the pipelines for K = 16 cycles
  per tile. That is about 67 ms at 125 MHz.

`tb_workload_5k` runs exactly this job at the default parameters and checks all 10,080 result
values. It measures 8,400,303 cycles from start to the last interrupt, against an ideal of
8,400,000. The gap is pipeline fill and drain. Loading the next tile's targets is fully hidden
behind the running tile. The simulation takes a little over a minute.
