# Stream-oriented modular processor with polymorphic functional units

Dataflow applications are chains of arithmetic kernels that stream data from one to the next. This design gives each kernel its own small processor, and the processors are built from modules you can reuse and resize:

- **Dispatchers** are small in-order cores. They run the control flow of a kernel.
- **Shared functional units** are the expensive arithmetic: an integer multiplier, an FP multiplier and an FP adder. All the dispatchers of a kernel share them, and every dispatcher sees each unit as one more pipeline stage of its own.
- **A data stream manager (DSM)** is a programmable address generator. It moves the operand streams from a shared memory into the dispatchers' register files and moves the results back. Loads and stores therefore never appear in the dispatchers' inner loops.
- **Several kernels** sit around one shared memory. That memory buffers the input stream, the intermediate streams between kernels, and the output.

The default top level, `soma_top`, is a six-kernel system sized for a small convolutional neural network. Its kernels have 4, 2, 8, 2, 2 and 8 dispatchers.

Everything is written in synthesizable SystemVerilog (IEEE 1800-2017). It lints cleanly in Verilator 5 (warnings only) and elaborates in yosys with the slang front end.

## Structure

```
soma_top                      six kernels + shared memory + host port
├── soma_shmem                shared memory, one port per kernel + host (2^18 words)
└── soma_kernel  (x6)
    ├── soma_imem             instruction memory, one read port per fetcher
    ├── soma_dispatcher (xN)  4-stage core
    │   ├── soma_srf          stream register file (GPRs + A/B/DA/DB banks)
    │   ├── soma_rit          register invalidation table
    │   └── soma_fifo         issue FIFO
    ├── soma_xbar             ISSUE crossbar (dispatchers -> units)
    ├── soma_xbar             WB crossbar    (units -> dispatchers)
    ├── soma_fu  (IMUL, FMUL, FADD)   polymorphic shared units
    ├── soma_fu_mem           intra-kernel local memory, seen as a unit
    ├── soma_dsm              data stream manager
    └── soma_stream_icn       DSM <-> stream register files
```

`soma_pkg` holds the packet types, the register map, FU0, the branch evaluation and the single-precision arithmetic.

## The dispatcher pipeline

The dispatcher runs a subset of the MicroBlaze instruction set in four stages.

1. **IF** fetches from the kernel's shared instruction memory.
2. **ID&OF** decodes the instruction and reads operands from the stream register file (SRF). It checks hazards in the register invalidation table (RIT) and resolves branches. There are no delay slots; a taken branch drops the fetched instruction.
3. **EX** holds FU0, the dispatcher's own small unit. FU0 does add/subtract, compare, logic and barrel shifts.
4. **WB** writes into the SRF.

Operations for a shared unit take a different path:

- **Issue.** After operand fetch they enter the *issue FIFO* (depth 4). Each entry carries the operation, two operands, the dispatcher ID and the destination register.
  - The FIFO drains into the ISSUE crossbar on its own. A busy unit therefore stalls the dispatcher only when the FIFO is full.
  - Entries already queued keep leaving while ID&OF is stalled.
- **Return.** Results come back through the WB crossbar carrying the result, register, dispatcher ID and unit ID.
- **Write-back conflicts.** A returning result always wins the write port. If an FU0 result is waiting in WB in the same cycle, the whole pipeline stalls for one cycle. The shared units therefore never wait for a dispatcher.

Hazards are handled by stalling; there is no forwarding.

- When an operation that writes `rd` leaves ID&OF, the RIT marks `rd` invalid. Write-back marks it valid again.
- ID&OF stalls while a source register or the destination register is invalid. Checking the destination prevents two results for one register being in flight at once.
- A value written back can be read in ID&OF one cycle later.

### Register map

| register | read | write |
|---|---|---|
| r0 | 0 | discarded |
| r1..r27 | general purpose | general purpose |
| r28 | this dispatcher's ID | - |
| r29 | status: bit 0 = end of stream seen | push to the output stream and close the output block |
| r30 | pop the active input bank (named twice in one instruction: pops two elements) | - |
| r31 | - | push to the output stream |

In the inner product, the whole inner loop is:

```
loop: fmul r3, r30, r30     ; pops x and y from the input bank
      fadd r4, r4, r3       ; waits in the RIT for r3
      beqi r29, loop        ; until the end of stream has been popped
```

### Keeping output streams in order

A result bound for the output stream may come from FU0 or from any shared unit, and the paths have different latencies. An output write is therefore allowed to be in flight alongside earlier ones only if it takes the same path. Otherwise ID&OF waits until the earlier writes have landed. Output writes also reserve room in the output bank when they issue, so a bank can never overflow.

### Supported instructions

- **FU0:** `add`, `rsub`, `cmp`, `addi`, `rsubi`, `or`, `and`, `xor`, `ori`, `andi`, and the barrel shifts.
- **Branches:** `br`, `bri`, `brlid` (link written back through EX), `rtsd`, and the `Bcc`/`BccI` family (eq, ne, lt, le, gt, ge).
- **Shared units:** `mul`/`muli` (integer unit), `fadd`/`frsub`/`fmul` (FP units), and `lwi`/`swi` (the local memory).
- **Halt:** `bri 0` halts.

There is no carry, no `imm` prefix, no MSR and no exceptions. Immediates are 16-bit and sign-extended.

## The stream register file and double buffering

Each dispatcher's SRF has five banks:

- the general-purpose registers;
- two input FIFOs, **A** and **B**, which the DSM fills;
- two output FIFOs, **DA** and **DB**, which the DSM drains.

Banks are used in pairs, A with DA and B with DB. A data block ends with an element marked `last`.

- **Loading.** The DSM switches to filling the other input bank as soon as it has written a `last` element.
- **Reading.** The dispatcher switches banks after it pops a `last` element.
- **Output.** Output works the same way. Writing `r29` marks the element `last` and switches the output bank.

While the dispatcher works on one pair, the DSM can fill and drain the other. Each element also carries an `eos` mark. Popping it sets the sticky status bit read through `r29`.

When a broadcast needs room in every dispatcher, the full banks hold back the DSM. This synchronises the dispatchers without any explicit barrier.

## Polymorphic functional units

`soma_fu` is one template with a `KIND` parameter (IMUL, FMUL, FADD) and a latency `LAT`.

- The operational unit works beside a control pipeline of the same depth, which carries the dispatcher ID and destination register. After `LAT` stages the two are joined into a write-back packet and written into an output FIFO.
- The pipeline never stops. Instead, `in_ready` is credit-based: a new operation is accepted only while the FIFO has room for everything already in the pipeline.
- Default latencies are 6 (integer multiplier), 8 (FP multiplier) and 11 (FP adder).
- The operational unit computes in its first stage, and the remaining stages only delay the result. Timing and throughput are those of a deep pipeline. If you need the real critical path, replace `ou_res` with a pipelined datapath.
- FP arithmetic is IEEE single precision with round-to-nearest-even. Denormal inputs and outputs are flushed to zero, and NaN payloads are not preserved.

`soma_fu_mem` is the intra-kernel local memory: 256 words behind the same packet interface.

- `swi` writes a word and returns nothing.
- `lwi` returns the word one cycle later.
- Dispatchers use it to exchange partial results (for example, for the final reduction of the inner product) and to hold constants.

## The data stream manager

The DSM is a three-stage core using the same encoding as the dispatchers.

- **IF**, then **ID/OF/EX**, which holds the address adder and writes the local register file r0..r31.
- A **memory stage** is used only by external instructions.
- It implements the same FU0 and branch instructions plus two pattern instructions. Each pattern takes its configuration from register `rd`.

| instruction | opcode | action |
|---|---|---|
| `ldp rd, ra, rb` | 110011 | Read `count` elements from `ra` with `stride`. In two-vector mode, interleave them with `count` elements from `rb` (x0 y0 x1 y1 ...). Send them to one dispatcher, or to all of them. |
| `stp rd, ra` | 110111 | Pop `count` elements from one dispatcher's output banks and write them from `ra` with `stride`. |

The layout of the configuration word:

| bits | field |
|---|---|
| [15:0] | count |
| [23:16] | stride, in words, signed |
| [27:24] | dispatcher ID (15 = broadcast; loads only) |
| [28] | two vectors |
| [29] | mark the final element `last` (end of a block) |
| [30] | mark the final element `eos` |

A pattern moves one element per clock with no further instructions. It waits only while the destination bank has no room, or while the source bank of a store is empty. A broadcast waits until every dispatcher has room. Memory reads take one cycle, so an element fetched in cycle t is in the SRF at the end of cycle t+1.

The stream manager interconnect (`soma_stream_icn`) does three things:

- routes each loaded element to the addressed input bank, or to all of them;
- returns the head of the selected dispatcher's output bank;
- combines the ready signals (AND for a broadcast).

## Local crossbars

`soma_xbar` is a combinational crossbar with a round-robin arbiter per slave. Masters that address different slaves transfer in the same cycle. It is used twice per kernel:

- **ISSUE:** dispatchers to units.
- **WB:** units to dispatchers. A dispatcher always accepts a result.

## Multi-kernel top level and host interface

`soma_shmem` has one port per kernel and one host port. Each port reads synchronously with one cycle of latency. When two ports write the same word in the same cycle, the higher port wins.

The host does the following, in order:

1. writes the input data through `host_*`;
2. loads each kernel's instruction memory (`imem_we[k]`, `imem_waddr`, `imem_wdata`; word addresses);
3. pulses `start[k]` with the dispatcher and DSM start addresses in `disp_pc[k]` and `dsm_pc[k]` (byte addresses);
4. waits for `busy[k]` to fall.

`busy` stays high until every program has halted and every queue, unit and bank of the kernel is empty. The host also starts each kernel once its producer has finished, so the order of kernels is the host's job.

## How far this follows the original architecture

**Taken from the architecture:**

- the kernel structure and the four dispatcher stages;
- the SRF, with double-buffered A/B and DA/DB banks, and the RIT in ID&OF;
- FU0 in EX, the issue FIFO, and the write-back priority with its one-cycle stall;
- units built as operational unit, control block and output FIFO;
- two crossbars, and a local memory with a unit interface;
- a DSM with a two-stage internal and three-stage external pipeline, and load/store patterns with stride, count and two interleaved vectors;
- individual and broadcast stream transfers;
- the unit latencies 6/8/11 and the 4/2/8/2/2/8 dispatcher allocation.

**Own choices, not given by the architecture description:**

- the register numbers of the stream registers;
- the pattern encoding and configuration layout, and the `last`/`eos` marks;
- where branches resolve;
- all sizes: SRF banks 16, issue FIFO 4, unit FIFO 16, local memory 256, instruction memory 1024 and shared memory 2^18 words;
- round-robin arbitration and the host port;
- one unit set (IMUL, FMUL, FADD, local memory) for every kernel;
- the output-ordering rule;
- the output bank switching when the program writes `r29`, not automatically together with the input bank. The pairing A/DA, B/DB holds whenever a program closes one output block per input block, as all the example programs do.

**Not built:**

- The optional second DSM per kernel, with the stream interconnect in crossbar mode.
- Any dedicated unit for the sigmoid or pooling of the neural network. Those would be programs on the existing units; they are not written.
- The CNN programs themselves.

## Simulation

Each block has a self-checking testbench in `tb/`. `tb/soma_asm_pkg.sv` is a small assembler (instruction encoders, `pcfg` for pattern configurations) with single-precision helpers. The testbenches compute the expected FP results with exact `real` arithmetic, rounded once per operation.

A typical run with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl -Itb \
  rtl/soma_pkg.sv tb/soma_asm_pkg.sv tb/tb_soma_top.sv --top-module tb_soma_top
./obj_dir/Vtb_soma_top
```

Every testbench ends with `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it runs |
|---|---|
| `tb_soma_top` | Full default configuration, about 15 s; all six kernels run, chained through the shared memory like the layers of a small network. Kernel 0 runs a 3-tap integer convolution (64 outputs) with the broadcast windows of the image-convolution scheme. Kernel 1 max-pools it by pairs. Kernel 3 adds a second map. Kernel 4 max-pools again. Kernel 5 takes the dot product with a weight vector. Kernel 2 runs an FP inner product at the same time. Every intermediate map is checked, and it fails if any of these never happened: broadcasts, two-vector loads, store patterns, input and output bank swaps, end of stream, RIT stalls, write-back conflicts, empty-bank stalls, operations waiting in an issue FIFO, two kernels running together. |
| `tb_soma_conv2d` | 2D convolution with a 3x3 filter on a default kernel (18x16 image, 8 dispatchers). Each image column is broadcast as one block of D+K-1 elements. Each dispatcher keeps a 3x3 window in registers and produces one output row per strip, which the DSM stores with Store Patterns. |
| `tb_soma_conv5x5` | The same data flow with a 5x5 filter. The weights are cached in the local memory and read with `lwi` before each multiply. Five running sums per dispatcher replace the register window. |
| `tb_soma_dot_scaling` | FP inner product of 192 pairs on a default kernel with 2, 4 and 8 active dispatchers, using chunks of 8 pairs. Each total is bit-exact. Run time: 1532, 861 and 754 cycles. Beyond four dispatchers the DSM's loop overhead between patterns, and the serial final reduction, dominate. |
| `tb_soma_kernel` | FP inner product on one 8-dispatcher kernel (96 pairs, three rounds of 4-pair blocks), bit-exact against the reference order of operations. |
| `tb_soma_dispatcher` | Program with FU0, branches, calls, all shared units and streams. Model units with random delays, checks for RIT stalls and write-back conflicts. |
| `tb_soma_dsm` | Load patterns (stride, negative stride, two vectors, broadcast) and store patterns; checks one element per cycle. |
| other `tb_soma_*` | Random tests of the SRF, RIT, crossbar, units (with exact latency checks), local memory, instruction and shared memory, and stream interconnect. |

## Limits worth knowing

- The FP units flush denormals and round only to nearest even.
- Max pooling on floats would need an FP compare. FU0's `cmp` is an integer compare, which gives the right order only for values of the same sign.
- The local memory and the SRF banks start undefined. Programs must write before they read.
- The dispatcher discards any instruction fetched after `bri 0`. Restarting a kernel needs a new `start` pulse.
