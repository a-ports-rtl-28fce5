# A-Ports: decoupled cycle-accurate performance models on an FPGA

A performance model simulates a target machine cycle by cycle on an FPGA.
It does not reproduce the target's circuit. One *model cycle* of the target
may take several *FPGA cycles*, because a big multi-ported structure is folded
onto a small FPGA block RAM and used serially. The ratio is the FMR
(FPGA-cycles to model-cycles ratio).

When a model is split into modules that each need a different number of FPGA
cycles per model cycle, something has to keep them consistent in model time.
The obvious answer is a global barrier: every module waits for the slowest one
in every model cycle. That wastes the fast modules' time, and the barrier's
global wiring gets slower as modules are added.

**A-Ports** drop the barrier. Every connection between two modules is a small
FIFO that carries one element per model cycle. Each module decides on its own,
from its local FIFOs only, when it may simulate its next model cycle. Modules
can then drift ("slip") apart in model time by a bounded amount, and the
result is still exactly cycle-accurate.

This repository contains:

* the A-Port channel (`a_port`);
* the per-module start/finish controller (`aport_ctrl`), with run, resync and
  step modes;
* a 2-read/2-write register-file model folded onto one 1-read/1-write block RAM
  (`regfile_perf_model`);
* a complete 5-stage in-order MIPS-subset pipeline model built from five
  A-Port-connected modules (`inorder_model`).

`aports_top` places the register-file model and the pipeline model side by
side.

## 1. The A-Port channel (`rtl/a_port.sv`)

An A-Port has three fixed properties:

* latency `L` in model cycles;
* bandwidth `B` in messages per model cycle;
* `K` extra slots of buffering.

It is a FIFO of depth `L+K`. Each element holds `B` lanes, and each lane is a
message of `W` bits plus a **valid** bit. Valid = 1 means *Message* and
valid = 0 means *NoMessage*.

**Every model cycle, the producer writes exactly one element and the consumer
reads exactly one element.** A cycle with nothing to say still sends a
NoMessage. Because of this, the number of elements in the FIFO tells the two
sides' relative model time, and no timestamps are needed:

| elements | flag     | meaning                                                        |
|----------|----------|----------------------------------------------------------------|
| `== L`   | balanced | producer and consumer are on the same model cycle             |
| `> L`    | heavy    | producer is ahead of the consumer                              |
| `< L`    | light    | consumer is ahead of the producer                              |
| `== 0`   | empty    | consumer must wait (it is `L` cycles ahead)                    |
| `== L+K` | full     | producer must wait (it is `K` cycles ahead)                    |

Reset loads `L` NoMessage elements (`L·B` NoMessage lanes). So a message
written in model cycle *n* is read by the consumer in model cycle *n+L*. This
is exactly a latency-`L` pipeline register in the target.

`K` must be at least 1, which is checked at elaboration. With `K = 0` a
latency-`L` port would be full in its reset state: the producer could not
write before the consumer read, and the consumer could not finish its model
cycle before reading. Larger `K` lets a fast producer run further ahead.

Latency 0 is allowed. The consumer then waits until the producer's element of
the same model cycle arrives.

* Storage is a register array with read and write pointers and an element
  counter. The flags are decoded from the counter.
* `recv_data` is the head element, shown combinationally.
* `send_en` and `recv_en` take effect on the clock edge, and both may happen in
  the same cycle.
* Overflow and underflow are checked by assertions.

## 2. When a module may advance (`rtl/aport_ctrl.sv`)

Every model module follows the same protocol:

1. **ready**: every input A-Port is non-empty;
2. **read**: dequeue one element from every input (`start`);
3. **simulate**: use as many FPGA cycles as the module needs (`done`);
4. **write**: enqueue one element on every output once none is full
   (`write`).

Read, simulate and write may all fall in the same FPGA cycle. A module that
finishes in one FPGA cycle, like the write-back stage, then advances one model
cycle per FPGA cycle.

`aport_ctrl` implements this protocol for `N_IN` inputs and `N_OUT` outputs.
It has two states: *ready* and *simulating*. The `mode` input selects when a
model cycle may begin:

* **RUN**: all inputs are non-empty. This is decoupled, full-speed simulation.
* **RESYNC**: all inputs are non-empty **and** (some input is heavy **or**
  some output is light). A module that is ahead of all its neighbours stops,
  and the modules behind it catch up. In a connected graph of modules this
  always ends in a state where every port is *balanced* and every module is
  idle. Every module is then on the same model cycle, so the model state can be
  read out consistently. The pipeline model brings this state out as
  `quiesced`.
* **STEP**: a pulse on `step` allows exactly one more model cycle in every
  module. The pulse is latched per module, so a module that is waiting for
  input still takes its one cycle when the input arrives. Use it after a
  resync, to single-step a balanced model.

The controller does not gate the step pulse on the model being quiesced; that
is up to whoever drives `mode`. The testbench `tb_aport_ctrl` reproduces the
classic two-module example:

* Module A needs 3,1,3,1 FPGA cycles for four model cycles, and module B the
  same.
* The two modules are joined by a port with `L = 0`, `K = 2`.
* With A-Ports the four cycles complete in 11 FPGA cycles, against 13 with a
  global barrier.

## 3. Folding a 2R/2W register file onto a 1R/1W RAM (`rtl/regfile_perf_model.sv`)

The target has a register file with two read ports and two write ports. The
model stores the registers in one 1-read/1-write block RAM (`bram_1r1w`) and
simulates one target cycle in four FPGA cycles:

| FPGA cycle | action                                                          |
|------------|-----------------------------------------------------------------|
| phase 0    | sample all model inputs, issue read 1                           |
| phase 1    | issue read 2, capture value 1                                   |
| phase 2    | capture value 2, perform write 1                                |
| phase 3    | perform write 2; publish `rd_val1/2`, increment `cur_cc`, pulse `cc_done` |

* Reads return the values from *before* the same model cycle's writes, like a
  register file with reads early in the target cycle.
* The target never writes one register through both ports in the same
  cycle. If it happens anyway, write 2 wins.
* `cur_cc` counts completed model cycles, so its value is the FPGA cycle
  count divided by 4.

## 4. The 5-stage in-order pipeline model

### Target

The target is a classic five-stage pipeline (fetch, decode, execute, memory,
write-back):

* a BHT/BTB branch predictor, updated when a branch resolves in execute;
* a scoreboard that stalls dependent instructions;
* one-cycle "magic" instruction and data memories with no caches.

The instruction set is a MIPS subset:

* ALU: ADDU, ADDIU, SUBU, AND, ANDI, OR, ORI, XOR, XORI, NOR, SLT, SLTI,
  SLTU, SLTIU, SLL, SRL, SRA, LUI;
* memory: LW, SW;
* control: BEQ, BNE, J, JAL, JR;
* BREAK, which ends the program and raises `halted`.

There are **no branch delay slots**. Memories are word-addressed.

### Model structure (`rtl/inorder_model.sv`)

Five modules are joined by six A-Ports, all with latency 1 and `K` extra
slots (default 1, the minimum):

```
          inst            decinst          execres           result
  FET ───────────▶ DEC ───────────▶ EXE ───────────▶ MEM ───────────▶ WB
   ▲                ▲                │                                 │
   └──── resteer ───┼────────────────┘                                 │
                    └──────────────────────── wbinfo ─────────────────┘
```

Every large structure is a block RAM:

* the instruction memory, BHT and BTB (FET);
* the register file (DEC);
* the data memory (MEM).

Each module therefore runs a short schedule of FPGA cycles per model cycle:

| module | FPGA cycles per model cycle | work                                         |
|--------|-----------------------------|----------------------------------------------|
| FET    | 3                           | apply predictor update/redirect, read IMEM+BHT+BTB, predict |
| DEC    | 2 to 5                      | apply write-back, scoreboard check, two serial register reads |
| EXE    | 2                           | ALU, branch resolution, redirect             |
| MEM    | 2                           | data-memory access                           |
| WB     | 1                           | retire, send register update to DEC          |

Each module has its own `aport_ctrl`. So each module keeps its own schedule,
and the modules slip against one another within the limits the port depths
allow. On the test programs the whole model reaches about 3.8–4.1 FPGA cycles
per retired model cycle.

Raising `K` on every port changes nothing in the simulated behaviour: the same
programs retire in the same model cycle. It also gains almost nothing in
speed (about 0.1%), because the five modules' schedules are close to each
other, so a module seldom has to wait for buffer space.

### Keeping model time exact while the pipeline stalls and flushes

A-Ports demand one element per port per model cycle. So pipeline control is
expressed as message content, never as back-pressure. Back-pressure would
change model time.

* **Branch prediction and redirect.**
  * FET predicts the next pc from a 2-bit-counter BHT and a direct-mapped BTB.
  * EXE computes the real next pc. On a mismatch, EXE sends a redirect on the
    `resteer` port, together with the predictor update.
  * FET applies the update and redirect in the model cycle in which it reads
    them. That is one model cycle after EXE resolved the branch, which is the
    port's latency.
* **Epochs.**
  * Every fetched instruction carries an epoch bit, and FET flips the bit on
    every redirect.
  * EXE keeps the current epoch and drops any instruction from an old epoch.
  * A dropped instruction that had reserved a destination register is sent
    on as a *kill*. WB turns the kill into a release-only `wbinfo` message, and
    DEC clears the scoreboard bit.
* **Scoreboard stall as a replay.**
  * DEC cannot hold an instruction back without breaking the port protocol.
    A dependent instruction (a source or destination register still marked
    busy) is instead sent to EXE as a `REPLAY` message.
  * EXE answers a replay with a redirect to that instruction's own pc.
  * Until the refetched instruction arrives, DEC drops the instructions of the
    same epoch that follow.
  * The observable effect equals a stall followed by refetch. Its exact
    penalty in model cycles is this design's choice; the stall is not modelled
    as an in-place hold.
* **Write-back before read.** DEC applies the `wbinfo` message of a model
  cycle before reading registers in the same model cycle. An instruction
  therefore sees a value written back in the same target cycle.

### Observation and control

* `imem_*` loads the instruction memory. Use it while the model is in reset.
* `dmem_*` reads and writes the data memory. Use it while the model is stopped
  or quiesced; it overrides the MEM stage's accesses.
* `halted` and `instret` show the end of the program and the retired
  instructions.
* `cycle_done[4:0]` pulses once per model cycle of each module, in the order
  `{WB, MEM, EXE, DEC, FET}`.
* `quiesced` is high when all six ports are balanced and all five modules are
  idle.
* `port_heavy`, `port_light` and `port_full` carry the per-port flags, in the
  order `{wbinfo, resteer, result, execres, decinst, inst}`.
* `ev_replay`, `ev_mispredict` and `ev_squash` pulse on scoreboard replays,
  redirects and dropped wrong-path instructions.

The usual run is:

1. Hold reset, load the memories, and release reset with `mode = RUN`.
2. Wait for `halted`.
3. Switch to `RESYNC` and wait for `quiesced`.
4. Optionally switch to `STEP` and pulse `step`.
5. Read the results through `dmem_*`.

## 5. Top level (`rtl/aports_top.sv`)

The top instantiates the pipeline model (ports prefixed `ip_`) and the
register-file model (ports prefixed `rf_`) with their defaults:

* 1024-word instruction and data memories;
* a 256-entry BHT and a 64-entry BTB;
* `K = 1`;
* 32 registers of 32 bits.

The two models share only the clock and the reset.

## 6. Simulating

All files are plain SystemVerilog. Put the package first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/aports_pkg.sv tb/tb_asm_pkg.sv $(ls rtl/*.sv | grep -v aports_pkg) \
    tb/tb_aports_top.sv --top-module tb_aports_top -o sim
./obj_dir/sim
```

`-Wno-fatal` keeps the lint warnings listed at the end from stopping the
build. Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_a_port`             | random traffic against a reference queue for several `L/K/B`; reset contents; all flags |
| `tb_aport_ctrl`         | the 3,1,3,1 example (11 FPGA cycles); resync and step conditions |
| `tb_bram_1r1w`          | random reads/writes, read-first collisions |
| `tb_regfile_perf_model` | random 2R/2W traffic against a reference, 4 FPGA cycles per model cycle |
| `tb_ip_fet/dec/exe/mem/wb` | each pipeline module alone against directed and random messages |
| `tb_inorder_model`      | six programs: prefix sums, vector add, shift-add multiply, median filter, recursive Towers of Hanoi, recursive quick sort; results, exact retired counts, slip bounds, resync, step |
| `tb_inorder_buffering`  | two copies with `K = 1` and `K = 4` on the same programs: identical results and model-cycle counts, FPGA cycles compared (no gain for this pipeline) |
| `tb_aports_top`         | both models at full default size, every mechanism counted |

`tb/tb_asm_pkg.sv` is a small assembler: it has instruction encoders and
generators for the test programs.

## 7. How far to trust it, and where it departs

These parts come from the published description:

* the A-Port semantics: reset contents, the `l+1` buffering rule, the
  balanced/heavy/light definitions and the slip bounds;
* the module protocol, the resync rule and the step mode;
* the 4-cycle register-file folding;
* the five-module graph with six latency-1 ports and the names of the
  structures in each module.

These are this design's own choices:

* the MIPS subset and the lack of delay slots;
* the predictor type and sizes;
* the epoch and kill mechanism for wrong-path instructions;
* the replay form of the scoreboard stall;
* every FPGA-cycle schedule inside the modules, and so the FMR numbers;
* memory sizes, the synchronous active-low reset, and the host ports.

Expect these differences from the published model:

* **FMR differs.** The published 5-stage model reported an FMR of 6.9 on its
  FPGA; this one reaches about 4 in simulation. The module schedules are not
  the published ones.
* **No barrier-synchronized version.** The published work compared A-Ports
  against a global-barrier version of each model. Only the A-Ports version is
  here.
* **The out-of-order model is not included.** It is a 4-wide, R10K-like core
  with a ROB, freelist, issue queues, one shared pipelined ALU and serial
  CAM searches. Its structure sizes and policies are not specified well
  enough to build it faithfully. The building blocks it needs, including
  multi-lane ports (`B > 1`) and larger `K`, are here.
* **No result-recording path.** There is no off-chip link for streaming
  results out. Results are read through the host memory port after a resync.
* **No compiled benchmarks.** The programs run are small hand-assembled
  versions of the usual kernels: median, multiply, quick sort, towers and
  vector add. They are not compiled C benchmarks. Typical sizes are 20
  elements or 5 discs, and each finishes in a few thousand FPGA cycles. The
  1024-word memories hold much larger inputs.

## 8. Lint notes

Verilator's lint reports these warnings:

* unused outputs that are left open on purpose: the port element counts, the
  fetch `redirected` flag and the DEC scoreboard vector;
* unused bits of message structs that a given module does not need;
* unused package constants.

None of them affects behaviour.
