# Continuous-flow multithreading with memristor pipeline registers

A switch-on-event (SoE, also called block or coarse-grained) multithreaded
processor runs one thread until that thread hits a long-latency event, usually
a cache miss, and then switches to another thread. In a conventional SoE
pipeline the switch flushes every younger instruction of the old thread. The
pipeline then has to refill, so each switch costs roughly as many cycles as the
pipeline has stages.

Continuous-flow multithreading (CFMT) removes the flush. Every pipeline
register becomes a **multistate pipeline register (MPR)** that holds one
instruction state per thread. On a switch, each stage saves the old thread's
in-flight state into that thread's slot and reads the new thread's state back.
The new thread picks up exactly where it left off. The switch then costs only
the time to read an MPR slot, `T_M`, which is 1 to 3 cycles instead of a refill.
The slots are meant to be memristor cells (RRAM, STT-MRAM) stacked in the metal
layers above the CMOS register. They are dense enough to give each thread its
own layer at almost no area cost, and nonvolatile, so idle layers can be
powered down.

This repository holds synthesizable SystemVerilog for that pipeline and its
MPRs. Testbenches check it instruction by instruction, and also check its
throughput against the analytic CPI model of SoE machines.

## How a thread switch flows

```
           +-------+   MPR 0    MPR 1    MPR 2           MPR 3
 imem <--> | fetch |--[====]---[====]---[====]--> EX -->[====]--> retire
           +-------+   |        |        |     (outside)  |  ^
                       +--------+--------+----------------+  | background write
                     save / load / thread numbers (common)   | of a miss result
                             |                               |
                     cfmt_switch_ctrl <---- ready ---- cfmt_miss_handler <-> memory
```

Each `[====]` is one `mpr`: a CMOS register for the active thread plus one
memristor layer per thread. The sequence for a miss in execution at cycle `c`
is:

| cycle        | what happens |
|--------------|--------------|
| `c`          | The instruction in EX reports `ex_miss`. The pipeline still advances: younger instructions move one stage on, and a bubble enters the MPR after EX in place of the missing instruction. The miss handler marks the thread blocked. |
| `c+1`        | **Save**: every MPR copies its CMOS contents into the old thread's layer. The miss request leaves on `req_*`. If another thread is ready, the **load** of its layers starts in the same cycle. The copy-out hides behind the read-in. |
| `c+1 .. c+T_M` | The MPRs sense the new thread's layers. In the last of these cycles the sensed state is written into every CMOS register. |
| `c+T_M+1`    | The pipeline runs the new thread. Nothing was flushed, and no fetch was repeated. |

The thread switch stalls the pipeline for exactly `T_M` cycles. When the fill
for the blocked thread arrives (`fill_*`), the miss handler writes
`{valid, pc, loaded value}` into that thread's layer of the MPR **after**
execution. The thread is not running at that point, so this happens in the
background. The entry lands in the slot that held the bubble. When the thread
is switched back in, the completed instruction is the first one to retire, and
the thread carries on with its younger instructions, which were still sitting
in its layers.

If no thread is ready at the save, the pipeline idles with `idle_wait` high.
It loads the first thread that becomes ready, which may be the same thread
once its own miss completes. This is the "unsaturated" regime. Threads are
picked round-robin, starting after the thread that missed.

## Modules

| module | role |
|--------|------|
| `cfmt_pkg` | `XLEN = 32`, the stage state `stage_t = {valid, pc[31:0], data[31:0]}` (65 bits), `tid_w()` |
| `mpr` | one MPR, `WIDTH` bits wide × `N_THREADS` threads, read time `T_M` |
| `mpr_write_select` | inside `mpr`: decodes a thread number into a one-hot write enable for the layers |
| `memristor_layers` | inside `mpr`: one `WIDTH`-bit row per thread |
| `mpr_sense_read` | inside `mpr`: delivers the selected layer `T_M` cycles after `start` |
| `cfmt_switch_ctrl` | active thread, pipeline enable, common save/load controls for all MPRs |
| `cfmt_miss_handler` | per-thread outstanding miss, memory request, background write, `ready` |
| `cfmt_fetch` | one PC per thread, sequential fetch for the active thread |
| `cfmt_pipeline` | top: fetch, `N_STAGES` MPRs, external EX, one MPR, retire |

### The MPR (`mpr`)

Here are the ports and what they do:

- `en`/`d`/`q` behave as an ordinary pipeline register on the CMOS layer.
- `save` + `save_thread` copies the CMOS contents into a layer at the clock edge.
- `load` + `load_thread` starts a read. `load_done` marks the cycle in which the sensed state is written into the CMOS register. It is `T_M` cycles after `load`, counting the `load` cycle as the first, so with `T_M = 1` it is the `load` cycle itself. `q` shows the new state from the following cycle.
- `bg_we` + `bg_thread` + `bg_data` is a background write into an inactive thread's layer. There is one write port and a save has priority over it. `bg_ready` is low in a save cycle, and a background write offered then is ignored, so the requester must retry.

Assertions check two rules: `save_thread != load_thread` when both are given,
and `en` stays low while a load is in progress.

With `WIDTH = 1` the module is a single MPR cell, the one-bit unit of the
architecture. A pipeline stage is one instance whose `WIDTH` is the width of
the stage state. That is equivalent to `WIDTH` one-bit MPRs sharing their
control signals.

`layers_active` is high only in cycles with a save, a read or a background
write. The layers are enabled only then: in plain pipeline operation only the
CMOS register works, and the idle layers can be powered down because they keep
their contents. A disabled array takes no write and presents zeros.

The memristor storage is modelled digitally. Each layer is a row of a register
array, written at the clock edge, and sensing is a counter of `T_M` cycles.
Nonvolatility has no digital effect beyond the layers keeping their contents
while disabled. Reset clears every layer, so a thread that has never run reads as an
empty pipeline. A real nonvolatile array would need an explicit initial write
to get the same effect.

### Switch controller (`cfmt_switch_ctrl`)

The controller has four states:

- `RUN`: `advance` is high. An event in this state goes to `SAVE`.
- `SAVE`: lasts one cycle. `save` is high, and `load` is high as well if a thread is ready.
- `WAIT`: no thread is ready yet. This is also the state after reset.
- `LOAD`: covers the remaining `T_M - 1` cycles of the read.

A candidate thread must satisfy `thread_en & ready`. `thread_en[0]` need not
be set: after reset, the first enabled thread is loaded.

### Miss handler (`cfmt_miss_handler`)

The handler buffers one entry per thread: the PC at the miss and the fill data.
Completed entries are written one per cycle, lowest thread number first, and
held back while `bg_ready` is low. `ready[t]` goes low the cycle after the miss
and comes back the cycle after the background write. Assertions check that a
fill only answers an outstanding miss, and that a blocked thread does not miss.

## Top-level interface and timing (`cfmt_pipeline`)

Parameters and their defaults:

- `N_THREADS = 16`
- `T_M = 1`
- `N_STAGES = 3`: the number of MPRs between fetch and execution.

There is one more MPR after execution. All state is reset by a synchronous,
active-low `rst_n`.

These parts are not defined here and connect through ports:

- **Instruction memory**: `imem_thread`/`imem_pc` out, `imem_instr` back in the same cycle.
- **Execution unit**: `ex_valid`/`ex_thread`/`ex_pc`/`ex_instr` out. `ex_result` and `ex_miss` come back in the same cycle. An instruction counts as executed in a cycle with `advance` high. `ex_miss` marks a long-latency event, which is an L1 miss here.
- **Memory behind the L1**: `req_*` is a one-cycle request, raised the cycle after the miss. `fill_*` is the answer, at most one per cycle and at any later cycle.

`retire_*` shows each instruction as it leaves the last MPR. `active_thread`,
`advance`, `switch_save`, `switch_load` and `idle_wait` expose the switch
state. `mpr_active` is high in cycles where any memristor layer is enabled.

## Performance: what the tests measure

For an SoE machine, the analytic model gives the following:

- unsaturated, with `n` threads: `CPI = (CPI_ideal + P_m·r_m·MR) / n`
- saturated: `CPI = CPI_ideal + P_s·r_m·MR`

Here `P_m` is the miss penalty, `r_m` the fraction of memory instructions, `MR`
the miss rate and `P_s` the switch penalty. In CFMT, `P_s = T_M`.

`tb_cfmt_ipc_sweep` uses the reference operating point: `r_m = MR = 0.25`
(one miss per 16 instructions), `P_m = 200`, and a single-cycle pipeline
(`CPI_ideal = 1`). It builds the pipeline with 20 thread contexts and runs 1
to 20 threads for `T_M = 1` and `T_M = 3`. The measured IPC stays within 2 %
of the model away from the knee and slightly below it at the knee:

| threads | IPC, T_M = 1 | IPC, T_M = 3 | conventional, P_s = 20 (model) |
|---------|--------------|--------------|-------------------------------|
| 1       | 0.075        | 0.072        | 0.074 |
| 6       | 0.439        | 0.432        | 0.444 |
| 12      | 0.877        | 0.842        | 0.444 |
| 13–20   | 0.941        | 0.842        | 0.444 |

At saturation that is 2.1× the throughput of a flushing SoE pipeline with a
20-cycle penalty for `T_M = 1`, and 1.9× for `T_M = 3`. The conventional column
comes from the model only: the flushing baseline is not built. The default
build has 16 thread contexts. That is past the saturation point (about 13
threads at this operating point), so more contexts would not raise the
throughput here.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_cfmt_pipeline` runs the top with **default parameters**, through
  `tb/cfmt_env.sv`. That environment models the instruction memory, the
  execution unit (one miss per 16 instructions) and a memory with a 200-cycle
  miss penalty. It checks that every thread retires its instructions in order,
  exactly once, with the right results. It also checks that every switch to a
  ready thread stalls exactly `T_M` cycles, and that no memristor layer is
  enabled in a cycle where the pipeline simply advances. In the saturated
  phase the layers are enabled in about 12 % of cycles. The test has four
  phases:
  1. 1 thread, which exercises idle waits.
  2. 16 threads, saturated; IPC must be within 2 % of `16/17`.
  3. 3 threads, unsaturated.
  4. 16 threads with a jittered miss penalty, so that background writes collide with saves and are held.

  It fails if switches, waits, background writes or held writes never occur.
- `tb_cfmt_ipc_sweep` is the throughput sweep above.
- The unit testbenches use reference models: the MPR against a model of the
  CMOS register and the layers, the controller against round-robin and
  stall-length rules, and the miss handler against a per-thread status model.

To run one with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cfmt_pkg.sv tb/tb_cfmt_pipeline.sv --top-module tb_cfmt_pipeline
./obj_dir/Vtb_cfmt_pipeline
```

Every testbench finishes in well under a second.

## Where this design makes its own choices

The architecture fixes the following:

- MPRs replace the pipeline registers and are shared by all threads.
- The switch saves the old state and reads in the new one.
- The copy-out is hidden, so the penalty equals the read time.
- Results of long-latency instructions are written into the MPR in the background.
- The switch is triggered by an L1 miss.

This design adds the following choices of its own:

- **What flows in the pipeline.** No instruction set is defined. A stage holds `{valid, pc, word}`, and the stages between MPRs do no work: they carry the state unchanged. Fetch is sequential (`pc + 4`), with no branches. Execution, the instruction memory and the cache/memory are outside the top.
- **Depth.** There are three MPRs before execution and one after it. The architecture does not give a depth.
- **Where the background result goes.** It goes into the MPR after execution. The instruction that missed leaves a bubble there, which is later overwritten.
- **Save and load as two controls.** They are separate so that, with no ready thread, the old state can be saved at once and the new one loaded later.
- **Arbitration.** A save has priority over a background write on an MPR's single write port.
- **Thread choice.** It is round-robin. Other fairness policies would drop in at `cfmt_switch_ctrl`'s candidate search.
- **Reset.** Reset clears the memristor layers, and reset starts in the waiting state.
- **Sense timing.** The read-out goes into the CMOS register and appears one register later, rather than feeding the next stage directly. The read cycle counts as the first of the `T_M` stall cycles, which keeps the penalty at `T_M`.
- **Thread count.** `N_THREADS` defaults to 16. Some illustrations of the scheme draw 4 threads, and its throughput curves run to 20.

Not built:

- The memristor device and its analog write and sense circuits. Only their digital behaviour is modelled: store a row, read it after `T_M` cycles.
- The conventional flushing SoE pipeline, which is the baseline for comparison.
- A real execution unit, cache or memory.
