# Mixed-criticality scratchpad subsystem with Lazy Load scheduling

Real-time tasks that run from shared DRAM next to other cores suffer from
unpredictable memory interference. This design removes the shared memory from
the real-time path. Each real-time core gets a private scratchpad (SPM) in the
programmable logic of an MPSoC. A DMA engine copies every job's code and data
into the SPM before the job runs and copies the results back afterwards. The
DMA shares DRAM among the cores in fixed TDMA time slots.

Each task therefore has three phases: **load** (DMA, DRAM to SPM), **compute**
(the core, from the SPM only) and **unload** (DMA, SPM to DRAM). Each SPM is
split into two halves, so the DMA can reload one half while the core computes
from the other.

The part that needs the most care is *when* to decide which task to load next.
The **Lazy Load** policy makes that decision as late as possible, so that a
high-priority job released in the meantime is not stuck behind a lower-priority
job that was loaded too early. This is built into `lazy_load_sched`, one
instance per core.

The RTL covers the programmable-logic side:

- the three SPMs with their port controllers;
- the colour-dropping address translators;
- the bus switches;
- the TDMA DMA engine;
- the Lazy Load schedulers.

The processors, the shared cache, DRAM and its controller, the hypervisor and
the RTOS are outside the design. They connect through the top-level ports.

## System structure (`mc_pl_top`)

```
                 HPM0 ──► addr_translator (8 MB window) ──► spm[0] 2 MB   port A
  high core ───┘
                 HPM1 ──► axi_demux ─┬─► addr_translator (2 MB) ──► spm[1] 512 KB port A
  mid cores ───┘          (by addr)  └─► addr_translator (2 MB) ──► spm[2] 512 KB port A

  lazy_load_sched[0..2] ──cmd/done──► tdma_dma ──► axi_demux ─┬─► spm[0] port B
        │                             (1 slot      (by addr)  ├─► spm[1] port B
        └── run_valid/run_task/run_part,  per core)           ├─► spm[2] port B
            cpu_done  ◄──► core                               └─► DRAM (dram_req/dram_resp)
```

- The **high-criticality core** has a bus port (HPM0) to itself.
- The **two mid-criticality cores** share one port (HPM1). A switch sends
  `0xA000_0000–0xA01F_FFFF` to mid SPM 0 and `0xA020_0000–0xA03F_FFFF` to mid
  SPM 1.
- **Every SPM is true dual-ported**, with an independent bus controller per
  port. The core (port A) and the DMA (port B) never wait for each other.
- **The DMA's address map** (`mc_pkg`):

  | Address | Target |
  |---|---|
  | `0x8000_0000` | high SPM, 2 MB |
  | `0x8020_0000` | mid SPM 0, 512 KB |
  | `0x8028_0000` | mid SPM 1, 512 KB |
  | anything else | DRAM |

- **The scheduler of core *c*** uses the two halves of SPM *c* as its
  partitions:
  - 1 MB each for the high core;
  - 256 KB each for a mid core.

  Partition *p* starts at `SPM_BASE + p * PART_BYTES` on the DMA side. The
  same offset is seen by the core through its translator.

All buses use the reduced AXI4 defined in `axi_pkg`:

- one request struct and one response struct per port;
- 32-bit addresses and 64-bit data;
- INCR bursts only, single ID, full-width beats.

## The Lazy Load scheduler (`lazy_load_sched`)

### Tasks and queues

Each core runs up to `N_TASKS` periodic or sporadic tasks under fixed-priority
**non-preemptive** scheduling. Task index 0 has the highest priority. For each
task the scheduler is given:

- its WCET `C` in cycles;
- the DRAM address and size of its image, which is loaded;
- the DRAM address and size of its results, which are unloaded.

Two bounds are common to the core:

- `L`, the worst-case time of a load phase;
- `U`, the worst-case time of an unload phase.

Both include TDMA waiting (see below).

A release pulse puts the task into the load queue, a bitmask of waiting jobs.
Each of the two partitions is in one of six states:

```
EMPTY ─load─► LOADING ─dma_done─► READY ─dispatch─► RUNNING ─cpu_done─► DONE ─unload─► UNLOADING ─dma_done─► EMPTY
```

The ready queue and the unload queue need no storage of their own. With only
two partitions, each holds at most one task: they are the READY and DONE
partitions.

### When the next load is chosen

With plain "eager" loading, the next job is picked as soon as a computation
starts. That fails in this case:

1. A low-priority job is running.
2. A mid-priority job is already being loaded into the other half.
3. A high-priority job is released.

The high-priority job now has to wait for both the low-priority and the
mid-priority job.

Lazy Load delays the choice until the last moment at which the next job can
still be ready when the current one ends in the worst case. The next load must
start no later than `C_run − L` after the computation start `s`. If the other
half still holds a finished job, its unload (length `U`) must go first. When a
computation starts at time `s`, the scheduler arms an alarm timer:

```
t_load = s + max(C_run − L, U)   if the other partition is DONE or UNLOADING
t_load = s + max(C_run − L, 0)   otherwise
```

When the alarm fires, the highest-priority job of the load queue at that
moment is loaded into the free half.

### Special cases

- **Early completion.** If the computation ends before the alarm, the alarm
  is disarmed and the load decision is made at once. There is no point in
  waiting once the core is idle.
- **Idle core.** If nothing is running, ready or loading, a released job is
  loaded immediately.
- **Alarm with an empty queue.** If the alarm has fired but no job was
  waiting, the next released job is loaded at once. The decision point has
  already passed.

### Unloads

A finished job's partition becomes DONE, and its unload is queued. The DMA
takes one phase per core at a time:

- if a load and an unload both wait, the load goes first;
- otherwise the unload starts as soon as the DMA is free.

In the normal flow the unload starts when the next computation starts.
Results are copied from the start of the partition to the task's result
address.

### Dispatch

When the core is idle and a partition is READY, the scheduler raises
`run_valid` with the task number and the partition. `cpu_busy` stays high
until the core answers with `cpu_done`.

### Event pulses

`ev_load`, `ev_unload`, `ev_alarm`, `ev_early`, `ev_idle_load` and
`ev_overflow` report each decision. An overflow is a release that arrives
while the same task's previous job is still waiting to be loaded. The two
releases are merged; deadlines equal to periods rule this out.

### What the policy buys

A job can be blocked by at most one lower-priority job. Eager loading allows
two. The testbench checks every observed response time against this bound:

```
Ĉ_i  = max(C_i, L + U)                      (one "slot" of the three-phase pipeline)
B_i  = max Ĉ_j over lower priorities        (L + U for the lowest priority)
s_ik = L + B_i + Σ_{j higher} ⌈(s_ik − L)/T_j⌉ Ĉ_j + (k−1) Ĉ_i     (fixed point)
R_ik = s_ik + Ĉ_i + U − (k−1) T_i
```

The `k`-th job of the level-*i* busy period starts at the latest at `s_ik` and
finishes by `R_ik`. The busy period length is the fixed point of
`W_i = L + B_i + Σ_{j≤i} ⌈(W_i − L)/T_j⌉ Ĉ_j`.

## The TDMA DMA engine (`tdma_dma`)

One bus master is shared by the three schedulers.

**Slots.** Time is divided into rounds of one slot per core.

- Slot `j` lasts `SLOT_CYCLES[j]` cycles and only core `j`'s phase may move
  in it.
- The first `OVH_CYCLES` of a used slot are idle. They model the cost of
  programming the DMA for each piece.
- At most `CHUNK_BYTES[j]` bytes move per slot. A longer phase is cut into
  chunks and continues in later rounds, so slots stay short while phases can
  be large.
- A phase that arrives after its slot has begun waits for the next round.

A phase needing `k` slots therefore finishes within `k·T + SLOT_CYCLES[j]`
cycles, where `T` is the round length. Use that figure for `L` and `U`.

**Defaults.** The defaults are three cores and 32 KB per slot. Slots are
42.7 µs (38.81 µs of transfer plus 3.89 µs of programming overhead), which is
12810 and 1167 cycles at an assumed 300 MHz clock. At these values:

- the round is 128.1 µs;
- a full 256 KB mid-SPM partition (load plus unload) takes 16 slots, about
  2.1 ms.

**Data path.** Each burst reads up to `BURST_BEATS` (16) beats into an
internal buffer and then writes them to the destination. Bursts never cross a
4 KB boundary. Addresses and lengths must be multiples of 8 bytes.

**Overruns.** The memory may be too slow to finish a chunk inside the slot.
The slot is then stretched and `overrun` pulses, so size `CHUNK_BYTES` for
the real memory. Each chunk costs about `256 × (32 + read latency)` cycles per
32 KB. With the defaults, a DRAM read latency above roughly 10 cycles per
burst stretches slots.

## The colour-dropping translator (`addr_translator`)

The shared last-level cache is split between cores by page colouring. Each
core only uses pages whose address bits 14–15 (the colour) hold its own value.
Applied to the SPMs, colouring would leave only a quarter of each SPM usable.

To avoid that, the core addresses a window four times larger than its SPM:

- 8 MB for the 2 MB SPM;
- 2 MB for each 512 KB SPM.

The translator removes bits 14 and 15:

```
spm_offset = { offset[N-1:16], offset[13:0] }
```

For example, core address `0xA0023456` (offset `0x023456`) reaches SPM offset
`0x0B456`.

Only AW and AR addresses are changed, and the block is combinational. It adds
no latency and keeps full burst bandwidth. Bursts never cross a 4 KB page, so
they never cross a colour either; an assertion checks this. The translator
does not check which colour a core owns.

## Scratchpads (`spm`, `spm_axi_ctrl`, `spm_dpram`)

`spm_dpram` is a dual-port RAM:

- byte write enables;
- one cycle of read latency;
- a read register that holds its value while its port is not enabled.

`spm_axi_ctrl` turns bursts into word accesses at one beat per clock. The
first read beat comes one cycle after the address is accepted. The controller
runs one transaction at a time, alternating read and write priority.

Simultaneous writes to the same word from both ports are undefined. The
scheduler keeps the core and the DMA in different halves.

## Where this design departs from the reference system

- **Scheduler and DMA control in hardware.** In the reference system, the
  Lazy Load scheduler is RTOS code driven by a timer interrupt, and a
  dedicated real-time processor programs the DMA slot by slot. Here both are
  state machines. Their observable timing (alarm at `C − L`, slot, chunk and
  overhead) follows the reference; the cycle-level details are this design's
  choice.
- **Unload timing.** The reference gives two descriptions: "at the next
  computation start" and "as soon as the DMA becomes available". This design
  does the second, which gives the first in the normal flow. A pending load is
  served first.
- **Where the DMA sits.** In the reference platform the DMA engine is on
  the processor side, and it reaches the SPMs through the low-performance
  PS-to-PL port. Here the engine is in the programmable logic. It reaches
  the SPMs' second ports through a switch inside the design, and reaches
  DRAM through the `dram_req`/`dram_resp` master port. On the device, that
  port would connect to a PL-to-PS port.
- **Clock and units.** The clock frequency is not given. All times are in
  cycles of an assumed 300 MHz clock.
- **Bus.** The bus is a reduced AXI4 with a single ID. The switches, port
  controllers and DMA are simple single-transaction designs, not the vendor
  interconnect and controllers of the reference platform.
- **Addresses.** The address map and the result-buffer layout are this
  design's choice.
- **Scope.** The low-criticality core, the cache, the DRAM controller, the
  PS–PL hard ports and all software are outside the RTL.
- **Platform size.** The platform has three real-time cores and eight tasks
  per core by default. Larger sets need `N_TASKS`. A fourth real-time core
  would need another SPM and slot in the top.

## How far the design has been exercised

- **Testing.** Every block has its own randomised testbench. The complete
  design runs three system-level tests at its default sizes (see
  Simulation).
- **Memory model.** All system-level tests use a DRAM model with 4 cycles of
  latency and no back-pressure. Random back-pressure is exercised at block
  level, in the DMA and switch testbenches. A real DRAM needs `CHUNK_BYTES`
  sized as described under Overruns.
- **Synthesis.** The design synthesises with Yosys into about 1800 logic
  cells plus the three SPM arrays. The arrays hold 3 MB, which is the whole
  block RAM budget of the target device class. No timing closure at 300 MHz
  has been attempted.
- **Scheduling guarantee.** The response-time bound is checked against
  simulation. The
  testbenches allow 2000 cycles per job on top of the bound. This covers the
  scheduler's reaction latency, which the analysis ignores.

## Parameters worth changing

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `mc_pl_top` | `N_TASKS` | 8 | tasks per core |
| `mc_pl_top`, `tdma_dma` | `SLOT_CYCLES[]` | 12810 | slot length per core, cycles |
| `mc_pl_top`, `tdma_dma` | `CHUNK_BYTES[]` | 32768 | bytes moved per slot |
| `mc_pl_top`, `tdma_dma` | `OVH_CYCLES` | 1167 | idle programming time per used slot |
| `tdma_dma` | `BURST_BEATS` | 16 | DMA burst length |
| `mc_pkg` | `SPM_HI_BYTES`, `SPM_MID_BYTES` | 2 MB, 512 KB | SPM sizes |
| `addr_translator` | `COLOR_LSB`, `COLOR_BITS` | 14, 2 | colour bits removed |

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>`, stops itself, and has a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/axi_pkg.sv rtl/mc_pkg.sv tb/tb_mc_pl_top.sv \
    --top-module tb_mc_pl_top -o sim && ./obj_dir/sim
```

The `-y` options let Verilator find each module in the file of the same name.
Pass `+verilator+rand+reset+2 +verilator+seed+<n>` to the binary to start
from a random initial state. Substitute any testbench name from the table.

| Testbench | What it checks |
|---|---|
| `tb_addr_translator` | random and example addresses against the bit-drop formula; other fields untouched |
| `tb_spm` | random bursts from both ports against a byte model; one beat per cycle; read latency |
| `tb_axi_demux` | routing (lowest matching window wins, catch-all last slave), one transaction per direction, back-pressure, for random transfers to three slaves |
| `tb_tdma_dma` | slot ownership, overhead window, per-slot chunk limit, `k·T+σ` completion bound and copied data, with short slots |
| `tb_lazy_load_sched` | alarm time, early-completion and idle loads, unload order and priority choice against a reference model, including the three-task example in which lazy loading avoids double blocking |
| `tb_mc_pl_top` | the whole design at default parameters, about 5.5 M cycles |
| `tb_mc_workloads` | the whole design at default parameters running the stereo-disparity case study (9.1 KB and 22 KB input images at 59 Hz and 14 Hz with the measured worst-case execution times) on the high core, and full 256 KB partition reloads on both mid cores: 8 slots per phase, phase times within `k·T + σ`, reload hidden behind a 2.1 ms computation, 256 KB round trip intact; about 58 M cycles |
| `tb_mc_synthetic` | the whole design at default parameters running random rate-monotonic sets of eight tasks per core (UUniFast utilisations, periods log-uniform in 10–100 ms, 32–160 KB load and unload phases) that the response-time analysis accepts; every observed response time is within its bound and deadline, results and unloaded images intact; about 32 M cycles |

`tb_mc_pl_top` runs three task sets with images from 2 KB to 40 KB through
loads, colour-translated computation and unloads. It checks:

- the results in DRAM;
- deadlines;
- the response-time bound above.

It also requires that each mechanism happens at least once: alarm-timed load,
early-completion load, idle load, priority choice, unload, a phase split over
slots, coloured accesses, and both cores on the shared port.

`tb/axi_mem_model.sv` is the behavioural DRAM used by the testbenches.
Unwritten bytes read as a function of their address.

Assertions in the RTL check several rules:

- bus handshakes are held until accepted;
- at most one partition computes at a time;
- the DMA gets one phase per core;
- bursts stay inside 4 KB.

Their `disable iff (!rst_n)` makes Verilator warn about a reset used both
synchronously and asynchronously. This is harmless.
