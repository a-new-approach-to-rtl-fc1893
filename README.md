# Deadline Enforcement Checker for a TDMA-shared multicore bus

A critical task's worst-case execution time (WCET) is normally found by analysing
it alone on one core. Once other cores compete for the same memory bus, that
figure no longer holds. The usual fix is to stop every other core while the
critical task runs. This wastes the parallel hardware.

The Deadline Enforcement Checker (DEC) uses a cheaper rule. Let the other cores
keep sharing the bus, but only for as long as the critical task could still
finish alone in time. The DEC is told the task's WCET and its deadline. It sees
the task start, then counts down the slack `deadline - WCET - ΔT_completion`.
When the slack is used up, it switches the bus from **Shared mode** to
**Isolated mode**, where only the critical core is served. When the task's last
instruction completes, it switches back. The number of less-critical cores and
what they run do not enter the calculation.

This repository holds synthesizable SystemVerilog for the DEC and for the
system around it:

- a TDMA bus access controller that the DEC can switch;
- a simple shared system bus;
- a global memory.

The processor cores are not included. Their bus ports and the two pipeline
signals the DEC needs (Program Counter and Annul) are ports of the top level.

## Why the deadline holds

Time 0 is the cycle in which the critical core asks to fetch the task's first
instruction.

1. The DEC loads its counter with `ΔT = deadline - WCET - ΔT_completion`. It
   gives the critical core a fresh TDMA slice at once, so the core does not wait
   for the rotation to come round.
2. During Shared mode the counter drops by one in each cycle. By the time it
   reaches zero, about ΔT cycles have passed and the bus switches to Isolated
   mode.
3. A bus transfer that another core has already started is allowed to finish.
   `ΔT_completion` is the margin for that overrun: the cycles the cores need to
   close transfers in flight when the bus is taken from them.
4. From then on the critical core runs as if alone. Whatever work remains takes
   at most WCET, since WCET covers the whole task run alone.

The total is therefore at most ΔT + ΔT_completion + WCET, which is the deadline.

There is one refinement. A cycle in which the instruction leaving the critical
core's pipeline is **annulled** is not counted. An annulled instruction is a
squashed wrong-path or speculative one. Each such cycle in Shared mode lengthens
Shared mode by one cycle. This is how the DEC is specified: dropped instructions
are not charged to the task. It does mean that the bound above assumes the WCET
also covers those cycles. See *Where this design makes its own choices*.

If the deadline leaves no slack (`deadline <= WCET + ΔT_completion`), the budget
is 0 and the bus goes to Isolated mode three cycles after the request for the
first instruction. If the
task ends before the budget runs out, the bus never leaves Shared mode.

## System structure

```
  core 0 (critical) ─┐  core_req/core_rsp              ┌──────────────────┐
  core 1 ...        ─┼──────────────► system_bus ─────►│  global_memory   │
  core N-1          ─┘                   ▲             └──────────────────┘
        │  crit_pc, crit_annul           │ gnt_valid, gnt_idx
        │  core 0's request (observed)   │
        ▼                                │
  ┌───────────┐  policy, force_crit  ┌───────────────┐
  │    dec    │─────────────────────►│ tdma_bus_ctrl │◄── ack from memory
  └───────────┘                      └───────────────┘
```

| Module | Role |
|---|---|
| `mcsys_top` | Top level. Wires the DEC, bus controller, bus and memory; core ports, DEC configuration and status are ports. |
| `dec` | Deadline Enforcement Checker, built from the five blocks below. |
| `dec_cfg_mem` | "Tiny memory": boot-time configuration registers. Derives ΔT. |
| `ct_detector` | Critical-task start/stop detector on the critical core's instruction fetches. |
| `instr_completion` | Instruction completion indicator, driven by Program Counter and Annul. |
| `dec_counter` | Down-counter for ΔT. |
| `dec_ctrl_fsm` | Control FSM: Idle / Shared / Isolated. Drives the policy code. |
| `tdma_bus_ctrl` | TDMA arbiter with Shared and Isolated policies and an immediate critical slice. |
| `system_bus` | Request and response multiplexers between the cores and the memory. |
| `global_memory` | Word-wide RAM slave with a fixed wait count. |
| `dec_pkg` | Bus structs, policy codes, configuration map, FSM states. |

## The DEC in detail

### Configuration (`dec_cfg_mem`)

Software writes five 32-bit words through `cfg_we/cfg_addr/cfg_wdata` before the
critical task runs. `cfg_rdata` reads them back combinationally.

| `cfg_addr` | Word |
|---|---|
| 0 | byte address of the first instruction of the critical task |
| 1 | byte address of its last instruction |
| 2 | WCET in Isolated mode, clock cycles |
| 3 | deadline, clock cycles after the task starts |
| 4 | ΔT_completion, clock cycles (summed over the cores) |

Indices 5 to 7 read as 0 and ignore writes. ΔT is computed from words 2 to 4
and saturates at 0.

### Start and stop (`ct_detector`)

The detector watches core 0's bus request. A request counts as an instruction
fetch when `valid` and `fetch` are both set. It watches the request rather than
the grant, so the task is seen while the core is still waiting for its slice.

- A fetch of the first address while no task is active raises `ct_active` and
  gives a one-cycle `ct_start`.
- A fetch of the last address while a task is active lowers `ct_active` and
  gives `ct_stop`.

Both outputs are registered, one cycle after the request.

### Counting (`instr_completion`, `dec_counter`)

`exec` is simply `!annul`. It tells the counter whether this cycle counts.

`last_done` marks completion of the task: the instruction at the last address
leaves the pipeline without being annulled. A cycle that repeats the PC of an
instruction executed in the previous cycle is a pipeline stall, not a second
completion. Because of that, a stall on the last instruction gives one pulse.
An annulled copy of the last instruction followed by the real one also gives
exactly one pulse.

The counter stops at zero, and a load has priority over a decrement.

### Sequencing (`dec_ctrl_fsm`)

| State | Policy | Leaves on |
|---|---|---|
| `ST_IDLE` | `2'b01` Shared | `ct_start`: load ΔT, pulse `force_crit`, go to `ST_SHARED` |
| `ST_SHARED` | `2'b01` Shared | `last_done` → `ST_IDLE`; counter zero → `ST_ISOLATED` |
| `ST_ISOLATED` | `2'b00` Isolated | `last_done` → `ST_IDLE` |

Cycle by cycle: the first-address request is seen in cycle t. `ct_start` and
`force_crit` are high in t+1. `ST_SHARED` and a fresh slice for core 0 begin in
t+2. The state changes to `ST_ISOLATED` in the cycle after the one in which the
counter is seen at zero. It returns to `ST_IDLE` in the cycle after `last_done`.

## TDMA bus controller (`tdma_bus_ctrl`)

Time is cut into slices of `TTS` cycles, owned in turn by cores 0, 1, …,
`NCORES-1`.

- **Shared mode:** only the owner of the current slice may start a transfer. If
  the owner is not requesting, the bus stays idle (strict TDMA).
- **Isolated mode:** only core `CRIT` may start a transfer. The slice counter
  keeps rotating underneath, so Shared mode resumes in step.
- **`force_crit`:** restarts the slice counter, and the slice beginning in the
  next cycle belongs to `CRIT`.
- **No pre-emption:** a transfer that has started always runs to its `ack`, even
  across a slice boundary or a mode switch.

A transfer starts in the same cycle the eligible core requests (`gnt_valid` is
combinational). One transfer is outstanding at a time. Two concurrent
assertions check that only a requesting core is granted, and that in Isolated
mode only `CRIT` is.

## Bus and memory handshake

`bus_req_t` is `{valid, we, fetch, addr[31:0], wdata[31:0]}` and `bus_rsp_t` is
`{ack, rdata[31:0]}`. A master holds its request until it sees `ack` high for
one cycle. Read data are valid in that cycle. The `fetch` flag separates
instruction fetches from data accesses, the job HPROT[0] does on AHB.

`global_memory` waits `WAIT` cycles, then does the access and acks. With the
default `WAIT = 1`, a master that issues back-to-back requests gets one access
every 3 cycles. Memory contents are not reset.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NCORES` | 2 | cores on the bus (dual-core configuration) |
| `TTS` | 300 | TDMA slice, clock cycles |
| `CRIT` | 0 | index of the critical core |
| `CNT_W` | 32 | width of the DEC counter and time values |
| `MEM_WORDS` | 16384 | global memory size, 32-bit words (64 KiB) |
| `MEM_WAIT` | 1 | memory wait cycles |

The quad-core variant with 10,000-cycle slices is `NCORES=4, TTS=10000`.

## Where this design makes its own choices

The following points follow the published description of the DEC:

- the five internal DEC blocks;
- the Program Counter and Annul inputs;
- address-based detection of task start and end;
- the ΔT budget and the switch at zero;
- the return to Shared mode when the task completes;
- the policy codes `01` (Shared) and `00` (Isolated);
- the immediate slice for the critical core at task start;
- TDMA in Shared mode.

Everything else is this design's own choice:

- **Counting unit.** The description says the counter holds clock cycles and is
  decremented as it runs down. It also says the counter is decremented only
  for instructions that really execute. This design counts clock cycles and
  skips the cycles whose end-of-pipeline instruction is annulled.
- **Task completion.** The return to Shared mode waits for the last
  instruction to *complete*, not merely to be fetched. `ct_stop` is only a
  status output.
- **Configuration storage.** The design stores WCET, deadline and ΔT_completion
  and derives ΔT in hardware. It does not store ΔT directly. A dedicated
  configuration port replaces boot-time bus writes.
- **Bus protocol.** The bus is a one-outstanding-transfer request/ack
  multiplexer, not full AMBA AHB. The arbiter is non-pre-emptive and keeps
  rotating in Isolated mode.
- **Memory, widths and reset.** The memory size and wait count, all widths,
  and the asynchronous active-low reset are this design's choices.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it shows |
|---|---|
| `tb_dec_cfg_mem` | Register readback, unmapped addresses, ΔT arithmetic and saturation. |
| `tb_ct_detector` | Random fetch streams against a reference model. |
| `tb_instr_completion` | Random PC/annul streams, stalls, and an annulled last instruction. |
| `tb_dec_counter` | Random load and decrement against a reference model. |
| `tb_dec_ctrl_fsm` | Every transition; outputs checked against a reference model. |
| `tb_dec` | Whole DEC; the switch lands exactly after ΔT executed cycles, including zero budget, an early end and an annulled last instruction. |
| `tb_tdma_bus_ctrl` | 4 cores, critical core 1, random slave latency; rotation, forced slice, Isolated grants, transfers overrunning a slice. |
| `tb_system_bus` | Multiplexing and response routing. |
| `tb_global_memory` | Data and latency over the whole address range. |
| `tb_mcsys_top` | System end to end, 4 cores, `TTS=20`; details below. |
| `tb_mcsys_full` | System at default parameters, three critical tasks; details below. |
| `tb_quadcore_example` | 4 cores, `TTS=10000`, 1,000,000-instruction task; details below. |

**`tb_mcsys_top`** checks every mechanism in one run:

- the fresh slice at task start;
- the switch and the return to Shared mode;
- overrun at a slice end and at the switch, the latter within the
  ΔT_completion margin;
- annulled cycles that are not counted;
- a task that ends while still in Shared mode;
- less-critical cores held off, then resumed, with their memory data intact.

With the DEC, a task with a 1,400-cycle deadline ends at 1,210 cycles. Without
the switch it takes 3,856 cycles.

**`tb_mcsys_full`** runs three critical tasks: Hamming coder, NMEA coder and
bubble sort. Each is an instruction stream sized to the task's stand-alone run
time. WCETs are 14,769 / 16,964 / 35,762 cycles and deadlines 20,000 / 24,000 /
48,000 cycles. ΔT_completion is 12 cycles, and the transfer that overruns the
switch to Isolated mode stays within it.

| Task | Shared bus only (cycles) | With DEC (cycles) | Deadline (cycles) |
|---|---|---|---|
| Hamming coder | 23,453 (missed) | 14,406 | 20,000 |
| NMEA coder | 28,471 (missed) | 17,854 | 24,000 |
| Bubble sort | 68,310 (missed) | 40,161 | 48,000 |

**`tb_quadcore_example`** has a WCET of 360 slices and a deadline of 400. The
task starts at slice 100, switches at slice 139 after core 0 has had 10 Shared
slices, and ends at slice 429. Shared mode then resumes with core 1's slice,
because the rotation kept running during isolation.

Two behavioural models serve the testbenches and are not synthesizable:

- `crit_core_model` fetches a straight-line critical task, inserts annulled
  wrong-path instructions and drives PC/Annul;
- `bg_core_model` runs a continuous write/read memory test.

The critical tasks are modelled only by their length and fetch pattern. Real
programs on a real processor pipeline have not been simulated.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dec_pkg.sv tb/tb_mcsys_full.sv \
          --top-module tb_mcsys_full -Mdir obj && ./obj/Vtb_mcsys_full
```

Replace the testbench name to run any other test. Every run takes a few seconds.
`tb_quadcore_example` simulates about 4.3 million cycles. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/dec_pkg.sv rtl/<module>.sv`.

## Limits

- The cores, their caches and a real AHB implementation are outside this RTL.
  So is the way boot software would reach the configuration port.
- Only one critical core and one critical task at a time are supported. A second
  start while a task is active is ignored.
- If the last instruction of the task is never executed unannulled (for example
  the task is aborted), the DEC stays in its current mode until reset.
- The deadline bound assumes the WCET also covers the task's annulled cycles
  (see *Why the deadline holds*).
