# nHSE — a hardware preemptive scheduler for a multi-context MIPS32 pipeline

A software RTOS spends microseconds, and a variable number of them, on every
context switch: it saves registers, walks ready lists, restores registers.
The nMPRA processor removes that work by replicating the state of each task in
hardware. One MIPS32 pipeline carries N copies of the program counter, the
pipeline registers and the register file; each copy is a *semiprocessor*
(sCPUi) that runs exactly one task. Switching tasks is then only a matter of
choosing which copy the pipeline uses in the next clock.

This RTL is the unit that makes that choice: the hardware scheduler **nHSE**,
attached to the pipeline as MIPS coprocessor 2. Every clock it looks at the
events pending for each sCPU (timer, watchdog, two deadlines, interrupt, mutex,
message), applies a static or a dynamic priority rule and drives one
`en_pipe_sCPUi` enable per context. Interrupts are not a separate mechanism:
each interrupt line is *attached* to one sCPU and becomes one of its events, so
an interrupt runs at the priority of the task that handles it and cannot
disturb a task of higher priority. Monitoring counters record, per sCPU, how
many clocks it ran and how many it waited.

The processor datapath itself is not part of this RTL; the scheduler's
interface to it is brought out as ports (see *Connecting a datapath*).

## How a task waits and wakes

Each sCPU has

* seven **event enables** `lr_en` (one per event kind),
* seven **event latches** `lr_ev`,
* a **run flag** `lr_run`,
* a **stop bit** in `cr0MSTOP`.

An event pulse whose enable is set is caught in the latch on the next rising
clock and stays there until the task clears it by writing a 1 to that bit
(`G_EVACK`). The sCPU *has work* when it is not stopped and either its run
flag or any latch is set. A task that wants to block clears its run flag
(a task that has work only through events blocks as soon as it clears the last
one). When one of the enabled events arrives, it has work again.

After reset only sCPU0 has its run flag set. It is meant to configure the
others and then wait.

| bit | event | source in this RTL |
|---|---|---|
| 0 | T (timer) | per-sCPU periodic down-counter, period `mrTEV` |
| 1 | WD (watchdog) | per-sCPU periodic counter, restarted by rewriting its period |
| 2 | D1 (deadline 1) | per-sCPU one-shot counter, armed by a write |
| 3 | D2 (deadline 2) | second one-shot counter |
| 4 | Int | rising edge of an interrupt line attached to this sCPU |
| 5 | Mutex | a mutex this sCPU failed to take was released |
| 6 | Syn | a word was written into one of this sCPU's message registers |

## Choosing the sCPU

**Static mode** (default). Priority is the index: sCPU0 highest. Every cell
also sees the work flags of all cells with a lower index, and it is *ready*
only when none of them has work. So at most one `sCPUi_ready` line is high.

**Dynamic mode** (`G_SCHED` bit 0 = 1). A per-sCPU multiplexer replaces
`sCPUi_ready` with the output of the dynamic scheduler. Among sCPU1…N‑1 that
have work, that scheduler picks the one with the largest non-zero `mrPRI`.
A priority of 0 takes an sCPU out of the choice. Two equal non-zero priorities
are a configuration error with no defined result; this RTL gives the lower
index. **sCPU0 stays above everything in both modes**: its work flag blocks
every other line after the multiplexers.

**ID generator.** The vector after the multiplexers is one-hot or zero. It is
turned into a binary ID by the sum of products "line i is high and all other
lines are low", ORed over the lines whose index has bit b set. An all-zero
vector gives the *idle* flag, carried above the ID bits. `task_select` is
`{idle, id}` in a field at least 4 bits wide, so idle is bit 3 for up to eight
sCPUs.

**Decode.** With `enable` high and idle low, exactly `en_pipe[id]` is high;
otherwise all enables are low and the pipeline holds. `hse_en` is their OR.

### Timing

The selection logic is combinational from the event latches.

* A context switch takes effect right after the clock edge that latches the
  event. The selection is one clock behind the event pulse.
* A counter loaded with period P raises its pulse P clocks after the load, so
  its sCPU is selected P+1 clocks after the load.
* A message write or a mutex release gives the target its event pulse one
  clock after the write, so the target is selected two clocks after it.
* An interrupt edge passes a two-flop synchroniser and an edge detector. The
  attached sCPU is selected four clocks after the edge.

## Mutexes and messages

Both are global resources that every sCPU reaches through COP2. Only one sCPU
executes at a time and every access completes in one clock, so the accesses
are atomic without any further protocol.

* **Mutex** (`G_MUTEX`, 8 by default). A *read* is a test-and-set. It returns
  1 if the mutex was free, or already belonged to the caller. Otherwise it
  returns 0 and records the caller as a waiter. A *write* by the owner
  releases the mutex. Every waiter then gets a Mutex event, and retries its
  read when it runs. A write by a non-owner is ignored. The caller is the sCPU
  currently selected (`id`).
* **Messages** (`G_COMM`, 2 registers per sCPU by default). Register j of
  sCPUi is at index i·2+j. Writing one stores the word and sends the owner a
  Syn event. Reads have no side effect.

## Monitoring counters

Every clock, for every sCPU: `mrCntRun[i]` increments if `en_pipe[i]` is
high, otherwise `mrCntSleep[i]` increments. `mr0CntSleep` increments in
clocks where no enable is high. All are 32 bits and read over COP2. So for
each sCPU, run + sleep equals the number of clocks since reset.

## COP2 register map

The bus is `cop2_wr`/`cop2_rd`, a 12-bit address `{group[3:0], index[7:0]}`,
32-bit write data and combinational read data. Writes act on the rising clock.
An index past the end of a group is ignored and reads 0. `cr0MSTOP` has one
bit per sCPU, which limits N to 2…32. Names are in `rtl/nhse_pkg.sv`
(`cop2_address(group, index)` builds an address).

| group | name | index | write | read |
|---|---|---|---|---|
| 0 | `G_EN` | sCPU | event enables [6:0] | same |
| 1 | `G_RUN` | sCPU | run flag [0] | same |
| 2 | `G_TEV` | sCPU | timer period, restarts the timer (0 = off) | period |
| 3 | `G_PRI` | sCPU | dynamic priority `mrPRI` | same |
| 4 | `G_MSTOP` | – | `cr0MSTOP`; bit i stops sCPUi | same |
| 5 | `G_SCHED` | – | bit 0: 1 = dynamic scheduling; bit 1: 1 clears the error bit | bit 0: mode; bit 1: error bit |
| 6 | `G_WD` | sCPU | watchdog period; any write restarts it (kick) | period |
| 7 | `G_D1` | sCPU | arms deadline 1 after this many clocks | value |
| 8 | `G_D2` | sCPU | arms deadline 2 | value |
| 9 | `G_INTMAP` | line | sCPU the interrupt line is attached to | same |
| A | `G_EVACK` | sCPU | clear the latched events whose bits are 1 | latched events |
| B | `G_COMM` | register | message word, sends Syn to the owner | word |
| C | `G_MUTEX` | mutex | unlock | try to lock, returns 1 on success |
| D | `G_CNTRUN` | sCPU | – | `mrCntRun` |
| E | `G_CNTSLEEP` | sCPU | – | `mrCntSleep` |
| F | `G_SLEEP0` | – | – | `mr0CntSleep` |

The error bit (`G_SCHED` bit 1) flags an interrupt serviced while none is
active. It is set when software clears the Int event of an sCPU through
`G_EVACK` while that event is not latched. It stays set until software writes
1 to it. The source asks only for "a bit" for this case; the trigger and the
way it is cleared are this design's choice.

## Connecting a datapath

`nmpra_top` ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, active-low asynchronous reset |
| `enable` | in | global enable of the decode stage |
| `irq[NR_INT-1:0]` | in | asynchronous interrupt lines |
| `cop2_*` | in/out | coprocessor-2 register bus |
| `en_pipe[N-1:0]` | out | one-hot context enable (PC, pipeline registers and register file i) |
| `task_select` | out | `{idle, id}` |
| `hse_en` | out | some context is enabled |
| `dmem_we`, `dmem_addr`, `dmem_wdata` | in | data-memory stores of the datapath |
| `leds[15:0]` | out | LED register |

The datapath is expected to gate the replicated state of copy i with
`en_pipe[i]`, and to issue COP2 accesses on behalf of the running context.

The LED register belongs to the processor's I/O space. A store whose address
has bit 29 set (I/O) and bits [28:26] = `3'b100` writes the low 16 data bits
to the LEDs.

Parameters of `nmpra_top` (defaults): `N` = 4 sCPUs, `NR_INT` = 8 interrupt
lines, `NR_MUTEX` = 8, `NR_COMM` = 2 message registers per sCPU, `PRI_W` = 8
priority bits, `LED_W` = 16. Only N = 4 comes from the source design. The
others are this implementation's choices.

## Files

| file | block |
|---|---|
| `rtl/nhse_pkg.sv` | event kinds, COP2 groups, address helper |
| `rtl/nhse_countdown.sv` | timer / watchdog / deadline counter |
| `rtl/nhse_int_router.sv` | interrupt synchroniser, edge detect, attachment |
| `rtl/nhse_mutex.sv` | global mutexes |
| `rtl/nhse_msg.sv` | message registers |
| `rtl/nhse_ready_cell.sv` | event latches and ready chain of one sCPU |
| `rtl/nhse_dyn_sched.sv` | dynamic priority choice |
| `rtl/nhse_id_gen.sv` | static/dynamic multiplexers and ID encoder |
| `rtl/nhse_decode.sv` | ID to `en_pipe` |
| `rtl/nhse_monitor.sv` | run / sleep counters |
| `rtl/nhse_ctrl_regs.sv` | COP2 registers, strobes, read mux |
| `rtl/led_io.sv` | memory-mapped LEDs |
| `rtl/nmpra_top.sv` | everything above, wired together |

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<m>` and stops on a watchdog if it
hangs. `tb_nmpra_top` runs the whole scheduler at its default size through a
scripted task set. The script covers:

* timer, deadline and watchdog wake-ups, checked to the clock;
* an attached interrupt preempting a lower-priority task;
* a message, and a contended mutex with its wake-up;
* dynamic priorities, with sCPU0 still preempting;
* `cr0MSTOP` and `enable`;
* the LED store;
* the error bit for servicing an interrupt that is not active.

It then compares the monitoring counters with its own count of `en_pipe`, and
fails if any of these mechanisms did not happen.

Two more testbenches cover the configurations and the measurement run of the
source design:

* `tb_nmpra_sizes` builds the scheduler with 2, 8, 16 and 32 sCPUs side by
  side (through the helper `tb/nmpra_size_check.sv`). Each build checks the
  idle code, the static chain and the dynamic choice for random sets of
  runnable tasks, a timer wake-up, and the counter sums.
* `tb_nmpra_monitoring` replays the monitoring run with four sCPUs: sCPU2
  executes, then the enable drops while `task_select` still shows 2, then
  sCPU1 is scheduled. In every clock it checks which counters move and which
  hold.

Simulate one block with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/nhse_pkg.sv tb/tb_nmpra_top.sv --top-module tb_nmpra_top -o sim
./obj_dir/sim
```

## How closely this follows the source design, and what it leaves out

**Taken from the source design:**

* the block structure: events logic, control registers, static and dynamic
  scheduler, decode with enable, monitoring;
* the event set and the per-sCPU enable/latch arrangement;
* the unified priority space with interrupts attached to tasks;
* sCPU0 preempting in both modes;
* the sum-of-products form of the ID generator, with an idle term for the
  all-zero case;
* the 32-bit timer reload registers;
* the global mutex and message register arrays;
* the meaning of the three kinds of monitoring counter;
* the four-sCPU configuration;
* the LED address decode.

**This implementation's own choices**, because the source gives only names or
purposes:

* the COP2 bus and address map;
* the latch set/clear rule and the run flag;
* reading `cr0MSTOP` as one stop bit per sCPU;
* "largest non-zero priority wins" in dynamic mode, with ties to the lower
  index;
* the watchdog and deadline behaviour;
* the mutex waiter list and retry protocol;
* messages raising the Syn event;
* edge-triggered, synchronised interrupts;
* all sizes other than N;
* the reset state (only sCPU0 runs);
* what sets and clears the interrupt error bit.

**Not included:**

* The MIPS32 pipeline: hazard detection, forwarding, the replicated PC,
  pipeline registers and register files.
* Memories, clock generation (a 200 MHz to 33/66 MHz MMCM), LCD, switches and
  the UART bootloader. The source only names these.
* A set of global signal registers (`grSSR`), of which only the declaration
  is known.
* The `ex_idle_CPU` and separate registered ready/event outputs drawn on the
  ready cells, whose behaviour is not described.

The source evaluates its design on an FPGA (resource and power tables) and
with a waveform of the monitoring counters. The counter behaviour in that
waveform is reproduced here:

* while no context is enabled, every sleep counter and `mr0CntSleep`
  advance and every run counter holds;
* the selected context's run counter advances while its sleep counter holds.

The resource figures are properties of the complete FPGA system and are not
reproduced.
