# Barrier synchronization hardware for a low-power multi-core body sensor node

Bio-signal applications on a wearable sensor node (ECG filtering, delineation,
heartbeat classification) split naturally into phases: several leads are
conditioned in parallel, the results are combined, and the combined stream is
analysed. Running those phases on several slow cores instead of one fast core
lets the supply voltage drop, but only pays off if the cores waste no energy
while they wait for each other, and if cores running the same code stay in
lock-step so that one instruction fetch serves them all.

This RTL implements the hardware side of a light-weight way of doing that.
Cores execute four extra instructions, `SNOP`, `SINC`, `SDEC` and `SLEEP`.
The first three update *synchronization points*, ordinary words in shared data
memory that hold one flag per core and a small up/down counter. A
*synchronizer* unit performs these updates, merges simultaneous updates of the
same point into one memory access, and clock-gates cores that wait. It wakes
them when a point's counter returns to zero or when a data-ready interrupt they
subscribed to arrives. Around it sits the memory system such a platform needs:
banked instruction and data memories, crossbars that merge identical reads into
one access (*broadcast*), and a per-core address translation unit that gives
each core a private part of the data memory.

The processing cores themselves are not part of this RTL: each core's fetch,
data and synchronization ports are ports of the top module.

## Platform

```
            core 0 .. core 7 (not included; ports of wbsn_mc_top)
   fetch |             data |                     sync instr |   ^ gated clock
         v                  v                                v   |
  +--------------+   +------------+  reg window    +----------------------+
  | IM crossbar  |   | ATU x 8    |--------------->|     synchronizer     |<-- ADC data-ready
  | (broadcast)  |   +------------+  (addr 0..15)  |  points, sleep/wake, |    interrupts
  +--------------+         |                       |  subscriptions, cfg  |
   | | ... 8 banks   +--------------+  master 8    +----------------------+
   v v               | DM crossbar  |<--------------------+  |
  IM 8 x 4K x 24     | (broadcast)  |                        v
  (+ loader port)    +--------------+                 clock_gate x 8
                       | | ... 16 banks
                       v v
                     DM 16 x 2K x 16
```

| Parameter of `wbsn_mc_top` | Default | Meaning |
|---|---|---|
| `N_CORES`  | 8      | cores |
| `IM_WORDS`, `IM_W`, `IM_BANKS` | 32768, 24, 8 | instruction memory: 96 KB in 8 banks of 4096 words |
| `DM_WORDS`, `DW`, `DM_BANKS`  | 32768, 16, 16 | data memory: 64 KB in 16 banks of 2048 words |
| `N_IRQ`    | 3      | ADC channels / data-ready interrupt lines |
| `LIT_W`    | 8      | width of the synchronization-point number in an instruction |

The sizes are those of the platform this design is built for. `LIT_W` and
everything in the register window are choices of this implementation.

## Synchronization points

A point is one 16-bit data-memory word at `SYNC_BASE + n`:

```
 15                8 7                 0
+-------------------+-------------------+
| flag of core 7..0 |  counter (8 bit)  |
+-------------------+-------------------+
```

| Instruction | Effect on point `n` |
|---|---|
| `SNOP(n)`  | set the issuing core's flag |
| `SINC(n)`  | set the issuing core's flag, counter + 1 |
| `SDEC(n)`  | counter - 1 (flags unchanged) |
| `SLEEP`    | no point; stop the issuing core's clock until a wake event |

When an update that contains at least one `SDEC` leaves the counter at zero,
every core whose flag is set gets a *wake event* and all flags are cleared. A
subscribed interrupt line that rises also gives a wake event.

**Wake events are remembered.** A wake event stays pending until the core
executes `SLEEP`, which then completes at once. A core can therefore never miss
a wake that arrives between registering and sleeping. The price is that a core
which registered but never sleeps, typically a producer, keeps a stale event.
Two actions discard stale events: registering in a point again (`SNOP`/`SINC`),
and writing the interrupt subscription register. Software follows these rules:

* **Waiting for data from other cores (consumer).** `SNOP(n)`, then `SLEEP`.
  The producers execute `SINC(n)` when they start a block of work and `SDEC(n)`
  when its result is in memory. When the last `SDEC` brings the counter to
  zero, the consumer's `SLEEP` ends.
* **Re-aligning cores after a data-dependent branch.** All cores execute
  `SINC(n)` before the branch, which normally happens in the same cycle and so
  becomes a single update. Each core executes `SDEC(n)` and then `SLEEP` at the
  end of the branch. The last `SDEC` wakes all of them. The sleeping cores and
  the last core leave their `SLEEP` on the same clock edge, and from then on
  they fetch in lock-step again.
* **Waiting for an ADC sample.** Write the subscription mask (`REG_SUB`), then
  `SLEEP`. Writing the mask right before sleeping both arms the wait and drops
  any stale event.
* **Points are not cleared by hardware at start-up.** Software writes zero to
  the points it uses before using them.

The counter is 8 bits wide and wraps. Software keeps `SINC`/`SDEC` balanced.

## Synchronizer operation and timing

*Handshake with a core.* A core presents `sync_valid`, `sync_op` and `sync_lit`
and holds them until `sync_ready` is high on a clock edge on which its clock
runs. While it waits, `core_clk_en` is low, so the core simply does not see
clock edges. The same enable also falls when one of the core's memory requests
loses arbitration (`mem_stall`). Clock gating therefore both pauses sleeping
cores and resolves bank conflicts:

```
core_clk_en[i] = !(sync_valid[i] && !sync_ready[i]) && !mem_stall[i]
```

*Merging.* When the unit is idle it takes the lowest-numbered waiting core and
merges every other waiting core that names the same point into the same update.
It then reads the point through its own master port on the data crossbar, ORs
in the flags, adds `#SINC - #SDEC` to the counter and writes the word back.
Waiting cores that name other points are served one point after another.

*Latency.* Without conflicts a point instruction completes 4 cycles after it is
issued: read grant, read data, write grant and release in the same cycle. A
waiting `SLEEP` completes one cycle after its wake event is registered. An
instruction naming a point at or beyond `REG_SYNC_COUNT` completes in its
first cycle and changes nothing.

*Interrupts.* Lines are sampled on the clock and act on their rising edge. A
rising line that a core subscribed to gives that core a wake event and a
one-cycle `core_irq` pulse, and it is recorded in the core's `REG_IRQ_STATUS`.
The subscription stays set until it is rewritten.

## Memory system

*Crossbars* (`log_xbar`). Every master reaches every bank in one cycle. The
grant comes back combinationally, in the cycle of the request, and read data
arrives one cycle after the grant. Each bank has its own round-robin arbiter.
All masters that read exactly the word being read from a bank in that cycle are
granted together and get the same data, so the bank is read once; writes are
never merged. `bcast[b]` marks a bank that served several masters.
A master that is not granted keeps its request; in the platform its clock is
gated meanwhile. The instruction crossbar maps banks contiguously (bank = top
address bits), so each program phase can be placed in a bank of its own. Cores
running the same phase then share that bank's fetches, and cores running
different phases do not collide. The data crossbar interleaves words over the
16 banks (bank = low 4 address bits).

The instruction side has a ninth, write-only master, the loader port
(`load_*`), which puts program words into memory. The data side's ninth master
is the synchronizer.

*Address translation* (`atu`). Each core's data address passes a
combinational multiplexer before the crossbar. The top `2^PRIV_BITS` words of
the logical address space are the core's private window. For an access there,
the three address bits just above the window offset are replaced by the core
number. The windows of the eight cores therefore occupy
`2^15 - 2^(PRIV_BITS+3) .. 2^15 - 1` physically, one after another, and
everything below that threshold is shared. The low address bits are never
changed, so shared data and every private window are both spread across all 16
banks. With the reset value `PRIV_BITS = 8`, each core has 256 private words
and the shared section is physical words 16 .. 30719. The top's `d_private`
output shows when a core's access falls in its private window.

*Register window.* Logical data addresses 0..15 of every core do not reach
memory (this applies before translation). A register access is always granted
and a read returns one cycle later, just like memory.

| Offset | Register | Access | Reset |
|---|---|---|---|
| 0 | `REG_SUB`: interrupt lines this core waits for | per core, R/W | 0 |
| 1 | `REG_IRQ_STATUS`: subscribed lines that rose | per core, R, write 1 to clear | 0 |
| 2 | `REG_SYNC_BASE`: data address of point 0 | global, R/W | 16 |
| 3 | `REG_SYNC_COUNT`: number of points | global, R/W | 256 |
| 4 | `REG_PRIV_BITS`: log2 of private words per core (at most 12) | global, R/W | 8 |
| 5 | `REG_CORE_ID`: number of the accessing core | per core, R | – |
| 8..10 | latest sample of ADC channel 0..2 (`adc_data`) | R | – |

If several cores write a global register in the same cycle, the highest-numbered
core wins.

## What a core must provide

* Hold each fetch, data and synchronization request until it is granted or
  ready.
* Run on `core_clk[i]`, the output of a latch-based clock gate (`clock_gate`).
* Read data comes one cycle after the grant, on the free-running clock. It can
  therefore arrive in a cycle in which the core's clock is gated, for example
  because the core's next request lost arbitration. The core's memory interface
  must capture it on the free-running clock.
* Instruction encodings of the four synchronization instructions are not fixed
  here. `wbsn_pkg::sync_op_e` is only the encoding on the port.

## Files

| File | Contents |
|---|---|
| `rtl/wbsn_pkg.sv` | instruction encoding on the synchronizer port, register map |
| `rtl/wbsn_mc_top.sv` | platform top: memories, crossbars, ATUs, register window, synchronizer, clock gates |
| `rtl/synchronizer.sv` | synchronization points, sleep/wake, interrupts, registers, clock enables |
| `rtl/log_xbar.sv` | N x M single-cycle crossbar with read broadcast |
| `rtl/atu.sv` | per-core private/shared address translation |
| `rtl/sram_bank.sv` | synchronous single-port memory bank |
| `rtl/clock_gate.sv` | latch-based clock gate; its latch is intended |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workload_mappings.sv` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the platform test at full size:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/wbsn_pkg.sv tb/tb_wbsn_mc_top.sv --top-module tb_wbsn_mc_top -Mdir obj -o sim
./obj/sim
```

Replace the top-module name to run another testbench. The simulator should
start variables at random values (`+verilator+rand+reset+2`), because the
testbenches do not depend on memory contents they have not written.

* `tb_wbsn_mc_top` uses the default sizes and cores emulated by tasks. It runs
  one pass of a three-lead filter + combine mapping and counts each mechanism:
  program load, instruction and data broadcast, instruction and data bank
  conflicts, private accesses, register window, merged update,
  producer/consumer wake, lock-step wake, interrupt wake and a sleeping core
  receiving no clock edge.
* `tb_workload_mappings` uses the default sizes. It runs the synchronization
  structure of the three benchmark mappings below over 20 ADC samples each;
  the classification mapping runs twice, once with 20% pathological beats and
  once with none. Cores emulated by tasks wait for samples, bracket
  data-dependent branches, and hand results from producers to consumers. The
  test checks every result word, that the filters always leave a branch in
  lock-step, that the analysis chain runs exactly once per pathological beat,
  and that each sample period is met. It also reports the share of fetches
  served by broadcast.
* The block testbenches override sizes to stay short. `tb_log_xbar` checks
  grant rules, broadcast, data and round-robin fairness on random traffic.
  `tb_synchronizer` checks point words, merging, wake rules, interrupts,
  registers and the 4-cycle latency. `tb_atu` checks the address mapping for
  every window size and core. `tb_clock_gate` checks for glitches.
  `tb_sram_bank` checks the read latency and that read data holds.

## Benchmark mappings

The platform is sized for three ECG applications:

| Application | Cores | IM banks (active) | Use of synchronization |
|---|---|---|---|
| 3-lead morphological filtering | 3 | 1 | lock-step recovery only |
| 3-lead filtering + delineation | 5 | 4 | lock-step and producer/consumer |
| beat classification that triggers 3-lead delineation | 6 | 6 | control and data flow |

How the testbench maps them:

* **Filtering.** Cores 0-2 each filter one lead. They wait on their own ADC
  line, and point 0 brings them back into lock-step after each branch.
* **Filtering + delineation.** The filtering cores also produce, through
  point 1, for core 3, which combines the leads. Core 3 in turn produces,
  through point 2, for core 4, which delineates.
* **Classification.** Core 0 filters lead 0 on every beat and produces,
  through point 4, for the classifier on core 5. On a pathological beat the
  classifier releases a four-core chain through point 3: cores 1-2 filter the
  other leads, core 3 combines and core 4 delineates.

Only the core counts, the number of active instruction banks and the
four-core analysis chain come from the applications. Which core does what,
and which point each hand-off uses, are the testbench's choices.

All three fit in 8 cores, 8 instruction banks, 3 interrupt lines and 256
points. The code and data sizes of the applications are not known here, so it
cannot be said whether their code fits in the instruction banks they use.

## Departures and open points

* **No core.** The 16-bit, three-stage RISC core and its instruction set are
  not included. The top brings out the ports a core would drive.
* **No analog parts and no power management.** The ADC is outside; its samples
  and data-ready lines are top ports. Bank power switches and voltage-frequency
  scaling are not modelled.
* **Choices made here.**
  * The field layout of a point for 8 cores: flags in bits 15:8, counter in
    bits 7:0.
  * The update FSM and its 4-cycle latency.
  * Wake-up only on an update containing an `SDEC`, pending wake events, and
    the rules that discard stale events.
  * Rising-edge interrupts and the interrupt status register.
  * The register window and its reset values, and the loader port.
  * Round-robin arbitration and one-cycle read latency in the crossbars.
  * The position of the core tag in the ATU and the configurable private
    window size.
* **ADC registers.** The ADC samples are read at logical addresses 8..10 of
  the register window, which is decoded before address translation and the
  crossbar. They are not words in a data-memory bank, but every core reaches
  them at the same shared address.
* **The synchronizer arbitrates like any master.** Its accesses to a point
  compete with core accesses to the same bank, and it has no priority.
* **Clock gating.** `clock_gate` contains the design's only latch, which is
  intended. Synthesis should map it onto the library's clock-gating cell.
