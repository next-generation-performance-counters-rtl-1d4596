# Hybrid performance counter unit: 256 concurrent 64-bit counters

Processors usually have a handful of performance counters because each one is a wide
register with its own incrementer and its own wires. This unit counts 256 events at the
same time, each into its own 64-bit counter, and picks those 256 from 1024 event lines.
It does not spend 256 x 64 flip-flops to do it.

The idea is to split every counter in two:

* **12 low-order bits in flip-flops.** All 256 of them can count an event every cycle, in
  parallel.
* **52 high-order bits in one word of a 256-entry SRAM.** A dense array with a single port
  is much smaller than flip-flops.

A 12-bit counter wraps at most once every 2^12 = 4096 cycles. When it wraps, it sets a
carry latch. One maintenance state machine walks the 256 SRAM words round robin. It spends
16 cycles on each, so every word is visited once every 256 x 16 = 4096 cycles. That is
exactly the fastest a low-order counter can wrap. On each visit, a pending carry is added
to the SRAM word by the unit's single 52-bit incrementer. Software still sees plain 64-bit
counters in a memory map.

The same walk gives cheap threshold interrupts. Comparing 256 64-bit values with a
threshold every cycle would need 256 wide comparators. Instead, the state machine compares
the high part of the counter it is visiting with the threshold. If they match, it *arms*
that counter. The counter's next wrap then raises the interrupt at once.

This RTL follows the hybrid counter architecture published for the Blue Gene/P performance
counter unit (V. Salapura et al., "Next-Generation Performance Counters: Towards Monitoring
Over Thousand Concurrent Events"). That description gives the counter split, the sizes, the
round-robin carry service, the arm-then-trigger threshold scheme, the event selection and
modes, and the register regions. It does not give the bus protocol, register bit layouts,
parity code, reset behaviour or the phase timing inside a slot; those are choices made
here, and they are listed in [Choices made in this design](#choices-made-in-this-design).

## Block diagram

```
 events[1023:0]
   |  4 lines per counter
   v
 upc_event_input x256 --count_en--> upc_low_counters (256 x 12 bit + carry latches)
 (4:1 select, mode, run)                 |  carry, low value       ^ carry_clr / load
                                         v                         |
 bus <-> upc_mmio --counter access--> upc_maint_fsm ---------------+
          |  cfg, run, threshold          |  (contains upc_incrementer)
          |                               |<--> upc_sram (256 x 53 bit, one port)
          |                               v  arm_upd / arm_value
          +----- threshold[63:12] ---> upc_interrupt_arm <-- rollover (carry-outs)
                                          |
                                          v
                                         irq
```

`upc_top` connects these blocks. `upc_pkg` holds the shared sizes, addresses and types.

## Carry service: why no count is lost

This is the part that makes the hybrid counter correct, so it is given in detail.

**The slot.** The state machine (`upc_maint_fsm`) gives each counter a slot of
`SLOT_CYCLES` = 2^12 / 256 = 16 cycles:

| phase | what happens |
|---|---|
| 0, check | The state machine looks at the counter's carry latch. If the carry is set, or the counter has its interrupt enabled, it reads the counter's SRAM word. A set carry is *taken* (cleared) in this same cycle. |
| 1, update | The word arrives. The incrementer adds the taken carry and checks and regenerates parity. The word is written back if a carry was taken. The new high part goes to the threshold comparator. |
| 2 to 14, access | The SRAM port is free for one software read or write of any counter. |
| 15 | idle |

**Why clear in phase 0.** The carry latch is cleared when it is inspected, not when the
write happens. A new rollover in the same cycle as the clear sets the latch again, because
set wins over clear. Consider a counter counting every cycle whose carry was set just after
its visit. Its next wrap can come 4096 cycles later, which is the very cycle of its next
visit or the one after. Clearing later would erase that second carry. Clearing in phase 0,
with set winning, leaves it pending for the following round. The maintenance testbench
checks this: counter 0 counts every cycle, the test checks that no carry latch stays set
longer than one round, and after counting stops every counter must read back exactly.

**Software reads.** A read of counter *i* samples the low-order counter and its carry latch
in the same cycle the SRAM word is read. The returned value is
`{(high + carry), low}`, computed by the same shared incrementer. So a read taken while the
counter runs is a consistent snapshot, even if a carry is still waiting for service.

**Software writes.** A write sets the SRAM word (bits 63:12) and the low-order counter
(bits 11:0) in one cycle, clears the carry latch and disarms the counter.

**After reset.** The SRAM contents are not reset. Instead, the state machine first writes 0
to all 256 words, one per cycle. `init_done` rises when this is finished, and software
counter accesses wait until then. No counter can wrap within those 256 cycles.

**Parity.** Each SRAM word carries one even-parity bit over its 52 counter bits. The
incrementer checks it whenever a word is used. A mismatch sets the sticky `parity_error`
output; the count itself is not corrected.

## Threshold interrupts: arm, then trigger

There is one 64-bit threshold register. Only its bits 63:12 are compared.

1. **Arm.** On every visit to a counter whose interrupt is enabled, the state machine
   presents the counter's current high part. This includes any carry taken in that visit.
   `upc_interrupt_arm` compares it with `threshold[63:12]` using its single comparator. The
   counter's arm bit is set on a match and cleared otherwise.
2. **Trigger.** When an armed, enabled counter's low part wraps, `irq` pulses for one
   cycle, in the cycle after the wrap. The arm bit is then cleared, so each arming gives
   exactly one interrupt.

What this means for the user:

* **Threshold 4096·n.** The interrupt comes when the 64-bit counter reaches 4096·(n+1).
  That is the wrap that follows the high part becoming n.
* **Any other threshold, 4096·n + m.** Write the threshold as 4096·n and preload the
  counter with 4096 − m. The interrupt then comes after exactly 4096·n + m counted events.
  The end-to-end testbench checks this with n = 2 and m = 100.
* **One blind spot.** Arming happens at most 4096 cycles after the high part changes. A
  counter counting at the full rate of one event per cycle may wrap again just as it is
  being armed. If the arming visit falls in the last two cycles before that wrap, the wrap
  is not notified. This is a property of the scheme at full rate, not a bug.
* **Disarming by software.** Writing the threshold register disarms every counter.
  Writing a counter disarms that counter. Both are re-armed on their next visit if they
  still match.

## Event inputs

Counter *i* is wired to event lines `events[4i+3:4i]`. `upc_event_input` then does three
things each cycle:

* A 4:1 multiplexer picks one line, chosen by the counter's `sel` field.
* A register samples that line. A second register keeps the previous sample.
* The counter's mode turns the samples into an increment:

| mode | value | counts |
|---|---|---|
| level, high-active | 00 | every cycle the line is 1 |
| level, low-active | 01 | every cycle the line is 0 |
| rising edge | 10 | each 0→1 transition |
| falling edge | 11 | each 1→0 transition |

The global run bit gates all 256 increments at once. Counting therefore follows an event
by one cycle. Changing `sel` on the fly can produce one spurious edge count.

## Register map and bus

The bus is 64-bit, with 12-bit byte offsets. The master holds `bus_req`, `bus_we`,
`bus_addr` and `bus_wdata` until `bus_ack` pulses for one cycle; `bus_rdata` is valid in
that cycle. The master may start its next access in the following cycle.

* Register accesses are acknowledged one cycle after the request.
* Counter accesses must wait for the access window of the current maintenance slot. They
  are acknowledged 2 to 7 cycles after the request.

| offset | register |
|---|---|
| 0x000 + 8·i, up to 0x7F8 | counter i, 64 bits, read/write |
| 0x800 + 8·g, up to 0x8F8 | configuration register g: 8-bit fields for counters 8g … 8g+7, counter 8g+k at bits 8k+7:8k |
| 0x900 | start/stop: bit 0 = run |
| 0x910 | threshold (64 bits) |

Each 8-bit configuration field is laid out as follows:

* bits 1:0: input select
* bits 3:2: mode
* bit 4: interrupt enable
* bits 7:5: reserved, read as 0

All registers reset to 0, so after reset every counter is stopped. Unmapped offsets read as
0 and ignore writes.

## Modules

| file | block |
|---|---|
| `rtl/upc_pkg.sv` | sizes, address map, `upc_mode_e`, `upc_cfg_t` |
| `rtl/upc_event_input.sv` | per-counter select, mode and run gating |
| `rtl/upc_low_counters.sv` | 256 × 12-bit counters, carry latches, load port |
| `rtl/upc_sram.sv` | 256 × 53-bit single-port array, 1-cycle read |
| `rtl/upc_incrementer.sv` | shared 52-bit incrementer with parity check and generation |
| `rtl/upc_maint_fsm.sv` | round-robin carry service, reset sweep, software access window |
| `rtl/upc_interrupt_arm.sv` | threshold comparator, arm bits, interrupt |
| `rtl/upc_mmio.sv` | register decoder and bus handshake |
| `rtl/upc_top.sv` | the unit |

Ports of `upc_top`:

| port | direction | width | meaning |
|---|---|---|---|
| `clk` | input | 1 | clock |
| `rst_n` | input | 1 | asynchronous reset, active low |
| `events` | input | 1024 | event lines |
| `bus_req` | input | 1 | bus request |
| `bus_we` | input | 1 | bus write |
| `bus_addr` | input | 12 | bus byte offset |
| `bus_wdata` | input | 64 | bus write data |
| `bus_ack` | output | 1 | bus acknowledge |
| `bus_rdata` | output | 64 | bus read data |
| `irq` | output | 1 | threshold interrupt, one-cycle pulse |
| `parity_error` | output | 1 | sticky SRAM parity error |
| `init_done` | output | 1 | SRAM cleared after reset |

**Parameters.** `upc_top` has two:

* `N_COUNTERS`, default 256.
* `LOW_W`, default 12. The high part is `64 − LOW_W` bits.

The slot length is derived as `2^LOW_W / N_COUNTERS`. An elaboration-time check in
`upc_maint_fsm` requires it to be at least 4 cycles. The address map assumes
`N_COUNTERS` ≤ 256.

At the default size, synthesis gives about 5,600 flip-flops and a 13,568-bit memory. Most
of the flip-flops are the configuration fields, the low-order counters and the arm bits.

## Choices made in this design

**Taken from the published architecture:**

* 256 counters of 12 + 52 bits, and 1024 events with 4 selectable per counter.
* The four signal-level modes.
* Counters grouped under shared configuration registers, with a field per counter.
* One start/stop register acting on all counters.
* A 256-word SRAM widened for parity.
* Round-robin carry service with 16 cycles per counter and a single shared incrementer.
* Threshold comparison of the high 52 bits during the update walk, with arm-then-trigger
  interrupts and the 4096·n + m preload recipe.
* The memory-map regions at 0x000–0x7F8 (counters), 0x800–0x8F8 (configuration), and
  0x900 and 0x910.

**Chosen here:**

* Assigning 0x900 to start/stop and 0x910 to the threshold register.
* The configuration field layout and mode encoding.
* The bus handshake.
* One parity bit per word.
* The phase layout inside a slot, including the software access window.
* Clearing the carry latch at inspection, with set winning over clear.
* Reading interrupt-enabled words on every visit so they can be armed.
* Disarming on trigger and on software writes.
* `irq` as a one-cycle pulse, with no per-counter interrupt status register.
* The SRAM reset sweep.
* The input sampling registers.

**Not modelled:**

* The processor that uses the unit.
* The chip's event sources.
* Any software layer.

The SRAM is an inferred array standing in for a memory macro.

## Simulation

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. To build and
run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/upc_pkg.sv tb/tb_upc_top.sv \
          --top-module tb_upc_top -Mdir obj_tb_upc_top
./obj_tb_upc_top/Vtb_upc_top +verilator+rand+reset+2
```

Swap in any other testbench name for `tb_upc_top`. The testbenches are:

* `tb_upc_top`: the whole unit at its default size, driven only through the bus. It uses
  random configurations and random traffic on all 1024 lines, with two counters at full
  rate. It checks:
  * reads taken during counting, and exact reads after stop;
  * that nothing counts while stopped;
  * the preloaded threshold interrupt: exactly one, at the right count;
  * parity error detection.

  It also requires that every mode, every input select, carry service, arming, the
  interrupt and bus waits each happened at least once.
* `tb_upc_bt_events`: the whole unit running an event set like a NAS BT benchmark
  measurement on two cores. That is 62 counters at IDs 0–119. Each event's rate is
  proportional to its average count in that run, with the busiest event at one per cycle.
  The test checks exact final counts and that every other counter stays at 0.
* `tb_upc_maint_fsm`: the state machine with the real counter bank and SRAM, at 4 counters
  × 6 low bits. This keeps the same 16-cycle slot and a 64-cycle round.
* `tb_upc_event_input`, `tb_upc_low_counters`, `tb_upc_sram`, `tb_upc_incrementer`,
  `tb_upc_interrupt_arm`, `tb_upc_mmio`: unit tests against reference models in the
  testbench.

Each testbench takes well under a second.

The simulation is two-state. The SRAM contents start random, and the reset sweep is what
makes them defined.
