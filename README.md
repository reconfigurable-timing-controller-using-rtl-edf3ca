# Reconfigurable timing controller for an RF-synchronised injector

An accelerator injector needs trigger signals that are locked to the RF of
the storage ring. They must be timed to a single RF bucket, fired in step
with the 60 Hz mains that the linac modulators follow, and repeated in a
1 Hz injection cycle. Classic setups build these triggers from a rack of
discrete logic, gate/delay and pulse-extend modules. Those modules work
asynchronously, so the first pulse after an enable is unreliable, and each
delay is set by hand.

This design replaces that rack with synchronous logic in programmable
devices. The main idea is that the whole controller runs on one clock: the
**coincidence clock**. An external RF counter divides the 508.58 MHz RF by
19488 to make it. 19488 is the least common multiple of the booster
harmonic number (672) and the storage-ring harmonic number (2436). The
result is a clock of about 26.1 kHz (period about 38.3 µs) whose edges are
fixed relative to both rings. The controller decides *in which* period a
trigger fires. The RF counter's programmable **delayed clock** decides
*where in that period*, to one RF period (1.966 ns). A logic unit joins the
two.

The RTL covers the controller logic and the logic unit. Together they are
`timing_system`. The RF counter, the displays, the oscillator and the
level-conversion circuits are not logic of this design, so their signals are
ports. The testbenches include a behavioural model of the RF counter.

```
 60 Hz AC line ──► sync_pulse ──line_tick──► cycle_gen ──line_idx, clk_cnt──┐
                  (2 FFs on ↓clk)                                           │
 VME DIO ──► serial_rx ──write──► rtc_regs ──cfg──► inj_seq ──gun_gate──────┼─► logic_unit ─► gun_trigger
   (data/clk/strobe)                │               │    └─suc_delay/load ──┼─► RF counter (external)
   start/stop/enable/clear ─────────┼──────────────►┘                      │
                                    └──────────────► slow_trig × 4 ◄───────┘─► slow_trig[3:0]
 RF counter's 26 kHz clock = clk of everything;  its delayed clock ─────────► logic_unit
```

## From an asynchronous chain to two flip-flops (`sync_pulse`)

The old circuit formed a trigger from a gate A and a clock B. It used a
coincidence, a delay, a latch and a second delay. Whether the first output
pulse was whole depended on where A arrived, so the first pulse always had
to be thrown away.

The synchronous replacement is two D flip-flops. Both are clocked on the
**falling** edge of B:

* `C` samples `A`;
* `D` is `C` delayed by one period of B;
* `E = C & ~D` is high for exactly one period of B after A rises;
* `Y = E & B` is the single B pulse inside that window.

Because E opens and closes on falling edges of B, it never cuts into a
high phase of B. The first pulse is therefore always complete. A new pulse
needs A to go low for at least one falling edge first.

In the controller, this circuit takes the asynchronous 60 Hz AC line as A
and the coincidence clock as B. E is then the **line tick**: one clock
period per mains period, in a clean clock period. All other logic works on
the rising edge and samples the tick exactly once.

## The 1 Hz cycle and multi-pulse injection (`cycle_gen`, `inj_seq`)

This is the central part of the design, and it needs the most care.

`cycle_gen` numbers the line ticks 0…59, which makes the 1 Hz injection
cycle. It also counts coincidence-clock periods since tick 0 in `clk_cnt`.
There are about 26 097 periods in a second, and the 16-bit counter
saturates. The cycle runs free: nothing aligns it to another 1 Hz signal.

To fill the ring faster, up to **8 beam pulses** are injected per cycle.
There is one pulse per mains period, and each pulse goes to its own RF
bucket. The bucket of a pulse is the RF counter's delay count, so the delay
count has to be rewritten between pulses. `inj_seq` uses these settings:

* `bucket[0..7]`: the delay count of each pulse, 15 bits (0 … 19487);
* `npulse`: the number of pulses per cycle (0 … 8);
* `gun_tick`: the line tick of the first pulse.

It works as follows:

1. At line tick 0, it loads `bucket[0]` into `suc_delay` and rewinds its
   pulse index.
2. At each later tick from `gun_tick` on, it checks three things: fewer than
   `npulse` pulses have fired, the gun is **running** and injection is
   **enabled**. If all hold, it raises `gun_gate` for exactly one clock
   period and counts the pulse.
3. In the clock period right after that gate closes, it loads the delay of
   the next pulse.

So `suc_delay` never changes during a gate period. Each new value is in
place about one mains period (≈435 clock periods) before the gate that uses
it. Every change comes with a one-clock `suc_load` strobe. Tick 0 never
fires, because it is used to load the first delay. Pulses that have not
fired by tick 59 are dropped for that cycle.

A gate that is exactly one clock period wide, with its edges on rising
clock edges, contains exactly one pulse of the delayed clock, whatever the
delay. `logic_unit` ANDs the two. The gun trigger therefore carries the
RF-locked edge of the delayed clock, with no pulse-extend or delay module.

Timing at the system level:

| event | when |
|---|---|
| AC line rises | t0 |
| line tick (E) | from the first falling clock edge after t0, for one period |
| `gun_gate` | the clock period after the rising edge that sampled the tick |
| gun trigger | `bucket[k]` RF periods after the rising edge that opened the gate |
| next `suc_delay` | the rising edge that closes the gate |

## Top-up control

Top-up injection is started by a control program, not by an operator.
The controller therefore offers four functions:

* **Start and stop** the gun. These are rising-edge commands that set and
  clear a run flag. If both arrive together, stop wins.
* **Enable and disable** injection. This is a level.
* **Count** the gun gates that have fired. The count is 16 bits and can be
  cleared.
* **Read back** every setting.

A gate opens only if the gun is running *and* injection is enabled.
The two conditions are checked at every line tick, so a stop can cut a
burst short. A start later in the same cycle continues that burst where it
stopped. Every new cycle begins again with pulse 0.

## Settings: serial words and the register map (`serial_rx`, `rtc_regs`)

The control system writes settings through a VME TTL digital I/O board. It
uses three lines: data, clock and strobe. Each 24-bit word is shifted in on
the rising edge of the serial clock, most significant bit first. Then the
strobe is raised. The strobe is synchronised to the coincidence clock, and
its rising edge copies the word into the register file 2–3 clock periods
later.

Two rules for the sender:

* keep the strobe high for at least 3 clock periods (about 115 µs);
* do not toggle the serial clock while the strobe is high.

A word is `{address[7:0], value[15:0]}`:

| address | register | width |
|---|---|---|
| 0 … 7 | `bucket[k]`, delay count of pulse k | 15 |
| 8 | `npulse`; values above 8 are stored as 8 | 4 |
| 9 | `gun_tick` | 6 |
| 16 + 2i | delay of slow trigger i, in clock periods after tick 0 | 16 |
| 17 + 2i | width of slow trigger i, in clock periods (0 = off) | 16 |
| 31 | status, read only: `{13'b0, enable, running, word received}` | 16 |

Other addresses read as zero and ignore writes. The front-panel toggle
switch (`reset_sw`) returns every register to zero and clears the gun
count. The power-on reset `rst_n` does the same.

DIO lines into the controller (`dio_in`):

| bit | use |
|---|---|
| 0, 1, 2 | serial data, serial clock, strobe |
| 3, 4 | gun start, gun stop (rising edge) |
| 5 | injection enable (level) |
| 6 | gun count clear (rising edge) |
| 11:7 | read-back address |
| 15:12 | unused |

The outputs (`dio_out`) are `{gun_count[15:0], register[read-back address]}`.
The read-back value is combinational in the address.

## Slow triggers (`slow_trig`)

The cycle also has slow triggers: ramping start, beam-charge monitor, orbit
monitor, and pulse-magnet pre-charge. Each of the four channels replaces one
gate/delay generator. Its output is high while `clk_cnt` lies in
`[delay, delay + width)`, and it appears one clock after `clk_cnt` reaches
`delay`. The window is counted from line tick 0. The trigger therefore
repeats every second and stays aligned with the injection pulses of the
same cycle.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `LINES_PER_CYCLE` | 60 | mains periods per injection cycle (60 Hz → 1 Hz) |
| `MAX_PULSES` | 8 | pulses per cycle and bucket registers |
| `NSLOW` | 4 | slow trigger channels |

The register map and the `cfg_t` struct in `rtc_pkg` assume
`MAX_PULSES = 8` and `NSLOW = 4`. Changing either means editing the package
and the address decoding in `rtc_regs`. `LINES_PER_CYCLE` can be changed
freely, and the `rtc` bench uses 12.

## What comes from the source and what is this design's own

These parts follow the published description of the controller:

* the coincidence clock (RF / 19488) as the only clock;
* the two-flip-flop synchroniser and its timing;
* the 1 Hz cycle on the 60 Hz line;
* up to 8 pulses per cycle, with a new delay count for each;
* the gate-and-coincidence scheme for the gun trigger;
* 24-bit serial settings on data/clock/strobe lines;
* the four top-up functions;
* a panel switch that resets the counter values;
* slow triggers as a function.

These parts are choices made here, and a user of the real hardware should
check them:

* the word format, bit order and register map;
* the DIO pin assignment, and edge-triggered commands;
* how start/stop differs from enable/disable;
* the moment the next delay is loaded, and the `suc_load` strobe;
* slow triggers as delay/width windows in clock periods, and that there
  are four of them;
* reset values and the added power-on reset;
* the free-running cycle phase.

The original hardware spread the logic over three small programmable
devices. How it was split is not known, so here it is a single design.

The source also describes parts that this logic does not contain:

* the 10 kHz crystal oscillator and the booster **ramping clock** it
  produces. The logic the controller applies to that clock, if any, is not
  described, so it has no RTL here.
* the front-panel display path (a microcontroller driving a 16×2 LCD that
  shows counter values). `gun_count` is brought out for it.
* in-system programming of the devices.
* the input and output level-conversion and driver circuits. Only one of
  the two NIM inputs (the AC line) is used, and the two TTL inputs are not
  used.
* the RF counter itself. It is modelled in `tb/suc_model.sv`.

## Verification

Each module has a self-checking bench `tb/tb_<module>.sv`:

| bench | what it checks |
|---|---|
| `tb_sync_pulse` | C, D, E and Y after random arrival phases of A; one Y pulse per rise, half a period wide |
| `tb_serial_rx` | random words, one write each, 2–3 clocks after the strobe |
| `tb_rtc_regs` | random writes against a reference, full read-back, the limit of 8, clear |
| `tb_cycle_gen` | index and cycle start over 200 ticks; `clk_cnt` every clock against a reference |
| `tb_slow_trig` | windows, zero width, windows at the end of the count range |
| `tb_inj_seq` | a reference model tick by tick: gates, delay during each gate, delay loaded at least a line period before it, count, start/stop/enable/clear, mid-burst stop |
| `tb_logic_unit` | truth table |
| `tb_rtc` | the controller at a 12-tick cycle: serial set-up, read-back, pulses per cycle, delay per gate, count, stop, panel switch |
| `tb_timing_system` | the whole system at default parameters and real rates, see below |

`tb_timing_system` runs the system at its real rates. The counter model uses
19488 RF periods of 1.966 ns per clock, and a 60 Hz line runs
asynchronously to it. The bench simulates about 6 s of operation. It
measures every gun trigger against its clock edge, to the RF period, and
checks it against `bucket[k]`. It also checks the spacing of pulses within
a burst and the counts. It checks the slow-trigger widths, the 1 s period
and the offset. It runs the stop, disable, clear and panel-switch
sequences. It counts each of these mechanisms and fails if one never
happened. It takes a few seconds.

Every bench ends with `TB_RESULT checks=N failures=M`, and each has a
watchdog. To run one with Verilator 5 (time unit 1 ns):

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/rtc_pkg.sv tb/tb_timing_system.sv \
  --top-module tb_timing_system -o sim && ./obj_dir/sim
```

Verilator is a two-state simulator. Every register has a reset, and the
benches do not depend on uninitialised values.

## Files

* `rtl/rtc_pkg.sv`: widths, register addresses, the `cfg_t` settings struct
* `rtl/timing_system.sv`: top level, the controller plus the logic unit
* `rtl/rtc.sv`: the controller logic
* `rtl/sync_pulse.sv`, `rtl/sync2.sv`: AC-line synchroniser; two-flip-flop synchroniser for control lines
* `rtl/serial_rx.sv`, `rtl/rtc_regs.sv`: settings path
* `rtl/cycle_gen.sv`, `rtl/inj_seq.sv`, `rtl/slow_trig.sv`: cycle, injection sequencer, slow triggers
* `rtl/logic_unit.sv`: coincidence of gate and delayed clock
* `tb/suc_model.sv`: behavioural RF counter (divided and delayed clock)
* `tb/tb_*.sv`: the benches listed above
