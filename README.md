# Multi-hit drift-time digitizer

This is synthesizable SystemVerilog for the readout electronics of a set of
drift chambers. Every sense wire's hits get a time stamp with a least count of
4 ns. The time is not measured by a separate TDC on each wire. One
crystal-controlled counter starts at each beam crossing, and its count is sent
as an 8-bit Gray code to every digitizer module. A module latches that code
whenever one of its wires fires. Gray coding means only one bit changes from one
count to the next, so a code latched while it is changing is off by at most one
count. Because every channel shares the same clock, no channel needs its own
calibration.

To keep the cost down, eight wires share one small memory in each digitizer
module (DTD). Each word of that memory records a wire pattern and a time. The
interesting part of the design is how the module handles hits that arrive close
together on different wires. That is covered in the section
[The memory cycle and close hits](#the-memory-cycle-and-close-hits).

The RTL models a complete system of 265 modules. That covers 384 + 830 + 900
wires, with each chamber rounded up to whole 8-wire modules. The system also
contains the code generator, a phase detector that measures the start offset,
and a programmable test-pulse generator. The host reaches all of it through a
CAMAC dataway.

## One clock tick is 4 ns

The original timing code is clocked by a 125 MHz crystal. The gated clock itself
is the least significant bit of the code, and a counter supplies the upper seven
bits. In this RTL a single clock `clk` runs at 250 MHz, so one tick is 4 ns. A
9-bit binary counter advances once per tick, and its low 8 bits pass through
`gray_encode`. The resulting code is the same as the original's, and the whole
design is an ordinary single-clock synchronous circuit. All other inputs are
also taken as synchronous to `clk`, including the wire signals and the CAMAC
lines. The only exception is `t_start`, which also drives the phase detector
directly.

## Drift-time code (`gray_code_gen`, `start_sync`, `phase_detector`)

- **Start.** `t_start`, the beam-crossing pulse, passes two synchronizing
  flip-flops. Its rising edge then sets `run`, 2 to 3 ticks after the
  crossing. While `run` is high, `eod` is low. In the first tick of the drift
  interval the code is 0, and it then advances by one count per tick.
- **End.** When the counter's 9th bit sets, after 256 ticks (1024 ns), `eod`
  goes high and a one-tick clear resets the counter. A CAMAC `Z.S2` does the
  same. `eod` high means the system is outside a drift interval, and every DTD
  ignores its wires while it is high.
- **Offset.** Because the code starts on a clock edge, its zero lags the true
  crossing by a different amount in every event. The `phase_detector` is an S-R
  flip-flop: `t_start` sets it, and the code's first LSB edge resets it. The
  pulse width is therefore that offset. In the full system the pulse produces a
  charge that an ADC records, and the offset is subtracted from every time in
  the event. The charge and the ADC are analog and are not part of this RTL.

## The DTD module (`dtd`)

The signal path through one module is:

```
hit[7:0] -> TEST AND gates -> TIME flip-flops -> MEMORY HOLD -> 16x16 memory -> CAMAC R1-R16
                 ^                |                    |
            TEST LATCH      OR -> INHIBIT,        BUFFER flip-flops -> 8-bit shift register -> trigger
            (F(16))         TIME LATCH <- G0..G7
```

Each memory word is `{wires[7:0], time_g[7:0]}` (type `dtd_word_t`). The upper
byte holds one bit per wire, and the lower byte holds the Gray-coded time. A
word whose upper byte is zero is the **flag word**, which marks the end of the
data.

### The memory cycle and close hits

All of this is in `dtd_ctrl`. A wire's rising edge sets its TIME flip-flop. If
no memory cycle is running, the set flip-flop starts one in the same tick. The
current code goes into the TIME LATCH, and INHIBIT blocks any further start.
The cycle is counted in ticks from the tick after the first hit:

| tick (`cyc`) | what happens |
|---|---|
| 0 | cycle running; the time has been latched |
| 1 (`CAPTURE_AT`) | every TIME flip-flop that is set now, including edges in this tick, is copied into MEMORY HOLD and cleared |
| 3 (`WRITE_AT`) | `{MEMORY HOLD, TIME LATCH}` is written at the MAR |
| 7 (`CYCLE_TICKS-1`) | end of memory cycle (EMC): the MAR advances, and a pending hit may start the next cycle in the same tick |

This gives the module's two kinds of close hits:

- **Up to 8 ns apart (0 to 2 ticks).** The second wire is still caught at
  capture time. Both wires go into one word, with the time of the first. The
  second wire's time is early by up to 8 ns, but the word shows it clearly
  because it has more than one wire bit set.
- **12 to 32 ns apart.** The second wire stays in its TIME flip-flop. It starts
  a new cycle at the EMC of the first, which is 32 ns after the first hit, and
  gets its own word with the code of that moment. Its time is therefore late.

Hits on the same wire more than one pulse width apart each get their own word.
The module is never dead to a wire. A hit that comes during a cycle is only
delayed, and is never lost, unless the memory is full.

### End of drift, the flag word and overflow

When `eod` rises, no new cycle starts and a cycle that is already running
finishes. After that, the TIME flip-flops are held clear. Once the memory is
idle, the flag word is written at the MAR. The time byte of the flag word is the
current code. In the same tick, END returns the MAR to 0, so the host reads the
words from the beginning.

Only 15 words can hold data. When the MAR reaches location 15 it stops, and
further data words are dropped. Each dropped word produces a pulse on `lost`.
The flag word then lands in the 16th location. The MAR is also cleared when a
new drift interval starts, so each event writes from word 0.

During the drift interval the BUFFER flip-flops OR together every wire pattern
the module latches. At END they are loaded into an 8-bit shift register. The
track-recognition logic then shifts them out serially with `shift`, most
significant bit (wire 7) first. `ser_in` lets modules be chained.

### CAMAC functions

| module | command | action |
|---|---|---|
| DTD | F(0), A=0 | R1-R16 = word at the MAR; the MAR advances at S2; Q=1 for data, Q=0 for the flag |
| DTD | F(16), A=0 | at S1, TEST LATCH <= W1-W8 (bit = 1 disables that wire) |
| all | Z with S2 | clear: memory-cycle logic, MAR, TEST LATCH, code generator, test generator |
| test generator | F(17), A=0 | at S1, write Gray(W1-W8) at its MAR; at S2, MAR + 1 |
| test generator | F(25), A=0 | at S1, start the pulse train (EXECUTE) |
| test generator | F(11), A=0 | at S2, clear |

Because Q=0 on the flag word, a stop-mode block transfer reads one module until
the flag and then moves to the next module. Strobes act on their rising edge.

## Test generator (`test_generator`)

The host loads 16 pulse times, in 4 ns counts, into a 16 x 8 memory. The times
must be increasing. A binary-to-Gray converter sits in the write path, so the
memory stores Gray codes. EXECUTE starts a Gray code built the same way as the
drift code. A comparator checks the running code against the word at the
generator's MAR. On a match it fires `pulse_north` and `pulse_south` for
`PULSE_TICKS` ticks and advances the MAR. The pulse for time `t` rises `t+1`
ticks after `test_mode` rises.

The counter's 9th bit ends the run after 256 ticks and clears the MAR. A
flip-flop samples counter bit B7 on each rising edge of B6. It raises
`delayed_xing` 192 counts into the run, and the output stays high until the run
ends.

Outside this logic, the pulses are fanned out and injected at the far end of the
sense wires. That makes the test cover the wires, the amplifiers, the
digitizers, the multi-hit logic and the readout.

## System top (`drift_chamber_daq`)

The top instantiates one code generator, one phase detector, `NUM_DTD` DTDs
(default 265) and one test generator. The code and `eod` go to every DTD
unchanged. In hardware the crate fanout is only line drivers.

The top does not model the CAMAC branch or the crate controllers. Each module
has its own station line, either `n_dtd[i]` or `n_tg`. The outputs R, X and Q of
all modules are ORed, and an unaddressed module drives zeros.

The wire inputs `hit[i][7:0]` are the discriminator outputs. Each module's
trigger shift register appears on `ser_in[i]` and `ser_out[i]`. The outputs
`dtd_busy`, `dtd_lost` and `dtd_flag_write` are there for observation.

| parameter | default | meaning |
|---|---|---|
| `NUM_DTD` | 265 | 8-channel modules: 48 + 104 + 113 for the 384, 830 and 900 wires of the three chambers |
| `PULSE_TICKS` | 4 | test pulse width in ticks (16 ns) |
| `dtd_pkg::CYCLE_TICKS` | 8 | DTD memory cycle, about 32 ns |
| `dtd_pkg::CAPTURE_AT` | 1 | last tick whose hits join the current word (sets the 8/12 ns boundary) |
| `dtd_pkg::WRITE_AT` | 3 | memory write tick |

## Where this RTL departs from the original hardware

The original is built from discrete ECL parts with one-shots and delay lines.
This RTL keeps its structure and its rules, but the following points are
choices of this implementation:

- **Sampling.** Wire edges are sampled once per 4 ns tick. Edges are not latched
  asynchronously. The "within 10 ns" rule of the original therefore becomes
  "within 8 ns" (2 ticks), and 12 ns and more counts as a separate word.
- **Cycle timing.** The memory-cycle timing is given in whole ticks: capture at
  tick 1, write at tick 3, and a cycle of 8 ticks. The original uses an 8 ns
  delay, an 8 ns write pulse and a 5 ns EMC, plus gate delays, for a cycle of
  about 32 ns.
- **The END signal.** END is treated as a one-tick event after the flag write,
  not as a level. The MAR is also cleared at the start of each drift interval.
  The wire pattern goes into the shift register at END rather than on the `eod`
  edge, so that a cycle still running at `eod` is included.
- **Memory full.** When the memory is full, the MAR stops at location 15 and the
  extra data writes are suppressed.
- **Start of drift.** `eod` falls when the synchronized start sets `run`, not
  directly at `t_start`. The end of the drift interval is the counter's 9th bit.
- **CAMAC.** Subaddress A=0 is required for every function. Q on F(0) is the
  flag test. A TEST LATCH bit of 1 disables its wire. CAMAC lines are treated as
  synchronous.
- **Reset.** A synchronous `rst_n` provides power-on reset. Otherwise, clearing
  is done over CAMAC as in the original.
- **Late second hits.** The original says that hits affected by the close-hit
  rules can be told apart in analysis. Here a shared word is recognizable by
  having several wire bits set. A late second word carries no mark of its own
  and can only be recognized by its time.

The design does not include:

- the amplifier-discriminators
- the crystal oscillator
- the line receivers and the ECL/TTL/NIM translators
- the fanouts and the test-pulse network
- the ADC for the phase-detector charge
- the CAMAC branch and the host computers
- the track-recognition logic that reads the shift registers

## Files

| file | contents |
|---|---|
| `rtl/dtd_pkg.sv` | word type, code width, memory-cycle ticks, CAMAC function codes |
| `rtl/gray_encode.sv` | binary-to-Gray converter |
| `rtl/start_sync.sv` | two-flip-flop start synchronizer |
| `rtl/gray_code_gen.sv` | drift-time code generator and `eod` |
| `rtl/phase_detector.sv` | start-offset flip-flop |
| `rtl/ram16.sv` | 16-word memory, synchronous write, asynchronous read |
| `rtl/dtd_ctrl.sv` | TIME flip-flops, memory-cycle sequencer, TIME LATCH, MEMORY HOLD, MAR, flag |
| `rtl/dtd_camac.sv` | DTD CAMAC decode, TEST LATCH, X/Q |
| `rtl/wire_shift_reg.sv` | BUFFER flip-flops and trigger shift register |
| `rtl/dtd.sv` | one 8-channel module |
| `rtl/test_generator.sv` | test pulse generator |
| `rtl/drift_chamber_daq.sv` | system top |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulating

Each testbench checks its module against values worked out in the testbench
itself. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. For
example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dtd_pkg.sv tb/tb_drift_chamber_daq.sv --top-module tb_drift_chamber_daq
./obj_dir/Vtb_drift_chamber_daq
```

`tb_drift_chamber_daq` runs the top at its default size of 265 modules, with no
parameter overrides. It simulates about 15 us in a fraction of a second and
covers two beam crossings. In the first crossing:

- The test generator's train of 16 pulses feeds two modules. Each of them keeps
  15 words and drops one, and one of them has half its wires disabled.
- A third module gets hand-placed hits: a lone hit, a shared word and a split
  pair.
- Every module is then read in stop mode, and the trigger patterns are shifted
  out.

The second crossing comes at a different clock phase and is cut short by `Z.S2`.

The testbench counts each mechanism: shared word, split word, overflow, flag
stop, disabled wire, pulse train, delayed crossing, phase pulse, shift register
and clear. A mechanism that never happens counts as a failure.

`tb_dtd_ctrl` also runs 40 drift intervals of random hits at varied density,
several of them dense enough to overflow the memory. It compares every word
with a tick-by-tick reference of the memory-cycle rules written inside the
testbench.

All testbenches pass. For each module, a copy with one deliberate fault was run
against its testbench, and the testbench caught every fault.
