# CACTUS trigger and TDC readout logic

CACTUS is an air-Cherenkov telescope built from a solar-power heliostat
field: light from 168 heliostats is focused onto a camera of 80
photomultiplier tubes. The flash from an air shower reaches the camera
through paths of different length, so the pulses of one shower arrive at
different times on different channels. The electronics have two jobs.

* **Trigger.** Delay each channel by its own, host-programmed number of
  10 ns steps so that the pulses of a shower line up. Then count how many
  channels fire in the same 10 ns cycle, and trigger when the count is
  higher than a programmed level.
* **Readout.** On a trigger, stop a bank of common-stop TDCs and read their
  hit times out over a handshake bus. Store the words in a four-event
  buffer memory and hand complete events to the host PC over an EPP
  parallel port. A slow host then adds no dead time until the buffers fill.

This repository holds synthesizable SystemVerilog for the digital part of
both boards, along with self-checking testbenches. The analog front end,
the discriminators, the ECL/LVDS level translators, the TDC modules, the
anode-current digitizer and the host software are outside the RTL. Their
signals are ports of the top module `cactus_top`.

```
 hits[79:0] ─▶ trigger_fpga ──trig_out──▶ readout_fpga ◀──▶ TDC control/data bus
                   ▲                            ▲
                EPP port                     EPP port
                (delays, level)              (events to host)
```

## Trigger board (`trigger_fpga`, 100 MHz)

```
hits[c] ─▶ delay_line[c] ─▶ ┐
   ...          ...         ├─▶ majority_logic ─▶ threshold ─▶ stretch ─▶ trig_out
hits[79]─▶ delay_line[79] ─▶┘   (7-stage tree)    (sum>level)  (4 cycles)
                ▲                                    ▲
                └────────── trig_comm (EPP) ─────────┘
```

### Delay line (`delay_line`)

The delay line is the unusual part of the design. A shift register has a
fixed length, so a variable delay needs some way to choose where the pulse
enters. This design uses a chain of `DEPTH` flip-flops with a 2:1
multiplexer after each one:

```
 in ─▶[FF0]─▶(mux1)─▶[FF1]─▶(mux2)─▶ ... ─▶[FF63]─▶(mux64)─▶ out
         in ─┘  ▲       in ─┘  ▲                in ─┘  ▲
            dec(1)          dec(2)                  dec(64)
```

Each multiplexer either continues the chain or takes the undelayed input.
Its decoder compares the delay code with the multiplexer's position. Exactly
one multiplexer takes the input: the one with `code` flip-flops left
between it and the output. The pulse then moves one flip-flop per clock.
As a result:

* `code = 0` passes the input combinationally to the output.
* `code = d` gives `out(t) = in(t − d)` in clock cycles.
* `code ≥ 64` gives 64 cycles (640 ns). The first flip-flop always takes
  the input, so at full length no multiplexer needs to inject.

Pulses still travelling upstream of the injection point are blocked there.
This means a code change affects only pulses that enter after it. The host
sends a byte per channel, so a code could name up to 255 steps. The depth of
64 is this design's own choice: the trigger decision has to be made within
1 µs, and 64 steps plus the logic latency (73 cycles, 730 ns) meets that.

### Majority logic and threshold

`majority_logic` adds the 80 aligned hit bits in a balanced tree of
two-input adders, with a register after each level. There are 7 levels, so
the count belongs to the hit vector from 7 cycles earlier. A new count comes
out every cycle. The count is clipped at 63 (6 bits). Clipping is this
design's reading of "truncated to six bits": if the count wrapped instead,
64 hits would read as zero.

`threshold` registers `sum > level`. The comparison is strictly greater, so a
level of 63 can never trigger. The trigger output is then held high for 4
cycles after the last cycle above the level, so that the readout board, on
its own clock, sees it.

**Latency:** if the hits line up at the delay-line outputs in cycle A,
`trig_out` is high from cycle A+9 to A+12. `tb_trigger_fpga` checks this to
the cycle.

### Trigger-board host interface (`trig_comm`)

The trigger board speaks EPP, using the same slave as the readout board:

| host cycle    | effect |
|---------------|--------|
| data write    | shift one delay byte in. Every channel moves down by one and the new byte goes to channel 79. After 80 writes, the first byte written is the delay of channel 0. |
| address write | coincidence level = low 6 bits of the byte |
| address read  | returns the current level |
| data read     | returns 0 |

The delay lines read the shift register directly, so new delays apply while
they are being shifted in. This is how the host tracks a moving source in
real time. After reset all delays are 0 and the level is 63.

## Readout board (`readout_fpga`)

```
            ┌──────────┐   words   ┌───────────┐  write cmds  ┌─────────────┐
 TDC bus ◀─▶│ tdc_ctl  │──────────▶│ ram_store │─────────────▶│ dpram_4k ×4 │
            └──────────┘ can_accept└───────────┘  MEMORY_STATE└─────────────┘
                 ▲                                   │            ▲  │ data
             trig_in                          ┌──────▼─────┐      │  ▼
                                              │ ram_select │─▶ ram_read ─▶ host_xfer ─▶ EPP
                                              └────────────┘ event   (word stream)
```

### TDC handshake (`tdc_ctl`)

The TDCs record continuously until they get COM (common stop). A trigger
edge starts the following sequence. This happens only if no event is
being read from the TDCs and the buffer at the write pointer is free.
Otherwise the trigger is refused and `trig_lost` pulses; this is the
board's only dead time.

1. COM is pulsed for 5 cycles, and RAM_STORE is told that an event starts.
2. REN is raised. REN is the read enable of the first TDC. Each TDC passes
   the enable on to the next one through its PASS output.
3. Each word takes one four-phase handshake:
   * the TDC puts the word on the bus and raises WST;
   * `tdc_ctl` latches the word, passes it on and raises WAK;
   * the TDC drops WST;
   * `tdc_ctl` drops WAK.
4. The event ends when PASS from the last TDC is high, BSY is low and no
   word is pending. REN drops and RAM_STORE closes the record.

WST, BSY, PASS and the trigger go through two-flip-flop synchronizers. The
data bus is sampled when the synchronized WST is seen. With a 100 MHz
clock and a fast TDC, one word takes about 8 cycles (12.5 MHz), which is
faster than the 10 MHz word rate that the TDC bus is specified for. All control lines are active high in
the RTL. The polarity of the real bus, and the COM width, have to be matched
to the TDC modules used.

### Buffer memory (`ram_store`, `dpram_4k`, `ram_select`, `ram_read`)

This is the part that takes the most care. The memory has four buffers of
4096 × 16 bits. Each buffer keeps its own record length, an event tag, two
flags and a state:

```
EMPTY ──wr_start──▶ WRITING ──wr_close──▶ FULL ──rd_start──▶ READING ──rd_done──▶ EMPTY
```

* **`last`**: the event ends in this buffer. When this flag is clear, the
  event continues in the next buffer.
* **`trunc`**: words of the event were lost.

**Writing (RAM_STORE).** Events go into the buffers in cyclic order. Words
go into the current buffer. When that buffer is full and the next one is
empty, RAM_STORE closes the current buffer with `last=0` and writes on into
the next one. One event can therefore span up to four buffers (16384
words). If the next buffer is not empty, the rest of the event is dropped
(`word_lost`). The open buffer is then closed at the end of the event with
`trunc=1`.

**Selecting (RAM_SELECT).** RAM_SELECT keeps a read pointer to the oldest
unread buffer. It walks cyclically from there over buffers that are `FULL`,
until it reaches one with `last=1`. It reports four things to RAM_READ:

* that an event is ready;
* the event's first buffer and how many buffers it spans;
* its total length;
* its truncation flag.

An event is offered only once all of its buffers are complete.

**Reading (RAM_READ).** RAM_READ streams two header words and then the
record, one buffer after the other. It frees each buffer as soon as its last
word has been taken, so RAM_STORE can refill it while later buffers are
still being read. Reading and writing are independent, so a new event can
be stored while the host is still fetching an older one.

### Event format and host protocol (`host_xfer`)

The host polls with EPP address reads:

* `0x0C` means an event is ready or being sent.
* `0x00` means there is nothing to send.

The host then reads bytes with data reads. Each 16-bit word arrives low byte
first:

| word | content |
|------|---------|
| 0    | event number (counts accepted triggers from 0, wraps at 16 bits) |
| 1    | bit 15 = truncated, bits 14:0 = number of record words that follow |
| 2 …  | TDC words in readout order, first TDC of the chain first |

A data read that arrives before the next word is available is held off
(`nWAIT` stays low) until the word is there. Host writes to the readout
board are ignored.

## EPP slave (`epp_slave`)

The EPP slave is shared by both boards. It synchronizes nDATASTB, nADDRSTB
and nWRITE, then runs the standard EPP cycle:

1. The host pulls a strobe low.
2. The slave latches the written byte, or drives the read byte and enables
   the pad.
3. The slave raises nWAIT.
4. The host releases the strobe.
5. The slave releases the bus and drops nWAIT.

The bidirectional bus appears as `pd_in`, `pd_out` and `pd_oe`. The tristate
pad buffer belongs in the chip-level wrapper. nRESET and nINTR are not used.

## Clocks and reset

* The trigger board runs on `clk_trig`, nominally 100 MHz, and each delay
  step is one cycle of it.
* The readout board runs on `clk_ro`. Its frequency is not fixed by the
  logic. The handshake rate quoted above assumes 100 MHz. `trig_out`
  crosses between the two clocks as a 4-cycle pulse.
* `rst_n` is a synchronous, active-low reset, shared by both boards in
  `cactus_top`.

## How far to trust it, and where it departs from the original system

These points follow the published description of the system:

* 80 channels and a 100 MHz clock;
* delay lines built from flip-flops, multiplexers and decoders, one 8-bit
  code per channel, loaded through a shift register;
* a pipelined majority count clipped to 6 bits;
* a threshold that triggers when the count is above the level, with the
  level loaded through the EPP address field;
* a common-stop TDC readout with COM, WAK and REN as outputs, WST, BSY and
  PASS as inputs, and a PASS/REN daisy chain;
* four cyclic 4K buffers, with long events spanning several buffers and
  reads done oldest first;
* an EPP transfer with 0x0C meaning "event ready".

These points are this design's own choices:

* the delay depth of 64;
* clipping rather than wrapping the majority count;
* the 4-cycle trigger stretch;
* the 16-bit TDC word;
* active-high TDC lines and a 5-cycle COM pulse;
* the end-of-event rule;
* the buffer state encoding, tag and flags;
* the two header words and the byte order;
* the trigger-board register map and its reset values;
* the EPP cycle details;
* the readout clock.

Two further points are left out or simplified:

* The delay line samples the discriminator level once per clock cycle.
  Nothing stretches a pulse shorter than 10 ns, so such a pulse can be missed
  by the trigger. The TDCs still record it.
* Only the basic "count above level" trigger is built. Other trigger
  patterns that use the light of secondary heliostats were also mentioned,
  but they were not described in enough detail to build.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `trigger_fpga`, `trig_comm`, `majority_logic` | `N_CH` / `N_IN` | 80 | channels |
| `delay_line` | `DEPTH` | 64 | delay steps (10 ns each) |
| `delay_line`, `trig_comm` | `CODE_W` / `DELAY_W` | 8 | delay code bits |
| `majority_logic`, `threshold` | `SUM_W` | 6 | count bits (clip at 63) |
| `trigger_fpga` | `TRIG_W` | 4 | trigger stretch in cycles |
| `readout_fpga` and buffer blocks | `N_BUF` | 4 | buffers |
| `readout_fpga`, `dpram_4k`, … | `DEPTH` | 4096 | words per buffer |
| readout blocks | `W` | 16 | TDC word bits (must be a multiple of 8) |
| `tdc_ctl` | `COM_W` | 5 | COM pulse cycles |

The shared constants and the buffer-state enum are in `rtl/cactus_pkg.sv`.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.
`tb/epp_host.sv` models the host's parallel port. `tb/tdc_model.sv` models
one TDC on the control bus.

The end-to-end test runs `cactus_top` at full size. It programs the
trigger, fires aligned and misaligned showers, and reads every event back
byte by byte. It also checks that each mechanism happens at least once:

* below-level and misaligned showers that must not trigger;
* a saturated count;
* an event that spills into a second buffer;
* a trigger refused because the buffers are full (dead time);
* a truncated event;
* a read overlapping a write.

It takes about 20 s:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  rtl/cactus_pkg.sv rtl/*.sv tb/epp_host.sv tb/tdc_model.sv tb/tb_cactus_top.sv \
  --top-module tb_cactus_top -Mdir obj_top
./obj_top/Vtb_cactus_top
```

`tb/tb_daq_rate.sv` is a rate test of the readout board at full size. It
runs random trigger intervals, event sizes of 50 to 6000 words, and a host
that reads all the time, in two phases:

* At a mean interval of 5 ms, the board is dead (reading the TDCs) about 5%
  of the time, and every event arrives intact.
* At a much higher rate, the buffers fill and triggers are refused. Again,
  every accepted event arrives intact.

It takes about a minute.

To run another testbench, replace `tb_cactus_top` in both places. The block
testbenches for the readout board scale the buffers down to 8 or 16 words,
so that multi-buffer and overflow cases stay short.
