# LCLS timing event system in SystemVerilog

An accelerator needs hundreds of devices to act at fixed moments relative to the
beam: klystrons, kickers, cameras, digitizers. This design sends those moments to the devices
as **event codes on one serial link**. An event generator (EVG) is
clocked by the 119 MHz accelerator reference. In each clock it sends one 16-bit word to
every event receiver (EVR) over a fiber fan-out. The word can hold one 8-bit event code.
Each EVR recovers the 119 MHz clock from the link. It looks the received code up in a table
and starts delayed trigger pulses. Everything runs on the recovered reference clock, so a
trigger's time relative to the beam is fixed to the clock: the
same code at the same delay always fires the same number of 8.4 ns clocks after the
fiducial that caused it.

The timing of a beam pulse comes from a **sequence**. The sequence is a list of
{timestamp, event code} pairs held in a RAM in the EVG. Each 360 Hz fiducial starts a
32-bit counter. When the counter reaches an entry's timestamp, the EVG sends that entry's code.

```
 476 MHz ──► Sync/Div ──clk119, fid──► EVG ──word──► serializer ──2.38 Gb/s──► (fan-out, fibers)
 360 Hz raw fid ─┘  │                  ▲  ▲                                          │
 120 Hz timeslot ───┘          CPU bus ┘  └ upstream EVG events                       ▼
                    └──TRD (119 MHz, one missing cycle per fiducial)──► TRD receivers
                                                  EVR: de-serializer ► demux ► mapping RAM ► triggers
                                                                           └► databus, 2K buffer ► irq
```

Every block of the logic is written here. The parts around it are analog, optical or
existing equipment:

- the 476 MHz master oscillator
- the fiducial demodulator
- the timeslot delay unit
- the transmit PLL and the receivers' clock and data recovery
- fibers and fan-outs
- VME CPUs
- the 20 ps fine delay
- level converters

These parts are ports of the top module `lcls_timing_top`, and the testbench plays them.

## Clocks and the Sync/Div (`sync_div`)

The EVG runs on 119 MHz = 476 MHz / 4. A free-running divide-by-4 can lock into any of
four phases when it powers up. Every trigger in the machine would then move by whole
clocks from one power-up to the next. So the divider is put back to phase 0 on each rising
edge of the 120 Hz timeslot trigger. `realign` pulses only when this actually moved the
phase, which happens once after power-up and again only if the divider slipped.

The raw fiducial is synchronized into the 476 MHz domain with two flops. Its rising edge
becomes a fiducial `fid` one 119 MHz clock long. It starts at a falling edge of clk119, so
the EVG samples it half a clock after it changes.

The same block makes the **TRD signal**: clk119 with the high half of the fiducial's clock
left out. The result is a square wave with one missing pulse per fiducial. It carries both the
clock and the fiducial on one wire to equipment that has no EVR.

`trd_rx` decodes the TRD signal. It samples the signal with a local clock (4× in the tests) and
counts samples since the last rising edge. When more than `GAP` = 6 samples pass without an edge, it
gives a one-clock `fid`. The output comes a fixed number of samples after the edge before the
gap.

## The link word

| bits | content |
|---|---|
| 15:8 | event code; K28.5 (comma) when there is no event |
| 7:0, even clocks | distributed databus: the 8 external hardware inputs (`mps_in`), sampled every clock |
| 7:0, odd clocks | data buffer channel: K28.0 idle, K28.2 start, data bytes, K28.3 end |

Both bytes are 8b10b coded, which gives 20 line bits per clock, or 2.38 Gb/s. Event code 0 means
"no event" everywhere in the design, so it is never sent as an event.

The receiver needs no separate framing:

- K28.5 is the only character with a comma, and it appears in the upper byte whenever there is no event. The EVR aligns its symbol boundary on it.
- The buffer channel always carries a K character except while data is flowing. So a K in the lower byte tells the EVR which clocks carry buffer data and which carry the databus.

## Event generator (`evg`)

### Sequence RAMs, counter, comparator and send control

There are two banks (`evg_sequence_ram`) of 2048 entries. Each entry is a 32-bit timestamp and an 8-bit code.
The CPU writes one bank while the other is broadcast. The bank selected in CTRL\[2]
takes effect at the next fiducial, never in the middle of a sequence.

The fiducial is synchronized again and edge-detected (`evg_trigger_logic`). This gives
`count_start`, which clears and starts the 32-bit counter (`evg_timestamp_counter`).
`evg_send_control` serves the entries in address order:

- The RAM output always shows the entry at `raddr`.
- When the counter equals that entry's timestamp (`evg_comparator`), the code is sent.
- In the same clock, `raddr` already moves to the next address. So entries with consecutive timestamps go out in consecutive clocks.

The end entry is code 0x7F, which is sent too, or the end of the last address. At the end,
single mode stops and waits for the next fiducial. Loop mode clears the counter and starts again at
address 0 without a new trigger.

Timestamps must increase strictly from entry to entry. An entry whose timestamp has already
passed would wait until the 32-bit counter wraps.

Latency: an entry with timestamp T is on the send control's output T + 2 clocks after the
`count_start` clock. It reaches the link word 2 clocks later: one clock in the priority
encoder and one in the link multiplexer.

### Priority encoder (`evg_priority_encoder`)

EVGs can be chained, with `up_event` coming from an upstream EVG. Only one code fits in a
word, so:

- When both streams have an event in the same clock, the upstream one is sent.
- The local event waits in a one-entry register until the next clock without an upstream event (`held`).
- A second collision while an event is waiting loses the older one (`dropped`).

Sequence designers should keep local events away from the times when upstream events are
sent.

### Data buffer (`evg_data_buffer`)

Software writes up to 2048 bytes and then writes the length to BUFSEND. In the next odd
slots the buffer sends K28.2, the bytes, then K28.3. With one byte every two clocks, a full
buffer takes about 34 µs.

### EVG registers

The CPU bus is `bus_req_t {we, re, addr[15:0], wdata[31:0]}`. It is synchronous to the EVG clock.
`rdata` is valid one clock after the read.

| address | register |
|---|---|
| 0x0000 | CTRL: \[0] enable, \[1] loop mode, \[2] bank to broadcast |
| 0x0001 | BUFSEND: write the number of buffer bytes to send |
| 0x0002 | STATUS: \[0] sequence running, \[1] bank being broadcast, \[2] buffer busy |
| 0x4000 \| field<<12 \| bank<<11 \| index | sequence entry. Field 0 is the timestamp, field 1 the code |
| 0x8000 \| index | data buffer byte |

## Serializer and de-serializer

This is the part to read carefully when changing clocks.

**`serializer`** encodes both bytes in the word-clock domain. The running disparity passes
from the upper symbol to the lower one and on to the next word. The 20 bits are registered.
A shift register on `bitclk` loads them every 20 bit clocks and sends them MSB first,
starting with bit `a` of the upper symbol. The load is made by a free-running counter in the bit-clock domain. So
`bitclk` must be exactly 20× the word clock and phase-locked to it, as a transceiver PLL
guarantees. In simulation the testbench makes it 5× clk476. The first bit of a word then
leaves 1 to 20 bit clocks after the word is registered. The offset is fixed once reset ends.

**`evr_deserializer`** works on the recovered bit clock. It keeps the last 20 bits. When the
first seven bits of the upper symbol look like a K28.5 comma, it takes the word boundary from
there. From then on it puts out a word every 20 bits.

The EVR's **word clock is made here**. It is a divide-by-20 of the bit clock, aligned so that it
rises 10 bit clocks after `code` changes. `code` is therefore stable around every rising edge.

The divider is not reset, so the clock runs through reset. A comma found off the current
boundary pulls the divider into line, and this can shorten one word-clock period while the
link locks. Once `locked` is set, the word clock is the EVG clock delayed by the fiber, and
every EVR output is synchronous to it.

`enc8b10b` and `dec8b10b` implement the standard 8b10b code tables. Only K28.x control
characters are produced and recognized. The decoder flags invalid codes but does not check
running disparity.

## Event receiver (`evr`)

### Demultiplexer (`evr_link_demux`)

The demultiplexer decodes both symbols. A K character or a code error in the upper byte gives
event 0. K characters in the lower byte set the odd/even phase, which splits the databus
(`dbus`, held between updates) from the buffer channel. All outputs are registered one word clock after
`code`.

### Mapping RAM (`evr_mapping_ram`)

The mapping RAM has 256 entries of 14 bits, addressed by the event code. A received code raises
the map bits of its entry for exactly one clock, one clock later. After reset the RAM clears
itself in 256 clocks (status bit 3). Hold the top's reset for 300 clocks so that no stale
entry fires.

### Triggers (`evr_trigger_logic`, `evr_pulse_gen`, `evr_level_latch`)

| output | count | driven by | delay / width |
|---|---|---|---|
| `trig` | 14 | map bit n | 16-bit delay, 16-bit width |
| `ext_trig` | 4 | map bits 0..3 | 32-bit delay (36 s at 8.4 ns), 16-bit width |
| `level` | 8 | two programmable map bits | set / reset latch |

A pulse generator's map hit in clock t makes its output active in clocks
t+1+delay … t+delay+width. Its polarity is selectable, and it is inactive when disabled.
A hit while a pulse is pending or active is ignored.

A level output is set by its `set_bit` map bit and cleared by its `rst_bit`. If both hit in
the same clock, set wins. Counting from the received word, a trigger fires 3 + delay word
clocks later: one clock for the demultiplexer, one for the mapping RAM and one for the output register.

### Receive buffer (`evr_data_buffer`)

K28.2 starts a buffer, data bytes are stored, and K28.3 ends it. `rx_len` then holds the byte
count and `irq` rises. `irq` is a level that stays high until software writes 1 to status bit 0.

### EVR registers

The EVR bus runs synchronous to the EVR's recovered word clock.

| address | register |
|---|---|
| 0x0000 | status: \[0] irq, \[1] locked, \[2] code error seen, \[3] mapping RAM clearing, \[27:16] rx length. Writing bit 0 = 1 clears irq |
| 0x1000 \| code | mapping RAM entry, 14 bits |
| 0x2000 \| r<<5 \| n | normal trigger n. r=0: {pol, en}, r=1: delay, r=2: width |
| 0x3000 \| r<<5 \| n | extended trigger n, same layout |
| 0x4000 \| n | level n: {rst_bit\[3:0], set_bit\[3:0], pol, en} |
| 0x8000 \| index | receive buffer byte |

## Top level (`lcls_timing_top`)

The top has these parameters:

- `NUM_EVR` = 2 receivers
- `NUM_TRD` = 2 TRD receivers

The clocks and signals at its ports:

- `clk476`, and `bitclk` (5× clk476, phase-locked)
- the raw fiducial and the timeslot trigger
- the EVG CPU bus, in the `evg_clk` domain
- `serial_out`
- each EVR's `evr_serial_in` and recovered `evr_rx_bitclk`
- the EVR CPU buses, each in its `evr_word_clk`
- all EVR outputs
- `trd_out`, and the TRD receivers' `trd_in` and sampling clock

The fan-outs sit between `serial_out` and `evr_serial_in`, and between `trd_out` and
`trd_in`. Connect them directly for a bench setup.

All resets are synchronous and active high.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_lcls_timing_top \
    -y rtl -y tb +libext+.sv rtl/lcls_timing_pkg.sv tb/tb_lcls_timing_top.sv
./obj_dir/Vtb_lcls_timing_top
```

`tb_lcls_timing_top` runs the whole system at its default sizes and takes a few seconds. It
loads both sequence banks and the data buffer, programs both EVRs, and applies a train of
fiducials. The two EVRs see different fiber delays. The test checks that:

- both EVRs receive exactly the events sent;
- each trigger fires at the same clock count after every fiducial.

It counts each mechanism and fails if any never happened. The mechanisms are divider
realignment, sequence start and end, bank switch, loop restarts, upstream collision, databus
words, buffer transfer and interrupt, normal, extended and level outputs, and TRD fiducials.

Other notable tests:

- `tb_evg_sequence_ram` fills all 2×2048 entries.
- `tb_evr_data_buffer` moves full 2048-byte buffers.
- `tb_evr_pulse_gen` runs a 70,001-clock delay.
- `tb_workload_delay_1s` programs an extended trigger to 119,000,001 clocks, which is just over one second. It checks the output to the clock. This test simulates for about a minute.
- `tb_enc8b10b` compares every code word with an independent table model.

## Own choices and limits

These points are choices of this design; the system description leaves them open:

- the register maps and buses, which stand in for VME and PMC
- upstream priority and the one-entry hold in the priority encoder
- the databus/buffer interleave and the buffer framing characters
- code 0 as "no event"
- the 16/32-bit delay split between normal and extended triggers
- extended triggers on map bits 0..3
- programmable set/reset bits of the level latches
- the TRD gap threshold
- the fiducial re-timing

These are not built:

- The 20 ps fine delay, the trigger jitter figure and the recovered-clock output of RF-type EVRs are analog properties.
- The fiducial demodulator, the timeslot delay unit, the SLC pattern receiver and the CPU software exist outside this logic.
- CPU read-back of the sequence RAM is not provided.
- No disparity-error checking in the EVR.
