# Super-AER FPGA: an address-event switch, mapper and serial-link tester

Neuromorphic chips (silicon retinas, cochleas, convolution and winner-take-all
chips) talk to each other with the Address-Event Representation (AER): every
time a neuron fires, its address is put on a shared bus with a REQ/ACK
handshake. Busy neurons send often and quiet ones rarely, so the bus carries
only activity. Building a system out of several such chips needs a hub.
The hub joins event streams, sends them on to several receivers, rewrites
addresses between one chip's address space and the next, and lets a computer
watch the traffic.

This RTL is the FPGA logic of such a hub, a board called Super-AER. It has:

- one parallel AER input and one parallel AER output;
- two serial AER (SAER) links in each direction over LVDS. One pair goes
  through external serializer/deserializer chips and the other is handled by
  the FPGA itself;
- an embedded Linux computer attached to FPGA pins (GPIO). It reads events,
  writes configuration, plays timed event sequences into the switch and
  reads timestamped event records out of it.

Inside the FPGA every incoming event goes through one path: **merge, then
map, then split**. A **sequencer** is one more input of that path and a
**monitor** one more output. The SAER links also have a **link-test mode**,
which sends a known word sequence and counts the words that come back wrong.

```
 AER-IN  --aer_in-------------\                             /--aer_out--------------> AER-OUT
 deser chip words --saer_rx----+--aer_merger--aer_mapper--aer_splitter--saer_tx---------------> ser chip words
 line in --saer_des--saer_rx--/|     (round     (lookup     |\ \--saer_tx--saer_ser--> line out
 cfg (CFG_SEQ) --sync_fifo--   |      robin)     table)     | \--aer_out--------------> GPIO (embedded computer)
           aer_sequencer-------/                            \--aer_monitor--sync_fifo--> mon_rd_* (embedded computer)
                 saer_pattern_gen / saer_checker replace the SAER traffic in link-test mode
                 cfg_regs: registers, table and sequence writes from the embedded computer
```

All logic runs on one clock, `clk`, which is 50 MHz on the board. Reset
(`rst_n`) is synchronous and active low.

## Address events and the parallel AER ports

An event is a 16-bit address (`aer_pkg::aer_addr_t`). The parallel ports use
the four-phase handshake: the sender raises REQ with the address stable, the
receiver raises ACK, the sender drops REQ, the receiver drops ACK. Both ends
are asynchronous to `clk`, so the incoming REQ or ACK passes a two-flop
synchronizer (`sync_2ff`).

- `aer_in` samples the address once the synchronized REQ is high. It offers
  the event downstream as valid/ready, and raises ACK **only after the event
  has been accepted**. A full pipeline therefore stalls the sending chip
  instead of losing its events. ACK rises on the 4th clock edge after REQ
  when nothing downstream stalls.
- `aer_out` puts the address out, raises REQ one clock later, and waits for
  ACK to rise and then fall. With a receiver that answers at once, one event
  takes 8 clocks (160 ns at 50 MHz). The same module drives the GPIO port.
  There the embedded computer's software polls REQ and writes ACK.

The board's block diagram labels the output bus "COMMAND" and the input bus
"DATA". Both carry the 16-bit event address here.

## Serial AER links

A SAER link carries 10-bit words. The external serializer chip takes one
word per clock and sends it as a 12-bit frame (start bit, 10 data bits, stop
bit). At 50 MHz that is 600 Mbps on the LVDS pair.

**Word format (this design's choice).** Each event becomes two words, high
byte first:

| bit 9 | bit 8 | bits 7:0 |
|-------|-------|----------|
| first (1 in the first word of an event) | valid (0 = idle word) | address byte |

When there is no event, the link sends idle words (all zeros). That gives
20 line-payload bits per event, or 25 M events/s on a link at 50 MHz.

- `saer_tx` packs events into words. It has a `word_ready` input, so it can
  feed a serializer that takes a word every clock (the chip, tied high) or
  only now and then (the FPGA serializer).
- `saer_rx` unpacks them. Idle words between the two halves are allowed. A
  lone second word, or two first words in a row, counts in `frame_errors`
  and the receiver resynchronizes. **A serial link has no backpressure.** If
  an event completes while the previous one is still waiting at the merger,
  the new event is dropped and counted in `overruns`. The sender on the far
  side must pace its traffic to what the outputs of this board can take.
- `saer_ser` / `saer_des` are the FPGA's own line coder for the direct
  link. They use the same frame as the chips: a start `1`, 10 data bits LSB
  first, a stop `0`. One bit is shifted per `clk`, so a frame takes 12
  clocks. The receiver hunts for a `1` to find the start bit. An idle word
  has only one `1` in its frame, so the receiver finds frame boundaries from
  idle traffic. A bad stop bit drops the word and counts in
  `line_frame_errors`. The receiver samples with the local clock. It does
  not recover the remote transmitter's clock, which the external chips do
  in their analog front end.

## Merge, map, split

- `aer_merger` joins the four inputs (0 = AER-IN, 1 = chip link, 2 = direct
  link, 3 = sequencer) with a round-robin arbiter into a registered output. It can pass one
  event per clock.
- `aer_mapper` is a lookup table of 2^`MAP_AW` entries (default 4096). Each
  entry is 18 bits, `{kind[1:0], address[15:0]}`:
  - kind 0: keep the address. Every entry is cleared to kind 0 after reset.
  - kind 1: replace the address with the entry's address.
  - kind 2 or 3: discard the event.

  Addresses at or above 2^`MAP_AW` pass unchanged, and so does everything
  while mapping is disabled. The table is a registered-read RAM, so the
  mapper adds one clock and passes one event per clock. **After reset the
  mapper spends 2^`MAP_AW` clocks clearing its table** (`init_busy` high).
  No event is accepted during that time.
- `aer_splitter` sends each event either to all outputs enabled in a 5-bit
  mask (broadcast) or to one selected output (unicast). The output
  numbering is 0 = AER-OUT, 1 = chip link, 2 = direct link, 3 = GPIO,
  4 = monitor.
  - The input is released only when every destination has taken the event.
    A per-output "done" mask keeps fast outputs from receiving it twice while
    a slow one is still busy.
  - As a result, the slowest enabled output sets the pace of the whole
    switch. That output is usually the software on GPIO, at roughly
    1 M events/s.

## Sequencer and monitor

Both use 32-bit words: the event address in bits 15:0 and a time in bits
31:16. Time is counted in ticks. A tick is one clock (20 ns) or, with MODE
bit 3 set, 16 clocks (320 ns).

**Sequencer** (`aer_sequencer`, input 3 of the merger). The embedded
computer writes words `{delay, address}` into a 512-word FIFO with
`cfg_sel = CFG_SEQ`. It should check `seq_fill` first, because a write into
a full FIFO is lost. With MODE bit 1 set, the sequencer takes words from the
FIFO and sends each event `delay` ticks after the previous one.

- The delays lie on a fixed time grid. The sequencer counts ticks from the
  *scheduled* time of the previous event, not from when it actually left.
  If the event path acknowledges an event late, the next delays are
  shortened until the sequence is back on the grid. `seq_lag` shows how far
  behind schedule the last event was.
- A delay of `16'hFFFF` is a pure wait: 65535 ticks, and no event is sent.
  It builds gaps longer than one word can hold.
- The shortest gap the sequencer can produce is 3 clocks. Shorter delays
  fall behind and are made up by later, longer delays.
- The first event leaves `delay` ticks after the sequencer is enabled.
  Clearing the enable stops it taking new words and restarts the schedule.

**Monitor** (`aer_monitor`, output 4 of the splitter). With MODE bit 2 set,
every event sent to output 4 becomes a record `{dt, address}` in a 512-word
FIFO. `dt` is the number of ticks since the previous record, or since the
monitor was enabled, and saturates at 65535. The embedded computer reads
the FIFO on `mon_rd_valid` / `mon_rd_data` / `mon_rd_ready`; `mon_fill`
tells how many records wait.

- A full monitor FIFO holds the event back, so with output 4 enabled the
  monitor never loses an event, but it can stall the switch if the software
  stops reading. Disable output 4 in the mask to monitor nothing.
- With the monitor disabled (MODE bit 2 clear), events sent to output 4 are
  taken and discarded, so the reset mask (all outputs) does not stall.

## Link-test mode

Setting bit 0 of register MODE switches both SAER outputs from events to a
counting 10-bit pattern (`saer_pattern_gen`). It also connects both SAER
inputs to `saer_checker` instances in place of the event decoders. With the
far end looped back, the checkers count good and bad words (`test_good`,
`test_errors`, `test_locked`; index 0 = chip link, 1 = direct link).

A checker predicts each word from the previous one, so it needs no knowledge
of the link latency:

- It locks after two consecutive words.
- It ignores stale words that were still in the link when the mode switched.
- A single corrupted or lost word costs exactly one error.

During the test, events for the SAER outputs wait in the splitter, which
stalls the event path if those outputs are enabled.

## Configuration port

The embedded computer writes through `cfg_we`, `cfg_sel`, `cfg_addr` and
`cfg_wdata` (32 bits, `cfg_regs`). One write takes one clock.

| `cfg_sel` | `cfg_addr` | effect of `cfg_wdata` | reset value |
|---|---|---|---|
| `CFG_REG` | 0 (MODE) | bit 0: link-test mode; bit 1: sequencer on; bit 2: monitor on; bit 3: tick = 16 clocks | 0 |
| `CFG_REG` | 1 (MAP) | bit 0: mapping enabled | 0 |
| `CFG_REG` | 2 (SPLIT) | bit 0: broadcast; bits 8:4: output enable mask | broadcast, mask 11111 |
| `CFG_REG` | 3 (UNISEL) | bits 2:0: unicast output | 0 |
| `CFG_MAP` | table index | bits 17:0: the table entry (applied one clock later) | - |
| `CFG_SEQ` | ignored | a sequence word `{delay, address}` for the sequencer FIFO | - |

A MODE write sets all four bits at once. Change the split settings only
while no event is in flight, because the splitter uses them
combinationally. Status (error and event counters, FIFO fill levels,
`seq_lag`, `init_busy`) is brought out as plain ports. How those ports reach the computer's GPIO
pins is left to the board-level wrapper.

## What is taken from the platform and what is this design's own

**Taken from the platform description:**

- the set of ports: AER-IN, AER-OUT, 2 SAER in and 2 SAER out, half of
  them through TI serializer/deserializer chips;
- the embedded computer attached on GPIO;
- the 50 MHz clock and 16-bit events;
- 10-bit SAER words and a 600 Mbps line rate;
- the idea that the FPGA both routes and remaps the address space;
- merger and splitter modes, unicast and broadcast;
- lookup-based one-to-one mapping;
- a link test that sends 10-bit words continuously and compares what comes
  back;
- the tasks of sequencing, monitoring and mapping. The sequence and monitor
  word format (16-bit time difference, 16-bit address), the x16 time scale,
  the maximum-wait word and the rule that makes up for late acknowledges
  come from an earlier PCI event interface whose functions this platform
  brings together.

**This design's own choices:**

- the four-phase handshake and the synchronizers;
- the merge-map-split structure and round-robin arbitration;
- the 2-words-per-event SAER format;
- the FPGA line coder and its one-bit-per-clock rate;
- the 4096-entry table (sized for the block RAM of a Spartan-3 400) and
  the entry format;
- the register map, the FIFO depths (512 words) and the encoding of the
  wait-only sequence word;
- the counting test pattern and the self-locking checker.

**Known departures and gaps:**

- **Event rate on a SAER link.** The platform quotes 31.25 M events/s at
  50 MHz, which is 16 bits per event, with no gaps between events. This
  packing gives 25 M events/s. The platform also quotes 1.32 Gbps for about
  66 M events/s, which is 20 bits per event. The 20-bit figure is the one
  followed here.
- **The direct SAER link runs at 1/12 of the chip link's word rate**, because
  it shifts one bit per `clk`. A real 600 Mbps direct link needs a fast
  bit clock or the FPGA's I/O serializers, plus clock recovery.
- **Mapping:** the replicated, one-to-several and probabilistic mapping modes
  of earlier mapper boards are not built. The table covers only the low
  2^`MAP_AW` addresses.
- **Sequencer and monitor time base:** a tick is a 20 ns clock here, not
  the 30 ns of the PCI interface. The monitor is a logger that may stall
  the switch, not a sniffer that listens without interfering. Frame-based
  event generation and the frame grabber are not built; the frame grabber
  runs as software on the embedded computer.
- **Scale:** the platform's later version aims at eight SAER links. This RTL
  has the prototype's set of ports, but `aer_merger` and `aer_splitter` take
  the number of ports as a parameter.
- **Not checked:** no timing analysis was done. Whether the design meets
  50 MHz or 66 MHz in the target FPGA is not checked.

## Files

- `rtl/aer_pkg.sv`: widths, word format, register numbers.
- `rtl/superaer_fpga.sv`: the top; it instantiates all of the following:
  - `rtl/aer_in.sv`, `rtl/aer_out.sv`, `rtl/sync_2ff.sv`: parallel AER ports;
  - `rtl/aer_merger.sv`, `rtl/aer_mapper.sv`, `rtl/aer_splitter.sv`: the
    event path;
  - `rtl/saer_tx.sv`, `rtl/saer_rx.sv`, `rtl/saer_ser.sv`, `rtl/saer_des.sv`:
    serial links;
  - `rtl/saer_pattern_gen.sv`, `rtl/saer_checker.sv`: link test;
  - `rtl/aer_sequencer.sv`, `rtl/aer_monitor.sv`, `rtl/sync_fifo.sv`:
    timed event playback and timestamped recording;
  - `rtl/cfg_regs.sv`: configuration.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

`tb/tb_superaer_fpga.sv` runs the whole design at its default parameters. It
surrounds the FPGA with models of the devices around it:

- an AER sender and receiver;
- the embedded computer, which acknowledges each event 38 clocks (760 ns)
  after REQ and reads the monitor FIFO at a random pace;
- the serializer/deserializer chip pair at word level;
- the far end of the direct line.

The test does the following:

- It clears and loads the mapping table.
- It drives all three external inputs at once.
- It checks that every output receives exactly the events that a model of
  mapping and splitting predicts. It covers broadcast, unicast to each
  serial output, the monitor, and mapping on and off.
- It plays a timed sequence to AER-OUT and the monitor. The time field of
  every monitor record must equal the delay written into the sequence.
- It forces a serial-input overrun.
- It runs the link test cleanly, then with one corrupted word on each link.
- It counts each of these mechanisms, and fails if any of them never
  happened.

## Simulating

The testbenches need Verilator 5 with `--timing`:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/aer_pkg.sv tb/tb_superaer_fpga.sv --top-module tb_superaer_fpga
./obj_dir/Vtb_superaer_fpga
```

Replace `tb_superaer_fpga` with any other `tb_<module>` to test one block.
Each run finishes in well under a second. To change the table size, set
`MAP_AW` on `superaer_fpga` (and on `MAP_AW` in the top testbench's model).
A smaller table also shortens the clearing time after reset.
