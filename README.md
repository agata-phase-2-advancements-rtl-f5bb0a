# AGATA phase-2 front-end firmware in SystemVerilog

AGATA is a gamma-ray tracking array built from segmented germanium crystals. For each
crystal 38 signals (segments and core) are digitised at 100 MS/s. The
phase-2 electronics reduce that stream to events in three stages:

1. The **PACE pre-processing firmware**, one per crystal, finds pulses and measures their
   time and energy. It keeps each triggered event until the global trigger has decided on
   it, and frames the surviving data for readout.
2. The **STARE readout firmware** takes those frames over four 10 Gbps links and sends them
   to the acquisition servers as UDP jumbo frames. A selective-repeat scheme resends any
   frame the server did not acknowledge, so no data is lost over a shared, lossy network.
3. The **GTS trigger processor** sits at the root of the timing/trigger tree. It collects
   timestamped trigger requests from up to 256 leaves (one leaf per crystal) and groups the
   leaves into 8 partitions. It then validates or rejects each request from multiplicity and
   coincidence conditions.

The top module `agata_ph2_top` holds one of each, side by side. The links between them run
through external hardware: Aurora serial links, the GTS tree, and Ethernet. They are
therefore ports of the top. The end-to-end testbench closes these loops with simple
behavioural models.

All logic runs on one clock: the 100 MHz GTS clock, so one tick is 10 ns. Reset is
active-low and synchronous (`rst_n`). Streams are 64 bits wide, with valid/ready and a
`last` flag on the final word of each packet.

## PACE pre-processing (`pace_firmware`)

```
agg lines (10) -> tdm_deagg x10 -> 38 x datapath (dcfd + mwd_energy)
                                        |  trigger channel
                                        v
                 gts_leaf <-> event_memory (8 slots) --+
                 long_trace (4000 samples x 38) -------+--> 4 x readout_engine --> Aurora ports
                 spectra (38 x 4096 bins) -------------+
                 monitor (one selected signal) --------+
```

### Sample transport

**De-aggregation (`tdm_deagg`).** A gearbox on the board merges four ADC links onto one
line. Ten such lines carry 40 sample slots, of which 38 are used. On each line the four
links' samples arrive in turn, and the first sample of each group carries a mark.
`tdm_deagg` rebuilds a group of four and emits it in one clock. A mark in the wrong place
counts an alignment error and forces a re-lock. One sample per channel arrives per group,
and the `smp_en` strobe that drives every later block marks these groups.

### Per-channel processing

**Discriminator (`dcfd`).** A fast difference d[n] = x[n] − x[n−DIFF] turns the
pre-amplifier step into a pulse. The two modes differ as follows:

- **CFD mode:** the block forms c[n] = d[n−D] − f·d[n], arms when d passes the threshold,
  and fires on the next rising zero crossing of c.
- **LE mode:** it fires when d itself crosses the threshold.

In both modes, linear interpolation between the two samples around the crossing gives the
fine time in 1/256 of a sample. Triggers are held off until the delay lines have filled
after reset.

**Energy (`mwd_energy`).** This is a moving-window-deconvolution trapezoid:

- Deconvolution: b[n] − b[n−M] + K·Σ(b over the last M samples), with K = 1/τ as a 24-bit
  fraction.
- A moving average of length L follows.
- M and L can each be up to 2000 samples (20 µs).

On the event trigger it waits `cfg_peak` samples and then latches the scaled trapezoid as a
16-bit energy. `datapath` pairs one `dcfd` with one `mwd_energy`. The trigger channel,
normally the core, starts the energy capture in every channel.

### Trigger and event storage

**GTS leaf (`gts_leaf`).** It keeps the local 48-bit timestamp, which can be loaded during
alignment. On a local trigger it sends a request `{leaf, ts}` up the tree, and it relays
the replies `{leaf, ts, accept}` to the event memory. It inhibits triggers, and counts each
inhibited one, while any of these holds:

- the readout back-pressures;
- the event memory has no free slot;
- a request is still waiting.

**Event memory (`event_memory`).** It has eight slots. A slot is taken on a trigger and
records 100 samples per channel (200 with `cfg_long`), including up to 64 pre-trigger
samples. It also stores the energies of all 38 channels, the timestamp and the fine time. A
validation whose timestamp matches a slot makes that event readable. A rejection, or no
answer within `cfg_timeout` samples, frees the slot.

### Data stores

- **`long_trace`** records the last 4000 samples of all 38 channels without stopping. On
  request it sends up to 4000 samples of one channel as one packet.
- **`spectra`** keeps 4096 bins per channel. The bin is the energy shifted right by
  `cfg_shift`. Energies that arrive while the memory is busy are counted as dropped.
  Clearing and readout happen on request.
- **`monitor`** captures a chosen internal signal of one channel into a 16384-entry memory
  and sends it as a numbered series of packets. The signal can be the raw sample, the CFD
  signal, the trapezoid or the energy.

### Readout

**Readout engines (`readout_engine`, four of them).** Each source is routed to one engine
(`cfg.route`). An engine serves its enabled sources round robin, one whole packet at a
time, and puts a header word in front of each packet. When it has nothing to send it
produces one-word control frames:

- IDLE after `cfg_idle_period` quiet clocks;
- System Off instead of IDLE while `sys_off` is high;
- Error after an `err` pulse.

### Frame formats

Readout frame (`readout_engine`), all words 64-bit:

| word | content |
|------|---------|
| 0 | `{type[7:0], engine[7:0], 16'h0, seq[31:0]}`; type 01 event, 02 long trace, 03 spectrum, 04 monitor, 10 IDLE, 11 Error, 12 System Off |
| 1.. | source payload, last word flagged |

Event payload: `{ts[47:0], fine[7:0], nsamp[7:0]}`, then ⌈38/4⌉ words of energies (four
16-bit values per word, channel 0 in bits 15:0), then the traces channel by channel, four
samples per word with the oldest in bits 15:0. Long trace, spectrum and monitor payloads
start with one word giving channel and length (see each file's header comment) followed by
packed 16- or 32-bit values.

## STARE readout (`stare_firmware`, four `stare_lane`s)

Each lane is an independent chain from one Aurora link to one 10 GbE port:

```
Aurora --> event_buffer --> package_slicer --> data stopper --+--> package_generator --> udp_tx --> MAC
data_generator ----------^ (selected per packet)               |        ^                  |
                                                    frame_store +--------+  (re-reads)      | tx_start
server ACK frames --> ack_parser ----------------------------------> rudp_core <-------------+
```

- **`event_buffer`**: two buffers used in turn ("double toggle"). One fills from the link
  while the other drains, so the link is only stalled when both are full. A buffer closes at
  the end of an incoming event or at its size limit, `cfg_buf_bytes`. The size is a multiple
  of 64 bytes and defaults to 8 kB.
- **`package_slicer`**: cuts each buffer into packets of at most 8192 bytes and numbers them
  with a 32-bit frame sequence number.
- **`data_generator`**: a test source that sends counter packets at full rate, by default
  8 kB each. A per-packet multiplexer picks either it or the Aurora input.
- **data stopper** (inside `stare_lane`): lets a new frame through only when `rudp_core` has
  room in its window (16 frames). Frames held here wait in the event buffer.
- **`package_generator`**: merges new frames with re-reads from `frame_store`. Re-reads win
  at packet boundaries.
- **`udp_tx`**: adds six header words to each frame:
  - Ethernet, IPv4 with checksum, and UDP with checksum 0;
  - one word of protocol data holding the sequence number, the payload length and a
    retransmit flag.

  The first header word marks the point at which the timeout starts (`tx_start`).

### Selective repeat (`rudp_core`, `frame_store`, `ack_parser`)

Each frame in the window goes through a fixed life cycle in `rudp_core`:

1. It is admitted by the data stopper.
2. Its timer is armed when its header leaves `udp_tx`.
3. It is either freed by an acknowledgement or, on timeout, queued for retransmission.

`frame_store` holds the last WINDOW frames on chip, indexed by sequence number, so that a
single frame can be replayed. The replay passes through `udp_tx` again, which re-arms the
timer.

`ack_parser` reads the server's acknowledgement frame. This is an Ethernet/IP/UDP frame whose
payload word is `{"ACK\0", seq[31:0]}`.

The acknowledgement format, the window size and the on-chip frame store are this design's
own choices. The selective-repeat logic can be switched off with `cfg_rudp_enable`; the lane
is then a plain UDP sender.

## GTS trigger processor (`gts_trigger_processor`)

```
requests {leaf, ts} --> ts48_reference (local 48-bit time)
                    --> 8 x tp_partition (multiplicity -> acceptance -> coincidence)
                    --> tp_logic_equation (256-entry table over the 8 coincidence flags)
                    --> tp_fifo_event (store, analysis window, validate / reject) --> replies
```

### Time reference (`ts48_reference`)

In manual mode (`cfg_mode = 1`) the local time starts at `cfg_delay`. In automatic mode
(`cfg_mode = 0`) the block learns the time instead:

1. It records requests until every selected leaf has sent `cfg_nb_samples` of them (100 is
   the reference setting).
2. It takes the oldest of the leaves' last timestamps.
3. It adds the clocks spent scanning, and counts on from there.

### Partitions (`tp_partition`)

Partition membership is a 256 × 8 bit map, and one leaf may belong to several partitions.
Each partition works in steps:

1. It counts member requests inside a multiplicity window.
2. When the count reaches `cfg_threshold`, it opens an acceptance window of
   `cfg_acc_width`.
3. It opens a coincidence window of `cfg_coinc_width`, delayed by `cfg_coinc_delay`.

A late request from a member leaf inside an open acceptance window is validated at once.

### Logic equation (`tp_logic_equation`)

`cfg_table[coinc]` gives the decision for every combination of the eight coincidence flags.

### Request FIFO (`tp_fifo_event`)

It stores every request and opens an analysis window of `cfg_timeout` clocks on the first
one. If the equation is met within that window, all stored requests are validated.
Otherwise they are all rejected once the window ends.

The trigger processor's own Aurora links are outside the design. Requests and replies are
valid/ready ports carrying the `gts_req_t` and `gts_reply_t` structs from `agata_pkg`.

## Simulating

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. A block testbench
usually overrides parameters to keep its run short. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_stare_lane \
    rtl/agata_pkg.sv $(ls rtl/*.sv | grep -v agata_pkg) tb/tb_stare_lane.sv tb/stare_server.sv
./obj_dir/Vtb_stare_lane
```

The package file goes first so that every module sees it; verilator warnings (width,
unused bits) do not stop the build when `-Wno-fatal` is added. The other
testbench helpersThe other
testbench helpers in `tb/` are:

- `adc_source.sv`: a behavioural pulse source with exponential tails that drives the
  aggregated lines;
- `stare_server.sv`: a server model that drops chosen frames, answers with acknowledgement
  frames and checks sequence continuity.

`tb_agata_ph2_top` runs the whole design at its default sizes: 38 channels, 8 slots,
4000-sample traces, 4096 bins, 4 lanes, 8 kB packets, 256 leaves and 8 partitions. It takes
about 15 s under Verilator. It plays one crystal against a modelled second leaf and goes
through these phases:

1. time-reference learning, with its time-outs;
2. coincident events (validated) and lone events (rejected);
3. back-pressure inhibit;
4. a switch to leading-edge mode;
5. long-trace, spectrum and monitor readout;
6. generator traffic.

All of it goes through the four STARE lanes to four server models, one of which drops every
fifth frame. The testbench counts 17 mechanisms and fails if any of them never occurred.

`tb_stare_rate` checks the design point of one lane: 50 kHz of 8 kB events is 2000 clocks
per event at 100 MHz. A default-size lane with reliable delivery on and a server that is
always ready takes 1081 clocks per event. That is 1024 payload words, 6 header words and
the buffer hand-over.

`tb_pace_rate` runs the pre-processing firmware at its default sizes at the 50 kHz
trigger rate. All 38 channels fire every 2000 clocks and the GTS model validates each
request 100 clocks later. An event frame is 962 words, so engine 0 has room to spare. No
trigger is inhibited, and all 16 events arrive with energies within 2 % of the pulse
heights, even though the tails pile up.

`tb_tp_array` runs the trigger processor at its full size: 256 leaves in 8 partitions. The
time reference learns from all 256 leaves. The test then sends bursts of requests, from one
partition up to 40 requests spread over all eight. It checks every answer against the
equation "at least two partitions in coincidence".

## How far the RTL follows the reference design

These parts follow the reference architecture:

- the block structure and its numbers: 38 channels, 10 lines with 4:1 multiplexing, MWD up
  to 20 µs, 8 event slots, 100/200-sample traces, 4000-sample long traces, 4 readout
  engines, 4 lanes, 8 kB buffers and packets, 256 leaves, 8 partitions, 48-bit timestamps;
- the trigger processor's chain: learning, partitions, logic equation and the FIFO with an
  analysis window;
- the life cycle of a frame under selective repeat.

These are this design's own choices:

- all bit-level formats: link marks, request/reply words, frame headers, payloads and the
  acknowledgement frame;
- the MWD fixed-point arithmetic and the CFD fast difference;
- the window size, FIFO depths and spectrum size;
- matching of replies by timestamp;
- the rule that a late request inside an acceptance window is validated at once.

These parts of the real system are not present:

- ADCs and analog parts;
- the serial links and their decoders (TLK gearbox, JESD204, transceivers, Aurora);
- the Ethernet MAC;
- IPbus, with its registers as plain ports;
- the SPI bridge;
- the DDR memory for very long traces (the replay memory is on chip instead);
- three of the four test-data generators: only the counter generator is built;
- the newer SMART timing protocol.

The test source produces one sample per channel every four clocks. It is therefore slower
than the real rate of four samples per line per clock. The logic works per sample strobe and
does not depend on that rate.
