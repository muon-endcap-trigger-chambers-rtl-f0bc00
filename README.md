# TGC Read-Out Driver FPGA

The muon endcap Thin Gap Chambers send their Level-1 data over optical
links. Each link carries exactly one *event record* per Level-1 Accept (L1A),
and the link has no flow control. The Read-Out Driver (ROD) does four things:

- it gathers the records of several links into one event;
- it checks each record against the event identity it counts for itself from
  the TTC signals;
- it turns the 8-bit cell bitmaps into hits and short track segments
  (*tracklets*);
- it sends each formatted event to the ROB over S-link.

A side path copies samples of hits, tracklets and whole events to monitor
FIFOs for a control processor. When the ROD's buffers fill, it raises BUSY
to stop triggers.

This repository is SystemVerilog for the ROD's main FPGA in its prototype
configuration: four front-end links, one S-link output and a local bus for
control. The whole FPGA is built. The external parts of the board are ports:

- the link deserialisers;
- the TTC receiver;
- the look-up-table SRAM;
- the S-link source;
- the VME interface.

## Data flow in one paragraph

The TTC domain counts bunches and L1As and queues one event ID per L1A. Each
link's gate keeper cuts the incoming halfword stream into records and queues
them. The parser takes the next event ID and walks the links in turn.

- For each link it reads that link's record, checks it, and writes the raw
  halfwords and the 8-bit cells into FIFOs.
- Two branches consume the cells:
  - *hit extraction and translation* turns every set bit into a wire/strip
    word through the LUT;
  - *tracklet extraction* maps each cell to a road and layer through the LUT,
    then reports roads with enough layers hit.
- The formatter joins the hit, tracklet and raw branches of one event and
  sends the event to the S-link.
- BUSY watches the link FIFOs and the event-ID queue.

```
 TTC ──► ttc_evid ──► EVID / TrigType FIFOs ──► build_evid ─┐
                                                            ▼
 link0..3 ─► gate_keeper ─► event CW + data FIFOs ──► sync_parse ──► raw CW+data ──────────────┐
                (×4)                                     │ └──► cell CW+data ─► extract_hits ─► translate ─► hit CW+data ─┤
                                                         │                      └─► sampler ─► hit monitor      │ (LUT)  │
                                                         └──► cell CW+data ─► extract_tracklets ─► tracklet CW+data ───────┤
                                                                (LUT)           └─► sampler ─► tracklet monitor           ▼
                                   local bus ─► lb_bridge ─► ilb_regs        format_rob ─► sample_control ─► event monitor
                                                  (config, status, LUT load)     │
                                                                          output FIFO ─► slink_control ─► S-link
```

## Clock domains and the FIFO-pair rule

The FPGA has five clock domains, all separate ports of `rod_top`:

| clock | what runs on it |
|---|---|
| `clk_ttc` | the bunch clock: BCID, L1ID, orbit and trigger-type capture |
| `clk_link` | the link receive clock: the four gate keepers |
| `clk` | the core: everything from the parser to the formatter, BUSY and the register file |
| `clk_slink` | the S-link output |
| `clk_lb` | the board local bus |

Domains meet only in dual-clock FIFOs (`async_fifo`). These use Gray-coded
pointers through two-flop synchronisers. All four links share one receive
clock here. Real G-link receivers recover one clock per link, and then each
gate keeper would need its own clock input.

Every stage has a latency that depends on the data, so neighbouring stages
are joined by a *pair* of FIFOs:

- a **data FIFO** holds any number of items, and an end mark closes each
  event;
- a **CW FIFO** (control word) holds one fixed-size word per event: the event
  ID, eight error flags and an item count.

A reader that needs a whole event's summary first waits for that event's
CW. It then reads data items up to the end mark.

A full FIFO stops its writer. Back-pressure therefore runs from the S-link
back up to the link FIFOs. Nothing can stop the links, so the gate keeper
has to decide what happens when they fill:

- an event that arrives with no room left is **dropped whole** and counted;
- a record that overfills its FIFO mid-event is **truncated** and flagged.

BUSY is meant to prevent both.

One rule follows from the FIFO pairs and is easy to miss. The formatter
cannot send an event's header until it has that event's hit count, and the
count only arrives when the Hit CW is written after the last hit. So a
single event's hits must fit in the Hit data FIFO:

- `translate` keeps at most `MAX_HITS` hits per event (the FIFO depth less
  one) and flags the event as truncated;
- `sync_parse` applies the same limit to raw data (`RAW_MAX`).

Without these limits an oversized event locks the pipeline.

## Front-end record and what is checked

Links carry 16-bit halfwords with a control flag. A record is framed by two
32-bit control words, each sent as two flagged halfwords:

- `B0F0 rrrr` opens it and `E0F0 rrrr` closes it;
- `rrrr` is the sender's error field, and a non-zero value is a link error.

Inside the frame are bytes:

| bytes | content |
|---|---|
| 1 | record type (3 bits) and version (5 bits). Type 1 has three bitmaps per cell: central, previous and following bunch. Type 2 has the central bitmap only |
| 1 | `0000` and the LDB ID |
| 3 | 24-bit map of Slave Boards; a 0 means the board did not answer |
| per Slave Board | `000` and board ID (0–17); BCID high 8 bits; BCID low 4 bits and L1ID low 4 bits; then per non-empty cell: `000` and cell address (0–20), then one or three bitmaps; then `DF` |
| 0–3 | padding `B3` to a 4-byte boundary |
| 4 | end marker `FCFCA55A` |

`sync_parse` checks each record byte by byte. It sets these error flags,
each counted in a 16-bit saturating counter:

| bit | flag | meaning |
|---|---|---|
| 0 | time-out | a link delivered no record within `TIMEOUT` core cycles |
| 1 | format | a byte that the grammar above does not allow, or a record that ends early |
| 2 | BCID | a Slave Board's BCID differs from the TTC count at the L1A |
| 3 | L1ID | a Slave Board's 4-bit L1ID differs from the TTC count |
| 4 | missing board | a board selected by the `sb_mask` register has a 0 in the map |
| 5 | link | non-zero `rrrr`, or broken framing, or a record closed by a re-sync |
| 6 | truncated | record cut at the link FIFO, or the event's hits or raw data over their limit |
| 7 | type | record type other than 1 or 2 |

After a format error the parser skips the rest of that record. The event is
still built from what came before the error, so every L1A produces exactly
one output event.

## Hits and tracklets

**Hits.** For each cell, `extract_hits` ORs the bitmaps:

- the central bitmap alone for type 2;
- central, previous and following together for type 1.

It then emits one 15-bit channel number per set bit: `{link 2, board 5,
cell 5, bit 3}`.

`translate` reads the LUT at `{0, channel}`. In the returned 36-bit word:

- bit 35 means "connected";
- bits 31:0 are the wire/strip word that goes into the output.

Hits on unconnected channels are dropped.

**Tracklets.** `extract_tracklets` reads the LUT once per cell, at
`{1, 0…, link, board, cell}`. In the returned word:

- bit 35 is "valid";
- bits 33:32 give the layer;
- bits 7:0 give the road;
- bit 34 marks the road as needing 3 of 4 layers.

Over the event it ORs the layer into a 4-bit mask per road. At the event's
end it scans the roads. A road passes with 2 layers hit, or with 3 when the
road is marked 3-of-4. That is the 2-of-3 triplet and 3-of-4 doublet-pair
coincidence. Each passing road gives one word: `{19'b0, 3of4, mask[3:0],
road[7:0]}`.

The whole road/layer geometry lives in the LUT, so software defines it. The
SRAM is shared through `lut_arb` with the translator and the register file,
which loads the LUT.

## Output event

`format_rob` writes 33-bit words `{ctrl, data}`:

```
ctrl  B0F0_0000
      L1ID  {ECR count[7:0], L1ID[23:0]}
      {BCID[11:0], trigger type[7:0], error flags[7:0], 0000}
      {hit count[15:0], tracklet count[15:0]}
      {raw halfword count[15:0], 0000_0000_0000_0000}
      hit words … tracklet words … raw halfwords two per word (high first, odd one padded with 0)
ctrl  E0F0_00 & error flags
```

This layout is the design's own; no standard ROB header is implemented. The
error flags are the OR over all links of the event.

`slink_control` moves one word per S-link clock to `ud`/`uctrl`/`uwen`
while `lff` is low. An `xoff` pulse stops it until an `xon` pulse.

## Monitoring and BUSY

**Monitors:**

- the hit and tracklet monitors copy one of every *prescale*+1 words;
- the event monitor copies whole events picked by any of:
  - a prescale counter;
  - a chosen BCID;
  - a chosen trigger type.

An event is picked only if the monitor FIFO has at least 64 free places. One
that overfills anyway is cut, and the cut is counted. Sampling never stalls
the main path.

**BUSY** uses hysteresis so that it toggles as rarely as possible:

- it rises when any link data FIFO reaches the high mark (default 384 of
  512 halfwords) or 12 event IDs are queued;
- it falls only when every watched level is back under its low mark
  (default 128, and 8 event IDs).

Software can force BUSY on.

## Running without a TTC

For bench tests the FPGA can stand in for its own inputs. `ttc_sim`
replaces the TTC inputs when control bit 14 is set:

- a BCR every 3564 bunch clocks (one LHC orbit);
- an L1A every *period* bunch clocks, held while BUSY is high;
- a trigger type from a counter, three clocks after each L1A.

Before clearing bit 14, set the period to 0 and wait a few clocks;
otherwise the trigger type of the last L1A is lost and the event-ID
queue loses step. Test halfwords can be pushed into any link receiver, and
test event IDs into a queue that replaces the TTC one (bit 13). Together
these build a complete event with neither TTC nor links. Test words can
also be written straight into the output FIFO.

## Registers

The board local bus (21-bit address, 32-bit data, `lb_cs`/`lb_wr`/`lb_ack`)
crosses to an internal bus of 6-bit address and 16-bit data. Only address
bits 5:0 and data bits 15:0 are used. Address 0 does nothing.

| addr | write | read |
|---|---|---|
| 1 | control: [3:0] link enable, [4] raw data in output, [5] links take test data, [6] output takes test data, [7] hit, [8] tracklet, [9] event sampling, [10] select by BCID, [11] select by trigger type, [12] force BUSY, [13] event IDs from the test event-ID FIFO instead of the TTC, [14] TTC signals from the internal TTC simulator. Reset value `000F` | same |
| 2 | re-sync all links | – |
| 3 | BC offset loaded at BCR | same |
| 4, 5 | Slave Board mask [15:0], [23:16] | same |
| 6, 7, 8 | event, hit, tracklet prescale | same |
| 9, 10 | sampling BCID, trigger type | same |
| 11, 12 | LUT address [15:0], [18:16] | same |
| 13, 14, 15 | LUT data [15:0], [31:16], [35:32]; writing 15 stores the word and advances the address | same |
| 16 | push a test halfword to the link chosen in 17 | – |
| 17 | test config: [1:0] link, [2] control flag | same |
| 18, 19 | output test word [15:0], [31:16]; writing 19 pushes it, with the control flag from 17 | same (18) |
| 20, 21 | BUSY high and low marks for the link FIFOs | same |
| 22, 23 | test event ID: L1ID [15:0], [31:16] | same |
| 24, 25 | test event ID: BCID; trigger type, and the write pushes the ID into the 16-deep test event-ID FIFO | see the next row |
| 26 | period of simulated L1As in bunch clocks (0 = none) | see the next row |
| 27 | status word (0–23) shown on the `la_out` logic-analyser pins | see the next row |
| 24/25, 26/27 | – | hit / tracklet monitor word (reading the high half pops) |
| 28/29/30 | – | event monitor word [15:0], [31:16], control flag (reading 30 pops) |
| 31 | – | {event, tracklet, hit} monitor empty |
| 32–39 | writing 32 clears all error counters | error counters, in the bit order of the error table |
| 40–63 | – | status words, listed below |

The status words at 40+n are:

| n | meaning |
|---|---|
| 0–3 | link data FIFO levels |
| 4–7 | link CW FIFO levels |
| 8 | event-ID FIFO level |
| 9 | output FIFO level |
| 10–12 | hit, tracklet and event monitor levels |
| 13 | {XOFF stop, event ID valid, BUSY} |
| 14 | events sampled |
| 15 | BUSY cycles |
| 16 | event samples cut |
| 17, 18 | hit and tracklet samples lost |
| 19 | XOFFs received |
| 20–23 | events dropped per link |

Words 19–23 come from other clock domains without synchronisation. Read them
twice and keep a value that repeats.

Configuration registers reach the other domains directly. So change link
enables, test modes, raw enable and the mask only while no event is in
flight.

## How far to trust it, and where it goes its own way

**From the specification:**

- the structure of five clock domains joined by FIFOs;
- the CW/data FIFO pairs and writers blocked on full;
- the record format and its framing words;
- the 12-bit BCID and the 24+8-bit event number;
- the TTC inputs and the BC offset;
- the LUT bus width (19-bit address, 36-bit data);
- the internal-bus width, with address 0 as a no-op;
- the hit OR over ±1 bunch;
- 2-of-3 / 3-of-4 coincidence for tracklets;
- sampling by BCID and trigger type;
- BUSY when buffers fill;
- XON/XOFF flow control;
- test data loaded into the input and output link FIFOs, and test event
  IDs that stand in for the TTC;
- TTC signals simulated inside the FPGA;
- output pins for a logic analyser, here one status word at a time.

**This design's own choices:**

- all widths of internal words, and the error-flag list;
- the register map;
- every FIFO depth;
- the LUT word layouts;
- the tracklet word;
- the output header;
- the fragment time-out;
- the drop and truncate policy;
- the BUSY marks;
- the re-sync behaviour;
- the simulated TTC pattern: a fixed L1A period and a counting trigger type.

A re-sync closes any record a gate keeper has open and waits for the next
begin word. It does not realign links that have slipped by whole events.
Recovery after such a slip needs a reset.

**Not built:**

- readback of all flip-flops and memories through the configuration port,
  which is a feature of the FPGA device rather than of its logic;
- a standard ROB header;
- the 13-link final ROD.

The final ROD means `N_LINKS` = 13, and then the 2-bit link field in channel
numbers and LUT addresses must grow.

**Throughput at an assumed 40 MHz on every clock:**

- links: one halfword per link clock each;
- parser: one byte per core clock for all links together, 40 MB/s;
- hit translation: one hit per five core cycles;
- tracklet scan: one road per cycle at each event's end;
- S-link: one 32-bit word per S-link clock.

An octant at 100 kHz produces about 0.9 M hits/s and about 30 MB/s of raw
plus hit data, so these rates fit. With a tenfold safety factor on hits,
the core clock needs about 50 MHz. At its defaults the design uses about
2.7 k flip-flop bits and about 146 kbit of block RAM (coarse synthesis).

## Files

`rtl/` holds one module or package per file:

| file | contents |
|---|---|
| `rod_pkg` | shared types and constants |
| `sync_fifo`, `async_fifo` | FIFOs |
| `rst_sync` | reset synchroniser |
| `ttc_evid`, `build_evid` | event identity |
| `ttc_sim` | TTC signal generator for tests |
| `gate_keeper` | link receiver |
| `sync_parse` | parser and checker |
| `error_counters` | error counters |
| `extract_hits`, `translate` | hit branch |
| `extract_tracklets` | tracklet branch |
| `lut_arb` | LUT bus arbiter |
| `format_rob` | output formatter |
| `sampler`, `sample_control` | monitoring |
| `slink_control` | S-link output |
| `busy_ctrl` | BUSY |
| `ilb_regs`, `lb_bridge` | register file and local-bus bridge |
| `rod_top` | the FPGA |

Each file opens with a comment on its interface and timing.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus:

- `rod_tb_pkg.sv`: random front-end records and their expected cells and
  hits;
- `lut_sram_model.sv`: a synchronous SRAM model. Unwritten words read as
  `{addr[2:0] != 7, 000, addr*3 + 0x100}`.

`tb_rod_top` runs the whole FPGA at its default sizes. It:

- drives five free-running clocks, a TTC model that holds L1As while BUSY is
  high, four random links, an S-link receiver with LFF and XOFF, and the
  local bus;
- compares every output word with events built independently from the
  records;
- injects one of each error kind, a time-out, test data, a test event ID, a
  re-sync and an overfull record;
- runs a few events from the internal TTC simulator;
- prints how often each mechanism happened.

`tb_rod_rate` runs the same FPGA under the readout's event rate:

- L1As at 100 kHz, then 400 kHz;
- a record of about 20 bytes per link and L1A, the size of the busiest link
  type of an octant;
- raw data switched on, with a 100 MHz core and a 62.5 MHz S-link.

It checks that every event comes out in order without error bits, that no
event is dropped, and that BUSY stays low at 100 kHz. In this setup BUSY
stays low at 400 kHz as well. The longest time from L1A to the event's last
S-link word is about 4 µs.

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  --top-module tb_rod_top rtl/rod_pkg.sv tb/rod_tb_pkg.sv tb/tb_rod_top.sv -o sim
./obj_dir/sim
```

For other testbenches, change the top module and the last file. Add
`tb/rod_tb_pkg.sv` only where the testbench imports it. Verilator simulates
two-state logic, so every testbench resets or initialises everything it
reads.
