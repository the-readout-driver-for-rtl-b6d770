# TGC readout driver (ROD) for one muon endcap octant

One octant of the ATLAS muon endcap trigger chambers (TGC) sends its
readout data over 13 front-end links. For every level-1 accept (L1A, up to
100 kHz) each link delivers one short fragment. Most fragments hold little
more than a header, because the data are partly zero-suppressed and the
chambers see about ten background hits per octant per trigger. The readout
driver (ROD) has several jobs:

- gather the 13 fragments that belong to each L1A;
- check that every front-end ASIC is still synchronised, by comparing its
  header event number with the one expected from the TTC (timing, trigger
  and control) system;
- expand the zero-suppressed hit bitmaps into individual hits;
- pass on the trigger words (on-chamber coincidence tracklets, HipT and
  Sector Logic words);
- wrap each event in the ATLAS ROD format and send it to the readout
  buffer (ROB) over S-Link;
- give the host computer sampled events, hits, tracklets and error
  messages for monitoring;
- raise RODBUSY to the central trigger only when its buffers really fill.

All of this fits in one FPGA. The structure is a set of independent,
variable-latency threads joined by FIFOs:

- each thread waits when its input FIFO is empty or its output FIFO is full;
- no stage runs in lock step with another;
- fragments of very different length flow through without a fixed
  pipeline schedule.

Every module here is written in synthesizable SystemVerilog.

## Data path

```
 link 0..12 (40 MHz each)      TTC (40 MHz)
   fe_link_input x13            ttc_l1a_queue
        |  record pipes              | {L1ID, BCID}
        v                            v
   fp_link_mux  <-- sel --  dispatcher <--> fp_pool (free FPs, busy links)
        |                     | order + event info pipes
        v                     |
 fragment_processor x4        |
        |  one output record pipe each
        v                     v
            event_builder  --> event record pipe
                                   |
                              rob_formatter --> monitor_sampler --> sampled / hit / tracklet pipes
                                   |
                              slink_output (32 MHz) --> UD, UCTRL_N, UWEN_N  (LFF_N, LDOWN_N)
```

Around this path sit several control blocks:

- `msg_arbiter` serialises error messages from the fragment processors and
  the event builder into the message pipe.
- `svc_controller` posts service calls to the host.
- `rodbusy_gen` watches the FIFO levels and drives RODBUSY.
- `vme_regs` is the host's register map.

`rod_top` wires everything together.

## Record pipes: how variable-length data moves

Almost every FIFO is a pair:

- a **data pipe** holding the words of a record;
- a **control pipe** holding one word `{flags, N}` per record.

The writer puts the N data words in first and then the control word. A
reader waits only on the control pipe. Once a control word is there, the
reader knows that exactly N words are ready and how many to take, and it
can decide in advance what to do with them.

`pipe` is the synchronous FIFO. It is first-word-fall-through: the head
word is visible before it is read. It can be written and read on every
clock, and it gives `count` (occupancy to one item), `almost_full` and
`almost_empty`. A thread "stalls" by not asserting `rd` or `wr` while the
pipe is empty or full. `record_pipe` is a data/control pair of `pipe`s.

In the original pipe object, a write always completes on its own clock,
and the writer stalls afterwards if the pipe has just become full. Here
the writer instead checks `full` before it writes, which is the usual
hardware form of the same rule. Both keep the same throughput, and
neither ever loses a word.

`async_pipe` is the dual-clock version. It has Gray-coded pointers with
two-flop synchronisers and an occupancy count on each side. It is used
in three places:

- between every link clock and the main clock;
- between the TTC clock and the main clock;
- between the main clock and the S-Link clock.

## Front end: `fe_link_input`

Each link runs in its own 40 MHz deserializer clock and presents 32-bit
words with `in_valid`, `in_sof` (header word) and `in_eof` (last word).

The header word is `{4'hA, fe_err[3:0], BCID[11:0], L1ID[11:0]}`. Each data
word carries a 2-bit type in bits [31:30]:

| type | meaning |
|------|---------|
| 00 | hit bitmap: [29:16] channel-group address, [15:0] bitmap |
| 01 | tracklet, passed through |
| 10 | trigger word (HipT, Sector Logic), passed through |
| 11 | illegal in the data; used for fragment headers on the output |

The receiver repairs framing errors instead of passing them on. Each of
these is flagged in the record's control word:

- a new header inside a fragment truncates the old fragment;
- an over-long fragment is cut at `MAX_WORDS`;
- a fragment that meets a full pipe keeps what fit;
- `link_err` during a fragment and front-end error bits in the header
  are recorded.

Words outside any fragment are dropped and counted. A fragment that
arrives while the control pipe is full is dropped whole and counted. Both
counters run in the link clock. They reach the main clock in Gray code
through two-flop synchronisers, and the host reads their sums over all
links as statistics. This
must not happen in normal running: the control pipe (128 entries) holds
more fragments than the L1A queue (64 entries) holds events, and RODBUSY
stops triggers first.

## TTC side: `ttc_l1a_queue`

The queue counts L1A, BCR (bunch-counter reset) and ECR (event-counter
reset) in the TTC clock. For every L1A it queues the expected event
`{L1ID[23:0], BCID[11:0]}`:

- the L1ID is `{ECR count[7:0], L1A count since ECR[15:0]}`;
- the BCID counts bunch crossings up to 3563.

A sticky overflow flag reports an L1A that found the queue full.

## The fragment farm

Thirteen links do not need thirteen decoders. Four fragment processors
(FPs) give enough throughput. Each link fragment is handed out, on the
fly, to whichever FP is free.

- **`fp_pool`** keeps the list of free FPs and answers with the
  lowest-numbered one. It takes an FP off the list on `alloc` and puts it
  back on that FP's completion `ack`. It also marks a link busy while an
  FP is reading it, so that no link pipe ever has two readers.
- **`dispatcher`** takes the next expected event from the TTC queue. For
  each enabled link, in ascending order, it waits for a free FP and a
  non-busy link. It then strobes that FP's request channel with
  `{link, L1ID}`.
- **`fp_link_mux`** routes the selected link's control and data pipes to
  each active FP. It asserts that no link is selected twice.
- **`fragment_processor`** handles one fragment at a time:
  - it reads the record and compares the header L1ID with the expected
    one (a mismatch is a loss of synchronisation);
  - it expands each bitmap into one hit word per set bit, one hit per
    clock, lowest channel first;
  - it copies tracklet and trigger words and drops illegal words;
  - it writes its own output record and acknowledges.
  
  A fragment with any error flag also produces a message. An FP writes at
  most `OUT_MAX` words per fragment; the rest is dropped and flagged.

**Keeping order.** The FPs finish in any order, but events must leave in
L1A order and fragments in link order. The dispatcher therefore writes two
things for the event builder:

- the event info `{L1ID, BCID}` when it takes an event;
- one order entry `{fragment, last, FP}` for every fragment it gives out.
  The last enabled link is marked `last`. An event with no enabled link
  gets a single entry with `fragment = 0`.

`event_builder` replays the order pipe. For each entry it waits for that
FP's output record, writes a fragment header
`{2'b11, link, flags[9:0], N}` and copies the N words. Writing the event
info at the start lets the builder drain the FP outputs while later
fragments of the same event are still being dispatched. Without this a
large event could fill the FP output pipes and lock the farm.

An event is limited to `EV_MAX` words, the capacity of the event data
pipe. A fragment that would exceed it is read and thrown away, and the
event is flagged `F_DROPPED`. The event status is the OR of all fragment
flags.

Flag bits (control words, fragment headers, event status):

| bit | flag | cause |
|-----|------|-------|
| 0 | LINK_ERR | deserializer error during the fragment |
| 1 | NO_HDR | fragment did not start with a header |
| 2 | TRUNC_IN | cut at the input (new header, too long, pipe full) |
| 3 | FE_ERR | front-end error bits in the header |
| 4 | L1ID_MISS | header L1ID differs from the expected one |
| 5 | BAD_WORD | illegal word type in the data |
| 6 | TRUNC_OUT | FP output limit reached |
| 7 | DROPPED | event builder dropped the fragment |

## Output format: `rob_formatter` and `slink_output`

Each event leaves as N + 15 words:

| word | content |
|------|---------|
| control | S-Link begin of fragment `0xB0F00000` (UCTRL_N low) |
| header 1-9 | `0xEE1234EE`, header size 9, format version `0x03010000`, source ID (`0x00670000`), run number, extended L1ID, BCID, trigger type 0, detector event type 0 |
| status | event status (the flag bits above) |
| data | N words: per fragment, a fragment header and its hits and trigger words |
| trailer 1-3 | number of status words (1), number of data words (N), status position (0 = before the data) |
| control | S-Link end of fragment `0xE0F00000` |

`slink_output` moves the stream into the S-Link clock through a dual-clock
FIFO. It writes `UD`, `UCTRL_N` and `UWEN_N` from registers, and it holds
off while `LFF_N` (link full) or `LDOWN_N` is low.

## Monitoring, messages and service calls

`monitor_sampler` taps the formatted stream without ever stalling it.
With a prescale of n it copies every n-th event into the sampled-event
pipe, without the S-Link control words. The event's hits also go to the
hit pipe and its tracklets to the tracklet pipe. The formatter hands the
sampler the event's data word count N with the first word. If the
sampled-event pipe has fewer than N + 13 free words, or the hit or
tracklet pipe fewer than N, the sample is skipped and counted. So a slow
host can never back-pressure the readout. A prescale of 0 turns
sampling off.

Message words are `{code[7:0], data[23:0]}`. Codes:

- `0x21`: a fragment processor saw an error. The data is
  `{link, flags, L1ID[11:0]}`.
- `0x31`: the event builder dropped a fragment.

`msg_arbiter` grants one writer per clock, round robin.

**Service calls (SVCs)** signal the host software. There are eleven
types, and the SVCID is the index plus 1. The SVCID alone tells the host
which pipe needs service:

| SVCID | condition |
|-------|-----------|
| 1 | message pipe not empty |
| 2 | sampled-event pipe not empty |
| 3 | hit pipe not empty |
| 4 | tracklet pipe not empty |
| 5 | message pipe almost full |
| 6 | sampled-event pipe almost full: it could not take an event of the largest size |
| 7 | hit pipe almost full |
| 8 | tracklet pipe almost full |
| 9 | a link input pipe almost full |
| 10 | loss of event synchronisation (sticky) |
| 11 | L1A queue overflow |

The protocol:

1. A polling loop scans the conditions round robin.
2. When the SVCID register is 0, the loop posts the first type at or
   after its position that has a true condition and no outstanding call.
   It marks the type outstanding, raises `svc_irq` and moves its position
   past that type. Every pending type is therefore posted before any type
   is posted twice. A loop that looked at one condition per clock could
   fall into step with a handler whose length is a multiple of the number
   of types, and then never post some of them.
3. The host's interrupt handler reads SVCID and clears the register. This
   lowers the interrupt and lets another type be posted.
4. The process that did the service writes the SVCID to SVCACK. Only then
   can that type be posted again.

Any number of types can be outstanding, but only one call of each.

## RODBUSY

`rodbusy_gen` watches 15 FIFO levels:

- the 13 link data pipes;
- the L1A queue;
- the event data pipe.

RODBUSY rises when any level goes above 3/4 of its depth. It falls only
when all levels are below 1/4. The hysteresis keeps busy rare and long
rather than frequent and short. The host can also force busy. The block
counts busy assertions and busy clock cycles.

## Host register map (`vme_regs`, word addresses)

| addr | access | content |
|------|--------|---------|
| 0x00 | R / W | SVCID; a write clears it |
| 0x01 | W | SVCACK |
| 0x02 | RW | link enable mask (reset: all enabled) |
| 0x03 | RW | sampling prescale |
| 0x04 | RW | run number |
| 0x05 | R | status {sync error, L1A overflow, RODBUSY} |
| 0x06 | W | bit 0 clears the sync error |
| 0x07 | RW | bit 0 forces RODBUSY |
| 0x08-0x0B | R | message, sampled-event, hit and tracklet pipe; a read pops one word |
| 0x0C | R | empty flags of those pipes |
| 0x20+i | R | occupancy of every FIFO, to one item (44 with the defaults; see below) |
| 0x60+i | R | statistics: events, dropped fragments, sampled, skipped, busy count, busy cycles, hits, fragments, link words outside a fragment, link fragments lost |

Occupancy index i, with L = `N_LINKS` and F = `N_FP`:

| i | FIFO |
|---|------|
| 0 .. L-1 | link data pipes |
| L .. L+F-1 | FP output data pipes |
| L+F | L1A queue |
| L+F+1 | event data pipe |
| L+F+2 | S-Link FIFO (main-clock side) |
| L+F+3 .. L+F+6 | message, sampled-event, hit, tracklet pipes |
| L+F+7 .. 2L+F+6 | link control pipes (records waiting) |
| 2L+F+7 .. 2L+2F+6 | FP output control pipes |
| 2L+2F+7 .. 2L+2F+9 | order pipe, event-info pipe, event control pipe |

The bus is synchronous to the main clock. Read data is valid on the clock
after `re`. A real VME interface needs a synchroniser in front of it.

## Clocks and sizes

The clock domains are:

- one per link (40 MHz);
- `ttc_clk` (40 MHz);
- `clk`, the main clock. Its rate is free; the testbench uses 50 MHz.
- `slink_clk`, up to 32 MHz.

Each domain has its own asynchronously asserted reset.

Default parameters of `rod_top`:

| parameter | default | meaning |
|-----------|---------|---------|
| `N_LINKS` | 13 | front-end links |
| `N_FP` | 4 | fragment processors |
| `LINK_LOG2` | 9 | deepest link data pipe (512 words); sets the occupancy width |
| `LINK_DEPTH_LOG2[l]` | 9 for every link | depth of each link's data pipe, at most `LINK_LOG2`; links reading busier chambers can be given deeper FIFOs |
| `FP_DEPTH` | 512 | FP output pipe |
| `EV_DEPTH` | 1024 | event pipe, so EV_MAX = 1023 |
| `HOST_DEPTH` | 2048 | sampled-event pipe |
| `HIT_DEPTH` | 1024 | hit and tracklet pipes |
| `MSG_DEPTH` | 256 | message pipe |

All memories together come to about 63 KiB. That fits the 70 KB of block
RAM of the Virtex XCV405EM that the original prototype used.

Rate budget at 100 kHz: about 55 input words per event. Each FP handles
one word per clock. The S-Link carries 128 MB/s against roughly 40 MB/s
needed.

The one case that does not fit is a tenfold safety factor applied to the
whole 22 MB/s input estimate. That gives 220 MB/s, more than one S-Link
can carry, so the ROD would then hold RODBUSY. A tenfold increase in
background hits alone fits.

## What follows the original design and what does not

These parts follow the original ROD:

- the partitioning into threads and FIFOs;
- 13 links and 4 FPs;
- dispatch on the fly with a free list and per-FP request and acknowledge
  channels;
- one output FIFO per FP;
- data/control FIFO pairs;
- the clock domains;
- the service-call protocol;
- host-readable pipes and occupancies;
- a message pipe with arbitration;
- RODBUSY;
- ATLAS ROD format output over S-Link.

These are this design's own choices:

- all word formats and flag bits;
- the L1ID and BCID construction;
- FIFO depths and limits;
- the order/event-info mechanism that keeps events in order;
- the drop and truncation policies;
- the sampling rule;
- the SVC list;
- the register map;
- the RODBUSY watermarks.

The ROD format words follow the common ATLAS ROD fragment layout. The
trigger type and detector event type are sent as zero.

Not built:

- the G-link deserializers, optics and TTC input buffers. Their decoded
  outputs are the top's ports.
- the board clocks, power and service PLD.
- the external ZBT SRAM, which the ROD function does not use.
- the fake-event transmitter use of the board.
- the host computer. The testbench models the host as a behavioural
  process.
- debug dumps of internal values into the message pipe. The message pipe
  and its arbiter are there; only the fragment processors and the event
  builder write to it.
- histograms of FIFO occupancy. The occupancies can be read, but nothing
  accumulates them.


## Simulation

Every block has a self-checking testbench in `tb/` (`tb_<block>.sv`). Each
one prints `TB_RESULT checks=<n> failures=<m>` and stops itself with a
watchdog if the design hangs.

`tb_rod_top` runs the whole ROD at its default parameters. What it sends:

- about 190 events on 12 links (link 12 is disabled);
- hash-generated fragments;
- a link error, a wrong L1ID, and an oversized event that triggers both
  FP truncation and event-builder drops;
- a stray word between two fragments, which must be dropped and counted;
- random S-Link flow control, then a long `LFF_N` stall that must raise
  RODBUSY;
- a final run at 100 kHz that must stay below 10 us from L1A to end of
  event.

What it checks:

- every S-Link word, against a reference model;
- that each mechanism happened at least once (drops, truncation, busy,
  stall, all four FPs in parallel, service calls).
- that samples get skipped. For part of the run the host model leaves the
  sampled-event pipe alone and sets the prescale to 1. The pipe then fills
  until SVC 6 (almost full) is raised and samples are skipped. Only after
  that does the host drain it again.

`tb_rod_slice` runs the same test on the configuration of the first system
test with chambers: `N_LINKS = 2` and `N_FP = 1`. The two fragments of
every event then go through the single fragment processor one after the
other, and the test checks that they never overlap. At 100 kHz the worst
L1A-to-end-of-event time there is about 2.5 us. The full-size run sees
about 5.6 us with 12 links. All widths follow `N_LINKS` and `N_FP`, down to
one fragment processor.

Run the full-size test with plain Verilator (5.x):

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    --top-module tb_rod_top -Irtl -y rtl rtl/rod_pkg.sv tb/tb_rod_top.sv
./obj_dir/Vtb_rod_top
```

The run takes a few seconds. For a block test, replace the top module
and testbench file, e.g. `--top-module tb_fragment_processor
tb/tb_fragment_processor.sv`.

Verilator reports some warnings, none of them errors:

- unused signals and parameters;
- `SYNCASYNCNET` on the per-domain resets;
- a few index truncations in the register decoders.
