# CoreSight trace to TeSSLa: an FPGA runtime-verification pipeline

An ARM processor with CoreSight can stream a compressed record of what it
executes through its trace port. On a Zynq-class system with two cores at
1 GHz this stream reaches a few hundred MB/s. No software monitor on the same
chip can keep up with that. This design decodes the stream in programmable
logic and turns it into timestamped events. It then evaluates a stream
specification in the TeSSLa language on those events in hardware, and writes
only the specification's outputs to a buffer for the processor to read.

The pipeline has four kinds of trace source:

- two PTM program-trace units, one per core, giving branch targets and
  process IDs;
- the ITM, for software writes to stimulus ports, used as cheap
  instrumentation;
- the FTM, for words written from the programmable logic.

The hardest parts to follow are the event timing model and the broom-wagon
mechanism. Both are described below, after the data path.

## Data path and clock domains

```
 clk_tpiu 200 MHz   tpiu_valid/tpiu_data (32 bit, <= 1 word / 2 cycles)
                          |
                    async_fifo 32->32 (IN_FIFO_DEPTH)
 clk_cs 125 MHz           |
                    frame_sync      16-byte frames, 48-bit frame timestamp
                          |
                    frame_parser    split by trace ID, 0..15 bytes per source
                 ___________|_______________________
                |           |           |           |
           sync_fifo   sync_fifo   sync_fifo   sync_fifo    (chunks)
           ptm_parser  ptm_parser  ftm_parser  itm_parser
            core 0      core 1      ID 0x70     ID 0x6F
                |___________|___________|___________|
                          |  124-bit (data word, timestamp word) pairs
                    timestamp_driver   broom wagons, final push
                 ___________|_______________________
           async_fifo 124->62, 2:1, x4 (TESSLA_FIFO_DEPTH)
 clk_tessla 50 MHz        |
                    demo_spec    input adapters, network, output adapter,
                          |      output filter (or count_spec, malloc_spec,
                          |      call_timing_spec)
                    async_fifo 64->32, 2:1 (OUT_FIFO_DEPTH = 64 Ki x 64 bit = 512 KiB)
 clk_tpiu 200 MHz         |
                    axi_rd_en/axi_rd_data/axi_empty (32 bit, low half first)
```

`rv_top` is the whole pipeline. Two things are outside it and appear as
ports: the trace-port capture and AXI register block that would surround it,
and the CoreSight hardware itself. Each domain has its own synchronous,
active-high reset.

The budget behind the clocks:

- 400 MB/s of raw trace at the port, which is above the 260 MB/s seen from
  two busy cores.
- 125 MHz in the parsers, so a 16-byte frame arrives every four parser
  cycles at most.
- 50 MHz in the TeSSLa network. This matches the TeSSLa-to-Verilog compiler
  output the design was planned around. Each input takes two cycles per
  event (timestamp word, then data word), which gives 25 M events/s per
  input.

## Frames and trace IDs

The trace port carries the CoreSight formatter's 16-byte frames.

`frame_sync` builds frames from four 32-bit words, with byte 0 in bits 7:0.
The word `0xFFFFFFFF` is a synchronisation word. It is counted, not passed
on, and it restarts frame collection, so a partial frame is thrown away. Each
frame is stamped with a free-running 48-bit counter of `clk_cs`. The stamp is
taken when the frame's last word arrives.

`frame_parser` decodes a frame in one cycle:

- Byte 15 holds an auxiliary bit for each even byte.
- An even byte with bit 0 set is a new 7-bit trace ID.
  - Aux bit 0: the ID applies from the next byte.
  - Aux bit 1: the ID change is delayed. The next byte still belongs to the
    old ID.
- Any other even byte is data `{byte[7:1], aux}`.
- Odd bytes are always data.

Bytes are routed by ID:

| ID   | source | TeSSLa input |
|------|--------|--------------|
| 0x10 | PTM core 0 | 0 |
| 0x11 | PTM core 1 | 1 |
| 0x70 | FTM | 2 |
| 0x6F | ITM | 3 |

Bytes with any other ID are dropped. Each source receives a "chunk" of 0 to
15 bytes with the frame timestamp (`rv_pkg::chunk_t`). A frame moves on only
when all four chunk FIFOs have room. That back-pressure reaches the input
FIFO, whose sticky `tpiu_overflow` flag reports lost words.

## Packet parsers

The three parsers share a structure:

1. A `byte_buffer` is appended with each chunk. Every byte keeps the
   timestamp of its frame.
2. The packet at the head of the buffer is measured, decoded and removed,
   one packet per cycle.
3. An `event_formatter` turns (timestamp, mux address, value) into the
   TeSSLa encoding.

A packet that spans two frames carries the timestamp of the frame holding
its last byte. A chunk is accepted only when the buffer has room for 15 more
bytes.

**PTM (`ptm_parser`).** All PTM packet types are recognised: A-sync, I-sync,
Atom, Branch address, Waypoint update, Trigger, Context ID, VMID, Timestamp,
Exception return and Ignore.

The parser tracks the last address and the instruction set state:

- I-sync loads a full address, and with it the ARM/Thumb state from bit 0.
- Branch and waypoint packets send only the low-order address bits that
  changed. The rest is taken from the last address. In ARM state the bits
  start at bit 2; in Thumb state they start at bit 1.
- A full five-byte branch carries a new state in its last byte. Its
  address is read in that new state. Shorter branches are read in the
  current state.

What is forwarded:

- Each branch or waypoint target address, as an event on mux address 0x00.
- The Context ID (process ID and ASID), on mux address 0x01, only when it
  differs from the last one sent.

The I-sync address updates the parser's state but is not sent.

The byte layouts in `ptm_parser.sv` are this design's reading of the PTM
architecture. Check them against the ARM PTM specification before relying
on them:

- the exception flag in bit 6;
- the instruction-set field in bits 5:4 of the fifth branch byte;
- a four-byte Context ID.

Jazelle state is not tracked.

**ITM (`itm_parser`).** A software stimulus write to port *p* (0 to 31)
becomes an event on mux address *p*, with the 1, 2 or 4 payload bytes as its
value. Sync, overflow, local and global timestamp, and hardware-source
packets are recognised and dropped.

**FTM (`ftm_parser`).** Each 32-bit trace word becomes an event on mux
address 0x00. The FTM packet encoding used here is assumed:

| packet | encoding |
|--------|----------|
| trace | `0x03` + 4 bytes, low byte first |
| trigger | `0x04` |
| cycle count | `0x0C` + bytes with bit 7 as continuation |
| overflow | `0x70` |
| first | `0x14` |

This block needs the vendor's packet definition before it can be used on
real hardware.

## Event timing and the 62-bit words

The time of an event is its frame's 48-bit parser-cycle count followed by a
4-bit extension. Up to 15 events decoded from the same frame can therefore
get distinct, increasing times. The extension is 0 for the first such event
and counts up after that. If it would pass 15, it stays at 15 and
`ext_saturated` is raised. One time unit is 1/16 of a parser cycle.

Every value that crosses into the TeSSLa domain is a 62-bit word:

| word | bit 61 | bits 60:53 | bits 52:0 |
|------|--------|------------|-----------|
| timestamp | 1 | 0 | time |
| data | 0 | mux address | value |

A parser writes a 124-bit pair `{data word, timestamp word}` in one cycle.
The 2:1 FIFOs hand the timestamp word to the network first. The output
buffer stores each output word as `{2'b00, word}` in 64 bits and gives the
low 32 bits first. `rv_pkg` has functions to build and take apart these
words.

## Broom wagons: keeping an idle input from stalling the network

A TeSSLa network can only compute at time *t* once it knows that no input
will still deliver an event before *t*. With one FIFO per source this means
one idle source blocks everything. A core might be asleep, or the FTM might
never be used.

`timestamp_driver` looks at the four parser outputs every cycle:

- No parser writes: nothing happens.
- Every parser writes: the events pass unchanged.
- Some parsers write: every idle output gets a *broom wagon*.
  - Its time is *t* − 16384, or 1 if *t* ≤ 16384. Here *t* is the time of
    the first writing parser, taking parsers in the order 0, 1, 2, 3.
    16384 units are 1024 parser cycles.
  - Its mux address is 0xFF and its value is 0x00C0FFEE.

So in each cycle either every FIFO is written or none is. 1024 cycles is far
longer than any parser pipeline, so a broom wagon never claims a time at
which its own parser could still produce an event. It can, however, lie
below a time already sent on that input.

`input_adapter` (one per input of the specification network) handles this on the TeSSLa
side:

- It drops any pair whose time is not above the last time it forwarded
  (`spec_filtered` counts these).
- It passes a broom wagon on as a time step that carries no data.

At the end of a program nothing pushes the last events through. So after
12,500,000 parser cycles (100 ms) without any event, the driver writes one
*final push* to all outputs. Its time is the last source time + 16 (one
cycle). An event arriving in that same cycle also ends the wait. This is
this design's choice, and it prevents a second push.

## The specification network

The original system compiles a TeSSLa source into a network of small
stream nodes. Here the network is written by hand, in four versions that
share the same FIFO-side interface. The `SPEC` parameter of `rv_top`
picks one:

- `demo_spec` (`SPEC = 0`, the default) is the system's reference test
  specification.
- `count_spec` (`SPEC = 1`) applies TeSSLa's `count()` to every input. It
  is the smallest example of a network and shows the mechanics in
  isolation.
- `malloc_spec` (`SPEC = 2`) checks that every allocated memory block is
  freed, with a set of 8 addresses.
- `call_timing_spec` (`SPEC = 3`) measures how long a request waits
  before it is processed, from function calls in the branch trace, and
  checks a bound.

All four contain the same four stages:

- **Input adapters.** One per input, described above.
- **Time step.** The network waits until every input offers an item. It
  takes the smallest time *t*min and consumes the items at *t*min from all
  inputs. A step therefore holds at most one real event per input.
- **Output adapter.** It writes the timestamp word of *t*min, then one data
  word for each output with an event at that time, in output-number order.
  The mux address of a data word is the output number.
- **`output_filter_adapter`.** It holds each timestamp word and forwards it
  only if a data word follows. Steps made only of broom wagons therefore
  leave no trace in the output.

Costs: a step without output takes one cycle, plus one cycle per data word.
An input delivers an item every two cycles.

### Reference specification (`demo_spec`)

The inputs, by TeSSLa input and mux address:

| input | mux address | stream |
|-------|-------------|--------|
| PTM core *n* | 0 | branch target address |
| PTM core *n* | 1 | Context ID |
| PTM core *n* | 3 | error stream |
| FTM | 0 | data word |
| FTM | 3 | error stream |
| ITM | 0 to 31 | stimulus port |
| ITM | 32 | error stream |

The instrumentation library gives the ITM ports these meanings:

| port | meaning |
|------|---------|
| 0, 1 | malloc, free |
| 2 to 5 | lock request, acquired, not acquired, unlock |
| 6 to 11 | read and write locks |
| 12 | barrier |
| 30, 31 | info, error |

The 52 outputs:

| outputs | value |
|---------|-------|
| 0 / 5 | address of core 0 / 1 |
| 1, 2 / 6, 7 | `count()` of addresses and of Context IDs, core 0 / 1 |
| 3, 4 / 8, 9 | thread ID `(ctx >> 8) & 0xFFFFFF` and ASID `ctx & 0xFF` |
| 10 to 13 | time since the previous address (cores 0, 1) and Context ID (cores 0, 1) |
| 14 to 19 | ITM ports 20 to 25 |
| 20 | FTM data |
| 21 to 33 | ITM ports 0 to 12 |
| 34 to 39 | thread ID `(v >> 24) & 0xFF` and lock address `v & 0xFFFFFF` of lock request, lock acquired, unlock |
| 40, 41 | ITM ports 30, 31 |
| 42 to 47 | `count()` of malloc, free, barrier, lock request, lock acquired, unlock |
| 48 to 51 | the four error streams |

Semantics:

- `count()` is 0 at time 0 and then the running number of events.
- A time difference has no event at the stream's first event. It is in
  1/16-cycle units.
- The Context ID outputs fire only when the parser sends a Context ID,
  which is when it changes.

In one step the network computes all 52 candidate values in one cycle into
a register file with a pending mask. A step with events on every input
writes at most 13 data words.

### `count()` network (`count_spec`)

```
c_i = merge(last(c_i, e_i) + 1, 0)     -- output c_i, mux address i
```

Time 0 gives the initial value 0 of all four counters. Each later event on
input *i* writes the new count on output *i*.

### Allocation set (`malloc_spec`)

An instrumented C library reports each `malloc()` result on ITM port 0 and
each `free()` argument on ITM port 1. Both are keys into a set of
`CAPACITY` = 8 slots. Each slot is empty or holds one address.

For one key the slots are walked in order 0 to 7 with a flag *f*, which
starts at 1 for malloc and 0 for free:

- an empty slot with *f* = 1 takes the key;
- a slot that holds the key is a hit; if *f* = 0 the slot is emptied;
- after a take or a hit, *f* is 0 for the rest of the walk.

If *f* is still 1 after slot 7, the set was full: an overflow. The whole
walk is one combinational chain, evaluated in a single 50 MHz cycle. The
chain is what limits the capacity: each slot adds a comparator and a mux.

Outputs (mux address = number):

| no. | name | when | value |
|-----|------|------|-------|
| 0 | n_allocations | time 0 and every key | occupied slots |
| 1 | overflow | malloc into a full set | 1 |
| 2 | never_overflow | time 0 and every overflow | 1, then 0 |
| 3 | all_allocations_freed | time 0 and every key | n_allocations = 0 and never_overflow |
| 4 | double_malloc | every key from the first malloc on | malloc and n_allocations unchanged |
| 5 | never_double_malloc | time 0 and every double_malloc event | no double_malloc so far |

A malloc of an address that is already in the set leaves the count
unchanged, and so does a malloc into a full set. Both are reported as a
double malloc, so that output means something only while never_overflow
holds. The set marks an empty slot with its own bit rather than a reserved
address value.

### Call timing (`call_timing_spec`)

A function call is a branch address on either core equal to the
function's entry point. Three entry points are parameters: `REQ_ADDR`
(a request is queued), `START_ADDR` (its processing starts) and
`FIN_ADDR` (it finishes). One register holds the time of the last
request call, and one holds the running verdict.

| no. | when | value |
|-----|------|-------|
| 0 | start call after a request | queueing time: start time minus last request time |
| 1 | finish call after a request | response time: finish time minus last request time |
| 2 | start call after a request | queueing time <= `LIMIT` |
| 3 | start call after a request | output 2 has been 1 at every start so far |

The default `LIMIT` is 10,000,000 time units, which is 5 ms at 16 units
per 125 MHz cycle. A start in the same step as a request is measured from
the request before it. With a single request register, the times are only right when a
request finishes before the next one is queued. Overlapping requests need
a tag per request and a map, which is not built here.

## Using the RTL

Shared types, widths, trace IDs and the word functions are in
`rtl/rv_pkg.sv`. Compile it first. Every other file holds one module, and
the file name is the module name.

Parameters of `rv_top` and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `IN_FIFO_DEPTH` | 512 | trace words |
| `TESSLA_FIFO_DEPTH` | 512 | event pairs per input |
| `OUT_FIFO_DEPTH` | 65536 | 64-bit words, 512 KiB |
| `CHUNK_FIFO_DEPTH` | 8 | frames per parser |
| `FINAL_WAIT` | 12,500,000 | idle parser cycles before the final push |
| `SPEC` | 0 | 0: reference specification; 1: `count()`; 2: allocation set; 3: call timing |

Only the output buffer size comes from the original system. The other FIFO
depths are choices.

`rv_top` also has status outputs:

- per-parser packet counters;
- synchronisation-word, broom-wagon and final-push counts;
- network step, event and filter counts;
- sticky overflow flags for every FIFO that can lose data.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Example run:

```
verilator --binary --timing --timescale 1ns/1ps -Wall -Wno-fatal \
  --top-module tb_rv_top -y rtl +libext+.sv -Irtl rtl/rv_pkg.sv tb/tb_rv_top.sv
./obj_dir/Vtb_rv_top
```

- `tb/tb_<module>.sv` tests one module against values computed in the
  testbench.
- `tb_rv_top` runs a two-core, ITM and FTM trace through the whole pipeline
  at default parameters. It packs the bytes into frames with sync words and
  with both immediate and delayed ID changes. It checks how many events
  each of the 52 outputs receives, every count value, the Context ID
  fields and the timestamp order. It also counts how often each mechanism
  occurs. It waits
  for the real 100 ms final push, which takes about 40 s of wall time.
- `tb_workload_nested_malloc` replays a trace with the packet counts of a
  recursive malloc test program: 55 I-sync, 183 branch and 15 atom packets
  on core 1, 13 of the branches to 0x10514. It checks that all 13 calls
  appear on the address output.
- `tb_workload_malloc_set` runs `rv_top` with `SPEC = 2` and a short
  `FINAL_WAIT`. It sends ITM malloc/free traffic for four program
  variants: balanced, one free missing, one extra allocation, and 12
  allocations into the 8-slot set. It checks the verdicts: only the
  balanced run has every allocation freed, and the last run reports four
  overflows and a double malloc.
- `tb_workload_call_timing` runs `rv_top` with `SPEC = 3`. It sends ten
  request/start/finish call triples as PTM branches on core 1, with
  millisecond gaps, once with queueing times of 1.1 to 3.4 ms and once
  with 8.9 to 12.0 ms. It checks every measured time to within 10 us, and
  that the 5 ms bound holds in the first run and fails in the second. It
  simulates about 0.2 s of trace and takes a little over a minute.

## What differs from the original system, and what is missing

- **The specification network.** The original system generates its
  networks with a TeSSLa-to-Verilog compiler. Here the reference test
  specification, `count()`, the allocation-set property and the simple
  call-timing property are written by hand instead. The networks for the
  other properties are not here. They check event-handler queueing with
  tags kept in fixed-capacity maps of 8 entries, and locks. Generated code can take the place of
  `demo_spec` through a thin wrapper, because the input adapters, output
  adapter and filter already behave as required.
- **Parser byte layouts.** PTM and ITM follow this design's reading of the
  ARM architecture documents. FTM uses an assumed encoding.
- **I-sync length.** I-sync packets are taken as 10 bytes, because the
  Context ID is a full 32 bits. The original system describes them as
  9 bytes. `CTXID_BYTES` changes this.
- **Not built.**
  - The trace-port capture.
  - The AXI register interface and the processor-side software.
  - Jazelle state.
  - PTM cycle-accurate mode.
- **Choices of this design.** FIFOs are plain Gray-code designs, not vendor
  IP. The depths other than the output buffer are choices. Time-extension
  saturation is handled as described above.
