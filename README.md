# Pixel converter event buffers with a memory-mapped router interface

A silicon pixel detector sector is read out by six pixel converter daughter
boards, one per half stave. Each board receives the event data of its half
stave over an optical link, stores up to eight complete events, and lets the
pixel router fetch them. The router does not pop a FIFO: it reads the event
memory as ordinary addressed memory, as often as it likes, and tells the board
explicitly when an event may be discarded by writing a *flush* register. This
keeps the data available for algorithms that want to look at an event more
than once.

This repository holds synthesizable SystemVerilog for the board side of that
interface: the six boards on one router bus, and inside each board the event
memory, the writer that fills it from the link, the per-event control words,
the flush and test/run registers, and the bus port.

## Address map

The router drives a 22-bit address. Bits 21..19 pick the half stave (board
0..5); bits 18..0 are the board's own address:

| target            | 21..19     | 18 | 17 | 16 | 15..0                 | access |
|-------------------|------------|----|----|----|-----------------------|--------|
| event memory      | half stave | 0  | 0  | 0  | word address          | read; write in test mode only |
| control word 0    | half stave | 0  | 0  | 1  | event index in 2..0   | read   |
| control word 1    | half stave | 0  | 1  | 0  | event index in 2..0   | read   |
| flush event       | half stave | 0  | 1  | 1  | –                     | write  |
| test/run          | half stave | 1  | 0  | 0  | –                     | read/write, bit 0: 1 = test |

The event index counts from the oldest stored event (index 0). Codes 101, 110
and 111 in bits 18..16 are unmapped and read as 0. Half staves 6 and 7 have no
board; a read there returns 0 (with `rvalid`) so that a router never waits for
an answer that will not come.

A board used on its own (`pixel_converter`) takes only the 19-bit address.

## Control words

Control word 0 of event *i*:

| bits   | meaning |
|--------|---------|
| 0      | event ready: event *i* is stored. For *i* = 0 this is "at least one complete event is waiting", the bit the router polls |
| 9..1   | event number, a 9-bit count of completed events since reset |
| 10     | parity error seen in any word of the event |
| 11     | link was down at least once while the event was received |
| 12     | format error reported by the link receiver for the event |
| 13     | single event upset that could not be corrected (board needs a reset) |
| 14     | pixel control link out of synchronisation |
| 15     | temperature above its preset limit |
| 16     | link ready |
| 31..17 | 0 |

Bits 13..16 describe the board, not an event, and appear in all eight control
words, whether or not an event is stored at that index. For an index with no
stored event, all other bits are 0.

Control word 1 of event *i*: start address in bits 31..16, end address in bits
15..0, both inclusive word addresses. Because the memory is used as a ring, an
event may wrap past address 0xFFFF: then the end address is below the start
address, and the event is the words start, start+1, …, 0xFFFF, 0, …, end. Its
length is `((end - start) mod 65536) + 1`.

Each board also drives an interrupt line, `irq[b]`, high whenever at least one
event is stored. It is independent of the address bus, so a router can wait on
it instead of polling.

## Router access sequence and bus timing

The router is expected to:

1. wait until bit 0 of control word 0 (event 0) is set, or `irq[b]` is high;
2. read control word 0 (status, errors, event number) and control word 1
   (start and end address) of event 0;
3. read the event's words from start to end address (more than once if it
   wishes);
4. write any value to the flush register. The oldest event is discarded, its
   memory is released, and every younger event moves one index down.

All signals are synchronous to the router clock. A transfer is one clock with
`strobe` high: `wr` gives the direction, `addr` the target and, for writes,
`wdata` the data. Read data comes back on a separate bus one clock later, with
`rvalid` high for that one clock. Reads can be issued on consecutive clocks, so
an event is read at one word per clock:

```
clk     _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
strobe  _/‾‾‾‾‾‾‾‾‾‾‾\___________
wr      _____________________
addr    --< A0 >< A1 >< A2 >-----
rvalid  _______/‾‾‾‾‾‾‾‾‾‾‾\_____
rdata   -------< D0 >< D1 >< D2 >
```

Writes take effect at the strobe edge and return nothing. A flush written
while no event is stored is ignored.

## Storing events: the ring buffer and back-pressure

This is the part that takes most care, because the router and the link work
on the same memory at the same time.

The link side (`pc_event_writer`) presents words on a valid/ready handshake:
a word moves on a clock where `lk_valid` and `lk_ready` are both high, and
`lk_last` marks the last word of an event. Words are written at consecutive
addresses of the 64K-word memory, wrapping at the end. The writer keeps:

* the write pointer, which becomes an event's start address at its first
  word and its end address at its last;
* `used`, the number of words held by stored events plus the event in
  progress. It grows by one per accepted word and falls by the event's length
  when the router flushes. Because events are flushed strictly oldest first,
  the free words always follow the write pointer, so a count is enough.

`lk_ready` goes low (the link is stalled, nothing is dropped) when:

* the memory is full (`used` = 65536);
* a new event would start while eight events are already stored, counting an
  event that has just ended but whose descriptor is still on its way to the
  control registers. A started event is always let finish, so the ninth
  event waits at its first word rather than in the middle;
* the board is in test mode.

While an event is received, per-word parity and format error flags from the
link receiver are ORed into the event's error bits, and so is every clock with
`link_ready` low between the first and the last word. One clock after the last
word, the descriptor (start, end, errors) is pushed into the control word
registers (`pc_event_queue`), which stamp it with the next event number.

`pc_event_queue` holds the eight descriptors in a small ring with a head
pointer. "Moving every event one index down" on a flush is just advancing the
head: control words are read from entry `head + index`. On a flush it also
reports the number of words released, which the writer subtracts from `used`.

An event longer than the whole memory can never complete and stalls the link
for good; the link side must not send one.

## Test mode

The event memory has two ports. The *top* port is the only write port; the
*bottom* port is the router's read port. Both use the same addresses, so a
router test write and a later read of the same address meet the same word,
even though they use different ports.

Writing 1 to the test/run register puts a board in test mode: router writes to
the event memory are then passed to the top port, and the link writer is held
off so the two never share the port. Writing 0 returns to run mode, where
router writes to the memory are ignored. The register resets to run mode. Test
writes do not touch the control words: writing over a stored event's words
changes what the router later reads for that event.

## Modules

```
pc_array                 six boards, half stave select, read data return
└─ pixel_converter       one board (x6)
   ├─ pc_bus_slave       router bus port, test/run register, flush pulse
   │  └─ pc_addr_decode  address bits 18..16 → target
   ├─ pc_event_writer    link words → memory ring, event descriptors, back-pressure
   ├─ pc_event_queue     eight descriptors, control words 0/1, flush, irq
   └─ pc_event_memory    64K x 32 dual-port memory, one-clock synchronous read
pc_pkg                   shared constants, target enum, descriptor structs
```

Parameters (defaults are the sizes of the real system):

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `BOARDS`  | 6       | `pc_array` | daughter boards, one per half stave (at most 8) |
| `MEM_AW`  | 16      | `pc_array`, `pixel_converter` | event memory address bits, 64K words of 32 bits (at most 16) |
| `EVENTS`  | 8       | `pc_array`, `pixel_converter` | events stored per board (a power of two, at most 8: the index is 3 bits) |

At the defaults the design holds 6 × 2 Mbit of event memory and about 3,000
flip-flops. The memory is written as an array for the synthesis tool to map
to block RAM; its contents are not reset.

Reset `rst_n` is asynchronous and active low. It clears the pointers, the
stored events, the event number counter and the test/run register.

## What is fixed by the interface and what is chosen here

Fixed by the interface definition: the six boards and the 3-bit half stave
field; the 19-bit board address map and 16-bit memory address space; 32-bit
words; eight events per board, indexed from the oldest; all field positions of
control words 0 and 1; the meaning of the status and error bits, and the
copying of board-wide status to all control words; the write-only flush
register that frees the oldest event and shifts the others; the interrupt
line; strobe and write/read signals synchronous to the router clock; the
dual-port memory with writes through the top port and router reads through
the bottom port; test writes allowed only in test mode.

Chosen here, where the interface says nothing:

* one clock for the link and router sides;
* one-clock read latency, an `rvalid` output, and separate read and write data
  buses;
* the shared 22-bit address space is used (the interface allows a router to
  address each board separately instead; `pixel_converter` alone serves that
  case), and absent half staves answer reads with 0;
* the memory is a ring buffer; events may wrap;
* the valid/ready link handshake and the stall conditions above;
* the event number is counted on the board; the interface does not say where
  it comes from (a link receiver that delivers it from the frame header would
  replace the counter);
* bit 0 of control word *i* means "event *i* is stored";
* the test/run register is bit 0, 1 = test, and the link is held off in test
  mode;
* unmapped addresses, reads of the flush register and writes to control words
  do nothing and read as 0;
* how the link receiver detects parity and format errors is outside this
  design; it supplies one flag per word.

Not part of this design: the router itself, the link receiver, and the
sources of the SEU, pixel control and temperature flags. They appear as ports.

## Simulation

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/pc_pkg.sv tb/tb_pc_array.sv \
          --top-module tb_pc_array -Mdir obj_pc_array
obj_pc_array/Vtb_pc_array
```

Replace `tb_pc_array` by any other testbench name. The testbenches:

| testbench | block | what it does |
|-----------|-------|--------------|
| `tb_pc_array` | whole design, default sizes | six link sources and one router following the access sequence; board 0 fills its memory with long events, later events wrap; checks every word, control word, error bit, event number and interrupt; exercises test mode on every board and reads of absent half staves; fails if any stall, wrap, error flag or mode never happens |
| `tb_pixel_converter` | one board, 1K-word memory | the same flow on one board, plus control words of events 1..7 and repeated reads of an event |
| `tb_pc_bus_slave` | bus port | random back-to-back reads and writes to all targets; latency, flush pulse, test/run gating |
| `tb_pc_event_writer` | link writer, 256-word memory | reference model of ready, write address/data, descriptors and their timing under random flushes |
| `tb_pc_event_queue` | control words | reference queue; all eight indices after every clock, freed word count, empty flushes |
| `tb_pc_event_memory` | memory, full size | random reads and writes, read-during-write, hold |
| `tb_pc_addr_decode` | decoder | all target codes with random offsets |

The full-size run of `tb_pc_array` moves about 100,000 event words and takes
under a second. Assertions in the RTL check that a push never overflows the
event queue, that the memory word count never exceeds the memory, that the
link writer and router test writes never drive the top port together, and that
at most one board answers a read.
