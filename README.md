# EDFR packet scheduler on skip-FIFOs

This RTL is a packet scheduler for one router output port. Senders state how
long their packets may wait by putting a deadline (in milliseconds) in the
IPv4 ToS byte. The scheduler always sends the waiting packet with the earliest
deadline. A packet that can no longer meet its deadline is dropped instead of
being sent late. This policy is *earliest deadline first with reneging*
(EDFR). Because it drops late packets, the queueing delay stays bounded even
when the link is overloaded, so it works on a best-effort network.

Such a scheduler needs a large packet buffer, which in practice means DRAM.
DRAM is fast only when it is accessed sequentially. Heaps and skip-lists read
and write at scattered addresses, so they do not suit it. This design avoids
random access altogether:

* Packets with the same deadline go into one plain FIFO (a ring buffer in
  external memory). A packet enqueued later in a class also has a later
  absolute deadline, so each FIFO is already in deadline order. A small
  **priority encoder** then only has to compare the heads of the FIFOs.
* Late packets are dropped in bulk by moving the ring's read pointer past
  them. They are never read. A small **timestamp FIFO** on the side records
  where that pointer may jump to and when. A ring buffer with this extension
  is called a **skip-FIFO**.

Memory traffic is therefore two sequential streams per class: writes at
`wr_ptr` and reads from `rd_ptr`.

## Block diagram

```
                 +---------------------+    +------------------------------+
 s_axis -------->| deadline_classifier |--->| skip_fifo [0]  (1 ms class)  |--> mem port 0
 (512b + tuser)  |  ToS -> class       |--->| skip_fifo [1]  (2 ms class)  |--> mem port 1
                 +---------------------+--->| skip_fifo [2]  (3 ms class)  |--> mem port 2
                                            +---------------+--------------+
                   time_base: T_now (us), skip tick          | heads, deadlines, beats
                                            +---------------v--------------+
                                            | priority_encoder (EDF, drop) |--> m_axis
                                            +------------------------------+

 skip_fifo = rb_writer + rb_reader (with word_fifo prefetch) + ts_fifo + skip logic
```

| File | Role |
|---|---|
| `rtl/edfr_pkg.sv` | widths, beat and header types, wrap-around time compare |
| `rtl/edfr_scheduler.sv` | top: one output port, `NUM_Q` classes, counters |
| `rtl/time_base.sv` | `T_now` in microseconds and the periodic skip tick |
| `rtl/deadline_classifier.sv` | reads the ToS byte and steers the packet to its class |
| `rtl/skip_fifo.sv` | one class: ring buffer, timestamp FIFO and the skip rule |
| `rtl/rb_writer.sv` | enqueue side: packet layout in memory, commit, tail drop |
| `rtl/rb_reader.sv` | dequeue side: prefetch, parse, send/drop, apply skips |
| `rtl/ts_fifo.sv` | timestamp FIFO, 2^14 entries of (pointer, deadline) |
| `rtl/word_fifo.sv` | small prefetch FIFO used by the reader |
| `rtl/priority_encoder.sv` | earliest-deadline choice, optional late-head drop, output mux |

## The skip rule

The skip rule is the only mechanism here that is not a standard FIFO or
arbiter.

At every skip tick, each skip-FIFO pushes one entry into its timestamp FIFO:

```
elapsed_ptr = wr_ptr                 (committed: start of the next packet)
T_deadline  = T_now + class deadline
```

Every packet before `elapsed_ptr` arrived before this tick. Each of them
therefore has an absolute deadline no later than `T_deadline`. Once `T_now`
is past `T_deadline`, all of those packets are late. The skip logic looks only
at the oldest entry:

| oldest entry | action |
|---|---|
| `elapsed_ptr` not newer than `rd_ptr` | pop the entry at once (stale: the packets it covers have already left) |
| `elapsed_ptr` newer, `T_deadline` not yet passed | wait |
| `elapsed_ptr` newer, `T_deadline` passed | `rd_ptr := elapsed_ptr` (skip), pop the entry |

Pointers carry a wrap bit. "Newer" means ahead of `rd_ptr` and not beyond
`wr_ptr` on the ring. A skip is taken only between packets. While the reader
is sending or dropping a packet, the skip waits. When a skip is taken, the
reader restarts fetching at the new `rd_ptr`. It also empties its prefetch
FIFO and throws away the read responses that are still in flight. The skipped
packets cost no further memory bandwidth.

**Accuracy.** Entries are only made once per tick. A packet that arrives just
after a tick is covered by the next entry. It can therefore survive up to one
skip interval past its own deadline. With the default interval of
200 ms / 2^14 ≈ 12.2 µs this error is small. If even that matters, set
`cfg_pe_drop_en`: the priority encoder then discards any head packet whose
own deadline (stored in its header) has passed. The price is that such
packets are read from memory first.

**Capacity.** The timestamp FIFO holds 2^14 entries, plus one in its output
register. While a class keeps up with its arrivals, its entries turn stale
quickly and the FIFO stays nearly empty. Under a standing backlog every
entry waits for its deadline. At one entry per tick the FIFO then covers
2^14 × 12.2 µs = 200 ms, which is enough for any class deadline up to
200 ms. With a longer deadline and a backlog, the FIFO fills up. A tick
that finds it full records nothing, and `cnt_ts_ovf` counts it. Skips then become coarser, but no packet is dropped
wrongly.

**Example** (1 ms class, interval 12.2 µs): packets P0 to P4 arrive, and then
a tick at `T_now = 10 µs` records (ptr after P4, 1010 µs). P5 to P7 arrive.
At `T_now = 1011 µs` the output is still blocked, so `rd_ptr` jumps over
P0 to P4 in one cycle. P5 becomes the head, and its words are fetched next.

## Packet path

### Classification
`deadline_classifier` takes bytes 12-13 (EtherType) and byte 15 (ToS) of the
first beat. Byte 0 of the frame is `tdata[7:0]`. A packet goes to the class
whose `cfg_deadline_ms` equals its ToS value. Non-IPv4 frames, and ToS values
that no class serves, go to `cfg_default_q`. The choice holds until `tlast`,
and the stream passes through with no added cycle.

### Memory layout of a packet
Each class owns a ring of 2^`AW` words of 64 bytes. One packet of N beats
takes N+2 words:

| word | contents |
|---|---|
| `base`     | header: `tuser` (128 b), absolute deadline (32 b), N |
| `base+1`   | control: one byte per beat, `{tlast, valid bytes − 1}` |
| `base+2..` | the 512-bit data beats |

A 64-byte packet therefore costs three memory words. Short packets use the
memory bandwidth much less efficiently than long ones. `rb_writer` writes the
data beats as they arrive and reserves the first two slots. After `tlast` it
fills in the header and control words, and only then moves `wr_ptr` (the
commit). This is how the beat count in the header can be the real one. The
length comes from `tuser[15:0]`. A packet that does not fit, or that is
longer than 64 beats (4096 bytes), is tail-dropped whole.

### Reading
`rb_reader` keeps up to 2^`PF_LOG2` reads outstanding or buffered, from
`rd_ptr` toward `wr_ptr`. This hides the memory latency. It pops the header
and control word of the packet at `rd_ptr` and offers it as the head. On
`cmd_send` it streams the data out, rebuilding `tkeep`/`tlast` from the
control bytes. On `cmd_drop` it reads the data and discards it.

### Choosing the next packet
When the output is free, `priority_encoder` compares the head deadlines.
Times are 32-bit microseconds compared modulo 2^32. It grants the earliest
one, or the lowest class index on a tie, and forwards that packet until
`tlast`. With `cfg_pe_drop_en`, late heads are discarded first, one per
cycle.

After a packet, the reader of that class needs two cycles to parse the next
header. If the encoder decided in that gap, it could send a later-deadline
packet of another class. To prevent this, a reader raises `head_soon` while a
header is already buffered but not yet parsed, and the encoder holds its
grant until `head_soon` drops. It does not wait for headers still in memory,
so the link never idles waiting on DRAM.

## Interfaces of `edfr_scheduler`

* `s_axis_*` / `m_axis_*`: AXI4-Stream, with 512-bit `tdata`, 64-bit
  `tkeep`, 128-bit `tuser` (length in `[15:0]`) and `tlast`.
* Per class `q`, a memory port:
  * `mem_wr_valid/ready/addr/data[q]`: one 512-bit word per accepted request.
  * `mem_rd_valid/ready/addr[q]`: read requests.
  * `mem_rsp_valid/data[q]`: read data, returned in request order after any
    latency. It cannot be refused, because the reader never asks for more
    than it can hold.

  Addresses are word addresses inside the class's own region. They are
  strictly sequential, so a memory controller can turn them into long
  bursts.
* `cfg_deadline_ms[q]`, `cfg_default_q`, `cfg_pe_drop_en`: static
  configuration inputs.
* Counters per class, 32-bit and wrapping: enqueued, tail drops, sent,
  encoder drops, skips, words skipped, and timestamp FIFO overflows. Two
  fill levels are also exported: `q_fill_words` and `ts_fill`.
* `rst_n`: synchronous reset, active low. All state resets, except the
  contents of the memory arrays.

## Parameters

| Parameter | Default | Meaning / origin |
|---|---|---|
| `NUM_Q` | 3 | deadline classes per port; the original prototype supported three |
| `AW` | 23 | ring size 2^23 × 64 B = 512 MB per class. This is the DDR3 size of the original 1 GbE board and also one HBM pseudo channel (8 GB / 16); the split is this design's choice |
| `TS_LOG2` | 14 | timestamp FIFO depth, as in the original |
| `PF_LOG2` | 6 | prefetch window (own choice; raise it for memories slower than about 60 cycles) |
| `CLK_PER_US` | 250 | 250 MHz clock, as in the original |
| `SKIP_INTERVAL_CYCLES` | 3052 | 200 ms / 2^14 at 250 MHz, rounded |

Fixed in `edfr_pkg`: 512-bit data, 128-bit `tuser`, 8-bit control byte per
beat, 32-bit microsecond timestamps.

## Timing

* Throughput: one memory word per cycle on each side of each class.
  * Enqueueing a packet of N beats takes N + 3 cycles: one decision cycle,
    the data, then the header and control words.
  * Dequeueing takes N + 2 word reads, plus one decision cycle.
  * At 250 MHz, a 1514-byte packet (24 beats) moves at about 112 Gb/s per
    class. A 64-byte packet moves at about 32 Gb/s.
  * Measured packet-data rates through one class, with back-to-back packets
    and a memory that never stalls: 32.0, 51.2, 93.1 and 112.1 Gb/s for 64,
    128, 512 and 1514-byte packets. The rates are the same with a 2-cycle
    and a 60-cycle read latency, because the prefetch window hides the
    latency. The short-packet loss is the cost of the header and control
    words, not of the memory.
* Latency: the design is store-and-forward, because a packet becomes visible
  only at its commit. For a lone 1514-byte packet, the time from the first
  input beat to the first output beat is:
  * 33 cycles with a 2-cycle memory read latency (like on-chip RAM);
  * 91 to 94 cycles with a 60-cycle read latency (DDR4-like), depending on
    memory stalls.

  The original prototype reported about 64 cycles on on-chip RAM and
  190 cycles on DDR4, with 4096-byte bursts.

## What follows the original design and what does not

These parts follow the original design:
* a ring buffer plus a timestamp FIFO per class;
* recording (wr_ptr, T_now + deadline) at every skip tick;
* the skip rule and the stale-entry pop;
* a 2^14-entry timestamp FIFO with a 200 ms / 2^14 interval, at 250 MHz;
* one FIFO per supported deadline;
* an earliest-head priority encoder, with the optional drop of late heads;
* deadlines in ms in the ToS byte;
* a 512-bit data path with a 128-bit `tuser` and an 8-bit control per beat;
* three classes.

These are choices of this RTL:
* The exact storage layout of a packet. It also costs three words per
  64-byte packet.
* One memory port per class, rather than an arbiter onto a shared
  controller.
* Word-by-word memory requests instead of AXI-MM bursts.
* Tail drop when a ring is full.
* The 4096-byte maximum packet.
* Exact-match class lookup with a default class.
* Microsecond timestamps.
* `head_soon`.
* Skips only between packets.
* Recording nothing when the timestamp FIFO is full.
* The counters.

Not included:
* the DRAM/HBM devices and their controllers;
* the reference switch datapath around the scheduler (input arbitration,
  output port lookup);
* the Ethernet MACs and PHYs.

The scheduler's AXI-stream and memory ports are where these connect.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_mem_model.sv` is
a behavioural memory channel: sparse storage, a fixed read latency, random
stalls, and in-order responses.

| Testbench | What it checks |
|---|---|
| `tb_time_base` | µs counter and tick period against cycle counts |
| `tb_ts_fifo` | random push/pop against a queue model, full behaviour |
| `tb_rb_writer` | memory image of every packet, commit pointer, tail drops, wrap-around |
| `tb_rb_reader` | head fields, output beats under back-pressure, drop, skip, skip refused mid-packet |
| `tb_skip_fifo` | skip after expiry (and not at the deadline itself), skipped word count, stale entries, service order, timestamp overflow, tail drop |
| `tb_deadline_classifier` | routing per ToS / EtherType, packet-long hold, ready path |
| `tb_priority_encoder` | earliest-deadline grant, ties, late-head drop, wait on `head_soon`, output mux |
| `tb_edfr_scheduler` | whole design at reduced sizes under light load, overload and drain |
| `tb_edfr_full` | whole design at default sizes: latency, EDF order across classes, a real skip after 1 ms |
| `tb_workload_throughput` | default sizes: rate of back-to-back 64/128/512/1514-byte packets through one class, at two memory latencies |
| `tb_workload_deadlines` | a 30 ms and a 100 ms class sharing an overloaded 1 Gb/s output: every delay within the class deadline plus a small slack |

`tb_edfr_scheduler` checks the following at reduced sizes:
* data integrity;
* FIFO order per class;
* that every grant goes to the earliest head;
* that no grant is late when the encoder drop is enabled;
* counter consistency;
* drained rings at the end.

It also requires each mechanism to occur at least once: tail drop, skip,
encoder drop, timestamp overflow, output back-pressure, memory stall, default
routing, and a grant that passes over a lower-index head.

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_edfr_scheduler \
  -y rtl -y tb +libext+.sv -Irtl rtl/edfr_pkg.sv tb/tb_edfr_scheduler.sv
./obj_dir/Vtb_edfr_scheduler
```

`tb_edfr_full` simulates about 270,000 cycles at full size and runs in
seconds. The memory model stores only the words that are written, so
2^23-word rings cost nothing. Change `--top-module` and the last file name to
run any other testbench.

## Behaviour under overload

`tb_workload_deadlines` models a congested 1 Gb/s port. Two classes have
30 ms and 100 ms deadlines. 1514-byte packets arrive alternately for the two
classes at 1.5 Gb/s for 250 ms, and then the input stops. The encoder drop is
off, so only skips remove late packets. To keep the run short, the time base
counts 25 cycles per microsecond. The skip tick stays at 200 ms / 2^14.
Everything else is at its default.

| class | loss | median delay | 99th percentile | worst |
|---|---|---|---|---|
| 30 ms | 5.4 % | 8.4 ms | 30.007 ms | 30.011 ms |
| 100 ms | 19.3 % | 90.3 ms | 100.011 ms | 100.014 ms |

The link stays fully busy. No packet waits longer than its deadline plus
about one skip interval. Ideal EDFR would give both classes the same loss
rate. Here the shorter-deadline class loses less, and the longer one absorbs
more of the overload.
The testbench fails if any delay exceeds the deadline plus two skip
intervals plus one packet time on the link.

## Limits worth knowing

* A class's deadline should not exceed the timestamp FIFO span, 200 ms by
  default. Beyond that, a standing backlog overflows the FIFO, and skipping
  becomes coarse. The 8-bit ToS would
  allow up to 255 ms.
* Configuration is assumed static while traffic flows. Changing a class
  deadline at run time breaks the deadline order inside that class's FIFO.
* The control word limits packets to 64 beats (4096 bytes).
* Skips wait while the class is in the middle of sending a packet. If the
  output is stalled mid-packet, that class's late packets stay in memory
  until the packet finishes.
