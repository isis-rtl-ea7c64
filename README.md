# ISIS: a 64-port input-queued IP router with an iSLIP crossbar

ISIS is an IP router built from 16 line cards of four OC-48 ports each
(64 ports, 160 Gb/s in total). Its central idea is to keep the switch
fabric as cheap as a line: packets are queued at the *inputs*, cut into
fixed 64-byte cells, and moved through a crossbar that runs at the line
rate (speedup 1). To avoid the head-of-line blocking that a single input
FIFO would suffer, every input keeps one queue per output (virtual output
queues, VOQs), and a centralized iSLIP scheduler finds, once per cell
time, a conflict-free set of input/output pairs. At the output the cells
are put back together into packets, and a small output queue manager
sends high priority packets ahead of low priority ones.

This repository holds synthesizable SystemVerilog of the whole packet path
of one router, with a self-checking testbench for every block.

```
          line card (x16)                                line card (x16)
 line_in ─► IPP ─► framer ─► VOQ buffer ══► crossbar ══► reframer ─► OPP ─► line_out
  (x4)     checks,  packet    one queue      64x64       cells back   two
           TTL,     to 64-B   per output     cell        to packets   priority
           route    cells     ───req──►  iSLIP scheduler ◄──          queues
```

## Clocking and line interface

One clock is one byte time of a line: every port receives and sends at
most one byte per clock (`byte_stream_t`: `valid`, `sop`, `eop`, `data`).
At OC-48 (2.48 Gb/s) that is a 310 MHz clock. There is no back-pressure
anywhere on the line side; a block that cannot take a packet drops it and
pulses a statistic event. Reset is synchronous and active low (`rst_n`)
in every module.

All line-side packets are IPv4 packets with a 20-byte header (version 4,
IHL 5) and at most 1500 bytes.

## Input port processor (`ipp`)

Each port has its own input processor. It stores the arriving packet
whole in a byte buffer (`pkt_fifo`) and, while the header streams past,

* adds the header up as a one's-complement sum and checks the checksum,
* takes the TTL and the destination address,
* looks the destination up in the routing table (`route_table`: 16
  entries, longest prefix match, all entries compared in parallel).

At the last byte the packet gets its verdict. It is dropped for a bad
header or checksum, for a TTL that would reach zero (TTL 0 or 1 on
arrival), for a missing route, or when the buffer is full; otherwise it is
committed. Dropping is a roll-back of the buffer's write pointer, so a bad
packet costs nothing downstream. On the way out the TTL byte is
decremented and a checksum recomputed over the new header is substituted
in bytes 10–11. The first output byte appears four clocks after the last
input byte; then the packet leaves at one byte per clock with its output
port and priority (TOS bit 7) alongside.

## Cells (`framer`)

The framer cuts the packet into cells of 64 bytes:

| bytes | field |
|-------|-------|
| 2 | input port |
| 2 | output port |
| 1 | cell ID, 0 for the first cell of a packet, counting up |
| 1 | flags: bit 7 first cell, bit 6 last cell, bit 0 priority |
| 58 | payload; unused bytes of the last cell are zero |

A 1500-byte packet needs 26 cells; a 59-byte packet needs two, which is
the worst case of header overhead. The 16-bit port fields leave room for
far more than 64 ports.

## Virtual output queues (`mq_buffer`)

Each input owns one cell memory (256 cells by default) shared by 64
queues, one per output. Queues are linked lists threaded through the
memory, and a free list hands out cells; so one busy output can take all
the space, but no queue ever blocks another's head. A cell that finds
the memory full is dropped, which later costs its whole packet. The
non-empty flags of the 64 queues are the input's requests to the
scheduler; the head of the queue chosen by the scheduler is read
combinationally and offered to the crossbar.

## The iSLIP scheduler (`islip_sched`, `ppe`)

Once per fabric slot the scheduler computes a matching between inputs and
outputs from the 64×64 request matrix, in up to four iterations, each of
three steps:

1. **Request**: every unmatched input requests every unmatched output for
   which it has a cell.
2. **Grant**: every unmatched output grants the requesting input that comes
   first in round-robin order starting at the output's grant pointer.
3. **Accept**: every input that got grants accepts the output that comes
   first in round-robin order starting at the input's accept pointer.

Pointers move to one past the accepted partner, and **only for matches
made in the first iteration**. That rule is what makes iSLIP fair and
free of starvation: an output keeps granting the same input until that
input accepts, and under full load the pointers of different outputs
spread apart so that the matching becomes a full permutation.
Later iterations only fill in pairs left unmatched.

Each round-robin choice is a programmable priority encoder (`ppe`): the
first set request bit at or after the pointer, else the lowest set bit.
The scheduler uses 2N of them per iteration (N grant, N accept). All
iterations are unrolled and evaluated combinationally in the one clock of
the `slot` pulse; the pointers update at the end of that clock. This long
combinational path is the part of the design that limits the clock rate;
a real implementation would pipeline the iterations over the slot's
64 clocks, which the slot length leaves ample room for.

## Crossbar and fabric speedup (`crossbar`, `isis_top`)

The crossbar is a registered 64-way multiplexer per output. On the slot
pulse, each matched output takes the cell of its matched input, and the
input's VOQ pops that cell. A slot counter in the top makes a `slot`
pulse every `SLOT_CLKS` clocks. With `SLOT_CLKS = 64` the fabric moves one
64-byte cell per port per 64 byte times: speedup 1. A smaller value models
a faster fabric (32 is speedup 2, 51 about 1.25); nothing else changes.

## Reassembly (`reframer`)

Each output port puts the cells arriving from the fabric back into
packets. It keeps a context per source input (idle, collecting,
discarding), the next expected cell ID, and a timer. Cells are stored in a
cell memory (128 cells) with one linked-list queue per source, so packets
from different inputs can be assembled at the same time. A packet is
lost, and all its cells freed, when

* a cell arrives whose ID is not the next one expected (a cell was
  dropped at the input): *sequence drop*;
* no cell of a half-built packet arrives for `TIMEOUT` clocks (16384 by
  default): *timeout*;
* the memory is full: *reassembly overflow*.

A complete or lost packet is put on a small list in order of completion.
An output engine walks that list: it frees the cells of lost packets, and
sends complete ones at one byte per clock, cutting the last cell at the
length given by the IP header. Timeouts are handled in clocks in which no
cell arrives, which at most once per slot is always true.

Because losing one cell loses the whole packet, drops inside the router
cost much more than their number of bytes suggests.

The reassembly memory must be sized for interleaving, not for rate. At
speedup 1 an output receives no more than it can send, but iSLIP serves
the inputs contending for an output in turn, so the cells of several long
packets arrive interleaved and none of them is complete until its last
cell arrives. Eight inputs each halfway through a 1500-byte packet already
hold over 100 cells. With the default 128 cells, heavy many-to-one traffic
of long packets loses some packets here; holding one maximum packet from
every input would take 64 × 26 = 1664 cells.

## Output port processor (`opp`)

Complete packets go into one of two byte queues by priority. Whenever the
line is idle the processor starts the next packet, taking a high priority
one first if there is any, so a high priority packet overtakes low
priority packets waiting before it. A packet that does not fit is dropped
whole. The reframer delivers at most one byte per clock, the line's own
rate, so the backlog here stays around one packet at any fabric speedup:
the reassembly memory, not this queue, absorbs bursts from a fast fabric.

## Line card and top (`line_card`, `isis_top`)

A line card is four ports, each with IPP, framer, VOQ buffer, reframer and
OPP, plus a shared write port for the routing tables. The top holds 16
line cards, the scheduler, the crossbar and the slot counter.

Top ports:

| port | meaning |
|------|---------|
| `line_in[64]`, `line_out[64]` | byte streams of the lines |
| `rt_wr_en`, `rt_wr_idx`, `rt_wr_entry` | write one routing entry (valid, prefix, length, output port) into every port's table |
| `events[64]` | per-port one-clock statistic pulses (`port_events_t`): forwarded, the three IP drops, input buffer full, cell into VOQ, VOQ drop, cell from fabric, packet reassembled, sequence drop, timeout, reassembly overflow, high/low priority packet sent, output drop |
| `slot` | fabric slot pulse |

The control plane that would compute the routes (a processor running
routing protocols) is outside the design; the table is written through
these ports.

## Parameters

| parameter | default | where the number comes from |
|-----------|---------|-----------------------------|
| `N_PORTS` | 64 | the ISIS base configuration |
| `PORTS_PER_CARD` | 4 | the ISIS line card |
| cell size / header | 64 / 6 bytes | the ISIS cell format |
| `SLOT_CLKS` | 64 | speedup 1 at one byte per clock |
| `ISLIP_ITER` | 4 | chosen here |
| `VOQ_CELLS` | 256 cells per input | chosen here |
| `REASM_CELLS` | 128 cells per output | chosen here |
| `REASM_TIMEOUT` | 16384 clocks (about 53 µs) | chosen here |
| `IPP_BUF`, `OPP_BUF` | 4096 bytes | chosen here |
| `ROUTES` | 16 entries | chosen here |

## What is built and what is not

Built: the complete packet path described above at the full 64-port size.

Departures and choices of this implementation:

* The route lookup of the original design is done by a network processor
  per port and its method is not specified; here it is a small
  longest-prefix-match table. A real table needs tens of thousands of
  entries (or label switching).
* Only the IPv4 header without options is accepted.
* Priority comes from bit 7 of the TOS byte; two classes only.
* The output side implements strict priority only. Weighted fair queuing
  at the output, which the architecture leaves room for, is not built.
* iSLIP has one priority class; cell priority is used only at the output.
* A cell arriving out of sequence ends its packet at once, instead of
  only after the timeout.
* The whole matching is done in one clock (see the scheduler section).

Not built: optical transceivers and SONET framing, the network processor
hardware, the control processor, chassis and power, and the scaled
"ISIS-A" configuration that joins up to 17 switch modules in a mesh with
hot-potato routing between them. The FIFO and CIOQ (stable-matching,
speedup 2) schedulers appear in the original work only as alternatives to
compare with, and are not built either. Nor is random early drop for
the buffers, which was considered for ISIS but never specified: every
buffer here drops at the tail.

## Simulation

Every module has a self-checking testbench in `tb/`, named
`<module>_tb.sv`, that prints `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/isis_pkg.sv tb/tb_ip_pkg.sv tb/isis_top_tb.sv --top-module isis_top_tb
obj_dir/Visis_top_tb
```

`tb/tb_ip_pkg.sv` builds IPv4 packets with correct checksums and computes
what a forwarded packet must look like.

* `isis_top_tb` runs the router at 8 ports on two line cards, with a slot
  every 16 clocks (speedup 4) and small buffers, in three phases: random
  traffic that must be delivered exactly (including checksum, TTL and
  route drops), a hot spot that overloads port 0, and a link failure
  imitated by blanking the fabric output in the middle of a packet. It
  counts each mechanism (multi-cell packets, output contention, matches
  found in later iSLIP iterations, inputs choosing among several VOQs,
  every drop reason, priority overtaking) and fails if any never happens.
* `isis_top_full_tb` runs the top with all default parameters: 64 ports,
  16 routes spread over all line cards, every input sending packets from
  20 to 1500 bytes. Every packet that leaves must be intact and on the
  right port; a packet may go missing only with a counted drop reason.
  Building this model takes Verilator about eight minutes; it then runs
  in under a minute.
* `islip_sched_tb` compares the scheduler with an independent model of
  iSLIP slot by slot, and checks that under full load the matching
  becomes a full permutation.
* The other testbenches check each block against a model in the
  testbench, with random stimulus.

The simulator has two states only; every register is reset.

## Lint notes

Verilator's lint reports a few unused signals (the last iteration's
"still free" vectors in the scheduler, packet counters and commit pulses
that a block does not need) and some unconnected output pins; they are
deliberate and each is noted in its module's opening comment.
