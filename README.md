# FlexRay tester node: monitoring and replay fabric

A FlexRay network can be observed from outside only at bit level. A tester node gets much more:
it takes a standard FlexRay communication controller and replaces the controller's host interface
with a fabric that does two jobs. It records everything the controller sees, and it can play
recorded traffic back onto the bus. The recorded events are received frames on both channels, the
synchronized cluster time, per-frame receive status and the set of frame IDs seen in each cycle.
Every event becomes a time-stamped packet in a FIFO that the host processor drains. The host can
also write packets into a second FIFO, and the fabric then sends them at their recorded time.

This repository holds the synthesizable SystemVerilog of that fabric, a self-checking testbench
for every block, and an end-to-end testbench. The controller itself and the host processor are
outside the design. The top module brings their signals out as ports.

```
            receive side                                         host side
 controller ─┬─ frames A ──► monitor 0 ─┐
             ├─ frames B ──► monitor 1 ─┤   temporal order table
             ├─ cycle start ► cluster-time source ► monitor 2 ─┤   (offset per packet)
             ├─ frame ends ► status source ► monitor 3 ─┤            │
             └─ frame IDs ─► ID-preview source ► monitor 4 ─┴─► DPRAM arbiter ─► monitor DPRAM ──► host reads
                                                                   sector control ─► irq
 trigger unit ─► "active" per monitor        free-running timer ─► timestamps

            transmit side
 host writes ─► replay DPRAM ─► replay extractor ─┬─► injection unit 0 ─► controller TX channel A
                                                  └─► injection unit 1 ─► controller TX channel B
```

## Packet format

Every monitor produces the same format of 32-bit words:

| word | contents |
|------|----------|
| 0 | header: `[31:24]` identifier, `[23:16]` number of 16-bit data words, `[15:0]` packet size in 32-bit words (header included) |
| 1 | free-running timer value drawn when the first word of the event arrived |
| 2.. | data, two 16-bit controller words per 32-bit word, first word in the low half; an odd last half is zero |

The identifiers (`fr_tester_pkg::pkt_id_e`) are: 1 frame channel A, 2 frame channel B, 3 cluster
time, 4 status, 5 ID preview. Identifier 0 is a one-word pad, which the host may use in the replay
FIFO. The contents per source are:
- cluster time: cycle count, macrotick.
- status: `{valid, frame ID}` and flags for channel A, then the same for channel B.
- ID preview: one `{channel, frame ID}` word per frame seen in the previous cycle, sent at the next cycle start.

The timer runs at the 40 MHz system clock, so one tick is 25 ns. That is fine enough to
over-sample a 10 Mbit/s bus four times.

## Monitoring modules (`monitor_unit`)

Each monitor has two queues. Each queue holds one maximum-sized packet: 130 16-bit words, which is a
5-byte header plus a 254-byte payload. One queue fills while the other waits for the DPRAM. At the
first word of an event:
- the monitor draws the timestamp;
- it registers the packet with the temporal order table, which hands back a row.

The source may announce the length early: a FlexRay frame knows it after its header. The monitor
then passes the size to the table at once. Otherwise the size goes to the table at the end of the
packet. A complete queue requests the DPRAM write port only once the table knows where the packet
goes. The monitor then sends header, timestamp and data at one word per cycle.

A packet is dropped, and `lost` is flagged in STATUS, in any of these cases:
- it starts while both queues are busy;
- no table row is free;
- the monitor's trigger is not active.

Missing words (an event shorter than announced) are sent as zero. Words beyond the announced
length are ignored.

## Temporal order: placing packets that finish out of order

This is the core of the design. Timestamps are drawn at the *start* of a packet, because replay
needs the start time. Packets arrive on two channels and from five sources in parallel, so a
short frame on channel B can start after a long frame on channel A and still be complete first.
The host and the replay hardware want the FIFO sorted by timestamp. There are two simple ways to
get that:
- sort in software afterwards, which costs processor time;
- hold the short packets back until the long one is written, which costs queue memory for the
  worst-case overlap.

This design does neither. Each packet is written as soon as it is complete, but to the address it
would have had if everything had been written in start order. The short B frames are written
*behind* the space reserved for the long A frame, which is filled in later.

`temporal_order_table` keeps one row per open packet. A row holds:
- a temporal order value `to`, the packet's rank among the open packets, where 1 is the oldest;
- the packet length `pl` in 32-bit words;
- the DPRAM offset `off`.

It applies these rules:

* **E1** When a packet starts, the global count `temporal_order` is incremented and becomes the
  row's `to`. Packets starting in the same cycle are ranked by monitor index.
* **E2a** When the length becomes known, it is stored in `pl`.
* **E2b** As soon as the row ranked one lower has both `off` and `pl`, the row's offset becomes
  `off = (off_pred + pl_pred) mod DPRAM_WORDS`. The row ranked 1 takes as its predecessor the
  last removed row, whose `off`/`pl` are kept. Both are 0 after reset.
* **R1** When a row is removed, every larger `to` is decremented, the row's `to` is cleared and
  `temporal_order` is decremented.

An offset therefore waits for every earlier packet's length, but not for its data. A long frame
that announces its length in its header unblocks all later packets immediately. A source that
reveals the length only at its end holds later packets in their queues until then. The end-to-end
testbench exercises this case, and it is the main way to lose packets under load.

**Removal in order.** A written row is removed only once it is ranked 1. This is a choice of this
implementation: removing a written row while an older one is still open would give the next
packet the wrong predecessor, and its region would be reused. With in-order removal the table also
yields the `last_written_pointer`: the end of the last removed packet, below which every word of
the FIFO is valid. The sector logic needs exactly this pointer.

The rows form a pool of `N_ROWS` (8) shared by all monitors. They are not bound one-to-one to
monitors, because one monitor can have two packets open, one in each queue.

The arbiter (`dpram_arbiter`) grants the single write port in the order the requests came,
breaking ties by index. It writes the granted packet to `off .. off+pl-1`, wrapping around the
DPRAM.

## FIFO sectors, interrupts and overflow

The 2048-word monitor DPRAM is a ring of 8 sectors of 256 words. `fifo_sector_ctrl` works as
follows:
- When the `last_written_pointer` passes the end of a sector, the sector's *dirty bit* is set: it
  is completely written and unread.
- The host reads the sector and clears the bit by writing a one to MON_DIRTY.
- `irq_mon` is raised while the number of dirty sectors is at least IRQ_THRESH. A value of 0
  turns this interrupt off.

If a packet's first or last word would fall into a sector that is still dirty, the host has not
kept up. The arbiter then drains the packet without writing it and pulses `overflow`. This:
- stops every trigger, so monitoring ends;
- sets the sticky overflow interrupt (STATUS bit 0, also routed to `irq_mon`).

A packet is never longer than a sector, so checking both ends of the packet is enough.

## Triggers

`trigger_unit` gives each monitor a 2-bit mode: off, immediate, on a frame ID, or on a cycle
count. A write of the arm bit in CTRL restarts the evaluation. A module that has become active
stays active until it is re-armed or until an overflow occurs.

## Replay

The host writes packets into the replay DPRAM, which has the same size and sector layout as the
monitor FIFO. It then marks filled sectors in REPLAY_VLD. `replay_extractor` walks through the
FIFO and never enters a sector that is not marked. It clears a sector's mark once it has read past
the sector. Frame packets are forwarded: identifier 1 to injection unit 0 (channel A), identifier 2
to unit 1 (channel B). Other packets are skipped, and identifier 0 is a one-word pad. A frame is
forwarded when it is due:

* **asynchronous mode** (the tester sets the timing): when the timer has reached the timestamp,
  tested as `timer - timestamp >= 0` in two's complement. A frame that is already late goes out at
  once.
* **synchronous mode** (the cluster sets the timing, CTRL bit 4): when timestamp bits `[21:16]`
  equal the current cycle count and bits `[10:0]` equal the current slot ID.

Each `injection_unit` has two queues. It sends the frame to the controller as 16-bit words on a
valid/ready stream with sop/eop and the length.

## Register map (`config_regs`)

Word-addressed bus: `host_addr[3:0]`, `host_wr`, `host_wdata`. `host_rdata` is combinational.

| addr | name | bits |
|------|------|------|
| 0 | CTRL | `[0]` timer enable, `[3]` replay enable, `[4]` synchronous replay; pulses: `[1]` timer clear, `[2]` arm triggers |
| 1 | TRIG_MODE | 2 bits per monitor (`trg_mode_e`), monitor 0 in `[1:0]` |
| 2 | TRIG_MATCH | `[10:0]` frame ID, `[21:16]` cycle count |
| 3 | IRQ_THRESH | dirty-sector count that raises `irq_mon` (0 = off) |
| 4 | MON_DIRTY | dirty bits; write 1 to clear |
| 5 | STATUS | `[0]` overflow, `[1]` packet lost (write 1 to clear), `[15:8]` active triggers, `[31:16]` last_written_pointer |
| 6 | REPLAY_VLD | replay sectors holding data; write 1 to mark |
| 7 | TIMER | current timer value |

The host reads the monitor DPRAM through `host_mon_addr`/`host_mon_rdata`. It writes the replay
DPRAM through `host_rpl_*`. Both ports have a read latency of one cycle.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DPRAM_WORDS` | 2048 | words of each DPRAM |
| `SECTOR_WORDS` | 256 | sector size (interrupt granularity) |
| `N_ROWS` | 8 | temporal order table rows |
| `MAX_DATA16` | 130 | 16-bit words per queue (largest frame) |
| `MAX_IDS` | 32 | frame IDs per ID-preview packet |

The timestamp is 32 bits wide and the packet header layout is fixed. These are set in
`fr_tester_pkg`.

## What follows the original design and what does not

The overall design follows the tester architecture it implements:
- a free-running 25 ns timer and a trigger unit;
- monitoring modules with two alternating queues, 16-to-32-bit packing, a header with identifier
  and size, and a start timestamp;
- the five recorded sources;
- a temporal order table with rules E1/E2/R1, a bus arbiter that grants in request order and
  writes `off .. off+pl`, and a last_written_pointer;
- dirty bits, a threshold interrupt and an overflow interrupt that stops monitoring;
- a replay extractor with asynchronous and synchronous modes, feeding injection modules.

These are choices of this implementation:
- the table is a pool of rows with strictly in-order removal;
- the threshold counts dirty sectors;
- an overflow is detected at the sector of a packet's ends, and the packet is dropped;
- the asynchronous replay comparison is "reached" rather than "equal";
- the bit positions of cycle count and slot in a synchronous timestamp;
- the trigger modes;
- the register map and all handshakes;
- the contents of the status, cluster-time and ID-preview packets;
- identifier values and the pad packet.

Not included:
- the FlexRay communication controller;
- the host processor and its bus;
- fault injection, which the original design names only as future work.

## Simulation

Every block has a self-checking testbench in `tb/<module>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv -Irtl \
    rtl/fr_tester_pkg.sv tb/temporal_order_table_tb.sv --top-module temporal_order_table_tb
./obj_dir/Vtemporal_order_table_tb
```

`tb/tester_top_tb.sv` runs the complete design at its default parameters, with a modelled
controller and a modelled host. It covers:
- 12 communication cycles in which B frames overtake a long A frame;
- a cycle whose A frame announces no length, so a B frame is lost;
- sector interrupts, wrap-around of the FIFO, and a trigger on the cycle count;
- an overflow once the host stops reading, after which nothing more is recorded;
- replay in both modes.

It parses the recorded FIFO, checks the temporal order and the contents of every frame, and counts
how often each mechanism occurred. A mechanism that never occurs counts as a failure. It runs
in well under a second.
