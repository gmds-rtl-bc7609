# GMDS: an output-queued packet switch without a switch fabric

Most packet switches queue packets at the inputs. They then need a crossbar and a
scheduler that matches inputs to outputs in every time slot. An output-queued switch
performs better, but each output must be able to accept packets from all inputs at
once. That normally takes an N-times faster memory or fabric.

GMDS drops the fabric altogether. Each line card owns one serial uplink on a passive
*multidrop* backplane. That uplink reaches every card, the sender included. So every
card sees every packet of every other card on a separate downlink, at the same moment.
A card simply keeps what is addressed to it and queues it per source and class. There
is no arbitration between inputs, and no switch-wide scheduler. Contention is resolved
entirely inside the egress card. The card's scheduler picks which of its queues
transmits next.

The RTL in `rtl/` describes the digital part of such a switch at 1 Gbit/s line rate,
with a 32-bit word path. It consists of:

- `gmds_switch`: N line cards wired through a logical model of the backplane.
- `gmds_line_card`: one card, made of a Queue Engine, packet memories and a Deficit
  Round Robin scheduler.
- the sub-blocks of the Queue Engine described below.

Defaults: 4 ports, 4 traffic classes, packets of up to 256 bytes, and 64 packet slots
per downlink.

## Structure of a line card

```
               in_* ──► Ingress Manager ──► tx (own uplink) ──► backplane
                            ▲ status word
                            │
 backplane ──► rx[0] ──► Frame Filter 0 ──► Queue Manager 0 ─┐
          ──► rx[1] ──► Frame Filter 1 ──► Queue Manager 1 ─┴► Multiplexer 0 ◄► memory 0
          ──► rx[2] ──► Frame Filter 2 ──► Queue Manager 2 ─┐
          ──► rx[3] ──► Frame Filter 3 ──► Queue Manager 3 ─┴► Multiplexer 1 ◄► memory 1
                                 │ enqueue/dequeue events
                                 ▼
                          Status Manager ──► queue state ──► DRR Scheduler
                                                                 │ dequeue
                                          frame_out_* ◄── Multiplexers (read slot)
```

`gmds_queue_engine` holds everything except the memories and the scheduler. Those sit
outside, next to it, in `gmds_line_card`. The same engine could therefore be reused
with other memory devices or another scheduler.

### Cards for larger switches

One Queue Engine serves four downlinks (`PORTS_PER_QE`). A card for an 8×8 switch
(`N_PORTS = 8`) is built from two engines:

- Engine 0 serves downlinks 0–3 and carries the Ingress Manager.
- Engine 1 serves downlinks 4–7. Its Ingress is switched off, and its `PORT_BASE` is 4,
  so its link ids and status bits are card-wide.
- Each engine has its own two memories.

The engines' congestion bitmaps form a daisy chain: engine 1's bitmap is OR-ed into
engine 0's, which puts the total into the uplink multiframes. One scheduler sees the
status buses of both engines as a single list of 32 queues. It sends each dequeue
request to the engine that owns the source. The engines share the `frame_out` bus,
and an assertion checks that only one drives it at a time.

## Clocks

Every card has its own clock. Nothing is distributed between cards, so:

- each downlink carries the sending card's clock;
- each Frame Filter crosses into the local clock through a dual-clock FIFO
  (`gmds_async_fifo`, Gray-code pointers).

Inside a card, `clk` is the **memory clock**. All other card logic advances once every
three memory clocks (the clock enable `ce`, generated from a phase counter 0,1,2). The
reason is memory bandwidth, explained next.

## Memory sharing: the Multiplexer

Each packet memory is shared by two Queue Managers. Within one Queue Manager period
(three memory clocks), `gmds_multiplexer` gives fixed slots:

| phase | access |
|-------|--------|
| 0 | write the word of Queue Manager A |
| 1 | write the word of Queue Manager B |
| 2 | one read for the egress output |

Both downlinks can therefore write at full rate simultaneously. One read per period
is left for the output.

With the reference figures, a 32-bit memory with an 8 ns cycle gives:

- 125 MHz memory clock;
- 41.7 MHz Queue Manager clock;
- 1.33 Gbit/s per slot, which covers a 1 Gbit/s line.

The reference keeps its card logic just below 40 MHz. Dividing the 125 MHz memory
clock by three gives slightly more. If the card logic must stay at or below 40 MHz,
the memory clock drops to 120 MHz, and each slot still carries 1.28 Gbit/s.

Queue Manager B uses addresses offset by `REGION` words. The read data is held
until the next read, so a consumer running on `ce` sees each word exactly once.

Only one Queue Manager in the whole card reads at any time. The scheduler serves one
packet at a time. The engine asserts this rule (`a_one_reader`), and the Multiplexer
also flags a violation on `rd_conflict`.

## On the backplane: multiframes

The Ingress Manager (`gmds_ingress_manager`) does not queue. It wraps each packet as it
arrives into a multiframe:

```
SYNC    {16'hC35A, sender id[7:0], 7'b0, has_pkt}
STATUS  32-bit congestion bitmap of this card's egress
packet  header word + ceil(len/4) payload words   (only if has_pkt)
CHECK   XOR of all words above
idle    one empty word slot
```

The header word is:

- `[31]`: direct. 1 means the destination is a port bitmap.
- `[30:28]`: class.
- `[27:16]`: length in bytes.
- `[15:0]`: destination address, or the port bitmap.

The input and the uplink share the card's word slot: one 32-bit word per `ce`. The
overhead costs four slots per packet, on top of the packet's own words. The uplink
therefore keeps up only when packets arrive slower than the slot rate. At 1 Gbit/s
against 1.33 Gbit/s slots, with packets of 1–256 bytes, 99 % load fills about 83 % of the
uplink. The idle slot gives the margin that lets a receiver with a
slightly slower clock keep up.

While no packet is waiting, a status-only multiframe still goes out, either when the
status changes or every `STATUS_PERIOD` slots. The input is a valid/ready stream.
`in_ready` drops during overhead words.

## Selecting packets: the Frame Filter

There is one `gmds_frame_filter` per downlink. It:

1. Locks onto SYNC words that carry the expected sender id.
2. Recomputes the check word.
3. Decides per packet whether this card keeps it:
   - **Direct / multicast**: header bit 31 is set, and bit `my_id` of the 16-bit port
     bitmap is set. Several cards can take the same packet, which is how multicast
     and broadcast come free with the backplane.
   - **Pattern match**: otherwise the 16-bit destination is compared with `NPAT`
     programmable `(value, mask)` patterns. A hit on any enabled pattern keeps the
     packet.
4. Extracts flow control. From the STATUS word of sender `s`, it takes the bits
   `my_id*N_CLASS + c`. These say "egress `s` wants card `my_id` to stop class `c`".
   The result appears on the card's `flow_out[s]`.

The filter forwards packets cut-through, delayed by one word. If the check word
turns out wrong, the last word of the packet carries `err`, and the Queue Manager
throws the packet away. Flow-control bits are taken only from multiframes that pass
the check.

## Queueing: the Queue Manager

`gmds_queue_manager` stores each packet in a fixed-size slot of
`1 + MAX_PKT_BYTES/4` words (65 words by default):

- A free-slot bitmap hands out the lowest free slot.
- Per class, the slots form a linked list (head, tail, next pointers).
- A packet that finds no free slot is dropped and counted (`cnt_drop`).
- A packet that ends with `err` has its slot returned without being queued.

On a dequeue request for a class, the Queue Manager:

- unlinks the head packet;
- issues one memory read per `ce`;
- signals `deq_done` with the last read;
- frees the slot.

It reports every enqueue and dequeue to the Status Manager, together with the
per-class queue length and the byte length of each head packet.

## Congestion and flow control: the Status Manager

`gmds_status_manager` keeps the exact number of packets in each (source, class)
queue. For each class, a threshold (`cfg_thr`, 0 = off) sets the status bit
`src*N_CLASS + cls` once the count reaches it. That bitmap goes into every outgoing
multiframe, so it reaches the offending source card within one multiframe. Bitmaps
from chained engines (`flow_in`) are OR-ed in.

Acting on `flow_out` is up to whatever feeds a card's `in_*`. The end-to-end
testbench does this by holding back the affected class.

## Output scheduling: Deficit Round Robin

`gmds_scheduler` visits the `N_PORTS × N_CLASS` queues in turn, one per `ce`:

1. A visited, non-empty queue gains its class quantum (`cfg_quantum`, in bytes).
2. It sends its head packet if the head fits the deficit and `out_ready` is high.
   The scheduler then waits for `deq_done` (the last read of that packet) before it
   looks at the queue again.
3. Otherwise the queue keeps the deficit for its next turn.
4. An empty queue's deficit is cleared.

Larger quanta give a class a proportionally larger share of the output.

## Interfaces at a glance (`gmds_line_card`)

| port | meaning |
|------|---------|
| `in_valid/in_ready/in_sop/in_eop/in_data` | packets entering the switch at this card |
| `tx_valid/tx_data` | uplink. `tx_valid` is a one-clock strobe per word slot |
| `rx_clk/rx_valid/rx_data[N_PORTS]` | all uplinks of the backplane, this card's own included |
| `frame_out_*`, `out_ready` | packets leaving the switch; `frame_out_src` names the source card (the class is in the header word) |
| `flow_out[s][c]` | card `s` asks this card to hold back class `c` |
| `pat_value/pat_mask/pat_en` | address patterns of the Frame Filters |
| `cfg_thr`, `cfg_quantum` | per-class congestion thresholds and DRR quanta |
| `ff_*`, `qm_drops`, `mx_dual_writes`, `sm_*`, `im_multiframes`, `sch_*` | statistics counters |

`gmds_switch` brings out the same ports as arrays over the cards. It also takes one
clock per card.

## What follows the reference design, and what is this design's own

Taken from the reference design:

- the partition into Ingress Manager, Frame Filter, Queue Manager, Multiplexer,
  Status Manager and Scheduler;
- the broadcast backplane with one uplink per card;
- per-card local clocks;
- fixed maximum-size slots;
- two Queue Managers per memory, with a 3× memory clock (two writes and one read
  per period);
- pattern matching plus direct port assignment for multicast;
- per-class thresholds driving flow control;
- DRR as the scheduler;
- 1 Gbit/s, 32-bit width;
- packet sizes up to 256 bytes;
- the 4×4 configuration;
- larger cards built from several Queue Engines, only the first with its Ingress, with
  a daisy-chained status path and a shared output bus.

Chosen here, because the reference leaves it open:

- all word formats (header, SYNC, STATUS, CHECK);
- the XOR check;
- the idle slot and the status refresh policy;
- the FIFO depth;
- the `(value, mask)` pattern form and the number of patterns;
- the number of classes and slots;
- lowest-free-slot allocation and linked lists;
- dropping when full;
- thresholds compared as `count >= threshold`, without hysteresis;
- one queue visited per cycle by the scheduler.

The reference uses per-class thresholds in one place and per-queue thresholds in
another. This design uses per class.

Not modelled:

- **The backplane itself.** It is a passive network of impedance-matched power
  splitters. `gmds_switch` only wires each uplink to the same downlink on every card.
- **Serializers, deserializers and differential line drivers.** Links are 32-bit
  word streams with the sender's clock.
- **External memory latency.** The memory (`gmds_pkt_mem`) is a plain synchronous
  array with one-cycle reads, not a pipelined ZBT device.
- **The exact format of the status daisy chain** between Queue Engines. Here it is
  a plain OR of bitmaps.

The 8×8 configuration is a parameter setting (`N_PORTS = 8`). At 4 classes, its
status bitmap just fills the 32-bit word. More than 8 ports × 4 classes would need
a wider status word, and an elaboration check rejects that.

## Simulation

Every module except the FIFO helper has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/gmds_pkg.sv $(ls rtl/*.sv | grep -v gmds_pkg) \
    tb/tb_gmds_switch.sv --top-module tb_gmds_switch
./obj_dir/Vtb_gmds_switch
```

Swap in any other `tb/tb_*.sv` and its top name to run that one.

`tb_gmds_switch` runs the whole 4×4 switch at the default parameters:

- every card has a slightly different clock;
- each card sends 400 random packets of 1–256 bytes;
- the traffic is a random mix of pattern-addressed, masked, multicast and unaddressed
  packets over all classes.

A scoreboard checks that every packet comes out exactly once, unchanged, at every
card that should take it. It also checks that order within a (source, class) queue is
kept.

The test also counts how often each mechanism occurred and fails if any never did:

- exact and masked pattern hits;
- multicast;
- packets filtered out;
- flow-control stops;
- sources held back;
- output back-pressure;
- DRR deficit skips;
- simultaneous writes of both Queue Managers of a memory.

It takes about a second.

`tb_gmds_switch_8x8` runs the same test on an 8×8 switch. Its cards are built from
two Queue Engines each.

`tb_gmds_line_card_8x1` tests one two-engine card on its own. Seven Ingress
Managers, each on its own clock, stand in for the other cards. The test also
decodes the card's uplink to check that congestion in both engines reaches it.

`tb_gmds_switch_load` measures queuing delay under Bernoulli traffic:

- packets of 1–256 bytes, uniform over destinations and classes;
- 90, 95, 98 and 99 % of a 1 Gbit/s line at every input;
- every output limited to 1 Gbit/s.

With 64 slots per downlink and a threshold of 12 packets per class, the mean
delay, measured up to the first word leaving the output, was:

| load | mean delay (mean-packet times) |
|------|-------------------------------|
| 90 % | 10 |
| 95 % | 45 |
| 98 % | 57 |
| 99 % | 58 |

One mean-packet time is 33.5 words at 32 ns. Above about 95 %, flow control
holds the surplus back at the sources rather than letting the output queues
grow. No packet is lost.

The block testbenches use smaller sizes where that makes corner cases reachable:

- 8 slots for the Queue Manager, to exercise drops;
- a short status period;
- a small memory region.
