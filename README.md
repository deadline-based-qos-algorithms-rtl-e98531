# Deadline-scheduled interconnect with take-over queues

This RTL is a packet network for a cluster that gives each packet an **end-to-end
deadline** and schedules every link earliest-deadline-first (EDF). The switches
keep no per-flow state.

Three ideas make EDF cheap enough for switch hardware:

1. **Only the end hosts know about flows.** When a host sends a packet, it computes
   the packet's deadline from the bandwidth reserved for its flow. A switch sees only
   the deadline in the header and the source route. The result of admission control
   (the reserved rate and the path) enters each host as a flow-table entry.
2. **Nodes need no common clock.** On a link the header carries the *time to
   deadline* (TTD = deadline − sender's clock) instead of the deadline. The receiver
   adds its own clock back. Each node's clock runs freely and starts at any value.
3. **Buffers are FIFOs, not sorted heaps.** Sorting every buffer by deadline would be
   too expensive. Instead, each regulated buffer is two FIFOs, an *ordered queue* and
   a *take-over queue*. Packets with early deadlines can overtake packets with late
   ones, and packets of one flow still never get reordered.

Each link has two virtual channels (VCs):
- **VC 0** carries *regulated* traffic (control messages, video). It has absolute
  priority.
- **VC 1** carries *best-effort* traffic. Its deadlines come from weights, so
  different best-effort classes can still get different shares of the link.

## Time, units and the header (`edf_pkg`)

**Clock and time.**
- One clock cycle is 8 ns at 125 MHz. The datapath is 8 bytes wide, which gives the
  8 Gb/s link rate.
- All times are 32-bit cycle counts.
- Deadlines are compared by the sign of their 32-bit difference (`dl_before`). Clock
  wrap-around is therefore harmless, as long as live deadlines are within 2^31 cycles
  (about 17 s) of each other.

**Packets.**
- Only headers move through the hardware. The payload is represented by its length
  (1–2048 bytes, MTU 2 Kbytes).
- The length sets how long the packet holds a link: `ceil(len/8)` cycles.
- It also sets how much buffer and credit it uses: `ceil(len/128)` units of 128 bytes.
  A VC buffer of 8 Kbytes is 64 units, and 64 descriptor slots.

**Header (`hdr_t`, 112 bits).**

| Field | Width | Meaning |
|---|---|---|
| `vc` | 1 | Virtual channel |
| `dl` | 32 | Absolute deadline inside a node; TTD on a link |
| `len` | 12 | Length in bytes |
| `route` | 8 × 4 | Output port at each hop |
| `hop` | 3 | Index of the next route entry |
| `flow` | 8 | Host number and flow index |
| `seq` | 16 | Sequence number |
| `crc` | 8 | Header check, CRC-8 with polynomial 0x07 |

`flow` and `seq` are carried only so that the end host (and the testbenches) can check
delivery. Switches ignore them.

## The take-over queue (`takeover_vc`)

This is the heart of the design, and it is what makes FIFO buffers behave almost like
deadline-sorted ones. Call the two FIFOs L (ordered queue) and U (take-over queue).

**Enqueue.** An arriving packet p goes to L if either of these holds:
- both queues are empty, or
- p's deadline is not earlier than the deadline of the *last* packet in L.

Otherwise p goes to U. So L is always in deadline order, and its tail holds the
latest deadline in the VC.

**Dequeue.** The packet offered is the head of L, unless U's head has a strictly
earlier deadline, in which case U's head is offered. Equal deadlines go to L.

**Why a flow never gets reordered.** At a given node, a flow's deadlines never
decrease, because every node shifts all deadlines by the same clock offset. Take two
packets of one flow, a before b, so D(a) ≤ D(b):
- **Same queue.** If both are in L or both are in U, FIFO order keeps a first.
- **a in L, b in U.** L is sorted, so while a is still in L, L's head has a deadline
  of at most D(a), which is at most D(b). U's head is taken only when it is strictly
  earlier than L's head, so b cannot leave before a.
- **a in U, b in L.** This case follows from the enqueue rule in the same way; it
  takes a longer argument over the packets between them.

An assertion (`a_u_only`) checks a related invariant: U is never non-empty while L is
empty. The testbench checks per-flow order directly, on long random sequences with
monotone per-flow deadlines and interleaved pushes and pops.

**What it does not guarantee.** A late packet at the head of L still blocks an early
packet that arrived behind it in L (an "order error"). Such errors are rarer than in a
single FIFO, but they are not eliminated.

**Implementation.**
- Both queues are linked lists in one `NSLOT`-entry memory (`mem` for headers, `nxt`
  for links), so either queue can take the whole VC.
- A bitmap of free slots allocates the lowest free one.
- One push and one pop are allowed per cycle. A pushed packet becomes visible at the
  head in the next cycle.
- If a push arrives in the same cycle as a pop that empties L, the push treats L as
  already empty. This is what makes the "U only" state impossible.
- `push_u` and `pop_u` report take-over enqueues and overtaking dequeues.

## Port buffers and the link scheduler

### `port_buffer`

- A port buffer holds both VCs: VC 0 is a `takeover_vc`, and VC 1 is a plain FIFO
  (`fifo_queue`).
- It reports the free units per VC and, on every pop, how many units were released.
- The same buffer is used at switch inputs and at switch outputs.

### `link_scheduler`

The link scheduler is the multiplexer in front of a link. It keeps one credit counter
per VC, counting free 128-byte units in the next node's input buffer. Each time the
link is free it decides as follows:

1. If the VC 0 head fits in the credits, send it. Only this one candidate is checked:
   the earliest-deadline packet of the two regulated queues.
2. Otherwise, if the VC 1 head fits, send it. The VC 0 packet waits for credits
   (`stall_credit`).
3. If VC 0 could send, but VC 1 also had a packet, report `vc1_held`.

After it sends a packet, the link stays busy for `ceil(len/8)` cycles, and the credits
are taken at once. Credits come back through `credit_in`. An assertion checks that a
counter never rises above its initial value.

### `link_tx` and `link_rx`

**`link_tx`** is the last stage before a link. It:
- rewrites the deadline as TTD (`dl − t_local`),
- advances the hop pointer (in switches only; `ADVANCE_HOP`),
- recomputes the header CRC,
- registers the result onto the link.

**`link_rx`** is the first stage after a link. It:
- checks the CRC,
- rebuilds the local deadline (`TTD + t_local`),
- registers the packet toward the input buffer.

If a header fails the CRC check, `link_rx` drops it and reports its units, so the
sender's credits are returned anyway.

## The switch (`edf_switch`, `voq_buffer`, `voq_allocator`)

Each of the 16 ports has this chain:

`link_rx` → input `voq_buffer` → crossbar → output `port_buffer` → `link_scheduler` → `link_tx`

**Virtual output queues (`voq_buffer`, `voq_vc`).** An input buffer keeps one queue
per output port and VC, so a packet waiting for a busy output does not block packets
bound elsewhere.
- In VC 0, each per-output queue is an ordered / take-over pair with exactly the rules
  above.
- In VC 1, each per-output queue is a plain FIFO.
- All 16 queues (or queue pairs) of one VC are linked lists in the same 64-slot,
  8-Kbyte memory, so one output can use the whole VC.
- Because a flow has a fixed route, all of its packets use the same per-output queue,
  so the no-reordering argument still holds.
- Output buffers do not need per-output queues. They keep one pair (VC 0) and one FIFO
  (VC 1), like the host side.

**Arbitration (`voq_allocator`).** The allocator does one request–grant–accept round
per cycle and looks only at queue heads. A head is a candidate only if the output
buffer has room for it in its VC.
- **Grant.** Each output grants one candidate: VC 0 beats VC 1, then the earliest
  deadline wins, then the lowest input number.
- **Accept.** An input granted by several outputs accepts one grant, by the same order
  (VC 0 first, then earliest deadline, then lowest output). The other outputs idle
  for that cycle.
- An accepted header moves to the output buffer in the same cycle.
- An input that had a candidate but moved nothing is counted in `ev_xbar_lost`.

**Timing and credits.**
- An unloaded packet passes the switch in 4 cycles: the rx register, one cycle in each
  buffer, and the tx register.
- Credits to the upstream node are the units popped from the input buffer, plus the
  units of any dropped packets, returned in the same cycle.

## The end host (`host_interface`)

A host turns application messages into stamped packets and queues them by VC.

### `deadline_stamper`

The stamper holds a table of `NFLOWS` flows. Each entry gives the VC, the route, the
mode, an "use eligible time" flag, and either a cost in cycles per byte or a target
frame latency. A message of `bytes` bytes is cut into `ceil(bytes/2048)` packets. For
each packet, with `Tnow` the host clock when the message was accepted:

- **RATE mode** (control, best-effort):
  `D = max(D_prev, Tnow) + ceil(len × cpb / 2^16)`, where `cpb` is the reserved cost in
  cycles per byte, in Q16.16.
- **FRAME mode** (video):
  `D = max(D_prev, Tnow) + floor(frame_lat / Parts)`, where `Parts` is the number of
  packets in the frame.

A 24-step restoring divider computes the FRAME increment. A frame's first packet
therefore leaves 25 cycles after the message is accepted; in RATE mode it leaves after
1 cycle.

If the flow uses eligible time, the packet's eligible time is `D − 2500` cycles
(20 µs). Otherwise it is `Tnow`. The first packet after a flow-table write starts from
`Tnow`.

### `host_injection`

- Regulated packets wait in a queue sorted by eligible time (`sorted_queue`, key =
  eligible time).
- Once the head of that queue is eligible, it moves (one per cycle) into a second
  queue sorted by deadline.
- Best-effort packets go straight into a third queue, sorted by deadline.
- The sorted queues are register arrays with insertion. Equal keys keep their arrival
  order.

### Rest of the host

The deadline-sorted queue heads feed a `link_scheduler` and a `link_tx` that does not
advance the hop pointer. On the receive side, a `link_rx` delivers packets on
`rx_valid`/`rx_hdr`, and their credits are returned at once.

## The top (`edf_net`)

The top is 16 `host_interface`s on the 16 ports of one `edf_switch`.
- Host *h* is node *h*. Its clock starts at `h × 100003`, and the switch clock starts
  at `0xFFFF0000`. Clock offsets and wrap-around are therefore exercised from the
  first cycle.
- Flow tables and message inputs are brought out per host.
- Every block's event bits are brought out, for statistics.

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/edf_pkg.sv tb/takeover_vc_tb.sv --top-module takeover_vc_tb
./obj_dir/Vtakeover_vc_tb
```

Replace `takeover_vc_tb` with any other testbench. Five testbenches use the reference
CRC package `tb/crc8_ref.sv`, which `-y tb` finds: `link_tx_tb`, `link_rx_tb`,
`edf_switch_tb`, `host_interface_tb` and `edf_net_tb`. Because Verilator has no X
state, pass `+verilator+rand+reset+2` to start the simulation from random values; the
RTL resets everything it reads.

`edf_net_tb` runs the full-size top with default parameters, about 200,000 cycles, and
takes about 2 minutes. Each host sends 25 messages, mixed from four classes:
- control messages to a neighbour,
- video frames to host 0 in frame mode,
- best-effort traffic to host 0,
- background traffic to another host.

This overloads host 0's port. The testbench checks:
- exactly-once delivery,
- the right destination and a valid CRC,
- per-flow order,
- packet counts.

It also counts every mechanism: frame divisions, eligible-time waits, take-over
enqueues and overtakes, credit stalls, best-effort packets held back, and crossbar
conflicts. Any mechanism that never happens counts as a failure.

## Departures from the reference architecture

- **One switch instead of a multistage network.** The reference network is a folded
  perfect-shuffle multistage network with 128 end-points. The source-route field
  (8 hops) is sized for such a network, but only the single-switch star is built.
- **Headers only.** Payload bytes are not stored. Buffers are counted in 128-byte
  units, and each packet uses one descriptor slot.
- **Admission control is outside the RTL.** Reservation and path selection are
  assumed to be done by management software, which writes the host flow tables.
- **Choices of this design**, not given by the reference:
  - the 125 MHz × 8-byte datapath;
  - all field widths;
  - the CRC-8 polynomial;
  - the Q16.16 rate encoding and the rounding of increments;
  - letting VC 1 use the link while the VC 0 head waits for credits;
  - dropping (rather than delivering) headers that fail the CRC;
  - one crossbar transfer per port per cycle;
  - single-round, single-cycle combinational arbitration;
  - virtual output queues only at switch inputs, built as linked lists in shared
    memory.

## How far it can be trusted

- **Unit testbenches.** Every block has a testbench that compares against an
  independent model, with random stimulus and between 2,000 and 300,000 checks. Examples:
  - a two-queue reference model and per-flow order checks for `takeover_vc`;
  - a reference CRC computed by polynomial long division for the link stages;
  - a brute-force request–grant–accept model for `voq_allocator`;
  - a model of the deadline formulas for the stamper.
- **Fault injection.** For every block, a deliberately broken variant was confirmed to
  make its testbench fail.
- **End-to-end test.** The full-size network test runs with all parameters at their
  defaults.
- **Lint and synthesis.** All of `rtl/` passes Verilator lint and a second
  SystemVerilog front end.
- **What is not shown:**
  - timing closure at 125 MHz. The combinational allocator over 16×16 per-output queue heads and the
    insertion-sorted host queues are the long paths;
  - behaviour in a multistage network;
  - latency figures comparable with a full-scale study. The end-to-end test checks
    correctness and counts mechanisms. It reports how many control packets arrive by
    their deadline (about 40% in its deliberately overloaded mix, where a control
    deadline is just the packet's serialisation time), but it does not judge them.
