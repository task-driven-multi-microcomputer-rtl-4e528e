# Centrally controlled segmented bus (CCSB)

Up to sixteen microcomputers ("elements") share a single data bus. The bus is
a closed ring cut into segments by switches, so several pairs of elements can
talk at once, as long as their stretches of ring do not overlap. No element
ever touches a switch. One central **bus controller** hears every request,
decides who gets which stretch of ring, sets the switches, watches how long
each transfer takes, and tears the path down again. It also carries short
messages ("mail") between elements by itself, and it can test a path on
request.

This repository holds synthesizable SystemVerilog for the whole bus system:
the switched ring, the per-element control interfaces, the control bus, and
the controller with all of its processes. It also has a self-checking
testbench for every block and an end-to-end testbench of the whole system at
full size. The elements themselves (ordinary 8-bit microcomputers) are not
part of the design. The testbench models them.

## The ring and its switches

Elements are numbered 0..15 around the ring. Each element has a bus node. The
switch `S_i` joins node `i` to node `i+1` (node 15 wraps to node 0), so every
element "owns" the switch on its clockwise side. Clockwise (CW) means
increasing element number here.

Each switch is driven by two control lines `{CW, CCW}`:

| CW | CCW | switch state |
|----|-----|--------------|
| 0  | 0   | passes data counter-clockwise (node i+1 → node i) |
| 0  | 1   | open: both sides isolated (reset and idle state) |
| 1  | 0   | forbidden (flagged as illegal) |
| 1  | 1   | passes data clockwise (node i → node i+1) |

A path from element `s` to element `d` uses the switches between them:
`S_s … S_(d−1)` going clockwise, or `S_(s−1)` down to `S_d` going
counter-clockwise. Data driven on `s`'s tap then appears on every node up to
and including `d`, and nowhere else. Two paths conflict exactly when they
share a node. With 16 elements up to 8 disjoint paths fit on the ring at once.

The physical switch is a back-to-back pair of tristate buffers. In the RTL,
`seg_data_bus` models it as two gated one-way paths, so the whole bus is
two-state logic. To keep the ring free of combinational loops, propagation is
unrolled by hop count (15 ranks). A node reached by two drivers takes the OR
of their values and raises `contention`. A correct controller never lets that
happen.

## How an element talks to the controller

Every element has a **control interface** (`ctrl_interface`). It holds a
16-byte memory that both the element and the controller can reach, plus a
request latch. The controller also has one dedicated *request* line and one
*clear-request* line to each interface.

The clear-request line is also the memory select. While it is high the
element owns the memory. While the controller holds it low the controller
owns the memory and the request latch is cleared. So the act of serving a
request is itself the acknowledgement.

Memory map:

| loc | written by | contents |
|-----|------------|----------|
| 0 | element | bits 1:0 transaction type: 0 mail ready, 1 path request, 2 diagnostic data, 3 transfer complete; bits 5:2 own element code; bits 7:6 number of destinations (0 = the controller, 1, 2, 3 = all) |
| 1 | element | type 1: expected length in bytes (0 means 256); types 0 and 2: first (bits 3:0) and last (bits 7:4) mailbox location holding data |
| 2 | element | destination 1 (bits 3:0), destination 2 (bits 7:4) |
| 3 | element | bit 0: read (the requester receives, the destination sends); bit 1: urgent |
| 4 | controller | message code |
| 5 | controller | message details |
| 6..15 | either | mailbox: mail bytes, diagnostic data, the path-check pattern |

Message codes in location 4 are GRANT 1, MAIL 2, SUSPEND 3, REJECT 4,
TIMEOUT 5, DONE 6, CHECK 7 and RETRY 8. For GRANT and CHECK, location 5 holds
the partner's code (bits 3:0), whether this element is the sender (bit 4) and
whether the path runs counter-clockwise (bit 5). For MAIL it holds the sender
(bits 3:0) and the byte count (bits 7:4).

The element gets two interrupts:

* `e_int_n` (active low) is low while the element has a request pending and
  the controller is serving it: `int_n = NOT request OR clear_n`.
* `e_acc_irq` pulses for one cycle whenever a controller access ends. This
  is the element's cue to look at location 4.

Two timing rules keep requests from being lost or mixed up:

* The request latch is cleared only at the start of a controller access,
  and only if the request was there before that access began. A request
  raised just as the controller takes the memory, or during the access, stays
  pending and is read afterwards.
* An element must not rewrite locations 0..3 until its request has been
  *answered* (GRANT, REJECT, RETRY and so on). Seeing its request line drop is
  not enough. The controller may latch a request, which clears the line, and
  then write a message to another element first. While it does so the first
  element gets its memory back, and its request is still unread.

The element can also read the control lines of its own switch and of the
neighbouring switch behind it, plus the XOR of the neighbour's two lines
(1 = isolated or forbidden). This is a cheap way to check that a path really
is set before driving data onto it.

### A transfer, end to end

1. Element 3 writes `{1, 3, path}` into location 0, a length into location 1
   and destination 7 into location 2. It then pulses `e_req`.
2. The priority encoder latches the lowest-numbered pending request line and
   pulls that element's clear-request line low. The controller reads
   locations 0..3 and lets the line go.
3. Arbitration validates the request, queues it, finds a free direction, and
   records the path.
4. Two things start in the same cycle. Allocation sets the switches, one
   per clock. The communication process writes GRANT into locations 4 and 5
   of both elements, one element at a time.
5. On a long path the first GRANT can arrive before the last switch is set.
   So element 3 checks its switch status, or waits a few cycles. It then
   drives its data bus tap, and element 7 reads its own tap.
6. Element 3 writes a "complete" request (type 3). The controller dismantles
   the path and sends DONE to both ends.

If element 3 never confirms, the path times out (see below), is removed, and
both ends get TIMEOUT.

## The bus controller

The controller is a pipeline of hardware units joined by valid/ready
handshakes (`bus_controller`):

```
 request lines ─► prio_encoder_latch ─► bc_comm ─► bc_arbiter ─► bc_alloc ─► switch lines
                        ▲                 ▲  │         │   ▲          │
 control bus ◄──────────┴─────────────────┘  │         ▼   │          ▼
                                   messages ◄┘      bc_diag ◄─────────┘ (switches set)
               check_path ─► (request into bc_arbiter)   gen_chores (clock, statistics)
```

**`bc_comm`** is the only master of the control bus. It has two kinds of
work:

* *Outgoing messages from arbitration.* For each message it freezes the
  encoder latch and forces just the target's clear-request line low. It then
  writes location 4, location 5 and any mailbox bytes, and releases the
  line. A message to several elements (both ends of a path, or a broadcast)
  is written to them one after another. Outgoing messages normally go first.
  The exception is a target that has a request of its own pending: that
  request is read first, so writing the message cannot trample it.
* *Requests latched by the encoder.* It reads locations 0..3, then any mail
  or diagnostic bytes, and passes the request on.

Mail is buffered in one 10-byte buffer inside the controller. An element that
offers mail while the buffer is still being delivered is answered RETRY in
the same access and must ask again later.

**`bc_arbiter`** keeps two tables:

* an *ordered list* of waiting requests, up to 8, keyed by
  {urgent, 4-bit software priority of the requester}; equal keys are served
  in arrival order;
* a *routing table* with one entry per requester, holding the nodes, the
  direction and the far end of its path.

It does one thing per clock. In priority order:

1. Remove a path whose completion timer expired (TIMEOUT to both ends).
2. Accept a new request. The request is checked:
   * the destination differs from the source;
   * the software access table allows the pair;
   * the requester does not already own a path;
   * a read names only one destination.
   Failures get REJECT. Mail is turned into a MAIL message to one element,
   two elements or all of them. A completion removes the path and sends DONE.
3. Look at one list entry. `path_finder` checks both directions, and the
   shorter free one wins (clockwise on a tie). If one is free, the entry is
   granted. If none is free:
   * a normal request stays in the list, and the next cycle looks at the
     next entry. So a blocked request does not hold up the others.
   * an urgent request may *suspend* a path. This requires every path in its
     way (in one direction) to rank below it. The first of them is then
     dismantled, both of its ends get SUSPEND, and its request goes back
     into the list. It is granted again when the ring frees up.
   * if any of those paths has fewer than `NEAR_DONE` cycles to run, the
     urgent request waits for it instead of suspending it.

After any path is removed or granted, the scan restarts at the top of the
list, so a freed stretch of ring goes to the best-ranked request that fits.

**`bc_alloc`** takes two-byte allocation requests:

* byte 1: set or dismantle, direction, source;
* byte 2: far destination (bits 3:0) and the requester code (bits 7:4).

For each request it walks the switches of the path, one per cycle. It then
reports `done`. Both elements can also confirm the setting themselves
through their switch status read-back.

**`bc_diag`** runs two timers for every path:

* *Transaction length timer.* It starts when the switches are set and runs
  for `length × CYC_PER_BYTE` cycles.
* *Completion timer.* It then gives `TCT_GRACE` more cycles for the
  "complete" request to arrive. After that the path is flagged as expired.

The time left on the first timer is what arbitration uses to judge "nearly
done". While the path waits in the completion grace period the time left
reads zero, so it always counts as nearly done.

**`check_path`** tests a path for the system executive:

1. It asks for a path from `a` to `b` carrying a test byte.
2. Element `a` gets CHECK, with the byte in its location 6, and drives that
   byte on the bus.
3. Element `b` captures the byte and returns it as diagnostic data (type 2).
4. The unit compares the returned byte with the original and reports pass or
   fail.

**`gen_chores`** keeps a real-time clock, which the executive can load and
which ticks every `TICK_DIV` cycles. It also keeps saturating counters of
requests, messages, grants, suspensions, time-outs and rejections, plus the
largest number of paths ever up at once.

## Parameters (top level, `ccsb_top`)

| name | default | meaning |
|------|---------|---------|
| `N` | 16 | elements; element codes are 4 bits, so 16 is the limit |
| `W` | 8 | data bus width |
| `QD` | 8 | depth of the ordered request list |
| `CYC_PER_BYTE` | 4 | transfer-time allowance per byte |
| `TCT_GRACE` | 64 | cycles allowed for the completion report after the transfer time |
| `NEAR_DONE` | 16 | an urgent request waits for, rather than suspends, a path with less time left than this |
| `TICK_DIV` | 1000 | clock cycles per real-time-clock tick |

The 16-element size, the 16-byte interface memory, the field layout of
locations 0..2, the switch encoding and the two-byte allocation format are
those of the original CCSB proposal. The message codes, the use of location
3, the timing constants, the list depth and the mail-buffer policy are this
implementation's own choices.

## Where this departs from the original proposal

* **Hardware instead of software.** The original controller is a small
  multi-processor running each process as a program (about 250 requests per
  second per processor at 3.072 MHz). Here every process is a hardware unit.
  A path request and its completion take about 22 controller clocks each.
* **Not implemented.** Two arbitration options are missing:
  * rearranging existing paths to make room for a new one;
  * the controller relaying the data itself for an urgent element.

  Two controller duties are also missing:
  * telling the elements affected by an element or link failure to switch to
    their stand-alone routines. A failed path check is only reported to
    the executive.
  * handing the real-time clock to an element that asks for it. The clock is
    only an output of the top level.
* **Timers.** The original runs one down-counter over a list of transfers
  sorted by remaining time. Here each path has its own counter.
* **Resumed paths.** The original moves a suspended transfer's record to a
  SUSPENDED list and brings it back when the path is set up again. Here the
  timers keep only a count of suspensions. A resumed path starts its full
  time allowance again, which gives the element at least as much time as
  before. The original's completed and suspended lists are likewise reduced
  to counters.
* **Interrupt logic.** The printed truth table of the interface's interrupt
  and the formula given beside it disagree. The table was followed. The
  separate end-of-access pulse covers the statement that every controller
  access interrupts the element.
* **Pending requests during a forced write.** In the original, the
  controller reads such a request in the middle of its own forced access.
  Here the controller serves the pending request first and then writes the
  message.
* **Mailbox size.** Mail can be at most 10 bytes (locations 6..15). The
  original aims at messages "under 12 bytes", which the 16-byte memory
  cannot hold next to the 6 control bytes.
* **Control bus wiring.** The control bus is modelled as a logical bus. Its
  redundant ring wiring is physical only.
* **Allocation request tag.** Bits 7:4 of byte 2 of an allocation request
  are reserved in the original. Here they carry the requester's code, so the
  timers know whose path has just been set.
* **No spare controller.** No spare-processor or back-up controller logic is
  included.

## Files

`rtl/`, one module or package per file:

* `ccsb_pkg` — shared types and encodings.
* `ccsb_top` — the system.
* `seg_data_bus`, `bidir_switch` — the data layer.
* `ctrl_interface`, `ctrl_bus` — the control layer.
* `bus_controller` — the controller. Its units are `prio_encoder_latch`,
  `bc_comm`, `bc_arbiter`, `path_finder`, `bc_alloc`, `bc_diag`,
  `check_path` and `gen_chores`.

`tb/`: `tb_<module>` for each module. Each testbench prints
`TB_RESULT checks=… failures=…`. `tb_ccsb_top` runs the full 16-element
system at its default parameters and plays all sixteen elements. It covers:

* clockwise, counter-clockwise and concurrent paths with real data on the
  ring;
* a blocked request, completion, urgent suspension, and waiting for a nearly
  finished path;
* a time-out, and point-to-point, broadcast and controller mail;
* RETRY, the three kinds of rejection, a path check, and the clock;
* a full ring of eight paths between neighbours, all moving data in the
  same cycle;
* random traffic from eight elements at once. Each element requests a
  path, checks that its byte arrives, and completes. Many of these requests
  have to wait for the ring.

It fails if any of these mechanisms never occurs.

Simulate with Verilator, for example:

```
verilator --binary --timing rtl/ccsb_pkg.sv $(ls rtl/*.sv | grep -v ccsb_pkg) \
    tb/tb_ccsb_top.sv --top-module tb_ccsb_top
./obj_dir/Vtb_ccsb_top
```

(The package must come first and appear only once. Any block's testbench
builds the same way, with `tb/tb_<block>.sv --top-module tb_<block>`.)
