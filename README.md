# RDT router: a multicasting wormhole router for a recursive diagonal torus

This is synthesizable SystemVerilog for the router chip of a massively parallel
machine whose nodes are joined by an RDT (Recursive Diagonal Torus) network.
Each node sits on a two-dimensional base torus (rank 0) and, in addition, on one
upper-rank torus whose links run at 45 degrees and skip over nodes. The
machine keeps its distributed shared memory coherent with a hierarchical
bit-map directory. The directory sends one invalidation or update to many
nodes at once along a tree (multicast), and collects their acknowledges on the
way back. The router is built for that traffic:

* **Hardware multicast.** A packet goes out on several links in the same cycle. When
  only some destinations are ready, it goes to those now and to the rest
  later.
* **Acknowledge combining.** The router remembers multicasts that leave it.
  It swallows all but the last of the acknowledges coming back, so the source
  gets one acknowledge per branch point instead of one per leaf.
* **Shoot-down.** On request, or on any detected error, every buffered packet
  is drained to the local processor, so the network can be emptied for a job
  switch or debugging and refilled later.

One chip carries an 18-bit slice of each link. Two chips side by side form
the 36-bit link of the real machine. The router runs at 60 MHz in the original system.

## Ports and structure

```
 link 0..3  base torus N,E,S,W   ─┐                         ┌─ link 0..3
 link 4..7  upper torus N,E,S,W  ─┤  10 x mcast_ctrl        ├─ link 4..7
 link 8,9   MBP0, MBP1           ─┘  (2 VC buffers each) ─► xbar 10x11 ─┤─ link 8,9
                                          │   ▲                 └─ out 10: combining sink
                                    req/gnt│   │            
                                     xbar_arbiter (round robin)
                     ack_combiner ◄── lookups/allocs from the controllers
                     sd_ctrl      ◄── MBP request, header/status parity, partner parity, cascade line
```

| module | role |
|---|---|
| `rdt_router` | top: wires everything, one 18-bit slice |
| `mcast_ctrl` | per input link: receives, holds and multicasts packets on 2 virtual channels |
| `packet_buffer` | dual-port 16 x 18 RAM, one per virtual channel (20 in all) |
| `bitmap_gen` | combinational: header + input link + mode → output set and VC per output |
| `buffer_timer` | per buffer: flush a packet that waits too long |
| `xbar` | 10 inputs x 11 outputs, an input may drive many outputs |
| `xbar_arbiter` | round-robin per output, ownership for a whole packet |
| `ack_combiner` | table of outstanding multicasts {key, count} |
| `sd_ctrl` | shoot-down mode and its causes |
| `rdt_pkg` | types, header layout, constants |

Ports 8 and 9 of every controller, and outputs 8 and 9, connect to the two
MBPs (memory based processors, the node's protocol processors). Output 10
never leaves the chip. Acknowledges that the combining buffer absorbs are
sent there and dropped.

## Packets and the header

A packet is 3 to 16 flits: a 3-flit header and a body of up to 13 flits. The
header layout below belongs to this RTL (`rdt_pkg.sv`). It carries what the router
needs: the type, the combining key, the combining-disable bit, the VC mode
and the multicast bit map.

```
flit 0: [17] even parity  [16:15] type 00 data / 01 multicast / 10 acknowledge
        [14] do not combine  [13] user VC mode  [12] user VC  [11:8] length-1  [7:0] key
flit 1: [17] parity [16] 0  [15:8] hop 1  [7:0] hop 0   <- hop 0 is used at this router
flit 2: [17] parity [16] 0  [15:8] hop 3  [7:0] hop 2
hop   : [7] rank (0 base, 1 upper)  [6:3] W,S,E,N  [2:1] MBP1,MBP0  [0] 0
```

The router uses hop 0. It shifts the 32-bit hop list down by one hop before
forwarding, so the next router again finds its own hop in flit 1, bits 7:0.
Parity bits are recomputed after the shift. The arrival link is never
selected, so a packet cannot turn back on itself. A hop that selects nothing
means "arrived", and the packet goes to MBP0. A header therefore describes a
multicast tree up to four routers deep. Every branch carries the same
remaining hop list.

## How a packet moves (the part to understand first)

**Flow control is per buffer, not per flit.** For each VC, every receiver
sends back a *free* bit: "this buffer can take a whole new packet". A sender
starts a packet only on a free VC. The flits then follow one per cycle with no
gaps and no stalls, because the packet is sure to fit. Assertions in
`mcast_ctrl` check both rules.

**Receiving.** Flit *i* is written to address *i* of the VC's buffer. The
three header flits are also kept in registers, and their parity is checked.
In the cycle after flit 2 arrives, `bitmap_gen` produces the pending bit map
(one bit per crossbar output) and a VC for each torus output. Before that bit
map is accepted, two kinds of packet first go to the combining buffer:

* an acknowledge asks whether it is absorbed;
* a multicast with fan-out of at least two records its key.

**Sending (partial multicast).** The controller asks the arbiter for every
pending output whose downstream buffer is free on the right VC. It sends the
packet to all outputs it is granted, with one read of the buffer per flit,
fanned out by the crossbar. It then clears those bits. Outputs that were busy
are served by a later send, which reads the packet from address 0 again.
Flits 0-2 come from the header registers (shifted), the body from the RAM.
The first flit is on the crossbar one cycle after the grant. A packet whose
outputs are free leaves 3 cycles after its third flit arrived, usually long
before its tail arrives (cut-through).

**Next packet during the last multicast.** When the send that clears the
last pending bit starts, the buffer is offered as free again. The next packet
is then written while the old one is still being read. This is safe because
the reader started earlier and both move one flit per cycle, so the writer
never overtakes it.

**Overlapped arbitration.** While a send's tail flit is on the crossbar, the
controller raises `release`. In that same cycle the arbiter may give the
output to the next packet. Packets can therefore follow each other with no
idle cycle. Each output keeps its own round-robin pointer, so no input
starves.

## Virtual channels and deadlock

Every link has two VCs. In the default, deadlock-free mode the VC of each torus
output is chosen as follows:

* **VC1** if the configuration input `wrap_link` marks that output as the
  wrap-around ("dateline") link of its ring;
* **the incoming VC** if the packet goes straight on in the same torus;
* **VC0** after any turn.

Setting `umode` in the header switches a packet to user selection mode, and the
header's VC bit is used on every output. The MBP outputs use VC0.

**Packet order.** Packets between two nodes arrive in the order they were sent
if they follow the same route and the MBP injects them on the same VC. Each
buffer holds one packet, and the VC on each later link depends only on the
route. A packet therefore cannot overtake the one in front of it. An MBP
that spreads packets over both VCs of its port gives up this order. The
original chip also has an extra channel on the east and west base links for a
detour to a neighbour with a different upper rank. That channel is **not**
implemented here.

## Acknowledge combining

The table holds `CMB_ENTRIES` (4) entries of {key, outstanding count}.

* **Multicast leaving with n ≥ 2 outputs:** it records {key, n}. If the key
  is already present, n is added to its count.
* **Table full:** nothing is recorded. Those acknowledges pass through and
  the MBP does the combining.
* **Acknowledge whose key hits:** it is absorbed, and the count drops, unless
  it is the last one. The last one frees the entry and travels on its own
  route.
* **Acknowledge whose key misses:** it passes through unchanged.

The ten controllers share the table. It serves one request per cycle, in
round-robin order.

## Errors, timers and shoot-down

The router enters shoot-down mode (`sd_ctrl`) on any of five causes:

* `mbp_sd_req` from the MBP;
* a header flit with bad parity;
* a buffer whose stored status parity is wrong. Each buffer's status (packet
  valid, flushed, pending bit map) is written together with a parity bit,
  and `mcast_ctrl` compares the two all the time, so an upset status
  register is caught;
* a difference between this chip's buffer-status parity and the partner
  slice's (`status_par_out` and `status_par_in`, compared when `sliced_en`
  is set);
* `chain_in`, the barrier line that links all routers in cascade.

While the router is in the mode, `chain_out` is driven so that the request
passes on. Every buffered packet and every arriving packet is redirected to
MBP0 with its header **unshifted**, so the MBP can later re-inject it
unchanged ("setting up"). `mbp_setup` ends the mode. `sd_cause` holds the
causes seen, until set-up.

Each buffer has a timer (`buffer_timer`). `timer_sel` sets the firing time to
100 us, 1 ms, 10 ms or 100 ms (`TICK_CYCLES` = 6000 cycles = 100 us at 60 MHz).
When the timer fires, the waiting packet is flushed to MBP0 in the same way.

## What this RTL adds to, or leaves out of, the original chip

The original fixes these points:

* ten 18-bit links and their split (4 + 4 + 2);
* the 10x11 crossbar;
* two VCs per link, with dual-port RAM buffers holding a whole packet of
  up to 16 flits and a 3-flit header;
* insertion of the next packet during the last multicast;
* the header bit-map shift;
* round-robin arbitration overlapped with sending;
* combining by key, with overflow handled by the MBP;
* shoot-down causes, including the cascade line;
* header parity, a parity check on the status of every buffer, and
  cross-chip status parity;
* the 100 us to 100 ms buffer timer.

The following are choices made here, because the original does not give them:

* the header bit layout and hop descriptor;
* the buffer-level handshake and all cycle timing;
* the VC rule: a dateline scheme chosen to fit the two-VC requirement;
* the combining-table size (4) and the use of crossbar output 10 as its sink;
* MBP0 as the target of flushed packets;
* the four timer steps;
* how both status parities are formed.

Not modelled:

* the bidirectional use of one physical line and its ECL drivers. Each link is
  a pair of one-way channels here, and the arbiter covers only the crossbar;
* the east/west detour channel;
* the MBP itself.

In bit-sliced use, each chip here routes on its own slice, so the routing
fields must be present in every slice. How the real pair splits the header
is not known.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each one
prints `TB_RESULT checks=N failures=M`.

`tb_rdt_router` runs the whole router at its default parameters, in about
12,000 cycles. It plays all ten neighbours and keeps a scoreboard with its
own model of the routing rules. Every delivery is checked flit by flit,
including the shifted header and the VC, and every destination must be
served exactly once. Directed phases make each of these happen at least
once, and count them:

* multicast and partial multicast;
* back-to-back packets;
* insertion during the last multicast;
* contention on one output;
* dateline VC, straight-through VC and user VC;
* combining, and its full table;
* timer flush at 100 us;
* the shoot-down causes MBP request, header parity, partner parity and
  cascade line, each followed by set-up.

`tb_rdt_router_upset` also runs the router at its default parameters. It
upsets the stored status parity of a buffer that holds a waiting packet.
The router must enter shoot-down mode with only that cause recorded, drain
the packet to MBP0 unshifted, and work normally again after set-up.

`tb_rdt_net` connects four routers in a ring through their east and west
base-torus links, with a dateline on the wrap-around link, and gives each
router an MBP model. It checks, across routers:

* a unicast over three links, with the hop list shifted once per router;
* a multicast tree from one node to two others;
* combining at the branch router: two acknowledges arrive and one is
  delivered;
* 240 random packets between all nodes in both directions at once. All of
  them must arrive intact and exactly once, with no deadlock;
* 240 more packets, each pair of nodes using one fixed route and VC0 at
  injection. These must also arrive in the order they were sent.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/rdt_pkg.sv \
          tb/tb_rdt_router.sv --top-module tb_rdt_router
./obj_dir/Vtb_rdt_router
```

Replace `tb_rdt_router` with any other testbench name. The RTL has two states
and resets all control state, so it does not depend on X handling.

## Changing it

* `rdt_router` parameters: `TICK_CYCLES` (clock cycles per 100 us) and
  `CMB_ENTRIES`.
* The header format lives in `rdt_pkg.sv`: `hdr0_t`, `hop_t` and
  `shift_hops`. The routing rules live in `bitmap_gen.sv`. Change all three
  together, and the testbench reference models with them.
* Packet length is limited by the 4-bit length field and `MAX_FLITS` (16).
