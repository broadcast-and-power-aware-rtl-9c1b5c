# Wireless NoC with broadcast barrier release and power-gated transceivers

Parallel programs on a many-core chip often stop at barriers. Each core
reports that it has arrived, and it waits until every participant has
arrived. On a wired mesh the release is the expensive part. One master tile
has to tell all 63 other tiles that they may go on, and 63 unicast packets
crossing an 8x8 mesh pile up near the master.

This design sends the release once over a shared on-chip wireless channel
instead. Ten of the 64 routers have a wireless interface (WI). The master
sends one broadcast packet to its nearest WI. That WI puts the packet on
the air. Every WI picks it up and spreads it over its own region of the mesh
along a tree, so every tile receives exactly one copy.

The transceivers would burn most of the network's power if they stayed on.
So each WI keeps only a small comparator powered. It switches its receive
chain on only when a frame starts, and back off as soon as it sees that the
frame is addressed to someone else. It switches its transmit chain on only
while it holds the token and has a frame to send.

## Tiles, WIs and regions

The mesh is 8x8, and tile `t` sits at `x = t % 8`, `y = t / 8`. Each tile
has two parts:

- a 4-stage router (`noc_router`);
- a network interface (`nic`), which holds the tile's barrier controller
  (`sync_controller`).

The core and its caches are outside the design. They connect through the
`core_*` port arrays of `winoc_top`.

The ten hybrid routers have a sixth port, which leads to a
`wireless_interface`. They sit at these positions (x,y), with WI number
0..9 in this order:

    (1,7) (3,6) (6,6) (1,4) (7,4) (0,2) (4,2) (6,2) (2,0) (7,0)

A tile belongs to the region of its nearest WI. Distance is Manhattan
distance, and ties go to the lower WI number. Each region is "XY-convex" as
seen from its WI: the XY path from the WI to any tile of the region stays
inside the region. So the XY tree rooted at a WI covers its region with no
overlap, and the union of the ten trees delivers exactly one copy of a
broadcast to each tile. `winoc_pkg::nearest_wi_c` computes the regions at
elaboration. `route_unit` builds a per-WI table of tree branches from
`winoc_pkg::route_dist`. If you move a WI, re-check this convexity. The
unit testbench `tb_route_unit` walks every tree.

## Packet format

Flits are 32 bits wide. Bits [31:30] give the flit type: body 00, head 01,
tail 10, single-flit packet 11.

Head flit:

| bits  | field |
|-------|-------|
| 29:28 | mode: 00 unicast (XY), 01 wireless unicast, 10 broadcast, 11 distribution |
| 27:25 | destination x |
| 24:22 | destination y |
| 21:19 | source x |
| 18:16 | source y |
| 15:12 | WI address; 4'hF is the broadcast pattern |
| 11    | leg: 0 before the wireless hop, 1 after it |
| 10:8  | message: 0 data, 1 barrier ARRIVE, 2 barrier RELEASE |
| 7:0   | argument (barrier id or data tag) |

Body and tail flits carry `{source tile (6 b), tag (8 b), sequence number
(16 b)}`. The receiving NIC checks these and counts mismatches in
`rx_errors`. Data packets are 1 to 64 flits long. Barrier messages are
`BAR_FLITS` (64) flits long.

## Routing

Routing is deterministic. Each router computes a port mask from the head
flit:

- **Unicast (mode 00)**: XY. The packet moves along x first, then y.
- **Wireless unicast and broadcast before the air hop** (mode 01 with
  leg 0, and mode 10): South-Last towards the source's nearest WI. The
  packet moves north first, then east or west, then south. It never turns
  out of a southward move. At the WI's tile it leaves through the WI port.
- **Wireless unicast after the air hop** (mode 01, leg 1): XY from the
  receiving WI to the destination.
- **Distribution (mode 11)**: the packet follows the XY tree of the WI named
  in bits 15:12. A router may send it to several outputs at once, including
  its own local port.

A NIC chooses the wireless unicast only when two things hold:

- the source and destination belong to different WIs;
- the route `source -> source WI -> air -> destination WI -> destination`
  is at least `WL_MIN_SAVE` hops shorter than the wired XY route.

Otherwise it sends on the wires.

## Router

Each router is input-buffered, with wormhole switching and credit flow
control. There are no virtual channels. Each flit passes through four
stages:

1. buffer write;
2. route computation for the head flit, registered;
3. switch allocation;
4. switch traversal into the output register.

A flit therefore takes 4 cycles per hop.

Switch allocation is atomic for multi-output packets: a distribution packet
gets all of its outputs in the same cycle or waits. This keeps two branching
broadcasts from each holding half of the other's outputs. An output is held
from the head flit to the tail flit. The WI port has `PKT_FLITS` credits,
because the WI's transmit buffer holds a whole packet.

## Wireless interface

`wireless_interface` contains these parts:

- **Serializer** (`wi_serializer`): a store-and-forward buffer for one
  packet. When a whole packet is in it, `pkt_ready` requests the token.
  Once started, it sends a carrier-on preamble of `PRE_CYC` cycles, then
  each flit as 32/`LANE_W` symbols, LSB first and back to back.
- **Token ring** (`token_ring`, in the top): a single token moves round
  robin, one WI per cycle, while no one wants it. It stops at a requesting
  WI and stays there until that WI's frame is done. Only the token holder
  may transmit, so the channel never carries two frames at once. The
  testbench asserts this.
- **RF front end** (`ook_rf_frontend`): a behavioural model of the analog
  part. It has four gated parts: power amplifier, up-mixer, LNA and
  down-mixer. The comparator is always on. A gated-off part passes nothing.
  The model also reports a power estimate.
- **Deserializer** (`wi_deserializer`): frames on the rising edge of the
  comparator's carrier detect. It skips the preamble and rebuilds 32-bit
  flits.
- **Pattern decoder** (`pattern_decoder`): checks the WI address of a
  received head flit. It accepts its own address or the broadcast pattern,
  and rewrites the header:
  - a wireless unicast gets leg = 1;
  - a broadcast becomes a distribution packet with the WI address set to
    this WI's number.
- **Power-gating controller** (`wi_pg_ctrl`, below).

A WI does not receive its own frame from the air. Instead, the head flit of
a broadcast it transmits is rewritten by its own decoder. The packet is
copied straight into its receive buffer, so its own region gets the release
too. The receive buffer holds two packets and feeds the router's WI input
under credit flow control.

## Power gating

`wi_pg_ctrl` drives one power switch per gated part. The four `wi_pgs` bits
are `{PA, up-mixer, LNA, down-mixer}`, and a 1 means powered. The controller
has these states:

| state | powered | leaves when |
|-------|---------|-------------|
| SLEEP | nothing (comparator only) | carrier seen -> RX_HDR; token held with a packet ready -> TX_WAKE |
| RX_HDR | LNA, down-mixer | header decoded: accepted -> RX_DATA, rejected -> RX_IGNORE |
| RX_DATA | LNA, down-mixer | tail flit or carrier gone -> SLEEP |
| RX_IGNORE | nothing | carrier gone -> SLEEP |
| TX_WAKE | PA, up-mixer | after `WAKE_CYC` cycles, starts the serializer -> TX_BUSY |
| TX_BUSY | PA, up-mixer | serializer done -> SLEEP |

The transmitter's preamble (`PRE_CYC = WAKE_CYC + 2`) is longer than the
receive chain's wake-up time. So a receiver that wakes on the carrier edge
is ready before the first data symbol arrives.

The power model in `ook_rf_frontend` uses these figures:

| part | power |
|------|-------|
| always-on part | 6.3 mW |
| PA | 10 mW |
| LNA | 10 mW |
| each mixer | 3 mW |

A WI asleep therefore uses 6.3 mW, and one with both chains on uses
32.3 mW, which is an 80.5 % saving when asleep. Ten WIs fully on would use
323 mW. `wi_power_uw` gives each WI's current figure in microwatts. These
are model numbers for estimating energy in simulation; nothing on chip
measures them.

## Barrier synchronization

Each barrier `b` (0..`NUM_BAR`-1) has a master tile, set by
`MASTERS[6*b +: 6]`. By default barriers 0-3 have masters at tiles 27, 36,
28 and 35, in the middle of the mesh. A barrier runs like this:

1. When a core raises `core_bar_arrive` with an id, its `sync_controller`
   sets `core_bar_waiting[id]`.
2. If the tile is not the master, the controller sends one ARRIVE unicast
   to the master.
3. The master counts its own core's arrival plus the ARRIVE messages. When
   the count reaches `NUM_PART`, it clears the count and sends one RELEASE
   broadcast.
4. Every tile that receives the RELEASE pulses `core_bar_release`, with the
   id in `core_bar_release_id`, and clears its waiting bit.

Several barriers can be in flight at once.

Because every ARRIVE message is a full 64-flit packet, the 63 messages for
one barrier bring about 4000 flits into the master's single local port. At
the default size, the last release therefore comes about 4400 cycles after
the last arrival. Most of that time is the arrivals queueing at the master;
the broadcast release itself is a small part of it. Shorter barrier
messages (`BAR_FLITS`) shrink that wait directly.

## Parameters of `winoc_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `PKT_FLITS` | 64 | largest packet, in flits; also the WI transmit buffer size |
| `BAR_FLITS` | 64 | length of barrier messages |
| `BUF_DEPTH` | 4 | input buffer depth per router port |
| `LANE_W` | 4 | bits sent over the air per cycle |
| `WAKE_CYC` | 8 | cycles the transmit chain needs to power up |
| `NUM_BAR` | 4 | barriers that can be active |
| `NUM_PART` | 64 | participants per barrier |
| `WL_MIN_SAVE` | 6 | minimum hop saving for a wireless unicast |
| `MASTERS` | 27,36,28,35 | master tile of each barrier (6 bits each) |

The mesh size (8x8), the flit width (32) and the WI positions are constants
in `winoc_pkg`.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/winoc_pkg.sv tb/tb_noc_router.sv --top-module tb_noc_router
    ./obj_dir/Vtb_noc_router

`tb_winoc_top` runs the full 64-tile network at the default parameters:

1. four data packets, two of them wireless and sent from different WIs at
   the same time;
2. one barrier with all 64 cores arriving in random order;
3. two barriers interleaved.

It checks the following:

- each data packet arrives once, with the right source, tag, length and
  wireless flag;
- no core is released early;
- every core gets exactly one release per barrier;
- all WIs are asleep at the end.

It also counts wireless unicasts, frames on air, rejected headers,
wake-ups and token hand-overs, and fails if any count is zero.

Verilator needs several minutes to compile the full network. The simulation
itself takes seconds.

## Where this design departs from the description it follows

- **Ten WIs, not twelve.** The source text counts ten WIs for 64 cores, but
  its floorplan drawing shows twelve hybrid routers. This design uses ten:
  the drawing's positions minus (4,4) and (2,2). The source places WIs by
  simulated annealing, which is not reproduced here.
- **Link rate.** The source gives 16 Gb/s wireless links. `LANE_W = 4` bits
  per cycle is 10 Gb/s at a 2.5 GHz clock. Raise `LANE_W` to 8 to send a
  flit in 4 cycles.
- **Invented details.** The source does not give these, so they are choices
  of this design:
  - wake-up time and preamble length;
  - the controller's states;
  - the header layout;
  - the wireless-unicast rule;
  - the master tiles;
  - the router's buffer depth and pipeline split;
  - the broadcast tree, which is a plain XY tree per region rather than the
    load-balanced tree the source cites.
- **No virtual channels.** The router has none, and broadcasts use atomic
  multi-output allocation.
- **Analog parts are behavioural only.** The antenna, the power switches and
  the clock generation are not modelled. The RF front end is a behavioural
  model at its digital boundary.
