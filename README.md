# Mesh network-on-chip with 2-phase channels and Wishbone network interfaces

A shared bus slows down as masters are added, because every transfer competes
for one channel. This design replaces the bus with a two-dimensional mesh of
small switching nodes. Point-to-point channels link each node to its neighbours.
Each functional unit talks to its own node through a Wishbone network
interface. Transfers between different pairs of nodes then run in parallel,
and the arbitration problem becomes a routing problem.

The RTL follows the node architecture of *Asynchronous Network-on-Chip
Communication Architecture Performance Analysis*, in its clocked form:
- each node has five ports (North, East, South, West and a local
  "Destination" port);
- each port has a Router on its input and an Arbiter on its output, with a
  crossbar between them;
- routing is by relative (delta-XY) address;
- arbitration is random;
- channels are 32 bits wide with a request/acknowledge handshake;
- buffering is minimal.

The architecture was also proposed as a globally-asynchronous (GALS) circuit
built from self-timed micro-pipelines. That variant is **not** in this RTL (see
"Departures" below). What is here is the synchronous realisation of the same
node, which uses flip-flops and XORs for a 2-phase handshake.

The default configuration is an 8 × 8 mesh (64 nodes) with packets of up to
7 payload words. A shared Wishbone bus with the same 64 master and slave
ports (`noc_wb_bus`) is included as the baseline to measure the mesh against.

## Channels and the 2-phase handshake

A channel runs in one direction and has three parts: `req`, `data[31:0]` and
`ack` (`noc_pkg::chan_fwd_t` holds `req` and `data`; `ack` runs back on its own
wire).

- The sender presents a new 32-bit word, called an STU (space-time unit), by
  toggling `req`. It keeps `data` stable.
- The receiver takes the word by toggling `ack`.
- A word is pending while `req != ack`. Each end needs only one flip-flop for
  its phase and one XOR to compare phases.
- No return-to-zero phase is needed, so one word costs one transition of
  each signal.

Both `req` and `ack` come from flip-flops. A word therefore takes one clock to
be seen and one clock to be acknowledged. One channel moves at most **one STU
every two clocks**.

## Packets

A packet is one header STU followed by data STUs. The header layout, from
`noc_pkg::header_t`:

| bits    | field   | meaning                                              |
|---------|---------|------------------------------------------------------|
| [31:24] | `dx`    | signed hops still to go, East (+) / West (−)         |
| [23:16] | `dy`    | signed hops still to go, North (+) / South (−)       |
| [15:12] | `src_x` | sender x                                             |
| [11:8]  | `src_y` | sender y                                             |
| [7:0]   | `len`   | payload words                                        |

A packet always has **even length**: the header plus an odd number of data
STUs. The architecture requires this so that a burst passing a node leaves the
channel phases as it found them. When the payload is even, the sending
interface appends one zero pad word. Every Router therefore expects `len | 1`
data STUs, and the receiving interface drops the pad.

## Routing: delta-XY

The header carries the remaining distance, not the destination. For each
header, a Router:
- moves along X while `dx ≠ 0`, stepping `dx` one unit towards zero;
- then moves along Y while `dy ≠ 0`, stepping `dy` the same way;
- delivers to the Destination port once both are zero.

So the Router rewrites the address at every hop, and "arrived" is just a test
for zero. Routing X before Y is this design's choice. With paths held for a
whole packet (below), dimension-order routing cannot deadlock in a mesh.

Directions: node `n = y·MESH_X + x` sits at `(x, y)`. East is `x+1` and North
is `y+1`. Channels at the edge of the mesh are tied idle. Packets addressed
inside the mesh never use them, and an assertion in `noc_top` checks that.

## Inside a node

```
   in (N,E,S,W,D) --> Router x5 --req/STU--> crossbar --STU--> Arbiter x5 --> out (N,E,S,W,D)
                        ^                      |   ^                |
                        +------- accept -------+   +---- grant -----+
   D = Destination: the local network interface (noc_ni_tx in, noc_ni_rx out)
```

- **Router (`noc_router`)** — one per input. It stores no data: the
  upstream sender holds the word until acknowledged.
  - Idle, it reads a pending STU as a header. It computes the output
    direction and the rewritten header, and raises a one-hot request to the
    crossbar.
  - Once that header is accepted, the Router is bound to that output. It
    forwards the next `len | 1` STUs to it and flags the last one.
- **Crossbar (`noc_crossbar`)** — combinational.
  - For each output it collects the requesting Routers.
  - It multiplexes the granted Router's STU and `last` flag to the Arbiter.
  - It routes the Arbiter's `fire` back to that Router as its accept.
- **Arbiter (`noc_arbiter`)** — one per output.
  - When its output holds no packet, it picks one requester at random. A
    16-bit LFSR gives the starting point of a rotating search.
  - The winner keeps the output until its `last` STU has passed, so packets
    are never interleaved (wormhole switching).
  - Each accepted STU goes into the output register, the only storage on
    the path. `req` then toggles. The next STU is taken only once `ack` has
    come back.

A packet blocked at a busy output stalls in place. Its words stay in the
upstream output registers, and the acknowledges stop. The stall spreads back
hop by hop to the sender, and nothing is dropped.

## Network interfaces (Wishbone)

**Send side, `noc_ni_tx` (Wishbone slave).**
- A master writes a burst. The first write's address selects the destination
  node: `adr[3:0] = x`, `adr[7:4] = y`.
- ACK is combinational: a word is acknowledged in the cycle of its strobe.
- The burst ends when CTI is not `3'b010` (incrementing burst), when
  `MAX_DATA` words have been collected, or when CYC drops. A longer burst
  continues in a new packet.
- The interface then sends the header (`dx = dest_x − MY_X`,
  `dy = dest_y − MY_Y`), the words and a pad word if needed. While it sends,
  it withholds ACK, which throttles the master.

**Receive side, `noc_ni_rx` (Wishbone master).**
- The header is taken at once.
- Each payload word becomes a Wishbone write. The address is the sender node
  (`{src_y, src_x}` in `adr[7:0]`). CTI is `3'b010`, and `3'b111` on the
  packet's last word.
- The channel is acknowledged only when the slave ACKs. A slow slave
  therefore throttles the network behind it.

Both interfaces only write. The functional units this network was designed
for either generate or absorb data.

## The shared-bus baseline (`noc_wb_bus`)

For comparison, `noc_wb_bus` is the conventional interconnect the mesh
replaces: a single Wishbone channel shared by all masters.
- One multiplexer routes the granted master's CYC, STB, WE, ADR, DAT and CTI
  towards the slaves. ADR, DAT, WE and CTI reach every slave; CYC and STB
  reach only the addressed one (`adr[7:4] * GRID_X + adr[3:0]`, the same
  `{y, x}` map as the mesh). A second multiplexer returns that slave's ACK to
  the owning master only.
- When the bus is idle, an arbiter picks one master with CYC high at random:
  the same LFSR-seeded rotating search as the mesh Arbiter. The winner keeps
  the bus until it drops CYC, so a whole burst is one tenure.
- Grant and release each take one clock. In between, ACK is combinational,
  so a burst to a slave that acknowledges at once moves one word per clock.

The bus has no store-and-forward stage, so a lone transfer is fast. But all
traffic shares one word per clock, so the delay explodes once the masters
together offer more than that.

## Timing

- **Rate.** One STU per two clocks per channel. With 7-word packets, 7 of
  every 8 STUs are payload. At 500 MHz (the clock the architecture was
  evaluated at), that is 250 M STU/s, or about 875 MB/s of payload per link.
- **Latency through an empty mesh.** Count from the clock edge at which the
  sending interface acknowledges the last word of a one-word burst. The
  receiving slave sees its write strobe **H + 3** clocks later, where H is the
  number of nodes on the path (|dx| + |dy| + 1):
  - one clock to load the header;
  - one register stage per node;
  - two more clocks because the payload STU trails the header by one channel
    cycle.

  Corner to corner in the 8 × 8 mesh, that is 15 nodes and 18 clocks. The
  end-to-end testbenches check this number.

## Behaviour under Poisson traffic

`tb_noc_workload` drives the default mesh with the traffic model the
architecture was evaluated with:
- one measured master/slave pair, 4 hops apart;
- K − 1 background masters sending to random nodes;
- bursts started at exponential intervals of mean 100 µs / λ;
- 38-word (1200-bit) bursts, because λ = 10 corresponds to 120 Mb/s per
  master.

One run gave these mean delays, from a burst's generation to its last word
(clocks; ns at 500 MHz):

| λ (bursts / 100 µs) | masters | measured pair | all bursts |
|---------------------|---------|---------------|------------|
| 10                  | 3       | 126 (252 ns)  | 129        |
| 10                  | 63      | 129 (258 ns)  | 133        |
| 100                 | 3       | 126 (252 ns)  | 144        |
| 100                 | 15      | 141 (282 ns)  | 178        |
| 100                 | 63      | 206 (412 ns)  | 343        |

The floor of about 126 clocks comes from the sending interface, not the
network. It stores and forwards 7-word packets. Each packet takes about
22 clocks: 7 to collect it, then 8 STUs loaded two clocks apart. A 38-word
burst is five full packets and one of 3 words. The
delay rises only moderately with the number of masters, so the mesh stays far
from saturation at these rates.

`tb_noc_bus_workload` runs the same traffic on the 64-port shared bus, each
master paired with its own slave, averaged over all pairs:

| λ  | 3 masters | 15 masters | 63 masters |
|----|-----------|------------|------------|
| 10  | 39        | 40         | 60         |
| 100 | 41        | 214        | 11068      |

At λ = 100 the bus saturates: 63 masters offer 4.8 words per clock against
one. The mesh, at about 130–200 clocks there, wins from somewhere between 3
and 15 masters, as the architecture's evaluation found (5 or 6 masters). At
λ = 10 the bus is still ahead at 63 masters in this RTL. The published
break-even there is about 20 masters. The difference comes from the send
interface's store-and-forward floor of about 126 clocks and from the
single-clock bus cycle; the published bus model was slower per transfer.

These are cycle counts of this RTL. They are not comparable with the delays
published for the architecture, which came from a transaction-level model with
estimated gate delays.

## Parameters

| module       | parameter  | default | meaning                                      |
|--------------|------------|---------|----------------------------------------------|
| `noc_top`    | `MESH_X`, `MESH_Y` | 8, 8 | mesh size (up to 16 × 16 with 4-bit coordinates) |
| `noc_top`, `noc_ni_tx` | `MAX_DATA` | 7 | payload words per packet (≥ 2)          |
| `noc_ni_tx`  | `MY_X`, `MY_Y` | 0, 0 | node coordinates (set by `noc_top`)      |
| `noc_node`, `noc_arbiter` | `SEED` | 16'hACE1 | LFSR start; `noc_top` varies it per node |
| `noc_wb_bus` | `NM`, `NS` | 64, 64 | masters and slaves on the shared bus     |
| `noc_wb_bus` | `GRID_X`, `SEED` | 8, 16'hACE1 | slave address map width; LFSR start |

The 32-bit STU, the five directions and the header field widths are constants
in `noc_pkg`. The 8 × 8 default matches the largest system the architecture
was evaluated on: 63 background masters plus one measured master/slave pair.
With 7-word packets, a full packet is 8 STUs. That size is this design's
choice.

## Departures from the original architecture

- **No asynchronous variant.** The GALS Router and Arbiter were described as
  self-timed micro-pipelines, with Muller C-elements, hold-pass latches, a
  4-phase delay-insensitive handshake and MUTEX arbitration. No circuit for
  them is given, and a clockless circuit is not clocked RTL. Only the
  synchronous form of the same node exists here. The published comparison
  found the GALS form 24–27 % faster in delay and about equal in throughput.
- **Random arbitration from an LFSR**, not a MUTEX. The LFSR choice is
  pseudo-random and repeats for a given seed.
- **Chosen by this design, not given by the architecture:**
  - X-before-Y routing order;
  - the header layout;
  - the crossbar structure;
  - holding an output for a whole packet;
  - one output register per Arbiter;
  - packet size;
  - buffering a whole burst in the send interface;
  - the Wishbone address map and write-only interfaces;
  - asynchronous active-low reset.
- **The shared bus is clocked.** The original bus combined a synchronous
  handshake with an asynchronous setup and a MUTEX arbiter. Here, grant and
  release are registered and the arbiter is the LFSR search.
- **Not modelled:** wire delay. The architecture was also evaluated with
  slow (500 ps) lines; in clocked RTL that is a timing-closure question, not
  a behaviour.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_noc_router`      | 200 random packets; direction and rewritten header from an independent delta-XY model; path kept for `len|1` STUs; `last` only on the last; no acknowledge without accept |
| `tb_noc_arbiter`     | 400 packets from 5 simulated Routers with random pauses and a random-delay receiver; grant is a requester; output held per packet; nothing taken while busy; data in order; every input wins sometimes |
| `tb_noc_crossbar`    | 2000 random vectors against a reference |
| `tb_noc_ni_tx`       | 150 bursts of 1–10 words; packet splitting, header fields, pad words, throttling |
| `tb_noc_ni_rx`       | 200 packets; Wishbone address/data/CTI, pad words dropped, channel held during slave wait states |
| `tb_noc_node`        | 600 packets from all five inputs at once; per-output order, no interleaving, header rewrite; contention and blocking must occur |
| `tb_noc_top`         | 4 × 4 mesh; probe latency; 30 Poisson-spaced bursts per master to random nodes; every word checked at its slave. Contention, blocking, throttling, slave stalls, pad words, split bursts, local delivery and all four directions must each occur |
| `tb_noc_top_full`    | same traffic model on the default 8 × 8 mesh with no parameter overrides; 18-clock corner-to-corner probe |
| `tb_noc_workload`    | default mesh; λ = 10 and 100 with 3, 15 and 63 masters; all words intact and in order, no saturation |
| `tb_noc_wb_bus`      | 5 masters, 6 slaves, 60 random bursts each with slave wait states; every word at the addressed slave in order with its CTI; one slave cycle at a time; bursts never interleaved; contention must occur |
| `tb_noc_bus_workload`| default 64-port bus; same λ and master counts; all words delivered; saturation at λ = 100 with 63 masters |

`tb_noc_env` is the shared traffic environment: Wishbone master and slave
models, exponential gaps between bursts, a scoreboard per source and
destination, and the delay from generation to the last word.

To simulate with Verilator 5, for example the 4 × 4 mesh:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv rtl/noc_router.sv \
  rtl/noc_arbiter.sv rtl/noc_crossbar.sv rtl/noc_node.sv rtl/noc_ni_tx.sv \
  rtl/noc_ni_rx.sv rtl/noc_top.sv tb/tb_noc_env.sv tb/tb_noc_top.sv \
  --top-module tb_noc_top -o sim
./obj_dir/sim
```

For a single block, list `rtl/noc_pkg.sv`, the block's file and its
testbench (`noc_wb_bus` needs no package). The full 8 × 8 testbench takes about a minute and a half to build.

## Lint notes

Verilator reports two kinds of warning, and both are expected:
- `SYNCASYNCNET` on `rst_n`: the reset is asynchronous in the flip-flops and
  also appears in the assertions' `disable iff`.
- `UNUSEDPARAM` for `noc_pkg::NDIR` when a network interface is linted on its
  own: the interfaces use the package's types but not the direction count.

The RTL has no latches, combinational loops or multiply-driven nets.
