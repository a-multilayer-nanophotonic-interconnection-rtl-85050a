# MPNOC: a multilayer photonic network-on-chip for 256 cores

A 256-core chip multiprocessor needs a network where any core can reach any
other core quickly. Long electrical wires are slow and power-hungry. A single
optical crossbar avoids them, but on one silicon layer its waveguides cross
each other thousands of times, and every crossing costs light.

This design splits the crossbar into 16 slices and stacks them on four optical
layers, so no two waveguides have to cross. Electrical routers, one per tile,
do the switching, buffering and flow control. Every tile reaches every other
tile in one optical hop. Access to each optical channel is arbitrated by
one-bit tokens. The receiver issues these tokens only while it has buffer
space, so the same tokens that arbitrate the channel also provide flow
control.

The RTL covers the whole network: the 64 tile routers and the 16 crossbar
slices. The slices are cycle-level models of the photonic parts
(waveguides, ring modulators, detectors) written as clocked logic.

## Organisation

| item | value |
|---|---|
| cores | 256, four per tile (concentration 4) |
| tiles | 64, on an 8x8 grid, one router each |
| clusters | 4 quadrants of 16 tiles |
| optical crossbar slices | 16, one per ordered pair of clusters (source, destination), each 16x16 |
| optical layers | 4, four slices per layer |
| home channels | 256: every tile has one per source cluster |
| flit = phit = packet | 256 bits |
| input buffer | 64 flits per router input port |

**Numbering** (`mpnoc_pkg`). Tile `t = 8*y + x`.
`cluster(t) = {y[2], x[2]}`: cluster 0 is top-left, 1 top-right, 2 bottom-left
and 3 bottom-right. A tile's index inside its cluster is `{y[1:0], x[1:0]}`.

**Layers.** The slice from cluster `s` to cluster `d` lies on layer `s XOR d`:

| layer / router optical port | slices (source -> destination) |
|---|---|
| 0 (router port 5) | 0->0, 1->1, 2->2, 3->3 (intra-cluster) |
| 1 (router port 6) | 0<->1, 2<->3 |
| 2 (router port 7) | 0<->2, 1<->3 |
| 3 (router port 8) | 0<->3, 1<->2 |

With this mapping every router has exactly one optical output and one
optical input on each layer. Output `p` of a tile in cluster `c` writes slice
`(c, c^p)`. Input `p` reads slice `(c^p, c)`.

## Home channels and token slots

This is the part that needs the most care.

Each slice consists of 16 **multiple-write single-read (MWSR)** channels. The
channel that ends at tile T is T's *home channel* from that source cluster.
All 16 tiles of the source cluster may write it, and only T reads it. It
carries 256 bits in parallel: 4 waveguides with 64 wavelengths each. Bit `b`
travels on waveguide `b/64`, wavelength `b%64`.

Two things travel along a channel (`mwsr_channel`):

* **The token.** Every cycle, the reader may inject a one-bit token into the
  channel's arbitration waveguide. The token passes the 16 writers in
  waveguide order. Writer `i` sees it `lat(i) = 1 + i*MAXLAT/16` cycles after
  injection, so four writers share each cycle of latency. The first writer
  that requests the channel as the token passes takes it off the waveguide,
  and writers further along no longer see it. A token that nobody takes falls
  off the end and is lost.
* **The flit.** A writer that captured a token in cycle `t` drives its
  modulators in cycle `t+1` (its E/O stage). The light still has to travel
  `MAXLAT + 1 - lat(i)` cycles to the reader.

The token and the data travel the same loop. A flit therefore reaches the
reader exactly `MAXLAT + 1` cycles after its token entered the waveguide,
whichever writer sent it. Because the reader injects at most one token per
cycle, at most one flit arrives per cycle and two flits can never collide.

`MAXLAT` is 4 cycles on inter-cluster slices and 2 cycles on the shorter
intra-cluster slices.

### Flow control by withholding tokens

A captured token entitles its writer to exactly one flit. The reader
(`optical_rx_port`) injects a token in every cycle in which at least
`RESERVE` entries of its 64-flit buffer are free. A flit waiting in the O/E
register counts as already occupying an entry. `RESERVE` is 12 on
inter-cluster home channels and 8 on intra-cluster ones.

Why the buffer cannot overflow: count the cycles from the reader's decision
to issue a token to the moment the resulting flit occupies buffer space.
This is the round trip. If the round trip is at most `RESERVE` cycles,
every token still in flight is covered by the space that was free when it was
issued. In this model the round trip is `MAXLAT + 4` cycles:

* 8 cycles on inter-cluster channels, against a reserve of 12;
* 6 cycles on intra-cluster channels, against a reserve of 8.

`tb_optical_rx_port` runs the worst case the reservation allows: a 12-cycle
round trip for a reserve of 12, with every token used and nothing
read. The buffer fills to exactly 64 flits and does not overflow.

## The path of a flit

Latency counts from the cycle a core offers a flit (valid high) to the cycle
the flit is valid at the destination core. No contention is assumed.

| stage | cycles | where |
|---|---|---|
| written into the source input buffer | 1 | `flit_fifo` |
| route computation, switch allocation, crossbar (router) | 1 | `electrical_router` |
| token capture (OA) | 1 when a token is passing, more under load | `optical_tx_port` |
| E/O, then optical link | `MAXLAT + 1 - lat(w)` | `optical_tx_port`, `mwsr_channel` |
| O/E register | 1 | `optical_rx_port` |
| written into the destination input buffer | 1 | `optical_rx_port` |
| destination router to output register | 1 | `electrical_router` |

The total is `7 + MAXLAT - lat(w)` cycles, where `w` is the sender's index
inside its cluster:

* 7 to 10 cycles between clusters;
* 7 to 8 cycles inside a cluster;
* 2 cycles between two cores of the same tile, which never touches the
  optics.

## The router

`electrical_router` has 9 ports:

* ports 0-3: the four cores (each core with its private L1; the four share an
  L2 behind the router);
* port 4: memory/IO;
* ports 5-8: the optical layers 0-3.

Every local input has a 64-flit `flit_fifo`. Every optical input is an
`optical_rx_port`, which holds the O/E register, the 64-flit buffer and the
token generator.

Each cycle the router does the following:

1. `route_compute` looks at the head flit of every buffer. A flit for this
   tile goes to the local port named in its header. Any other flit goes to
   optical port `5 + (cluster(this tile) XOR cluster(destination))`.
2. `switch_allocator` runs one round-robin arbiter per output.
3. `crossbar_switch` moves the winning flits.

The router has a single pipeline stage. Local outputs are registered and use
a valid/ready handshake. An optical output is an `optical_tx_port`: it holds
up to four flits (one slot per core of the tile) and raises the token
request of every waiting flit's home channel at once. Each captured token
moves its flit to that channel's E/O register, and the flit is launched the
cycle after the capture; flits on different channels can launch in the same
cycle. Among flits for the same tile only the oldest requests, so flits to
one tile stay in order, while a flit for a busy tile does not hold up flits
for other tiles. A slot is free again in its capture cycle, so one flit per
cycle can enter the port when tokens keep coming. The
router has one virtual channel per port, so there is no virtual-channel
allocation.

**Flit header.** The header fields are packed into the 256 bits: destination
tile (6 bits), destination port (4), source tile (6), source port (4). The
remaining 236 bits are payload.

## What is modelled and what is not

* **Synthesizable RTL:** `flit_fifo`, `route_compute`, `rr_arbiter`,
  `switch_allocator`, `crossbar_switch`, `optical_tx_port`, `optical_rx_port`,
  `electrical_router`, `mpnoc_top`.
* **Behavioural models of the photonics:** `mwsr_channel` and
  `crossbar_slice`. They reproduce the timing and the token behaviour of the
  waveguides and rings as clocked logic. They do not model light, loss,
  wavelengths or laser power.
* **Not modelled:**
  * the laser source, couplers, optical vias and ring heating;
  * the TSVs, which are plain wires here: they take less than one cycle;
  * the cores, caches, memory layers and IO devices, which appear only as
    local ports.

## Measured behaviour

These results come from simulating the full-size network:

* **Zero-load latency.**
  * Tile 0 to tile 63 (between clusters, sender farthest along the token
    waveguide): 10 cycles.
  * Tile 63 to tile 0 (sender nearest): 7 cycles.
  * Tile 0 to tile 27 (inside a cluster): 8 cycles.
  * Two cores of one tile: 2 cycles.
* **Saturation throughput** (every core always has a flit ready), in accepted
  flits per cycle per sending tile:
  * Uniform random: 2.50. The four optical layers deliver into a tile in
    parallel, and the four waiting slots of an optical output compete for
    several home channels at once.
  * Bit-complement, bit-reversal, transpose, tornado, neighbor and perfect
    shuffle: 1.00 each. A permutation gives each destination a single
    sender, and one home channel carries one flit per cycle.
* **Buffer safety.** Under a hot spot with a stalled sink, the receivers
  withhold tokens, no input buffer overflows, and all flits arrive once the
  sink resumes.

## Departures and open points

* **Bandwidth per channel.** The RTL moves one 256-bit flit per channel per
  cycle. At the 5 GHz clock of the evaluated configuration that is
  1.28 Tb/s per channel and 40.96 TB/s over all 256 home channels. The quoted
  peak of 81.92 TB/s rests on 10 Gb/s per wavelength, which is 2.56 Tb/s per
  channel. Reaching it would need the optical interface to run at twice the
  router clock. That clocking is not specified, and this RTL does not
  provide it.
* **Round trip.** The reserves (12 and 8 entries) are kept as specified. The
  modelled round trip (8 and 6 cycles) is shorter than those reserves. The
  reserves are therefore safe, but they leave some buffer unused.
* **Link latency.** The optical link latency is specified as 1 to 4 cycles.
  The inter-cluster spread 1..4 across writer positions and the
  intra-cluster maximum of 2 are this design's choices.
* **Router size.** The router has 9 ports, following the router diagram. The
  energy estimate in the source is instead based on a 5x5 router.
* **Arbitration and writer order.** The writers' order along the waveguide
  gives fixed positional priority for a token. That is inherent in token
  slots. The round-robin switch allocation is this design's choice.
* **Multiple requests.** The evaluation lets the four cores of a tile request
  several optical channels at once. Here each optical output has four
  waiting slots, one per core, with per-destination age order. The slot
  count, the age rule and the allocation to the lowest free slot are this
  design's choices. The slots are not virtual channels: the router still
  has one per port, and the crossbar hands at most one flit per cycle to
  each optical output.
* **Stage sequence.** The reference stage sequence for a flit is: source
  interface, router, optical arbitration, E/O, link, O/E, router,
  destination interface. This design adds one cycle at the destination: the
  flit is written into the input buffer before the router reads it.
* **Token transport.** The source says tokens are piggybacked on the
  arbitration waveguide. Here each home channel's token is a separate
  one-bit signal with its own latency per writer.

## Files

`rtl/` (one unit per file):

* `mpnoc_pkg.sv`: sizes, flit type, tile/cluster/layer functions.
* `flit_fifo.sv`, `route_compute.sv`, `rr_arbiter.sv`,
  `switch_allocator.sv`, `crossbar_switch.sv`: router pieces.
* `optical_tx_port.sv`, `optical_rx_port.sv`: the router's optical
  interfaces.
* `mwsr_channel.sv`, `crossbar_slice.sv`: optical crossbar models.
* `electrical_router.sv`, `mpnoc_top.sv`: tile router and the network.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), and
`tb_mpnoc_traffic.sv`, which runs the synthetic traffic patterns.

## Simulating

Any testbench builds with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mpnoc_pkg.sv \
    tb/tb_mpnoc_top.sv --top-module tb_mpnoc_top -Mdir obj -o sim
./obj/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. They are
self-checking against values worked out independently of the RTL. Each has a
watchdog.

* **Unit testbenches.** These run in well under a second. They include:
  * exhaustive routing checks;
  * a round-robin reference model for the switch allocator;
  * a reference token-slot model for `mwsr_channel`;
  * the worst-case reservation test for `optical_rx_port`;
  * a scoreboard for the router that checks every flit and its order.
* **`tb_mpnoc_top`.** This runs the full-size network (64 tiles, 256-bit
  flits, 64-flit buffers) with nothing scaled down. The build takes a few
  minutes and the run a few seconds. It checks:
  * the zero-load latencies above;
  * uniform random traffic;
  * a hot spot with a stalled sink.

  It checks that every flit arrives once, at the right tile and port, with
  its data. It also requires that each mechanism occurs: token capture,
  waiting for a token, token withheld, unused token slot, allocation
  conflict, same-tile, intra- and inter-cluster delivery, memory/IO delivery
  and sink back-pressure.
* **`tb_mpnoc_traffic`.** This runs the seven synthetic patterns (uniform,
  bit-complement, bit-reversal, transpose, tornado, neighbor, perfect
  shuffle) at saturation. It reports accepted flits per cycle per sending
  tile and requires near-full rate for bit-reversal, where every home
  channel has a single sender.

To change a size, edit the constants in `mpnoc_pkg`, for example
`BUF_DEPTH`, `RESERVE_*` or `LINK_LAT_*`. Keep `RESERVE >= LINK_LAT + 4` on
each kind of channel, or input buffers can overflow; an assertion in
`optical_rx_port` and in `flit_fifo` reports it.
