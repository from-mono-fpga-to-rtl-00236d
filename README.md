# Multi-FPGA emulation platform for a Hermes network-on-chip

A network-on-chip (NoC) is easiest to evaluate by running it on an FPGA with
synthetic traffic sources and sinks at every node. Once the network is too big for
one FPGA it has to be split over several boards. The mesh links cut by the split
then go over high-speed serial links between the boards, and each link needs a
little logic at both ends to fit the NoC's flit links to the serial core.

This RTL is such a platform for a 4 x 3 Hermes mesh split over two FPGAs, with the
emulation logic around it:

* a **traffic generator** and two **traffic receptors** (statistics and trace) at
  every node, replacing the IP cores;
* **adaptation blocks** at the cut, which do clock-domain crossing, packet
  buffering and, when there are fewer serial links than cut links, multiplexing.

The generated platform comes in two versions, and both are in the top level:

| version | cut links (N_IF) | physical links (N_PL) | adaptation block per FPGA |
|---|---|---|---|
| 1 | 3 (one per row) | 3 | three `adaptor1` (two FIFOs each) |
| 2 | 3 | 1 | one `adaptor2` (three FIFO pairs, multiplexer, de-multiplexer) |

The serial link cores themselves (in the original setting, Xilinx Aurora cores on
GTP transceivers) are vendor IP and are not included. Their user-side streams are
ports of the top level, and `tb/aurora_link_model.sv` models them in simulation.

## The platform

```
          FPGA 0 (fpga_platform, X_LO=0)                 FPGA 1 (fpga_platform, X_LO=2)
   (0,2)----(1,2)--[adapt]==serial link==[adapt]--(2,2)----(3,2)
     |        |                                      |        |
   (0,1)----(1,1)--[adapt]==serial link==[adapt]--(2,1)----(3,1)
     |        |                                      |        |
   (0,0)----(1,0)--[adapt]==serial link==[adapt]--(2,0)----(3,0)
   every (x,y): hermes_switch + traffic_generator + tr_stats + tr_trace  (emu_node)
```

This is version 1. In version 2 the three east ports of column 1 all go to one
`adaptor2`, which shares a single serial link.

`fpga_platform` is what one FPGA holds: its columns of the mesh, one `emu_node` per
switch, a 16-bit time base `now`, and the adaptation blocks on the cut side
(`EAST_EDGE`). The parameter `N_PL` picks the scenario:

* `N_PL >= 3`: one `adaptor1` per row, row y on physical link y;
* `0 < N_PL < 3`: `N_PL` `adaptor2` blocks, each taking G = ceil(3/N_PL) rows;
* `N_PL = 0`: no cut. With `X_CNT = 4` and `BOUND_X = 0` this is the whole mesh
  in one FPGA, the single-FPGA reference that the testbenches compare against.

`emu_top` instantiates four `fpga_platform`s: two for version 1 (`u_v1`) and two
for version 2 (`u_v2`). Ports are indexed `[fpga][physical link]` for the serial
side and `[fpga][node]` for the emulation side, with node n = y*2 + (x - 2*fpga).
All four share one NoC clock and reset. Time stamps made on one FPGA are compared
on the other, so their time bases have to agree. Each serial link end has its own
user clock.

## Packets

Flits are 16 bits. Every packet made by the generators has this layout (15 flits by
default):

| flit | content |
|---|---|
| 0 | header: destination address, X in bits 15:8, Y in bits 7:0 |
| 1 | size: number of payload flits (13) |
| 2 | source address |
| 3 | creation time (value of `now`) |
| 4 | bits 14:8 injection rate in %, bits 7:0 number of inter-FPGA links crossed |
| 5 | sequence number |
| 6.. | filler: `{seq, index} ^ 16'hA5C3`, checked by the receptors |

The switches only look at flits 0 and 1. Everything else is for the emulation.

## Crossing the cut

### The packet FIFO (`pkt_fifo`)

Both adaptation blocks are built from one FIFO type, used as **FIFO-Out** (NoC
clock to link clock) and **FIFO-In** (link clock to NoC clock). Each FIFO holds
one packet (16 entries of flit + end-of-packet mark) and has two jobs:

1. **Frequency adaptation.** Write and read pointers cross between the two clocks
   as Gray codes through two-flop synchronisers. The usual full/empty comparisons
   follow from them.
2. **Store-and-forward.** A Gray-coded count of *packets* written crosses the
   same way. The read side offers nothing until a complete packet is inside, or
   until the FIFO is full (then a packet longer than the FIFO passes cut-through
   rather than dead-locking). Once a packet has started it is read out to the end.

So a packet reaches the serial link only once it is whole, and it occupies the
link for exactly its length. The delay of a FIFO is the synchroniser's two to
three read-clock cycles plus one cycle per flit. This matches the "2 cycles for
control plus 1 per flit" budget used by the receptors (below).

The NoC links carry no end-of-packet wire. On the way in, `pkt_tracker` follows
the size flit to mark the last flit of each packet. On the way out, the mark
travels on the link as `eof`.

### Adaptor 1

One FIFO-Out and one FIFO-In, nothing else. On the NoC side it behaves like a
neighbouring switch: credit-based, `credit_o` = FIFO-Out not full, and it sends
only while the switch gives credit. On the link side there are two valid/ready
streams of `link_word_t = {chan[3:0], eof, flit[15:0]}`.

### Adaptor 2

Three FIFO pairs share one serial link:

* `link_mux` gives the link to one FIFO-Out at a time, round-robin, for a **whole
  packet**. It locks on the first word and releases after `eof`, and it writes the
  FIFO's number into `chan`.
* `link_demux` on the far side sends each word to the FIFO-In named by `chan`. It
  holds the link while that FIFO-In is full, and drops and counts (`bad_chan`)
  words whose channel does not exist.

Store-and-forward in the FIFO-Outs is what keeps the multiplexed link efficient:
a packet is never started on the shared link before all of it is at hand.

### What the serial link core must provide

Per direction, a valid/ready word stream that keeps word order and frames, and
that applies back-pressure end to end (ready low when the far side cannot take
more). With Aurora, this means its framing interface plus native flow control, or
an equivalent credit scheme. The 21-bit word fits a 4-byte user interface. The
testbench model delivers a frame 24 clock cycles after it starts (or after the
previous frame ends) and then one word per cycle. Those are the link timings the
overhead correction below assumes.

## Measuring

### Traffic generator

Each generator holds its own address and, from `tg_cfg_t`, the destination, the
packets per run (`npkts`) and the injection rate. It works out from the addresses
whether the packet will cross the cut. With XY routing that is exactly once when
source and destination are on different sides of column `BOUND_X`.

An injection rate of r % means packets occupy r % of the local link, so a packet
is *created* every `PERIOD = PKT_FLITS*100/r` cycles (integer division, done by a
16-step divider whenever the rate changes: 150 cycles at 10 %, 15 at 100 %). A
packet is *sent* as soon as its creation time has come and the previous packet has
left. Its time stamp stays its creation time, so when the network backs up, the
time spent waiting at the source shows in the latency. That is what makes
saturation visible.

Two modes:

* **constant**: `cfg.rate` for one run of `npkts` packets;
* **sweep**: 10 %, 20 %, ... 100 %, `npkts` packets each, in one run. Each node
  steps on its own, and its packet schedule restarts at each step. Nodes therefore
  change rate at different times, and a step that saturates does not carry its
  backlog into the next one. For clean per-rate figures, use one constant-rate run
  per rate.

In either mode, `cfg.stoch` makes the intervals between creation times random.
Each interval is drawn evenly from 0 to 2*PERIOD-1 cycles (at least 1), so the
mean rate is unchanged while packets bunch up and spread out. The draw is
`max(1, L*PERIOD >> 15)`, where L is a 16-bit LFSR (x^16 + x^14 + x^13 + x^11 + 1)
that runs every cycle from reset. Its value is taken in the cycle of a packet's
last flit. The seed comes from the node address, so the nodes are not in step.

A rising edge of `cfg.start` starts a run; `done` is high after it.

### Statistics receptor (`tr_stats`)

It counts packets, flits and bad packets (wrong destination, too short, bad
filler). It also keeps the sum, minimum and maximum of latency, where latency is
the arrival time of the last flit minus the creation time. Average latency is
`lat_sum / pkts`.

It also keeps `lat_comp_sum`, the latency with the cost of crossing FPGAs removed.
This estimates the latency the same traffic would see in one FPGA. For each
crossing of a packet of n flits it subtracts

    24 + n      serial link (frame start-up, then one cycle per flit)
  + 2 + n       FIFO-Out (control, then one cycle per flit)
  + 2 + n       FIFO-In
  = 28 + 3n     (73 cycles for a 15-flit packet)

The result is floored at zero. These constants (`T_AURORA_INIT`, `T_FIFO_CTRL` in
`noc_pkg`) describe the link and FIFOs measured on the original hardware. With a
different serial core, change them.

### Trace receptor (`tr_trace`)

It writes one `trace_t` record per packet (source, sequence, rate, crossings,
creation time, arrival time) into a 64-entry memory that is read out through
`trace_addr`. Records beyond 64 are dropped and `overflow` is set. 64 entries hold
one 50-packet run.

Both receptors decode packets with the shared `tr_parser`. They always accept, so
the local port's credit is tied high. Their results update at the second clock
edge after a packet's last flit.

## The Hermes switch

`hermes_switch` is a five-port (East, West, North, South, Local) wormhole router:

* Each input has a 16-flit buffer (`hermes_buffer`) that returns credit while not
  full.
* A central routing unit serves, round-robin, the inputs whose head flit is an
  unrouted header. It connects one of them per cycle to the output that XY routing
  names (X first, then Y), if that output is free.
* A connection carries the header, the size flit and `size` payload flits, and is
  released after the last one.
* The crossbar is combinational from buffer head to output: a flit moves whenever
  its buffer is not empty and the downstream credit is high.
* A header entering an idle switch leaves two cycles later; flits follow one per
  cycle.

Assertions check that no flit is sent without credit and that no buffer overflows.

## Behaviour in simulation

`tb/tb_emu_top.sv` runs both versions at their default sizes, with the
single-FPGA reference alongside. Every node sends 50 packets of 15 flits to its
mirror node (3-x, 2-y), so every packet of the split platforms crosses the cut. The
link user clocks run at the NoC clock rate with a phase offset. Average latency in
NoC cycles, one constant-rate run per rate:

| rate | single FPGA | version 1 | v1, overhead removed | version 2 | v2, overhead removed |
|---|---|---|---|---|---|
| 10 % | 31 | 99 | 26 | 2085 | 2012 |
| 30 % | 31 | 736 | 663 | 4535 | 4462 |
| 50 % | 80 | 1226 | 1153 | 5025 | 4952 |
| 100 % | 447 | 1593 | 1520 | 5393 | 5320 |
| 20 %, random intervals | 27 | 193 | 120 | 3955 | 3882 |

The ordering matches what such a platform should show:

* the single FPGA is fastest;
* version 1 saturates later than version 2, because one link carrying three cut
  links plus 24 cycles of frame start-up per packet saturates at once under this
  traffic;
* below saturation, removing the crossing overhead brings version 1 back to about
  the single-FPGA latency (26 against 31 cycles at 10 %).

This traffic pattern (two nodes per row sending across the same cut link) is
harsher than a spread-out load, so the saturation points are low. The absolute
numbers depend on the generators' latency definition and on the link model. They
are not hardware measurements.

Where this differs from the figures reported for the original hardware:

* **Version 1 saturates earlier than the single FPGA** (about 30 % against
  50 %), whereas the original platform saw the same saturation point for both.
  Here every packet pays 24 cycles of frame start-up on the serial link, so a row
  link moves at most 15 flits every 39 cycles (38 %), and two sources share it.
  A link core that streams frames back to back, or traffic that crosses the cut
  less often, would move version 1 toward the single FPGA.
* **Latency below saturation is 31 cycles** for the single FPGA, against about
  92 reported. The traffic pattern behind that figure is not known, so it is not
  reproduced.
* **The added latency of a crossing is 73 cycles** by the per-stage budget, while
  478 cycles was reported as measured. The measured figure includes queueing,
  which the budget does not. The receptors remove only the budget, so above
  saturation the overhead-free latency of version 1 stays well above the single
  FPGA's.

## How far this follows the source description

These parts follow the platform as it was described:

* the 4 x 3 mesh and its split into columns 0-1 and 2-3;
* the two adaptation scenarios and what each adaptor contains (FIFO-Out/FIFO-In;
  plus multiplexer and de-multiplexer);
* FIFOs that adapt clock rates and hold one packet;
* generators that know source, destination, packet size, packet count and
  crossings, with a constant rate or a 0-100 % sweep;
* statistics and trace receptors;
* 15-flit packets and 50-packet runs;
* the 24 / 2 / 1-per-flit timing of the link and FIFOs.

These are choices made here, because the description names the Hermes switch
without its details and leaves the interfaces open:

* the switch internals: buffer depth, credit-based flow control, one routing
  decision per cycle;
* the 16-bit flit and the address layout;
* the packet payload layout and time stamps;
* the valid/ready link interface with a channel field;
* Gray-code clock crossing and the full-FIFO fallback;
* packet-granular round-robin multiplexing;
* the rate arithmetic and the per-node sweep;
* the interval distribution of the random mode, which is uniform;
* the record layout and depth of the trace memory;
* the overhead-removal accumulator;
* asynchronous active-low resets.

Destinations, packet sizes and packet counts come from the configuration. Only
the packet intervals can be random.

Not included: the serial link cores (vendor IP), and the tool that reads a
partition description and generates the platform. Here a partition is expressed
directly through `fpga_platform`'s parameters.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | widths, packet constants, `link_word_t`, `tg_cfg_t`, `tr_stats_t`, `trace_t`, helpers |
| `rtl/emu_top.sv` | both two-FPGA platforms (top level) |
| `rtl/fpga_platform.sv` | one FPGA: mesh columns, nodes, time base, adaptation blocks |
| `rtl/emu_node.sv` | switch + generator + two receptors |
| `rtl/hermes_switch.sv`, `rtl/hermes_buffer.sv` | router and its input buffer |
| `rtl/adaptor1.sv`, `rtl/adaptor2.sv` | adaptation blocks |
| `rtl/pkt_fifo.sv`, `rtl/pkt_tracker.sv` | dual-clock packet FIFO, end-of-packet finder |
| `rtl/link_mux.sv`, `rtl/link_demux.sv` | multiplexing for adaptor 2 |
| `rtl/traffic_generator.sv` | generator |
| `rtl/tr_parser.sv`, `rtl/tr_stats.sv`, `rtl/tr_trace.sv` | receptors |
| `tb/tb_<module>.sv` | one self-checking testbench per block |
| `tb/aurora_link_model.sv` | behavioural serial link (testbench only) |
| `tb/tr_pkt_driver.sv` | packet source for the receptor testbenches |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/noc_pkg.sv tb/tb_emu_top.sv --top-module tb_emu_top
./obj_dir/Vtb_emu_top
```

Replace `tb_emu_top` with any other testbench name to run it. The full-size
end-to-end run takes about a minute to build and a few seconds to simulate, and
prints the latency table above. `tb_fpga_platform` runs the single-FPGA mesh on
its own.

Things to change:

* **mesh size and cut**: `fpga_platform`'s `X_LO`, `X_CNT`, `MESH_Y`, `EAST_EDGE`
  and `BOUND_X`, and the column split in `emu_top`;
* **number of serial links**: `N_PL`;
* **packet length**: `PKT_FLITS` (6 to 16 flits with the default 16-entry FIFOs;
  longer packets pass the FIFOs cut-through);
* **link and FIFO overhead constants**: `noc_pkg`.
