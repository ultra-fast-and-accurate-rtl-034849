# Time-multiplexed FPGA emulator for a 128×128 mesh network-on-chip

A cycle-accurate software simulator of a 16,384-node network-on-chip (NoC) runs at
a few hundred simulated cycles per second. This design emulates such a network on
one FPGA instead, and keeps the emulation exact. Two ideas make that possible:

1. **Time-division multiplexing (TDM).** The hardware holds only a small *physical
   cluster* of real router nodes (2×2 by default). The mesh is cut into tiles the
   size of that cluster (*logical clusters*, 4,096 of them). The physical cluster
   emulates the tiles one after another, loading each tile's state from a memory
   and storing it back. When every tile has had its turn, one cycle of the
   emulated network is complete.
2. **Decoupled time counters.** In an open-loop network measurement, each traffic
   source must be able to create packets whatever state the network is in. That
   normally needs an unbounded source queue. Here each packet source has its own
   clock. It may run ahead of the network while its queue has room, and it waits
   when the queue is full. It catches up later, and the network is briefly
   *stalled* whenever a source has fallen behind and its queue has run dry.
   Packets are stamped with the time of the source's clock, not the network's.
   So an 8-entry queue gives the same latencies as an infinite one.

Everything is SystemVerilog in `rtl/`, with one self-checking testbench per
module in `tb/`. The top module is `noc_emulator`.

## The emulated network

At the defaults (the primary configuration), the emulated network is:

| Item | Value |
|---|---|
| Topology | 128×128 mesh, XY (dimension-order) routing |
| Router | input-queued virtual-channel router, 5 ports, 5-stage pipeline (RC, VA, SA, ST, LT) |
| Virtual channels | 2 per input port, 4 flits deep, credit-based flow control |
| Allocators | separable output-first VC and switch allocators with fixed-priority arbiters |
| Flits | 18 bits; packets of 8 flits |
| Traffic | Bernoulli injection, uniform random destinations, 8-entry source queue per node |
| Random numbers | xorshift128+, one generator per node for injection and one for destinations |

A flit is `valid | type[1:0] | vc | [look-ahead route] | data[13:0]`, MSB first.

The flit types are:

- `10`: head. Its data is the destination `{y[6:0], x[6:0]}`.
- `00`: body.
- `11`: last body flit. Its data is the upper half of the 28-bit injection timestamp.
- `01`: tail. Its data is the lower half of the timestamp.

Only the timestamp travels in the source queue. The destination is drawn when the
flit generator takes the timestamp out of the queue.

Two variants are chosen in `rtl/noc_pkg.sv`. They are package constants because
they change the width of the stored state:

- `NUM_VC = 1` gives one VC per port.
- `LOOKAHEAD = 1` gives a 4-stage router. Each router computes the next router's
  output port and sends it in a 3-bit field of the head flit (21-bit flits). VC
  allocation then happens in the cycle the head arrives, in parallel with routing.

All four combinations compile and pass the unit tests.

### Router timing and zero-load latency

A head flit that enters a router's buffer at network cycle *t*:

- is routed in the same cycle;
- wins an output VC at *t+1*;
- wins the switch at *t+2*;
- crosses the crossbar at *t+3*;
- crosses the link at *t+4*;
- is in the next router's buffer at *t+5*.

Body and tail flits reuse the head's route and VC. They bid for the switch the
cycle after they are buffered. A credit returns one cycle after its flit leaves
the buffer, and the router may spend it in the cycle it arrives. With 4-flit
buffers, this keeps a lone packet from stalling on its own credit loop.

The source side adds a fixed delay. A packet created at cycle *t* leaves the flit
generator at *t+1* and is in the first router at *t+2*. The tail reaches the sink
7 cycles after the head. So a packet that crosses H links (H+1 routers) has a
zero-load latency of

    5·H + 14 cycles    (4·H + 13 with look-ahead)

The testbenches check this exactly.

Uniform random traffic on a k×k mesh, with the source itself a possible
destination, has a mean hop count of 2(k²−1)/(3k). That is 2.5 for k = 4 and
85.3 for k = 128. The common textbook estimate H·5 + packet length − 1 gives
433.7 cycles for the 128×128 network. This design gives 440.7, because the
injection link and the sink are modelled as pipeline stages.

## Time-division multiplexing: the hard part

### State in two kinds of storage

Each node keeps two kinds of state:

- **Bulk storage, kept in memories indexed by logical cluster.** This is the flit
  buffers (5 ports × `NUM_VC` × 4 flits) and the source queue (8 × 28 bits).
  Every buffer in the physical cluster is a memory with `N_CL × depth` entries.
  The cluster number forms the upper address bits and the buffer pointer the
  lower ones. These memories are read on the **falling** clock edge, from a
  pointer that became valid on the rising edge. They are written on the rising
  edge of the update cycle. So the word read during a cluster's turn never
  needs to be saved.
- **Registers, collected in one packed struct, `noc_pkg::node_state_t`.** This is
  everything else: VC states, credit counters, pipeline registers, link
  registers, the generator's counters and random states, and the sink's
  half-timestamps. It is 832 bits per node at the defaults. The `state_memory`
  keeps one entry per logical cluster, holding the structs of all nodes of the
  physical cluster.

Every node module is written in *state-in/state-out* form: `st_i` goes in,
`st_o` comes out, and there are no registers of its own. A normal single-node
router can be obtained by closing `st_o → st_i` through a register.

### Two FPGA cycles per logical cluster

`tdm_controller` steps through the logical clusters in row-major order. Each
takes two FPGA cycles.

| FPGA cycle | What happens |
|---|---|
| 1 (`state_update`) | The physical cluster computes the new state of cluster *j* from register R, and commits its memory writes. The state memory writes register W (the new state of cluster *j−1*) and reads the entry of cluster *j+1*. The out buffer reads cluster *j*'s old boundary data. |
| 2 | W ← new state of *j*. R ← state of *j+1*. The new boundary links of *j* go into the out buffer. The old east and south data of *j* go into the in buffer. |

A network cycle therefore takes 2·N FPGA cycles: 8,192 at the defaults, or about
12,200 network cycles per second at 100 MHz.

### Links between logical clusters

Each link carries a flit and per-VC credits, one network cycle per hop:

- **Inside the physical cluster,** a node reads its neighbour's link register
  straight from the neighbour's loaded state.
- **Across a tile boundary,** the data comes from another logical cluster. That
  cluster was emulated either earlier in this network cycle or later in the
  previous one. The **out buffer** stores each cluster's outgoing boundary links,
  per side and per boundary node.
  - Tiles to the east and south are emulated *after* the current one. They still
    hold last cycle's value, so it is read directly from the out buffer.
  - Tiles to the west and north were emulated *before* it, so they have already
    overwritten their out-buffer entry with this cycle's value. Their previous
    value was copied into the **in buffer** just before the overwrite.

  Row-major order means only the east- and south-going data has to be copied,
  which halves the in buffer.

### Reset without clearing megabits

The state memory is never cleared. During network cycle 0, `init_done` is low and
the physical cluster uses the initial state (`noc_pkg::node_init`) instead of
register R. The flit buffers and source queues need no reset either, because
their pointers and counts live in that state. An automatic reset between two
injection rates therefore costs nothing.

### Network stall

In phase 1, a node may report `stall_req`: its source queue is empty and its
packet source's clock is behind the network's. The controller then holds the
cluster in phase 1 and raises `ps_step` instead of `state_update`. In a
`ps_step` cycle only the packet sources advance (one time step each), and register
R is rewritten in place. Once no node asks any more, the normal update runs.
`stall_cycles` counts the extra FPGA cycles.

## Traffic generator, source and sink

- **`packet_source`** advances its own clock by one per step, as long as its
  clock is not ahead of the network's. Each step it draws a 64-bit xorshift128+
  number and creates a packet if the upper 32 bits are below `threshold`
  (= injection rate × 2³²). The packet is stamped with the source's clock. If the
  queue is full, the drawn packet is kept pending and the clock stops until
  there is room.
- **`traffic_gen`** holds the source, the source-queue memory and the flit
  generator.
  - It sends one flit per cycle when the chosen VC of the router's local input
    has a credit.
  - At a packet start it picks VCs round robin. So the next head can be routed
    while the previous packet is still draining.
- **`traffic_sink`** stores the upper timestamp half per VC. At the tail it
  reports the packet and its latency (network time − timestamp, modulo 2²⁸). It
  returns one credit per flit.

## Run control

`sim_controller` runs each injection rate in three phases:

- **Warm-up:** network time < `warmup`.
- **Measurement:** up to `warmup + measure`.
- **Drain:** runs until every packet stamped inside the measurement window has
  arrived, and every packet source has passed the end of the window.

The controller adds up the number of measurement packets and their total latency.

A run is stopped and flagged *unstable* if, after the measurement window, the
average latency so far exceeds `lat_limit`. `led_unstable` shows the flag of the
last run.

After each run:

- the results appear on `res_*` with a `res_valid` pulse;
- `uart_tx` sends them as a 16-byte record (8N1, LSB first, 200 clocks per bit,
  i.e. 0.5 Mbit/s at 100 MHz);
- the emulator resets itself;
- the next run starts with the threshold raised by `thr_step`, for `num_rates`
  runs in all.

The record layout, in byte order, is:

| Bytes | Field |
|---|---|
| 0 | `0xA5` |
| 1 | run number |
| 2–5 | packets |
| 6–11 | total latency |
| 12–15 | network cycles |

## Interface of `noc_emulator`

| Port | Meaning |
|---|---|
| `clk`, `rst` | clock (100 MHz intended) and synchronous reset |
| `start` | pulse: begin a sweep |
| `warmup`, `measure` | phase lengths in network cycles (28 bits) |
| `thr_first`, `thr_step`, `num_rates` | first injection threshold, increment, number of runs |
| `lat_limit` | average-latency limit of a stable run |
| `res_*`, `res_valid` | per-run results: packets, total latency, cycles, stall cycles, unstable flag |
| `uart_txd` | the same results as serial records |
| `led_unstable`, `busy`, `all_done` | status |

The parameters are `MESH_X`, `MESH_Y` (128), `PHY_X`, `PHY_Y` (2) and
`CLKS_PER_BIT` (200). The mesh size must be a multiple of the physical cluster
size.

## Memory at the defaults

| Storage | Bits |
|---|---|
| Flit buffers: 16,384 nodes × 5 × 2 × 4 × 18 | 11,796,480 |
| Source queues: 16,384 × 8 × 28 | 3,670,016 |
| State memory: 16,384 × 832 | 13,631,488 |
| Out buffer + in buffer | 983,040 |
| **Total** | **30,081,024** |

That is about 80 % of the block RAM of a Virtex-7 XC7VX485T (1,030 × 36 Kbit).
With one VC the total shrinks, and with look-ahead it grows by about 2.9 Mbit.
Larger physical clusters (4×4, 8×4) change only the small link buffers. How the
arrays map onto block RAM is left to the synthesis tool.

## Where this design departs from the original description or fills gaps

- The credit may be used in the cycle it arrives, in routers and in the flit
  generator. The VC is released when the tail wins the switch.
- The generator-to-router and router-to-sink links are registered like router
  links. So zero-load latency is 5H+14, a few cycles above the usual formula.
- A stall is resolved inside the cluster's first FPGA cycle, one packet-source
  step per clock. The original description says only that the network stops
  while a source lags with an empty queue.
- These details are this design's own:
  - the flit bit order;
  - the timestamp halves (upper half on the last body flit);
  - the destination address format;
  - the destination draw at dequeue time;
  - round-robin VC choice at injection;
  - the 32-bit Bernoulli threshold;
  - the generator seeds (splitmix64 of the node number).
- With one VC, the flit keeps a 1-bit VC field, so it stays 18 bits.
- The host side is a set of input ports (phase lengths, rates, latency limit).
  The result record format is this design's.
- The unstable test compares the running average after measurement with
  `lat_limit`. The end-of-run test waits for all measured packets.
- Only uniform random traffic with Bernoulli injection is built. Other traffic
  patterns and injection processes are not.
- Block-RAM counts, clock rates and LUT figures of a real FPGA build are not
  reproduced. The RTL was only simulated and linted.

## Simulating

Any testbench builds with plain Verilator 5. Put `noc_pkg.sv` first:

    verilator --binary -j 0 -Wno-fatal --top-module tb_noc_emulator \
        rtl/noc_pkg.sv $(ls rtl/*.sv | grep -v noc_pkg) tb/tb_noc_emulator.sv
    ./obj_dir/Vtb_noc_emulator

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each has a
watchdog that counts a failure if it hangs. To try a variant, edit `NUM_VC` or
`LOOKAHEAD` in `rtl/noc_pkg.sv`. The router, node, cluster and top testbenches
adapt their expected latencies and rates to it.

| Testbench | What it checks |
|---|---|
| `tb_xorshift128p`, `tb_route_xy`, `tb_vc_allocator`, `tb_switch_allocator` | against reference models, exhaustive or random |
| `tb_packet_source`, `tb_traffic_gen`, `tb_traffic_sink` | injection statistics, queue-full hold, timestamp halves, packet format, credits |
| `tb_vc_router` | per-hop latency (5, or 4 with look-ahead), credit flow, no flit lost under load |
| `tb_emu_node`, `tb_phys_cluster` | zero-load latency 14 (13), throughput, no leaks, in TDM form with two logical clusters |
| `tb_state_memory`, `tb_out_buffer`, `tb_in_buffer`, `tb_tdm_controller` | the two-cycle TDM timing, neighbour addressing, stalls, `init_done` |
| `tb_sim_controller`, `tb_uart_tx` | phases, counting, unstable stop, rate sweep, serial timing (200 clocks per bit) |
| `tb_noc_emulator` | 4×4 mesh on a 2×2 cluster (see below) |
| `tb_noc_full` | the full 128×128 design with default parameters (see below) |

`tb_noc_emulator` runs a rate sweep on the 4×4 mesh:

- zero traffic;
- low load, where the average latency must match the zero-load formula;
- near saturation, where it must see network stalls but stay stable;
- overload, where the run must be flagged unstable.

It counts each mechanism and fails if one never happens: stall, full source
queue, VC-allocation and switch-allocation conflicts, credit shortage, unstable
stop and automatic reset. It also decodes every serial record.

`tb_noc_full` runs one short measurement on the full 128×128 design with default
parameters. It takes under a minute of simulation time. The 100,000-cycle
warm-up and measurement phases of a real run are far too long to simulate. The
emulator's 28-bit time counters cover up to 2²⁸ network cycles.
