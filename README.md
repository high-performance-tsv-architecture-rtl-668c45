# Pipelined interlayer bus for 3-D stacked ICs

In a 3-D chip built from stacked dies, each die (layer) carries its own
network-on-chip. The layers reach each other through vertical wires: the
through-silicon vias (TSVs). A conventional shared vertical bus lets one layer
talk at a time and needs a central arbiter with many control wires. Putting a
full router on every vertical hop adds buffering and arbitration delay to a
link that is physically very short.

This design takes a third route. The vertical bus is cut into segments, with
one **transfer stage** per layer. Each segment has two one-way links, one
carrying traffic down and one carrying traffic up. Every stage buffers what
passes through it, so:

* all segments, and both directions of each segment, move data in the same
  cycle;
* a layer starts sending whenever its stage has room, without asking a central
  arbiter for a grant;
* each stage reads only the destination-layer field of a datagram and decides
  locally whether to keep it or pass it on.

The bus is globally asynchronous and locally synchronous:

* Every transfer stage runs on its own clock.
* Every segment between two stages can be set to *synchronous* mode (both
  stages on one clock) or *asynchronous* mode (the clocks differ in
  frequency, or share a frequency with unknown skew).
* Each layer connects to its stage through a **layer interface**. The
  interface moves datagrams between the layer's clock and the stage's clock,
  and can be set to either mode in the same way.

Layers built in different processes, with separate clock trees, can therefore
share one bus.

```
           layer 0 (top)                         layer 1                     ...
   router <-> layer_interface          router <-> layer_interface
                   |                                   |
            transfer_stage[0] --- dn link ---> transfer_stage[1] --- dn ---> ...
                              <--- up link ---                   <--- up ---
```

## Datagram format

A datagram travels as a single flit (`tsv_bus_pkg::flit_t`, 38 bits):

| field       | bits | meaning                                                     |
|-------------|------|-------------------------------------------------------------|
| `dst_layer` | 2    | destination layer (0 is the top); read by every stage       |
| `dst_core`  | 4    | destination IP core in that layer; carried through, for the router |
| `payload`   | 32   | data                                                        |

The widths fit a 4x4x4 system: 4 layers, each a 4x4 mesh of 16 cores. The bus
does not look at `dst_core`. The 32-bit payload and the one-flit datagram are
choices of this implementation. Wider payloads or multi-flit packets would
need changes to the package and, for packets, a lock on the merge points.

## Transfer stage (`transfer_stage`)

A stage has three inputs and three outputs, all valid/ready:

| input   | carries                          | output  | goes to                       |
|---------|----------------------------------|---------|-------------------------------|
| `s_dn`  | downward traffic from above      | `m_dn`  | the stage below               |
| `s_up`  | upward traffic from below        | `m_up`  | the stage above               |
| `s_inj` | datagrams the layer sends        | `m_ej`  | the layer's receive queue     |

The stage compares the header's layer address with its own `LAYER_ID` and
routes as follows:

* `s_dn` for this layer goes to `m_ej`; for any other layer it goes into the
  **down FIFO**.
* `s_up` for this layer goes to `m_ej`; for any other layer it goes into the
  **up FIFO**.
* `s_inj` for a layer below goes into the down FIFO; for a layer above, into
  the up FIFO.
* `s_inj` addressed to the layer itself, or to a layer that does not exist, has
  no path. The stage consumes it and pulses `drop`.

There are three merge points. At each one, two sources can compete in the same
cycle:

| merge point | competing sources                                   |
|-------------|-----------------------------------------------------|
| down FIFO   | through traffic from `s_dn`, injection from `s_inj` |
| up FIFO     | through traffic from `s_up`, injection from `s_inj` |
| `m_ej`      | ejection from `s_dn`, ejection from `s_up`          |

Each merge point has a one-bit round-robin pointer. After every contested
cycle in which the target accepted, the pointer hands priority to the other
source. So neither source is starved: a busy bus cannot lock a layer out of
sending, and injections cannot lock out through traffic. This flow control is
local. A `ready` signal only says "my buffer has room". It is not a bus grant,
and no signal spans more than one segment.

Timing:

* `m_dn` and `m_up` come straight from 4-entry first-word-fall-through FIFOs
  (`mode_fifo`). The stage writes them on its own clock `clk`. The
  neighbouring stage reads them on its clock (`dn_nbr_clk`, `up_nbr_clk`).
  These FIFOs are where a segment crosses from one stage's clock domain to
  the next.
* `dn_async` and `up_async` set the mode of the segment below and the segment
  above.
* A datagram that passes through a stage on a synchronous segment without
  stalling spends one cycle there.
* `m_ej` is a combinational selection from `s_dn`/`s_up`, so the destination
  stage adds no cycle. The receive queue in the interface provides the
  buffering.
* Every `ready` output depends only on valid inputs and buffer state, never on
  another `ready` input. Chaining stages therefore creates no combinational
  loop.

Embedded assertions check two rules:

* A downward datagram is never for a layer above, and an upward one never for a
  layer below.
* A stalled source keeps its datagram unchanged until it is accepted.

## Clock modes (`mode_fifo`) and the layer interface (`layer_interface`)

Every queue in the design is a `mode_fifo`: the two direction FIFOs of each
stage and the two queues of each interface. The interface holds two queues:

* a **transmit queue**: router to stage, written on the layer clock and read on
  the stage clock;
* a **receive queue**: stage to router, written on the stage clock and read on
  the layer clock.

A `mode_fifo` is a dual-clock FIFO with binary read and
write pointers, each also kept in Gray code. The `async_mode` input decides how
each side sees the other side's Gray pointer:

* **`async_mode = 1`**: the pointer passes through a two-flop synchronizer on
  the receiving clock. This is a standard safe crossing between unrelated
  clocks. A word becomes visible to the reader about three reader cycles after
  it is written.
* **`async_mode = 0`**: the pointer is used directly. This is legal only when
  both sides run on the *same* clock. A word written in one cycle can then be
  read in the next.

The mode is a static setting: one bit per segment (`seg_async`) and one per
interface (`if_async`). Change it only while the resets are held. Setting it
to 0 while the two clocks differ breaks the crossing.

Three typical setups, all exercised by the end-to-end test:

| setup                            | `ts_clk`                  | `seg_async` | `if_async` |
|----------------------------------|---------------------------|-------------|------------|
| fully synchronous                | one clock for all         | 0           | 0          |
| layers on their own clocks       | one shared bus clock      | 0           | 1          |
| each stage on its layer's clock  | `ts_clk[i] = layer_clk[i]` | 1          | 0          |

Mesochronous stacks, where all layers share a frequency but their clock phases
differ, use the third setup.

## The stacked bus (`tsv_bus_top`)

`tsv_bus_top` chains `N_LAYERS` stages, with layer 0 on top:

* `m_dn` of stage *i* drives `s_dn` of stage *i+1*;
* `m_up` of stage *i+1* drives `s_up` of stage *i*.

Stage *i* runs on `ts_clk[i]`. Its down FIFO is read on `ts_clk[i+1]`, its up
FIFO on `ts_clk[i-1]`, and `seg_async[i]` sets the mode of the segment between
stages *i* and *i+1*. Each stage connects to its own `layer_interface`. The
two free ends of the chain are tied off: no valid input, and the output always
ready. No legal datagram ever reaches them. The router side of every interface is brought out
as arrays indexed by layer:

* `tx_valid/tx_ready/tx_flit` (into the bus) and `rx_valid/rx_ready/rx_flit`
  (out of the bus), on `layer_clk[i]`;
* `ts_clk[i]`, `ts_rst_n[i]`, `seg_async`, `if_async[i]` and `layer_rst_n[i]`;
* `drop[i]`, on `ts_clk[i]`.

**Latency.** In the fully synchronous setup with no contention, a datagram
from layer *s* to layer *d* shows up at `rx_valid[d]` exactly `|d - s| + 1`
cycles after the clock edge that wrote it into `tx`:

* one cycle in each direction FIFO it passes, the source stage's included;
* one cycle to be written into the receive queue.

Each crossing in asynchronous mode adds its synchronizer delay, about two
cycles of the reading clock.

**Throughput.** Without contention, each segment moves one datagram per cycle
in each direction. All segments work at the same time. Layers 0→1 and 2→3 can
run alongside 3→1, for example.

### Parameters

| parameter            | default | meaning                                             |
|----------------------|---------|-----------------------------------------------------|
| `N_LAYERS` (top)     | 4       | layers in the stack; at least 2, and must fit the 2-bit layer field |
| `TS_DEPTH` (top)     | 4       | entries of each direction FIFO in a stage (power of two) |
| `IF_DEPTH` (top)     | 4       | entries of each interface queue (power of two)      |
| `CORES_PER_LAYER`, `DATA_W` (package) | 16, 32 | header and payload sizes         |

`SYNC_STAGES` inside `mode_fifo` defaults to 2.

## How closely this follows the architecture

These parts follow the published architecture:

* one transfer stage per layer;
* two opposite one-way links per segment;
* FIFO buffering in each direction;
* per-stage decoding of a destination-layer field, with the core field left to
  the router;
* the three duties of a stage: forward, eject to the layer, inject toward the
  target layer;
* an interface per layer that synchronizes between layer and bus, with a FIFO
  on each side;
* each stage in a timing domain of its own;
* synchronous or asynchronous transfer over each segment, set as a mode;
* four layers, with 16 cores each.

These are choices of this implementation:

* all widths and depths;
* the valid/ready handshake;
* the round-robin arbitration at the merge points;
* the one-flit datagram;
* dropping misaddressed injections;
* building the mode switch as a synchronizer bypass on a Gray-pointer FIFO.

Known departures and limits:

* **No clockless logic.** The architecture also allows stages and links to be
  self-timed, with request/acknowledge handshakes and no clock at all. Here
  every stage is clocked. "Asynchronous" means a synchronized crossing between
  independent clocks.
* **Routers and network interfaces are not included.** These are the 2-D mesh
  router of each layer (ports N, E, S, W, core and bus) and the AXI-based
  network interface of the cores. The top exposes a plain flit port per layer
  where a router would connect.
* **Not reproduced:** the published latency comparison with segmented and
  TDMA-arbitrated vertical buses, in a 4x4x4 system under uniform traffic.
  Those buses and the mesh are not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_mode_fifo`: random push/pop against a queue model, in synchronous mode
  (one clock) and asynchronous mode (10 ns against 14 ns). Also checks the
  latency of each mode and that no more than `DEPTH` words are ever held.
* `tb_transfer_stage`: three random sources and three random sinks on stage 1
  of 4. Checks routing per port and order per source. It also models the
  round-robin pointers independently and checks every contested cycle, the
  one-cycle pass-through, zero-cycle ejection, and the drop.
* `tb_layer_interface`: traffic in both directions at once, in both modes
  (layer clock 6 ns against a 10 ns bus clock).
* `tb_tsv_bus_top`: the whole 4-layer bus at its default parameters.
  * It checks the idle-bus latency `|d - s| + 1` for all 12 layer pairs.
  * It then runs uniform random traffic (random other layer, random core), with
    phases of heavy back-pressure, in four clock setups:
    * fully synchronous;
    * asynchronous interfaces with four different layer clocks;
    * every stage on its own clock (8, 12, 14 and 18 ns periods) with
      asynchronous segments;
    * mesochronous stages (10 ns, phases 0, 2, 5 and 7 ns) with asynchronous
      segments.
  * Every datagram is checked, in order, per (source, destination) pair.
  * It counts each mechanism inside the stages and fails if one never occurs:
    forwarding and injection in both directions, ejection, contention at each
    kind of merge point, link stalls, both links of a segment active in one
    cycle, all segments active in one cycle, drops, and traffic in each clock
    setup.

## Simulating

All files are IEEE 1800-2017 SystemVerilog. Read the package first. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/tsv_bus_pkg.sv tb/tb_tsv_bus_top.sv --top-module tb_tsv_bus_top
./obj_dir/Vtb_tsv_bus_top
```

Swap in another testbench name to run a block test. The end-to-end test
finishes in well under a second. To change the stack height, set `N_LAYERS` on
`tsv_bus_top`, and widen `LAYER_W` in `tsv_bus_pkg` (through `N_LAYERS_DEF`)
if more than four layers are needed.
