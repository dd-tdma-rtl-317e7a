# DD-TDMA: a distributed dynamic-TDMA vertical bus for 3D bus-NoC hybrids

In a 3D bus-NoC hybrid network each layer has an ordinary 2D mesh, and the
layers are joined by short vertical buses built from through-silicon vias
(TSVs). Any layer can reach any other in one hop, but the bus must be
arbitrated. A central arbiter needs request and grant wires to every layer, and
TSVs are expensive. DD-TDMA has no central arbiter. Every layer's bus interface
holds an identical arbiter, and all of them share a few wire-AND arbitration
lines: **NODES-1 lines for NODES layers**. At each arbitration, every node puts a
priority code on these lines. The highest code covers all the others. Each node reads
the lines back and knows on its own whether it won.

The design has three ideas, and this RTL implements all three:

* **Logic Continuous Coding (LCC).** Codes are chosen so that a plain wire-AND resolves every bit at once, with no bit-by-bit arbitration.
* **Priority Code Updating Algorithm (PCUA).** It rotates the codes so that the winner is always unique, the bus is never idle while someone waits, and no node waits through more than NODES-1 other packets.
* **Dynamic CMOS wire-AND transceiver.** It precharges the lines while the clock is low and evaluates them while it is high. This exists as a logic view (synthesizable) and as a behavioural transistor-level model.

The published DD-TDMA scheme describes the architecture and the algorithm. The
RTL fills in the rest and marks each such choice (see "Departures and own choices").

## LCC priority codes

A code of `W = NODES-1` bits may contain at most one run of ones and one run of
zeros. Its **priority level is its number of zeros**. All ones is level 0, the
lowest, and all zeros is level `W`, the highest. On a wire-AND bus the AND of
several LCC codes of one format is exactly the code with the most zeros. The
winner's code therefore survives unchanged, and every node can compare what it
reads with what it sent.

There are two formats, and they must not be mixed on one bus:

| level | LZF (zeros first, default) | LOF (ones first) |
|-------|----------------------------|------------------|
| 0     | `111`                      | `111`            |
| 1     | `011`                      | `110`            |
| 2     | `001`                      | `100`            |
| 3     | `000`                      | `000`            |

`lcc_encoder` makes the code from the level. The parameter `LZF` selects the format.

## PCUA: rotating the priorities

Node `i` leaves reset at level `i`, so all levels differ. On every arbitration,
each node does two things:

1. It sends its Arbitration Code. This is the LCC code of its level if it has a packet to send. Otherwise it is all ones (it is *masked* to the lowest level).
2. It raises its level by one. The highest level wraps round to 0. Every node does this, active or not.

The levels are a rotation of `0..NODES-1`, so exactly one node holds the
highest level, and every node holds it once every NODES arbitrations. The
winner is the active node with the highest level. If nobody is active, the
lines read all ones and nobody wins.

There is one subtle case. A node at level 0 sends all ones, which is also what
an idle bus shows. `arb_result_analyzer` therefore declares a win only if the
node was active *and* the lines equal its sent code. With four nodes all active
for four slots, and then node 1 idle, the winners are N4 N3 N2 N1 N4 N3 N2 N4.
`tb_dd_arbiter` replays exactly this sequence.

## One bus cycle by cycle

Everything on the bus side runs on `clk_bus`. Every node runs an identical
`arb_synchronizer`, fed only by shared data-bus signals, so every node raises
`Arbitration_en` in the same cycle. An arbitration fits in one cycle, matching
the dynamic transceiver's clock phases:

1. **High half.** Each node drives its code onto the lines (`drv`, 0 = pull down). The lines evaluate.
2. **Falling edge.** Each receiver registers the lines.
3. **Next rising edge.** Each result analyzer registers `win` (lines == sent code, and the node was active). At the same edge, every level rotates.

`win` is therefore high for exactly the cycle after the arbitration. That is the
cycle in which the winner must show its head flit on the data bus. Arbitration
is triggered in three cases:

| trigger | why |
|---------|-----|
| the first cycle after reset | start-up |
| a tail flit is **transferred** on the data bus | End of Packet: the next owner is chosen *during* the tail cycle, so its head follows the tail with no lost cycle |
| a slot's first cycle finds no flit on the bus | nobody won the last round; this repeats every cycle while the bus is idle |

Arbitration is packet-wise: the winner keeps the bus from head to tail. It sends
one flit per cycle, and pauses when its tx FIFO runs dry or a receiver holds
the bus. With no stalls, back-to-back packets of `L` flits take exactly `L`
cycles each, so the bus can be fully used. A packet that arrives at an idle
bus starts one or two cycles after its node becomes active. These are the
cycles needed for the FIFO's write pointer to cross clock domains, plus one
arbitration.

The owner needs care in the tail cycle. Its tx FIFO still holds the tail being
sent, so it counts as active for this arbitration only if at least one more
flit sits behind the tail. The tx FIFO's read-side entry count provides this.

This timing puts a half-cycle path through the arbitration logic. The path runs
from the data-bus tail detection, through the arbitration enable, the code
drivers and the TSV lines, to the receiver flop. The dynamic transceiver is
built for exactly this: evaluation in the high half, read on the falling edge.

## Bus interface (`bus_interface`)

Each layer has one bus interface between its router and the bus:

* **tx bi-sync FIFO** (router clock → bus clock). A node is *active* while this FIFO is not empty. Whole packets leave in order, so its oldest flit is then always a head flit; an assertion checks this.
* **Distributed arbiter** (`dd_arbiter`). It contains the priority code manager, the arbitration transceiver and the result analyzer.
* **Arbitrating synchronizer.** It raises `Arbitration_en` after reset, in the cycle of every End of Packet (a transferred tail flit), and in every slot-start cycle that finds the bus idle.
* **Data-bus driver.** It is enabled from the win until the tail flit is transferred.
* **Flit filter.** It watches every flit on the data bus. It remembers whether the packet in flight is addressed to this node (destination in the head flit), and writes those flits into the **rx bi-sync FIFO** (bus clock → router clock). If that FIFO is full, it raises `hold`.

The router sides use valid/ready handshakes, and each runs on its own `clk_rtr[n]`.

### Flit format (`dd_tdma_pkg`)

`flit_t` is `{ftype[1:0], payload[31:0]}`. The values of `ftype` are `BODY=0`,
`HEAD=1`, `TAIL=2` and `HEAD_TAIL=3`, where `HEAD_TAIL` is a one-flit packet.
A head flit carries the destination node index in `payload[7:0]`. The rest of
the payload is never interpreted.

### The hold line

A shared bus has no per-destination flow control. This design adds one
wired-OR line, `hold`. The destination of the packet in flight raises it while
its rx FIFO is full. A flit is transferred (`fire`) only in a cycle with a valid
flit and no hold. This costs one extra TSV, and it is this design's own addition.

## The dynamic CMOS arbitration line

In silicon, each node's driver has two transistors on the line. A PMOS precharges
the line while `clk=0`. An NMOS discharges it while `clk=1` if the node's
enabled code bit is 0. A bus holder keeps the line against leakage, and the
receiving flip-flop samples the line when `clk` falls.

* `arb_transceiver` and `wand_bus` are the synthesizable logic view. A line is the AND of all drivers, and the receiver flop is on the falling edge.
* `dyn_wand_line` is a behavioural model of one line, and it is not synthesizable. It has timed precharge and discharge. The delays shrink with the number of nodes that charge or discharge, as more transistors act in parallel. The delay values themselves are placeholders.
* Setting `LINE_MODEL=1` on `dd_tdma_bus` builds every arbitration line from `dyn_wand_line`. This is for simulation only. `tb_dd_tdma_bus_line_model` runs the full end-to-end test this way.

## Parameters

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `NODES` | `dd_tdma_bus` and below | 4 | Layers on the bus. The arbitration width is `NODES-1`. |
| `FIFO_DEPTH` | `dd_tdma_bus`, `bus_interface` | 8 | Entries per bi-sync FIFO. Must be a power of two, at least 4. |
| `LZF` | `dd_tdma_bus` and below | 1 | LCC format: 1 = zeros first, 0 = ones first. |
| `LINE_MODEL` | `dd_tdma_bus` | 0 | 1 = use the behavioural line model (simulation only). |
| `DATA_W`, `DEST_W` | `dd_tdma_pkg` | 32, 8 | Flit payload width and width of the destination field. |

## Module hierarchy

```
dd_tdma_bus                 top: NODES interfaces + arbitration lines + data bus
├── bus_interface [NODES]
│   ├── bisync_fifo  (tx)   router -> bus, Gray-pointer dual-clock FIFO
│   ├── arb_synchronizer    when to arbitrate (reset, tail, idle)
│   ├── dd_arbiter
│   │   ├── priority_code_manager   PCUA level, masking
│   │   │   └── lcc_encoder
│   │   ├── arb_transceiver         line drive, falling-edge receiver
│   │   └── arb_result_analyzer     win = active && lines == sent code
│   ├── flit_filter         destination match, hold request
│   └── bisync_fifo  (rx)   bus -> router
├── wand_bus                wire-AND lines (or dyn_wand_line when LINE_MODEL=1)
└── data_bus                one-hot driver mux, wired-OR hold, fire
```

`dd_tdma_pkg` holds the flit type and helper functions. Every file in `rtl/` has
a header comment that gives its function, interface and timing, and says what
follows the published scheme and what is this design's choice.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dd_tdma_pkg.sv tb/tb_dd_tdma_bus.sv \
          --top-module tb_dd_tdma_bus -o sim
obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_dd_tdma_bus` | End to end at the default size (4 nodes, no overrides). It uses four router clocks, random packets of 2..8 flits with gaps, and random receiver stalls. Every flit is traced from router to bus to router. Each arbitration is checked against a PCUA reference model, and waits are checked to stay below NODES slots. An unstalled packet must take exactly L cycles, and a waiting node's head must directly follow the previous tail. It counts contention, masked nodes, idle rounds, wrap-arounds, holds, sender gaps and back-to-back packets, and fails if any of them never happened. |
| `tb_dd_tdma_bus_line_model` | The same test, with the arbitration lines made of the behavioural dynamic-CMOS model. |
| `tb_starvation` | Eight nodes at full load, 500,000 packets (the size of the published starvation run). Every node sends exactly 62,500 packets (relative standard deviation 0%), and no node waits more than 8 slots. It also checks that the eight-node bus has 7 arbitration lines. |
| `tb_injection_sweep` | Four nodes with uniform random traffic at offered loads from 0.02 to 0.5 flits/cycle/node. It prints throughput and latency. Each load runs for 20,000 cycles. The bus saturates at 1.00 flit/cycle in total (0.250 per node). |
| `tb_<block>` | One unit test per module. |

From the sweep, the average latency, measured from packet creation to the
delivered tail flit, is about 12 cycles at light load. Most of it is two
clock-domain crossings and the packet's own length. Latency rises sharply once
four nodes together offer close to one flit per cycle (0.25 flits/cycle/node).

## Departures and own choices

Where the published description is silent, this design chose the following:

* The flit format and the destination field.
* The router-side valid/ready handshakes.
* The FIFO depth (8) and the Gray-pointer FIFO structure.
* A single asynchronous active-low reset.
* The hold line for back-pressure from a full receiver.
* Arbitration inside the tail-flit cycle.
* The registered win.
* Re-arbitration every cycle while the bus is idle. Priorities keep rotating during idle rounds.
* The flit filter's insides. The published description only names the filter.

Other points of interpretation:

* **Order of "send, then raise".** The published pseudo-code lists the update before choosing the code. Its worked example, though, arbitrates with the initial codes in the first slot. This RTL follows the example.
* **Node count.** The default `NODES=4` matches the four-node arbiter and the four-layer network used in the evaluation. The starvation test uses eight nodes.
* **Arbitration line count.** The line count is `NODES-1`. For eight layers this gives 7 arbitration lines, plus this design's hold line.
* **Tri-state driver.** The data bus's tri-state driver is modelled as a multiplexer with one-hot enables. An assertion in `dd_tdma_bus` checks that at most one node drives.
* **Not included.** The 2D routers, processing elements and the lateral mesh are not part of this RTL, so network-level results cannot be reproduced here; only the vertical bus can. Area figures for a 90 nm library are likewise outside its scope.
* **Receiver hold-time fix.** One electrical option for the receiver is not represented: an extra inverter (or weaker precharge transistors) to keep the precharge from overwriting the line before the flop samples it. It matters only for hold timing, not for logic.
* **Analog behaviour.** The transistor-level behaviour of the dynamic transceiver exists only as the behavioural model. Its delay numbers are placeholders, so it shows the sequencing of precharge and evaluation, not real timing.
