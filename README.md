# Dual-domain clock-gated NoC with event-driven flit injection

A small FPGA network-on-chip for IoT sensor systems that does nothing while
nothing happens. In a conventional synchronous NoC every router clocks its
buffers and arbiters on every cycle, even when idle. This design splits the
system into two clock domains and lets a sensor event start all network
activity:

* **Clock domain 1 (`clk1`, sensor side):** always running, at a low rate. An
  event detector turns each *new* sensor sample into a single-flit packet.
* **Clock domain 2 (`clk2`, NoC side):** a 2 x 2 mesh of routers. Each router
  has its own clock enable, which is high only while that router has a flit
  or is about to receive one.

A dual-clock FIFO is the only path between the two domains. Gating uses
clock enables, not gated clocks. Every flip-flop stays on its global clock
net, so the scheme is safe for FPGA timing.

```
  clock domain 1 (clk1)                 |  clock domain 2 (clk2)
                                        |
  sensor_data/valid                     |
        |                               |   noc_controller --clk_en[0..3]--+
        v                               |        ^ wake[0..3]              |
  event_detector --flit--> async_fifo ------> flit_injector                |
     ^      |              (gray ptrs)  |        |                         v
     |tick  | write                     |   +----v----+      +---------+
  clock_gate_ctrl --ce--> sensor_mem    |   | router 0|<---->| router 1|
    (threshold +          (sample log)  |   | (0,0)   |      | (1,0)   |
     prediction)                        |   +----^----+      +----^----+
                                        |        |                |
                                        |   +----v----+      +----v----+
                                        |   | router 2|<---->| router 3|--> mac_unit
                                        |   | (0,1)   |      | (1,1)   |    actuator_out
                                        |   +---------+      +---------+
```

Sensor flits enter at node 0 and are routed X-first to node 3, where the
actuator/MAC unit consumes them: node 0 → 1 → 3. Nodes 1 and 2 are
processing elements that are not specified here. Their local router ports
are brought out of the top module, so other logic can send flits through
the same mesh.

## Files

| file | what it is |
|---|---|
| `rtl/noc_pkg.sv` | flit type, port numbering, XY routing function |
| `rtl/event_detector.sv` | new-sample detection, flit formation, coalescing, slow-mode injection |
| `rtl/clock_gate_ctrl.sv` | activity monitor: idle threshold + load prediction → memory clock enable; slow-mode tick |
| `rtl/sensor_mem.sv` | clock-enabled circular log of the last 16 injected samples |
| `rtl/async_fifo.sv`, `rtl/sync_2ff.sv` | dual-clock FIFO (16 × 24 bit) with gray-code pointers |
| `rtl/flit_injector.sv` | FIFO → local port of the source router |
| `rtl/noc_controller.sv` | one `clk_en` per router, from demand, with a hang-over |
| `rtl/router.sv`, `rtl/flit_fifo.sv`, `rtl/rr_arbiter.sv` | five-port clock-enabled router |
| `rtl/mesh_noc.sv` | `MESH_X × MESH_Y` mesh; computes each router's wake-up demand |
| `rtl/mac_unit.sv` | actuator / multiply-accumulate sink |
| `rtl/ddcg_noc_top.sv` | top level |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_ddcg_noc_top.sv` | end-to-end test at default parameters |
| `tb/tb_fig61_workload.sv` | sparse four-sample scenario; reports router activity |
| `tb/mesh_traffic_check.sv` | generic random-traffic checker for an `MX × MY` mesh |
| `tb/tb_mesh_noc_3x2.sv`, `tb/tb_mesh_noc_4x4.sv` | the same checker on larger meshes |

## Flit format

Each packet is a single 24-bit flit (`noc_pkg::flit_t`), most significant bits first:

| bits | field |
|---|---|
| 23:22 | `src_x` |
| 21:20 | `src_y` |
| 19:18 | `dst_x` |
| 17:16 | `dst_y` |
| 15:0 | `payload` (one 16-bit sensor sample) |

Coordinates are 2 bits wide, so the mesh can grow to 4 × 4 by changing
`MESH_X`/`MESH_Y`. Node `n` sits at `x = n % MESH_X`, `y = n / MESH_X`. North
is `y-1`, east is `x+1`.

## How the NoC gating works

This is the part that needs care. A router whose enable is low must neither
accept nor offer a flit, or flits would be duplicated or lost. Yet a router
must already be enabled on the very edge at which a neighbour hands it a
flit.

**Inside a router.** Every register changes only when `clk_en = 1`: the
input FIFOs (4 flits per port), the round-robin pointers and the grant
locks. While `clk_en = 0` the router also drives `in_ready` and `out_valid`
low. Links use a valid/ready handshake, which acts as on/off flow control:
a full input buffer holds `ready` low. An output arbiter locks its grant
until the flit is taken, so an offered flit never changes while it waits.
An assertion in `router.sv` checks this.

**Wake-up demand.** `mesh_noc` computes `wake[n]` for each router from
register outputs only:

* `occupied[n]`: one of the router's own input buffers holds a flit;
* `inj_req[n]`: a flit waits at its local input (for node 0, the injector's
  `pending`, which is true when the FIFO is not empty or the holding
  register is full);
* a neighbour's head flit is routed towards router `n` (the neighbour's raw
  `req_out`, taken before enable gating).

None of these depends on any `clk_en`. `noc_controller` can therefore drive
`clk_en[n] = wake[n] | hang-over` directly, without a combinational loop.
The receiving router is then already enabled on the edge at which the flit
moves, so **gating costs no cycle per hop**. After demand ends, each enable
stays high for `HOLD` (default 1) more cycles. Do not feed a signal that
depends on `clk_en` into `inj_req`: that closes a loop. This is why
`mesh_noc` takes `inj_req` separately from `inj_valid`.

A router off the path stays fully idle. With sensor traffic only, router 2
is never enabled. In the sparse scenario of `tb_fig61_workload` the four
routers are enabled for 1.8 % of router-cycles.

## Event detection and back-pressure (domain 1)

A sample counts as new when `sensor_valid` is high and either it was low in
the previous cycle or `sensor_data` changed. A sensor that holds
`sensor_valid` high with unchanged data therefore injects once. A new sample
goes into a one-entry pending register. It is written into the dual-clock
FIFO on the next cycle in which `tick = 1` and the FIFO is not full.

If another new sample arrives while one is still pending, the newer one
replaces it and `coalesced_count` increments. Only the freshest reading is
ever sent, and the sensor never stalls. Every new sample is either sent
(`event_count`) or coalesced. The end-to-end test checks this sum.

With `slow_mode = 1`, `tick` is high one cycle in `SLOW_DIV` (8), which caps
the injection rate at one flit per 8 `clk1` cycles.

## Clock-gating decision for the sensor memory

`clock_gate_ctrl` turns observed activity into a clock enable. Activity means
flit writes and reads of the sample log. It combines two rules:

* **threshold:** `ce` stays high for `IDLE_THRESHOLD` (8) cycles after the last activity;
* **prediction:** activity is counted over windows of `WINDOW` (32) cycles. If a
  window held at least `LOAD_THRESHOLD` (4) active cycles, `predicted_busy`
  keeps `ce` high through the whole next window.

`ce` also follows activity in the same cycle, so the access that wakes the
memory is never lost. `mem_gated_cycles` counts the cycles with `ce = 0`.

## Timing

* Sample to FIFO: a new sample seen at a `clk1` edge is written at the next
  `clk1` edge (normal mode, FIFO not full).
* FIFO crossing: the write is visible on the `clk2` side after 2 `clk2`
  edges, through the two synchronizer flops.
* NoC: one edge into the injector, one into router 0, one per hop, one into
  the MAC. From FIFO write to `mac_rx_count` is 7 `clk2` edges for the
  0 → 3 route. The test measured 75 ns with a 10 ns `clk2`.
* Throughput: one flit per `clk2` cycle per link. The FIFO frees a slot for
  the writer 2 `clk1` edges after a read.

Only the synchronizer stages make this path longer than it would be in a
single-clock, ungated network. That matches the small latency overhead of
one or two cycles that the original description reports.

## Parameters (top level)

| parameter | default | origin |
|---|---|---|
| `MESH_X`, `MESH_Y` | 2, 2 | the described 2 × 2 NoC |
| payload width (`noc_pkg::DATA_W`) | 16 | described (`DATA_WIDTH = 16`) |
| `ADDR_WIDTH` (FIFO and log depth 2^4) | 4 | described (`ADDR_WIDTH = 4`) |
| `SRC_NODE`, `DEST_NODE` | 0, 3 | chosen |
| `BUF_DEPTH` (router input buffer) | 4 | chosen |
| `IDLE_THRESHOLD`, `WINDOW`, `LOAD_THRESHOLD` | 8, 32, 4 | chosen |
| `SLOW_DIV` | 8 | chosen |
| `HOLD` | 1 | chosen |

## What follows the original description and what is chosen here

Taken from the description:

* the two clock domains;
* event-driven injection (flits only on new sensor data);
* the dual-clock FIFO as the only crossing;
* routers whose registers toggle only when `clk_en = 1`;
* a controller that makes `clk_en` from FIFO status and pending data;
* a 2 × 2 mesh with deterministic routing and packet switching;
* the 16-bit data and 4-bit FIFO address width;
* the signal names `clk1`, `clk2`, `rstn`, `sensor_data`, `sensor_valid`,
  `slow_mode`, `actuator_out`;
* clock gating that combines an idle threshold with load prediction.

Chosen here, because the description does not give them:

* XY routing;
* valid/ready links, 4-flit buffers and round-robin arbitration;
* single-flit packets and the flit layout;
* one enable per router, with same-cycle wake-up;
* the new-sample rule and coalescing;
* the meaning of `slow_mode` as injection-rate limiting;
* the sensor memory as a sample log;
* the MAC rule `acc += payload × coef`;
* all the numbers in the "chosen" rows above.

Known departures and gaps:

* **Domain names.** The source is not consistent about which domain is the
  "core" one. Here `clk1` is the sensor side and `clk2` the router side,
  following its block diagram.
* **Actuator/MAC direction.** The block diagram draws an arrow from the
  actuator/MAC unit towards the crossing buffer. Here the unit only
  receives. Nothing in the text says what it would send.
* **Links.** Links are drawn as AXI in the description. Here they are plain
  single-flit valid/ready (AXI-Stream-like) handshakes, not AXI4.
* **MAC and processing elements.** The MAC unit runs on the free-running
  `clk2`, not on a router enable; it changes state only when a flit
  arrives. The processing elements at nodes 1 and 2 are not modelled.
* **Not included:** the Zynq processing system, the DDR controller, the FPGA
  clock generators and the sensor itself. Clocks come in as ports.
* **Reset.** `rstn` resets both domains asynchronously. Synchronizing its
  release to each clock is left to the surrounding design.
* **Power and area.** Power savings and FPGA resource numbers cannot be
  reproduced from RTL simulation. The enable-activity counters
  (`router_active_cycles`, `mem_gated_cycles`) are the measurable stand-in.
* **Lint warnings** that remain are expected: unused header bits in
  `mac_unit`, and `rst_n` used both in flops and in assertion
  `disable iff`.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_ddcg_noc_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/noc_pkg.sv tb/tb_ddcg_noc_top.sv -o sim
./obj_dir/sim
```

Replace `tb_ddcg_noc_top` with any other testbench name. `noc_pkg.sv` must
be read first.

`tb_ddcg_noc_top` runs the whole design at its default parameters. It
covers:

* an idle phase, in which every router and the memory are gated;
* isolated samples, checking the accumulator, latency, the idle router 2
  and the sample log;
* a held sample, which must inject once;
* a 40-sample burst, which triggers load prediction;
* slow mode;
* an overflow phase: `clk1` is sped up while nodes 1 and 2 flood node 3.
  The FIFO fills, samples are coalesced, and PE-to-PE flits are checked.

The test counts each of these mechanisms and fails if one never happened.
The mesh checker runs at 2 × 2 (`tb_mesh_noc`), 3 × 2 and 4 × 4. It
verifies that one flit crosses `(MX-1)+(MY-1)` hops in as many cycles, plus
one for ejection. It also checks that random all-to-all traffic arrives
complete and in order when the routers are enabled only by their own wake
signals.

The block testbenches check each unit against values worked out
independently: FIFO ordering and full/empty, XY output ports and
per-source ordering under random enables and back-pressure, the enable
timing of the controller, and so on.
