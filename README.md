# Circuit-switched mesh Network-on-Chip with centralized routing-switches

This is a small Network-on-Chip (NoC) for a system-on-chip with many
functional units: processor cores, memories, accelerators. The units sit on a
4 × 4 mesh. Each mesh node has a **routing-switch** and a **network
interface**, and neighbouring switches are joined by point-to-point links.

The network uses **circuit switching**, not packet switching. A sender first
reserves a complete path from itself to the destination, one switch at a
time. It then streams its data words down that path, one word per clock, and
releases the path when it is done. A word never has to wait inside a switch
once the path stands, so the switches need **no data buffers**. That makes
them small. The switch is just a crossbar, a few registers and a little
control logic.

The routing-switch is **centralized**. A single router and a single arbiter
serve all five input ports in turn. Four routing algorithms can be selected:
static XY routing, a static routing table, minimal adaptive XY routing, and
adaptive XY routing with **backtracking**. Backtracking is the default.

The design follows the routing-switch architecture and the algorithm family
of the publication "Quantitative design space exploration of routing-switches
for Network-on-Chip". That publication describes the blocks, the connection
states and the algorithms. The link protocol, the encodings and the
network-interface behaviour are this implementation's own choices. They are
marked as such below.

## The mesh

```
 (0,0)─(1,0)─(2,0)─(3,0)        x grows to the east
   │     │     │     │          y grows to the south
 (0,1)─(1,1)─(2,1)─(3,1)        node number n = y*4 + x
   │     │     │     │
 (0,2)─(1,2)─(2,2)─(3,2)        every node: routing_switch + network_interface
   │     │     │     │          on the switch's local port
 (0,3)─(1,3)─(2,3)─(3,3)
```

Each switch has five ports: 0 local, 1 north, 2 east, 3 south and 4 west.
Every port has an input side and an output side. Each side has:

| direction              | lines        | meaning                                                 |
|------------------------|--------------|---------------------------------------------------------|
| forward (to next hop)  | `req`        | held high for the whole life of a connection            |
|                        | `valid`      | a data word is on `data` this cycle                     |
|                        | `data[W-1:0]`| head word during set-up, then data words                |
| backward (to previous) | `ack`        | the path from here to the destination stands            |
|                        | `nack`       | the path could not be built from here                   |

Ports on the edge of the mesh are tied off, and the router never selects
them.

## Life of a connection

This section covers the part that is hardest to see from the code: how a
path is built, refused, retried and torn down. Every input port of every
switch runs the same state machine (`rs_port_ctrl`). It moves through the
states below.

| state                     | what happens                                                                                 |
|---------------------------|----------------------------------------------------------------------------------------------|
| idle                      | waiting; a rising `req` starts a connection, and the head word on `data` is stored           |
| determine connection target | the shared arbiter and router choose an output port; lasts 3 cycles when uncontended        |
| wait for connection       | `req` and the head word go out on the chosen port; waiting for `ack` or `nack` from there     |
| active connection         | `ack` is returned upstream; data words pass through the crossbar                             |
| destroy connection        | 2 cycles after `req` drops: first the outgoing `req` drops, then the output port is freed    |
| refused                   | `nack` is held upstream until the upstream `req` drops                                       |

**Head word.** The first word of a connection carries the coordinates. Bits
3:0 are the destination x, 7:4 the destination y, 11:8 the source x and
15:12 the source y. This is why the data width must be at least 16 bits.

**Four-phase handshake.** `ack` and `nack` stay high until the port that
raised them is idle again. An upstream switch treats an output port as free
only when it does not own that port and both backward lines are low. As a
result a new connection can never reach a port that is still tearing down an
old one. No timing assumption about neighbouring switches is needed.

**Refusal and retry.** The router may find no usable output port. With XY
routing or the routing table this happens when the one allowed port is
already in use. The arbiter then refuses the request, and `nack` travels back
hop by hop to the sending network interface. That interface drops its
request and waits `BACKOFF` cycles plus a pseudo-random 0 to 15 cycles. The
random part comes from an LFSR seeded with the node position. It then tries
again.

**Adaptive XY.** The route first tries the X direction. If that port is busy
and the destination also differs in Y, the Y port is taken instead. That
detour still shortens the path. Only minimal paths are ever used.

**Backtracking.** A switch may receive `nack` from downstream while it waits
for a connection. With backtracking, the switch does not pass that `nack`
upstream at once. It marks the refusing output as *tried*, gives the port
back, and returns to "determine connection target". The router then skips
ports that were tried. Only when no feasible port is left does the switch
send `nack` upstream. The previous switch then does the same thing. So a
refusal deep in the network is retried one switch back rather than
cancelling the whole transfer. The set of tried ports is cleared when the
port next goes idle.

**Cycle counts.** The counts below assume `INPUT_REG = 1` and no contention.

* A request reaches the next link 5 cycles after arriving at a switch input:
  1 cycle in the input register, 1 in idle and 3 in "determine connection
  target".
* `ack` moves back one cycle per switch.
* Data words take one cycle per switch.
* Tear-down drops the outgoing `req` 2 cycles after the incoming one and
  lowers `ack` 3 cycles after it.

## Inside a routing-switch (`routing_switch`)

```
 in_* ──► rs_input_reg ──► rs_port_ctrl (×5) ──route_req──► rs_arbiter ◄──► rs_router
               │                  ▲   fwd_req/release           │ own_valid/own_idx
               └──── data ───►  rs_switch (crossbar)  ◄─────────┘
                                   │ ▲
 out_* ◄───────────────────────────┘ └── out_ack/out_nack
```

* **`rs_input_reg`** is the optional pipeline register on the forward lines
  of each input (`INPUT_REG`). With `INPUT_REG = 0` it is a wire, and a word
  crosses several switches in one cycle.
* **`rs_arbiter`** is shared by all inputs. It runs three phases:
  * **PICK**: choose one input that wants a target, round robin.
  * **ROUTE**: register the router's answer for that input.
  * **GRANT**: grant the port if it is still free, otherwise refuse.

  It also keeps the table of which input owns which output. That table is
  what configures the crossbar. Because one input is served at a time, two
  inputs can never be granted the same port.
* **`rs_router`** is combinational. It takes the stored destination, the
  switch position `(MY_X, MY_Y)`, the free ports and the tried ports, and
  returns a port, `ok`, and `alt` (the adaptive detour was used). For
  `ALG_TABLE` the port comes from **`rs_routing_table`**. Reset loads the
  table with XY routes, computed in SystemVerilog, and the table can be
  rewritten through the switch's `tbl_*` port.
* **`rs_switch`** is the crossbar. Forward lines go from owner input to
  output, and backward lines go from output to connected input. Unowned
  outputs drive 0.
* **`rs_port_ctrl`** is the per-input state machine described above.

The outputs `ev_setup`, `ev_refuse`, `ev_backtrack` and `ev_alt` each pulse
once per event. They exist for statistics.

**Smaller switches.** The parameter `PORT_EN` (bit 0 local … bit 4 west,
default all five) leaves ports out, which gives 3- and 4-port switches. A
port that is left out has no input register and no state machine. Its outputs
drive 0 and the router never picks it. For example, `PORT_EN = 5'b01101`
keeps local, east and south, which is what a north-west corner switch needs.
`noc_mesh` always builds full 5-port switches.

## Network interface (`network_interface`)

**Sending side.** The functional unit raises `tx_valid` together with
`tx_dest_x/y` and `tx_len`, which is the number of words and must be at least
1. It holds these until `tx_done`. Once the path stands, the interface asks
for one word per cycle with `tx_rd`. The word must be on `tx_data` in that
same cycle. After the last word the interface drops `req`. When `ack` has
fallen it pulses `tx_done`. Every refused set-up pulses `tx_retry`.

**Receiving side.** Incoming connections are always accepted, with `ack`
raised one cycle after the request. Each word appears on `rx_valid`/`rx_data`
together with the sender on `rx_src_x/y`. `rx_busy` is high while a
connection is open. The switch's local output port carries only one incoming
connection at a time.

## Top level (`noc_mesh`)

`noc_mesh` instantiates `MESH_X × MESH_Y` switches and interfaces and wires
the links. Its ports are arrays indexed by node number, one entry per
functional unit, plus the per-switch event pulses. The routing tables keep
their reset contents in the mesh: their write ports are tied off.

| parameter   | default              | meaning                                                   |
|-------------|----------------------|-----------------------------------------------------------|
| `DATA_W`    | 32                   | data word width, 16 or more                               |
| `MESH_X`, `MESH_Y` | 4, 4          | mesh size, up to 16 × 16                                  |
| `INPUT_REG` | 1                    | register at each switch input                             |
| `ALGO`      | `ALG_ADAPTIVE_XY_BT` | `ALG_XY`, `ALG_TABLE`, `ALG_ADAPTIVE_XY`, `ALG_ADAPTIVE_XY_BT` |
| `LEN_W`     | 8                    | width of the transfer length                              |

Shared types are in `noc_pkg`: the port enum, the algorithm enum, the
connection-state enum and the head-word struct.

## Behaviour under random traffic

`tb/tb_noc_traffic.sv` builds the 4 × 4 mesh four times, once per algorithm.
Each node sends 64-word messages to random other nodes at a requested
utilization of its injection link. Each load runs for 4000 cycles. Achieved
utilization is the number of delivered words divided by 16 × cycles. Output
of one run (achieved utilization):

| requested | XY     | table  | adaptive XY | adaptive XY + backtracking |
|-----------|--------|--------|-------------|----------------------------|
| 10 %      | 8.7 %  | 10.9 % | 10.0 %      | 11.3 %                     |
| 20 %      | 18.9 % | 19.4 % | 18.3 %      | 18.6 %                     |
| 40 %      | 29.3 % | 29.3 % | 29.0 %      | 31.5 %                     |
| 80 %      | 32.4 % | 29.9 % | 32.6 %      | 32.0 %                     |

Up to 20 % the algorithm makes no real difference, and the mesh saturates at
about 30–33 %. Backtracking cuts the set-ups cancelled back to the sender
from about 2100 (XY) and 1900 (adaptive XY) to about 1500 per run, and it is
ahead at the 40 % point. At 80 % it is no better than the others. The
original publication reports saturation at about 30–36 % and a clear lead
for backtracking at high load. It does not say what message length, retry
delay or link handshake it used, and these matter a lot here. The fixed cost
of a connection is set-up at 5 cycles per hop, the returning `ack`, the
tear-down, and a back-off of 8 to 23 cycles after a refusal. With 16-word
messages that cost dominates, and every algorithm saturates near 15 %. Each
figure above comes from a single random run, so differences of a point or
two are noise. Read the numbers as properties of this implementation, not as
a reproduction of the published curves.

### Word width and input registers

`tb/tb_noc_design_space.sv` builds the default mesh seven times: with
16-, 32-, 64-, 128- and 256-bit words and input registers, and with 16- and
256-bit words without them. Every build is offered the same traffic:
204.8 Gbit/s in total at 1 GHz, which is 12.8 bits per cycle per node, sent
as 512-bit messages. The requested link utilization is therefore
1280 / `DATA_W` percent, and a message is 512 / `DATA_W` words long. Output
of a 3000-cycle run:

| word bits | input reg | requested | delivered Gbit/s | mean latency (cycles) |
|-----------|-----------|-----------|------------------|-----------------------|
| 16        | yes       | 80 %      | 57               | 1084                  |
| 32        | yes       | 40 %      | 75               | 996                   |
| 64        | yes       | 20 %      | 90               | 823                   |
| 128       | yes       | 10 %      | 97               | 779                   |
| 256       | yes       | 5 %       | 102              | 684                   |
| 16        | no        | 80 %      | 64               | 1058                  |
| 256       | no        | 5 %       | 124              | 527                   |

Latency is measured from when a message is created to when its last word
arrives. Wider words and no input registers both help, which is the expected
trend. Still, no build gets near the requested 204.8 Gbit/s. A 512-bit
message is only 2 to 32 words, and the set-up cost of 5 cycles per switch
plus tear-down and back-off is paid for each one. Source queues therefore
grow, and the latencies above are mostly queueing time.

## Simulating

Every module is in `rtl/<name>.sv`, and `noc_pkg.sv` must be read first.
Each block has a self-checking testbench in `tb/`. A testbench prints
`TB_RESULT checks=N failures=M` and stops on its own. Example with plain
Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_noc_mesh.sv --top-module tb_noc_mesh -o sim
./obj_dir/sim
```

| testbench               | what it establishes                                                          |
|-------------------------|-------------------------------------------------------------------------------|
| `tb_rs_input_reg`       | one-cycle delay and reset value; wire variant passes values through unchanged |
| `tb_rs_router`          | all four algorithms against a reference model, including off-mesh ports and tried ports |
| `tb_rs_routing_table`   | XY contents after reset; writes and read-back                                 |
| `tb_rs_arbiter`         | grant in 3 cycles, refusals, ownership, release rule, round robin             |
| `tb_rs_switch`          | crossbar forward and backward paths against random connection tables         |
| `tb_rs_port_ctrl`       | every state and transition, with and without backtracking                    |
| `tb_routing_switch`     | whole switch: cycle counts, detour, backtracking against XY, two connections at once, a 3-port variant |
| `tb_network_interface`  | refusal, back-off and retry; word order; `tx_done`; receive side             |
| `tb_noc_mesh`           | default-size mesh end to end (see below)                                      |
| `tb_noc_traffic`        | the random-traffic table above, with data-integrity checks                    |
| `tb_noc_design_space`   | the word-width table above, with data-integrity checks                        |

`tb_noc_mesh` runs the mesh at its default parameters with 192 transfers of
1 to 24 words, all starting at once. It checks the sender and order of every
word and the completeness of every transfer, and that the network is idle at
the end. It also checks that set-ups, arbiter refusals, interface retries,
adaptive detours, backtracking retries, deliveries to a node's own unit and
switches carrying two connections at once all occurred.

## What is not here

* **Mesh with trimmed edge switches.** `PORT_EN` can build 3- and 4-port
  switches, but `noc_mesh` uses 5-port switches everywhere. Edge and corner
  switches simply leave their outer ports unused.
* **Non-minimal adaptive routing.** It is not implemented.
* **Error-protecting codes on the data words.** None are used.
* **Links.** These are plain wires inside `noc_mesh` and have no module of
  their own.
* **The measurement environment.** The original work used an FPGA with
  traffic sources and sinks, a soft-core controller and a host PC. Only
  `tb_noc_traffic` and `tb_noc_design_space` stand in for the sources and
  sinks.
* **Area, power and clock-frequency results.** These come from synthesis
  and layout in a 90 nm library and cannot be reproduced in RTL.
