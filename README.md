# A topology-adaptive network-on-chip

This is a packet-switched on-chip network for a reconfigurable platform. In that platform, hardware tasks are swapped in and out of FPGA tiles at run time, so the traffic between tiles keeps changing. The network has two central ideas:

* **One router for every topology.** Input ports and output ports are separate parameters, and a router port is the same whether it leads to another router or to an IP. A network is described by a table of connections. With that table, the same router builds a mesh, a torus, a hypercube, a tree, one big crossbar, or an irregular network with several IPs on one router.
* **Routing that software can change.** Every router input has a look-up table with one entry per IP, giving the output to take. The operating system can rewrite these entries while traffic flows, to steer packets around busy links without moving tasks.

Switching is *virtual cut-through* (VCT). A packet moves on as soon as its next output is free. If the output is busy, the packet is stored whole in a queue on the router output, and the input is released. Without blocking, a packet crosses `N` routers in `3·N + F` cycles, where `F` is its flit count.

The reference configuration is a 3 × 3 mesh with 16-bit links. Each tile has a data NIC, which buffers, crosses clock domains, limits the injection rate and keeps statistics. Each tile also has a control NIC: the register window through which the OS programs the tile.

## Links and packets

All links, whether router↔router or router↔NIC, use the same four signals (`noc_pkg`):

| signal | direction | meaning |
|---|---|---|
| `req`  | sender → receiver | a packet is offered. It stays high from the header flit to the last flit. |
| `ack`  | receiver → sender | the receiver takes the packet. It stays high until the last flit. |
| `data` | sender → receiver | the current flit (`DATA_W` bits) |
| `last` | sender → receiver | marks the final flit |

A flit moves in every cycle in which `req && ack`. Flow control works on whole packets. The receiver acknowledges only when it can take the entire packet. After that, the sender must deliver one flit per cycle with no gaps, and assertions in `input_block` check this. A new packet may follow in the next cycle after `last`.

The first flit is the header. Its low `$clog2(NIP)` bits hold the destination IP number, so the link must be at least that wide, because the address is decoded in one cycle. The rest of the header, and the payload flits, are free for the IPs. The testbenches put the source number in header bits [11:8].

The largest packet is `MAX_PKT_FLITS` = 273 flits: one header flit plus a 544-byte payload in 16-bit flits. Shorter packets are allowed.

## Inside a router

```
 in link ─► input_block (routing_table) ─┐        ┌─► output_block (rr_arbiter + output_queue) ─► out link
 in link ─► input_block (routing_table) ─┼─ crossbar ─┼─► output_block ...
   ...                                   ┘        └─► ...
```

`router` has `NI` input blocks, one single-stage `crossbar`, and `NO` output blocks.

**Timing of one hop** when nothing blocks. Cycle *t* is the cycle in which the header is at the input.

| cycle | what happens |
|---|---|
| t   | `input_block` looks up the header's destination in its `routing_table` (asynchronous read) and registers the chosen output |
| t+1 | it requests that output's `rr_arbiter`. The arbiter registers a grant if nobody holds the output and the queue has room for a maximum-size packet. |
| t+2 | the grant is seen. The input acknowledges upstream, and the header passes the crossbar into the `output_queue`. |
| t+3 | the queue is no longer empty, so the output raises `req` to the next node with the header |

That gives the three cycles per router, and the remaining flits follow one per cycle. Arbitration can take longer when the output is busy or its queue is full. The upstream sender then simply waits with `req` high.

**Arbiter.** Each output has a round-robin arbiter that depends on acceptance. The arbiter searches for a requester starting at its priority pointer. The grant stays with the winner while the winner keeps its request up, which is for the whole packet. The pointer moves past the winner only when the winner actually starts to transfer. An offered grant that goes unused therefore does not cost anyone their turn.

**Output queue and cut-through.** The queue is a FIFO of `DEPTH` = 1024 words, each holding a flit and its `last` bit. That is one 2-kbyte block RAM at 16 bits, enough for three maximum-size packets. The head is read combinationally, so a flit written in cycle *t* can leave in *t+1*. The writer delivers one flit per cycle, and the reader starts at the earliest one cycle behind it and reads at most one flit per cycle. So the queue cannot run dry in the middle of a packet, and the output can forward a packet before the packet has fully arrived. The arbiter admits a packet only while `DEPTH − count ≥ MAX_PKT_FLITS`, so a blocked packet can always be stored whole. This is the VCT condition. After storing it, the input is free for the next packet, so there is no head-of-line blocking.

**Routing-table writes.** The router's `cfg_*` port writes entry `cfg_ip` of input `cfg_in`'s table, or of all inputs' tables when `cfg_all` is set. Tables reset to port 0, so they must be programmed before the first packet. After that they can be rewritten at any time. A packet that has already been routed keeps its output, and the next packet sees the new entry.

## Describing a network

`noc_network` builds a network from parameters:

* `R_NIN[r]`, `R_NOUT[r]` give the number of inputs and outputs of router *r*.
* `TOPO[r][o]` (a `conn_t`) says what output *o* of router *r* drives: `DST_ROUTER` with a router number and its input port, `DST_IP` with an IP number, or `DST_NONE`.
* `IP_RTR[k]`, `IP_PORT[k]` give where IP *k* injects.

Every router input must be fed by exactly one source. Unconnected outputs are never acknowledged.

`noc_pkg` has builders for these tables:

| function | topology | router ports |
|---|---|---|
| `mesh_topo(w,h)`, `mesh_nports` | W × H mesh | 0 = IP, then N, E, S, W neighbours that exist. Edge routers have 3 or 4 ports. |
| `torus_topo(w,h)` | W × H torus | 0 = IP, 1..4 = N, E, S, W |
| `cube_topo(d)` | 2^d-router hypercube | 0 = IP, 1+k = across dimension k |
| `tree_topo(n)`, `tree_nports` | balanced binary tree (children 2r+1, 2r+2) | 0 = IP, parent, children |
| `xbar_topo(n)` | one n × n router | IP k at port k |

The tables can describe up to 64 routers (`MAX_R`) and 16 ports per router (`MAX_PORTS`). The software that owns the routing tables must use the same port numbering. `tb/topo_runner.sv` shows how to derive shortest-path tables from any `TOPO`.

## The tile: data NIC and control NIC

`noc_platform` is the top level. It contains a `MESH_W × MESH_H` mesh (3 × 3 by default), and every tile *t* has the following:

* **`data_nic`**: the IP's view of the network, in its own clock `ip_clk[t]`.
  * *Send path.* The IP writes flits (`ip_tx_valid/ready/data/last`) into the write-router buffer, an `async_fifo` with one clock per port. The FIFO also passes a count of *complete* packets across the clock boundary. The NIC offers a packet to the router only when a whole packet is stored and the FIFO also shows it as non-empty, so it can always send without gaps. The packet count and the write pointer cross on separate synchronisers and may arrive a cycle apart, which is why both are checked. It also needs permission from the `injection_rate_ctrl`, which allows at most `inj_limit` packet starts per window of `inj_window` network cycles (0 = no limit). The output stats collector counts packets sent.
  * *Receive path.* The NIC acknowledges a packet from the router in the same cycle if the read-router buffer has room for a maximum-size packet. The IP reads the flits in its own clock as soon as they arrive, so a streaming IP can start on the first flit. The input stats collector counts packets received. It also counts *blocked* packets: a packet is blocked when its request finds the buffer without room and has to wait in the router's output queue.
  * Pointers cross clock domains in Gray code through two-flop synchronisers. `NIC_DEPTH` must be a power of two.
* **`control_nic`**: a synchronous register port (`ctl_we/addr/wdata`, with `ctl_rdata` combinational from `ctl_addr`) that stands in for the control network:

| addr | register | access |
|---|---|---|
| 0 | ROUTE: `[31]` all inputs, `[23:16]` input, `[15:8]` IP, `[7:0]` output port. Writes one routing-table entry in the next cycle. | W |
| 1 | INJ_LIMIT: packets per window, 0 = unlimited (reset 0) | R/W |
| 2 | INJ_WINDOW: window length in network cycles (reset 1024) | R/W |
| 3 / 4 / 5 | SENT / RECV / BLOCKED message counters (32-bit, saturating) | R |
| 6 | CLEAR: clears the three counters | W |

The control network itself, the main processor, and the tile that connects the processor are not part of this RTL. In the reference platform one tile is given over to the link to the processor. Here every tile looks the same, and each tile's control port is brought out as top-level ports.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `DATA_W` | 16 | the 16-bit links of the bandwidth comparison (50 MHz × 16 bit = 100 Mbyte/s per link) |
| `DEPTH` (router queue) | 1024 flits | one 2-kbyte block RAM per output |
| `MAX_PKT_FLITS` | 273 | 1 header + 544-byte payload / 2 bytes |
| `NIC_DEPTH` | 1024 flits | own choice |
| `MESH_W × MESH_H` | 3 × 3 | the reference platform |
| router `NI`, `NO` | 5, 5 | mesh router with four neighbours and one IP |

## How far to trust it, and where it departs

Established by simulation:

* Each router adds 3 cycles of base latency. `tb_noc_network` measures `3·N + F` for every source/destination pair of the 3 × 3 mesh (N = 1..5 routers).
* Flits are delivered intact and in order under random, contended traffic, including while all routing tables are rewritten mid-run from XY to YX routing.
* The VCT admission rule holds, as do arbitration, NIC blocking and injection limiting. They are exercised at the full default size by `tb_noc_platform`.
* The five 16-IP topologies of the comparison run correctly (`tb_topologies`). Their link counts give 9600, 8000, 9600, 6200 and 3200 Mbyte/s for hypercube, mesh, torus, tree and crossbar. The published comparison shows about 6400 for the torus and 6000 for the tree. The other three agree.

Design choices to be aware of:

* **Combinational queue read.** The output queue and the NIC FIFOs are arrays read combinationally. This is what makes the three-cycle hop work. A block RAM with a registered read port would need a prefetch register or one more cycle per hop.
* **`last` wire.** The end of a packet is marked by a separate wire rather than by a length field, so packets of any length up to the maximum can follow each other back to back.
* **Blocking model.** The arbiter waits for room for a *maximum-size* packet, even when the packet is short. This is conservative, but it never deadlocks a queue half-filled.
* **Injection control** uses a fixed-window packet counter. The register map, the counter widths and the reset values of the control NIC are this design's own.
* **Not provided:** area optimisations, such as a shared routing table or arbiter used in time slots, or a multi-stage crossbar. Wormhole switching with virtual channels is also not provided.
* Verilator lint reports no latch, loop, width or multiple-driver warnings. What remains are a few unused-bit notes, plus a note that `rst_n` is also sampled synchronously. The synchronous use is the `disable iff` of the handshake assertions.

## Files

`rtl/`: `noc_pkg` (link conventions, topology types and builders), `routing_table`, `input_block`, `rr_arbiter`, `crossbar`, `output_queue`, `output_block`, `router`, `noc_network`, `async_fifo`, `stats_counter`, `injection_rate_ctrl`, `data_nic`, `control_nic`, `noc_platform` (top).

`tb/`: one self-checking testbench per module (`tb_<module>`). There is also `tb_router_fig4` (a 3-input, 4-output router with two IPs) and `tb_topologies` (the five 16-IP networks, using the helper `topo_runner`). Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_noc_platform \
    -y rtl -y tb +libext+.sv rtl/noc_pkg.sv tb/tb_noc_platform.sv
./obj_dir/Vtb_noc_platform
```

Swap in any other testbench name. `tb_noc_platform` runs the full-size platform (default parameters) in about ten seconds. The others run in well under a second. Every testbench has a watchdog.
