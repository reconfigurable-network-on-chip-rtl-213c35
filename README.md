# Table-routed wormhole router for a small torus network-on-chip

This design replaces a shared bus with a small packet network. It is meant for
image-processing systems where a few processors and a shared memory move blocks
of pixel data between them all the time. Each processor has its own router. The
routers form a 2 x 2 torus: every row and every column is a one-way ring. A
packet travels hop by hop to the router of its destination.

The routers are simple and work the same way everywhere. All routing decisions
come from a small lookup table in each router, indexed by the destination
address. A packet moves as a worm: its header reserves a path, the rest of the
packet follows it, and the tail releases it. Two virtual channels on every
router-to-router link keep the rings free of deadlock. Rewriting the tables
changes the routes, or the place of each processor, without changing any
hardware. The buffer sizes are parameters, so area can be traded for speed.

Everything is synthesizable SystemVerilog-2017. Each block has a
self-checking testbench.

## Packets and flits

A packet is a sequence of 18-bit flits. Each flit has a 2-bit control field
and a 16-bit data word (`noc_pkg::flit_t`):

| `ftype` | meaning | data word |
|---|---|---|
| `2'b10` `FT_HEAD` | header, opens a packet | destination node address in bits [3:0]; other bits are not used for routing |
| `2'b00` `FT_BODY` | normal flit | payload |
| `2'b01` `FT_TAIL` | last flit, closes the packet | payload |
| `2'b11` | unused | rejected at router inputs |

A packet is one header, any number of normal flits, then one tail. Packets
have no length limit. Payload words are 16 bits wide, which holds both the
8-bit and the 16-bit data the processors exchange. Node addresses are 4 bits,
so up to 16 routers can be addressed.

## Links: who requests, who acknowledges

This part is the easiest to get wrong when wiring routers together.

The **receiving** end of a link is an *input link controller*. It has
`wr_req` (input) and `wr_ack` (output). The **sending** end is an *output link
controller*. It has `rd_req` (input) and `rd_ack` (output). Routers are
connected like this:

```
 sender (output port)                 receiver (input port)
   out_rd_ack  ------------------->  in_wr_req     "here is a flit"
   out_rd_flit ------------------->  in_wr_flit
   out_rd_vc   ------------------->  in_wr_vc      virtual channel of the flit
   out_rd_req  <-------------------  in_wr_ack     one bit per virtual channel:
                                                   "channel v has room"
```

- `wr_ack[v]` is high while the receiver's buffer for channel `v` has room.
  It depends only on that buffer, never on `wr_req`.
- The sender offers a flit only on a channel whose `rd_req[v]` is high.
  It raises `rd_ack` with that flit, and the flit is transferred in that same
  cycle.
- Since the acknowledge comes first, a flit is never offered that cannot be
  taken. The links have no combinational loop.

The acknowledge is per channel, so a full channel 0 never blocks traffic on
channel 1. That is what makes the virtual channels useful.

Independent senders may also raise `wr_req` before `wr_ack`. The processor
side of the network interface does this. Such a sender must then hold the flit
steady until the channel acknowledges; an assertion checks this.

Every flit moves under this handshake, so nothing is ever dropped inside the
network. A full buffer holds the upstream router back, as far as the sending
processor.

## Inside the router (`noc_router`)

```
 link -> input link controller -> In FIFO (N_VC channels) -> header decoder
                                                                  |
                 routing table  <---------- lookup ---------------+
                                                                  v
   per-output arbiter (router inputs first, round robin) -> crossbar
                                                                  |
 link <- output link controller <- Out FIFO (N_VC channels) <-----+
 processor <- output link controller <- output buffer (OUT_BUF_DEPTH) <-+
```

`N_NET` network ports are numbered 0 to `N_NET-1`. The local processor port is
number `N_NET`.

- With the defaults (`N_NET = 2`, `N_VC = 2`) the router is the **2D router**:
  three inputs, three outputs, and two channels on each router link.
- With `N_NET = 1`, `N_VC = 1` the same module is the **1D router**: one ring
  port, one processor port and a single channel.

**Input side.** The input link controller writes each accepted flit into its
channel's FIFO (`vc_buffer`, which is `N_VC` × `vc_fifo`). It also checks the
packet framing per channel:

- a header must open a packet;
- normal and tail flits must come inside a packet.

A flit that breaks this rule is taken off the link but discarded, and
`proto_err` pulses for one cycle. The processor input has a single channel.

**Header decoder and wormhole routing.** Each input channel has a header
decoder. When the flit at the head of the channel is a header, the decoder
looks up the destination in the routing table. This gives an output port and
an output virtual channel. When the header moves on, the decoder latches that
route, and every later flit of the packet takes the same route.

The output virtual channel is also *owned* by the packet, from its header to
its tail. While it is owned, a header from any other input waits. This way two
packets never interleave on one channel.

**Arbitration.** Each input channel is a separate crossbar input. A channel
requests its output port when all of these hold:

- it holds a flit;
- its target output channel has room;
- for a header, the target channel is not owned.

Each output port has a `rr_prio_arbiter`. Inputs from routers always win over
the processor input, because software drives the processor side more slowly.
Among requests of equal priority, the arbiter goes round robin. Each output
port takes at most one flit per cycle. Each input channel targets only one
port.

**Output side.** Network outputs have an Out FIFO with `N_VC` channels. Their
output link controller serves the channels round robin, among those the
neighbour requests. The local output has a single buffer of `OUT_BUF_DEPTH`
flits. It absorbs traffic while the processor is busy, since a processor
receives by blocking. The processor reads this buffer through the same kind of
output link controller.

**Latency.** In an idle router, a header accepted at clock edge *t* is written
into the Out FIFO at *t+1*. It is offered on the output from *t+1* to *t+2*,
and leaves at edge *t+2*. That is two cycles per hop. After the header, a
packet moves one flit per cycle when nothing blocks it.

## Virtual channels and the dateline

A ring in which every router waits for its neighbour's buffer can deadlock.
This design breaks the cycle with a *dateline*: one link of each ring (its
wrap-around link) is marked in the routing table. The output channel of a
packet is chosen by `header_decoder`:

- A packet starts on channel 0.
- On a hop the table marks as a dateline, it moves to channel 1.
- While it continues in the same ring (input port = output port), it keeps
  its channel.
- When it turns into the other ring, it goes back to channel 0.
- Packets to the local port always use the single output buffer.

So channel 0 never carries a packet across the wrap-around link, and no cycle
of channel-0 buffers can form.

## Routing tables and reconfiguration (`routing_table`)

Each router's table has 16 entries `{dateline, port}`, one per destination
address. It is loaded from the `RT_INIT` parameter at reset. It can be
rewritten at any time through `rt_we/rt_addr/rt_port/rt_dateline`. A write
takes effect in the next cycle. A packet already under way keeps the route its
header took.

The torus top computes `RT_INIT` for every router (`noc_torus::rt_init`). It
uses dimension-order routes: along the row first, then down the column. The
wrap-around hop of each ring is marked as the dateline. Any other deterministic
route set that keeps the dateline rule can be written through the
reconfiguration port. The testbench switches all tables to column-first routes
at run time.

## Network interface (`network_interface`)

The network interface connects a processor to its router's local port.

**Send.** The processor offers words with `tx_valid/tx_ready`, the destination
on `tx_dest`, and `tx_last` on the final word. The interface first injects a
header, then one normal flit per word, and sends the last word as the tail.
`tx_ready` is low while the header goes out and whenever the router's input is
full. This is the blocking send.

**Receive.** The interface pulls flits when its one-word register is free and
drops the header. It presents each word on `rx_data/rx_valid`, with `rx_last`
on the tail's word. This is the blocking receive. The receiver is not told
which node sent a packet.

## The torus (`noc_torus`)

`COLS × ROWS` nodes (default 2 × 2). Node `n = y*COLS + x` has address `n`.

- Router port 0 sends to column `x+1` of the same row.
- Router port 1 sends to row `y+1` of the same column.
- Both wrap around at the edge.
- Port 2 goes to the network interface.

All processor ports are brought out as arrays indexed by node. The routing
table write port is shared, with one write enable per router.
`proto_err[n][p]` reports framing errors per router input.

The evaluated system puts three processors and a shared memory on the four
nodes. The end-to-end testbench models that (memory on node 3). It runs the
exchanges of 10 bytes and 1 KB, with 8-bit and with 16-bit words. With
receivers always ready, it measures these cycle counts:

| data | block | three processors → memory | memory → three processors |
|---|---|---|---|
| 8-bit | 10 bytes | 44 | 46 |
| 8-bit | 1 KB | 3086 | 3088 |
| 16-bit | 10 bytes | 29 | 31 |
| 16-bit | 1 KB | 1550 | 1552 |

The memory's single local port sets these numbers: it delivers one word per
cycle. Three 1024-word packets take about 3 × 1024 cycles.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `noc_torus` | `COLS`, `ROWS` | 2, 2 | four routers, as in the original system |
| all | `N_VC` | 2 | two virtual channels, as in the original design |
| `noc_router` | `N_NET` | 2 | 2D router: three ports in, three out |
| all | `BUF_DEPTH` | 4 flits per channel | this design's choice (the original leaves it to the user) |
| all | `OUT_BUF_DEPTH` | 8 flits | this design's choice |
| `noc_pkg` | `DATA_W`, `ADDR_W` | 16, 4 | this design's choice |

Buffer storage grows with these numbers. At the defaults, one 2D router holds
44 flits of 18 bits (792 bits). That is 16 in the In FIFOs, 16 in the Out
FIFOs, 4 at the processor input and 8 in the output buffer. It also has about
165 flip-flops of control and table state.

## Where this departs from the original design, or goes beyond it

- The original says both that the network has no flow control and that each
  transfer uses a two-way handshake. This design follows the handshake,
  applied per flit with a per-channel acknowledge.
- The original does not give the encoding of the control field, the header
  layout, the buffer sizes, the table layout or the reset behaviour. All are
  this design's choices. Reset is asynchronous and active low (`rst_n`).
- The mechanism behind "two virtual channels avoid deadlock in a torus" is not
  described in the original. The dateline scheme above is this design's
  reading.
- The original credits the priority rule to the input controller, and says
  the arbiter "receives packets from the network" for the processor. Here,
  priority is applied at the per-output arbiters, where requests meet. The local output buffer sits behind the local port's arbiter.
- The original only names the network interface and the crossbar. Both are
  the simplest blocks that do the job.
- Framing checks (`proto_err`) are an addition.
- The processors and the shared memory are not part of the RTL. They appear
  only as testbench models.
- The original reports FPGA slice counts (network interface 120, router 344)
  and times in µs and ms against a DMA-based bus system. This design was not
  mapped to that FPGA, so neither can be compared here. The DMA system is not
  part of this design.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. For example, the whole network at its default
size:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/noc_pkg.sv tb/tb_noc_torus.sv --top-module tb_noc_torus
./obj_dir/Vtb_noc_torus
```

Replace `tb_noc_torus` with any other testbench name. All of them run in well
under a second.

| testbench | what it checks |
|---|---|
| `tb_noc_torus` | whole network at default size: random all-to-all traffic with slow and fast receivers, run-time switch of all tables, the processor/shared-memory workload; counts link stalls, receiver stalls, channel-1 hops, priority decisions, contention, table rewrites |
| `tb_noc_torus_4x4` | the same on a 4 × 4 torus, where packets make several hops in one ring before and after the wrap-around link |
| `tb_noc_router` | one 2D router: random packets on all inputs and channels, random tables rewritten mid-run, route, channel, ordering and non-interleaving per packet, two-cycle latency, priority, framing error |
| `tb_noc_router_1d` | the same on the 1D configuration |
| `tb_input_link_controller`, `tb_output_link_controller` | link handshakes, framing check, channel selection |
| `tb_header_decoder`, `tb_routing_table`, `tb_rr_prio_arbiter`, `tb_crossbar` | route and channel rules, table writes, arbitration against a reference model, switching |
| `tb_vc_fifo`, `tb_vc_buffer` | FIFO order and flags against a queue model |
| `tb_network_interface` | packetisation and blocking send and receive against stalling router models |

## Files

- `rtl/noc_pkg.sv`: flit type and widths.
- `rtl/vc_fifo.sv`, `rtl/vc_buffer.sv`: virtual-channel buffers.
- `rtl/input_link_controller.sv`, `rtl/output_link_controller.sv`: link ends.
- `rtl/header_decoder.sv`, `rtl/routing_table.sv`: routing.
- `rtl/rr_prio_arbiter.sv`, `rtl/crossbar.sv`: switching.
- `rtl/noc_router.sv`: the router.
- `rtl/network_interface.sv`: processor attachment.
- `rtl/noc_torus.sv`: the 2 × 2 network (top).
- `tb/tb_*.sv`: one testbench per block.
