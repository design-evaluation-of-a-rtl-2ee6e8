# A small store-and-forward mesh router for FPGAs

This is a network-on-chip router meant to be cheap in FPGA logic. IP cores
on a chip exchange fixed-size packets over a 2-D mesh of these routers. Each
router has four mesh ports (north, east, south, west) and zero to four local
ports for IP cores. Three choices keep the router small:

* **Store and forward.** A packet is always 8 flits. It is held whole at
  every stage: first in the input buffer of the port it arrives on, then in
  the output buffer of the port it leaves by, then in the next router.
  Because of this a packet never occupies more than one link, and no
  wormhole-style channel reservation is needed.
* **Row-first dimension-order routing.** The router compares the row (y)
  first and the column (x) second. A packet that arrives from the east or
  west is therefore already in its row and can never turn north or south.
  The switch uses this fact to save multiplexer inputs.
* **Decentralised control.** Every input port routes its own packet. Every
  output port arbitrates its own requests. Several transfers can cross the
  router at once, one per output.

The flit width, the number of local ports per router, the arbitration scheme
and the mesh size are all parameters. The defaults are 8-bit flits,
fixed-priority arbitration, and a 2x2 mesh with one IP core per router.

## Packets and addresses

A packet is `PKT_LEN = 8` flits of `FLIT_W` bits. `FLIT_W` must be at least
8. The low 8 bits of the first flit are the header:

| bits | field        | meaning                                  |
|------|--------------|------------------------------------------|
| 7:5  | `dest_y`     | destination row, 0 = southernmost        |
| 4:2  | `dest_x`     | destination column, 0 = westernmost      |
| 1:0  | `dest_local` | local port (IP core) at that router      |

The header is never changed on the way. The rest of the packet is payload.
Router `(x, y)` has the coordinate `{y, x}`. This allows meshes of up to
8x8 routers with 4 IP cores each, so 256 destinations.

Each router applies one routing rule to a stored header:

1. If `dest_y` is above its own row, the packet goes north. If it is below,
   the packet goes south.
2. Otherwise, if `dest_x` is east of its own column, the packet goes east. If
   it is west, the packet goes west.
3. Otherwise the packet has arrived, and it goes out of local port
   `dest_local`.

If that local port does not exist in this router, the router raises `nep`
("non-existent port") and discards the packet. Discarding stops the port
from locking up. `nep` stays high for the 8 cycles the discard takes.

## Port slots

Inside the router, and on `noc_router`'s ports, the ports are numbered as
eight slots, clockwise from north:

| slot | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|------|---|---|---|---|---|---|---|---|
| port | N | L0 | E | L1 | S | L2 | W | L3 |

Local port *l* is slot `2l+1` and sits between two mesh ports. L0 is to the
north-east, L1 south-east, L2 south-west and L3 north-west. With one local
port the order is N, L, E, S, W. This clockwise order is also the order the
default fixed arbiter uses to rank ports. Slots of local ports that are not
built have no logic. Their outputs are 0 and their inputs are ignored.

## The link protocol

The same protocol runs in each direction of every router-to-router link and
every router-to-IP link. Each direction has three signals:

* `sending` goes from the sender to the receiver.
* `data` goes from the sender to the receiver.
* `empty` goes back from the receiver to the sender.

A transfer works like this:

* The receiver holds `empty` high while its input buffer can take a whole
  packet.
* When the sender has a packet and sees `empty` high, it raises `sending`
  for exactly one cycle. The 8 flits follow on `data` on the next 8 cycles,
  one per cycle, with no gaps.
* `empty` goes low on the cycle after the `sending` pulse. It stays low until
  the receiver has passed the packet on inside its router.

The protocol has no stall in the middle of a packet. Flow control happens
only at packet granularity.

An IP core on a local port uses exactly this protocol. It must hold `empty`
low on its receive side when it cannot take a packet. The mesh brings every
local port out as `lp_sending_in`, `lp_empty_out` and `lp_data_in` (IP core
to network), and as `lp_sending_out`, `lp_empty_in` and `lp_data_out`
(network to IP core).

## Inside a router: the life of a packet

This is the part that needs the most care. The cycle numbers below are for a
packet that meets no contention.

| cycle | what happens |
|-------|--------------|
| 0     | `sending_in` pulse at the input port |
| 1-8   | The input controller is in `RECV`. It raises `take_in` and the 8 flits enter the input buffer. |
| 9     | The buffer reports `full`. The header is the buffer's output. The controller routes the packet (or starts a NEP discard). |
| 10    | `HOLD`: a request goes to the chosen output controller. The output controller is idle with an empty buffer. Its arbiter picks among all requests it sees and registers a one-hot grant. |
| 11-18 | The grant is high. The input spits out one flit per cycle. The partial crossbar, whose select is this one-hot grant, carries the flit to the output buffer. The output buffer takes each flit in. The input drops its request after the first grant cycle. |
| 19    | The output buffer is full, and the grant drops. If the next hop's `empty` is high, the output controller goes on to the pulse. Otherwise it waits in `WAIT`. |
| 20    | `sending_out` pulse. |
| 21-28 | The 8 flits go out on `data_out`. |

So one router hop costs 20 cycles from pulse to pulse. A packet between two
local ports of the same router takes 20 cycles. One that crosses two mesh
links takes 60 cycles. The testbenches check both figures.

Inputs that lose arbitration keep their request high. The next grant is
issued only when the output buffer has drained. While an output waits for a
busy next hop, the packet sits in the output buffer, not the input buffer.
The input port is then free to receive and route its next packet to another
output. Preventing this head-of-line blocking is why the design has output
buffers at all.

The output buffer is never bypassed, even when the next hop is ready. Skipping
it would save about 9 cycles per hop, but this design does not do it.

## Blocks

| module | what it is |
|--------|------------|
| `noc_pkg` | Slot numbers, arbiter codes, packet length, priority-list type, helper functions. |
| `packet_buffer` | One-packet store with `take_in` and `spit_out` controls and `full` and `empty` flags. It is used as both the input buffer and the output buffer. It fills completely, then drains completely. |
| `input_controller` | Receive, route, request, stream, and NEP discard. |
| `output_controller` | Arbitrate, hold the grant for the whole packet, wait for the next hop, pulse, send. |
| `input_channel`, `output_channel` | A buffer plus its controller. |
| `crossbar_switch` | One AND-OR multiplexer per output, with the output's one-hot grant as its select. There are no demultiplexers, because every input fans out to all multiplexers. The north and south multiplexers have no east or west inputs. In a five-port router they are 3-to-1 and the others are 5-to-1. |
| `arb_fixed`, `arb_counter`, `arb_coin` | The arbitration units, described below. |
| `noc_router` | Instantiates one input channel and one output channel per built slot, plus the switch. It transposes the request and grant matrices and ORs the NEP flags. |
| `noc_mesh` | The top. It builds a `MESH_X` x `MESH_Y` array of routers and wires each output to the facing input of its neighbour. Ports on the mesh border are tied idle. Local ports are flattened to index `(y*MESH_X + x)*NUM_LOCAL + l`. |

## Arbitration units

The output controller parameter `ARB` chooses the unit. The router's `ARB`
applies it to every output. `PRIO[o]` gives output *o* its own priority list
for the static schemes.

| `ARB` | scheme |
|-------|--------|
| `ARB_FIXED` | Static priority: the first requester in the list `PRIO` wins. The default list is north first, then clockwise. The application-tuned static schemes are the same unit with other lists, either one list for all outputs or a different list per output. |
| `ARB_BUSY`  | Counts packets granted per input. The busiest input wins. |
| `ARB_WAIT`  | Counts the cycles each input has been requesting. The counter clears on a grant. The longest waiter wins. |
| `ARB_LEAST` | Counts packets granted per input. The input with the fewest wins. |
| `ARB_COIN`  | One input holds a "coin" and has top priority. After it come the inputs clockwise from it. The coin moves one slot clockwise only when its holder is granted. |

In the counting units the counters are 8 bits wide and saturate. Ties go to
the slot that comes first clockwise from north. The coin starts at north
after reset. Fixed priority is the cheapest unit, and it is the one
recommended when area matters.

## Where this design makes its own choices

Several things are not fixed by the architecture. This RTL chooses them as
follows:

* **Header layout.** Only the field widths are given. The coordinate is
  placed above the two local-port bits, and the header is taken from the low
  8 bits of the first flit.
* **Cycle-level timing** of every controller, including the 20-cycle hop.
* **NEP packets are discarded.** Only the flag itself is specified.
* **Buffer implementation.** Each buffer is a write-once array with two
  counters. A shift-register chain would behave the same at the ports.
* **What the counting arbiters count.** The counter width, saturation and
  tie-breaking are also choices.
* **The custom static priority orders** used in the evaluation testbench.
* **Reset.** All state has an asynchronous active-low `rst_n`. Reset leaves
  every buffer empty and every controller idle.
* **Local ports per router.** Each router may have its own count, 0 to 4,
  set by the `NL_ROUTER` array of `noc_mesh`. The default gives every router
  `NUM_LOCAL`. `NUM_LOCAL` is also the number of entries per router in the
  flattened local-port arrays. An entry whose port a router lacks is tied
  idle: it never reads empty, never sends and outputs 0. A packet addressed
  to a missing port is dropped with `nep`, as for a single router.
  `tb_noc_mesh_mixed` runs a 2x2 mesh whose routers have 2, 0, 1 and 1
  local ports.
* **Border routers** keep all four mesh ports. The unused ones are tied off.
  Corner routers with fewer ports are not built.
* **One clock domain.**

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/` (`tb_<module>`).
Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. The
testbenches check these things:

* The buffer's order and flags.
* Each arbiter against a reference model under random requests.
* The switch against the allowed-connection table.
* The routing decision for random headers at several coordinates, including
  NEP discards.
* Handshake timing.
* Router and mesh scoreboards under random traffic with random
  back-pressure.

The router and mesh tests also count the mechanisms they rely on and fail if
any of them never happens:

* output contention,
* a packet waiting in an output buffer,
* IP back-pressure,
* NEP,
* two-hop delivery.

`tb_noc_mesh` runs the top at its default parameters. `tb_noc_mesh_mixed`
gives the routers of a 2x2 mesh different numbers of local ports. It sends
a packet between every pair of existing ports, and two to missing ports,
which must be dropped with `nep`.

Three testbenches repeat the kinds of experiment the design was evaluated
with. They use the design's own traffic models:

* `tb_workload_config` runs a four-IP-core application of 201 packets:
  * IP 1 sends 160 packets to IPs 2 and 3.
  * IPs 2 and 3 each answer every 20 packets with 5 packets to IP 4.
  * After IP 4 has all 40 answers, it sends one final packet to IP 1.

  The application runs on six layouts: a single router with four local
  ports, 1x2 meshes with two mappings, 2x2 meshes with two mappings, and a
  1x2 mesh where IP 1 is attached to both routers. Measured cycles:

  | layout | cycles |
  |--------|--------|
  | single router | 3428 |
  | 1x2 map 1 | 3635 |
  | 1x2 map 2 | 3646 |
  | 2x2 map 1 | 3517 |
  | 2x2 map 2 | 3508 |
  | 1x2 with IP 1 on both routers | 1877 |

  Giving the busiest core two ports almost halves the run time.
* `tb_workload_flitsize` sends 544 packets through a five-port router at 8,
  16, 32 and 64-bit flits. The cycle count is 8478 at every width, since
  wider flits only carry more data per packet. With the data volume held
  constant instead (544, 272, 136 and 68 packets), the counts are 8478,
  4238, 2058 and 1078 cycles.
* `tb_workload_arbitration` sends 111 packets, in groups of 1 to 10,
  through seven routers, one per arbitration unit. The traffic is biased
  towards the local port: 71 of the 111 packets (64%) go to it, and no
  other output gets more than 17 packets. All seven routers deliver every
  packet. Their cycle counts are:

  | arbiter | cycles |
  |---|---|
  | fixed | 1650 |
  | counter, most packets | 1690 |
  | counter, longest wait | 1650 |
  | counter, fewest packets | 1650 |
  | coin passing | 1690 |
  | custom fixed | 1670 |
  | custom fixed per port | 1670 |

  The spread is only about 2%. Each group must drain before the next one
  starts, so the grant order can only reorder work inside a group. With a
  stronger bias (the `LOCAL_PCT` parameter of `router_bench` at 45 or
  more, against 30 here), the local output is busy all the time and every
  arbiter takes the same number of cycles.

The helper modules `link_agent` (a model of an IP core or of a neighbouring
router on one link), `app_4ip` and `router_bench` exist only for these
testbenches.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert rtl/noc_pkg.sv rtl/*.sv \
    tb/link_agent.sv tb/app_4ip.sv tb/router_bench.sv tb/tb_noc_mesh.sv \
    --top-module tb_noc_mesh -Mdir obj
./obj/Vtb_noc_mesh
```

Change `--top-module` and the last file name to run another testbench. All
testbenches finish in seconds.

## Limits

* Only store-and-forward switching and row-first routing are built. There is
  no congestion control, no adaptive routing and no virtual channels.
* Routing assumes a proper mesh with correct coordinates. An east or west
  input that requests north or south would hang. An assertion in
  `noc_router` flags it.
* `rtl/` contains assertions in plain `always_ff` blocks. Synthesis tools
  ignore them.
* Area and clock speed have been checked only as generic yosys cell counts.
  No FPGA mapping was done. The default 2x2 mesh synthesises to about 2500
  word-level cells, 670 flip-flop bits and 1.5 kbit of buffer memory.
