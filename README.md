# A prioritised, customisable mesh network-on-chip

This is a 4x4 mesh network-on-chip (NoC) that carries three classes of
traffic. Each class has its own latency target:

- **high priority**: short control messages such as reads, writes, acknowledges and interrupts;
- **mid priority**: real-time data;
- **low priority**: bulk transfers with no deadline.

The network is built from a small set of reusable blocks: producers, input
buffers, a scheduler, a routing node, output buffers and consumers. You build
a variant by changing parameters, not code. The parameters are:

- the buffer size;
- the scheduling rule in the buffers and in the scheduler (FCFS, RR, PB, PBRR);
- the routing algorithm (X first, Y first, XY-random);
- the traffic pattern and the injection rate.

The defaults are the recommended configuration:

- 4x4 mesh;
- 64-bit flits;
- 5 flits per buffer;
- priority-based round robin (PBRR) everywhere;
- X-first dimension-order routing.

Control and data are kept apart in every router. A *scheduler* decides which
flit moves and when. A *node* holds the flit and works out where it goes. The
two talk through a request / grant / confirm handshake. That handshake, not
the data path, sets the network's timing: at least **six clock cycles per
hop**.

## Flits

Every transfer is one 64-bit flit (`onoc_pkg::flit_t`):

| bits  | field   | meaning |
|-------|---------|---------|
| 63:62 | `prio`  | 00 no flit, 01 high, 10 mid, 11 low |
| 61:46 | `ts`    | cycle in which the producer created the flit (mod 2^16) |
| 45:44 | `src_x` | source column |
| 43:42 | `src_y` | source row |
| 41:40 | `dst_x` | destination column |
| 39:38 | `dst_y` | destination row |
| 37:0  | `payload` | data (the producers put a sequence number here) |

The priority code is also the valid bit of every flit bus: a bus that carries
`prio == 00` carries nothing. The same 2-bit code is used for the requests
(`data_in_buff`) and grants (`node_grant`) between buffers and scheduler.
Only the priority code and the list of header fields come from the original
specification. The field widths are this implementation's choice.

## One router, one hop

```
                 +----------------------- scheduler ------------------------+
                 | data_in_buff  node_grant  confirm/retry   req_buff_avail  |
                 v      ^            |           |            buff_avail   v
 in_flit[p] -> input buffer[p] --data_out--> node --data_out[q]--> output buffer[q] -> out_flit[q]
 in_avail[p] <-                    (route: output_port)                 <- out_avail[q]
```

There are five ports: local, north, east, south and west. Each port has an
input buffer in front of the router and an output buffer behind it. A flit
moves through the router like this, one clock edge per step:

| edge | what happens |
|------|--------------|
| 1 | the flit is stored in the input buffer (its sender saw `buff_avail`) |
| 2 | the input buffer registers a request, the flit's priority, on `data_in_buff` |
| 3 | the scheduler picks one requesting buffer and pulses `node_grant` with that priority |
| 4 | the buffer drives the flit on `data_out`; the node captures it (`router_load`) |
| 5 | the node reports the output port; the scheduler asks that output buffer for room (`req_buff_avail` / `buff_avail`) and registers `confirm` (or `retry`) |
| 6 | `router_xfer`: the flit is written into the output buffer; the input buffer frees the slot |

After edge 6 the output buffer offers the flit to the next router's input
buffer. That transfer is edge 1 of the next hop. So a flit that crosses *k*
routers needs at least 6*k* cycles. For example, corner (0,0) to corner (3,3)
crosses 7 routers and takes 42 cycles. The scheduler handles one flit at a
time, so a router passes at most one flit every four cycles. Under heavy
traffic this limit sets the latency, not the buffer size.

If the output buffer has no room, the scheduler answers `retry` instead of
`confirm`. The flit then stays in the input buffer and is requested again
later. Until some transfer succeeds, that input buffer is passed over while
any other input requests. Without this rule, two neighbouring routers can each
keep retrying a flit that waits for the other. The mesh then locks.

## Buffers and virtual channels

Each input and output buffer holds `BUFF_SIZE` flits in one shared pool
(`onoc_flit_store`). The flits of each priority form a virtual channel
(virtual buffers A, B and C). Any free slot takes any priority, so only the
total size is fixed. Each slot has an age counter, so the buffer knows
arrival order. A buffer picks the next flit by its service level:

- **FCFS**: the oldest flit, whatever its priority.
- **PB**: the oldest flit of the most urgent priority present.
- **PBRR**: the three classes take turns (high, mid, low, high...). A class
  with no flit is skipped. Within a class the oldest flit goes first. The
  turn moves on only when a flit has actually left, on `confirm`.

The input buffer offers its chosen flit to the scheduler. While that flit is
in flight it stays stored and locked, and the buffer makes no new request.
`confirm` frees the slot; `retry` unlocks it. The output buffer has two
independent sides. The input side answers the scheduler and stores what the
node sends. The output side sends a flit whenever the next input buffer
reports room.

## Scheduler

The scheduler's service levels (`SCHED_SL`) decide which of up to five
requesting input buffers gets the next grant:

- **FCFS**: the request that has waited longest (8-bit wait counters).
- **RR**: rotate over the inputs, ignoring priority.
- **PB**: most urgent priority; among equals, the lowest port number.
- **PBRR** (default): most urgent priority; among equals, rotate.

Together with PBRR in the buffers, high-priority flits overtake low-priority
ones at every router. Low-priority flits still move, because each buffer
gives every class a turn.

## Routing

The node computes the output port from the destination. East is x+1 and
south is y+1.

- **`RT_XY`** (default): correct x first, then y. This is deadlock-free dimension-order routing.
- **`RT_YX`**: correct y first, then x.
- **`RT_XY_RANDOM`**: for each flit, X first or Y first is chosen by a 16-bit
  LFSR. Mixing the two orders can in principle deadlock a mesh. The
  simulations here use `RT_XY`.

## Producers and consumers

**Producer** (`onoc_producer`) stands for a resource and its network interface.

- Rate: `inj_rate` is in flits per 100 cycles. 100 is a flit every cycle; 33 is about one every three cycles.
- Creating a flit: a credit accumulator creates flits at that rate. Each flit is stamped with the current cycle. The producer then waits for `buff_avail`.
- Credits earned while it waits are counted and not lost.

The producer has three patterns:

- **`PAT_UNIFORM`**: destinations step through all other nodes in index
  order. Priorities cycle high, mid, low, so every third flit is high priority.
- **`PAT_RANDOM`** (default): random destination; 10 % high, 20 % mid,
  70 % low priority.
- **`PAT_APP`**: destination and priority come from the `app_*` ports.

**Consumer** (`onoc_consumer`) takes a flit every cycle unless `hold` is
raised.

- Output: it strips the header and presents the payload.
- Latency: it computes latency as `now - ts`.
- Statistics per class: count, latency sum and maximum.
- Errors: it counts flits that arrive at the wrong node.

## Files

| file | block |
|------|-------|
| `rtl/onoc_pkg.sv` | flit type, priority codes, ports, option enums |
| `rtl/onoc_flit_store.sv` | shared buffer pool and service-level selection |
| `rtl/onoc_input_buffer.sv` | input buffer, request / grant / confirm |
| `rtl/onoc_output_buffer.sv` | output buffer |
| `rtl/onoc_scheduler.sv` | scheduler state machine and arbitration |
| `rtl/onoc_node.sv` | router data part and routing |
| `rtl/onoc_router_node.sv` | one router: 5 input buffers, scheduler, node, 5 output buffers |
| `rtl/onoc_mesh.sv` | MESH_X x MESH_Y routers and links |
| `rtl/onoc_producer.sv`, `rtl/onoc_consumer.sv` | traffic source and sink with their network interfaces |
| `rtl/onoc_top.sv` | mesh plus a producer and a consumer per node, common time base |

Each `tb/tb_<module>.sv` is a self-checking testbench for that module. Each
ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/onoc_pkg.sv tb/tb_onoc_top.sv --top-module tb_onoc_top
./obj_dir/Vtb_onoc_top
```

Use the same command for any other testbench. Change the `tb_...` name twice.
Lint adds warnings about unused signals and about the reset being used in
both the flops and the assertions. They are harmless.

`tb_onoc_top` runs the whole 4x4 network with every parameter at its default:

1. a phase at 0.1 flits per cycle per node;
2. a maximum-load phase, with all 16 nodes injecting one flit per cycle until 10,000 flits have entered, while four consumers are stalled for a while;
3. a drain phase.

It checks these results:

- every flit is delivered once, to the right node;
- no flit is faster than six cycles per router;
- at maximum load, high-priority flits see a lower mean latency than low-priority ones.

It also requires that each of these happened at least once:

- a producer stall;
- a scheduler retry;
- a full output buffer;
- a consumer hold;
- a high or mid flit overtaking an older low flit;
- use of every direction.

In one run at maximum load the mean latency was about 106 cycles for high-priority flits, 109 for mid and 494 for low.

`tb_onoc_workload` compares scheduling rules and buffer sizes. It runs four
copies of a 3x1 mesh, so no flit crosses more than two hops. All four get the
same random traffic at 0.2 flits per cycle per node:

| configuration | high | mid | low |
|---------------|------|-----|-----|
| FCFS, buffer size 1 | 41 | 41 | 41 |
| FCFS, buffer size 10 | 282 | 282 | 284 |
| PB, buffer size 5 | 28 | 64 | 184 |
| PBRR, buffer size 5 | 42 | 46 | 195 |

The figures are mean latencies in cycles. The testbench checks these trends:

- FCFS treats all classes alike;
- larger buffers raise FCFS latency, because flits queue longer;
- PB and PBRR both favour high-priority flits.

The numbers show two more things, which the testbench does not check. PB
gives high-priority flits the lowest latency. PBRR keeps mid-priority flits
close to high ones.

These runs do not reproduce the latencies the original evaluation reports.
That evaluation gives, for two hops, 14 to 107 cycles as the buffer grows from
1 to 10 under FCFS. It also reports lower low-priority latency under PBRR than
under PB. Here the trends with buffer size and with priority agree, but two
things differ:

- the absolute figures, because each router here moves at most one flit every
  four cycles;
- the PB-versus-PBRR ranking for low-priority flits, which is within a few
  percent and reversed in the run above.

The gate counts of the original FPGA implementation are not reproduced.

## Where this RTL goes beyond the original description

The original description gives the blocks, their signals, the priority codes,
the six-step hop and the names of the scheduling and routing options. These
details are this implementation's own choices:

- field widths;
- the reading of PBRR, inside a buffer and in the scheduler;
- the explicit `retry` line;
- the rule that a refused input is passed over;
- the contents of the "application" traffic pattern;
- the randomness source for XY-random routing;
- the reporting ports.

Module header comments say, block by block, which parts follow the original
description and which are choices.

Also not covered:

- The number of priority levels is fixed at three. The 2-bit code has room for no more.
- The attached computing resources, and any system-level manager, are outside this RTL.
