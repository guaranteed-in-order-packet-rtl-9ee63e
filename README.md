# In-order wormhole mesh with Exclusive Dynamic VC Allocation (EDVCA)

A virtual-channel (VC) router lets packets of different flows pass one
another, which reduces head-of-line blocking. With dynamic VC allocation,
however, two packets of the *same* flow can sit in different VCs of one
ingress port and leave in the wrong order. Restoring order then takes
reorder buffers and acknowledgements at the destination.

EDVCA adds one rule to dynamic VC allocation: **at any instant, all flits
of a flow that are buffered at an ingress port are in one VC.**

- A packet whose flow has no flits in the next-hop port takes any free VC,
  as in dynamic allocation.
- A packet whose flow already has flits there must use that same VC, as if
  the flow were statically assigned to it. If that VC is busy or full, the
  packet waits.

Over time a flow can still move between VCs, once all its earlier flits
have drained. With dimension-order (XY) routing, a flow always follows one
path. Packets that share one FIFO at every hop cannot overtake each other,
so delivery is in order and needs no sequence numbers or reorder buffers.
Deadlock freedom is the same as for the underlying XY routing.

This repository holds synthesizable SystemVerilog for the whole network:
- a 2D mesh (8 x 8 by default);
- five-port ingress-queued wormhole routers with XY routing and EDVCA;
- a network interface per node;
- self-checking testbenches for every block and for the whole mesh.

## How a router knows where a flow is: the per-flow table

An upstream router cannot see the downstream buffers. Each output port
therefore keeps a small content-addressable table (`edvca_flow_table`). It
is addressed by flow ID and records, for every flow that has flits in the
downstream port's VCs:

| field      | meaning                                                  |
|------------|----------------------------------------------------------|
| flow       | source and destination node of the flow                  |
| vc         | the downstream VC holding the flow's flits               |
| count      | how many of its flits are in that VC                     |
| reserved   | a packet has been granted `vc` and its tail is not sent  |

The entries change as follows:
- Sending a flit downstream increments the flow's count.
- When the downstream router forwards a flit, it returns a credit. The
  credit names the **flow ID**, not the VC ID. The upstream router looks
  the flow up in its table. That gives the VC whose credit counter goes up,
  and the flow's count goes down.
- When the count reaches zero and no granted packet is still being sent,
  the entry is released. The flow is then free to take any VC next time.

This replaces the VC ID in ordinary credit messages. It costs a few more
wires on the credit path (12 bits of flow ID instead of 3 bits of VC ID)
and nothing in the crossbar.

The `reserved` bit is this design's addition, for the following case:
1. A packet is granted VC *v* because its flow is already there.
2. The downstream router forwards the flow's older flits.
3. Without the bit, the count could reach zero and the entry could be
   released before the new packet's tail leaves.
4. The next packet of the flow could then pick a different VC while this
   one is still being sent.
The bit is set on a grant and cleared when the tail flit is sent.

The table size is `ENTRIES`, by default `NUM_VC x VC_DEPTH` = 64. That is
the most flows that can have flits in one port, so the table never fills.
A smaller table is legal. When it is full, a packet of a flow it does not
know stalls until an entry frees. Flows it already tracks are not
affected. The testbenches use 2- and 4-entry tables to exercise this.

## VC allocation rule (edvca_out_port)

Each output port has an `edvca_out_port`. It holds:
- the flow table;
- a credit counter per downstream VC (free slots, `VC_DEPTH` after reset);
- an *owned* bit per downstream VC. The bit is set when a packet is granted
  the VC and cleared when that packet's tail flit is sent.

A downstream VC is *available* when it is not owned and has at least one
free slot. Several packets may queue one after another in one VC. Only one
packet at a time may be in the middle of being sent into it.

It decides one request per cycle:

| table lookup               | outcome                                                        |
|----------------------------|----------------------------------------------------------------|
| hit, VC *v* available      | grant *v* (`grant_hit`)                                        |
| hit, VC *v* not available  | stall, retry next cycle (`stall_hit`)                          |
| miss, a VC available, room | grant the next available VC after a rotating pointer (`grant_miss`) |
| miss, no VC available      | stall (`stall_novc`)                                           |
| miss, table full           | stall (`stall_full`)                                           |

The lookup and the dynamic search run in parallel. A 2:1 multiplexer picks
the result, so EDVCA adds no extra stage. The event flags are brought out
on `evt_o` for statistics.

## Router (edvca_router)

The router has five ports: LOCAL, NORTH (row y-1), EAST (column x+1),
SOUTH (row y+1) and WEST. Each input port (`input_port`) has `NUM_VC`
FIFOs (`vc_fifo`) of `VC_DEPTH` flits. The link's VC field selects the
FIFO.

Every cycle:
1. **RC + VA.** An idle VC whose front flit is a head flit computes its XY
   output (`xy_route`). For each output, a round-robin arbiter picks one
   such VC. The output's `edvca_out_port` applies the rule above. On a
   grant, the input VC caches the output port and downstream VC for the
   rest of the packet.
2. **SA + ST.** A VC holding a packet's flit can send it when the
   downstream VC has a free slot. The switch allocator
   (`switch_allocator`) is separable and input-first:
   - round-robin over the VCs of each input;
   - then round-robin over the inputs competing for each output.
   Winners pass through the 5 x 5 crossbar into the registered output
   link. Sending decrements the credit counter and increments the flow's
   table count.
3. **Credits.** A flit that leaves an input VC sends its flow ID upstream
   one cycle later.

Timing:
- A flit that never waits takes 2 cycles per hop: the SA/ST cycle and the
  link register.
- A head flit takes one more cycle for VC allocation.
- Links and crossbar ports carry one flit per cycle.

## Network interface and mesh

`edvca_ni` sits between a core and its router's LOCAL port.
- It allocates the router's local-input VCs with the same `edvca_out_port`
  rule. This keeps a flow in one VC from the very first hop.
- It sends a packet's flits one per cycle, as credits allow.
- It delivers ejected flits (`ej_o`, with their VC) one cycle after they
  leave the router and returns their credit. The core must accept every
  ejected flit.

`edvca_mesh` is the top. It places `MESH_X x MESH_Y` routers with their
interfaces and wires neighbouring ports. Node `n = y*MESH_X + x`. Ports at
the mesh edge are tied off, because XY routing never uses them.

Top ports, one entry per node:

| port          | dir | type                     | meaning                                   |
|---------------|-----|--------------------------|-------------------------------------------|
| `inj_valid_i` | in  | `[N]`                    | core offers a flit                        |
| `inj_flit_i`  | in  | `flit_t [N]`             | head/tail, flow, 32-bit data              |
| `inj_ready_o` | out | `[N]`                    | flit taken this cycle                     |
| `ej_o`        | out | `link_t [N]`             | delivered flit, with its VC               |
| `evt_o`       | out | `va_evt_t [N][5]`        | VC-allocation events per router output    |
| `ni_evt_o`    | out | `va_evt_t [N]`           | VC-allocation events of the injection side |

Rules for the core:
- Packets are offered head first, tail last, with no gap between packets.
- A flow is a source/destination pair. The flit's flow field gives its
  destination.
- Flits of different packets can reach a destination interleaved on
  different ejection VCs. Reassemble them by the `vc` field of `ej_o`.

## Parameters

| parameter  | default | where                     | notes |
|------------|---------|---------------------------|-------|
| `MESH_X`, `MESH_Y` | 8 | `edvca_mesh`         | up to 8 (3-bit coordinates in `noc_pkg`) |
| `NUM_VC`   | 8       | mesh, router, port, NI    | 1 to 8 |
| `VC_DEPTH` | 8       | all                       | flits per VC |
| `ENTRIES`  | `NUM_VC*VC_DEPTH` | all             | flow-table entries per output |

The flit width is fixed in `noc_pkg`: 2 marker bits, a 12-bit flow and 32
data bits, 46 bits in all.

## What this design adds or leaves out

The allocation rule, the per-flow table and the flow-ID credit update are
the scheme itself. The following are this design's own choices:
- **Link bandwidth.** One flit per cycle per link, with one crossbar input
  per ingress port (a VC-to-crossbar multiplexer of 1). The scheme was
  evaluated with links of 2 to 8 flits per cycle, and with 2- or 4-wide
  VC multiplexers or none. Those wider datapaths are not built.
- **Per-hop latency.** 2 cycles, 3 for head flits, where the evaluation
  used 1 cycle.
- **Arbitration.** Round-robin in all arbiters. The evaluation considered
  VCs in random order.
- **Dynamic VC choice.** A rotating "next available" pointer.
- **Table slot choice.** The lowest free slot.
- **The `reserved` bit** (see above).
- **Flit format and flow definition.** A flow is a (source, destination)
  pair.
- **Network interface.** Injection through EDVCA and an ejection that
  always accepts.
- **Edge ports** are tied off.
- **Reset.** Asynchronous and active low.

Not included:
- the evaluation's traffic sources;
- the H.264 decoder traffic profile, whose data is not available;
- the destination reorder buffers that EDVCA is compared against;
- batching credit updates to save wires. Here every forwarded flit
  returns one credit message the next cycle.
- other routing functions (O1TURN, Valiant, ROMM), which EDVCA could also
  be combined with.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_vc_fifo` | random push/pop against a queue model |
| `tb_xy_route` | every source/destination pair of an 8 x 8 mesh: X before Y, minimal hop count |
| `tb_edvca_flow_table` | a worked example of flows sent to and drained from two VCs, then 20k random cycles against a model, with the table filling |
| `tb_edvca_out_port` | each row of the allocation table, credits by flow ID, an entry released and the flow re-allocated |
| `tb_input_port` | route, cached VC, FIFO order and credit flow against a model |
| `tb_switch_allocator` | grant legality, work conservation, round-robin fairness |
| `tb_edvca_router` | one router between behavioural neighbours (see below) |
| `tb_edvca_ni` | injection through EDVCA against a model of the router's local input; the ejection path |
| `tb_edvca_mesh` | 4 x 4 mesh, 2 VCs of 4 flits, 2-entry tables, 640 packets of 2 or 8 flits (see below) |

`tb_edvca_router` checks XY outputs, that downstream VCs never overflow,
that packets arrive whole and in order, and exclusivity at every output.

The mesh test mixes transpose, bit-complement, shuffle and uniform
destinations, with Markov-modulated on/off injection. They check:
- in-order delivery per flow;
- that every packet is delivered whole at its destination.

They also check the exclusivity invariant **on the wires**: for every
ingress port, a monitor counts each flow's flits from the link and
credit signals. It fails if a flow's flits ever arrive on a second VC
while the first still holds some. This check does not use the routers'
own tables.

The test also counts how often each allocation outcome, table release and
change of a flow's VC occurred, and fails if one never did.

**Simulated sizes.** The full 8 x 8 mesh at its defaults compiles with
both Verilator and slang. It has not been simulated: Verilator flattens
its 64 routers and could not build the simulation in reasonable time. The
largest configuration simulated is a 4 x 4 mesh with the routers at their
defaults: 8 VCs of 8 flits and 64-entry flow tables. To reproduce it, run
`tb_edvca_mesh` with `edvca_mesh #(.MESH_X(4), .MESH_Y(4))`, 8-flit
packets and 60 packets per node. It delivered all 960 packets in order in
1060 cycles, with no exclusivity violation. All outcomes occurred except
"no VC free", which 8 VCs make rare, and "table full", which cannot happen
at 64 entries. That build takes several minutes, so the shipped test uses
the smaller size above.

Simulating with plain Verilator, for example the reduced mesh:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv rtl/*.sv \
    tb/tb_edvca_mesh.sv --top-module tb_edvca_mesh
./obj_dir/Vtb_edvca_mesh
```

Compiling the 4 x 4 test takes about two minutes.

Assertions in the RTL check the handshake rules:
- no FIFO overflow or underflow;
- sends only into owned VCs with credits;
- credits and sends only for flows the table knows;
- allocation only when the table has room;
- at most one flit popped per input port per cycle.
