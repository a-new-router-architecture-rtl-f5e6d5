# VOQ router for mesh, tree and octagon networks-on-chip

A network-on-chip router suffers most from head-of-line blocking: when the
flit at the front of an input buffer waits for a busy output, every flit
behind it waits too, even if its own output is idle. This router avoids that
by splitting each input buffer into **virtual output queues** (VOQs). Input
port *i* has one queue per output port *j ≠ i*. A flit waits only behind flits
that want the same output. The router has five ports, so each input port holds
four VOQs. The same router, with a different routing function, is used to
build three networks: a 3x3 **mesh**, an eight-node **octagon** ring and a
small **tree**.

Everything is synthesizable SystemVerilog in `rtl/`. Self-checking testbenches
are in `tb/`.

## How a flit crosses a router

```
            +------------------- input port i --------------------+
 in_flit -->| DMUX --> VOQ(i,j) x4 --> round-robin choice of a VOQ |--req--> SA j --grant
            |   |                                                 |           |
            | look-ahead routing (np for the next router)         |      4x1 switch j --> reg --> out_flit[j]
            +-------------------------------------------------------+
```

1. **Arrival and look-ahead routing.** A head flit arrives already carrying
   the output port it needs at *this* router, in its `port` field. The previous
   router computed it; for the first router the network interface computed it.
   The DMUX writes the flit into VOQ(i, port). At the same time the routing
   unit (`la_routing`) works out the port the flit will need at the *next*
   router, called `np`, and stores it with the flit. Body and tail flits have
   no routing fields. They go to the VOQ of their head and inherit its `np`.
   Route computation is therefore off the critical path: when the flit reaches
   the head of its VOQ, nothing is left to compute.
2. **Choosing a VOQ (first arbitration).** Each cycle an input port marks
   each VOQ that could actually send. Such a VOQ is not empty. The queue its
   head flit will enter at the next router (VOQ(·, np) there) has a free slot.
   Its output is not bound to another input's packet. A round-robin arbiter
   picks one marked VOQ. The port then asks that output's switch allocator.
3. **Switch allocation (second arbitration).** Several input ports may ask
   for the same output. The output's allocator (`switch_alloc`) grants one of
   them, round robin. In the same cycle the granted flit leaves its VOQ and
   passes through the output's 4-to-1 switch into the output register.
4. **Header rewrite.** As a head flit passes the output, its relative address
   is updated for the hop it is taking, and its `port` field is replaced by
   `np`.

**Timing.** A flit on an input link in cycle *t* is written at the end of *t*.
It is allocated and registered at the end of *t+1* and is on the output link in
cycle *t+2*. So an unblocked flit takes **2 cycles per router**. Each port moves
at most one flit per cycle.

## Packets, binding and flow control

A packet is a head flit, any number of body flits and a tail flit, or a single
flit that is head and tail at once. When the head of a multi-flit packet wins
an output, the output is **bound** to that input port until the tail has
passed. While it is bound, the allocator grants no other input, and the other
input ports do not even request it. Flits of different packets therefore
never interleave on a link. This is what lets body flits follow their head
without routing information.

Flow control uses **credits per VOQ**. An output keeps one counter for each
VOQ of the input port it feeds at the next router. Each counter starts at the
VOQ depth. It is decremented when a flit for that queue is granted. It is
incremented when the next router pulses `credit_in[k]`, one cycle after a flit
leaves its VOQ(·, k). This is how neighbours tell a router which of their
queues are full. A flit whose target queue downstream is full is not
considered, so a full queue downstream blocks only the flits headed for it.

## Flit format (`noc_pkg`)

| field   | bits | meaning |
|---------|------|---------|
| `ftype` | 2    | HEAD, BODY, TAIL, SINGLE |
| `port`  | 3    | head only: output port to take at the router receiving the flit |
| `a0`    | 4    | head only: relative address, element 0 (signed) |
| `a1`    | 4    | head only: relative address, element 1 (signed, or a bit list in the tree) |
| `data`  | 8    | payload |

The address is **relative**: it says how far the destination still is. Every
hop changes it, and when every element is zero the flit has arrived. It leaves
through the local port or, in the tree, through a leaf port.

## The three networks

| network | module | routers | resources | address | routing |
|---|---|---|---|---|---|
| mesh | `mesh_noc` (COLS=ROWS=3) | 9 | 9, one per router on port 0 | a0 = dx, a1 = dy | XY: first east/west, then north/south |
| octagon | `ring_noc` | 8 | 8, one per router on port 0 | a0 = (dest − src) mod 8 | distance 1–2 clockwise, 6–7 counter-clockwise, 3–5 first across to the opposite node; at most 2 hops |
| tree | `bft_noc` | 3 (root + 2) | 6, three on child ports 1–3 of each lower router | a0 = hops to climb, a1 = child ports for the way down, 2 bits each, first in a1[1:0] | up to the common ancestor, then down |

Port numbers are as follows. Mesh: 0 local, 1 north, 2 east, 3 south, 4 west.
Octagon: 0 local, 1 clockwise, 2 counter-clockwise, 3 across, 4 unused. Tree:
0 parent, 1–3 children, 4 unused. A flit never leaves by the port it came in
through, which is why there is no VOQ(i,i). Edge ports of the mesh and the
unused ports are left open. No flit comes in on them, no credit comes back, and
routing never uses them.

Example for the tree: resource 0 (router 1, port 1) sends to resource 4
(router 2, port 2) with a0 = 1 and a1 = (2 << 2) | 2. Router 1 sends the flit
up. The root takes child port 2. Router 2 takes child port 2.

`noc_top` puts the three networks side by side. They share only clock and
reset, and each brings out its own resource ports.

## Network interface (`rni`)

The network interface sits between a resource and its router port.

- **Injection.** The resource offers flits with `inj_valid`/`inj_ready`. For a
  head flit the interface fills in `port` with the first router's output. It
  remembers that port for the rest of the packet. It keeps the credit counters
  for the router's VOQs and drops `inj_ready` when the flit's queue is full.
- **Ejection.** Flits are presented on `ej_valid`/`ej_flit` one cycle after
  they leave the router, and the resource has to take them. A credit goes back
  for each one.

End-to-end latency between resources is **2·R + 2** cycles for a packet alone
in the network, where *R* is the number of routers on the path.

## Parameters

| parameter | default | where | note |
|---|---|---|---|
| `NPORTS` | 5 | `noc_pkg` | the router is built around 5 ports and 4×1 switches |
| `DEPTH` | 4 | all | VOQ depth in flits; the credit counters follow it |
| `DATA_W` | 8 | `noc_pkg` | payload bits |
| `ADDR_W` | 4 | `noc_pkg` | per address element; mesh up to ±7 hops |
| `COLS`, `ROWS` | 3, 3 | `mesh_noc` | |
| `TOPO` | mesh | router, rni, la_routing | selects the routing and address-update functions |

## Where this design makes its own choices

The structure is fixed: four VOQs per input with an arbiter inside the input
port, per-output allocators and 4×1 switches, look-ahead routing, binding of an
output for a whole packet, and address update at the output. These are not:

- **Routing functions and address encodings** for each topology (table
  above). The tree addressing, and the shape of the tree, are particular to
  this design. The tree is a root over two routers with three leaves each.
- **Credit flow control per VOQ**, as the way neighbours report their queue
  state.
- **Registered crossbar outputs**, which give the 2-cycle router.
- **Flit format and widths**, VOQ depth, and a synchronous active-low reset.
  The reset clears control state but not the queue memories.
- **The network interface**, which is as simple as possible.
- **The round-robin pointer rule.** Priority goes to the requester after the
  last grant that was used. The input arbiter has five lines, and its own
  port's line never requests.

## Limitations

- The octagon's shortest-path routing has cyclic channel dependences and is
  not proven deadlock-free. Mesh XY and tree up/down routing are deadlock-free.
  The tests include hotspot traffic on the octagon and saw no deadlock, but
  that is no proof.
- The resource must accept every ejected flit. There is no ejection buffer.
- No area or timing figures are given here.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_rr_arbiter` | grants against a model; service within N grants under saturation |
| `tb_voq` | FIFO against a queue model; flags and count |
| `tb_la_routing` | every address/port combination of all three topologies |
| `tb_input_port` | VOQ choice, eligibility (credit, binding), look-ahead port, credit pulses |
| `tb_switch_alloc` | grants, binding from head to tail, credit counters, against a model |
| `tb_out_switch` | selection, one-cycle register, header rewrite |
| `tb_router` | one router, all five inputs, random packets and delayed credits; 2-cycle crossing |
| `tb_rni` | first-hop port, credit-limited injection, ejection and credit return |
| `tb_mesh_noc`, `tb_ring_noc`, `tb_bft_noc` | lone packets with exact 2·R+2 latency, uniform random and hotspot traffic; delivery, order, integrity, no interleaving, zero address on arrival |
| `tb_noc_top` | all three networks at once at default sizes. It also counts, per network, credit stalls, binding stalls, VOQ bypasses of a blocked queue, lost arbitrations and injection stalls, plus use of the octagon cross links and the tree root. A mechanism that never happens is a failure. |

The network tests share the generator and scoreboard `tb/noc_traffic.sv`. It
works out addresses from node coordinates, independently of the routing code.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_noc_top.sv \
          --top-module tb_noc_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_noc_top` with any other testbench name. `tb_noc_top` builds in
about a minute and runs in seconds.
