# Tree-based multicast mesh router with dynamic packet fragmentation

A multicast packet in a wormhole network is sent once and copied where its
destinations split, which is tree-based routing. The copies move through the
tree together, and that is the weak point. If one branch is blocked, the
packet's flits cannot leave the branching router's input buffer. Every other
branch of the same packet then holds its output virtual channel (VC) and
waits. Two multicast packets that branch through each other's held VCs can
then wait for each other forever.

This router breaks such cycles with **dynamic packet fragmentation**. Say a
branch has sent every flit it has, and no more flits are arriving at that
input port. That branch does not keep its output VC while it waits. It marks
the flit it is sending as a *virtual tail* and releases the VC. When more
flits of the packet arrive, the branch competes for a VC again. It first
sends a *virtual head*, which is a copy of the packet's head flit kept aside
for this purpose. The packet is now split into fragments. Each fragment is a
well-formed packet with a head and a tail, so downstream routers need no
special handling. The receiving network interface joins the fragments back
together.

The RTL is a 4x4 mesh of 5-port routers:

- XY (dimension-order) routing
- 4 VCs per port, each 4 flits deep
- 128-bit flits
- 8-flit packets
- destinations carried as a 16-bit bit-string

## Flit format

`noc_pkg::flit_t`, 128 bits, MSB first:

| field | bits | meaning |
|---|---|---|
| `valid` | 1 | a flit is on the link |
| `ftype` | 3 | HEAD=0, BODY=1, TAIL=2, VHEAD=3 (virtual head), VTAIL=4 (virtual tail) |
| `vcid` | 2 | VC at the receiving input port |
| `dest` | 16 | head / virtual head: destination bit-string, bit n = node n. Body and tail: payload |
| `payload` | 106 | payload |

Node n sits at x = n % 4 and y = n / 4. North is +y and east is +x. The port
order everywhere is N=0, S=1, E=2, W=3, L=4 (local).

A router rewrites `dest` on every branch to the destinations reachable
through that branch. A packet that reaches its ejection port therefore
carries exactly one bit.

## Router pipeline

A head flit takes four cycles per router:

1. **BW/RC.** The flit is taken from the link register and written into its
   input VC. For a head, the route is computed: every set destination bit is
   routed XY, and the union gives a 5-bit output-port set. The set and the
   multicast flag are latched, and the head is also copied into the VC's
   *head flit buffer*.
2. **SA/VA.** This stage has three levels of round-robin arbitration:
   - Each input VC picks one of its per-port requests (P:1).
   - Each input port picks one of its VCs (V:1).
   - Each output port picks one input port.

   A request that needs a VC gets the lowest-numbered free VC of its output
   port in the same cycle.
3. **ST.** The chosen flit, with its type, VC id and `dest` already
   rewritten, is held in the input port's ST register. It then passes the
   crossbar.
4. **LT.** The output link register.

With no load, a packet from node 0 to node 15 passes 7 routers, so its head
arrives 28 cycles after it is injected. Body flits follow one per cycle.

Flow control uses credits, one credit per flit buffer. A credit goes
upstream when a flit is *deleted* from an input buffer, not when it is sent.
An output VC can be given to a new packet only when no fragment holds it and
all its credits are back. So a new packet always finds the downstream VC
empty.

## How a multicast packet moves: VC state units

This is the core of the design (`vc_state_unit`, `input_vc`).

Each input VC has one FIFO buffer but **five VC state units**, one per
output port. When a head is latched, each unit whose port is in the route
starts. From then on the packet is handled like several unicast packets that
share one buffer:

- Each unit has a private pointer. The pointer counts how many of the
  buffered flits that unit has already sent on its port. This lets one
  branch run ahead while another is blocked.
- Each unit requests the switch by itself, along with VC allocation if it
  does not hold a VC. An ACTIVE unit requests only when its next flit is
  in the buffer and its output VC has a credit.
- The oldest flit is deleted, and its credit returned, once every unit in
  the route has sent it. All pointers then move down by one.

Unit states:

| state | meaning |
|---|---|
| IDLE | no work on this port |
| SAVA | waiting for switch plus VC |
| ACTIVE | holds an output VC |
| FRAG | fragment closed, waiting for flits |

**Fragmentation.** An ACTIVE unit fragments the packet when all of these
hold in the cycle it is granted:

- the packet is multicast;
- the granted flit is the last one in the buffer that this unit has not
  yet sent;
- that flit is neither a head nor a tail;
- no flit is entering the input port in that cycle.

The flit is then sent as VTAIL, and the output unit releases the VC. The
state unit goes to FRAG.

When a new flit of the packet arrives, the unit goes to SAVA. Its next grant
sends a VHEAD instead of a buffered flit: the copy in the head flit buffer,
with `dest` narrowed to this port. The buffered flits follow on the new VC.
Virtual heads and virtual tails travel like real heads and tails. A
downstream router routes a VHEAD like a HEAD and releases its VC at a VTAIL.

**Reassembly.** A receiving interface must drop virtual heads and put the
fragments back together. Different fragments of one packet may use
different VCs. So at a later router, a later fragment can overtake an
earlier one. The test interface therefore orders flits by a sequence number
in the payload, not by arrival.

## Modules

| module | role |
|---|---|
| `noc_pkg` | constants, flit/credit types, XY direction masks |
| `rr_arbiter` | round-robin arbiter; used at every arbitration level |
| `route_comp` | bit-string XY routing: port set, destinations per port, multicast flag |
| `vc_state_unit` | per-port state, private pointer, fragmentation decision |
| `input_vc` | buffer, head flit buffer, 5 state units, P:1 arbiter, flit rewriting, deletion |
| `input_unit` | link register, routing, 4 input VCs, V:1 arbiter, ST register, credit return |
| `sw_vc_alloc` | per-output switch arbitration and VC assignment |
| `output_unit` | VC hold flags, credit counters, free-VC choice, output link register |
| `crossbar` | 5x5 crossbar driven by the ST registers' one-hot port selections |
| `mc_router` | one router |
| `mesh_noc` | 4x4 mesh, top level |

The router's position is given by the `x`/`y` input ports, which are tied
to constants in `mesh_noc`. The parameters `DEPTH` and `NUM_VC` default to 4
and 4. The mesh size, the flit width and the packet length are in `noc_pkg`.

`mesh_noc` brings out, for each node:

- `inj_flit` / `inj_credit`: injection into the local port;
- `ej_flit` / `ej_credit`: ejection from the local port;
- `ev_frag` / `ev_vhead`: one-cycle event flags for each input port, raised
  when a virtual tail or a virtual head is sent.

The network interfaces are not part of the RTL. An interface injects flits
into a VC it owns and sends a credit for each ejected flit it consumes.

## Where this departs from the published design, and what to trust

- **How often fragmentation happens.** An input port sends one flit per
  cycle over all its VCs and branches. The branches of a multicast packet
  therefore take turns, and each branch often catches up with the incoming
  flits. Each time it does, it fragments. At 30% load with 10% multicast,
  the test sees 13 to 16 virtual heads received per multicast packet. The
  published design reports about 1.8. The rule implemented is the published
  one. The gap most likely comes from details the description leaves open,
  such as whether a branch may fragment while the upstream is only briefly
  idle. Tightening the rule, for example by waiting a few idle cycles, is an
  easy change in `vc_state_unit`, but it is not done here.
- **VA never fails.** The description lets a head retry when it wins the
  switch but finds no free VC. Here a unit does not request at all unless
  its port has a free VC, so the switch winner always gets one.
- **No fragment without a body.** A head flit is never turned into a
  virtual tail.
- **Own choices.** The description does not give the following, so they
  are this design's own:
  - credit flow control;
  - reallocating a VC only when it is empty;
  - the field widths of type and VC id and the type encoding;
  - node numbering;
  - round-robin arbitration.
- **Not built.** These are not in the RTL:
  - the network interface, including the reassembly logic, which exists
    only as a behavioural model in the mesh testbench;
  - the traffic generator;
  - the unicast baseline router;
  - the energy and layout results.

The deadlock that fragmentation exists to break is reproduced in
`tb_mc_router`, with one VC per port. Two multicast packets enter from the
west and the east, each holding the VC the other needs. The test passes only
if both are delivered through virtual tails and virtual heads.

## Testbenches and simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rr_arbiter`, `tb_route_comp`, `tb_crossbar`, `tb_output_unit`, `tb_sw_vc_alloc`, `tb_vc_state_unit` | unit behaviour against reference models |
| `tb_input_vc`, `tb_input_unit` | every flit reaches every branch exactly once and in order; fragments are well formed; `tb_input_unit` also checks one credit per flit, on the right VC |
| `tb_mc_router` | 4-cycle head latency, whole 8-flit packet through within 16 cycles, multicast replication, the two-packet deadlock with 1 VC |
| `tb_mesh_noc` | full-size mesh (see below) |

`tb_mesh_noc` runs the mesh at its default parameters in these phases:

1. a zero-load packet from node 0 to node 15, which must take 28 cycles;
2. uniform random traffic at 30% load with 10% multicast, 4 to 12 random
   destinations per multicast packet;
3. the same with 20% multicast;
4. a phase of slow ejection.

Every destination must receive every flit of its packets exactly once. The
test also counts each mechanism and fails if one never happens:

- unicast delivery;
- multicast delivery;
- replication;
- fragmentation;
- received virtual heads;
- credit stalls.

Only the 30% load point is simulated; the test does not sweep the whole
latency-versus-load curve.

To simulate with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv \
        tb/tb_mesh_noc.sv --top-module tb_mesh_noc -j 8
    ./obj_dir/Vtb_mesh_noc

Any other testbench runs the same way. `tb/router_env.sv` is a helper
module that `tb_mc_router` instantiates twice. Building the mesh takes a few minutes.
