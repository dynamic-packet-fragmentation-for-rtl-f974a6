# Dynamic packet fragmentation router for a 4x4 on-chip mesh

In a conventional virtual-channel (VC) router, a packet claims a VC at each
hop and keeps it until its tail flit has left. When the packet stalls halfway,
its VCs stay claimed even though their buffers may be empty. This happens when
the next router has no buffer space left (a *credit stall*), or when the
previous router stopped delivering flits (a *buffer-empty stall*). The
blockage then spreads router by router.

This router does not wait in that situation. It cuts the packet in two
instead:

* The body flit that is about to leave, just before the stall, is re-typed as
  a **virtual tail**. Downstream it ends the packet like a real tail, so the
  output VC it used is released at once and other packets can use it.
* Every input VC keeps a copy of the current packet's header in a **header
  buffer**. When the rest of the packet can move again, the router competes
  for a new output VC and sends that copy first, typed as a **virtual head**.
  The remaining flits follow it.

Downstream routers handle virtual heads and tails exactly like ordinary ones.
A packet can be cut again at any later hop. How often packets are cut
follows the load. In an idle network nothing is cut: the test below checks
that a lone 16-flit packet crosses the mesh in one piece. Under load most
long packets are cut one or more times. The receiving network interface
reassembles the fragments. Fragments of one packet always arrive in order,
because routing is deterministic and every router keeps fragments in order
(see below).

The RTL is SystemVerilog-2017. It is synthesizable (assertions aside) and
fully parameterised from `rtl/noc_pkg.sv`.

## Configuration

| What | Value | Where |
|---|---|---|
| Topology | 4x4 2D mesh, XY (dimension-order) routing | `noc_mesh` `MESH_X`, `MESH_Y` |
| Ports per router | 5 (local, north, east, south, west) | `noc_pkg::NUM_PORTS` |
| VCs per port | 4 | `noc_pkg::NUM_VC` |
| Flit buffer per VC | 5 entries of flip-flops, plus one header buffer | `noc_pkg::BUF_DEPTH` |
| Flit width | 128 bits | `noc_pkg::FLIT_W` |
| Router latency | 1 cycle | |
| Link latency | 1 cycle (flits and credits) | `link_pipe` |
| Credit loop | 5 cycles, so 5 entries sustain one flit per cycle | |

Coordinates are 2 bits wide. A larger mesh needs a wider `COORD_W`.

## One hop, cycle by cycle

```
cycle 1   router: buffer write | look-ahead route | switch + VC allocation | switch traversal
cycle 2   link:   link traversal (link_pipe register)
cycle 3   next router: ...
```

* **Bypass.** A flit that arrives at an empty VC buffer is at the buffer
  head in the same cycle (`flit_fifo`). If it is allowed to leave, it goes
  straight to the crossbar and is never written into the buffer.
* **Look-ahead routing.** Each head flit carries `la_port`, the output port
  it must take at the router that receives it. That router routes from the
  field directly. In the same cycle it computes the port for the following
  router (`la_route`: one hop along `la_port`, then XY to the destination)
  and writes the result into the header before the header leaves. A
  network interface that injects a head must fill in `la_port` itself, using
  `noc_pkg::xy_dir` from its own node.
* **Streaming.** Only a head (or virtual head) goes through switch and VC
  allocation. Once it is through, the input VC holds three things: its input
  port, the output port and one output VC (winner-take-all). Body and tail
  flits then cross one per cycle without arbitration, like a circuit, until
  the tail or a virtual tail.
* **Latency.** A lone packet injected at node 0 for node 15 (6 link hops)
  delivers its head 2·6+1 = 13 cycles after injection. Its tail follows
  15 cycles later. The mesh testbench checks both numbers exactly.

## The VC controller and when it fragments

`vc_ctrl` is the heart of the design. Each input VC has one, and it has
four states:

| State | Meaning | Leaves when |
|---|---|---|
| `IDLE` | no packet | a head reaches the buffer head. The head is moved into the header buffer with its next-hop port already computed, and it requests allocation in the same cycle. Granted: `ACTIVE`; otherwise `ROUTE` |
| `ROUTE` | header waits in the header buffer | granted: the header is sent → `ACTIVE` |
| `ACTIVE` | streaming | tail sent → `IDLE`; virtual tail sent → `FRAG` |
| `FRAG` | packet was cut here | a flit of the rest is present **and** allocation is granted. The header-buffer copy is sent as `F_VHEAD` → `ACTIVE` |

In `ACTIVE` a flit leaves whenever one is available and the held output VC
has a credit. If the flit is a body flit, it is re-typed as `F_VTAIL` when
either of these holds:

1. **Credit stall:** it uses the output VC's last credit and no credit comes
   back in the same cycle (`cr_last` from `out_unit`).
2. **Buffer-empty stall:** it is the only flit this VC has (buffer plus the
   arriving flit), and no flit is announced for the next cycle (`more` is
   false).

A real tail is never re-typed.

"Announced for the next cycle" needs a small addition to the link. Besides
the flit and its VC number, each link carries `in_next`: the valid bit and
VC of the flit that will arrive in the following cycle. It is taken from the
upstream router's output register, the flit that is entering the link
register now. A VC that streams one flit per cycle therefore never looks
empty, even though with bypass its buffer holds nothing.

Two corner cases are resolved simply. A connection that runs out of flits or
credits without a trigger firing just waits. This happens, for example, when
a header used the last credit, because only body flits are re-typed.
A fragment is re-issued only once one of its flits is present, so a virtual
head is never sent without something behind it.

## Keeping fragments in order

After a cut, the rest of a packet reaches the next router behind a new
virtual head, usually on a different VC. The next router must not let that
later fragment overtake the earlier one. Two rules guarantee this:

* **Arrival order at an input port** (`input_unit`). The port keeps an age
  matrix over its VCs. A VC counts as occupied from the cycle a flit reaches
  it until it holds no flit and no waiting header. Among the VCs that
  request the *same* output port, only the oldest may enter the local
  arbiter. Requests for other output ports are not held back.
* **One fragment per VC** (`out_unit`). VC allocation only hands out a VC
  whose downstream buffer is completely empty (full credits). A downstream
  VC therefore never holds the end of one fragment and the start of the next
  at the same time. This is exactly the case that would make the
  occupancy-based age order wrong.

Without either rule the mesh testbench sees fragments arrive out of order.

## Allocation

* **Local (V:1) arbitration** per input port. It is a round-robin
  `rr_arbiter` over the VCs that pass the age filter. It is skipped entirely
  while one VC of the port is streaming.
* **Global (P:1) arbitration** per output port (`switch_alloc`). It is a
  round-robin over the input ports whose local winner wants that output. An
  output takes part only if it is not held by a stream and has an
  allocatable VC.
* **VC allocation** then takes the lowest-numbered allocatable VC of the
  winner's output port. Allocation and switch grant happen in the same
  cycle.

Because a stream holds its output port until its tail, each output port has
at most one allocated VC at a time (asserted in `out_unit`). The four VCs
still matter: a new packet can start on an empty VC while the downstream
buffers of other VCs still hold earlier flits, and a cut packet can continue
on another VC.

## Interfaces

All types are in `noc_pkg`.

* `flit_t` (128 bits), from the top: `ftype` (3 bits), `la_port` (3),
  `dst_x` (2), `dst_y` (2), `data` (118). Body and tail flits use only
  `data`. The flit types are `F_HEAD`, `F_BODY`, `F_TAIL`, `F_VHEAD` and
  `F_VTAIL`. `is_head()` and `is_tail()` treat a virtual head or tail the
  same as a real one.
* `link_t` = {valid, vc, flit}. `la_t` = {valid, vc} is the look-ahead of a
  link.
* Credits travel as one bit per VC per cycle, each bit meaning one freed
  buffer entry. This lets two VCs of one port free an entry in the same
  cycle: one moves its head into its header buffer while another streams.

`noc_mesh` (the top) brings out the following signals for each node
n = y·4 + x:

| Port | Dir | Meaning |
|---|---|---|
| `inj_link[n]` | in | injected flit. Send one packet per VC at a time and only with credits in hand. A node starts with `BUF_DEPTH` credits per VC. |
| `inj_next[n]` | in | VC of the flit that will be injected next cycle. A source that pauses mid-packet gets its packet cut at its own router. |
| `inj_credit[n]` | out | credits for the injection port |
| `ej_link[n]` | out | delivered flit, from the router's local output register |
| `ej_credit[n]` | in | one credit per flit consumed, per VC |
| `frag_credit[n]`, `frag_empty[n]` | out | per input port: a packet was cut at a credit stall / at a buffer-empty stall this cycle |

The receiving interface must reassemble fragments. Per VC, a head or virtual
head opens a fragment and a tail or virtual tail closes it. The `data` of a
virtual head is that of the original header. Reassembly itself is not part
of this RTL.

## Files

| File | Contents |
|---|---|
| `rtl/noc_pkg.sv` | sizes, flit/link types, XY routing function |
| `rtl/noc_mesh.sv` | top: 4x4 mesh of routers and link stages |
| `rtl/link_pipe.sv` | one-cycle link for flits and credits, with look-ahead tap |
| `rtl/frag_router.sv` | the router: 5 input units, allocator, crossbar, 5 output units |
| `rtl/input_unit.sv` | VC buffers, VC controllers, age filter, local arbiter, read mux, credit return |
| `rtl/vc_ctrl.sv` | per-VC state machine, header buffer, fragmentation |
| `rtl/flit_fifo.sv` | 5-entry flip-flop buffer with bypass |
| `rtl/la_route.sv` | look-ahead XY routing |
| `rtl/switch_alloc.sv` | global arbitration and VC allocation |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/out_unit.sv` | per-VC credit counters and allocation flags, output register |
| `rtl/crossbar.sv` | 5x5 flit switch |

Each file opens with a description of its timing and interface.

## Verification

Every module has a self-checking testbench `tb/<module>_tb.sv`. Each ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.

* `noc_mesh_tb` runs the full 4x4 mesh at its default parameters.
  * **Lone packet:** one 16-flit packet crosses an empty network, with the
    exact latencies above and no fragmentation.
  * **Random traffic:** uniform random traffic with 8-flit packets, then with
    16-flit packets, each followed by a drain. Sources pause at random in
    mid-packet, and sinks hold credits back at random.
  * **Checks:** every flit is checked for payload, order within its packet,
    VC ownership and correct pairing of virtual heads and tails. The test
    also requires both fragmentation triggers, virtual heads, source pauses
    and sink back-pressure to occur. A typical run delivers about 3000
    packets, with about 2800 credit-stall cuts and 500 buffer-empty cuts.
    It runs in about 2 s.
* `noc_workload_tb` measures the mesh the way the technique is evaluated.
  * **Dynamic sweep:** uniform random traffic with 8-flit and 16-flit
    packets at offered loads of 5, 20, 35 and 45% flits per node per cycle.
    Sources are open-loop with unbounded queues. Latency runs from
    generation to the tail's arrival.
  * **Static comparison:** the source itself cuts every packet after each
    6 flits, once for 8-flit and twice for 16-flit packets. These are the
    "100%" and "200%" static schemes the technique is compared against.
  * **Checks:** complete and ordered delivery; near zero-load latency at
    the lowest load; latency and fragmentation rate grow with load;
    16-flit packets are cut more often; the static cuts arrive. No packet
    is cut dynamically more than once (8 flits) or twice (16 flits). That
    is the bound expected when each VC stores six flits (five entries plus
    the header buffer).
  * **Typical output:** 8-flit packets average 14.8 cycles with 4% of
    packets cut at 5% load, and 66 cycles at 77% at 45% load. 16-flit
    packets average 23 cycles / 8% and 66 cycles / 139%. With static
    cutting at 45% load, 16-flit latency rises to about 300 cycles.
  * It runs in about 5 s.
* `frag_router_tb` tests one router with sources and sinks on all five
  ports. It checks the 1-cycle router latency with bypass, streaming,
  output ports and look-ahead fields, order, and both fragmentation kinds
  under contention.
* `input_unit_tb` covers the arrival-order rule (the older VC goes first
  even when round-robin favours the other), in-order output per VC and
  credit accounting.
* `vc_ctrl_tb` is directed. It walks through every state transition and
  both triggers.
* `flit_fifo_tb`, `la_route_tb` (exhaustive), `rr_arbiter_tb`,
  `switch_alloc_tb`, `out_unit_tb`, `crossbar_tb` and `link_pipe_tb` compare
  their module against a reference model.

To run one with Verilator 5 (the package first):

```
verilator --binary --timing --assert rtl/noc_pkg.sv $(ls rtl/*.sv | grep -v noc_pkg) \
          tb/noc_mesh_tb.sv --top-module noc_mesh_tb -Wno-fatal
./obj_dir/Vnoc_mesh_tb
```

Assertions in the RTL check the following:

* no buffer overflow or underflow;
* one-hot grants;
* no two inputs on one crossbar output;
* no flit sent without a credit;
* at most one allocated VC per output port;
* every packet starts with a head.

Lint with `-Wall` leaves two unused-bit warnings. The first is the credit
outputs of edge ports in `noc_mesh`, which have no neighbour. The second is
the port field of the crossbar word in `out_unit`, which the crossbar has
already decoded.

## Where this design makes its own choices

These points go beyond the original description of the technique, or depart
from it:

* **Full-credit VC allocation** (see above). The original example
  re-allocates a VC whose downstream buffer still holds flits. This design
  takes only empty VCs, so that fragments provably stay in order. The price
  is some throughput under heavy load.
* **The in-order rule and its age matrix.** The text only states that
  fragments are forwarded in arrival order at the input port.
* **The `in_next` look-ahead on links**, used to tell whether a flit is
  "coming" into a buffer.
* **Only body flits are re-typed.** A stream whose header used the last
  credit waits for credits rather than being cut.
* **Remaining choices:** the flit field layout and type encoding;
  round-robin arbitration; lowest-index VC choice; credits as one bit per
  VC; synchronous active-low reset; port numbering, with north = +y.
* **Not included:** the baseline router without fragmentation, which served
  only for comparison; the network interface, including reassembly; and the
  static "fragment at injection" variant. The routers already carry that
  variant's traffic: it only needs an interface that injects virtual tails
  and heads itself.
