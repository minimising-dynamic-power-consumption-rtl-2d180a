# Clock-gated single-cycle mesh network-on-chip

This is a 4x4 mesh network-on-chip for a tiled SoC or chip multiprocessor. Each tile has one router. A router is a five-port virtual-channel router: one port to its tile and one to each of the four neighbours. With no contention a flit crosses one router and one link per clock cycle. The design is built to use little dynamic power when traffic is light, and it does this at three levels:

* **Local clock gating.** Every register has a load enable: a buffer entry is written only when a flit arrives for it, and an arbiter's state changes only when its grant was used. A synthesis tool turns these load enables into clock-gating cells.
* **Signal gating.** The data input of each virtual-channel buffer is forced to zero unless that buffer is being written, so a flit arriving for one VC does not toggle the input flip-flops of the other three.
* **Router-level clock gating.** The clock of a whole router is switched off at the root of its clock tree in any cycle in which nothing can happen in that router. The enable comes from *early-valid* hints sent by the neighbouring routers, and from the router's own *busy* bit.

Sizes at the defaults: 64-bit flits, 4 virtual channels per input, 4 flit buffers per VC, 5 ports, 16 routers. Each link direction is 80 wires.

## Links and flits

A link is unidirectional, and two of them join each pair of neighbours. Each carries:

| wires | signal | direction |
|---|---|---|
| 64 | `data` | forward |
| 1 | `valid` | forward |
| 2 | `vc`: the virtual channel at the receiver | forward |
| 1 + 1 | `head`, `tail` | forward |
| 3 + 3 | `dx`, `dy`: signed hops still to go (head flit only) | forward |
| 1 | `early_valid` | forward |
| 4 | `stop[v]`, one per receiver VC buffer | backward |

`flit_t` and `vc_entry_t` in `rtl/noc_pkg.sv` define these fields. The 64 + 16 split of the 80 wires is fixed. How the 16 control wires are used, as listed above, is this implementation's choice.

**Routing** is dimension-ordered XY with relative addresses. A source puts the signed distance to the destination into the head flit: `dx` is positive towards the east (higher x), and `dy` is positive towards the south (higher row). A router sends the flit east or west until `dx` is 0, then north or south until `dy` is 0, then out of the local port. At each hop it moves the offset one step towards zero (`xy_route`). The 3-bit offsets cover the -3..+3 range of a 4x4 mesh. A larger mesh needs a wider `OFS_W`.

**Flow control** is stop/go, per virtual channel. `stop[v]` is high while buffer `v` at the receiver is full. It comes straight from the receiver's registers, and the sender uses it in the same cycle. So a flit is never sent into a full buffer, and all four buffers can be used. Buffers are allocated per packet in the usual virtual-channel way: a head flit acquires a downstream VC, and the tail flit releases it.

## Inside a router (`router`)

```
 in_flit[p] ─► input_port[p] ──front flits──► VC mux ─► crossbar ─► out_flit[o]
   (5x)        4 x vc_fifo                       ▲          ▲
               xy_route                           │          │
               stop_out[p] ◄── full               │          │
               out_req[p] ─┐            switch_allocator ──┘
                           │            vc_allocator (output VC state)
                           └─► OR ─► early_valid_out[o]
 early_valid_in ─► router_clock_ctrl (busy bit, clock_gate) ─► gclk for all of the above
```

What happens to a flit:

1. **Arrival.** The flit is written into the buffer of its VC. For a head flit, the output port it needs here is computed on arrival and stored with it, together with the offsets it will carry onwards. A body or tail flit takes the port of the head on its VC. The output request is therefore registered state at the start of the next cycle.
2. **Allocation, in the same cycle.**
   * A head flit without an output VC asks the **VC allocator** for one. For each output there is a matrix arbiter over all 20 input VCs. It makes at most one grant per output per cycle, and gives the lowest-numbered output VC that is free and not stopped.
   * **Speculatively and in parallel**, the same head flit asks the **switch allocator** for a crossbar slot. The switch allocator is separable and input-first. First a 4-way matrix arbiter at each input picks one VC. Then a 5-way matrix arbiter at each output picks one input.
   * A flit that already holds an output VC asks for the switch only if that VC is not stopped.
3. **Traversal.** A switch grant is used when the flit holds an output VC, or has just been given one. The flit then passes the VC multiplexer and the crossbar and crosses the link. At the next edge it is written into the next router's buffer.
4. **Abort.** If a speculative head wins the switch but not a VC, the slot goes unused (`spec_abort`) and the arbiters keep their state. A VC won without a switch slot is kept, and the flit goes non-speculatively in a later cycle.

**Non-speculative requests win** at both switch-allocation stages. Without this rule, a head that kept failing VC allocation could keep winning its input and output arbiters, since an aborted grant does not update them. Under random traffic that starved the flits that could have freed the VC it was waiting for, and the mesh deadlocked.

Zero-load latency is one cycle per router. A packet from tile `s` to tile `d`, `H` hops apart, appears at `d`'s ejection port `H+1` cycles after the source drove its head. The remaining flits of a 4-flit packet follow in the next three cycles.

## Router-level clock gating

`router_clock_ctrl` sets the enable for the coming clock edge:

```
clk_en = early_valid_in[0] | ... | early_valid_in[4] | busy_q
```

* `early_valid_out[o]` of a router is high when some buffer front in it wants output `o`. Each link carries this bit to the router at its far end.
  * It comes from registers, so it settles early in the cycle. That leaves time to pass it through a gating cell at the root of a clock tree. A valid bit decoded from the incoming flit would arrive too late.
  * It is computed before allocation, so it can claim an output that then stays idle: the flit may lose arbitration, be stopped, or be aborted. The neighbour then runs one cycle it did not need.
* `busy_q` is a flip-flop on the gated clock. It is set when, after the edge, the router will still hold a buffered flit or an output VC that is allocated but stopped downstream. A router with a blocked VC must keep running until it sees the stop bit fall.

A router whose buffers are empty and whose neighbours send nothing gets no clock pulse at all. Its outputs are then constant: no flit, no early-valid, and stop bits low, because every buffer is empty. So the neighbours can send to it freely, and the first flit wakes it through the early-valid bit that comes with it.

`clock_gate` is the usual latch-plus-AND gating cell. The latch is transparent while `clk` is low, so an enable that settles before the rising edge passes exactly that pulse. In a standard-cell flow it maps to the library's integrated clock-gating cell. The tiles' inputs to the local port include an `early_valid` too: a tile must raise it in any cycle in which it drives a flit.

## Files

| file | content |
|---|---|
| `rtl/noc_pkg.sv` | sizes, port numbering, `flit_t`, `vc_entry_t` |
| `rtl/noc_mesh.sv` | top: the 4x4 mesh; tile ports and per-router status brought out |
| `rtl/router.sv` | one router: VC state, speculation, busy bit, wiring |
| `rtl/input_port.sv` | VC demultiplexer, signal gating, route on arrival, stop bits, output requests |
| `rtl/vc_fifo.sv` | 4-entry fall-through flit buffer with load enables |
| `rtl/xy_route.sv` | XY route and offset update |
| `rtl/vc_allocator.sv` | output VC state and allocation |
| `rtl/switch_allocator.sv` | two-stage switch allocation with speculative requests |
| `rtl/matrix_arbiter.sv` | least-recently-served matrix arbiter, updated only when a grant is used |
| `rtl/crossbar.sv` | 5x5 flit crossbar, zero output when idle |
| `rtl/router_clock_ctrl.sv` | router enable and busy bit |
| `rtl/clock_gate.sv` | latch-based clock-gating cell |
| `tb/tb_<module>.sv` | a self-checking testbench per module |

Tile numbering in `noc_mesh` is `y*MESH_X + x`, with tile 0 at the north-west corner. On the mesh edge, link inputs are tied off. An assertion checks that no flit is ever sent off the edge.

All resets are asynchronous and active low. After reset, the buffers are empty, no VC is allocated and every busy bit is 0, so an idle network starts with every router gated. The reset must see a real falling edge of `rst_n`, because the routers' clocks are off while they are idle.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. Each has a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv rtl/*.sv tb/tb_noc_mesh.sv \
          --top-module tb_noc_mesh -o sim
./obj_dir/sim
```

`tb_noc_mesh` runs the whole mesh at its default parameters, in about 15 s of simulation and a few minutes of C++ build. Each of the 16 tiles has a testbench source and sink. Flit data encodes the packet, its source, its destination and its position, so the sinks check delivery, order and completeness independently of the RTL. The phases are:

* **idle:** no router may be clocked;
* **zero-load:** one 4-flit packet from tile 0 to tile 15. The head must arrive after exactly 7 cycles and the tail 3 cycles later, and routers off the XY path must never be clocked;
* **four streams:** continuous streams E→W, S→N, W→E and N→S through router (2,2), which is tile 10. That router must stay clocked throughout, and throughput must be close to one flit per cycle per stream;
* **uniform random traffic:** 1000 cycles each at 0.04, 0.20 and 0.44 flits/node/cycle, the last both with and without random stop bits from the sinks;
* **after each drain:** every router must be gated again.

It counts how often each of these happened, and fails if one never did: router-level gating, early-valid wake-ups, speculative aborts, stop back-pressure at injection, and stop back-pressure at ejection.

`tb_router` tests one router between modelled neighbours:

* one-cycle latency;
* offset update and routing to every port;
* a fully stopped output, checking that the buffer fills, `stop_out` rises and the router stays awake;
* random traffic with back-pressure.

The unit testbenches compare each block against an independent model:

* the arbiter against a least-recently-served list;
* the buffer against a queue;
* the route block exhaustively;
* the allocators against their grant rules and a fairness bound;
* the gating cell and enable logic against pulse counts.

## How far it follows the published design, and where it departs

These parts follow the published design:

* the 4x4 mesh of 2mm tiles with 80-wire links (64 data + 16 control);
* 64-bit flits, 4 VCs with 4 buffers each;
* single-cycle routers using speculation;
* XY routing with relative addresses and stop/go flow control;
* matrix arbiters for VC and switch allocation, with state updated only on a served request;
* load-enabled input buffers;
* signal gating of the buffer inputs;
* router-level gating from early-valid signals and a busy bit that covers buffered data and blocked output VCs.

The router's internal organisation is published only at the level above, so these parts are this implementation's own:

* the meaning of each control wire;
* the offset encoding;
* storing the route with each buffered flit;
* the separable allocator and its non-speculative priority;
* lowest-free-VC selection;
* zeroed idle crossbar outputs;
* the stop timing;
* reset behaviour.

The published router precomputes a speculative schedule and stores it: 2·P²·V bits, 200 bits for P=5, V=4. This design stores no schedule. It allocates in the same cycle from the buffers' registered state, so its critical path is longer than the published router's 32 FO4 cycle would allow.

Not included:

* the tiles;
* the physical links, repeaters and clock trees, which are wires in RTL;
* power estimation;
* a separate clock branch for the flow-control state, which would let a router with blocked VCs gate everything else;
* a clock-domain-crossing FIFO at the tile interface. That is only needed if the tiles run on their own clocks, and here the whole system uses one clock.
