# Hybrid deterministic/adaptive router for a k-ary 3-cube

Dimension-order routers are fast, but each message has only one path, so
they congest early. Adaptive routers pick among several paths, so they queue
less and saturate later. The cost is a longer routing delay: they have more
virtual channels and base the choice on router state. The hybrid router
gets the short per-hop delay of the first and the path choice of the second.
One router contains three logical paths with different pipeline depths:

| path | used by a header that … | header | data flit |
|------|-------------------------|--------|-----------|
| **FDP**, fast deterministic path | came in on a high or low (dimension-order) VC and leaves on the *same* VC: same dimension, same type | 2 cycles | 1 cycle |
| **SDP**, slow deterministic path | came in on a high or low VC but changes type or dimension, cannot get its own VC, or goes to the local sink | 3 cycles | 2 cycles |
| **AP**, adaptive path | came in on an adaptive VC, or from the local source | 3 cycles | 2 cycles |

A message that keeps going straight on its dimension-order channel through an
idle router takes the FDP. That path has no crossbar and no choice to make,
so it is one stage shorter. Every other header goes through the full
route/crossbar/output pipeline. There it takes its dimension-order VC if that
VC is free, and otherwise an adaptive VC.

This RTL implements the router and the network around it: a K-ary 3-cube of
routers with unidirectional rings and virtual cut-through switching. The
defaults are K = 8, 8-flit messages and 8-flit buffers.

## Network and channels

* **Topology.** Node `n` is at `x = n mod K`, `y = (n/K) mod K`, `z = n/K²`.
  In every dimension the nodes form a unidirectional ring: a node sends to
  the node whose coordinate is one higher (mod K).
* **Physical channels.** Each node has one outgoing and one incoming physical
  channel per dimension. A channel carries one flit per cycle, tagged with
  its VC: `VC_HIGH`, `VC_LOW` or `VC_ADAPT`. Credits flow the other way as one
  pulse per VC for each flit the receiver reads from its buffer.
* **Local port.** Each node also has a source queue (valid/ready injection)
  and a sink. The sink takes one flit per cycle and has no back-pressure.
  Once a message gets the sink it keeps it until its tail has left.
* **Virtual cut-through.** A header gets an output VC only when the buffer
  at the far end has room for the *whole* message: the credit counter must be
  ≥ `MSG_LEN`. With the default `BUF_DEPTH = MSG_LEN`, the next router's
  buffer for that VC must therefore be empty. So a blocked message always
  ends up entirely in one buffer and never holds channels behind it.
* **Flit** (`hybrid_pkg::flit_t`, 18 bits): `head`, `tail` and a 16-bit
  payload. In a head flit, payload `[3:0]`, `[7:4]` and `[11:8]` are the
  destination x, y and z. Payload `[15:12]` is free for the user. All
  messages have the same length, `MSG_LEN` ≥ 2 flits.

## Routing rules

The dimension-order route (`route_unit`) is computed as follows:

* The hops left in dimension d are `(dest_d − here_d) mod K`.
* The message is routed in the highest dimension that still has hops left.
  It moves to a lower dimension only once the higher ones are done.
* In that dimension the message uses the **high** VC while its destination
  coordinate is below the current one, that is, while it still has to cross
  the K−1 → 0 wrap-around link. After that it uses the **low** VC. This
  dateline rule breaks the cycle in each ring.
* When no hops are left, the output is the sink.

Each cycle, stage 1 (`path_allocator`) serves every idle input buffer that
has a header at its head, in this order:

1. **FDP grants.** A header on a high or low input VC whose dimension-order
   output is that very VC gets it, if the VC is free (not held and with room
   downstream). These grants come first. An FDP header therefore beats a
   slow-path header that wants the same VC in the same cycle.
2. **Slow-path grants**, in round-robin order: first among the three
   adaptive input buffers, then among the six high/low input buffers, and the
   source queue last. Each header takes its dimension-order VC if it is free.
   If not, it takes a free adaptive VC in a dimension it still has to travel,
   choosing the dimension with the most hops left. If neither is available it
   waits and tries again next cycle. A header bound for the sink can only
   wait for the sink.

Several headers can be granted in one cycle, each to a different output VC.
A high/low header that missed its own VC is retried every cycle. When the VC
frees up it can still get it on the FDP.

## Pipeline, register by register

The three paths share the same hardware. This is the part worth reading
slowly. A flit's cycles are counted from the clock edge that writes it into
the input buffer to the edge that writes it into the next router's input
buffer.

```
 input VC buffer ──┬─► FD1: route + allocate ──────────────► output-VC reg ─┐
 (vc_buffer, one   │                                                         │
  per input VC     ├─► SD1/A1: route + allocate ─► stage-1 reg ─┐            ├─► FD2/SD3/A3:
  and the source)  │                                            ├─► crossbar ┤   vc_controller
                   ├── SDP/AP data flits ───────────────────────┘  (SD2/A2)  │   (one per dim)
                   │                                               ─► out-VC │   or the sink
                   └── FDP data flits ─────────────────────────────────────► ┘   ─► channel
```

* **Input buffers** (`vc_buffer`): nine, one per incoming VC (3 dimensions ×
  high/low/adaptive), plus the source queue. Each holds `BUF_DEPTH` flits.
* **Stage 1**, FD1 / SD1 / A1 (`route_unit` per input + `path_allocator`):
  * An FDP header is popped and written straight into the output-VC
    register of its output.
  * An SDP/AP header is popped into its input's *stage-1 register*.
* **Stage 2**, SD2 / A2 (`crossbar`): a 10 × 10 switch at VC granularity. Its
  ports are the nine VCs plus the local port; each input drives the output it
  was granted. It takes:
  * the header from the stage-1 register;
  * each following data flit directly from the input buffer, which skips
    stage 1.

  The result goes into the output-VC register.
* **Last stage**, FD2 / SD3 / A3 (`vc_controller`, one per outgoing channel):
  * Each cycle it picks one of its three VCs, round-robin, among those that
    have a flit and a free downstream slot. It drives that flit onto the
    channel.
  * The channel is a wire into the next router's input buffer, so a flit
    sent in this stage is stored at the end of the same cycle.
  * A VC's candidate is its output-VC register. For a message on the FDP, the
    data flits come straight from the input buffer once the header has left
    the register. That bypass is what makes an FDP data flit one cycle.
  * For the sink, the output-VC register feeds `ej_*` directly.
* **Release.** An output VC is released when its tail flit goes out. An input
  buffer becomes idle when its tail flit is read.

Two consequences:

* A data flit that follows its header back to back cannot overtake it. A
  message streams at one flit per cycle behind its header. The 1- and
  2-cycle data latencies show when data flits arrive spaced out.
* The **idle-network latency** of a header from injection to the sink is
  3 (source, AP) + 2 per router passed straight through + 3 per dimension
  change or wrap-node type change + 3 (sink). The tail arrives `MSG_LEN − 1`
  cycles after the header when injected back to back. For example, (0,0,0) →
  (7,0,0) in the 8-ary cube takes 3 + 6·2 + 3 = 18 cycles.

## Modules

| file | role |
|------|------|
| `rtl/hybrid_pkg.sv` | N = 3, 4-bit coordinates, 16-bit payload, `flit_t`, `link_t`, `vc_type_e`, port numbering (`3·dim + VC type`, 9 = local) |
| `rtl/hybrid_torus.sv` | **top**: K³ routers, ring wiring, credit return, local ports, per-node header-grant event outputs |
| `rtl/hybrid_router.sv` | one node: buffers, path state, the three stages |
| `rtl/route_unit.sv` | hops, dimension-order output, high/low choice |
| `rtl/path_allocator.sv` | stage 1: FDP check, round-robin message selection, output-VC selection |
| `rtl/crossbar.sv` | stage 2 of SDP/AP |
| `rtl/vc_controller.sv` | last stage: VC multiplexing onto the channel, credit counters, "whole message fits" flag |
| `rtl/vc_buffer.sv` | FIFO input buffer |
| `rtl/rr_arbiter.sv` | round-robin arbiter used by the VC controllers |

Parameters of `hybrid_torus` and `hybrid_router`:

* `K` (default 8, also evaluated at 10). K must be ≤ 16 because of the
  4-bit coordinates.
* `MSG_LEN` (8; also 16 and 64 in the evaluation).
* `BUF_DEPTH` (8). It must be ≥ `MSG_LEN`; the evaluation always sets it
  equal to the message length.

`hdr_grant[n][i]` / `hdr_fdp[n][i]` pulse when input port `i` of node `n`
has a header granted. They tell which path the header took:

* FDP when `hdr_fdp` is set;
* SDP for a grant on a high/low port without `hdr_fdp`;
* AP for a grant on an adaptive port or the source.

## Simulating

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hybrid_pkg.sv tb/tb_hybrid_router.sv \
          --top-module tb_hybrid_router -o sim && obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_vc_buffer`, `tb_rr_arbiter`, `tb_crossbar`, `tb_vc_controller` | random stimulus against reference models (queue, round-robin pointer, permutation, credit counts) |
| `tb_route_unit` | random coordinates at K = 8 and 10; hops counted by walking the ring |
| `tb_path_allocator` | directed cases for every selection rule above |
| `tb_hybrid_router` | one router at (1,1,1), K = 4, 4-flit messages. Exact cycle counts: FDP header 2 / data 1, SDP and AP header 3 / data 2. Also covers the adaptive VC taken when the dimension-order VC has no room, the sink, the source, and credits upstream |
| `tb_hybrid_torus` | 4-ary 3-cube (64 routers), 8-flit messages. Idle-network latencies, then 4000 random uniform messages at low and high load; every message must arrive once, whole, in order and at the right node. Requires that the FDP, SDP, AP, adaptive VCs, the high VC on the FDP and source back-pressure each occur |
| `tb_hybrid_msglen` | the longer message sizes, 16 and 64 flits, each with one-message buffers, on 3-ary 3-cubes (27 routers) under random uniform traffic (helper `torus_traffic`) |

## How far it has been verified

* All testbenches above pass. Every unit testbench was also run against a
  deliberately broken copy of its module, and each one caught the fault.
* The largest network simulated is the 4-ary 3-cube (64 routers) with the
  default 8-flit messages and buffers.
* At the default size (8-ary 3-cube, 512 routers) the design lints cleanly
  in Verilator and elaborates in a second front end. It has not been
  simulated: Verilator turns the flattened network into about 700 MB of C++,
  more than can be built in a reasonable time.
* The other evaluated configurations are reached by setting `K`, `MSG_LEN`
  and `BUF_DEPTH`: the 10-ary 3-cube (`K = 10`) and 16- or 64-flit messages
  with equal buffers. The 16- and 64-flit messages have been simulated only
  on the 27-router cube; the 10-ary cube has not been simulated.

Building the 64-router testbench with Verilator takes about three minutes.

## Choices not fixed by the scheme

The routing scheme defines the paths, their stage counts, the routing and
selection rules, the VC counts and the whole-message condition. The
following are this implementation's own:

* flit width and header layout;
* credit-based flow control;
* synchronous active-high reset;
* the high/low dateline rule;
* FDP priority over slow-path headers for the same VC;
* several grants per cycle;
* routing source headers like adaptive-input headers;
* treating the channel as a wire inside the last stage.

Also, a high/low header that misses the FDP may take an adaptive VC. This
follows the "different deterministic channel or adaptive channel" branch of
the scheme's flow chart. A strict reading of the underlying adaptive
algorithm would keep such a message on dimension-order channels.

## Limits

* **Fairness.** There is no starvation guard between FDP headers and
  slow-path headers that want the same output VC. Under sustained traffic an
  FDP stream could delay a slow-path header indefinitely.
* **Timing.** Clock-period figures for the scheme come from a gate-level
  delay model, which assumed a clock about equal to a purely adaptive
  router's. Nothing here models or guarantees that; the RTL fixes only the
  cycle counts.
* **Deadlock.** Freedom from deadlock rests on the scheme's argument: its
  paths are a subset of a proven deadlock-free adaptive algorithm, combined
  with the whole-message rule. The testbenches found no deadlock at 20 %
  offered load on the 64-node cube, but they do not prove its absence.
