# Bufferless mesh NoC with application-aware source throttling

A bufferless on-chip network has no packet buffers in its routers. A flit that
loses arbitration for the port it wants is sent out on another free port
(it is *deflected*) instead of waiting. This saves router area and power, and
the network never drops a flit. Under heavy load, though, congestion shows up
in a different place than in a buffered network. Latency inside the network
stays fairly flat. The cost falls on the nodes instead: they find no free link
to inject into, and they *starve*.

This RTL puts a congestion controller on top of such a network, and the
controller is driven by that starvation. Each node measures how often it
recently wanted to inject and could not. A central controller reads these
measurements once per control period. If some node is congested, it throttles
the nodes that are most network-intensive. Intensity is estimated from the
length of each node's injection queue: a long queue means many flits per
instruction. Throttling those nodes costs them little. It frees the network for
the nodes whose instructions depend on each flit, so total instruction
throughput goes up.

The default configuration is a 4x4 mesh with 128-bit flits, a 128-cycle
starvation window, 7-bit throttle granularity and a 10,000-cycle control
period.

## Structure

```
bless_cc_noc                      top: MESH_X x MESH_Y mesh + controller
 ├─ bless_node  (one per node)    network interface + router
 │   ├─ injection_queue           FIFO of flits waiting to enter (16 deep)
 │   ├─ injection_throttle        7-bit opportunity counter + comparator
 │   ├─ starvation_monitor        128-bit shift register + up/down counter
 │   ├─ qlen_accumulator          queue length summed over the period
 │   └─ bless_router              2-stage deflection router
 ├─ link registers                1 cycle per link
 └─ congestion_controller         central, runs once per period
bless_pkg                         flit type, widths, priority key
```

Node `(x, y)` has index `y*MESH_X + x` in every per-node port array. `x` grows
to the east and `y` grows to the south. Link arrays are indexed N=0, E=1, S=2,
W=3.

## The flit

Flits of one packet travel independently and may take different paths, so
every flit carries a full header beside its 128-bit payload (`bless_pkg::flit_t`):

| field        | width | meaning                                           |
|--------------|-------|---------------------------------------------------|
| valid        | 1     | the link slot holds a flit                        |
| dst_x, dst_y | 6+6   | destination node (6 bits reach a 64x64 mesh)      |
| src_x, src_y | 6+6   | source node                                       |
| pkt          | 8     | packet number, counted per source                 |
| seq          | 3     | flit index within the packet                      |
| last         | 1     | last flit of the packet                           |
| age          | 8     | hops taken so far; 0 at injection, saturates      |
| data         | 128   | payload                                           |

The priority of a flit is `{age, ~src_y, ~src_x, ~pkt, ~seq}`. Older flits win.
Equal ages are broken by the other fields, so all flits in flight are in a
total order, provided a source does not reuse a packet number while a flit of
that packet is still in the network. This total order is what makes
oldest-first deflection routing free of livelock. The flit that currently has
the highest priority always gets a productive port, or it is ejected.

## The router (`bless_router`)

The router has two register stages.

1. **Input latch.** The flits arriving on the four links are registered.
2. **Eject, inject, allocate.** This stage is combinational and is registered
   into the output links.
   - *Ejection.* Of the latched flits addressed to this node, the one with the
     highest priority goes to `ej_flit`. Only one flit is ejected per cycle. Any
     other flit addressed here is deflected and comes back later. `ej_conflict`
     flags that case.
   - *Injection.* `inj_free` is high when, after ejection, fewer flits remain
     than the router has links. Only then may the node present a flit on
     `inj_flit`, in the same cycle. An assertion checks this rule.
   - *Oldest-first allocation.* The remaining flits and the injected flit are
     ranked by priority. In rank order, each flit takes its X-Y routing port if
     that port is still free. Failing that, it takes its other productive port
     (the y direction while x is not yet done). Failing that, it takes the
     lowest-numbered free link, which is a deflection, counted in `defl_cnt`.
   - Every forwarded flit's age goes up by one.

A mesh router has as many outputs as inputs, and the node injects only into a
spare link, so allocation always succeeds and the router never stalls. Edge and
corner routers switch off their off-mesh links from their coordinates. A corner
router therefore carries at most two flits and never sends one off the mesh.

**Latency.** A flit spends 2 cycles in each router it passes through and 1
cycle on each link. A new flit joins the router at stage 2. An uncontended
path of `h` hops therefore takes `3h + 1` cycles, counted from the injection
cycle to the cycle in which the flit is on `ej_flit`. Corner to corner in the
4x4 mesh this is 19 cycles.

## Per-node congestion hardware

**Starvation monitor.** A node is *starved* in a cycle when its queue is not
empty and it cannot inject. The cause may be that no link is free or that the
throttle blocks it. The monitor shifts this bit into a 128-bit window. An
up/down counter adds the bit that enters the window and subtracts the bit that
leaves it. The starvation rate is σ = `starve_cnt`/128. The counter has 8 bits
so that a fully starved window fits.

**Injection throttle.** An *opportunity* is a cycle in which the node has a
flit and the router has a free link. A 7-bit counter counts opportunities
modulo 128. An opportunity is allowed when the counter value after the
increment is at least `rate`. So exactly `rate` out of every 128 opportunities
are blocked, in one run each time the counter wraps. Rate 0 never blocks.

**Queue-length monitor.** This adds the injection-queue length of every cycle.
When `period_end` arrives it hands the period's sum to the controller. The
controller divides by the period to get the average queue length, which is the
node's intensity estimate.

The per-node state is the 128-bit window, the 8-bit starvation counter, the
7-bit throttle counter and the 7-bit rate. On top of that comes the
queue-length sum.

## The controller (`congestion_controller`)

Once per `PERIOD` cycles the controller runs the following steps. Here `q_i` is
node *i*'s average queue length in flits and `σ_i` is its starvation rate.

```
congested  = OR_i ( σ_i > min(α_s * q_i + β_s, γ_s) )
for each i:
  if congested and q_i > mean(q):  rate_i = min(α_t * q_i + β_t, γ_t)
  else:                            rate_i = 0
```

| constant | value | Q8 parameter      |
|----------|-------|-------------------|
| α_s      | 0.20  | `ALPHA_STARVE_Q8 = 51`  |
| β_s      | 0.35  | `BETA_STARVE_Q8 = 90`   |
| γ_s      | 0.80  | `GAMMA_STARVE_Q8 = 205` |
| α_t      | 0.20  | `ALPHA_THR_Q8 = 51`     |
| β_t      | 0.45  | `BETA_THR_Q8 = 115`     |
| γ_t      | 0.75  | `GAMMA_THR_Q8 = 192`    |

A node is counted as congested at a lower starvation rate when its queue is
short. A node that injects a lot is expected to starve more, so its threshold
is higher. A throttled node loses between 45% and 75% of its injection
opportunities, and more as its queue grows.

**Fixed point.** The arithmetic is unsigned, with 8 fraction bits (256 means
1.0). Each constant is rounded to the nearest 1/256.
- σ is formed as `starve_cnt*256/W`.
- `q_i` is formed as `qlen_sum_i * RECIP >> 24`, where `RECIP` is
  `round(2^32 / PERIOD)`, computed at elaboration.
- The test against the mean is done as `N*q_i > Σq`, so no divider is needed.
- The rate is delivered as a count out of 128, `rate_q8*128/256`.

**Sequence and timing.** `period_end` is high in the last cycle of each period.
- In that cycle every node closes its queue-length sum.
- In the next cycle the controller takes a snapshot of all starvation counters.
- Pass 1 then takes `N` cycles and handles one node per cycle. It converts
  `q_i`, tests the threshold and sums the `q` values.
- Pass 2 takes another `N` cycles and writes one node's rate per cycle.
- `update_done` pulses `2N+2` cycles after `period_end`, and all new rates are
  in force from then on.

With `enable` low, every rate is held at 0. This gives the unthrottled
baseline.

## Interface of the top (`bless_cc_noc`)

| port | dir | meaning |
|------|-----|---------|
| `src_valid[n]`, `src_ready[n]` | in/out | flit stream from node *n*'s core; `src_ready` falls when the 16-flit queue is full |
| `src_dst_x/y[n]`, `src_last[n]`, `src_data[n]` | in | destination, last-flit marker, payload |
| `ej_flit[n]` | out | flit delivered to node *n*; one per cycle at most, no back-pressure |
| `cc_enable` | in | congestion control on/off |
| `period_end`, `cc_update_done`, `throttle_active` | out | controller state |
| `throttle_rate[n]`, `starve_cnt[n]`, `qlen[n]` | out | per-node state |
| `ev_starved`, `ev_throttled`, `ev_injected`, `ev_deflect`, `ev_ej_conflict` | out | per-node, per-cycle events for statistics |

The node fills in the header of each flit: source, packet number, sequence
number and age 0. The packet number advances after each flit marked `last`.

The receiver must accept every ejected flit. Flits of one packet can arrive
out of order, and reassembling them is the receiver's job. A node must not
send to itself.

Reset is synchronous and active low (`rst_n`).

## Where this RTL departs from or adds to the description it follows

- **Controller in hardware.** The original scheme runs the control algorithm
  as system software on the cores. The per-node monitors and throttles are the
  only parts in the routers. Here the algorithm is a small sequential unit,
  wired directly to every node.
- **Constants with two published values.** The mechanism's description and its
  evaluation setup disagree on some numbers. This RTL uses the evaluation's
  10,000-cycle period, not 100,000, and the evaluation's throttle scale
  α_t = 0.2, not 0.30. For α_s it uses 0.2 and not 50, because with a queue
  length measured in flits a scale of 50 would always give the upper bound.
  All of these are parameters.
- **Throttle comparison.** The published rule allows injection when
  `count > rate`. That would block 1 opportunity in 128 even at rate 0. This
  RTL uses `count >= rate`. The counter advances on injection opportunities,
  not on every cycle.
- **Queue length.** The controller uses the average over the period, not a
  single sample.
- **Choices made here.** These were left open and are fixed by this RTL: the
  16-flit queue depth, the 8-bit saturating age and its tie-break order, the
  second-choice productive port, the single ejection port, the header fields
  and the flit-stream interface.
- **Not included.** The cores, the L1 caches and the shared L2 slices that
  generate and answer the traffic. The request/reply protocol and packet
  reassembly are not included either.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end. For example:

```
verilator --binary --timing --assert -Irtl --top-module tb_bless_cc_noc \
    rtl/bless_pkg.sv rtl/*.sv tb/tb_bless_cc_noc.sv
./obj_dir/Vtb_bless_cc_noc               # +heavy=60 +light=12 +hotspot=40
```

`tb_bless_cc_noc` runs the whole design at its default parameters for about
55,000 cycles. A scoreboard checks every flit for delivery, destination,
header and payload. The testbench also checks the corner-to-corner latency and
the controller's choices. It requires each mechanism to occur at least once:
deflection, ejection conflict, starvation, throttled injection, full queue,
congestion detection, a node throttled and a controller update.

The traffic is a mix of heavy and light nodes. During the heavy phases the
heavy nodes send part of their packets to one hotspot node. The testbench
prints the flits delivered per period with the controller off and with it on.
With the defaults, congestion is detected only under the hotspot phase. Queues
near full raise the threshold to its upper bound, so uniform random traffic
alone rarely trips it.

The other testbenches are `tb_bless_router`, `tb_bless_node`,
`tb_congestion_controller`, `tb_starvation_monitor`, `tb_injection_throttle`,
`tb_injection_queue` and `tb_qlen_accumulator`. Each compares its block
against a model written independently in the testbench.

## Scaling

The mesh size is set by `MESH_X`/`MESH_Y`. 8x8 is the other main evaluated
size. Coordinates are 6 bits wide, which allows up to 64x64.

The end-to-end test has also been run on an 8x8 mesh, with destinations
drawn from an exponential hop distribution (mean 1 hop) plus the hotspot. Every
flit was delivered, and the corner-to-corner latency was the expected 43 cycles
for 14 hops. Throttling became active under the hotspot load. Verilator takes
several minutes to compile that size.

The controller needs `2N+4 < PERIOD`. At 4096 nodes a 10,000-cycle period is
just long enough.

The controller reaches every node over parallel wires, which is practical for
small meshes only. A large mesh would carry these values over a serial or
in-network path instead.
