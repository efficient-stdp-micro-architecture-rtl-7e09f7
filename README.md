# Clustered NoC spiking neural network with shared STDP learning

Spike-timing-dependent plasticity (STDP) changes every synaptic weight by an
amount that depends on how far apart in time the pre-synaptic and
post-synaptic spikes were. A direct hardware version gives every synapse its
own STDP unit. That is very costly, and almost all of those units sit idle,
because a neuron fires at tens of hertz while a unit could do millions of
updates per second. This design removes the waste in two ways:

* **Clustering.** Neurons do not each get a network-on-chip router. Instead, a
  cluster of `N` neurons shares one router, through a multiplexer and a
  de-multiplexer on the router's local port.
* **Shared synaptic block.** Each cluster has one STDP calculator and one
  controller, and they serve all `N x S` synapses of the cluster one after
  the other. A pre-synaptic time stamp is stored once per source neuron and
  used by every neuron it feeds.

The RTL follows the micro-architecture described in "Efficient STDP
Micro-Architecture for Silicon Spiking Neural Networks". Its default
configuration is that publication's main one:

* a 3 x 4 mesh of five-port routers
* 10 neurons per cluster and 60 synapse partitions per cluster
* input buffers 4 flits deep, XY routing and round-robin arbitration
* 16-bit packets
* 400 clock cycles per 1 ms time step
* leaky integrate-and-fire (LIF) cells, or Izhikevich cells if you select them

Everything is synthesizable SystemVerilog-2017.

```
              +-------------------- snn_cluster (one per router) ---------------------+
 mesh  ---->  | cluster_demux --pre events--> synaptic_block --inj_valid/inj_w--> N x  |
 router       |  (connectivity                 step_timer                     neuron  |
 local  <---- |   table)                       timestamp_table x2             cells   |
 port         | cluster_mux  <----- spikes ---- weight_table      <--post_spike-- |   |
              |  (fanout masks)                stdp_calculator                        |
              |                                stdp_controller + event buffer         |
              +-----------------------------------------------------------------------+
```

## Time

There are two time scales:

* **The clock.** Routers, tables and controllers work at the clock rate.
* **The time step.** Biological time moves in 1 ms steps of
  `CYCLES_PER_STEP` = 400 clock cycles. `step_timer` in every cluster makes
  a one-cycle `tick` at the end of each step and counts the step number
  `now`. Every cluster leaves reset at the same moment, so all the ticks
  line up.

A neuron cell sums the weighted inputs it receives during a step. At the tick
it updates its state, and if it fires, `spike` is high in the cycle after the
tick. The spike's time stamp is therefore the number of the step that has
just begun. The controller's work must fit inside the 400 cycles between
ticks. An incoming spike costs `N + 2` cycles and a neuron's own spike costs
`S + 2` cycles (see below). This leaves a wide margin at the 25 to 50 Hz
firing rates the network is meant for.

## Spike packets and the mesh

A spike travels as one 16-bit flit, `flit_t = {src, dst}`, with two 8-bit
addresses. Each address is `naddr_t = {y[1:0], x[1:0], slot[3:0]}`:

* `src` names the neuron that fired: its router and its slot in the cluster.
* `dst` names the destination router. Its slot field is 0.

The network has no multicast. A neuron that feeds neurons in five clusters
sends five packets, one to each cluster. Inside a cluster, one packet reaches
every neuron that is connected to that source.

`noc_router` has ports L, N, E, S and W, numbered 0 to 4. North is y-1 and
east is x+1. Each input port has a `snn_fifo` buffer. The head flit of each
buffer is routed by `xy_route`: x first, then y, then the local port. Each
output port has an `rr_arbiter` that picks one of the buffers whose head
wants that output, and `crossbar` forwards the winner.

Every port, including the links between routers, uses a valid/ready
handshake:

* `ready` is "buffer not full", which comes straight from a register.
* A full buffer refuses a push even in a cycle where it is popped.
* No combinational path crosses more than one link.

An uncongested hop takes one cycle. From the cycle a packet enters the source
router, it reaches the destination's local output `hops + 1` cycles later.
The longest path in the 3 x 4 mesh is 5 hops, so an uncongested spike
arrives within 6 cycles. The budget for the average spike latency is 3 ms,
which is 1200 cycles, so queueing has a lot of headroom.
`noc_mesh` ties off the edge ports. Router `(x, y)` has index `y*MESH_X + x`.

## Cluster: multiplexer and de-multiplexer

`cluster_mux` sends the cluster's spikes out:

* Each neuron slot has a fanout mask with one bit per router.
* A neuron that fires is marked pending. The mux serves pending neurons
  lowest slot first, and sends one packet per set bit of the neuron's mask,
  lowest router first.
* If a neuron fires again while its previous spike is still pending, the
  new spike is lost and `tx_overflow` pulses.

`cluster_demux` brings spikes in. It looks up the packet's 8-bit source
address in a 256-entry connectivity table, which gives either "not
connected" or the synapse partition (0..S-1) of that source:

* A hit becomes a pre-synaptic event for the synaptic block. The router's
  local port waits until the block accepts it, so a busy block stalls the
  network behind it.
* A miss is consumed and reported on `rx_drop`.

## The shared synaptic block

This is the core of the design (`synaptic_block`). It contains the following
parts:

| part | contents |
|---|---|
| `timestamp_table` (pre) | `S` entries: the step of the last spike from each source partition, plus a valid bit |
| `timestamp_table` (post) | `N` entries: the step of the last spike of each neuron, plus a valid bit |
| `weight_table` | `N x S` signed 8-bit weights, each with a *connected* bit. It is banked by neuron, so one partition's weights for all neurons are read in one cycle |
| `stdp_calculator` | the STDP rule (next section), combinational |
| `stdp_controller` | the event buffer and the scheduler |

Only the most recent spike on each side is kept. STDP pairs each new spike
with the nearest spike of the opposite kind, and not with the full spike
history.

### Events

There are two kinds of event:

* **Pre event.** An incoming spike on partition `s`, from the demux.
* **Post event.** A spike of one of the cluster's own neurons, from the
  `post_spike` vector. Several neurons can fire in the same cycle.

Post spikes are first latched in a pending vector. From there they go into
the event buffer (a 16-deep `snn_fifo`) one per cycle, lowest slot first. A
pre event is accepted only in a cycle with no pending post spike and room in
the buffer, so post spikes cannot be starved. If a neuron fires again while
still pending, the spike is lost and `post_drop` pulses.

### Scheduling

The scheduler takes one event at a time from the buffer.

**Pre event on partition s** (N + 2 cycles):

| cycle | action |
|---|---|
| 1 | pop the event |
| 2 | store `now` as the pre time stamp of `s`. Read column `s` of the weight table and drive `inj_valid[n] = connected(n,s)`, `inj_w[n] = w(n,s)` to all neurons at once: the new spike's input to the cells |
| 3 .. N+2 | for neuron `n = 0..N-1`: if `(n,s)` is connected and `n` has a post time stamp, pass `dt = t_post(n) - now` (zero or negative: the post spike came first) to the calculator and write the new `w(n,s)` |

**Post event of neuron n** (S + 2 cycles):

| cycle | action |
|---|---|
| 1 | pop the event |
| 2 | store `now` as the post time stamp of `n` |
| 3 .. S+2 | for partition `s = 0..S-1`: if `(n,s)` is connected and `s` has a pre time stamp, pass `dt = now - t_pre(s)` (zero or positive) and write the new `w(n,s)` |

Two cases end an event early or change nothing:

* In exploitation mode (`STDP_OFF`), time stamps are still stored, but an
  event ends after its second cycle and no weight is written.
* A spike pair in the same step (`dt = 0`) leaves the weight unchanged.

Time differences are taken modulo 2^16 steps (`TS_W`), which is 65 s of
biological time.

With `N = 1`, the block is the unshared per-neuron synaptic block: one
neuron cell with its own timer, tables, calculator and controller.

## STDP rule and learning modes

`stdp_calculator` computes, with `dt = t_post - t_pre` in steps:

```
dt > 0 (pre before post):  dw = +round(A_PLUS  * exp(-dt / TAU_PLUS))
dt < 0 (post before pre):  dw = -round(A_MINUS * exp( dt / TAU_MINUS))
dt = 0 or |dt| >= WINDOW:  dw = 0
```

The defaults are A = 16 weight units, tau = 20 steps and WINDOW = 64. The
exponentials come from two look-up tables of `WINDOW` entries. A constant
function builds them at elaboration using integer arithmetic only:

* exp(-1/tau) is computed in Q24 from its Taylor series.
* The table entries follow by repeated multiplication.

Changing A or tau needs no data files.

The 2-bit `mode` scales `dw`:

| mode | scale | use |
|---|---|---|
| `STDP_PLAIN` | +1 | unsupervised STDP |
| `STDP_REWARD` | +1 | reward: a correct output spike |
| `STDP_PUNISH` | -1 | punishment: the STDP change is reversed |
| `STDP_OFF` | 0 | exploitation phase: weights frozen |

The new weight saturates at -128 and +127.

## Neuron cells

`lif_neuron` works as follows:

* At each tick it computes `v += sum of inputs`.
* It then leaks `v` by `LEAK` = 1 towards 0, and floors it at `V_MIN` = -64.
* If `v >= THRESH` (64) it fires and resets `v` to 0.

`izh_neuron` is the Izhikevich model, `v' = 0.04v^2 + 5v + 140 - u + I`,
`u' = a(bv - u)`, with the regular-spiking constants a = 0.02, b = 0.2,
c = -65 and d = 8:

* It works in Q8 fixed point, with 0.04 taken as 41/1024.
* `v` is advanced in two 0.5 ms half steps and `u` in one step.
* The input current in mV/ms is the summed weight.

Both cells have `force_spike`, which makes them fire at the next tick. It is
how input-layer neurons are driven by an outside stimulus (the top's
`ext_spike`).

## Configuration

A single write port, `cfg` (`cfg_t`), is broadcast to all clusters. The
cluster whose router index equals `cfg.router` takes each write:

| `cfg.sel` | `slot` | `idx` | `data` |
|---|---|---|---|
| `CFG_CONN` | - | source address | `[15]` valid, `[7:0]` partition |
| `CFG_WEIGHT` | neuron | partition | `[15]` connected, `[7:0]` signed weight |
| `CFG_FANOUT` | neuron | - | `[NR-1:0]` destination routers |

Reset clears:

* every weight and connected bit
* every fanout mask
* every connectivity entry
* every time stamp

## Top level and parameters

`snn_noc_top` has these ports:

* **Control inputs:** `clk`, `rst_n` (asynchronous, active low) and `run`,
  which lets time advance.
* **Learning and setup:** `mode` and `cfg`.
* **Stimulus and output:** `ext_spike[r][n]` and `spike[r][n]`, indexed by
  router and neuron slot.
* **Per-cluster flags**, for observation: `tick`, `pre_stall` (incoming
  spike waiting for the synaptic block), `evbuf_full`, `post_drop`,
  `tx_overflow`, `rx_drop` and `stdp_update` (an STDP weight write).

| parameter | default | origin |
|---|---|---|
| `MESH_X` x `MESH_Y` | 3 x 4 | published configuration (orientation chosen here) |
| `N` neurons per cluster | 10 | published configuration |
| `S` partitions per cluster | 60 | 60 synapses per neuron in the published XOR network |
| `BUF_DEPTH` | 4 | published |
| `CYCLES_PER_STEP` | 400 | published (one cycle = 1/400 ms) |
| `NEURON_MODEL` | `NEURON_LIF` | both models are published; LIF is the first configuration |
| `EVT_DEPTH` | 16 | chosen here |
| `LIF_THRESH` | 64 | chosen here |
| weight / time-stamp width | 8 / 16 bits | chosen here |
| STDP A, tau, window | 16, 20, 64 | chosen here |

The address format has 2 bits per coordinate and 4 bits per slot, so it
allows meshes up to 4 x 4 and up to 15 neurons per cluster. Larger meshes
need wider `COORD_W` and `SLOT_W` in `snn_pkg`, which also widens the
packet.

## Departures and limits

* **Packet field layout.** The 16-bit packet with a source and a destination
  address is the published format. The 2+2+4 split of each address and the
  per-cluster (rather than per-neuron) destination are this design's.
* **Added mechanisms.** The connectivity table, the fanout masks, the
  configuration bus, the valid bits of the time stamps and the
  `force_spike` stimulus path are added. The published description does not
  say how these functions are provided.
* **STDP sign convention.** The published text says that a pre spike followed
  by a post spike strengthens the synapse, and the calculator does this. The
  printed form of the equation has the opposite signs.
* **Reward modulation.** It is modelled as a sign applied to each STDP
  change, with no eligibility trace.
* **XOR network size.** The published XOR network has 121 neurons (60-60-1).
  That is one more than the 120 neuron places of a 3 x 4 mesh with 10 per
  cluster. A cluster holding both hidden and output neurons would also need
  120 partitions instead of 60. The end-to-end test therefore runs a 60-50-1
  network.
* **Router network only.** Only the network of routers, clusters and learning
  is built. The area and power figures, and the latency and throughput
  sweeps over cluster sizes and injection rates, are measurements of that
  hardware, not parts of it.

## Verification

Every module except the package has a self-checking testbench in `tb/`. Each
one prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_snn_fifo` | FIFO against a queue model |
| `tb_xy_route` | XY routing, exhaustively |
| `tb_rr_arbiter` | round-robin order and fairness |
| `tb_crossbar` | crossbar selection |
| `tb_noc_router` | delivery, per-port order, one-cycle hop, back-pressure |
| `tb_noc_mesh` | random traffic from every local port, each packet delivered once and unchanged to the right router; `hops + 1` latency; back-pressure |
| `tb_step_timer` | tick period and the `run` gate |
| `tb_timestamp_table`, `tb_weight_table` | the tables against models |
| `tb_stdp_calculator` | against `A*exp(-\|dt\|/tau)` in real arithmetic, to within one unit; signs, window, modes, saturation |
| `tb_stdp_controller` | with testbench-modelled tables: injection, every pairing, the `N+2` and `S+2` cycle counts, dropped post spikes, a full event buffer with no lost events, exploitation |
| `tb_lif_neuron` | against a model of the LIF rule |
| `tb_izh_neuron` | against a real-valued Izhikevich model: one step, rest potential, spike count within 20% |
| `tb_synaptic_block` | potentiation, depression, punishment, frozen weights, tick period |
| `tb_cluster_demux`, `tb_cluster_mux` | table lookup, back-pressure, drops, fanout order, overflow accounting |
| `tb_snn_cluster` | a looped-back cluster: a spike chain 0 -> 1 -> 2 at one step per hop, with the resulting potentiation |

`tb_snn_noc_top` runs the whole design at its default parameters:

* It configures the 60-50-1 XOR network: input neurons in the six border
  routers, hidden neurons in the other five, and the output neuron in
  router 7.
* It fires all inputs at once, then trains with 35 Hz Poisson inputs: reward
  for patterns 01 and 10, punishment for 00 and 11.
* It then runs an exploitation pass with learning off.

It checks that:

* every packet is delivered;
* the packet count equals 5 per input spike plus 1 per hidden spike;
* weights change under reward and under punishment, and stay frozen in
  exploitation;
* router back-pressure, round-robin conflicts, a full event buffer,
  synaptic-block stalls, and pre and post STDP events all occur.

It runs about 200,000 clock cycles (481 time steps), which takes seconds
once compiled.

It does **not** show that the network learns XOR. With the STDP constants
and initial weights chosen here, the output neuron is almost silent after
training. The learning dynamics, meaning the choice of A, tau, thresholds
and initial weights, have not been tuned.

## Simulating

Each testbench is built with Verilator from the package and all RTL files:

```
verilator --binary --timing --assert -Wno-fatal \
          rtl/snn_pkg.sv $(ls rtl/*.sv | grep -v snn_pkg) tb/tb_snn_noc_top.sv \
          --top-module tb_snn_noc_top -Mdir obj && obj/Vtb_snn_noc_top
```

`snn_pkg.sv` must come first. Swap in any other `tb/tb_*.sv` and its module
name. No data files are needed: the STDP tables are computed at elaboration.
To change the network size, edit the parameter defaults of `snn_noc_top`, or
override them where it is instantiated; the end-to-end testbench assumes the
default sizes.
