# Mesh network with voltage-scaled links and history-based link control

In a router for a multiprocessor or an on-chip fabric, the high-speed links
burn most of the power: in the router modelled here the link circuitry takes
6.4 W of about 7.8 W (82 %), against 0.78 W for the buffers, 0.50 W for the
crossbar and under 0.1 W for both allocators. Links also draw nearly the same
power whether they carry traffic or not. A link whose supply voltage follows
its clock frequency (a *DVS link*) can run anywhere from 125 MHz at 0.9 V
(23.6 mW) to 1 GHz at 2.5 V (200 mW), roughly a 10x range in power.

This RTL builds an 8 x 8 mesh of virtual-channel routers in which every
router-to-router channel is made of such links, and in which every router
output port carries a small controller that decides, from that channel's own
recent utilization only, whether to speed the channel up, slow it down or
leave it alone. No global information is exchanged. The controller is a few
counters, one adder and four comparators.

## The history-based controller (`dvs_history_ctrl`)

This is the heart of the design. It works in *link* cycles, not router
cycles: a channel at 250 MHz has one link cycle in four router cycles. It
observes two things each link cycle: that the cycle happened (`link_tick`)
and whether a flit used it (`busy`).

**Measuring.** A counter runs over a history window of H = 50 link cycles and
a second counter counts the busy ones. At the window's end the busy count is
the short-term utilization, kept as an integer out of H, so 0.4 utilization
is 20. Keeping it as a count avoids any division: the thresholds are scaled by
H instead.

**Predicting.** At every window end the controller forms an exponentially
weighted average of the new window and the past:

    U_pred = (W * U_short + U_long) / (W + 1)       W = 3
    U_long = U_pred

Because W = 2^k - 1 (k = 2), `W * U_short` is `(U_short << 2) - U_short` and
the division is a right shift by 2 (truncating). A burst in one window moves
the prediction by three quarters of its size; a single idle window does not
undo a busy history.

**Deciding.** The prediction is compared with four thresholds:

| condition            | trend    | schedule |
|----------------------|----------|----------|
| U_pred < 0.1 (5/50)  | decrease | fast     |
| U_pred < 0.3 (15/50) | decrease | slow     |
| U_pred > 0.9 (45/50) | increase | fast     |
| U_pred > 0.4 (20/50) | increase | slow     |
| otherwise            | static   | none     |

**Acting.** A free-running window counter raises a *fast* signal every 16
windows and a *slow* signal every 32 windows. When the signal chosen by the
latest decision fires, the frequency level moves one step (125 MHz) in the
trend's direction, clamped to 125 MHz .. 1 GHz. So a nearly idle or nearly
saturated channel is rescaled twice as often as one that is only moderately
loaded, which limits thrashing in the middle band while reacting quickly at
the extremes. The 0.3-0.4 dead band keeps a channel from oscillating.

Window length scales with the link clock: at 1 GHz a window is 50 ns and a
fast step can happen every 800 ns; at 125 MHz a window is 400 ns.

Outputs: `level` (frequency = level x 125 MHz), a one-cycle `scale_evt`, and
for observation `trend`, `u_pred`, `win_end` and `fast_sched`. After reset the
level is 8 (1 GHz) and the history is zero. While the link is down for a
voltage change no link cycles occur, so the controller simply pauses.

The controller synthesizes to about 64 word-level cells and 33 flip-flops.

## The DVS channel (`dvs_channel`, `freq_synth`, `supply_regulator`)

A channel is eight serial links, each sending 4 bits per link clock (4:1
multiplexing), so it moves one 32-bit flit per link cycle: one per router
cycle at 1 GHz (32 Gb/s), one every eight at 125 MHz (4 Gb/s). The flit is cut
into eight 4-bit lane symbols (lane j carries bits 4j+3..4j) and reassembled
at the far end; the one-cycle register between them stands in for the wire.

* `freq_synth` stands for the analog frequency synthesizer. The router clock
  is the reference, and the link clock is a clock enable that is high in
  exactly `level` of every 8 router cycles, spread evenly by a phase
  accumulator.
* `supply_regulator` stands for the adaptive supply regulator shared by the
  eight links. It moves the supply, in millivolts, toward the voltage the
  level needs at 0.1 V/us (1 mV per 10 ns cycle). It raises `settled` when
  it arrives.
* The link carries nothing while the supply is moving. This is a deliberately
  pessimistic model: real DVS links can keep sending during a transition,
  within a range.

Voltage is taken linear in frequency between the two known end points:

| level | frequency | supply | time to step from the next level up |
|------:|----------:|-------:|-------------------------------------:|
| 8 | 1000 MHz | 2.500 V | - |
| 7 |  875 MHz | 2.271 V | 2.29 us |
| 6 |  750 MHz | 2.043 V | 2.28 us |
| 5 |  625 MHz | 1.814 V | 2.29 us |
| 4 |  500 MHz | 1.586 V | 2.28 us |
| 3 |  375 MHz | 1.357 V | 2.29 us |
| 2 |  250 MHz | 1.129 V | 2.28 us |
| 1 |  125 MHz | 0.900 V | 2.29 us |

A single step takes the link down for about 2 300 router cycles, which is
longer than the fast scaling period of a busy link. That is why the channel
counts no link cycles while it is down.

Toward the router the channel offers a 4-flit transmit FIFO and a `ready`
signal. `ready` is high while three slots are free, which covers the two flits
that may already be past switch allocation in the router. The channel
controller counts a link cycle as busy when a flit leaves the FIFO in it.

## The router (`vc_router`)

A five-port (local, N, E, S, W) virtual-channel router with two VCs per port,
64 flits per VC (128 per input port), 32-bit flits and credit-based flow
control. Packets are five flits: a head and four body flits, the last of them
marked tail. Each flit carries sideband fields next to its 32 data bits: valid,
type (head / body / tail / head+tail) and VC. A head flit carries its
destination in `data[3:0]` (X) and `data[7:4]` (Y).

Each input VC goes through four pipeline stages:

1. **Routing** (in the VC's own state machine): a head at the front of an
   idle VC gets its output port by X-then-Y routing.
2. **VC allocation** (`vc_allocator`): per output port, one requesting input
   VC wins round-robin and gets the lowest-numbered free output VC.
3. **Switch allocation** (`switch_allocator`): separable and input-first.
   Each input port picks one of its ready VCs, then each output port picks
   one of those input ports, both round-robin. A VC is ready when it has a
   flit, a downstream credit for its output VC and `out_ready` from the
   channel. The winner leaves the buffer into a per-port traversal register,
   and a credit goes back upstream.
4. **Crossbar traversal** (`crossbar`): from the traversal registers into the
   output registers, with the output VC written into the flit.

A lone head flit written into a buffer at clock edge t is on `out_flit` after
edge t+4. The tail releases the output VC. Input buffers (`input_buffer`) are
one FIFO per VC, with assertions that no VC is written when full. A second
assertion checks that no credit count exceeds the buffer depth.

## The mesh (`dvs_mesh`, the top)

`K x K` routers (K = 8), node n at x = n mod K, y = n div K. North is y-1 and
east is x+1. Every mesh output port drives its own `dvs_channel` into the
neighbour's opposite input port. Credits go back on a plain wire that is not
voltage-scaled. Boundary ports are unused, since X-Y routing never selects
them. Router coordinates are inputs, so all 64 routers are one module.

Ports, all per node and indexed by node number:

| port | dir | meaning |
|------|-----|---------|
| `inj_flit[n]` | in | flit into the local input port; the source must hold a credit for its VC (64 per VC after reset) |
| `inj_credit[n]` | out | one credit per flit that left the local input buffer |
| `ej_flit[n]` | out | flit delivered at node n; ejection is immediate, its credit returns at once |
| `link_level[n][d]` | out | frequency level of the channel leaving n toward d (0 N, 1 E, 2 S, 3 W); 0 at the boundary |
| `link_mv[n][d]` | out | its supply voltage in mV |
| `link_up[n][d]` | out | low during a voltage transition |
| `link_busy[n][d]` | out | a flit left on it this cycle |

## Parameters

| module | parameter | default | meaning |
|--------|-----------|--------:|---------|
| `dvs_mesh` | `K` | 8 | mesh radix |
| | `DEPTH` | 64 | flits per VC |
| `dvs_mesh`, `dvs_channel`, `dvs_history_ctrl` | `H` | 50 | history window, link cycles |
| | `VS_FAST`, `VS_SLOW` | 16, 32 | windows between fast / slow scaling events |
| `dvs_channel`, `dvs_history_ctrl` | `W_K` | 2 | W = 2^W_K - 1 |
| | `T_LOWEST_PM` .. `T_HIGHEST_PM` | 100, 300, 400, 900 | thresholds in per mille |
| `dvs_channel`, `supply_regulator` | `SLEW_CYCLES_PER_MV` | 10 | 0.1 V/us at a 1 GHz clock |
| `dvs_channel` | `LINKS`, `MUX`, `FIFO_DEPTH` | 8, 4, 4 | links per channel, bits per link cycle, transmit FIFO |
| `vc_router` | `NVC`, `DEPTH` | 2, 64 | VCs per port, flits per VC |

Shared types, the routing function and the level-to-voltage function live in
`noc_pkg`. That package also fixes the 32-bit flit, the 4-bit coordinates and
the eight frequency levels.

## What follows the source design and what does not

Taken from the design as specified: the algorithm and all its published settings
(H, W, the two schedules, the four thresholds); the counter-plus-adder
structure with the shift division; 8x8 mesh; two VCs and 128 flits per input
port; four router stages; five-flit packets of 32 bits; eight links per
channel with 4:1 multiplexing; 125 MHz to 1 GHz, 0.9 V to 2.5 V; 0.1 V/us
continuous transitions with the link down meanwhile.

Choices made here, where the specification is silent or leaves options open:

* **When the predictor runs.** The algorithm's loop reads "while the fast or
  slow signal", while the prose says scaling happens once every 16 or 32
  history intervals. Here the prediction is updated every window, and only the
  scaling step waits for the chosen signal.
* One 125 MHz frequency step per scaling event. Eight levels, voltage linear
  in frequency between the end points.
* X-then-Y routing (the original evaluation allowed several deterministic
  and adaptive algorithms). Round-robin separable allocators.
* Transmit FIFO and `ready` in each channel. Credits on an unscaled wire.
  Sideband flit fields.
* The analog parts (transmitter, line, receiver, clock recovery, synthesizer,
  regulator) are represented by their digital effect: a lane split, a
  register, a clock enable and a millivolt counter. No encoding overhead
  (8b/10b) is modelled.
* Power is not computed in RTL. The mesh testbench estimates it, as described
  below.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_dvs_history_ctrl` | integer reference model of the algorithm at the published settings, window by window (prediction, trend, schedule, level), with non-link cycles interleaved; all branches and both level limits reached |
| `tb_freq_synth` | exactly L link cycles in every 8 router cycles, for each level |
| `tb_supply_regulator` | target voltages, slew never faster than 1 mV / 10 cycles, transition time = 10 cycles per mV |
| `tb_dvs_channel` | in-order data integrity, 1 flit/cycle at 1 GHz, 1 per 8 cycles at 125 MHz, no flit while down, scaling all the way down and back up |
| `tb_input_buffer`, `tb_crossbar`, `tb_vc_allocator`, `tb_switch_allocator` | reference models, round-robin fairness, one grant per port |
| `tb_vc_router` | X-Y output port, whole in-order packets per output VC, credit limits, 4-cycle head latency, credit stalls and VC-allocation waits |
| `tb_dvs_mesh` | full 8x8 network at default parameters under a task workload (below) |
| `tb_dvs_mesh_workload` | latency and link power over a load sweep with 100 and 50 tasks (below) |

`tb_dvs_mesh` keeps 100 communication tasks alive at random nodes. Each task
lasts about 20 000 cycles and creates 5-flit packets as a Bernoulli process
with uniformly random destinations. The run has 30 000 light cycles, then
20 000 heavy cycles, then a drain. The testbench checks that every packet
arrives once, whole and in order at the right node. It requires each of these
to happen at least once: frequency step up and down, a link down in
transition, scaling on the fast and on the slow schedule, a credit stall at
injection, and a full channel FIFO holding a router back. It also reports
mean latency and link energy against the same channels held at 1 GHz. Link
power per level is interpolated in f*V^2 between 23.6 mW and 200 mW per link.
Each transition adds C(1-u)|V2^2 - V1^2|, with a 5 uF regulator filter
capacitor and 90 % efficiency. A typical run (about 2 minutes) reports a
link-energy saving near 3.8x. Latency is high, over 1 800 cycles on average,
because the light phase leaves most channels at low frequency and each step
back up costs about 2 300 cycles of link downtime. The tasks are far shorter
than the millisecond-long tasks of the original evaluation, so the run is a
functional exercise of the mechanisms, not a reproduction of its figures.

`tb_dvs_mesh_workload` sweeps the same task workload over load, with 100 and
with 50 tasks, each point 20 000 cycles of injection followed by a full
drain. It checks delivery the same way and prints, per point, mean packet
latency, average link power and the saving against 1 GHz links. A typical
run (about 1.5 minutes of simulation):

| tasks | offered load (packets/cycle) | mean latency (cycles) | link power (W) | saving |
|------:|-----------------------------:|----------------------:|---------------:|-------:|
| 100 | 0.05 | 821 | 172.0 | 2.08x |
| 100 | 0.20 | 2108 | 141.1 | 2.54x |
| 100 | 0.40 | 9029 | 115.9 | 3.09x |
| 50 | 0.05 | 859 | 164.4 | 2.18x |
| 50 | 0.20 | 3598 | 133.6 | 2.68x |
| 50 | 0.40 | 10496 | 119.0 | 3.01x |

The 224 mesh channels of eight links each, held at 1 GHz, would draw
358.4 W. Power is averaged over the whole point, injection and drain
together. At the higher loads the drain is long and runs mostly at low
levels, which is why the saving rises with load in this short-task setting,
while latency grows steeply from queueing and from the link downtime of each
upward step. Heavier loads saturate the network and do not drain within the
test's limits, so they are not run.

To simulate a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/noc_pkg.sv tb/tb_dvs_mesh.sv --top-module tb_dvs_mesh
    ./obj_dir/Vtb_dvs_mesh

Replace `tb_dvs_mesh` by any other testbench name. All testbenches reset or
initialise everything they read and use only `$urandom`, so they run on a
two-state simulator.
