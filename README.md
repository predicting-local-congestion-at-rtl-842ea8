# Spiking-network congestion predictors for a 4x4 mesh network-on-chip

In a mesh network-on-chip, congestion starts locally: flits queue in a
router's input buffers, the buffers fill, and back-pressure spreads to the
neighbours. An adaptive routing function that only knows "congested / not
congested" for each candidate next hop cannot choose between two hops that are
both over a threshold. This design instead predicts, for every router, a
*level*: how many of its input-buffer slots will be occupied, on a 0..20
scale (five input buffers of four slots each). A routing function can then
send a packet towards the least-occupied candidate.

The predictors are small spiking neural networks (SNNs) built from leaky
integrate-and-fire (LIF) neurons. Their weights are trained offline (with
SpikeProp, on occupancy traces recorded from a cycle-accurate NoC simulator,
so that the output predicts the occupancy some 30 NoC cycles ahead) and
loaded into the hardware at run time. The RTL is the inference hardware: it
takes the current buffer occupancies, runs the network, and produces one
predicted level per router.

The scheme follows the router-model / network-model congestion predictors of
A. Javed, J. Harkin, L. McDaid and J. Liu, "Predicting Local Congestion at
Fine-grain Levels in Networks-on-Chip Using Spiking Neural Networks". The
digital neuron, the spike coding, the timing and the weight interface are this
design's own, as described below.

## Two predictors, side by side

`congestion_predictor_top` holds both models; they share the occupancy inputs,
the frame strobe and the weight port, and each has its own outputs.

| | router model (`router_model_predictor`) | network model (`network_model_predictor`) |
|---|---|---|
| networks | one per router, 16 | one for the whole mesh |
| inputs | the router's own buffer levels (BOL), 0..4 each | every router's occupancy level (ROL = sum of its five BOLs), 0..20 |
| size | (3..5) x 15 x 1 | 16 x 30 x 16 |
| output | that router's level | a level for each of the 16 routers |
| LIF neurons (hidden + output) / weights | 16 x 16 = 256 / 1200 | 46 / 960 |
| latency ntf -> valid | 29 clock cycles | 46 clock cycles |

In the router model the number of input neurons depends on where the router
sits: a corner router has two neighbours plus its core port (3 inputs), an
edge router 4, an inner router 5. The network model sees the whole mesh and
can use the occupancy of neighbours, which the router model cannot; it also
needs fewer neurons in total. Both are fully connected, three layers deep;
the input layer is the spike encoder, one channel per input value, so only
the hidden and output layers hold LIF neurons.

## Mesh conventions

* Router `r` is at column `r % 4`, row `r / 4`, with row 0 at the bottom.
* `bol[r][p]` is the occupancy of router `r`'s input buffer `p`, with
  `p` = 0 north, 1 west, 2 south, 3 east, 4 core (`P_N` ... `P_C` in
  `snn_pkg`). Ports a border router does not have should read 0; the router
  model ignores them, the network model adds them into the ROL.
* The router model's networks take their present ports in that order, so
  input neuron 0 of a corner router at the bottom left (router 0) is its
  north buffer, input 1 its east buffer, input 2 its core buffer.

## A prediction frame

Each prediction is one *frame* of three phases (`snn_frame_ctrl`):

```
            ntf
clk  _|‾|_|‾|_|‾|_ ...
phase  IDLE | T_i (VMAX+1) | T_p (T_P=3) | T_o (LMAX+1 = 21) | IDLE
spikes        inputs fire     hidden/out    output spike time  valid pulse,
              at VMAX - v     integrate     = predicted level  level updated
```

1. **Sampling.** A one-cycle `ntf` pulse while a model is idle samples the
   occupancy values at that clock edge and starts the frame. `ntf` during a
   frame is ignored (`busy` is high from the first `T_i` cycle to the last
   `T_o` cycle).
2. **Encoding (`spike_encoder`), `T_i`.** Each input value `v` becomes a
   single spike at cycle `VMAX - v` of the input window: a full buffer spikes
   at once, an empty one in the last cycle. `VMAX` is 4 for BOL inputs (a
   5-cycle window) and 20 for ROL inputs (21 cycles).
3. **Processing, `T_p`.** All neurons advance one time step per clock during
   the whole frame. Spikes move one layer per cycle (every neuron's spike is a
   register). `T_p` gives the hidden layer time to respond before outputs are
   read.
4. **Decoding (`spike_decoder`), `T_o`.** Output neuron `k` firing in cycle
   `t` of the output window means level `20 - t`: earlier means fuller. A
   spike before the window saturates to 20, no spike to 0. At the last `T_o`
   cycle the levels are copied to `level` and `valid` pulses in the next
   cycle. `out_spike` shows the output spikes as they happen.

Every neuron fires at most once per frame and all state is cleared at the
start of the next frame, so a frame is a pure function of the sampled values
and the weights. The network model registers the ROL sums and delays `ntf` by
one cycle to match, so both models predict from the same snapshot; this is the
extra cycle in its latency.

The frame lengths are in predictor clock cycles. The networks are trained to
predict the occupancy 30 NoC cycles after the snapshot, so a prediction is
only useful if it arrives sooner. On a shared clock the router model's 29
cycles meet that; the network model's 46 do not, so either clock the network
model at least 1.6 times faster than the NoC, or accept a result that arrives
16 cycles after the predicted instant. A shorter `T_P` helps little: the two
21-cycle windows for a 0..20 input and a 0..20 output dominate.

## The neuron

`lif_neuron` is a discrete LIF neuron with a current-based synapse. With `S`
and `M` the synaptic and membrane shifts, and `syn` the sum of the weights of
the inputs that spiked in this cycle:

```
I <- I - (I >>> S) + syn           synaptic current, time constant ~2^S cycles
u <- u + ((I - u) >>> M)           membrane follows I, time constant ~2^M cycles
if u >= THETA and not yet fired:   spike next cycle, u <- 0, fired <- 1
```

`I` and `u` are 16-bit signed and saturate. The defaults `S = 4`, `M = 3`
make a single input spike produce a slow rise and a long decay, so the firing
time of a neuron depends smoothly on how much weighted input it receives:
strong input fires early, weak input late or never. This is what lets one
output neuron's firing time carry a 21-level value. `THETA` is 64 in both
layers.

`snn_layer` wraps `N_OUT` neurons with a register per synapse (signed 8-bit)
and, per neuron, the sum of the weights of the presynaptic neurons whose spike
is high. It adds one cycle of delay.

## Loading weights

All 17 networks share the `wcfg` port (`wcfg_t` in `snn_pkg`):

| field | meaning |
|---|---|
| `we` | write this cycle |
| `sel` | network: 0..15 router `r`'s network, 16 the network model |
| `layer` | 0 input->hidden, 1 hidden->output |
| `post`, `pre` | postsynaptic and presynaptic neuron index (layer-local) |
| `data` | signed 8-bit weight |

One weight is written per cycle; writes to indices a network does not have
are ignored. Reset clears every weight, so an unloaded network never fires
and predicts 0. Weights may be rewritten between frames. Converting trained
floating-point weights means scaling them so that the threshold maps to
`THETA = 64` and rounding to 8 bits.

## Files

| file | contents |
|---|---|
| `rtl/snn_pkg.sv` | widths, port numbering, `phase_t`, `wcfg_t` |
| `rtl/lif_neuron.sv` | one LIF neuron |
| `rtl/snn_layer.sv` | fully connected layer: weights, input sums, neurons |
| `rtl/spike_encoder.sv` | value -> input spike time |
| `rtl/spike_decoder.sv` | output spike time -> level |
| `rtl/snn_frame_ctrl.sv` | frame phases `T_i`, `T_p`, `T_o` |
| `rtl/snn_predictor.sv` | one complete SNN predictor |
| `rtl/rol_accumulator.sv` | BOL sum -> ROL |
| `rtl/router_model_predictor.sv` | 16 per-router predictors |
| `rtl/network_model_predictor.sv` | 16 accumulators + one 16 x 30 x 16 predictor |
| `rtl/congestion_predictor_top.sv` | both models |
| `tb/snn_ref_pkg.sv` | reference model of neuron and network used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `MESH_X`, `MESH_Y` | 4, 4 | top, both models | mesh size |
| `N_HID` | 15 / 30 | router / network model | hidden neurons |
| `T_P` | 3 | both models | processing phase, cycles |
| `THETA_H`, `THETA_O` | 64 | both models | thresholds |
| `TAU_S_SHIFT`, `TAU_M_SHIFT` | 4, 3 | `snn_predictor` | leak shifts |
| `SLOTS`, `N_PORTS` | 4, 5 | `snn_pkg` | buffer slots, ports per router |

The weight port indexes at most 64 neurons per layer and 256 networks; a mesh
larger than 4x4 needs `LVL_W` widened if the ROL range grows past 31.

## Size

After coarse synthesis (word-level cells, flip-flop bits): the router model
is about 17.7k cells and 18.8k flip-flop bits, the network model about 7.0k
cells and 9.6k flip-flop bits, the whole top 24.5k cells and 28.4k flip-flop
bits. Most of the flip-flops are the 8-bit weight registers (2160 weights)
and the two 16-bit state values of each of the 302 LIF neurons. The network model
costs roughly half of the router model, the same direction as the original
area comparison for analog neurons (network model the smaller of the two).

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself after
a fixed number of cycles. The neuron-level benches compare against
`snn_ref_pkg`, a cycle-by-cycle model written independently of the RTL; the
network-level benches load random weights (with a bias that changes between
runs so that outputs fire early, inside the output window and not at all),
run frames on random occupancies and compare every predicted level, the
`valid` latency and the `ntf`-ignore rule. `tb_congestion_predictor_top` runs
the full-size design at its default parameters and also counts how often
hidden spikes, output spikes inside the output window, early outputs, silent outputs and ignored
`ntf` pulses occurred; it fails if any never did. Simulating it takes about a
minute.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/snn_pkg.sv tb/snn_ref_pkg.sv tb/tb_congestion_predictor_top.sv \
  --top-module tb_congestion_predictor_top -o sim
./obj_dir/sim
```

The two packages are named first; Verilator finds every module through
`-Irtl` by its file name. Replace the testbench file and top name to run
another bench.

`tb_workload_traffic` drives the full-size design from a behavioural 4x4
mesh (single-flit packets, four-slot buffers, XY routing, round-robin output
arbitration) under the transpose1, transpose2, butterfly and shuffle traffic
patterns, 2000 cycles each at an injection rate of 0.5, samples every 60
cycles and checks each prediction of both models against the reference.

What the testbenches cannot show is prediction accuracy: that depends on
trained weights and on real occupancy traces, neither of which is part of this
RTL. With random weights the design is checked to compute exactly what its
equations say, not to predict well.

## How far this follows the original scheme

Taken from the scheme: the two models and their structure (one network per
router on its buffer levels, against one network for the mesh on router
occupancy sums); the layer sizes (3..5 x 15 x 1 and 16 x 30 x 16); a 4x4 mesh
with five ports and four-slot input buffers; LIF neurons; inputs carried as
spike times in an input phase, a processing phase and an output phase whose
spike times carry the predicted levels; one output level per router.

Choices of this design: the digital fixed-point neuron (the scheme's hardware
estimate assumes analog CMOS neurons); the shift-based leaks and the
fire-once rule; the linear spike-time codes and the saturation rules; the
phase lengths; the threshold of 64 and 8-bit weights; the weight port; the
active-low reset that clears everything; the one-cycle ROL register and the
matching `ntf` delay; ignoring `ntf` while busy; router numbering and port
order.

Not included: the NoC routers themselves (the occupancy values are inputs),
the routing function that would consume the predictions, and the training.
