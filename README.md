# Pulse-reactive spiking neural network in SystemVerilog

This is a small spiking neural network in plain synchronous logic. The
neurons exchange binary spikes rather than numbers. A spike crossing a synapse
adds that synapse's 4-bit weight to the receiving neuron's 8-bit membrane
potential. Nothing in the datapath multiplies: a weight is either passed on or
not, and every other operation is an add, a subtract, a compare or a shift. So
each synapse and each soma is cheap, and the whole network runs fully in
parallel. A host loads inputs, trains the weights and reads them back through
three 8-bit ports.

The network is a 32-24-4 layered net built to control a process: it decides
from a 32-line input pattern whether a gas flow into a vacuum chamber is too
high or too low. It follows the architecture published in "Hardware spiking
neural networks: parallel implementations using FPGAs". The last section lists
where this RTL fills gaps in that description or departs from it.

## The neuron: a pulse-reactive soma

Each neuron is a two-state Moore machine (operational or refractory) around an
8-bit membrane potential (MP). Its parameters are shared by the whole network
and set by the host: threshold THP (reset value 90), resting potential REST
(10, about 4 % of full scale), SLOPE (1) and time-frame length FRAME (16).

The potential changes only on a time-step strobe:

| condition (in this order) | new MP | new state |
|---|---|---|
| refractory | one SLOPE step towards REST (inputs ignored) | operational once MP reaches REST |
| operational, candidate MP > THP | 0 (hyperpolarised), and the neuron emits a spike | refractory |
| operational, last step of a time frame | REST | operational |
| operational, some input | candidate = clamp(MP + Σ active weights − inhibition, 0, 255) | operational |
| operational, no input | one SLOPE step towards REST, from above or below | operational |

Some consequences that are easy to miss:

- The soma only fires when enough input arrives close together. A weak input
  repeated on several steps still adds up, because decay only happens on steps
  with no input at all. The time frame sets the limit: FRAME steps after a frame
  starts, whatever has built up is thrown away (MP returns to REST). Setting
  FRAME to 0 disables this.
- After a spike the MP is 0, below REST. The refractory period is how long it
  takes to climb back, REST/SLOPE steps (10 steps with the defaults). No input
  counts during that time.
- The threshold test is strict (MP > THP) and is made on the candidate value.
  A spike therefore appears on the same step as the input that causes it.

The soma is split into the same parts as the original design.
`soma_synin` is the adder of the 32 synapse outputs (9-bit sum).
`soma_mpcu` holds the MP, the state machine and the frame counter.
`soma_comparator` is the threshold test. `soma` adds the registers for the
axon spike and for the activity used in learning.

## Synapses and learning

A synapse (`synapse`) has two parts. The first is a "pulse multiplier": while
the presynaptic spike is present it outputs its weight, otherwise 0. The second
is a learning unit that changes the weight once per learn strobe:

    w <- clamp(w + eta * dw, 0, 15),   eta = 2^-k,  k = 0..3 (default 2)

Weights run from 0 to 15, where 15 is the rules' maximum of 1. `x` means the
synapse's input spiked since the last learn strobe. `y` is the postsynaptic
activity: the neuron's own spikes since the last learn strobe or, in
supervised mode, a teacher bit from the host.

| rule (ctrl[3:2]) | x=1, y=1 | x=0, y=1 | x=1, y=0 | x=0, y=0 |
|---|---|---|---|---|
| 0 simple Hebb | + eta(15−w) | – | – | – |
| 1 postsynaptic | + eta(15−w) | − eta·15 | – | – |
| 2 presynaptic | + eta(15−w) | – | − eta·w | – |
| 3 covariance | + eta(15−w) | − eta·w | − eta·w | + eta(15−w) |

Each step is rounded up to at least one LSB, so a weight can always reach 0 and
15. Weights never leave 0..15, which keeps them below their maximum and keeps
them positive. The covariance rule's F(x, y) = tanh(4(1−|x−y|) − 2) is ±0.96
for binary activities, and is used as ±1.

The training used for the process controller is supervised Hebb learning: the
postsynaptic rule with teacher bits. When a neuron's teacher bit is set,
synapses whose inputs were active strengthen and all others weaken. When the
bit is clear, nothing changes.

**Learning windows.** Presynaptic and postsynaptic activity are latched from
step strobes and cleared only by a learn strobe that reaches the neuron. The
learn strobe reaches it only when learning is enabled. Learning enabled on every
step therefore means learning from single steps. Enabling it only on the last
step of a pattern presentation means learning from the whole presentation. Use
the second form to train the output layer: hidden spikes reach the output
layer one step after the input spikes, so a one-step window never sees input
and output activity together.

## The network and its timing

`snn_top` builds 24 hidden and 4 output `neuron`s with 32 synapses each, the
global inhibitory module, and the host interface.

- Hidden neuron h, synapse i, has input line i as its presynaptic input.
- Output neuron o, synapse i, has hidden neuron i as its presynaptic input.
  Synapses 24–31 of the output neurons have no presynaptic neuron and stay
  silent.
- Neuron numbers for pointers and teacher bits: the hidden neurons are 0–23 and
  the output neurons are 24–27.

A time-step takes two clocks: a `step` strobe, then a `learn` strobe. On the
step strobe every soma updates from the current input pattern (hidden layer)
or from the hidden spikes registered on the previous step (output layer). An
input volley at step n therefore gives hidden spikes at step n and output
spikes at step n+1.

## Global inhibition (optional)

`inhibitory_module` replaces one inhibitory dendrite per neuron with a single
shared potential:

    DP[n] = min(255, max(DP[n-1] - slope, 0) + w_inh * (number of neurons that spiked in step n-1))

DP is subtracted from every operational neuron's potential on each step where
it is non-zero. Spikes of step n−1 therefore inhibit at step n+1. The original
hardware did not use this module; it was only proposed there. It is off after
reset (ctrl bit 6), so the network then has only excitatory synapses, as in the
original.

## Host interface

The host drives three 8-bit ports: `host_addr`, `host_wdata` with the strobe
`host_wr`, and `host_rdata`. `host_rdata` is valid on the clock after a
`host_rd` strobe. The host must not read and write in the same cycle; an
assertion checks this.

| address | access | contents |
|---|---|---|
| 0x00–0x03 | R/W | input spike pattern, byte k = inputs 8k..8k+7 |
| 0x08–0x0B | R/W | teacher bits, byte k = neurons 8k..8k+7 |
| 0x10 | R/W | [0] learn enable, [1] supervised, [3:2] rule, [5:4] eta shift k, [6] inhibition enable (reset 0x26) |
| 0x11–0x14 | R/W | THP, REST, SLOPE, FRAME |
| 0x15, 0x16 | R/W | inhibitory weight (4 bits), inhibitory decay slope |
| 0x17, 0x18 | R/W | neuron pointer, synapse pointer |
| 0x19 | R/W | weight at (neuron, synapse); the synapse pointer then increments |
| 0x1A | R | MP of the pointed neuron |
| 0x1B | R | output spikes of the last step |
| 0x1C | R/W | write N: run N time-steps; read: steps left |
| 0x1D | R | global inhibitory potential |

A typical session follows the four phases of the original experiments:

1. Deliver the input spikes (0x00–0x03).
2. Run time-steps, with learning on or off (0x10, 0x1C).
3. Read the weights: set both pointers, then read 0x19 32 times.
4. Read the membrane potentials (0x17, 0x1A).

The input pattern stays applied on every step until it is changed. For
single-volley input, write the pattern, run one step, then write zeros.
`busy` and `out_spikes` are also top-level outputs.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the RTL
with its own integer model, written separately from the RTL, and ends with a
`TB_RESULT checks=… failures=…` line.

`tb_snn_top` runs the whole network at its default size, through the host
ports only:

- It loads random initial weights and reads them back.
- It trains with supervised Hebb learning on 24 random patterns. A "too high"
  pattern has 80 % ones in its upper 16 lines and 10 % in its lower 16; a
  "too low" pattern is the reverse. Output neurons 0 and 1 are taught "too
  high" and 2 and 3 "too low"; hidden neurons 0–11 "too high" and 12–23 "too
  low".
- It reads back every weight and membrane potential.
- It tests recall on 16 new patterns. At least 75 % must light exactly the
  right pair of outputs; the current seed gives 15 of 16.
- It runs each of the four rules unsupervised, with short time frames and with
  global inhibition on.

A step-level model of the network predicts every output spike, MP and weight
that is read back. The test also counts each mechanism: spikes in both layers,
refractory exits, decay, recovery, frame ends, saturation, inhibition, and
weight increases and decreases under each rule. A mechanism that never happens
is counted as a failure. The run takes about 45 s.

`tb_snn_experiments` repeats two measurements from the original hardware on
the full network:

- **Weight traces.** Neuron 0 is taught with only the most significant input
  group active. Its active-group weights must rise 8, 10, 12, 13, 14, 15, and
  all its other weights must fall 8, 4, 0.
- **MP trace.** With THP 90 and REST 10, neuron 0's potential must rise by 15
  per step to 90, fire and drop to 0, recover to 10, and repeat. That gives a
  spike every 16 steps.

To simulate with Verilator (5.x):

    verilator --binary --timing --assert -Irtl rtl/snn_pkg.sv tb/tb_snn_top.sv --top-module tb_snn_top
    ./obj_dir/Vtb_snn_top

Use the same command for any other testbench: replace `tb_snn_top` with its
name. Verilator finds the modules in `rtl/` through `-Irtl`.

Coarse synthesis of the default top gives about 35.7 k word-level cells and
5,133 flip-flops. 3,584 of those flip-flops are weights, and most of the rest
are the per-synapse activity latches and the per-neuron state.

## Choices made here, and departures from the original

- **Neuron count.** The original gives both "32 cell bodies" and a 32-24-4
  topology, which has only 28 neurons. This RTL follows the topology, so 28
  somas are built. Setting `N_HID = 28` builds 32 somas. The output neurons'
  spare synapses are left unconnected.
- **Clocking.** The original soma samples its synapses on the falling clock
  edge. Here everything uses the rising edge, with separate step and learn
  strobes, so a time-step takes two clocks. The original does not give the
  length of a time-step.
- **FPGA mapping.** The original packs the MP unit into block RAM and builds
  the synapses from vendor primitives. This RTL is plain, portable logic.
- **Not given by the original, chosen here:**
  - the exact form of the pulse multiplier (weight gating);
  - the learning rate as a power of two and the rounding;
  - the reset weight, 8;
  - the decay slope, 1;
  - ignoring inputs while refractory, and ending the refractory state when MP
    reaches REST;
  - the time-frame behaviour: return to REST after FRAME steps without a spike;
  - how the teacher enters the learning rule: it replaces the postsynaptic
    activity;
  - the whole register map and the reset values other than THP 90 and REST 10.
- **Covariance rule.** The original's prose contradicts its own formula about
  the sign of F. The formula is followed: similar activity strengthens a
  synapse.
- **Inhibitory module.** The original writes the decay of the global
  inhibitory potential both as a slope and as a multiplying factor. The slope
  is used here, since it needs no multiplier.
- **Not built.** Side connections between the feeding dendrites of one layer
  were offered in earlier work as a way to synchronise its neurons. They are
  not part of this network. The host PC program, the data acquisition board and the
  prototyping board's memories, CPLD and oscillator are outside the network.
  The host ports stand in for them.
