# A multiplier-less spiking reservoir ("cortical column") for FPGAs

This design is a small recurrent network of leaky integrate-and-fire (LIF) neurons
that runs fully in parallel: every neuron and every synapse updates in the same
clock cycle. It is the hardware half of a reservoir-computing system. Speech
features are turned into spike trains in software and drive the reservoir. The
membrane potentials of all neurons (the *reservoir state*) are read out every step,
and a software classifier is trained on them.

The main idea is to build the synapses without multipliers. A conventional synapse
multiplies each input by a weight, so the multiplier count grows with the number of
synapses. Here each synapse is a small logic function of the incoming spike, a
stored weight and a random number from a 6-bit LFSR. The only multiplier left in a
neuron computes the membrane's leak, so the design needs one multiplier per neuron
however many synapses there are.

The default configuration is a reservoir of 8 neurons in three layers (3, 2 and 3
cells), with 2 synapses per neuron and 16 stored weights.

## Number formats

All arithmetic is signed fixed point, named `Fix_W_F` (W bits in total, F of them
fractional). The types are defined in `rtl/reservoir_pkg.sv`.

| quantity | format | 1.0 equals | default value |
|---|---|---|---|
| membrane potential, synaptic sum | Fix_18_12 | 4096 | – |
| threshold `vth` | Fix_18_12 | 4096 | 0.15 → 614 |
| reset level `vreset` | Fix_18_12 | 4096 | 0.001 → 4 |
| decay constant `decay` | Fix_12_8 | 256 | −0.11 → −28 (−0.109) |
| synaptic weight | Fix_4_3 | 8 | −1.0 … 0.875 |
| LFSR random value | Fix_6_6 | 64 | −0.5 … +0.484 |

## The synapse: counter, comparator, AND gate (`pulse_synapse`, `lfsr6`)

Every time step a synapse decides whether to deliver a "1" to its neuron:

* **Pulse counter.** It counts incoming spikes and reports a *hit* on the spike that
  brings the count to `count_target`, then restarts at zero. With
  `count_target = 1` every spike is a hit; with 2, every second spike is.
* **Weight comparator.** It reports a *match* when the synapse's LFSR value equals
  the stored weight, both read as real numbers. In integers, the test is
  `LFSR == 8 × weight`.
* **AND gate.** The synapse pulses when hit and match coincide.

The random source is a 6-bit Fibonacci LFSR with polynomial x⁶ + x⁵ + 1. It walks
through all 63 non-zero values and then repeats. Each synapse has its own LFSR.

Two consequences of this scheme matter when you choose weights:

1. **Only 7 weights can ever match.** The LFSR covers −0.5 … +0.484 in steps of
   1/64, and only the multiples of 1/8 line up with a Fix_4_3 weight. Those are
   weights −4 … 3 in units of 0.125, excluding 0 because an LFSR never holds zero.
   A weight of 0, 4 … 7 or −8 … −5 never matches. Such a synapse is in effect
   disconnected.
2. **A weight selects a phase, not a strength.** All LFSRs step together, and each
   holds a given value once every 63 steps. So a synapse with a matchable weight
   is a gate that opens on one fixed step in every 63. The weight decides *which*
   step, not how often. The LFSRs of the reservoir are shifted copies of the same
   sequence (seed `((23·k) mod 63) + 1` for synapse k), so the gates of different
   synapses are phase-locked to each other. A recurrent connection only carries a
   spike if the source fires on a step when the target's gate is open.
   `tb/reservoir_top_tb.sv` shows how to pick weight pairs so that this happens
   (`align_recurrent_weights`).

A synapse pulse is always excitatory. The sign of the weight only chooses which
random value it matches.

## Accumulation and membrane (`synapse_accum`, `lif_membrane`)

Each synapse pulse stands for 1.0. It is scaled down by a right shift of `SHIFT`
bits (default 3, so a pulse adds 0.125), and an adder chain sums the pulses of a
neuron into V_s.

The membrane is an 18-bit accumulator. On each step:

```
if V_m > V_th :  spike = 1 ;  V_m <= V_reset
else          :  V_m <= sat( V_m + V_s + floor(decay * (V_m - V_reset) / 256) )
```

The product in the `else` branch is the neuron's single multiplier. A negative
`decay` pulls the potential exponentially back towards `V_reset` when no input
arrives, losing about 11 % of the distance per step at the default.

With the default constants, one pulse (0.125) stays below the threshold (0.15).
Two pulses a few steps apart cross it. `spike` is combinational from the
registered V_m. It is high during the step in which V_m is above threshold, and
V_m returns to `V_reset` at the end of that step.

## The reservoir (`lif_neuron`, `weight_regs`, `reservoir_top`)

`lif_neuron` is one cell: `NS` synapses with their LFSRs, the accumulation unit and
the membrane. `reservoir_top` instantiates `N_NEURONS` cells and the weight bank.
It wires every synapse k = n·NS + s to a spike source `SRC[k]`:

* `SRC[k] < N_IN` selects external input `SRC[k]`;
* otherwise it selects the output spike of cell `SRC[k] − N_IN`.

The default wiring puts external input n on synapse 0 of cell n. Synapse 1 carries
the recurrent connections, with layer A = cells 0–2, B = 3–4 and C = 5–7:

| cell | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| synapse 1 reads cell | 5 | 6 | 7 | 0 | 1 | 2 | 3 | 4 |

So A feeds B and C, B feeds C, and C feeds back into A. A spike fired in step t
reaches its target synapse in the same step t.

### Interface and timing of `reservoir_top`

One clock edge with `step` high is one time step. The source design used a 0.125 ms
step. With `step` low nothing advances except weight writes. Reset is synchronous
and active high. It returns every potential to 1 mV, every counter to zero, every
LFSR to its seed and every weight to `WINIT`.

| port | dir | width | meaning |
|---|---|---|---|
| `spike_in` | in | N_IN | external spike trains, one bit per channel per step |
| `vth`, `vreset` | in | 18 | threshold and reset level, shared by all cells |
| `decay` | in | 12 | leak constant, shared |
| `count_target` | in | 5 | pulse-counter target, shared |
| `w_we`, `w_addr`, `w_data` | in | 1, 4, 4 | write weight n·NS+s; visible on the next cycle |
| `vm` | out | N_NEURONS × 18 | membrane potentials: the reservoir state |
| `spike_out` | out | N_NEURONS | which cells fire in this step |
| `syn_pulse` | out | NW | which synapses deliver a pulse in this step |

The usual operation is one sample per reset. Reset, program the weights with `step`
low, then present a sample's spike trains for as many steps as it lasts (a 0.69 s
utterance is 5520 steps). Record `vm` on the steps you want as states; the original
system sampled five states evenly from start to end.

## What follows the source and what is this design's own

These parts follow the published architecture:

* the counter/comparator/AND synapse;
* a 6-bit Fibonacci LFSR as the weight generator;
* the Fix_4_3 weights, the Fix_6_6 random values and the Fix_18_12 membrane;
* the right-shift scaling of synaptic pulses;
* the threshold, reset and decay values (0.15, 1 mV, −0.11);
* one multiplier per neuron;
* 8 cells with 16 synapses in a 3-2-3 arrangement, fully parallel.

These are this design's choices:

* the LFSR taps, the seeds and one LFSR per synapse;
* what the pulse counter is compared with (`count_target`);
* equality read as "equal as real numbers";
* the shift amount (3);
* the Fix_12_8 format of the decay constant and the 5-bit counter;
* the leak written as `decay × (V_m − V_reset)`, with floor rounding and
  saturation;
* the inter-layer wiring, the 8 input channels and the initial weights;
* the weight write port, and the shared programmable constants as ports;
* same-step delivery of recurrent spikes.

The source gives the reset level both as 1 mV and as 0 V. This design uses the
programmable reset register, at 1 mV by default.

Not in the RTL, because they run in software around the reservoir:

* silence removal and LPC feature extraction;
* Poisson spike-train generation;
* state recording;
* the MLP classifier that reads the states.

The testbench generates Poisson spike trains and samples states itself. Larger
reservoirs (15 or 27 neurons) need new `N_NEURONS`, `N_IN`, `SRC` and `WINIT`
values. `tb/reservoir_scaled_check.sv` shows how to compute them: synapse 1 of
cell n reads cell (n − 3) mod N, which is the default wiring for N = 8.

## Files

| file | contents |
|---|---|
| `rtl/reservoir_pkg.sv` | fixed-point types and default constants |
| `rtl/lfsr6.sv` | 6-bit Fibonacci LFSR |
| `rtl/pulse_synapse.sv` | counter / comparator / AND synapse |
| `rtl/synapse_accum.sv` | shift-scaled adder chain |
| `rtl/lif_membrane.sv` | leaky accumulator, threshold, reset |
| `rtl/lif_neuron.sv` | one cell |
| `rtl/weight_regs.sv` | weight register bank |
| `rtl/reservoir_top.sv` | the reservoir |
| `tb/reservoir_ref_pkg.sv` | behavioural reference model of a cell |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/reservoir_scaled_check.sv`, `tb/reservoir_scaled_tb.sv` | the reservoir at 15 and 27 cells |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. The packages must
come first on the command line. For the whole reservoir:

```
verilator --binary --timing --top-module reservoir_top_tb \
  rtl/reservoir_pkg.sv tb/reservoir_ref_pkg.sv \
  rtl/weight_regs.sv rtl/lfsr6.sv rtl/pulse_synapse.sv rtl/synapse_accum.sv \
  rtl/lif_membrane.sv rtl/lif_neuron.sv rtl/reservoir_top.sv tb/reservoir_top_tb.sv
./obj_dir/Vreservoir_top_tb
```

For a single block, use that block's files and testbench in the same way.

`reservoir_top_tb` runs the reservoir at its default parameters. It presents five
6000-step "utterances" of Poisson spike trains, one per input channel with a random
rate. It compares every membrane potential, spike and synaptic pulse on every step
with the reference model. Across the utterances it uses:

* the default constants;
* a lowered threshold;
* a count target of 2;
* weights written outside the matchable range;
* weight pairs aligned for recurrent transmission.

It fails if any of the following never happened: input pulses, recurrent pulses,
firing with reset, leak decay, pulses withheld by the counter, weight writes, or
spikes on a disconnected synapse. It takes about a second.

`reservoir_scaled_tb` builds the reservoir at 15 and 27 cells (30 and 54 synapses).
It checks both against the reference model for 4000 steps, with aligned recurrent
weights. Add `tb/reservoir_scaled_check.sv` to the file list and use
`--top-module reservoir_scaled_tb`.

The block testbenches check:

* the exact LFSR sequence and its period of 63;
* the synapse against a real-number model;
* the accumulation for every pulse pattern;
* the membrane through integration, decay, the fire-and-reset timing, a
  programmable threshold and saturation;
* one cell against the reference model;
* weight writes.
