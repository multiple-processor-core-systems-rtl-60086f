# Spiking-neuron output layer with on-chip Hebbian learning

This is the output layer of a spiking neural network (SNN) that sorts images into three
classes and learns on the chip. The intended inputs are RGB images made from the wavelet
transform of an EEG signal. The three classes are "motion detected", "noisy signal" and
"no motion".

Each class has one output neuron. A neuron is a *soma* with one *synapse* for every colour
component of every pixel. Each pixel component fires once in a frame of 37 timesteps, and
the firing time encodes its value. A soma adds up the weights of the synapses that fire in
each timestep. It spikes when its membrane potential passes a threshold. The soma that
spikes first names the class.

During training, a learning pass follows the frame. It changes the weight of every synapse
that fired within five timesteps of its soma's spike.

A 128×128 RGB image needs 3 × 16384 = 49152 synapses per soma, or 147456 for the layer.
That is far more than can be built as separate logic. So the synapses are kept in memories:

- One memory holds the firing times of the inputs. It is shared by the three somas.
- Each soma has its own weight memory.

Each memory has 4096 words of 12 synapses. Small units sweep the memories once per
timestep. The three somas work in parallel, and each handles 12 synapses per clock.

The input encoder is outside the RTL. It turns pixel values into firing times using
overlapping receptive fields ("sensitivity profiles"), and in the original system it runs
as software on the FPGA's embedded processor. Here the host writes firing times into the
input memory and paces the timesteps.

## A frame, timestep by timestep

`snn_control` runs a frame as 37 timesteps. Each timestep has three phases:

| phase | clocks | what happens |
|-------|--------|--------------|
| alpha | 1 + wait | The host ends input encoding for this timestep by raising `enc_valid`. The synapse sums are cleared. |
| beta  | 4096 + 1 | Words 0..4095 of the input memory and of all three weight memories are read, one word per clock. Each `synapse_unit` adds the weights of the lanes whose firing time equals `t_now`. One extra clock covers the read latency. |
| gamma | 1 | Each `soma` adds its sum to its membrane potential (MP). If the MP is greater than `threshold`, the soma spikes, stores `t_now` as its firing time, clears its MP and ignores input for the rest of the frame. |

A frame without learning takes `1 + 37 × 4099 = 151664` clocks, plus any clocks that the
alpha phase waits for the host. The `phase` output is a `phase_t` value, so a waveform
viewer shows it by name.

A synapse's output is its bare weight during the timestep in which its input fires. The
network model behind the design also has per-terminal delays and a response kernel; those
are not built here.

## The learning rule

Let `d = t_synapse − t_soma` be the time from the soma's spike to the synapse's firing.
Only synapses with |d| ≤ 5 change. The maximum change is ΔW, and the change shrinks by ΔW/6
per timestep of distance:

| d | −5 | −4 | −3 | −2 | −1 | 0 | +1 | +2 | +3 | +4 | +5 | other |
|---|----|----|----|----|----|---|----|----|----|----|----|-------|
| change, in units of ΔW/6 | −1 | −2 | −3 | −4 | −5 | −6 | +5 | +4 | +3 | +2 | +1 | 0 |

- Synapses that fired in the same timestep as the soma, or up to five timesteps before it,
  are weakened.
- Synapses that fired up to five timesteps after it are strengthened.
- The full ΔW goes only to a synapse that fired together with the soma.

This is the reverse of the usual spike-timing rule; it is the rule the original design
specifies. `learn_rule` applies the rule to the 12 lanes of a word at once. Its defaults are
ΔW = 12 (steps of 2) and 8-bit unsigned weights, with results clamped to 0..255.

## The LEARN state machine

`learn_unit` implements the learning pass. Its states keep the names of the original state
diagram:

```
L_IDLE --en--> L_CHECK_OUT --soma_counter < 3--> L_POSITION --learn this soma--> L_READ_IMP
   ^               |  ^                              |
   +---- done -----+  +------ next soma -------------+ (not fired, masked out, or swept)

L_READ_IMP --addr_counter < 4096--> L_ADDR_INC --> L_COMP --word in window--> L_READ_WEIGHT
     ^  |                          (addr_counter++)   |                            |
     |  +--addr_counter = 4096--> L_POSITION          | no lane in window          v
     +-----------------------------------------------+---- L_WRITE_WEIGHT <-- L_ADD_SUB
```

The unit visits the somas in order using `soma_counter`. It sweeps a soma only if that soma
fired in this frame and is selected by `learn_mask`.

The sweep reads each input-memory word and compares its 12 firing times with the soma's
firing time (its "moment"). It reads, updates and writes back the weight word only if at
least one lane falls inside the window. So most words cost three clocks, and a word that
changes costs six.

A whole pass takes `2 + Σ` clocks. Each soma adds 2 if it is passed over, or
`4 + 3·4096 + 3·H` if it is trained and `H` of its words change. That is at most 73743
clocks for three trained somas. `n_learn_updates` counts the words written.

The pass runs once, after the last timestep of a frame started with `train = 1`. The rule
needs activity from up to five timesteps after the spike, and each soma spikes only once per
frame. So one pass at the end gives the same weights as updating during the frame.

`learn_mask` is how the supervisor takes part. For example, a trainer can set only the bit
of the soma that matches the label.

## Memory organisation

| memory | count | words × bits | content |
|--------|-------|--------------|---------|
| `impulse_mem` | 1 | 4096 × (12 × 6) | firing timestep of 12 inputs per word; `6'h3F` means the input is silent |
| `weight_mem`  | 3 | 4096 × (12 × 8) | weights; lane *i* belongs to the input in lane *i* of the same impulse word |

That is 1 474 560 memory bits in total. Both memory types are synchronous RAMs with one
clock of read latency.

- `impulse_mem` is simple dual-port. The host writes it and the layer reads it.
- `weight_mem` is single-port read-first. It is shared, in this order of priority, by the
  learning unit, the beta-phase sweep and the host when the layer is idle.

The layout of pixels onto addresses and lanes is up to the host. The only requirement is
that the same (address, lane) means the same input in both memories.

## Using `snn_top`

1. With `busy` low, write the weights through `h_w_en / h_w_we / h_w_sel / h_w_addr /
   h_w_wdata`. Read them back the same way: data appears on `h_w_rdata` one clock later.
2. Write the input firing times through `h_imp_wr_en / h_imp_addr / h_imp_data`.
3. Set `threshold`, then pulse `start`. `train` and `learn_mask` are sampled together with
   `start`.
4. Drive `enc_valid` high whenever the host is ready for the next timestep. Tie it high if
   the inputs are fixed for the whole frame.
5. Wait for the `frame_done` pulse. The outputs `fired`, `fire_time`, `class_id` and
   `class_valid` stay valid until the next `start`. `spike` pulses for one clock right after
   the gamma phase in which a soma fires. `mp` shows the membrane potentials.

The host must not access the memories while `busy` is high. An assertion in `snn_top`
reports a violation. Reset (`rst_n`) is asynchronous and active low. It clears all control
state but not the memories.

## Files

| file | contents |
|------|----------|
| `rtl/snn_pkg.sv` | sizes, learning constants, `phase_t`, `lstate_t` |
| `rtl/snn_top.sv` | the layer: memories, three synapse units and somas, learning unit, control unit, earliest-spike read-out |
| `rtl/snn_control.sv` | timestep and phase sequencer |
| `rtl/synapse_unit.sv` | per-soma weighting and summing of the firing inputs |
| `rtl/soma.sv` | membrane potential, threshold, spike, firing time |
| `rtl/learn_unit.sv` | LEARN state machine |
| `rtl/learn_rule.sv` | combinational weight change for one word |
| `rtl/impulse_mem.sv`, `rtl/weight_mem.sv` | the memories |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_snn_top_full.sv` at full size |

The default parameters are `N_SOMA = 3`, `N_ADDR = 4096`, `N_LANE = 12`, `N_STEP = 37`,
`WIN = 5`, `W_W = 8`, `T_W = 6` and `DW = 12`. All are parameters of `snn_top`. The
accumulator width `ACC_W = W_W + log2(N_ADDR·N_LANE)` (24 bits by default) is derived from
them, so no sum can overflow. `T_W` must satisfy `2^T_W > N_STEP`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example:

```
verilator --binary --timing --assert -Irtl rtl/snn_pkg.sv tb/tb_snn_top.sv --top-module tb_snn_top
./obj_dir/Vtb_snn_top
```

Use the same command for any other `tb/tb_<module>.sv`.

- `tb_snn_top` runs 16 frames with 64-word memories. It mixes training and inference
  frames, full and partial learning masks, and host stalls in the alpha phase.
- `tb_snn_top_full` runs two training frames and one inference frame at the default sizes.
  It takes about 15 s.
- `tb_snn_workload` trains the 64-word layer on generated three-class band images. It
  checks every frame against the reference model and reports the classification accuracy.
  With random starting weights, a fixed threshold and a plain latency code in place of the
  receptive-field encoder, the accuracy on this small stand-in set stays near chance (3 of
  12). The bench exercises the mechanism; it does not reproduce the original results.

All three top-level benches carry a behavioural reference model. It checks:

- every soma's firing time;
- the class;
- every weight after each learning pass;
- the clock count of each frame.

`tb_snn_top` also counts each mechanism (stall, spike, silent soma, masked soma, weight
decrease, increase and clamping) and fails if one never occurs; the other two require the
subset their stimulus can reach. The unit testbenches check the
modules one at a time, including the cycle-count formulas above.

## How far this follows the original design, and where it departs

These parts are taken from the original design:

- three somas;
- inputs encoded as firing times within a 37-timestep frame;
- the alpha / beta / gamma phases;
- synapses that weight the incoming pulses;
- somas that integrate and fire above a threshold;
- the ±5-step learning window, with weakening up to and including the spike time,
  strengthening after it, and steps of ΔW/6;
- a learning unit that sweeps 4096 addresses per soma, with the state names above;
- about 150 000 synapses in total.

These are choices of this implementation:

- **Sizes not given in the original.** These are 12 synapses per word, derived from a
  128×128 image, 8-bit weights, 6-bit time codes, ΔW = 12 and clamping.
- **Memory layout and schedule.** This covers the memory organisation and the clock-level
  schedule of every phase.
- **Soma behaviour.** The soma has no leak, resets to zero on a spike and spikes once per
  frame.
- **Supervision.** The learning mask is the way supervision is applied. The original only
  calls the rule "supervised".
- **Read-out.** The class is taken from the earliest spike.
- **Two decisions in the state diagram.** The meaning of the test after `L_POSITION`
  ("does this soma have a moment to learn from") and of the test after `L_COMP` ("does any
  lane fall in the window") were filled in here. The original does not explain them.
- **When learning runs.** The learning pass runs after the frame. The original lists
  learning as part of the beta phase, but also defines the rule over the whole frame.
- **Dedicated somas.** The somas are dedicated logic. One description of the original
  system puts the soma algorithm on processor cores; another calls the output neurons
  parallel units. This design follows the second.

These parts are not built:

- the input encoder and the embedded processor that runs it;
- the wavelet preprocessing;
- synaptic delays and the response kernel.

The classification accuracy reported for the original system depends on that encoder and on
its training schedule, and has not been reproduced here. Nothing in this RTL has been mapped
to an FPGA. Synthesis was only used to check that the code is synthesizable and to count
memory bits: 1.47 Mbit, which fits the 68 block RAMs of a Virtex-5 FX30T.
