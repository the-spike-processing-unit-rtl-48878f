# Spike Processing Unit (SPU): a spiking neuron built as a 6-bit IIR filter

The SPU is a digital spiking neuron whose "membrane" is a second-order
infinite-impulse-response (IIR) filter. Input spikes select synaptic weights,
and the weights are summed into a drive signal x[n]. The filter turns x[n] into
a membrane potential y[n], and the neuron fires in every cycle where
y[n] >= Vth. The neuron has no integrate-and-reset rule. What happens after a
spike is set only by the filter's poles and zeros: the potential can decay,
ring below threshold, or cross the threshold again. An input spike can
therefore push the neuron towards firing or away from it, depending on when it
arrives relative to the filter's ringing. Spike timing is the whole of the
computation.

The design is built to be cheap:

- Every number is a 6-bit two's complement integer.
- Every adder saturates to [-32, +31] instead of wrapping.
- Every filter coefficient is one of {0, ±1, ±2, ±1/2, ±1/4, ±1/8}, so each
  "multiplication" is a shift.

The neuron has no multipliers and no lookup tables. A four-synapse neuron
synthesises to about 260 word-level cells and 67 flip-flops.

## Structure

```
 syn_in[0] ─► synapse (w0) ─┐
                            Σ ──┐
 syn_in[1] ─► synapse (w1) ─┘   │
                                Σ ── x[n] ─────────► 0 ┐
 syn_in[2] ─► synapse (w2) ─┐   │                       select (sel) ──► x_soma
                            Σ ──┘   vmem_chain_in ──► 1 ┘
 syn_in[3] ─► synapse (w3) ─┘

 x_soma ──► soma: iir_df2 (b0 b1 b2 a1 a2) ──┬──────────────────► vmem_out
                                             └──► y >= Vth ──────► spike_out

 spu_cfg_regs holds w0..w3, Vth, b0 b1 b2 a1 a2 and sel
```

| module | role |
|---|---|
| `spu_pkg` | sample type, coefficient code, saturating add / negate / power-of-two scale |
| `sat_add` | one saturating 6-bit adder ("summing node") |
| `pow2_gain` | one coefficient: shift, optional saturating negation |
| `synapse` | registers its spike input and outputs its weight for one cycle, or zero |
| `syn_sum` | balanced tree of `sat_add` forming x[n] |
| `input_select` | chooses x[n] or another SPU's membrane potential |
| `iir_df2` | second-order direct form II filter with two 6-bit state registers |
| `soma` | `iir_df2` plus the threshold comparator |
| `spu_cfg_regs` | the ten trainable parameters and the select bit |
| `spu` | the complete neuron (top) |

## The membrane filter

The filter computes

    y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]

in direct form II. That form needs only two 6-bit state registers, `s1` and
`s2`, which hold the internal node v one and two cycles back:

    v[n] = x[n] + ( (-a1)·s1 + (-a2)·s2 )
    y[n] = b0·v[n] + ( b1·s1 + b2·s2 )

In exact arithmetic this form and the textbook equation are the same filter.
At 6 bits with saturation they are not. Every intermediate result is clamped,
so results depend on several choices:

- The form (direct form II, not direct form I).
- The order in which terms are added. The two feedback products are summed
  first and then x is added. The two delayed feed-forward products are summed
  first and then the b0 product is added.
- How each product rounds. This is where the filter's real behaviour is
  decided: limit cycles, ringing that never quite dies, and saturated swings
  that look like large oscillations but are bounded.

Lower orders need no separate hardware. With b1 = b2 = a2 = 0 the neuron
becomes a first-order leaky integrator, v[n] = x[n] - a1 v[n-1] and
y[n] = b0 v[n]. With -1 < a1 < 0 it behaves like a leaky
integrate-and-fire neuron without its reset. Two chained SPUs give fourth
order (see below).

The RTL fixes all three choices. A parameter set trained against a model with
a different adder order or rounding may give a different spike train.

### Coefficient code

Each coefficient is a 4-bit code `{neg, mag[2:0]}` (`coef_t` in `spu_pkg`):

| mag | gain | hardware |
|---|---|---|
| 0 | 0 | constant 0 |
| 1 | 2 | left shift by 1, saturated |
| 2 | 1 | wire |
| 3 | 1/2 | arithmetic right shift by 1 |
| 4 | 1/4 | arithmetic right shift by 2 |
| 5 | 1/8 | arithmetic right shift by 3 |
| 6, 7 | 0 | unused |

Right shifts round toward minus infinity, so -1/2 gives -1. When `neg` is
set, the shifted value is negated with saturation, so -1 × -32 = +31. The
feedback gains -a1 and -a2 are formed by flipping the sign bit of the a1 and
a2 codes.

Rounding toward minus infinity produces small limit cycles. For example,
b0 = 1, a1 = -1, a2 = 1/2 driven by an impulse of 8 gives
8, 8, 4, 0, -2, -2, -1, 0, 1, 1, 1, … and settles at +1, not 0. That is
correct behaviour for this arithmetic, and the filter testbench checks the
first nine values of this sequence.

## Timing

The whole neuron runs on one clock, and each clock period is one time step.

- **Spike to membrane: one cycle.** Each `synapse` samples its spike line on a
  rising edge. For the next cycle, x[n] holds the sum of the weights whose
  spikes were sampled. The filter output y[n] is combinational from x[n] and
  the two state registers. So the membrane value caused by a spike sampled at
  edge k is on `vmem_out` between edges k and k+1. The state then advances at
  edge k+1.
- **Spike output: same cycle as the membrane value.** `spike_out` is the
  unregistered comparison `vmem_out >= Vth`. It stays high for as many cycles
  as the membrane stays at or above threshold. Register it if a downstream
  block needs a clean edge.
- **Chained input: no added cycle.** `vmem_chain_in` passes through the select
  multiplexer straight into the filter. The combinational path is therefore
  the first SPU's filter, then the second SPU's filter, then its comparator.

## Chaining two SPUs: fourth-order dynamics

To chain two SPUs, wire the first SPU's `vmem_out` to the second SPU's
`vmem_chain_in`, then set the second SPU's select bit. The second SPU then
filters the first one's membrane potential in the same cycle, so the pair
behaves as one fourth-order filter (two second-order sections in series). The
pair has one input (the first SPU's synapses) and one output (the second SPU's
comparator). The second SPU's own synapses are ignored while its select bit is
set.

## Reset

There are two reset inputs. Both are synchronous and active high.

- **`rst`** is the neuron's reset. It clears the two filter state registers
  and the synapse input registers, so the membrane returns to 0 on the next
  cycle. It does not touch the parameters, so it can be used to silence
  neurons repeatedly, for example after a winner-takes-all decision, without
  reloading them. The neuron never needs it during normal operation.
- **`cfg_rst`** loads a silent default parameter set: zero weights, zero
  coefficients, Vth = +31 and select = 0.

## Parameters and the configuration port

Each neuron has ten trainable parameters, each stored in 6 bits: four weights,
the threshold and five coefficient codes. A write sets one parameter: drive
`cfg_we`, `cfg_addr` and `cfg_wdata`, and the write takes effect at the next
rising edge. `cfg_rdata` returns the addressed register in the same cycle.

| address (N_SYN = 4) | register | format |
|---|---|---|
| 0-3 | w0-w3 | signed 6-bit |
| 4 | Vth | signed 6-bit |
| 5-9 | b0, b1, b2, a1, a2 | coefficient code in bits 3:0 |
| 10 | select | bit 0: 0 = own synapses, 1 = chain input |

For a different `N_SYN`, the addresses move with it: the weights come first,
then Vth at address `N_SYN`. The address is `$clog2(N_SYN + 7)` bits wide.

The parameters are meant to come from offline training. The intended method
is a particle-swarm search over exactly these ten values. No trained sets are
included. `tb_spu` uses hand-picked and random sets, and `tb_spu_patterns`
finds its own (see Verification).

Module parameters:

| parameter | default | meaning |
|---|---|---|
| `N_SYN` (`spu`, `spu_cfg_regs`) | 4 | number of synapses |
| `N_IN` (`syn_sum`) | 4 | number of summed inputs |
| `spu_pkg::DATA_W` | 6 | word width of every value |

`DATA_W` is a package constant. The shift codes and the ±32 saturation limits
follow from it, but the design has only been exercised at 6 bits.

## What follows the reference model and what does not

These parts follow the model: the 6-bit saturating arithmetic, the coefficient
set, the direct form II structure with two 6-bit registers, the comparison
y >= Vth, the absence of any post-spike reset, four synapses, the select unit
for chaining, and a reset that only clears state.

These are this design's own choices:

- the 4-bit coefficient code;
- rounding toward minus infinity, which is what the arithmetic shifts called
  for by the model produce, but which the model never states;
- the adder order inside the filter and the pairwise synaptic adder tree, both
  drawn after the model's block diagrams, which do not say that the order
  matters under saturation;
- the one-cycle input register in each synapse;
- the unregistered comparator and chain input;
- the configuration port and its address map;
- the separate parameter reset and its default values.

Any of these can change exact spike times. The neuron should therefore be
re-trained against a model of this RTL, not against another implementation.

The reference implementation of the model was reported at 304 LUTs and 66
flip-flops on an Intel MAX10 device, and 373 LUTs on Agilex-7. This RTL has 67
flip-flop bits:

- 24 weight bits;
- 6 threshold bits;
- 20 coefficient bits;
- 1 select bit;
- 12 filter state bits;
- 4 synapse bits.

LUT counts depend on the target and have not been measured here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with an integer reference model (`tb/spu_ref_pkg.sv`). The
reference model uses plain `int` arithmetic, clamping and floor division
rather than shifts.

| testbench | what it covers |
|---|---|
| `tb_sat_add` | all 4096 operand pairs |
| `tb_pow2_gain` | all 64 inputs × 16 codes, plus hand-worked corner values |
| `tb_synapse` | random spikes and weights, one-cycle latency, reset |
| `tb_syn_sum` | random and saturating operands, trees of 3, 4 and 5 inputs |
| `tb_input_select` | both select values |
| `tb_iir_df2` | a hand-worked impulse response, 200 random coefficient sets, reset |
| `tb_soma` | random filters and thresholds, including y == Vth; a held neuron silenced by reset |
| `tb_spu_cfg_regs` | defaults, random writes, write-enable, unused addresses, read-back |
| `tb_spu` | the full neuron at its default size (described below) |

`tb_spu` drives two SPUs, the second chained to the first. It applies:

- two test patterns: synapses 0 and 1 at step 1 and synapse 2 at step 3; then
  synapse 3 at step 30 and synapses 2 and 0 at step 35;
- five random noise windows;
- a mid-run switch of the first SPU to its chain input and back;
- a reset while the filter is ringing;
- twenty random parameter sets with dense input.

It checks both membrane potentials and both spike outputs every cycle. It also
checks the one-cycle spike-to-membrane latency. It counts spikes, saturations,
chained cycles, select switches, resets and read-backs, and fails if any of
them never happened.

Two further testbenches run the neuron on tasks rather than on random
stimulus. Neither has trained parameters to start from. Each one first
searches for a suitable parameter set with the reference model, using a small
hill climb over the ten parameters, and then runs that set on the RTL.

- **`tb_spu_patterns`: temporal pattern discrimination.** There are two
  four-synapse target patterns:
  - A: synapses 0 and 1 at step 1, synapse 2 at step 3;
  - B: synapse 3 at step 0, synapses 2 and 0 at step 5.

  Five random noise patterns have four spikes each. Each pattern is followed
  by 8 settling samples. The required behaviour is one output spike for A and
  one for B, at different times, and none for the noise. The hardware must
  match the model cycle for cycle and show that separation. Five unseen noise
  patterns are also applied, and their spikes are only reported.
- **`tb_spu_timing`: spike-timing dependence on one synapse.** A single spike
  must leave the neuron ringing below threshold. A second spike D steps later
  (D = 1 to 10) must make it fire for some D and not for others. This shows
  that the same input spike helps or does nothing depending on the filter's
  phase when it arrives.

Every testbench ends with a line `TB_RESULT checks=N failures=M`. To run one
with Verilator:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/spu_pkg.sv tb/spu_ref_pkg.sv tb/tb_spu.sv --top-module tb_spu
./obj_dir/Vtb_spu
```

To lint the synthesizable RTL:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/spu_pkg.sv rtl/spu.sv
```

The simulation is all two-state. The parameter registers reset only on
`cfg_rst`, so after power-up, load all parameters (or pulse `cfg_rst`) before
relying on the output.
