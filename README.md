# A small spiking network that learns digits on chip

This is a digital spiking neural network that learns to recognise digit
images with spike-timing-dependent plasticity (STDP) and then recognises
them. It is all synthesizable SystemVerilog and has no processor.

The network has two layers:

- An input layer of 40 pixel neurons and one teacher neuron.
- Six output neurons, N41 to N46. Each one uses the Izhikevich model.

All 47 neurons report their spikes on one shared address-event bus (AER).
Every output neuron owns the following:

- a small RAM of synaptic weights, indexed by bus address;
- an STDP learning module, which rewrites that RAM while the neuron learns.

Training one output neuron on one digit takes a button press:

1. The teacher neuron gets a strong synapse onto the selected output neuron, so that
   neuron fires while the image is shown.
2. STDP strengthens the pixel synapses whose spikes come just before the
   output spike, and weakens those that come just after.
3. The teacher synapse is removed.

In recognition mode the image alone is shown. The output neurons whose learned
weights match it fire.

```
 image[9:0] ──► spike_source ──┐ spikes[40:0]
                               ├──► aer_encoder ──► aer[5:0], en_neuron ──┐
 spikes_out[5:0] ──────────────┘ (N41..N46 at bits 41..46)                │
        ▲                                                                 ▼
        │      ┌──────────── g_out[k], k = 0..5 ───────────────────────────────┐
        └──────┤ izh_neuron: neuron_ram ► input_align ► izh_v_eq / izh_u_eq    │
               │     ▲ write port                                              │
               │ stdp: addr cnt ► mux ► pre/post windows ► I/D sel ► weight cnt│
               └───────────────────────────────────────────────────────────────┘
                 ▲ en_stdp, en_addr, teacher writes
 btn, sel, neuron[5:0] ──► train_ctrl
```

## Files

| File | Contents |
|---|---|
| `rtl/snn_pkg.sv` | widths, neuron constants, the digit glyphs, controller states |
| `rtl/snn_top.sv` | the whole network |
| `rtl/izh_neuron.sv` | one Izhikevich neuron. It uses `neuron_ram`, `input_align`, `izh_v_eq` and `izh_u_eq`. |
| `rtl/aer_encoder.sv` | AER encoder. It uses `aer_fifo` and `aer_priority_encoder`. |
| `rtl/stdp.sv` | STDP module. It uses `stdp_addr_cnt`, `stdp_id_sel` and `stdp_weight_cnt`. |
| `rtl/spike_source.sv` | input layer: pixel neurons and teacher neuron |
| `rtl/train_ctrl.sv` | learning-phase sequencer |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_snn_full.sv` | the whole network at default parameters |
| `tb/tb_snn_demo.sv` | two-digit, two-neuron demonstration |

## The neuron: Izhikevich dynamics in fixed point

Each output neuron integrates two coupled equations:

    v' = 0.04 v² + 5 v + 140 − u + I      (v in mV, t in ms)
    u' = a (b v − u)
    if v ≥ 30 mV:  v ← c,  u ← u + d

The parameters are a = 0.02, b = 0.2, c = −65 mV and d = 2. These are the usual
regular-spiking values.

The hardware stores v in units of 0.1 mV, so the first equation becomes
`V' = 0.004 V² + 5 V + 1400 − U + I`. Synaptic weights use the same unit, so a
weight of 120 is a 12 mV input step.

Formats and constants:

| Quantity | Format |
|---|---|
| V, U | 21-bit signed, 8 fraction bits (`state_t`), so the integer part is 13 bits |
| Weights | 11-bit signed (−1023..1023) |
| 0.004 | 262/2¹⁶ |
| a | 1311/2¹⁶ |
| b | 13107/2¹⁶ |

One time step is one forward-Euler step of dt = 2^−DT_SHIFT ms, 0.5 ms by
default. The step is a shift, so the only real multiplier per neuron is V².

The reset is applied one step late. In the step where the stored V first
reaches 30 mV, the neuron raises `spike_out`, and the update writes c into V
and adds d to U. So the over-threshold value is visible on `v_out` for one
step, which is what a spike looks like on a waveform.

`izh_v_eq` and `izh_u_eq` are combinational. `izh_neuron` holds the V and U
registers. On reset they go to V = c and U = b·c.

Measured against a floating-point model of the same equations and dt
(`tb_izh_v_eq`, `tb_izh_neuron`):

- A constant 12 mV input gives 49 spikes in 1500 steps, the same as the model.
- A 30 mV input gives 131 spikes.
- A −15 mV input gives no spikes. V settles at −81.9 mV, against −81.8 mV in the model.

## The AER bus and why neurons stall

Each time step a neuron must add up the weights of every input that spiked.
The RAM has one read port, addressed by the AER bus. So several simultaneous
spikes are sent one address per clock, and the neurons wait until the burst
is over. `aer_encoder` does this with four parts:

- **Comparator:** is the incoming spike vector non-zero?
- **FIFO** (`FIFO_DEPTH` = 8): stores vectors that arrive while a burst is being sent.
- **Multiplexer:** chooses what is sent next:
  1. the remainder of the current burst;
  2. otherwise the FIFO head;
  3. otherwise the incoming vector directly. This is the bypass, so a lone
     spike is on the bus one clock after it happened.
- **Priority encoder:** puts the highest-numbered pending neuron on the bus and
  clears its bit.

With no event the bus carries the all-ones code, 63.

`en_neuron` is high only in the clock that sends the last address of a burst
with nothing left in the FIFO. For example, spikes of neurons 0, 1, 3 and 4 in
one clock give bus values 4, 3, 1, 0, with `en_neuron` low for the first three.

Inside each neuron, `input_align` adds up the weight read at each bus address
while `en_neuron` is low. In the step where it is high, it passes the sum plus
the current weight to the v equation. The whole burst therefore acts as one
time step. A bus that sits on one address gives a constant input current, which
is how the single-neuron tests apply a 12 mV step.

Output neuron spikes also go on the bus. Their RAM entries, and the entry for
the idle code, stay 0, so they add nothing.

If a vector arrives while the FIFO is full, it is dropped and the sticky
`aer_overflow` flag is set. At the default spike rates the FIFO holds at most a
few entries.

Neuron time is therefore not wall-clock time. A time step happens whenever
`en_neuron` is high:

- on every idle clock;
- once per burst otherwise.

The input layer runs on the clock. As a result, more spikes per period mean
fewer neuron steps per period.

## Learning: STDP as overlapping windows

`stdp` learns one synapse at a time. The STDP update is computed in these steps:

1. **Select one synapse.** `stdp_addr_cnt` holds the index of the selected
   synapse, and a multiplexer picks that synapse's pre spike out of
   `pre_spikes`. `en_addr` moves to the next synapse. The default is 40
   synapses, one per pixel.
2. **Open two time windows.** A pre-spike shift register (`PRE_WIN` = 64) and a
   post-spike shift register (`POST_WIN` = 16) are each ORed into a gate. A gate
   stays open for that many clocks after the spike.
3. **Record the spike order.** `stdp_id_sel` records which spike came last:
   - a post spike alone arms **increment**. If the pre window is still open,
     the pre spike came first;
   - a pre spike arms **decrement**, whether it comes alone or together with a
     post spike.

   Simultaneous spikes count as depression. This follows the strict
   "Δt > 0" branch of the STDP window.
4. **Update the weight.** For every clock in which both gates are open, the
   armed flag passes through. `stdp_weight_cnt` then moves the stored weight by
   ±1, saturating at ±1023. It writes the new value to the neuron's RAM through
   registered `we`/`addr`/`weight`.

The weight change is therefore the overlap of the two windows. It is largest
for spikes close in time and falls off linearly with their distance. It is
bounded by `POST_WIN` per spike pair. This is a piecewise-linear replacement
for the exponential STDP curve.

The windows and flags are cleared when learning is off or the synapse changes.
After reset each STDP module sweeps all 2^AW RAM entries and writes 0 to each,
with `busy` high.

## Training and recognition

`train_ctrl` follows the buttons.

**After `rst`:** it waits for the restore sweep to finish.

**On a rising `btn` with `sel` = 0:** it runs one learning phase for the
neurons selected by the one-hot `neuron` input:

1. **TEACH_ON:** write W_TEACH = 1023 into RAM entry 40 (the teacher) of the
   selected neurons.
2. **TRAIN:** the image and the teacher fire. `en_stdp` is high for
   40 × DWELL clocks, and every DWELL (160) clocks `en_addr` moves all STDP
   modules to the next pixel.
3. **DRAIN:** one clock for the last STDP write.
4. **TEACH_OFF:** write 0 into entry 40 again.

Only the selected neurons' STDP modules are enabled. From step 1 to step 4,
every other output neuron is held in reset (`hold`), so only the neuron being
trained can fire during its phase. This matters once an earlier neuron has
learned a digit that looks like the current one: without the hold it would
fire along. In the top, the
controller's RAM writes take priority over the STDP module's. They never
coincide, and an assertion checks this.

**With `sel` = 1:** the image is shown continuously and nothing learns.

The input layer (`spike_source`) has:

- one neuron per pixel of a 5×8 glyph;
- one teacher neuron.

`image` is a one-hot digit select. All on-pixels fire together every
IN_PERIOD = 64 clocks. The teacher fires every TEACH_PERIOD = 48 clocks. The
two periods differ, so teacher-driven output spikes land at all phases of the
pixel period. Each pixel synapse then sees pre-before-post and
post-before-pre pairs. Only pixels that are on see any pairs at all, so learning
potentiates mostly the pixels of the trained digit.

The spike vector is laid out as:

| Bits | Neurons |
|---|---|
| 0–39 | pixels (row r, column c at bit 5r + c) |
| 40 | teacher |
| 41–46 | N41–N46 |

The default parameters were tuned by simulation:

- With DWELL = 96 the trained neurons do not respond at all.
- With DWELL = 320 they respond to every digit.

## Parameters

| Parameter (module) | Default | Meaning |
|---|---|---|
| `AW` | 6 | bus/RAM address width; neurons 0..62, 63 = idle |
| `N_OUT` (top) | 6 | output neurons |
| `FIFO_DEPTH` | 8 | AER FIFO entries |
| `DT_SHIFT` | 1 | dt = 2^−DT_SHIFT ms |
| `A_Q16`, `B_Q16`, `C_MV10`, `D_MV10` | 1311, 13107, −650, 20 | a, b, c, d |
| `IN_PERIOD`, `TEACH_PERIOD` | 64, 48 | input and teacher firing periods, clocks |
| `DWELL` | 160 | clocks of learning per synapse |
| `PRE_WIN`, `POST_WIN` | 64, 16 | STDP window lengths, clocks |
| `W_TEACH` | 1023 | teacher weight |
| `W_MAX`, `W_MIN` | ±1023 | learned weight bounds |

A coarse yosys synthesis of `snn_top` at these defaults gives about 1200
flip-flop bits, plus about 8.8 kbit of RAM/register-file bits.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`,
and it has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/snn_pkg.sv tb/tb_snn_full.sv \
          --top-module tb_snn_full -Mdir obj_full
obj_full/Vtb_snn_full
```

The same command, with its file and top name swapped, runs any other `tb/tb_*.sv`.
Modules are found through `-Irtl`. The package must be listed first.

`tb_snn_full` runs the whole network at its defaults, with no parameter
overrides. It runs two experiments:

- It trains N41–N46 on digits 0–5, shows each digit and counts output spikes.
- It resets, then repeats with digits 4–9.

It checks the following:

- The trained neuron of each digit fires most.
- Learning raised the weights of that digit's pixels.
- After a reset all weights are restored and nothing fires.
- Every mechanism happened: AER stalls, the bypass, the FIFO, increments,
  decrements, synapse address steps, teacher writes, restore sweeps, learning
  phases, and a trained neuron held during another neuron's phase.
- No held neuron spiked.

It runs in under a second. `tb_snn_top` is the same run plus a second copy of
the network, overloaded (`IN_PERIOD` = 4, `FIFO_DEPTH` = 2) so that it raises the
overflow flag.

Spike counts from one default run of `tb_snn_full`:

| Shown | N41 | N42 | N43 | N44 | N45 | N46 |
|---|---|---|---|---|---|---|
| 0 | **47** | 0 | 0 | 11 | 0 | 34 |
| 1 | 0 | **24** | 0 | 0 | 0 | 0 |
| 2 | 10 | 0 | **31** | 0 | 0 | 0 |
| 3 | 14 | 0 | 0 | **47** | 0 | 28 |
| 4 | 0 | 0 | 0 | 0 | **38** | 0 |
| 5 | 39 | 0 | 0 | 33 | 0 | **47** |

With digits 4–9 on N41–N46, each digit again fires its own neuron most.
Similar digits, such as 0/5/3 and 6/8/9, also excite each other's neurons.
Nothing in the network suppresses this (there is no lateral inhibition).

Other testbenches:

- `tb_snn_demo` runs a two-digit demonstration at the default size, as on a
  small board. It trains N41 on digit 0 and N42 on digit 1 using only
  `image[1:0]` and `neuron[1:0]`. It then checks that `spikes_out[0]` answers
  digit 0 and `spikes_out[1]` answers digit 1, and that both stay dark after a
  reset.
- The AER testbench runs the 5-neuron, 5-bit-bus case. It checks the exact bus
  sequence, with 31 as the idle code.
- The STDP testbench runs a 3-synapse case with a reference model of the
  window overlap.

## Where this design departs from its source description

This design follows a published description of the neuron, AER and STDP blocks.
That description gives the block structure and signal names, but not these
details. Each one below is this design's own choice:

- **Numbers:**
  - the fixed-point formats;
  - dt;
  - the late reset;
  - saturation of V at ±409.5 mV.
- **Inputs:**
  - the 5×8 image size and the glyphs. These give 40 pixels, which together
    with one teacher and six outputs make 47 spikes;
  - the regular, in-phase firing of pixels and the separate teacher period.
- **AER:** the FIFO depth and the dropping of vectors on overflow (with the
  `aer_overflow` output).
- **STDP:**
  - the linear window-overlap rule in place of exponential windows;
  - the window lengths;
  - the step size of 1;
  - the weight limits;
  - the restored value 0.
- **Training:**
  - the teacher-synapse training sequence and its timing (DWELL);
  - holding the other output neurons in reset during a phase. The source says
    only that the neuron being trained is the one that fires, not how.

The following were left out:

- Outside a learning phase, output neurons do not inhibit each other.
- There is no board wrapper: no button debouncing, switches or LEDs. `btn` is
  only synchronised to the clock. `spikes_out` is what would drive LEDs.
- A time step is not tied to a wall-clock rate (such as one step per ms). It is
  one clock unless a burst is being sent.

Other notes:

- `v_out` is an added observation port. `busy` on the STDP module and
  `aer_overflow` are also additions.
- The source's two-digit demo on two neurons is this design with `image[1:0]`
  and `neuron[1:0]` in use.
