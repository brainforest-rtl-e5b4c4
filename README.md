# BrainForest: an event-driven, multiplier-less seizure classifier

A closed-loop brain implant has to recognise a pathological brain state,
such as the onset of a seizure, in its recorded EEG and then trigger
stimulation. It has to do this on a few microwatts for years. BrainForest
does it without a multiplier and without an SRAM. Three ideas make that
possible:

1. **Band energy from spiking neurons instead of FIR filters.** A
   *resonate-and-fire* (RAF) neuron runs a cheap power-of-two IIR band-pass
   filter and then a half-wave detector. The neuron fires once per half-wave
   in its band, and the half-wave's peak is the band-energy feature. Where
   the signal is quiet, nothing fires.
2. **Time context from bit-serial leaky integrators.** Each feature goes
   through exponentially decaying memories (EDMs) with different decay
   rates. One EDM is a shift register and two 1-bit full adders. It keeps
   extra low-order bits, so slow decays lose no precision.
3. **A boosted forest of 1024 depth-1 trees with no weight memory.** Every
   tree compares one EDM output with a threshold held next to its
   comparator. The trees are placed in order of weight, so a tiny
   exponential-decay generator can regenerate each weight in turn. The
   accumulator starts from the "all trees say no" sum and only adds for
   trees that say yes. Those are rare while the patient is not having a
   seizure.

Nothing after the neurons moves unless a neuron fired on the current
sample. Within the forest, only the tiles whose neuron fired do work.

```
 8 ADC channels (16-bit samples, e.g. 256 samples/s each)
        |
 raf_array: 32 x raf_neuron = raf_filter -> raf_fire_logic
        |  fire[31:0], magnitudes sent LSB first on x_ser[31:0]
 decision_forest: 128 x tree_tile = edm_serial + 8 x tree_comparator
        |  1-bit decision stream, tree 0 first (largest weight)
 decision_function  <--  weight_regen (w <- w - (w >> lam))
        |  class_out / class_valid
 stim_trigger  -> stim_trigger output (to the stimulation DAC)

 bf_controller sequences all of it; one scan chain loads the model.
```

## Resonate-and-fire neurons

`raf_filter` is two first-order IIR sections. Every coefficient is a power
of two, so every product is an arithmetic shift:

```
lp1 += (x - lp1) >>> lam1        hp = x - lp1        (high-pass)
lp2 += (hp - lp2) >>> lam2       y  = lp2            (low-pass)
```

The states keep 12 fraction bits so that small steps are not rounded away.
`y` is saturated to 16 bits. On its own this filter separates bands poorly.
The selectivity comes from the second stage.

`raf_fire_logic` is a half-wave detector with two conditions:

* **Amplitude.** Register `A` follows the filtered signal upwards, so it
  holds the last peak. The neuron may fire once the signal has fallen below
  `A - A_HYST`. The hysteresis stops noise ripple on a peak from firing it.
* **Duration.** A saturating counter counts samples since the last
  half-wave detection. Each detection resets it, whether or not the neuron
  fires. A detection fires the neuron only if the count has reached `D_TH`.

After every detection, `A` restarts from the current sample. On a falling
slope, `A` therefore steps down with the signal, one `A_HYST` at a time,
and the count effectively starts near the trough. At the next peak the
count is the trough-to-peak time. Waves faster than the band never reach
`D_TH`, so they never fire; this is the upper band edge. When a detection
does fire, `mag` takes the peak (`A`, clipped at zero).

Example: at 256 samples/s, a theta neuron (`lam1 = 6`, `lam2 = 2`,
`D_TH = 16`) fires once per period of a 5 Hz wave. Its magnitude follows
the wave's amplitude within a few percent. A 40 Hz wave of the same
amplitude never fires it.

The neuron's settings are channel, `lam1`, `lam2`, `A_HYST` and `D_TH`
(`bf_pkg::raf_cfg_t`, 43 bits). They sit in the neuron's segment of the
scan chain. The 32 neurons share the 8 channels in any assignment.

`raf_array` presents each magnitude bit-serially, LSB first. `x_ser[i]` is
bit `bit_idx` of neuron *i*'s magnitude, and 0 from bit 16 up. The forest
never receives a magnitude as a word.

## Bit-serial leaky integrators (edm_serial)

The integrator is `y[n] = y[n-1] + 2^-alpha * (x[n] - y[n-1])`. In
parallel form, the shift by `alpha` throws away `alpha` low bits on every
update. A slow memory (large `alpha`) then cannot follow small inputs: it
settles with an error of up to `2^alpha`.

The serial EDM stores `Y = 2^alpha * y` instead, which has `16 + alpha`
bits. The update becomes

```
Y[n] = Y[n-1] - (Y[n-1] >> alpha) + x[n]
```

with no shift of the data word at all. The shift is just a different tap on
the circulating state:

* The state circulates LSB first in a shift register of length
  `L = 16 + alpha`. In the silicon the register is 16 fixed flip-flops plus
  16 tri-stated ones; here a multiplexer picks the loop length and the tap.
* In the cycle where bit *b* of `Y[n-1]` is at the register head, the flop
  `alpha` places further on holds bit `b + alpha`. That is bit *b* of
  `y[n-1]`. From *b* = 16 up this tap is masked to 0: `y` has 16 bits and
  is never negative.
* Full adder 1 forms `x - y[n-1]`. It adds the inverted tap and starts with
  its carry at 1.
* Full adder 2 adds `Y[n-1]` from the head. Its sum bit is bit *b* of
  `Y[n]`, and it goes back into the tail of the loop.
* Each adder keeps its carry in a flip-flop. `bit_idx = 0` restarts both
  carries.

| cycle `bit_idx` | head of loop | tap | output `y_bit` |
|---|---|---|---|
| 0 .. alpha-1 | `Y[n-1]` bits 0 .. alpha-1 | `y[n-1]` bits 0 .. alpha-1 | fraction bits of `y[n]` |
| alpha .. alpha+15 | `Y[n-1]` bits alpha .. | `y[n-1]` bits alpha .. 15, then 0 | `y[n]` bits 0 .. 15 |

An update takes `16 + alpha` cycles, at most 32. The result is exact: the
true value of `Y[n]` lies in `[0, 2^L)`, so the modulo-`2^L` serial
arithmetic gives it exactly. For a constant input `x`, `y` settles at
exactly `x`, whatever `alpha` is.

An EDM is updated only when the neuron it listens to fires. Its time
constant is therefore counted in firing events, not in samples.

## Tree tiles and the decision stream

A `tree_tile` holds one EDM and 8 `tree_comparator`s. Its scan word
(`tile_cfg_t`) holds the neuron it listens to (`raf_sel`) and `alpha`.
Each comparator stores a 16-bit comparison point `CP` and a polarity bit.

During a serial pass, the comparators see the EDM output bits `alpha` to
`alpha+15`, which are the integer part of the new `y`. Each compares them
LSB first against its own `CP`, which rotates past in its own shift
register:

```
gt <= (y & ~cp) | (~(y ^ cp) & gt)      // after 16 bits: gt = (y > CP)
decision = gt ^ pol
```

A tile whose neuron did not fire keeps its state, its comparison points and
its decisions untouched.

The decision flip-flops of all 1024 trees form one circular shift register.
In stream order, tile 0 tree 0 comes first and tile 127 tree 7 comes last.
Position *m* in the stream is the tree with the *m*-th largest weight. The
tool that maps a trained model onto the chip has to respect this order:
trees that share a tile share a feature. After 1024 shifts every decision is
back in its own tree.

## Weight regeneration and the decision function

The classifier output is `sign(sum_m a(m) * TREE(m))`, where `TREE(m)` is
+1 or -1. Boosted-tree weights decay roughly exponentially with rank, so
`weight_regen` rebuilds them as the stream runs:

```
w(0) = w_max,     w(m+1) = w(m) - (w(m) >> lam)      (lam typically 5..9)
```

The generator keeps 8 fraction bits below the 16-bit weight.
`decision_function` is preloaded with `-sum a(m)`, the result if every tree
voted -1. For each tree voting +1 it adds the regenerated step `2 a(m)`.
So `w_max` is the first tree's step weight and the preload is a model
constant. For a tree voting -1, the accumulator is not enabled. The class
is 1 only if the final sum is above zero; a sum of exactly 0 is class 0.
`stim_trigger` then raises its output for one cycle for each positive
classification, but only while its enable bit is set. With the bit clear,
the chip runs as a monitor only.

## Sequencing and timing (bf_controller)

| phase | cycles | what happens |
|---|---|---|
| `PH_IDLE` | - | waits for `adc_valid`; the filters take the sample set |
| `PH_FILTER` | 1 | the firing logic evaluates |
| `PH_FIRE` | 1 | if no neuron fired, back to idle |
| `PH_SERIAL` | 32 | EDM updates and comparisons in the tiles that fired; the last cycle preloads the weight generator and the accumulator |
| `PH_STREAM` | 1024 | one tree per cycle into the decision function |
| `PH_RESULT` | 1 | the class is latched |

A sample set that fires some neuron gives `class_valid` 1060 clock cycles
after its `adc_valid`. `stim_trigger` follows one cycle later. A sample set
that fires nothing leaves `busy` high for only 2 cycles.

At a 1 MHz clock and 256 samples/s there are about 3900 cycles per sample,
so a full classification fits on every sample. `adc_valid` and `cfg_en` may
only be raised while `busy` is low. Assertions in `bf_controller` check
both.

## Loading a model: the scan chain

All model parameters sit in one chain of shift registers (20,113 bits at
the default size). Raise `cfg_en` and present one bit per clock on
`cfg_si`, each word LSB first, in this order:

1. neurons 0..31: `raf_cfg_t` = `{d_th[15:0], a_hyst[15:0], lam2[3:0], lam1[3:0], ch_sel[2:0]}`
2. tiles 0..127, each:
   * `tile_cfg_t` = `{alpha[4:0], raf_sel[4:0]}`
   * then comparators 0..7, each `{pol, cp[15:0]}`
3. `weight_regen`: `{lam[3:0], w_max[15:0]}`
4. accumulator preload: 28 bits, two's complement
5. stimulation enable: 1 bit

`cfg_so` is the end of the chain, so the chain can be read back. Reset
clears all configuration.

## Parameters

| name | default | meaning |
|---|---|---|
| `N_CH` | 8 | ADC channels |
| `N_RAF` | 32 | RAF neurons |
| `N_TREES` | 1024 | trees = `N_TILES * TREES_PER_TILE` |
| `TREES_PER_TILE` | 8 | comparators sharing one EDM (own choice) |
| `N_TILES` | 128 | tiles (top-level parameter) |
| `DATA_W` | 16 | magnitudes, thresholds, comparison points |
| `ALPHA_MAX` | 16 | extra EDM precision bits, largest `alpha` |
| `SAMPLE_W`, `FRAC_W` | 16, 12 | sample width, filter fraction bits (own choice) |
| `WEIGHT_W`, `WFRAC_W`, `ACC_W` | 16, 8, 28 | weight and accumulator formats (own choice) |

The top can be built with fewer tiles (`N_TILES`), and
`bf_controller` follows the tree count.

## Where this RTL follows the architecture, and where it chooses

These parts follow the architecture as published:

* 32 RAF neurons on 8 channels, each a power-of-two band-pass filter and a
  half-wave detector with `A_HYST` and `D_TH`.
* Bit-serial EDMs with up to 16 extra precision bits, built from two serial
  full adders.
* 1024 depth-1 trees, held as bit-serial comparators with local,
  serially loaded comparison points.
* A 1-bit serial decision stream.
* Weights regenerated by a shift-and-subtract decay from a preloaded
  maximum.
* An accumulator preloaded with the negative class, adding only for
  positive votes.
* Event-driven operation triggered by neuron firings.

These are this design's own choices:

* The exact filter topology: high-pass section, then low-pass section.
* Restarting `A` from the current sample after each half-wave detection.
* The scan chain and all word layouts.
* Splitting the 1024 trees into 128 tiles of 8.
* The per-tree polarity bit.
* The loop-length multiplexer, where the silicon has tri-state taps.
* Clock enables where the silicon gates clocks.
* The fraction bits of the filter and of the weight generator.
* The 28-bit accumulator, and treating a zero sum as class 0.
* The phase sequence and its cycle counts.
* The stimulation enable bit.

Not included: the 8-channel SAR ADC array, the 2.5 V current-mode
stimulation DAC, and the bias, reference and supply circuits. They are
analog. Their digital ends are the `adc_data`/`adc_valid` inputs and the
`stim_trigger` output.

## How far it has been verified

Every module has a self-checking testbench in `tb/`. Each compares the
module with integer reference models in `tb/bf_ref_pkg.sv`. The models do
the same arithmetic on whole words, with no bit-serial structure.
Each testbench prints
`TB_RESULT checks=N failures=M`.

* `tb_brainforest_top` runs the default-size design (1024 trees) end to
  end:
  * it loads a random model over the scan chain;
  * it plays 160 sample sets of eight noisy tones under a rising and
    falling envelope;
  * for every sample set it checks the class, the decision sum, the trigger
    and the 1060-cycle latency;
  * it checks that idle samples, gated tiles, both vote kinds, gated
    accumulator cycles, both classes and triggers all occur.

  It takes about 15 s in Verilator.
* `tb_raf_theta_example` runs the 5 Hz / 40 Hz neuron example above over
  4 s of signal.
* The unit tests cover:
  * random filter settings and full-scale inputs;
  * both thresholds of the detector each blocking a firing;
  * every `alpha` from 0 to 16 and above;
  * EDM settling to the input;
  * comparator ties;
  * weight sequences for `lam` 5..9;
  * exact-zero decision sums;
  * the controller's skip path.

Nothing has been checked against recorded EEG or against a trained model.
The detection quality of this RTL is therefore unknown. It depends on the
neuron settings and on a model that is trained and then mapped in weight
order.

To run a test with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_brainforest_top \
  -y rtl -y tb +libext+.sv rtl/bf_pkg.sv tb/bf_ref_pkg.sv tb/tb_brainforest_top.sv
./obj_dir/Vtb_brainforest_top
```

Use the same command for any other `tb_*` module.

## Capacity against the evaluated recordings

Two recording sets were used to evaluate the architecture:

* scalp EEG from 10 patients, in one public seizure database;
* intracranial EEG from 4 patients, in another.

Both used 8 electrodes per patient, resampled to 256 samples/s, and a
1024-tree model. Against the default build:

* **Channels:** 8 are needed and the design has 8 ADC inputs.
* **Trees:** 1024 are needed and the design has 1024.
* **Time:** a classification takes 1060 cycles. The sample period is about
  3900 cycles at 1 MHz.

Both sets therefore fit, with one limit on features: 32 neurons give 4
bands per channel when all 8 channels are used. A feature-usage study with
up to 2000 trees, 16 channels and 8 sub-bands was run in software. It does
not fit this chip.
