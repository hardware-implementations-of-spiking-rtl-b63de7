# Neuromorphic hardware: four spiking-neuron designs in SystemVerilog

This repository holds synthesizable SystemVerilog for four related pieces of
digital neuromorphic hardware. Each one solves a different cost problem of
spiking neurons:

| Part | Problem it addresses | Main idea |
|---|---|---|
| SIS spiking classifier (`snn_network`) | A two-layer spiking network for 28x28 images spends most of its work on pixels that carry no information | Selective Input Sparsity (SIS): only a fixed list of informative pixels is stored and simulated (187 of 784 for handwritten digits). The neurons are 8-bit integrate-and-fire units that need only adders and bit tests. |
| CORDIC Hodgkin-Huxley neuron (`hh_neuron`) | The Hodgkin-Huxley model needs exponentials, divisions and many multiplications | Every non-linear term uses small iterative shift-and-add CORDIC units: three multipliers, one exponential unit and one divider, scheduled in stages. |
| I-DEVS neurons (`idevs_ctrl` with `izh_neuron` / `adex_neuron`) | A fixed small time step wastes evaluations when the input current is low | Input-Dependent Variable Sampling: the input current picks a time step and an evaluation rate. Low currents are evaluated rarely with a long step; high currents often with a short step. Between evaluations the neuron is gated off. |
| HOMIN neuron (`homin_neuron`) | The Izhikevich neuron needs four parameters and multipliers per neuron | A rescaled Izhikevich model: every coefficient is a power of two, the square uses a truncated partial-product sum, and the firing pattern is chosen by one 8-bit parameter `d`. |

`neuro_top` places the four parts side by side. They share only the clock and
the active-low asynchronous reset `rst_n`, and each has its own ports.

All arithmetic is signed two's-complement fixed point. A format written QI.F
has I integer bits and F fraction bits. Right shifts of signed values are
arithmetic, so they round towards minus infinity.

---

## 1. SIS spiking classifier

### Data flow

```
 pixels ──► snn_image_loader ──► pixel RAM ─┐
 (784, one    (SIS address LUT)              ├─► snn_input_neuron ──spike──► snn_weight_rom
  per clock)                   potential RAM ◄┘   (one, time-shared)          (row of 10 weights)
                                                                                  │ weight_en
                                   class ◄── snn_argmax ◄── 10 x snn_spike_counter ◄── 10 x snn_output_neuron
```

**Loading.** While the network is idle it raises `new_data`. The image source
raises `valid_in`, and the first clock in which both are high is the
handshake. From the next clock the source presents one pixel per clock, with
its address on `pix_addr`. If `valid_in` is low, that clock is a stall. A
look-up table holds the ascending addresses of the retained pixels. When the
presented address equals the table entry under the pointer, the pixel goes
into the next RAM slot and the pointer advances. The same write clears that
slot's input-neuron potential. All other pixels are skipped. After the last
retained pixel, `end_of_data` starts the exposure. The loader ignores the
rest of the image (up to address 783) before it offers `new_data` again. The
handshake also clears the output neurons and the spike counters.

**Exposure.** The network makes 16 passes over the 187 stored pixels, one
pixel per clock. For each pixel, the pixel value and its stored potential go
through the single combinational input neuron:
v += pixel·dt with dt = 1/4 (`>> 2`), an unsigned 9-bit sum, firing at 128,
reset to 0. The new potential is written back in the same clock. An input
spike reads that pixel's row of ten signed 8-bit weights from the weight ROM
on the next clock. On the clock after that, `weight_en` makes all ten output
neurons integrate weight·dt (`>>> 2`) in parallel.

**Output neurons.** These are signed 8-bit neurons. The threshold is a power
of two (32 by default), so the fire test is "sign bit clear and any bit at or
above the threshold bit set", followed by a reset to 0. A sum at or below -65
is clamped to -65. That test is "sign bit set and bit 6 clear". The clamp
keeps the register from wrapping: the most negative input after the shift is
-32, and -65 - 32 still fits in 8 bits. Each output spike advances a 5-bit
counter (which wraps at 32).

**Classification.** A combinational tree of pairwise comparisons picks the
counter with the highest count; ties go to the lower index. `class_out` is
valid while `class_valid` is high for one clock.

**Timing.** Loading takes one clock per presented pixel, plus stalls.
`class_valid` rises 16·187 + 6 = 2998 clocks after the clock that takes the
last retained pixel. With the default index list, the last retained address
is 781, so one image takes about 3780 clocks end to end.

**Weights and pixel list.** The trained weights and the trained SIS pixel
list are not part of this design. By default:

- `snn_pkg::sis_index` spreads the retained pixels evenly: the k-th is
  ⌊(k·784 + 392)/187⌋.
- `snn_pkg::snn_weight` fills the ROM with hashed signed 8-bit values.

To use trained values, pass `$readmemh` files through the `INDEX_FILE` and
`WEIGHT_FILE` parameters of `snn_network`:

- the index file holds one address per line;
- the weight file holds `NKEEP·NOUT` bytes, row-major (pixel slot, then output).

The classifier's accuracy depends entirely on these tables. With the
stand-ins, the class is only a well-defined function of the input.

**Other configurations.** Only parameters change:

| Configuration | Parameters |
|---|---|
| Fashion-MNIST SIS network | `NKEEP=295`, `VTH_OUT=16` |
| Fully connected baseline | `NKEEP=784`, `VTH_OUT=64` (digits) or `16` (fashion) |

---

## 2. CORDIC Hodgkin-Huxley neuron

This is the most involved part. `hh_neuron` makes one Euler step
(dt = 2^-5) of the four Hodgkin-Huxley state variables V, n, m and h. The
state is 22-bit Q10.12. The model parameters are run-time 16-bit inputs:

- 1/Cm, VNa, VK and Vl in Q8.8;
- gNa in Q3.13;
- gK and gl in Q1.15.

The rate functions are

```
alpha_n = 0.01(V+50)/(1-e^-(0.1V+5))    beta_n = 0.125 e^-(V+60)/80
alpha_m = 0.1(V+35)/(1-e^-(0.1V+3.5))   beta_m = 4 e^-(V+60)/18
alpha_h = 0.07 e^-(V+60)/20             beta_h = 1/(e^-(0.1V+3)+1)
```

Products with fixed constants are shift-and-add sums. For example,
0.1V ≈ V>>4 + V>>5 + V>>7, and V/18 ≈ V>>5 + V>>6 + V>>7. Every other
product, exponential and quotient goes to a CORDIC unit.

### The CORDIC units

All three units use the same handshake:

- pulse `start` with the operands valid;
- `done` pulses for one clock when `z` is valid;
- `z` holds until the next start.

**`cordic_mul`** (linear rotation mode) drives x towards zero. For
i = -K..K (2K+1 iterations) it adds or subtracts 2^-i, choosing by the sign
of x, and adds or subtracts 2^-i·y to the product. The operands are widened
by K fraction bits and K+1 integer bits: to 51 bits for K = 14. This way no
shift loses the sign. Each iteration takes two states:

- the first adds or subtracts and advances the counter;
- the second tests the counter's top bit and otherwise shifts.

The counter starts at 32-(2K+1), so bit 5 marks the last iteration. The
latency is 2(2K+1)+1 = 59 clocks for K = 14.

**`cordic_div`** (linear vectoring mode) has the same structure with K = 8
(39-bit internal words). It works on the magnitudes of the operands and
negates the quotient when the signs differ. The quotient must stay below
2^(K+1) = 512 in magnitude. The latency is 35 clocks.

**`cordic_exp`** splits x into its integer part ⌊x⌋ and a fraction in [0,1).
There are two phases:

1. **Fraction (K = 10 iterations, two states each).** A shift register holds
   2^-i, starting at 1/2. Whenever the remaining fraction is at least 2^-i,
   that amount is removed and z is multiplied by e^(2^-i). The multiply is
   done by shift-and-add over the set bits of a Q2.30 constant, chosen by a
   multiplexer on i.
2. **Integer part (one clock per unit).** z is multiplied by e or by 1/e,
   |⌊x⌋| times, as a constant shift-and-add.

z is kept with 28 fraction bits inside and saturates at the largest W-bit
value. The latency is 2K + |⌊x⌋| + 2 clocks. The fraction test is "at least"
rather than "greater than", so exact powers such as e^0.5 come out exactly.

### Schedule of one step

The neuron has three multipliers, one exponential unit and one divider. The
step is split into seven stages. In each stage the neuron starts up to three
multiplications, and alongside them at most one exponential and one
division. It then waits until every unit it started has answered. A final
update clock adds the `>>> 5` (dt) terms to V, n, m and h.

| Stage | Multipliers | Exponential | Divider |
|---|---|---|---|
| 0 | n·n, m·m, h·gNa | e^-(0.1V+5) | |
| 1 | n²·n², m²·m, (V-Vl)·gl | e^-(0.1V+3.5) | alpha_n |
| 2 | n⁴·gK, m³·(h·gNa) | e^-(0.1V+3) | alpha_m |
| 3 | (V-VK)·gK n⁴, (V-VNa)·gNa m³h, (1-n)·alpha_n | e^-(V+60)/80 | beta_h |
| 4 | (I - currents)·(1/Cm), n·beta_n, (1-m)·alpha_m | e^-(V+60)/20 | |
| 5 | h·beta_h, (1-h)·alpha_h | e^-(V+60)/18 (×4 for beta_m) | |
| 6 | m·beta_m | | |

In total a step uses 17 multiplications, 6 exponentials and 3 divisions.
Every stage is bounded by the 59-clock multiplier, so a step takes
7·60 + 1 = 421 clocks. `step_done` pulses after each step.

### Units

The parameter formats cannot hold the classic squid-axon conductances
directly (gNa = 120 exceeds Q3.13). Divide the conductances by 100 and give
1/Cm = 100 (25600 in Q8.8): every product is unchanged. The testbench runs
the squid-axon set this way:

- VNa 55.12, VK -72.14, Vl -49.42 mV;
- gNa 1.2, gK 0.36, gl 0.003;
- input 0.1 (×100).

The reset state is that set's resting point: V = -60.048, n = 0.317,
m = 0.053 and h = 0.598 (parameters `V_INIT` … `H_INIT`).

---

## 3. Input-Dependent Variable Sampling (I-DEVS)

`idevs_ctrl` sits between an input current and a neuron:

```
             ┌───────── idevs_ctrl ─────────┐
 i_in ──┬──► I < ITH1 ─┐                     │
        └──► I < ITH2 ─┴► range ─► 8-bit timer (T1/T2/T3) ──► neuron_en, i_gated, dt_shift ──► neuron
                                       ▲                                                          │
                                       └──────────────────────── neuron_done ◄────────────────────┘
```

Two comparators put the current into one of three ranges. The timer counts
down the wait for the current range: T1 = 128, T2 = 64 or T3 = 32 clocks by
default. While it counts, the neuron gets no clock enable and a zero input,
so it does not switch. When the timer reaches zero, the controller does the
following:

- it takes the range;
- it raises `neuron_en` (the clock enable that replaces a gated clock);
- it passes the current on `i_gated` and the time step on `dt_shift`
  (dt = 2^-dt_shift: 1/32, 1/64 and 1/128 by default);
- it holds all of these until the neuron answers with `done`.

The timer then restarts with the wait of the range just used. A low current
therefore gets long steps evaluated rarely, and a high current short steps
evaluated often. Model time per clock stays proportional to dt.

The thresholds are parameters. The top sets them to 10 and 20 for the
Izhikevich neuron, and to 400 and 800 pA for the AdEx neuron.

**`izh_neuron`** is the Izhikevich model in 33-bit Q18.14, with a, b, c and d
as inputs:

```
v += dt (0.04 v² + 5 v + 140 - u + I),  u += dt a (b v - u)
if v >= 30: v = c, u += d
```

One evaluation takes two clocks: one squares v on a single multiplier, and
one updates v and u. `done` is then high on the third clock after `en`, and
stays high until `en` drops. With `en` held high and a fixed `dt_shift`, it
is an ordinary fixed-step neuron.

**`adex_neuron`** is the adaptive exponential integrate-and-fire model in
37-bit Q13.23, in mV, ms, nS, pF and pA. The exponential term uses a
`cordic_exp`. The evaluation takes 2K + |⌊(V-VT)/ΔT⌋| + 4 clocks. The model
constants are real-valued parameters. Their defaults are the common
regular-spiking set (C 281 pF, gL 30 nS, EL -70.6 mV, VT -50.4 mV, ΔT 2 mV,
τw 144 ms, a 4 nS, b 80.5 pA, Vr -70.6 mV, peak 20 mV). e^x and the current
sum saturate at the word range (±4096). This only limits the steepness of
the spike upstroke.

---

## 4. HOMIN neuron

The Hardware-Oriented Modified Izhikevich Neuron rescales the Izhikevich model
by 1/10 and rounds every coefficient to a power of two:

```
v[n+1] = v + 2^-5 (2^-2 v² + 2^2 v + v + 14 - u + I)
u[n+1] = u + 2^-11 (2^-2 v - u)
if v >= 3: v = c, u = u + d
```

a, b and c are fixed. Only `d` selects the firing pattern. It is an 8-bit
unsigned Q5.3 value, aligned to Q6.9 by a 6-bit left shift. v, u and I are
16-bit Q6.9. The neuron makes one Euler step per clock while `en` is high.

Two details keep the square cheap:

- v is clamped at -8 + 2^-9, so |v| fits in 12 bits. (Exactly -8 would wrap
  to 0 in 12 bits.)
- v² is the sum of 12 shifted copies of |v|, one per set bit. Each copy is
  truncated to 9 fraction bits, and a rounding constant of 3 LSB makes up the
  average truncation loss. There is no multiplier and no upper partial
  product.

The reset value c = -6.5 (the Izhikevich -65 scaled) is a parameter,
`C_RESET`. At input 30 (15360 in Q6.9), the d codes behave as follows:

| d code | Behaviour |
|---|---|
| 64 | slow regular spiking after a short onset |
| 48 | initial burst, then slow spiking |
| 9 | fast spiking with irregular intervals |
| 3 | fast tonic spiking |

Note that u moves only when |v/4 - u| reaches 4. This is the resolution of
the 2^-11 step in 9 fraction bits, and it makes the behaviour sensitive to
small values of d.

---

## Simulating

Every module is in `rtl/<name>.sv` and every testbench in `tb/<name>.sv`.
`rtl/snn_pkg.sv` holds the shared network constants. Pass it explicitly and
let verilator find the rest:

```
verilator --binary --timing -y rtl -y tb rtl/snn_pkg.sv tb/tb_neuro_top.sv --top-module tb_neuro_top
./obj_dir/Vtb_neuro_top
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Each has a
watchdog that counts a failure if the test hangs. The tests use `$urandom`
stimulus.

| Testbench | What it checks |
|---|---|
| `tb_neuro_top` | The whole design at its default sizes for 700k clocks (about 10 s). It runs 8 images through the classifier against a reference model, with stalls. The HH neuron spikes with the 421-clock step period. Both I-DEVS neurons receive triangular currents and must use every range. HOMIN must spike. Each mechanism is counted, and one that never happens fails the test. |
| `tb_snn_network` | Full-size classifier, 6 images, with and without stalls. Checks the class, all 10 counts and the exact inference time against a reference model. |
| `tb_snn_configs` | The Fashion-MNIST SIS network (295 pixels, threshold 16) and both fully connected baselines (784 pixels, thresholds 64 and 16). All three run side by side on the same images against the reference model. One image takes 5510 clocks (295 pixels) or 13335 clocks (784 pixels). |
| `tb_snn_*` (leaf tests) | Loader (skips, stalls, end of data, tail), RAM, exhaustive input neuron, output neuron (fire/clamp/reset), counter, comparison tree, weight ROM timing. |
| `tb_cordic_mul/div/exp` | Random operands against exact arithmetic within the iteration bound, plus the latency formulas above. |
| `tb_hh_neuron` | 3000 steps for each of two parameter sets. Set 2 is VNa 50, VK -100, Vl -85 mV, with gNa 0.5, gK 0.05 and gl 0.001 after scaling. Each step is checked against a double-precision model started from the hardware state (V within 0.2 mV, gates within 0.004). Also checks the step period and the spike count against a free-running model. |
| `tb_idevs_ctrl` | Every clock against a cycle model, including the T+1 wait per range. |
| `tb_izh_neuron` | Bit-exact against a fixed-point model for four parameter sets and random time steps. A free-running comparison against a real-valued model. The 3-clock latency. |
| `tb_adex_neuron` | Each evaluation against a double-precision step (including the saturation), the latency formula, and a 300 ms spike count. |
| `tb_homin_neuron` | Every clock bit-exact, the squarer error bound (at most 12 LSB), and the four d behaviours. |

## What follows the published design and what does not

The following come from the published design:

- the sizes and number formats: 784/187 pixels, 10 outputs, 16 steps,
  dt = 1/4, thresholds 128/32, 5-bit counters, the -65 clamp, 22-bit Q10.12
  HH state with the 16-bit parameter formats, 10/14/8 CORDIC iterations,
  51/39-bit internal widths, 33-bit and 37-bit I-DEVS neurons, the 8-bit
  I-DEVS timer with three settings, the smallest step 1/128, and the 16-bit
  HOMIN datapath with 8-bit d;
- the block structure and handshakes: valid_in/new_data, end of data, weight
  enable, start/done between HH stages, done back to I-DEVS.

The following are this design's own choices:

- the stand-in SIS list and weights;
- the one-pixel-per-clock network pipeline and its timing;
- the HH stage assignment;
- the I-DEVS thresholds, timer values and the two larger time steps;
- the AdEx constants;
- the HOMIN reset value and rounding constant;
- the reset states;
- registered versus combinational outputs;
- all latencies quoted above.

The I-DEVS controller uses a clock enable instead of an AND-gated clock, as
synchronous FPGA/ASIC flows expect. The HH conductances must be given scaled,
as described above.

There are three further differences from the published design:

- **Spike test in the network neurons.** The published neuron equations
  test the threshold on the potential before the update. Here both network
  neurons test the updated sum in the same clock. An output neuron therefore
  fires on the weight that carries it over the threshold, instead of at its
  next input event.
- **Clamp margin.** The published text justifies the -65 clamp with a most
  negative shifted input of -63. With signed 8-bit weights and `>>> 2`, the
  most negative shifted input here is -32. The clamp is kept as published,
  so the margin is larger than needed.
- **HOMIN waveforms.** In the published hardware traces, the fastest-spiking
  code 3 and the slowest code 64 match this design. Code 9, though, shows
  clear chattering in those traces, while here it gives fast spiking with
  irregular intervals. The reset value c and the rounding constant, which
  are not known, are the likely cause.
