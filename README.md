# Approximate-arithmetic MLP for arrhythmia detection on one ECG heartbeat

This RTL classifies one heartbeat of an electrocardiogram into one of seven classes:
normal, left bundle branch block, right bundle branch block, premature ventricular
contraction, paced, atrial premature, and a catch-all "other". The input is a window of
256 samples (1.28 s at 200 Hz) centred on the R peak. Nothing is thrown away before the
network, so the P and T waves reach it too. The classifier is a small multi-layer
perceptron, 256 → 16 → 16 → 7, with ReLU in the hidden layers and softmax at the output.
It is built for a wearable device, which must spend little area and energy.

Two ideas shape the hardware:

* **One neuron, reused.** There is no separate circuit for each of the 39 neurons. One
  multiply-accumulate neuron is reset and run again for every neuron of a layer. It reads
  its weights from an on-chip parameter memory. Each layer's outputs go into a small
  buffer that feeds the next layer.
* **Approximate arithmetic where the network can tolerate it.** Layer 1 does more than 90 %
  of all multiplications, so it gets its own neuron with the cheapest arithmetic. Layers 2
  and 3 share a second neuron with milder approximations. In each approximate adder, the
  lowest bits are added by simplified 1-bit cells:

  | adder | layer-1 neuron | layer-2/3 neuron | accurate neuron |
  |---|---|---|---|
  | running sum | 2 approximate bits | 4 approximate bits | exact |
  | bias | 8 approximate bits | 8 approximate bits | exact |

## Number format

Every value in the datapath is 16-bit two's complement Q5.10: one sign bit, 5 integer
bits, 10 fraction bits, so 1.0 = 1024. The format is defined in `rtl/fxp_pkg.sv`. It
leaves a margin over the 12 bits (3 integer + 9 fraction) that are the least the network
needs to keep its accuracy.

* **Multiplication** (`fxp_multiplier`). The 32-bit product has its binary point at bit 20.
  The result keeps bit 31 as the sign, bits 24..20 as the integer part and bits 19..10 as
  the fraction. There is no rounding and no saturation. A product outside ±32 wraps, and
  small negative products round towards minus infinity. Inside the multiplier, the operand
  magnitudes go through an unsigned 16x16 multiplier, and the product is negated when the
  operand signs differ. That unsigned multiplier is built from four 8x8 multipliers
  (`mult_16x16`), each built from four 4x4 cells (`mult_8x8`, `mult_4x4`). This recursive
  split is where approximate 4x4 cells would be inserted (see *Limits*).
* **Addition** (`sat_adder`). The adder has a carry-in. It saturates: overflow is only
  possible when both operands have the same sign and the raw sum comes out with the
  opposite sign. The result is then clamped to +32767 or −32768, following the operands'
  sign. The `ovf` output flags a clamp.
* **Approximate low bits** (`sat_adder`, `APPROX_BITS = K`). The K lowest sum bits are
  `a | b`. The carry into the exact upper part is `a & b` of bit K−1. The carry-in is not
  used when K > 0. This lower-part-OR cell is a choice made in this design: the design
  this RTL follows only calls its cell "the most area-efficient 1-bit adder". To try a
  different cell, edit the `g_approx` branch of `sat_adder`.

## The neuron

`rtl/neuron.sv` is the centre of the design. It contains:

```
 x ──┐
     ├─[fxp_multiplier]── prod ──┐
 w ──┘                           ├─[sat_adder: sum, cin = carry]── sum_next ─┬─> acc (reg)
             acc ────────────────┘                                           │
                                                 bias ─[sat_adder: bias]─────┴─> z (reg) ─[relu]─> y
```

Its control is a two-state machine:

* `S_CARRY` waits for `start`. When `start` arrives, it flips the carry bit.
* `S_SUM` writes `sum_next` into the accumulator. In the same clock, `acc + prod + bias`
  is written into `z`.

The carry-in of the summation adder alternates 0, 1, 0, 1, … over the summations after a
reset. The multiplier truncates towards minus infinity, so its results lean low. Adding 1
on every second summation roughly offsets this bias against a wider reference. The bias
adder always has carry-in 0.

The bias is added to every new sum, not only after the last one. So `z` is already the
pre-activation value after the final input, and `y = ReLU(z)` follows combinationally.
The output layer uses `z` and the hidden layers use `y`.

Timing of one input, clock by clock:

```
clk     : 0        1        2
state   : S_CARRY  S_SUM    S_CARRY
start   : 1        0        (next start may come here)
busy    : 0        1        0
done    :                   1    z, y, sat updated
```

One input can be taken every 2 clocks. `x`, `w` and `bias` are not registered inside the
neuron, which keeps it at about 36 flip-flops. The driver must therefore hold them from
`start` until `done`. An assertion checks this.

`rst` is synchronous. It clears the sum, the output and the carry, and it is also how the
sequencer starts a new neuron. The `sat` output pulses with `done` whenever either adder
clamped.

The parameter `KIND` (`NK_ACCURATE`, `NK_APPROX_L1`, `NK_APPROX_L23`) sets how many low bits
of each adder are approximate, as listed in the table above.

## The classifier (`ecg_mlp_top`)

```
 samples ─> input_normalizer ─> in_buf[256] ─┐
                                             ├─ sequencer ─> neuron (layer-1 kind) ─> h1[16]
 host ────> param_memory[4496] ──────────────┤            └> neuron (layer-2/3 kind) ─> h2[16] ─> logit[7]
                                             └──────────────────────────────────────> softmax ─> class, probabilities
```

1. **Normalisation** (`input_normalizer`). 256 raw signed samples arrive on the
   `s_valid`/`s_ready` handshake, and their minimum and maximum are tracked. Each sample is
   then replaced by `(x − min)/(max − min)` in Q5.10, giving values 0..1024, computed with
   a bit-serial divider. A constant window gives all zeros. Normalising makes recordings
   from different instruments look alike to the network.
2. **Layers.** For each neuron, the sequencer resets the neuron and fetches the bias from
   memory. It then feeds the inputs at one every 2 clocks: in one clock it latches the
   operand from the layer buffer and the weight from the memory, and in the next it pulses
   `start`. During that second clock the next weight is already being read. Finally the
   sequencer stores the output. Layer 1 runs on the layer-1 neuron; layers 2 and 3 run on
   the layer-2/3 neuron. Layer 3 has no bias (the bias input is held at 0) and no ReLU.
3. **Softmax** (`softmax`). Each `e^(x_i − max)` is computed as `2^(−t)` with
   `t = (max − x_i)·log2 e`. The integer part of `t` becomes a right shift. The top 5
   fraction bits index a 32-entry table of `2^(−k/32)` in unsigned Q1.15. The table is
   computed at elaboration as successive powers of 2^(−1/32). Six additions form the sum.
   One shared divider then produces the seven probabilities, `(e_i << 15)/sum`, in Q1.15
   (1.0 = 32768). The predicted class is the index of the largest logit; the lowest index
   wins a tie.
4. `res_valid` pulses for one clock. With it come `res_class`, `res_prob[7]` and
   `res_logit[7]`. The logits are the output-neuron values before softmax.

New samples are accepted only while the sequencer is idle. `s_ready` is low from the
last sample until the result appears.

### Parameter memory map

Each entry is a 16-bit Q5.10 word. Write it on `pm_we`/`pm_addr`/`pm_wdata` before
classifying.

| range | contents | address of (neuron j, input i) |
|---|---|---|
| 0 – 4095 | layer-1 weights | `256*j + i` |
| 4096 – 4351 | layer-2 weights | `4096 + 16*j + i` |
| 4352 – 4463 | layer-3 weights | `4352 + 16*j + i` |
| 4464 – 4479 | layer-1 biases | `4464 + j` |
| 4480 – 4495 | layer-2 biases | `4480 + j` |

Reads take one clock (block-RAM style). The contents are not reset.

### Timing

These figures are measured in simulation, counting clocks from the last sample to
`res_valid`:

| step | clocks |
|---|---|
| normalisation | 256 × 29 = 7,424 |
| layer 1 | 16 × (5 + 2·256) = 8,272 |
| layer 2 | 16 × (5 + 2·16) = 592 |
| layer 3 | 7 × (5 + 2·16) = 259 |
| softmax and hand-over | 243 |
| **total** | **16,790** |

At 100 MHz that is 0.17 ms per beat. The budget is about 272 ms: missing at most one beat
at 220 beats per minute. The network alone takes about 9,400 clocks. The reference design
reports about 21,800 clocks per beat at 100 MHz, because it feeds one input
every 3 clocks.

## Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `pm_we`, `pm_addr`, `pm_wdata` | in | 1, 13, 16 | parameter memory write |
| `s_valid`, `s_ready`, `s_data` | in/out/in | 1, 1, 16 | raw signed ECG samples, 256 per beat |
| `res_valid` | out | 1 | one-clock pulse: result ready |
| `res_class` | out | 3 | `ecg_class_e`: 0 N, 1 L, 2 R, 3 V, 4 paced, 5 A, 6 other |
| `res_prob` | out | 7 × 16 | probabilities, unsigned Q1.15 |
| `res_logit` | out | 7 × 16 | output-neuron values, Q5.10 |

Parameters: `L1_KIND` (default `NK_APPROX_L1`) and `L23_KIND` (default `NK_APPROX_L23`).
Setting both to `NK_ACCURATE` gives the accurate reference design. The network sizes are
fixed in `fxp_pkg`.

## Limits and departures

* **Approximate multipliers are not included.** The reference design uses two approximate
  4x4 multiplier cells inside the recursive 16x16 multiplier: a very power-efficient one
  in layer 1 and a more accurate one in layers 2 and 3. Their logic is not available here,
  so every neuron multiplies exactly. Only the adders are approximate. To add those cells,
  replace `mult_4x4` (per neuron kind) in the multiplier tree.
* **The approximate adder cell is this design's own choice** (lower-part OR; see above).
  With it, the alternating carry has no effect on the approximate sums.
* **No trained weights are included.** The testbenches use random weights, so they check
  arithmetic and control, not classification accuracy.
* **Memory size.** The memory holds 4,496 parameters: one weight per connection
  (4,464) plus one bias per hidden neuron (32); the output layer has no bias. The source also quotes a total of
  4,480.
* **Design choices not dictated by the source:** the sequencer; the on-chip buffers, which
  replace the file-based layer hand-over; the memory layout; 2 clocks per input; the raw
  sample format (signed 16 bit); the sequential dividers; the softmax table and the Q1.15
  output format; and argmax as the class decision.
* **Not included:** R-peak detection and segmentation of the continuous ECG into windows.
  The input must already be a window centred on the R peak.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare against integer
reference functions in `tb/tb_ref_pkg.sv`, which are written independently of the RTL
structure.

* The multipliers are checked exhaustively (4x4, 8x8) or on 50,000 random operand pairs
  (16x16, Q5.10).
* The adder is checked in its exact form and with 2, 4 and 8 approximate bits, including
  positive and negative overflow.
* The neuron's three kinds are checked after every accumulation, including a latency of
  exactly 2 clocks and forced saturation.
* The divider, softmax, normaliser and memory have their own testbenches. The softmax is
  also compared with real-valued softmax.
* `tb_ecg_mlp_top` runs the complete classifier at full size on four windows: a synthetic
  beat, noise, a flat line, and a beat with huge weights. It compares all logits,
  probabilities and the class bit-exactly with a reference model of the whole network and
  checks the 16,790-clock latency. It also counts that saturation, ReLU clamping, a visible
  effect of the approximate adders, carry-in 1, back-pressure and a flat window each
  occurred.
* `tb_ecg_mlp_top_accurate` repeats the end-to-end test with both neurons set to
  `NK_ACCURATE`.
* `tb_neuron_layer_flow` evaluates the whole network on one accurate neuron, driven
  the way the reference design's neuron testbench drives it. For each neuron there is a
  2-clock reset. Each input gets a 1-clock start followed by a 2-clock wait, so one beat
  takes 13,470 clocks. It checks the seven outputs of ten random beats.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/fxp_pkg.sv tb/tb_ref_pkg.sv tb/tb_ecg_mlp_top.sv --top-module tb_ecg_mlp_top -o sim
./obj_dir/sim
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. The full-size run takes a
few seconds.

## Files

| file | content |
|---|---|
| `rtl/fxp_pkg.sv` | number format, network shape, memory map, neuron kinds, class enum |
| `rtl/mult_4x4.sv`, `mult_8x8.sv`, `mult_16x16.sv` | recursive unsigned multiplier |
| `rtl/fxp_multiplier.sv` | signed Q5.10 multiplier |
| `rtl/sat_adder.sv` | saturating adder with optional approximate low bits |
| `rtl/relu.sv` | ReLU |
| `rtl/neuron.sv` | multiply-accumulate neuron with two-state control |
| `rtl/seq_divider.sv` | bit-serial restoring divider |
| `rtl/input_normalizer.sv` | min-max normalisation of a 256-sample window |
| `rtl/softmax.sv` | table-based softmax and argmax |
| `rtl/param_memory.sv` | weight and bias RAM |
| `rtl/ecg_mlp_top.sv` | the complete classifier |
| `tb/tb_*.sv` | testbenches; `tb_ref_pkg.sv` holds the reference arithmetic |
