# A 5x5 digit classifier that computes one network layer per clock

This RTL recognises the digits 1 to 5 drawn as 5x5 binary images. It evaluates a
small fully connected neural network, 25 inputs, three hidden layers of 20 ReLU
neurons and 5 softmax outputs, with no bias terms:

    H1 = ReLU(W1 * img)     W1: 20 x 25
    H2 = ReLU(W2 * H1)      W2: 20 x 20
    H3 = ReLU(W3 * H2)      W3: 20 x 20
    Q  = Softmax(W4 * H3)   W4:  5 x 20

The idea is to spend area instead of clocks. Every layer has its own fully
parallel multiply-accumulate array, so a whole matrix-vector product takes one
clock, and a small state machine walks the data through the layers. One image
takes 10 clocks from start to result, which is 200 ns at a 20 ns clock.

The architecture, the layer sizes, the state sequence and the port names follow
the design published in "Implementation of Artificial Neural Networks on
Field-Programmable Gate Arrays". That publication gives no trained weights, no
number formats and no circuit for the softmax. Those parts, listed under
"Design choices" below, belong to this implementation.

## Structure

```
             input_img[24:0]                         w_we/w_addr/w_data
                   |                                        |
                   v                                        v
               [img_q] --> dense_layer L1 (25->20) <-- weight_memory (W1..W4,
                                 |                         1400 x 8-bit registers)
                              [H1'] -> relu_vec -> [H1]
                                                    |
                              dense_layer L2 (20->20)
                                 |
                              [H2'] -> relu_vec -> [H2]
                                                    |
                              dense_layer L3 (20->20)
                                 |
                              [H3'] -> relu_vec -> [H3]
                                                    |
                              dense_layer L4 (20->5)
                                 |
                              [H4'] -> softmax_unit -> final_output0..5
   start --> ann_controller --> step[9:0] (load enables for every [register]), done
```

| File | Contents |
|---|---|
| `rtl/ann_pkg.sv` | sizes, number formats, weight address map, state encoding |
| `rtl/ann_top.sv` | the classifier: registers, four layers, three ReLUs, softmax, controller |
| `rtl/ann_controller.sv` | state machine S0..S8 |
| `rtl/weight_memory.sv` | weight registers with a one-word write port |
| `rtl/dense_layer.sv` | bias-free matrix-vector product, combinational |
| `rtl/relu_vec.sv` | ReLU, rescaling and clipping of a vector |
| `rtl/softmax_unit.sv` | two-stage softmax and arg-max |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The controller and its timing

The state is a one-hot 10-bit register brought out as `step` (bit k set means
state Sk; bit 9 is never used). Each state enables one register of the
datapath:

| State | Action | Clocks |
|---|---|---|
| S0 | wait for `start`; on the edge that sees `start = 1`, latch `input_img` | until start |
| S1 | H1' <= W1 * img | 1 |
| S2 | H1 <= ReLU(H1') | 1 |
| S3 | H2' <= W2 * H1 | 1 |
| S4 | H2 <= ReLU(H2') | 1 |
| S5 | H3' <= W3 * H2 | 1 |
| S6 | H3 <= ReLU(H3') | 1 |
| S7 | H4' <= W4 * H3 | 1 |
| S8 | softmax stage 1, then stage 2 and `done`, then hold | 2, then until start is low |

Counting the edge that samples `start` as edge 1, the result and `done` appear
together on edge 10. `start` is a level. While it stays high after the result,
the machine waits in S8 with `done = 1`, so holding `start` high gives one
classification, not a loop. Once `start` is low the machine goes back to S0.
`done` stays high in S0 and drops on the edge that starts the next image. The
image is sampled only on the starting edge, so `input_img` may change during a
run.

`reset` is active low: the design runs while `reset = 1`. It clears the state,
`done`, the image and all activation registers. It does not clear the weights.

## Number formats

All arithmetic is two's-complement fixed point. Every layer sum is exact. Bits
are dropped only where a sum is narrowed to the next activation register.

| Quantity | Width | Fraction bits | Range |
|---|---|---|---|
| weight | 8 | 5 | -4.0 .. +3.97 |
| image pixel | 1 (fed to layer 1 as 0 or 1) | 0 | 0, 1 |
| H1' (layer 1 sum) | 15 | 5 | exact |
| H1, H2, H3 (activations) | 16 | 8 | 0 .. 127.996 |
| H2', H3', H4' (layer sums) | 29 | 13 | exact |
| softmax output | 5, unsigned | 4 | 0 .. 1.0 (1.0 = `5'b10000`) |

`relu_vec` turns a layer sum into an activation:
1. Negative values become 0.
2. The value is shifted to 8 fraction bits. For layer 1 that is a left shift by 3. For layers 2 and 3 it is a right shift by 5, which truncates.
3. Values above 32767/256 are clipped to that maximum.

The logits H4' go to the softmax at full width.

To move to other formats, change the constants in `ann_pkg`. The accumulator
widths follow from them.

## Softmax in fixed point

`softmax_unit` has two registered stages.

Stage 1 finds the largest logit and its index. It then works with
d = zmax - z >= 0, so every exponential lies in (0, 1]. It rewrites e^-d as
2^-t with t = d * log2(e), using log2(e) as the 17-bit constant 47274/2^15.
With t split into an integer part n and a fraction f, the unit uses
2^-t ~ (1 - f/2) * 2^-n. This straight-line fit needs no table, and its
relative error is at most about 6 %. Each exponential is a 16-bit value with 15
fraction bits.

Stage 2 sums the five exponentials and computes
round(e * 16 / sum) for each class with a divider.

The error of the exponential moves a probability by less than one output LSB (1/16), and the
testbench checks the outputs to within one LSB of a softmax computed with
`real` arithmetic. `final_output0` is the one-hot index of the largest logit.
On a tie it takes the lowest index. It does not depend on the approximation.

## Loading weights and presenting images

Load the weights before the first image, one word per clock through
`w_we`/`w_addr`/`w_data`. A write is visible right after its clock edge.
Addresses:

| Matrix | Addresses | Word for W[o][i] |
|---|---|---|
| W1 (20x25) | 0 .. 499 | 0 + 25*o + i |
| W2 (20x20) | 500 .. 899 | 500 + 20*o + i |
| W3 (20x20) | 900 .. 1299 | 900 + 20*o + i |
| W4 (5x20) | 1300 .. 1399 | 1300 + 20*o + i |

Writes to 1400 and above are ignored. A write during a classification takes
effect in the next state that reads that matrix. The testbench loads weights
only while the design is idle.

The 5x5 image is flattened column by column, which is the order a `reshape` to
25x1 produces in MATLAB-style software. So `input_img[k]` is the pixel in row
`k % 5` and column `k / 5`, counted from the top-left. The training set this
network was sized for draws digits as 0 pixels on a background of 1. The
hardware only uses each bit as the number 0 or 1. Weights trained with another
pixel order or polarity must be permuted to match.

## Ports of `ann_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | active-low asynchronous reset |
| `start` | in | 1 | start level, sampled in S0 |
| `input_img` | in | 25 | image, see above |
| `w_we`, `w_addr`, `w_data` | in | 1, 11, 8 | weight write port |
| `step` | out | 10 | one-hot state |
| `done` | out | 1 | result valid |
| `final_output0` | out | 5 | one-hot prediction, bit k = digit k+1 |
| `final_output1` .. `final_output5` | out | 5 each | probability of digits 1..5 |

## Design choices and departures from the published design

Taken from the published design:
- the 25-20-20-20-5 topology without biases, and ReLU and softmax as the activations
- the state sequence S0..S8, with one state per product or activation
- the 10-clock latency
- the port names `reset`, `start`, `done`, `step[9:0]` and `final_output0..5` with their widths
- active-low reset: its published waveform shows the design running with reset = 1
- the one-hot prediction `00001` for digit 1

This implementation's own:
- **Number formats.** All of them, including reading the 5-bit outputs as 4 fraction bits. The published waveform shows the winning output as "1", which this implementation reads as 1.0.
- **Rescaling and clipping.** How activations are narrowed and clipped.
- **Softmax circuit.** The exponential approximation, the divider and the two pipeline stages.
- **S8 length.** S8 lasts two clocks before `done`, so that the total is 10 clocks.
- **S8 exit.** The machine leaves S8 only when `start` is low. The published state chart returns from S8 to S0, but its waveform shows the machine resting in S8 while `start` stays high. This behaviour matches both.
- **Weight write port and address map.** The published design exports trained weights into the hardware description. It does not define a load interface.
- **Clock period.** 20 ns. The source text says both "100 MHz" and "20 ns clock cycle". 20 ns agrees with its 200 ns for 10 cycles.

Not provided:
- **Trained weights.** The original weights came from offline training and are not published, so this RTL ships no weight set. Accuracy figures for the trained network therefore cannot be reproduced here.
- **Trained test set.** The testbench uses hand-built template weights instead. It also uses its own drawings of the digits 4 and 5, because only 1, 2 and 3 of the training patterns are published.

## Cost

Each layer is a separate parallel array. The multipliers are:
- layer 1: 500 products of a 1-bit pixel with an 8-bit weight
- layers 2 and 3: 800 products of 16 by 8 bits
- layer 4: 100 products of 16 by 8 bits

Weights take 11,200 register bits. Activation and sum registers take about 2,700
bits. This buys the one-layer-per-clock latency. If area matters more than
latency, the same controller could share one 20x20 array between S3, S5 and S7.
That change is not made here.

## Simulation

Every testbench checks its results, counts them, and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. To run the
end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_ann_top \
          rtl/ann_pkg.sv tb/tb_ann_top.sv
./obj_dir/Vtb_ann_top
```

For the other modules, replace `tb_ann_top` with `tb_ann_controller`,
`tb_weight_memory`, `tb_dense_layer`, `tb_relu_vec` or `tb_softmax_unit`.

- **`tb_ann_top`** runs the design with its default sizes, at a 20 ns clock.
  - Part 1 loads template weights that make the network a matcher for five digit patterns. Layer 1 gets +0.5 on background pixels and -1.0 on stroke pixels; layers 2 and 3 pass these neurons through; layer 4 scales them by 3. Each pattern must be classified correctly with probability of at least 12/16. Digit 1 must give `final_output0 = 00001` and `final_output1 = 1.0`.
  - Part 2 loads twelve random weight sets and classifies 180 random images. It compares the logits bit for bit with a fixed-point model of the network in the testbench, the prediction exactly, and the probabilities to within one LSB.
  - Every run checks the 10-clock latency.
  - It counts waiting in S0, ReLU zeroing, activation clipping, holding in S8, the return to S0, weight reloads and each of the five predicted classes, and fails if any of them never occurs.
- **`tb_ann_controller`** checks the state sequence, when `sm_start` and `done` occur, the 10-edge latency and the behaviour of `start`.
- **`tb_weight_memory`** checks the address map, disabled writes and writes out of range.
- **`tb_dense_layer`**, **`tb_relu_vec`** and **`tb_softmax_unit`** compare against models computed in the testbench. The cases include extreme weights, clipping, ties and the two-clock latency of the softmax.
