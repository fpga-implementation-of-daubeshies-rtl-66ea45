# Daubechies-4 polyphase decimator

This design low-pass filters a stream of 8-bit samples with the length-4
Daubechies wavelet filter and halves its sample rate. A plain decimator
computes the FIR output for every input and then discards every second
result. This one splits the input into its even and odd samples first, and
filters each half-rate stream with its own two-tap branch. Every multiply-add
therefore happens at the output rate. All coefficient multiplications are
shift-and-add networks, so the datapath has no multipliers: only adders,
subtractors and wiring.

## The filter and its polyphase split

The Daubechies-4 scaling filter,

    H(z) = [(1+√3) + (3+√3) z⁻¹ + (3−√3) z⁻² + (1−√3) z⁻³] / (4√2)
         ≈ 0.4830 + 0.8365 z⁻¹ + 0.2241 z⁻² − 0.1294 z⁻³,

is quantized to 8 fraction bits:

    H(z) = (124 + 214 z⁻¹ + 57 z⁻² − 33 z⁻³) / 256.

When only every second output is kept, H(z) splits into an even-tap and an
odd-tap polyphase component:

    H(z) = H_even(z²) + z⁻¹ H_odd(z²)
    H_even(z) = 124 + 57 z⁻¹        (applied to x[2m], x[2m−2], …)
    H_odd(z)  = 214 − 33 z⁻¹        (applied to x[2m−1], x[2m−3], …)

The decimated output is therefore

    y[m] = (124·x[2m] + 57·x[2m−2] + 214·x[2m−1] − 33·x[2m−3]) / 256

Each branch runs once per output sample, and z⁻¹ inside a branch is a delay
of one *output* sample. Each branch is built in transposed form. The delayed
tap's product (57·x or 33·x) is computed when its sample arrives and stored
in a delay register. On the next output it is added to, or subtracted from,
the product of the new sample.

## Block structure

```
              +-----------+  x_even   +------------------------------------+
 x_in  -----> | phase_fsm |---------->| polyphase_filter                   |
 in_valid --> |  EVEN/ODD |  x_odd    |  rag_mul124 ------------(+)--+     |
              |  splitter |---------->|  rag_mul57 -> delayer --^    |     |
              +-----------+  filt_en  |                             (+)-> y_full reg
                    |---------------->|  rag_mul214 ------------(-)--+     |
                                      |  rag_mul33 -> delayer --^          |
                                      |      \__ 33x reused by 214x        |
                                      +------------------------------------+
                                                        |
                                                 out_shifter (÷256, clip) -> y_out, sat
```

| module | role |
|---|---|
| `daub_pkg` | widths (8-bit input, 17-bit internal, 8-bit output), the coefficients, and the sample and phase types |
| `phase_fsm` | two-state FSM that steers samples into `x_even` and `x_odd`, and pulses `filt_en` after each even sample |
| `rag_mul124` | 124x = ((x≪5) − x)≪2 |
| `rag_mul57` | 57x = (((x≪3) − x)≪3) + x |
| `rag_mul33` | 33x = (x≪5) + x |
| `rag_mul214` | 214x = (((33x≪1) + 33x) + (x≪3))≪1, reusing 33x |
| `delayer` | 17-bit register with clock enable; one output-rate delay |
| `polyphase_filter` | the two transposed branches, the final adder and the registered 17-bit sum |
| `out_shifter` | arithmetic shift right by 8, clipped to [−128, 127] |
| `daub_decimator` | top level |

## Shift-and-add multipliers

Together the four constant multipliers form a small reduced adder graph. Each
one costs one or two adders:

* 124 = 31·4. Shift left by 5, subtract the input, then shift left by 2.
* 57 = 7·8 + 1. Compute 8x − x, shift left by 3, then add x.
* 33 = 32 + 1. Compute (x≪5) + x.
* 214 = 2·(3·33 + 8). The odd branch needs both 33x and 214x of the same
  sample, so 214x is built from the 33x that `rag_mul33` already computes:
  2·33x + 33x + 8x = 107x, then shift left by 1. This costs two adders,
  with no third one for a separate graph.

Every product is sign-extended to 17 bits before shifting, and is exact. The
largest possible sum magnitude is (124+214+57+33)·128 = 54 784. That fits a
17-bit signed word, so no intermediate result can overflow.

## Interface and timing (`daub_decimator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `in_valid` | in | 1 | `x_in` holds a new sample this cycle |
| `x_in` | in | 8 | signed input sample |
| `out_valid` | out | 1 | a new decimated sample is on `y_out` / `y_full` |
| `y_out` | out | 8 | signed output, floor(sum/256) clipped to 8 bits |
| `y_full` | out | 17 | exact filter sum, in units of 1/256 |
| `sat` | out | 1 | `y_out` was clipped |

* One sample is accepted per clock edge with `in_valid` high. `in_valid`
  may be high every cycle, which gives one output per two clocks, or it may
  have gaps.
* The first sample after reset is x[0], an even sample. Outputs correspond
  to even input indices.
* Latency: if x[2m] is presented in cycle c, `out_valid` and y[m] appear in
  cycle c+2.
* Reset clears the phase to "even" and clears all sample and delay
  registers. The filter starts from an all-zero history, so the first
  outputs are the filter's start-up transient.
* Output range: the filter's gain at DC is 362/256 ≈ √2, so a full-scale
  input can drive the quotient to ±214. `out_shifter` clips to the 8-bit
  range and raises `sat`. `y_full` always carries the exact value. Inputs
  within ±75 can never clip, whatever the signal.

## Where this design departs from, or adds to, its source

The filter, its quantized coefficients, the polyphase split, the
shift-and-add decompositions, the transposed branches, the 8/17/8-bit word
widths and the divide by 256 all follow the published design. The following
are choices made here:

* **Signed samples.** The datapath is two's complement, which matches the
  sign extension that the multiplier networks describe. The source also
  calls its test signal "unsigned". Unsigned 8-bit input would need an 18-bit
  datapath. To run unsigned data, invert its MSB first (subtract 128).
* **Output clipping.** The output is said to be "limited to eight bits" by
  a right shifter. Here the shifted value is clipped, and the `sat` flag is
  an addition.
* **Handshake, reset and pipelining.** The `in_valid` strobe, the
  asynchronous reset, and the single register after the final adder are
  this design's own. The source's timing diagram is not reproduced, so the
  latency above is specific to this RTL.
* **Multiplier details.** The source describes the 124x network's last step
  as a shift "by four bits", but only a two-bit shift gives 124 (31·4), and
  that is what is built. Likewise, the shift inside the 57x network and the
  final doubling in the 214x network are the ones the gain values require.
* **Resource figures.** The source reports 190 logic elements on an Altera
  Stratix and 112 on a Xilinx Spartan II. Generic synthesis of this RTL gives
  67 flip-flop bits and about a dozen adders of at most 17 bits. No
  vendor-specific mapping was done, so the figures are not directly
  comparable.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module with values computed independently using integer arithmetic, and
ends by printing `TB_RESULT checks=N failures=M`.

* Each multiplier is tested against x·k for all 256 inputs.
* `out_shifter` is tested against floor division and clipping over the whole
  17-bit range.
* `delayer`, `phase_fsm` and `polyphase_filter` are tested against
  cycle-level reference models, driven by random data and random enables.
* `tb_daub_decimator` runs the top level at its default sizes. It keeps
  every accepted sample and checks each output against the direct-form FIR:
  the 17-bit sum, the clipped 8-bit value, the `sat` flag and the exact
  cycle of arrival. It uses four stimuli:
  1. random samples with gaps in `in_valid`;
  2. full-range random samples, which exercise clipping;
  3. a three-tone signal with periods of 64, 10 and 2.5 samples;
  4. a low-frequency tone and a high-frequency tone. The high tone's output
     peak must be less than a quarter of the low tone's. Measured: 13
     against 83.

  It also counts gaps, back-to-back inputs, clipped outputs and negative
  outputs, and fails if any of them never occurred.

To run a testbench with Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/daub_pkg.sv \
    tb/tb_daub_decimator.sv --top-module tb_daub_decimator -Mdir obj
./obj/Vtb_daub_decimator
```

Replace `tb_daub_decimator` with any other `tb_*` module to test one block.
All testbenches finish in well under a second.

## Changing the design

`IN_W`, `ACC_W` and `OUT_W` are parameters on every module, with their
defaults set in `daub_pkg`. The shift-and-add networks implement fixed
constants. Using another quantization of the filter means rewriting the four
`rag_mul*` modules and the reference formulas in the testbenches. If you
widen the input, widen `ACC_W` by the same number of bits to keep the sum
exact.
