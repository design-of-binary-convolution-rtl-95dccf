# Binary convolution operation circuit (BCOC) with the bisection method

This is synthesizable SystemVerilog for the convolution unit of a binarised
neural network (BNN): it convolves one 3x3 window of a binary feature map with
a binary 3x3 kernel per clock pulse, as a deep, fine-grained pipeline. The
circuit was first designed in single-flux-quantum (SFQ) superconducting logic.
In that logic every gate is clocked, so every gate is also a pipeline stage.
This RTL keeps that gate-level pipeline structure, stage counts included, as
ordinary synchronous logic.

## The arithmetic

Binarised values are +1 and -1. In hardware, -1 is coded as bit 0 and +1 as
bit 1. The product of two such values is then the XNOR of their bits. The
convolution of an n x n window is

    C = sum over all n*n elements of F[i][j] * K[i][j] = 2*Y1 - n*n

where Y1 is the number of element pairs whose bits agree. The direct way to
compute this is an n*n-input ones-counter, a shift and a subtraction. Wide
counters are costly in a gate-level pipeline: going from 4 to 5 inputs takes
the counter from 4 to 6 stages.

**Bisection** splits the products into two halves that are counted separately:

* **Part a** holds (n*n+1)/2 products, 5 for a 3x3 kernel. They are formed with
  XNOR, and a counter counts their ones: `Ya1`, the agreeing pairs.
* **Part b** holds the other (n*n-1)/2 products, 4 for 3x3. They are formed
  with XOR, so a 1 marks a *disagreeing* pair. A counter counts them: `Yb0`.

The two halves contribute `(2*Ya1 - 5)` and `(2*(4 - Yb0) - 4)`. So

    C = 2*(Ya1 - Yb0) - 1          (3x3; in general the -1 is the odd n*n)

The hardware gets this without a subtractor or a constant:

1. The adder adds `Ya1` to the bitwise complement of `Yb0`. Since
   `~Yb0 = -Yb0 - 1` in two's complement, the 4-bit sum is `Ya1 - Yb0 - 1`.
2. The output register shifts the sum left by one place and puts a 1 in the
   freed low bit. That gives `2*(Ya1 - Yb0 - 1) + 1 = C`, a 5-bit signed
   number in the range -9..+9.

Example: kernel `111110101` and feature `111110100`, with element [0][0] first,
agree in 8 of 9 places. Then C = 2*8 - 9 = 7 = `00111`. The testbench
reproduces this measured example.

## Pipeline

```
 data_in1 (kernel) --\                       +-> 5-input counter (6) ------------------+
                      SR memory -> XNOR/XOR (1)                                          +-> adder (4) -> output SR (1) -> result[4:0]
 data_in0 (feature)--/                       +-> 4-input counter (4) -> 2 delay stages -+
   insr_clk   sr_to_main         all stages move on bcoc_clk
```

Stage counts are in brackets. A window goes through 1 + 6 + 4 + 1 = 12 stages.
Its result appears 12 `bcoc_clk` pulses after the pulse that takes it into the
XNOR/XOR stage. A new window can enter on every pulse, so the pipeline
produces one result per pulse. The counter depths (6 and 4) and the adder
depth (4) are those of the original circuit. The XNOR/XOR stage and the output
register add one stage each, because they are clocked too. The two delay
stages after the shorter counter make both counts reach the adder on the same
pulse. An assertion in `bcoc` checks this.

### Clocks become enables

The original has three clocks. This RTL turns them into enables on one clock
`clk`:

| port         | role |
|--------------|------|
| `insr_clk`   | shifts one kernel bit (`data_in1`) and one feature bit (`data_in0`) into the input shift registers, element [0][0] first, then row by row |
| `sr_to_main` | copies both 9-bit registers into the window register that feeds the pipeline |
| `bcoc_clk`   | advances every pipeline stage by one; nothing in the datapath moves without it |

When `bcoc_clk` is low, the whole pipeline holds its state. A waiting window
enters the XNOR/XOR stage on the next `bcoc_clk` pulse, and is used only once.

A transfer in the same cycle as a write takes the contents from before the
write. So if all three enables are high on every cycle, each cycle feeds the
last nine bits written as a new window. That is a sliding 1-D window, and it
gives one result per clock.

`result` is the signed convolution value. Bit 0 corresponds to `outbit0` of the
original. `out_valid` pulses on the cycle a new result arrives, and `result`
holds until the next one. `result_held` is high once any result has been stored
since reset. `rst_n` is an asynchronous, active-low reset that clears every
register.

## Files

| file | content |
|------|---------|
| `rtl/bcoc_pkg.sv` | kernel size and the functions that derive every width and depth from it |
| `rtl/bcoc.sv` | top level: the whole circuit |
| `rtl/bcoc_sr_memory.sv` | serial-in input shift registers and the window register |
| `rtl/bcoc_xnor_xor.sv` | clocked XNOR (part a) and XOR (part b) products |
| `rtl/bcoc_pipe_counter.sv` | pipelined ones-counter, depth set by `STAGES` |
| `rtl/bcoc_delay.sv` | delay line that aligns the part-b count |
| `rtl/bcoc_adder.sv` | bit-level pipelined ripple-carry adder, `Ya1 + ~Yb0` |
| `rtl/bcoc_out_sr.sv` | doubling output register |
| `tb/tb_*.sv` | self-checking testbench for each module and for the top |
| `tb/tb_bcoc_scaled.sv`, `tb/bcoc_scaled_run.sv` | the top built for 5x5 and 7x7 kernels |

## Sizes and parameters

The top has one parameter, `N`, the kernel side. It defaults to 3. Everything
else follows from `bcoc_pkg`:

| quantity | formula | N=3 | N=5 | N=7 |
|----------|---------|-----|-----|-----|
| part a / part b inputs | (N²+1)/2, (N²-1)/2 | 5 / 4 | 13 / 12 | 25 / 24 |
| counter depth | 2·ceil(log2(inputs)) | 6 / 4 | 8 / 8 | 10 / 10 |
| adder width = adder depth | bits(part a count) + 1 | 4 | 5 | 6 |
| result width | adder width + 1 | 5 | 6 | 7 |
| latency (bcoc_clk pulses) | 1 + counter + adder + 1 | 12 | 15 | 18 |

The values for N=3 are those of the original circuit. The depth rule for other
counter sizes is this design's own: it is the simplest rule that gives the
published 4 and 6. The 5x5 and 7x7 builds are tested, but their depths are not
taken from a published design.

## How far it follows the original, and where it departs

Followed:

* the bisection split, with XNOR on part a and XOR on part b;
* the counter sizes 5 and 4, and their depths 6 and 4;
* a 4-stage adder that adds the complemented part-b count;
* the doubling output register and its 5 result bits;
* serial loading of kernel and feature through a shift register, with a
  separate transfer pulse;
* one convolution per main clock pulse.

This design's own choices:

* **Result formula.** The derivation behind the original writes the bisection
  result as `2*(Ya1 - Yb0)`. That value is even, but a 3x3 convolution is
  always odd. This RTL computes `2*(Ya1 - Yb0) - 1` instead. That equals
  `2*Y1 - n*n` and reproduces the measured result 7. The `-1` comes from adding
  the complement with no carry-in and filling the low bit with 1. This is this
  design's reading of "complement before addition" and of the doubling shift
  register.
* **Counter insides.** The original's counters are specific netlists of clocked
  gates. Here a counter is an adder tree, one level per stage, padded with delay
  registers to the published depth. Latency and function match. The gate count
  does not: the original uses 27 gates for 5 inputs and 15 for 4.
* **Adder insides.** The adder is a ripple-carry adder that produces one sum
  bit per stage. This gives the published 4 stages for a 4-bit sum. Its
  internal structure is not published.
* **Element order and part split.** Part a is elements 0-4 in row order, and
  part b is elements 5-8. Bits are shifted in element [0][0] first.
  `data_in1` carries the kernel and `data_in0` the feature map. The product is
  symmetric, so swapping the two does not change results.
* **Valid flags, reset and the single clock.** These have no counterpart in the
  original.
* **Input loading.** The SR memory is written serially only, as in the
  original's measurement. A parallel load of all n² bits is not provided.
* **Output register.** The output register stores a single result. No
  multi-entry output buffer or serial readout of results is built.

Not covered: the other layers of a full BNN. These are the input vector buffer,
the accumulation of several convolution units, pooling and the fully connected
layer. Their function is not specified in enough detail to build them. The
original's 9-input counter without bisection was only a baseline for
comparison, so it is not built either. Nor are bias margins, power or
Josephson-junction counts, which belong to the superconducting technology.

## Verification

Each testbench compares the circuit with values it computes itself. The top
testbench computes C directly as the sum of ±1 products, without using the
bisection. Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

* `tb_bcoc` runs the top at its default size with no parameter overridden. It
  covers:
  * the measured example (result 7, `00111`), with pauses between `bcoc_clk`
    pulses;
  * the extreme results +9 and -9;
  * 200 slow operations;
  * 600 cycles of streaming with all enables high (one result per pulse);
  * 3000 cycles of random enables.

  Every result's latency must be exactly 12 pulses. The testbench counts how
  often these happen: writes, transfers, transfers during a write, stalls,
  back-to-back results, and negative and positive results. It fails if any of
  them never happens.
* `tb_bcoc_scaled` runs 5x5 and 7x7 instances in the same way. Their expected
  latencies are 15 and 18 pulses.
* The module testbenches check each stage exhaustively or with random inputs,
  with random gaps in the advance pulses. They also check the published depths:
  6 and 4 for the counters and 4 for the adder.

To simulate, for example the top, with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/bcoc_pkg.sv tb/tb_bcoc.sv --top-module tb_bcoc
./obj_dir/Vtb_bcoc
```

Lint with `verilator --lint-only -Wall -y rtl rtl/bcoc_pkg.sv rtl/bcoc.sv`.
It reports `rst_n` as used both asynchronously and synchronously. The
synchronous use is the `disable iff` of the alignment assertion, not logic.
