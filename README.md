# Multiplier-free polyphase SINC³ decimator for single-bit ΣΔ streams

A sigma-delta ADC produces one bit per cycle at a high oversampling rate Fs.
The first decimation stage is usually a comb (SINC) filter. This design is a
third-order comb with decimation factor 8:

    H(z) = (1 + z^-1 + ... + z^-7)^3

It produces one 12-bit output sample for every 8 input bits.

A polyphase comb normally splits the input into 8 phases with a delay line
and a commutator. Each phase then feeds a sub-filter that has coefficient
multipliers. This design avoids both:

* **Dispatching instead of a delay line.** A controller counts the 8 cycles
  of a frame and enables one sub-filter per cycle. Each input bit reaches
  the one sub-filter it belongs to as it arrives, so the design has no input
  registers and no switches.
* **Multiplexers instead of multipliers.** The input is a single bit, so
  "coefficient × sample" is either the coefficient or zero. A 2:1
  multiplexer per coefficient produces it.
* **Time-shared adders.** Only one sub-filter is active in any cycle.
  Three adders, one per product position, accumulate the products of all
  eight sub-filters over a frame. Two more adders combine the three sums.
  That makes five adders in all.

## Coefficients and polyphase split

The impulse response has 22 taps:

    h = 1 3 6 10 15 21 28 36 | 42 46 48 48 46 42 36 28 | 21 15 10 6 3 1

The taps sum to 512. `h[k]` is the number of ordered triples (a, b, c) with
each value in 0..7 and a + b + c = k. Sub-filter `E_i` takes every eighth
tap, starting at tap i:

| sub-filter | product 1 | product 2 | product 3 |
|-----------|-----------|-----------|-----------|
| E0 | 1  | 42 | 21 |
| E1 | 3  | 46 | 15 |
| E2 | 6  | 48 | 10 |
| E3 | 10 | 48 | 6  |
| E4 | 15 | 46 | 3  |
| E5 | 21 | 42 | 1  |
| E6 | 28 | 36 | –  |
| E7 | 36 | 28 | –  |

Elaboration computes these values with `pcf_pkg::sinc_coef()`, which
convolves boxcars. No table is stored. The coefficients are 8 bits wide.

## Timing of one frame

Frame f covers input bits `x[8f] … x[8f+7]`. The controller's state `s`
counts 0..7:

| state s | active sub-filter | input bit | summation mux select |
|---------|-------------------|-----------|----------------------|
| 0 | E7 | x[8f]   | 0 |
| 1 | E6 | x[8f+1] | 1 |
| … | …  | …       | … |
| 7 | E0 | x[8f+7] | 7 |

When `E_i` is enabled, its Partial Product Generating block (PPG) presents
three products:

* the coefficient for the current bit;
* the coefficient for the bit of the same phase one frame earlier;
* the coefficient for the bit of the same phase two frames earlier.

The older bits sit in a chain of one or two flip-flops. This chain shifts
only while the branch is enabled, so each stage delays by exactly one frame.
Sub-filters with two products (E6, E7) have a single flip-flop. In total
there are 2×1 + 6×2 = 14 delay flip-flops.

The Partial Product Summation block (PPS) has three 8:1 multiplexers. Each
picks one product position of the active sub-filter. Each multiplexer feeds
an adder and a 12-bit accumulator register R0, R1 or R2.

* In state 0, `rst_in` forces the adder's feedback operand to zero, so the
  accumulators start the new frame without losing a cycle.
* After state 7, R0..R2 hold the three partial sums of frame f.
* In the next state 0, `oe` copies them into output copies.
* Two more adders add the output copies. The result is

      y[f] = Σ_{k=0..21} h[k] · x[8f + 7 − k]

  where bits before reset count as zero.

`dout` changes two cycles after the last bit of the frame and then holds for
8 cycles. `dout_strobe` pulses in the cycle in which a new value first
appears. Counting from the first cycle after reset as cycle 0, frame f's
result appears at cycle 8f + 9.

Input bit 1 weighs +1 and bit 0 weighs 0, so `dout` lies in 0..512. The
per-position sums reach at most 120, 336 and 56. Twelve bits can never
overflow, and nothing saturates. A bipolar (±1) reading of the modulator
output is `2·dout − 512`. Do that mapping downstream if you need it.

## Modules

| file | role |
|------|------|
| `rtl/pcf_pkg.sv` | configuration constants (M = 8, K = 3, 8-bit coefficients, 12-bit sums) and the coefficient functions |
| `rtl/pcf_controller.sv` | 8-state dispatcher: one-hot `e[7:0]`, select `s[2:0]`, `rst_in`, `oe`, `me` |
| `rtl/pcf_ppg.sv` | one PPG: 2:1 product multiplexers and the enabled delay chain, for branch `I` |
| `rtl/pcf_pps.sv` | PPS: three 8:1 multiplexers, three accumulating adders with registers and output copies, two output adders |
| `rtl/pcf_sinc3_top.sv` | top: controller, eight PPGs, PPS |

Top-level ports of `pcf_sinc3_top`: `clk` (the Fs clock), `rst`
(synchronous, active high), `din`, `dout[11:0]` and `dout_strobe`. The
controller outputs `e`, `s`, `rst_in`, `oe` and `me` are also brought out for
observation.

All modules take the parameters `M` (decimation factor), `K` (order),
`COEF_W` and `ACC_W`. Their defaults are the configuration above. The
structure generalises:

* M PPGs with up to K products each;
* K summation multiplexers and accumulators;
* K − 1 output adders.

Only the default configuration is tested. With other values you must choose
`COEF_W` and `ACC_W` large enough yourself, because nothing checks them.

## Where this implementation makes its own choices

* **Single clock.** The enables E0..E7 act as clock enables on the Fs
  clock. The published design uses them as the clocks of the delay
  flip-flops.
* **Coefficient storage.** The original keeps the 11 distinct coefficient
  values and a zero in shared registers. Here they are constants at the
  multiplexer inputs, which is equivalent because they never change.
* **Output copies.** Each accumulator has a second, output-enabled copy, so
  the output stays stable for a whole frame. The original counts only three
  12-bit registers in the summation block. Removing the copies saves 36
  flip-flops, but then `dout` is valid only in the `oe` cycle.
* **Control timing.** The cycles in which `rst_in` and `oe` are asserted,
  the state encoding (a binary up-counter that doubles as the select word),
  the reset style and the meaning of `me` are this design's choices. Here
  `me` is a multiplexer enable that is high whenever the filter is out of
  reset.
* **Zero outputs.** A disabled product multiplexer outputs zero.

## Simulating

The testbenches are self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl \
      rtl/pcf_pkg.sv rtl/pcf_controller.sv rtl/pcf_ppg.sv rtl/pcf_pps.sv \
      rtl/pcf_sinc3_top.sv tb/sd_modulator_model.sv tb/tb_pcf_sinc3_top.sv \
      --top-module tb_pcf_sinc3_top -o sim
    ./obj_dir/sim

| testbench | what it checks |
|-----------|----------------|
| `tb_pcf_controller` | dispatch order E7→E0, select word, `rst_in`/`oe`/`me` every cycle, 8-cycle period of every enable, reset in mid-frame |
| `tb_pcf_ppg` | all eight branches with random bits and random enables against a per-branch history model; the printed E7/E0 coefficient bit patterns |
| `tb_pcf_pps` | cycle-level model of the multiplexers, accumulators, output copies and output adders, with `me` gaps and maximum-value frames |
| `tb_pcf_sinc3_top` | whole filter at default size with a 100 MHz clock; see below |

`tb_pcf_sinc3_top` compares every output with the direct 22-tap convolution.
It also checks the output rate and the 2-cycle latency. Its input phases are:

* random bits;
* runs of ones (output 512) and zeros;
* a first-order ΣΔ modulator model (`tb/sd_modulator_model.sv`) ramping
  over full scale;
* three constant levels, where the output must settle at 512 × the density
  of ones;
* a reset in mid-frame.

The testbench counts each of these events and fails if any one never
happens. The run takes about a second.

## Limits

* Timing closure at 100 MHz is not analysed.
* The ΣΔ modulator and the later decimation stages (FIR filters after the
  comb) are outside this design. `din` and `dout` are where they would
  connect.
