# Symmetric I/Q FIR low-pass filter with dynamically quantized coefficients

This is a fully parallel, pipelined 125-tap linear-phase FIR low-pass filter for a
complex (I/Q) stream of 16-bit samples. It is a 124th-order equiripple design for a
96 kHz sample rate, with a 20 kHz passband edge and a 22 kHz stopband edge.

Its point is how the coefficients are stored. Most taps of a low-pass FIR are small,
so plain fixed-point rounding gives them words whose top bits only repeat the sign
bit. Those bits carry no information. Here each coefficient is first multiplied by
its own power of two, 2^S, until its magnitude lies in [0.5, 1). Only then is it
rounded to COEFF_WIDTH bits, so every bit of every word counts. The datapath undoes
the scaling with a constant left shift per tap, MAX_MULT − S, before the products are
summed. At 12 bits the stopband comes within a few dB of plain 16-bit rounding.
The cost is wider products and adders.

## Number format: how a sample becomes an output

This is the part that needs care. Take tap k with double-precision coefficient b[k].

* **Scaling factor.** S[k] is the number of doublings that bring |b[k]| into [0.5, 1).
  Tap 0 (b ≈ 0.00058) has S = 10. The middle tap (b ≈ 0.429) has S = 1. The largest
  S in the set is 15, and that is MAX_MULT.
* **Coefficient word.** c[k] = round(b[k]·2^S[k]·2^(COEFF_WIDTH−1)) is a
  COEFF_WIDTH-bit two's-complement fraction. Rounding is half away from zero, and a
  word that would round to +1.0 saturates. Its magnitude is always in
  [2^(COEFF_WIDTH−2), 2^(COEFF_WIDTH−1)). For COEFF_WIDTH = 16 the first words are
  19515, 24428, 28934, 21289, 18937, 24674, −30551, …
* **Pre-add.** The response is symmetric (b[k] = b[124−k]), so the two samples that
  share a coefficient are added first: a[k] = x(n−k) + x(n−124+k). The middle sample
  x(n−62) passes alone. This needs 63 multipliers instead of 125. a[k] has 17 bits.
* **Product.** p[k] = a[k]·c[k], 33 bits at COEFF_WIDTH = 16.
* **Realignment.** s[k] = p[k] << (MAX_MULT − S[k]), 48 bits. Every lane now has the
  same weight: s[k] ≈ a[k]·b[k]·2^(COEFF_WIDTH−1+MAX_MULT).
* **Sum.** A three-level tree of 4-input adders sums the lanes exactly: 63 → 16 → 4 → 1,
  giving 50, 52 and then 54 bits.
* **Output.** Half an output LSB is added and COEFF_WIDTH + MAX_MULT = 31 bits are
  dropped. This is round half up: ties go toward +∞, so −2.5 becomes −2. The low 16
  bits are the output.

The result is

    dout = round_half_up( y(n) / 2 ),   y(n) = Σ_k b[k]·x(n−k)

Note the factor 1/2. The filter's passband gain is about 1.05 and Σ|b[k]| ≈ 2.39, so
halving leaves headroom. The number of dropped bits was fixed by matching published
output samples (see *Coefficient set*). Nothing saturates at the output: a result
outside 16 bits wraps. Full-scale inputs that follow the signs of the coefficients
can reach that range; ordinary signals do not.

## Pipeline and timing

Eight register stages, all loaded on the rising edge of `clk`:

| stage | register (per channel)  | count | width (defaults) |
|-------|-------------------------|-------|------------------|
| 1     | delay line              | 125   | 16               |
| 2     | pre-adder sums          | 63    | 17               |
| 3     | products                | 63    | 33               |
| 4     | realigned products      | 63    | 48               |
| 5     | adder tree level 1      | 16    | 50               |
| 6     | adder tree level 2      | 4     | 52               |
| 7     | adder tree level 3      | 1     | 54               |
| 8     | rounded output          | 1     | 16               |

* The delay line shifts only when `data_en` is high. Stages 2–8 load on every cycle.
* A valid bit travels with the data and becomes `dout_valid`.
* If `data_en` is high in cycle t, `dout_valid`, `dout_i` and `dout_q` hold that
  sample's result in cycle t+8.
* Throughput is one sample per clock. Gaps in `data_en` are allowed, because a stage
  only needs the delay-line state of the cycle its sample arrived in.
* Input and output rates are equal (single rate). 96 kHz sampling needs only a
  96 kHz clock.
* `rst_n` is an asynchronous, active-low reset. It clears every register, the delay
  line included, so samples in flight are dropped.

## Interface (`filter_sym`)

| port         | dir | width        | meaning                                       |
|--------------|-----|--------------|-----------------------------------------------|
| `clk`        | in  | 1            | rising-edge clock                             |
| `rst_n`      | in  | 1            | asynchronous active-low reset                 |
| `data_en`    | in  | 1            | `data_i`/`data_q` hold a new sample           |
| `data_i`     | in  | INPUT_WIDTH  | in-phase sample, two's complement             |
| `data_q`     | in  | INPUT_WIDTH  | quadrature sample                             |
| `dout_valid` | out | 1            | one-cycle pulse per filtered sample           |
| `dout_i`     | out | OUTPUT_WIDTH | filtered in-phase sample                      |
| `dout_q`     | out | OUTPUT_WIDTH | filtered quadrature sample                    |

| parameter    | default | notes                                                    |
|--------------|---------|----------------------------------------------------------|
| FILTER_TAP   | 125     | must be 125: only the 125-tap coefficient set exists     |
| INPUT_WIDTH  | 16      |                                                          |
| COEFF_WIDTH  | 16      | 16, 12 and 8 are the evaluated variants; up to 32 works  |
| OUTPUT_WIDTH | 16      |                                                          |
| MAX_MULT     | 15      | must be at least the largest S (15); elaboration checks it |

I and Q pass through two identical `fir_channel` datapaths with the same coefficients.
The filter has real coefficients, so the two parts never mix.

## Coefficient set (`fir_coeff_pkg`)

The package holds the 63 unique double-precision coefficients. Constant functions
turn them into the words and scaling factors at elaboration time:

* `dyn_scale(k)` gives S[k].
* `dyn_coeff(k, width)` gives the word c[k] for a given width.
* `dyn_coeff_set` and `dyn_scale_set` give all 63 at once.
* `max_scale()` gives the largest S.

So changing COEFF_WIDTH re-quantizes the same set; no table has to be regenerated.

The coefficients come from a Parks–McClellan (remez) design for the specification
above, with stopband weight 574 relative to the passband. That weight is this
design's own choice. It was picked because the result matches the published
quantized design:

* the scaling factors match the published ones;
* the 16-bit words of taps 0–15 are within 1 % of the published words;
* the 12-bit words of taps 0–7 are within 2 LSB;
* the filter reproduces the published output samples for the published input samples
  exactly, on both channels: I gives −7, −24, −27, 25, 133, 210, 145, −51, −224 and
  Q gives −2, −18, −61, −123, −174, −173, −117, −37, 12.

The published coefficient files themselves were not available, so individual words
can differ by a few counts from the original ones.

Worst-case stopband attenuation, measured in simulation from the hardware's
impulse response:

| coefficient width | this RTL | published (dynamic) | published (plain rounding) |
|-------------------|----------|---------------------|----------------------------|
| double precision  | 80.6 dB  | 80.6 dB             |                            |
| 16                | 79.8 dB  | 80.1 dB             | 74.6 dB                    |
| 12                | 70.0 dB  | 75.8 dB             | 51.5 dB                    |
| 8                 | 47.4 dB  | 64 dB               | 28.7 dB                    |

The 16-bit figure agrees. At 12 and 8 bits this set loses more than the published
numbers say. Plain rounding of the same set comes close to the published
plain-rounding numbers (73.1, 52.8 and 28.7 dB), which suggests the gap does not come
from the coefficient set: the published 12- and 8-bit dynamic figures could not be
reproduced with the method as described. Either way, dynamic quantization beats plain rounding
by 7 dB at 16 bits and by 17–19 dB at 12 and 8 bits.

Plain fixed-point rounding was only a baseline for comparison and is not built.
The published FPGA resource counts (LUTs, registers) come from place and route and
are not reproduced by these tests.

## Files

| file | content |
|------|---------|
| `rtl/fir_coeff_pkg.sv`   | coefficient set and dynamic quantization functions |
| `rtl/filter_sym.sv`      | top: two channels, valid pipeline, latency assertions |
| `rtl/fir_channel.sv`     | one real datapath: the stages below in order |
| `rtl/fir_delay_line.sv`  | 125-sample shift register with enable |
| `rtl/fir_preadd.sv`      | symmetric pre-adder, 125 → 63 |
| `rtl/fir_coeff_mult.sv`  | 63 constant-coefficient multipliers |
| `rtl/fir_scale_shift.sv` | per-tap left shift by MAX_MULT − S |
| `rtl/fir_adder_tree.sv`  | three-level 4-input adder tree |
| `rtl/fir_round.sv`       | round half up, drop the low bits |

Each testbench prints `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb/tb_filter_sym.sv` | Default parameters, end to end. Published I/Q samples, random bursts with gaps, a reset with samples in flight, impulse and step. Every output and every `dout_valid` cycle is compared with a direct-form model. |
| `tb/tb_filter_widths.sv` | The 16-, 12- and 8-bit variants side by side. Bit exactness, mean error against a double-precision model (0.25, 0.66 and 9.9 LSB), stopband attenuation and DC gain. |
| `tb/tb_fir_channel.sv` and one testbench per stage | Each block alone. |

To run one with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/fir_coeff_pkg.sv \
        tb/tb_filter_sym.sv --top-module tb_filter_sym
    ./obj_dir/Vtb_filter_sym

Every testbench finishes in well under a second of simulation time.

## Where this RTL departs from the original description, or fills it in

* The coefficient set is chosen by COEFF_WIDTH. The original picked one of three
  coefficient files through a string parameter.
* The coefficients are a reconstruction; see above.
* The number of dropped output bits (COEFF_WIDTH + MAX_MULT) is inferred from
  published output samples. The description only says "the least significant bits".
* The latency (8 cycles), the enable-gated delay line, the full reset and the
  wrap-around output are this design's choices. The description does not state them.
* Output rounding is the cheap hardware round-half-up (add half, truncate), as the
  description's hardware rounding discussion uses. Coefficient rounding is
  symmetric, half away from zero.
