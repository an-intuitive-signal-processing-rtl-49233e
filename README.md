# Temperature-fluctuation RMS monitor for fuel subassemblies

A fast thermocouple above a fuel subassembly of a fast reactor sees a
temperature that fluctuates: hot and cold coolant mix badly when the
thermal power rises, and the fluctuations get stronger still when a
blockage reduces the flow. Their magnitude is a useful safety signal. This
RTL turns the digitised thermocouple signal into that magnitude in real
time. It band-pass filters the samples to remove pick-up noise, then
computes a running root-mean-square over the last two filtered samples.
The result grows with the strength of the fluctuations.

```
 thermocouple -> cold-junction compensation + ADC  ->  sample {5:11}, 100 Hz
                 (outside this RTL)                        |
                                                           v
                          fir_direct: 9-tap direct-form FIR, {2:14} coefficients
                                                           |  fir_out {22:25}
                                                           v
                          rms_bin2:  z^-1, two squarers, +, x0.5  -> ms_out
                                     isqrt_seq                     -> rms_out
```

The sensor, the cold-junction compensation and the ADC are analog parts.
They are not modelled. Samples enter the top module, `tf_rms_top`, on a
valid strobe.

## Number formats

Formats are written `{integer bits : fractional bits}`, with the sign
counted in the integer bits. No stage rounds or truncates, except the
final square root, which truncates. The fractional point therefore moves
through the chain as follows:

| Signal | Width | Format | Meaning |
|---|---|---|---|
| `sample` | 16 | signed {5:11} | ADC sample; range -16 to +15.9995, step 2^-11 |
| coefficient | 16 | signed {2:14} | filter tap |
| tap product | 32 | signed {7:25} | kept whole |
| `fir_out` | 47 | signed {22:25} | sum of 9 products, sign-extended to the RMS input width |
| `ms_out` | 93 | unsigned, 50 fractional bits | floor((y[n]^2 + y[n-1]^2) / 2) |
| `rms_out` | 47 | unsigned, 25 fractional bits | floor(sqrt(ms)): the RMS truncated to the `fir_out` resolution |

To convert to real values, divide `fir_out` and `rms_out` by 2^25 and
`ms_out` by 2^50.

The 47-bit RMS input is much wider than the filter needs (36 bits would
hold any sum of nine 32-bit products). It is kept because it is the width
of the original RMS datapath. `RMS_W` on the top, `OUT_W` on the filter
and `IN_W` on the RMS unit change it.

The input range is the tightest constraint. A {5:11} sample cannot hold an
absolute temperature of hundreds of degrees. Only a signal centred near
zero fits, i.e. one from which the ADC stage or an offset has removed most
of the constant level. The filter passes DC (see below), so any level left
in the samples appears in the RMS.

## Band-pass filter (`fir_direct`)

The filter is a plain direct-form FIR. The newest sample is multiplied by
tap 0. A delay line of 8 registers holds the eight previous samples for
taps 1 to 8. All nine products are summed in one combinational adder and
the sum is registered. The delay line moves only when `in_valid` is high,
so samples may arrive at any rate.

The coefficients come from a rectangular-window design of an ideal
band-pass filter. The targets were f_L = 0.01 Hz and f_H = 24 Hz at
Fs = 100 Hz, with the ideal impulse response

    h[n] = ( sin(wc2 (n-M)) - sin(wc1 (n-M)) ) / (pi (n-M)),   n != M
    h[M] = (wc2 - wc1) / pi

where wc = 2 pi f / Fs. Each real coefficient is multiplied by 2^14 and
rounded towards minus infinity:

| tap | real value | stored (x 2^-14) |
|---|---|---|
| 0 | 0.048455588950058 | 793 |
| 1 | -0.001999671029421 | -33 |
| 2 | 0.300730704615709 | 4927 |
| 3 | -0.064365833819427 | -1055 |
| 4 | 0.017947456292925 | 294 |
| 5 | 0.315681787493831 | 5172 |
| 6 | 0.478 | 7831 |
| 7 | 0.106223795893264 | 1740 |
| 8 | 0.021789901874715 | 357 |

Be aware of three things about this coefficient set. It is implemented
exactly as published, in the published order.

* It is not symmetric, so the filter does not have linear phase.
* The taps sum to about 1.22. The filter therefore passes DC with a gain of
  1.22 instead of blocking it. A 9-tap filter cannot place a lower edge at
  0.01 Hz with Fs = 100 Hz.
* The original drawing of one filter section shows gains of 0.0428,
  0.007385 and 0.030782. These belong to no complete coefficient set and
  were not used. Only the structure was taken from that drawing.

To use another filter, override `COEFS` (and `TAPS`) on `fir_direct`. The
defaults live in `tf_pkg::BPF_COEFS`. An elaboration check rejects an
`OUT_W` too narrow for a full-precision sum.

## Running RMS (`rms_bin2`, `isqrt_seq`)

The RMS follows x_rms = sqrt((x_1^2 + ... + x_n^2) / n) with a bin of n = 2.
Successive bins overlap, so each new filtered sample gives one result:

1. A z^-1 register holds the previous filtered sample.
2. Two squarers form y[n]^2 and y[n-1]^2. They are exact unsigned
   94-bit products.
3. An adder sums them, and a gain of 0.5 (a one-bit shift) gives the mean
   square `ms_out`. The shift drops the LSB, which does not change the
   final root, because floor(sqrt(floor(S/2))) = floor(sqrt(S/2)).
4. `isqrt_seq` takes the square root. It uses the restoring digit-by-digit
   method and produces one result bit per clock: it brings down two
   radicand bits and subtracts the trial value 4*root+1 if it fits.

The original RMS datapath ends at the 0.5 gain and gives no circuit for
the square root. Both values are therefore brought out: `ms_out` is the
mean square, and `rms_out` is the true RMS. The iterative root is this
design's choice. Samples arrive at 100 Hz, and a one-bit-per-clock root
costs far less logic than a combinational 94-bit root.

The z^-1 register resets to zero. The first result after reset therefore
averages the first sample with zero.

## Interface and timing of `tf_rms_top`

| Port | Dir | Width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `sample_valid`, `sample` | in | 1, 16 | one ADC sample, signed {5:11} |
| `fir_valid`, `fir_out` | out | 1, 47 | filtered sample |
| `ms_valid`, `ms_out` | out | 1, 93 | mean square |
| `rms_valid`, `rms_out` | out | 1, 47 | RMS |
| `busy` | out | 1 | do not give a sample while high |

If `sample_valid` is high in clock 0:

* `fir_valid` pulses in clock 1;
* `ms_valid` pulses in clock 2;
* `rms_valid` pulses in clock 50 (RMS_W + 3).

Each output holds its value until the next result. The next sample may
come as soon as `busy` is low, which happens in clock 50. The hard limit
is RMS_W + 2 = 49 clocks between samples. Assertions in `rms_bin2` and
`isqrt_seq` report any violation in simulation. At 100 Hz and a 50 MHz
clock, samples are 500,000 clocks apart, so this limit never matters in
practice.

## Departures from the original design and open points

* **Reset, strobes and handshake** are this design's own choices. The
  original is a dataflow model that says nothing about them.
* **Square root**: added as described above. The original RMS datapath
  stops at the mean square.
* **Filter**: built from the published 14-bit coefficients, which do not
  form the band-pass the specification asks for (see above).
* **Input level**: the published simulation applies a signal with a level
  of several hundred to about a thousand. That level does not fit the
  published 16-bit {5:11} input format. The testbench uses a level of 10.0.
* **Truncation**: the optional truncation of products to fewer bits, which
  the original mentions as a resource saving, is not built. That matches
  the original, which also kept the full bit pattern.
* **Not modelled**: the thermocouple, the cold-junction compensation, the
  ADC, and the FPGA board and its peripherals. None of them has a logic
  function here.
* **Target**: the design targets a Cyclone III EP3C16 (15,408 logic
  elements). The logic-element count of this RTL has not been measured.
  It needs nine 16x16 constant multipliers, two 47x47 squarers and about
  600 flip-flops.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `fir_direct_tb` | Impulse response, full-scale steps and 400 random samples with random gaps, against a 64-bit convolution model. The model derives its coefficients independently from the real values. It also checks the one-clock latency. |
| `isqrt_seq_tb` | 0, 1, the maximum, perfect squares and their neighbours, and random values of every length. Each result is checked by r^2 <= x < (r+1)^2. It also checks latency, `busy` and the `done` pulse. |
| `rms_bin2_tb` | Extreme values, sign changes and 300 random samples against a 192-bit model of the mean square and the root property. It also checks latencies, `busy`, and samples given at the closest allowed spacing. |
| `tf_rms_top_tb` | End to end at default parameters. It feeds a sine wave plus uniform noise of variance 0.1 at 1, 5, 15 and 30 Hz (200 samples each, Fs = 100 Hz, level 10.0), then 50 samples at level 0. Every `fir_out`, `ms_out` and `rms_out` is checked against a model, and all latencies are checked. It counts filtered samples, roots, negative filter outputs and samples given at the first clock `busy` allows, and fails if any of these never happens. It prints the mean RMS of each segment. |

All testbenches pass. Each testbench also fails against a deliberately
broken copy of its module:

* a delay line that shifts without `in_valid`;
* a wrong trial value in the root;
* a z^-1 register that loads on every clock;
* a mis-scaled link from the filter to the RMS unit.

To run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tf_pkg.sv \
  rtl/fir_direct.sv rtl/isqrt_seq.sv rtl/rms_bin2.sv rtl/tf_rms_top.sv \
  tb/tf_rms_top_tb.sv --top-module tf_rms_top_tb
./obj_dir/Vtf_rms_top_tb
```

For another testbench, replace the last file and the top module name.
`verilator --lint-only -Wall -Irtl rtl/tf_pkg.sv rtl/tf_rms_top.sv` lints
the whole design. Its remaining warnings are bits that are deliberately
unused: the LSB dropped by the 0.5 gain and the top bits of the root's
last remainder. It also notes that the reset is used by the assertions as
well as by the flip-flops.

## Files

* `rtl/tf_pkg.sv`: formats and the default coefficients
* `rtl/fir_direct.sv`: direct-form FIR filter
* `rtl/rms_bin2.sv`: bin-2 running mean square and RMS
* `rtl/isqrt_seq.sv`: sequential integer square root
* `rtl/tf_rms_top.sv`: the complete chain
* `tb/*_tb.sv`: one testbench per module
