# Haar and Daubechies-4 wavelet filter banks with perfect reconstruction

This design holds two one-level discrete wavelet transform (DWT) systems side
by side. One uses the Haar 2-tap wavelet and one the Daubechies 4-tap wavelet.
Each takes a stream of unsigned 8-bit samples, for example quantised audio.
It splits the stream into a low band and a high band, each carrying half the
samples, and then rebuilds the original stream from the two bands. The
rebuilt stream equals the input bit for bit, so the bit error rate is zero. It
is only delayed by a fixed number of clock cycles.

The design follows the architecture of Elfouly, Mahmoud, Dessouky and Deyab,
"Comparison between Haar and Daubechies Wavelet Transformations on FPGA
Technology". That paper builds the forward transform from *decimators* and
the inverse transform from *interpolators*, and gives the filter coefficients.
The word widths, the rounding, the serial framing and the cycle-level timing
are this design's own choices. They are listed under "Departures and choices"
below.

## Signal flow

```
             dwt_system (one per wavelet)
  xin  ─► serial_in ─► fdwt ──────────────── L[11:0] ──► idwt ─► serial_out ─► x_out
 (1 bit)   8-bit       ├ decimator(H0) ─► L              ├ interpolator(G0) ┐
           samples     └ decimator(H1) ─► H  H[11:0] ──► └ interpolator(G1) ┴─(+)─► round, clamp
                                     stb (one pulse per input sample) ──►
```

`dwt_top` holds a Haar `dwt_system` and a Daubechies-4 `dwt_system`. The two
share clock and reset and nothing else. Each system has the four ports
`clk_in`, `reset`, `xin` and `x_out`. `xin` and `x_out` are single bits that
carry the 8-bit samples serially.

## The filter bank

The analysis filters H0 (low pass) and H1 (high pass) produce the two bands.
Keeping every second output of each down-samples them by 2. The synthesis
filters G0 and G1 filter the up-sampled bands, which have a zero inserted
between samples. Their sum is the reconstruction. It is exact when the bank
cancels aliasing, H0(-z)G0(z) + H1(-z)G1(z) = 0, and has unit gain up to a
delay, H0(z)G0(z) + H1(z)G1(z) = 2z^-D.

Coefficient k multiplies the sample that is k steps old:
y[n] = sum_k c[k] x[n-k].

| wavelet      | H0                              | H1                              | G0                               | G1                              | D |
|--------------|---------------------------------|---------------------------------|----------------------------------|---------------------------------|---|
| Haar         | 0.5, 0.5                        | 1, -1                           | 1, 1                             | **-0.5, 0.5**                   | 1 |
| Daubechies-4 | 0.4830, 0.8365, 0.2241, -0.1294 | 0.1294, 0.2241, -0.8365, 0.4830 | -0.1294, 0.2241, 0.8365, 0.4830  | 0.4830, -0.8365, 0.2241, 0.1294 | 3 |

In the Daubechies bank each synthesis filter is the time reverse of its
analysis filter. The Haar high-pass synthesis filter is the published pair
(0.5, -0.5) used in that same time-reversed order. Taken in the other order,
the Haar bank would give H0G0 + H1G1 = 1 + z^-2 and leave an alias term, and
the output would not equal the input.

The Haar scaling is unusual and deliberate. L is the average (a+b)/2 and H is
the plain difference a-b. G0 = (1, 1) and G1 = (-0.5, 0.5) undo that scaling.

## Fixed-point arithmetic, and why reconstruction is exact

This is the part that needs the most care. The Daubechies coefficients are
irrational numbers given to 4 decimals, so the arithmetic is not exact by
construction. The rounding is arranged so that the final result still comes
out exactly.

- **Coefficients**: 16-bit signed, 14 fraction bits, round(c x 2^14). For
  example, 0.4830 becomes 7913 and -0.1294 becomes -2120. They come from
  `dwt_pkg::coef()`.
- **Input samples**: unsigned 8 bits, zero-extended to 9-bit signed.
- **L and H**: 12-bit signed with 2 fraction bits, so the range is -512 to
  511.75. Each analysis filter output is rounded half up to this grid and
  saturated.
  - Daubechies: L spans about -33 to +394, because the positive taps of H0
    sum to 1.544 and 1.544 x 255 = 394. H spans about ±213. Both fit.
  - Haar: L is 0 to 255 and H is ±255, both held exactly.
- **Synthesis**: G0(L) and G1(H) are kept at full precision, with 16 fraction
  bits and 30 bits in all. The two are added, and the sum is rounded half up
  to an integer and clamped to 0..255.

Error budget for Daubechies-4:
- Rounding L and H costs at most 1/8 per value.
- Each output sample uses two G0 taps and two G1 taps. Their magnitudes add up
  to 1.673, so that rounding contributes at most 0.21.
- Quantising the coefficients contributes well under 0.1 at full scale.

The total stays below 1/2, so the final rounding returns the original integer.
The 2 fraction bits on the 12-bit L/H bus are what makes this work. With 1
fraction bit the worst case would come close to 1/2. The Haar bank is exact
without any rounding. A bit-exact model of this arithmetic matched the input
on random, full-scale square-wave and tone-burst streams, and the testbenches
check the same property on the RTL.

## Decimator: FIR, load pulse, 1-bit counter, register

`decimator` is built the same way in both systems:

1. `fir_filter` takes a sample when `in_stb` is high. It registers the
   rounded filter output and, one cycle later, raises its active-high `load`
   output for one cycle: "a filter operation has completed".
2. `load` advances `toggle_counter`, a 1-bit counter. The counter's `keep`
   output is high on those advances whose new state is 1.
3. `keep` is the load enable of `load_register`, an n-bit parallel-load
   register. Filter outputs 0, 2, 4, ... after reset are stored. Outputs 1, 3,
   5, ... never enter the register and are discarded.

The decimator also emits `y_stb`, the load pulse delayed by one cycle. It
arrives once per input sample, after the register has loaded, and paces the
inverse transform.

Each FIR has one multiplier per tap, multiplying by a constant, and a tap
delay line that moves only on the strobe. The filter therefore runs at the
sample rate, not the clock rate.

## Interpolator: up-sampling state machine and FIR

`upsampler` is a two-state machine (`ZERO` and `PASS`) that advances on each
pacing pulse:
- Entering `PASS`, it registers the current sub-band value.
- Entering `ZERO`, it registers a zero.

It starts in `ZERO` after reset, as the decimator's counter does, so the two
run in phase. Every value the decimator keeps is passed exactly once, followed
by one zero. `interpolator` feeds this stream to a synthesis `fir_filter` that
keeps full precision. `idwt` adds the G0 and G1 interpolator outputs.

## Timing

One clock cycle carries one bit, and a sample takes 8 cycles. The pipeline
after the last bit of a sample has arrived:

| edges after the one that samples the LSB | event                                        |
|-----------------------------------------:|----------------------------------------------|
| 0 (same edge)                            | `serial_in` presents the sample (`x_stb`)    |
| 1                                        | analysis FIRs have computed (`load`)         |
| 2                                        | register loads or discards; pacing pulse `stb` |
| 3                                        | up-sampler output                            |
| 4                                        | synthesis FIRs have computed                 |
| 5                                        | sum rounded and clamped (`idwt.x_stb`)       |
| 6                                        | `serial_out` loads and drives the MSB        |

The MSB is sampled 7 edges before the LSB, so the MSB leaves 13 edges after it
arrived. Add the filter bank's own delay of D samples, and bit i of input sample n
appears on `x_out` exactly

    LATENCY = 8 x D + 13 cycles

after it was sampled on `xin`: 21 cycles for Haar and 37 for Daubechies-4.
Throughput is one sample per 8 clocks, with no stalls. A 19.2 kS/s audio
stream, one sample every 52.1 µs, needs a 153.6 kHz clock. At 1 MHz the
design takes 125 kS/s.

Timing details:
- Reset is synchronous and active high. It clears every register, the
  counters and the serial framing.
- The first bit sampled after reset is the MSB of sample 0.
- `x_out` is 0 until the first reconstructed sample is loaded.
- The filters start from zero state, so the first D output samples are zero.

## Departures and choices

- **Serial ports.** The system's `xin` and `x_out` are single bits, while the
  samples are 8 bits wide. This design sends the samples MSB first, one bit
  per clock, framed by counting bits from reset. The source names neither a
  bit order nor a framing.
- **Clocking.** The source clocks the 1-bit counter with the FIR's load pin
  and the register with the counter output. Here one clock drives every flip
  flop, and those signals are clock enables.
- **Pacing pulse.** The source draws only the L and H buses between the
  forward and inverse transforms. This design adds one pacing pulse (`stb`),
  because the up-sampler needs its load signal from the forward side's FIR.
- **Haar G1 order.** G1 is used as (-0.5, 0.5). See "The filter bank" above.
- **Own choices.** Word widths other than the 8-bit samples and the 12-bit
  L/H buses, rounding half up, saturation, and the output clamp belong to
  this design.
- **Not included.** The FPGA device the source targeted (Xilinx XC4000XL) is
  not part of the RTL. Its synthesis reports, such as critical paths, are not
  reproduced.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference arithmetic
in `tb/tb_ref_pkg.sv` starts from the real coefficient values and does its own
quantisation and 64-bit convolution, independently of the RTL.

| testbench            | what it checks                                                                                                                  |
|----------------------|---------------------------------------------------------------------------------------------------------------------------------|
| `tb_fir_filter`      | outputs against convolution, rounding and saturation; `load` exactly one cycle after each strobe                                 |
| `tb_toggle_counter`  | state and `keep` against a count of advances                                                                                    |
| `tb_load_register`   | load and hold                                                                                                                   |
| `tb_upsampler`       | alternate pass and zero; strobe timing                                                                                          |
| `tb_decimator`       | kept even-indexed filter outputs; `y_stb` two cycles after `x_stb`                                                              |
| `tb_interpolator`    | full-precision output of the up-sampled stream; two-cycle latency                                                               |
| `tb_fdwt`            | L and H of both wavelets                                                                                                        |
| `tb_idwt`            | fed L/H from the reference forward transform, the output equals input sample n-D                                                |
| `tb_serial_in`       | framing and bit order of the input converter                                                                                    |
| `tb_serial_out`      | framing and bit order of the output converter                                                                                   |
| `tb_dwt_system`      | bit-exact serial reconstruction at the stated latency; L/H buses against the reference                                          |
| `tb_dwt_top`         | both systems at default sizes, 2800 samples each (tone burst, random, full-scale square waves); BER must be 0; one output sample per 8 cycles; counts decimator keeps and discards, up-sampler passes and zero insertions |

Running a testbench with Verilator, for example the end-to-end one:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dwt_pkg.sv tb/tb_ref_pkg.sv tb/tb_dwt_top.sv --top-module tb_dwt_top
./obj_dir/Vtb_dwt_top
```

Every testbench needs `rtl/dwt_pkg.sv` listed first. `tb/tb_ref_pkg.sv` is
needed by every testbench that imports it.

## Changing the design

- **Sample width.** The defaults live in `dwt_pkg` (`DEF_SAMPLE_W`,
  `DEF_SUB_W`, `DEF_SUB_FRAC`) and are passed down as parameters. For a
  different sample width, widen `SUB_W` so that L, which reaches 1.544 times
  full scale, still fits with 2 fraction bits.
- **Another wavelet.** Add an entry to `wavelet_e`, its taps to `taps()` and
  `coef()`, and its delay to `bank_delay()`. `fir_filter` handles any tap
  count up to `MAX_TAPS`, and `interpolator`'s accumulator width follows
  `MAX_TAPS`.
- **Check after any change.** Run the reconstruction testbenches. They fail
  on any bit error.

## Files

- `rtl/dwt_pkg.sv`: wavelet and filter selectors, coefficients, default widths
- `rtl/fir_filter.sv`, `rtl/toggle_counter.sv`, `rtl/load_register.sv`,
  `rtl/decimator.sv`: forward-transform building blocks
- `rtl/upsampler.sv`, `rtl/interpolator.sv`: inverse-transform building blocks
- `rtl/fdwt.sv`, `rtl/idwt.sv`: forward and inverse transforms
- `rtl/serial_in.sv`, `rtl/serial_out.sv`: 1-bit sample ports
- `rtl/dwt_system.sv`: one complete system
- `rtl/dwt_top.sv`: Haar and Daubechies-4 systems side by side
