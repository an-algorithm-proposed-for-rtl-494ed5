# Multiplierless square-root raised-cosine pulse shaper with a reduced coefficient set

A long FIR filter costs one addition per coefficient and output sample. This
design cuts that cost by changing the coefficients instead of the
architecture. The 81 coefficients of a square-root raised-cosine
pulse-shaping filter (roll-off 0.22, 10 samples per symbol, order 80) are
scaled by a small power of two (8), rounded to integers and lightly edited.
Most of them become zero: 43 of 81 remain, so accumulating a product sum
takes 42 additions instead of 80. The remaining values are small integers
from -2 to 8. The filter is built with bit-serial distributed arithmetic
(DA), so it has no multipliers at all. Only the non-zero coefficients cost
adders. The scale factor is undone at the output with a 3-bit arithmetic
right shift.

Around the filter sits a direct-sequence CDMA link. Data bits are spread by
a pseudorandom code and shaped by the filter. The receiver can pass them
through the same filter again as a matched filter, or skip it. It then
samples once per chip and correlates with the same code to decide the bit.
This link is how the coefficient set is judged. Its bit-error rate with the
reduced coefficients stays where a Gaussian estimate puts it.

## The coefficient set

`rtl/fir_pkg.sv` holds the first half, h[0] .. h[40], of the floating-point
filter. The response is symmetric, h[80-k] = h[k]. The stored values equal
the closed-form square-root raised cosine

    h(t) = [sin(πt(1-β)) + 4βt·cos(πt(1+β))] / [πt(1-(4βt)²)],  β = 0.22,

sampled at t = (k-40)/10 symbols. The centre value is 1 - β + 4β/π = 1.0601.
The function `modified_coefs(scale_log2, edge_coef)` turns them into the
hardware coefficients at elaboration:

1. Multiply each value by 2^scale_log2 (8).
2. Round to the nearest integer, with halves rounded away from zero.
3. h[0] and h[80] round to zero, which would shorten the filter and spoil
   its response. They are set to a small non-zero value, `EDGE_COEF`.
4. Mirror the half to get all 81 values.

The result, in units of 1/8, from h[0] to the centre h[40]:

```
 5  0  0  0  0  0  0  0  0  0  0  0  0  0  0  1  1  1  1  1  0
 0  0 -1 -1 -1 -2 -2 -1 -1  0  0  1  3  4  5  6  7  8  8  8
```

The whole procedure for choosing the set is not hardware. It also involves
checking that the non-zero values keep at least 93 % of the signal power,
picking the smallest scale factor that does so, and checking the frequency
response. Only its outcome, the scale-round-edit rule, is built into the
package.

**Edge value.** This design uses +5, the sign of the original h[0] (0.0254).
Another version of the same set uses -4 (-0.5 after normalisation). To
get it, set `EDGE_COEF`, or pass `COEFS = fir_pkg::modified_coefs(3, -4)`
to `da_fir`. Either way 43 coefficients are non-zero.

**What the reduced set does to the pulse.** Chips are 10 samples apart, one
per filter symbol. Sampled at multiples of 10 from its centre, the transmit
pulse alone is 8 at the peak, then -1, 1, 0 and 5 on each side. So a
receiver without a filter sees intersymbol interference, mostly from the
edge coefficient four chips away. The transmit and matched filters together
give 678 at the peak, and at most 74 at any other multiple of 10. The
spreading factor equals the code period (31). So this interference reaches
the correlator only through the m-sequence autocorrelation, which is -1 off
the peak. It lowers the correlator output slightly but adds no noise. The
BER results below confirm this.

## Distributed arithmetic: how the filter computes without multipliers

An input sample x is a B-bit two's-complement number (B = `IN_W` = 8):

    x = -x[B-1]·2^(B-1) + Σ_{b<B-1} x[b]·2^b

Substituting this into y = Σ_k h[k]·x_k and swapping the sums gives

    y = -Z_{B-1}·2^(B-1) + Σ_{b<B-1} Z_b·2^b,   Z_b = Σ_k h[k]·x_k[b]

Z_b is the sum of the coefficients of all taps whose bit b is 1. A classic
DA filter reads Z_b from a look-up table with 2^81 entries, which is
impossible here. Instead `da_partial_sum` adds the selected coefficients
directly. A coefficient that is zero has no adder at all, so each bit plane
costs 42 additions.

`da_fir` is made of four parts:

| module | role |
|---|---|
| `tap_delay_line` | the 81 most recent samples, taps[k] = x[n-k], all visible at once |
| `da_controller` | handshake and bit sequencing: one load cycle, then bit 7 down to bit 0 |
| `da_partial_sum` | Z_b from bit `bit_idx` of every tap (combinational) |
| `da_accumulator` | acc = -Z_7 on the sign-bit cycle, then acc = 2·acc + Z_b |

The bits are processed most significant first. The accumulator therefore
only ever shifts left, and the result is exact: 17 bits (`ACC_W`), in units
of 1/8. `out_y_norm` is that value shifted right by 3. This is the division
by the scale factor, and it truncates toward minus infinity.

**Timing.** The filter accepts a sample when `in_valid && in_ready`. It is
busy for the next 8 cycles, one per bit. `out_valid` pulses for one cycle,
`IN_W + 1` = 9 cycles after the accepting edge, and `out_y`/`out_y_norm` are
valid in that cycle. `in_ready` is high again in the same cycle, so the
filter can take one sample every 9 cycles. A bit-parallel variant would be
8 times faster with 8 times as many adders. This design is bit-serial.

## The CDMA link (`cdma_link`, the top)

```
tx_bit ─► dsss_spreader ─► da_fir (u_fir) ─► saturate ─► tx_sample ──► (channel, outside)
              ▲                                                               │
         pn_generator (tx)                                                    ▼
rx_bit ◄─ despreader ◄─┬── da_fir (u_mf, matched filter) ◄─ mf_en = 1 ─┬── rx_sample
              ▲        └───────────────────── mf_en = 0 ───────────────┘
         pn_generator (rx)
```

- `pn_generator` is a 5-bit Fibonacci LFSR with the recurrence
  a[n+5] = a[n] xor a[n+2] (polynomial x^5 + x^2 + 1). It produces an
  m-sequence of period 31 from the all-ones seed. Chip 0 means +1 and
  chip 1 means -1.
- `dsss_spreader` holds a data bit for `SF` = 31 chips, one code period.
  Each chip becomes one impulse of ±56 (sign = bit xor chip), followed by 9
  zero samples. The transmit filter turns each impulse into a pulse. 56 is
  the largest amplitude for which the worst-case filter output
  (56·18/8 = 126) still fits the 8-bit `tx_sample`. So at the default
  amplitude the saturation after the filter never acts. The spreader waits
  on the filter's `in_ready`. It takes a new bit only after the previous
  bit's 310 samples are sent.
- **Receiver modes.** `mf_en` selects the mode. Hold it constant from reset.
  - `mf_en = 1`: the 8-bit received samples go through a second `da_fir`
    with the same coefficients. The filter is symmetric, so it is its own
    matched filter. The despreader skips the 80-sample group delay of the
    two filters.
  - `mf_en = 0`: pulse shaping at the transmitter only. The received
    samples go straight to the despreader, which skips 40 samples.
- `despreader` counts samples. After skipping the group delay it takes every
  10th sample, multiplies it by the local chip and accumulates. After 31
  chips the sign decides the bit: negative means 1. `rx_corr` reports the
  correlation. Chip timing is known from reset. There is no code acquisition
  or tracking loop.
- The channel is not part of the design. `tx_valid`/`tx_sample` leave the
  top and `rx_valid`/`rx_sample` enter it. For a loop-back, connect them
  directly. Received samples must not come faster than one per 9 cycles. An
  assertion checks this; the transmitter never sends faster.

**Throughput and latency.** One data bit takes 31 × 10 samples × 9 cycles =
2790 clock cycles. A bit's decision needs the samples that come up to 80
samples (40 without the matched filter) after its last chip impulse. So the
decision only appears once the next bit (or a padding bit) has pushed the
filter tails out.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NTAPS` | 81 | package, `da_fir`, `cdma_link` | filter length (order 80) |
| `SCALE_LOG2` | 3 | package, `da_fir` | scale factor 8 = 2^3 |
| `EDGE_COEF` | 5 | package | new value of h[0] and h[80] |
| `IN_W` | 8 | package, `da_fir`, `cdma_link` | sample width = bit-serial cycles per sample |
| `PS_W`, `ACC_W`, `Y_W` | 9, 17, 14 | derived | partial-sum, exact-result and normalised-result widths (from Σ\|h\| = 130) |
| `SPC` | 10 | package | samples per chip (the filter's samples per symbol) |
| `SF` | 31 | package | chips per bit |
| `CHIP_AMP` | 56 | package | impulse height |

The filter's specification gives the 81-tap length, the roll-off, the scale
factor 8 and the edge value 5. The 10 samples per chip follow from the
coefficient values. The input width, spreading factor, code, amplitude and
receiver details are this design's own choices.

Another 81-tap coefficient set can be passed to `da_fir` through `COEFS`.
Its partial-sum width `PS_W` must hold the sum of its absolute values. A
different filter length needs `NTAPS` and `ORIG_HALF` in the package changed
together.

## Size

After generic synthesis each filter has 670 flip-flop bits and no memories.
648 of those bits are the delay line; the other 22 are control and the
accumulator. The whole top, with two filters, has 1420. `da_partial_sum` is
the only large block of logic. An 8-bit-input FPGA implementation of the
same filter reported 786 flip-flops at 77 MHz. The single-filter count here
is comparable. Clock speed depends on the target and is not characterised.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
expected values are computed independently in the testbench. The
coefficients are typed in by hand, and filter outputs are checked against a
direct convolution.

| testbench | what it shows |
|---|---|
| `tb_tap_delay_line` | every tap, every cycle, under random shifting |
| `tb_da_partial_sum` | 43 non-zero coefficients; all-zero, all-one, single-tap and random bit vectors |
| `tb_da_accumulator` | exact result including extreme partial sums and the negative sign plane |
| `tb_da_controller` | bit order, sign-bit flag, `done` exactly 9 cycles after acceptance, 1 sample per 9 cycles |
| `tb_da_fir` | impulse response = coefficients, full-scale ± inputs, random data with gaps, latency, throughput, normalisation |
| `tb_pn_generator` | code against the recurrence, period 31, 16 ones per period |
| `tb_dsss_spreader` | every sample and code step under random back-pressure |
| `tb_despreader` | decisions and correlation values for both skip counts; samples between chips are ignored |
| `tb_cdma_link` | the whole link at default parameters in both receiver modes, with noise and a strong sinusoidal interferer |
| `tb_cdma_ber` | bit-error rate over 10 000 bits in both modes, compared with a Gaussian estimate |

`tb_cdma_link` checks every transmitted sample and every matched-filter
output against reference convolutions. It also checks every decided bit. It
counts that each mechanism happened: filter back-pressure on the spreader,
a non-zero sign bit plane, chips flipped by the channel yet corrected by
despreading, both bit values, an idle transmitter, and both modes.

`tb_cdma_ber` scales the transmitted samples by an attenuation a (1/16 with
the matched filter, 1/4 without). It then adds Gaussian noise of deviation σ
and a small tone, and clips to 8 bits. The estimate is
Q(μ / √(31·(σₙ² + σₜ²))). Here μ = a·56/s·(31·p₀ - Σ_{j≠0} p_j) is the
correlator mean. p_j is the pulse sampled j chips from its peak: h*h with
s = 64 in matched-filter mode, h alone with s = 8 otherwise. σₙ² and σₜ²
are the noise and tone powers at the sampling point. One run
gave:

| mode | σ per sample | bits | measured BER | estimate |
|---|---|---|---|---|
| matched filter | 14 | 2000 | 0 | 0.00007 |
| matched filter | 20 | 2000 | 0.0020 | 0.0020 |
| matched filter | 27 | 2000 | 0.0145 | 0.0137 |
| matched filter | 40 | 2000 | 0.059 | 0.063 |
| transmit only | 30 | 1000 | 0.0070 | 0.0066 |
| transmit only | 45 | 1000 | 0.050 | 0.049 |

The counts vary a little with the random seed. The testbench passes when
each measurement lies in a wide band around its estimate. So the reduced
coefficient set costs nothing beyond the estimate's prediction.

To run one testbench with Verilator, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing -y rtl rtl/fir_pkg.sv tb/tb_cdma_link.sv --top-module tb_cdma_link -o sim
./obj_dir/sim
```

Replace `tb_cdma_link` with any other testbench name. `tb_cdma_ber` takes
about 45 seconds, the others about a second.

## Where this design departs from, or goes beyond, the filter specification

- It is bit-serial. The specification does not say whether the DA filter
  is serial or parallel, nor what the input width is.
- The DA look-up table is replaced by an adder over the non-zero
  coefficients. A specific on-line DA table architecture was used with the
  original filter. It is not reproduced here.
- Edge coefficient +5 rather than -4, as described above.
- The filter is described as a raised-cosine pulse shaper. Its coefficient
  values are those of a square-root raised cosine with 10 samples per
  symbol. It is used that way here, with a matched receive filter built
  from the same coefficients.
- The CDMA link details are chosen here: code, spreading factor, chip
  amplitude, 8-bit receive samples, sampling point and known timing.
- Not built: the 512-tap filter variant (scale factor 128 or 256). Its
  coefficient values are not available.
