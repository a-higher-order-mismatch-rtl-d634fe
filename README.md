# Higher-order vector-feedback mismatch shaping for a multi-bit sigma-delta DAC

A multi-bit sigma-delta modulator feeds its quantizer output x[n] (an integer
0..M-1) back through a DAC built from M-1 nominally equal unit elements. The
elements are never quite equal, and if the same elements always represent the
same code, their mismatch appears as distortion and raised noise directly in
the signal band. A mismatch-shaping encoder chooses *which* x[n] elements to
turn on in each sample so that the mismatch error becomes high-pass noise,
which the decimation filter later removes.

This design does that with vector feedback: every element owns a small
noise-shaping loop filter, and one shared "vector quantizer" turns on the x[n]
elements whose filters ask for it most. Each element's on/off sequence is then
the output of a noise-shaping loop, so the mismatch error is shaped with the
loop's noise transfer function (NTF). Second-order versions of this are well
known; here the loop filters are third- or fourth-order cascades of
resonators with distributed feedback (CRFB), a structure that stays stable
at orders where error-feedback loop filters do not, plus, for third order, a common-mode correction called the
smallest element selector.

```
           x[n] (0..M-1)
              |
              v
   +---------------------+   sel[0..M-2]   +----------+
   |  vector quantizer   |---------------->| unit DAC |--+
   |  (x largest w_i on) |        |        +----------+  |   +-----+
   +---------------------+        |          ...         +-->| sum |--> y[n]
        ^  ^        ^             |        +----------+  |   +-----+
   w_0  |  | ...    | w_{M-2}     |        | unit DAC |--+
   +----+--+--------+----+        |        +----------+
   | M-1 element filters |<-------+  (each filter sees its own bit x_i)
   |   (3rd/4th order)   |
   +---------------------+
        |t_i (3rd order)  ^ f[n] = -min t_i
        +--> smallest ----+
             element selector
```

## The element filters

Each filter is a sampled-data loop filter without a quantizer. Its only input
(besides f[n] in the third-order case) is its own element bit x_i[n], fed
back with negative weights a1..a4 into every integrator. Two integrator
kinds are used: a *delaying* one, 1/(z-1), whose output is the register value
before this sample's update, and a *non-delaying* one, z/(z-1), whose updated
value is used in the same sample.

Third order (`crfb3_filter`), states s1 (= t_i), s2, s3:

```
s2' = s2 + c1*s1 - g1*s3 - a2*x_i        (non-delaying; s2' used below)
s3' = s3 + c2*s2' - a3*x_i               (delaying)
s1' = s1 + b1*f  - a1*x_i                (delaying)
w_i = c3*s3                              (register output only)
```

Fourth order (`crfb4_filter`), states s1..s4, no input:

```
s1' = s1 - g1*s2 - a1*x_i                (non-delaying)
s2' = s2 + c1*s1' - a2*x_i               (delaying)
s3' = s3 + c2*s2 - g2*s4 - a3*x_i        (non-delaying)
s4' = s4 + c3*s3' - a4*x_i               (delaying)
w_i = c4*s4
```

The g feedbacks close resonators that put pairs of NTF zeros inside the
signal band; the third-order filter's first integrator puts one at DC.
Because w_i depends only on registers, there is no combinational loop: the
quantizer decides from w, and the filters then update with the decision.

### Coefficients

The structure, the coefficient names and the NTF peak gains (1.5 for third
order, 1.4 for fourth) belong to the method; the numbers are this design's own.
They were derived as follows, for an oversampling ratio of 64:

1. NTF zeros at the in-band optimum: third order at z = 1 and at
   ±sqrt(3/5)·π/64 rad; fourth order at ±0.861·π/64 and ±0.340·π/64 rad.
2. NTF poles of a Butterworth high-pass whose corner is moved until the
   largest |NTF| on the unit circle equals the required peak gain.
3. All c = 1 and b1 = 1; each g = 2 − 2cos(θ) for the zero angle θ of its
   resonator (higher zero in the first fourth-order resonator).
4. The a coefficients solved so that the filter's transfer from x_i to w_i
   equals 1 − 1/NTF(z), i.e. NTF = 1/(1 − L).

| | a1 | a2 | a3 | a4 | g1 | g2 |
|---|---|---|---|---|---|---|
| 3rd order | 0.045448 | 0.243757 | 0.555909 | – | 0.00144557 | – |
| 4th order | 0.002869 | 0.031353 | 0.178533 | 0.490323 | 0.00178657 | 0.00027851 |

They are stored in `vfms_pkg` as 24-bit integers scaled by 2^20, and every
filter takes them as parameters, so another set can be dropped in.

### Why the third-order loop needs the smallest element selector

Only the *differences* between the w_i matter to the vector quantizer: adding
the same value to every filter changes nothing it decides. But each element is
on for a fraction x/(M-1) of the time, so every first integrator keeps
accumulating −a1·x_i and the common part of all filters grows without limit.
The smallest element selector (`min_selector`) computes f[n] = −min t_i[n]
and feeds it to every filter's first integrator, which pins the smallest of
them near zero and keeps the numbers bounded without touching the decisions.
The fourth-order filter has resonators in both halves, so its DC gain is
finite and it runs with zero input; its common part still swings with the
signal (up to about 9 200 in 65 536 samples of a −6 dBFS sine), which the
state width holds with a margin of about 57.

## The vector quantizer

`vector_quantizer` turns on the x[n] elements with the largest w_i. It is
combinational: every element counts how many others beat it (w_j > w_i, or
w_j = w_i with j < i) and is selected when that rank is below x[n]. Ranks are
all different, so exactly min(x, M-1) bits are set; ties go to the lower
index (a choice of this design). Cost: (M-1)(M-2)/2 comparators of 40 bits.

## Number format

Signed two's complement: states 40 bits with 20 fraction bits, coefficients
24 bits with 20 fraction bits. A coefficient product is truncated back to 20
fraction bits by an arithmetic right shift (rounding toward minus infinity);
the feedback terms a·x_i need no multiplier since x_i is one bit. There is no
saturation and no overflow flag: if the loops are driven into instability
(see below) the states eventually wrap.

## Interface and timing

`vfms_dac` (top) and `dem_encoder` (encoder alone):

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock; one sample per cycle with en high |
| rst_n | in | 1 | synchronous reset, active low; clears all states |
| en | in | 1 | sample strobe; with en low nothing changes |
| x | in | NBITS | code x[n], 0..M-1 |
| sel | out | M-1 | element controls x_i[n], registered |
| sel_valid | out | 1 | high one cycle after an enabled cycle |
| y | out | 32 | top only: modelled DAC output, units of 2^-16 element |

The whole encoder decision is made within the cycle in which x is presented;
`sel` shows it one clock later (the output register is this design's choice).
Top parameters: ORDER = 3 or 4 (default 3), NBITS (default 3, so M = 8 and 7
elements), MISMATCH_PPM (default 10 000 = 1 %). The default is the three-bit,
third-order configuration; ORDER = 4 with NBITS = 2 gives the two-bit
fourth-order one.

The critical path is register → w → rank comparators and count → select bit
→ non-delaying integrator → delaying integrator input: about one 40-bit
compare, a small adder tree and three 40-bit additions.

## Analog parts as models

`unit_dac` and `dac_summer` stand in for the unit current sources (or
switched capacitors) and the summing node. They use integers so that every
tool can read them: an element delivers WEIGHT, in units of 2^-16 of a nominal
element, when on. `vfms_pkg::elem_weight` gives each element a fixed
pseudo-random relative error uniform in ±MISMATCH_PPM. These two are
behavioural models, not circuits.

## Verified behaviour

With 1 % mismatch, a 1250 Hz sine at −6 dBFS sampled at 2.56 MHz, a
modulator model of the same order producing x[n], and an 8192-point
Hann-windowed DFT over the 20 kHz band (OSR 64):

| configuration | SNR, ideal codes | SNR, this encoder | SNR, thermometer selection |
|---|---|---|---|
| 3rd order, 2-bit (3 elements) | 89.3 dB | 89.2 dB | 63.8 dB |
| 3rd order, 3-bit (7 elements) | 95.0 dB | 95.0 dB | 61.4 dB |
| 4th order, 2-bit (3 elements) | 96.2 dB | 96.1 dB | 63.3 dB |
| 4th order, 3-bit (7 elements) | 102.6 dB | 102.6 dB | 61.3 dB |

The SNR of the ideal codes is limited by the modulator model and the DFT
length, not by the encoder; what matters is that the encoder keeps it while
fixed element selection loses 25–40 dB. The in-band share of the mismatch
error power is −76 to −90 dB with the encoder and about −1 to −3 dB without.

## Limits and departures

- **Input range.** The method evaluates a −3 dBFS sine. With the coefficients
  above, a floating-point model of the loops stays bounded only up to about
  −5.5 dBFS (three-bit) or −6 dBFS (two-bit); beyond that the differential
  states grow without limit. The RTL behaves the same: at −4.4 dBFS and
  −3 dBFS the in-band share of the mismatch error rises to −1 to −6 dB and the
  SNR falls to 51–56 dB, below that of plain thermometer selection. All
  verification therefore runs at −6 dBFS.
  A smaller NTF peak gain extends the range (1.3 was stable at −3 dBFS for
  the three-bit third-order case in the same model) at the cost of shaping.
- **Coefficients and number format** are this design's own, as is the
  fixed-point truncation; the method gives only structure and NTF peak gain.
- **Ties** in the vector quantizer go to the lower index; the **output
  register**, **reset** and **enable** are this design's choices.
- **Not included:** the sigma-delta modulator itself (its loop filter is
  analog and its coefficients are not available). The testbenches use
  behavioural stand-ins for it.
- **No overload detection** or state saturation.

## Files

`rtl/`:

- `vfms_pkg.sv` – widths, types, coefficients, multiply helper, element weights
- `crfb3_filter.sv`, `crfb4_filter.sv` – element loop filters
- `vector_quantizer.sv` – rank-based selection of the x largest
- `min_selector.sv` – f[n] = −min t_i for third order
- `dem_encoder.sv` – filters + quantizer (+ selector), output register
- `unit_dac.sv`, `dac_summer.sv` – behavioural models of the analog parts
- `vfms_dac.sv` – top

`tb/`: one self-checking testbench per module (`<module>_tb.sv`), the
reference models in `vfms_ref_pkg.sv` (a bit-exact encoder model written
from the difference equations, a first-order and a higher-order modulator
model, DFT-based SNR and in-band power), and `vfms_workloads_tb.sv` with its
helper `vfms_workload.sv`, which runs the four configurations of the table
above. `vfms_dac_tb.sv` runs the top at its default parameters: it checks
every selection bit-exactly, the output, the SNR, and counts that the
smallest element selector, quantizer ties, the all-off and all-on codes and
idle cycles all occur. Every testbench ends with a line
`TB_RESULT checks=N failures=F`.

Simulating with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/vfms_pkg.sv tb/vfms_ref_pkg.sv tb/vfms_dac_tb.sv --top-module vfms_dac_tb
./obj_dir/Vvfms_dac_tb
```

Replace `vfms_dac_tb` by any other testbench name. Lint the RTL with
`verilator --lint-only -Wall -y rtl rtl/vfms_pkg.sv rtl/vfms_dac.sv`. Each
testbench takes well under a second.
