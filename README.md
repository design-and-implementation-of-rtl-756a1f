# Multiplier-free decimation filter for a digital hearing aid

A digital hearing aid samples its microphone far faster than speech needs.
The front-end converter delivers coarse 6-bit samples at 1.28 MHz, and the
signal processing that follows wants fine samples at a low rate. This design
bridges the two. It cuts the rate by 320 to 4 kHz and grows the word to 13
bits, removing the out-of-band content on the way. Every stage works without
a hardware multiplier. The first stage is a CIC filter, which only adds and
subtracts. The two FIR stages use *distributed arithmetic* (DA): the
multiplications are replaced by a small precomputed table that is read once
per input bit. The preferred table form is the offset-binary-coded (OBC)
one, which needs half the words of plain binary DA.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable, has no
vendor primitives, and comes with a self-checking testbench per module.

## The chain

```
 in_sample        cic_decimator        half_band_filter       corrector_filter      out_sample
 6 bit   ───────► 5 stages, /16  ────► 7 taps, /2      ─────► 8 taps, /10     ────► 13 bit
 1.28 MHz         11 bit, 80 kHz       12 bit, 40 kHz         13 bit, 4 kHz         4 kHz
```

| stage | module | rate in → out | width in → out | work per output |
|---|---|---|---|---|
| CIC | `cic_decimator` | 1.28 MHz → 80 kHz | 6 → 11 | 5 integrators per input, 5 combs per output |
| half-band | `half_band_filter` | 80 → 40 kHz | 11 → 12 | 11 DA cycles |
| corrector | `corrector_filter` | 40 → 4 kHz | 12 → 13 | 12 DA cycles |

The top, `decimation_filter`, runs everything on one clock at the input rate.
Each stage is enabled by the valid strobe of the stage before it, so the
later stages are idle most of the time. The half-band filter needs 11 of the
32 cycles it has between outputs, and the corrector needs 12 of its 320.
With `in_valid` held high, `out_valid` pulses once every 320 cycles. The CIC
and half-band outputs are also brought out, for observation.

The stage order, the rates, the factor 16, the five CIC stages and the
widths 6/11/12/13 are those of the original design. The factor 10 of the
last stage follows from its 40 kHz and 4 kHz rates.

## CIC decimator

`cic_decimator` has five integrators, a down-sampler by 16 and five combs:
H(z) = ((1 − z⁻¹⁶)/(1 − z⁻¹))⁵. The DC gain is 16⁵ = 2²⁰. The registers are
6 + 5·4 = 26 bits wide, enough for that gain. Integrator overflow therefore
wraps harmlessly and cancels in the combs, which is the standard CIC
argument. The output is the top 11 bits, an arithmetic shift right by 15.
A full-scale input of −32 gives −1024 and one of 31 gives 992.

Each integrator adds the *registered* value of the previous one, which
keeps the adder chain one stage deep. This delays the response by 5 input
samples. Output m is therefore the filter evaluated at input sample
16m + 10. The differential delay of the combs is one decimated sample.

## Distributed arithmetic: how the FIR stages multiply without multipliers

Both FIR stages compute y = Σₖ Cₖ·x[n−k] over K taps, with B-bit two's
complement samples. Write each sample as bits:
x = −b_{B−1}·2^{B−1} + Σ_{l<B−1} b_l·2^l. Swapping the two sums gives

  y = Σ_l ±2^l · ( Σ_k C_k · b_{k,l} ).

The inner sum depends only on the K bits b_{0,l} … b_{K−1,l}, the bit l of
every tap. It can be looked up in a table of 2^K precomputed words. The
filter then needs one table read, one add and one shift per input bit, so it
takes B cycles per output whatever K is. Bits are processed LSB first. The
accumulator is shifted right by one before each new word is added. The
sign bit carries negative weight, so its word is subtracted.

### Binary DA engine (`bda_engine`)

The tap registers hold the window x[n] … x[n−K+1]. During a computation
they rotate right by one bit per cycle, so bit l of every tap is at bit 0
in cycle l. After B cycles each register holds its original word again.

The K bit-0 outputs address the 2^K-word ROM. Tap 0 is the address LSB,
and the word at address a is the sum of the Cₖ whose bit k of a is set. An
add/subtract unit adds the word, except in the sign-bit cycle, where it
subtracts. Putting the sign handling in the adder is what keeps the table
at 2^K words; the unreduced form stores the negated words too, 2^{K+1} in
all.

### OBC DA engine (`obc_da_engine`), the default

Offset binary coding writes each bit as c = 2b − 1 ∈ {−1, +1}. That gives

  x = ½ · ( Σ_{l<B−1} c_l 2^l − c_{B−1} 2^{B−1} − 1 ),

and therefore

  y = Σ_l ±2^l · Q(c_{·,l}) − ½ Σ_k C_k,  where Q(c) = ½ Σ_k C_k c_k.

Q is odd: flipping every bit negates it. So only the 2^{K−1} words with
c₀ = +1 are stored, and the other half is obtained by negation. For K = 4
the table is:

| address (tap1 tap2 tap3) | stored word (×½) |
|---|---|
| 000 | C₀ − C₁ − C₂ − C₃ |
| 001 | C₀ − C₁ − C₂ + C₃ |
| 010 | C₀ − C₁ + C₂ − C₃ |
| 011 | C₀ − C₁ + C₂ + C₃ |
| 100 | C₀ + C₁ − C₂ − C₃ |
| 101 | C₀ + C₁ − C₂ + C₃ |
| 110 | C₀ + C₁ + C₂ − C₃ |
| 111 | C₀ + C₁ + C₂ + C₃ |

In each cycle the engine does four things:

* **Address.** Each of the bits of taps 1 … K−1 is compared with the tap-0
  bit; address bit K−1−k is 1 when tap k's bit equals tap 0's bit. Tap 1 is
  the address MSB.
* **Sign select (MUX1).** With z = b₀ XOR sign_time, z = 1 adds the word and
  z = 0 adds its negation. A tap-0 bit of 0 selects the mirrored half of
  the table. In the sign-bit cycle the sign flips once more.
* **Start value (MUX2).** In the first cycle the accumulator is loaded with
  the constant −½ΣC instead of its shifted previous value. This constant is
  the "−1" term of every sample's offset-binary form.
* **Shift-accumulate.** In every later cycle the accumulator is shifted right
  by one before the add.

In this implementation the words are stored doubled, without the ½, and the
final sum is halved. The table stays exact when a coefficient sum is odd.
The accumulator keeps B−1 fraction bits, so the right shifts lose nothing.
The result is exact, with no rounding anywhere. The testbenches check this
bit for bit against a direct-form sum of products.

Both engines compute the ROM contents from the `COEF` parameter at
elaboration. Synthesis sees a constant table; there is no write port.

### Engine timing

Both engines share one interface:

* `in_valid` shifts `in_data` into tap 0 and moves the window one tap along.
* `in_start`, given together with `in_valid`, starts a computation over the
  new window.
* `busy` is then high for B cycles.
* `y_valid` pulses B cycles after the starting sample, and `y` holds the
  full-precision result (COEF_W + B + ⌈log₂K⌉ bits) until the next one.

A sample offered while `busy` would be lost. An assertion flags it.

## Reconfigurable FIR (`da_fir`) and decimation

`da_fir` holds one OBC engine and one binary DA engine. Both receive every
sample, so their windows are always identical. The `arch` input
(`dec_pkg::da_arch_e`: `ARCH_OBC` or `ARCH_BDA`) chooses which one computes.
The choice is captured with the sample that starts a computation, so `arch`
may change at any time and takes effect from the next output. The engine
that is not chosen does not compute.

For a decimating stage a counter starts a computation on every DECIM-th
sample only; the other samples just enter the window. The full-precision
result is shifted right by `OUT_SHIFT` and cut to `OUT_W` bits.

With no parameters, `da_fir` is the 8-tap, 8-bit filter with every weight
equal to 11. For a constant input of 0xAA (−86) it settles at
8·11·(−86) = −7568, low byte 0x70.

## The two FIR stages and their coefficients

The original design gives the stage types, rates and widths. It does not
give the FIR coefficients, which are chosen here. Each is a small integer
with at most two non-zero canonic-signed-digit (CSD) digits (9 = 8 + 1,
5 = 4 + 1, and so on):

* **Half-band** (`dec_pkg::HB_COEF`): (−1 0 9 16 9 0 −1)/32, 7 taps. It has
  the half-band shape: −6 dB at 20 kHz (a quarter of 80 kHz) and every
  other tap zero except the centre one. Output = sum >> 5, so the DC gain
  is 1; the 12th bit is headroom.
* **Corrector** (`dec_pkg::COR_COEF`): (1 2 5 8 8 5 2 1)/32, 8 taps, then
  every tenth output is kept. DC gain 1, the 13th bit is headroom.

These short filters give a usable low-pass and an exactly checkable
datapath. They are far from the original design's plotted responses. Those
responses were roughly a −57 dB half-band stopband from 35 kHz, and about
−70 dB beyond 15 kHz for the corrector. An 8-tap corrector that decimates by
10 also lets components above 2 kHz alias into the output band. To reach a
real specification, change the coefficient arrays and tap counts in
`dec_pkg.sv`. If the coefficients grow, also change the `COEF_W` given in
`half_band_filter.sv` and `corrector_filter.sv`. The datapath widths follow
from the parameters. Only the bit-serial time, B cycles per output, must
stay below the input spacing of the stage.

## Top-level interface (`decimation_filter`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock at the input sample rate (1.28 MHz) |
| `rst_n` | in | 1 | synchronous reset, active low |
| `arch` | in | 1 | `ARCH_OBC` (0) or `ARCH_BDA` (1), used by both FIR stages |
| `in_valid`, `in_sample` | in | 1, 6 | converter samples, normally every cycle |
| `cic_valid`, `cic_sample` | out | 1, 11 | CIC output, 80 kHz |
| `hb_valid`, `hb_sample` | out | 1, 12 | half-band output, 40 kHz |
| `out_valid`, `out_sample` | out | 1, 13 | decimated output, 4 kHz |

All samples are two's complement. The analog parts of the hearing aid
(preamplifier, A/D and D/A converters) are outside this RTL. The A/D
converter drives `in_*`, and the D/A converter takes `out_*`.

## Where this departs from the original design

* FIR coefficients and the half-band tap count are this design's own, as
  described above. The frequency responses therefore differ.
* In the original, "reconfigurable" is not explained. Here it is a run-time
  choice between the OBC and binary DA engines. Both engines exist in
  hardware, which costs area.
* The OBC table is a constant ROM, not a RAM, and stores doubled words.
* The original does not specify the CIC's differential delay (1 here), its
  output truncation (top bits kept here) or its pipelining.
* It does not specify reset, handshakes or clocking either. Here reset is
  synchronous, samples are marked by valid strobes, and one clock runs at
  the input rate.
* There is no overflow saturation. With the chosen coefficients no stage can
  overflow.
* The conventional multiplier-based FIR and the unreduced binary DA form,
  which the original only compares against, are not included.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog that ends the run and counts a failure if it hangs. The
end-to-end test needs 128,000 cycles and runs in well under a second:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/dec_pkg.sv tb/tb_decimation_filter.sv --top-module tb_decimation_filter
./obj_dir/Vtb_decimation_filter
```

Replace the testbench name to run the others. `tb_da_fir` also needs
`tb/da_fir_checker.sv`, which `-y tb` finds.

| testbench | what it checks |
|---|---|
| `tb_obc_da_engine`, `tb_bda_engine` | 4 taps with unequal ±weights, extreme and random words, latency of B cycles, window restored after a computation |
| `tb_cic_decimator` | bit-exact against a convolution with the 76-tap CIC impulse response; spacing of 16; full-scale inputs |
| `tb_da_fir` | the default 8-tap filter (constant 0xAA gives −7568); a 5-tap decimate-by-3 configuration; random engine switching; latency |
| `tb_half_band_filter`, `tb_corrector_filter` | bit-exact against a direct-form FIR with decimation; latency; output count; DC gain |
| `tb_decimation_filter` | whole chain at its only configuration: all three stage outputs, bit-exact against a reference written without the RTL's structure. Also the 320-cycle output spacing, 40 engine switches, full-scale inputs, and a 1 kHz tone coming out at the expected amplitude while a 100 kHz tone is removed |

## Files

* `rtl/dec_pkg.sv`: engine-choice enum, stage widths, factors and coefficients.
* `rtl/cic_decimator.sv`, `rtl/half_band_filter.sv`,
  `rtl/corrector_filter.sv`: the three stages.
* `rtl/decimation_filter.sv`: the top.
* `rtl/da_fir.sv`: the reconfigurable DA FIR filter.
* `rtl/obc_da_engine.sv`, `rtl/bda_engine.sv`: the two DA engines.
* `tb/`: one testbench per module, plus `da_fir_checker.sv`, a stimulus and
  checker used by `tb_da_fir`.
