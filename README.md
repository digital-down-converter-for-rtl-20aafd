# Digital down converter with a CORDIC oscillator

A receiver's analog front end delivers a sampled intermediate-frequency (IF) signal in
which the wanted channel is a narrow band somewhere far from 0 Hz.  This design moves that
band to 0 Hz and lowers the sample rate to what the channel needs:

```
            +--------+     +------+     +-----+     +------+     +-----+
 IF in ---->| mixer  |-I-->| FIR1 |---->| ↓4  |---->| FIR2 |---->| ↓2  |----> I out
 30.72 MS/s |  (x)   |-Q-->| FIR1 |---->| ↓4  |---->| FIR2 |---->| ↓2  |----> Q out
            +--------+     +------+     +-----+     +------+     +-----+    3.84 MS/s
                ^           50 taps     7.68 MS/s    100 taps
                | cos, sin
       +------------------+
       | NCO: phase acc.  |<---- ftw (tuning word)
       |  + CORDIC (13 ck)|
       +------------------+
```

The local oscillator is a numerically controlled oscillator (NCO) whose sine and cosine
come from a CORDIC rotator instead of a lookup table.  A CORDIC needs no sine table in
memory, at the price of a 13-clock pipeline.  The filtering and decimation are split into
two stages (÷4 then ÷2).  The first filter only needs to stop what would alias at the
intermediate rate, so it can be short.  The long, sharp second filter then runs at a
quarter of the input rate.

## Rates and numbers

| quantity | value |
|---|---|
| input sample rate | 30.72 MS/s, one sample per clock at most |
| output rate | 3.84 MS/s I/Q pairs (input ÷ 8) |
| sample format | 16-bit two's complement (Q1.15) at every stage boundary |
| NCO | 32-bit phase accumulator, f = ftw · Fs / 2³² (7.2 mHz steps at 30.72 MHz) |
| CORDIC | 20-bit angle, 20-bit x/y (2 guard bits), 12 iterations, 13-clock latency |
| FIR1 | 50 taps (order 49), equiripple, Fs 30.72 MHz, pass 0.4 MHz, stop 0.6 MHz, weights 1/60 |
| FIR2 | 100 taps (order 99), equiripple, Fs 7.86 MHz, pass 0.4 MHz, stop 0.55 MHz, weights 1/40 |
| input-to-output latency | 19 clocks (from the sample that completes an output) |

## The CORDIC oscillator (`nco_phase_acc`, `cordic_nco`)

The phase accumulator adds the tuning word once per *accepted sample*, not once per clock.
Because of this, gaps in the input stream (`in_valid` low) do not disturb the mixing
phase: the mixer output for sample n is always x(n)·e^(−j2π·n·ftw/2³²).

The top 20 bits of the phase are a signed angle (2²⁰ = one turn).  The CORDIC works in
rotation mode.  It starts from the vector (X0, 0) and rotates it through a fixed series of
angles atan(2⁻ⁱ), each either clockwise or counter-clockwise:

```
x[i+1] = x[i] - d·(y[i] >>> i)
y[i+1] = y[i] + d·(x[i] >>> i)
z[i+1] = z[i] - d·atan(2^-i)          d = +1 if z[i] > 0, else -1
```

The residual angle z is driven towards zero, and (x, y) ends at the rotated vector.  Points
to understand:

* **Arithmetic shifts.**  `>>>` keeps the sign of a negative x or y.  A logical shift
  would turn small negative values into large positive ones.
* **Gain pre-compensation.**  Each micro-rotation lengthens the vector by √(1+2⁻²ⁱ).  The
  product of those lengths tends to 1/0.6073.  The start vector is therefore
  X0 = 0.60725·32767 (times 4 for the guard bits), so the outputs come out as
  32767·cos θ and 32767·sin θ with no multiplier after the CORDIC.
* **Quadrant folding.**  The iterations only converge for |θ| ≲ 99.7°.  A first pipeline
  stage detects angles in the outer half of the circle (the two top angle bits differ).
  For those it inverts the top bit, which turns the angle by 180°, and starts from −X0.
  This stage plus 12 iterations gives the 13-clock latency.
* **Accuracy.**  With 12 iterations the residual angle is at most atan(2⁻¹¹) ≈ 0.028°.
  The measured worst error over random angles is 17 LSB of a 32767 full scale, about
  −66 dBc.  More iterations (`ITER` up to 16) improve this but lengthen the latency.
  `ddc_top` delays the input by the matching amount.

The tables for the CORDIC live in `ddc_pkg`.  CORDIC_ATAN[i] = round(atan(2⁻ⁱ)/(2π)·2²⁰),
and CORDIC_X0 = round(0.6072529·32767·4).

## Mixer (`mixer`)

The mixer forms I = x·cos and Q = −x·sin.  This is multiplication by e^(−jωn), which
shifts the spectrum down by the oscillator frequency.  A tone at f_nco + Δ therefore comes
out as a complex tone that rotates forward at +Δ; a tone at f_nco − Δ rotates backward.
Products are rounded to nearest and saturated to 16 bits.  The input sample reaches the
mixer through a 14-clock delay (`sample_delay`: phase accumulator plus CORDIC), so each
sample meets the oscillator value of its own phase.

## The two filters (`fir_direct`, `fir1`, `fir2`)

`fir_direct` is a plain direct-form FIR with a delay line of TAPS−1 registers, one
multiplier per tap and a single summation.  The full-precision sum is rounded by 2¹⁵ and
saturated to 16 bits.  The new sample enters the sum directly, so the result is
registered one clock after the sample.  The sum is one combinational stage.  That is
faithful to the direct form but long for FIR2 (100 products).  Pipeline the adder tree if
a faster clock is needed.

The coefficients (`FIR1_COEFFS`, `FIR2_COEFFS` in `ddc_pkg`) are Parks–McClellan
equiripple designs to the specifications in the table above, quantised as
round(h·2¹⁵).  Two properties of those specifications are easy to miss:

* **FIR1 attenuates its own passband.**  With a stopband weight of 60 against a passband
  weight of 1 and only 50 taps, the optimiser gives up passband gain.  The filter passes
  0.05 MHz at −16 dB and 0.3 MHz at −20 dB, and stops at about −37 dB.  The converter's
  overall gain is therefore about −22 dB: a full-scale IF tone of amplitude A comes out
  with a magnitude of about 0.07·A (A/2 from the mixer, times the filters).  Raise the
  FIR1 coefficients, or lower its `OUT_SHIFT`, if more output level is wanted.
* **FIR2 is designed for 7.86 MHz, but runs at 7.68 MHz** (30.72/4).  Its band edges
  therefore sit about 2 % lower than specified (0.39 / 0.54 MHz).  Measured at 7.68 MHz
  it is flat within 0.2 dB to 0.3 MHz and −60 dB beyond 0.7 MHz.

Both filters are symmetric (linear phase).

## Decimators (`decimator`)

A modulo-M counter over valid samples passes the first sample of every group of M and
drops the rest.  The filters compute every input sample and the decimator discards
afterwards.  A polyphase filter would compute only the kept outputs and save (M−1)/M of
the multiplications; this design does not do that.

## Interface (`ddc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | sample clock (30.72 MHz for the nominal rate) |
| rst | in | 1 | synchronous, active high |
| in_valid | in | 1 | an IF sample is present this clock |
| if_in | in | 16 | IF sample, two's complement |
| ftw | in | 32 | tuning word; takes effect with the next sample |
| i_out, q_out | out | 16 | baseband I/Q pair |
| out_valid | out | 1 | one pulse per 8 accepted samples |

Every stage hands a `valid` flag along with its data.  There is no back-pressure: the
consumer must take each output on the clock it is valid.  Reset clears the valid flags,
the phase accumulator, the filter delay lines and the decimation counters.  The first
output after reset belongs to the first input sample, 19 clocks later.  Changing `ftw`
takes effect at once, but the filters hold the old signal for about 100 output samples.

## Where this design makes its own choices

The block chain, the CORDIC equations and 13-cycle latency, the direct-form filters with
their orders and specifications, and decimation by 4 then 2 all follow the source
architecture.  The following were chosen here:

* the I/Q split of the mixer and the doubled filter chain;
* all word widths, rounding and saturation;
* the valid handshake and synchronous reset;
* the 32-bit phase accumulator with a tuning-word input;
* quadrant folding and the 1 + 12 split of the CORDIC latency;
* the filter coefficient values (the specifications are given, the coefficients are not);
* keeping the first sample of each decimation group.

The analog front end that produces the IF samples (RF-to-IF conversion and the ADC) is
not part of this RTL.  Its samples enter at `if_in`.

## Verification

Each module has a self-checking testbench in `tb/`.  Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| tb_nco_phase_acc | phase = running sum of tuning words, one clock after each valid sample |
| tb_cordic_nco | 4000 random and corner angles against real cos/sin, within 24 LSB; latency exactly 13 |
| tb_mixer | bit-exact products, rounding, saturation and valid timing |
| tb_fir_direct | bit-exact convolution of a 7-tap asymmetric filter, with gaps and extreme inputs |
| tb_fir1, tb_fir2 | linear-phase impulse response and tap count; measured gains in passband and stopband |
| tb_decimator | ÷4 and ÷2 keep samples 0, M, 2M, … and produce the right output count |
| tb_ddc_top | whole converter at default parameters (see below) |

`tb_ddc_top` feeds 30.72 MS/s IF tones with the oscillator at 5 MHz.  It checks the
following:

* a tone 0.1 MHz above the oscillator gives a constant-magnitude output rotating at
  +0.1 MHz (0.1636 rad per output), with a level inside the filters' passband range;
* the same holds with 30 % random input gaps;
* after retuning 0.2 MHz higher, the output rotates backward at −0.1 MHz;
* a tone 2 MHz off the oscillator leaves the output below 20 LSB;
* the latency is 19 clocks and there is exactly one output per 8 inputs.

It counts ÷4 and ÷2 events, input gaps, retunes and backward rotation, and fails if any of
them never happened.  It runs in a few seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ddc_top \
    -Irtl -y rtl -y tb +libext+.sv rtl/ddc_pkg.sv tb/tb_ddc_top.sv -o sim
./obj_dir/sim
```

Replace `tb_ddc_top` by any other testbench name to run that one.  Testbenches do not
depend on uninitialised state, and run the same with `+verilator+rand+reset+2`.

## Files

* `rtl/ddc_pkg.sv`: types, widths, CORDIC tables, filter coefficients, saturation helper
* `rtl/ddc_top.sv`: the converter
* `rtl/nco_phase_acc.sv`, `rtl/cordic_nco.sv`: local oscillator
* `rtl/sample_delay.sv`: input alignment delay
* `rtl/mixer.sv`: quadrature mixer
* `rtl/fir_direct.sv`, `rtl/fir1.sv`, `rtl/fir2.sv`: filters
* `rtl/decimator.sv`: decimation
* `tb/tb_*.sv`: testbenches
