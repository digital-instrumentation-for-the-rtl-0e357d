# Digital phase-meter and servo for fiber-link frequency transfer

When an ultra-stable optical frequency is sent over a long optical fiber,
temperature and vibration change the fiber's optical length and add phase
noise. The usual remedy is to send light back and beat it against the input
light (the Doppler, or round-trip, technique), or to compare two beams sent in
opposite directions (the two-way technique). Either way, the fiber noise is
the phase of an RF beat note, a few tens to a few hundreds of MHz, seen by a
photodiode. In analog set-ups a tracking PLL follows that phase, and it
slips a cycle whenever the noise gets too large.

This RTL follows the phase digitally instead. The beat note is sampled at
125 MS/s by a 14-bit ADC and mixed down to I and Q by a numerically
controlled oscillator (NCO). An arc-tangent then gives the phase, and a cycle
counter unwraps it into a phase with a range of more than 10^8 cycles. In
closed loop, a PI servo turns that phase into a phase correction for a second
NCO. That NCO drives the acousto-optic modulator (AOM) that corrects the
fiber, through a 14-bit DAC. A capture block (the *sniffer*) stores any mix of
the internal signals into a FIFO for a processor to read, either as a
continuous low-rate record or as a 16384-sample burst at full rate.

There are two identical channels (two ADC inputs and two DAC outputs) and one
sniffer shared by both.

## Signal path of one channel

```
           det NCO (cos, sin)
               |
ADC 14b --x----+----x--                      M = 5
          |         |
       FIR 16 tap  FIR 16 tap  --> decimator --> 3 x IIR (I) --+--> CORDIC arc-tangent --> cycle resolution --> phase (27Q13 cycles)
          (I)        (Q)                    --> 3 x IIR (Q) --+--> module sqrt(I^2+Q^2)                       |
                                                                                                             v
                                                    DAC 14b <-- sin <-- AOM NCO <-- phase offset <-- PI servo + accumulator
```

| Stage | Module | Rate | Latency | Output format |
|---|---|---|---|---|
| Detection NCO | `nco` | 125 MS/s | 2 clocks | 14-bit cos/sin, 1Q13 |
| Mixer | `iq_mixer` | 125 MS/s | 1 clock | 16-bit I/Q, 2Q14 |
| Low-pass FIR, order 15 | `fir_lpf` | 125 MS/s | 16 clocks | 2Q14, saturated |
| Decimator, M = 5 | `decimator` | 25 MS/s | strobe | 2Q14 |
| Three first-order IIR low-pass filters | `iir_chain` / `iir_lp1` | 25 MS/s | 1 clock per stage | 2Q14 |
| Arc-tangent | `cordic_atan` | 25 MS/s | 18 clocks | 3Q13 scaled radians (1.0 = pi) |
| Cycle resolution | `cycle_resolution` | 25 MS/s | 1 clock | 27Q13 cycles in 40 bits |
| Module | `iq_module` | 25 MS/s | 18 clocks | 17-bit unsigned, 3Q14 |
| PI servo | `pi_servo` | 25 MS/s | 3 clocks | 48-bit phase, 2^48 = 1 cycle |
| AOM NCO + DAC word | `nco` | 125 MS/s | 2 clocks | 14-bit sine |

All blocks run on one clock: the 125 MHz sampling clock of the converters.
Every stage after the decimator moves on the decimator's valid strobe. On
each stage, `rst` is synchronous and active high.

### NCO (`nco`)

The NCO has a 48-bit phase accumulator. Its output frequency is
`f = freq * 125 MHz / 2^48`, and a 48-bit phase offset is added to the
accumulator. The top 12 bits of the sum address a quarter-wave sine table
with 1024 entries and 13 magnitude bits. The table is computed at elaboration
with a half-step offset, so it needs no special case at 0 and pi/2. The
cosine reads the same table a quarter cycle ahead.

The detection NCO is set to the frequency at which the beat note appears
after sampling. A 160 MHz beat (Doppler set-up) is seen at 35 MHz. An 80 MHz
beat (two-way set-up) is seen at 45 MHz, mirrored, so its phase changes sign.

### Filters: why there are two kinds

The FIR (`fir_lpf`) removes the sum-frequency product of the mixer. It has 16
taps: a Hamming-window design with a 10 MHz cut-off, unity gain at DC, and
coefficients with 12 fractional bits. It is computed at elaboration from

    h_k = sin(pi*wc*(k-7.5)) / (pi*(k-7.5)) * (0.54 - 0.46*cos(2*pi*k/15)),
    wc = 10/62.5

and the taps are then normalised to sum to 1. It is built in systolic form, so
its latency is exactly 16 clocks.

The IIR chains (`iir_chain`, three `iir_lp1` each) run after decimation.
They narrow the bandwidth ahead of the arc-tangent, so that photodiode noise
comparable with the beat-note power does not cause cycle slips. Each stage is
the first-order low-pass filter

    y += b * (x - y)

This is the bilinear design of 1/(1+s/wc) with `b0 = wc*Ts`, `b1 = 0`,
`a1 = b - 1`, valid because the cut-off is far below the 25 MS/s rate.

- `b` is a 12-bit unsigned coefficient with 10 fractional bits.
- b = 1 gives about 4 kHz.
- b = 512 gives about 2 MHz.
- b >= 1024 bypasses the stage (the output equals the input, with the same
  one-clock delay).

Each of the six filters of a channel has its own coefficient.

### Phase: arc-tangent and cycle resolution

`cordic_atan` is a pipelined vectoring CORDIC. It works as follows:

1. Vectors in the left half-plane are turned by pi first.
2. Sixteen micro-rotations follow, with 6 guard bits.
3. The angle comes out in scaled radians: 16 bits, 3Q13, so 1.0 = pi.

`cycle_resolution` halves the angle into a fraction of a cycle with 13 bits.
It counts whole cycles whenever the fraction passes from the last quarter of a
cycle into the first one, or the reverse. The result is a signed
{27-bit cycles, 13-bit fraction} number. It covers ±6.7×10^7 cycles: at
194 THz, that is a few hundred nanoseconds of accumulated delay, enough for a
link of about 1000 km. The count is right as long as the phase moves by less
than a quarter cycle between two 25 MS/s samples.

### Module

`iq_module` computes `sqrt(I^2 + Q^2)` with a 16-step shift-subtract square
root (18 clocks). It monitors the beat-note amplitude.

### Servo (`pi_servo`)

The servo is a PI controller followed by an accumulator:

    C(z) = gain * (1 + i_gain/(z-1)) * 1/(z-1)

The error is the unwrapped phase, and there is no set-point. The accumulator
output is the phase offset of the AOM NCO, in the NCO's own 48-bit phase
units. Both gains are 32-bit unsigned words with 30 fractional bits. For a
loop bandwidth B_s, an integral corner 1/tau_i, a plant gain G and a
transducer gain H:

    gain   = 2*pi*B_s*Ts/(G*H)
    i_gain = Ts/tau_i,        Ts = 40 ns

For example, the Doppler set-up (G = 2, H = 1) with B_s = 100 Hz and
1/tau_i = B_s/3 gives gain = 13493 and i_gain = 1432. The smallest step,
2^-30, corresponds to a bandwidth well below 1 Hz.

The 8-bit command is `{rst, sign, cl, p_en, i_en, 3'b0}`, the packed struct
`servo_cmd_t` in `fl_pkg`:

- `rst` clears the integrator and the output.
- `sign` flips the loop sign.
- `cl = 0` opens the loop: it clears the integrator and freezes the output.
- `p_en` and `i_en` switch on the proportional and integral terms.

### Sniffer (`sniffer`, `sync_fifo`)

The sniffer has sixteen 64-bit inputs and a 64-bit time tag. The time tag
counts decimated samples since reset. In `fiber_link_top`, channel c drives
inputs 8c to 8c+7, in this order:

| Input | Signal |
|---|---|
| 8c+0 | decimated I |
| 8c+1 | decimated Q |
| 8c+2 | filtered I |
| 8c+3 | filtered Q |
| 8c+4 | arc-tangent angle |
| 8c+5 | unwrapped phase |
| 8c+6 | module |
| 8c+7 | servo output |

The 17-bit `snif_enable` chooses which signals are stored. Bit 16 is the
time tag; bits 0 to 15 are the inputs. A record is the time tag (if enabled),
then the enabled inputs in ascending order, one 64-bit word each. Records go
into a FIFO of 2^14 words.

The mode depends on the 30-bit `dec_n`:

- **Continuous** (`dec_n >= 250`): one record every `dec_n` decimated samples,
  without end. For example, `dec_n = 250000` gives one record every 10 ms.
  Words that find the FIFO full are dropped, and `drops` counts them.
- **Burst** (`dec_n < 250`): a `burst_start` pulse stores every decimated
  sample (one record per 40 ns) until 16384 words have been written or the
  FIFO is full. `burst_done` then rises.

A record is written one word per clock. If the next sample comes before the
previous record is fully written, that sample is skipped and `overruns` counts
it. With M = 5, a record of up to four words keeps up with the full rate.

The read side is `rd_en`, `rd_data` (valid one clock later), `rd_empty` and
`rd_count`.

## Top level (`fiber_link_top`)

The ports are plain signals and arrays indexed by channel:

- **Converter side:**
  - `adc[c]`, 14-bit signed.
  - `dac[c]`, 14-bit signed.
- **Configuration, per channel:**
  - `det_freq[c]` and `det_phase[c]` for the detection NCO.
  - `aom_freq[c]` for the AOM NCO.
  - `iir_b[c][0..2]` for the IIR stages.
  - `srv_cmd[c]`, `srv_gain[c]` and `srv_igain[c]` for the servo.
- **Sniffer configuration:** `dec_n`, `snif_enable` and `burst_start`.
- **Outputs for monitoring:**
  - `phase[c]` and `phase_valid[c]`.
  - `amp[c]` and `corr[c]`.
  - The sniffer read port, `overruns` and `drops`.

In the instrument these configuration words are registers written by a
processor, which also drains the FIFO. Here they are left as ports.

## What is not here

Several parts are outside this RTL:

- The ADC, the DAC and the clock PLL.
- The processor and its register bus.
- The host software that reads the FIFO.

To close the loop in simulation, the testbenches feed the DAC word back into
the ADC input.

## Where this design departs from the description it follows

- **Arc-tangent and square root:** the instrument used vendor cores. Here
  they are an RTL CORDIC and an RTL shift-subtract square root. Their
  latencies (18 clocks each) are this design's.
- **FIR coefficients:** they are computed from the window formula above. The
  peak tap is 699/4096 = 0.1707, as described, but the smallest tap is
  −9/4096 instead of the −4/4096 quoted for the instrument's filter. The exact
  design routine used there is not reproduced. The taps are kept as 13-bit
  signed words rather than as 11 retained bits.
- **IIR coefficient width:** the description gives both "11 bits, 1Q10" and
  "12 bits, 2Q10, disabled when b >= 1024". This design uses 12 bits and the
  b >= 1024 bypass.
- **Servo gains:** the main servo is described with 32-bit 2Q30 gains. A
  parameter table elsewhere lists 20-bit gains, which belong to an earlier
  tracking-loop servo. This design uses 2Q30.
- **Phase fraction:** `cycle_resolution` keeps 13 fractional bits of a
  cycle. Halving the 3Q13 scaled-radian angle drops its last bit.
- **Unwrapped phase width:** it is 27 integer bits. One bench test in the
  description was run with 19 integer bits. Only the wrap period differs.
- **Module input:** the module is taken from the IIR-filtered I/Q. The servo
  error is the unwrapped phase itself, with no set-point register.
- **Sniffer details:** the input assignment, the record layout, the
  time-tag meaning, the burst trigger and the drop/overrun counters are this
  design's choices.
- **Tracking-NCO phase detector:** an earlier design was a PLL-style
  tracking NCO with a 44-tap FIR. It was abandoned for its phase delay and is
  not built.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops. Each also has a watchdog that
counts a failure if the test hangs.

| Testbench | What it exercises |
|---|---|
| `tb_nco` … `tb_sync_fifo` | each block against a reference model computed in the testbench, including its latency |
| `tb_fl_channel` | one channel: the open-loop phase slope for a 100 kHz offset, the module, the DAC frequency, then closed-loop lock with the DAC fed back to the ADC |
| `tb_fiber_link_top` | the whole two-channel top at default parameters. It covers continuous records, a 16384-word burst, overruns, a full FIFO with dropped records, IIR bypass against filtering, cycle wraps, and servo lock. It counts each of these events and fails if one never happened. |
| `tb_experiments` | the bench configurations: the 160 MHz + 100 Hz tone seen at 35 MHz (phase falls 1.000 cycle per 10 ms record), an 80 MHz beat seen at 45 MHz on the other channel, sniffer `dec_n = 250000`, and the 100 Hz main-servo gains locking a 10 Hz offset (about 140 ms of simulated time, roughly 30 s) |

With Verilator 5 (2-state, so every register that is read is reset):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fl_pkg.sv tb/tb_fiber_link_top.sv \
          --top-module tb_fiber_link_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. `fl_pkg.sv` has to come
first, because it holds the shared constants and the servo command type.
Block parameters default to the instrument's values:

- 48-bit NCOs.
- 16 FIR taps.
- M = 5.
- Three IIR stages.
- 27Q13 phase.
- 2Q30 servo gains.
- 30-bit `dec_n`.
- A 64-bit × 16384-word FIFO.
- Two channels.

None of the testbenches overrides the top's parameters.
