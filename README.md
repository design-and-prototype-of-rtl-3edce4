# All-digital FM stereo multiplex (MPX) demodulator

An FM broadcast receiver's discriminator outputs a baseband *multiplex* signal.
It has three parts:

- the mono sum L+R, in the band below 15 kHz;
- a 19 kHz pilot tone;
- the difference L−R, amplitude-modulated (suppressed carrier) on 38 kHz, twice the pilot frequency.

To get left and right back, the receiver must rebuild a 38 kHz carrier that is
exactly in phase with the pilot. It uses that carrier to bring L−R down to
baseband, then adds and subtracts the two baseband signals.

This repository holds synthesizable SystemVerilog that does all of this digitally:

- sampling rate Fs = 192 kHz, 12-bit samples;
- four 443-tap FIR filters, each on a single multiply-accumulate engine;
- an all-digital phase-locked loop (ADPLL) that doubles the pilot frequency;
- a serial-DAC controller that writes pilot, left and right to three DAC channels.

The target was a Spartan-3AN starter-kit class FPGA. The input is a built-in
table-driven MPX test source, so the whole chain runs without an ADC.

```
            +-------------+        +-----------------------------------------------+
 133 MHz -->| clk_div_10  |--13.3->| debounce  (push-button reset)                 |
            +-------------+        +-----------------------------------------------+
 98.304 MHz (external clock manager) --> clk_div_512 --> Fs = 192 kHz

   mpx_encoder --mpx--> mpx_decoder ----pilot, left, right----> spi_controller_mpx_enc --> SPI core --> DAC A/B/C
   (192-entry table)    (4 FIRs + ADPLL + recombination)       (15-state FSM)              (external)
```

## Signal levels and number formats

The test signal follows the usual broadcast level plan. With L and R at full scale (±1):

    mpx = 0.225·(L+R) + 0.225·(L−R)·cos(2·ω_p·t) + 0.1·cos(ω_p·t),   ω_p = 2π·19 kHz

The built-in source uses L = 5 kHz sine and R = 7 kHz sine. At 192 kHz both tones and the pilot
repeat exactly every 192 samples (1 ms), so one 192-entry table holds the whole signal.

The design uses two 12-bit two's-complement formats:

| format | range | used for |
|---|---|---|
| Q11 (1 sign bit, 11 fraction bits) | ±1 | MPX samples, filter inputs, filter outputs after truncation, left/right outputs |
| A(1,10) (1 sign bit, 1 integer bit, 10 fraction bits) | ±2 | NCO sine/cosine, the full-scale pilot, the phase detector inputs |

The left and right outputs come out as 0.225·L and 0.225·R: ±461 LSB in Q11 for full-scale audio.
The pilot output is the recovered pilot multiplied by 10, a full-scale cosine of ±1024 LSB in A(1,10).
The DAC gets each sample in offset binary (sign bit inverted), so zero maps to mid-scale.

## Clocks and reset

| clock | source | used by |
|---|---|---|
| 133 MHz | board oscillator (`clk_133MHz`) | clk_div_10 |
| 13.3 MHz | `clk_div_10` (4-bit counter, 5 high / 5 low) | reset debouncer |
| 98.304 MHz = 512·Fs | external clock manager, port `clk_512fs` | FIR engines, SPI controller |
| 192 kHz = Fs | `clk_div_512` (MSB of a 9-bit counter) | MPX source, all Fs-rate decoder logic |

The 98.304 MHz clock comes from a vendor clock-synthesis primitive, which would multiply 133 MHz by 17/23.
That primitive is not part of this RTL:

- its output clock enters the top as `clk_512fs`;
- its lock flag enters as `dcm_locked`;
- its reset leaves as `dcm_rst`.

The reset scheme works as follows:

- `rst_debounced` is the debounced push button. It resets only the clock manager.
- `rst_global = rst_debounced | ~dcm_locked`. It resets everything else, so no logic runs while the fast clock is missing or unstable.
- `dac_clr` is the inverse of `rst_global`.

All resets are asynchronous and active high. The two clock dividers for the debouncer path have no reset,
because they produce it. They start from declared initial values.

The debouncer passes a level only after it has been seen on three consecutive 13.3 MHz samples,
behind a two-flop synchroniser. The window length is `SAMPLES`.

## The FIR filters (`fir_mac`)

| instance | type | band (normalised to Fs) | coefficient fraction bits |
|---|---|---|---|
| `fir_filt_bp_19k` | band-pass | 0.088542 – 0.109375 (17 – 21 kHz) | 19 |
| `fir_filt_bp_38k` | band-pass | 0.11979 – 0.27604 (23 – 53 kHz) | 16 |
| `fir_filt_lp_15k_sum`, `fir_filt_lp_15k_diff` | low-pass | 0.078125 (15 kHz) | 17 |

All four filters share these properties:

- **Taps.** Each has 443 taps (order N = 442).
- **Coefficients.** They are the window-method design: the ideal response times a Hamming window, rounded to 16 bits. They are computed by a constant function at elaboration, so changing a band edge or the tap count needs no coefficient files.
- **Output.** The output is full precision, 37 bits with 11 + COEF_FRAC fraction bits.

The 19 kHz filter needs order 442 for a narrow enough transition band. The other filters use the same
order so that all of them have the same group delay: N/2 = 221 samples. The pilot then stays in step
with the 38 kHz band and with the mono band. That equal delay is what lets the recovered
carrier line up with the sub-carrier (see the next section).

**Timing.** One output per Fs period needs at most 443 multiplies in 512 fast clocks, so each filter uses one engine:

1. On the new-data strobe `nd`, the sample goes into a 443-word circular buffer.
2. The engine walks the 222 distinct coefficients. At each step it pre-adds the two samples that share a coefficient (the coefficients are symmetric), multiplies once, and accumulates.
3. `rdy` and the result appear 226 fast clocks after `nd`. The vendor core this replaces quoted 230.

After reset the engine spends 443 clocks zeroing its buffer (`busy_clear`). It ignores `nd` during that time.
In `mpx_decoder`, `nd` is a registered rising-edge detect of `clk_fs`. The results are therefore ready
about 230 fast clocks after an Fs edge, long before the next edge picks them up.

## The pilot PLL and frequency doubler (`freq_doubler`)

This is the part that takes the most care. The loop runs entirely at Fs:

```
pilot (Q11, ~0.1) --x10--> u1 --(x)--> pe --> loop_filter --> vd_n --[strobe]--> amp_a --> ptw
                                ^                                                            |
                                |              +-----------------------------+               |
                                +--- u2 = sin -| nco: 24-bit phase acc, +FTW |<--------------+
                                               |  sine LUT(a), cosine LUT(2a)|---> lo38 (38 kHz)
                                               +-----------------------------+
```

**Phase detector.** `u1 = cos(ωt + θ1)` is multiplied by the NCO sine `u2 = sin(ωt + θ2)`.
The product has a DC term of `−0.5·sin(θ1 − θ2)` plus a 38 kHz term. The loop drives the DC term to zero,
so θ2 = θ1: the pilot is cos(φ) and the NCO sine is sin(φ), with the same phase angle φ.
Both u1 and u2 are A(1,10), so the product `pe` is Q20.

**Loop filter** (`loop_filter`). H(z) = 0.03635·(z+1)/(z−0.9273) is a first-order low-pass with DC gain 1.
It is implemented as

    vd[n] = (2382·(pe[n] + pe[n−1]) + 60772·vd[n−1]) / 2^16

The pole coefficient is 0.9273·2^16 = 60771.5, rounded *up* to 60772 so that the fixed-point DC gain
2·2382/(65536−60772) is exactly 1. A settled `vd_n` therefore reads the phase error directly:

| phase error | vd_n |
|---|---|
| −90° | +0.5 |
| 0° | 0 |
| +90° | −0.5 |

The 38 kHz ripple on `vd_n` is about ±0.026 after filtering (|H| ≈ 0.053 at 38 kHz).

**Amplifier A** (`amp_a`, combinational). It turns `vd_n` into a phase step for the NCO:

- θ_diff = −120°·vd_n. This is the small-angle inverse of −0.5·sin.
- 360° is added when vd_n ≥ 0, so the offset is always in 0..360°.
- The result is multiplied by 46603 phase-accumulator counts per degree (2^24/360) and taken modulo 2^24.

**NCO** (`nco`).

- **Accumulator.** It is 24 bits. It advances each Fs cycle by FTW = 1,660,245, which is 19 kHz·2^24/192 kHz.
- **Tables.** The top 12 bits address two 4096-entry tables. The sine table gives u2. The cosine table is addressed with twice the phase address (the doubled phase is taken modulo 4096) and gives `cos(2·phase)`, the 38 kHz LO. This is how the NCO does the frequency doubling without a separate divider.
- **Table data.** Both tables are computed at elaboration, A(1,10), so +1.0 = 1024.
- **Phase of the LO.** When the loop is locked, the LO is cos(2φ). That is exactly the phase of the 38 kHz sub-carrier, because the 19 kHz and 38 kHz band-pass filters delay their signals by the same 221 samples.

**Strobed correction.** The loop does not apply `vd_n` continuously.
A counter fires `strobe` every `STROBE_WAIT` = 96 Fs cycles (500 µs). That is about twice the
~250 µs the loop filter needs to settle after a phase step. On a strobe, the tuning word from
amplifier A goes into the accumulator for exactly one cycle. This gives a permanent phase jump
sized to cancel the measured error. The rest of the time the phase tuning word is zero and the
NCO free-runs at FTW. Since FTW is exact, the only thing to track is phase, and each correction
is a one-shot estimate rather than an integrating loop.

**Lock accuracy.** The strobe comes every 96 samples, and 96 samples is a whole number of 38 kHz
periods. So the strobe always samples `vd_n` at the same point of its 38 kHz ripple. This
leaves a small, steady phase bias: a mean `vd_n` of about 0.02, or about 2.6° of pilot phase in
simulation. It costs almost nothing in separation: the residual crosstalk is below 0.3 %, about
−54 dB relative to the wanted tone. To remove it, average `vd_n` over one 38 kHz period before
sampling, or sample at alternating phases.

**Timing.** `pilot_fs` (u1), `sine19` and `lo38` are registered on the same Fs edge. `lo38`
belongs to the pilot sample now in `pilot_fs`. Anything mixed with `lo38` must therefore be
delayed by that one register. The decoder does this for the 38 kHz band.

## Recombination and the 29-sample alignment (`mpx_decoder`, `sync_delay`)

The decoder runs a five-stage Fs pipeline behind the filters:

1. truncate the filter outputs to Q11;
2. register the pilot ×10 and the NCO, and match the other paths;
3. mixer: `mix = sat((bp38 · lo38) >> 9)`. This is the product rescaled to Q11 and multiplied by 2, which makes up for the ½ lost in demodulation. `mix` feeds the "diff" low-pass filter;
4. `diff_x_0p5` and `sum_x_0p5`: the two low-pass outputs times 0.5;
5. `left = sum + diff`, `right = sum − diff`, saturated to 12 bits.

The L−R path has **two** 221-sample filters in series (the 38 kHz band-pass, then a low-pass). The
L+R path has **one**. To line the two up, the sum must be delayed by a further 221 samples. The design
uses the delay of the original prototype, **29 samples** (`SYNC_DELAY = 29`). That prototype found the
value by comparing waveforms in simulation.

29 = 221 mod 192. It works because the built-in test signal repeats every 192 samples, so a
delay of 221 and a delay of 29 give the same waveform. **For any real, non-periodic input,
set `SYNC_DELAY` to 221** (`mpx_decoder #(.SYNC_DELAY(221))`). `tb_mpx_decoder` runs both settings
side by side on the test signal and both give full separation.

`sync_delay` is a RAM ring buffer of DELAY−1 words plus an output register. Reset clears only
the output register.

## DAC output path (`spi_controller_mpx_enc`)

The board DAC is a quad 12-bit serial DAC. Each transfer is a 24-bit word, sent MSB first:

| bits | field |
|---|---|
| 23:20 | command 0011 (write and update) |
| 19:16 | channel address: A = 0000 pilot, B = 0001 left, C = 0010 right |
| 15:4 | 12-bit offset-binary sample |
| 3:0 | don't care (sent as 0) |

The serial shifting is done by a separate SPI master core. That core is not part of this RTL. The
controller drives the core's register-write bus, which is brought out of the top:

- `spi_data_in[23:0]`;
- `spi_load_ctrl` (CTRL register);
- `spi_load_div` (clock divider register);
- `spi_go` (transfer in progress, read back).

The controller is a 15-state FSM on the 512·Fs clock:

- `ST_INIT` → `ST_SET_DIV`: write the divider value `SPI_DIV` and wait for the first new-sample event.
- For each of channels A, B and C:
  1. `TXC`: write control word 0x002E18, which arms the data register.
  2. `DATA`: present the 24-bit word.
  3. `WRITE`: write control word 0x000F98, which starts the transfer.
  4. `TIP`: wait while `spi_go` is high.
- `ST_TX_WRITE_COMPLETE`: wait for the next Fs rising edge. That edge also latches the three samples (`dac_chan_change`).

Three transfers take well under one Fs period (512 fast clocks) with `SPI_DIV = 1`. `SPI_DIV` is
this design's choice. Set it to whatever the SPI core and DAC timing need.

## Files

| file | contents |
|---|---|
| `rtl/mpx_pkg.sv` | shared types (`sample_t`), formats, DAC/SPI constants, saturation and DAC-code helpers |
| `rtl/fm_mpx_top.sv` | top level: clocks, reset scheme, source, decoder, DAC controller |
| `rtl/mpx_decoder.sv` | filters, frequency doubler, mixer, scaling, alignment, recombination |
| `rtl/fir_mac.sv` | windowed-sinc FIR on one symmetric MAC engine |
| `rtl/freq_doubler.sv`, `loop_filter.sv`, `amp_a.sv`, `nco.sv` | the ADPLL |
| `rtl/sync_delay.sv` | sum-path alignment delay |
| `rtl/mpx_encoder.sv` | 192-entry MPX test-signal table |
| `rtl/spi_controller_mpx_enc.sv` | DAC write sequencer |
| `rtl/clk_div_512.sv`, `clk_div_10.sv`, `debounce.sv` | clock dividers and reset debouncer |
| `tb/tb_*.sv` | one self-checking testbench per module (see below) |
| `tb/spi_top_model.sv` | behavioural model of the SPI master's register interface, used by the tests |

## Simulation

Every testbench is self-checking. Each one ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog. Build and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/mpx_pkg.sv tb/tb_fm_mpx_top.sv \
              --top-module tb_fm_mpx_top -o sim
    ./obj_dir/sim

Use the same pattern for the other testbenches. Add `-Wno-fatal` so that lint warnings (for example
width warnings on open output pins) do not stop the build. To test start-up robustness, start from random register values with
`+verilator+rand+reset+2`.

| testbench | what it checks |
|---|---|
| `tb_fm_mpx_top` | Whole design at full size, about 2400 Fs periods with real clock ratios. It checks:<br>• every DAC word: command, channel order, data;<br>• left = 5 kHz at 461 LSB with under 5 % 7 kHz, and right the reverse;<br>• full-scale pilot;<br>• PLL locked, with the LO equal to cos of twice the pilot phase;<br>• the Fs period;<br>• the SPI protocol;<br>• that each mechanism occurs: reset held while unlocked, bounce rejected, table wrap, filter starts, PLL corrections, transfer waits, new-sample events. |
| `tb_mpx_decoder` | Decoder alone, driven from an MPX signal computed in floating point. It checks separation and levels for `SYNC_DELAY` 29 and 221. |
| `tb_fir_mac` | 19 kHz, 38 kHz and 15 kHz filters. It checks:<br>• outputs bit-exact against a convolution computed with the testbench's own coefficients;<br>• latency;<br>• pass-band and stop-band gains with tones. |
| `tb_freq_doubler` | Lock and re-lock after pilot phase steps of +60° and −100°, LO phase, pilot gain, strobe spacing. |
| `tb_loop_filter` | Bit-exact recurrence. The settled output is checked against −0.5·sin(θ) and against the published simulation values of this filter for θ from −90° to 90°, with settling within 250 µs. |
| `tb_amp_a` | Tuning word against the floating-point formula. |
| `tb_nco` | Phase, sine and doubled cosine every cycle against a reference accumulator, frequency, and phase steps. |
| `tb_sync_delay`, `tb_mpx_encoder`, `tb_spi_controller_mpx_enc`, `tb_clk_div_512`, `tb_clk_div_10`, `tb_debounce` | Exact delay; table against the MPX equation; DAC word sequence and handshake; divider periods and duty; glitch rejection. |

The full-size top-level simulation (12.5 ms of signal, about 1.2 million fast clocks) builds in
under a minute and runs in a few seconds.

## Parameters you may want to change

- `mpx_decoder.SYNC_DELAY`: set to 221 for live, non-repeating input (see above).
- `mpx_decoder.NTAPS`: filter length, an odd number up to about 1000 for a 512·Fs clock. Changing it changes the group delay: keep `SYNC_DELAY = (NTAPS−1)/2`, or that value mod 192 for the test signal.
- `fir_mac.FT1/FT2/COEF_FRAC`: band edges and coefficient scaling. The coefficients follow automatically.
- `freq_doubler.STROBE_WAIT`: correction interval in Fs cycles.
- `mpx_encoder.C0/C1`: test-signal levels.
- `spi_controller_mpx_enc.SPI_DIV`: SPI clock divider value.

## How closely this follows the original prototype, and its limits

These parts follow the original design:

- the block structure and clock plan;
- the filter orders, bands, coefficient widths and output width;
- the loop filter transfer function;
- the amplifier equations and the NCO sizes and tuning word;
- the 500 µs strobe;
- the ×10 pilot gain;
- the 29-sample sum delay;
- the 192-entry test table;
- the SPI control words;
- the FSM states.

These are this design's own choices:

- fixed-point widths inside the loop (Q20 phase error and `vd_n`, 16-bit loop-filter coefficients);
- how the filter outputs are truncated to Q11;
- the ×2 mixer gain;
- the content of each decoder pipeline stage;
- the debounce window;
- the offset-binary DAC coding;
- the SPI divider value;
- the exact strobe sequencing.

Known differences and open points:

- **Filter latency.** 226 clocks here against 230 in the vendor core. This is invisible at the Fs level.
- **Filter order.** An early filter design used order 384 for the 38 kHz and 15 kHz filters. The final design, followed here, uses 443 taps everywhere, which is required for equal group delays.
- **Sum delay.** The 29-sample delay is only correct for 192-periodic input (see above).
- **PLL bias.** The PLL settles with the ~2.6° bias explained above.
- **Outside the RTL.** The clock manager, the SPI master core and the DAC are not part of this RTL. The tests use a clock source and a behavioural SPI model, so the register protocol assumed for the core is only as good as that model.
- **Hardware.** Nothing has been run on hardware or through place-and-route.
- **Multipliers.** The design uses 8 general multipliers: four filter MACs, the phase detector, the mixer and two loop-filter products. It also has constant multiplies in amplifier A and in the pilot gain. The original used 14 dedicated 18×18 multipliers. The loop-filter products here are wider than 18 bits, so the count after mapping depends on the synthesis tool.
- **Memory.** Total table and buffer memory is about 139 kbit. Most of it is the two 4096-entry NCO tables. A quarter-wave table would cut that by four if block RAM is short.
