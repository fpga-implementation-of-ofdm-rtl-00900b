# Sigma-delta OFDM transmitter for radio over fiber

This design makes a radio signal entirely in digital logic and sends it as a
plain serial bit stream. An OFDM baseband signal is up-converted to a carrier
at a quarter of the sample rate and then turned into one bit per sample by a
band-pass sigma-delta modulator. The resulting two-level stream goes out
through a multi-gigabit serial transmitter. It can drive an optical
transmitter (a VCSEL, for instance) directly. After a band-pass filter at the
far end of the fibre, the OFDM signal comes back at the carrier frequency
with no digital-to-analog converter anywhere.

The default configuration works as follows:

- The serial line runs at 1 Gbit/s, built from 16-bit words at 62.5 MHz.
- The carrier is at 250 MHz, a quarter of the line rate.
- OFDM uses 64 subcarriers with a 16-sample cyclic prefix.
- Each subcarrier is QPSK or 16-QAM, picked by a pin.
- The signal bandwidth is 10 MHz, giving an oversampling ratio of 50.

The line rate is sixteen times faster than the logic can make sigma-delta
bits. The generator therefore runs once at its own pace and records its
output in a 450000-word block RAM, 7.2 Mbit. It then plays that recording
back on the line, one word per clock, for ever. Played at 16 times the rate
it was made, the recording puts the carrier at 250 MHz and stretches the
bandwidth to 10 MHz.

## Signal path

```
 mapping clock (125 MHz)            signal-processing clock (62.5 MHz)
 +-------+   +---------+   +------+   +-----------+   +---------+   +-----+   +-----+   +--------+
 | PRBS  |-->| QPSK /  |-->| dual |-->| subcarrier|-->| IFFT 64 |-->| DUC |-->| BP  |-->| bit-   |--> txdata[15:0]
 | x^15+ |   | 16-QAM  |   | clock|   | allocation|   | + CP 16 |   | x100|   | SDM |   | stream |    to serializer
 | x^14+1|   | mapper  |   | FIFO |   | pilots,   |   |         |   | fs/4|   |     |   | memory |
 +-------+   +---------+   +------+   | null      |   +---------+   +-----+   +-----+   +--------+
     ^ pause when FIFO nearly full    +-----------+
```

| Stage | Module | Rate (per signal-processing clock) |
|---|---|---|
| bit source, mapper | `prbs_source`, `qpsk_mapper`, `qam16_mapper` in `mapping_block` | paused most of the time |
| clock crossing | `async_fifo` (16 deep) | |
| pilots and null | `subcarrier_alloc` | 64 values per OFDM symbol |
| IFFT and cyclic prefix | `ifft64_cp` | 80 samples per symbol |
| up-converter | `duc` = `sync_fifo` + 2 x `interp_fir` + `carrier_mixer` | 1 input per 100 clocks, 1 output per clock |
| sigma-delta modulator | `bp_sdm` | 1 bit per clock |
| recording and playback | `bitstream_memory` | 1 bit per clock in, then 1 word per clock out |

The numbers below set the rates:

- One OFDM symbol is 80 baseband samples. At 100 output samples each, that
  is 8000 sigma-delta bits, or 500 memory words.
- The 450000-word memory therefore holds 900 OFDM symbols.
- The memory takes 7.2 million clocks (115 ms) to fill.
- After filling, it repeats the same 7.2 ms of signal on the line.

The whole chain is throttled by the up-converter. The up-converter reads one
baseband sample every 100 clocks, so the earlier stages spend almost all
their time stalled, with back-pressure through ready/valid handshakes. The
bit source is paused by the fill level of the clock-crossing FIFO.

All baseband values use a signed 16-bit format with 15 fraction bits
(`fix16_t` in `ofdm_pkg`). A complex sample is a packed struct of two of
them (`cplx_t`).

## Clocks and reset

`ofdm_rof_top` has two clock inputs:

- `tx_usr_clk` (62.5 MHz) is the transceiver's parallel user clock. It clocks
  everything from the subcarrier allocation to the memory, and `txdata` is
  synchronous to it.
- `mapping_clk` (125 MHz) should be derived from it by a clock manager at
  twice the frequency. It clocks the source and mapper.

The 2:1 ratio comes from QPSK. A QPSK symbol needs two bits and the source
makes one bit per clock, so at twice the clock the mapper delivers one symbol
per signal-processing clock. With the pause mechanism the ratio is not
critical: any mapping clock works, because the FIFO handshake carries the
data safely.

`arst_n` is asynchronous and active low. `reset_sync` gives each domain its
own synchronized release. `qam16` is a strap pin: it is read without
synchronization and must only change while `arst_n` is low.

The transceiver and the clock managers are vendor blocks and are not part of
this RTL. Their connections are the top-level ports.

## Constellation mapping

- **QPSK.** The bits are taken in pairs. The first bit of a pair sets the
  sign of I and the second sets the sign of Q, with 1 meaning positive, at
  ±0.70709 (±1/√2). This gives the Gray map 11 → (+,+), 01 → (−,+),
  00 → (−,−), 10 → (+,−).
- **16-QAM.** The bits are taken in groups of four. The first two bits give
  I and the last two give Q. On each axis the first bit is the sign
  (1 = positive). The second bit chooses the inner level (1, 0.31622) or the
  outer level (0, 0.94867). So the levels −3, −1, +1, +3 (in units of 1/√10)
  carry 00, 01, 11, 10. The 1/√10 scaling gives both constellations the same
  average power.
- **Source.** The source is a PRBS-15 (x^15 + x^14 + 1, seed all ones),
  standing in for user data.

The 16-QAM bit assignment is this design's own Gray code. The original design
states only that 16-QAM is supported with equal average power.

## Subcarrier allocation

A 6-bit counter counts the incoming symbols, 0 to 63, once per OFDM symbol.
The counter value is the subcarrier index. It places values as follows:

- At 15, 25, 39 and 49 it substitutes a pilot, 32767 + j·32767 (the largest
  positive value on both axes).
- At 0 (DC) it substitutes zero.
- Elsewhere it passes the mapped symbol through.

The symbol that arrives at a pilot or null position is dropped, not delayed.
So 59 of every 64 mapped symbols are carried. A 16-deep FIFO at the output
decouples the allocation from the IFFT.

## IFFT and cyclic prefix (`ifft64_cp`)

This is an iterative in-place radix-2 engine, decimation in time, with one
butterfly per clock. It has three phases:

1. **LOAD.** It accepts 64 samples in natural order and writes them at
   bit-reversed addresses.
2. **CALC.** It runs six stages of 32 butterflies, 192 clocks in all.
3. **OUT.** It sends 80 samples: time indices 48..63 (the cyclic prefix),
   then 0..63. `xk_index` carries the index of each sample.

Details:

- Every butterfly halves its result, so the output is (1/64)·Σ X[k]·e^{+j2πkn/64}.
  Nothing can overflow, even with all 64 inputs at full scale.
- The butterflies round and saturate.
- The twiddles e^{+j2πt/64} are computed at elaboration time from `$cos` and
  `$sin`. 1.0 is stored as 32767.
- Output samples wait on `m_ready`. Input is refused outside LOAD.

The first output comes 192 clocks after the 64th input. One symbol takes
336 clocks plus any output stalls. The downstream stage needs 8000 clocks per
symbol, so the engine is far faster than needed. That is why the simplest
structure was chosen over a pipelined streaming FFT. Its output matches a
floating-point IDFT to within one least-significant bit.

## Digital up-converter: the 100× interpolation filter

This is the largest and least obvious block. Each of I and Q goes through
its own `interp_fir`, which raises the sample rate by L = 100. The filter is
a 5061-tap low-pass (order 5060), with its pass band ending at 0.01 and its
stop band starting at 0.011. The band edges are relative to the output
Nyquist rate; 0.01 is exactly the baseband Nyquist frequency. The target
stop-band attenuation is 80 dB.

**Polyphase form.** Zero-stuffing followed by filtering would waste 99 of
every 100 multiplications. Instead the filter is split into 100 branches of
51 taps. The filter keeps a 51-sample history of inputs, newest first. On
output phase p it computes Σ_j h[100·j + p]·x[j] with 51 parallel
multipliers. It takes a new input when p wraps from 99 back to 0:

- `s_ready` is high for one clock in 100.
- Outputs are valid every clock once the first input has been taken.
- If no input is available at a read slot, a zero is used and `underflow`
  pulses. In the complete chain this never happens.

**Coefficients.** The taps are computed at elaboration time in constant
functions. They form a Kaiser-windowed sinc:

- The cutoff is 0.0105, midway between the band edges.
- β = 0.1102·(80 − 8.7), the usual choice for 80 dB.
- They are quantized to 18-bit signed values with 23 fraction bits.

The taps are scaled for a DC gain of 1 per polyphase branch. So the output
amplitude is about 1/100 of the input, and no output can overflow. With
QPSK or 16-QAM OFDM, the peaks at the filter output reach about 130 to 180
LSB. That is a little above the sigma-delta feedback level of 98 (see
below). The
window design has a slightly wider transition band (about 0.0095 to 0.0115)
than an equiripple design of the same order. This is the main numerical
departure from the original, which used tool-designed equiripple taps that
are not reproduced here.

**Carrier mixing.** The carrier is at fs/4, so its cosine and sine take only
the values 0 and ±1. The mixer needs no multiplier: a 2-bit counter selects
I, −Q, −I, Q on successive clocks, which is I·cos − Q·sin. The negations
saturate (−(−1.0) becomes 0.99997).

**Lock-step.** `duc` buffers the IFFT output in a 16-deep FIFO. It pops one
complex sample whenever the I filter asks for input. The Q filter sees the
same handshake, so the two filters stay in step (an assertion checks this).
The mixer output valid is the chain's "global enable" for the modulator and
the memory.

## Band-pass sigma-delta modulator (`bp_sdm`)

This is a first-order low-pass loop (integrator, 1-bit quantizer, 1-bit DAC
in the feedback) with every z⁻¹ replaced by −z⁻². That moves the noise null
from DC to ±fs/4, where the carrier is. Per clock:

```
w[n] = x[n] + d[n-2] - w[n-2]        17 bits, 15 fraction bits
bit  = sign of w[n]                  1 = negative
d[n] = bit ? -98 : +98               (±0.00299 in fix16_t)
```

Writing the quantizer as d = w + e gives D = X + (1 + z⁻²)·E. The signal
passes with unit gain, and the noise is shaped by 1 + z⁻², which is zero at
fs/4. The DAC level of 98 (0.00299) is the original design's constant, which
it chose as the largest up-converter output. With the filter scaling used
here, OFDM peaks go somewhat beyond it, to about 180. The loop is then
overloaded for a few samples. Its 17-bit state grows by a few hundred LSB at
most and recovers. The end-to-end test recovers the data signs from the bit
stream alone, with a symbol error rate well below 1e-3. If you want a stricter margin, lower the filter
gain or raise `DAC_LEVEL`; either changes only the scale.

On the line, a 1 means the negative level. The polarity does not matter once
the stream is band-pass filtered.

## Bitstream memory

While the up-converter's enable is high, a serial-to-parallel register packs
the modulator bits into 16-bit words. The first bit goes to bit 0, the bit a
serializer usually sends first. The memory writes the words at increasing
addresses until all 450000 are stored.

Then it switches for good to playback. A read counter walks the RAM one word
per clock and wraps from the last word to word 0:

- `tx_valid` rises on the clock after the last write, with word 0 on
  `tx_data`.
- `mem_full` reports the switch.

The recording is 900 symbol periods long, because 450000 is a multiple of
500. So the OFDM symbol grid and the carrier phase run on without a jump
across the wrap. Only the content at the join is not seamless: the first
samples of the recording are the interpolation filter's start-up ramp. The
memory maps to about 200 36-kbit block RAMs.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_prbs_source`, `tb_qpsk_mapper`, `tb_qam16_mapper`, `tb_mapping_block` | the bit sequence and constellation levels, with random pauses |
| `tb_sync_fifo`, `tb_async_fifo` | order, level and full flags under random traffic; the dual-clock FIFO with unrelated clocks |
| `tb_subcarrier_alloc` | pilots, null and dropped positions over several symbols, with back-pressure |
| `tb_ifft64_cp` | random symbols against a floating-point IDFT (tolerance 6 LSB, observed 1), the index order, the 192-clock latency and output stalls |
| `tb_interp_fir` | the impulse response against an independent computation of the taps, and the ready spacing of 100 clocks |
| `tb_carrier_mixer`, `tb_duc` | the mixer sequence, and the DUC against a model built from the reference taps |
| `tb_bp_sdm` | bit-exact against a model, and a recovered tone amplitude |
| `tb_bitstream_memory` | capture and playback, bit order and wrap |
| `tb_signal_processing`, `tb_ofdm` | the chain end to end, with a small memory |
| `tb_ofdm_rof_top` | the full top at default parameters |

`ofdm_chain_monitor` (in `tb/`) is the end-to-end checker. It records the
up-converter output and demodulates it:

- The sample for baseband index s is centred at output 100·s + 2530 (the
  filter delay).
- There the mixer phase gives −I, and one clock later Q.
- It strips the cyclic prefix and runs a 64-point DFT.
- It compares each subcarrier with the symbol the PRBS should have produced,
  and checks the pilots and the null. For 16-QAM the inner/outer decision
  threshold is scaled by the filter's gain at that subcarrier. Subcarriers
  near ±32 sit on the filter's band edge and arrive attenuated by up to
  about 4 dB, as a receiver's equalizer would see them.
- Separately, it recovers the data signs from the sigma-delta bits alone.
  For each baseband sample it mixes the 100 surrounding bits down with the
  carrier and sums them, then runs the same DFT. This shows that the 1-bit
  stream, not just the modulator's input, carries the data. The boxcar is a
  crude filter, so a symbol error rate of up to 1e-3 is allowed. At full
  size QPSK shows no errors and 16-QAM about 1 in 50000.
- It reports the peak of the up-converter output.

It also checks the modulator bits against a model, checks every played-back
word against the recorded bits, and counts each mechanism: mapper pauses,
IFFT output stalls, cyclic-prefix samples, pilots, nulls, filter reads, the
capture-to-playback switch, and playback wraps.

`tb_ofdm_rof_top` runs two copies of the top, one strapped for QPSK and one
for 16-QAM, with every parameter at its default. Both fill their 450000-word
memories (900 OFDM symbols each), and the monitor decodes every symbol. It
takes well under a minute and about 100 MB.

## Simulating

Verilator 5 with timing support is enough. From the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/ofdm_pkg.sv tb/fir_ref_pkg.sv rtl/*.sv tb/ofdm_chain_monitor.sv tb/tb_ofdm.sv \
    --top-module tb_ofdm -o sim
./obj_dir/sim
```

Use any other `tb/tb_*.sv` and its module name in place of `tb_ofdm`. The
files do not depend on their order beyond the two packages coming first. The
run ends with the `TB_RESULT` line; `failures=0` is a pass.

Parameters worth changing:

- `MEM_DEPTH` on `ofdm`, `signal_processing` or `ofdm_rof_top` sets the
  recording length. Keep it a multiple of 500 words so the symbol grid survives the wrap.
- `WORD_W` sets the serializer width. Capture and playback share the
  signal-processing clock, so the line rate is WORD_W × that clock. A 10 Gbit/s
  line (2.5 GHz carrier) would need 40-bit words played out at 250 MHz. That
  needs a memory with its own 250 MHz clock domain, which is not part of this
  RTL.
- `L`, `ORDER`, `F_PASS`, `F_STOP` and `ATTEN_DB` on `interp_fir` recompute
  the taps at elaboration.

## Departures and open points

These choices are this design's own; the original is silent or different:

- **Interpolation taps.** Kaiser-window design instead of equiripple, with
  the same order and attenuation target and a slightly wider transition
  band.
- **Filter structure.** Polyphase instead of a systolic multiply-accumulate
  chain.
- **IFFT structure.** An iterative engine instead of a pipelined streaming
  core. The function, scaling and output order are the same.
- **Flow control.** The pause of the bit source, and the ready/valid
  handshakes at the allocation FIFO and the up-converter, are this design's
  own. The original describes free-running rates.
- **Pilot and null positions.** The mapped symbol arriving there is
  discarded.
- **Mixer sign.** I·cos − Q·sin.
- **Bit order in a memory word.** The first bit goes to bit 0. The recording
  repeats endlessly.
- **16-QAM bit assignment.** As described above.
- **Reset and resets per domain.** Both are this design's own.

The 10 Gbit/s variant records the modulator output in a separate 250 MHz
clock domain as 40-bit words. Only its word width is covered here (`WORD_W`).
The clock crossing between the modulator and that memory is not built.
