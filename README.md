# DS-CDMA indoor modem: base station and mobile terminal in SystemVerilog

This is the digital part of an indoor wireless system based on direct-sequence CDMA.
One base station serves up to 16 terminals.

- **Down link (base station to terminals).** The link is synchronous. Users are separated by
  32 orthogonal Walsh codes. Two Gold sequences, PN1 and PN2, scramble the I and Q branches.
  The base station also transmits a pilot, which every terminal uses for frame timing and for
  a coherent channel estimate. The multipath is handled by the transmitter (a pre-RAKE), not
  by a RAKE in each terminal.
- **Up link (terminals to base station).** The link is asynchronous. Each terminal spreads its
  two 128 kbit/s streams, I and Q, with its own Gold code. The base station has a receiver per
  user and per antenna. Each receiver finds and tracks that terminal's code phase. A
  selector then keeps the better antenna.

Both directions use the same sampling scheme. The DAC and ADC run at 32768 ksps, and the signal
sits on an 8192 kHz intermediate frequency, which is a quarter of the sample rate. The chip rate
is 4096 kchip/s, so one chip lasts 8 samples. Every module runs on one clock at the sample rate
and uses clock enables.

| Quantity | Value |
|---|---|
| Sample clock | 32768 kHz |
| IF | 8192 kHz (fs/4) |
| Chip rate | 4096 kchip/s, 8 clocks per chip |
| Down-link Walsh codes | 32 codes; a Walsh chip is 4 PN chips; a symbol is 128 chips (32 ksym/s) |
| Down-link channel | one Walsh code on I or Q: 32 kbit/s. A user has up to 4 codes, so up to 8 channels (256 kbit/s) |
| Frame | 10 ms = 40960 chips. PN1 and PN2 restart at every frame |
| Up-link spreading | 32 chips per bit, 128 kbit/s on I and on Q |
| Pulse shaping | root-raised cosine: roll-off 0.313 on the down link, 0.5 on the up link |
| Users / base-station receivers | 16 / 16 (two antennas each) |

`dscdma_system` is the top module. It puts the base station (`base_station`) and one terminal
(`mobile_terminal`) side by side. The DAC outputs (`bs_dac`, `ms_dac`) and ADC inputs
(`ms_adc`, `bs_adc_a`, `bs_adc_b`) are ports, so a testbench can insert a channel model between
them. Anything a control processor would decide enters as a port: codes, weights, pre-RAKE
taps, thresholds and gains.

## Down-link transmitter (`dl_bs_tx`)

Each user goes through three stages:

1. **`channel_mapper`** takes the user's bit stream through a valid/ready interface. It deals
   up to 8 bits per symbol over the user's channels: bits 0–3 go to the I branch of QPSK
   channels 0–3, and bits 4–7 to the Q branch. Bits are taken one symbol before they are
   sent.
2. **`user_spreader`** works on the I bit and the Q bit of each of the 4 channels. It
   multiplies each by the chip of that channel's Walsh code, then by PN1 (for I) or PN2 (for
   Q). It then adds the 4 I products and the 4 Q products. A chip or bit of 0 means +1 and a
   1 means −1, so every product is an XOR.
3. **`pre_rake`** filters the user's complex chip stream with two complex taps, spaced
   `TAP_DELAY` chips apart, and scales it by the user's power weight. The taps are meant to be
   the conjugated channel estimates in reversed path order. With those taps, the two-path
   channel, formed by two antennas a few chips apart, adds up coherently at the terminal. The
   taps are 8-bit signed with 127 ≈ 1. The weight is 8-bit unsigned with 64 = 1.

**`dl_tx_combiner`** adds all users to two common channels:

- The **pilot (PICH)**: PN1 with no data on the I branch. This is the same as Walsh code 0, so
  the pilot is orthogonal to every traffic channel.
- The **broadcast/paging channel (BPCH)**: one bit per symbol on a reserved Walsh code
  (`bpch_code`).

Each common channel has its own gain. The combiner scales and saturates the sum to the 12-bit
DAC word.

The chip streams are then interpolated by 8 in `shaping_filter`. This is a 49-tap polyphase
root-raised-cosine filter covering ±3 chips. `iq_mod_fs4` then moves the signal to fs/4. At
that frequency the carrier is only ±1 and 0, so the modulator outputs I, −Q, −I, Q in turn
and needs no multipliers.

Frame, symbol and Walsh counters are shared by all users. The frame starts at reset, and
`frame_start` pulses on the first chip of each frame.

## Down-link receiver (`dl_ms_rx`)

The receiver runs at four rates:

| Rate | Stages |
|---|---|
| 32768 ksps | `iq_demod_fs4` |
| 16384 ksps | half-band decimation ×2, AFC de-rotation, matched filter |
| 4096 kchip/s | `chip_sync`, then despreading |
| 32 ksym/s | symbol decisions |

- **`iq_demod_fs4`** is the fs/4 demodulator. It gives I = x, 0, −x, 0 and Q = 0, −x, 0, x.
  The zeros it leaves are removed by an 11-tap half-band filter (`fir_filter`), which also
  decimates by 2.
- **AFC** (automatic frequency control). `complex_mixer` multiplies the signal by the output
  of an `nco`. The NCO has a 32-bit phase accumulator and a 65-entry quarter-wave sine table.
  Its frequency comes from `fed`, which forms the cross product of successive pilot
  estimates, I[n−1]·Q[n] − Q[n−1]·I[n]. That term is proportional to the phase turned per
  symbol, and `fed` integrates it with a gain of 2^−KSHIFT. `afc_en` turns the loop on.
- **Matched filter.** The matched filter is a 25-tap root-raised-cosine at 4 samples per
  chip.
- **`chip_sync`** sums |I|+|Q| over a window for each of the 4 sample phases. At the end of
  every window it keeps the strongest phase. It passes on one sample per chip.
- **`frame_sync`** correlates the last 64 chips with the first 64 chips of the pilot (PN1).
  The I and Q correlations are combined as |corr_I| + |corr_Q|, so the result does not depend
  on carrier phase. When the result crosses `dl_thresh`, the frame started 64 chips earlier.
  From then on the module counts chips modulo 40960. It re-checks the result at the same
  point in every frame and drops lock after two misses in a row.
- **`channel_estimator`** sees the local PN1, Walsh code and PN2 generators restarted at the
  frame boundary. It despreads the pilot over each 128-chip symbol, and the result is the
  complex channel estimate h.
- **`dl_cdma_demod`** multiplies each chip by conj(h). This removes the carrier phase and
  weights the chip by the channel gain. It then despreads the user's 4 codes on I (with PN1)
  and on Q (with PN2). At the end of each symbol it decides the 8 bits.
- **`channel_unmapper`** turns those 8 bits back into the user's bit stream.

**Setting `dl_thresh`.** It must sit clearly above the pilot's cross-correlation with the
traffic. With two users, 12000 works. With 16 users on 33 codes, use 16000. Without the margin,
the partly filled correlator right after reset can cause a false lock.

**Latency.** The first symbol after the frame restart is decided with a zero channel estimate.
`sym_valid` is suppressed for that symbol.

## Up-link transmitter (`ul_ms_tx`)

- **`ul_multiplexer`** time-multiplexes the terminal's four services onto the I and Q bit
  streams at 128 kbit/s each. Source 0 is voice, 1 is data, 2 is video and 3 is signalling.
  A slot table assigns each bit slot to a service. An empty slot goes to another service that
  has data; otherwise it carries a 0.
- **Spreading.** Each bit is spread by the terminal's 32-chip code, selected by the `USER`
  parameter. The code is a length-31 Gold sequence plus one extra chip, so one code period is
  exactly one bit, or 256 clocks.
- **Shaping.** The chips are shaped with a root-raised cosine, roll-off 0.5.
- **`iq_mod_nco`** modulates the result onto the IF. It uses an NCO with a programmable
  frequency (`ul_freq`; 2^30 is fs/4), so that a terminal can pre-correct its carrier. Its
  start phase is chosen so that, at exactly fs/4, the base station sees the carrier at phase 0
  whenever the path delay is a multiple of 4 samples.

## Up-link receiver (`ul_bs_rx`, `diversity_select`)

Each receiver handles one user on one antenna. It runs `iq_demod_fs4` and a 49-tap
root-raised-cosine matched filter at the full 8 samples per chip, then three stages:

- **`ul_cdma_demod`** correlates one full code period at the current code offset. The offset
  is in samples, from 0 to 255. It has three correlators:
  - **prompt**: the chip centre;
  - **early**: 2 samples before the centre;
  - **late**: 2 samples after the centre.

  The signs of the prompt I and Q sums are the two bits. The module also reports the average
  of P_I²+P_Q² over 16 bits as the received power, to be used for power control.
- **`ul_sync_acq`** runs a serial search. For each offset it waits one code period. If the
  prompt energy is above `ul_thresh`, the receiver locks. Otherwise it moves one sample
  earlier, so at most 256 code periods cover every offset. Once locked, 8 periods in a row
  below half the threshold send it back to searching.
- **`ul_sync_track`** is an early–late loop. Every 8 periods it compares the summed early and
  late energies. If one is more than 1/16 of their total above the other, it moves the offset
  by one sample.
- **`diversity_select`** picks one of the two receivers of a user (antenna A or B). It prefers
  a locked receiver. If both are locked, it takes the one with more power, with a 1/8
  hysteresis. Because the two receivers are not bit-aligned, one bit may be repeated or lost
  when the selector switches.

The receiver has no RAKE, on the premise that the indoor up-link channel has no significant
multipath. It has no carrier-phase recovery either: the bits come from the signs of the prompt
correlations. This only works if the terminal's carrier reaches the base station with the
phase aligned. The terminal locks its frequency to the down link, and the phase depends on
the path delay: on the fs/4 IF, each sample of delay turns it by 90°. In the testbenches all
delays are multiples of 4 samples. A real system needs a phase estimate per receiver, or a
differential encoding. This design has neither.

## Codes and shared definitions (`cdma_pkg`)

The package holds:

- the rates and frame length;
- the 12-bit DAC/ADC word type (`conv_t`) and the 16-bit internal sample type (`sample_t`);
- the filter tables and the quarter-wave sine table;
- the up-link codes, and the function that gives the first 64 pilot chips used by the frame
  correlator.

Every table is written with the formula that produced it, so it can be regenerated.

**Down-link PN1 and PN2.** These come from a pair of degree-18 LFSRs (`gold_gen`),
recurrence masks 0x00081 and 0x004A1. The second register starts at 0x3FFFF. The first starts
at 0x00010 for PN1 and at 0x01000 for PN2. Both sequences are cut to the 40960-chip frame.

**Walsh codes.** `walsh_gen` uses the Sylvester ordering: chip(k, n) = parity(k & n).

## What follows the system description and what does not

**Follows the description:**

- the block structure of both links, the rates, the code and frame lengths, the IF, the
  roll-offs, the numbers of users and receivers, and the 256 kbit/s per-user limit;
- pre-RAKE in the base station rather than a RAKE in the terminal;
- pilot-aided coherent detection and AFC in the terminal;
- code acquisition, tracking and antenna selection diversity in the base station.

**This design's own choices:**

- all word widths;
- filter lengths and fixed-point scaling;
- the Gold polynomials and seeds;
- the handshakes;
- the detection and loop algorithms inside each block (energy-based chip timing,
  correlator-based frame detection, cross-product frequency detector, serial search,
  early–late tracking, power-based selection).

**Known departures and limits:**

- **Traffic capacity.** The pilot uses Walsh code 0 and the BPCH uses one more code. That
  leaves 30 codes, or 60 channels of 32 kbit/s, where the description counts 64. Setting the
  BPCH gain to 0 frees its code and gives 62.
- **Up-link carrier phase.** It is assumed aligned; see the up-link receiver section.
- **Control loops.** The pre-RAKE taps, power weights, frame threshold and acquisition
  threshold are inputs. The control processor that computes them, and closes the power and
  pre-RAKE loops from the reported estimates and powers, is not included.
- **Video.** Video above 256 kbit/s does not fit: one terminal has at most 256 kbit/s on
  either link.
- **Not included:** the DAC, ADC, RF front end, service encoders (voice DPCM, data, H.261
  video) and the terminal and base-station controllers. Their signals are ports of the top.

## Testbenches

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`, which compares the
module against a model written independently in the testbench. Each testbench:

- ends with a line `TB_RESULT checks=N failures=M`;
- has a watchdog.

The bigger ones are link tests:

- **`tb_dl_ms_rx`** runs the down-link transmitter through a 45-sample delay with noise into
  the terminal's receiver. For the first three frames the pilot is off.
- **`tb_ul_bs_rx`** runs a terminal into two receivers. Halfway through, the delay jumps by
  4 samples to exercise tracking.
- **`tb_base_station`** runs the whole base station against a terminal model. The two antennas
  have different delays and gains.
- **`tb_mobile_terminal`** and **`tb_dscdma_system`** close both links through channel models
  at reduced size.
- **`tb_dscdma_full`** runs the top at its default size for 2.2 frames:
  - 16 users on 33 Walsh codes, with user 0 on all 4 of its channels;
  - 16 base-station receivers.

  It checks every down-link bit of the terminal and the up-link bits at the base station, and
  that the other 15 base-station receivers never lock. It takes about half a minute.

To run one with plain Verilator 5, compile the package first:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cdma_pkg.sv tb/tb_dl_ms_rx.sv \
          --top-module tb_dl_ms_rx -y rtl -Wno-fatal
./obj_dir/Vtb_dl_ms_rx
```

Give `+verilator+rand+reset+2` at run time to start undefined state at random values. All
state that is read is reset, so the results must not depend on it.
