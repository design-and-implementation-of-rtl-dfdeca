# OFDMA-TDD WiMAX physical layer: FPGA datapaths of a base station and a mobile station

This is the FPGA part of a mobile-WiMAX (IEEE 802.16e) OFDMA physical layer. It works in time-division duplex (TDD).
The hardware splits into two halves:

- **FPGA datapaths, in SystemVerilog here.** These are the parts with fixed, sample-rate work:
  - channel coding and decoding;
  - cyclic-prefix handling around the FFT/IFFT;
  - frame detection, normalisation and carrier-frequency correction in the mobile station;
  - TDD frame timing;
  - digital up- and down-conversion between baseband and a 15 MHz IF at 80 MHz.
- **A control processor (DSP), not in this RTL.** It does everything that changes with the burst layout:
  - subcarrier permutation (PUSC);
  - channel estimation and equalisation;
  - ranging-code detection;
  - scheduling.

  The FPGAs serve the DSP as coprocessors over 16x2-bit complex buses. A 16x2 bus carries a 16-bit I and a 16-bit Q word per sample.

Both stations use the same three FPGAs:

- a **coding FPGA** with the tail-biting convolutional encoder and decoder;
- an **OFDM FPGA** with the FFT/IFFT, cyclic-prefix insertion and cyclic-prefix removal;
- a **converter FPGA** with the DUC and DDC, plus the station's timing: frame control in the base station, synchronisation in the mobile station.

`wimax_phy_top` puts one base station (`bs_*` ports) and one mobile station (`ms_*` ports) side by side. The two share only the clock and reset.

The defaults are the 8.75 MHz profile:

| Quantity | Default |
|---|---|
| FFT size N | 1024 |
| Cyclic prefix G | 128 (1/8) |
| Baseband rate | 10 Msample/s |
| Converter clock | 80 MHz |
| Up/down-sampling factor R | 8 |

All sample arithmetic is 16-bit fixed point. The ADC word is 14 bits and the DAC word 16 bits.

```
 Base station                                    Mobile station
 DSP -> coding_coprocessor -> points -> DSP      DSP -> coding_coprocessor -> points -> DSP
 IFFT -> cp_inserter -> frame_control -> duc ->DAC==>ADC-> ddc -> ms_sync -> cp_remover -> FFT
 FFT <- cp_remover <- frame_control <- ddc <-ADC<==DAC<- duc <- ul_tx_control <- cp_inserter <- IFFT
                                                          (prefix/postfix pattern)
```

The FFT/IFFT cores, the DSP and the converters sit outside the RTL. Their buses are top-level ports:

- `*_ifft_*` (IFFT output into the prefix inserter);
- `*_fft_*` (prefix-free FFT windows);
- `*_txb_*`, `*_txp_*`, `*_rxp_*`, `*_rxb_*` (coprocessor bits and points);
- `*_dac_out`, `*_adc_in`.

## Coding coprocessor (`coding_coprocessor`)

The DSP writes information bits in blocks, with `txb_last` closing a block. It receives constellation points back. In the other direction, it writes equalised points and reads decoded bits.

**Transmit chain:** TX FIFO → randomizer → tail-biting encoder with puncturing → interleaver → symbol mapper.

**Receive chain:** soft decisor → deinterleaver → Viterbi decoder → derandomizer → RX FIFO.

A block is started only when every later stage can take it whole. Once started, it runs without stalls. The burst profile comes from `codec_cfg_t`: rate, modulation and coded bits per block. It is sampled at the start of each block.

### Randomizer (`randomizer`)

- 802.16e PRBS generator 1 + x^14 + x^15, seed `011011100010101`.
- The seed is reloaded at the start of every FEC block.
- The same module derandomizes after the decoder.

### Tail-biting encoder (`fec_tx`)

- Rate-1/2 code with constraint length 7 and generators 171 and 133 (octal).
- The code is tail-biting: the encoder must start in the state it ends in. The encoder first shifts in the block's last six bits without output, then encodes the block. This is the usual "prefix the block with its own tail" technique.
- Puncturing gives rates 2/3 (X1 Y1 Y2) and 3/4 (X1 Y1 Y2 X3).
- A block holds at most `MAX_BITS` = 288 bits, which is 36 bytes.

### Interleaver (`bit_interleaver`)

- The 802.16e two-step permutation: first a 16-column row/column spread, then a swap inside groups of bits per axis, so that neighbouring bits land on bits of different reliability.
- Ping-pong buffers of `MAX_NCBPS` = 576 entries.
- The same module with `INVERSE=1` and 6-bit entries is the deinterleaver of soft bits.

### Symbol mapper and soft decisor (`symbol_mapper`, `soft_decisor`)

- Gray-coded QPSK, 16-QAM and 64-QAM.
- Axis unit amplitudes are 11585, 5181 and 2528, which is 2^14 divided by √2, √10 and √42.
- The soft decisor produces 6-bit soft bits with the usual piecewise-linear approximations. A positive value favours a 1.
- **CINR estimate from the EVM:**
  - The hard decisions are mapped back to ideal points.
  - Over 64 points, the block averages the squared error to those points (`mse`) and the energy of the points (`sig_pow`).
  - It latches both in registers.
  - The DSP forms the ratio. When decision errors are frequent, the ratio overestimates the CINR.

### Viterbi decoder (`fec_rx`)

- The decoder cannot know the starting state of a tail-biting block. Instead it decodes an extended sequence: the last `TB` = 48 symbol pairs of the block, then the whole block, then its first 48 pairs. This uses wrap-around.
- A block shorter than 48 pairs is decoded three times in a row instead.
- Only the bits of the middle copy are kept.
- One add-compare-select step covers all 64 states per clock. The decisions of the whole extended block are stored. A single traceback starts from the best final state.
- Punctured positions are set to soft zero, so they carry no information.
- Timing for n bits: n + 96 cycles of add-compare-select (3n if n < 48), the same again for traceback, then n output cycles.

## Mobile-station synchronisation (`ms_sync`)

This is the largest and least obvious part. The ADC has no programmable gain, so the received level is unknown. The subsystem must also find the frame in time and remove the carrier-frequency offset (CFO) before the FFT.

### Three correlation metrics

The 802.16e preamble puts energy on every third subcarrier only. In time, it therefore repeats three times within one symbol. The subsystem computes three metrics from it:

- **RPB metric (`delay_correlator`, lag = window = N/3 = 341).** It correlates the signal with itself one third of a symbol later. It forms a plateau over the preamble.
- **CP metric (the same module, lag N, window G).** It correlates the cyclic prefix with the end of the symbol it copies. It peaks where a prefix ends.
- **QC metric (`qc_correlator`).** It cross-correlates against the last 64 samples of the known preamble. Both signals are quantised to −1, 0 and +1 per component, so no multipliers are needed. A programmable dead zone `qc_thr` sets the quantiser. The DSP writes the ternary reference through `coef_we`/`coef_addr`.

The two delay correlators are computed recursively: add the newest product and subtract the one a window older. They are scaled by a shift into 16x2. All three metrics have a latency of two cycles, so they stay aligned.

### Peak detection (`peak_detector`)

- The detection function is |R_RPB|²·|R_CP|²·|R_QC|². Each magnitude is reduced to its top 16 bits.
- Because the input has been normalised, the first sample above the threshold `det_thr` marks the frame. No search for a maximum is needed.
- That sample is the last sample of the preamble. `theta` is the index of the preamble's prefix start.
- After a detection the detector is blind for `HOLDOFF` samples, slightly less than a frame.
- The threshold needs care. In simulation with a normalised signal the true peak was about 3·10^8, and side lobes and noise stayed below 5·10^7. The testbenches use 10^8.

### CFO estimation (`cfo_estimator`)

- At detection the block takes the angles of R_RPB and R_CP with a shared vectoring CORDIC.
- The two estimates, in subcarrier spacings, are:
  - ε_RPB = 3·angle/2π. It is unambiguous over ±1.5 spacings but noisy.
  - ε_CP = angle/2π. It is precise but ambiguous modulo 1.
- The output is ε_CP + k, where k ∈ {−2 … 2} is chosen to bring it nearest ε_RPB.
- **Sign convention:**
  - The metric is r(n−L)·r*(n).
  - A signal turning as e^{+j2πfn/N} therefore gives ε = −f.
  - So `eps_comb` is the correction itself.
  - `cfo_corrector` rotates the samples by +2π·ε·n/N with a 32-bit phase accumulator and a rotating CORDIC.

### Normalisation (`power_estimator`, `subframe_normalizer`)

- `power_estimator` keeps the mean |r|² over a sliding window of 2^`PLOG` samples.
- After each new sample it computes a scale factor so that the rms amplitude becomes 2^13. It uses a 16-step bit-serial square-root search, and the scale is in Q4.12.
- `subframe_normalizer` uses the live scale until a frame is detected. It then freezes the scale for the rest of the frame: the whole subframe gets one constant scale, which balances clipping against quantisation.
- A sliding window was chosen over block averages so that the frozen value reflects the preamble, not the noise before it.
- The cost is attack time. The first samples of a burst are clipped while the window still holds noise. This slightly disturbs the CP metric of the preamble's own prefix. In simulation, estimates were off by about 0.03 spacing at high input levels.

### Energy registers (`energy_meter`)

- Mean energy over the first 1024 samples after the preamble (`ELOG`=10) goes to `energy_post`.
- Mean energy over 128 samples of the receive/transmit gap (`RLOG`=7) goes to `energy_rtg`. The window is shorter because the gap is only 232 samples.
- The DSP reads both to estimate the SNR.

### Timing notes

- `out_sof` marks the first prefix sample of the first symbol after the preamble. It restarts the symbol grid of `cp_remover`.
- The new CFO correction is ready a few hundred clocks after detection, which at R=8 is a few dozen samples. Until then the samples are corrected with the previous estimate. These samples fall inside the first cyclic prefix, which the FFT never sees.

## Frame timing

### Base station (`frame_control`)

- A sample counter walks through four parts: downlink (`dl_len`), transmit/receive gap (`ttg_len`), uplink (`ul_len`) and receive/transmit gap (`rtg_len`). All lengths are 20-bit registers in samples.
- The counter advances on the DUC's sample request.
- Transmit samples from the prefix inserter are accepted only in the downlink; zeros are sent elsewhere.
- Received samples are passed on only in the uplink, with `rx_sof` on the first one.
- For the 5 ms frame: 25 downlink symbols including the preamble = 28800 samples, 18 uplink symbols = 20736 samples, and gaps of 232 samples each. Together that is exactly 50000 samples.

### Mobile station (`ul_tx_control`)

- After each detection, the uplink window opens `dl_len + ttg_len − advance` samples after the detected frame start and lasts `ul_len` samples.
- `advance` is the timing advance that ranging obtains.
- Outside the window the DAC gets zeros.

## Prefixes, postfixes and ranging (`cp_inserter`, `cp_remover`)

- The inserter buffers one IFFT symbol of N samples. It then sends either:
  - a **prefix** symbol: the last G samples, then all N; or
  - a **postfix** symbol: all N, then the first G.
- Initial ranging needs pairs of symbols, the first with a prefix and the second with a postfix. To support this, the mobile station takes a per-symbol pattern: `postfix_pat` bit i applies to symbol i, with `pat_len` ≤ 16. The pattern restarts with each uplink subframe.
- The base station ties the pattern to all prefixes.
- The remover drops the first G of every N+G samples and flags the FFT window with `out_sop`/`out_eop`. `sync` restarts its grid.

## Up- and down-conversion (`duc`, `ddc`)

- **DUC:**
  - Interpolates by R with a 3rd-order CIC filter.
  - Its output is shifted right by 6 to undo the filter gain R² = 64.
  - It mixes up with a CORDIC oscillator.
  - The IF is 15 MHz at 80 MHz: phase step 805306368 / 2^32.
- **DDC:**
  - Mixes the 14-bit ADC word down with the same oscillator.
  - Decimates with a 3rd-order CIC.
  - Scales 14-bit full scale to 16-bit full scale.
- Only integer factors are built: R = 20, 10 and 8 give the 4, 8 and 10 Msample/s profiles.
- The 5.6 and 11.2 Msample/s profiles need the fractional factors 100/7 and 50/7. Those would need a fractional resampler, which is not here.
- There is no compensation for the CIC passband droop. At R=8 the droop is about 8 dB at the edge of the occupied band. It has to be absorbed by the equaliser as part of the channel, or a compensation filter added.

## Where this design departs from, or adds to, its source description

- **Sample rate conversion:** the fractional factors 100/7 and 50/7 are missing. No droop compensation and no pulse-shaping filter beyond the CIC.
- **Sizes and encodings not given by the source, chosen here:**
  - `HOLDOFF` = 49000;
  - the correlator scaling shifts;
  - the 6-bit soft bits;
  - traceback 48;
  - the 64-point CINR window;
  - the 16-bit prefix/postfix pattern;
  - the 15 MHz IF;
  - FIFO depths;
  - the Q4.12 scale;
  - the 2^13 rms target;
  - the 128-sample gap-energy window.
- **Code details taken from 802.16e:** the 802.16e polynomials, seed, puncturing patterns, interleaver and Gray labels. They were taken from the standard, not from the design description.
- **Bus widths:** the bus from the converter FPGA into cyclic-prefix removal is 16x2 here; the original system drew it 15 bits wide. The DSP and FFT side of every bus is 16x2.
- **Clock domains:** all blocks run on one 80 MHz clock. The original spread them over three FPGAs with their own clocks.
- **Energy after the preamble:** the 1024-sample window starts at the detection instant, which is the last preamble sample. No energy is measured before the first detection.

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by printing `TB_RESULT checks=… failures=…`. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv rtl/wimax_pkg.sv tb/tb_fec_rx.sv --top-module tb_fec_rx
./obj_dir/Vtb_fec_rx
```

The end-to-end testbenches connect base-station DAC to mobile-station ADC and back, with a little noise. They play the DSP and FFT roles themselves:

- direct DFTs on a few subcarriers near DC;
- a known reference symbol for one-tap equalisation;
- random bits, with the coding mode changing from frame to frame: QPSK 1/2, 16-QAM 3/4, 64-QAM 2/3 and 64-QAM 3/4.

Over several frames they check:

- decoded downlink and uplink bits;
- one detection per frame at the right time;
- a near-zero CFO estimate;
- the cyclic shift of the postfix symbol;
- counters showing that every mechanism occurred.

| Testbench | Size | Run time |
|---|---|---|
| `tb_wimax_phy_top` | N=128, 4+4 symbols, six frames | seconds |
| `tb_wimax_phy_top_full` | all defaults: N=1024, 25+18 symbols, 232-sample gaps, three frames | well under a minute |

`tb_ms_sync` feeds a synthetic preamble with a CFO of 0.3 subcarrier spacings, a gain error and noise into the synchronisation subsystem. It checks:

- the detection instant;
- the combined estimate within 0.05 spacing;
- the residual phase drift after correction;
- the normalised power;
- both energy registers.

Choosing the detection threshold: the metrics scale with the fourth power of the normalised amplitude (2^13 rms here), so `det_thr` has to be set with that in mind. For the preamble at the defaults, 10^8 separated the peak from side lobes by a factor of about three in each direction.
