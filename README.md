# 10 Gbps baseband platform for a 20 Gbps wireless backhaul modem

This RTL bridges a 10 Gigabit Ethernet port onto two 2.5 GHz radio
channels ("bands"). Each band carries 5.34 Gbps of user data. The full 20
Gbps modem uses two of these platforms, four bands in all. Three ideas run
through the design:

- **Ethernet without a MAC.** 64b/66b blocks from the fibre transceiver are
  handled as they are. Idle blocks are deleted on the way in. The remaining
  traffic is cut into fixed-length radio frames. At the far end, idles are
  inserted again to fill the gaps.
- **Continuous radio frames.** The radio sends frames back to back at a
  fixed rate, whether or not there is traffic. When there is not enough
  traffic, a whole frame is sent as padding.
- **Eight samples per clock.** The transmitters and the receiver front end
  work at 312 MHz with 6 symbols (1.875 GBd) or 8 samples (2.5 GS/s) per
  clock, so every block is written as wide parallel hardware.

The top module is `modem_top`, one platform. What is not here is listed in
[Not included](#not-included). Mainly, that is the LDPC encoder and decoder
and the receive filter with its channel and I/Q-imbalance estimation. Their
signals are ports of `modem_top`, so they can be attached later.

## The PHY frame

Every band sends the same frame, 1192 clocks of 312 MHz (3.82 µs):

| part | clocks | content |
|---|---|---|
| preamble | 16 | one 64-sample training block sent twice (128 samples) |
| data | 1176 | 7056 symbols: 252 data blocks, each one pilot + 27 16QAM symbols |

- **Coded bits.** The 6804 data symbols hold 14 LDPC code words of 1944
  coded bits each (rate 3/4). That gives 14 × 1458 = 20412 user bits per
  frame, so 20412 / 3.82 µs = 5.34 Gbps per band.
- **Pilots.** A pilot is `(1+j)·s`. The sign `s` is the next chip of a PN
  sequence (x^7 + x^4 + 1, seed all ones), restarted at the start of every
  frame, so the first pilot of a frame always uses the first chip.
- **Preamble samples.** QPSK points ±724 whose signs come from the same
  polynomial seeded with `7'h5A`, two bits per sample.
- **16QAM mapping.** Gray coded, two bits per axis: 00 → −3, 01 → −1,
  11 → +1, 10 → +3. The first two coded bits of a symbol go on I.

## Ethernet side (`eth_interface`)

```
GTX rx ─► block_sync ─► eth_descrambler ─► rx_fifo ─► split_phy_frame ─► 2 PHY TX channels
            (156 MHz)                      (idle deletion / insertion)      (312 MHz, tx)
GTX tx ◄─ eth_scrambler ◄─ tx_fifo ◄─ merge_phy_frame ◄─ 2 PHY RX channels (312 MHz, rx)
traffic_monitor on the rx_fifo output (Eth_rx) and on the tx_fifo output (Eth_tx)
```

There are four clock domains: GTX receive, GTX transmit, PHY transmit and
PHY receive. They cross only through the two Gray-pointer FIFOs
(`async_fifo`). The merger's per-channel FIFOs only absorb the latency
difference between the channels.

**Block handling.**

- Block lock follows the usual 10GBASE-R rule: lock after 64 good sync
  headers, lose it after 16 bad ones in 64.
- The scrambler and descrambler are the self-synchronous 1 + x^39 + x^58
  pair. The descrambler is needed so that idle blocks can be recognised.
- Only the plain idle block (type 0x1E, eight /I/) is deleted. All other
  blocks are kept.

**Dealing blocks to channels (`split_phy_frame`).** This is the part that
takes most thought.

- **Frame length.** One frame holds 309 blocks, because 309 × 66 ≤ 20412
  bits. Both channels share one frame clock, so frames are decided in pairs.
- **Data or padding.** At each frame start, if the FIFO holds a whole pair
  (618 blocks), a data frame is sent. Blocks alternate: channel 0, channel 1,
  channel 0, and so on. Otherwise the frame is padding, made entirely of
  idle blocks.
- **Flush.** If traffic has waited through two padding frames, it is sent
  anyway. Without this rule, the end of a burst would wait for more traffic
  that might never come. The empty places of such a frame carry idle
  blocks, which the receiver drops.
- **Filler block.** A flushed frame can end with a block on channel 0 and
  none for channel 1. In that case channel 1 carries a filler block (type
  0x1E with eight /E/ characters). The merger skips it, and its alternation
  stays in step.
- **Channel disable.** `ch_en` turns one channel off. All traffic then uses
  the other channel, and the disabled one carries padding.

**Merging (`merge_phy_frame`).**

- A received block within one bit of the idle block is dropped as padding.
  This is the error tolerance for padding.
- The tolerance cannot be two bits. The idle block and a terminate block
  with no data (type 0x87, otherwise all zero) are too close, and such a
  terminate block would be taken for padding.
- Traffic blocks are read alternately from the two channels.

**Output FIFO (`tx_fifo`).** The receiver delivers blocks in bursts: a whole
frame's worth, then nothing. The FIFO therefore forwards a frame only once
its terminate block has arrived. It counts terminate blocks across the
clock boundary in Gray code. This way an idle is never inserted in the
middle of an Ethernet frame. Between frames, idles are inserted whenever
the FIFO is empty.

**Monitors.** Each monitor counts complete frames, FCS errors (CRC-32
residue check) and framing errors.

## Transmitter (`tx_band`)

- **Frame counter.** A counter runs over the 1192 clocks of the frame.
  `frame_start` marks clock 0 and starts the Ethernet splitter on the next
  frame.
- **Symbol generator (`tx_symbol_gen`).** It takes 5 or 6 groups of coded
  bits per clock through `nib_in` / `take`. It builds six symbols per clock
  and puts a pilot (`pn_gen`) at the head of every 28-symbol data block.
- **Filter (`tx_filter`).** This is a root-raised-cosine filter (roll-off
  0.25, 8 taps per output sample) that also converts the rate: 6 symbols in, 8
  samples out per clock.
  - Output sample m of a clock sits 3m/4 symbol periods after the clock's
    first symbol. So four polyphase coefficient sets recur. They are
    computed at elaboration from the RRC formula (scaled by 256).
  - Symbols are level codes, so each tap is a table look-up of
    ±1/±3 × coefficient. There are no multipliers.
  - At most three adders are chained per clock. Groups of four taps are
    summed and registered, then the group sums are added. The output
    follows the input by four clocks.
- **Preamble.** The preamble is added after the filter, at sample rate.
  `dac_sof` comes six clocks after `frame_start`.

## Receiver front end

- **`coarse_sync`.** This computes, for eight samples per clock, the lag-64
  autocorrelation `P` and the energy `E` of a 64-sample window.
  - Because the preamble's two halves are equal, `|P|² ≥ (3/4)²·E²` means a
    preamble.
  - The largest `|P|²` over the next 8 clocks gives the timing point: the
    index of the preamble's last sample.
  - A hold-off of 1100 clocks keeps one frame from being detected twice.
- **`fine_timing`.** This refines the coarse point by cross-correlation
  with the known training block, done in the frequency domain.
  - The 64 samples ending at the coarse point are taken from a 32-clock
    history of A/D samples, frozen at the detection.
  - A 64-point FFT (one butterfly per clock) transforms them. Each bin is
    multiplied by the conjugate spectrum of the training block's sign
    pattern, a constant table. An inverse FFT on the same engine follows.
  - The peak of the circular correlation at lag `d` puts the preamble's last
    sample at `coarse + d` (or `d − 64` for `d ≥ 32`).
  - The result comes about 580 clocks after the detection, on `fine_found`
    and `fine_idx`. The receive filter would use it for frame alignment.
- **`cfo_estimator`.** The angle of `P` is 2π·CFO·64. A 24-step CORDIC finds
  it, and the per-sample correction is `−angle/64` (one turn = 2^24).
  - This covers offsets up to 2.5 GS/s / 128 = 19.5 MHz.
  - Larger offsets wrap around. A requirement of "tens of MHz" therefore
    needs an acquisition stage that is not included.
- **`cfo_comp`.** This is an NCO plus a complex rotation of eight samples per
  clock. It uses a 1024-entry cosine/sine table computed at elaboration.
  The phase restarts at each new estimate.
- **Receive filter.** This stage (not included) resamples to symbols,
  equalises, and hands six symbols per clock, frame aligned, back to the
  platform. The level scale is ±1 = 512.
- **`phase_track`.** It removes phase noise with the pilots. Each pilot `r`
  gives `c = r·(1−j)·s`, a phasor of the block's common phase. The pilot's
  data block is turned back by `conj(c)` and scaled.
  - The correction holds for one data block. It is not interpolated.
  - The small gain error this leaves is harmless to the demapper.
- **`qam16_demapper`.** This makes max-log soft bits: `y` for the sign bit
  and `2A − |y|` for the inner/outer bit. They are scaled so that one level
  unit is 8 and saturated to 6 bits. A positive value means bit 1. Pilot
  lanes are flagged.
- **`ldpc_iter_ctrl`.** This is the bookkeeping for the decoder buffer that
  the two bands share.
  - Blocks queue in arrival order, and a free core (of 4) takes the oldest.
  - The iteration count depends on the queue: 10 while at most 4 blocks
    wait, falling linearly to 2 at 32. A lightly loaded receiver decodes
    harder, and a loaded one keeps up.
  - Blocks that arrive at a full buffer are counted as dropped.

## What is fixed by the design and what was chosen here

These follow the source design:

- the frame geometry and rates;
- 16QAM;
- PN-coded pilots `(1+j)s` restarted every frame;
- the two-block 64-sample preamble;
- coarse timing by autocorrelation, with the CFO taken from it;
- fine timing by frequency-domain cross-correlation with the training
  block, on a segment taken backwards from the coarse point;
- the processing order of the receiver;
- the 66-bit bridge with idle deletion and insertion in the two FIFOs;
- whole padding frames with an error-tolerant padding match;
- the two monitors;
- the RRC/SRC filter built from tables with three adders per stage;
- iteration control from the buffer fill, with cores shared by the bands.

Everything else is this implementation's own choice. That covers every
numeric parameter not in the table above, and these rules:

- the pilot position inside a data block, and the bit mapping;
- the preamble sequence;
- the channel pairing, the flush and the filler block;
- the detection threshold and hold-off;
- the fine-timing segment of 64 samples and its sequential FFT;
- the CORDIC and the NCO table;
- the per-block derotation;
- the soft-bit approximation;
- the linear iteration rule, with 4 cores and 32 buffered blocks.

Each file's header says which parts are which.

## Not included

| part | why |
|---|---|
| LDPC encoder / decoder (802.11n, n = 1944, rate 3/4) | the code matrices and the decoder algorithm are a standard's and not given here; ports `enc_*`, `dec_*` |
| receive filter, channel estimation and inversion, coefficient update, I/Q-imbalance estimation and compensation | no algorithm or structure given; ports `rxf_*` |
| D/A, A/D, IF module, GTX transceiver, QSFP | analog or vendor parts; ports `dac_*`, `adc_*`, `gtx_*` |

## Interfaces of `modem_top`

- **Clocks and resets.** `gtx_rx_clk` and `gtx_tx_clk` run at 156.25 MHz,
  and `phy_tx_clk` and `phy_rx_clk` at 312 MHz (from the converters). Each has its own
  synchronous, active-high reset.
- **Fibre.** `gtx_rx_valid`, `gtx_rx_blk` and `gtx_rx_slip` on the receive
  side; `gtx_tx_blk` on the transmit side, one block per clock. Blocks are
  `{hdr[1:0], data[63:0]}`, with payload bit 0 first.
- **To the encoders.** `enc_blk_valid`, `enc_blk_sof` and `enc_blk_pad`,
  plus `enc_blk[2]`, one block pair every two PHY clocks.
- **From the encoders.** `enc_nib[2][6]` offers the next six unused 4-bit
  groups. `enc_take[2]` says how many were consumed that clock.
- **D/A.** `dac_sof[2]` and `dac_smp[2][8]`, as 12-bit I/Q.
- **A/D.** `adc_valid` and `adc_smp[2][8]`.
- **To the receive filter.** `rxf_in_valid` and `rxf_in_smp`, the
  CFO-corrected samples.
- **From the receive filter.** `rxf_sym_valid`, `rxf_sym_sof` and
  `rxf_sym[2][6]`. `sof` marks the clock whose lane 0 is the frame's first
  pilot.
- **Soft bits to the decoder buffer.** `dec_llr_valid`, `dec_llr_pilot` and
  `dec_llr[2][6][4]`.
- **Decoder scheduling.** `dec_blk_in[2]` pulses when a band has buffered a
  complete code block. `dec_core_start`, `dec_core_done`, `dec_core_band`,
  `dec_core_slot` and `dec_core_iters` run the cores.
- **From the decoders.** `dec_blk_valid[2]` and `dec_blk[2]`, the recovered
  66-bit blocks per band.
- **Timing.** `sync_found` and `sync_timing[2]` give the coarse point,
  and `fine_found` and `fine_idx[2]` the refined one (sample index of the
  preamble's last sample, counted from reset).
- **Status counters.** Lock, the CFO estimate, idle deletion, frame
  types, dropped padding, monitor counts and overflows.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Wno-lint -Wno-style -y rtl -y tb \
    rtl/modem_pkg.sv tb/tb_modem_top.sv --top-module tb_modem_top -Mdir obj -o sim
obj/sim
```

Replace `tb_modem_top` with any `tb_<block>` to test one block.

**`tb_modem_top`.** This is the end-to-end test. It runs the platform at its
default parameters for about 13 full frames, which takes under a minute.
Models in the testbench stand in for what is not included:

- the fibre, sending scrambled Ethernet frames with valid FCS;
- an ideal codec and link, which loop the encoder blocks back to the
  decoder side with 40 and 47 clocks of delay;
- random coded bits;
- a D/A to A/D path with a 2 MHz carrier offset;
- a receive filter that hands over the sent symbols with up to ±0.3 rad of
  phase noise per data block;
- decoder cores that are slightly too slow at 10 iterations.

It checks:

- every Ethernet block at the fibre output, in order;
- the monitors;
- the timing of every preamble detection, and the CFO estimate;
- that every fine timing result lands exactly on the preamble's last sample;
- the phase stability after compensation;
- every soft bit.

It also counts each mechanism and fails if one never occurs: padding and
data frames, flush, filler, single-channel operation, idle deletion and
insertion, detection, fine timing, compensation, tracking, and both maximum and reduced
iteration counts.

## Limits worth knowing

- **Frame length.** 18 of the 20412 user bits per frame are unused, because
  309 blocks × 66 bits = 20394.
- **Capacity.** Two channels carry 618 blocks per frame against at most 596
  blocks of a saturated 10GbE port. That is 4% headroom before idle
  deletion (597 blocks arrive per frame at 156.25 MHz if the PHY clock is
  312 MHz).
- **CFO range.** The estimator wraps above 19.5 MHz.
- **Fine timing range.** The correlation is circular over 64 samples, so
  the coarse point must be within ±31 samples. A new detection during the
  580 clocks of a fine-timing run is ignored. In the end-to-end test the
  coarse point is already exact; offsets of up to ±20 samples are tested in
  `tb_fine_timing`.
- **Phase tracking.** One phase per 28-symbol data block. Fast phase noise
  within a block is not followed.
- **Padding tolerance.** A padding block with two or more bit errors reaches
  the Ethernet side as a stray control block. The monitors count it as a
  framing error.
