# CHP2 node logic: timed radio frames and sub-sample time of arrival

CHP2 (Communications and High-Precision Positioning) is a 4x4 MIMO radio
that uses a single waveform for two jobs. Nodes exchange frames that carry
data, and they measure distance from when those frames arrive. Each node:
- sends a frame at an exact value of its own timer;
- notes the timer value when a frame from another node arrives;
- puts those timestamps into later frames.

Two-way timestamp exchange (as in NTP) then gives the time of flight and the
clock offset between nodes. A bandwidth of about 10 MHz sampled at 40 MS/s
normally resolves time only to one sample (25 ns, 7.5 m). CHP2 gets about 100
times finer by correlating the received positioning waveforms against a bank
of fractionally delayed copies of the known sequence.

This repository holds the programmable-logic half of such a node as
synthesizable SystemVerilog:

- a 42-bit **primary timer** at 40 MHz, the time base for every timestamp;
- a **transmit engine** that sends a buffered four-channel frame, through
  pulse-shaping filters, on the clock cycle its timestamp names. Its
  **TR switch controller** moves the antenna switches and amplifiers into
  transmit mode beforehand and back afterwards;
- a **receive engine** that filters the four ADC streams, detects the
  frame preamble and reports the coarse receive timestamp. It then streams
  the whole frame to memory;
- the **massive correlator**, 16 x 800 complex correlators that give the
  fine time of arrival of 16 waveforms (4 transmit x 4 receive antennas) to
  1/100 sample (0.25 ns), in one pass of 2.01 ms at 200 MHz;
- AXI4-Lite register blocks and AXI4-Stream ports for the processor and its
  DMA engines.

The ARM processor, the vendor transceiver interface core, the DMA engines and
the RF boards are outside this logic. The top module brings out their
connections as ports.

```
                 +---------------- chp2_pl_top (40 MHz: clk) ------------------+
 AXI4-Lite ----->| chp2_regs (axil_slave)                                      |
                 |   | timer load        | tx control        | rx control      |
                 |   v                   v                   v                 |
                 | primary_timer ---> tx_engine --------> dac_data/valid ----->|--> transceiver core
 dma_tx_data --->|   |  (42 bit)        | buffer 4x64k                         |
                 |   |                  | 4 x rc_fir      tr_switch_ctrl ----->|--> trs_sw, pa_en,
                 |   |                  +- busy/armed --->                     |    lna_en, tx_mode
 adc_data ------>|   +--------------> rx_engine: 4 x rc_fir -> frame_detector  |
                 |                     ring buffer 1024 -> AXI4-Stream ------->|--> rx DMA, rx_irq
                 +-------------------------------------------------------------+
                 +---------------- (200 MHz: mc_clk) --------------------------+
 AXI4-Lite ----->| mc_axis_wrapper (axil_slave)                                |
 AXI4-Stream --->|   massive_correlator: 16 x 8 cmac3, reference bank 100x4000 |--> results stream,
                 +-------------------------------------------------------------+    mc_irq
```

## Time base and timestamps

Every event in the node is named by the value of `primary_timer`. This
42-bit counter advances on each 40 MHz clock, so it wraps after about 30.5
hours. Software reads it as two words: reading the low word latches the high
part. Software loads it through two registers; the write to the high word
performs the load.
- A **transmit timestamp** is the timer value at which the engine starts
  reading the frame buffer. The first filtered sample reaches the DAC port 6
  clocks later: 1 clock for the buffer read and 5 for the filter pipeline.
- A **coarse receive timestamp** is the timer value at which the first
  preamble sample (after the receive filter) entered the detector.

Both latencies are fixed and the same on every node, so they cancel in the
two-way exchange or are removed by calibration. In the end-to-end test, two
nodes cabled with a 37-clock delay recover that delay to within one sample
from the four timestamps of an exchange, and their timer offset too:
```
forward  = rx_B - tx_A = offset + delay + K
backward = rx_A - tx_B = -offset + delay + K
delay = (forward + backward)/2 - K,   offset = (forward - backward)/2
```
Here K, about 75 clocks, is the fixed system latency:
- 6 clocks of transmit latency;
- 5 clocks of receive filter latency;
- 2 x 32 clocks of filter group delay.

## Transmit path (`tx_engine`, `rc_fir`, `tr_switch_ctrl`)

Software writes the frame into four buffers of 65,536 samples, one per
channel, each sample 32 bits {Q, I}. It uses two registers:
- `TXB_ADDR` selects the channel and start address;
- each write to `TXB_DATA` stores one sample and advances the address.

It then sets `FRAME_LEN`, `TX_TS` and writes `TX_CTRL` with the arm bit. A
full CHP2 frame is 52,000 samples per channel (208,000 complex samples in
all) and fits.

While armed, the engine compares the timer with the timestamp on every clock.
On equality it reads one sample of all channels per clock into four 65-tap
raised-cosine filters. These filters use roll-off 0.25, 4 samples per symbol
and Q1.15 taps with unity DC gain. After the last sample it feeds 64 zeros so
the filter tails go out, then pulses `done`. A timestamp that has already
passed sets `late` and disarms; nothing is sent. The filter folds its
symmetric taps, giving 33 multipliers per rail. It rounds and saturates to
16 bits.

Clearing bit 1 of `TX_CTRL` switches the DAC port to the vendor DMA stream
(`dma_tx_data`). Existing transceiver software then keeps working unchanged.

The TR switch controller watches the armed engine:
- When `tx_ts - timer <= TR_LEAD`, it switches all four antenna switches to
  transmit, enables the power amplifiers and disables the low-noise
  amplifiers. The outputs change 2 clocks later, and the default lead is 40
  clocks (1 us).
- After the engine's busy signal falls, it holds transmit mode for `TR_TAIL`
  more clocks (3 clocks of sequencing are added), then returns to receive.
- Per-channel bypass bits in `AMP_BYPASS` keep chosen amplifiers off.
- The receive engine is disabled while in transmit mode.

## Receive path (`rx_engine`, `frame_detector`)

The four ADC streams pass through the same raised-cosine filters. Channel 1
feeds the preamble detector. The preamble is 128 BPSK symbols at 4 samples
per symbol. The detector is a matched filter whose 128 taps are 4 samples
apart. Each tap is -1, 0 or +1 on I and on Q, so it needs only adders. For
every sample k it forms

```
c[k]  = sum_i z[k - 4(127-i)] * conj(x_i)
Ez[k] = sum_i |z[k - 4(127-i)]|^2          (kept as four running sums, one per sample phase)
Ex    = number of nonzero tap components
detect when |c|^2 * 2^32 >= thr^2 * Ez * Ex  (thr in Q0.16, 0.6 after reset)
```

This is the normalised correlation `|c| / (|z| |x|) >= thr`, squared to avoid
the square root and divider.

Six pipeline stages follow the sample entering the 512-sample delay line:
1. tap products and energy update;
2. sums of 8 taps;
3. full sum;
4. |c|^2;
5. threshold product;
6. compare.

A crossing starts a local-maximum search. The largest |c|^2 is kept until 16
samples pass without a larger one, and then the detector fires once. A strong
multipath echo therefore does not give a second detection. The timestamp is
the tag of the peak sample minus 508 (127 symbols x 4). This is exact while
samples arrive every clock, which is always true at the ADC.

All filtered samples of all channels are written into a 1,024-entry ring
buffer. The write address is the low 10 bits of the timer, so a timestamp is
also a ring address. On detection the engine reads the ring from the coarse
timestamp onward. It sends `FRAME_LEN` (52,000) beats of 128 bits on AXI4-Stream,
with `tlast` on the last one. While a frame is being sent, detection is
paused.

The ring absorbs about 480 clocks of back-pressure in total. If the reader
falls so far behind that the writer would overwrite unread samples, the frame
is cut short: the newest beat carries `tlast`, and the `RX_COUNT` overflow
field counts the event. `RX_TS_LO/HI` hold the last coarse timestamp with a
"new" flag, and `rx_irq` pulses at each detection.

## Massive correlator (`massive_correlator`, `cmac3`, `mc_axis_wrapper`)

This part is the hardest to follow. Resolving 1/100 sample by upsampling the
received waveform 100 times would make every correlation 100 times longer.
The correlator avoids that by precomputing the upsampling on the reference
side.
- **Reference bank**: 100 rows of 4,000 samples. Row f is the known
  navigation sequence delayed by f/100 of a sample. Software computes it once
  and loads it.
- **Received bank**: the waveform under test, 4,007 samples, seen through an
  8-deep window, i.e. 8 copies delayed by whole samples.

Each pair (whole lag r, fractional row f) is one delay hypothesis:

```
bin b = 100*r + f     delay = r + f/100 samples      (0.25 ns steps at 40 MS/s: 4 GHz equivalent)
g[b]  = sum_{m=0}^{3999} z[m + r] * conj(ref_f[m])
```

The 800 bins cover 8 samples, two chips of the navigation code. The coarse
timestamp already places the waveform within that span. The bin with the
largest |g|^2 is the fine delay.

**Schedule.** The 16 waveforms (4 remote transmit x 4 local receive
antennas) each have their own 8 multiply-accumulate units. All 128 units
share one reference sample per clock.

Rows are processed one after another:
1. Stream 4,007 input samples through the 8-sample window.
2. Let the pipeline drain (6 clocks).
3. Write the 8 accumulators of every waveform to its result memory
   (8 clocks). The largest |g|^2 and its bin are tracked per waveform at the
   same time.

One pass takes `N_FRAC x (MC_LEN + 2 N_LAG + 5)` = 402,100 clocks, 2.01 ms
at 200 MHz.

**The multiply-accumulate (`cmac3`)** forms z * conj(x) with three
multipliers instead of four:
```
k1 = c(a+b),  k2 = a(d-c),  k3 = b(c+d)       z = a+jb, conj(x) = c+jd
Re = k1 - k3, Im = k1 + k2
```
It is pipelined as pre-add, multiply, post-add, accumulate, so the
accumulator holds an operand's contribution 4 clocks after it entered.
- The pre-adders are 18 bits wide because -Im(x) - Re(x) reaches +2^16.
- The accumulators are 48 bits, enough for 4,000 products of full-scale
  16-bit samples.

**Bus interface (`mc_axis_wrapper`).** Bulk data goes over AXI4-Stream to a
DMA engine. Control uses AXI4-Lite. `CTRL` selects a stream mode:
- mode 1: reference bank in (beat k goes to address k; `tlast` restarts at 0);
- mode 2: input waveform of the correlator named by `LD_CORR`;
- mode 3: results out. Beats are 96 bits {Q, I} of 48 bits each, correlator
  by correlator, bin 0 first, with `tlast` on the last of the 12,800.

`CTRL` bit 0 starts a pass. `STATUS` shows busy and done, and `mc_irq`
follows done. `PEAK_SEL`/`PEAK_BIN`/`PEAK_MAG` give each waveform's peak
without reading the results. `CYCLES` reports the pass length.

## Register maps

Baseband block (`chp2_regs`, byte offset = 4 x index):

| idx | name | access | content |
|---|---|---|---|
| 0 | TIMER_LO | R | timer[31:0]; latches timer[41:32] |
| 1 | TIMER_HI | R | latched timer[41:32] |
| 2, 3 | TLOAD_LO/HI | W | load value; writing HI loads the timer |
| 4, 5 | TX_TS_LO/HI | R/W | transmit timestamp |
| 6 | FRAME_LEN | R/W | samples per transmitted frame |
| 7 | TX_CTRL | R/W | W: bit0 arm, bit1 CHP2 mode; R: armed, mode, busy, late, sent |
| 8 | TXB_ADDR | R/W | {channel[17:16], sample[15:0]} |
| 9 | TXB_DATA | W | {Q, I}; address then advances |
| 10, 11 | TR_LEAD, TR_TAIL | R/W | clocks (reset 40, 80) |
| 12 | AMP_BYPASS | R/W | {LNA[7:4], PA[3:0]} |
| 13 | DET_THR | R/W | detection threshold, Q0.16 (reset 0.6) |
| 14 | PRE_TAP | W | {index[14:8], Q[3:2], I[1:0]} |
| 15, 16 | RX_TS_LO/HI | R | coarse receive timestamp; HI bit31 = new (cleared by read) |
| 17 | RX_COUNT | R | {overflows, frames} |
| 18 | RX_CTRL | R/W | bit0 receiver enable (reset 1) |

Correlator block (`mc_axis_wrapper`): 0 CTRL, 1 STATUS, 2 LD_CORR,
3 PEAK_SEL, 4 PEAK_BIN, 5-7 PEAK_MAG (96 bits, low word first), 8 CYCLES.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| chp2_pkg | TS_W | 42 | timer width |
| rc_fir | N_TAPS | 65 | raised-cosine taps, beta 0.25, 4 samples/symbol |
| tx_engine | BUF_AW | 16 | transmit buffer: 65,536 samples per channel |
| rx_engine | FRAME_LEN | 52000 | samples per received frame |
| rx_engine | RING_AW | 10 | ring buffer 1,024 samples |
| frame_detector | N_TAPS, SPS, PEAK_WIN | 128, 4, 16 | preamble taps, spacing, peak search window |
| massive_correlator | N_CORR, MC_LEN, N_FRAC, N_LAG | 16, 4000, 100, 8 | waveforms, length, fractional rows, lags |
| cmac3 | DATA_W, ACC_W | 16, 48 | sample and accumulator widths |

Each node holds about 24.7 Mbit of memory. The largest parts are the
reference bank (12.8 Mbit) and the transmit buffers (8.4 Mbit). This fits
the 32.1 Mbit of block RAM on an XCZU9EG.

## What follows the original system and what does not

These parts follow the original CHP2 hardware description:
- the 40 MHz timer-driven transmit engine with its buffer, filters and
  switch to the DMA path;
- TR switching around each transmission;
- the receive chain of raised-cosine filter, 128-tap symbol-spaced preamble
  detector (0.6 normalised threshold, six pipeline stages, local-peak
  search) and block memory to DMA, with the coarse timestamp;
- in the correlator: the bank of 100 fractional delays against 8
  sample-delayed copies, 800 bins, 16 correlators, three-multiplier
  pipelined MACs, 200 MHz and the AXI4-Lite/AXI4-Stream split.

These are this implementation's own choices:
- both register maps and their reset values;
- the single-shot arming, the zero flush and the `late` flag;
- lead and tail counted in clocks;
- the timer-addressed ring buffer and the frame starting at the first
  preamble sample;
- the overflow rule;
- the peak-search window of 16;
- the squared threshold test;
- the correlator's row-serial schedule, bin order and hardware peak search;
- the stream formats.

The original also states a 2 GHz equivalent rate in one place. The
4 GHz / 800-bin configuration is built here because it is the one given as
the final design.

These parts are not in this logic and are left to software or vendor parts:
- payload coding (CRC, scrambler, convolutional code, spreading);
- the channel equalizer;
- frequency-offset estimation and correction;
- power control;
- the time-of-flight and position solvers;
- the transceiver interface core, the DMA engines, the processor;
- the RF front end (transceivers, synthesizer, TR board).

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/chp2_pkg.sv tb/tb_rx_engine.sv \
          --top-module tb_rx_engine -o sim && obj_dir/sim
```

What each testbench checks:

| testbench | checks |
|---|---|
| tb_primary_timer | count, load, 42-bit wrap |
| tb_rc_fir | taps against a raised cosine computed in real arithmetic; bit-exact output on random data; 5-clock latency; saturation |
| tb_tx_engine | first sample at tx_ts + 6; frame_len + 64 samples against a filter model; late flag; DMA pass-through |
| tb_tr_switch_ctrl | switch-on at tx_ts - lead + 2; tail; bypass masks; disarm |
| tb_frame_detector | every detection (time and \|c\|^2) against a reference model: rotated, multipath, gapped, weak, disabled and complex-tap preambles |
| tb_rx_engine | coarse timestamps; every beat against a filter model; light stall absorbed; overflow on a long stall |
| tb_cmac3 | random and full-scale operands against four-multiplier arithmetic |
| tb_massive_correlator | all bins, peaks and pass length on a reduced size; a delayed reference copy found at its bin |
| tb_mc_axis_wrapper | load and result streams, registers, CYCLES, interrupt on a reduced size |
| tb_axil_slave | random-order address/data, random ready delays |
| tb_chp2_regs | every register and strobe |
| tb_chp2_pl_top | full size, two nodes back to back (see below) |

`tb_chp2_pl_top` runs two full-size nodes, every parameter at its default, in
about 15 seconds:
- a timed exchange in both directions with full 52,000-sample receive
  frames, and two-way recovery of the cable delay and the timer offset;
- a stall that is absorbed and an overflow;
- a late timestamp, the DMA mode switch and the receiver disabled by
  software;
- a complete correlator pass with 100 x 4,000 reference samples and 16
  waveforms of random delays. Each peak must lie within 3 bins (0.03 sample)
  of the delay applied, and the pass must take exactly 402,100 clocks.
