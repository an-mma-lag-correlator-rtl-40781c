# Lag correlator for a 40-antenna millimetre array

This is synthesizable SystemVerilog for the lag-type (XF) correlator proposed in the memo
"An MMA Lag Correlator Design". The correlator serves 40 antennas. Each antenna has eight
4-GS/s samplers, and the correlator chips run at only 125 MHz.

A sampler's output arrives as 32 parallel streams, where each stream carries every 32nd sample.
The usual way to correlate such streams is a 32 x 32 grid of chips per baseline. This design
avoids that grid. A large RAM, the *memory card*, sits between each sampler and the correlators.
It turns the 32 interleaved streams into 32 streams that each carry a long run of *consecutive*
samples. Each of those streams can then feed an ordinary lag correlator, so one row of chips per
baseline is enough. The same RAM also produces long lags by address offsets when the bandwidth
is reduced. The lag range therefore grows without chaining chips together.

## Signal path

```
 sampler 32x2 @125 MHz
   |  (not included: analog sampler, PLL, 1:32 demultiplexer)
 delay_line        per sampler: integer station delay, 1-sample steps
   |
 switch_matrix     per antenna: 8/4/2/1 active samplers, sample discarding
   |  8 channels x 32 x 2
   +--> seg_memory (prompt)  --+   per channel: 32 outputs of contiguous segments
   +--> seg_memory (delayed) --+
                               |
 correlator_matrix             per channel and card output: N_ANT x N_ANT correlators,
   |                           tiled with 4 x 8 correlator_chip, 128-lag lag_correlator cells
 lta                           per chip: long-term accumulation in bins
 dump_timer                    integration = 1..16 memory cycles
```

Everything runs on one 125-MHz clock. Reset is asynchronous and active low. The top module,
`mma_correlator_top`, builds this whole path for `N_ANT` antennas. Its ports are the sampler
words, the station delays, the mode settings, the integration controls and a host port that
reads the LTAs.

A sample is 3-level and uses two bits: `01` = +1, `00` = 0, `11` = -1 (`mma_pkg`). The package
also holds the 3-level x 3-level multiply.

## The memory card (`seg_memory`)

This is the part that makes the design work, and the part that is hardest to follow.

**The ring.** The card is a RAM of `PAR*SEG_WORDS` words of `PAR` samples. With the defaults
that is 131,072 words of 32 samples, or 8 Mbit: one 32K x 128 RAM per sample bit. Each
incoming word is written at a circular write pointer, so the RAM always holds the most recent
4M samples in time order.

**The FIFOs.** The ring is read as `N_F` equal regions, one per "FIFO". At full rate,
`N_F = 32` and each region holds 131,072 samples. Reader *f* starts when the writer has stored
the first word of region *f*. It then reads one sample per clock, so a region of 131,072
samples takes 1.05 ms. The writer fills a region 32 times faster than a reader empties it, and
it comes back to region *f* after exactly one region's read time. At that moment reader *f*
has just finished. Each output therefore carries one 1.05-ms segment of contiguous samples,
then a jump in time, then the next segment. The segments of the 32 outputs are staggered by
4096 clocks.

**Blanking.** When a segment starts, the lag generator of the correlator still holds samples
from before the jump. For this reason the delayed card drops `out_ok` for the first `LAGS-1`
samples of every segment, and the correlator integrates only while both cards report ok. This
loses 127 of 131,072 clocks (0.1 %). After a restart, samples from before the restart are
blanked as well.

**Lower rates give more lags.** Suppose the switching matrix keeps only every 2^r-th sample.
A word then arrives only every 2^r clocks. The card then uses `N_F = 32 >> r` FIFOs, each
2^r times longer, and still reads one sample per clock. That leaves 2^r outputs per FIFO.
Output *k* reads FIFO `k mod N_F` as copy `c = k / N_F`:

* In the prompt card, every copy carries the same samples.
* In the delayed card, copy *c* is read `lag_base + c*LAGS` samples earlier. The chips on
  output *k* therefore compute lags `lag_base + c*128 ... + 127`.

**Inactive samplers give more lags.** When fewer samplers are active, channel *m* is fed from
sampler `m mod n_active`, and its delayed card gets
`lag_base = (m / n_active) * (128 << r)`. Taken together, one sampler covers
`(N_SAMP / n_active) * 2^r * 128` consecutive lags. This matches the lag counts of the memo's
performance tables:

| active samplers | lags at full rate | lags at 1/32 rate (62.5 MHz per sampler) |
|---|---|---|
| 8 | 128 | 4096 |
| 4 | 256 | 8192 |
| 2 | 512 | 16384 |
| 1 | 1024 | 32768 |

Bandwidths below 62.5 MHz per sampler are reached by oversampling: the rate stays at 1/32 and
the lag count stays the same.

For long offsets, a delayed read near the start of a region reaches back into the previous
region. That region holds exactly the preceding samples, so the lag window stays contiguous.
The largest offset, `lag_base + (2^r - 1)*LAGS`, must be smaller than one region. With the
defaults the largest offset is 32,640 samples and the smallest region is 131,072 samples.

`seg_start` pulses when reader 0 begins a segment. This marks the *memory cycle* that times
the integrations.

Mode changes (`act_shift`, `dec_log2`) take effect with a `restart` pulse. The pulse clears
the packers, the write pointers, the readers and the integration count. It takes one restart
plus one memory cycle until all outputs are valid again.

## Correlators

**`lag_correlator`**: one cell with 128 lags.

* The delayed input runs down a 127-stage shift register. Tap *l* is multiplied by the current
  prompt sample, so integrator *l* accumulates prompt(t)·delayed(t−l).
* Integrators are 12 bits, signed and saturating. A saturation sets an overflow flag for that
  integration.
* On `dump`, the values move to 12-bit storage registers, which can be read while the next
  integration runs.

**`correlator_chip`**: 4 x 8 cells.

* It has 8 prompt inputs on the columns and 4 delayed inputs on the rows. Cell (r, c)
  correlates prompt c with delayed r, and each cell has its own lag generator.
* A cell integrates while `p_ok[c] && d_ok[r]`.
* After a dump, the chip streams its 4096 stored values out, one per clock:
  address = cell*128 + lag, with cell = r*8 + c. The first value appears two clocks after the
  dump.
* If a dump comes while a read-out is still running, the chip restarts the read-out and pulses
  `ro_overrun`.

**`correlator_matrix`**: N_ANT x N_ANT cells for one channel and one card output.

* Prompt antenna *p* and delayed antenna *d* meet in cell `(d%4)*8 + p%8` of chip
  `(p/8)*(N_ANT/4) + d/4`.
* The diagonal holds the self products. The two triangles hold the positive and the negative
  lags (lags and leads) of each baseline.
* The full system has 8 channels x 32 outputs = 256 such matrices, each of 50 chips:
  12,800 chips and 409,600 correlators.

## Integration and long-term accumulation

* **`dump_timer`** dumps every chip after `n_seg` memory cycles (1 to 16), counted on
  antenna 0 / channel 0's `seg_start`. An integration therefore always spans whole segments,
  and every output integrates exactly `n_seg * (L - 127)` clocks per dump, where *L* is the
  segment length.
* **`lta`**, one per chip, adds each read-out value into one of `N_BINS` bins, for example
  signal / reference / calibration or the phase-switch states.
* The top samples `bin_sel` and `first` at each dump. They apply to the read-out of that
  integration. `first` = 1 overwrites the bin instead of adding to it.
* The host reads any LTA word through `rd_chan / rd_out / rd_chip / rd_bin / rd_addr`.
  `rd_data` follows one clock later.

## Other blocks

**`delay_line`** writes every word into a 16384-word ring, which gives 524,288 samples
(131 µs). It reads `delay / 32` words behind the write pointer. A shifter across two
neighbouring words adds the remaining 0–31 samples. The fractional-sample part of the station
delay belongs to the sampler's PLL and is not included.

**`switch_matrix`** routes sampler `m mod n_active` to channel *m*. It keeps every
`2^dec_log2[s]`-th sample and packs the kept samples into full 32-sample words. Each sampler
has its own `dec_log2`, so mixed wide-band / narrow-band modes are possible.

## Parameters

| parameter | default | in the memo | meaning |
|---|---|---|---|
| `N_ANT` | 16 | 40 | antennas (top only) |
| `N_SAMP` | 8 | 8 | samplers per antenna |
| `PAR` | 32 | 32 | samples per clock per sampler |
| `DL_DEPTH` | 16384 | 524,288 samples | delay-line words |
| `SEG_WORDS` | 4096 | 131,072-sample FIFOs | words per FIFO at full rate |
| `ROWS` x `COLS` | 4 x 8 | 4 x 8 | cells per chip |
| `LAGS` | 128 | 128 | lags per cell |
| `ACC_W` | 12 | 12 | integrator and storage width |
| `N_BINS`, `LTA_W` | 4, 32 | "several" bins | LTA size (own choice) |

`correlator_matrix` defaults to the memo's 40 antennas. The top defaults to 16 antennas
(2048 chips) because of tool memory. At 16 antennas, `verilator --lint-only` needs about 13 GB
and 11 minutes. Its memory grows linearly with the chip count, so 40 antennas would need about
80 GB. Set `N_ANT = 40` (any multiple of 8) for the full array.

Sizes should be powers of two where they set address widths (`PAR`, `SEG_WORDS`, `DL_DEPTH`,
`LAGS`).

## Where this departs from the memo, and what is left out

* **Sizes read as samples.** The memo gives the RAM sizes in bits but the ranges in time:
  "524,288 bit ... 131 µs" and "131,072-bit FIFO ... 1 ms". These agree only if the bit counts
  are per sample bit, so both RAMs are built with those counts in *samples*. The memo's
  introduction quotes a 320-µs delay range; the built range is 131 µs.
* **12-bit integrators cannot hold a strong correlation for 1–16 ms.** A fully correlated lag
  grows by one per clock, and 1 ms is 125,000 clocks. The integrators saturate and flag
  overflow rather than wrap. Integrations stay 1–16 memory cycles as the memo describes.
* **Integration length at reduced rate.** `n_seg` counts memory cycles, and a memory cycle
  lasts 2^r x 1.05 ms when only every 2^r-th sample is kept. So 1 to 16 memory cycles mean
  1 to 16 ms only at full rate; at 1/32 rate one memory cycle is 33.6 ms.
* **Polarization.** The memo wants each 128-lag cell to split into two 64-lag cells for
  polarization cross products. This split is not built, so the cross-product modes are not
  available.
* **Not included:** the samplers (analog, PLL, demultiplexer), the digital filters and FFTs
  that the memo mentions for very high resolution, recirculation, and on-chip input
  multiplexing.
* **Own choices.** These are choices where the memo says nothing:
  * the sample code;
  * which chip axis is prompt;
  * the reader start rule and the copy-to-output mapping;
  * the lag-offset formula;
  * saturation;
  * the read-out order and rate;
  * the LTA's bins, width and `first` control;
  * counting the integration in memory cycles of one card.
* **RAMs are arrays.** The memory card is written as one array with 32 read ports. A real card
  would be banked, but the memo gives no banking.

## Simulation

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. Run one with plain verilator, packages
first:

```
verilator --binary --timing --assert -Irtl rtl/mma_pkg.sv \
    rtl/delay_line.sv rtl/switch_matrix.sv rtl/seg_memory.sv rtl/lag_correlator.sv \
    rtl/correlator_chip.sv rtl/correlator_matrix.sv rtl/lta.sv rtl/dump_timer.sv \
    rtl/mma_correlator_top.sv tb/tb_mma_correlator_top.sv --top-module tb_mma_correlator_top
./obj_dir/Vtb_mma_correlator_top
```

What each testbench checks, and at what size:

* **`tb_delay_line`** (default size): every output sample against the input stream for 30
  delays from 0 to the maximum.
* **`tb_switch_matrix`** (default size): every packed word and its timing, for all four
  active-sampler settings and mixed discard factors.
* **`tb_seg_memory`** (8 FIFOs of 16 words, 4 lags): every output and ok flag of a prompt and a
  delayed card, every clock, at four rates and several `lag_base` values. The expected value
  comes from the circular-FIFO description, not from the RAM addressing.
* **`tb_lag_correlator`** and **`tb_correlator_chip`** (default size): against a reference
  integrator. This covers saturation, read-out order, length, start time and overrun.
* **`tb_correlator_matrix`** (16 antennas, 16 lags): the antenna-to-chip wiring, using
  delayed copies of one source.
* **`tb_lta`**, **`tb_dump_timer`**: bins and `first`; dump spacing for n_seg = 1..16 and
  restart.
* **`tb_mma_correlator_top`**, end to end at 8 antennas, 2 samplers, PAR = 4, 64-word FIFOs,
  8 lags: every antenna sees a common random signal with its own geometric delay, so each
  antenna pair's expected peak position and height are known in closed form. The test checks
  every LTA value through the host port in six phases:
  * station delay compensation;
  * one active sampler copied to two channels (lag offset);
  * half rate with offset card outputs;
  * saturation;
  * LTA accumulation over three dumps;
  * read-out overrun.

  It also counts blanked clocks.

This reduced top test is the largest simulation of the whole design. The default top (16
antennas, 8 samplers, 32 outputs, 128 lags) has not been simulated: building it is beyond a
16-GB machine.
