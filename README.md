# Time-gated 32×32 SPAD imager with shared macropixel TDCs

This is synthesizable SystemVerilog for the digital part of a time-gated
single-photon imager for LIDAR. The array has 32×32 single-photon avalanche
diodes (SPADs), grouped into 16×16 **macropixels** of 2×2 SPADs. An in-pixel
time-to-digital converter (TDC) is costly in area. So each SPAD keeps only
its own cheap parts: a hold-off timer and a 5-bit photon counter. The four
SPADs of a macropixel share **one** TDC through an arbiter. The arbiter has
two operating modes:

* **single-photon mode**: the first photon of a gate window takes the TDC.
  Its time goes into that SPAD's own register. Each SPAD stores at most one
  time per frame, so four times per frame are possible and X–Y resolution is
  kept.
* **two-photon-coincidence mode**: the TDC fires only when a second photon
  arrives within about 1 ns of a first one. Uncorrelated background photons
  then cost no conversions. The macropixel acts as one detector with a
  threshold of two photons. Its four registers hold up to four two-photon
  times, and counter 0 counts the two-photon events.

Photon counting and photon timing run at the same time. Results are
double-buffered in every macropixel, so frame N is read out while frame N+1
is acquired. The readout has no column decoder. A row clock travels from
pixel to pixel, and each pixel takes as many clock pulses as it has words
to send.

## How time is represented

The TDC hardware works on asynchronous edges. A global START arrives once per
gate window with the laser pulse, and a photon produces a STOP. Synchronous
RTL cannot hold a sub-cycle edge, so in this RTL every such event is given as:

* the **reference-clock cycle** it falls in (`clk` is the 420 MHz reference
  clock), and
* a **5-bit position** `t` inside that cycle, in units of Tck/32 (75 ps).

The chip measures that position with an interpolator: a bank of arbiters
samples 16 clock phases, spaced Tck/32 apart, each with a 50 % duty cycle.
Both edges of every phase are used, so 16 lines resolve 32 sub-intervals.
`phase_sampler` is a behavioural model of the arbiter bank and the ideal
clock. It turns `t` into the 16 sampled levels, where phase k is high when
(t − k) mod 32 < 16. `fine_interpolator` is real decoding logic for those
samples. The sample word is a 32-state Johnson code:

| t       | phase 0 | high phases | decode        |
|---------|---------|-------------|---------------|
| 0 … 15  | 1       | t + 1       | t = ones − 1  |
| 16 … 31 | 0       | 31 − t      | t = 31 − ones |

The decoder counts the high phases instead of searching for the 0/1
boundary. A single arbiter that resolves the wrong way therefore moves the
result by at most one LSB. The SPAD front end and the multiphase clock
generator are analog, and only their digital behaviour is modelled. That
generator is a DLL with 16 phases, a phase interpolator, an edge combiner
and tunable buffers.

## One conversion: coarse count, fine times, gate number

Each macropixel has one `pixel_tdc`:

* START clears the 7-bit **coarse counter**, which then counts reference
  cycles.
* The arbiter's STOP halts the counter, and the **STOP interpolator**
  records the photon's fine position.
* A 6-bit **gate counter** is cleared at frame end and advanced by every
  START. It is stored with each conversion.

A stored conversion is 18 bits: `{gate[5:0], coarse[6:0], fine[4:0]}`. The
global `start_channel` interpolates every START and writes its fine time
into a 64-entry memory at the address of the gate number. The host pairs
each conversion with the START of the same gate and computes:

    T = Tck · coarse + Tck/32 · (fine_stop − fine_start)

In cycle terms, a START in cycle `cs` and a photon in cycle `cp > cs` give
`coarse = cp − cs`. With 7 bits the full scale is 128 × 2.38 ns ≈ 305 ns.
The TDC converts at most once per gate window. Some rules in this design
come from the 6-bit gate counter and the "62 gates per frame" limit:

* Gate number 0 marks an empty register.
* Gates 63 and later in a frame do not convert.
* A coarse counter that reaches 127 saturates and refuses stops (out of
  range).

The START memory has two banks that swap at frame end. While frame N+1 is
written, the host reads frame N's START times through
`smem_addr`/`smem_data`.

## Sharing the TDC: the arbiter

`pixel_arbiter` is the most involved block. All its decisions for a cycle
are combinational, and the result is written at the end of that cycle.

**Avalanches.** A photon gives an avalanche (`det`) only while all of these
hold:

* GATE is high.
* The SPAD is enabled in the configuration.
* The SPAD's hold-off has expired.

`holdoff_counter` disarms a SPAD after an avalanche and counts GATE rising
edges. It re-arms the SPAD at edge number `holdoff_cfg + 1`: with 0 the SPAD
is back for the next gate, and with 3 it skips three whole gates. So a SPAD
fires at most once per gate.

**Single-photon mode.** The candidates are the avalanches of SPADs that have
not yet stored a conversion in this frame. The earliest candidate wins, and
equal positions go to the lower SPAD index. If the TDC is ready, the winner's
position becomes the STOP and the conversion is written into the winner's
register. After that the SPAD is ignored for timing until frame end. It
still counts photons.

**Coincidence mode.** A photon opens a window of `COINC_WIN` = 13
sub-intervals, about 1 ns. The first photon that lands inside a window
triggers, with its own arrival time. Up to that first trigger, every photon
opens a new window. So the trigger is simply the earliest photon that lies
at most 13 sub-intervals after the photon just before it. The arbiter
computes this in one cycle:

* Photon j hits when another photon of the same cycle is no later than j
  and within the window.
* Photon j also hits when the **pending** photon of the previous cycle is
  within the window. The pending photon is the latest one of that cycle,
  because a window can reach into the next cycle.
* The earliest hit is the two-photon event.

Each gate accepts at most one event. It always increments counter 0. It is
converted when the TDC is ready and a register is free, and the registers
fill in order 0 to 3. Counters 1 to 3 are idle in this mode.

Example with positions in sub-intervals, where cycle c+1 adds 32:

| photons | result |
|---------|--------|
| 5, 15 in one cycle | trigger at 15 |
| 0, 20 | none (gap of 20 > 13) |
| 28 in cycle c, 6 in cycle c+1 | trigger at 6 (gap of 10) |
| 0, 14, 20 | trigger at 20 (0→14 too wide, 14→20 inside) |

**Fast readout modes** store only one conversion per macropixel and frame.
After the first conversion the arbiter stops converting. `first_idx` records
which register holds that conversion.

## Frames, double buffering and the readout words

`frame_end` is given between gate windows, while GATE is low. It copies each
macropixel's four storage registers, four counters and `first_idx` into the
output registers of `macropixel_readout`. It also latches the operating and
readout modes, clears the acquisition side and restarts the readout.

Each macropixel then sends 23-bit words. The number of words per mode
follows the published design; the bit layouts are this design's choice:

| readout mode  | single-photon mode | coincidence mode |
|---------------|--------------------|------------------|
| `RO_FULL`     | 4 words `{count k, conversion k}` | 4 words `{count k, conversion k}` (count 0 is the two-photon count) |
| `RO_FAST`     | 1 word `{3'b0, SPAD index, conversion}` | 1 word `{two-photon count, conversion 0}` |
| `RO_FAST_CNT` | 2 words: `{3'b0, count3, count2, count1, count0}` then the `RO_FAST` word | 1 word as `RO_FAST` |
| `RO_COUNT`    | 1 word `{3'b0, count3 … count0}` | same (counts 1–3 are 0) |

Counters saturate at 31. `timing_en = 0` gives counting only, with the TDC
off. `count_en = 0` gives timing only.

## The readout chain

```
            row_clk[r]                                         ┌──────────────┐
 row sel ──────────────► [mp 0] ─clk,sel─► [mp 1] ─► … ─► [mp 15]              │
   one-hot                 │ bus_en/data     │                 │               │
   shift reg  ◄────────────┴───── 23-bit row bus r (+ busy) ───┘               │
      │                                                                        │
      └── captures row bus r on the output bus (ro_data, ro_row, ro_valid) ────┘
```

* **Inside a row** (`pixel_row`): the row clock enters column 0. A pixel
  that still has words owns the bus as soon as every pixel before it is done.
  The `sel` grant travels along the same path as the clock. The pixel uses
  one row-clock pulse per word. After its last word, it passes later pulses
  and the grant to the next pixel. No pixel needs its column address.
* **Across rows** (`row_selector`): a 16-bit one-hot pattern rotates by one
  on every master readout cycle (`ro_en`). At that edge:
  * the selected row's bus is captured into the output register
    (`ro_data`, `ro_row`, and `ro_valid` from the row's busy line);
  * the same row receives its row-clock pulse.

  The pixel then has 15 master cycles to drive the next word before its row
  is selected again. Only the selector and the output bus run at the full
  readout rate.

A full-mode frame takes 16 × 16 × 4 = 1024 master cycles. The same count
holds for any row count, because rows are interleaved. The last word
reaches the output 1026 cycles after `frame_end`: one cycle for the load and
one for the output register. The one-word modes take 256 cycles. At
100 k frames/s
this needs a master readout clock of at least 102.4 MHz. A frame must be
read out before the next `frame_end`, because that pulse reloads the output
registers.

## Module map

```
spad_imager                 top: 16 rows, row selector, START channel
├── pixel_row  ×16          row bus, row-clock chain (N_COLS = 16)
│   └── macropixel ×16
│       ├── holdoff_counter ×4
│       ├── photon_counter  ×4
│       ├── pixel_arbiter
│       ├── pixel_tdc
│       │   ├── phase_sampler      (behavioural: clock phases + arbiters)
│       │   └── fine_interpolator
│       └── macropixel_readout     output registers + readout FSM
├── row_selector            (N_ROWS = 16)
└── start_channel           START interpolator + 2×64×5 START memory
spad_pkg                    widths, mode enums, conv_t, frame_data_t
```

At the default size, coarse synthesis gives about 150 k word-level cells,
58.7 k flip-flop bits and 640 memory bits (the START memory).

## Top-level interface (`spad_imager`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | reference clock; asynchronous active-low reset |
| `mode`, `ro_mode`, `timing_en`, `count_en`, `holdoff_cfg` | in | configuration |
| `spad_en[32][32]` | in | per-SPAD enable, to switch off noisy SPADs |
| `gate` | in | GATE level; SPADs can fire only while it is high |
| `start`, `start_t[4:0]` | in | START pulse (one per gate, first cycle of the window) and its position |
| `photon[32][32]`, `photon_t[32][32]` | in | photon on SPAD (y, x) in this cycle, and its position |
| `frame_end` | in | end of frame; give it while `gate` is low |
| `ro_en` | in | master readout clock enable |
| `ro_valid`, `ro_data[22:0]`, `ro_row[3:0]` | out | output bus |
| `smem_addr[5:0]` → `smem_data[4:0]` | in/out | previous frame's START fine time for a gate number |
| `gate_count[5:0]` | out | STARTs so far in this frame (saturates at 63) |

SPAD (y, x) belongs to macropixel (y/2, x/2), as SPAD index
k = 2·(y mod 2) + (x mod 2). Photons must come after the START cycle of their
gate window.

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Packages must come first on the command
line. Example for the whole imager at full size, which takes about two
minutes including the build:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/spad_pkg.sv tb/tb_spad_model.sv tb/tb_spad_imager.sv \
    --top-module tb_spad_imager -o sim
./obj_dir/sim
```

Unit testbenches are built the same way. Leave out `tb/tb_spad_model.sv`
where the testbench does not import it.

| testbench | what it checks |
|-----------|----------------|
| `tb_fine_interpolator` | all 32 codes from waveforms computed in ps; every single-bubble error stays within 1 LSB |
| `tb_phase_sampler` | phase levels against ps waveforms, bit flips, 32 distinct codes |
| `tb_holdoff_counter` | re-arm at GATE edge `cfg+1` for cfg 0–3, repeated avalanches, disable |
| `tb_photon_counter` | random increments against a saturating reference, frame clear |
| `tb_pixel_tdc` | coarse count = cycle distance, fine and gate fields, full scale, gates > 62, one conversion per gate |
| `tb_pixel_arbiter` | hand-worked cases of both modes: earliest wins, ties, stored SPADs, windows inside a cycle and across cycles, one event per gate, full registers, fast budget |
| `tb_macropixel_readout` | words and word counts in all 8 mode combinations, clock and grant passing, double buffering |
| `tb_start_channel` | START memory bank swap, read during the next frame, gate count saturation |
| `tb_row_selector` | one-hot order, capture, one row-clock pulse per row every 16 enables |
| `tb_macropixel` | 10 frames of random photons against the reference model, readout during acquisition |
| `tb_pixel_row` | a full row of 16 macropixels, words in column order |
| `tb_spad_imager` | the full 32×32 imager, 6 frames across all modes, readout time per frame (16 master cycles per word of a row) |

The larger testbenches compare the RTL with `tb_spad_model`. It is a
gate-by-gate reference model that works from arrival times, not from cycles.
The testbenches also count every mechanism and fail if any never happened:

* conversions in both modes, and coincidences that span a cycle boundary
* hold-off blocking and SPADs already stored
* TDC overflow and gates beyond 62
* counter saturation and disabled SPADs
* the fast-mode limit and full registers
* readout during gate windows, and START-memory reads

The full-size run sees about 1,500 single-photon conversions, 12,900
two-photon events and 4,352 readout words, with no mismatch.

## Where this RTL departs from, or adds to, the published design

* **Event timing.** Photons and START enter as a cycle plus a 5-bit
  position, not as asynchronous edges. The arbiter, the coincidence window
  and the STOP interpolator work on these numbers. In silicon, the window is
  an analog delay and STOP is a real edge.
* **Analog parts.** The SPAD/quenching front end and the multiphase clock
  generator are not implemented. The clock generator includes the DLL, the
  phase interpolator, the edge combiner and the tunable buffers. The clock
  phases are ideal, so code-density calibration has nothing to tune here.
* **One clock domain.** The master readout clock is a clock enable of the
  reference clock, and the row clocks are clock-enable pulses. The chip
  instead ripples real clocks from pixel to pixel.
* **Bus drivers.** Three-state row and output buses are AND-OR
  multiplexers. A `busy` line per row, which is this design's own, marks
  valid words. An assertion checks that only one driver is on at a time.
* **Configuration.** The per-SPAD disable bits and the mode settings are
  plain input ports. How the chip's configuration register is loaded is not
  modelled.
* **Own choices where the description is silent:**
  * tie-breaking to the lower SPAD index
  * counter saturation at 31
  * gate number 0 as "empty", and no conversion after gate 62
  * saturation of the coarse counter at 127
  * one two-photon event per gate
  * counters 1–3 idle in coincidence mode
  * the readout word layouts
  * modes latched at frame end
  * the two-bank START memory
  * SPADs armed after reset
  * `frame_end` only while GATE is low
