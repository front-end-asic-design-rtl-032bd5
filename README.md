# Programmable precision-delay timing generator for CCD detectors

A CCD camera needs dozens of clocks: fast horizontal (readout) clocks,
slow vertical (transfer) clocks, line and frame sync pulses, an exposure
clock, and blanking and clamping pulses for the signal chain. Each has edges
that must sit at exact positions within the line. Those positions must be
reprogrammable for every sensor and readout mode.

This design generates 20 high-frequency and 30 low-frequency clocks. Each
clock edge is placed in two steps:

* **Coarse position.** A counter running on the pixel clock places the edge
  on a whole pixel.
* **Fine position.** A tap of a delay-locked loop (DLL) moves the edge by a
  fraction of a pixel. The delay line has 96 taps with a 0.62 ns unit delay.
  At a 20 MHz pixel rate (50 ns pixel) this gives a step of about 0.62 ns,
  which is 4.5° of phase.

A host loads all settings over a serial (SPI) port into a 1K × 16
configuration RAM.

## Block structure

```
 s_clk/s_data/load ─► spi ─► spi_mem_if ─► init_sequencer ◄─► config_mem (1K x 16)
                                               │ cfg words
                                               ▼
                                          cfg_decode ─► per-block settings
 clk_in ─► clock_divider ─► pixel_clk ─► dll (phase_detector, dll_controller,
                │ clkrefby2 ──────────────►      delay_line: 96 taps)
                                               │ taps, N
   sync_gen (HD/VD)  exposure_gen  mask_gen x4  mask_toggle
   20 x h_channel: hclk_coarse ─► clk_mask ─► tap_calc x2 ─► fine_pulse_gen
   30 x v_channel: vclk_coarse ─► clk_mask ─► tap_calc x2 ─► fine_pulse_gen
```

`timing_gen_top` wires these blocks together. Shared constants, the
register map and the configuration structs are in `tg_pkg`.

## Configuration path

* **`spi`** shifts in a 17-bit word on each rising edge of `s_clk` while
  `load` is low, MSB first.
  * Bit 16 is a flag: 0 means an address word (10-bit address), 1 means a
    data word (16-bit data).
  * Each data word is written to the address from the last address word.
    There is no auto-increment.
* **`spi_mem_if`** brings each word into the `clk_in` domain with a toggle
  handshake, so `clk_in` must be several times faster than `s_clk`.
* **`init_sequencer`** starts as soon as power-on reset is released.
  1. It clears the RAM, one word per clock (1024 cycles). SPI writes sent
     during the clear are lost, so wait for it to finish.
  2. The host then writes the registers.
  3. The last write goes to address 1023. This makes the sequencer copy
     words 0–277 into data-out registers, one per clock.
  4. It then fetches, for each vertical clock, the pattern start, length
     and repeat entries from the pattern tables.
  5. It raises `cfg_done`.

  Writing 1023 again reloads everything. During a reload the whole clock
  side is reset.

### Register map (word addresses)

| Address | Contents |
|---|---|
| 0 | clock divisor [4:0] |
| 1, 2 | pixels per line, lines per frame |
| 3, 4 | HD / VD end position (pixel / line) |
| 5 | [0] HD enable, [1] HD polarity, [2] VD enable, [3] VD polarity |
| 6–9, 10 | exposure toggles 1–4; control: [0] enable, [1] polarity |
| 11–16, 17 | horizontal masking toggles 1–6; control |
| 18, 19 | masking toggle position; [0] enable |
| 20–25, 26 | vertical masking toggles; control |
| 27–32, 33 | CLPOB toggles; control |
| 34–39, 40 | PBLK toggles; control |
| 64 + 3h | H clock h, word 0: {period[14:10], fall[9:5], rise[4:0]} |
| 65 + 3h | H clock h, word 1: rise phase in degrees |
| 66 + 3h | H clock h, word 2: {toggle_en[12], mask_en[11], pol[10], en[9], fall phase[8:0]} |
| 128 + 5v … 132 + 5v | V clock v: rise, fall, rise phase, {group[13:12], mask_en, pol, en, fall phase}, {repeat idx[14:10], length idx[9:5], start idx[4:0]} |
| 512 + 32g + i | pattern start table (group g, entry i) |
| 640 + 32g + i | pattern length table |
| 768 + 32g + i | pattern repeat table |
| 1023 | start / reload |

Polarity 1 inverts an output. Enable 0 holds it at its polarity level.

## Clock side

**Clock divider.** The divider makes the pixel clock from `clk_in` with a
5-bit divisor, clamped to 20, at 50% duty for both odd and even divisors.
* The even path is a counter and a compare flop.
* The odd path ANDs that flop with a copy retimed on the falling edge.
* Divisors 0 and 1 pass `clk_in` through.
* It also makes `clkrefby2`, the pixel clock divided by two.

**DLL.** The pixel clock enters a 96-element delay line. Each element is a
2:1 mux followed by a 0.62 ns delay.
* The controller selects one element as the entry point, so the last tap
  lags the pixel clock by N unit delays.
* An XOR phase detector compares the last tap with the pixel clock. At each
  pixel-clock rising edge it samples the feedback, producing `up`.
* The controller runs on `clkrefby2`. It starts from N = 48 and increases N
  while `up` is high. When `up` drops it freezes and raises `dll_lock`.
* At lock, N = ceil(T / 0.62 ns). This is 81 for a 50 ns pixel and 61 for
  37.5 ns.
* Taps NTAPS−N … NTAPS−1 then cover one pixel period.
* The usable pixel period is about 29.8–59.5 ns: N must lie between 48 and 96.
* **`delay_line` is a behavioural model.** It uses `assign #` delays, which
  synthesis ignores, so it does not give the real delay. In silicon it is a hand-built cell chain.

**Phase to tap (`tap_calc`).** Phases are given in degrees, 0–359. Each
channel computes D = floor(phase · N / 360) for its rise and fall phases.
* The division by 360 is a multiply by 46604 followed by a 24-bit shift.
* It then selects tap 95 − N + D. D = 0 selects the full-period tap, which
  sits just after the next pixel edge, so phase 0 means "at the pixel edge".
* The calculation is a 3-stage pipeline.
* The generators start four pixel clocks after lock. By then every tap
  value is valid.

**Coarse generators.** All pixel-domain generators start on the same cycle.
Each registers its output one pixel clock after its counter, so all their
outputs line up.
* `hclk_coarse` counts 0…period (5 bits, 32 positions) and is high in
  [rise, fall). If rise > fall the window wraps. If rise == fall it is one
  pixel wide, called *fix* mode.
* `vclk_coarse` counts pixels in the line (16 bits). From the pattern start
  it repeats a pattern of `length` pixels `repeat` times. Inside each pattern
  it is high in [rise, fall).
  * Length 0 means the whole line.
  * Repeat 0 means once.
* `sync_gen` makes HD and VD. HD is active for pixels 0 … end−1 of each
  line. VD is active for lines 0 … end−1 of each frame. Active low at
  polarity 0.
* `exposure_gen` forms up to two regions from 4 toggles. `mask_gen` forms up
  to three regions from 6 toggles. It is used four times: horizontal
  masking, vertical masking, CLPOB and PBLK.
* `mask_toggle` is high from the toggle position to the end of the line.

**Masking (`clk_mask`).** Inside an enabled masking region the coarse clock
is replaced by a held level.
* The level is low, or high from the masking toggle position onward when
  toggling is enabled for that channel.
* Vertical clocks have no toggle, so they are held low.

### Fine pulse generator — the subtle part

The coarse pulse (after masking) is sampled by two DLL taps:
* `clk_r` at the rise phase, giving `clock_r`;
* `clk_f` at the fall phase, giving `clock_f`.

Each is the coarse pulse delayed by its phase. How they combine depends on
the pulse:

* **Wide pulse, rise phase earlier than fall phase:** output =
  `clock_r | clock_f`. It rises with `clock_r` and falls with `clock_f`.
* **Wide pulse, rise phase not earlier:** output = `clock_r & clock_f`.
* **One-pixel pulse with rise phase < fall phase (fix mode).** Here both
  edges fall inside the same pixel, and neither gate can produce that.
  * Each tap clock toggles its own flop whenever it samples the coarse pulse
    high.
  * The XOR of the two flops rises at `clk_r` and falls at `clk_f`.
  * If the coarse level is held high (period 0, or a masking region with
    the toggle high), this gives one pulse per pixel: a pixel-rate clock
    with programmable duty cycle.

Every output edge follows its coarse pixel edge by D × 0.62 ns. The
end-to-end test checks this at 2 ns resolution.

## Reset and clock domains

There are three clock domains:
* `s_clk`: SPI shift register only.
* `clk_in`: configuration.
* `pixel_clk`: generators, plus the DLL taps.

Reset behaviour:
* `por_n` is active low and is synchronised to `clk_in`.
* The divider is held in reset until `cfg_done`.
* The pixel domain has its own reset synchroniser on `pixel_clk`.

Configuration registers cross into the pixel domain without synchronisers.
This is safe because they change only while that domain is held in reset.

## Where this design departs from, or fills in, the source description

* **Reset polarity.** The source calls the reset active high in one place
  but initialises with it low elsewhere. `por_n` is active low.
* **Register map and field layout** are this design's own, including the
  start/reload address 1023, the clear-after-reset behaviour and the pattern
  tables at 512/640/768.
* **Horizontal edges and period are 5 bits (0–31).** This matches the
  stated 32 coarse edges. A verification plan elsewhere speaks of 9-bit
  values, which would need wider fields.
* **DLL controller details are this design's choice:** initial count 48,
  4-cycle settle, asynchronous reset, and restarting from 48 past 96.
* **Channel sharing.** One DLL is shared by all channels. Each channel has
  its own two phase calculators and tap multiplexers.
* **Extra outputs.** HD, VD, exposure, CLPOB, PBLK and the two blanking
  signals are dedicated outputs in addition to the 20 + 30 channels. The
  source counts some of these among the 30 low-frequency clocks.
* **Exposure clock** has coarse edges only, with no fine delay.
* **Horizontal clocks** run freely over their period from the common start.
  They are not restarted at each line.
* **Phases** of 360° or more are clamped to one full period.
* **Fix-mode circuit.** The toggle-flop circuit for one-pixel pulses and
  the held level inside masking regions are this design's interpretation.

## Verification

Each block has a self-checking testbench `tb/<block>_tb.sv`. It compares
the block against values computed independently in the testbench and prints
`TB_RESULT checks=… failures=…`.

`tb/timing_gen_top_tb.sv` runs the whole design at its default size:
* It resets and clears the RAM, then configures over SPI.
* At a 50 ns pixel clock (divisor 4 from 12.5 ns) it runs until the DLL
  locks, then checks two frames of 3 lines × 200 pixels.
* It then reloads with divisor 3 (37.5 ns, odd division), relocks and checks
  one more frame.

Every output is sampled every 2 ns against an ideal waveform built from the
configuration. That is about 2.3 million checks. The testbench also counts
how often each mechanism occurred and fails if any never did. The
mechanisms are:
* RAM clear, address and data words, load, lock, reload;
* even and odd division;
* OR, AND and fix-mode pulses, and the pixel-rate clock;
* masking with and without the toggle, vertical masking;
* pattern repeat, whole-line pattern;
* HD, VD, exposure, CLPOB, PBLK, blanking;
* polarity and disabled channels.

It takes about 2 minutes with Verilator.

To run a testbench:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/tg_pkg.sv tb/timing_gen_top_tb.sv --top-module timing_gen_top_tb -o sim
./obj_dir/sim
```

Not covered:
* no gate-level or analogue model of the delay cell, so jitter, mismatch
  and PVT variation are absent;
* pixel periods outside the DLL range;
* divisor bypass;
* very long lines and frames: the 16-bit counters are tested only at small
  sizes.
