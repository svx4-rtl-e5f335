# SVX4 silicon-strip readout chip in SystemVerilog

SVX4 reads out 128 strips of a silicon tracking detector at a hadron collider.
Each strip's charge is sampled every bunch crossing (132 ns) and written into a
46-deep analog memory. This holds it for the few microseconds the trigger system
takes to decide whether the crossing was interesting. A level-1 accept (L1A)
pulls the matching sample out of the ring. The chip can hold four such samples
while acquisition goes on ("dead-timeless" operation). The chip digitizes a held
sample in all 128 channels at once with Wilkinson ADCs: one voltage ramp and one
8-bit counter are shared by all channels. It then reads out only the channels
that are worth reading. Those channels leave one after another, as an address
byte followed by a data byte, through a chain of bypass multiplexers called
skip logic.

This RTL models the chip's logic at full size: 128 channels, 46 cells, 4
buffers, 8-bit ADC, and a 192-bit configuration register. The digital backend
(the counter, the readout register array with its skip logic, the I/O sequencer
and the configuration register) and the pipeline controller are synthesizable.
Two analog blocks, the pipeline capacitors and the ADC comparators with their
ramp, are clock-level behavioural models, so that the whole chip can be
simulated from sampled charge to output bytes. The preamplifiers and the pads
are analog and are not modelled. Their signals appear as top-level ports.

## Signal chain

```
 sample[128] ──► pipeline_array (46 cells/channel) ──► adc_comparators ──► readout_fifo ──► dout[7:0]
 (fe_clk)          ▲ wr_sel    ▲ rd_sel                 ramp, fast disc.,   128 x skip_cell
                   │           │                        RTPS threshold,     (8-bit data +
 l1a ──────► pipeline_ctrl ────┘                        delay comparators   7-bit address)
                   ▲ cell_busy                                  │ thresh_fire     ▲ cnt_gray
                   │                                            ▼                 │
 mode ─────► io_ctrl ──ramp_run/cnt_en/dig_end/addr_load/ro_en──────────► gray_counter
 cfg_din ──► config_reg ──► cfg (threshold, modes, latency, preamp mask, ...) to all blocks
```

There are two clock domains:

* `fe_clk`, the frontend clock, at one tick per beam sample (132 ns nominal).
  It drives the pipeline and its controller. Acquisition never stops.
* `be_clk`, the backend clock, drives everything else. It is the ADC counting
  clock in digitize mode (106 MHz nominal) and the byte clock in readout mode
  (53 MHz nominal).

Three things cross between the domains:

* `cell_busy` goes from the backend to the frontend through a two-flop
  synchronizer.
* The configuration fields used by the frontend (the latency) go from the
  backend to the frontend without a synchronizer. They are quasi-static:
  change them only while no trigger is being sent.
* The stored levels of the held cell go from the frontend to the backend
  without a synchronizer. A held cell is never written, so they are stable
  while the backend uses them.

## The pipeline: a ring with holes

Module: `pipeline_ctrl`. The model of the cells is `pipeline_array`.

On every `fe_clk` edge, all 128 channels write into the cell under the write
pointer, and the pointer moves on. An L1A means "the crossing that happened
`latency` samples ago was interesting." The controller keeps a history of the
last 41 cell indices it wrote, so it can find that cell. The cell is *marked*
and joins a trigger-ordered queue of up to four cells.

When the write pointer advances, it skips every marked cell. It looks ahead at
most five cells, which is enough because at most four cells are marked. A
marked cell is therefore never overwritten, however long it waits. Meanwhile
the other 42 cells keep rotating. For that reason the usable latency is 1 to
41 samples (NCELL − NBUF − 1). An L1A with a latency outside that range is
ignored. So is an L1A that arrives before enough samples have been written
since reset.

* **The fifth L1A.** An L1A that arrives while four cells are held is refused.
  `l1a_overflow` pulses and nothing held is touched.
* **Which cell is read.** The head of the queue is driven onto the one-hot read
  select (`rd_sel`), and the ADC sees its levels.
* **Release.** A cell stays out of the ring until it has been read out. The
  backend's `cell_busy` rises when a conversion starts and falls when the
  readout of that conversion completes. Because of the synchronizer, the cell
  rejoins the ring two to three `fe_clk` edges after `cell_busy` falls. If a
  second digitize is requested with no readout in between, the same cell is
  converted again.

Two assertions guard the rules: the number of marked cells equals the queue
depth and stays at or below 4, and the write pointer never points at a marked
cell.

The write and read selects are one-hot, one bit per cell switch. In the model,
a channel whose preamp is held in reset (the "black-hole" feature for shorted
strips, set per channel in the configuration) stores 0.

## Wilkinson conversion and real-time pedestal subtraction

Modules: `io_ctrl` (sequencing), `adc_comparators` (analog model),
`gray_counter`, and `readout_fifo` (capture).

Levels are counted in ramp steps. A conversion runs like this:

1. `io_ctrl` clears the register array and the counter for one clock. It then
   raises `ramp_run`, and the ramp rises by `ramp_trim + 1` units per clock.
2. A channel's **fast discriminator** fires as soon as the ramp reaches that
   channel's stored level.
3. The channel's **delay comparator** repeats the fast discriminator's output
   `SLOW_DELAY` (4) clocks later. Its rising edge makes the channel register
   capture the Gray-coded counter.
4. **Standard mode.** The counter starts with the ramp. A channel at level L
   therefore reads L + SLOW_DELAY. The constant offset is the ADC pedestal.
5. **RTPS mode** (real-time pedestal subtraction). The counter waits for the
   **threshold discriminator**. This fires `TH_DELAY` (2) clocks after
   `RTPS_NCH` (40) channels have fired. The 40th-lowest level plays the role
   of the sample's common-mode pedestal, Lc. A channel at level L then reads
   L − Lc + SLOW_DELAY − TH_DELAY, clamped at 0. The common-mode shift is
   removed sample by sample.

   This only works if the delay comparator is slower than the threshold
   discriminator. Otherwise pedestal channels would latch a count of 0 before
   the counter starts. An assertion in the model enforces
   SLOW_DELAY > TH_DELAY.

   RTPS suits sparse data only. If most channels carry signal, the
   40-channel threshold fires late and real signals are squeezed towards
   zero.
6. Conversion ends when the counter reaches 255. The counter saturates there
   rather than wrapping. Any channel that has not fired by then captures 255.
   If the RTPS threshold never fires, a time-out ends the conversion after
   1024 clocks.

The counter is kept in Gray code so that a value captured at an arbitrary
instant is never off by more than one count. Each channel's readout decision is
made at capture time. All channels that capture in the same clock see the same
counter value, so a single comparison against the threshold serves them all.
A channel is **flagged** for readout in any of these cases:

* read-all mode is on;
* its value is at or above the digital threshold;
* it is channel 63 and the forced-channel-63 option is on.

The forced channel 63 exists for readout speed. In the chip, a flagged cell in
the middle of the chain cuts the longest bypass path in half.

Conversion time, in `be_clk` cycles from the `MODE_DIGITIZE` request to
`dig_done`:

* standard mode: 258 cycles;
* RTPS mode: Lc + 260 cycles.

## Sparsified readout: the skip chain

Modules: `readout_fifo` and `skip_cell`. There are 128 skip cells.

Each channel has a 16-bit word: a valid bit, a 7-bit address and an 8-bit data
value (Gray code). At the start of readout (`addr_load`), every address is
preset to its channel number, and a word is marked valid if its channel is
flagged.

The cells form a chain that runs from channel 127 down to channel 0:

* a flagged cell drives its own word down the chain;
* an unflagged cell passes on whatever arrives from above.

The end of the chain at channel 0 therefore always shows the lowest flagged
channel that has not yet been sent. On a shift, every flagged cell loads the
word arriving from above it. The flagged cells thus form a shift register of
length n, the number of hits, and the unflagged cells drop out of it. After
the last hit has gone, an invalid word follows, and the array reports `empty`.

The address bank (the valid bit and the address) and the data bank have
separate shift enables:

* the address bank shifts right after a channel's address byte has been
  taken, so the next channel's address is already at the end of the chain;
* the data bank shifts one clock later, after the data byte;
* meanwhile the current channel's data stays at the end of the chain until
  its own phase.

This matches the chip, where the two banks shift on opposite phases of a
half-rate readout clock.

While `ro_en` is high, the array sends one byte per clock. The bytes come in
pairs:

* the address byte, `{0, addr[6:0]}`, with `dout_is_addr = 1`;
* the data byte, the count converted from Gray code to binary.

`dout_valid` marks real bytes. The outputs are registered, so each byte appears one clock after its slot. A
readout of n hits takes exactly 2n byte clocks. A read-all event takes 256
clocks, which is 4.8 µs at 53 MHz.

In silicon, the bypass chain is combinational through up to 127 multiplexers,
and its delay limits the readout clock. This RTL has the same structure. A
synthesized version would need a timing constraint on the chain, or would have
to run slowly enough.

## Configuration register

Module: `config_reg`. It is a 192-bit shift register. In `MODE_INIT` it takes
one bit per `be_clk` from `cfg_din`. The first bit sent ends in bit 0, and bits
leave on `cfg_dout`, so several chips can be chained. When the mode leaves
`MODE_INIT`, the whole word is copied to a shadow register, which drives the
chip. The shadow register in the chip uses radiation-hardened (DICE) latches.
Here it is an ordinary register. The field layout (`svx4_pkg::cfg_t`) is this
design's own:

| bits      | field        | use                                           |
|-----------|--------------|-----------------------------------------------|
| 127:0     | `chan_mask`  | 1 = hold that channel's preamp in reset       |
| 135:128   | `threshold`  | digital sparsification threshold (counts)     |
| 136       | `read_all`   | flag every channel                            |
| 137       | `force_ch63` | always flag channel 63                        |
| 138       | `rtps_en`    | real-time pedestal subtraction                |
| 144:139   | `latency`    | L1A latency, samples (1..41)                  |
| 147:145   | `ramp_trim`  | ramp slope select                             |
| 150:148   | `risetime`   | preamp risetime select (to `preamp_risetime`) |
| 191:151   | reserved     | bias settings, not modelled                   |

## Operating the chip (`svx4_top`)

`mode` is synchronous to `be_clk`:

* `MODE_ACQUIRE` (0): the backend is idle.
* `MODE_DIGITIZE` (1): convert the oldest held sample. Wait for `dig_done`,
  then return to `MODE_ACQUIRE`.
* `MODE_READOUT` (2): preset the addresses, then stream bytes until the array
  is empty. Wait for `ro_done`, then return to `MODE_ACQUIRE`.
* `MODE_INIT` (3): shift the configuration in.

The order is always digitize, then readout. The frontend keeps writing samples
and accepting triggers throughout. `l1a` is sampled on `fe_clk`.

Other top-level ports:

| port                                | use                                             |
|-------------------------------------|-------------------------------------------------|
| `sample`                            | the 128 sampled preamp levels, in ramp units    |
| `preamp_reset`, `preamp_risetime`   | settings sent to the preamps                    |
| `wr_cell`, `rd_cell`, `rd_valid`, `nheld` | pipeline state                            |
| `nflag`                             | number of channels flagged in the last conversion |

Top-level parameters:

| parameter    | default | meaning                                           |
|--------------|---------|---------------------------------------------------|
| `LW`         | 10      | width of a stored level                           |
| `RTPS_NCH`   | 40      | channels that must fire before the counter starts in RTPS mode |
| `TH_DELAY`   | 2       | threshold discriminator delay, in clocks          |
| `SLOW_DELAY` | 4       | delay comparator delay, in clocks                 |

The chip sizes are fixed in `svx4_pkg`.

## What follows the source description and what does not

**Taken from the description of the chip:**

* the 128 / 46 / 4 / 8-bit / 192-bit sizes;
* the 15-bit register slot, split into 8 data bits and 7 address bits;
* skipping of held cells, and refusal of extra triggers;
* the Wilkinson scheme, with a fast discriminator, an RTPS threshold over 40
  channels and a slower delay comparator;
* the Gray counter;
* the threshold decision made at capture;
* the skip-logic chain, with channel 127 as the worst case;
* the forced channel 63;
* address and data bytes sent alternately;
* the shadowed configuration register;
* per-channel preamp reset.

**This design's own choices:**

* the latency history and the queue order of held cells;
* the mode encoding, and `MODE_INIT` for configuration;
* the configuration bit layout;
* counter saturation and the 1024-clock time-out;
* the comparator delays in clocks;
* the ramp-trim model (step = trim + 1);
* capturing the counter synchronously on the backend clock when a channel's
  comparator output is first seen high, where the chip clocks each register
  directly from its comparator;
* Gray-to-binary conversion at the output;
* the address byte format;
* shifting the address and data banks on alternate cycles of a byte-rate
  clock, rather than on the two edges of a half-rate clock;
* a separate output byte and serial configuration input, instead of the
  chip's bidirectional 8-bit bus.

**Not modelled:**

* the preamplifier, including its noise, risetime and reset switch;
* analog non-idealities: pipeline charge injection, correlated double sampling
  detail, comparator pedestal spread, ramp linearity;
* the differential pads;
* the on-chip decoupling;
* radiation hardening;
* any sparsification mode beyond threshold, read-all and forced channel 63;
* how several chips share the output bus on a hybrid.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example, with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -yrtl -ytb \
  --top-module tb_svx4_top rtl/svx4_pkg.sv tb/tb_svx4_top.sv -o sim
./obj_dir/sim
```

The testbenches:

* `tb_svx4_top` runs the full-size chip. It loads the configuration, fills
  all four buffers (the fifth L1A is refused) and runs six events: three in
  standard sparse mode, two in RTPS mode with forced channel 63, and one in
  read-all mode. Triggers arrive while earlier samples wait. It checks every
  output byte against values computed from the input pattern. It also checks
  the conversion times, the rate of one byte per clock, and that each
  mechanism actually occurred.
* `tb_deadtimeless` repeats a pedestal scan over 200 triggered samples, 100
  in standard mode and 100 in RTPS mode. A new trigger arrives during every
  conversion. Every sample must read the same value, 118 counts in standard
  mode and 2 in RTPS mode, whichever of the 46 cells held it.
* The block testbenches (`tb_gray_counter`, `tb_pipeline_ctrl`,
  `tb_pipeline_array`, `tb_adc_comparators`, `tb_skip_cell`,
  `tb_readout_fifo`, `tb_config_reg`, `tb_io_ctrl`) check each module against
  an independent reference, clock by clock where timing matters.

## Files

| file                  | contents |
|-----------------------|----------|
| `rtl/svx4_pkg.sv`     | sizes, mode enum, configuration and readout-word types, Gray conversion |
| `rtl/svx4_top.sv`     | the chip |
| `rtl/pipeline_ctrl.sv`| write/read pointer control of the 46-cell pipeline |
| `rtl/pipeline_array.sv` | behavioural model of the analog cells |
| `rtl/adc_comparators.sv` | behavioural model of the ramp, discriminators, RTPS summing and delay comparators |
| `rtl/gray_counter.sv` | Wilkinson counter |
| `rtl/skip_cell.sv`    | one channel slot of the sparsifying shift register |
| `rtl/readout_fifo.sv` | 128-channel capture and readout array |
| `rtl/config_reg.sv`   | 192-bit configuration shift and shadow register |
| `rtl/io_ctrl.sv`      | backend mode sequencer |
