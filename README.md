# Zero-suppressed pad readout for a fast RICH photon detector

A ring-imaging Cherenkov (RICH) counter sees a particle as 10–20 photon hits scattered
over thousands of cathode pads. The electronics on the back of the detector must do three
things:

* remember which pads fired during a short window around the interaction, long after the
  fact, when the trigger arrives;
* send out only the pads that fired;
* finish reading the whole sector in a few microseconds.

This repository holds synthesizable SystemVerilog for the digital side of such a readout.
A **readout chip** serves 16 pads. Sixteen chips are chained in a **column**. Fifteen columns
share one **top bus** and make up a **sector** of 3840 pads. The design reproduces the
architecture of the 16-channel CMOS readout chip built for the Fast RICH project
(Rutherford Appleton Laboratory / CERN, 1992). Its logic is reconstructed here from the
published description of its function, pins and timing. The analog front end is not part of
this RTL: the bipolar preamplifier/discriminator chips, the threshold resistor network and the
crystal oscillator. The chip's `din` inputs are where the discriminator outputs arrive.

## 1. Acquisition: holding the event until the trigger

Each channel runs on a free-running 50 MHz clock (`fclk`):

1. `pulse_shaper` samples the asynchronous discriminator output. It forms one pulse, exactly
   one clock (20 ns) wide, on a rising edge. A long input pulse therefore enters the pipeline once.
2. `shift_register` delays that pulse by 64 clocks.
3. `hit_latch` sets a channel's latch if the end of the pipeline is high while `strobe` is high.
   The strobe is the trigger window.

The total delay is 64 + 2 = 66 clocks (1.32 µs). A strobe one clock wide catches a pulse that
was sampled exactly 66 edges earlier; `tb_readout_chip` checks delays 63–69. The latches stay set
until `reset`. While `readout` is high the strobe is ignored, so a second trigger cannot
corrupt an event that is being read out.

`fclk` is the external `fclock` when `excken` is high. Otherwise it is `osc_clk`, the output of
the chip's own crystal oscillator, which is not modelled.

## 2. Readout inside a column: live mode and buffer mode

Readout uses a second clock, `readclk` (20 MHz), common to the whole sector. The first
`readclk` edge with `readout` high copies every chip's latches into its `priority_encoder`. After
that, every chip works at the same time.

* **Live mode.** The encoder presents the highest-numbered remaining hit (channel 15 first).
  Each clock in which the word is accepted clears that hit. So one address leaves per clock,
  and empty channels cost nothing. The word goes to the chip *above*. That chip stores it in its
  16-word `hit_fifo` while encoding its own hits at the same time.
* **Buffer mode.** Once its encoder is empty, a chip forwards its FIFO contents upward, one per
  clock. The FIFOs of the column thus behave as one long memory that drains toward the top.
* **Back-pressure.** `buful` (FIFO full) of a chip is the `halt` of the chip below. A chip
  moves its output word only when the chip above has room. Both sides use the same condition,
  so no word is lost or duplicated.

The words travel as 6 bits: a 4-bit channel address and two flags. The flags tell the top of
the column where one chip's hits end (`rr_pkg.sv`):

| next_row | null | meaning |
|---|---|---|
| 0 | 0 | a hit, more hits of the same chip follow |
| 1 | 0 | the last hit of a chip |
| 1 | 1 | a chip with no hits (every chip sends at least one word) |
| 0 | 1 | **fin**: nothing more comes from this column |

The bottom chip's `nextin`/`nullin` are tied to the fin combination (0, 1). Every chip accepts
only one fin from below and ignores its input after that. The bottom chip's FIFO therefore
receives fin once, at the first readout clock. Fin then climbs the column directly behind the
last hit.

A chip below the top never runs dry before it has sent fin. Its FIFO gets a word every clock in
which it has room, because the chip below always has one to offer. An assertion in
`readout_chip` (`a_no_underflow`) checks this.

## 3. The top chip: row addresses and null words

The same chip becomes a column's top chip when its `toprow` pin is high. The top chip does
three extra things:

* **Row reconstruction.** A chip does not know its own position. The top chip labels its own
  hits row 0. It labels words from below with `row_counter`, which starts at 1 and advances
  after every word with `next_row` set. The 12-bit FIFO word is {row, channel, next_row, null}.
* **Expansion.** A null word from below (an empty chip) advances the row counter but is never
  stored.
* **Bus output.** While the column holds the token, the top chip puts one word per clock toward
  the column's `column_bus_driver`. It sends its own encoder words first, then its FIFO. When
  the FIFO is empty it sends the word arriving from below directly. This direct path is the only
  way a null from below reaches the bus. The top chip's own null word (empty top chip) also
  always reaches the bus. Null words are not hits, and the DAQ side filters them out.

## 4. Sharing the top bus: token passing

`token_ctrl` (active in the top chip) arbitrates the bus among the columns:

* `busy` of column *n* is `halt` of column *n+1*. Column 0 has `halt` tied low and owns the bus
  one clock after readout starts.
* A column takes the token at the first clock edge at which its `halt` is low. `outen` then
  enables its bus driver.
* When fin reaches the top chip, `busy` and `outen` drop **in that same clock**. The bus is idle
  for that one clock, and the next column drives it on the following clock. A token pass
  therefore costs exactly one clock.
* `busy` of the last column falling marks the end of the sector's readout.

While column 0 is being read, the other columns keep encoding and compacting. Their top FIFOs
fill to 16 words and then stall the chips below. When their turn comes they deliver one hit per
clock.

Outside the chips, `daq_interface` turns the bus into hit records:

* the OR of all `outen` lines (`outengen`) falls once per token pass, and a 4-bit counter of
  those falls gives the column number;
* a cycle carries a hit when `outengen` is high and `null` is false.

`rich_sector` ORs the column drivers together. A released driver outputs zeros, which stands in
for the tri-state bus.

## 5. Readout time

Counted in readout clocks from `readout` rising to the last `busy` falling:

* **Every chip has at least one hit:** hits + number of columns. For the two-column, four-chip
  example with 66 hits this is 68 clocks, with the waiting column's top FIFO full from its 17th
  clock. Both numbers agree with the logic-analyser measurement published for the original chip.
  `tb_sector_2x4` checks them.
* **Empty sector (15 × 16 chips):** 44 clocks (2.2 µs). Column 0 takes 16 clocks: its own null
  word, 14 nulls from below that pass through the empty top FIFO, and one pass clock. The first
  null from below is dropped while the top chip sends its own. Each other column takes 2 clocks:
  its top chip's null word and the pass clock. The original description gives
  31 clocks (1.55 µs) for this case, with one clock per empty column. That would need the empty
  top chip's null word and the token pass merged into one clock, which this design does not do.
* **Typical event (20 photon hits):** 59–62 clocks (about 3 µs) in simulation.
* **Every pad hit (test mode 4):** 3840 + 15 clocks.

## 6. Test and threshold modes

Three active-low pins select the mode (`mode_selector`):

| mode | testload_n | testen_n | dacload_n | effect |
|---|---|---|---|---|
| 1 | 1 | 1 | 1 | normal acquisition and readout |
| 2 | 1 | 1 | 0 | `xin` shifts through the DAC registers up the column |
| 3 | 0 | 1 | 1 | `xin` shifts through the four 4-bit test registers up the column; `strobe` copies the 16-bit pattern into the hit latches |
| 4 | 1 | 0 | 1 | all pulse-shaper outputs forced to "hit" |
| 5 | 0 | 0 | 1 | all pulse-shaper outputs forced to "no hit" |

Mode 2 and mode 3 data enter at the bottom chip's `xin` (`col_xin` of a column):

* **Mode 2:** a column takes one clock per chip. The code for the top chip goes in first. Each
  chip's `dacout` sets the threshold of its two analog chips (I_th = 12.5 µA × code).
* **Mode 3:** a column takes 4 clocks per chip. Within a chip the last word shifted in is
  channels 3..0.

Test and DAC registers shift on `readclk`, which the control computer drives at its own pace in
these modes. `reset` clears neither. After mode 3, switch back to mode 1 to read out.

## 7. Choices made where the source is silent

* Internal signals are active high. Only the three mode pins keep their active-low sense.
* The address field of a fin word carries no information.
* The top chip sends the word from below straight to the bus when its FIFO is empty, instead of
  storing it first.
* `readout` enables the readout logic. The chip does not gate `readclk`. The effect is the
  same: nothing moves before readout.
* A single-flop sample plus a previous-sample flop forms the one-clock pulse. The fast-or is the
  OR of the shaped pulses. The fast-or is not a pin of the original chip.
* The encoder copies the latches into its own register at readout start and clears bits there.
  This keeps each register in a single clock domain.
* The row address is 6 bits wide, matching the chip's six `rowout` pins. Sixteen chips use
  rows 0–15.
* Pin combinations outside the mode table decode to mode 1.

## 8. Files

| file | content |
|---|---|
| `rtl/rr_pkg.sv` | widths, word structs, mode enum |
| `rtl/pulse_shaper.sv`, `rtl/shift_register.sv`, `rtl/hit_latch.sv` | acquisition path |
| `rtl/priority_encoder.sv`, `rtl/hit_fifo.sv`, `rtl/output_mux.sv` | column readout path |
| `rtl/row_counter.sv`, `rtl/token_ctrl.sv` | top-chip functions |
| `rtl/test_register.sv`, `rtl/dac_register.sv`, `rtl/mode_selector.sv` | test and threshold modes |
| `rtl/readout_chip.sv` | the 16-channel chip |
| `rtl/chip_column.sv`, `rtl/column_bus_driver.sv` | a column and its bus driver |
| `rtl/daq_interface.sv` | column counter and valid-cycle filter |
| `rtl/rich_sector.sv` | top level: one sector |

Parameters of `rich_sector`: `N_COLS` (15) and `N_CHIPS` (16). The package fixes the other
sizes: 16 channels, 64 pipeline stages, 16 FIFO words, 4-bit DAC and 6-bit row.

## 9. Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/rr_pkg.sv rtl/rich_sector.sv \
        tb/tb_rich_sector.sv --top-module tb_rich_sector -Mdir obj_sector
    obj_sector/Vtb_rich_sector

A block testbench builds the same way with its own module and `tb_<module>.sv`.

* `tb_rich_sector` runs the full 3840-pad sector. Building it takes about 1.5 minutes; running
  it takes under a second.
* `tb_sector_2x4` reproduces the two-column measurement.
* `tb_chip_column` exercises one column under random back-pressure.
* `tb_readout_chip` covers a chip's acquisition timing, all modes, and a chip below the top
  under random `halt`.

## 10. How far to trust it

Every block has a testbench, and each testbench compares the block against a reference written
independently in the testbench. The tests cover:

* the end-to-end order of hits (column, row, channel 15→0);
* the 66-clock latency;
* the token protocol;
* buffer-full stalls;
* null handling;
* all five modes;
* the cycle counts above.

The published timing example (68 clocks, buffer full on clock 17) is reproduced exactly. The
empty-sector readout time differs, as explained in section 5.

The design has not been checked against the original chip's netlist, which is not available. Its
internal structure is this design's own.
