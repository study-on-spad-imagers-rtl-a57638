# SPAD imagers with fast, sparse readout

A SPAD (single-photon avalanche diode) pixel gives one bit per exposure
window: it either broke down (a photon or a dark count) or it did not. In
low-light imaging nearly all of these bits are 0. Reading a whole array
therefore wastes time, and the time spent reading is dead time in which
photons are lost. The circuits here read out only what matters, in two ways:

* **Breakdown-pixel extraction (BPE).** Every row has a chain of per-pixel
  logic. A search runs along the chain and stops at the first fired pixel.
  That pixel then puts its column address on the row's address line, and each
  Next step moves the search on to the next fired pixel. All rows work in
  parallel. A frame therefore takes time in proportion to **Max(N_BD,i)**, the
  largest number of fired pixels in any row, not to the array size.
* **Event discrimination.** The imager decides on chip whether a frame
  contains an event (for example a laser pulse) or only dark counts. It reads
  out only the event frames:
  * the BPE version counts Max(N_BD,i) using the same chains;
  * the current-logic version sums a unit current from every recently fired
    pixel on one resistor and compares the result with a DAC level.

Four imagers are provided. They stand side by side in `spad_imagers_top`:

| imager | module | array | readout | control |
|---|---|---|---|---|
| BPE proof of concept | `imager_bpe15` | 15×15 | 15 row-parallel serial 4-b addresses | all external |
| BPE with background readout | `imager_bg31` | 31×31 | 31 row-parallel serial 5-b addresses, while the next frame is exposed | on chip |
| BPE event discriminator | `imager_ed31` | 31×31 | one serial pin through a 31-b shift register, event frames only | on chip |
| current-logic event discriminator | `imager_cl32` | 32×32 | raster scan through a 32-b shift register, on event | on chip |

## The BPE chain (`bpe_cell`, `bpe_array`, `cag`, `sch_detect`)

Each pixel holds one stored bit, `state` (did the SPAD fire), and two flags,
`mask` and `read`. The row's search signal enters at column 0. Each cell
passes it on when it has nothing to report:

    search_out = search_in & (~state | mask | read)

So the search stops at the first fired pixel that has not yet been read.

**Next.** On a Next pulse:
* The blocked pixel (search arrives, fired, not read) sets `mask`.
* A pixel whose `mask` is already set clears it and sets `read`.

After one Next, every row's first unread fired pixel is masked. That pixel
drives its column address onto the row line, and the search travels past it
to the next fired pixel. The next Next retires the masked pixel and masks the
following one.

**End of search.** When a row's chain passes its last column, the row is
done (`row_fin`). An AND tree over the row flags gives `SCH_fin`: every row
has reported all its pixels. Pulling Search low clears all flags, which
prepares the array for a new frame.

**Addresses.**
* Addresses are 1-based column numbers. An address of 0 means the row has
  nothing (left) to report.
* The address is not stored in the pixel. The column address generator
  (`cag`) puts bit k of each column's number on a column line while the
  one-hot word line WL[k] is high. The masked pixel gates its column line
  onto the row output.
* A 5-b address therefore takes 5 WL cycles, sent MSB first.

**Readout time.** One extraction round is a Next plus ABITS bit cycles. A
frame takes

    T_readout = 1 + Max(N_BD,i) · (ABITS + 1)   cycles

The leading 1 is the first Search cycle, in which `SCH_fin` already reports
an empty frame. For the 15×15 chip (ABITS = 4) this is `Max·5 + 1`.
Example: a row with fired pixels 2 and 11 reads out as `0010` then `1011`,
which takes 11 cycles.

## Frame timing and background readout (`frame_timer`, `bg_ctrl`, `aqc_pixel`)

The 31×31 pixels use a gated active quenching circuit and a 1-b memory. The
frame_timer repeats this sequence:

| cycle | WIN | action |
|---|---|---|
| 0 | high | Charge: recharge the SPADs |
| 1 … width−2 | high | exposure; T_win = width − 2 |
| width−1 | high | Write: copy the SPAD states into the memories |
| width | low | hold-off |

* `win_width` is a 5-b input. A frame lasts `win_width + 1` cycles.
* Three cycles of every frame are dead time: Charge, Write and hold-off.

**Background readout.** The BPE readout of the stored frame starts in the
hold-off cycle. It runs while the next frame is exposed.

**Dropped frames.** If the readout is still busy when the next Write comes,
that Write is suppressed. The new frame is lost (`frame_drop`) and the
memories keep the frame being read. A frame that fits the *safety zone*,

    T_readout ≤ T_win + 2,

costs only the 3-cycle dead time. A busy frame drops
`ceil((T_readout − T_win − 2) / (T_win + 3))` following frames.
Example: T_win = 10 and Max = 8 give T_readout = 49 cycles and 3 dropped
frames.

## Event discriminator on the BPE chain (`ed_ctrl`, `out_shift_reg`, `imager_ed31`)

After each Write, `ed_ctrl` first uses the chain as a counter:

1. Search rises.
2. Each cycle in which `SCH_fin` is low issues one Next and increments CNT.
   Every Next retires one pixel in every row that still has one, so the
   number of Nexts until `SCH_fin` rises is exactly Max(N_BD,i).

**Dark frame.** `SCH_fin` rises while CNT ≤ N_th. Search falls and nothing
is read. The count takes at most N_th + 2 cycles, so a dark frame stays
within the 3-cycle dead time whenever N_th + 2 ≤ T_win + 2.

**Event frame.** CNT reaches N_th + 1.
1. Search drops for one cycle (`out_start`) to restart the chain.
2. A full extraction follows.
3. The pins are few, so every address bit of every row goes through a 31-b
   shift register. For each Next round and each address bit (MSB first),
   one `Out_write` cycle loads that bit from all 31 rows. 31 shift cycles
   then put it on `address_output`, row 0 first, while `out_state` is high.
4. Frames that arrive during this readout are dropped.

The busy time of an event frame is

    1 + (N_th + 1) + 2 + Max(N_BD,i) · (1 + 5 · 32)   cycles.

## Current-logic event discriminator (`imager_cl32` and its parts)

This imager has no exposure window. Each SPAD runs free.

**Hold-off.** After a breakdown, the pixel's variable hold-off quenching
circuit (`vhaqc`) keeps the SPAD off for `holdoff` cycles. During that time
the pixel's unit current cell conducts.

**Sensing.** All cells share one load resistor (`ucc_sum`):

    V_SPAD = VDD − n · I·R

where n is the number of pixels in hold-off. A 6-b DAC built from the same
unit cells (`cl_dac`) gives the reference

    V_ref = VDD − code · I·R − I·R/2

So V_SPAD < V_ref exactly when n > code.

**Event.** When V_SPAD < V_ref, the comparator (`cl_comparator`) latches
`CMP_out`. In the same cycle it pulses `capture`, and every pixel's readout
DFF (`cl_readout_unit`) records its SPAD state (off = fired recently).

**Readout (`cl_ctrl`).**
1. From the next cycle, `Force_off` holds every SPAD off.
2. Each row in turn is loaded into a 32-b shift register and shifted out on
   `sensor_out`, column 0 first, with `row` naming the row.
3. `DFF_RST` clears the pixel DFFs and the comparator latch.
4. Force_off falls. Force_off also ends every pending hold-off, which stands
   for the global recharge.

Force_off lasts `R·(1 + C) + 1 = 1057` cycles.

**Modelling units.** Voltages are integers in units of 0.1 mV
(VDD = 18000, one unit current = 100). Only the ordering of V_SPAD and V_ref
matters to the logic.

## What is modelled and what is logic

**Behavioural models.** The SPAD front ends and the analog parts are
clock-level models with the real parts' ports:
* `aqc_pixel`, `pqc_pixel` and `vhaqc` (quenching circuits)
* `ucc_sum`, `cl_dac` and `cl_comparator`

They are written synthesizably so the whole design passes through synthesis
tools. They still describe analog behaviour, not circuits to build as logic.

**Stimulus.** The SPAD itself is not modelled. Testbenches drive its
breakdowns as `spad_bd[row][col]` pulses.

**Logic.** All control blocks, the BPE chain, the CAG, the completion tree
and the shift registers are plain synchronous logic with one clock and an
active-low reset.

## Where this design makes its own choices

* **Timing granularity.** Timing is cycle-accurate to the frame and readout
  diagrams. Asynchronous analog delays are rounded to whole cycles:
  * quench and recharge
  * the ripple of the search chain, which settles within a cycle
* **Address order.** Addresses are 1-based, with 0 meaning "no pixel", and
  are sent MSB first.
* **Search low** clears the Mask and read flags.
* **`read` flag.** The second per-pixel flag `read` is how a retired pixel
  lets the search pass once its Mask has fallen.
* **15×15 window polarity.** The PQC gate passes breakdowns to the state DFF
  while WIN is low and blocks them while WIN is high. RST clears the DFFs and
  also holds the BPE search off.
* **Readout start.** The background readout starts in the hold-off cycle
  right after Write.
* **Dropped-frame count.** Dropping follows the cycle rule above, which
  agrees with the safety-zone condition. The original description also
  gives a second rule, `(N_drop − 1)(T_win + 3) ≤ T_readout < N_drop (T_win + 3)`.
  * That rule counts one frame more: 4 instead of 3 for T_win = 10,
    Max = 8.
  * At T_readout = T_win + 3 it contradicts the safety zone.

  This design drops 3.
* **CMP_out polarity.** CMP_out is high on an event. The original
  description calls it both rising and falling at that moment.
* **Event-frame count.** An event frame needs one more count cycle than
  `1 + N_th`, because the count has to reach N_th + 1.
* **Event shift register.** It is loaded once per address bit with that bit
  of all 31 rows.
* **Hold-off setting.** The hold-off time is a cycle count (`holdoff`, 8 b),
  not an analog bias voltage. A setting of 0 acts as 1.
* **Current-logic scale.** V_SPAD/V_ref scale factors are nominal. Mismatch,
  settling and comparator offset are not modelled.

## Files

`rtl/`:
* `spad_pkg.sv` holds shared enums and `addr_bits()`.
* There is one module per file, and each file opens with a description of
  its timing.
* `spad_imagers_top.sv` brings out every imager's ports with the prefixes
  `p15_`, `bg_`, `ed_` and `cl_`.

`tb/`:
* There is one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
* `tb_spad_imagers_top` runs all four imagers at full size at once. It counts
  every mechanism: multi-round extraction, empty frame, safety zone, frame
  drop, dark-frame discard, event readout, sub-threshold burst, current-logic
  event and Force_off.
* `tb_bg31_laser_run` records a pulsed-laser sequence with the 31×31
  background-readout imager:
  * 50 MHz clock, T_win 200 ns, 100 ns pulse;
  * two sparse frames keep the 3-cycle dead time;
  * the laser frame is read completely while the following frames are
    dropped.
* `tb_ed31_laser_run` runs the 31×31 event discriminator at its operating
  point for 200 µs:
  * 50 MHz clock, T_win 200 ns, N_th 4, about 10 kHz dark counts per pixel;
  * a pinhole laser spot at 100 µs.
  * Of 769 frames, exactly one is read out.
* `tb_cl32_laser_run` runs one 17 µs measurement of the 32×32 imager:
  * 80 MHz clock, laser at 1 µs;
  * the raster readout ends well inside the window.

## Simulating

With Verilator 5 (the package first, then the design files and one testbench):

    verilator --binary --timing -Irtl rtl/spad_pkg.sv tb/tb_spad_imagers_top.sv \
        --top-module tb_spad_imagers_top -o sim && ./obj_dir/sim

Any other testbench works the same way. Replace the file and the top-module
name. The end-to-end test finishes in well under a second.

## Parameters

| module | parameter | default |
|---|---|---|
| imagers | `ROWS`, `COLS` | 15, 31 or 32 |
| imagers | `ABITS` | `$clog2(COLS+1)` |
| `vhaqc` | `HW` | 8 (hold-off width) |
| `ucc_sum` / `cl_dac` | `VDD_DMV`, `STEP_DMV` | — |
| `out_shift_reg` | `W` | — |

* Changing `ROWS`/`COLS` rescales the chains, the CAG, the AND tree and the
  shift registers.
* Frame settings (`win_width`, `nth`, `holdoff`, `thr`) are input ports, not
  parameters. As on the chips, they are set at run time.
