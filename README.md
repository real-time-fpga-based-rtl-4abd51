# X-band FMCW radar imaging chain in SystemVerilog

This is the baseband signal processing of one four-channel FMCW radar node.
The node watches a road crossing, a railway crossing or a small harbour, and
reports every target it sees with its distance, speed and direction. The analog
front end sweeps the carrier by 400 MHz in 175 µs ramps. Each of four receive
channels mixes the echo down to a beat (IF) signal, and an ADC samples it at
40 MSa/s with 14 bits.

The logic here turns one frame of 256 ramps into a list of detections:

1. reduce each sample to 12 bits and calibrate it per channel;
2. run an 8192-point FFT over every ramp of every channel (range);
3. store the spectra as rows of a 256 × 8192 matrix per channel;
4. read the matrix back column by column and run a 256-point FFT along the
   ramps (Doppler, that is speed);
5. run a 4-point FFT across the channels of each cell (azimuth, that is
   direction);
6. keep the strongest azimuth bin of each range–Doppler cell;
7. compare that power with a cell-averaging CFAR threshold taken from the
   neighbouring Doppler cells.

Everything runs from one 200 MHz clock. The three FFTs form one pipeline.
While the range FFT fills one half of a two-bank (ping-pong) transpose memory,
the rest of the chain works on the previous frame from the other half.

```
ADC 4x14b ─ adc_if ─ gain_cal ─ ramp_ctrl ─ range_fft (4 x fft_r22sdf, N=8192)
                                                  │ rows, 4 x (12+12) bit
                                            corner_turn (2 banks x 256 x 8192, ROI)
                                                  │ columns
          doppler_fft (4 x fft_r22sdf, N=256) ─ azimuth_fft (4-point) ─ az_power
                                                  │ bit-reversed Doppler order
                                   bitrev_reorder ─ ca_cfar ─ detections
```

`xfri_top` wires these blocks together. Beside the chain sits `flash_ctrl`,
which reads, programs and erases an on-board SPI FLASH, so results worth
keeping survive a power loss.

The detection outputs of `xfri_top`, one set per detection, are:

- `det_range`: range bin, 0…8191;
- `det_doppler`: Doppler bin, 0…255, where bins 128 and above are negative speeds;
- `det_az`: azimuth bin, 0…3;
- `det_power` and `det_thresh`: the cell's power and the threshold it beat.

## Frame timing

A frame starts when `enable` is high and the ramp controller is idle. From
then on, `ramp_trig` pulses once per ramp for the analog synthesiser.

For each ramp, `ramp_ctrl` passes on 7000 samples (175 µs at 40 MSa/s). It then
adds 1192 zeros, one per clock, to make a full 8192-point block. It waits for
`RAMP_PERIOD` = 35000 clocks (175 µs) since the trigger before triggering the
next ramp.

The sweep already fills the whole period, so the padding makes each ramp last
about 36,200 clocks (181 µs). A frame of 256 ramps takes 9.27 M clocks
(46 ms). After the last ramp, 8192 flush steps push the last spectrum out of
the range FFT. The memory banks are then swapped.

Reading a frame out takes one clock per (column, ramp) inside the region of
interest, 256 flush clocks for the Doppler FFT and a 64-clock drain. For the
widest region of 4095 columns, that is 1,048,640 clocks (5.2 ms), far shorter
than acquisition. So the reader is always idle when the next frame arrives.

If a frame completes while the previous one is still being read, the new
frame is dropped and `overrun` pulses. Dropping `enable` stops acquisition
only after the current frame is complete, so the memory never holds half a
frame.

## Number formats through the chain

| point | format |
|---|---|
| ADC | 14-bit two's complement |
| `adc_if` output | 12 bits: `x >> 2`, rounded half up, saturated; `adc_clipped` flags saturation |
| `gain_cal` output | 12 bits: `sat(((x − offset) · gain + 2^13) >> 14)`, gain unsigned with 14 fraction bits (16384 = 1.0) |
| range FFT lanes | 24 bits per part; the 12-bit sample enters in the top bits |
| range output / memory | 12 + 12 bits per channel: `sat12(round(lane · 2^RANGE_GAIN / 2^12))` |
| Doppler FFT lanes | 24 bits per part; the 12-bit word enters in the top bits |
| azimuth output | 24 bits per part, divided by 4 |
| power | 48 bits, `re² + im²` |
| CFAR factor `cfar_alpha` | 12 bits with 4 fraction bits (16 = 1.0) |

Twiddle factors are 18 bits with 16 fraction bits, to fit the 25 × 18
multipliers of an FPGA DSP slice. Each FFT scales by 1/N: every butterfly
halves its sums, so the FFTs cannot overflow.

The price of 1/N scaling is that the 8192-point range FFT divides a
single-bin tone by about 2·8192/7000 and noise by about 8192/√7000. Without
further gain, weak echoes and noise would round to zero in the 12-bit memory
words.

`RANGE_GAIN` (default 6) multiplies the range output by 64 before rounding.
At that gain:

- ADC noise keeps roughly its own rms value in the memory;
- a tone gains about 19 dB;
- a tone above about 1/16 of full scale saturates.

Choose `RANGE_GAIN` for the expected echo level. The Doppler and azimuth FFTs
are coherent for a target, so its power at the detector is
`(A/2 · 7000/8192 · 2^RANGE_GAIN · 2^12)²`, with `A` its amplitude in 12-bit
units. The full-size testbench checks this formula to within 15 %.

## The streaming FFT (`fft_r22sdf`, `sdf_bf`)

The range and Doppler FFTs are both instances of one core. It is a
radix-2² single-path delay-feedback (R2²SDF) pipeline that takes at most one
complex sample per clock.

**Stages.** The core has LOG2N butterfly stages. Stage s has a feedback delay
line of D = N/2^(s+1) words. For the first D samples of each group of 2D, the
butterfly stores the input and outputs what its delay line held. For the
second D samples, it adds and subtracts the stored and the new value. The
difference goes back into the delay line, and the sum goes on, both halved.

**Radix-4 pairs.** Butterflies are grouped in pairs, and each pair is one
radix-4 stage. Between the two butterflies of a pair, the last quarter of each
block of that stage is multiplied by −j. This only swaps the real and
imaginary parts and negates one. After the pair, one complex multiplier
applies the twiddle W_M^(q·(a+2b)), where:

- M is the block length the pair works on;
- q is the position within a quarter;
- a and b are the two bits that say which quarter the sample came from.

8192 points give six radix-4 pairs plus one lone radix-2 butterfly. 256 points
give four pairs. The twiddles come from ROMs of 3M/4 entries, filled from
cos/sin at elaboration.

**Steps.** The pipeline advances one *step* whenever `in_valid` or `flush` is
high. So it can take the 1-in-5 ADC rate or a one-per-clock stream equally
well. A valid flag travels beside the data. Blocks must be whole multiples of
N steps from reset.

**Latency and order.** A block's first output leaves N − 1 steps after its
first input, plus about 1.5·LOG2N register clocks. The last block of a burst
needs N flush steps to come out. Outputs are in bit-reversed order, and
`out_idx` gives the true frequency bin of each one.

`range_fft` and `doppler_fft` each run four lanes in lock-step, one per
channel. They use `out_idx` to label their outputs with a range bin or a
Doppler bin.

## Transpose memory and region of interest (`corner_turn`)

Each word holds all four channels of one (ramp, range bin) cell: 4 × 24 bits.
There are two banks of 256 × 8192 words, which is 2 × 192 Mbit.

The range FFT writes a ramp as one row, at the natural bin address given by
`out_idx`. At the end of a frame the banks swap. The region of interest
`[roi_first, roi_last]` is latched at that moment.

The reader then walks the stored frame one column at a time. For each range
bin in the region, it reads all 256 ramps of that bin, one word per clock.
Bins outside the region are never read. This is how the region saves Doppler,
azimuth and CFAR work.

The FFT input is real, so bins 4096…8191 mirror bins 4096…1. A useful region
therefore stays within 1…4095.

After the last column the reader sends 256 flush steps to the Doppler FFT
(`rd_flush`). It then waits 64 clocks for the rest of the pipeline and pulses
`frame_done`.

This memory is a plain array with one write port and one registered read
port. On an FPGA it does not fit on chip. It belongs in external DRAM behind a
controller that keeps the same row/column addressing. That controller is not
part of this RTL.

## Doppler, azimuth and peak selection

`doppler_fft` turns each column into 256 Doppler bins per channel. It also
tags each output with its range column. It counts completed 256-word blocks
from `col_base`, the first column of the frame.

`azimuth_fft` applies one radix-4 butterfly across the four channels of a cell
and divides by 4. This needs no multiplier. A target with a channel-to-channel
phase step of 2πa/4 lands in azimuth bin a.

`az_power` computes the four powers and keeps the largest, with ties going to
the lower bin. This leaves one value per range–Doppler cell, together with its
azimuth index.

## CA-CFAR detector (`ca_cfar`, `bitrev_reorder`)

The Doppler output of one column comes out in bit-reversed order. So
`bitrev_reorder`, a 2 × 256-word ping-pong buffer, first restores natural
order, column by column.

`ca_cfar` then slides a window along the Doppler axis. The window is:

- NT = 8 training cells on each side;
- NG = 2 guard cells on each side;
- the cell under test in the middle.

The cell is a detection when `P · 2NT · 16 > alpha · Σ training`, which is
P > (alpha/16) × the mean of the training cells. The threshold is output with
each detection.

Every Doppler bin is tested, also the ones near the ends of a column. The
column is not treated as circular: a training side is used only if all its
cells belong to the same column as the cell under test. When one side is cut
off by the column edge, the complete side is counted twice instead. This keeps
slow and standing targets (Doppler bin 0 and its neighbours) detectable,
which a railway crossing needs. After the last bin of a column the window
shifts itself another NT+NG times with empty cells, so the last bins are
tested before the next column arrives.

Which `alpha` to use depends on the wanted false-alarm rate. For 16 training
cells the rate is roughly (1 + α/16)^−16 per cell. So α = 40 (`cfar_alpha` =
640) keeps a frame of a million cells nearly free of noise alarms.

## Non-volatile storage (`flash_ctrl`)

The node can keep results across a power cut (for example calibration
values, a region of interest or a detection list) in a serial NOR FLASH, and
reload them. `flash_ctrl` turns one command on its port into the FLASH's byte
sequence:

- **read** (`cmd_op` = 0): command 03h with a 24-bit address, then
  `cmd_len` bytes out on `rd_data`, one `rd_valid` pulse each;
- **program** (`cmd_op` = 1): write enable (06h), page program (02h) with the
  address, then `cmd_len` bytes taken from `wr_data` through a valid/ready
  handshake;
- **sector erase** (`cmd_op` = 2): write enable, then 20h with the address.

After a program or an erase, the unit keeps reading the status register (05h)
until the busy bit clears. Only then does it pulse `done`, so the next
command never reaches a busy part.

The bus is SPI mode 0, most significant bit first. The SPI clock is `clk/4`
(`DIV` = 2), which is 50 MHz at 200 MHz. A byte takes 32 clocks.

A program must stay inside one 256-byte page. The FLASH wraps within the page
otherwise.

At the top level the command port and the four SPI pins are plain ports
(`flash_*`). Which results are stored, and when, is left to the node's
control logic.

## How far it can be trusted

Every block has a self-checking testbench in `tb/` that compares the block
against values computed independently: direct DFTs in real arithmetic,
reference models of the rounding and so on.

Each testbench has also been run against a deliberately broken copy of its
block, and it catches the fault.

Two end-to-end tests exist:

- `tb_xfri_top`, at reduced size (64-point range FFT, 16 ramps). It runs
  three frames. One frame has a region of interest that excludes a target, and
  one frame clips the ADC. It checks every target cell and power. It counts
  ramps, padding, range flushes, bank swaps, skipped columns, Doppler flushes,
  clipping, detections and detections at a column edge. One target moves
  slowly enough to sit in Doppler bin 2, next to the column edge. In the
  clipping frame the odd harmonics that clipping creates are accepted. After the first frame it stores eight detections
  in a FLASH model through the FLASH port and reads them back.
- `tb_xfri_full`, with all defaults. It runs one complete frame: 256 ramps of
  7000 samples, 8192-point range FFT, three targets: 375 m moving away,
  1490 m approaching at 7 m/s, and a standing obstacle at 25 m. It takes
  about 20 s in Verilator.

In `tb_xfri_full`, all three targets land in their exact (range, Doppler, azimuth)
cell with the predicted power. All other detections are either:

- range sidelobes of the targets, because a 7000-sample ramp in an 8192-point
  FFT is not a whole number of periods, or of their mirror images (the
  real IF signal also has a negative frequency, with negated Doppler and
  azimuth bins); or
- products of rounding the range output to 12 bits, more than 40 dB below the
  weaker target, at harmonics of the targets' Doppler bins.

The acquisition and processing clock counts are checked too.

Limits and departures from the original system:

- **Ramp period.** The padding follows the 175 µs sweep, which stretches the
  ramp period to about 181 µs. Because of this, the highest speed measured
  without ambiguity is about 3 % lower than with 175 µs ramps.
- **Samples per ramp.** One description of the system gives the ramp length
  as 8000 samples, while 175 µs at 40 MSa/s is 7000. `NSAMP` is a parameter
  and defaults to 7000.
- **Transpose memory.** It is an array in the RTL rather than external SDRAM
  with its controller. At full size it holds 384 Mbit, far more than any
  FPGA's block RAM. So `corner_turn`, and with it `xfri_top`, is meant for
  simulation at full size. Logic synthesis at full size maps the array to a
  memory, but the netlist is too large to write out. For hardware, the array
  is the place to connect an SDRAM controller, or a small `LOG2_NR` can be
  used.
- **Range–azimuth variant.** The original system can also run the 4-point FFT
  per ramp and the third FFT over ramps afterwards. Only the range–Doppler
  order described here is built.
- **FLASH unit.** The original system names this unit but not its FLASH
  device or bus. The SPI NOR command set used here is this design's choice.
- **Outside this RTL.** The analog front end, the ADC, the DRAM and the
  network links are not part of this RTL. `tb/spi_flash_model.sv` is a
  behavioural FLASH model for the testbenches only.
- **Design choices.** The following are this design's choices, not the
  original system's: the scaling and word widths, `RANGE_GAIN`, peak selection
  by the strongest azimuth bin, the CFAR axis and window sizes, and the
  detection output format.

## Simulating

Every testbench runs with plain Verilator 5 from the top of the tree. It
prints a `TB_RESULT checks=… failures=…` line and finishes. For example:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  -y rtl -y tb +libext+.sv rtl/xfri_pkg.sv tb/tb_xfri_top.sv \
  --top-module tb_xfri_top -o sim
obj_dir/sim
```

Replace `tb_xfri_top` with any other testbench:

- block tests: `tb_adc_if`, `tb_gain_cal`, `tb_ramp_ctrl`, `tb_fft_r22sdf`,
  `tb_range_fft`, `tb_corner_turn`, `tb_doppler_fft`, `tb_azimuth_fft`,
  `tb_az_power`, `tb_bitrev_reorder`, `tb_ca_cfar`, `tb_flash_ctrl`;
- full-size run: `tb_xfri_full`, which needs about 0.1 GB and 20 s.

The sizes are parameters of `xfri_top`: `LOG2_NR`, `LOG2_NRAMP`, `NSAMP`,
`RAMP_PERIOD`, `CFAR_NT`, `CFAR_NG` and `RANGE_GAIN`. Shared widths and
defaults live in `rtl/xfri_pkg.sv`. Each file opens with a description of its
interface and timing.
