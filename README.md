# ToASt digital readout: time of arrival and time over threshold for 64 silicon strips

ToASt is a 64-channel readout chip for double-sided silicon strip sensors. Its
experiment runs without a trigger, so every particle crossing a strip has to
leave the chip as a self-contained record. Each record holds the strip
address, a time of arrival with 6.25 ns resolution, and the deposited charge.
The chip does not digitise the charge with an ADC. The front end turns the
charge into a pulse whose length grows linearly with it: the time over
threshold (ToT). The digital part therefore only has to measure times. It
stamps the start and the end of each pulse with a common 12-bit counter
running at 160 MHz. Both stamps go out in a 32-bit word on one or two
160 Mb/s serial links.

This repository holds synthesizable SystemVerilog for that digital part. It
also holds self-checking testbenches for each block and for the whole chip.
The analog front ends, the test pulse DAC and the SLVS pads are not part of
the RTL; their signals are ports of the top module. For simulation, a simple
behavioural model of a front-end channel stands in for them in the test pulse
testbench.

```
 out_t/out_e x64 ─► 8 x toast_region ──► global_ro ──► tx[1:0]  (160 Mb/s each)
                     (8 toast_channel      (64-cell FIFO,
                      + round-robin         frame builder,
                      + 8-cell FIFO)        2 x serializer)
 ts_counter ── Gray time stamp to all channels, binary to global_ro
 config_unit ◄─► cfg_sdi / cfg_sdo (80 Mb/s) ── global registers, channel registers
```

## Measuring a hit with two thresholds

Each analog channel has two comparators on the shaped pulse:

* `out_t` fires at a low timing threshold. The steep rising edge there gives
  the least time jitter.
* `out_e` fires at a higher energy threshold. Noise seldom reaches it.

The channel control unit in `toast_channel` works as follows:

1. When `out_t` rises, it loads the current time stamp into the leading-edge
   (LE) register.
2. It then waits for `out_e`. If `out_t` falls before `out_e` has been seen,
   the pulse is counted as noise and dropped (`noise_drop`).
3. When `out_e` falls, it loads the time stamp into the trailing-edge (TE)
   register. The offline ToT is TE − LE, modulo 4096.
4. The channel holds the hit (`hit_ready`) until its region reads it. Pulses
   that arrive in that time are lost. This dead time is what limits
   efficiency at high rates.

Validation can be switched off with the `dth_en` bit of the control register.
The trailing edge is then taken from the falling edge of `out_t`.

The time stamp reaches the channels in Gray code. On the silicon, the LE and
TE registers latch the bus directly at the comparator edge, and Gray coding
keeps an asynchronous capture within one count. This RTL stays in the clock
domain instead. Both comparator outputs pass a two-flip-flop synchronizer and
an edge detector. The stored value is the time stamp two cycles after the
cycle in which the comparator changed. It is quantised to the same 6.25 ns
bin, but carries a constant offset of about three cycles, the same for LE and
TE. The testbenches check this exact offset.

Each channel also has two 12-bit configuration words:

| word | bits | field |
|---|---|---|
| 0 | [4:0] | `dac_the`, energy threshold fine tune |
| 0 | [9:5] | `dac_tht`, timing threshold fine tune |
| 1 | [4:0] | `dac_if`, ToT discharge current fine tune (gain calibration) |
| 1 | [5] | `mask`: the digital part ignores the channel |
| 1 | [6] | `delay_en` (to the front end) |
| 1 | [7] | `cal_en`: test pulses are injected into this channel |

Configuration data reach a channel over its region's time stamp bus. Read-back
uses the LE/TE buses. During the single cycle of a configuration write, that
region's channels see the data instead of the time stamp. Do not configure
channels while taking data.

## Regions: 8 channels, one local FIFO

`toast_region` groups 8 channels. Unselected channels drive zeros on the
shared 12-bit LE/TE buses, so each bus is a wide OR. In each cycle the region:

* picks one channel with a ready hit, round-robin starting after the last
  channel served;
* selects that channel, which also clears its hit;
* converts LE and TE from Gray to binary;
* writes `{channel[2:0], LE, TE}` (27 bits) into an 8-deep FIFO.

A full FIFO stops the readout, so hits wait in their channels and the dead
time grows. A configuration access from `config_unit` takes the bus for one
cycle, ahead of hit readout.

## Global readout and the frame format

`global_ro` moves one hit per cycle from the non-empty region FIFOs into a
64-entry global FIFO, round-robin over the regions. It adds the region
number. The output is organised in **frames** equal to one rollover of the
time stamp: 4096 cycles, or 25.6 µs at 160 MHz. A link sends one bit per
clock, so one 32-bit word takes 32 cycles and a frame holds exactly 128 word
slots:

| slot | word |
|---|---|
| 0 | header |
| 1 … 126 | data word if the global FIFO has one, otherwise sync word |
| 127 | trailer |

Word formats, bits 31..0:

| type | [31:30] | [29:0] |
|---|---|---|
| data | `11` | region[2:0] channel[2:0] LE[11:0] TE[11:0] |
| header | `10` | `10` chip_id[6:0] reserved[12:0]=0 frame_n[7:0] |
| trailer | `01` | `01` data_count[11:0] crc[15:0] |
| sync | `00` | `00` 1100 1100 1100 1100 1100 1100 1111 (word `0x0CCCCCCF`) |

Each link has its own frames. Its trailer counts the data words that link
sent in the frame and carries their CRC-16:

* polynomial x¹⁶+x¹²+x⁵+1 (0x1021);
* initial value 0xFFFF;
* each data word processed MSB first;
* header, sync and trailer words are not included.

Since every frame has the same slot layout, a receiver only needs to find
one header to stay aligned. Words go out MSB first, so the two type bits
lead. Only the data words carry time: the frame number in the header plus the
12-bit LE give a hit's absolute time.

**Two links.** Link 0 takes its word at bit-slot 0 of each 32-cycle period
and link 1 one cycle later. Link 0 is therefore always served first. Link 1
carries a hit only when a second one is waiting, so at low rates link 0 is
the busier line. The `two_links` bit changes the mode, and the change takes
effect at the next frame boundary, so no frame is cut. When link 1 is off,
`tx_en[1]` is low and its line stays at 0.

**Capacity.** One link carries 126 data words per 25.6 µs, or 4.9 M hits/s.
Two links carry 9.8 M hits/s. The chip's specified worst case is 64 strips at
40 kHz, which is 2.56 M hits/s. The 8×8 region cells and 64 global cells
absorb bursts of up to 128 hits.

## Configuration link

`config_unit` runs the bidirectional serial configuration link at 80 Mb/s.
One bit lasts two 160 MHz cycles. The chip receives on `cfg_sdi`. It answers
on `cfg_sdo` and enables its driver with `cfg_sdo_oe`. Outside a board, the
three are joined into one pad. A command is a start bit `1` followed by 28
bits, MSB first:

```
rw (1 = write) | chip address[6:0] | register address[7:0] | data[11:0]
```

The chip ignores commands whose address does not match its `address` pins.
The same pins give the chip_id in frame headers. Register address bit 7
selects the target:

* **Bit 7 = 1: a channel register.** Bits [6:4] are the region, [3:1] the
  channel and [0] the configuration word. The channel number is
  region × 8 + channel.
* **Bit 7 = 0: a global register.** Bits [2:0] select one of 8:

| reg | contents | reset |
|---|---|---|
| 0 | control: [0] `two_links`, [1] `dth_en`, [2] CSA `polarity` | `0x003` |
| 1 | test pulse DAC: [5:0] amplitude, [6] extended range | 0 |
| 2–7 | analog bias codes, output on `bias_dac[0..5]` | 0 |

A read is answered after the command. The answer is a start bit and then the
12 data bits, two cycles each. The receiver samples each command bit in the
second half of the bit, timed from the start bit, so the host must drive the
line synchronously to the chip clock.

## Resets and radiation hardening

* All resets are synchronous, and each input passes a two-flip-flop
  synchronizer.
* `pon_rstb` (active low) resets everything, including the configuration.
* `rst_sync` restarts the time stamp, the frame counter, the FIFOs, the
  channels and the links, but keeps all configuration. After either reset is
  released, the time stamp is 0 two cycles after the release edge is sampled.
  This is how test pulses are aligned to the time stamp.

The chip protects its control logic against single event upsets by
triplication. `tmr_reg` keeps three copies with a majority voter, and each
copy reloads the voted value every cycle, so an upset copy is repaired at the
next clock. It holds:

* the global configuration registers and the configuration link state;
* the time stamp and frame counters;
* the readout control state: arbiter pointer, link mode, and each link's word
  count and CRC;
* the serializer shift registers;
* the reset and test pulse input synchronizers.

The global FIFO is kept in three copies, written and read together, whose
outputs are voted bit by bit. A corrupted copy is outvoted, but it is not
repaired. Channel and region registers are not triplicated, as on the chip.
The clock tree and the reset tree after the voter are single. The top-level
testbench flips single bits in one copy of the triplicated registers while
traffic runs, and checks that no output word changes.

## Top-level interface (`toast_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 160 MHz master clock |
| `pon_rstb`, `rst_sync` | in | 1 | resets, see above |
| `address` | in | 7 | chip address and chip_id |
| `test_p` | in | 1 | test pulse trigger |
| `out_t`, `out_e` | in | 64 | comparator outputs, bit n = channel n (region n/8) |
| `ch_dac_the`, `ch_dac_tht`, `ch_dac_if` | out | 64 × 5 | per-channel DAC codes |
| `ch_mask`, `ch_delay_en`, `ch_cal_en` | out | 64 | per-channel flags |
| `tp_inject` | out | 64 | synchronised `test_p` AND `cal_en`, per channel |
| `tp_dac_amp`, `tp_dac_range` | out | 6, 1 | test pulse DAC code |
| `polarity` | out | 1 | CSA input polarity |
| `bias_dac` | out | 6 × 12 | global bias codes |
| `cfg_sdi` / `cfg_sdo` / `cfg_sdo_oe` | in / out / out | 1 | configuration link |
| `tx`, `tx_en` | out | 2 | data lines and driver enables |

Parameters: `REGION_FIFO_DEPTH` (8) and `GFIFO_DEPTH` (64).

## Files

| file | contents |
|---|---|
| `rtl/toast_pkg.sv` | constants, word formats, configuration structs, Gray and CRC functions |
| `rtl/toast_top.sv` | chip top: reset synchronisers, regions, global readout, configuration |
| `rtl/ts_counter.sv` | 12-bit time stamp (binary and Gray), frame counter |
| `rtl/toast_channel.sv` | channel control unit, LE/TE registers, configuration words |
| `rtl/toast_region.sv` | 8 channels, round-robin readout, local FIFO |
| `rtl/global_ro.sv` | region merge, global FIFO, frame builder, link dispatch |
| `rtl/serializer.sv` | 32-bit to serial, MSB first |
| `rtl/sync_fifo.sv` | synchronous FIFO (fall-through) |
| `rtl/config_unit.sv` | configuration link and global registers |
| `rtl/tmr_reg.sv` | triplicated self-correcting register |
| `tb/tb_*.sv` | one self-checking testbench per module, plus two workload testbenches |
| `tb/analog_channel_model.sv` | behavioural model of an analog channel driven by the test pulse, for simulation only |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a hung run with a failure. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  rtl/toast_pkg.sv tb/tb_toast_top.sv --top-module tb_toast_top -Mdir obj -o sim
./obj/sim
```

To run another testbench, replace `tb_toast_top` with its name. The
testbenches:

* `tb_toast_top` runs the whole chip at its default sizes, in about 20 s of
  simulation.
  * It configures the chip over the serial link and drives random and burst
    traffic on all 64 channels.
  * It decodes both output lines and checks every header, trailer (count and
    CRC), sync word and data word against the pulses it applied.
  * It covers single-threshold and single-link operation, dead-time losses,
    full region and global FIFOs, test pulse strobes and a `rst_sync` in the
    middle of the run.
  * During the first traffic phase it injects upsets into single copies of
    the triplicated registers, about one every 300 cycles.
* `tb_panda_occupancy` replays a barrel occupancy study of this chip (12 chips,
  about 30 frames each, with the number of strip hits per chip that the study
  reports). The hits are generated at random times, since the original hit
  data are not available. The testbench measures the fraction of word slots on
  each line that do not carry a sync word, and compares it with the reported
  occupancy within one percentage point. With one link, the two reference
  chips give 6.90 % and 5.98 % against reported 6.83 % and 6.01 %. With two
  links, only the sum over both lines is compared (within one point for all
  12 chips). The split differs: this design's link-0-first dispatch puts 0.1
  to 1.1 points more on line 0, and that much less on line 1, than reported.
  The original chip shares data words more evenly between the lines, by a
  rule that is not known. No hit is lost in these runs, against 2.5 %
  reported, because the losses come from analog dead time.
* `tb_test_pulse_scan` places `analog_channel_model` between the chip's test
  pulse strobes and its comparator inputs. It repeats the usual test pulse
  measurements:
  * 100 events with the pulse tied to `rst_sync`, where the LE of every
    channel must be the same in every event;
  * a scan of the test pulse amplitude over both ranges, where the ToT must
    match the model's charge within one 6.25 ns bin and grow with it;
  * charges below and between the two thresholds, and a raised per-channel
    threshold DAC;
  * a gain calibration: the ToT of each channel is measured for all 32
    discharge DAC codes, and each channel gets the code that brings it
    closest to the mean. The model's channel gains are spread by ±20 %, and
    the ToT spread falls from 11.7 % to 0.7 %.

  The model's gains, thresholds and delays are illustrative values, not
  measured ones.
* The block testbenches (`tb_toast_channel`, `tb_toast_region`,
  `tb_global_ro`, `tb_config_unit`, `tb_sync_fifo`, `tb_serializer`,
  `tb_ts_counter`, `tb_tmr_reg`) check each block against its own reference
  model.

## What is taken from the chip description and what is this design's own

The following follow the description:

* 64 channels in 8 regions of 8, each region with a local FIFO, and a
  64-cell second-level FIFO;
* a 160 MHz clock and a 12-bit Gray-coded common time stamp;
* the double-threshold capture, with LE at the timing-threshold rise and TE
  at the energy-threshold fall, and validation that can be switched off;
* per-channel 5-bit threshold and discharge DACs and the mask, delay and
  calibration flags;
* the four 32-bit word formats, frames equal to the time stamp rollover,
  headers with chip_id and frame number, trailers with count and CRC;
* one or two 160 Mb/s links and an 80 Mb/s bidirectional configuration link;
* the 6+1 bit test pulse DAC setting, synchronous resets, and triplication
  of control registers.

The following are this design's own choices. The description leaves them
open:

* **Edge capture.** The synchronised, clocked edge capture (see above).
* **Configuration.** The configuration word layout, the command format and
  timing, and the global register map.
* **Link protocol.** The CRC polynomial and coverage, the fixed header and
  trailer slots, the link-0-first dispatch, and the frame-boundary mode
  switch.
* **Readout order and buffering.** Round-robin arbitration in regions and
  between regions, the region FIFO depth of 8, and binary time stamps in the
  output words.
* **Triplication.** The voter and scrubbing structure, and which registers
  are triplicated.

The framing (a header and a trailer on every active line in every frame)
was chosen to match the occupancies the chip's designers report from
simulation. With a single link, (data words + 2 framing words
per frame) / 128 slots gives 6.7 % and 6.0 % for the two example chips,
against reported 6.83 % and 6.01 %. Simulating those chips' hit counts
(`tb_panda_occupancy`) gives 6.90 % and 5.98 %. The split of words between two lines
matches less well (see the simulation section): the real chip loads its
second line more.

Known departures and limits:

* **Timing offset.** LE/TE carry a constant three-cycle offset from the
  synchronizer.
* **Configuration while running.** A channel configuration write takes over
  the region's time stamp bus for one cycle, so hits stamped in that cycle
  are wrong.
* **Single copies.** The clock tree and the voted reset tree are single.
  An upset copy of the global FIFO is outvoted but not repaired.
* **Front-end dead time.** Event losses caused by front-end dead time depend
  on analog pulse lengths, which are not modelled.
