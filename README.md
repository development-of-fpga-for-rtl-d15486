# Three-channel DDS waveform generator controller

A direct digital synthesizer (DDS) makes a sine wave by adding a frequency tuning word
(FTW) to a phase accumulator on every clock and looking the phase up in a sine table.
With an N-bit accumulator and clock f_clk, the output frequency is
`f_out = FTW * f_clk / 2^N`. The AD9858 does this with N = 32 at 1 GHz, so a tuning word
sets the frequency anywhere from DC to about 500 MHz in steps of 0.23 Hz. The chip has
four frequency profiles, chosen by two pins, and a built-in linear frequency sweep.

Switching the frequency quickly, thousands of times a second, needs register writes
that no PC can deliver at that rate. This RTL is the FPGA between the operator's PC and
three AD9858 chips. It takes frequency commands, turns them into tuning words, and runs
each chip in one of seven modes:

| mode  | what the FPGA does while it runs |
|-------|----------------------------------|
| fixed | programs one tuning word and leaves the chip alone |
| FM    | reads an ADC at 1 MHz and rewrites the tuning word as centre + sample × deviation |
| AM    | same mechanism as FM (see *Where this departs* below) |
| chirp | sets up the chip's own sweep (start, step, ramp rate) and restarts it each time it reaches the stop frequency |
| TDM   | loads up to four tones into the four profiles and steps the profile pins at a fixed dwell |
| FDM   | stores up to four tones and rewrites the single active tuning word with the next one at each dwell |
| BFSK  | loads two tones into profiles 0 and 1 and drives profile pin 0 from the modulating bit |

All RTL is SystemVerilog-2017. It targets a 50 MHz clock and has been checked with
Verilator lint, simulation, and a Yosys/slang parse and elaboration.

## Data path from keyboard to DDS

```
 PC ──serial──► microcontroller ──SPI──► spi_slave ──bytes──► cmd_parser ──cfg_wr_t──┬─► channel_ctrl[0] ─► ad9858_port ─► DDS 0
                                                          (bcd_to_bin, ftw_calc)     ├─► channel_ctrl[1] ─► ad9858_port ─► DDS 1
                                                                                     └─► channel_ctrl[2] ─► ad9858_port ─► DDS 2
 modulation ADC ◄─convst── adc_sampler ──sample──► all channel_ctrl (AM/FM)
 fsk_in[c] ────────────────────────────────────► channel_ctrl[c] (BFSK)
```

`cwg_top` wires these blocks together for `NUM_CH = 3` channels. The PC program and the
microcontroller are outside the FPGA. The FPGA sees only the SPI link.

### Command frames (`cmd_parser`)

Every command is one SPI chip-select period of five bytes:

```
byte 0     [7:6] channel (0..2, 3 = all channels)   [5] unused   [4:0] op code
bytes 1-4  eight BCD digits, most significant first
```

Frequencies, chirp step and deviation are in units of **10 Hz**, so 45.00000 MHz is
`04500000`. Eight digits reach 999.9999 MHz. The op codes are in `cwg_pkg::op_e`:

| op | name  | value |
|----|-------|-------|
| 0-3 | FREQ0..FREQ3 | frequency slots: single/start/centre tone, TDM/FDM tones 1-4, BFSK mark/space |
| 4  | STOP  | chirp stop frequency |
| 5  | STEP  | chirp step |
| 6  | DEV   | AM/FM deviation (output swing at ADC full scale) |
| 7  | COUNT | number of TDM/FDM tones, 1..4 (clamped) |
| 8  | DWELL | TDM/FDM dwell in 50 MHz clocks (minimum 2) |
| 9  | APPLY | program the DDS and start the mode in the value (`mode_e`: 0 fixed, 1 AM, 2 FM, 3 chirp, 4 TDM, 5 FDM, 6 BFSK, 7 idle) |
| 10 | RESET | pulse the DDS reset pin; the channel goes idle |
| 11 | PHASE | phase offset in 0.01 degree (`00012000` = 120°), for all tones of the channel |

The digits are converted to binary by `bcd_to_bin`, a combinational Horner chain. For
ops 0-6, `ftw_calc` then computes `FTW = round(f · 2^32 / 1 GHz)`. A second `ftw_calc`,
with 36000 as its reference, turns a phase `p` into `round(p · 2^32 / 36000)`, a 32-bit
fraction of a turn. It wraps at 360°, and the channel keeps its top 14 bits. It does this without
a divider: it multiplies by the constant `floor(2^64 · 10 / 10^9)`, adds one half, and
keeps bits [63:32]. Truncating the constant moves the value by at most 0.03 LSB before
rounding, so the result can be one LSB below exact rounding only when the exact value lies
that close to a half. The testbench compares random inputs against wide-integer
arithmetic. The parser drops a frame that has
a non-BCD digit or an unknown op code and sets bit 7 of the status byte. The slave
returns that status byte on MISO during the next frame. Bits 6:0 of the status byte
count accepted frames.

Settings are stored as soon as they arrive. They take effect at the next APPLY, with
one exception: AM/FM read the centre and deviation on every sample.

### Programming a DDS (`channel_ctrl` → `ad9858_port`)

On APPLY the channel controller walks a short list of register writes. Every list
starts with the control register (CFR). Next comes the 14-bit phase offset word (POW) of
each profile the mode uses: one for fixed, AM, FM, chirp and FDM, `count` for TDM, and
two for BFSK. Each POW is a 2-byte write at its tuning word's address + 4. The mode's own
writes follow. Each write is a
request to the port driver: a start address, 0 to 4 bytes (least significant byte at
the lowest address), and an optional frequency-update (FUD) pulse afterwards. Requests
use a valid/ready handshake, and an assertion checks that a request stays unchanged
until it is taken.

| mode | writes |
|------|--------|
| fixed, AM, FM, FDM | CFR (single tone); POW0; FTW0 = slot 0 + FUD |
| chirp | CFR (sweep enable, auto-clear frequency accumulator); POW0; DFTW = step; DFRRW = `RAMP_RATE`; FTW0 = start + FUD |
| TDM | CFR; POW0..POW(count-1); FTW0..FTW(count-1) = slots, FUD after the last |
| BFSK | CFR; POW0, POW1; FTW0 = slot 0; FTW1 = slot 1 + FUD |

The channel reports `running` only after the last update pulse has left the port.

`ad9858_port` drives the 20 control lines of one chip: D[7:0], A[5:0], WR_N, RD_N, FUD,
RESET, and PS[1:0], which comes from the channel controller. Each byte takes 4 clocks
(80 ns): one clock of setup, two with WR_N low, and one of hold. FUD is high for
2 clocks. RD_N is held high because nothing is read back. Assertions check that address
and data stay stable while WR_N is low, and that FUD never overlaps a write. A 4-byte
write with its update takes 19 clocks, including the clock that accepts the request.

### Running modes

* **AM/FM.** `adc_sampler` pulses `adc_convst` every 50 clocks (1 MHz) while any channel
  needs samples. It reads `adc_data` 40 clocks later and converts the offset-binary code
  to two's complement. Each sample `s` (12 bits) gives
  `FTW0 = slot0 + (s · dev) >>> 11`, so full scale swings the output by ±deviation. The
  write takes 19 of the 50 clocks between samples. If a new sample arrives before the
  previous one was written, only the newest is written.
* **Chirp.** The DDS itself steps the frequency up by DFTW every `RAMP_RATE` SYNC_CLK
  periods. SYNC_CLK is taken as 1 GHz / 8, which gives 1 µs per step with the default
  of 125. The controller does not see the DDS frequency. Instead, a sequential divider
  (`udiv`) computes `steps = (stop − start) / step` once. The controller then counts
  `STEP_CLKS = RAMP_RATE · 8 ns / 20 ns` clocks per step and issues a bare FUD after
  `steps` steps. The FUD clears the DDS frequency accumulator and the sweep restarts
  from the start frequency. A 300–360 MHz sweep in 25 kHz steps is therefore
  retriggered every 2400 µs.
* **TDM.** The profile pins advance 0, 1, …, count−1, 0, … every `dwell` clocks, with a
  minimum of 2 clocks (40 ns). The tones sit in the DDS's four profiles, so a switch is
  a pin change and needs no register write.
* **FDM.** Every `dwell` clocks, FTW0 is rewritten with the next stored tone and
  updated. The minimum practical dwell is one write, 19 clocks.
* **BFSK.** `fsk_in` passes through two synchronising flops to PS0. The output follows
  the bit 3 clocks later.

## Where this departs from, or adds to, the published design

These points describe the design as built, and show where it can be trusted.

* **The AD9858 register map is not from the source.** The register addresses (CFR 0x00,
  DFTW 0x04, DFRRW 0x08, FTW0..3 at 0x0A/0x10/0x16/0x1C, POW0..3 at 0x0E/0x14/0x1A/0x20) and the control-register bit
  numbers (sweep enable 14, auto-clear frequency accumulator 12) come from general
  knowledge of the part. They are collected in `cwg_pkg`. **Check them against the
  AD9858 data sheet before connecting real chips.** The same applies to the SYNC_CLK
  ratio and the ramp-rate semantics used for the chirp timing.
* **AM changes frequency, not amplitude.** The source describes AM as reading the ADC
  and recomputing the tuning word, so both AM and FM do exactly that. The AD9858 has no
  amplitude register to drive.
* **FDM is tone hopping by register rewrite.** The source says only that the FPGA
  generates several frequencies in a range. Hopping through stored tones is this
  design's reading.
* **Phase is set per channel.** The source has the operator set amplitude, phase and
  frequency. The phase offset is written into each profile the mode uses. The shared
  SYNC_CLK on the board is what makes offsets between channels, such as 0/120/240°,
  meaningful. Amplitude: see the AM point above.
* **The command format is this design's own.** This covers the frame layout, the op
  codes, the 10 Hz unit, the broadcast channel 3, the status byte, and SPI mode 0
  (MSB first, with `sck` below about `clk/4`). The source gives only "BCD over SPI via a
  microcontroller". A host must send the frames described above.
* **The tuning words are computed in the FPGA.** One part of the source has the PC
  compute register values. Another part has the FPGA compute them from BCD. The latter
  is built.
* **Port timing, ADC width and conversion time are assumptions.** The choices are:
  4 clocks per byte, a 12-bit offset-binary ADC read 800 ns after the start pulse, and a
  reset pulse of 4 clocks.
* **Each channel has its own 20-line DDS port.** This makes 94 I/O bits at the top, plus
  16 for the monitor (110 in all). The reference implementation used 52 I/O pins, so its
  board must have shared some lines. How is not known.
* **Monitor DDS (an addition).** `dds_core` is a small DDS on the 50 MHz FPGA clock. It has
  a 32-bit phase accumulator and a quarter-wave sine ROM (1024 × 13 bits, one block RAM).
  It drives a 14-bit offset-binary DAC word `mon_dac`, two clocks after the phase.
  Each channel keeps a mirror of its four profile registers: what was written, and what
  an update made active. The monitor takes the active tuning word of channel `mon_sel`,
  selected by that channel's profile pins. The same word on a 50 MHz clock gives
  `f_dds / 20`, so 45 MHz shows as 2.25 MHz. A scope or counter on a DAC behind
  `mon_dac` therefore checks the programmed frequency and the profile switching (TDM,
  BFSK, FDM) without the 1 GHz chain. The frequency of a chirp in progress is not
  tracked: the monitor shows the start frequency. Tie `mon_sel` low and leave `mon_dac`
  open if it is not wanted.
* **Size.** Generic synthesis gives about 1820 word-level cells, 3011 flip-flop bits and
  one 13 kbit ROM. The reported implementation used 536 flip-flops. Most of the
  difference is per channel: the settings (four 32-bit slots plus stop, step, deviation
  and dwell), the profile mirrors (eight 32-bit words) and the 32-bit counters. The
  monitor's mirrors are 768 of those bits. Remove them and the monitor if area matters,
  and narrow `dwell_q`/`tick`.
* **Not in the RTL:** the AD9858 chips themselves (1 GHz accumulator, sine table, DAC,
  filter), the 1 GHz reference clock, the SYNC_CLK distribution that keeps the three
  chips in step (a clock buffer on the board), the ADC, the microcontroller and the PC
  program. The chips are kept in step on the board; the broadcast channel only starts
  all three with the same settings at the same moment.

## Files

| file | contents |
|------|----------|
| `rtl/cwg_pkg.sv` | modes, op codes, `cfg_wr_t`, DDS register map, control-word constants |
| `rtl/cwg_top.sv` | top level: SPI, parser, ADC sampler, three channels, monitor DDS |
| `rtl/spi_slave.sv` | SPI mode-0 slave with status return |
| `rtl/cmd_parser.sv` | frame assembly, BCD and tuning-word conversion |
| `rtl/bcd_to_bin.sv` | combinational BCD to binary |
| `rtl/ftw_calc.sv` | frequency to 32-bit tuning word, one clock |
| `rtl/channel_ctrl.sv` | per-channel mode sequencer |
| `rtl/udiv.sv` | 32-cycle restoring divider (chirp step count) |
| `rtl/ad9858_port.sv` | DDS parallel-port write engine |
| `rtl/adc_sampler.sv` | 1 MHz ADC trigger and capture |
| `rtl/dds_core.sv` | monitor DDS: phase accumulator, quarter-wave sine ROM, DAC word |
| `tb/ad9858_model.sv` | behavioural model of the DDS control port (register file, profiles, update, reset) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_cwg_top` |

Parameters with their defaults: `NUM_CH = 3` and `ADC_W = 12` (top);
`RAMP_RATE = 125`, `SYNC_NS = 8`, `CLK_NS = 20` and `DWELL_RESET = 50` (channel);
`REF_HZ = 10^9` and `UNIT_HZ = 10` (tuning word); `RATE_DIV = 50` (ADC);
`ACC_W = 32`, `PHASE_W = 12` and `AMP_W = 14` (monitor DDS); and the port timing counts.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own. A watchdog
ends it with a failure if it hangs. Example with plain Verilator, from the repository
root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
          --top-module tb_cwg_top rtl/cwg_pkg.sv tb/tb_cwg_top.sv
./obj_dir/Vtb_cwg_top
```

Replace `tb_cwg_top` with any `tb_<module>` to test one block. `tb_cwg_top` runs the
whole design at its default parameters, about 280,000 clocks, in under a second. It
sends real SPI frames and checks these scenarios:

* a 45 MHz tone, also counted on the monitor DAC (450 cycles in 10,000 clocks);
* FM at 20 MHz with 15 kHz deviation, with random ADC input;
* a 300–360 MHz chirp in 25 kHz steps, including the 120,000-clock retrigger period;
* TDM of 28.184 / 41.8717 / 62.891 / 97.0577 MHz at a 2-clock dwell;
* FDM of 130 / 140 / 150 MHz;
* AM at 135 MHz with 1 kHz deviation;
* BFSK, with the monitor on that channel following the selected tone;
* a broadcast 100 MHz tone on all three channels with phase offsets of 0, 120 and 240°;
* a rejected frame, seen through the MISO status;
* a DDS reset.

It counts each of these mechanisms and fails if any never happened.
`tb_channel_ctrl` checks exact dwell and retrigger timing, register contents for every
mode (phase offset words included), and the order of the profile pins.
