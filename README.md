# GPS signal simulator — FPGA signal generator

A GPS receiver under test has to see the signals of several satellites as if
it were at a chosen place and moving along a chosen path. This design makes
those signals. A PC works out, for each of four satellites in view, three
values: the C/A code phase seen at the receiver, the satellite number and
the signal amplitude. It sends them 2000 times per second. The FPGA logic
here turns that slow stream into one sample every clock at 8.184 MHz. Each
sample is the sum of four satellite signals at a 2.046 MHz intermediate
frequency (IF). A 10-bit D/A converter and a mixer then move that IF up to
the GPS L1 frequency (1575.42 MHz).

The main idea is to split the work. All the orbit and trajectory maths runs
on the PC at 2 kHz. The FPGA does only cheap work at the sample rate:

* linear interpolation between updates;
* one table lookup for the code;
* one table lookup for the carrier.

The carrier phase is taken from the code phase itself. There are exactly
two carrier cycles per code chip (2.046 MHz against 1.023 MHz), so the
carrier and code stay coherent, Doppler included, with no carrier NCO
(numerically controlled oscillator) of their own.

## Block structure

```
 parallel port ──► centronics_rx ──► frame_assembler ──► word register per channel
                                                           │  (at each update)
 update_counter (0..4091, `update`) ───────────────────────┤
 time_phase_counter (0..8183) ─────────────────────────────┤
                                                           ▼
             gps_channel ×4:  cur_to_prev (phase+flags) ─► code_interp ─┐
                              cur_to_prev (amplitude)   ─► amp_interp   │
                              phase_to_index ◄──────────────────────────┘
                              │ code index, SV       │ carrier index
                              ▼                      ▼
                         code_tables (shared)     carrier_rom
                              │ chip                 │ carrier   amplitude
                              └──────────► signal_combiner ◄──────┘
                                                 │
                                          dac_data[9:0]
```

`gps_sim_top` wires these blocks together. `gps_pkg` holds the widths, the
channel word type and the functions that fill the tables.

## Number formats

| quantity | format | notes |
|---|---|---|
| host code phase | 18 bit unsigned, 10.8 chips | 0 ≤ phase < 1023 chips |
| interpolated / total phase | 26 bit unsigned, 10.16 chips | kept in [0, 1023) |
| amplitude | 7 bit unsigned | 0..127 |
| carrier sample | 8 bit signed | −64..+64 |
| D/A word | 10 bit signed (two's complement) | ±508 at full scale with four channels |
| sample clock | 8.184 MHz | 8 samples per chip, 4 per carrier cycle |
| update interval | 4092 samples | 2 kHz |

## Host link and the channel word

The PC is the master of a Centronics (printer-port) link. For each byte, it
drives `pp_data` and pulses `pp_nstrobe` low. `centronics_rx` synchronises
the strobe and takes the byte, then does three things:

* raises `pp_busy`;
* pulses `pp_nack` low for 41 clocks (about 5 µs);
* drops `pp_busy` once the strobe is high again.

A host that waits for busy to be low before each strobe cannot overrun it.
The receiver takes one byte in about 45 clocks. The design needs only
16 bytes per 0.5 ms.

Each channel's word is 4 bytes, sent most significant byte first:

```
 31      27 26      20   19    18   17                0
 [ sv (5) ] [ amp (7) ] [ovf] [unf] [ code phase 10.8 ]
```

`sv` 0..31 selects SV 1..32. The four channel words follow each other with
no framing, so the position of a byte in the stream says what it is. Holding
`pp_ninit` low restarts the stream at byte 0 of channel 0.
`frame_assembler` puts each complete word into that channel's own register.

At the end of every update interval, each channel takes the word waiting in
its register. If no complete frame arrived during the interval, the old
words are taken again with their wrap flags cleared, so the phase holds
still instead of being unwrapped a second time.

## Interpolation between updates

Every channel holds two values: the previous host value (`prev`, where the
interval starts) and the current one (`cur`, the target). This holds for the
code phase and for the amplitude. When `update` is high (count 4091),
`cur` moves into `prev` and the new word goes into `cur`. The next interval
therefore starts at count 0 exactly on the old target, and there is no jump
in phase.

The code phase for time step *n* = 0..4091 is

    phase(n) = prev + (cur − prev) · n / 4092

`code_interp` works out the product with 8 extra fraction bits. It divides
by 4092 with a reciprocal constant that is wide enough for the quotient to
be exact, truncated toward zero. The output therefore matches the integer
equation bit for bit.

The amplitude ramp (`amp_interp`) is simpler:
`prev + ((cur − prev) · n) >>> 12`. It divides by 4096, not 4092, so it stops
at most one step short of the target before the next interval starts
exactly on it.

### Wrap-around: the subtle part

The host sends phase modulo one code period (0..1023 chips). Say the true
phase moves from chip 1020 to chip 1025 during an interval. It arrives as
1020 → 2. Interpolated as it stands, the phase would sweep backwards through
almost the whole code instead of moving 5 chips forwards.

The host therefore flags such intervals:

* `ovf`: the phase rose through 1022 → 0;
* `unf`: the phase fell through 0 → 1022.

`code_interp` first unwraps the target: it adds 1023 chips to `cur` for
`ovf` and subtracts 1023 chips for `unf`. It then interpolates. The raw
result may now lie outside one code period, so it is folded back. Both
corrected values, +1023 and −1023 chips, are always computed, and the sign
and a compare of the raw value pick one. `wrapped` tells when a fold
happened.

The flags belong to the word they arrive with, so they describe the interval
that ends at that word. The underflow path mirrors the overflow path; both
are tested.

## From phase to table indices

The interpolated line-of-sight phase only says how far the signal is
delayed. The code itself also runs on in time, at one chip every 8 samples.
`time_phase_counter` counts 0..8183, which is one 1 ms code period:

* its upper bits are the chip number;
* its lowest two bits step the carrier through quarter cycles.

`phase_to_index` adds the time phase to the line-of-sight phase and folds
the sum into one code period. It then splits the total phase:

* **code index** = integer chip (bits 25:16), 0..1022;
* **carrier index** = (2 × fraction mod 1) × 256 = fraction bits 14:7. The
  carrier has two cycles per chip and the carrier table has 256 entries per
  cycle.

## Tables

* `code_tables`: 32 read-only tables, one per satellite, of 1023 chips
  each. Each channel chooses a table with its satellite number and reads the
  chip at its code index. The output is registered. The tables are filled
  when the design is built, from the standard C/A Gold code generator:
  * G1 = 1 + x³ + x¹⁰;
  * G2 = 1 + x² + x³ + x⁶ + x⁸ + x⁹ + x¹⁰;
  * both registers start at all ones;
  * chip = G1₁₀ ⊕ G2ₜ₁ ⊕ G2ₜ₂, with the phase-selector taps t1, t2 of each
    PRN.

  Chip 0 is the first chip after the code epoch. The module's default is
  eight channel ports; the top uses four.
* `carrier_rom`: 256 entries per carrier cycle, 8-bit signed. The values
  form a triangle: entry *i* = |i − 128| − 64, so +64 at 0 and −64 at 128.
  This reproduces the table values seen in the original design's
  simulation. It is not a sampled sine. At 4 samples per cycle with no
  Doppler, the carrier visits entries 0, 64, 128 and 192, which gives
  +64, 0, −64, 0. Replace the function `gps_pkg::carrier_value` to use
  another waveform.

## Output sample

`signal_combiner` scales each channel's carrier by its amplitude. It inverts
the product when the C/A chip is 1 (BPSK modulation, where the code flips
the carrier's sign). It sums the four channels and shifts the sum right by
6, which gives the 10-bit two's complement D/A word. One channel at full
scale gives ±127; four give ±508. An offset-binary D/A needs bit 9
inverted.

## Timing

Everything runs on one clock, the 8.184 MHz sample clock, at one sample per
clock. The stages between a time step `cnt` and the outputs are:

| clocks after the time step | result |
|---|---|
| 1 | interpolated phase and amplitude |
| 2 | code index, satellite number, carrier index |
| 3 | code chip, carrier sample, aligned amplitude |
| 4 | `dac_data` |

The satellite number and the amplitude are delayed along with the phase, so
a change made at an update boundary reaches all parts of a sample together.
Reset is synchronous and active high. It clears every register except the
table outputs, which are valid one clock after the first read.

## How far this follows the original design

The following come from the original design description:

* the rates;
* the field widths and the 4-bytes-per-satellite link;
* the interpolation equation and its two-register structure;
* the wrap flags and the correction by alternate values;
* the shift-by-12 amplitude ramp;
* the use of the integer phase for the code and the doubled fraction for
  the carrier;
* the 256-entry carrier table and its values;
* the 32 code tables shared by all channels;
* the phase-due-to-time counter of 8184 samples.

These are choices made for this RTL, because the description leaves them
open:

* the bit packing and byte order of the channel word;
* the handshake timing and the resync on the initialise line;
* the handling of an interval with no new frame;
* the C/A code table contents (the GPS standard) and the satellite
  numbering;
* how channels are modulated, scaled and summed, and the D/A coding;
* reset.

Where the description contradicts itself, this RTL settles it as follows:

* The update interval is 4092 samples (8.184 MHz / 2 kHz). An earlier
  implementation decoded 4092 as the terminal count, which gives 4093
  samples.
* The carrier index doubles the fraction, as two carrier cycles per chip
  require.
* The carrier index is the fraction times 256, not times 255.

Compared with the original implementation:

* The code phase division here is exact. An earlier implementation used an
  approximate reciprocal, so its carrier index sequence can differ in the
  last bit from this one.
* Both the overflow and the underflow correction are built.
* The original computed each sample in a single clock. This RTL keeps one
  sample per clock but pipelines the work over four clocks.

Not built: the PC software; the D/A converter and the differential-to-
single-ended stage; the mixer and its local oscillator; the attenuators; the
diode clamps on the D/A inputs; the navigation message, which the design
leaves for later work. `dac_data` is where the D/A converter connects. The
design has no navigation data, so a receiver can acquire and track the four
satellites but cannot compute a position.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each compares the module against reference arithmetic in
`tb/gps_ref_pkg.sv`, which is written from the equations above and not from
the RTL:

* The C/A reference uses the delayed-G2 form of the code. The first ten
  chips of all 32 PRNs are also checked against the published values.
* `tb_gps_sim_top` runs the whole design at its default size for eight
  update intervals. A host model sends frames over the port. For every
  sample, the testbench checks every channel's code index, chip, carrier and
  amplitude, and the D/A word.
* That run also makes each of these happen at least once: overflow and
  underflow intervals, the 100 → 1022 chip interval, a stale interval, a
  resync after a partial frame, code epochs, and both kinds of fold-back.
* `tb_workload_interp_code` repeats the original design's two reference
  simulations on one channel with no time phase: the code phase ramps from
  chip 100 to chip 1022 over one interval, and channel 1 plays SV 1. Every
  sample's code index, carrier and chip is checked, and the first twenty are
  printed.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gps_pkg.sv tb/gps_ref_pkg.sv tb/tb_gps_sim_top.sv --top-module tb_gps_sim_top
./obj_dir/Vtb_gps_sim_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The
full-size end-to-end run takes well under a second.

## Changing it

* Number of channels: `gps_sim_top` parameter `NUM_CH`. The combiner shift
  (`signal_combiner.SHIFT`) may need to grow with it to keep the D/A word in
  range.
* Update interval: `PERIOD` on `gps_sim_top`. The interpolator derives its
  reciprocal from it. The amplitude ramp keeps its fixed shift of 12, so
  keep `PERIOD` ≤ 4096.
* Word layout: `gps_pkg::chan_word_t`.
* Carrier waveform: `gps_pkg::carrier_value`.
