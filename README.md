# Multi-type digital modulator built on one 256-sample sine table

This is a real-time digital modulator that generates eleven keying schemes
through one 8-bit output. The output drives an external 8-bit DAC. The schemes
are ASK, FSK, BPSK, DPSK, 4-ASK, 4-FSK, QPSK, DQPSK, 8-PSK, 8-QAM and 16-QAM. A
serial bit stream comes in on `din`, a 4-bit `sel` picks the scheme, and every
scheme comes out of the same small table: one cycle of a sine wave stored as
256 unsigned 8-bit samples.

The idea is that every keying scheme in the list changes only three things
about a carrier cycle:

| what changes | how it is made from the table |
|---|---|
| phase | start reading the table at sample *p* instead of 0 (256 samples = 360 degrees) |
| frequency | step through the table 2, 3 or 4 times faster, so that more cycles fit into a symbol |
| amplitude | pull the sample toward mid-scale 0x80 by a fixed factor |

So a modulation type is only a lookup from a symbol code to a
(start sample, step rate, gain) triple, called `carrier_cfg_t` in
`rtl/mod_pkg.sv`. There is no mixer, no NCO with fine frequency control and
no I/Q datapath. The output is the sampled passband waveform itself.

## The sine table

`sine_lut` holds

    ROM(n) = floor(127.5 + 127.5 * sin(2*pi*n/256)),   n = 0 .. 255

with samples 0 and 128 set to exactly 0x80. The wave starts at mid-scale 0x80,
peaks at 0xFF (n = 64), crosses 0x80 again at n = 128 and bottoms at 0x00
(n = 192). The values run 80 82 85 88 8B 8F ... and, past the half cycle,
82 80 7C 79 .... A constant function computes the table at elaboration, so
synthesis sees a plain 256 x 8 ROM and there is no data file.

## Timing: symbols, sample strobes and latency

This part needs the most care when you change the design.

There is one clock: the 50 MHz source clock, 20 ns. The derived clocks of the
original scheme (CLK1 to CLK4, the bit clock and the symbol clock) are one-clock
enable pulses from `bit_rate_gen`. Each divider pulses on the last clock of its
period. All dividers restart while `st` is low, and every period divides the
symbol length, so they stay locked to symbol boundaries.

A symbol is always **256 x SAMPLE_DIV clocks**. At the base rate the carrier
moves one table sample every `SAMPLE_DIV` clocks, which is one carrier cycle
per symbol. A faster sample strobe plays several whole cycles in the same
symbol.

| design | `SAMPLE_DIV` | symbol | bits/symbol | bit period | symbol rate |
|---|---|---|---|---|---|
| one (binary) | 8 | 2048 clk = 40.96 us | 1 | 2048 clk | 24414.06 baud |
| two (quaternary) | 12 | 3072 clk = 61.44 us | 2 | 1536 clk | 16276.04 baud |
| three (8-ary, 16-QAM) | 12 | 3072 clk | 3 or 4 | 1024 or 768 clk | 16276.04 baud |

Design one's 8 clocks per sample comes from choosing 24414.06 baud:
50 MHz / (256 x 24414.06) = 8. Designs two and three use 12 for a reason.
4-FSK needs sample strobes at 1x, 2x, 3x and 4x the base rate, and 8-ary
symbols need a bit period of a third of a symbol. Both are whole numbers of
clocks only when `SAMPLE_DIV` is a multiple of 12 (two) or 3 (three). Every
module checks its divider with an elaboration-time assertion. The baud-rate
table of the original scheme uses 640, 320, 160, 80, 40 and 20 clocks per
sample. `design_one` accepts all of them. They give 305.18 to 9765.62 bit/s,
that is 50 MHz / (256 x divider), not the round 300 to 9600.

Data path of one symbol:

1. `din` is sampled on the clock where `bit_stb` is high, the last clock of
   each bit period. Drive the next bit any time after that edge. The first
   bit of a symbol becomes the code's MSB.
2. On the last clock of the symbol, `baud_rate_gen` moves the collected bits
   into the code register `b`. It also updates the differential code
   `bx <= bx XOR b`.
3. During the **next** symbol period that code selects (start sample, rate,
   gain). The sample index restarts at 0 and `dout` is registered, so each
   sample appears one clock after the cycle that addresses it.

So a symbol goes out one symbol period after its bits arrived. The first
symbol period after `st` rises sends code 0. While `st` is low, `dout` rests
at 0x80 and all counters and codes are cleared.

## Code tables

The start sample is round(phase x 256 / 360). Gain is Q1.8: 256 = full,
85 ~ 0.33, 197 ~ 0.77. Unless a row says otherwise, amplitude is full and there
is one carrier cycle per symbol.

**Design one** (`sel[1:0]`, 1 bit per symbol)

| sel | type | code 0 | code 1 |
|---|---|---|---|
| 00 | ASK | no carrier (0x80) | sine from sample 0 |
| 01 | BPSK | start 0 | start 128 (180 deg) |
| 10 | DPSK | as BPSK, on the differential code | |
| 11 | FSK | 1 cycle (8 clk/sample) | 2 cycles (4 clk/sample) |

**Design two** (2 bits per symbol)

| sel | type | 00 | 01 | 10 | 11 |
|---|---|---|---|---|---|
| 00 | 4-ASK | 0 | 1/4 | 1/2 | full |
| 01 | 4-FSK | 1 cycle | 2 cycles | 3 cycles | 4 cycles |
| 10 | QPSK | 225 deg (160) | 135 deg (96) | 315 deg (224) | 45 deg (32) |
| 11 | DQPSK | QPSK on the differential code | | | |

**Design three** (`sel` 00 and 01: 3 bits; `sel` 1x: 4 bits)

- 8-PSK, Gray-coded at 22.5 + 45k degrees: 000 16, 001 48, 011 80, 010 112,
  110 144, 111 176, 101 208, 100 240.
- 8-QAM: bits [2:1] give the quadrant phase (11 45 deg, 10 135, 00 225,
  01 315) and bit 0 the amplitude (1 full, 0 0.33).
- 16-QAM: a square constellation. Bit 3 is the sign of the in-phase axis and
  bit 2 the sign of the quadrature axis. Bits [1:0] pick the point within the
  quadrant: 11 outer corner (1.0), 00 inner corner (0.33), 10 edge point 15
  degrees from the in-phase axis (0.77), 01 edge point 15 degrees from the
  quadrature axis (0.77). The start samples are 0B, 20, 35, 4B, 60, 75, 8B,
  A0, B5, CB, E0 and F5 (hex). The edge points sit at 15/75 degrees and
  amplitude 0.77, a rounding of the exact square-grid values (18.4 degrees,
  0.745).

The 1/4 and 1/2 steps are exact arithmetic right shifts about mid-scale.
`amp_scaler` computes `0x80 + floor((s - 0x80) * gain / 256)`, which reduces
to those shifts and also covers 0.33 and 0.77.

## Top level: `mod_system_top`

| `sel[3:2]` | block | `sel[1:0]` |
|---|---|---|
| 00 | `design_one` | ASK / PSK / DPSK / FSK |
| 01 | `design_two` | 4-ASK / 4-FSK / QPSK / DQPSK |
| 10 | `design_three` | 8-PSK / 8-QAM / 16-QAM / 16-QAM |
| 11 | idle | `dout` = 0x80 |

Each design module has a complete carrier generator of its own, so it can be
used alone. It also brings its carrier settings and strobes out on `car_cfg`,
`car_sym_stb` and `car_tick`. The top uses these: it multiplexes the selected
design's settings into **one shared carrier generator**, so the whole system
has a single sine table. The designs' own generators are left unconnected and
synthesis removes them.

Only the selected design receives `st`. When `sel[3:2]` changes, everything
is held stopped for one clock, and `dout` shows 0x80 during that clock. The
newly chosen design then starts from a fresh symbol, exactly as if `st` had
just risen, including its differential code and its first code-0 symbol.
This holds even if `st` stays high. Changing `sel[1:0]` with `st` high
changes the mapping at once and keeps the bit stream running. Design three is
the exception: there `sel[1]` also changes the number of bits per symbol.

Ports: `clk`, `rst_n` (asynchronous, active low), `st`, `din`, `sel[3:0]`,
`bit_stb` (when `din` is sampled) and `dout[7:0]` (to the DAC).

## Where this RTL departs from, or fills in, the original scheme

- **Clocking.** The original derives separate clocks. Here everything is in
  one clock domain with enable strobes.
- **DPSK / DQPSK encoder.** The original only says that an XOR of the
  captured bit and DIN produces the differential bit. This RTL uses the
  standard recursive encoder `bx(k) = bx(k-1) XOR b(k)`, bit by bit for DQPSK.
- **QPSK start samples.** These follow from the phases by the same rule as
  the 8-QAM table: 45, 135, 225 and 315 deg become samples 32, 96, 160 and
  224.
- **16-QAM lower half-plane.** The eight codes from 195 to 345 deg mirror
  the upper half-plane codes (1110 at 15 deg round to 0110 at 165 deg), as
  described above. This symmetry is this design's.
- **Rates of designs two and three.** These were not given. They are 12
  clocks per sample (16276 baud), as explained in the timing section.
- **SEL coding.** Only the 2-bit codes of each design are given, and the
  4-bit split is this design's. Design three's unused code 11 acts as 16-QAM.
- **`bit_stb` output, one-symbol latency, mid-scale idle output and clear
  on `st` low** are all this design's choices.
- **Not included:** the external 8-bit DAC board. `dout` is its input, with
  0x00 to 0xFF mapping to 0 to 5 V.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The expected waveform comes from
`tb/tb_mod_ref_pkg.sv`, which works from first principles. It builds the sine
from the formula, scales amplitudes in real arithmetic and derives each
scheme's code table from phases in degrees. 16-QAM is derived from the
constellation geometry. Each sample is compared on every clock.

| testbench | what it covers |
|---|---|
| `tb_sine_lut` | all 256 entries, plus the landmarks 0x80 / 0xFF / 0x80 / 0x00 |
| `tb_amp_scaler` | every sample at all six gains |
| `tb_bit_rate_gen` | strobe positions, counts per symbol, restart on `st` |
| `tb_baud_rate_gen` | 1-, 2- and 4-bit codes and the differential code |
| `tb_carrier_gen` | random phase, gain and 1/2/4 cycles per symbol |
| `tb_design_one/two/three` | every type, every code, bit strobes, latency |
| `tb_design_one_baud` | design one at the baud-rate table's dividers (640 ... 20) and at 8, with a 50 MHz clock; measures the bit period |
| `tb_mod_system_top` | all eleven types at default sizes; live type switches in designs one and two; design switches with `st` low and with `st` high; idle. It counts each of these and fails if one never happened |

To simulate, for example, the full system:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mod_pkg.sv tb/tb_mod_ref_pkg.sv tb/tb_mod_system_top.sv \
        --top-module tb_mod_system_top
    ./obj_dir/Vtb_mod_system_top

Run it from the folder that holds `rtl/` and `tb/`. The other testbenches
build the same way, with their own file and top module. The full-system run
takes about a second.

## Changing it

- **Baud rate.** Set `SAMPLE_DIV` on a design. It must be even for design
  one, a multiple of 12 for design two and a multiple of 3 for design three.
- **Output width or table length.** `sine_lut` is parameterised. The rest of
  the datapath assumes 8-bit samples and 256-entry addressing, as in
  `mod_pkg`.
- **New code tables.** Edit the `always_comb` mapping in the design module,
  and the matching entry in `tb_mod_ref_pkg::cfg`.
