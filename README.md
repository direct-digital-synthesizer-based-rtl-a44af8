# A direct digital synthesizer for an FPGA

A direct digital synthesizer (DDS) makes a sine wave of programmable frequency and
amplitude from a fixed clock, entirely with digital logic. It needs no analog
oscillator. This RTL is the digital half of such a generator. It runs at 125 MHz and
sends one 14-bit word per clock to a 125 MSPS digital-to-analog converter (DAC). A
low-pass filter after the DAC smooths the steps into a sine.

| | |
|---|---|
| output frequency | `f_out = M * 125 MHz / 65536`, so 1.907 kHz steps |
| frequency tuning word `M` | 16 bits; useful up to about 50 MHz (M = 26214) |
| amplitude tuning word | 16 bits; output swing is proportional to it |
| DAC word | 14 bits, offset binary; one code is 61.04 µV at 1 V full scale |
| registers (outside the ROM) | 62: 16 + 16 + 16 + 14 |
| ROM | 4096 x 16 bits, as 8 banks of 512 x 16 (65536 bits) |
| multiplier | one 16 x 16, one FPGA DSP block |

```
            ftw_in/ftw_load   atw_in/atw_load
                  |                 |
            +-----v-----------------v-----+
            |       tuning_register       |
            +-----+-----------------+-----+
                M |                 | atw
          +-------v--------+        |
          |phase_accumulator|       |
          | phase += M      |       |
          +-------+--------+        |
       phase[15:4]|                 |
          +-------v--------+  +-----v------------+
          |   sine_rom     +-->amplitude_control+--> dac_data[13:0] --> DAC --> LPF --> out
          | 4096 x 16      |  | (s*atw)[31:18]   |
          +----------------+  +------------------+
```

## The phase accumulator and what M does

The core of the DDS is a 16-bit register that grows by `M` on every clock and wraps
around modulo 65536. Read its value as a position on the circle of one sine period,
where 65536 is a full turn. One turn then takes `65536 / M` clocks, which gives the
frequency formula above. Frequency is a purely digital ratio: it is exactly as
accurate as the clock.

Only the 12 most significant phase bits address the ROM. The 4 bits below them are a
fractional phase. They carry the part of the step that is smaller than one table
entry, so the average frequency stays exact even when the address cannot follow it
exactly:

- **M < 16**: the address advances by less than one entry per clock, so each sample
  appears `16 / M` times in a row. At M = 1 the output is 1.907 kHz, with each sample
  repeated 16 times.
- **M = 16**: every one of the 4096 samples is used once per period.
- **M > 16**: samples are skipped. The period is made of `65536 / M` samples, for
  example 32 samples at M = 2048, 8 at M = 8192 (15.6 MHz) and 4 at M = 16384
  (31.25 MHz). When `65536 / M` is not a whole number, successive periods start at
  different fractions of a sample. The DAC then sees slightly different sample sets
  from period to period, and the short-term period jitters by a clock.

Fewer samples per period mean larger steps in the DAC output, which the low-pass
filter has to remove. This is why signal quality falls as M grows. Keep M well below
the Nyquist limit of 32768, where there would be only 2 samples per period. About
26214 (50 MHz) is the practical top.

The accumulator has no fractional-phase dithering and no phase offset input. The wrap
is plain modulo arithmetic: the part of the step that carries past zero is kept, so no
phase is lost at the overflow. The module also has a `wrap` output, high for one clock
after each overflow. It is there for testing; `dds_top` leaves it open.

## The sine table

`sine_rom` holds one full period:

```
rom[k] = round(32768 + 32767 * sin(2*pi*k / 4096)),   k = 0 ... 4095
```

The values run from 1 to 65535, with mid-scale 32768 at k = 0. The table is split into
8 banks of 512 words. The top 3 address bits pick the bank and the low 9 bits pick the
word inside it. On an FPGA whose embedded RAM blocks hold 512 x 16 words, each bank is
exactly one block. The 3-bit bank number is registered next to the bank outputs and
drives an 8:1 mux. The read latency is one clock.

The contents are computed when the design is elaborated, in an `initial` loop that
uses `$sin`, so no data file is needed. A synthesis tool that cannot evaluate `$sin`
there needs an initialisation file made from the same formula. The table is a full
period, with no quarter-wave folding, so it uses 4x the memory a folded table would.
It needs no address or sign logic, though.

## Amplitude control and the DAC word

`amplitude_control` multiplies the 16-bit sample by the 16-bit amplitude tuning word.
It keeps the top 14 bits of the 32-bit product, `(sample * atw) >> 18`, truncated
without rounding, and registers the result. At `atw = 0xFFFF` the output spans codes
0 to 16383.

Both operands are unsigned. The samples are offset binary, and the product goes
straight to a DAC taking straight binary input. One consequence matters when you use
the output: the word scales the DC level of the output along with its swing. At
`atw = 0x8000` the wave runs from about 0 to 8191 around 4096, not around 8192.
An AC-coupled DAC output (a transformer, for instance) removes this offset. With a
DC-coupled output, either re-centre the wave or change the table to two's complement
and the multiplier to signed.

The amplitude word has finer steps than the DAC can show. The smallest visible change
of the output is one DAC code, 61.04 µV for a 1 V full-scale range. Very small
amplitude words give only a few codes of swing, so expect visibly distorted output
below about a tenth of full scale.

## Timing

Everything is in one clock domain and every stage is registered:

| edge | what happens |
|---|---|
| 0 | `ftw_load` high: the new M is stored |
| 1 | the phase first moves by the new M |
| 2 | the ROM returns the sample for that phase |
| 3 | `dac_data` shows it |

A new amplitude word reaches `dac_data` two edges after its load edge. `rst` is
synchronous and active high. It clears both tuning words and the phase, so
`dac_data` reads 0 from the third clock of reset. The ROM output and the DAC register
have no reset; they are flushed while reset is held.

The combinational paths are one 16-bit adder, one memory read followed by an 8:1 mux,
and one 16 x 16 multiply. A 125 MHz clock is comfortable for a mid-range FPGA. The
clock is meant to come from a PLL that multiplies a 50 MHz board oscillator up to
125 MHz, the DAC's top rate. The same clock must clock the DAC.

## Loading the tuning words

`tuning_register` stores the frequency and amplitude words, each with its own
`*_load` strobe. The synthesizer keeps running with the last values loaded. How a user
enters the words (switches, push buttons, a processor bus) is left to the design
around `dds_top`. Anything that produces a 16-bit value and a one-clock strobe
synchronous to `clk` will do. Reset values are 0 for both words, which gives a
silent output.

## Outside this RTL

These parts are assumed, not provided:

- a **PLL** for the 50 → 125 MHz clock; drive `clk` from it.
- a **14-bit, 125 MSPS DAC** with straight-binary input, clocked by `clk`. A dual DAC
  of the AD9767 class on an FPGA daughter board is the intended part.
- an **analog low-pass filter** after the DAC. With a passband of about 48 MHz,
  spurs fall by about 40 dB while the fundamental loses about 1 dB. Near 50 MHz that
  filter already attenuates the signal noticeably, so a wider filter is needed to use
  the full range.

## Choices made here

The design fixes the word widths (16-bit phase, 12-bit address, 16-bit samples,
16-bit words, 14-bit DAC), the 8 x 512 x 16 ROM organisation, the 16 x 16 multiply
with the top 14 bits kept, and the clock. The following were chosen in this RTL:

- the exact sine formula and offset-binary coding of the samples;
- unsigned multiplication, with the DC level scaling with amplitude, as above;
- a one-clock ROM latency and a registered DAC word, giving 3 clocks from M to output;
- separate load strobes for the two tuning words, and synchronous reset to zero;
- the `wrap` flag on the accumulator.

On register count: 16 (M) + 16 (amplitude) + 16 (phase) + 14 (DAC word) is 62, as
targeted. The 3-bit bank select adds 3 more. A synthesis tool can usually fold it
into the memory output stage.

## Files

| file | contents |
|---|---|
| `rtl/dds_pkg.sv` | widths and clock rate shared by all modules |
| `rtl/tuning_register.sv` | frequency and amplitude word registers |
| `rtl/phase_accumulator.sv` | 16-bit phase accumulator, 12-bit address out |
| `rtl/sine_rom.sv` | 4096 x 16 sine table in 8 banks |
| `rtl/amplitude_control.sv` | 16 x 16 multiply, top 14 bits, registered |
| `rtl/dds_top.sv` | the four above wired together |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `dds_sweep_tb` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Every one has
a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/dds_pkg.sv tb/dds_top_tb.sv --top-module dds_top_tb
./obj_dir/Vdds_top_tb
```

To run another bench, change the testbench name (use `-Mdir` to keep builds apart).
All of them run in well under a second at the full default sizes.

- `tuning_register_tb`, `phase_accumulator_tb`, `sine_rom_tb`, `amplitude_control_tb`
  compare each module with an independent reference:
  - the phase as an integer modulo 65536, with wrap periods of 65536/M clocks;
  - all 4096 ROM words against the formula, plus half-period symmetry and monotonic
    rise;
  - the product truncated to 14 bits, including the full-scale value 16383.
- `dds_top_tb` runs a cycle-accurate reference model next to the whole design and
  compares every DAC word. On top of that it checks:
  - the 3-clock latency from a new M;
  - the output frequency at M = 8192, 16384, 26214, 2048, 7 and 1, by counting
    mid-level crossings;
  - linear peak-to-peak swing for 13 amplitude words from 0 to full scale.

  It also confirms that phase overflow, repeated samples (M < 16), skipped samples
  (M > 16), frequency changes and amplitude changes all occur.
- `dds_sweep_tb` steps M through 1, 2, 4 … 16384. For each M it checks:
  - the number of periods;
  - the number of distinct samples per period (`min(4096, 65536/M)`);
  - full-scale swing.

The testbenches keep all tables and data in the code. None of them reads a file.

## Changing it

The widths are parameters, with defaults taken from `dds_pkg`:

- **Finer frequency steps**: widen `PHASE_W`. The step is `f_clk / 2^PHASE_W`, and
  the address stays the top `ADDR_W` bits.
- **A different table size**: change `ADDR_W` and/or `BANK_ADDR_W`.
- **A different DAC**: change `DAC_W`.

The testbenches assume the default widths, except where they set parameters
themselves.
