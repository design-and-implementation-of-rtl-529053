# Pipelined DDS sine generator (48 MHz, 32-bit phase, 8-bit output)

A direct digital synthesizer (DDS) makes a sine wave of any frequency from
one fixed clock. A phase register steps around the circle by a fixed amount
every clock. Its top bits look up a sine sample in a ROM, and an external D/A
converter and low-pass filter turn the samples into an analog sine. The step
size, the *frequency control word* X, alone sets the frequency:

    f_out = f_clk * X / 2^N          resolution  f_clk / 2^N

With f_clk = 48 MHz and N = 32 the resolution is 0.0112 Hz. That is far finer
than the 5 Hz step the generator is specified for, over its range of
0 to 160 kHz. A user types the frequency on a keypad. The design converts it
to X, applies it without a phase jump, and shows it on six seven-segment
digits. The output is an 8-bit unsigned sample on every clock.

```
 keys ──► freq_control ──fcw[31:0]──► phase_accumulator ──phase[31:24]──► sine_rom ──► dac_data[7:0] ──► (DAC, LPF: off chip)
              │                        (4 x 8-bit pipelined)                (256 x 8)
              └──disp_bcd──► led_display ──► seg[6][7] ──► (LED digits)
                                  all on one clock, clk = 48 MHz
```

## Files

| file | what it is |
|------|------------|
| `rtl/dds_pkg.sv` | Shared constants (clock, widths, range) and the key-code enum. |
| `rtl/phase_accumulator.sv` | 32-bit accumulator, pipelined in four 8-bit slices. |
| `rtl/sine_rom.sv` | 256 x 8 sine table, computed at elaboration, with a registered read. |
| `rtl/freq_control.sv` | Keypad entry, Hz to control-word conversion, value for the display. |
| `rtl/led_display.sv` | BCD to seven-segment decoder for six digits. |
| `rtl/dds_top.sv` | Top level: wires the blocks above together. |
| `tb/tb_*.sv` | One self-checking testbench per module. `tb_dds_top` runs the whole design at its default parameters. |

## The pipelined phase accumulator

This block is the speed-critical part. A 32-bit add in one clock has a
32-bit carry chain. So the adder is cut into four 8-bit slices, one per
pipeline level. Each slice has three parts:

* an 8-bit adder;
* an 8-bit sum register;
* a 1-bit carry register.

The carry register feeds the slice above on the *next* clock. The longest
combinational path is then one 8-bit add.

As a result, slice *i* works *i* clocks behind slice 0. Two triangles of
registers keep the 32-bit word consistent:

```
             input skew          slices              output deskew
 fcw[7:0]   ───────────────►  [+ acc0] ─c─┐   ──►  3 regs ──► phase[7:0]
 fcw[15:8]  ──► 1 reg  ─────►  [+ acc1] ◄─┘ ─c─┐ ──► 2 regs ──► phase[15:8]
 fcw[23:16] ──► 2 regs ─────►  [+ acc2] ◄─────┘ ─c─┐ ─► 1 reg ─► phase[23:16]
 fcw[31:24] ──► 3 regs ─────►  [+ acc3] ◄─────────┘ ──────────► phase[31:24], wrap = carry out
```

* **Input skew.** Byte *i* of X is delayed *i* clocks. It therefore meets the
  carry from the same accumulation step.
* **Output deskew.** Sum byte *i* is delayed 3 − *i* clocks, so all four bytes
  of `phase` come from the same step.

In effect `phase` is an ordinary 32-bit accumulator delayed by three clocks,
and a change of X is also seen as a whole, three clocks later. This keeps the
phase continuous when the frequency changes. The top byte, the only one the
ROM needs, comes straight from the last slice. The deskew registers for the
lower bytes exist only to give a true 32-bit phase output. `wrap` is the carry
out of the top slice. It pulses once per output period, in step with `phase`.

With X = 7 from reset, `phase` reads 0 for the three fill clocks. It then
counts 0, 7, 14, … 126 on consecutive clocks. `SLICE_W` can be changed to
any divisor of `N`; the number of levels follows.

## Sine table

`sine_rom` holds one period at 256 points, addressed by `phase[31:24]`. Each
entry is in offset binary:

    data[k] = round(127.5 * (1 + sin(2*pi*k/256)))      (0 … 255, 128 at k = 0)

A constant function computes the table with `$sin` during elaboration. No
data file is needed, and synthesis infers an initialised ROM (2048 bits). The
read is registered, as in an FPGA block ROM: the sample appears one clock
after its address. `AW` and `DW` parameterise the table size and the amplitude
width. Only the top 8 of the 32 phase bits are used, so the phase truncation
spurs of an 8-bit-address DDS apply. The fine frequency resolution is kept
because the full 32-bit phase keeps accumulating.

## Frequency entry and display (`freq_control`, `led_display`)

Keys arrive already decoded: `key_valid` is a one-clock strobe and `key_code`
is a `dds_pkg::key_code_t`. The keyboard interface is not part of this RTL.

| key | effect |
|-----|--------|
| `KEY_0`…`KEY_9` | Shifts a digit in from the right. At most 6 digits are kept; a seventh is ignored. The first digit after ENTER starts a new entry. |
| `KEY_ENTER` | Applies the entry. Values above 160000 are clamped to 160000, and the display then shows 160000. `fcw` and `freq_hz` are updated on this clock edge. |
| `KEY_CLEAR` | Zeroes the entry on the display. The frequency in use is unchanged. |

The conversion is `fcw = round(f * 2^32 / 48e6)`. It is done without a
divider, as a multiplication by the constant `M = round(2^72 / 48e6)` with 40
fraction bits, followed by rounding. The error of this constant stays below
2e-7 of an LSB for every frequency below 2^18. The exact quotient
`2^22*f/46875` is never closer than 1/93750 to a half, so the rounding is
exact. Some worked values: 10 kHz gives 894785, and 160 kHz gives 14316558.
Because of the 160 kHz limit, `fcw[31:24]` is always zero.

`led_display` drives six static common-cathode seven-segment digits. The
segment order is `{g,f,e,d,c,b,a}`, bit 0 = a, active high. Codes 10–15 are
blank. Digit 0 of the arrays is the least significant.

## Top-level interface and timing (`dds_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | System clock, 48 MHz. |
| `rst_n` | in | 1 | Asynchronous active-low reset. Everything goes to 0, so the output is 0 Hz. |
| `key_valid`, `key_code` | in | 1, 4 | Decoded key press. |
| `dac_data` | out | 8 | Sine sample for the D/A converter, one per clock. |
| `seg` | out | 6 x 7 | LED segments. |
| `fcw`, `freq_hz` | out | 32, 18 | Control word and frequency in use. |
| `cycle_done` | out | 1 | Accumulator overflow: one output period completed. |

Latency from the ENTER clock edge to the first sample at the new frequency is
5 clocks: 1 add, 3 for slice alignment, and 1 for the ROM read.
`dac_data` at a clock edge equals `ROM[A[31:24]]`, where `A` is the plain
accumulator value 4 clocks earlier. `cycle_done` leads the sample taken at the
wrapped phase by one clock. Parameters of the top: `FCLK_HZ` (48000000),
`N` (32) and `DW` (8).

## What is specified and what is this design's own

**Taken from the specification:**

* the block structure: input and display control, phase accumulator, lookup
  ROM, D/A converter, and filter;
* the 48 MHz clock;
* N = 32, pipelined as four 8-bit slices, each with an 8-bit adder, an 8-bit
  register and a 1-bit carry register;
* 8-bit ROM address from the top phase bits;
* 8-bit amplitude spanning 0…255;
* the 0–160 kHz range (one summary of the design says 150 kHz; 160 kHz is
  used here).

**Chosen here:**

* the input-skew and output-deskew arrangement and the resulting 3-clock
  alignment delay;
* the registered ROM read;
* the exact sine rounding formula;
* the reset, active low and asynchronous;
* the key set and the entry procedure;
* the clamp at 160 kHz;
* the six-digit seven-segment display.

**Not in the RTL:**

* The keypad hardware and its scanning. The top takes decoded keys.
* The D/A converter, the low-pass filter and the clock oscillator. These are
  analog or board parts. `dac_data` is the interface to the converter.

## Verification

Each testbench compares against a model written independently of the RTL.
Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_phase_accumulator`:
  * the 0, 7, 14, … 126 sequence;
  * words that carry through all slices;
  * 3000 random words held for random lengths, checked every clock against a
    one-step 32-bit model delayed 3 clocks, including `wrap`.
* `tb_sine_rom`:
  * all 256 addresses and 2000 random addresses against a real-valued sine;
  * the one-clock latency;
  * the extremes 0 and 255.
* `tb_freq_control`:
  * fcw against 64-bit integer rounding for 2000 random frequencies and the
    range edges;
  * clamping, the seventh digit, and CLEAR;
  * that a 5 Hz step changes fcw, at 33 points across the range;
  * the display digits.
* `tb_led_display`: every code on every position, against patterns built from
  the list of lit segments.
* `tb_dds_top` runs at the default parameters. It follows the same key
  presses with a full model and checks `dac_data`, `fcw` and `cycle_done` on
  every clock, plus the LED segments. The sequence:
  1. reset, 0 Hz;
  2. 10 kHz for two full periods (9600 clocks, 2 overflows);
  3. 999999 typed, clamped to 160 kHz, for 3000 clocks (about 10 periods);
  4. CLEAR, and a seven-digit entry;
  5. 12345 Hz, then 5 Hz, then 0 Hz.

  It counts digit entries, ENTER, clamp, CLEAR, ignored digits, overflows and
  frequency switches, and fails if any count is zero.

Simulating one testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/dds_pkg.sv tb/tb_dds_top.sv --top-module tb_dds_top -o sim
./obj_dir/sim
```

Replace `tb_dds_top` with any other testbench name. All of them finish in
well under a second.

## Limits

* The speed gain of the pipelined accumulator is a timing claim, and it was
  not measured here. The RTL is functionally checked only.
* No spectral-purity analysis of the 8-bit-address, 8-bit-amplitude output
  was made.
