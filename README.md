# Look-up-table sine wave generator

This design generates a sine wave in the simplest way there is. One period of
a sine is sampled at N evenly spaced phases. The samples are stored in a small
ROM. A counter reads the ROM one address per clock and wraps at the end of the
period. The ROM output *is* the waveform: one unsigned sample per clock, ready
for a DAC or a logic analyser.

With the default 32 points, 8-bit samples and a 10 ns clock, one period takes
32 × 10 ns = 320 ns, i.e. a 3.125 MHz sine. The output frequency is always

    f_out = f_clk / NUM_POINTS

so a different frequency comes from a different clock or a different point
count. The amplitude comes from the table scaling. Both are parameters.

The whole generator is 13 flip-flops at the default size (a 5-bit counter and
an 8-bit sample register) plus a 32 × 8 ROM.

## Block diagram

```
            +--------------------+  addr   +-------------------+
  clk ----->| sine_addr_counter  |-------->| sine_rom          |----> sine_out[DATA_W-1:0]
  rst ----->| 0,1,...,N-1,0,...  |  ADDR_W | N x DATA_W words, |
            +--------------------+         | registered read   |
                                           +-------------------+
```

| File | Contents |
|------|----------|
| `rtl/sine_pkg.sv` | default sizes and the sample formula (used only at elaboration) |
| `rtl/sine_addr_counter.sv` | modulo-N phase counter |
| `rtl/sine_rom.sv` | the sine table, computed from the formula, with a registered read |
| `rtl/sine_wave_gen.sv` | top level: counter + ROM |

## The sine table

Word *i* of the ROM holds

    sample(i) = round( (MAX_AMP / 2) · (1 + sin(2π·i / NUM_POINTS)) )

with halves rounded up. The samples are unsigned (offset binary). Phase 0 is
mid scale, the crest is MAX_AMP and the trough is 0. For the defaults
(NUM_POINTS = 32, MAX_AMP = 255) this gives:

```
128 152 176 198 218 234 245 253
255 253 245 234 218 198 176 152
128 103  79  57  37  21  10   2
  0   2  10  21  37  57  79 103
```

The table is not stored as a data file. `sine_rom` calls the formula in
`sine_pkg` from a constant function while it is elaborated. It uses the
`$sin` real-math system function. Synthesis sees only the resulting constant
array. A new point count or amplitude therefore needs only new parameter
values. The array is padded to a power of two (2^ADDR_W words), and the words
past NUM_POINTS read as 0; the counter never addresses them.

The output width is `DATA_W = clog2(MAX_AMP + 1)`: 8 bits for 255, 9 for 300,
11 for 1500 or 2000.

If the point count is not a multiple of 4, the crest and trough fall between
samples. The output then never reaches exactly 0 or MAX_AMP, but it stays
symmetric about mid scale. For example, with 10 points and MAX_AMP = 2000 it
swings from 49 to 1951.

## Timing

- **Reset.** `rst` is synchronous and active high. It holds the counter at
  address 0. From the second clock of reset, `sine_out` shows sample 0 (mid
  scale: 128 at the defaults).
- **Start.** The first rising edge after `rst` falls presents sample 0 as the
  start of a period. Sample *i* follows *i* clocks later.
- **Repeat.** The sequence repeats every NUM_POINTS clocks with no gap.
  `sine_addr_counter.wrap` is high in the cycle in which the last address is
  read. The top leaves it unconnected.
- **Latency.** The ROM read is registered, so `data` follows `addr` by one
  clock. Inside the top that register is the output register, and nothing
  combinational follows it.
- **Critical path.** The only combinational paths run from the counter
  through the table decode and the counter's increment-and-compare. Both are
  only a few levels deep.

## Parameters

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `NUM_POINTS` | 32 | samples per period; sets f_out = f_clk / NUM_POINTS |
| `MAX_AMP` | 255 | full-scale sample value (the crest) |
| `DATA_W` | clog2(MAX_AMP+1) = 8 | output width |

These are the configurations the design is meant to cover. All of them run in
`tb/tb_sine_wave_gen_table2.sv`:

| Points | MAX_AMP | Clock | Period | f_out |
|-------:|--------:|------:|-------:|------:|
| 32 (default) | 255 | 10 ns | 320 ns | 3.125 MHz |
| 100 | 300 | 10 ns | 1000 ns | 1 MHz |
| 200 | 1500 | 1 ns | 200 ns | 5 MHz |
| 1000 | 500 | 1 ns | 1000 ns | 1 MHz |
| 20 | 1000 | 1 ns | 20 ns | 50 MHz |
| 10 | 2000 | 1 ns | 10 ns | 100 MHz |

The 1000-point row is sometimes listed as a 10 MHz setting. By the rule
f_out = f_clk / N it is 1 MHz, and that is what simulation measures. For
10 MHz at a 1 ns clock, use 100 points. The rows with a 1 ns clock assume
logic that closes timing at 1 GHz. That is a property of the target device,
and the RTL says nothing about it.

## Departures and own choices

The counter, the ROM, the 32-point / 255 table, the 8-bit output and the
one-sample-per-clock rate are the design as specified. The following points
were not specified, and these choices were made here:

- **Reset pin.** The generator was specified with only a clock input and an
  8-bit output. The synchronous `rst` input is an addition, so that the phase
  at start-up is known. Without it the counter would start at whatever value
  the registers power up with. It would still be correct after at most one
  period.
- **Registered ROM read.** The 13-register count implies one, but it was
  never stated directly.
- **Table formula.** The reference values were produced by an external
  table generator, and no formula was given. The formula above reproduces
  every reference value exactly.
- **Counter width.** The counter counts 32 values, so it is 5 bits wide.
  Non-power-of-two point counts wrap on an explicit compare with N−1.

These parts are not included:

- **Vendor DDS core.** A vendor DDS IP core, configured for sine and cosine
  outputs with an AXI-Stream phase input, is an alternative way to make the
  same waveform. It is vendor-generated, its internals are not available,
  and it is not part of this generator.
- **On-chip debug cores.** The debug cores used to watch the output on the
  board (a logic analyser and virtual I/O) are not included.
- **Analog amplifier.** The CMOS common-source amplifier that was shown next
  to the generator is an analog circuit with no digital function.

## Verification

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb/tb_sine_addr_counter.sv` | 32-point and 10-point counters. It checks the address sequence, that `wrap` is high exactly on N−1, and a mid-period reset, all against a reference counter. |
| `tb/tb_sine_rom.sv` | Default ROM against the reference table above, with an in-order sweep and random reads. A 100-point, MAX_AMP = 300 ROM is checked against the formula computed in the testbench, against its symmetry (s[i] + s[i+50] = 300 ± 1), and at its crest and trough. |
| `tb/tb_sine_wave_gen.sv` | Whole generator at its default parameters with a 10 ns clock. It checks every sample over four periods and measures the period (320 ns) and the frequency (3.125 MHz). It then resets mid-period and checks the restart. It counts the period wrap-arounds and the resets, and fails if either never happened. |
| `tb/tb_sine_wave_gen_table2.sv` | The five other configurations in the table above, each with its own clock. It checks every sample over two periods, the measured period and the output range. |

To run one with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/sine_pkg.sv rtl/sine_addr_counter.sv rtl/sine_rom.sv rtl/sine_wave_gen.sv \
  tb/tb_sine_wave_gen.sv --top-module tb_sine_wave_gen
./obj_dir/Vtb_sine_wave_gen
```

Every testbench finishes in well under a second.

## Changing the design

- **New frequency or amplitude.** Override `NUM_POINTS` and `MAX_AMP` on
  `sine_wave_gen`. The output width follows `MAX_AMP` automatically.
- **Cosine or other phase.** A cosine (or any phase offset) is the same table
  read at `addr + NUM_POINTS/4` (mod N). It can be added as a second read port
  in `sine_rom`.
- **Signed (two's-complement) output.** Subtract MAX_AMP/2 from the formula,
  or invert the MSB when MAX_AMP = 2^DATA_W − 1.
- **Tool support.** Simulators and synthesis tools that cannot evaluate
  `$sin` in a constant function would need the table as a `$readmemh` file
  generated from the same formula.
