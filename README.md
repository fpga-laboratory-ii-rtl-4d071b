# LED snow: uniform and normal random numbers in FPGA logic

This design produces a new pseudorandom 32-bit word on every clock. It also
turns part of that word into a pair of normally distributed numbers on every
clock. There is no floating point, no iteration and no pipeline: only a shift
register, three table reads and two small multiplications. On a small FPGA
board the numbers drive eight LEDs. One mode is a sparse, flickering "snow"
made from the uniform bits. The other lights a single LED whose position
jitters around the middle of the row with a bell-shaped distribution.

The design is a SystemVerilog rendering of a teaching example from an FPGA
lab course. It keeps that example's structure, widths, taps, scale factors
and timing. The places where it makes its own choices are listed under
[Departures and open points](#departures-and-open-points).

## Block diagram

```
            load_gen ──load──┬──────────────────────────────┐
                             │ (preload, all-ones seed)     │ clear
                             v                              v
  clk ──> lfsr (32 bit, taps 1,5,18,30) ──rand_q[31:0]──> led_display ──> led[7:0]
                 │ rand_q[8:0]  = b0 (u)                    ^   ^
                 │ rand_q[17:9] = b1 (v)                    │   │ mode_snow = key[0]
                 v                                          │   │
            gaussian ──────────────── n1[17:0] ─────────────┘   │
              ├─ ln_rom   (sqrt(-2 ln u) x 64)                  │
              └─ sine_rom (sin, cos of 2 pi v, x 128)           │
            clk_div (÷ CLK_DIV) ──────── ce ────────────────────┘
```

| module        | role                                                           |
|---------------|----------------------------------------------------------------|
| `led_snow`    | top level: wires everything to `clk`, `key[1:0]`, `led[7:0]`   |
| `lfsr`        | Fibonacci LFSR, M bits, four XOR taps, synchronous preload     |
| `gaussian`    | Box-Muller transform, combinational, two 18-bit outputs        |
| `ln_rom`      | 512 x 9 table of sqrt(-2 ln u), scale 64                       |
| `sine_rom`    | 512 x 9 table of sin(2 pi v), scale 128; second port gives cos |
| `load_gen`    | power-up generator: holds the LFSR preload high for 10 clocks  |
| `clk_div`     | one-clock enable pulse every CLK_DIV clocks                    |
| `led_display` | snow / gaussian LED patterns, updated on each enable           |
| `rand_pkg`    | shared widths, scales, types and the table-building functions  |

## The uniform source: a Fibonacci LFSR

`lfsr` shifts its register one place towards bit 0 on every clock. The bit
shifted in at the top is the XOR of four tap bits. Taps are numbered from 1,
so tap k is register bit k-1. The top level uses taps 1, 5, 18 and 30:

```
s' = { s[0] ^ s[4] ^ s[17] ^ s[29], s[31:1] }
```

While `pre` is high, the register loads `u0` instead of shifting. This is
the only way to set its state: it is both the reset and the seed. The
all-zero state maps to itself, so the seed must not be zero. The top level
seeds with all ones.

Any slice of the register is a pseudorandom uniform integer. The top takes
bits 8:0 and bits 17:9 as two 9-bit uniforms, `b0` and `b1`. They do not
overlap within one clock. Neighbouring bits are strongly correlated from one
clock to the next, because each clock only shifts the register by one place.

**Sequence length.** These taps are not a maximal-length set. Starting from
all ones, the register returns to all ones after **25,165,812** clocks
(about 0.5 s at 50 MHz), far fewer than 2^32 - 1. `tb/lfsr_period_tb.sv`
measures this on the RTL. The generic defaults of `lfsr` (taps 1, 2, 17,
29) are not maximal either: their period from all ones is 935,852,295. If a
full 2^32 - 1 period matters, change the taps to a primitive polynomial. The
module accepts any four taps in 1..M.

## Box-Muller in 9-bit fixed point

This is the part of the design that needs the most care.

### The transform

If u and v are independent and uniform on (0, 1), then

```
z1 = sqrt(-2 ln u) * cos(2 pi v)
z2 = sqrt(-2 ln u) * sin(2 pi v)
```

are two independent standard normal variates (mean 0, standard deviation
1). Each factor depends on only one input, so each can be a look-up table
indexed by that input. The transform then needs nothing but table reads and
one multiplication per output.

### What the 9-bit indices mean

A 9-bit index i stands for the real number u_i = (i + 0.5) / 512, the middle
of the i-th of 512 equal slices of (0, 1). This offset avoids u = 0, where
ln u would be infinite.

### The two tables

Both tables hold signed 9-bit words. Nine bits is the width of the 9 x 9
mode of common FPGA DSP multipliers.

* **Radius table (`ln_rom`).** Entry i is sqrt(-2 ln u_i) x 64. The
  largest value is at i = 0: sqrt(-2 ln(0.5/512)) = 3.7233, stored as 238.
  A scale of 64 (2^6) is the largest power of two that keeps 3.72 below the
  signed 9-bit limit of 255.
* **Angle table (`sine_rom`).** Entry i is sin(2 pi u_i) x 128. The word
  could hold up to 255 in magnitude. 128 (2^7) was chosen instead, so that
  the scale of the product is a power of two. Entries run from -128 to 128.
* **Cosine.** It has no table of its own. Since cos x = sin(x + pi/2), and a
  quarter turn is 128 entries, the second read port of `sine_rom` reads
  entry (i + 128) mod 512. The 9-bit address addition wraps by itself.

**Rounding.** The parameter `ROUND_NEAREST` (on `ln_rom`, `sine_rom`,
`gaussian` and `led_snow`) chooses how a real value becomes a table entry.
The default, 1, rounds to nearest; 0 rounds down. Sample entries for both:

| i   | u_i    | sqrt(-2 ln u_i) | radius: nearest / down | sin(2 pi u_i) | sine: nearest / down |
|-----|--------|-----------------|------------------------|---------------|----------------------|
| 0   | 0.0010 | 3.7233          | 238 / 238              | 0.0061        | 1 / 0                |
| 1   | 0.0029 | 3.4155          | 219 / 218              | 0.0184        | 2 / 2                |
| 45  | 0.0889 | 2.2003          | 141 / 140              | 0.5298        | 68 / 67              |
| 200 | 0.3916 | 1.3693          | 88 / 87                | 0.6296        | 81 / 80              |
| 509 | 0.9951 | 0.0989          | 6 / 6                  | -0.0307       | -4 / -4              |
| 511 | 0.9990 | 0.0442          | 3 / 2                  | -0.0061       | -1 / -1              |

As 9-bit words, -4 is 508 and -1 is 511.

The tables are not stored in data files. `rand_pkg::make_ln_table` and
`rand_pkg::make_sine_table` compute them at elaboration time with
`$ln`, `$sqrt`, `$sin` and `$floor`. Synthesis sees them as constant arrays
(ROMs). To change a scale, edit the constants and functions in `rand_pkg`.

### Reading the outputs

`n1 = radius x cos` and `n2 = radius x sin` are 9 x 9 signed products, kept
as 18-bit two's-complement numbers. Their scale is 64 x 128 = 2^13, so

```
z = n / 8192        (13 fraction bits, 4 integer bits, sign)
```

For example, the 16-bit pattern 1110 0010 0111 1011, sign-extended to
18 bits, is -7557, which means z = -0.922. The outputs never exceed
±30464 (|z| < 3.72), so bits 17:16 always repeat the sign.

### How accurate it is

With rounding to nearest, a radius entry is off by at most 1/128 and a
sine or cosine entry by at most 1/256. In units of 2^-13, the error of a
product is below about 119 + 64 = 183. Over all 262,144 input pairs the
largest error is 155. Only 48 of the 524,288 outputs are off by 144 or more,
the threshold the original simulation warned at. Rounding down doubles both
table errors: the bound becomes 366, the largest error 315, and 5.6% of
outputs cross 144. That difference is why rounding to nearest is the default.

The distribution is correct in the bulk. Over 100,000 consecutive clocks of
the free-running generator, the mean is within 0.002 of 0, the variance is
0.99 to 1.00, and 68.4% of the samples lie within one sigma. The ideal
values are 0, 1 and 68.3%. The tails stop at about ±3.7 sigma, because u
cannot be smaller than 0.5/512.

## The LED display

`clk_div` counts from 0 to CLK_DIV-1 and produces a one-clock enable `ce`
each time it wraps. With the default CLK_DIV = 2,000,000 and a 50 MHz board
clock, that is 25 updates per second. On each enable `led_display` loads the
LEDs in one of two modes. Between enables the LEDs hold.

* **Snow (`key[0] = 1`).** The 32-bit word is split into eight nibbles.
  LED i lights when nibble i is below round(0.15 x 16) = 2, so each LED is
  on with probability 1/8. A sparse pattern looks more like snow than raw
  50% bits.
* **Gaussian (`key[0] = 0`).** Exactly one LED lights. Its index is
  n1[15:13] + 4, where n1[15:13] is read as a signed 3-bit number. Those
  three bits are floor(z1), from -4 to 3, so the lit LED is mostly LED 3 or
  LED 4 (68% of the time). LEDs 0 and 7 light only for |z| > 3. Adding 4 to a
  3-bit two's-complement number just inverts its top bit, and the RTL does
  exactly that.

On boards with active-low push buttons, `key[0] = 1` means "not pressed". The
display therefore shows snow by default and shows the gaussian pattern while
KEY0 is held down. `key[1]` and `n2` are unused by the display.

## Power-up and timing

There is no reset pin. `load_gen` and `clk_div` start from register
initialisers, the power-up values an FPGA gives its flip-flops. Verilator's
`PROCASSINIT` lint warning on these registers is expected.

| clock edge            | what happens                                           |
|-----------------------|--------------------------------------------------------|
| 1 … 11                | `load` is high: the LFSR loads all ones, the LEDs clear |
| 12 on                 | the LFSR steps once per clock                          |
| k x CLK_DIV           | `ce` goes high for one clock                           |
| k x CLK_DIV + 1       | `led` takes the pattern of the word present before this edge |

`gaussian` is combinational, so `n1` and `n2` follow the LFSR register
within the same clock. The critical path is one ROM read followed by a
9 x 9 multiply.

## Departures and open points

* **Table rounding.** The original table generator rounds to nearest, but
  the sample entries published with the same design are rounded down: for
  example, 3.4155 x 64 = 218.6 is listed as 218. This RTL rounds to nearest
  by default, because that is the rounding under which the original 144-unit
  precision check holds. `ROUND_NEAREST = 0` reproduces the published
  entries exactly, and the table testbenches check both.
* **LED clear during preload.** The original display logic has no reset.
  Here the LEDs are forced off while `load` is high, so that they have a
  defined value before the first update.
* **Power-up value of `load`.** It is 1, so the first clock edge already
  seeds the LFSR. The original leaves it undefined until the first edge.
* **LFSR width.** The original register is hard-wired to 32 bits, although
  the width is a generic. Here the register really is M bits wide. The
  result is the same for M = 32.
* **Exactly four taps.** The register always XORs four taps. A three-tap
  register, such as the 8-bit illustration the example starts from, cannot
  be expressed. Listing one tap twice cancels that tap, so it does not help.
* **Not included.** An optional follow-on exercise reads out an ADXL345
  accelerometer through a separate controller whose design is not given.
  Neither that controller nor the sensor is modelled here.

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The reference values come from independent
real-number arithmetic and bit loops in `tb/snow_ref_pkg.sv`, never from the
RTL's own tables.

| testbench                 | what it checks                                               |
|---------------------------|--------------------------------------------------------------|
| `lfsr_tb`                 | preload; 2000 steps with both tap sets against a bit model; the hand-worked next state of 0x2AE4D1C3 (0x157268E1) |
| `lfsr_period_tb`          | sequence length 25,165,812 from the all-ones seed; never all zeros (about 15 s) |
| `ln_rom_tb`, `sine_rom_tb`| all 512 entries in both roundings, including the cosine port; the published round-down samples |
| `gaussian_tb`             | all 262,144 input pairs in both roundings, exactly, with the error bounds; under 0.1% off by 144 or more |
| `load_gen_tb`             | preload length 10 (and 3), edge by edge                      |
| `clk_div_tb`              | enable period and width at CLK_DIV = 7 and at the default 2,000,000 |
| `led_display_tb`          | 20,000 random updates and holds in both modes, all 8 positions, clear |
| `led_snow_tb`             | whole design at CLK_DIV = 16, ~8,000 updates, 7 mode switches, every LED checked every clock; the central positions hold 62-74% |
| `led_snow_full_tb`        | whole design at default parameters, 8 M clocks: preload, snow, switch, two gaussian updates, switch back |
| `box_muller_sim_tb`       | LFSR + gaussian as a free-running generator: precision for 20 µs (1 of 2000 outputs off by 144 or more), statistics over 2 ms |

`led_snow_tb` and `led_snow_full_tb` share `tb/led_snow_checker.sv`, a
cycle-accurate model of the top level. It also counts how often each
mechanism occurred: preload, snow update, gaussian update and mode switch.
The test fails if one of them never happened.

Two concurrent assertions in the RTL also watch every simulation. In
`led_snow`, the LFSR must never reach the all-zero lock-up state after the
preload. In `led_display`, a gaussian update must light exactly one LED.

To run one testbench with plain Verilator (two-state simulation, so every
register the design reads is seeded or initialised):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/rand_pkg.sv tb/snow_ref_pkg.sv tb/led_snow_tb.sv \
    --top-module led_snow_tb -o sim
./obj_dir/sim
```

Swap the testbench file and `--top-module` for any other testbench;
`lfsr_period_tb` needs only `rtl/lfsr.sv`. For lint, use
`verilator --lint-only -Wall -Irtl -y rtl rtl/rand_pkg.sv rtl/led_snow.sv`.

## Parameters

| parameter                  | default          | where                   |
|----------------------------|------------------|-------------------------|
| `CLK_DIV`                  | 2,000,000        | `led_snow`, `clk_div`   |
| `LOAD_CYCLES` / `CYCLES`   | 10               | `led_snow`, `load_gen`  |
| `M`, `TAP1..TAP4`          | 32; 1, 2, 17, 29 (top uses 1, 5, 18, 30) | `lfsr` |
| `SNOW_LEVEL`               | 0.15             | `led_display`           |
| `ROUND_NEAREST`            | 1                | `led_snow`, `gaussian`, `ln_rom`, `sine_rom` |
| table depth / scales       | 512; 64 and 128  | `rand_pkg`              |

The table depth, word width and scales are package constants rather than
module parameters. The fixed-point interpretation (2^-13) and the display's
use of n1[15:13] depend on them together, so they must change together.
