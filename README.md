# A 17-bit custom-precision floating-point conversion core

A sensor front end on an FPGA typically receives 12-bit two's-complement
samples from an ADC. To store and process them with more dynamic range than
fixed point, without paying for IEEE single precision, the samples are turned
into a small floating-point format of 17 bits. The same format is then turned
back into integers when needed. This core contains the two converters that do
that, both as short pipelines that accept one value per clock:

* `int12_to_cpfp17`: 12-bit signed integer to 17-bit float, 5 cycles.
* `cpfp17_to_int12`: 17-bit float to 12-bit signed integer, 4 cycles.

`cpfp_top` puts the two side by side on a shared clock and reset. The
converters are not connected to each other.

## The (1,6,10) format

```
 16 | 15 ............ 10 | 9 ..................... 0
  S |  E5 E4 E3 E2 E1 E0 |  M9 M8 ... M1 M0
```

The value is `(-1)^S * 1.M * 2^(E - 31)`. The bias is `2^(6-1) - 1 = 31`.
The leading one of `1.M` is hidden, as in IEEE 754. There are no subnormals
and no NaN:

| word                      | meaning                                                      |
|---------------------------|--------------------------------------------------------------|
| `x 000000 xxxxxxxxxx`     | zero, whatever the mantissa holds                            |
| `0 011111 0000000000`     | +1.0                                                         |
| `1 011111 0000000000`     | -1.0                                                         |
| `0 101001 1111111111`     | +2047, the largest integer that the integer side returns     |
| `0 111111 xxxxxxxxxx`     | all-ones exponent, the "infinity" of the format; read back as the largest integer |

A 12-bit integer has at most 11 significant bits of magnitude. The format
carries 11 (hidden one plus ten mantissa bits), so every 12-bit integer
converts exactly. The converters never round.

## Integer to float (`int12_to_cpfp17`)

Each register rank is one pipeline stage. The registers keep the names R1..R7
that the comments use:

| edge | register | what is computed                                                                 |
|------|----------|----------------------------------------------------------------------------------|
| 1    | R1 (12)  | sample captured                                                                  |
| 2    | R2 (12)  | magnitude: two's complement of R1 if R1[11] is set                               |
| 3    | R3 (4), R4 (10) | R3 is the position of the highest set bit of R2, which is the unbiased exponent; R4 holds the bits below that one, right-aligned. A zero flag is set if no bit is set |
| 4    | R5 (6), R6 (10) | R5 = R3 + 31, or 0 for a zero sample; R6 = R4 shifted left so that the bit just below the leading one lands in M9 |
| 5    | R7 (17)  | `{sign, R5, R6}`                                                                 |

The sign and the zero flag travel down the pipeline next to the data. A new
sample can therefore enter every cycle.

The leading-one search also looks at R2[11]. That bit is set only for -2048,
whose magnitude 2048 does not fit in 11 bits. That input converts exactly to
`1 101010 0000000000` (-1.0 × 2^11). This is a choice of this design. A
search that started at R2[10] would find no set bit and would take -2048 for
zero.

## Float to integer (`cpfp17_to_int12`)

| edge | register | what is computed                                                           |
|------|----------|----------------------------------------------------------------------------|
| 1    | R1 (1), R2 (11), R3 (6) | split the word; R2 = `{1, M}` restores the hidden one       |
| 2    | R4 (8, signed) | `R3 - 31`, the unbiased exponent `e`                                 |
| 3    | R5 (11)  | integer part of `1.M × 2^e`, i.e. R2 shifted right by `10 - e`              |
| 4    | R6 (12)  | two's complement of `{0, R5}` if the sign is set                           |

Stage 3 is the only subtle one:

* **Exponent field 0** gives 0, whatever the mantissa.
* **`e < 0`** (magnitude below one) gives 0. Fraction bits are always dropped,
  so the conversion rounds toward zero: `1.9990` gives 1 and `-1.9990` gives -1.
* **`0 ≤ e ≤ 10`** gives `R2 >> (10 - e)`. At `e = 0` the result is 1, and at
  `e = 10` it is all of `1.M`.
* **`e > 10`** (a magnitude of 2048 or more, the all-ones exponent included)
  saturates R5 to 2047. The output is then +2047 or -2047.

Because of saturation, the round trip int → float → int returns every integer
from -2047 to +2047 unchanged, and returns -2048 as -2047.

## Interfaces and timing

Both converters have the same interface:

```
clk, rst_n                 clock; asynchronous active-low reset (clears every register)
in_valid,  in_data         one value per cycle may enter; no back-pressure
out_valid, out_data        the result, with in_valid delayed by the latency
```

Suppose a value is presented before rising edge *n*. The integer-to-float
result is on `out_data` after edge *n+4* (5 register ranks). The
float-to-integer result is there after edge *n+3* (4 ranks). Throughput is
one conversion per cycle, and there is no stall. `out_data` keeps changing
when `out_valid` is low, so use it only when `out_valid` is high.

`cpfp_top` adds the prefix `i2f_` to the integer-to-float ports and `f2i_` to
the float-to-integer ports.

## Files

| file                        | contents                                                       |
|-----------------------------|----------------------------------------------------------------|
| `rtl/cpfp_pkg.sv`           | widths (12, 6, 10), the bias function, a `cpfp_t` field struct |
| `rtl/int12_to_cpfp17.sv`    | integer-to-float pipeline                                      |
| `rtl/cpfp17_to_int12.sv`    | float-to-integer pipeline                                      |
| `rtl/cpfp_top.sv`           | both converters side by side                                   |
| `tb/cpfp_ref_pkg.sv`        | reference models in real arithmetic, used by the testbenches   |
| `tb/tb_int12_to_cpfp17.sv`  | all 4096 integers, plus random inputs with gaps in `in_valid`  |
| `tb/tb_cpfp17_to_int12.sv`  | all 2^17 words, plus random inputs with gaps                   |
| `tb/tb_cpfp_top.sv`         | end-to-end round trip and the special cases                    |

The widths are parameters (`INT_W_P`, `EXP_W_P`, `MAN_W_P`). The RTL is
written for any widths: the bias, the search width, the register widths and
the saturation point follow from them. Other widths elaborate cleanly, but
only the default 12 / 6 / 10 sizes have been simulated. The reference models
in `tb/` are fixed to the default sizes.

## Verification

Each testbench checks `out_valid` in every cycle against what was sent one
latency earlier. For every valid result it compares `out_data` with a
reference model that works differently from the RTL:

* For integer to float, the model halves the magnitude as a real number until
  it is below 2.
* For float to integer, the model evaluates `(1 + M/1024) · 2^(E-31)` as a
  real number, truncates it and saturates it.

The block testbenches also check these known values:

| integer | float word            |
|---------|-----------------------|
| -2047   | `1 101001 1111111111` |
| +2047   | `0 101001 1111111111` |
| +1      | `0 011111 0000000000` |
| 0       | all zeros             |
| -1      | `1 011111 0000000000` |

The top-level test chains the two converters and checks that every integer
comes back unchanged. It then drives the float path directly with fractions,
zero exponents, out-of-range values and the all-ones exponent. It counts each
of these cases and fails if one never occurred. Each testbench also fails
against a copy of its module with one deliberate bug: a wrong bias, a one's
complement in place of the two's complement, or a miswired valid.

To simulate with Verilator, pick one of the three testbenches:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/cpfp_pkg.sv tb/cpfp_ref_pkg.sv tb/tb_cpfp_top.sv --top-module tb_cpfp_top
./obj_dir/Vtb_cpfp_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Where this departs from, or adds to, the original description

* **Shift direction.** The original algorithm states the normalising shift of
  the float-to-integer converter as "10 − e places toward the MSB". Its own
  example results (for instance `0 011111 0000000000` → +1) only come out if
  the 11-bit `1.M` moves toward the LSB, which is what is built.
* **Sign timing.** In the original register diagrams the sign bit goes
  straight from the input register to the output register. Here it is delayed
  stage by stage, so that back-to-back samples keep their own sign.
* **Added by this design.** These are choices of this design and are not in
  the original description:
  * the valid signals;
  * the reset;
  * the zero flag of the integer-to-float pipeline;
  * the handling of -2048, negative exponents and exponents above 10;
  * the shared top.
* **Resource use.** The pipelines use about 80 and 66 flip-flops, counting
  the carried sign, flag and valid bits. This is near the 70 and 47 reported
  for the original FPGA implementations. Clock rates of 170–460 MHz were
  reported there on Xilinx parts. No timing figure was measured for this RTL.
* **Not included.** The rest of the intended acquisition system is not part
  of this core: the sensors, the analog conditioning, the 4-channel I2C ADC,
  external memory, an SD card or display, and floating-point
  add/multiply/divide units. Those parts were only named or planned, not
  specified. An ADC reading connects to `i2f_in_data`, and whatever consumes
  the float words connects to `i2f_out_data`.
