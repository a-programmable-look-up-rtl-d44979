# Programmable LUT interpolator with nonuniform sampling

This is a function generator built around a look-up table. It evaluates a function g(x) on a
15-bit input x in [-1, 1). It stores only a few hundred samples of g and interpolates between
them with one first-order Taylor step:

    g(x) ~= g(x_nm) + g'(x_nm) * (x - x_nm)

Here x_nm is the stored sample point at or below x.

The samples are not evenly spaced. The domain is cut into **22 partitions**. Each partition has
its own sampling frequency f_n, a power of two from 2 to 32768. The sample pitch of partition n
is 2/f_n. Where g is steep or strongly curved (for example √2·σ·erfinv(x) near ±1) the samples
are dense. Where g is nearly straight they are sparse. So a 512-word memory can do the work of
a 32768-word uniform table.

The partition layout lives in small programmable tables, and the samples live in two RAMs. Both
can be reloaded while the circuit runs, which switches to another function or another sampling
scheme. A full reload takes 512 clocks.

The main use is a programmable noise generator. Feed uniformly distributed codes into x and load
g1(x) = √2·σ·erfinv(x), and the output is Gaussian noise. Load another g, and the output has
another distribution.

## Block structure

```
            +--------------------- Difference_Address -------------------------+
 lut_in --->| region select (CSL_n) -> n                                        |
   x        |   Add_MSB(B_n): x >>> (14+B_n) --+                                |
            |                Dsp_n ---------(+)-> Add_LSB(D_n) --(+)-> address --+--> Mux --> Ordinate RAM --> delay 4 ------(+)--> lut_out
            |                Add log_n ----------------------------^             |    ^  --> Derivative RAM --> multiplier (4) --^ (1)
            |   Dif_LSB(S_n, one-to-one) ----------------------------> residual -+----|------ delay 1 --------^
            +------------------------------------------------------------------+    |
 we, ad (external RAM write address) -----------------------------------------------+
 lut_in -------------------------------- delay 6 -----------------------------------------------------------------------> ent
```

| RTL module | Role |
|---|---|
| `nus_interpolator` | Top level. Address mux, the two RAMs, multiplier, adder and the three alignment delays. |
| `nus_difference_address` | Turns x into a RAM address and a residual x − x_nm. Holds the two address adders. |
| `nus_region_select` | Finds the partition n of x by comparing x with the 22 programmable upper limits CSL_n. |
| `nus_displacement` | Table of Dsp_n = f_n/2. |
| `nus_add_log` | Table of the address offset Add log_n. |
| `nus_add_msb` | Table of B_n. Scales x to the partition's sample grid. |
| `nus_add_lsb` | Table of D_n. Keeps the D_n low bits of the grid index. |
| `nus_dif_lsb` | Table of S_n and a one-to-one flag. Extracts the residual. |
| `nus_lut_ram` | 512 × 32 RAM with a one-clock registered read. Used for the ordinates and the derivatives. |
| `nus_delay`, `nus_mult`, `nus_adder` | Delay line, 4-stage multiplier, and registered output adder. |
| `nus_pkg` | Widths, the table-entry struct `nus_cfg_t`, and the reset contents (scheme α). |

## From x to an address: the core of the design

With uniform sampling, the address is simply the top bits of x and the residual is its bottom
bits. Here the pitch changes from partition to partition, so both depend on n. Every partition
is treated as if its own frequency covered the whole domain. This gives a "virtual" uniform grid
per partition. An offset then maps that grid onto the partition's slice of the shared RAM.

The input x is a 15-bit two's-complement number with 14 fraction bits. Below, it is written as
an integer code in units of 2^-14.

1. **Partition.** n is the lowest partition with x ≤ CSL_n, the partition's Corrected Superior
   Limit. The 22 comparisons run in parallel. The top code 1 − 2^-14 lies above every CSL and is
   given to partition 22.
2. **Grid index (Add_MSB).** B_n = 1 − log2 f_n, so 2^B_n is the pitch. The block keeps the bits
   of x of weight 2^B_n and up, which is an arithmetic shift right by 14 + B_n. The result is
   floor(x·f_n/2), a signed index on the virtual grid.
3. **Displacement.** Adding Dsp_n = f_n/2 counts the index from x = −1. The result lies in
   0 … f_n−1.
4. **Add_LSB.** This keeps D_n = log2 f_n bits, which makes the index unsigned.
5. **Add log.** Adding Add log_n = SMN_n − IMN_n gives the RAM address.
   - SMN_n is the partition's first RAM word.
   - IMN_n = f_n/2 + PIL_n·f_n/2 is the virtual index of its lower limit PIL_n.
6. **Residual (Dif_LSB).** This is the S_n = 15 − log2 f_n low bits of x, read with 14 fraction
   bits. In a partition with f_n = 2^15, every input code is itself a sample. There the residual
   is forced to zero, and a per-partition flag marks that case.

Worked example with scheme α, x = −0.97 (code −15892):

| Step | Value |
|---|---|
| Partition | CSL_4 = −16065 < x ≤ CSL_5 = −15713, so n = 5 |
| f_5 | 2048, so pitch = 16 codes |
| B, D, S | −10, 11, 4 |
| Dsp, Add log | 1024, 78 |
| Add_MSB | −15892 >>> 4 = −994 |
| After Dsp | −994 + 1024 = 30 |
| After Add_LSB | 11 bits of 30 = 30 |
| Address | 30 + 78 = **108** |
| Residual | low 4 bits of x = **12** (12·2^-14) |
| Sample at word 108 | x_nm = −994·16 = −15904 (−0.970703125) |

## Configuration tables

Every table entry follows from the partition limits x_n and frequencies f_n. This is software
work, done before loading. In integer units of 2^-14, with pitch p_n = 32768/f_n and R(v, p) =
truncation of v toward zero to a multiple of p:

```
PIL_1 = R(x_1, p_1)                 PIL_n = R(R(x_n, p_{n-1}), p_n)
CSL_n = R(R(x_{n+1}, p_n), p_{n+1}) - 1        (x_23 = 16383, p_23 = p_22)
QMR_n = (CSL_n - PIL_n + 1) / p_n   RAM words of partition n (integer division)
SMN_1 = 0                           SMN_n = SMN_{n-1} + QMR_{n-1}
Add log_n = SMN_n - (f_n/2 + PIL_n / p_n)
B_n = 1 - log2 f_n   D_n = log2 f_n   S_n = 15 - log2 f_n (7 if f_n = 2^15)   Dsp_n = f_n/2
one2one_n = (f_n == 2^15)
```

`nus_tb_pkg::make_scheme` implements exactly this. Reset loads **scheme α**. Its frequencies
run symmetrically from 32768 at ±1 down to 32 around 0:

| n | x_n | f_n | CSL_n | Add log_n |
|---|---|---|---|---|
| 1 | −1.0000 | 32768 | −16347 | 0 |
| 2 | −0.9977 | 16384 | −16309 | 19 |
| 3 | −0.9954 | 8192 | −16225 | 38 |
| 4 | −0.9903 | 4096 | −16065 | 58 |
| 5 | −0.9805 | 2048 | −15713 | 78 |
| 6 | −0.9590 | 1024 | −14977 | 99 |
| 7 | −0.9141 | 512 | −13441 | 121 |
| 8 | −0.8204 | 256 | −10497 | 144 |
| 9 | −0.6407 | 128 | −5633 | 167 |
| 10 | −0.3438 | 64 | −2049 | 188 |
| 11 | −0.1251 | 32 | −1 | 202 |
| 12 | 0.0000 | 32 | 1023 | 202 |
| 13 | 0.1249 | 64 | 5119 | 185 |
| 14 | 0.3436 | 128 | 10239 | 143 |
| 15 | 0.6405 | 256 | 13311 | 39 |
| 16 | 0.8202 | 512 | 14911 | −193 |
| 17 | 0.9140 | 1024 | 15679 | −682 |
| 18 | 0.9589 | 2048 | 16047 | −1684 |
| 19 | 0.9804 | 4096 | 16215 | −3711 |
| 20 | 0.9901 | 8192 | 16303 | −7786 |
| 21 | 0.9953 | 16384 | 16343 | −15958 |
| 22 | 0.9976 | 32768 | 16382 | −32322 |

Scheme α uses 445 words. The testbenches also use three other schemes:

| Scheme | Layout | Words |
|---|---|---|
| α | as above | 445 |
| β | α's limits, frequencies regrouped | 374 |
| γ | different limits and frequencies | 390 |
| uniform | f = 128 everywhere, for comparison | 127 |

All four fit the 512-word RAMs.

## Loading samples

Word SMN_n + m holds the sample x = PIL_n + m·p_n:

- the ordinate g(x) goes to the **ordinate RAM** (port `r1`);
- the forward-difference slope (g(x + p_n) − g(x)) / (p_n·2^-14) goes to the **derivative RAM**
  (port `r2`).

Both are 32-bit signed fixed point. The hardware only requires that the two share the same
number of fraction bits F. The output then has F fraction bits too.

- F is chosen per function to fit its range. The testbenches use 24 for most functions and 16
  for 1/(1−x²).
- The adder computes ordinate + floor(derivative × residual / 2^14) and saturates to 32 bits.

A reload looks like this:

- Hold `we` high for 512 clocks. Give `ad` = word and `r1`/`r2` = data.
- At the same time, write the 22 table entries through `cfg_we`/`cfg_idx` (1…22)/`cfg`, one per
  clock.
- While `we` is high, the mux gives the RAMs `ad` instead of the computed address, and `lut_out`
  is meaningless.

## Timing and ports

One input per clock, no handshake. `lut_out` and `ent` (the echoed input) appear **6 clocks**
after `lut_in`:

| Clock edge | What happens |
|---|---|
| 1 | RAM read; the residual is registered |
| 2–5 | The multiplier works; the ordinate is delayed by 4 |
| 6 | Output adder |

The address path from x to the RAM address is combinational, as in the original design, so it
sets the critical path.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | Clock. `rst` is synchronous and active high: it clears the pipeline and loads scheme α into the tables. It does not clear the RAMs. |
| `lut_in` | in | 15 | x, two's complement, 14 fraction bits |
| `r1`, `r2` | in | 32 | Ordinate and derivative to write |
| `we`, `ad` | in | 1, 9 | RAM write strobe and write address |
| `cfg_we`, `cfg_idx`, `cfg` | in | 1, 5, `nus_cfg_t` | Write one partition's entry: CSL, Dsp, Add log, B, D, S, one2one |
| `lut_out` | out | 32 | Interpolated g(x) |
| `ent` | out | 15 | `lut_in` delayed to line up with `lut_out` |

## Accuracy

- **Scheme α with g1.** With σ = 0.3, the largest absolute error over the tested inputs is
  2.93·10⁻⁵. That is below 2^-15 ≈ 3.05·10⁻⁵, the resolution of the 15-bit input. It uses
  445 + 445 words. A one-to-one table, one word per input code and no interpolation, would use
  32768. That is 2.7 %.
- **Cubic g5 = x³ across schemes.** This function has no free constant such as σ, so it is a
  clean cross-check of the tables and the datapath. The largest errors match the peaks of the
  original design's published error plots. `tb_nus_workloads` checks them against those peaks.

  | Scheme | Largest error here | Published peak (read off the plot) |
  |---|---|---|
  | α | 2.76·10⁻⁴ | ≈ 2.8·10⁻⁴ |
  | β | 1.74·10⁻³ | ≈ 1.75·10⁻³ |
  | γ | 1.37·10⁻³ | ≈ 1.4·10⁻³ |

- **Near the poles.** β and γ are coarser near ±1. Functions with poles there (erfinv, 1/(1−x²))
  show large errors in those regions. Part of the cause is that their slopes exceed the 32-bit
  derivative word and are stored saturated. The loader picks the binary point of the sample
  words, and this is a trade-off:
  - For g1 and g2 it uses 24 fraction bits. Then β/g1 peaks at 0.14 and γ/g1 at 0.14.
  - With 20 bits, fewer slopes saturate. β falls to 0.015, but γ stays at 0.12 because its
    pitch of 2/1024 next to −1 is simply too coarse. The coarser words also push α/g1 to 3.02·10⁻⁵,
    too close to the bound.
- **Partial last intervals.** In some partitions of β and γ, the length is not a multiple of the
  pitch. Inputs in the last, partial interval then read the next partition's first word. This is
  a property of those tables, not of the hardware.
- **Uniform comparison.** The same hardware can run a uniform f = 128 scheme (127 words) with
  g1. Its largest error is about 0.26, all of it near the poles, which is the case nonuniform
  sampling is meant to fix.
- **As a noise source.** With α/g1 and evenly spread inputs standing in for uniform noise, the
  output has mean ≈ 0 and standard deviation 0.300. That is the intended Gaussian with σ = 0.3.
- **Reference numbers.** `tb_nus_workloads` prints the largest error and the output mean for all
  24 scheme/function pairs and for the uniform comparison.

## Where this RTL makes its own choices

The original design gives the block structure, the address arithmetic, the 512-word memories,
the 22 partitions, the 15-bit input and the delays. The following are choices made here:

- **Data widths:** 32-bit ordinate, derivative and output words, and the width of every table
  field.
- **Output arithmetic:** floor rounding and saturation in the output adder.
- **Table write port:** the `cfg_*` port. The original names no port for writing the tables.
  Here the tables are plain register files. The original keeps them in 28 small memories: 22 of
  two words and 6 of 22 words. One `cfg` write loads every field of one partition at once. So the
  22 table writes fit inside the 512 clocks of a sample reload, and a full reconfiguration still
  takes 512 clocks.
- **Multiplexer select:** `we` drives it.
- **Reset:** reset to scheme α.
- **Top input code:** 1 − 2^-14 is given to partition 22.
- **Zero residual:** a one-to-one flag, in place of deriving "f_n = 2^15" some other way.
- **Multiplier pipeline:** the product plus three registers, for synthesis to retime.

## Simulation

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. Sub-block
testbenches are `tb/tb_nus_<block>.sv`. Three cover the whole design:

- `tb_nus_interpolator` runs at the default size. It does three live reconfigurations (α/g1,
  β/x³, γ/−x²−2x−2), checks every output bit-exactly and the 6-clock latency, and checks the α/g1
  error bound.
- `tb_nus_workloads` runs all 24 configurations and the uniform comparison. It also checks:
  - the output statistics of the noise-generator use;
  - the error peaks of x³.
- `tb_nus_difference_address` checks all 32768 input codes under each scheme against an
  independent model.

To run one with Verilator:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/nus_pkg.sv tb/nus_tb_pkg.sv tb/tb_nus_interpolator.sv --top-module tb_nus_interpolator
./obj_dir/Vtb_nus_interpolator
```

`tb/nus_tb_pkg.sv` holds the reference models:

- scheme data and the table computation above;
- the eight test functions: √2σ·erfinv(x), 3 + √2σ·erfinv(x), −1/(x²−1), eˣ, x³, x², −x²−2x−2
  and x²−6x−25;
- the memory image generator and the bit-exact output model.
