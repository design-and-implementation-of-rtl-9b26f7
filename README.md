# Pipelined IEEE-754 single precision floating point multiplier

This is a floating point multiplier for 32-bit IEEE-754 (binary32) numbers. It is
built to be clocked fast, and it takes a new pair of operands on every clock. It
treats a floating point product as three independent jobs that run side by side:

* the sign is the XOR of the operand signs;
* the exponent is `E1 + E2 - 127`;
* the significand is the unsigned 24 x 24-bit product of the two significands,
  each with its hidden leading 1.

A final step normalizes the 48-bit significand product and handles the exceptions:
overflow, underflow, NaN, infinity and zero.

Most of the delay is in the significand product. That path is a radix-8 Booth
multiplier. It produces nine partial products, reduces them with a tree of 4:2
compressors, and merges the last two vectors with a 48-bit ripple carry adder.
Register boundaries cut the datapath into five stages of similar depth. The
default configuration has a latency of 5 clocks and gives one result per clock.

## Number format and what the unit computes

A binary32 word is `{sign[31], exponent[30:23], fraction[22:0]}`. The exponent is
biased by 127. For exponents 1..254 the value is `(-1)^s * 2^(E-127) * 1.fraction`.

| operands | `prod_f` | flag |
|---|---|---|
| both normal, normalized exponent 1..254 | normal product, truncated | none |
| both normal, normalized exponent >= 255 | signed infinity | `s_ovf_out` |
| both normal, normalized exponent <= 0 | signed zero | `s_und_out` |
| a denormal operand (exponent 0, fraction != 0), no NaN/inf | signed zero | `s_und_out` |
| a zero operand (no NaN/inf) | signed zero | none |
| an infinite operand, the other not zero/denormal/NaN | signed infinity | `s_inf_out` |
| a NaN operand, or zero/denormal times infinity | quiet NaN `{s, 8'hFF, 23'h400000}` | `s_nan_out` |

The sign of every result, NaN included, is the XOR of the operand signs. The unit
keeps no denormal results: a result too small for a normal number becomes zero.
Rounding is by truncation (round toward zero). The unit does not implement the
IEEE default of round to nearest even, and it raises no inexact flag.

## The pipeline

```
            f1, f2
              |
 stage 1   pre-process: split fields, prepend hidden bit, classify operands
 ---------------------------------------------------------- register (i)
 stage 2   sign XOR | E_temp = E1 + E2 (8-bit RCA) | Booth: 9 partial products
           | special-case decision
 ---------------------------------------------------------- register (ii)
 stage 3   E_temp1 = E_temp - 127 (ripple borrow) | 4:2 rows: 8 -> 4 vectors
 ---------------------------------------------------------- register (iii)
 stage 4   (exponent waits)                       | 3:2 row + 4:2 row: 4+1 -> 2
 ---------------------------------------------------------- register (iv)
 stage 5   48-bit ripple carry adder -> product; normalization (shift, E+1),
           truncation, overflow/underflow, special results
 ---------------------------------------------------------- register (v)
              |
   prod_f, s_und_out, s_ovf_out, s_nan_out, s_inf_out, out_valid
```

Each register boundary carries one packed struct from `fpm_pkg` (`s1_t` .. `s5_t`).
The struct holds everything later stages need, including the valid bit and the
special-case decision. The pipeline never stalls, so every register loads on every
clock.

### Configurations (`STAGES`)

`fp_mult_pipe` has one parameter, `STAGES`:

| `STAGES` | registers present | latency |
|---|---|---|
| 5 (default) | (i) (ii) (iii) (iv) (v) | 5 clocks |
| 3 | (i) (iii) (v) | 3 clocks |
| 0 | none, fully combinational | 0 |

A missing boundary is a `pipe_reg` with `EN = 0`, which is a wire. With 3 stages,
the middle stage holds the exponent adder, the bias subtraction, the Booth
generator and the first compressor level. The last stage holds the second
compressor level, the final adder and normalization. Any other value of `STAGES`
stops elaboration.

## Significand multiplier

This part is the hardest to follow, so it is described step by step.

### Radix-8 Booth recoding (`booth_r8_encoder`, `booth_pp_gen`)

The multiplier significand `Y` is read three bits at a time. Each step looks at a
quartet `{y[3i+2], y[3i+1], y[3i], y[3i-1]}`: the three new bits plus the top bit
of the previous group, with `y[-1] = 0`. The quartet becomes a signed digit:

```
d_i = -4*y[3i+2] + 2*y[3i+1] + y[3i] + y[3i-1]        (range -4 .. +4)
Y   = sum_i d_i * 8^i
```

Each digit selects one of `0, ±X, ±2X, ±3X, ±4X`, which becomes partial product
`i` after a shift left by `3i`. The multiples 2X and 4X are plain shifts. 3X is the
odd multiple: `booth_pp_gen` forms it once as `2X + X` with a 26-bit ripple carry
adder and shares it among all digits. A negative digit gives the two's complement
of the shifted multiple, that is, invert and add 1. Every partial product is a
48-bit two's complement word, and all sums are taken modulo 2^48. That is exact,
because the true product is below 2^48.

**Why there are nine partial products and not eight.** The 24 significand bits
make eight digits. The top quartet, digit 7, holds the hidden bit `y[23]`, which is
1 for every normal number, so digit 7 comes out negative. Recoding then reads `Y`
as a signed number, which is wrong for a significand. The fix is to zero-extend
`Y` to 27 bits. This adds a ninth digit, `{0,0,0,y[23]}`, which is +1 whenever the
hidden bit is set. Partial product 8 is therefore simply `X << 24`, or 0 for a
zero operand. The eight "real" Booth products go through the 4:2 tree. The
correction product travels alongside them and joins the tree one level later.

### Compressor tree (`compressor42`, `csa42_row`, `csa32_row`, `pp_reduce_8to4`, `pp_reduce_4to2`)

A 4:2 compressor is made of two full adders in series. The first adds `i1, i2, i3`
and sends its carry sideways as `cout` to the next column. The second adds the
first adder's sum, `i4` and the `cin` that arrives from the column below. It gives
`sum` (weight `2^j`) and `carry` (weight `2^(j+1)`). The invariant is
`i1+i2+i3+i4+cin = sum + 2*(carry+cout)`. Because `cout` does not depend on `cin`,
a 48-column row does not ripple. Its delay is that of four XORs.

* Stage 3 (`pp_reduce_8to4`): one row compresses partial products 0..3 into a
  sum/carry pair, and a second row does the same for 4..7. Four vectors remain.
* Stage 4 (`pp_reduce_4to2`): a row of full adders (a 3:2 carry-save adder) merges
  the correction product with the first pair. A 4:2 row then reduces the result
  and the second pair to the final sum and carry vectors.

Carries out of column 47 are dropped, which keeps the arithmetic modulo 2^48.

### Final adder (`ripple_carry_adder`)

A 48-bit chain of full adders adds the final sum and carry vectors into the
product. The same module, at 8 bits, adds the two exponents. It is the slowest
single piece of stage 5. `ripple_carry_adder` has a plain `a, b, cin -> sum, cout`
interface, so a faster adder can be swapped in without other changes.

## Exponent path

* Stage 2: `E1 + E2` is formed by the 8-bit ripple carry adder. Its carry-out
  becomes bit 8 of the 9-bit `E_temp`.
* Stage 3: `exp_bias_sub` subtracts 127 with a chain of ripple-borrow full
  subtractors whose second operand is the constant 127. The result `E_temp1` is a
  10-bit two's complement number in the range -127..383.
* Stage 5: `fp_normalize` adds 1 when product bit 47 is set, giving the
  normalized exponent `e`. Overflow is `e >= 255` and underflow is `e <= 0`. A
  sum that overflows in `E1 + E2` can still come back into range after the bias is
  subtracted. An `E_temp1` of 0 becomes a normal exponent of 1 when the product
  needs the shift.

## Normalization (`fp_normalize`)

For normal operands, both significands lie in [1, 2), so their product lies in
[1, 4). The binary point sits between bits 45 and 46 of the 48-bit product, and
the leading one is at bit 46 or bit 47.

* Bit 47 set: the fraction is `prod[46:24]` and the exponent is incremented.
* Bit 47 clear: the fraction is `prod[45:23]` and the exponent is unchanged.

The bits below the kept fraction are discarded. The special-case decision made in
stage 2 by `fp_exception_detect` overrides the arithmetic result, as listed in the
table above.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset; clears every pipeline register |
| `in_valid` | in | 1 | `f1`, `f2` hold an operand pair |
| `f1`, `f2` | in | 32 | multiplicand and multiplier, binary32 |
| `out_valid` | out | 1 | `in_valid` delayed by `STAGES` clocks |
| `prod_f` | out | 32 | product |
| `s_und_out`, `s_ovf_out`, `s_nan_out`, `s_inf_out` | out | 1 each | exception flags of that product |

The inputs are sampled on a rising edge. The matching outputs are valid after the
`STAGES`-th following rising edge and hold for one clock. Back-to-back operands
give back-to-back results. `in_valid` only marks which outputs mean something. The
datapath computes on whatever is on `f1`/`f2`, and there is no back-pressure.

Example at the default 5 stages: apply 7.5 x 7.5 on one edge and 6.5 x 7.5 on the
next. Five edges later `prod_f` reads `0x42610000` (56.25), and one clock after
that it reads `0x42430000` (48.75).

## Where this RTL departs from the reference design, and what it adds

* **Overflow result.** In the reference design's simulation, 1.875 x
  (1.875 * 2^127) raised the NaN flag and gave a non-standard word. Here it gives
  +infinity with `s_ovf_out`, following the stated rule that overflow gives a
  signed infinity and the overflow flag.
* **Partial product count.** The reference design speaks of eight radix-8
  partial products. Here a ninth correction product (0 or `X << 24`) is added, as
  explained above, because otherwise an unsigned 24-bit significand is not
  multiplied correctly. Where it joins the tree (a 3:2 row in stage 4) is this
  design's choice.
* **Own choices where the reference design is silent:**
  * the valid bit and the asynchronous reset;
  * truncation as the rounding mode;
  * a single canonical quiet NaN, with no signaling/quiet distinction;
  * the meaning of `s_inf_out`, which is set when an infinite operand gives an
    infinite result;
  * how pre-processing classifies operands;
  * a purely combinational `STAGES = 0`.
* **Full adder form.** The carry is written as `a&b | (a^b)&cin`. This is the same
  function as the majority form, but with `cin` used once, so long flattened carry
  chains stay compact in simulation.
* **Not covered:** timing and area. The clock rates and resource counts quoted
  for the reference implementation came from an FPGA and a standard-cell flow and
  are not reproduced here. An earlier, slower version of the reference design
  used a 24 x 24 carry-save array multiplier. That version is not included.

## Files

`rtl/` (one module or package per file):

| file | role |
|---|---|
| `fpm_pkg.sv` | widths, bias, binary32 struct, class/flag structs, stage records |
| `fp_mult_pipe.sv` | top: the five stages and their registers |
| `fp_preprocess.sv` | stage 1: field split, hidden bit, classification |
| `sign_calc.sv` | sign XOR |
| `ripple_carry_adder.sv`, `full_adder.sv` | exponent adder, 3X adder, 48-bit final adder |
| `exp_bias_sub.sv` | ripple-borrow subtraction of 127 |
| `booth_r8_encoder.sv`, `booth_pp_gen.sv` | radix-8 recoding and partial product multiplexers |
| `compressor42.sv`, `csa42_row.sv`, `csa32_row.sv` | 4:2 compressor, rows of 4:2 and 3:2 cells |
| `pp_reduce_8to4.sv`, `pp_reduce_4to2.sv` | the two levels of the compressor tree |
| `fp_exception_detect.sv` | NaN / infinity / zero / denormal decision |
| `fp_normalize.sv` | normalization, overflow/underflow, final result |
| `pipe_reg.sv` | a register boundary, or a wire when disabled |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, and
`fpm_ref_pkg.sv`. The package is an integer reference model of the whole
multiplier: it uses a plain 64-bit multiply instead of the Booth tree and applies
the same exception rules. Besides the unit tests:

* `tb_fp_mult_pipe` runs the default 5-stage unit. It feeds a new operand pair
  every clock for about 20,000 slots: the worked examples, directed corner cases,
  and random operands over the whole exponent range with every special kind. It
  checks every result and `out_valid` exactly 5 clocks later. It also counts how
  often each mechanism occurred: normalization shift and no shift, overflow,
  underflow, denormal flush, NaN, 0 x inf, infinity, zero, idle slot and
  back-to-back issue. A mechanism that never occurs counts as a failure.
* `tb_fp_mult_pipe_variants` runs `STAGES = 3` (3-clock latency) and
  `STAGES = 0` (same cycle) on one shared stream.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --top-module tb_fp_mult_pipe \
    -y rtl -y tb +libext+.sv rtl/fpm_pkg.sv tb/fpm_ref_pkg.sv tb/tb_fp_mult_pipe.sv
./obj_dir/Vtb_fp_mult_pipe
```

Use the same command for any other testbench: change the top module and the last
file name. The packages must come first on the command line. The design is plain
synthesizable SystemVerilog (IEEE 1800-2017), with no vendor primitives and no
memories.
