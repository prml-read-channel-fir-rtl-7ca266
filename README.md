# 8-tap Booth / carry-save FIR filter for a PRML read-channel equalizer

A PRML (partial-response, maximum-likelihood) disk-drive read channel shapes the
sampled read-back signal with an adaptive FIR equalizer before the Viterbi
detector. That FIR filter sits on the sample clock, so it has to deliver one
result per clock with little power and area. This RTL implements such a filter
as it was published for a full-custom 0.65 µm chip (*Highly Efficient and Low
Power FIR Filter Chip for PRML Read Channel*):

    dout(n) = sum_{t=0..7} coef[t] * din(n - t)

The samples and coefficients are 6-bit two's complement. The result is 15-bit two's
complement. The filter gives one result per clock, four clocks after the sample
enters.

The filter has no multipliers and no carry-propagate adder per tap. Each product
is left as three radix-4 Booth partial-product rows, so the 8 taps give 24 rows.
A compressor tree reduces all 24 rows in carry-save form to two rows. A single
15-bit carry-select adder adds those two rows at the end. Four pipeline registers
split the work into stages of about equal depth. In the published chip every
cell is a 2:1 multiplexer, so depth is counted in multiplexer stages.

| stage | logic | mux stages (published) |
|-------|-------|------------------------|
| 1 | input delay line, Booth encoders, partial-product generators (PPGs) | 3 |
| 2 | 3:2 compressor stage (24 → 16 rows), first 4:2 level (16 → 8) | 6 |
| 3 | second and third 4:2 levels (8 → 4 → 2) | 6 |
| 4 | 15-bit final adder (carry-select over 4-bit conditional sum adders) | 5 |

Each stage ends in a register. The published chip runs at 100 MHz and reaches
150 MHz at most. Those figures belong to that process and transistor design. The
RTL keeps the same partition, but its speed depends on the library it is
synthesised with.

## Booth recoding in the input stage

Each tap recodes its coefficient Y = Y5..Y0 into three radix-4 digits, with
Y(-1) = 0. Each digit picks a multiple of the sample X for one row. Row i has
weight 4^i.

**Rows 1 and 2** use the standard modified Booth table (`booth_encoder`). The three
bits Y(2i+1) Y(2i) Y(2i-1) give the controls ONE, TWO and NEG:

| code | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|------|-----|-----|-----|-----|-----|-----|-----|-----|
| multiple | 0 | +1X | +1X | +2X | −2X | −1X | −1X | 0 |
| ONE TWO NEG | 000 | 100 | 100 | 010 | 011 | 101 | 101 | 001 |

Each bit of the generator (`ppg_booth`) is two multiplexers. The first computes
M(i) = NEG ? ~X(i) : X(i). The second gives M(i+1) for ONE, M(i) for TWO, and 0
when neither is set. The published circuit clears the bit with series PMOS
devices instead of a separate CLR signal.

**Row 0** uses a simplified encoder (`booth_encoder_first`). Because Y(-1) is always
0, +2X cannot occur, and Y1 Y0 selects one of four cases:

| Y1 Y0 | signal | multiple |
|-------|--------|----------|
| 00 | none | 0 |
| 01 | ONE | +1X |
| 10 | NT | −2X |
| 11 | NO | −1X |

Bit i+1 of the row is X(i+1) for ONE, ~X(i) for NT and ~X(i+1) for NO
(`ppg_first`). That is one multiplexer level.

Each row is 7 bits wide, since 2X needs one more bit than X. The generators only
invert bits, so a negative multiple comes out in one's complement. The missing +1
is a **conversion bit** for each row, at that row's weight (`tap_ppg`). Note the
"111" digit: the table sets NEG for it, but the row is cleared to a true zero. The
conversion bit is therefore NEG & (ONE | TWO), not NEG alone. Without that gating,
every coefficient whose top digit is 111 (−1 to −8, for example) would be off by 16.

## From 24 rows to two

`compressor_24_2` works modulo 2^15. Before the compressors it aligns the rows of
each tap:

* Row i is shifted left by 2i bits.
* **Sign-extension elimination.** The sign bit of each row is inverted instead of
  being copied up to bit 14. Inverting the sign bit adds 2^6·4^i to the row's
  value, so over all taps the constant −8·(2^6 + 2^8 + 2^10) corrects it
  (`fir_pkg::sign_ext_const`).
* The conversion bit of row 0 goes into bit 0 of row 1, which is free because
  row 1 starts at bit 2.
* The conversion bit of row 1 goes into bit 2 of row 2, which is free because
  row 2 starts at bit 4.

**The conversion bit of row 2 has no free slot.** It has weight 16, and bit 4 is
used by all three rows. The problem is not only that the slot is taken. In
columns 0 to 4, one tap's three rows plus its three conversion bits can add up to
96. A sum row and a carry row can hold only 94 there. So no 3:2 stage, however it
is wired, can take that bit. The published description does not say where the bit
goes. This design uses the fact that the bit depends only on the coefficient:

* `prml_fir` adds, in stage 1, 16 for every tap whose third row is negative to the
  sign-extension constant. The result is one 15-bit **correction row**, registered
  with the partial products.
* Tap 0's first compressor is a 4:2 row instead of a 3:2 row, with the correction
  row as its fourth input. The other seven taps use 3:2 rows, as published.
* The 4:2 cell is as deep as the 3:2 cell (three multiplexer levels), so stage 2
  is not slower. The small adder that forms the correction row sits in stage 1,
  which has three mux stages of slack.

After that comes one 3:2 stage (24 rows → 16), then three levels of 4:2
compressors (16 → 8 → 4 → 2). The second pipeline register sits after the first
4:2 level, as in the published block diagram.

* The 3:2 cell is a full adder in multiplexer form: p = a^b, sum = p ? ~c : c,
  carry = p ? c : a.
* The 4:2 cell is the usual "compact" one. Its lateral carry (a^b) ? c : a does not
  depend on the incoming lateral carry, so carries never ripple along a row.

## Final adder

`final_adder` adds the two rows from stage 3. It uses 4-bit conditional sum adders
(`cond_sum_adder_4b`). Each of these forms, for every bit, the sum and carry for
both possible carry-ins, merges them in two multiplexer levels, and makes a last
selection with the real carry-in. The blocks are:

| bits | logic |
|------|-------|
| 3:0 | one adder with carry-in 0; its carry-out is c4 |
| 7:4 | two adders, for carry-in 0 and 1; c4 selects the sum and the carry-out c8 |
| 11:8 | two adders, for carry-in 0 and 1; c8 selects the sum |
| 14:12 | a conditional cell that computes the sum for carry-in 0 and for carry-in 1 |

That makes five 4-bit adders. The top cell does not wait for the carry out of
bits 11:8:

1. It picks a result once with that block's carry-out for carry-in 0 ("carry
   select zero").
2. It picks a result once with the carry-out for carry-in 1 ("carry select one").
3. c8 chooses between the two.

The longest path is therefore one 4-bit adder plus two selects, which is five mux
stages. The carry out of bit 14 is dropped.

The published block diagram shows only a one-bit cell at the top, with outputs
S12 and S13, but the text calls the adder 15 bits wide. Here the top cell covers
bits 12 to 14, so that all 15 output bits come from the adder.

## Interface of `prml_fir`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | sample clock |
| `rst_n` | in | 1 | active-low asynchronous reset; clears the delay line and the pipeline (the output reads 0) |
| `din` | in | 6 | sample x(n), two's complement |
| `coef` | in | 8 × 6 | coefficients; `coef[t]` multiplies x(n−t) |
| `dout` | out | 15 | y, two's complement |

Timing:

* If `din` holds x(n) before rising edge k, then `dout` holds y(n) after edge k+3.
* The coefficients are sampled with the same edge as the sample they multiply. If
  the coefficients change between two samples, each output uses the coefficient
  set that was present when its newest sample entered.
* There is no valid or enable signal: the filter computes every clock.

The full range is −7936 to +8192. +8192 occurs when all 8 samples and all 8
coefficients are −32. It is the reason the output needs 15 bits.

## Where this RTL goes beyond or departs from the published design

The following are this design's own choices:

* **Correction row for the third Booth row** (see above). This replaces the pure
  3:2 compression of tap 0 with a 4:2 row, and it adds a small adder over the
  coefficient bits in stage 1.
* **Cell equations.** The insides of the 3:2 cell, the 4:2 cell and the 4-bit
  conditional sum adder are not drawn in the published description. Standard
  multiplexer forms are used.
* **Top adder cell.** It is three bits wide instead of the one bit drawn.
* **Coefficients are plain inputs.** The published design only calls them
  programmable. No loading port and no adaptation (LMS or similar) logic is
  included.
* **Reset.** The reset, and the reset value of the correction register (the
  sign-extension constant, so that an all-zero pipeline sums to 0), are assumed.
* **Not modelled.** The transistor-level circuits are not modelled: single-rail
  CMOS pass-transistor multiplexers, the 22- and 19-transistor PPG cells, and
  buffering inverters. Only their logic functions are in the RTL.

## Files

| file | contents |
|------|----------|
| `rtl/fir_pkg.sv` | sizes (TAPS, DW, CW, OW, PPW, NPP), select structs, sign-extension constant |
| `rtl/prml_fir.sv` | top: four pipeline stages, correction row |
| `rtl/input_delay.sv` | sample delay line |
| `rtl/tap_ppg.sv` | one tap: three encoders, three rows, conversion bits |
| `rtl/booth_encoder.sv`, `rtl/booth_encoder_first.sv` | digit encoders |
| `rtl/ppg_booth.sv`, `rtl/ppg_first.sv` | partial-product rows |
| `rtl/compressor_3_2.sv`, `rtl/compressor_4_2.sv` | compressor rows |
| `rtl/compressor_24_2.sv` | row alignment, 3:2 stage, 4:2 levels, second pipeline register |
| `rtl/cond_sum_adder_4b.sv`, `rtl/final_adder.sv` | final adder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* **Encoders, PPGs, `tap_ppg`, 4-bit adder.** These are tested exhaustively. For
  the PPG tests, each row read as a signed number plus its conversion bit must
  equal the multiple times X. For `tap_ppg`, the three weighted rows must add up
  to X·Y for all 4096 sample and coefficient pairs.
* **Compressors and final adder.** These are tested with random and corner
  operands against plain addition modulo 2^15. The final adder test also makes
  sure that all eight combinations of the carries into bits 4, 8 and 12 occur.
* **`compressor_24_2`.** The test checks, one clock after the inputs, that the two
  output rows add up to the signed sum of the rows plus the conversion bits, the
  correction row and the sign-inversion offset.
* **`tb_prml_fir`.** This test runs the whole filter at its default size. An
  integer reference model predicts each output. The test covers:
  * the reset state;
  * an impulse that measures the 4-clock latency;
  * both full-scale extremes;
  * 30,000 random samples, with the coefficients changed at random times;
  * a reset in the middle of a stream.

  It also counts how often each mechanism is exercised: every Booth digit code
  of both encoders, the cleared 111 digit, carries into each final-adder block,
  coefficient changes and full-scale results. A mechanism that never occurs is
  counted as a failure.

To simulate with Verilator 5:

    verilator --binary --timing -Irtl -Itb rtl/fir_pkg.sv tb/tb_prml_fir.sv --top-module tb_prml_fir
    ./obj_dir/Vtb_prml_fir

Use the same command with any other `tb/tb_<module>.sv` to test that module.

## Changing the design

* **`TAPS`** (in `fir_pkg`, or `TAPS_P` on the submodules) may be any power of two
  of at least 2. The tree uses log2(TAPS) levels of 4:2 compressors, with the
  register after the first level. Make sure `OW` still holds the largest sum:
  TAPS · 2^(DW−1) · 2^(CW−1) needs log2 of that plus one bit.
* **`CW` is fixed at 6.** The structure assumes three Booth rows per tap, and tap
  0's 4:2 row takes rows 0 to 2 plus the correction row.
* **`DW`** can be changed together with `OW`.
