# Digital moments analyser

This is a hardware instrument that measures the first four statistical moments of an analog
signal in real time, using no multiplier and no divider. It also measures amplitude probabilities
and the standard deviation. Alongside it sits a family of iterative arithmetic arrays built from
one universal cell. The design follows J. Majithia's digital moments analyser (McMaster
University, 1971). This SystemVerilog is a new implementation of that design; where it departs
from the original, the departure is listed below.

## The idea: moments by counting

The k-th moment of a signal x is the average of x^k. If x is quantised to levels 0..n-1, x^k
could be computed for every sample, but that needs a multiplier per moment.

The analyser uses a different identity. Write a sample at level r as the sum of the r level
steps it exceeds. Then r^k splits into per-level contributions:

    W(k, r) = sum over q = 1..r of k * q^(k-1)

Summed over all samples and divided by n^k, these contributions give m_k (the k-th moment of
x/n), apart from a small quantisation term. In closed form:

    W1 = r        W2 = r(r+1)        W3 = r(r+1)(2r+1)/2        W4 = r^2 (r+1)^2

So each sample needs only three things:

1. A fixed table lookup. The **weighted feed logic** maps r to W2, W3 and W4.
2. One addition per moment.
3. A division by n^k. Since n is a power of two, this division is free. An accumulator l·k bits
   wide overflows exactly when its total reaches n^k. Each carry-out is therefore one unit of
   m_k·C0 (C0 is the number of samples). The carry simply steps a decimal counter, and the
   counter displays m_k·C0 directly. The remainder stays in the accumulator.

For a sample size of 10^4, the counters read the moment multiplied by 10^4, with no further
arithmetic.

Odd moments keep their sign:

- A comparator at the input supplies the sign, and a flip-flop stores it at each conversion.
- Each odd moment has two accumulators, one for positive and one for negative samples.
- The positive carries count its decimal counter up, and the negative carries count it down.

Even moments need only one accumulator and an UP counter.

## Numbers

| item | value |
|---|---|
| converter | 8 bits magnitude plus a separate sign; 8 µs per conversion |
| first moment | all 8 bits, n = 256, 8-bit accumulators |
| moments 2, 3, 4 | 6 most significant bits, n = 64, accumulators 12, 18, 24 bits |
| master clock | 1 MHz; sample rate 100 kHz, 10 kHz … 1 Hz by decade dividers |
| sample size | one input cycle, or fixed 10^3, 10^4, 10^5, 10^6 |
| display counters | 7 decimal digits (largest count 10^6) |
| probability | 4-bit level comparison, 16 levels each side of zero |
| standard deviation | 40-bit S register, 20-bit root counter |

## Structure

```
dma_top
├── spc                      the analyser, synchronous to clk (1 MHz)
│   ├── clock_rate           decade dividers, one-cycle a.d. start pulse
│   ├── bcd_counter  (C0)    sample counter with 10^3..10^6 stop outputs
│   ├── timing_control       one-cycle / fixed-size start and stop
│   ├── prob_comparator      A >= R (or A == R) on the top 4 bits, with sign selection
│   ├── mode_control         routes a.d. done to the accumulators or the probability gate
│   ├── wfl_unit             r -> W2, W3, W4
│   ├── moment_accumulator   x6: m1+, m1-, m2, m3+, m3-, m4
│   ├── bcd_counter  x4      m1, m3 up/down; m2, m4 up
│   └── sigma_unit           counter-equation square root / square / sigma
├── uac_array                general multiply-add / non-restoring divide array
├── booth_array              signed Booth multiplier array
├── sqrt_array               non-restoring square-root array
├── bcd_mult_array           decimal X*Y+K1+K2 from bcd_digit_cell sub-arrays
└── wfl_array                the weighted feed logic built from uac_array multipliers
```

`spc_pkg` holds the shared widths and the mode enumerations. All the arrays are built from `uac`,
the universal arithmetic cell.

The analog parts stay outside the design:

- the precision full-wave rectifier;
- the sign comparator, whose output comes in on `cmp_pos`;
- the converter itself, driven by `ad_start` and returning `ad_data` and `ad_done`;
- the Nixie display tubes.

## Sample timing

**Start pulse.** `clock_rate` turns the 1 MHz clock into a one-cycle `ad_start`:

- every 10 cycles at 100 kHz;
- every 100 cycles at 10 kHz;
- and so on down to 1 Hz.

**Conversion.** The converter answers with `ad_done` and the data within 8 cycles, before the
next start.

**Done cycle.** On `ad_done`, all of the following happen in the same cycle:

- every accumulator adds its weighting number;
- the odd-moment accumulators add only if the stored sign matches them;
- a carry-out steps its display counter.

So a sample is fully processed one cycle after its data arrive. At most one carry per
accumulator and sample is possible, because W(k, r) < n^k.

**Timing modes.** `timing_control` has two modes.

- *One cycle.* A negative-going edge of the sign comparator starts sampling. The next such edge
  stops it, exactly one input period later. The circuit then locks until it is cleared.
- *Fixed size.* The start switch sets a run flip-flop. The C0 counter's 10^3, 10^4, 10^5 or 10^6
  output resets it. The stop is registered, so `sampling` can stay high up to two cycles after
  the last start pulse; no further sample is taken.

**Outputs.** `sampling` is the "in progress" lamp. `done` stays high until `clr`.

## Probability mode

In probability mode the accumulators are inhibited. Each `ad_done` is gated by:

- the comparison of the top four converter bits A against the reference R (A >= R);
- the sign selection (positive or negative side).

The gated pulses are counted in the m1 counter. After C0 samples, the reading divided by C0
estimates the probability that level R is exceeded on the chosen side.

With `prob_interval` set, samples above R+1 are also inhibited. Only A == R counts, giving the
probability of the interval just above R.

## Standard deviation: the counter-equation unit

`sigma_unit` takes square roots without a divider. It keeps a counter x and a register S with
S = x² at all times:

- if S < N: x := x + 1 and S := S + 2x + 1;
- if S > N: x := x − 1 and S := S − (2x_new + 1).

The subtraction is done as S + ~(2x_new), so one true/complement gate and one adder serve both
directions. The carry-in is the S<N state. Each clock, x moves one step toward √N. If N changes,
x follows it.

**Stopping.** Once N is marked complete, two flip-flops watch for the first reversal from S<N to
S>N, or back. At that reversal the clock is inhibited, so x does not oscillate in its last bit.
From a cleared x the result is ⌈√N⌉, or exactly √N when N is a square. If N has fallen below
x², x arrives from above and stops at ⌊√N⌋, so the result is always within one of √N.

**Squaring.** The same unit squares M by comparing x with M instead of S with N. When x = M,
S = M².

**Sigma mode.** Sigma mode chains the two operations:

1. Square m1 (`sd_m`).
2. Clear x but keep S = m1².
3. Root against m2 (`sd_n`).

In step 3, S grows from m1² to m1² + x². The run stops at the first x with m1² + x² ≥ m2, so
x = ⌈√(m2 − m1²)⌉ = ⌈σ⌉.

The unit is 40 bits wide, so the 10^6-sample case fits. The worst case takes about 2^20 clocks
(one second at 1 MHz).

The unit takes `sd_m` and `sd_n` as plain binary ports. The user supplies m1 and m2 scaled to
the same unit. Conversion from the decimal display counters is not built in.

## The universal arithmetic cell and its arrays

Every array is a mesh of one cell, `uac`, with the following equations:

    W = A xor F
    S = A xor (B and D) xor (C and D)
    P = W(B + C) + BC

- D enables the operand.
- F selects add (0) or subtract (1).
- C is the carry or borrow in.
- P is the carry or borrow out.
- The U, V and G outputs pass D, B and F on to the neighbouring cells.

**`uac_array`: multiply-add or divide.**

- *Multiply* (z = 0). Row i adds M, shifted, to the partial result when multiplier bit i is 1.
  The multiplier bits enter most significant first. The result is L·M + K.
- *Divide* (z = 1). The array uses non-restoring division. Each row's F is the previous quotient
  bit, and the quotient bit is F xor (the top cell's carry). It gives ⌊K/M⌋ for K < M·2^NL. The
  remainder is corrected by adding M back when the last quotient bit is 0.

**`booth_array`: signed multiply.** The multiplier is Booth-recoded: each bit pair (x_k, x_k+1)
chooses add, subtract or skip for its row. The shifted multiplicand is sign-extended in every
row. The product is 2N−1 bits, so the product (−2^(N−1))·(−2^(N−1)) is out of range.

**`sqrt_array`: square root.** The radicand is brought in two bits per row. Each row
subtracts (partial root followed by 01) or adds (partial root followed by 11), as the previous
root bit selects. The result is ⌊√x⌋.

**`bcd_digit_cell` and `bcd_mult_array`: decimal multiply.** One sub-array computes
A·D + B + C ≤ 99. It is built from a 4×4 multiplier array, one adder row and a divide-by-10
array, and gives a units digit P and a carry digit Q. An ND×ND grid of sub-arrays forms
X·Y + K1 + K2 digit by digit; for example, 999·999 + 999 + 999 = 999999.

**`wfl_array`: weighted feed logic from arrays.** It computes the same W2, W3, W4 with three
arrays:

1. R = r·r + r;
2. W3 = R·r + R/2;
3. W4 = R·R.

This regular structure scales to more level bits by adding cells, where `wfl_unit` would need new
minimised logic.

The array sizes are those of the original worked examples:

- a 3×3 general array;
- a 3-bit Booth multiplier;
- a 4-bit root;
- 3 decimal digits.

All of them are parameterised.

## How far to trust it, and where it departs from the original

**Direct readouts.** For constant (d.c.) inputs with C0 = 10^4:

- m1 and m2 match the original's table of direct readouts exactly, after truncation.
- m3 and m4 read one or two counts lower. The table was computed from slightly different closed
  forms, r(4r²+6r+3)/4 and r(2r³+4r²+3r+1)/2, while the hardware adds the exact W3 and W4 above.
  For example, at r = 63 the table gives m3 = 9767.45 and the hardware counts 9766.

**Departures.** These are choices of this implementation, not the original's:

- The sign is stored at each a.d. start, so it always belongs to the converted sample.
- The remainder is written back on the add clock, not on the next start pulse.
- The sign comparator is sampled by the master clock; the original clocks flip-flops from it
  directly.
- The probability comparison is A >= R. The original's overview says A > R, but its circuit
  description says A >= R; the circuit is followed here.
- Probability counts use the m1 counter.
- The weighted feed logic is written as arithmetic and left to synthesis. The original used a
  computer-minimised two-level gate network; the outputs are the same.
- Carries ripple along each array row. The original multiplier passes them diagonally from row to
  row (carry save), which is faster; the results are the same.
- The decimal multiplier uses ND² sub-arrays in a rippling grid instead of the original's more
  compact layout.
- The counters have seven digits and wrap above 9999999.
- The sigma unit's inputs are ports (see above).

**Not built.** The following parts are analog or bought-in, and are not part of this design:

- the rectifier;
- the sign comparator;
- the converter;
- the voltage-controlled clock jitter;
- the over-range lamp;
- the display tubes.

All RTL is synthesizable. Yosys synthesises the whole top to about 5,000 cells and 420 flip-flops.

## Simulation

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/ad_converter_model.sv` is a behavioural
converter (data and `ad_done` eight cycles after `ad_start`), used by `tb_spc` and `tb_dma_top`.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/spc_pkg.sv tb/tb_dma_top.sv \
          --top-module tb_dma_top -o sim && obj_dir/sim
```

Replace `dma_top` with any module name to run that module's testbench.

`tb_dma_top` runs the full design at its default parameters, in about one minute of simulation.
It covers:

- the direct-readout table at C0 = 10^4;
- a negative input;
- runs of 10^5 and 10^6 samples;
- random inputs with random signs against a sample-by-sample model;
- the 10 kHz rate;
- both probability modes on both sides;
- one-cycle timing;
- the sigma unit in all three modes, up to a 40-bit radicand;
- every array.

It also counts how often each mechanism fires: accumulator carries, down counts, probability
hits, both kinds of stop, sigma phase changes and F1/F2 inhibits. A mechanism that never fires
counts as a failure.

`tb_readout_table` sweeps all 64 levels as constant inputs, with C0 = 10^4 and both signs. It
compares the four readouts with the closed-form direct readouts described above.
