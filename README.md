# Fast uniform random number generator built from column summing logic

This is a 32-bit pseudo-random number generator that produces one new uniformly
distributed number on every clock. It implements the linear congruential recurrence

    X(n+1) = (a * X(n) + c) mod 2^32,   a = 136314881 = 2^27 + 2^21 + 1,
                                        c =     18433 = 2^14 + 2^11 + 1

without a multiplier, a DSP block or a pipeline. The constants are chosen so that each has
only three set bits. Multiplying by such an `a` is then just the sum of three shifted copies of
`X`, and adding `c` sets a constant 1 in three bit positions. That sum is built from small
gate-level "summing modules", one per bit column. The whole update is one combinational
block between two clock edges. The target is an FPGA with a 20 ns (50 MHz) clock; timing
simulation of the original FPGA implementation put the worst-case settling time between
7.3 ns (fast corner) and 16.7 ns (slow corner).

Because `a mod 4 = 1` and `c` is odd, the sequence has the full period 2^32 for any seed.

## Files

| file | what it is |
|---|---|
| `rtl/urng_pkg.sv` | word width, default `a` and `c`, widest summing module (6 inputs) |
| `rtl/sum2.sv` … `rtl/sum6.sv` | column summing modules with 2 to 6 inputs |
| `rtl/lcg_step.sv` | combinational `(A*x + C) mod 2^W`, built column by column from the summing modules |
| `rtl/urng_lcg.sv` | top: state register, seed load, enable, output |
| `tb/tb_sum2.sv` … `tb/tb_sum6.sv` | exhaustive tests of each summing module |
| `tb/tb_lcg_step.sv` | the adder against 64-bit arithmetic, for several constant pairs and widths |
| `tb/tb_urng_lcg.sv` | end-to-end test of the top at its default parameters |
| `tb/tb_urng_period.sv` | full-period test at 16 bits |
| `tb/tb_urng_stats.sv` | statistical quality of nine constant pairs (see below) |

## The summing modules

A column of the sum holds a few bits, all of the same weight 2^j. A summing module counts
how many of its inputs are 1 and gives that count in binary:

* `y`: weight 1. This is the result bit of the column.
* `p`: weight 2. This carry goes into column j+1.
* `r`: weight 4. This carry goes into column j+2. It exists only in modules with four or more inputs.

So `count = y + 2p + 4r`. Each output is written as flat AND/OR/XOR logic, not as a
chain of full adders. The logic depth of a column therefore does not grow with the number of
inputs.

| module | y | p | r |
|---|---|---|---|
| `sum2` | `a^b` | `a&b` | – |
| `sum3` | `a^b^c` | majority: `(a&b) \| (c&(a\|b))` | – |
| `sum4` | XOR of all | "at least two", masked by `~r` | all four set |
| `sum5` | XOR of all | "at least two", masked by `~r` | at least four set |
| `sum6` | XOR of all | "at least two", masked by `~r` unless all six are set (6 = 4+2) | at least four set |

In each module, "at least two" and "at least four" are sums of products over pairs of inputs. The
source files give the exact expressions.

## The column adder (`lcg_step`)

Column j of `A*x + C` receives these inputs:

1. `x[j-s]` for every set bit `s` of `A` with `s <= j`, which is one bit from each shifted copy of x;
2. a constant 1 if `C[j]` is set;
3. `p` from column j-1, if that column has at least two inputs;
4. `r` from column j-2, if that column has at least four inputs.

The column uses the summing module that has exactly that many inputs. A column with only
one input is a wire. Carries that leave column W-1 are dropped, and this is the `mod 2^W`.
With the default constants, the columns are:

| columns | inputs | module |
|---|---|---|
| 0 | x0, c | `sum2` |
| 1–10, 12–13, 15–20 | x_j, p | `sum2` |
| 11, 14 | x_j, c, p | `sum3` |
| 21–26 | x_j, x_(j-21), p | `sum3` |
| 27–28 | x_j, x_(j-21), x_(j-27), p | `sum4` |
| 29–31 | x_j, x_(j-21), x_(j-27), p, r | `sum5` |

The module for each column is chosen at elaboration, from the parameters `A` and `C`. Any
constant pair therefore works, as long as no column needs more than six inputs. Elaboration
stops with an error if one does. An `A` with three set bits always fits: it gives 3 bits of x,
plus 1 bit of c, plus 2 carries. An `A` with more set bits usually does not fit. For example,
multiplying by 179 (`1011_0011b`) would need seven-input columns. This limit is why only
multipliers with two or three set bits are considered. The default pair never uses a column
wider than five inputs. `sum6` is needed by other pairs, for example `A = 21, C = 0x41` at
16 bits, and that pair is part of the tests.

The critical path is the ripple of `p` carries from column 0 up to column 31, with one
two-level gate stage per column. This is the delay that has to fit in the 20 ns clock.

## Top level (`urng_lcg`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | synchronous, active low; loads `SEED` (default 1) |
| `load` | in | 1 | load `seed` into the state on the next edge; has priority over `en` |
| `seed` | in | W | initial value X(0) |
| `en` | in | 1 | advance one step on the next edge |
| `rnd` | out | W | current number (this is the state register) |
| `rnd_valid` | out | 1 | high in the cycle after an edge that advanced the state |

Parameters: `W` (32), `A` (136314881), `C` (18433), `SEED` (1). When `en` is held high, a new
number appears on `rnd` on every clock. The output is registered and there is no other latency.

The following are choices made for this RTL, not part of the original design: the reset value,
`load`/`seed`, `en` and `rnd_valid`. The recurrence, the constants, the summing-module
equations and the single-cycle, purely combinational update follow the original design.

## How the constants were chosen, and what the tests reproduce

The constant pair was chosen from candidates whose multiplier has two or three set bits. Each
candidate was scored with two measures. Each measure is averaged over 100 runs of N = 10^5
numbers, and each run starts from a different seed:

* `h2 = sum_j ((O_j - E_j)/E_j)^2`: the squared relative error of a histogram against the
  uniform density, taken over M intervals.
* `c_rl = sum_{i=1..100} rho(i)^2`: the sum of the squared autocorrelation at lags 1 to 100.

Both measures are small for a good generator. The final choice put the weight on `c_rl`.

`tb_urng_stats` runs all nine candidate pairs from the published comparison side by side. It uses
M = 100 intervals. `rho(i)` is the autocorrelation of the mean-removed samples, normalised by its
value at lag 0. With these readings, the simulated means agree with the published ones to within
about 7% for every pair. The test fails if any mean is off by more than 15%. Result for the
default pair: `h2` = 0.0493 against 0.0488 published, and `c_rl` = 0.00058 against 0.000563.
The pair `a = 2^30+2^19+1, c = 2^20+2^17+1` has a much better histogram score (0.0017). It was not
chosen because its correlation score is worse.

## Verification

All testbenches check themselves. Each ends by printing `TB_RESULT checks=N failures=M`, and each
has a watchdog.

* `tb_sum2` … `tb_sum6` apply every input pattern. They check `y`, `p` and `r` against the
  population count.
* `tb_lcg_step` checks the default pair on corner values and on 20,000 random states. It runs
  2,000 random states through each of the nine candidate pairs. It also checks two 16-bit
  configurations exhaustively. The first is `A = 193`, which for 8-bit operands gives the full
  16-bit product 193·x. The second is `A = 21, C = 0x41`, which uses `sum6`.
* `tb_urng_lcg` runs the top at its default parameters. It checks the reset value, then 1000
  consecutive numbers with one new number per clock. It then drives random enable and load
  patterns, load together with enable, several seeds and a reset in the middle of a run. It
  counts how often each of these happened, and also how many steps involved a weight-4 carry.
  If any of them never happened, the test fails.
* `tb_urng_period` uses W = 16, A = 2081 and C = 13. It steps through all 65536 states and checks
  that none repeats before the sequence returns to the seed.
* `tb_urng_stats` runs 9 pairs × 100 runs × 10^5 numbers. It takes about half a minute with
  Verilator.

What is not verified: the settling time on a real FPGA. It depends on the device and on
place-and-route, and a cycle-based simulation cannot show it.

## Simulating

With Verilator 5, run from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -y rtl +libext+.sv --top-module tb_urng_lcg \
        rtl/urng_pkg.sv tb/tb_urng_lcg.sv
    ./obj_dir/Vtb_urng_lcg

To run another test, replace `tb_urng_lcg` with its name. To use other constants, override
`A` and `C` on `urng_lcg`. For a narrower generator, also set `W`; `A` and `C` are still given as
32-bit values, and only their low `W` bits are used. The adder is rebuilt automatically. Full
period needs `A mod 4 = 1` and odd `C`.
