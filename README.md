# Monte Carlo option-pricing accelerator (binary32, pipelined)

This RTL prices a European call option by Monte Carlo simulation. It
turns the inner loop of the simulation into a floating-point pipeline
that takes one random sample per clock cycle. Several copies of that
pipeline can run side by side. A run of `n` samples per path takes
`n + 26` cycles with the default four paths, and `n + 22` cycles with one
path. A software loop on a small soft-core processor takes thousands of
cycles per sample for the same work. That gap is the reason for the
accelerator: the run is shorter, so it uses less energy even though the
circuit draws about as much power.

The design follows an FPGA accelerator described for a Virtex-5 board
clocked at 100 MHz. The structure, the unit latencies, the random number
generator and the control scheme come from that description. The insides
of the floating-point operators come from this RTL: the original took
them from an operator generator and gives only their ports and
latencies. The section "Departures" at the end lists where this RTL
differs.

## What is computed

For a stock with spot price `S0`, strike `K`, risk-free rate `r`,
volatility `sigma` and time to expiry `t`, the simulated price at expiry
is `S_t = S0 * exp(drift + vsqrdt * V)`, with `V` a standard Gaussian
sample. Here

    vsqrdt = sigma * sqrt(t)
    drift  = (r - sigma^2 / 2) * t

To keep multiplications out of the loop, everything is divided by `S0`:

    K1     = K / S0
    final  = S0 * expRT / n           (expRT = e^(r t), the factor used by the reference program)
    sum    = sum over n samples of max(exp(drift + vsqrdt * V) - K1, 0)
    price  = sum * final

A host computes `vsqrdt`, `drift`, `K1` and `final` once per run and
supplies them as binary32 words. The hardware runs only the loop and
the final multiplication.

## One path

A path (`mc_path`) is a chain of fully pipelined binary32 operators:

    rnd_gen -> fp_mul(*vsqrdt) -> fp_add(+drift) -> fp_exp -> fp_add(-K1) -> mux -> fp_acc
       8            2                 2               3           2           0       3

The numbers are latencies in cycles. A sample issued in cycle `c`
reaches the accumulator input in cycle `c + 17`, and is part of the
path's sum from cycle `c + 20`.

The multiplexer does the `max(., 0)`. It passes the difference
`S_t/S0 - K1` when its sign bit is 0, and passes zero when the sign bit
is 1. It also passes zero for cycles in which no sample was issued. For
that, each path carries a valid bit and a "first sample" bit through a
17-stage shift register beside the data. The "first" bit restarts the
accumulator, so a new run needs no reset.

## The Gaussian random number generator (`rnd_gen`, `lfsr23`)

This is the least obvious part of the design. It makes roughly Gaussian
binary32 numbers without any transcendental function:

1. **Four uniform sources.** There are four 23-bit Galois LFSRs. Each one
   shifts right, and XORs in `0x420000` when the bit shifted out is 1.
   That is the polynomial x^23 + x^18 + 1, with period 2^23 - 1. The
   LFSRs step only in cycles in which a sample is issued.
2. **Averaging.** Two adder levels (23 -> 24 -> 25 bits) and a right
   shift by 2 give the mean of the four values. By the central limit
   theorem, the mean has a bell-shaped distribution.
3. **Into floating point without a converter.** The 23-bit mean becomes
   the fraction field of a binary32 word with exponent 1 (`0x40000000 |
   mean`). That is a number in [2, 4). Starting away from zero means no
   subnormal number can ever appear. The operators do not support
   subnormals.
4. **Centring and scaling.** An `fp_add` subtracts 3.0, giving [-1, 1). An
   `fp_mul` multiplies by 3.5, giving [-3.5, 3.5).

The result has mean about 0 and variance about 1.03 to 1.1, close enough
to a standard Gaussian for this purpose. The stages are LFSR 1, adders 2,
packing 1, add 2 and multiply 2: latency 8. With the seeds 455, 68787, 8
and 98, the sequence is bit for bit the one a C program with the same
LFSRs produces. The testbenches model it that way.

## The long accumulator (`fp_acc`)

Adding floating-point numbers one per cycle in a loop would need a
floating-point adder with a one-cycle feedback path. The accumulator
avoids this. It adds in a wide fixed-point register and converts back
only at the output:

- **LongAcc.** The input's exponent decides where its 24-bit significand
  lands in a 64-bit two's-complement word whose LSB weighs 2^-40. A
  negative input is one's-complemented, and its sign enters the 64-bit
  adder as carry-in, so the input is negated without a separate step.
  The addition is exact, so the sum does not depend on the order of the
  inputs.
- **Range.** Inputs may be up to 2^(MAX_MSB_X+1) = 16. The sum may reach
  2^23. An input outside the range is dropped, and raises the sticky flag
  `XOverflow` or `XUnderflow`. Payoffs at the reference operating point
  stay below 3.
- **LongAcc2FP.** This stage takes the magnitude, counts leading zeros,
  shifts, and rounds to nearest even.

The latency is 3: shift, accumulate, convert. `newDataset` makes the next
sum start from the current input.

## Exponential (`fp_exp`)

`e^x` is computed as `2^y` with `y = x * log2(e)`, in three pipeline
stages:

1. **Range reduction.** `x` becomes a signed fixed-point number with 32
   fraction bits and is multiplied by log2(e). The result splits into an
   integer `k` and a fraction `f` in [0, 1).
2. **Table and polynomial.** The top 8 bits of `f` select `2^(i/256)` from
   a 256-entry table. For the remainder `g < 2^-8`, the stage evaluates
   `1 + t + t^2/2` with `t = g * ln 2`.
3. **Reconstruction.** The stage multiplies the two, normalises, rounds,
   and uses `k` as the exponent.

The table is computed at elaboration time by a Taylor series in 128-bit
integer arithmetic (`exp2_entry`). It is not a data file. Results are
within one unit in the last place of the correctly rounded value.
Arguments with |x| >= 128, or results outside the normal binary32 range,
give infinity or zero.

## Floating-point operators

`fp_mul`, `fp_add` and `fp_add3` have latency 2. `fp_exp` has latency 3.
All of them accept a new operation every cycle. They use IEEE-754
binary32 words and round to nearest even. Subnormals are read as zero and
produced as zero. NaN and infinity inputs propagate. `fp_add` aligns the
operands into a 50-bit field with a sticky bit, so it is correctly
rounded. `fp_add3` adds three aligned operands and rounds once.
`fp32_pkg` holds the shared rounding and packing function.

## Parallel paths and the adder tree (`asp_datapath`, `fp_adder_tree`)

`N_PATHS` paths (default 4) run in lock step, each with its own four
seeds. `fp_adder_tree` sums their partial sums. Each level of the tree
takes groups of three into a 3-input adder and a group of two into a
2-input adder. A single leftover value is delayed two cycles. For four
paths, one `fp_add3` adds paths 0 to 2, then one `fp_add` adds path 3:
latency 4. A single `fp_mul` after the tree applies `final`, so only one
multiplier serves all paths. With four paths, each path runs `n/4`
samples, and the run is four times shorter.

## Control and run timing (`asp_control`, `cycle_counter`)

The control unit uses the 64-bit cycle counter as its only timer:

| cycle (counter value) | action |
|---|---|
| `start` cycle | counter cleared, seeds loaded |
| 0 .. n_iter-1 | `issue` high; `first` in cycle 0 |
| n_iter-1+L | the last sample's contribution is on the datapath output; `result` is latched and `done` rises |

Here `L = asp_pkg::datapath_lat(N_PATHS)`: 26 for 4 paths, 22 for 1 path.
The counter stops at `n_iter + L`, which is the run length in cycles.
`start` again, while `done` is high, begins a new run.

## Soft-core cycle counter (`mb_counter_regs`)

The accelerator was compared with the same program running on a soft
processor. To time that program, a 64-bit cycle counter sits behind three
32-bit registers:

| offset | register | meaning |
|---|---|---|
| 0x0 | control | bit 1 reset, bit 0 enable: write 0x2 to clear, 0x1 to start, 0x0 to stop |
| 0x4 | count MSB | count[63:32] |
| 0x8 | count LSB | count[31:0] |

The processor itself is vendor IP and is not included. The top brings
the register port (`mb_wr`, `mb_addr`, `mb_wdata`, `mb_rdata`) out as
pins. Writes are a one-cycle strobe. Reads are combinational.

## Multiplier self-test (`fp_mul_selftest`)

This is a small board-level test for the binary32 multiplier. A
controller steps through a ROM of eight vectors, one per cycle. Each
vector holds two operands and their expected product. The operands go to
an `fp_mul`, and its output `z_fp` is compared with the expected value
3 cycles after the address was issued. `correct_led` comes on after the
first match and stays on only while no comparison has failed.
`n_errors` counts mismatches and `done` marks the end of each pass. The
sweep repeats forever, so a logic analyser can trigger on `z_fp` or the
LED at any time.

The vectors cover ordinary products, a product that must round, the
option constants, overflow to infinity, zero and infinity operands. The
clock generator of the original test board is not included; the
self-test runs on the design clock.

## Top level (`mc_option_top`)

The top holds the counter, the control unit and the datapath of the
accelerator. Beside them sit the soft-core counter registers and the
multiplier self-test, whose LED and error count are top outputs
(`selftest_led`, `selftest_done`, `selftest_errors`). It has one
clock and a synchronous, active-high reset. Its ports are plain signals.
The seeds are an unpacked array `[N_PATHS][4]` of 23-bit words.

## How far it has been checked

Every module has a self-checking testbench in `tb/`:

- The arithmetic units are checked against double-precision references:
  bit-exact for multiply and add, within 1 ulp for exp.
- The random generator is checked bit for bit against a C-style model,
  including its 8-cycle latency.
- The path and datapath are checked against a software model of the
  whole loop.
- Latencies and cycle counts are checked exactly.

`tb_mc_option_top` runs the full reference workload at the default
size: S0 = 90, K = 100, r = 0.1, sigma = 0.25, t = 2, and 100000 samples
(25000 per path). It finishes in 25026 cycles with a price of 25.156.
`tb_workload_paths` runs the same 100000 samples on 1, 8 and 16 paths
side by side:

| paths | cycles | price |
|---|---|---|
| 1 | 100022 | 24.8738 |
| 4 | 25026 | 25.1561 |
| 8 | 12526 | 24.9489 |
| 16 | 6278 | 24.4700 |

The 1-path price matches the reference C program with the same generator
to five digits (24.8739). The prices differ between sizes because each
path has its own seeds. Each simulation runs in under a second in
Verilator, after a build of a few seconds. Both top-level testbenches
also check that the multiplier self-test finishes passes with its LED on.

Not checked: timing closure at 100 MHz on an FPGA, and the power and
energy that motivated the design. These need synthesis to a real device.

## Departures from the original description

- **Run length.** The original reports `n + 31` cycles. The unit
  latencies it lists add up to 22 for one path (26 for four), and this RTL
  has exactly those. No padding cycles were added.
- **Operators.** The floating-point operators are written from scratch
  with the same ports and latencies. Their accuracy and rounding can
  differ in the last bit from the generator-made units.
- **Accumulator inputs.** The accumulator's `newDataset` input was unused
  in the original. Here it restarts the sum, and a reset port was added.
  The split of the 64 accumulator bits (inputs < 16, sum < 2^23,
  LSB 2^-40) is this design's choice.
- **Seeds and handshake.** Seeds are loaded on `start`. The
  `start`/`done` handshake and `n_iter` as an input are this design's.
- **The final factor.** A constant of 0.004397 appears for `final` among
  the original test parameters. That is four times `S0 * e^(r t) / n`
  for n = 100000. The formula is followed here, and `final` is an input,
  so any value can be supplied.
- **Subtracting K1.** The loop subtracts `K1` by flipping its sign bit
  into an adder.

## Simulating

Verilator 5 (`--timing`) runs every testbench. For example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/fp32_pkg.sv rtl/asp_pkg.sv tb/fp_ref_pkg.sv tb/mc_ref_pkg.sv \
        tb/tb_mc_option_top.sv --top-module tb_mc_option_top
    ./obj_dir/Vtb_mc_option_top

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Testbenches that do not use the Monte Carlo model need only
`fp32_pkg`, `asp_pkg` and `fp_ref_pkg`. The simulator has no X state, so
every register that is read after reset is reset or loaded. The
arithmetic pipelines have no reset, because their outputs are ignored
until valid data reaches them.

To change the number of paths, set `mc_option_top #(.N_PATHS(n))`. The
adder tree and the control's stop count follow automatically. To change
the accumulator range, set `MAX_MSB_X`, `MSB_A` and `LSB_A` of `fp_acc`.
`MSB_A - LSB_A + 1` must stay at most 64.

## Files

| file | content |
|---|---|
| `rtl/fp32_pkg.sv` | binary32 type, constants, round-and-pack, leading-zero count |
| `rtl/asp_pkg.sv` | unit latencies, adder-tree shape, total pipeline latency |
| `rtl/fp_mul.sv`, `fp_add.sv`, `fp_add3.sv`, `fp_exp.sv` | floating-point operators |
| `rtl/fp_acc.sv` | long fixed-point accumulator with binary32 output |
| `rtl/lfsr23.sv`, `rnd_gen.sv` | Gaussian random number generator |
| `rtl/mc_path.sv` | one Monte Carlo path |
| `rtl/fp_adder_tree.sv`, `asp_datapath.sv` | parallel paths and their reduction |
| `rtl/cycle_counter.sv`, `asp_control.sv` | run control |
| `rtl/mb_counter_regs.sv` | register-mapped cycle counter for the soft processor |
| `rtl/fp_mul_selftest.sv` | ROM-driven self-test of the multiplier |
| `rtl/mc_option_top.sv` | top level |
| `tb/fp_ref_pkg.sv`, `tb/mc_ref_pkg.sv` | reference conversions and the software path model |
| `tb/tb_*.sv` | one testbench per module, plus `tb_workload_paths` (1, 8 and 16 paths) |
