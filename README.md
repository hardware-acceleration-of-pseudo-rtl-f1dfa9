# Table-driven random number generator for any distribution

Simulation programs spend much of their time drawing random numbers from
non-uniform distributions. The usual software route is to draw a uniform
integer, divide it into a fraction u in [0,1), and evaluate the inverse
cumulative distribution function F^-1(u), for example `-ln(1-u)` for an
exponential. In hardware, the division and the transcendental function are
expensive.

This design replaces both with a table lookup and one linear interpolation,
all in fixed point:

1. An LFSR produces a uniform `M_BITS`-bit integer X every clock.
2. The upper `K` bits of X form the table index R.
3. The remaining `F = M_BITS - K` bits form the fraction S.
4. A table of `2^K + 1` entries holds F^-1 sampled at `i / 2^K`. It returns
   A = T[R] and B = T[R+1].
5. The output is `Z = A + ((S * (B - A)) >> F)`.

The hardware does not know the distribution. It is defined entirely by the
table the host loads, so one circuit produces uniform, exponential, Gaussian
or any other distribution. The datapath is one subtraction, one
multiplication and one addition. Results go into a small buffer that the
host program drains while the generator keeps running.

Default sizes: `M_BITS = 32`, `K = 16` and `W = 32`. The table then holds
65,537 words of 32 bits, which is 262,148 bytes.

## Files

| file | what it is |
|---|---|
| `rtl/rng_pkg.sv` | default sizes; maximal-length LFSR tap table for 2 to 32 bits |
| `rtl/lfsr.sv` | Fibonacci LFSR, `STEPS` shifts per clock, with a seed load |
| `rtl/cdf_lut.sv` | inverse-CDF table: one write port, two synchronous read ports (R and R+1) |
| `rtl/interp_unit.sv` | two-stage interpolation pipeline |
| `rtl/rng_fifo.sv` | output buffer (show-ahead FIFO) |
| `rtl/rng_top.sv` | top level that wires the above into the generator |
| `tb/*_tb.sv` | self-checking testbenches; see "Verification" |

## Top-level interface (`rng_top`)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `lut_we`, `lut_waddr`, `lut_wdata` | in | 1, K+1, W | write table entry `lut_waddr` (0 … 2^K) |
| `seed_we`, `seed` | in | 1, M_BITS | load the LFSR (a zero seed becomes 1) |
| `run` | in | 1 | generate one number per clock while high |
| `rd_en` | in | 1 | pop the oldest number from the buffer |
| `rd_data`, `rd_valid` | out | W, 1 | oldest number; buffer not empty |
| `fill_level` | out | log2(FIFO_DEPTH)+1 | numbers waiting in the buffer |
| `stalled` | out | 1 | the pipeline is holding because the buffer is full |

Parameters: `M_BITS` (32), `K` (16), `W` (32), `STEPS` (= `M_BITS`),
`FIFO_DEPTH` (16). `K` must be between 1 and `M_BITS-1`, so there is at
least one interpolation bit. `M_BITS` must be between 2 and 32, the range
the tap table covers.

Use it in this order:

1. Load all 2^K+1 table entries.
2. Optionally load a seed.
3. Raise `run`.
4. Read `rd_data` whenever `rd_valid` is high.

Do not write the table while `run` is high. Numbers already in the pipeline
would then mix the old and new tables.

## Pipeline and flow control

```
 clock edge:   0            1                 2                  3            4
          LFSR holds X  A,B,S registered  product registered  Z registered  Z in buffer
          table read    (cdf_lut)         (interp stage 1)    (interp st.2) rd_valid=1
```

- **Latency.** A number becomes readable 4 clocks after `run` rises.
- **Throughput.** One number per clock, for as long as the reader keeps up.
- **Stall.** When Z is ready and the buffer is full, everything holds: the
  LFSR, the table's output registers and both interpolation stages. This is
  a single global enable (`stalled = z_valid & fifo_full`). No number is
  dropped or skipped.
- **Output order.** The numbers always come out in LFSR order, however the
  host reads them.
- **Pause.** While `run` is low the LFSR holds and empty slots (bubbles)
  enter the pipeline.
- **Seed load.** A seed load in the same clock as `run` cancels that
  clock's number. The sequence restarts at the seed.

## The interpolation and its number formats

Table entries are unsigned W-bit fixed-point numbers. The host chooses the
binary point. The hardware only adds, subtracts and multiplies integers, so
the output has the same format as the table.

- **Difference B−A.** It is formed as a signed W+1-bit value, and the
  product is shifted arithmetically. Decreasing tables, such as `-ln(u)`
  indexed by u, therefore work as well as increasing ones. The result
  always lies between A and B.
- **Rounding.** The shift rounds toward minus infinity. The error is
  therefore biased by up to half a step of the last bit (see the precision
  results below).
- **Signed distributions.** A Gaussian, for example, must be stored with an
  offset, e.g. value + 2^(W−1), and the host removes the offset after
  reading. Plain two's-complement entries do not work: B−A is wrong when
  an interval crosses zero.
- **Infinite ends.** Where F^-1 is infinite (u = 0 or u = 1), the host must
  store a finite value. The testbenches use F^-1 at 1/2048 or 1−1/2048, or
  a saturated maximum.
- **Entry 2^K.** The last entry is read only as B for R = 2^K−1. It should
  hold F^-1(1), clipped as above.

## The uniform source

`lfsr` is a Fibonacci XOR LFSR. Its taps come from the standard
maximal-length table; for 32 bits the polynomial is x^32+x^22+x^2+x+1. The
register runs through all 2^N−1 non-zero states.

An ordinary LFSR shifts once per clock. Consecutive values are then the
same bits moved one place, and a pair of such values (x, y) is far from
independent. This generator shifts `STEPS = M_BITS` times per clock
instead, through an unrolled XOR network. Each number is then made of fresh
bits.

The period stays 2^N−1 when gcd(STEPS, 2^N−1) = 1. This holds for every
power-of-two N with STEPS = N. For other widths, check the period or choose
another `STEPS`. The testbench confirms the period for N = 8 (1 step),
N = 10 and N = 16.

## Accuracy

The generator has two sources of error.

**Interpolation error.** The straight line between two table points
differs from the true curve. It falls as K grows, and it is zero for a
uniform distribution. `tb/interp_error_tb.sv` measures it with a 10-bit X
over one full LFSR period (1023 numbers). It uses 16 fractional bits and
compares against the exact inverse CDF at X/1024. Mean squared error per
number:

| K | uniform | exponential (mean 1) | Gaussian (σ = 1) |
|---|---|---|---|
| 1 | 2.3e-10 | 3.81 | 0.904 |
| 3 | 2.3e-10 | 0.491 | 0.103 |
| 5 | 2.3e-10 | 0.0469 | 0.00858 |
| 7 | 2.3e-10 | 0.00215 | 3.4e-4 |
| 9 | 2.3e-10 | 4.0e-6 | 7.7e-7 |

The uniform column is the truncation floor of the 16-bit format. The other
two fall by a factor of 2.5 or more per extra index bit. K = M_BITS, a table with
an entry for every X and no interpolation, is not supported by this RTL.

**Precision error.** The W-bit format rounds the values. `tb/precision_error_tb.sv`
uses exponential tables with W−4 fractional bits: a 16-bit X, K = 8 and
1000 numbers. It compares each output with the same interpolation done in
real arithmetic. The mean squared error is 0.13 to 0.4 times the square of
one output step. That is the 1/12 of plain rounding plus the bias of the
truncating shift. It falls from 0.40 at W = 4 to 2.0e-18 at W = 32.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs. Build and run one with plain Verilator from
the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    --top-module rng_top_tb rtl/rng_pkg.sv tb/rng_top_tb.sv
./obj_dir/Vrng_top_tb
```

| testbench | what it shows |
|---|---|
| `lfsr_tb` | 32-bit LFSR matches an independent polynomial model over 3500 numbers; seed load, zero seed, hold; maximal period for 8, 10, 16 bits |
| `cdf_lut_tb` | A = T[R] and B = T[R+1], including R = 2^K−1; hold with read enable low; writes during reads |
| `interp_unit_tb` | 4000 random A, B, S (rising, falling, flat, extreme S), with random stalls, against 64-bit integer arithmetic; two-clock latency |
| `rng_fifo_tb` | random push/pop against a queue model; full and empty reached many times |
| `rng_top_tb` | whole generator at M_BITS=16, K=6, W=20: every number against a model; latency 4; one number per clock; buffer-full stalls; pause; reseed; switch from an exponential to a uniform table; use of the last index; exponential mean |
| `rng_top_full_tb` | the same sequence at the default size (M_BITS=32, K=16, W=32, 65,537 entries loaded), 20,000 numbers |
| `monte_carlo_tb` | default size, uniform table: a pi estimator and a Monte Carlo integral of x² from 40,000 points, both within four standard deviations; every number equals X as expected for that table |
| `interp_error_tb` | interpolation error against K (table above) |
| `precision_error_tb` | precision error against W (section above) |

All testbenches run in well under a minute.

## What is specified and what is chosen here

These parts follow the method as published:

- the table-plus-interpolation method
- the split of X into R (upper K bits) and S (lower bits)
- the 2^K+1-entry table
- the interpolation formula with a shift in place of the division
- an LFSR as the uniform source
- the default sizes 32/16/32
- an output buffer that the host reads

These parts are this design's own choices:

- the LFSR taps, and the number of shifts per output
- the seed and reset behaviour
- the table as an on-chip array with two read ports. The original build
  kept the table in the SRAM of an FPGA card.
- the pipeline depth and the global stall
- the signed difference
- the buffer depth and protocol
- all host-side ports

Not included:

- the bus interface to the host computer. Its signals are the top-level
  ports.
- several generators working in parallel, sharing one table
- higher-order interpolation
- special handling of discrete distributions
