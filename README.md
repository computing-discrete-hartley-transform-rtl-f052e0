# Systolic 16-point discrete Hartley transform with algebraic-integer coefficients

The discrete Hartley transform (DHT) of a block of N real samples is

    X_k = sum_{n=0}^{N-1} x_n * cas(2*pi*k*n/N),   cas(t) = cos(t) + sin(t).

This RTL computes it for N = 16 without a multiplier in the transform
itself. Every kernel value is coded exactly as a small-integer polynomial in
one irrational constant, z = 2*cos(2*pi/16) = 1.8477590...:

    2*cas(2*pi*m/16) = a0 + a1*z + a2*z^2 + a3*z^3.

Each a_i is 0, +-1, +-2 or +-4. Multiplying a sample by a kernel value
therefore becomes four independent shift-and-add operations, one for each
power of z. These produce four integer sums per output,

    S_i(k) = sum_n x_n * a_i(k*n mod 16),   i = 0..3.

They are exact: they carry no rounding error. Only at the very end is the
polynomial evaluated by Horner's rule with a fixed-point z:

    2*X_k = ((S_3*z + S_2)*z + S_1)*z + S_0.

That needs just three multiplications by a constant per output. The
constant is z^ = 2 - 2^-3 - 2^-5 + 2^-8 = 473/256, which is within about
1e-4 of z.

The top level `dht_top` holds two arrays side by side, each with its own
ports:

- **`dht_exact`**: the 16-point transform with the exact code. This is the
  main design. Its PE1 cells only shift.
- **`dht_approx`**: a 32-point transform. It keeps the same degree-3
  polynomial and the same z, but it approximates the kernel with integers
  of 6 bits (4 or 8 can be selected). Its PE1 cells multiply by the
  coefficient. The exact 32-point code would need degree 7.

## The coefficient code

z is a root of z^4 - 4z^2 + 2, so every power z^4 and above folds back into
degree 3. The coefficients follow from the Chebyshev recurrence for
2*cos(k*t):

    C_0 = 2,  C_1 = z,  C_{k+1} = z*C_k - C_{k-1}.

Each step is reduced modulo z^4 - 4z^2 + 2. Because
2*sin(2*pi*m/16) = C_{4-m}(z), we get

    2*cas(2*pi*m/16) = C_{m mod 16} + C_{(4-m) mod 16}   (reduced).

`dht_pkg::cas_coef` performs this at elaboration time. No coefficient table
is stored in the source. For m = 0..7 the result (a0, a1, a2, a3) is:

| m | a0 | a1 | a2 | a3 |
|---|----|----|----|----|
| 0 | 2  | 0  | 0  | 0  |
| 1 | 0  | -2 | 0  | 1  |
| 2 | -4 | 0  | 2  | 0  |
| 3 | 0  | -2 | 0  | 1  |
| 4 | 2  | 0  | 0  | 0  |
| 5 | 0  | 4  | 0  | -1 |
| 6 | 0  | 0  | 0  | 0  |
| 7 | 0  | -4 | 0  | 1  |

For m + 8 the code is the negation of the code for m. The testbenches
check against this table, written out independently.

## Array structure (`dht_exact`)

```
            0       0       0       0          (top of each column)
            |       |       |       |
 x_in -> DEMUX -> [PE1] -> [PE1] -> [PE1] -> [PE1]     row 0  (holds x_0)
          (16   -> [PE1] -> [PE1] -> [PE1] -> [PE1]     row 1  (holds x_1)
           regs)     ...                                 ...
                -> [PE1] -> [PE1] -> [PE1] -> [PE1]     row 15 (holds x_15)
                     |       |       |       |
              0 -> [PE2] -> [PE2] -> [PE2] -> [PE3] -> X_k
                    a3      a2      a1      a0         (coefficient of the column)
```

- **`dht_demux`** is the output-buffered 16-way demultiplexer. Samples
  arrive one per step. A modulo-16 pointer writes sample j into row
  register j. That register then holds x_j for the 16 steps in which the
  row works on the 16 outputs of the block.
- **`dht_pe1`** (64 cells) performs `x_out <- x_in` and
  `s_out <- s_in + shift_a(x_in)`. The coefficient comes from 16 local
  registers, one per output index k, arranged as a ring that rotates once
  per step. A coefficient is coded as {non-zero, negate, shift 0..3}. A zero
  coefficient makes the cell a plain transfer `s_out <- s_in`. Column c
  holds the coefficients of a_{3-c}.
- **`dht_pe2`** (3 cells) performs `y_out <- (x_in + y_in) * z^`. The
  multiplier is a fixed shift-add network
  `(v<<9) - (v<<5) - (v<<3) + v`, followed by an arithmetic shift right
  by 8. Running values carry 8 fraction bits, and each PE2 truncates its
  product back to 8 fraction bits.
- **`dht_pe3`** (1 cell) performs `y_out <- x_in + y_in`. This last Horner
  step adds S_0.
- **`dht_recon`** is the bottom row: the three PE2 cells and the PE3 cell.
- **`dht_exact`** wires the parts together and keeps track of which
  result is on the output.

## Schedule: why it works without control signals

Every cell registers both of its outputs. A sample therefore moves one
column to the right per step, and a partial sum moves one row down per
step. Suppose sample x_j is taken in at step j. Then cell (row j, column c)
works on output index

    k = (t - j - 1 - c) mod 16      at step t.

Along a column, row j+1 works on output k one step after row j did. This is
exactly when row j's partial sum arrives, so each column sum collects the 16
terms of one output k. The sum of column c leaves the grid one step later
than the sum of column c-1. That one-step offset is also the delay through
one PE2, so the Horner row needs no extra alignment registers.

The coefficient rings are loaded at reset with each cell's own phase. The
only state that depends on time is the demultiplexer's write pointer,
together with the rings, which all rotate in lock-step.

The latency of the first block is as follows. X_0 is loaded into the output
register at step N+I+1 = 20, counting x_0's step as step 0. X_15 is loaded
at step 2N+I = 35. That is 2N+I steps through the PE grid plus one step for
the demultiplexer register. Measured from x_0 to the moment each result is
visible, this is N+I+2 = 21 steps for X_0 and 2N+I+1 = 36 steps for X_15.
After that, one result appears per step and a new block completes every 16
steps. Blocks may follow each other without a gap.

## Interface of `dht_exact` (and of `dht_approx`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `step` | in | 1 | time-step enable. While low, the whole array holds (stall). |
| `x_in` | in | 8 signed | sample, taken on every step |
| `out_valid` | out | 1 | one-cycle pulse after each step that loaded a new result |
| `out_k` | out | 4 (5) | index k of that result |
| `X_out` | out | 27 (31) signed | X_k with 9 fraction bits (`X_out / 512.0`) |

`dht_top` brings out both sets of ports with the prefixes `ex_` (exact,
16-point) and `ap_` (approximate, 32-point). The two arrays share only
`clk` and `rst_n`.

Blocks are aligned to reset. The first sample after reset is x_0 of block
0, and a sample is expected on every step. Samples fed only to flush the
last block produce results that belong to no block.

Parameters: `N` (16) and `X_W` (8). All other widths are derived:

- S_W = X_W + 3 + log2(N) = 15 bits for the column sums (worst case 8192).
- Y_W = S_W + 12 = 27 bits for the Horner path.

## The approximate 32-point array (`dht_approx`)

This array uses the same schedule and the same demultiplexer as
`dht_exact`. Its grid is 32 x 4 cells of `dht_pe1_mul`, and its Horner row
is the same `dht_recon`. X_0 of the first block is visible after
N+I+2 = 37 steps and X_31 after 68 steps.

The kernel uses 2*cas(t) = 2*sqrt(2)*sin(t + pi/4). The magnitude of
2*cas(2*pi*m/32) therefore takes only nine values: q = 0..8, where
q = min(p, 16-p) and p = (m+4) mod 16. The sign is + when (m+4) mod 32 lies
in 1..15. `dht_approx_pkg` stores a code of degree 3 in z = 2*cos(2*pi/16)
for each of the nine magnitudes:

| q (m) | 4-bit | 6-bit (default) | 8-bit |
|-------|-------|-----------------|-------|
| 0 (12) | 0 0 0 0 | 0 0 0 0 | 0 0 0 0 |
| 1 (11, 13) | -7 -7 6 0 | -25 17 26 -15 | -103 -125 122 -13 |
| 2 (10, 14) | 0 4 0 -1 | 0 4 0 -1 | 0 4 0 -1 |
| 3 (9, 15) | -1 -6 4 0 | 5 -8 -17 11 | 47 -28 0 1 |
| 4 (0, 8) | 2 0 0 0 | 2 0 0 0 | 2 0 0 0 |
| 5 (1, 7) | -4 4 -4 2 | 3 -12 10 -2 | -115 48 86 -42 |
| 6 (2, 6) | 0 -2 0 1 | 0 -2 0 1 | 0 -2 0 1 |
| 7 (3, 5) | -7 3 -8 5 | -20 -18 -15 17 | 85 10 98 -69 |
| 8 (4) | -4 0 2 0 | -4 0 2 0 | -4 0 2 0 |

Each entry lists (a0, a1, a2, a3). The even q are exact. The odd q are in
error by at most 1.3e-3 for 4 bits, 1.2e-5 for 6 bits and 3e-7 for 8 bits.
These errors were checked by evaluating each code in z.

With 6-bit coefficients the column sums need 19 bits and the Horner path
31 bits. In this array the z^ error dominates the coefficient error. Over
the tested blocks the output stays within 3.6 of the true DHT, and within a
per-result bound computed from the column sums. A more precise z^ would be
needed to benefit from the 8-bit code.

`AP_CB` (or `CB` of `dht_approx`) selects the 4- or 8-bit set instead. Over
the tested blocks the 4-bit array stays within 1.0 of the true DHT. The
8-bit array stays within 7.1, because its large coefficients multiply the
error of z^. Each PE1 ring register holds CB+1 bits: the 4-bit set contains
-8, and the negated code +8 needs the extra bit.

## How far the arithmetic can be trusted

- The column sums S_i are exact. They cannot overflow for any 8-bit input.
- X_out matches a bit-exact integer model of the Horner row. It is within
  0.4 of the true DHT over the tested blocks, which include blocks of
  extreme samples (-128/127). There are two sources of error. The
  approximation z^ = 473/256 differs from z by 1.0e-4 and is multiplied by
  the derivative of the polynomial, so the error grows with |S_i|. The
  three truncations to 8 fraction bits add the rest. For more accuracy,
  widen the fraction (`Z_FRAC`) and the z^ network together.

## Where this RTL departs from, or adds to, the design it follows

- `step` (global stall), the asynchronous reset, reset-loaded coefficient
  rings with no reload path, and `out_valid`/`out_k` are this
  implementation's own choices.
- Fixed-point format and widths: 8 fraction bits and truncation are
  this implementation's choices. The z^ constant is the published one for
  8-bit data.
- Latency: the first block's last result counts 2N+I steps through the
  array, plus one step for the input demultiplexer register.
- The share of PE1 steps that are pure transfers is 11/16 (0.6875): 704 of
  the 1024 coefficient uses over all (k, n) are zero. The end-to-end
  testbench measures this share directly. The value sometimes quoted for
  this array is 9/16.
- The codes for 2*cas(10*pi/16) and 2*cas(14*pi/16) contain a coefficient 4.
  They are not sign changes of the other rows, so the shifter must cover
  shifts 0..2, not only 0..1.
- The 32-point array reuses the 16-point structure unchanged, except that
  its PE1 cells multiply by the coefficient. That structure belongs to this
  implementation. So does the decision to offer only the 4-, 6- and 8-bit
  code sets: they are the sets whose every entry was checked.
- Configurations that are not built:
  - N = 8 (`dht_exact` with N = 8 would have the right grid, but PE2
    still multiplies by the 16-point z; it would need sqrt 2).
  - The exact 32-point code (degree 7, with coefficients such as 6, 7, 10
    and 14, which are not single shifts).

## Files

| file | content |
|------|---------|
| `rtl/dht_pkg.sv` | shift-code type, z^ fraction width, coefficient functions |
| `rtl/dht_demux.sv` | input demultiplexer |
| `rtl/dht_pe1.sv` | shift-accumulate cell with coefficient ring |
| `rtl/dht_pe2.sv` | Horner cell, constant multiplier by z^ |
| `rtl/dht_pe3.sv` | final adder |
| `rtl/dht_recon.sv` | PE2/PE3 row |
| `rtl/dht_exact.sv` | exact 16-point array |
| `rtl/dht_approx_pkg.sv` | approximate 32-point kernel codes |
| `rtl/dht_pe1_mul.sv` | multiplying PE1 of the 32-point array |
| `rtl/dht_approx.sv` | approximate 32-point array |
| `rtl/dht_top.sv` | both arrays side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

`tb_dht_exact` and `tb_dht_approx` run each array at its default
parameters. `tb_dht_exact` feeds 12 back-to-back blocks with random stalls and checks every result against the
integer model and a floating-point DHT. It also checks the latency and
counts the stalls, back-to-back blocks, transfers, negations and each shift
amount. `tb_dht_approx` does the same for the 32-point array. `tb_dht_approx_codes`
runs the 32-point array with the 4-bit and the 8-bit code sets and checks
them against the floating-point DHT. `tb_dht_top`
runs both arrays in `dht_top` at once, with independent stalls, and checks
them bit-exactly. Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_dht_top \
    rtl/dht_pkg.sv rtl/dht_approx_pkg.sv tb/tb_dht_top.sv -o sim
./obj_dir/sim
```

Replace `tb_dht_top` with any other testbench name. Elaborating a grid
evaluates the coefficient functions for every cell. Building `tb_dht_top`
takes about three minutes, and the single-array testbenches take well
under a minute.
