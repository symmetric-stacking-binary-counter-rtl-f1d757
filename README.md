# Symmetric stacking binary counter, multiplier and FIR filter

Multi-operand addition -- the partial-product tree of a multiplier above
all -- is built from *counters*: circuits that take m bits of equal weight
and output their number of ones in binary. A conventional counter is a
network of full adders, and every full adder puts XOR gates on the
critical path. A **stacking counter** works differently: it first *sorts*
the input bits so that all ones sit together at one end (a "bit stack",
i.e. a thermometer code), and then reads the length of that stack out as a
binary number. Both steps need only AND, OR and inverters.

This RTL contains

* the 3-bit stacker and the **symmetric** 6-bit stacker that merges two
  3-bit stacks with a single extra level of AND/OR gates;
* a stack-to-binary converter and the resulting **6:3 and 7:3 counters**;
* an N x N unsigned **Wallace-tree multiplier** whose partial products are
  reduced by those counters, with an optional **approximate low part**;
* a direct-form **FIR filter** whose tap multipliers are that multiplier;
* a top level, `ssbc_top`, that holds a 64-bit multiplier and the FIR
  filter side by side.

Everything is combinational except the FIR filter's delay line and output
register.

## Bit stacks

A stack of n bits `y[n-1:0]` has `y[i] = 1` exactly when more than `i` of
the inputs are 1. Bit 0 is the "leftmost" position that fills first.

### 3-bit stacker (`stacker3`)

For inputs x0, x1, x2:

| output | meaning            | logic                    |
|--------|--------------------|--------------------------|
| y0     | at least one 1     | x0 \| x1 \| x2           |
| y1     | at least two 1s    | majority(x0, x1, x2)     |
| y2     | all three          | x0 & x1 & x2             |

### Symmetric 6-bit stacker (`stacker6`)

This is the central trick. Split the six inputs into two halves and stack
each: H = stack(x0..x2), I = stack(x3..x5). Now write H **backwards** next
to I:

    H2 H1 H0 | I0 I1 I2

H's ones sit against the middle from the left and I's ones against the
middle from the right, so this six-bit word is always one unbroken run of
ones, somewhere in the middle, of the right length. Positions three apart
are now paired:

    J0 = H2 | I0    K0 = H2 & I0
    J1 = H1 | I1    K1 = H1 & I1
    J2 = H0 | I2    K2 = H0 & I2

Because the run is contiguous, a pair can only have both bits set when the
run is longer than three; then exactly (run length - 3) pairs overlap. So J
and K together still hold every one exactly once (OR keeps one copy, AND
records the second), and J is full before K gets anything. Stacking J and
K with two more 3-bit stackers and concatenating gives the 6-bit stack:
`y[2:0] = stack(J)`, `y[5:3] = stack(K)`.

Example with four ones, x = 1,1,0 | 1,1,0: H = 110, I = 110 (written
y0 y1 y2). Reversed H next to I: 0 1 1 | 1 1 0 -- a run of four. J =
(0|1, 1|1, 1|0) = 111, K = (0&1, 1&1, 1&0) = 010. stack(J) = 111,
stack(K) = 100, so y = 111100: four ones.

Depth: stacker, one AND/OR level, stacker -- no XOR anywhere.

### Stack to binary (`stack_to_binary`)

A stack of length n contains the count m exactly where `y[m-1] = 1` and
`y[m] = 0`. The converter forms each of those one-hot edges with an AND
and an inverter and ORs, for every output bit, the edges whose count has
that bit set. For six bits it reduces to

    count[2] = y3
    count[1] = y1 & ~y3 | y5
    count[0] = y0 & ~y1 | y2 & ~y3 | y4 & ~y5

The converter is parameterised by the stack length and also serves the 7:3
counter and the small 3:2 / 2:2 helper counters. Its output is defined
only for a valid stack.

### 6:3 and 7:3 counters (`counter63`, `counter73`)

`counter63` is `stacker6` followed by the converter. `counter73` stacks
x0..x5 with `stacker6` and then inserts the seventh bit into the stack
with one AND-OR level,

    z0 = s0 | x6,   zi = si | (s(i-1) & x6),   z6 = s5 & x6,

before a 7-bit conversion. The way the seventh bit joins is this design's
own choice.

`counter32` (full adder) and `counter22` (half adder) are the same idea at
three and two bits; the multiplier uses them for small column leftovers.

## The multiplier (`stack_wallace_mult`)

Parameters: `N` (operand width, default 64) and `APPROX_LSB` (number of
approximated low product columns, default `N/8`). Ports: `a`, `b` (N-bit
unsigned), `p` (2N-bit product). Combinational.

1. **Partial products.** `a[i] & b[j]` is a bit of column `i + j`.
2. **Counter tree.** Each reduction stage treats every column alike. With
   h bits in the column it uses `h / 7` 7:3 counters; of the remainder r,
   one 6:3 counter if r = 6, one 3:2 counter if 3 <= r <= 5, then one 2:2
   counter if two bits are still left; a single remaining bit passes
   through. A counter in column c sends its outputs to columns c, c+1 and
   c+2. Stages are added until every column holds at most two bits.
3. **Final addition** of the two remaining rows with a carry-propagate
   adder (written as `+`).

The schedule is not written out by hand: the functions in `ssbc_pkg`
compute, while the design elaborates, every column's height at every
stage, the number of stages, and the position of each bit. Every stage is
a flat bit vector; inside it a column's bits are ordered as passed bit,
the sums of the column's own counters, the first carries from column c-1,
then the second carries from column c-2. Heights are kept in one packed
vector, 10 bits per column, so operands up to 256 bits are supported.
Stage counts with this rule: 8 bits -> 3 stages, 16 -> 5, 32 -> 6,
64 -> 7, 128 -> 8.

Bits that a counter would send above column 2N-1 are dropped. The value
held in the tree never exceeds a*b < 2^(2N), so those bits are always 0.

### Approximate low part

The lowest `APPROX_LSB` columns are not put into the tree. Product bit c
there is the OR of that column's partial products -- the top bit of the
column's stack, "there is at least one 1" -- and nothing carries out of
those columns. The upper bits are the exact sum of the remaining columns.
So

    p = (a*b - sum of the low columns' partial products) | OR-bits,

the result is never above a*b, and the error is less than
APPROX_LSB * 2^APPROX_LSB (each low column c loses at most c+1 ones of
weight 2^c). `APPROX_LSB = 0` gives the exact multiplier. Column 0
holds a single bit, so `APPROX_LSB = 1` is also exact.

## FIR filter (`stack_fir`)

`y[n] = sum_k coef[k] * x[n-k]`, k = 0..TAPS-1, direct form, unsigned.
Defaults: `DATA_W = 8`, `TAPS = 4`, `APPROX_LSB = DATA_W/8` (so exact at
the default width). Each tap has its own `stack_wallace_mult`; the products
are added by an ordinary adder into `2*DATA_W + clog2(TAPS)` bits.

* `in_valid`/`x_in`: a sample is taken on a rising clock edge when
  `in_valid` is 1. Between samples the delay line and output do not move.
* `coef[k]`: coefficients, from input ports, expected to be held steady.
* `out_valid`/`y_out`: one cycle after a sample is taken, `y_out` holds its
  output and `out_valid` is 1. `y_out` keeps its value until the next
  sample.
* `rst_n`: synchronous, active low; clears delay line and output.

## Top level (`ssbc_top`)

Two independent parts: a `MUL_N`-bit multiplier (default 64,
`MUL_APPROX = MUL_N/8`) on ports `mul_a`, `mul_b`, `mul_p`, and the FIR
filter (`FIR_W = 8`, `FIR_TAPS = 4`, `FIR_APPROX = FIR_W/8`) on ports
`clk`, `rst_n`, `fir_in_valid`, `fir_x`, `fir_coef`, `fir_out_valid`,
`fir_y`.

## Where the design is its own

The stacker, the symmetric merge and the 6:3 counter follow a fully
specified scheme. The following are choices made here, with the reason
being that the scheme leaves them open:

* the stack-to-binary converter's gate structure (edge detect and OR);
* the way the 7:3 counter adds its seventh bit;
* the counter allocation rule of the multiplier tree, and the use of
  stacking-style 3:2 and 2:2 counters for leftovers;
* unsigned operands; the final adder as a plain `+`;
* the meaning of "approximating the LSB part" as OR-ed, carry-free low
  columns, and its default width `N/8`;
* everything about the FIR filter except that it uses this multiplier:
  form, taps, widths, handshake and reset;
* the 64-bit default multiplier width. A 128-bit multiplier is the same
  RTL with `N = 128`; it passes lint, but its simulation build takes over
  20 minutes, so it has not been simulated. The largest size simulated is
  the 64-bit default.

Nothing is pipelined; the timing of the multiplier is that of its
combinational tree.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench              | what it checks                                                     |
|------------------------|--------------------------------------------------------------------|
| `tb_stacker3`          | all 8 inputs against a popcount                                    |
| `tb_stacker6`          | all 64 inputs against a popcount                                   |
| `tb_stack_to_binary`   | every valid stack at lengths 3, 6, 7                               |
| `tb_counter63`/`73`    | all 64 / 128 inputs                                                |
| `tb_stack_wallace_mult`| 8x8 exact and approximate, exhaustive; 5x5 exhaustive; 64x64 default on corners and 3000 random pairs |
| `tb_stack_fir`         | 600 random samples with random gaps, default and approximate filters, latency and hold |
| `tb_ssbc_top`          | the top at its default sizes: 64-bit products and the FIR stream; also counts that the approximation, the missing low carries, FIR outputs, hold cycles and reset each occurred |

The reference for approximate products (`tb/ssbc_ref_pkg.sv`) does not use
the tree: it subtracts the low columns' partial products from `a*b` and
ORs in each low column.

## Simulating

With Verilator 5, from the repository root, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/ssbc_pkg.sv tb/ssbc_ref_pkg.sv tb/tb_ssbc_top.sv \
        --top-module tb_ssbc_top
    ./obj_dir/Vtb_ssbc_top

The packages are named first; `-y` lets Verilator find every module in
the file of the same name. Any other testbench is built the same way with its own top module. The
64-bit tree takes one to two minutes to build, because its schedule is
computed by constant functions.
