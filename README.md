# Prime-length DCT-IV on a linear systolic array

This design computes the type IV discrete cosine transform of blocks of N samples, N an odd
prime:

    X(k) = sqrt(2/N) * sum_{i=0}^{N-1} x(i) cos((2i+1)(2k+1) pi / (4N)),   k = 0..N-1

It uses one linear array of only (N-1)/2 multiply-accumulate processing elements (PEs). The trick
is to rewrite the transform so that its expensive part becomes a *circular correlation* of
length N-1 and a symmetry folds it to half that length. A circular correlation maps onto a
linear systolic array in which every PE holds one operand and multiplies it by a
coefficient. The coefficients flow past all PEs in one cyclic stream, and the partial sums
flow through the array at a different speed. All data enters at one end of the array and
all results leave at the other. Cheap pre- and post-processing stages around the array turn
samples into correlation operands and correlation results into DCT-IV outputs.

The default build is the 11-point transform with primitive root g = 2. Five PEs then
produce one block of 11 outputs every 11 clock cycles.

## Contents

- [The decomposition](#the-decomposition)
- [The correlation kernel](#the-correlation-kernel)
  - [Operand pairs and rows](#operand-pairs-and-rows)
  - [The processing element](#the-processing-element)
  - [Stream speeds and loading with the tag](#stream-speeds-and-loading-with-the-tag)
  - [Sign tags](#sign-tags)
  - [Starting a block at any phase](#starting-a-block-at-any-phase)
- [Pre-processing](#pre-processing)
- [Post-processing](#post-processing)
- [Interface, timing and throughput](#interface-timing-and-throughput)
- [Number formats and accuracy](#number-formats-and-accuracy)
- [Where this design departs from the published architecture](#where-this-design-departs-from-the-published-architecture)
- [Files](#files)
- [Simulating](#simulating)
- [Changing the size](#changing-the-size)

## The decomposition

Let alpha = pi/(4N) and M = (N-1)/2. The transform is computed in five steps:

1. **Pre-multiply.** x_c(i) = x(i) cos((2i+1) alpha).
2. **Backward recursion.** x_a(N-1) = x_c(N-1), then x_a(i) = x_c(i) - x_a(i+1) for
   i = N-2 down to 0.
3. **Correlation.** T(k) = sum_{i=1}^{N-1} x_a(i) cos(pi i k / N) for k = 1..N-1.
4. **Forward recursion.** X(0) = sum_i x_c(i), and for k >= 1

       X(k) = 2 [x_a(0) + 2 T(k)] cos(2k alpha) - X(k-1)

5. **Scale.** Multiply every X(k) by sqrt(2/N).

Steps 1, 2, 4 and 5 cost O(N) operations per block. Step 3 costs O(N^2) and is the only part
mapped onto the array.

Step 3 becomes a circular correlation by re-indexing. A primitive root g of N makes
i = <g^a> and k = <g^r> run through 1..N-1 (<.> is the residue mod N). Then
i*k = <g^(a+r)> mod N, and the cosine only depends on a + r mod (N-1). Two more identities
halve the work:

- <g^(a+M)> = N - <g^a>.
- cos(pi (N-i) k / N) = (-1)^k cos(pi i k / N).

Together they let the two operands x_a(<g^j>) and x_a(N - <g^j>) share one coefficient. They
enter the array as a sum (if k is even) or a difference (if k is odd). Every remaining
cosine cos(pi m / N) can be reduced to one of M base values c(e) = cos(pi <g^e> / N),
e = 2..M+1, times +1 or -1. Which base value a term uses only depends on (j + r) mod M.

## The correlation kernel

The kernel (`dct4_core`) is the tag-control unit `dct4_tagctrl` driving the PE chain
`dct4_array`. It takes the M operand pairs of a block on M consecutive cycles. It returns
the N-1 correlation values T(<g^1>), T(<g^2>), ..., T(<g^(N-1)>), one per cycle, from the
last PE.

### Operand pairs and rows

Pair j (j = 1..M) consists of:

- x_e1 = x_a(<g^j>) + x_a(<g^(j+M)>), the sum;
- x_e2 = x_a(<g^j>) - x_a(<g^(j+M)>), the difference.

For N = 11 and g = 2 the powers of g are 2, 4, 8, 5, 10, 9, 7, 3, 6, 1. The pairs are therefore
(2,9), (4,7), (8,3), (5,6) and (10,1).

Row r (r = 1..N-1) is the computation of T(<g^r>). In row r, pair j uses base coefficient
e = ((j + r - 2) mod M) + 2. Each row therefore reads the M base coefficients in a rotated
order. For N = 11 the cyclic coefficient stream is c(4), c(8), c(5), c(10), c(9), c(4), ...
(the arguments are <g^2> .. <g^6>).

### The processing element

Each PE (`dct4_pe`) stores one operand pair (x_i1, x_i2). Every cycle it adds one signed
product to the partial result y that passes through it. A 2-bit sign tag selects the
operation:

| sign | operation   |
|------|-------------|
| 00   | y + x1 * c  |
| 01   | y + x2 * c  |
| 10   | y - x1 * c  |
| 11   | y - x2 * c  |

Normally x1 and x2 are the stored x_i1 and x_i2. In the cycle the loading tag tc is high, x1
and x2 are the operands x_e1 and x_e2 passing by. The PE also stores that pair for the rest
of the block. This removes the need for a separate load phase: the first row already
computes with the pair it is loading.

### Stream speeds and loading with the tag

All streams enter at PE 1 and move towards PE M at different speeds:

| stream          | registers per PE |
|-----------------|------------------|
| partial sum y   | 1                |
| tag tc          | 1                |
| operands x_e1/2 | 2                |
| coefficient c   | 2                |

The operands and coefficients move at half the speed of the partial sums. As a result, a row
that moves one PE per cycle meets, at successive PEs, successive entries of the coefficient
stream going *backwards*. That is exactly the rotated coefficient order that the correlation
needs.

The tag is raised together with the last (M-th) pair of a block, and row 1 starts at PE 1 in
the same cycle. The tag moves twice as fast as the operands. It therefore overtakes one
operand pair per PE:

- it meets pair M in PE 1,
- it meets pair M-1 in PE 2,
- ...
- it meets pair 1 in PE M.

Each PE loads the pair it meets with the tag, so when row 1 has passed, every PE holds its
operand pair. Rows 2..N-1 follow on successive cycles and use the stored pairs. Row r leaves
PE M 2M-1 + (r-1) cycles after the block's first pair entered PE 1.

In the same cycle a PE loads pair j of the new block, a row of the previous block may still
be passing through it. The new pair is only used by rows that arrive with or after the tag,
so consecutive blocks can overlap in the array. No PE ever idles between blocks.

### Sign tags

The sign tag of a PE depends on both the row r and the pair the PE holds. Bit 0 (sum or
difference operand) is the parity of k = <g^r>, from the second identity above. Bit 1 (add or
subtract) collects two sign flips:

- reducing i*k = q*N + m gives cos(pi (qN+m)/N) = (-1)^q cos(pi m/N), so the parity of
  q = floor(<g^j> k / N) flips the sign;
- if <g^(j+r)> lies in the upper half (its exponent is not in 2..M+1), it is replaced by
  N minus itself, which flips the sign once more.

For the N = 11 example, the resulting sign matrix (rows r = 1..10, pairs j = 1..5) is:

    r=1 : 00 00 10 00 10        r=6 : 01 01 11 11 11
    r=2 : 00 10 00 10 00        r=7 : 01 11 01 01 01
    r=3 : 10 00 10 00 00        r=8 : 11 01 11 11 01
    r=4 : 01 11 01 11 11        r=9 : 00 10 00 00 10
    r=5 : 10 00 00 10 00        r=10: 11 01 01 01 01

The published architecture feeds one sign column into each PE from outside. Here
`dct4_tagctrl` generates them itself:

- A row counter enters PE 1 together with the row.
- The counter is delayed one register per PE, so it stays aligned with the row.
- At each PE it indexes a sign table that is computed at elaboration from N and g.

### Starting a block at any phase

The coefficient stream runs freely with period M, so two overlapping blocks share one
stream. A block that starts when the stream is at phase 0 is loaded in the order
j = 1, 2, ..., M. That is the schedule of the published array.

Waiting for phase 0 would cost up to M-1 cycles per block. Instead, the kernel asks for
pair j = p + 1 whenever the stream is at phase p (output `pair_sel = p`), and any cycle can
start a block. A block that starts at phase p0 leaves PE j holding pair
((M - j + p0) mod M) + 1. The row counter carries p0 along, so that the sign lookup uses the
right pair. The results come out in the same row order whatever the start phase. The
pre-processing permutation reads its block in whatever order `pair_sel` asks for.

The kernel accepts a new block every MIN_GAP cycles (parameter MIN_GAP, at least 2M):

- MIN_GAP = N-1 gives blocks back to back, the array's maximum rate. The kernel testbench
  uses this setting.
- The full processor uses the default MIN_GAP = N, because its input and output carry N
  words per block on one channel each.

## Pre-processing

- **`dct4_premult`** multiplies each incoming sample by cos((2i+1) alpha). The coefficient
  comes from a table indexed by a sample counter. The module also marks the last sample of
  each block.
- **`dct4_presub`** runs the backward recursion for x_a. The recursion starts at the last
  sample, so the whole block must be collected first. Two register banks keep the stage
  busy:
  - bank A collects block b+1 and adds its samples up into X(0);
  - bank B meanwhile replaces block b by x_a, one subtraction per cycle.

  A block then passes through every N cycles without a stall.
- **`dct4_preperm`** latches the whole x_a block. It then presents the pair
  x_a(<g^j>), x_a(N - <g^j>) that the kernel asks for. x_a(0) and X(0) are not needed by
  the kernel. They travel to the post-processing stage through a small FIFO,
  `dct4_sidefifo`.
- **`dct4_addsub`** forms the sum and the difference of each pair (combinational).

## Post-processing

- **`dct4_postperm`** puts the kernel results back into natural order. The results arrive
  in power-of-g order. They are shifted serially into an (N-1)-word shift register. In the
  cycle the last one arrives, the register is copied in parallel into a latch bank. A
  multiplexer then reads out T(1), T(2), ..., T(N-1). Its select is log_g(k), from a
  discrete-logarithm table computed at elaboration. The next block shifts in while the bank
  is read.
- **`dct4_postrec`** runs the forward recursion X(k) = 2 [x_a(0) + 2T(k)] cos(2k alpha) -
  X(k-1). It has two pipeline stages (add, multiply), and the output register holds X(k-1)
  for the next step. X(0) is emitted first, one cycle before X(1).
- **`dct4_scale`** multiplies by sqrt(2/N).

## Interface, timing and throughput

`dct4_top` has these ports (N and G are parameters):

| port      | dir | width | meaning                                             |
|-----------|-----|-------|-----------------------------------------------------|
| clk       | in  | 1     | clock, rising edge                                  |
| rst_n     | in  | 1     | synchronous reset, active low                       |
| in_valid  | in  | 1     | in_x holds a sample                                 |
| in_ready  | out | 1     | the sample is taken in this cycle if in_valid is high |
| in_x      | in  | 16    | sample x(i), signed integer, i = 0..N-1 in order    |
| out_valid | out | 1     | out_x holds a result                                |
| out_k     | out | 6     | its index k, 0..N-1 in order                        |
| out_x     | out | 36    | X(k), signed, 8 fraction bits                       |

- Samples may arrive with gaps. The chain keeps up with one sample per cycle, so in_ready
  stays high when samples are presented continuously.
- The output has no back-pressure. Each block comes out as N consecutive valid cycles.
- The first sample of the stream after reset carries i = 0, and blocks follow each other
  without a separator.
- At N = 11, X(0) of a block leaves 46 cycles after the block's first sample was taken.
  At full load, consecutive blocks leave exactly N cycles apart. Both numbers are checked by
  the end-to-end test.

Where the cycles go (formulas in N and M = (N-1)/2):

| stage    | latency                                                  |
|----------|----------------------------------------------------------|
| premult  | 1 cycle                                                  |
| presub   | N cycles after the last sample                           |
| kernel   | 2M-1 cycles from the first pair to the first row         |
| postperm | N-1 cycles of shifting                                   |
| postrec  | 2 cycles                                                 |
| scale    | 1 cycle                                                  |

Multipliers: M in the array, plus one each for the pre-multiplication, the forward recursion
and the final scaling (8 for N = 11).

## Number formats and accuracy

All formats are defined in `dct4_pkg`:

| quantity       | format                                                          |
|----------------|-----------------------------------------------------------------|
| input samples  | 16-bit signed integers                                          |
| internal words | 36-bit signed, 8 fraction bits                                  |
| coefficients   | 24-bit signed, 22 fraction bits                                 |

Every product is rounded to the nearest internal word. With 16-bit inputs, the 28 integer
bits of the internal word leave ample headroom for the growth of the recursions and of the
correlation sums at N = 11.

In the end-to-end test (full-scale random blocks, an impulse, a constant and a zero block),
the largest error against a double-precision DCT-IV is about 0.05 in units of the input LSB.

## Where this design departs from the published architecture

- **Throughput.** The published array processes one N-point block per N-1 cycles. The
  kernel here does too (MIN_GAP = N-1). The complete processor takes one block per N
  cycles, because it has one serial input and one serial output channel carrying N words
  per block.
- **Multiplier count.** The published count is (N-1)/2 + 1. This design has (N-1)/2 + 3,
  because the pre-multiplication, the forward recursion and the output scaling each have
  their own multiplier.
- **X(0) is summed in the pre-processing stage**, where the samples pass anyway, rather than
  in the post-processing stage.
- **Sign columns are generated inside the kernel** from a row counter and a table, instead
  of being supplied from outside the array.
- **Phase-rotated loading** (see above) is this design's addition. For a block starting at
  phase 0 the schedule is the published one.
- **Register counts per PE** (two for operands and coefficients, one for partial sums and
  the tag) are not stated in the published description. They are the assignment under
  which the published stream layout works: the tag with the fifth coefficient, Pe1 holding
  the last pair, and the sign columns offset by one cycle per PE.
- **Kernel coefficient.** The base coefficient is taken as c(m) = cos(pi m / N). Only this
  reading reproduces the published sign matrix.
- **Kernel operands** are the x_a sequence (the published operand vector writes them with
  the pre-multiplied samples' name).
- **Row order.** The kernel emits the correlation results in the order T(g^1), T(g^2), ...
- **Number formats, handshakes and reset** are not specified in the published
  description. They are this design's own.

## Files

`rtl/` holds one module or package per file:

- `dct4_pkg.sv`: formats, the rounding multiply and all elaboration-time tables.
- `dct4_top.sv`: the complete processor.
- Pre-processing: `dct4_premult.sv`, `dct4_presub.sv`, `dct4_preperm.sv`, `dct4_addsub.sv`.
- Kernel: `dct4_core.sv`, `dct4_tagctrl.sv`, `dct4_array.sv`, `dct4_pe.sv`.
- Post-processing: `dct4_postperm.sv`, `dct4_postrec.sv`, `dct4_scale.sv`.
- `dct4_sidefifo.sv`: carries x_a(0) and X(0) past the kernel.

`tb/` holds one self-checking testbench per module, `<module>_tb.sv`, except that
`dct4_core_tb` covers the kernel together with its tag control and PE array. Each testbench:

- prints `TB_RESULT checks=<n> failures=<n>` at the end;
- has a watchdog that stops a hung simulation.

`dct4_top_tb` runs the whole processor at its default size, on 30 blocks. It checks every
output against a floating-point DCT-IV, the output order, the latency and the block
spacing. It also counts the mechanisms that must occur: banked collection overlapping the
recursion, tag loads, blocks starting at phase 0 and at rotated phases, overlapping blocks
in the array, and all four sign codes.

`dct4_top_sizes_tb` runs the same end-to-end check on other sizes, one instance of
`dct4_top_run` each: N = 5, 7, 13, 17 and 31 with g = 2, 3, 2, 3 and 3. It checks every
output value, the output order and the N-cycle block spacing. The largest error seen there is
about 0.17 input LSB.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/dct4_pkg.sv tb/dct4_top_tb.sv --top-module dct4_top_tb
    ./obj_dir/Vdct4_top_tb

The package must come first on the command line. The other modules are found through `-y`.
Replace `dct4_top_tb` by any other testbench name to run a unit test. A full run takes a few
seconds.

## Changing the size

`N` must be an odd prime with 5 <= N < 64, and `G` a primitive root of N. The upper limit
is the table capacity `dct4_pkg::MAXN`; raise it (and the index width KW) for larger N. All cosine, sign, permutation and logarithm
tables follow from N and G at elaboration, so no table needs to be edited; the size sweep
above exercises this. For large N, check
the internal word width DW against the growth of the correlation sums.
