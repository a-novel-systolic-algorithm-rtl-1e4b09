# DST-IV processor on two linear systolic arrays

This is synthesizable SystemVerilog for a streaming processor of the type IV
discrete sine transform (DST-IV) of a prime length N:

    Y(k) = sum_{i=0}^{N-1} x(i) * sin((2i+1)(2k+1) * alpha),   alpha = pi/(4N),   k = 0..N-1

A direct evaluation needs N^2 multiplications and an irregular flow of data.
The design avoids both. It rewrites the transform around an auxiliary input
sequence and a short output recursion, so that almost all the work becomes two
*pseudo-cyclic convolutions* of length L = (N-1)/2. Each convolution runs on
its own linear systolic array of L identical processing elements (PEs). The
two arrays work in parallel. Each has only local connections, and its inputs
and outputs sit at its two ends. The default size is N = 11, with primitive
root G = 2, so each array has 5 PEs. Any odd prime N with a primitive root G
elaborates, and the constants, permutations and sign patterns are worked out
from N and G when the design is elaborated.

With back-to-back input, the processor takes one 16-bit sample per clock and
delivers one output per clock. That is one full transform every N clocks.

## The algorithm as built

**Auxiliary input sequence.** Each sample is weighted,
w(i) = x(i) sin((2i+1)alpha). The weights are then summed from the end of the
block:

    x'(N-1) = w(N-1),      x'(i) = w(i) + x'(i+1),   i = N-2 .. 0

The identity cos((2i+1)t) = cos t - 2 sin t * sum_{j=1..i} sin(2jt) turns the
DST-IV into:

    Y(0)  = x'(0)
    T(k)  = sum_{j=1}^{N-1} x'(j) sin(4kj*alpha)            k = 1..N-1
    Tc(k) = x'(0) cos(2k*alpha) - 2 T(k) sin(2k*alpha)
    Y(k)  = 2 Tc(k) + Y(k-1)

Only T(k) costs O(N^2) operations. The rest is O(N).

**From T(k) to two convolutions.** The kernel of T obeys
sin(4k(N-j)alpha) = -(-1)^k sin(4kj*alpha). So x'(j) and x'(N-j) can be
combined before any multiplication:
- even k uses the difference x'(p) - x'(N-p);
- odd k uses the sum x'(p) + x'(N-p).

Each pair is named by p_j = G^(j+1) mod N, for j = 0..L-1. Output m of either
group is the even or odd member of {G^(m+1), N - G^(m+1)}. With that ordering,
the kernel entry of output m and pair j has magnitude
C[(m+j) mod L] = |sin(pi (G^(m+j+2) mod N) / N)|. This is a cyclic pattern:
each row of the matrix is the row above, shifted by one place. Only the signs
break the cycle, which is why the convolution is called *pseudo*-cyclic. The
sign of entry (m, j) is the sign of sin(pi k_m p_j / N), which is negative
when floor(k_m p_j / N) is odd. Both groups use the same magnitudes, so the
two arrays are the same hardware; only their sign patterns differ.

For N = 11 and G = 2:

| | order |
|---|---|
| input pairs (p, N-p) | (2,9) (4,7) (8,3) (5,6) (10,1) |
| even array outputs | T(2) T(4) T(8) T(6) T(10) |
| odd array outputs | T(9) T(7) T(3) T(5) T(1) |
| PE weights C[0..4] | sin(4pi/11) sin(8pi/11) sin(5pi/11) sin(10pi/11) sin(9pi/11) |

The sign matrices (1 = subtract; rows are outputs m, columns are pairs j) are:

    even array            odd array
    0 0 1 0 1             1 1 0 0 0
    0 1 0 1 1             1 0 1 1 0
    1 0 1 1 1             0 1 0 1 0
    1 0 0 0 1             0 1 1 0 0
    1 1 1 0 1             0 0 0 0 0

## Systolic array dataflow

This part is the hardest to follow. Each PE `q` holds one fixed weight C[q].
Each clock it does one multiply and one add or subtract. Two streams pass
through the array in the same direction, at different speeds:

- **input samples** u move one PE every **two** clocks. Each PE holds two
  sample registers.
- **partial results** move one PE every clock, together with their tags.

Because of the speed difference, a result injected at PE 0 on a later clock
meets older samples as it travels. Let cycle 0 be the first sample at the
array. The feeder then sends the samples u_{(L-1-c) mod L} for c = 0..2L-2,
which is 2L-1 samples: one full cycle of the L pair values, plus L-1 of them
again to cover the wrap-around. Result m enters PE 0 at cycle L-1+m. It meets
pair (q-m) mod L at PE q, which is exactly the sample that goes with weight
C[q]. It leaves PE L-1 at cycle 2L-1+m. No signal is broadcast, and all I/O is
at the array ends.

**Tag control.** A partial result carries an L-bit sign tag. PE q must add or
subtract according to the sign of entry (m, (q-m) mod L). The tag for result
m is built with bit q set to that sign. Each PE uses bit 0 and passes the tag
on shifted right by one. So every PE is identical, and a PE never needs to
know which result it is working on. The tag enters with the result at PE 0,
so the PEs need no control wiring of their own. A small index tag (m) also
travels along, so the output side knows which T(k) it is receiving.

## Pipeline and timing

```
in ──► dst4_preproc ──► x' RAM (even i) ─┐         ┌► array (differences) ─┐
       input RAM,       x' RAM (odd i)  ─┴► feeder ┤                       ├► dst4_postproc ──► out
       reverse read,                               └► array (sums)  ───────┘   T RAMs (even/odd k),
       x' recursion                                                            Y recursion
```

1. **dst4_preproc.** Writes the block into an N-word input RAM in natural
   order. It then reads the block back in reverse, because the recursion runs
   from i = N-1 down to 0. It multiplies each sample by sin((2i+1)alpha),
   accumulates, and writes x'(i).
2. **x' RAMs.** p and N-p always have opposite parity. Storing x' by index
   parity therefore lets the feeder read both members of a pair in one clock
   from two single-port RAMs.
3. **dst4_feeder.** Reads the 2L-1 pairs in stream order. It forms the
   difference and the sum, and injects the L results with their sign tags.
4. **Two dst4_systolic_array instances.** The even-output array gets the
   differences; the odd-output array gets the sums.
5. **dst4_postproc.** Writes each T(k) at address k into one of two RAMs,
   one for even k and one for odd k. That puts the results back into natural
   order and lets both arrays write in the same clock. It then reads
   k = 0..N-1 in order and runs the Y(k) recursion.

Every RAM (`dst4_pp_ram`) has two banks. While one block is read, the next can
be written, so blocks stream with no stall. Each stage needs at most N clocks
per block. Latency: Y(0) of a block is presented **N + 3L + 6 clock edges**
after the edge that takes in the block's last sample. That is 32 clocks for
N = 11. Y(1)..Y(N-1) follow on consecutive clocks.

## Interface (dst4_top)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset (control state only) |
| in_valid, in_data | in | 1, DATA_W | x(0)..x(N-1) of each block, one per clock at most, gaps allowed |
| out_valid | out | 1 | Y(k) valid; N consecutive clocks per block |
| out_idx | out | clog2(N) | k |
| out_last | out | 1 | marks Y(N-1) |
| out_data | out | OUT_W = DATA_W + clog2(N) | Y(k), signed integer, same scale as the input |

Parameters: `N` (prime, default 11), `G` (a primitive root of N, default 2),
`DATA_W` (default 16) and `GUARD` (extra fraction bits inside, default 4).
Elaboration stops with an error if N is not prime or G is not a primitive
root.

There is no back-pressure: the sink must accept every output. Each stage
needs at most N clocks per block, so a source that sends at most one sample
per clock can never overrun the pipeline. Concurrent assertions in
`dst4_preproc`, `dst4_feeder` and `dst4_postproc` check this, and check that
the two arrays stay in step. Samples are grouped into blocks by counting, so
the block boundary is set only by reset.

## Fixed point and accuracy

- Samples are integers. x' carries GUARD = 4 fraction bits and log2(N) growth
  bits: 24 bits at the defaults.
- Pair sums are 25 bits, and T(k) is 29 bits in the top.
- All sine and cosine constants are 24-bit Q2.22. Each is computed at
  elaboration by `dst4_pkg` with `$sin`/`$cos`, so there are no table files.
- Each product is rounded to nearest. The output is rounded from the guard
  bits.

Measured against a floating-point DST-IV, the largest error at N = 11 is
1.8 LSB over 660 outputs, including full-scale blocks. The output recursion
adds up the rounding of N-1 steps, so the error grows with N: about 3.5 LSB
at N = 23 and 6.8 LSB at N = 31. With 18-bit constants the error at N = 11
would be tens of LSB. To trade accuracy for multiplier size, change
`COEF_W`/`COEF_FRAC` in `dst4_pkg`.

## How this relates to the published algorithm, and what is this design's own

Taken from the algorithm:
- the auxiliary input sequence formed by a backward recursion;
- Y(0) and the recursion Y(k) = 2Tc(k) + Y(k-1);
- the split of T(k) into two pseudo-cyclic convolutions, with differences for
  even k and sums for odd k;
- the index pairs and output orders (for N = 11: {2,4,8,6,10} and
  {9,7,3,5,1});
- the PE contents: multiplier, adder and sign multiplexers;
- tag-controlled arrays with all I/O at the ends;
- N-word RAMs for the permutations.

Choices made here:
- The recursion weights each sample by sin((2i+1)alpha), and Y(0) = x'(0).
  With this form, the equations reproduce the DST-IV exactly and give the
  printed N = 11 convolution matrices entry for entry.
- T(k) is the plain sine convolution, so Tc(k) carries the factor 2 T(k).
- The signs come from the kernel sin(pi k p / N), as they appear in the
  convolution matrices.
- The array dataflow: samples move at half speed, and results carry a
  shifting sign tag.
- Splitting the RAMs by index parity, and giving them two banks.
- All word sizes, the valid-only handshake and the reset.

The algorithm also mentions a hardware-sharing method that would reduce the
hardware further. It is not described, so it is not built: each array has its
own L multipliers.

## Files

| file | content |
|---|---|
| rtl/dst4_pkg.sv | fixed-point format; functions for modular powers, index maps, sign bits and all constants |
| rtl/dst4_top.sv | top level |
| rtl/dst4_preproc.sv | input buffer, reverse read-out, x' recursion |
| rtl/dst4_pp_ram.sv | two-bank RAM, 1 write and 1 read port |
| rtl/dst4_feeder.sv | pair permutation, sum/difference, tag injection |
| rtl/dst4_systolic_array.sv | linear array of L PEs |
| rtl/dst4_pe.sv | processing element |
| rtl/dst4_postproc.sv | T reordering and output recursion |
| tb/tb_dst4_*.sv | one self-checking testbench per module |
| tb/tb_dst4_top_sizes.sv, tb/tb_dst4_top_run.sv | the top at N = 5, 7, 13, 17, 19, 23, 31 |

Every testbench computes its expected values independently, in floating point
from the definitions (the DST-IV itself, the sine kernels and their signs). It
ends by printing `TB_RESULT checks=<n> failures=<n>`. `tb_dst4_top` runs the
default configuration end to end and checks:
- 60 blocks, both back-to-back and with random input gaps;
- every output, plus out_idx and out_last;
- the latency, and gap-free output at full rate;
- that every mechanism occurred: both RAM banks, adds and subtracts in the
  PEs, and gapped and back-to-back blocks.

## Simulating

From the repository root, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/dst4_pkg.sv tb/tb_dst4_top.sv --top-module tb_dst4_top
./obj_dir/Vtb_dst4_top
```

Replace `tb_dst4_top` with any other testbench name. The default top test
runs in well under a second.
