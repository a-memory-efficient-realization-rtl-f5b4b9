# Group distributed arithmetic: a prime-length DCT and a cyclic convolution

Distributed arithmetic (DA) computes an inner product with constant
coefficients without multipliers. The input words are shifted out one bit
position per cycle. The bits of all inputs at one position form an address.
A ROM returns the matching sum of coefficients, and a shift-accumulator adds
it in with the weight of that bit position.

In a **cyclic convolution** every output uses the same coefficients, and
each output sees the inputs in a rotated order. Plain DA would give each
output its own copy of the same ROM, and each copy would return one word per
cycle. This design stores the table once, **arranged by rotation groups**:

- all address vectors that are rotations of one another share one ROM row;
- that row holds, side by side, the partial products of the group's seed
  vector for *every* output;
- a decoder maps the actual bit vector to its group (the ROM address) and a
  rotating factor;
- a barrel shifter rotates the row so that each word reaches the accumulator
  of the right output.

One small ROM read per cycle then feeds all outputs at once.

The RTL holds two designs that use this idea:

| design | what it computes | ROM | cycles |
|---|---|---|---|
| `dct_gda` | 1-D N-point DCT, N prime (default 7), 12-bit samples at N = 7 | 4 rows x 3 words at N = 7 (12 words) | one block of N samples every 32 cycles (N <= 16) |
| `cconv_gda` | P-point cyclic convolution (default P = 4), 16-bit inputs | 6 rows x 4 words at P = 4 (24 words; plain DA needs 64) | 16 cycles per vector |

`gda_top` places both side by side. They share only clock and reset. Its
parameter `DCT_N` (default 7) sets the transform length.

## From the DCT to two cyclic convolutions

The DCT computed here is the unnormalised one:

    Y(k) = sum_{n=0..6} y(n) cos(pi (2n+1) k / 14),   k = 0..6

A running difference of the samples removes the odd angle:

    x(6) = y(6),   x(n) = y(n) - x(n+1)
    Y(0) = sum y(n)
    Y(k) = (2 T(k) + x(0)) cos(pi k / 14)
    T(k) = sum_{n=1..6} x(n) cos(pi n k / 7)

Because 7 is prime with primitive root 3, `T` is a cyclic convolution. The
symmetry `cos(pi (7-r)/7) = -cos(pi r/7)` then pairs the samples. It
splits the six `T(k)` into two three-point cyclic convolutions over the same
three coefficients c1 = cos(2a), c2 = cos(6a), c3 = cos(4a), with a = pi/7:

    even half: A1 = x6+x1, A2 = x4+x3, A3 = x2+x5
      T(2) = A1 c1 + A2 c2 + A3 c3
      T(6) = A3 c1 + A1 c2 + A2 c3
      T(4) = A2 c1 + A3 c2 + A1 c3
    odd half: B1 = x6-x1, B2 = x4-x3, B3 = x2-x5, with the same matrix
      T(5), T(1), T(3)  in the places of  T(2), T(6), T(4)

The two halves have the same coefficient matrix, so they use the same group
ROM one after the other.

## The group ROM, decoder and barrel shifter

In each DA cycle the bits of the three words form the vector
`{x3, x2, x1} = {A1(j), A2(j), A3(j)}`, or the same with B. The eight
vectors fall into four rotation groups:

| vectors | seed | group address | rotating factor |
|---|---|---|---|
| 001, 010, 100 | 001 | 0 | 0, 1, 2 |
| 011, 110, 101 | 011 | 1 | 0, 1, 2 |
| 000 | 000 | 2 | 0 |
| 111 | 111 | 3 | 0 |

ROM row g holds the seed's partial products for the three outputs, in the
order T(2)/T(5), T(6)/T(1), T(4)/T(3):

| group | word 0 | word 1 | word 2 |
|---|---|---|---|
| 0 | c3 | c1 | c2 |
| 1 | c2+c3 | c1+c3 | c1+c2 |
| 2 | 0 | 0 | 0 |
| 3 | c1+c2+c3 | c1+c2+c3 | c1+c2+c3 |

A vector whose seed was rotated by r positions toward the MSB selects its
group's row. Output k then takes word `(k - r) mod 3`. For example, 010
(only A2 set) reads row 0 with r = 1, and T(2) gets word 2 = c2, which is
A2's coefficient in T(2). `tb_gdau_group_rom` rebuilds the rows from real
cosines, and `tb_gdau` checks the whole unit against the direct sum.

The cyclic convolution unit `cconv_gda` uses the same idea with P-bit
vectors. At the default P = 4 it has six groups, with seeds 0000, 0001,
0011, 0101, 0111 and 1111. The group of 0101 has only two members. Row g,
word i holds `sum_m seed_g[m] coef[(m - i) mod P]`. The decoder table and
these rows are computed from P and the coefficient array `COEF` when the
design is elaborated, so changing the coefficients or the length needs no
table edits. The groups are numbered by increasing seed. For P other than
4, `COEF` must be given, since its default has four entries. The group
count grows as 3, 4, 6, 8, 14 and 36 for P = 2, 3, 4, 5, 6 and 8.

## Other prime lengths

The same construction works for every prime N, with M = (N-1)/2 pairs and
a primitive root g of N. Pair i is {g^i mod N, N - g^i mod N}, with the even
member first. The coefficients are c_j = cos(2 pi g^j / N). Output word l
of the even half is T(2k'), where k' = g^l mod N folded into 1..M. The odd
half gives the remaining T(k). At N = 7 this gives exactly the tables above.

`gda_pkg` computes all of these tables with constant functions when the
design is elaborated:

- the pairing and output order;
- the decoder table: the seed is the smallest rotation, and the groups are
  numbered by increasing seed, with all-zeros and all-ones last;
- the ROM rows.

The ROM has one row per rotation group. There are 4 rows at N = 7, 8 at
N = 11, 14 at N = 13, and 36 at N = 17. `tb_dct_lengths` runs N = 3, 5, 7,
11, 13 and 17 against a floating-point DCT.

## Pipeline and timing of `dct_gda`

    y(n) --> dct_preproc --x(0..N-1),Y(0)--> gdau --T(1..N-1)--> dct_postproc --Y(0..N-1)--> dct_outbuf --> Y(k)
             (2N cycles)                      (2L = 32 cycles)    (N-1 cycles)               (N cycles)

The description below uses N = 7.

- **Preprocessing** (`dct_preproc`). A seven-stage shift register takes
  y(0)..y(6) in 7 cycles. It then shifts the other way for 7 cycles, while
  one subtracting accumulator feeds `x(n) = y(n) - x(n+1)` back into the far
  end. After 14 cycles the register holds x(6)..x(0). A second accumulator
  sums Y(0) while the samples arrive. The result is held until the GDAU
  takes it.
- **GDAU** (`gdau`, the group distributed arithmetic unit). Three
  adder/subtractors (`gdau_addsub`) load the sums A into three shift
  registers. For 16 cycles the MSB-first bits go through the decoder
  (`gdau_addr_decoder`), the group ROM (`gdau_group_rom`) and the barrel
  shifter (`gda_barrel_shifter`) into three shift-accumulators
  (`da_accumulator`). In the sign-bit cycle the accumulators restart with
  minus the partial product. The results become T(2), T(6), T(4). The same
  three adder/subtractors then load the differences B, and 16 more cycles
  give T(5), T(1), T(3). x(0) and Y(0) travel with the block as a side word.
  A new block may start in the last cycle of the previous one.
- **Post-processing** (`dct_postproc`). One adder and one multiplier are
  shared by the six outputs, one per cycle. Each cycle computes
  `Y(k) = round((2 T(k) + x(0)) * cos(pi k/14))`, where the factor 2 is
  wiring.
- **Output buffer** (`dct_outbuf`). It preloads Y(0..6) in one cycle and
  shifts them out in order.

The GDAU is the slowest stage. With a steady input the design accepts seven
samples and delivers seven outputs every 32 cycles, so the throughput is 7/32
samples per clock. After a block has entered, the preprocessing stage waits
for the GDAU, and `in_ready` stays low until it hands the block over. If
the GDAU is free, Y(0) of a block is on the output 48 clock edges after the
edge that takes its y(6). For N above 16 the
preprocessing stage (2N cycles) becomes the slowest stage, and the block
period is 2N+1 cycles. A delay model of 32 cycles per block at every length would
need a faster preprocessing stage for these lengths.

Interfaces:

- **Input:** `in_valid`/`in_ready`, one sample per accepted cycle, seven per
  block, y(0) first.
- **Output:** `out_valid` with `out_index` = k on seven consecutive cycles.
  The output has **no back-pressure**, so the consumer must take one word
  per cycle.
- **`cconv_gda`:** takes `v1..vP` on `in_valid` while `in_ready` is high.
  16 cycles later it pulses `out_valid`, and `u1..u4` then hold the exact
  products until the next result.
- **Reset:** `rst_n` is synchronous and active low. It clears all control
  state and datapath registers.

## Number formats and accuracy

All widths are set in `gda_pkg`. The values below are for N = 7:

| quantity | format |
|---|---|
| samples y(n) | 12-bit two's complement (`IW = L-1-clog2(N)`) |
| x(n) | 15 bits; an alternating sum of up to seven samples |
| A, B (DA words) | 16 bits (`L`); this is what sets 16 cycles per half |
| ROM words | 16 bits, 14 fraction bits; pair sums reach -1.12 (fraction bits chosen per N) |
| T(k) accumulators | 32 bits, 14 fraction bits |
| cos(pi k/2N) | 16 bits, 15 fraction bits |
| Y(k) | 16-bit integer, rounded to nearest |

The only error sources are the rounding of the coefficients to 14 and 15
fraction bits and the final rounding. Over the random and extreme blocks in
the testbenches, the largest difference from a floating-point DCT rounded
to integers is 1 at N = 7 and 2 over the other lengths.

The sample width is tied to the DA word length. If you widen `IW`, widen `L`
with it. The block period then grows to `2L` cycles.

## What follows the published scheme and what is this design's own

These parts follow the published scheme:

- the reformulation into two (N-1)/2-point cyclic convolutions;
- the group table, seeds, rotating factors and ROM arrangement;
- the one ROM, one barrel shifter and (N-1)/2 accumulators shared by both
  halves;
- the 2N-cycle bidirectional-shift preprocessing;
- the post-processing operations and the preloadable output buffer;
- the 32-cycle block rate at N = 7;
- the 24-word group ROM of the four-point example.

These are choices of this design:

- all handshakes, the reset, and the MSB-first bit order;
- the fixed-point formats and the rounding;
- the 12-bit input width;
- word-parallel adder/subtractors that feed shift registers;
- one shared multiplier for the post-multiplications, one output per cycle;
- an extra accumulator for Y(0);
- the side word that carries x(0) and Y(0) through the GDAU;
- the coefficient values of the four-point example, which are a parameter
  array (`COEF`);
- the index output of the output buffer;
- the rule that numbers the groups and builds the tables for DCT lengths
  other than 7 and convolution lengths other than 4.

Limits:

- The DCT needs a prime N. The decoder table has 2^((N-1)/2) entries, so
  elaboration gets slow above about N = 20.
- The decoder table of `cconv_gda` has 2^P entries, so P is practical up to
  about 16.
- Longer transforms built by splitting into short cyclic convolutions are
  not included.
- Clock rate and area were not evaluated; they depend on a cell library.
- The chip's pads and layout are not part of the RTL.

## Files

`rtl/`, one module or package per file:

| file | role |
|---|---|
| `gda_pkg.sv` | widths, fixed-point constants, and the table functions |
| `gda_top.sv` | both designs side by side |
| `dct_gda.sv` | the DCT pipeline |
| `dct_preproc.sv`, `gdau.sv`, `dct_postproc.sv`, `dct_outbuf.sv` | its four stages |
| `gdau_addsub.sv`, `gdau_addr_decoder.sv`, `gdau_group_rom.sv` | parts of the GDAU |
| `gda_barrel_shifter.sv`, `da_accumulator.sv` | shared by both designs |
| `cconv_gda.sv` | the cyclic convolution |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, and
`tb_dct_lengths.sv`. The helpers `dct_len_check.sv` and `cconv_check.sv`
check one instance each. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- The unit testbenches compare bit for bit with reference values computed
  in the testbench: direct sums, circulant products, and tables rebuilt from
  `$cos`. They also check cycle counts: 14 cycles of preprocessing, 32
  cycles per GDAU block, 7 cycles of post-processing, and 16 cycles per
  convolution.
- `tb_dct_gda` and `tb_gda_top` run the whole design at its default sizes and
  compare with a floating-point DCT. They check the 32-cycle block rate and
  the latency.
- `tb_gda_top` also counts how often each mechanism occurs and fails if
  one never does. The mechanisms are: the preprocessing stage waiting for
  the GDAU, back-to-back GDAU blocks, gaps in the input stream, and every
  group and rotating factor of both designs.
- `tb_dct_lengths` runs the DCT at N = 3, 5, 7, 11, 13 and 17. It checks
  the values and the block period max(32, 2N+1). It takes about a minute to
  compile.
- `tb_cconv_gda` runs the cyclic convolution at P = 4 with the default and
  with extreme coefficients, and at P = 2, 3, 5, 6 and 8 with pseudo-random
  ones. It compares every result exactly and checks that every group and
  rotating factor is used.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/gda_pkg.sv tb/tb_gda_top.sv \
              --top-module tb_gda_top -Mdir obj_top
    ./obj_top/Vtb_gda_top

Replace `gda_top` with any other module name to run its testbench. The whole
design simulates in well under a second. To lint a module, run
`verilator --lint-only -Wall -Irtl rtl/gda_pkg.sv rtl/<module>.sv`.
