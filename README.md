# Prime-length type-III generalized Hartley transform on one systolic array

This RTL computes the type-III generalized discrete Hartley transform (GDHT)
of a real sequence whose length N is an odd prime:

    Y(k) = sum_{i=0..N-1} x(i) * cas((2k+1) * i * pi / N),   cas(t) = cos(t) + sin(t),   k = 0..N-1

The core idea: the transform is rewritten as two circular correlations of
half length, M = (N-1)/2. One is a cosine correlation, T_C. The other is a
sine correlation, T_S. Both have the same length and use the same
coefficient sequence, so a single linear systolic array of M processing
elements (PEs) computes both at once. Each PE has two multiply-accumulate
channels that share one coefficient. A cheap recursion then turns T_C and
T_S into the transform outputs. The array keeps all its I/O at its two ends.
It has one data path per channel plus one coefficient and one tag line,
whatever N is. Its only control is a one-bit tag that travels with the data.

The default configuration is N = 7 with primitive root G = 3, as in the
reference design this RTL follows. The RTL is parameterised and has been
simulated for N = 3, 5, 7, 11, 13 and 31.

## How the transform becomes two correlations

The mathematics sets what every stage has to produce, so it comes first.
Write `<v>_N` for v modulo N and `a = pi/N`.

**Index maps.** G is a primitive root of N, so `phi(k) = <G^k>_N` runs
through all of 1..N-1. Since `G^M = -1 (mod N)`, the indices fall into the
pairs {j, N-j}. Define:

* `psi(k)` is the member of the pair {phi(k), N-phi(k)} that lies in 1..M;
* `phib(k)` is the other member, which lies in M+1..N-1;
* `zeta(k) = <2k>_N`.

**Pair words.** With `xC(j) = x(zeta(j)) * cos(2ja)` and
`xS(j) = x(zeta(j)) * sin(2ja)`, the words fed to the array are these, for
i = 1..M:

    u_C(i) = xC(psi(i)) - xC(phib(i))        u_S(i) = xS(psi(i)) - xS(phib(i))

**The two correlations.** These are circular correlations of length M,
because `psi` has period M:

    T_C(psi(k)) = sum_{i=1..M} u_C(i) * cos(4a * psi(i+k))
    T_S(psi(k)) = sum_{i=1..M} u_S(i) * cos(4a * psi(i+k))

Both use the same coefficients `cos(4a * psi(.))`. That shared coefficient
is what lets the two correlations use the same hardware.

**Recursion.** The trigonometric identities
`cos((2k+1)t) + cos((2k-1)t) = 2 cos(2kt) cos t` and
`sin((2k+1)t) - sin((2k-1)t) = 2 cos(2kt) sin t` give, for k = 1..M:

    H_C(0) = sum_i u_C(i)            H_S(0) = sum_i u_S(i)
    H_C(k) = 2 T_C(k) - H_C(k-1)     H_S(k) = 2 T_S(k) + H_S(k-1)

**Outputs.**

    Y(k)   = x(0) + H_C(k)   + H_S(k)       k = 0..M
    Y(N-k) = x(0) + H_C(k-1) - H_S(k-1)     k = 1..M

**Worked case, N = 7, G = 3.** Here a' = 2*pi/7, written `a'` below.

| slot | cosine word | sine word | coefficient | tag |
|---|---|---|---|---|
| 0 | xc61 = x(6)cos(3a') - x(1)cos(4a') | xs61 = x(6)sin(3a') - x(1)sin(4a') | cos(4a') | 0 |
| 1 | xc43 = x(4)cos(2a') - x(3)cos(5a') | xs43 = x(4)sin(2a') - x(3)sin(5a') | cos(2a') | 0 |
| 2 | xc25 = x(2)cos(a') - x(5)cos(6a') | xs25 = x(2)sin(a') - x(5)sin(6a') | cos(6a') | 1 |

The array then returns T(3), T(2), T(1) in that order.

## The systolic array (`gdht_array`, `gdht_pe`)

This is the hardest part to follow. The rest of the design exists to feed it
and to undo its ordering.

**PE.** A PE holds two stationary operands, xi1 and xi2, one per channel.
Its partial-sum outputs are combinational:

    tc = 1:  y1o = y1i + xe1*c,  y2o = y2i + xe2*c,  and xi1/xi2 load xe1/xe2 at the clock edge
    tc = 0:  y1o = y1i + xi1*c,  y2o = y2i + xi2*c,  and xi1/xi2 hold

The PE passes xe1, xe2, c and tc on unchanged. Channel 1 is the cosine
correlation and channel 2 the sine correlation.

**Links.** PE1 is the input end. Between neighbouring PEs there are:

* **two** registers on xe1, xe2 and c;
* **one** register on y1, y2 and tc.

The partial sums entering PE1 are zero. The results leave the last PE
combinationally.

**Tag control.** The tag moves one PE per clock, while the data words move
one PE every two clocks. The tag on the last word of a frame therefore meets
a different word at each PE: PE1 keeps word M, PE2 word M-1, ..., PE M keeps
word 1. Each PE then holds one word of the frame, and the coefficients stream
past them. Here is the N = 7 case, counting clocks from slot 0 of the frame
at PE1:

| PE | tag arrives | word arriving then | kept |
|---|---|---|---|
| PE1 | clock 2 | slot 2 | xc25 / xs25 |
| PE2 | clock 3 | slot 1 | xc43 / xs43 |
| PE3 | clock 4 | slot 0 | xc61 / xs61 |

Take a partial sum that enters PE1 at clock 2. It collects
xc25·cos(6a') in PE1, xc43·cos(2a') in PE2 at clock 3 and xc61·cos(4a') in
PE3 at clock 4. That sum is T_C(3). The sums that enter at clocks 3 and 4
give T_C(2) and T_C(1).

In general, suppose the coefficient stream is periodic,
`cs[s] = cos(4a * psi(((s+1) mod M) + 1))` at slot s. Then the M sums that
enter PE1 from the tag clock on leave PE M, M-1 clocks later, as
T(psi(1)), T(psi(2)), ..., T(psi(M)). The tag leaves PE M together with the
first of them and marks the result frame.

A PE reloads only when the next tag reaches it. By then all sums that need
its old word have passed, so frames can follow each other with no gap: one
frame every M clocks. Idle periods between frames are harmless as long as
the coefficient stream keeps its period. `gdht_preproc` makes sure it does
with a free-running slot counter.

## Feeding and unloading the array

**`gdht_preproc`** takes an N-sample frame through a valid/ready handshake.
The frame goes into a holding register and moves to a working register at
the end of a period of the slot counter. It is then emitted over the next M
slots. For each slot the stage does the following:

* picks the two samples `x(zeta(psi(i)))` and `x(zeta(phib(i)))`;
* multiplies them by their cos and sin weights (four multipliers);
* forms the two pair words;
* adds the coefficient and the tag.

It also sums the words into H_C(0) and H_S(0), and hands these on with x(0)
when the tag goes out. All its outputs are registered.

**Side values.** x(0), H_C(0) and H_S(0) leave the pre-processing with the
tag. `gdht_top` delays them by M-1 clocks, the array's latency, so that they
meet the frame's first result.

**`gdht_perm`** writes result j of a frame to address `psi(j+1)-1` of one of
two banks. Once a bank is full, it reads that bank out in address order on M
consecutive clocks, while the other bank fills. T(1) can be the last result
of a frame, and the next frame may start M clocks later, which is why there
are two banks. Assertions flag a frame that would overrun a bank.

**`gdht_recur`** runs the recursion. It has one add/subtract unit and one
register for H_C, and the same for H_S. Three output adders form the outputs
of step k:

* Y(k), from the new H values;
* Y(N-k), from the previous H values;
* Y(0), on the first step only.

The outputs build up in a frame register. After step M they are presented
together with a one-clock `out_valid`.

## Interface of `gdht_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| in_valid, in_ready | in, out | 1 | the frame x_i is taken on a clock where both are high |
| x_i | in | N x XW | x(0..N-1), signed integers |
| out_valid | out | 1 | one-clock pulse: y_o holds a new frame |
| y_o | out | N x (XW + clog2(N) + 2) | Y(0..N-1), signed, rounded to integers; held until the next frame |

**Throughput.** The design accepts one frame every M clocks and delivers
results at the same rate.

**Latency.** From the edge that accepts a frame to the edge that raises its
`out_valid` there are 4M to 5M-1 clocks, depending on the phase of the slot
counter. For N = 7 that is 12 to 14 clocks. The time splits as follows:

* up to M clocks waiting for the slot boundary;
* M clocks of emission;
* M-1 clocks through the array;
* M clocks of writes into the permutation bank;
* M clocks of recursion.

Results come out in input order.

## Parameters and number formats

| parameter | default | meaning |
|---|---|---|
| N | 7 | transform length, an odd prime |
| G | 3 | a primitive root modulo N |
| XW | 16 | input sample width |
| CW | 16 | coefficient width |
| FB | 14 | coefficient fraction bits |

* **Bad lengths.** Elaboration stops with an error if N is not an odd prime
  or G is not a primitive root of N. Examples of valid pairs are (5,2),
  (11,2), (13,2) and (31,3).
* **Coefficients** are `round(value * 2^FB)`. They are computed at
  elaboration time by the constant functions in `gdht_pkg`, so no table is
  stored anywhere.
* **Pair words** are the exact difference of two products, shifted right by
  FB (truncation). Their width is XW + CW - FB + 1 = 19 bits.
* **Partial sums and T** keep full precision, with FB fraction bits. Their
  width is DW + CW + clog2(M+1) + 1 = 38 bits for N = 7.
* **Recursion registers** are two bits wider than T. x(0), H_C(0) and
  H_S(0) are aligned to them by a left shift of FB.
* **Outputs** are rounded (add 2^(FB-1), then shift right by FB).

The widths leave room for any input, including full-scale frames.

**Accuracy.** The error grows with N, because coefficient rounding
accumulates through the M recursion steps. Compared with a floating-point
evaluation of the definition, for random full-scale 16-bit inputs, the
largest errors seen were:

| N | largest error |
|---|---|
| 7 | 11 LSB (outputs up to about ±2^19) |
| 13 | about 21 LSB |
| 31 | about 45 LSB |

Raise CW and FB together for more precision.

## What is taken from the reference design and what is not

Taken from the reference design:

* the decomposition into index maps, pair words, correlations, recursion and
  outputs;
* the N = 7, G = 3 worked case, with its word, coefficient and tag stream and
  its result order;
* the PE behaviour;
* the link delays of the array (two on data and coefficient, one on sums and
  tag) and the zero partial sums at PE1;
* the split into pre-processing, core array and post-processing. The
  post-processing permutes, runs the recursion with an add/subtract unit and
  a latch per sequence, and forms the outputs with further add/subtract
  units.

The reference design gives the pre- and post-processing stages only by
their function. Their insides here are the simplest circuits that do the
job: the slot counter and frame registers, the four multipliers, the
two-bank permutation buffer and the side-value delay line.

The following are this design's own choices:

* all word lengths and the rounding;
* the reset;
* the frame-parallel interface with valid/ready on the input;
* continuous streaming of back-to-back frames. The reference design only
  shows one frame fed twice.

The reference design calls the pre- and post-processing overhead small and
independent of the transform length. Here some of it grows with N:

* the frame registers hold 2N samples;
* the permutation banks hold 2M result pairs;
* the side-value delay line has M-1 stages.

A stream in the order the array produces cannot be put back into
recursion order without storing about one frame of results.

In the reference drawing the PE lists no assignment for its coefficient
output. Here the coefficient is passed on unchanged, like the data words.

`gdht_pe` has only combinational paths from inputs to outputs. It is not a
pipeline stage by itself; the array's link registers are.

## Files

| file | contents |
|---|---|
| `rtl/gdht_pkg.sv` | index maps, length check, fixed-point cos/sin (constant functions) |
| `rtl/gdht_pe.sv` | processing element |
| `rtl/gdht_array.sv` | linear array of M PEs with link registers |
| `rtl/gdht_preproc.sv` | frame buffering, reordering, weighting, coefficient and tag stream, H(0) |
| `rtl/gdht_perm.sv` | two-bank output permutation |
| `rtl/gdht_recur.sv` | H_C/H_S recursion and output add/subtract |
| `rtl/gdht_top.sv` | the complete transform |
| `tb/tb_gdht_*.sv` | self-checking testbenches, one per module |
| `tb/tb_gdht_lengths.sv`, `tb/gdht_top_harness.sv` | end-to-end test at N = 3, 5, 11, 13, 31 |

## Simulating

Each testbench checks its block against values it computes itself. It ends
by printing `TB_RESULT checks=<n> failures=<m>`.

* `tb_gdht_top` runs the whole design at its default size. It compares every
  output with the definition in floating point and checks the latency and
  the one-frame-per-M-clocks rate. It also counts back-pressure,
  back-to-back frames, idle gaps and use of both permutation banks, and
  fails if any of them never happens.
* `tb_gdht_array` checks the raw circular correlation with random
  coefficients.
* `tb_gdht_preproc` checks the word stream against the N = 7 worked case
  above.

To build and run one of them with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/gdht_pkg.sv tb/tb_gdht_top.sv --top tb_gdht_top
    ./obj_dir/Vtb_gdht_top

Replace the testbench name to run the others. `gdht_pkg.sv` must come first
on the command line. The other files are found through `-Irtl -Itb`.

## Limits

* There is no output back-pressure. A result frame is valid for the one
  clock of `out_valid` and stays on `y_o` until the next one completes.
* The internal widths are derived from XW, CW, FB and N so that full-scale
  inputs cannot overflow. This was tested at N = 7 with all-maximum,
  all-minimum and alternating full-scale frames. There is no overflow
  detection if you change the width formulas.
* The coefficient tables are generated with `real` arithmetic at
  elaboration time. That is fine for simulation and synthesis front ends
  that evaluate constant functions. The coefficients are not available as a
  separate ROM file.
