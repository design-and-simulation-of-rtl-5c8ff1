# 16-point Discrete Hartley Transform with Urdhwa multipliers

The discrete Hartley transform (DHT) maps N real samples to N real outputs,

    X(k) = sum_{n=0}^{N-1} x(n) * cas(2*pi*n*k/N),     cas(t) = cos(t) + sin(t)

so, unlike the DFT, it needs no complex arithmetic: one real kernel carries
the information of both the cosine and the sine transform. This RTL computes
the 16-point DHT of 8-bit two's-complement samples as one combinational
network. It is a fast Hartley butterfly in which every multiplication by a
twiddle constant is done by an *Urdhwa Tiryakbhyam* ("vertically and
crosswise") multiplier, whose partial products are summed by 7:2 and 4:2
compressors rather than by rows of carry-propagate adders. Three circuit
styles of the 4:2 compressor are provided and can be swapped with one
parameter.

## The butterfly

The transform is split by radix-2 decimation in time, twice:

    16-point  = 8-point(even samples) (+) 8-point(odd samples)
    8-point   = 4-point(even)         (+) 4-point(odd)

and a 4-point DHT needs only additions, since cas(pi*n*k/2) is 0 or +-1.
Reading the samples through this recursion is the same as reading them in
bit-reversed order: the first adders pair x(n) with x(n+8), and so on. The
outputs come out in natural order, with no final permutation.

The combining rule for a length-M stage, with E and O the M/2-point
transforms of the even and odd samples (indices taken mod M/2), is

    X(k) = E(k) + cos(2*pi*k/M) * O(k) + sin(2*pi*k/M) * O(-k)

Note O(-k): the Hartley butterfly mixes output k of the odd half with its
mirror, output M/2-k. This is what makes it differ from an FFT butterfly,
and it is the part of the code most worth reading slowly (`rtl/dht16.sv`).

Only three constants are ever needed:

| name | value        | used in |
|------|--------------|---------|
| c1   | cos(pi/4) = 0.7071 | 8-point stage (both halves) and outputs 2, 6, 10, 14 |
| c2   | cos(pi/8) = 0.9239 | outputs 1, 3, 5, 7, 9, 11, 13, 15 |
| c3   | sin(pi/8) = 0.3827 | same outputs as c2 |

Stage by stage:

1. **4-point transforms** (inside `dht8`): pairs (x(n), x(n+4)) of each
   8-sample half are added and subtracted, then the pairs are combined
   again. Additions only.
2. **8-point stage** (`dht8`): outputs 0, 2, 4, 6 are E +- O; outputs 1, 3,
   5, 7 need c1*(O1+O3) and c1*(O1-O3). Two multiplications per `dht8`.
3. **16-point stage** (`dht16`), with E and O now the two 8-point results:

        X0, X8   = E0 +- O0                 X4, X12 = E4 +- O4
        X2, X10  = E2 +- c1 (O2+O6)         X6, X14 = E6 +- c1 (O2-O6)
        X1, X9   = E1 +- (c2 O1 + c3 O7)    X7, X15 = E7 +- (c3 O1 - c2 O7)
        X3, X11  = E3 +- (c3 O3 + c2 O5)    X5, X13 = E5 +- (c2 O3 - c3 O5)

   Ten multiplications, a summing level that forms the four rotated
   terms, and a last level of additions only.

Totals: 14 multiplications and 74 additions/subtractions. The published
design of this transform quotes 12 multiplications and 67 additions for its
own factorisation, whose exact arrangement is not reproduced here; the
version above is the standard radix-2 fast Hartley transform and follows the
same order of stages (two adder stages, c1, then c2/c3 on the odd half, then
adders).

`dht8` is a complete 8-point DHT in its own right and can be used alone.

## Number format and accuracy

* Samples: 8-bit two's complement.
* Every internal value and every output: 13-bit two's complement
  (`dht_pkg::DW`). The largest possible output magnitude is 2048 (all
  samples -128, output 0).
* Coefficients: unsigned 8-bit fractions, value/256, rounded to nearest:
  c1 = 181, c2 = 237, c3 = 98 (`dht_pkg::C1_Q8`, `C2_Q8`, `C3_Q8`).
  They are module inputs, not constants, so the multipliers are general
  multipliers; drive them with these values.
* A product is formed as sign(v) * floor(|v| * c / 256): the magnitude goes
  through the unsigned multiplier and the sign is put back, which rounds
  toward zero.

With this format the outputs are within 3.8 of the exact (real-valued)
transform over all test vectors; the analytic bound from coefficient
quantisation and truncation is about 8. The 8-point transform alone stays
within 1.1.

## The Urdhwa multiplier (`urdhwa_mult`)

Column k of a product is the sum of all crosswise terms a(i)·b(j) with
i + j = k. The multiplier forms these AND terms as eight partial-product
rows (one per bit of the 8-bit operand b) and reduces them column by column
without propagating carries:

1. a row of **7:2 compressors** adds rows 1 to 7 of every column;
2. a row of **4:2 compressors** adds what stage 1 left (one sum bit, one
   carry bit from the column below) and row 0;
3. a ripple adder, a half adder followed by full adders, adds the last
   two bits of each column.

Carry-outs of each compressor row are chained to the next column (and, for
the 7:2 row, also two columns up), so within a row nothing ripples through
the 4:2 compressors. The a-operand width `A_W` is a parameter: 8 gives the
8 x 8 multiplier; the DHT uses 13 (the magnitude of a 13-bit value) with
the same eight rows. Everything is computed modulo 2^(A_W+8), which loses
nothing because the product fits. This column arrangement is this RTL's own;
the published design only lists a parts count for its 8 x 8 multiplier (four
half adders, two full adders, five 7:2 and ten 4:2 compressors), which this
per-column layout does not match.

## Compressors

A **4:2 compressor** adds four bits of one column and a carry-in from the
column below:

    x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)

`cout` depends only on x1..x3 (it is their majority), so a row of
compressors has no carry ripple. Three circuit styles compute exactly this
function:

| module | style (`dht_pkg::cmp_style_e`) | structure | trade-off |
|---|---|---|---|
| `compressor42_fa` | `CMP_FA` | two full adders in series | simplest, four XOR delays |
| `compressor42_xor_mux` | `CMP_XOR_MUX` | XORs for the parities, multiplexers for cout and carry | faster, larger |
| `compressor42_xnor_mux` | `CMP_XNOR_MUX` (default) | XOR-XNOR pairs, then multiplexers only | fastest, largest |

In the multiplexer styles, with t = x1^x2^x3^x4:
cout = (x1^x2) ? x3 : x1, carry = t ? cin : x4, sum = t ^ cin (a multiplexer
choosing cin or its complement in the third style). The select of each
multiplexer settles before its data inputs do, which is where the speed comes
from. `compressor42` picks one of the three by its `STYLE` parameter, and
`STYLE` is passed down from `dht16`, `dht8`, `coef_mult`, `urdhwa_mult` and
`compressor72`, so a whole transform is built with one style.

A **7:2 compressor** (`compressor72`) adds seven bits and two carry-ins:

    x1 + ... + x7 + cin1 + cin2 = sum + 2*(carry + cout1) + 4*cout2

It is two 4:2 compressors in series (the first takes x1..x4 and cin1 and
gives cout1; the second takes the first one's sum, x5..x7 and cin2 and gives
sum) plus a full adder that adds the three remaining weight-2 bits into
carry and cout2. cout2 has weight 4: nine input bits can add up to 9, more
than one sum bit and three weight-2 bits can hold. In a row, cout1 feeds
cin1 of the next column and cout2 feeds cin2 two columns up. The published
design builds its 7:2 compressor from two 4:2 compressors, two full adders
and a half adder without giving the connections; this is a smaller
arrangement of the same kind.

## Interface and timing

`dht16` (top):

| port | dir | type | meaning |
|---|---|---|---|
| `data` | in | `logic signed [7:0] data [16]` | samples x(0)..x(15) |
| `c1`, `c2`, `c3` | in | `logic [7:0]` | coefficients as /256 fractions (use `dht_pkg::C*_Q8`) |
| `y` | out | `logic signed [12:0] y [16]` | X(0)..X(15) |

Parameters: `SAMPLE_W` (default 8) and `STYLE` (default `CMP_XNOR_MUX`).
There is no clock, reset or handshake: the transform is a single
combinational path from `data` to `y`, with zero cycles of latency. Register
the inputs and outputs outside if a pipelined or clocked use is needed.

`dht8` has the same form with 8 samples and only `c1`.

## Files

| file | content |
|---|---|
| `rtl/dht_pkg.sv` | widths, coefficient constants, compressor style enum |
| `rtl/dht16.sv` | 16-point transform (top) |
| `rtl/dht8.sv` | 8-point transform, including the 4-point add-only stages |
| `rtl/coef_mult.sv` | signed value times coefficient fraction, sign-magnitude around `urdhwa_mult` |
| `rtl/urdhwa_mult.sv` | Urdhwa multiplier with 7:2/4:2 compressor reduction |
| `rtl/compressor72.sv` | 7:2 compressor |
| `rtl/compressor42.sv` | style selector for the 4:2 compressor |
| `rtl/compressor42_fa.sv`, `_xor_mux.sv`, `_xnor_mux.sv` | the three 4:2 compressors |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | one-bit adders |
| `tb/dht_ref_pkg.sv` | reference models: fixed-point fast transform and exact transform |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_dht16_full` runs the top at its defaults |

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends
with `$finish`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/dht_pkg.sv tb/tb_dht16.sv --top-module tb_dht16 -Mdir obj -o sim
    ./obj/sim

Replace `tb_dht16` with any other testbench name. What they check:

* `tb_full_adder`, `tb_half_adder`, `tb_compressor42_*`, `tb_compressor72`:
  every input combination, against the counting identity and against each
  output's own equation (for example cout = majority(x1, x2, x3)).
  `tb_compressor72` does this for all three 4:2 styles.
* `tb_urdhwa_mult`: all 65536 8 x 8 products for each style, and 20000
  random 13 x 8 products plus corner values.
* `tb_dht8`, `tb_dht16`: impulses at every position, all-maximum,
  all-minimum, alternating extremes and thousands of random vectors, each
  output checked bit for bit against the fixed-point reference model and to
  within a tolerance of the exact transform. `tb_dht16` builds the transform
  once per compressor style and counts that negative and positive multiplier
  operands and the full-scale output all occur.
* `tb_dht16_full`: the top at default parameters on a cosine and a sine of
  one cycle per 16 samples (the cosine must give 800 in bins 1 and 15 and
  about 0 elsewhere), a constant and 500 random vectors.

All of them pass; the longest builds in well under a minute and simulates in
under a second.

## Where this RTL departs from the published design

* **Port widths.** The published RTL view names the ports `data`, `c1`,
  `c2`, `c3` and `y` but draws `data` and `y` as 16-bit buses and the
  coefficients as single wires, and its FPGA figures (35 I/O pins, 37
  slices) and simulation waveform belong to that 16-bit-in, 16-bit-out
  circuit. A 16-point transform of 8-bit samples cannot have that
  interface, so here `data` and `y` are arrays of 16 values and the
  coefficients are 8-bit fractions. The published resource and delay
  figures (a 10.113 ns combinational path through six logic levels on the FPGA it was built for) are therefore not
  comparable with this RTL.
* **Coefficient values and number format** are not published; the values,
  the 8-bit fraction format, the 13-bit internal width and rounding toward
  zero are choices of this RTL.
* **Factorisation.** 14 multiplications instead of the quoted 12 (see "The
  butterfly").
* **Multiplier and 7:2 compressor layout** are this RTL's own; only their
  building blocks and component counts were published.
* **Default compressor style.** The XOR-XNOR/multiplexer 4:2 compressor is
  the default because it is described as the fastest, proposed variant;
  the other two are one parameter away.
