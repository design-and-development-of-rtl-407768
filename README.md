# 128 x 128 Urdhva Tiryakbhyam multiplier

A purely combinational unsigned multiplier for 128-bit operands, built from
the Vedic "vertically and crosswise" (Urdhva Tiryakbhyam) method. The idea is
the one taught for long multiplication by hand, applied in columns rather
than in rows: every partial product is formed in parallel, and every result
digit is the sum of one column of cross products plus the carry of the column
before it. Applied recursively, a wide multiplication becomes four
half-width multiplications that run side by side, followed by a short
addition stage built only from ripple carry adders.

The product is exact: `s = a * b` for all inputs, and the carry output
`cout` is always 0.

## Hierarchy

```
vedic_mult128                      a[127:0], b[127:0] -> s[255:0], cout
 ├─ 4 x vedic_mult64
 │   ├─ 4 x vedic_mult32
 │   │   ├─ 4 x vedic_mult16
 │   │   │   ├─ 4 x vedic_mult8
 │   │   │   │   ├─ 4 x ut_mult4          4x4 column multiplier (leaf)
 │   │   │   │   └─ vedic_combine #(8)
 │   │   │   └─ vedic_combine #(16)
 │   │   └─ vedic_combine #(32)
 │   └─ vedic_combine #(64)
 └─ vedic_combine #(128)
vedic_combine #(N) = 3 x rca #(N) + one OR gate
rca #(W)           = W x full_adder in a carry chain
```

In total there are 1024 leaf multipliers, 341 combining stages and
about 12,000 full adders. Every level `vedic_multN` has the same ports:
`a` (multiplier) and `b` (multiplicand) of N bits, `s` of 2N bits and
`cout`. Any level can be used on its own as an N x N multiplier.

## The leaf: 4x4 column multiplier (`ut_mult4`)

For 4-bit operands the product is formed in seven column steps. Step k adds
every bit product `a[i] & b[j]` with `i + j = k`, plus the carry left over
from step k-1. The least significant bit of that column sum is product bit
`s[k]`; the remaining bits are the carry into step k+1. The carry out of the
last step is `s[7]`:

```
s0 = a0b0
s1 = a0b1 + a1b0 + c0
s2 = a0b2 + a1b1 + a2b0 + c1
s3 = a0b3 + a1b2 + a2b1 + a3b0 + c2
s4 = a1b3 + a2b2 + a3b1 + c3
s5 = a2b3 + a3b2 + c4
s6 = a3b3 + c5           s7 = carry out of s6
```

A column can hold several carries, so the carry is a small multi-bit value
(up to 3 here), not a single bit. The column sums are written as plain
additions in an `always_comb` loop. Their gate-level form is left to
synthesis. The width is a parameter `W` (default 4), but the design uses only
W = 4.

## Combining four partial products (`vedic_combine`)

This is the part that needs the most explanation. An N x N level splits
its operands into H = N/2-bit halves, `a = {aH, aL}`, `b = {bH, bL}`. Four
sub-multipliers deliver

```
q0 = aL*bL     q1 = aH*bL     q2 = aL*bH     q3 = aH*bH     (N bits each)
a*b = q0 + ((q1 + q2) << H) + (q3 << N)
```

This is the column method again, with H-bit digits. `q0` is the first
vertical term, `q1` and `q2` are the crosswise terms of the middle column,
and `q3` is the last vertical term. Three N-bit ripple carry adders and one
OR gate do the sum:

| adder | inputs                                   | outputs                           |
|-------|------------------------------------------|-----------------------------------|
| 1     | `q1 + q2`                                | `t1`, carry `c1`                  |
| 2     | `t1 + {0, q0[N-1:H]}`                    | `t2`, carry `c2`                  |
| 3     | `q3 + {0, c1 \| c2, t2[N-1:H]}`          | `s[2N-1:N]`, carry `cout` (c3)    |

Two slices pass straight through: `s[H-1:0] = q0[H-1:0]` and
`s[N-1:H] = t2[H-1:0]`.

**Why an OR gate is enough.** `c1` and `c2` both carry weight 2^(N+H), so
the exact sum would be `c1 + c2`. They can never both be 1, however. If
`c1 = 1`, then `t1 = q1 + q2 - 2^N`, which is at most
`2(2^H-1)^2 - 2^N = 2^N - 2^(H+2) + 2`. Adding `q0[N-1:H] < 2^H` to that
cannot reach 2^N, so `c2 = 0`. An immediate assertion in `vedic_combine`
checks this in simulation. For the same reason the upper half never
overflows, so `cout` is always 0. It is kept as a port because every level
of the design has this carry output. The carries of the four sub-multipliers
are left unconnected (signal `unused_cout`).

The second carry is hard to trigger with random operands at large widths.
It needs the middle sum `q1 + q2` to end just below 2^N. A reliable way to
cause it: set both low halves to all ones and choose `aH + bH = 2^H + 1`.
Then `q1 + q2 = 2^N - 1`, and adding the upper half of `q0` carries. The
testbenches use exactly this construction.

## Ripple carry adder and full adder (`rca`, `full_adder`)

`rca #(WIDTH)` is WIDTH `full_adder` instances chained through a carry
vector: the carry out of stage i is the carry in of stage i+1. The default
width of 4 is the basic example adder. The combining stages instantiate it
at 8, 16, 32, 64 and 128 bits, with `cin` tied to 0. The full adder is
`sum = a ^ b ^ cin`, `cout = ab | (a ^ b)cin`.

## Timing

There are no registers, no clock and no reset: a new product appears as
soon as the logic settles. The critical path goes through one leaf
multiplier and then through the combining stage of every level. Each
combining stage is a chain of three ripple carry adders, so the depth grows
roughly linearly with the operand width. For this architecture, published
figures are about 24 ns (8 bit), 41 ns (16 bit) and 73 ns (32 bit) on an FPGA
flow. After ASIC synthesis they are 11.4 ns, 20.8 ns, 41.3 ns and 81.4 ns
for 16 to 128 bits, and a 128-bit combinational delay of about 246 ns is also
reported. These numbers depend on the technology and are not checked here.
A design that needs a clock must add its own registers around the
multiplier. Pipelining inside it is not provided.

Synthesis with yosys produces about 68,000 coarse cells for the 128-bit top,
all combinational.

## Where this RTL makes its own choices

- **Exact, not approximate.** The published title calls the design an
  approximate multiplier, but the arithmetic it describes, and the results
  it shows, are exact. No approximation scheme is given, so none is built.
- **Unsigned operands.** Example: `ffff * ffff = fffe0001` at 16 bits.
- **Leaf size 4.** The 8-bit level is built from four 4x4 column
  multipliers, the size at which the column method is worked out in detail.
- **Adder arrangement.** The design gives the parts of each level (four
  sub-multipliers, three N-bit ripple carry adders, one OR gate, a carry
  output c3). How the partial products are routed into the three adders,
  shown in the table above, is this RTL's own arrangement.
- **No half adder chain.** For the 32- and 64-bit levels the description
  mentions a chain of half adders that forms the top product bits, and
  suggests replacing it with a ripple carry adder for speed. Here the third
  ripple carry adder does that job at every level.
- **No extra adder at 128 bits.** At the 128-bit level the description also
  counts an additional 64-bit ripple carry adder, without saying what it
  adds. This RTL uses the same three adders and OR gate as the other levels.
  That is already exact, so the extra adder is left out.
- The Booth multiplier that the architecture is compared against is not part
  of this design.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog ends any
run that hangs. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl --top-module tb_vedic_mult32 \
    tb/tb_vedic_mult32.sv
./obj_dir/Vtb_vedic_mult32
```

| testbench           | what it checks                                                                 |
|---------------------|--------------------------------------------------------------------------------|
| `tb_full_adder`     | all 8 input combinations                                                        |
| `tb_rca`            | 4-bit exhaustive with carry in; 16-bit random and full-length carry ripple       |
| `tb_ut_mult4`       | all 256 operand pairs (plus the 3-bit variant)                                   |
| `tb_vedic_combine`  | N = 16 with partial products of random halves; counts `c1` and `c2` events       |
| `tb_vedic_multN`    | N = 8 ... 128: corner cases, the all-ones product, random and mostly-ones words, and operands built to make `c2` fire; compares against `*` and counts `c1`/`c2` in the top stage |

`tb_vedic_mult128` runs the full-size top with default parameters. It checks
10,005 products, including
`(2^128-1)^2 = fff...ffe000...0001`. It fails if either carry path into the
top OR gate is never exercised. Because the top flattens into a very large
combinational netlist, Verilator needs several minutes to build it. The run
itself takes about a second.

## Changing it

- A narrower multiplier: use any `vedic_multN` level as the top.
- Another width: add a level `vedic_mult256` in the same pattern as
  `vedic_mult128` (four `vedic_mult128` and `vedic_combine #(.N(256))`).
  Only widths of 4 * 2^k fit this scheme.
- Faster addition: the ripple carry adders in `vedic_combine` can be
  replaced by any adder with the same ports as `rca`. The OR gate argument
  does not depend on the adder type.
