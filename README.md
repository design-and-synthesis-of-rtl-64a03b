# Rounding-based approximate multipliers (ROBA)

A ROBA multiplier trades a small, bounded error for a datapath with no
partial-product array. Each operand is rounded to the nearest power of two.
The exact product can then be split as

    A*B = (Ar - A)*(Br - B) + Ar*B + Br*A - Ar*Br

Here `Ar` and `Br` are the rounded operands. The first term is small, because
each factor is at most a quarter of its operand, and it is the only costly
one. It is dropped, which leaves

    A*B  ~  Ar*B + Br*A - Ar*Br

`Ar` and `Br` are powers of two, so the three remaining products are shifts.
What is left is three shifters, one adder and one subtractor. Because of the
shape of its operands, the subtractor needs no carry chain.

This RTL has the three versions of the scheme. By default each takes 8-bit
operands and gives a 16-bit product:

| module    | operands        | negation                 | error bound                        |
|-----------|-----------------|--------------------------|------------------------------------|
| `u_roba`  | unsigned        | none                     | 1/9 of the exact product           |
| `s_roba`  | two's complement| exact (`~x + 1`)         | 1/9 of the exact product           |
| `as_roba` | two's complement| approximate (`~x`)       | 100 %, when an operand is -1       |

`roba_top` places all three side by side on the same two operand inputs. All
of the logic is combinational: there is no clock, no reset and no register.
A product is valid one combinational delay after the operands change.

The scheme and its three architectures follow the paper *Design and Synthesis
of Signed and Unsigned Approximate Multiplier Using Rounding Based
Approximation*. That includes the rounding equations, the three subtractor
operand patterns, the sign handling and the error analysis. The sections
below say which details are this implementation's own choices.

## Rounding to the nearest power of two (`roba_round`)

The rounding block returns a one-hot word. It is all zero for a zero input.
Say the leading one of the operand is at bit `k`:

* if bit `k-1` is 0, the operand rounds down to `2^k`;
* if bit `k-1` is 1, the operand rounds up to `2^(k+1)`.

A value such as `3*2^(k-1)` is exactly halfway between two powers of two. It
rounds up, because that gives the smaller logic. The one exception is 3,
which rounds to 2.

Each output bit is a small sum of products:

    ar[i] = (~a[i] & a[i-1] & a[i-2]  |  a[i] & ~a[i-1])  &  (no bit above i set)   3 <= i <= N-1
    ar[2] =  a[2] & ~a[1]                                 &  (no bit above 2 set)
    ar[1] =  a[1]                                         &  (no bit above 1 set)
    ar[0] =  a[0]                                         &  (no bit above 0 set)

The first term of `ar[i]` is "round up into bit i". The second is "bit i leads
and rounds down". The "no bit above" chain is a plain AND prefix.

The parameter `EXT` picks between the unsigned and the signed use:

* With `EXT = 1` (unsigned), an N-bit operand `11x..x` rounds to `2^N`. This
  needs an extra output bit, `ar[N] = a[N-1] & a[N-2]`.
* With `EXT = 0` (signed), the input is a magnitude of at most `2^(N-1)`, so
  N bits are enough.

## Shifts (`roba_shifter`)

The rounded word is one-hot, so the shifter uses it as its control word
directly. The output is the OR of `d << k` over every set bit `k`. This needs
no encoder to a binary shift count, and a zero operand gives zero with no
separate test. The paper only says that the block is a shifter, so this
AND-OR form is this design's choice. A binary barrel shifter with a zero
detect would also do.

## The carry-free subtractor (`roba_subtractor`)

This is the least obvious part of the design. `Z = Ar*Br` is a single bit
`2^k`. The operands `P = Ar*B + Br*A` and `Z` only ever meet in three
patterns:

    P = 0..011..xxx   Z = 0..010..000   ->   0..001..xxx
    P = 0..011..xxx   Z = 0..001..000   ->   0..010..xxx
    P = 0..010..xxx   Z = 0..001..000   ->   0..001..xxx

In the first two patterns, P has a 1 at bit `k`, and subtracting Z only
clears it. In the third pattern, P has a 0 at bit `k` and a 1 at bit `k+1`.
The borrow moves exactly one place: bit `k` is set and bit `k+1` is cleared.
All three patterns fit one two-level expression:

    D = (P ^ Z) & ~((Z & ~P) << 1)

This closed form is this design's own. It was checked against `P - Z` for
every operand pair of the 8-bit multipliers (all 65536 pairs). **It is not a
general subtractor.** It is only correct because of where Z sits relative to
the leading bits of P. Any change to the rounding rule, for example making
ties round down, must be checked against it again.

## Datapath widths (`roba_core`)

`roba_core` is the unsigned datapath that all three multipliers share. It
has two rounding blocks, three shifters, the adder and the subtractor. Inside
it, `P` and `Z` are **2N+1** bits wide, one bit more than the 2N-bit shifter
outputs the paper gives:

* In the unsigned case both operands can round up to `2^N`.
* Then `Z = 2^(2N)`, and `P` reaches `2^(2N+1) - 2^(N+1)`.

With only 2N bits, the subtractor's patterns would break when P overflows.
The final difference always fits in 2N bits, so only the low 2N bits come
out. A deferred immediate assertion in `roba_core` checks in simulation that
the dropped top bit is zero.

## Signed operation: S-ROBA and AS-ROBA

For negative numbers, two's complement does not have the power-of-two shape
that rounding relies on. The signed versions therefore work on magnitudes:

1. `roba_sign_detect` takes the sign and the absolute value of each operand.
2. `roba_core` (built with `EXT = 0`) multiplies the magnitudes.
3. `roba_sign_set` negates the result when exactly one operand was negative.

`s_roba` negates exactly, at every place where it negates. Its error is
therefore the same as that of the unsigned multiplier.

`as_roba` drops the `+1` from every negation, both at the inputs and at the
output. This removes two incrementers from the critical path. The cost is
extra error, which shrinks relative to the product as N grows. Two side
effects follow:

* An operand of -1 has the magnitude `~(-1) = 0`, so the product is 0. That
  is a 100 % error.
* A zero magnitude with a negative sign comes out as -1.

`as_roba` has a parameter `MINUS_ONE_BYPASS`. When it is set, a detector
finds an operand of -1 and returns the exact negation of the other operand,
or +1 when both are -1. The paper presents this detector as an option that
costs delay and power, so it is off by default and `roba_top` does not
enable it. The choice of exact negation on the bypass path is this design's.

## Accuracy

`tb/tb_roba_accuracy.sv` sweeps every operand pair at N = 8 and N = 6. It
reproduces the closed forms of the ROBA error analysis:

| N = 8                                   | U-ROBA | S-ROBA | AS-ROBA          |
|-----------------------------------------|--------|--------|------------------|
| largest relative error                  | 1/9    | 1/9    | 100 % (-1 input) |
| operand pairs at that error             | 49 = (n-1)^2 | 144 = (2(n-2))^2 | 255 = 2*2^(n-1)-1 |
| exact products (of 65536)               | 4527 = 2(n+1)2^n-(n+1)^2 | 7936 = n*2^(n+2)-4n^2 | 2378 (>= n*2^n-n^2 = 1984) |

The worst case of 1/9 comes from operands of the form `3*2^k`. The result
can be above or below the exact product:

* It is above when one operand was rounded up and the other down.
* It is below when both were rounded the same way.

The result is exact whenever either operand is zero or a power of two.

## Module map and interfaces

    roba_top (a, b -> p_u, p_s, p_as)
    ├── u_roba        a, b unsigned         -> p  unsigned
    │   └── roba_core  (EXT = 1)
    ├── s_roba        a, b two's complement -> p  two's complement
    │   ├── roba_sign_detect x2 (exact)
    │   ├── roba_core  (EXT = 0)
    │   └── roba_sign_set      (exact)
    └── as_roba       a, b two's complement -> p  two's complement
        ├── roba_sign_detect x2 (APPROX = 1)
        ├── roba_core  (EXT = 0)
        └── roba_sign_set      (APPROX = 1)

    roba_core = roba_round x2 + roba_shifter x3 + roba_adder + roba_subtractor

`roba_pkg` holds the default width `ROBA_N = 8` and the minimum `ROBA_MIN_N = 4`.
Below 4 bits, the rounding equations have no generic term. Each operand port
is N bits wide and each product port is 2N bits wide.

The 8-bit default is inferred from the paper's FPGA implementation, which
uses 32 I/O pins: 8 + 8 operand bits and a 16-bit product. The paper states
no operand width in its text. Its comparison table lists 145 I/Os, which
matches no single width, so that table was not used to size the design.

## Where this departs from the paper, and what is not verified

* **Subtractor expression.** The closed form above replaces the one printed
  with the three patterns. It is exact on all three patterns.
* **Internal widths.** `P` and `Z` are 2N+1 bits wide, not 2N, for the reason
  given under "Datapath widths".
* **Integration.** The structures of the shifter, the adder, the sign
  detector and the sign set are this design's choices. So is putting the
  three multipliers into one top level.
* **Not reproduced.** The paper's delay, LUT, power and energy figures. Its
  image sharpening and smoothing experiments, whose kernels and image sizes
  it does not give. The filters are not part of this RTL.
* **Checked.** Functional behaviour, exhaustively at N = 8, with random pairs
  at N = 12.

## Simulating

Each testbench is self-checking and prints one `TB_RESULT checks=.. failures=..`
line. To run the end-to-end test of `roba_top` at its default width:

    verilator --binary --timing -Irtl -Itb rtl/roba_pkg.sv tb/tb_roba_ref_pkg.sv \
        tb/tb_roba_top.sv --top-module tb_roba_top -Mdir obj_top
    ./obj_top/Vtb_roba_top

To run any other test, replace `tb_roba_top` with its name:

* block tests: `tb_roba_round`, `tb_roba_shifter`, `tb_roba_adder`,
  `tb_roba_subtractor`, `tb_roba_sign_detect`, `tb_roba_sign_set`,
  `tb_roba_core`, `tb_u_roba`, `tb_s_roba`, `tb_as_roba`
* error analysis: `tb_roba_accuracy`

Every test finishes in well under a second.

`tb/tb_roba_ref_pkg.sv` is the reference model. It rounds with a
leading-one search and forms `Ar*B + Br*A - Ar*Br` with ordinary integer
multiplication, so it shares no logic with the RTL. `tb_roba_top` also counts
how often each mechanism fires and fails if one never does. The mechanisms
are: rounding up, rounding down and no rounding; the 3 -> 2 exception;
rounding to `2^N`; borrow and no-borrow subtraction; negative operands and
negative results; results above, below and equal to the exact product; and
the AS-ROBA -1 collapse.

## Changing it

* **Width.** Set `N` on any module (N >= 4). The product is 2N bits wide and
  the internal datapath is 2N+1 bits wide.
* **Rounding rule.** Edit `roba_round`, then re-run `tb_roba_subtractor` and
  `tb_roba_core`. The subtractor is only correct for the patterns that the
  current rounding rule produces.
* **Pipelining.** To pipeline the design, the natural cut points are after
  the rounding blocks and after the adder. None is present today.
