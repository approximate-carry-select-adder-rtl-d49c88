# AMLM: approximate static-segment multiplier with a multiplierless core

A 16 x 16 unsigned multiplication costs roughly four times the energy and area
of an 8 x 8 one. This design does a 16 x 16 multiplication approximately,
using only one 8 x 8 multiplication. Each operand is cut to the 8-bit
*segment* that carries its significant bits. The two segments are multiplied,
and the product is shifted back to operand scale. The segment multiplier
itself is also approximate. It is a shift-and-add multiplier with no
multiplier array, and it sums its partial products with an *approximate carry
select adder* (ACSA). The ACSA applies the same segment trick to addition.

Everything is combinational: no clock, no reset, no handshake. The product
settles one propagation delay after the operands change.

## Static segments

The segment is picked statically: each operand offers two fixed candidates.
No leading-one detector or barrel shifter is used. For a Y-bit operand and
X-bit segments (Y = 16, X = 8 by default):

- `hi = |opnd[Y-1:X]`: an OR over the bits the lower segment cannot hold.
- `hi = 1`: the upper segment `opnd[Y-1:Y-X]` is used. It stands for
  `opnd / 2^(Y-X)`, so its low `Y-X` bits are lost.
- `hi = 0`: the lower segment `opnd[X-1:0]` is used. It holds the whole
  operand exactly.

X must satisfy `Y/2 <= X < Y`, which `seg_select` checks at elaboration.
With X = 10 of 16, the segments overlap. The OR then spans only `opnd[15:10]`,
and a used upper segment drops just 6 bits.

## Putting the product back: the terms i, j, k

The two selects are added into a two-bit count `sel = {c,s}`. It says how
many operands were represented by their upper segment. The 2X-bit segment
product Z is then placed in the 2Y-bit result:

| sel | term | result            | meaning                            |
|-----|------|-------------------|------------------------------------|
| 00  | i    | `Z`               | both operands small: exact product |
| 01  | j    | `Z << (Y-X)`      | one operand scaled down            |
| 10  | k    | `Z << 2(Y-X)`     | both operands scaled down          |

`sel = 11` cannot occur. The mux returns 0 for it. `sel` is also an output of
the top, so you can see which term was used.

With the accurate segment multiplier (`CORE = CORE_EXACT`), this is the plain
static segment method. Two examples:

- 21828 x 3216: segments 85 and 12, both upper, so `1020 << 16 = 66846720`.
- 249 x 674: segments 249 (lower) and 2 (upper), so `498 << 8 = 127488`.

## The multiplierless core (`mlm`)

In the default configuration (`CORE = CORE_ACSA_MLM`), the segment product
comes from an N x N shift-and-add multiplier (N = X = 8):

1. For each bit `b[k]`, a mux passes `a << k` (2N bits) or zero.
2. The N partial products are accumulated in bit order by a chain of N-1
   ACSA instances, each configured as a 2N-bit adder with N-bit segments.
3. Each adder output (2N+1 bits) is cut to the 2N-bit product width.

## The approximate carry select adder (`acsa`)

This adder is the hardest part to understand, and it decides the design's
accuracy. It applies segment selection to each Y-bit addend, just as the
multiplier front end does. It then adds the two X-bit segments with an exact
X-bit carry select adder (`carry_select_adder`: 4-bit blocks, each block
above the first computed for carry-in 0 and 1). The (X+1)-bit sum Z is placed
in a (Y+1)-bit result:

| selects | result              |
|---------|---------------------|
| 00      | `Z` (exact sum)     |
| 01      | `Z << (Y-X)/2`      |
| 10      | `Z << (Y-X)`        |

Cases 00 and 10 make sense:

- 00: both addends are small, and the sum is exact.
- 10: both are large, and only their low bits are dropped.

Case 01 adds a scaled-down upper segment to an unscaled lower segment, then
scales the sum by half the segment offset. No single scale fits a sum of two
values of different scales. So in this case the result can be far from the
true sum. The rule is kept as specified, with the shift of `(Y-X)/2` (4 for a
16-bit adder).

Inside the multiplier this case is common. The running sum becomes large
(upper segment) while the next partial product is still small, or the other
way round. Even adding a zero partial product to a running sum of 256 or more
changes it: 0 + 340 gives 16. As long as every running sum and every partial
product stays below 2^N, the core is exact. For example, 6 x 10 = 60 and
15 x 15 = 225.

### Accuracy you can expect

Mean relative error `|exact - approx| / exact`, measured by the testbenches.
Half of the operands are drawn below 2^8 (or 2^10) and half over the full
16 bits:

| configuration                           | mean relative error |
|-----------------------------------------|---------------------|
| accurate core, 8-bit segments           | 0.16                |
| accurate core, 10-bit segments          | 0.002               |
| multiplierless ACSA core, 8-bit (default) | 0.70              |
| multiplierless ACSA core, 10-bit        | 0.72                |

The original description reports an accuracy of 99.98% for this design. It
does not say how that was measured, and this RTL is nowhere near it. The
cause is case 01 of the ACSA. If you need a usable multiplier, change
`acsa`'s case 01 or use `CORE_EXACT`. Either change departs from the design
as specified.

## Where this RTL departs from or goes beyond the specification

- **ACSA shifts and width.** The published equations for i, j and k are
  written for the multiplier, and the adder is only said to use "similar"
  ones. The shifts 0, (Y-X)/2 and Y-X, and the 17-bit output, follow the
  published adder waveform (a case-01 sum of 43 shown as 688).
- **Inner adder values.** The published waveforms show some segment sums and
  8 x 8 products that no exact adder gives: 125 + 137 shown as 326, 234 + 1 as
  43, 6 x 10 as 44, 18 x 43 as 624. What causes these is not described. Here
  the inner carry select adder is exact: 262, 235, 60, and the model's value
  for 18 x 43.
- **Left or right shift.** The partial products are `a << k`, as drawn and as
  in the waveforms, although the text calls the shifter a right shifter.
- **Choices where the description is silent:**
  - the order in which partial products are summed (a chain, in bit order)
  - truncating each adder output to 2N bits
  - the carry select block size (4)
  - unsigned operands
  - the value 0 for the unreachable code `sel = 11`
  - the `CORE` switch between the two segment multipliers
- **Not built:** a signal in the published 8 x 8 segment waveform that is
  twice the product, whose purpose is not given.

## Modules

```
amlm                    top: Y x Y approximate multiplier, p[2Y-1:0], sel
 +- seg_select  x2      OR of upper bits, segment mux
 +- mlm                 (CORE_ACSA_MLM) N x N multiplierless multiplier
 |   +- acsa  x(N-1)    segmented approximate adder
 |       +- seg_select x2
 |       +- carry_select_adder
 +- exact_mult          (CORE_EXACT) accurate N x N multiplier
 +- segment_expander    {c,s} = hi_a + hi_b, terms i/j/k, output mux
amlm_pkg                seg_sel_e (the {c,s} codes), core_e (CORE values)
```

Parameters of `amlm`: `Y = 16` (operand width), `X = 8` (segment width, e.g.
10 for the 10-of-16 variant) and `CORE = CORE_ACSA_MLM`.

## Simulating

Each testbench in `tb/` is self-checking. It compares the RTL with an
arithmetic model in `tb/amlm_ref_pkg.sv`, which uses division and powers of
two rather than the RTL's muxes. It prints
`TB_RESULT checks=N failures=M`. Every testbench counts how often each
mechanism (term i/j/k, each ACSA case, block carries) occurred, and it fails
if one never did.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/amlm_pkg.sv tb/amlm_ref_pkg.sv tb/tb_amlm.sv --top-module tb_amlm
./obj_dir/Vtb_amlm
```

Swap in any other testbench:

| testbench              | what it checks                                             |
|------------------------|------------------------------------------------------------|
| `tb_amlm`              | default top, end to end, 100k random pairs                 |
| `tb_amlm_configs`      | accurate core with 8- and 10-bit segments; multiplierless core with 10-bit segments |
| `tb_mlm`               | every 8 x 8 product                                        |
| `tb_acsa`              | the adder                                                  |
| `tb_seg_select`        | every 16-bit operand                                       |
| `tb_segment_expander`  | output placement                                           |
| `tb_carry_select_adder`| every 8-bit pair                                           |
| `tb_exact_mult`        | every 8 x 8 product                                        |

Each testbench runs in well under a second.

To change the design, edit the module and update the matching function in
`amlm_ref_pkg.sv`. For example, a different ACSA case-01 rule goes in
`acsa.sv` and `ref_acsa`.
