# Carry-select adder with carry selection before the sum

A carry-select adder (CSLA) speeds up addition by working out the result for
both possible input carries in advance, then choosing one when the real carry
arrives. The classic form builds two complete ripple-carry adders per block,
one for input carry 0 and one for input carry 1, then multiplexes their sums
and output carries. Much of that work is done twice. Both adders compute the
same half sums and half carries. Both also form a full sum word, and one of
the two is thrown away.

This design removes the repeated work and changes the order of operations:

1. The half sum `a ^ b` and half carry `a & b` of every bit are computed
   **once**. They are shared by everything downstream.
2. Two carry generators, CG0 and CG1, produce only **carry words**: the carry
   out of every bit position for an input carry of 0 and of 1. They form no
   sums.
3. The real input carry **selects a carry word**. This happens before any sum
   bit exists.
4. The sum is formed **once**, from the half sums and the selected carry word.

Two things follow. The output carry is available after carry selection,
without waiting for the sum. And the selector needs only `n` bits, not `n+1`.

The optimised CSLA is then used as the stage of a **square-root CSLA**
(SQRT-CSLA). That is a chain of CSLA stages whose widths grow along the chain.
Its output carry leaves each stage through just two gate levels. This makes
the stage a good fit for chaining.

## The carry-word bit pattern and the selector

A 2-to-1 multiplexer per bit would do the selection. This design uses a
cheaper circuit that gives the same result, based on one property of the two
carry words. Let `c0w` and `c1w` be the carry words for input carry 0 and 1:

    wherever c0w[i] = 1, c1w[i] = 1 as well

Raising the input carry can only add carries, never remove one. So the
selected word is

    cw[i] = c0w[i] | (c1w[i] & cin)

That is one AND and one OR per bit, with `cin` fanning out to all of them.
`cs_unit` carries an immediate assertion that checks the property
(`c0w & ~c1w == 0`) on every input change.

The carry generators use the fact that the input carry is a constant. Both
ripple `c[i] = hc[i] | (hs[i] & c[i-1])`. Bit 0 simplifies to `hc[0]` in CG0
and to `hc[0] | hs[0]` in CG1. One module, `cg_unit`, serves as both, chosen
by the parameter `CIN_FIXED`.

The final sum is `s[0] = hs[0] ^ cin` and `s[i] = hs[i] ^ cw[i-1]`. The
output carry is `cw[N-1]`.

## Square-root chaining

`sqrt_csla` splits an `N`-bit addition into groups. Counted from the least
significant end, the group widths are 2, 2, 3, 4, 5, 6, … bits. The last group
takes whatever bits remain, so it may be narrower than the group before it.

| N  | groups | widths                         |
|----|--------|--------------------------------|
| 16 | 5      | 2, 2, 3, 4, 5                  |
| 32 | 8      | 2, 2, 3, 4, 5, 6, 7, 3         |
| 64 | 11     | 2, 2, 3, 4, 5, 6, 7, 8, 9, 10, 8 |

Each group is a `csla` stage. All stages generate their carry words at the
same time, straight from the operands. The only serial path is the carry
passed from stage to stage, and each hop goes through one AND-OR of the next
stage's selector. A wider stage takes longer to ripple its carry words. It
sits further up the chain, so the extra time is hidden while the select carry
comes up from below. The widths are computed by constant functions in
`csla_pkg` (`group_count`, `group_offset`, `group_size`).

## Module hierarchy

```
sqrt_csla            N = 64       SQRT-CSLA, top level
└─ csla  (x groups)  N = width    optimised single-stage CSLA
   ├─ scg_unit                    sum and carry generator unit
   │  ├─ hsg_hcg                  half sum and half carry, shared
   │  ├─ cg_unit CIN_FIXED=0      CG0: carry word for input carry 0
   │  └─ cg_unit CIN_FIXED=1      CG1: carry word for input carry 1
   ├─ cs_unit                     carry selection, output carry
   └─ fsg_unit                    final-sum generation
csla_pkg                          group-width functions
```

Every module has the same kind of interface: operand words `a` and `b` (or
the intermediate words between units), an input carry `cin`, a sum `s` and an
output carry `cout`. Every module is purely combinational: there is no clock,
no reset and no state. To pipeline the adder, register its inputs and outputs
around it.

Parameter defaults: `N = 64` for `sqrt_csla`, the widest configuration the
design targets. `N = 16` for `csla` and its sub-units, the widest
single-stage configuration.

## What is taken from the source, and what is a design choice

The following comes from the original description of the design:

- sharing the half-sum and half-carry generation between the two carry
  computations;
- carry generators that work from a fixed input carry;
- carry selection scheduled before final-sum generation, with no sum words
  formed for the two anticipated carries;
- an `n`-bit selector that relies on the bit pattern of the two carry words;
- the early output carry;
- using the optimised CSLA as the stage of a SQRT-CSLA;
- the widths it is evaluated at: 8 and 16 bits for the single stage, and 16,
  32 and 64 bits for the SQRT-CSLA.

The following are choices made here:

- The exact Boolean forms above. They are the standard half-adder and
  ripple-carry equations, plus the AND-OR selector that the bit pattern
  allows.
- The SQRT-CSLA group widths. The source describes the square-root structure
  but gives no widths.
- Making the first group a full CSLA stage as well, not a plain ripple adder.
- Parameterising the fixed carry of `cg_unit` so that one module serves as
  both CG0 and CG1.
- A purely combinational interface.

The source compares the design against conventional, BEC-based (binary to
excess-1 converter) and CBL-based (common Boolean logic) carry-select adders.
It reports area, delay, energy and area-delay product after synthesis and
place-and-route on a 90-nm library. Those baselines are not part of this RTL,
and the RTL reproduces none of those physical figures.

## How far it has been verified

Each module has a self-checking testbench in `tb/`. Every testbench compares
against plain integer addition, not against the design's own equations:

| testbench             | what it checks |
|-----------------------|----------------|
| `hsg_hcg_tb`          | every bit against the one-bit sum of its operand bits |
| `cg_unit_tb`          | CG0 and CG1 carry words against bit `i+1` of the integer sum of the low `i+1` operand bits |
| `scg_unit_tb`         | the half-sum word and both carry words |
| `cs_unit_tb`          | selection for both `cin` values over true carry-word pairs; `cout` |
| `fsg_unit_tb`         | sum against `a + b + cin` |
| `csla_tb`             | 8-bit adder exhaustively (all 2^17 cases), 16-bit adder with corner cases and 20 000 random cases |
| `sqrt_csla_tb`        | 64-bit top at default parameters: corner cases, a carry origin at every bit position, 20 000 random cases |
| `sqrt_csla_widths_tb` | 16- and 32-bit SQRT-CSLA, including their stage counts |

`sqrt_csla_tb` also counts how often each mechanism happened, and fails if
any never did:

- a stage selected its carry-1 word;
- a stage selected its carry-0 word;
- a carry travelled from `cin` through every stage;
- the adder produced an output carry;
- a carry was absorbed part way up the chain.

Each testbench was also run against a deliberately broken copy of its module,
and failed every time. The broken copies included:

- an OR in place of the half-carry AND;
- CG1 ignoring its fixed carry;
- a selector that ignores `cin`;
- an off-by-one carry into the sum;
- a cut link between stages.

The testbenches check logic only. They measure no delay, because nothing in
the RTL models gate delay.

## Simulating

Each testbench ends by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/csla_pkg.sv tb/sqrt_csla_tb.sv --top-module sqrt_csla_tb
./obj_dir/Vsqrt_csla_tb
```

Replace `sqrt_csla_tb` with any other testbench name. `-Irtl` lets Verilator
find the modules by file name. `csla_pkg.sv` must come first on the command
line, because `sqrt_csla` imports it.

Lint (`verilator --lint-only -Wall`) reports one warning, which is expected.
In the CG0 variant of `cg_unit`, input bit `hs[0]` is unused: with an input
carry of 0, the carry out of bit 0 is just the half carry.

## Changing it

- **Width.** Set `N` on `sqrt_csla` or `csla`. Any `N ≥ 1` works with
  `csla`. `sqrt_csla` handles any `N ≥ 1`; with `N ≤ 2` it has a single
  stage.
- **Group widths.** Edit `nominal_size` in `csla_pkg`. The offsets, the
  clipping of the last group and the stage count all follow from it.
- **Selector.** The AND-OR form in `cs_unit` is only correct while the
  carry-word property holds. If `cs_unit` is fed anything other than true
  carry words, replace it with a multiplexer. The assertion flags such
  misuse in simulation.
