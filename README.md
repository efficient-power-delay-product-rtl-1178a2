# Modulo 2^n+1 adder with a double-weight LSB code

Modulo 2^n+1 is the awkward channel of residue number systems built on the
moduli set {2^n-1, 2^n, 2^n+1}. Its residues run from 0 to 2^n, one value
too many for n bits. So an ordinary binary code needs n+1 bits, and adding
two such residues needs a correction step. This adder uses a different
(n+1)-bit code in which the two lowest bits both weigh 1. With that code the
correction constant becomes cheap: bit 0 needs no adder, bit 1 needs only an
inverter, and the output multiplexer shrinks from n+1 to n bits. The
structure trades some delay for fewer gates than the usual designs.

Everything is combinational. There is no clock, register or reset.

## The number code

An (n+1)-bit word `w[n:0]` has the bit weights

    2^(n-1), 2^(n-2), ..., 2^1, 2^0, 2^0
     w[n]     w[n-1]        w[2] w[1] w[0]

so its value is `w[n:1] + w[0]`, read as plain binary plus one. The largest
value, all ones, is 2^n. Most values have two codes. The canonical code,
which every block expects and produces, is:

| residue | code                          | n = 2 example |
|---------|-------------------------------|---------------|
| 0       | all zeros                     | `000`         |
| X >= 1  | `{X-1, 1'b1}` (X-1 in [n:1])  | 1 = `001`, 2 = `011`, 3 = `101`, 4 = `111` |

So bit 0 is a "nonzero" flag, and bits [n:1] hold the residue minus one.
Bits {1,0} of a valid word are never `10`. Words that break this rule are
not valid inputs, and the adder gives no meaningful result for them.

To convert from ordinary binary, use `x == 0 ? 0 : {x-1, 1'b1}`. To convert
back, use `w[n:1] + w[0]`.

## How the addition works

The adder computes Z = (A + B) mod (2^n + 1) in two rows and a selector
(`mod2n1_adder`, drawn here for n = 4):

```
 a[4]b[4]   a[3]b[3]   a[2]b[2]     a[1]a[0]b[1]b[0]
    |          |          |               |
  [FA] <---- [FA] <---- [FA] <---- c --[lsb_adder]--- s1, s0
    | s4       | s3       | s2             | s1      | s0
  cout1        |          |                |         |
  [HA*] <--- [HA*] <--- [HA*] <--- s1 ---(NOT)       |
    | x4       | x3       | x2             | x1      |
  cout2                                              |
  SEL = cout1 & cout2                                |
  z[4:1] = SEL ? x[4:1] : s[4:1]           z[0] = s0 (see below)
```

**Phase 1: S = A + B.** Bits 1 and 0 of both operands are four bits that
each weigh one. `lsb_adder` counts them (0 to 4) and writes the count as a
carry `c` of weight 2 plus `s1` and `s0` of weight 1 each. It keeps the
canonical form: `s0` is 1 unless all four bits are 0.

| ones among a1 a0 b1 b0 | c s1 s0 |
|------------------------|---------|
| 0                      | 0 0 0   |
| 1                      | 0 0 1   |
| 2                      | 0 1 1   |
| 3                      | 1 0 1   |
| 4                      | 1 1 1   |

Only nine input combinations can occur, because `10` is not a valid pair.
That lets the logic be small:

- `s0 = a1|a0|b1|b0`
- `s1 = s0 & ~(a1^a0^b1^b0)`
- `c = a1&b0 | b1&a0`

Positions 2..n are an ordinary ripple row of `full_adder` cells with
carry-in `c`. Its carry out, `cout1`, weighs 2^n. So A + B = cout1*2^n + S,
and S is a canonical code whose value lies between 0 and 2^n.

**Phase 2: X = S + (2^n - 1).** Subtracting 2^n + 1 is the same as adding
2^n - 1 and dropping 2^n. The constant 2^n - 1 has two codes. The one used
is `1...10`: ones in bits n..1 and a zero in bit 0. Because of that zero,
bit 0 passes through unchanged (`x0 = s0`). Bit 1 adds 1 with no carry in,
so it is just `x1 = ~s1`, with carry `s1`. Positions 2..n each add 1 plus a
carry. That is a full adder with one input tied high, the `ha_star` cell
(`s = ~(a^b)`, `c = a|b`). Its carry out is `cout2`. In effect
`x[n:1] = s[n:1] - 1`, and `cout2 = (s[n:1] != 0)`.

**Selection.** `result_mux` forms `SEL = cout1 & cout2`. When both rows
carried out, A + B > 2^n + 1, and the phase-2 bits are the answer.
Otherwise the phase-1 bits are.

### The A + B = 2^n + 1 case

The structure above, taken exactly, gets one case wrong. When
A + B = 2^n + 1:

- Phase 1 gives `cout1 = 1` and S = `0...01` (the value 1).
- Phase 2 gives `cout2 = 0`.
- So `SEL = 0`, and the output is `0...01`. That is the code of residue 1,
  but the right answer is residue 0 (all zeros).

Example with n = 3: `1001` (5) + `0111` (4) = 9 ≡ 0 (mod 9), but the plain
structure returns `0001`.

The two carries pick out exactly this case: `cout1 & ~cout2`. Bits [n:1]
are already zero there, so one gate on bit 0 corrects it:

    z[0] = s0 & ~(cout1 & ~cout2)

This correction is on by default, through the parameter `ZERO_FIX = 1`.
With `ZERO_FIX = 0` you get the uncorrected output stage, for comparison;
its testbench checks that it returns `0...01` in this one case and the
right residue everywhere else.

## Modules

| module         | role | ports |
|----------------|------|-------|
| `mod2n1_adder` | top: the whole adder | `a`, `b`, `z` [N:0]; `sel` (SEL, for observation) |
| `lsb_adder`    | phase-1 logic of bits 1..0 | `a`, `b` [1:0]; `c`, `s1`, `s0` |
| `full_adder`   | phase-1 cell, bits 2..N | `x`, `y`, `ci`; `s`, `co` |
| `ha_star`      | phase-2 cell, bits 2..N (full adder with third input = 1) | `a`, `b`; `s`, `c` |
| `result_mux`   | SEL gate, N-bit 2:1 multiplexer, bit-0 correction | `s_hi`, `x_hi` [N-1:0]; `s0`, `cout1`, `cout2`; `z` [N:0]; `sel` |

Parameters of `mod2n1_adder` and `result_mux`:

- `N` (default 4): the modulus is 2^N + 1. It must be at least 2. Any value
  works, not only powers of two.
- `ZERO_FIX` (default 1): turns on the correction above.

The critical path is the phase-1 ripple chain followed by the phase-2
ripple chain, then the multiplexer. Both chains are about N-1 cells long.

## What comes from the published design and what does not

These parts follow the published structure:

- the code
- the LSB truth table and the four-input OR for `s0`
- the choice of constant `1...10`
- the inverter at bit 1
- the HA* cell
- the two ripple rows
- SEL as the AND of both carries
- the N-bit multiplexer
- the default N = 4

These are this design's own choices:

- The product terms for `c` and `s1`. Any cover of the truth table's
  don't-cares would do; the chosen ones are two-level, like the original.
- A textbook full adder, since the original only names the cell.
- The `ZERO_FIX` correction.
- The `sel` output port.

The original gives area, power and delay figures for N = 4, 6 and 8. They
come from a transistor-level 180 nm implementation, and this RTL makes no
claim about them.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

- `tb_lsb_adder`: every valid pair of low-bit codes, checked against the
  table above and against the total weight.
- `tb_full_adder`, `tb_ha_star`: exhaustive.
- `tb_result_mux`: 200 random cases covering every carry combination, for
  both `ZERO_FIX` settings.
- `tb_mod2n1_adder`: the top at its default parameters. All 17 × 17 residue
  pairs are encoded, added and decoded by bit weight, then compared with
  (X+Y) mod 17. The result must also be the canonical code, and `sel` must
  be right. The test counts the below / equal / above-modulus cases and the
  LSB carry, and fails if any of them never occurs.
- `tb_mod2n1_widths`: exhaustive at N = 4, 6 and 8 (up to 257 × 257 pairs),
  plus the uncorrected N = 4 variant.

All of these pass. Running one with plain Verilator:

```
verilator --binary --timing --assert -y rtl tb/tb_mod2n1_adder.sv \
          --top-module tb_mod2n1_adder -Mdir obj -o sim && obj/sim
```

Every run finishes in well under a second.
