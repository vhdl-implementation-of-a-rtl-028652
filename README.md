# YTVY squarer: squaring a binary number without a multiplier

This is a combinational circuit that computes `S = A * A` for an unsigned
N-bit `A` using only adders, a subtractor, shifts and one 2-bit squaring
cell. It has no array multiplier. The method comes from the Vedic sutra
*Yavadunam Tavadunikrtya Vargarica Yojayet* (YTVY), roughly "take the
deficiency, subtract it from the number, and write its square alongside".
The method reduces an N-bit square to an (N-1)-bit square plus a few
additions. Applied over and over, it comes down to a 2-bit square, which a
single AND gate and a half adder produce. The default build is the 3-bit
squarer (3 inputs, 6 outputs).

## The identity

Let `B` be a base close to `A`, and let `C` be the distance between them.
Then

    A^2 = (A + C)(A - C) + C^2

With decimal numbers `B` is a power of ten, so multiplying by it only means
writing zeros. For example, 96^2 = (96 - 4) * 100 + 4^2 = 9216. In binary the
natural base of an N-bit number is its MSB weight, `B = 2^(N-1)`, so
"multiply by B" is a left shift by N-1. Two cases arise.

**Deficit (A >= B, MSB of A set).** Here `C = A - B`, which is just the low
N-1 bits of `A`. Then `A - C = B`, and

    A^2 = (A + C) << (N-1)  +  C^2

**Surplus (A < B, MSB of A clear).** Here `C = A + B`. Its low N-1 bits are
`A` itself, because A's MSB is zero. The first term is dropped
(`D = 0`), and

    A^2 = (low N-1 bits of C)^2

In both cases the term left over is the square of an (N-1)-bit number. An
(N-1)-bit squarer takes it, so the scheme recurses.

Names used throughout the RTL, for one level of width N:

| name | width | meaning |
|------|-------|---------|
| `C`  | N     | `A - B` (deficit) or `A + B` (surplus); its MSB is dropped before squaring |
| `D`  | N+1   | `A + C` in the deficit case, 0 in the surplus case |
| `E`  | 2N-2  | square of C's low N-1 bits, from the next smaller squarer |
| `F`  | 2N    | `D` shifted left by N-1 |
| `G`  | 2N    | `E` with two zero bits on top |
| `S`  | 2N    | `F + G`, the square |

### Worked examples (N = 3, B = 100)

| A   | case    | C   | D    | F      | E    | G      | S      |
|-----|---------|-----|------|--------|------|--------|--------|
| 111 | deficit | 011 | 1010 | 101000 | 1001 | 001001 | 110001 (49) |
| 010 | surplus | 110 | 0    | 000000 | 0100 | 000100 | 000100 (4)  |

Both rows are checked bit for bit by the testbenches.

## The 2-bit cell (`ytvy_sq2`)

A 2-bit number squares to 0, 1, 4 or 9. So `G0 = A0` and `G1 = 0` always.
`G2` is set only for 2, and `G3` only for 3. The cell forms `P = A1 & A0`
with an AND gate. A half adder then adds `A1` and `P`: its sum `A1 ^ P`
(= `A1 & ~A0`) is `G2`, and its carry (= `A1 & A0`) is `G3`. That is one AND
gate and one half adder, as the method prescribes. The constant `G1` is a
real property of squares, not a missing connection.

## One level (`ytvy_stage`)

A level receives `A` and returns `c_low` (C without its MSB) to the next
smaller squarer. It gets back `e` (the square of `c_low`) and outputs `s`.
Inside it:

- `deficit = (A >= B)`. This is the condition select, and in hardware it is
  just A's MSB.
- `ytvy_addsub` forms `C`. It is one adder with a conditionally complemented
  operand and carry-in, so the same adder does both `A - B` and `A + B`.
- `ytvy_adder` (N bits plus carry out) forms `A + C`. The result is forced
  to zero in the surplus case to give `D`.
- `F` and `G` are pure wiring.
- A `ytvy_adder` of 2N-1 bits adds `F` and `G`. The top bit of `G` is always
  zero, so the MSB of the 2N-bit sum needs only a half adder: `F`'s MSB
  XOR the carry. The square of an N-bit number always fits in 2N bits, so
  nothing is lost.

The `deficit` flag is an internal signal, not a port. The testbenches read it
by hierarchical reference to count which condition occurred.

## The chain (`ytvy_square`, top)

`ytvy_square #(N)` unrolls the recursion with a generate loop. Level `k`
(for k = N down to 3) is a `ytvy_stage #(k)`. Its `c_low` becomes the operand
of level k-1, and its `e` input is the square returned by level k-1. The
2-bit cell closes the chain. An N-bit squarer thus holds N-2 stages and one
2-bit cell.

The circuit has two paths that ripple through all levels:

- the forward path of `C`, from the N-bit level down to the 2-bit cell;
- the backward path of partial squares, back up.

The critical path therefore grows roughly with N times the adder delay.
Nothing is registered. There is no clock or reset. The output is valid one
combinational delay after the input changes.

Ports: `a[N-1:0]` in, `s[2N-1:0]` out. `N` may be any integer of 2 or more
(default 3). `N = 2` gives just the 2-bit cell.

## What follows the method and what is a choice of this RTL

Taken from the method as described:

- the identity;
- the two conditions and their names C, D, E, F, G, S;
- the left shift of D by N-1;
- dropping C's MSB before squaring;
- forcing D to zero in the surplus case;
- the shared adder/subtractor;
- the final 2N-bit adder;
- the AND-gate-plus-half-adder 2-bit cell;
- building the N-bit squarer out of the (N-1)-bit one;
- the 3-bit size.

Choices made here:

- **Binary base.** `B = 2^(N-1)`. The method only shows `B = 100` for
  3-bit examples.
- **Zero padding of E.** The method speaks of padding E with "n-1" zeros.
  That equals 2 at N = 3. This RTL always pads with two zeros, which is the
  only width that makes G 2N bits for other N.
- **Adder insides.** These are plain `+` operators, left for synthesis to
  map. No carry structure is prescribed.
- **Unrolling.** The recursion is unrolled structurally and the circuit is
  purely combinational. One reading of the method would instead reuse a
  single 2-bit cell N-2 times. A chain of N-2 levels ends in exactly one
  2-bit cell. Time-multiplexing one cell would need a controller that the
  method never describes.
- **The surplus example.** The published surplus worked example
  ends with a result (001001, "the square of 011") that does not match its
  own operands. The RTL follows the arithmetic: 000000 + 000100 = 000100,
  the square of 010.

Not built: the decimal form of the sutra (bases 10, 100, ...). It is an
arithmetic explanation rather than hardware. The reported FPGA figures
(3 slices, 5 four-input LUTs, 10 bonded IOBs, 0.032 W on a Spartan-3E) are
a property of a vendor flow and cannot be reproduced from RTL alone. The
3-bit default needs 3 + 6 = 9 data pins; the tenth reported IOB is not
accounted for.

## How far it is tested

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_ytvy_sq2` | all 4 inputs of the 2-bit cell |
| `tb_ytvy_addsub` | exhaustive at 3 bits, both operations; 2000 random vectors at 8 bits |
| `tb_ytvy_adder` | exhaustive at 6 and 3 bits, sum and carry |
| `tb_ytvy_stage` | exhaustive at N = 3 and N = 6. It checks C, the condition flag and S. The testbench supplies E itself, so a single level is tested in isolation |
| `tb_ytvy_square` | N = 2, 3, 4 and 8 exhaustive. N = 16 and N = 32 at corner values and 5000 random inputs each. Counts deficit and surplus occurrences and fails if either is missing |
| `tb_ytvy_square_full` | the top at its default parameters: all 8 inputs, both worked examples, and exactly 4 deficit and 4 surplus cases |

Expected values are always `a*a` computed in 64-bit integer arithmetic in
the testbench, never taken from the design.

## Simulating

With Verilator 5 (any testbench; replace the name):

    verilator --binary --timing --assert -Irtl -Itb \
        tb/tb_ytvy_square.sv --top-module tb_ytvy_square -Mdir obj
    ./obj/Vtb_ytvy_square

`-Irtl` lets Verilator find each module in `rtl/<module>.sv`. To change the
width, set `N` on `ytvy_square`, e.g. `ytvy_square #(.N(12))`. The output
width follows as 2N.
