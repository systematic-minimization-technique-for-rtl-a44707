# Majority-of-majority logic: adders and functions built from one gate

Quantum-dot cellular automata (QCA) and some other emerging technologies
compute with a three-input majority gate rather than with AND and OR. A
majority gate outputs whatever at least two of its inputs say:

    M(a, b, c) = ab + bc + ca

Tie one input to 0 and it is an AND gate; tie it to 1 and it is an OR gate.
Any sum of products can therefore be written as majorities of majorities,
but the direct translation wastes gates. This RTL contains circuits that
come from a map-based minimisation method for majority logic (a "J-Map", a
Karnaugh map whose covers are majority functions rather than products):
two full adders, an N-bit ripple-carry adder that passes its carry in
inverted form, and a set of small functions expressed in majority form.

Everything is combinational SystemVerilog. Every function is built only
from instances of one primitive, `maj3`, plus inverters and the constants
0 and 1, so the gate count of each circuit can be read straight from the
source.

## The majority gate (`maj3`)

`rtl/maj3.sv` is the primitive. In QCA it is five cells in a cross whose
centre cell settles to the polarisation held by most of its three inputs
(polarisation +1 is logic 1, -1 is logic 0). Here it is a two-level
sum of products. Nothing about the physical cell, its layout or its
clocking is modelled.

## How the map method chooses gates

The RTL does not perform the minimisation. It holds the results. To read
them, it helps to know the rules. Every 1 of the function's Karnaugh map
becomes "11" and every 0 becomes "00". Covers are then drawn as for a
Karnaugh map, in groups of 2^n adjacent cells. Each cover is the set of ones
of one majority term; a majority of three variables covers a "T" of four
cells. The cover set is valid when:

* every 1-cell is covered at least twice, and
* every 0-cell is covered at most once.

A 2-of-3 vote over three such covers then gives the function, so the
result is a majority of three majorities, `M(M1, M2, M3)`. If the covers
cannot be made to overlap this way, the map is split into several maps
whose results are ORed by a further `M(., ., 1)`. This is the "extended"
procedure (XJ-Map), and it also handles four and five variables.

## Full adder with three majority gates (`fa_maj`)

    Cout = M(X, Y, C)
    Sum  = M(Cout', M(X, Y, C'), C)

The carry gate is shared with the sum. When C = 0, the output gate reduces
to `(XY)' AND (X+Y)`, which is X xor Y. When C = 1 it reduces to
`(X+Y)' OR XY`, which is X xnor Y. The sum is therefore X xor Y xor C, built
from three majority gates and one inverter on the carry (plus the
complement of C on an input).

## Inverted-carry cell and ripple adder (`fa_cell_inv`, `rca_inv`)

This is the part that needs the most care. Majority is self-dual: inverting
all three inputs inverts the output. Hence

    Cout' = M(X', Y', C')

A cell that receives the complement of its carry-in can therefore produce
the complement of its carry-out with a single gate. No inverter is needed on
the carry path. The cell's sum uses that inverted carry directly:

    Sum = M(Cout', M(X, Y, C'), C)

This is the same output gate as in `fa_maj`, fed with Cout' instead of an
inverted Cout. `fa_cell_inv` has ports `x`, `y`, `cin_n` in and `sum`,
`cout_n` out. The inverters on X, Y and on C' (to get C) are written as `~`.

`rca_inv` chains N of these cells:

```
cin --[inv]--> cin_n(0) -> cell 0 -> cout_n(0)=cin_n(1) -> cell 1 -> ... -> cell N-1 -> cout_n(N-1) --[inv]--> cout
```

The carry is inverted once on entry and once on exit. Between those two
inverters the carry path is exactly one majority gate per bit. Bit 0 is the
least significant bit. The default is `N = 8`. The method describes an
n-bit adder without fixing n, so 8 is a choice. Any N >= 1 works.

Ports: `x[N-1:0]`, `y[N-1:0]`, `cin` in; `sum[N-1:0]`, `cout` out.
sum/cout = x + y + cin, settling after the ripple delay. There is no clock.

## Functions in majority form (`table1_functions`, `jmap_examples`)

`table1_functions` takes inputs A, B, C and has one output per function:

| output        | function     | network |
|---------------|--------------|---------|
| `f_abc`       | ABC          | M(M(A,B,0), C, 0) |
| `f_ab`        | AB           | M(A,B,0) |
| `f_abc_nabc`  | ABC + A'B'C' | M(M(M(A,B,0),C,0), M(M(A',B',0),C',0), 1) |
| `f_ab_nanbc`  | AB + A'B'C   | M(M(A,B,0), M(M(A',B',0),C,0), 1) |
| `f_a`         | A            | M(A,A,1) |
| `f_ab_nbc`    | AB + B'C     | M(M(A,B,0), M(B',C,0), 1) |

`f_abc_nabc` is also the standard example of the extended procedure. Its
map splits into one map for ABC and one for A'B'C', and the two results are
ORed with `M(., ., 1)`. The source reuses terms shared between outputs.

`jmap_examples` holds two worked results:

* `f_map3 = M(M(a',b,c), M(a',b,c'), M(0,b,c'))`, built gate for gate. It
  evaluates to a'b + abc' (ones at minterms 2, 3 and 6 of {a,b,c}).
* `f_map4 = ABCD + A'B'C'`, a four-variable extended-map result:
  `M( M(C', M(A',B',0), 0), M(M(A,B,0), M(C,D,0), 0), 1 )`.

## Top level (`maj_top`)

`maj_top` places all of these circuits side by side. They share no signals.

* The adder has ports `rca_*`.
* The single full adder has ports `fa_*`.
* `t1_in = {A,B,C}` drives the six functions. `t1_f` returns them, most
  significant bit first, in the order of the table above.
* `jm_in = {a,b,c,d}` drives the two worked results. They come out on
  `jm_f3` and `jm_f4`.

Its parameter `N` sets the adder width (default 8).

## Where this departs from the method's own material, and how far to trust it

* The adder width (8) is a choice. So are the bit order, and writing every
  input complement as an explicit inverter.
* Of the reference set of thirteen comparison functions, only the six above
  are given here.
* For AB + A'B'C and AB + B'C, the minimised forms quoted with the method
  are not consistent with those functions. This design uses the plain
  OR-of-AND majority form for them, which is correct but no smaller.
* The three-variable worked result `f_map3` is reproduced exactly as stated.
  Be aware that it computes a'b + abc'. It does not compute the function it
  was derived for (stated as a'b'c + a'bc' + abc + abc', with a map showing
  a'b'c + a'bc' + abc). Use it as a majority network, not as a
  reference for that function.
* The stated four-variable result is read with its inner terms as 2-input
  ANDs (`M(A',B',0)`, `M(A,B,0)`, `M(C,D,0)`). This matches the map for
  ABCD + A'B'C'.
* The QCA cell, the wire layout, the four-phase QCA clocking and the area
  figures are physical matters that RTL cannot express. None of them is
  modelled.

Every module is tested exhaustively against references computed
independently, from integer addition or from sum-of-products forms. This
includes the 8-bit adder (all 2^17 input combinations). Each test was also
run against a deliberately broken copy of its module, and it caught the
fault.

## Simulating

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M` and stops.
A timed watchdog also stops it if it hangs. For example:

```
verilator --binary --timing --assert -Irtl rtl/*.sv tb/tb_maj_top.sv \
          --top-module tb_maj_top -Mdir obj_top
./obj_top/Vtb_maj_top
```

| testbench | covers |
|-----------|--------|
| `tb_maj3`, `tb_fa_maj`, `tb_fa_cell_inv` | all input combinations |
| `tb_rca_inv` | all 2^17 combinations at N = 8, and counts full-length carry ripples |
| `tb_table1_functions`, `tb_jmap_examples` | every function over its whole truth table |
| `tb_maj_top` | the whole top at its default parameters; it also counts that carry-in, full-length ripple and carry-out each occurred, and that every single-output function took both values |

To change the adder width, set `N` on `maj_top` or `rca_inv`. `tb_rca_inv`
and `tb_maj_top` loop over `2^(2N+1)` vectors, so for large N replace the
loop with `$urandom` operands.
