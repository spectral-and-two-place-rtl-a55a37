# Reversible gate cascades from spectral synthesis

A reversible circuit maps every input pattern to a distinct output pattern, so
no information is lost on the way through. Such circuits are built from
reversible gates: each gate has as many outputs as inputs, gate outputs never
fan out, and there is no feedback. Under those rules a circuit is just an
ordered list of gates acting on a fixed set of wires ("lines"). The inverse
circuit comes for free: every gate used here is its own inverse, so running
the same list backwards undoes it.

This repository holds SystemVerilog for a set of such circuits. They were
obtained with a synthesis method that works on the Rademacher-Walsh spectra
of the output functions. Starting from the outputs, it greedily picks one
Feynman or Toffoli gate at a time that makes some output's spectrum look most
like a single variable. Where a Feynman-Toffoli-Feynman pattern appears, it is
then rewritten as a Fredkin gate. The synthesis procedure itself is software
and is not part of this RTL. What is here is:

* the five gates;
* a generic cascade that turns a gate list into hardware;
* seven example circuits, between 3 and 12 gates each;
* a full adder mapped from a two-input-gate decomposition;
* two gate identities that trade one gate type for others.

Everything is combinational: there is no clock, no reset and no state.

## The gate set

Operands are written in the order used throughout, and the last operand (or
last two) is the one that changes:

| Gate          | Module          | Effect                                  |
|---------------|-----------------|-----------------------------------------|
| NOT(x)        | `rev_not`       | x' = ~x                                 |
| FEY(x,y)      | `rev_feynman`   | y' = x ^ y                              |
| TOF3(x,y,z)   | `rev_toffoli3`  | z' = (x & y) ^ z                        |
| TOF4(w,x,y,z) | `rev_toffoli4`  | z' = (w & x & y) ^ z                    |
| FRE(x,y,z)    | `rev_fredkin`   | if x then swap y and z                  |

The Fredkin gate is written as y' = ~x·y ^ x·z, z' = ~x·z ^ x·y, which is a
controlled swap. It is the only gate that changes two lines at once.

## Gate lists and `rev_cascade`

`rev_pkg` defines `gate_t`, a packed struct with an operation (`gate_op_e`)
and four 3-bit line indices. It also has helper functions `g_not`, `fey`,
`tof3`, `tof4` and `fre`, and line names `LA`..`LE` for lines 0..4. A circuit
is then written almost as it is printed, for example:

```systemverilog
localparam gate_t GATES [3] = '{fey(LB, LC), tof3(LA, LC, LB), fey(LB, LC)};
```

`rev_cascade #(N_LINES, N_GATES, GATES, INVERSE)` elaborates that list into a
chain of gate instances:

* Stage `k+1` equals stage `k`, except on the lines the gate acts on, which
  come from a `rev_not` / `rev_feynman` / `rev_toffoli3` / `rev_toffoli4` /
  `rev_fredkin` instance.
* `GATES[0]` is the gate nearest the inputs.
* `lines_i[0]` is line a.
* `INVERSE = 1` walks the list from the last gate to the first, which
  realizes the inverse mapping.
* A `GATE_NONE` entry passes all lines through.
* Elaboration stops with an error if a gate names a line that does not exist,
  or names the same line twice.
* With 3-bit indices a cascade has at most 8 lines. Widen `line_t` in
  `rev_pkg` for more.

`rev_spec_circuit` wraps a cascade so that it can be driven with the
specification's numbers. A specification is a permutation of 0..2^N-1. Its
numbers are read with variable a as the most significant bit. So
`in_vec[N-1]` is a, and pattern 6 of a 3-variable circuit is a=1, b=1, c=0.

Some realizations need the inputs wired to the lines in a different order.
`LINE_OF_INPUT[v]` names the line driven by input variable v. Outputs are
always read from lines a, b, c, … in order. With `INVERSE = 1`, the input
assignment moves to the output side. This is what makes the reversed circuit
the true inverse.

## The circuits

Each example module has ports `in_vec` / `out_vec`, with variable a in the top
bit, and a parameter `INVERSE` (default 0).

| Module            | Lines | Gates | Function (specification)                               |
|-------------------|-------|-------|--------------------------------------------------------|
| `rev_ex1_fredkin` | 3 | 3  | Fredkin gate, [0,1,2,3,4,6,5,7]: FEY(b,c) TOF3(a,c,b) FEY(b,c) |
| `rev_ex2_swap`    | 3 | 5  | exchange patterns 3 and 4                              |
| `rev_ex3_swap`    | 4 | 7  | exchange patterns 7 and 8, around one TOF4             |
| `rev_ex4_inc3`    | 3 | 4  | increment mod 8 (decrement with `INVERSE=1`)           |
| `rev_ex5_inc4`    | 4 | 5  | increment mod 16 (decrement with `INVERSE=1`)          |
| `rev_ex6_perm`    | 4 | 10 | [3,11,2,10,0,7,1,6,15,8,14,9,13,5,12,4]                |
| `rev_ex7_perm`    | 4 | 7  | [4,6,2,0,15,13,7,5,9,11,3,1,14,12,10,8], the inverse of ex6 |
| `rev_full_adder`  | 4 | 4  | sum and carry of a+b+c                                 |

**Pattern exchanges (ex1–ex3).** These three circuits share one shape. Some
Feynman gates change variables so that the two patterns to be exchanged
differ only in the target line and agree on all the control lines. One
Toffoli gate flips the target for exactly those two patterns. The same
Feynman gates then undo the change of variables. Ex1 is also the identity
FRE(x,y,z) = FEY(y,z) TOF3(x,z,y) FEY(y,z).

**Increments (ex4, ex5).** Bit i toggles when all lower bits are 1. The top
bit uses a Toffoli gate over all the lower bits. The lowest two bits use the
NOT / NOT / FEY tail. Going past 4 bits would need Toffoli gates with more
controls, or several smaller gates plus constant lines. Neither is built.

**Ex6 and ex7: input assignment and Fredkin substitution.** These two need
their inputs wired to permuted lines. In ex6, lines a, b, c, d are driven by
inputs a, d, b, c. In ex7, they are driven by inputs b, c, d, a.

The greedy method first produced longer lists, of 12 and 9 gates. In each, a
Feynman-Toffoli-Feynman group was then rewritten as one Fredkin gate:
FEY(a,c) TOF3(b,c,a) FEY(a,c) became FRE(b,c,a), and FEY(a,b) TOF3(b,d,a)
FEY(a,b) became FRE(d,b,a). `FREDKIN_SUBST=1` (the default) builds the
rewritten list and `0` builds the original one. Both give the same function,
and the testbenches check both.

Ex7 was synthesized from the inverse specification of ex6. At 7 gates it is
cheaper than ex6 run backwards (10 gates). This is why it pays to synthesize
a function and its inverse and keep the better result.

**Full adder.** The decomposition t = a^b, sum = t^c, carry = ab + ct maps onto
TOF3(a,b,d) FEY(a,b) TOF3(b,c,d) FEY(c,b) on four lines:

* line d enters as constant 0 and leaves as the carry;
* line b leaves as the sum;
* lines a and c are garbage outputs equal to their inputs.

The constant is tied inside `rev_full_adder`.

**Gate identities.**

* `rev_toffoli3_from_fredkin` builds TOF3(x,y,z) as FEY(z,y) FRE(x,z,y)
  FEY(z,y).
* `rev_toffoli4_from_toffoli3` builds TOF4(w,x,y,z) as TOF3(w,x,e)
  TOF3(y,e,z), using an extra line e. The identity holds only for e = 0. The
  extra line is not cleared afterwards: `e_o` = w&x is garbage.

The two-TOF3 form is not used inside ex3 or ex5. The garbage left on e would
break the reverse-order inverse unless it were fed back in.

## Top level

`rev_examples_top` places all the circuits above side by side. Each has its
own ports: `exN_in/exN_out`, `fa_*`, `t3_in/t3_out` = {x,y,z} and
`t4_in/t4_out` = {w,x,y,z,e}. The circuits are independent results, not parts
of one larger machine, so nothing connects them. A generic synthesis run
reduces the whole top to 79 one-bit cells: 40 XOR, 27 AND and 12 NOT.

## Where this departs from, or adds to, the method

* **Encoding.** The gate-list struct, the 3-bit line index, `GATE_NONE`, and
  the `INVERSE` and `FREDKIN_SUBST` parameters belong to this implementation.
  The gate lists, operand orders, line roles and input assignments are the
  published ones.
* **Bit order.** Variable a is taken as the most significant bit of a
  specification number, as in the Fredkin truth table.
* **Input assignment.** Ex6 and ex7 were verified under one reading: the
  listed inputs drive lines a, b, c, d in that order, and outputs are read
  from lines a..d unpermuted. This is the only wiring that reproduces both
  tables.
* **Not built.** Two parts are absent:
  * The synthesis procedure: spectra, the complexity measure and the greedy
    gate search. It is a program that designs these circuits, not a circuit.
  * The two-input-gate decomposition used for the adder. It is an external
    method.

  Also absent is a costlier full adder that the method produced by
  re-synthesizing its own adder. It was only a comparison point.
* **Physical properties.** The RTL models logic only. Gate-level power
  properties, which are the motivation for reversible logic, are outside what
  synthesizable SystemVerilog can express. A standard-cell flow will merge and
  optimize these gates like any other logic.

## Verification

Every module except the thin wrapper `rev_spec_circuit`, which the example
testbenches cover, has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* **Examples.** Every input pattern is applied. The outputs are compared with
  the specification tables, which are typed into the testbench separately
  from the gate lists. A second instance with `INVERSE=1` must map every
  output back to its input. For ex6/ex7, the reversed circuit must also
  reproduce the other circuit's table.
* **Gates.** Exhaustive inputs, plus a check that two gates in series give
  back the input.
* **`rev_cascade`.** Two gate lists, on 5 and 8 lines, that use every gate
  type. The cascade is compared with a behavioural interpreter of the list
  written in the testbench, and its inverse must round-trip.
* **Top.** `tb_rev_examples_top` runs the top with default parameters. It
  checks every circuit exhaustively, checks that the outputs are distinct
  (reversible), and checks that ex7 applied to ex6's output is the identity.
  It also counts how often each mechanism is exercised: Fredkin swap, TOF3
  flip, TOF4 flip, increment wrap-around, assigned-input permutation, adder
  carry, and both gate identities. A mechanism that never happens counts as a
  failure.

To run one testbench with Verilator:

```sh
verilator --binary --timing --assert -Irtl rtl/rev_pkg.sv \
  tb/tb_rev_examples_top.sv --top-module tb_rev_examples_top -Mdir obj -o sim
./obj/sim
```

`-Irtl` lets Verilator find each module in `rtl/<name>.sv`. Replace the
testbench name to run another one. Every testbench finishes in well under a
second.

## Changing or adding a circuit

To add a circuit:

1. Write its gate list with the `rev_pkg` helpers.
2. Pass it to `rev_spec_circuit`, as `rev_ex4_inc3` does, or to
   `rev_cascade` directly, as `rev_full_adder` does.
3. Set `LINE_OF_INPUT` / `USE_ASSIGN` if the inputs must reach the lines in a
   different order.

The elaboration check catches out-of-range or repeated operands. A new
circuit can reuse the example testbench pattern: a specification table plus
forward and `INVERSE=1` instances.
