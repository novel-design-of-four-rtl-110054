# Four-bit reversible magnitude comparator

This design compares two 4-bit unsigned numbers A and B and raises exactly one
of three flags: F1 (A < B), F2 (A = B) or F3 (A > B). It is built only from
**reversible gates**. Each of these gates has as many outputs as inputs, and
its input pattern can always be recovered from its output pattern. No
information is destroyed, which is why reversible logic matters for ultra-low-power,
nano-electronic and quantum circuits. Two rules follow for the netlist:

* **No fan-out.** A signal that is needed twice must be copied by a gate.
* **Spare inputs and outputs are tied.** Inputs a function does not need are
  tied to constants. Outputs it does not need are left as *garbage*.

The quality of such a circuit is judged by how many reversible gates it uses,
how many constant inputs it needs and how many garbage outputs it leaves. This
comparator uses **10 reversible gates** (4 STAG, 4 STG, 2 Feynman), plus
6 NOT gates, which are not counted. It has **11 constant-0 inputs** and
**16 garbage outputs**.

The RTL is combinational SystemVerilog. There is no clock, no reset and no
state. Each gate is its own module, so the netlist keeps the gate-level
structure of the reversible circuit. Synthesis maps it to ordinary
AND/XOR/NOT logic, about 31 cells.

## The four gates

| Gate | Module | Inputs → outputs | Used here as |
|---|---|---|---|
| STG | `stg_gate` | P = A⊕B, Q = B, R = AB⊕C | AND gate: C = 0 gives R = A·B |
| STAG | `stag_gate` | P = A⊕B⊕C, Q = B, R = A⊕B, S = (A⊕B)C ⊕ AB ⊕ D | full adder: D = 0 gives sum P and carry S |
| Feynman | `feynman_gate` | P = A, Q = A⊕B | copier: B = 0 gives P = Q = A |
| NOT | `rev_not_gate` | P = ¬A | inverter |

Each gate is a bijection on its inputs. You can see this by solving for the
inputs:

* STG: B = Q, then A = P⊕Q, then C = R⊕AB.
* STAG: B = Q, then A = R⊕Q, then C = P⊕R, then D = S ⊕ maj(A,B,C).

The testbenches check these truth tables row by row, with the expected rows
written out as constants. They also check that each mapping is one-to-one.

## How the comparison is computed

The circuit does not evaluate the textbook sum-of-products comparator
equations directly. It uses subtraction:

```
sum   = A + ~B + 0   (4 bits, mod 16)  = A - B - 1  (mod 16)
carry = carry-out of that addition     = 1  exactly when A > B
```

* **Greater (F3).** A + (15 − B) ≥ 16 holds exactly when A > B. The carry-out
  of the last adder stage is therefore the greater-than flag.
* **Equal (F2).** A + (15 − B) = 15 holds exactly when A = B. Then every sum
  bit is 1. In that case no carry is generated anywhere, and sum bit i is
  Ai XNOR Bi, the usual equality term Eᵢ. The sum cannot reach 31, so
  "all sum bits are 1" means exactly A = B. Three STG AND gates reduce the
  four sum bits to one equality bit.
* **Less (F1).** This is "not equal and not greater". Two NOT gates and one STG
  AND gate produce it.

The flags must drive an output and also feed the less-than gate. Fan-out is
not allowed, so two Feynman gates copy them first.

```
          A0  ~B0  0   A1  ~B1     A2  ~B2     A3  ~B3
           |   |   |    |   |       |   |       |   |
          [U1 STAG]--S->[U2 STAG]--S->[U3 STAG]--S->[U4 STAG]--S (A>B)--> U10
              |P            |P           |P            |P
              +--[U5 STG]---+            +--[U6 STG]---+
                    |R (sum0·sum1)             |R (sum2·sum3)
                    +---------[U7 STG]---------+
                                  |R  (A=B)
                              [U9 Feynman, B=0] --P--> F2
                                  |Q
                                 NOT        [U10 Feynman, B=0] --Q--> F3
                                  |              |P
                                  |             NOT
                                  +--[U8 STG]----+
                                        |R  = ¬(A=B)·¬(A>B)
                                        +--> F1
```

Every gate's fourth (STAG D) or third (STG C) input is tied to 0. So is the
carry-in of U1 and the B input of both Feynman gates. That makes 11 constants.
The unused outputs are brought out on `garbage[15:0]`:

| bits | source |
|---|---|
| G0, G1 / G2, G3 / G4, G5 / G6, G7 | Q, R of U1 / U2 / U3 / U4 (= ~Bᵢ and Aᵢ⊕~Bᵢ) |
| G8, G9 | P, Q of U5 |
| G10, G11 | P, Q of U6 |
| G12, G13 | P, Q of U7 |
| G14, G15 | P, Q of U8 |

With the constants fixed, the 19 outputs (3 flags + 16 garbage bits) are
different for each of the 256 input pairs. The inputs can therefore be
reconstructed from the outputs, and the testbench checks this.

## Where this differs from the published architecture

The gate inventory, the constants, the garbage outputs and the topology follow
the published architecture:

* a ripple chain of four STAG adders on A and ~B;
* a tree of three STG AND gates on the sum bits;
* two Feynman copiers;
* a final STG AND gate on the two inverted flags.

The published drawing differs in one place. It also puts a NOT gate on each
of the four sum bits before the AND tree, which makes ten NOT gates in all. It
takes F1 (A < B) from the tree and F2 (A = B) from the final gate. That network
does not compare:

* The NOR of the sum bits of A + ~B is 1 when A − B ≡ 1 (mod 16). It is not 1
  when A < B.
* As drawn, the circuit reports A=0, B=1 as equal.
* For A=1, B=0 it raises F1 and F3 together.
* Over all 256 pairs it raises "less" for 16 pairs and "equal" for 135.
* It still gives the right answer for the three reference cases:
  0000 vs 1111 → 100, 1111 vs 1111 → 010, 1111 vs 0000 → 001.

This design removes those four inverters. The AND tree then produces A = B,
and the final gate produces A < B, so F1 and F2 swap sources. The outputs now
match the comparator's defining equations for every input. Examples are
F(A=B) = E3E2E1E0 with Eᵢ = AᵢBᵢ + ¬Aᵢ¬Bᵢ, and
F(A>B) = G3 + E3G2 + E3E2G1 + E3E2E1G0 with Gᵢ = Aᵢ¬Bᵢ.
The reversible-gate count (10), the constant inputs (11) and the garbage
outputs (16) are unchanged. Only the NOT count falls from 10 to 6. The
as-drawn wiring is kept outside the RTL as a negative test: the end-to-end
testbench fails 525 of its 1545 checks on it.

Also note the following:

* **Output naming.** F1 = less, F2 = equal and F3 = greater. The published
  waveform shows F1 and F3 the other way round. The stated equations and test
  cases use the naming above, and this design follows them.
* **Operand wiring.** Aᵢ drives the STAG A input, and Bᵢ drives the STAG B
  input through an inverter. This is the reading under which the carry is
  "A > B".
* **STAG D input.** The gate symbol shows D tied to 0. The D term of S
  (S ⊕= D) comes from the gate's full truth table. It is implemented even
  though the comparator always ties D to 0.
* **Timing.** No delay figures are available. The critical path runs through
  the carry chain: U1→U4, then U10, a NOT and U8, to F1.

## Files

| File | Contents |
|---|---|
| `rtl/rev_cmp_pkg.sv` | operand width (4) and garbage count (16) |
| `rtl/stg_gate.sv`, `rtl/stag_gate.sv`, `rtl/feynman_gate.sv`, `rtl/rev_not_gate.sv` | the four reversible gates |
| `rtl/rev_comparator4.sv` | the comparator (top): ports `a[3:0]`, `b[3:0]`, `f1`, `f2`, `f3`, `garbage[15:0]` |
| `tb/tb_<gate>.sv` | exhaustive truth-table, one-to-one and "as used" mode checks for each gate |
| `tb/tb_rev_comparator4.sv` | end-to-end test (described below) |

The width is fixed at 4. The tree and the copy structure are drawn for four
bits, and the module is not a generic N-bit generator. A wider version would
need a longer STAG chain and a deeper AND tree with the same pattern.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rev_cmp_pkg.sv tb/tb_rev_comparator4.sv --top-module tb_rev_comparator4 -o sim
./obj_dir/sim
```

`tb_rev_comparator4` does the following:

* applies the three reference cases;
* sweeps all 256 operand pairs;
* checks each flag against integer comparison, and checks that exactly one
  flag is high;
* checks all 16 garbage bits against values derived from the arithmetic of
  A + ~B;
* checks that the 19-bit output pattern is unique for each input pair;
* counts how often each mechanism occurs: less (120), equal (16), greater
  (120), and a carry that ripples from bit 0 through all four stages (8). A
  mechanism that never occurs counts as a failure.

It runs at the design's only size, in well under a second.
