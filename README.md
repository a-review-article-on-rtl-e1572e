# Totally self-checking dual-rail full adder

A one-bit full adder that reports its own faults while it runs. Every signal,
inputs included, is carried on two wires: a true rail and a complement rail.
In a healthy circuit the two rails of a pair always differ (`01` or `10`). A
fault shows up as a pair whose rails agree (`00` or `11`). A two-rail checker
watches the adder's outputs and turns "some pair has equal rails" into an
error indication. That indication is itself a two-rail pair, so a checker that
is stuck can be detected too.

The design follows the article *A Review Article on Fin-FET Based
Self-Checking Full Adders* (Int. J. of Control Theory and Applications, 2016).
It describes two adders:

* the **differential full adder**: dual-rail in, dual-rail out;
* the **self-checking full adder**: the differential adder plus a two-rail
  checker.

The article builds them from transistors in a 20 nm Fin-FET process. This
repository gives their logic, gate by gate, in synthesizable SystemVerilog.
The transistor level is not modelled. That covers the 0.4 V supply, the power
and delay figures and the transistor counts.

## Two-rail code and what "self-checking" means here

A pair `(x, x_n)` is a *code word* when `x_n == !x`. It is a *non-code word*
when `x_n == x`. The adder maps code inputs to code outputs. The circuit is
built so that a single stuck-at fault can never turn a correct code output
into a wrong code output. At worst the fault makes one output pair non-code.
Two properties make it *totally self-checking*:

* **Fault secure.** For any valid input and any single fault, the outputs are
  either correct or non-code. A wrong answer never goes unflagged.
* **Self-testing.** Every single fault makes some valid input produce a
  non-code output. Normal operation therefore exposes the fault sooner or
  later, with no separate test mode.

The top-level error indication reads:

| `err` | `err_n` | meaning |
|-------|---------|---------|
| 0 | 1 | no error |
| 1 | 0 | no error |
| 0 | 0 | error detected |
| 1 | 1 | error detected |

Both "no error" codes occur in normal operation. Which one appears depends on
the data: for valid data, `err = !(sum ^ cout)`. Do not treat either code as
the only "good" value. Test `err != err_n`.

## Structure

```
sc_full_adder (top)
├── diff_full_adder          functional block
│   ├── diff_carry           duplicated carry gate, plus the generate pair
│   │   ├── carry_gate       copy on the true rails   -> cout
│   │   └── carry_gate       copy on the complement rails -> cout_n
│   ├── diff_sum             two differential XORs in series
│   │   ├── diff_xor         XOR1: a, b   -> propagate (p, p_n)
│   │   └── diff_xor         XOR2: p, cin -> (s, s_n)
│   └── restoring inverters  sum = ~s_n, sum_n = ~s
└── two_rail_checker         checks (sum, sum_n) and (cout, cout_n)
    └── two_rail_cell        -> (err, err_n)
```

All of it is combinational. There is no clock and no reset. The outputs
settle one gate path after the inputs change.

### The differential XOR (`diff_xor`)

Each output rail selects one of two rails of the second operand, steered by
the two rails of the first:

```
z   = x & y_n | x_n & y      (XOR)
z_n = x & y   | x_n & y_n    (XNOR)
```

In pass-transistor form that is four switches, the "four-transistor
differential XOR" the adder is built around. Every term uses one rail of each
operand. So if either operand is non-code, both output rails are equal
(`00` or `11`). The testbench checks all 16 rail patterns for this. This is
why a fault on any input reaches the sum output as a non-code pair.

### The duplicated carry gate (`diff_carry`)

The carry is the majority of `a`, `b` and `cin`. Majority is *self-dual*:
complementing every input complements the output. So the complement carry
needs no inverter. A second, identical carry gate is fed the complement rails:

```
cout   = maj(a,   b,   cin)      true copy
cout_n = maj(a_n, b_n, cin_n)    complement copy
```

The two copies share no wire. A single fault inside either copy can disturb
only its own rail. The carry pair then becomes non-code instead of flipping to
the wrong code. This is what makes the carry path fault secure. Each copy is
written as generate-or-propagate, `a&b | cin&(a|b)`.

The gate also brings out a dual-rail generate pair, `g = a & b` and
`g_n = a_n | b_n`. A carry look-ahead built from these cells would use it. The
checker does not watch this pair.

### The sum path and the restoring inverters (`diff_sum`, `diff_full_adder`)

XOR1 forms the propagate pair `p = a ^ b`. XOR2 combines it with the
dual-rail carry-in to form `s = a ^ b ^ cin`. In a pass-transistor circuit the
sum rails come out with a degraded level, so the full adder restores each rail
with an inverter. In logic terms the inverters are cross-connected
(`sum = ~s_n`, `sum_n = ~s`), which keeps the function unchanged.

XOR1 sees the primary inputs, so every code input exercises it fully: it is
self-testing. XOR2 sees the carry pair. In a multi-bit adder that pair comes
from the previous stage's `cout`/`cout_n`, which connects directly to the
next stage's `cin`/`cin_n`.

### The two-rail checker (`two_rail_checker`, `two_rail_cell`)

The basic cell folds two pairs into one:

```
e   = x0 & x1   | x0_n & x1_n
e_n = x0 & x1_n | x0_n & x1
```

If both input pairs are code words, `e != e_n`. If either pair is non-code,
`e == e_n`. `two_rail_checker` takes `N_PAIRS` pairs and chains `N_PAIRS - 1`
cells. Each cell combines the running result with the next pair. The top uses
`N_PAIRS = 2`, which checks the sum pair and the carry pair. With one pair,
the checker passes that pair straight out as the indication.

## Top-level ports (`sc_full_adder`)

| port | dir | meaning |
|------|-----|---------|
| `a`, `a_n` | in | operand a, two-rail |
| `b`, `b_n` | in | operand b, two-rail |
| `cin`, `cin_n` | in | carry in, two-rail |
| `sum`, `sum_n` | out | sum, two-rail |
| `cout`, `cout_n` | out | carry out, two-rail |
| `g`, `g_n` | out | generate `a & b`, two-rail (not checked) |
| `err`, `err_n` | out | error indication: `err == err_n` means a fault |

All ports are 1 bit wide. `two_rail_checker` has one parameter,
`N_PAIRS` (`int unsigned`, default 2). No other module has parameters.

## What follows the article and what is this design's own choice

The article fixes these:

* the two-rail code throughout;
* the sum built from two differential XORs in series (XOR1 on `a`, `b`;
  XOR2 on the propagate pair and the carry pair);
* the carry gate duplicated to give the carry pair;
* a dual-rail generate pair (`g`, `g_n`);
* inverters restoring the sum rails;
* a two-rail checker with a dual-rail error indication.

Its schematics are not reproduced here. These details are therefore this
design's own choices:

* the exact gate equations of the XOR and of the carry gate;
* how `g_n` is formed;
* where the restoring inverters sit;
* that the checker is a chain of standard two-rail cells;
* that it watches exactly the sum and carry pairs.

Other points to know before you rely on it:

* The article shows a simulation of the self-checking adder "with fault a=a".
  Here that is read as the complement input `a_n` shorted to `a`, so both
  rails of `a` carry the same value. The testbench applies this and sees it
  flagged.
* The article gives two transistor counts for the differential adder, 28
  and 20. Neither affects the logic.
* The article reports power, delay and power-delay product at 0.4 V. These
  are properties of the transistor circuit and cannot be reproduced from RTL.
* Synthesis maps these equations onto a standard-cell library. It does not
  keep the pass-transistor structure. It also does not guarantee that the two
  carry copies stay separate. The self-checking properties hold for the gate
  network as written. After synthesis, keep the two copies apart
  (no sharing or resynthesis across them) if those properties matter.

## Verification

Each module has an exhaustive, self-checking testbench in `tb/`. Each one
prints `TB_RESULT checks=N failures=M`. The expected values come from integer
arithmetic and from rail comparisons, not from the design's equations.

| testbench | what it checks |
|-----------|----------------|
| `tb_diff_xor` | all 16 rail patterns: XOR/XNOR for code inputs; non-code inputs give a non-code output |
| `tb_diff_carry` | all 64 patterns: each copy depends only on its own rails; carry and generate pairs are correct and complementary for code inputs |
| `tb_diff_sum` | all 64 patterns: correct sum for code inputs; any non-code input gives a non-code sum |
| `tb_diff_full_adder` | all 64 patterns: `{cout,sum} = a+b+cin` and complementary pairs for code inputs; non-code inputs reach the sum as non-code |
| `tb_two_rail_checker` | N = 1, 2, 3, 5 over every rail pattern: indication is a code exactly when all pairs are; both indication codes occur |
| `tb_sc_full_adder` | the top, end to end at its defaults: 8 fault-free additions, all 56 non-code inputs flagged, including the `a_n = a` short; counts each |
| `tb_sc_fault_campaign` | the top under 20 single stuck-at faults (both values on `p`, `p_n`, `s`, `s_n`, `sum`, `sum_n`, `cout`, `cout_n`, `err`, `err_n`); checks fault security for every valid input and that every fault is detected |

The fault campaign uses `force`/`release` on hierarchical names
(`dut.u_adder.u_sum.p` and others). It breaks if those instances are
renamed.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_sc_full_adder tb/tb_sc_full_adder.sv
./obj_dir/Vtb_sc_full_adder
```

Replace the name to run any other testbench. Each one finishes in well under
a second of simulated time (nanoseconds) and prints its `TB_RESULT` line. To
lint a module on its own:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/sc_full_adder.sv
```
