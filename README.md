# 4-bit carry skip adder from reversible gates

This is a 4-bit carry skip adder block built only from reversible logic gates.
A reversible gate has as many outputs as inputs, and no two input patterns
give the same output pattern. Two kinds of gate are used:

* **TSG**: a 4-input, 4-output gate. One TSG gate makes a full adder.
* **Fredkin**: a 3-input, 3-output controlled swap. Here it serves as a
  two-input AND gate and as a 2:1 multiplexer.

The block takes two 4-bit operands and a carry in, and returns the 4-bit sum
and a carry out. It uses 2N = 8 gates for N = 4 bits:

* 4 TSG full adders, which form a ripple carry adder;
* 3 Fredkin gates that AND the four bit propagate signals into the block
  propagate `P`;
* 1 Fredkin gate that skips the carry: it sends `cin` to `cout` when `P = 1`,
  and the ripple carry `c4` when `P = 0`.

The RTL describes logic function only. It is combinational, with no clock and
no reset. In this form it synthesises to ordinary gates; reversibility is a
property of the gate equations, which the testbenches check.

## The two gates

### TSG gate (`rtl/tsg_gate.sv`)

| output | equation |
|---|---|
| `p` | `a` |
| `q` | `a'c' ^ b'` |
| `r` | `q ^ d` |
| `s` | `(q & d) ^ (a & b ^ c)` |

The 16 input patterns map one-to-one onto the 16 output patterns. With
`c = 0`, `q = a' ^ b'`, which equals `a ^ b`. That makes
`r = a ^ b ^ d`, the sum, and `s = (a ^ b)d ^ ab`, the carry. This is why
one TSG gate with `c = 0` is a full adder whose third useful output, `q`, is
the bit propagate. Output `p` is a garbage output, a copy of `a`.

### Fredkin gate (`rtl/fredkin_gate.sv`)

`p = a`, `q = a'b + ac`, `r = ab + a'c`. Input `a` is the control. It passes
through unchanged, and when it is 1 the other two inputs are swapped. Two
special cases are used:

* with `c = 0`, `r = a & b` (an AND gate);
* `q = a ? c : b` (a multiplexer with select `a`).

## How the block is wired (`rtl/rev_carry_skip_adder.sv`)

```
 x[i], y[i], 0, c[i] --> TSG --> r: s[i]   s: c[i+1]   q: prop[i]   (i = 0..3, c[0] = cin)

 prop[0], prop[1] --> FG(c=0) --r--> prop[0]&prop[1]
      ... prop[2] --> FG(c=0) --r--> ...&prop[2]
      ... prop[3] --> FG(c=0) --r--> P

 a = P, b = c[4], c = cin --> FG --q--> cout = P ? cin : c[4]
```

Helper modules: `tsg_full_adder` (one TSG with `c = 0`) and
`fredkin_and_chain` (N-1 Fredkin gates computing the N-input AND).

### Why the skip is correct, and what it buys

The bit propagate is `x[i] ^ y[i]`. When all four bits propagate, every adder
passes its carry in to its carry out, so `c4` equals `cin` anyway. The skip
gate just takes `cin` directly and does not wait for it to ripple through four
adders. When some bit does not propagate, `c4` no longer depends on `cin`,
and the skip gate passes `c4`. In both cases `{cout, s} = x + y + cin`.

The skip does not change the result, only the worst-case delay of a chain of
blocks. A carry that enters a block whose bits all propagate leaves through
a single Fredkin gate instead of four adders. This is a timing property. A
zero-delay RTL simulation cannot show it. The testbenches check the function
and count how often each carry path was taken.

Note that the propagate must be the XOR, not the OR or AND, of the operand
bits. With an OR-style propagate, `x = y = 1111`, `cin = 0` would set
`P = 1` and skip a 0 carry, where the true carry out is 1. The TSG gate gives
the XOR for free.

## Interface

`rev_carry_skip_adder #(parameter int unsigned N = 4)`

| port | dir | width | meaning |
|---|---|---|---|
| `x` | in | N | operand X |
| `y` | in | N | operand Y |
| `cin` | in | 1 | block carry in |
| `s` | out | N | sum |
| `cout` | out | 1 | block carry out |
| `p` | out | 1 | block propagate, 1 when `x ^ y` is all ones |

`N` may be changed; the block then uses N TSG and N Fredkin gates. To build
a wider adder, chain blocks by connecting each `cout` to the next block's
`cin`. `tb/csa_cascade_tb.sv` does this for 16 bits.

## Choices made in this RTL

These points are not fixed by the published description of the block. They
were settled as follows:

* **Output roles of the TSG gate.** `r` is the sum, `s` the carry and `q` the
  propagate. This is the only assignment for which the TSG equations give a
  full adder with `c = 0`.
* **Pins of the skip gate.** `P` drives the control. `c4` and `cin` drive the
  other two inputs, and `q` is `cout`. This gives the intended behaviour:
  `cin` when `P = 1`, `c4` otherwise.
* **Order of the AND chain.** `prop[0]` and `prop[1]` enter the first gate;
  `prop[2]` and `prop[3]` join in turn.
* **Extra output.** The block propagate `p` is an output port, so that a
  chain of blocks and the testbenches can observe it.
* **What is not covered.**
  * The transistor-level realisation of the gates (MOSFETs, 180 nm, 1.8 V
    supply) is not modelled, nor are its delay and power.
  * The block is said to support four arithmetic and four logical operations,
    but those operations are never defined. Only addition is provided.

## Testbenches

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb/tsg_gate_tb.sv` | all 16 rows of the TSG truth table, written out as constants; reversibility |
| `tb/fredkin_gate_tb.sv` | all 8 inputs against a behavioural controlled swap; reversibility; the AND and multiplexer uses |
| `tb/tsg_full_adder_tb.sv` | all 8 inputs against integer addition; propagate = `x ^ y` |
| `tb/fredkin_and_chain_tb.sv` | all inputs at N = 4, 1 and 7 against the reduction AND |
| `tb/rev_carry_skip_adder_tb.sv` | all 512 inputs of the 4-bit block against `x + y + cin`; `p`; `cout == cin` when skipping; both carry paths taken |
| `tb/csa_cascade_tb.sv` | four blocks chained into a 16-bit adder, with 20 000 random and 205 directed additions; every block skips and ripples |

Run one with plain Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
  --top-module rev_carry_skip_adder_tb tb/rev_carry_skip_adder_tb.sv
./obj_dir/Vrev_carry_skip_adder_tb
```

For lint only: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/rev_carry_skip_adder.sv`.
The remaining warnings (`PINCONNECTEMPTY`) come from garbage outputs of
reversible gates that are left unconnected on purpose.
