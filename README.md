# Reversible-logic Vedic multiplier (Urdhva Tiryakbhyam), 128 x 128 bits

This is a combinational N x N-bit unsigned multiplier (N = 128 by default)
built in the style of reversible logic. Every arithmetic cell is a
reversible gate: a Peres gate, an HNG gate or a CNOT (Feynman) gate. Each
gate has as many outputs as inputs, and its input pattern can always be
recovered from its output pattern. The multiplication follows the Vedic
*Urdhva Tiryakbhyam* ("vertically and crosswise") method:

- A 2 x 2-bit core forms its partial products and adds them in one pass.
- Wider multipliers are built recursively: four half-width multipliers and
  three full-width adders.
- The adders are carry bypass (carry skip) adders made of HNG full-adder gates.

The product is exact. Although the design is named an "approximate
multiplier", nothing in it approximates: every bit of the 2N-bit product is
computed.

## The three reversible gates

| gate | inputs | outputs | quantum cost | used for |
|------|--------|---------|--------------|----------|
| Peres (`peres_gate`) | a, b, c | p = a, q = a^b, r = ab^c | 4 | partial products (c = 0 gives r = ab) and the crosswise sum in the 2x2 core |
| HNG (`hng_gate`) | a, b, c, d | p = a, q = b, r = a^b^c, s = (a^b)c ^ ab ^ d | 6 | full adder: d = 0 gives r = sum and s = carry |
| CNOT (`cnot_gate`) | x, y | p = x, q = x^y | 1 | XOR without losing an operand |

Outputs that the circuit does not need are *garbage outputs*. They exist
only to keep each gate reversible. In the RTL they are wired to local
signals that nothing reads, so `verilator -Wall` reports them as unused. This
is expected.

## The 2 x 2 core (`rev_vedic_2x2`)

For a = a1a0 and b = b1b0 the method takes three steps:

```
s0 = a0b0                          vertical, right
s1 = a0b1 ^ a1b0, c1 = a0b1 & a1b0 crosswise
s2 = a1b1 ^ c1,   s3 = a1b1 & c1   vertical, left, plus carry
```

Five Peres gates and one CNOT implement these steps:

- Peres gates 1 to 4 have c = 0. Each of their r outputs is one partial
  product: a0b0, a0b1, a1b0 and a1b1.
- Peres gate 5 takes (a0b1, a1b0, a1b1). Its q output is a0b1 ^ a1b0 = s1.
  Its r output is (a0b1 & a1b0) ^ a1b1 = c1 ^ a1b1 = s2.
- c1 = 1 only when all four input bits are 1, and a1b1 is then 1 as well.
  So s3 = a1b1 & c1 equals a1b1 ^ s2, which the CNOT forms.

Cost:

- 6 gates.
- Quantum cost 21.
- 4 constant inputs.
- 10 garbage outputs.

The gate count, quantum cost and number of constant inputs match the
published 2x2 reversible Vedic multiplier. That design quotes 9 garbage
outputs, one fewer than here. The exact wiring of its gates was not
available, so the wiring above is this design's own. Fan-out, such as a0
feeding two gates, uses plain wires.

## Building wide multipliers: four products, three adders (`rev_vedic_mult`)

This is the part that takes the most care. For an N-bit multiplier with
H = N/2, split the operands into halves, a = {ah, al} and b = {bh, bl}. Four
H-bit multipliers (the same module, instantiated recursively) produce:

```
q0 = al*bl    q1 = ah*bl    q2 = al*bh    q3 = ah*bh      (each 2H = N bits)
```

The product is q0 + (q1 + q2)·2^H + q3·2^N. It is assembled with three N-bit
carry bypass adders:

```
adder 1:  {c1, t1} = q1 + q2
adder 2:  {c2, t2} = t1 + {H'b0, q0[N-1:H]}
adder 3:  {c3, t3} = q3 + {(H-1)'b0, c1^c2, t2[N-1:H]}

s = { t3 , t2[H-1:0] , q0[H-1:0] }
      N     H           H            bits
```

How adder 2 and adder 3 line up:

- q0's low half goes straight to the output.
- q0's high half has the same weight as t1 (2^H), so adder 2 adds it to t1.
- t2's low half becomes the middle of the product.
- t2's high half and the two carries (weight 2^(N+H)) are added to q3 by
  adder 3.

The carries c1 and c2 need only one bit. q1 + q2 + q0[N-1:H] < 2^(N+1), so
c1 and c2 are never both 1. A CNOT gate merges them: c1 ^ c2 = c1 | c2.
The third adder's carry out is brought out as `c3`. The full product always
fits in 2N bits, so `c3` is 0 for every input. It is kept because the
original multiplier's interface has it.

The recursion ends at N = 2 with the 2x2 core. There `c3` is tied to 0,
because no adder is involved. N must therefore be a power of two, at least 2.
The 128-bit multiplier holds:

- 4096 2x2 cores;
- 3 adders at each of the 1 + 4 + 16 + ... + 1024 inner nodes.

Four half-size multipliers and three adders per level follow the original
design. So does its use of carry bypass adders at every level. The alignment
above and the CNOT carry merge are this design's reading of that structure.

## Carry bypass adder (`hng_carry_bypass_adder`, `hng_ripple_adder`)

`hng_ripple_adder` is a chain of HNG gates with d = 0. Gate i adds x[i],
y[i] and the carry from gate i-1.

`hng_carry_bypass_adder` cuts its WIDTH bits into blocks of BLOCK bits
(default 4). Each block is an `hng_ripple_adder`. A CNOT per bit forms the
propagate bit p[i] = x[i] ^ y[i]. If every bit of a block propagates, the
block's carry out equals its carry in. A multiplexer then passes the carry
in straight on, instead of waiting for it to ripple through the block. If
any propagate bit is 0, the block makes its own carry out, which does not
depend on the carry in. The longest carry path therefore crosses:

- the first block;
- the chain of skip multiplexers;
- the last block.

It does not cross all WIDTH gates. The `bypass` output shows which blocks
skip; the multiplier leaves it unconnected. The 4-bit block size is a
choice of this design. A last block narrower than BLOCK is allowed.

## Parameters and interface

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `rev_vedic_mult` (top) | `N` | 128 | operand width, a power of two ≥ 2 |
| | `BYPASS_BLOCK` | 4 | block size of the carry bypass adders |
| `hng_carry_bypass_adder` | `WIDTH` | 16 | adder width (the multiplier sets it to N) |
| | `BLOCK` | 4 | bypass block size |
| `hng_ripple_adder` | `WIDTH` | 16 | number of HNG gates in the chain |

Top ports:

- `a[N-1:0]` and `b[N-1:0]`: the inputs.
- `s[2N-1:0] = a*b`: the product.
- `c3`: the final carry, always 0.

Everything is combinational. There is no clock, reset or handshake, and a
product is valid one propagation delay after the operands change. Register
the inputs and outputs outside the multiplier if it must sit in a clocked
pipeline.

The original design also reports 4, 8, 16, 32 and 64-bit multipliers. Each
is `rev_vedic_mult` with that `N`. Smaller operands can also be zero-extended
into the 128-bit default.

## What is not here

- The baselines the design was compared with are not built: a conventional
  Urdhva multiplier, and the reversible multiplier that uses plain
  ripple-carry adders instead of carry bypass adders. The ripple variant
  would be `rev_vedic_mult` with its adders swapped for `hng_ripple_adder`.
- Delay and power figures for the reversible multiplier exist only for a
  particular synthesis flow, and none are reproduced here. The worst
  path of this RTL is combinational and grows with N.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_peres_gate`, `tb_hng_gate`, `tb_cnot_gate` | all input patterns against the gate equations; outputs are a one-to-one mapping |
| `tb_rev_vedic_2x2` | all 16 operand pairs |
| `tb_hng_ripple_adder` | corners (full-length carry ripple) and 2000 random sums |
| `tb_hng_carry_bypass_adder` | 16-bit and 18-bit (partial last block) adders; sums and bypass flags against a reference; counts bypassed blocks and bypassed carries of 1 |
| `tb_rev_vedic_mult_widths` | N = 4 (exhaustive), 8, 16, 32, 64: all-ones (e.g. ffffffff² = fffffffe00000001), walking ones, 3000 random pairs; c3 = 0 |
| `tb_rev_vedic_mult_top` | end-to-end at N = 32; counts top-level adder 1 and adder 2 carries, bypassed blocks in each adder and rippling blocks, and fails if any never occurs |
| `tb_rev_vedic_mult_full` | the same test at the default 128 bits, with no parameter override |

The adder-2 carry is rare with random operands. It is forced with
al = bl = all ones and ah + bh = 2^H + 1, which makes q1 + q2 = 2^N - 1
exactly.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -Irtl --top-module tb_rev_vedic_mult_top \
          tb/tb_rev_vedic_mult_top.sv -o sim
./obj_dir/sim
```

The 128-bit design flattens to about 130,000 gates. Verilator builds
`tb_rev_vedic_mult_full` in 7 to 11 minutes (with two or one C++ compile
jobs), almost all of it C++ compilation. The simulation itself takes under a second. At N = 64
(`tb_rev_vedic_mult_widths`) the build takes about a minute and a half.

### Lint notes

- `verilator --lint-only -Wall` reports two kinds of warning that are expected:
  - unused garbage outputs of the reversible gates;
  - unused carry outputs `c3` of the inner multipliers, which are always 0.
- Linting `rev_vedic_mult` on its own, as the top of the lint run, makes
  Verilator also report q0 to q3 as undriven and a, b as unused. It does not
  expand the module's recursive instances of itself in that case. Under
  any parent module, in simulation as well as lint, the recursion is
  elaborated and these warnings disappear. `tb_rev_vedic_mult_full` uses
  the module at its default width and gets correct products.
