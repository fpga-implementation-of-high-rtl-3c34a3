# Three-operand binary adder and a modified dual-CLCG bit generator

Many cryptographic kernels need `a + b + c` more than `a + b`. Examples are
the linear congruential generators (LCGs) behind several pseudorandom bit
generators, and Montgomery modular multiplication. The usual circuit is a
carry-save adder: a row of full adders, then a ripple-carry adder. The ripple
stage makes the delay grow linearly with the word width.

This RTL keeps the row of full adders but does not follow it with a separate
two-operand adder. It goes straight into a parallel-prefix carry network.
The adder has four stages, and the carry path grows with `log2(N)`.

The second part of the design uses this adder. It is a 32-bit *modified dual
coupled LCG* (MDCLCG) pseudorandom bit generator, with one three-operand adder
in each of its four LCGs.

Everything is synthesizable SystemVerilog-2017. It has no vendor primitives
and no memories.

## The adder: `three_operand_adder`

`{carryout, sum[N:0]} = a + b + c + cin`. The operands are N bits wide and
the result is N+2 bits. The adder is purely combinational. `N` defaults to 32.
The 16-bit version is the same module with `N = 16`.

### Stage 1: bit addition (`bit_addition_logic`)
N independent full adders. Bit `i` gives `s[i] = a^b^c` and
`cy[i] = maj(a,b,c)`, and the whole word then satisfies
`a + b + c = s + 2*cy`. No carry moves sideways in this stage.

### Stage 2: base logic (`base_logic`)
Position `i` now has two bits to add: `s[i]` and the carry from the
neighbouring full adder on its right, `cy[i-1]`. One half-adder cell per
position (drawn as a "saltire" box in the original schematic) turns them into
the prefix signals:

| position | propagate `p[i]`  | generate `g[i]`  |
|----------|-------------------|------------------|
| 0        | `s[0] ^ cin`      | `s[0] & cin`     |
| 1..N-1   | `s[i] ^ cy[i-1]`  | `s[i] & cy[i-1]` |
| N        | `cy[N-1]`         | `0`              |

The external carry-in enters at position 0, in the place of `cy[-1]`. There
are N cells. Position N holds only the top carry, so it is a wire.

### Stage 3: PG logic (`pg_logic`, `black_cell`, `grey_cell`)
This stage takes the most care to read. It computes the carry into every
position, `G_{i:0}`, for i = 0..N, from the N+1 pairs `(p, g)`. It is built
from two cells:

* **black cell**: `G_{i:j} = G_{i:k} | P_{i:k}&G_{k-1:j}` and
  `P_{i:j} = P_{i:k}&P_{k-1:j}`. It merges two adjacent groups.
* **grey cell**: the same generate, with no propagate output. It is used
  when the merged group reaches bit 0, because that propagate is never
  needed again.

The network is a sparse tree, in the Han-Carlson style:

1. **Odd positions, `LEVELS` rows.** In row `l` (distance `d = 2^l`), odd
   position `i` holds the group `i : i-d+1`. It merges with position `i-d`,
   which holds the group just below it, so `i` ends up with
   `i : i-2d+1`.
   * Row 0 merges `i` with the raw even position `i-1`.
   * If the merged group reaches bit 0, the cell is grey; otherwise it is
     black.
   * If `i-d < 0`, position `i` already reaches bit 0 and passes through
     unchanged.
2. **Even positions, one row.** Every even `i >= 2` takes
   `G_{i:0} = g[i] | p[i] & G_{i-1:0}` from the finished odd position below
   it. Position 0 is its own group.

`LEVELS = clog2(largest odd position + 1)`. For N = 16 (positions 0..16) the
cells are:

```
row 0:  1:0(grey) 3:2 5:4 7:6 9:8 11:10 13:12 15:14
row 1:  3:0(grey) 5:2 7:4 9:6 11:8 13:10 15:12
row 2:  5:0 7:0 (grey)  9:2 11:4 13:6 15:8
row 3:  9:0 11:0 13:0 15:0 (grey)
even:   2:0 4:0 ... 14:0 16:0 (grey)
```

That is `log2(N) + 1` cell delays: 5 for N = 16 and 6 for N = 32. The
module is written generically, so any N ≥ 2 works, odd N included; N = 7 is
tested.

### Stage 4: sum logic (`sum_logic`)
`sum[0] = p[0]`, `sum[i] = p[i] ^ G_{i-1:0}` for i = 1..N, and
`carryout = G_{N:0}`.

### Critical path
The longest path is one full adder, one base cell, `log2(N)+1` prefix cells
and one XOR. The full adder and base cell run in parallel across all bits.

## The generator: `mdclcg`

Four LCGs run side by side, all modulo 2^N:

```
x' = a1*x + b1   y' = a2*y + b2   p' = a3*p + b3   q' = a4*q + b4
B  = (x' > y')   C  = (p' > q')   Z = B ^ C
```

`Z` is produced on every clock and no bit is skipped. Each LCG has full
period 2^N, and so does the generator. An LCG modulo 2^N has full period when
`b` is odd and `a ≡ 1 (mod 4)`.

**Multipliers of the form `2^R + 1`.** This is what lets each LCG use one
three-operand adder. The update becomes `a*x + b = (x << R) + x + b`, so the
multiplier is just wiring (`lcg`). Discarding bits N and N+1 of the adder's
result is the reduction modulo 2^N.

**Comparators.** The two comparisons (`magnitude_comparator`) are plain
unsigned `>` on the *next* states.

**Timing.**
* `rst_n` is synchronous and active-low. It loads the four seeds and clears
  `zi_valid`.
* On each later rising edge, the LCGs step and `zi` registers the Z computed
  from the values they step to.
* `zi_valid` rises on the first edge after reset: one clock of initial delay,
  then one bit per clock.

Ports: `clk`, `rst_n`, `zi`, `zi_valid`.

### Parameters (`mdclcg`)

| parameter | default | meaning | origin |
|---|---|---|---|
| `N` | 32 | LCG width, modulus 2^N | published design |
| `R1` | 6 | `a1 = 65` | published constant |
| `R2` | 12 | `a2 = 4097` | published constant |
| `R3`, `R4` | 3, 9 | `a3 = 9`, `a4 = 513` | this design's choice |
| `B1..B4` | 1, 3, 5, 7 | increments, all odd | this design's choice |
| `X0, Y0, P0, Q0` | 1, 2, 3, 4 | seeds | this design's choice |

The published design gives the equations and two of its multipliers. It does
not give its other constants or seeds. Keep `R >= 2` and every `B` odd, or the
period drops below 2^N.

## Departures and choices

* **Position N of the base logic** is a wire (`p[N] = cy[N-1]`, `g[N] = 0`).
  This is the only assignment that gives a correct carry out. The published
  schematic draws N base cells and runs `cy[N-1]` straight to position N,
  which agrees with it.
* **`rst_n` and `zi_valid`** are additions. The published generator shows only
  `clk` and `zi`.
* **Multiplier form.** The published equations allow any multiplier. This RTL
  supports only `2^R + 1`, as the two published multipliers are.
* **Comparator.** The comparator is a behavioural `>`. Its internal structure
  was not specified.
* **Cell equations.** The full adder, base, black, grey and sum cells are
  written as Boolean equations, not gate by gate. Synthesis maps them to LUTs
  anyway.
* **Carry-in in the generator.** Each LCG drives the adder's carry-in with
  0. The carry-in is exercised in the adder's own testbench.

## Files

`rtl/` holds one module per file:

* `mdclcg` instantiates four `lcg` and two `magnitude_comparator`.
* `lcg` instantiates one `three_operand_adder`.
* `three_operand_adder` instantiates `bit_addition_logic`, `base_logic`,
  `pg_logic` and `sum_logic`.
* `pg_logic` instantiates `black_cell` and `grey_cell`.

`tb/` has one self-checking testbench per module (`<module>_tb.sv`), plus
`mdclcg_period_tb.sv`. Each testbench ends with a line
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|---|---|
| `black_cell_tb`, `grey_cell_tb` | exhaustive truth tables |
| `bit_addition_logic_tb`, `base_logic_tb`, `sum_logic_tb` | per bit and per word, random and corner values, at N = 32 |
| `pg_logic_tb` | N = 32, 16 and 7 against a bit-serial carry reference, including every single break in a full-width propagate chain |
| `three_operand_adder_tb` | N = 32 and 16 against plain integer addition: the example 1 + 2 + 4 = 7, all-ones with carry-in, full-width carry chains, 3000 random vectors |
| `lcg_tb` | 3000 steps of the 32-bit LCG against `(65*x + 1) mod 2^32`, a reset mid-run, and an 8-bit instance whose state must first return to its seed after exactly 256 clocks |
| `mdclcg_tb` | the full 32-bit generator at default parameters for 4000 clocks, bit for bit, against a 64-bit integer model; also the one-clock start-up delay, one bit per clock, and that seed loading, B = 1, C = 1, both output values and the modulo-2^32 wrap of all four LCGs each happen |
| `mdclcg_period_tb` | an 8-bit generator, where every LCG must have period exactly 256 and the output stream must repeat with period 256 |

The 2^32 period of the full-size generator is too long to simulate. It is
checked only at 8 bits.

Simulate any testbench with plain Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
          --top-module mdclcg_tb tb/mdclcg_tb.sv -o sim
./obj_dir/sim
```

Every module lints as a top of its own with `verilator --lint-only -Wall -y rtl`.
The only messages are notes on signals left unused on purpose: the dropped
top bits in `lcg`, and the LCG state outputs that `mdclcg` does not need.
`lcg` refuses at elaboration an `R` below 2 or an even `B`.
