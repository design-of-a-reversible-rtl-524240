# A binary32 floating-point adder made only of reversible gates

A reversible circuit never loses information: from its outputs you can always
recover its inputs. That property matters for very low-power logic, where
erasing a bit costs energy, and for quantum computing, where every operation
must be reversible. Ordinary AND/OR/XOR logic erases information, so a
reversible design is built from gates with as many outputs as inputs.
Outputs it does not need are left as "garbage", and spare inputs are tied to
constants.

This RTL describes an IEEE 754 single-precision (binary32) adder whose whole
datapath is made of four reversible gates: Feynman, Fredkin, Peres and HNG.
It follows the usual adder algorithm: swap, align, add, normalize and round.
Every stage is chosen so that it needs no state. There is no clock, no
register and no controller. The adder is one combinational network from the
two operands to the sum, and it rounds toward zero.

The SystemVerilog models the *logic function* of each gate and wires the gates
together as the reversible design does. A simulation therefore checks that
the gate network computes the right sum. Garbage outputs are brought out of
each gate instance and left unconnected. The RTL does not model quantum cost.

## The four gates

| Gate | Module | Function | Used as |
|---|---|---|---|
| Feynman (CNOT) | `rev_feynman` | P = A, Q = A ⊕ B | fan-out (B = 0), XOR |
| Fredkin | `rev_fredkin` | P = A, Q = A'B + AC, R = AB + A'C | 2-to-1 mux, controlled swap |
| Peres | `rev_peres` | P = A, Q = A ⊕ B, R = AB ⊕ C | half adder (C = 0): Q sum, R carry |
| HNG | `rev_hng` | P = A, Q = B, R = A⊕B⊕C, S = (A⊕B)C ⊕ AB ⊕ D | full adder (D = 0): R sum, S carry |

Two helper chains are used more than once:

- `rev_subtracter`: a ripple of HNG full adders that computes a − b as
  a + ~b + 1.
- `rev_incrementer`: a ripple of Peres half adders that computes a + cin.

## Datapath

```
   a ─┐  ┌─ b
      ▼  ▼
 rev_cond_swap ── exp_diff (9 b) ──┐
   │x        │y                    ▼
   │         └──────────────► rev_align ── y_ext {s, sig24, G, R, S}
   │ {s,1,frac,000}                 │
   ▼                                ▼
 rev_sm_conv (28) ──► rev_rca (28 → 29) ◄── rev_sm_conv (28)
                           │
                     rev_sm_conv (29) ── sign ────────────────┐
                           │ magnitude (28 b)                 │
   x.exp ─────────► rev_normalize ── exp, frac (truncated) ──► sum
```

`rfp_adder` is the top. It has three ports, `a`, `b` and `sum`, each of type
`rfp_pkg::fp32_t` (sign, 8-bit exponent, 23-bit fraction).

### 1. Conditional swap (`rev_cond_swap`)

Both exponents are widened to 9 bits and subtracted by nine HNG gates. The
sign bit of `exp_a − exp_b` drives the control line of 32 Fredkin gates. When
`exp_a < exp_b`, the two operands trade places. After this stage, `x` has the
larger (or equal) exponent and `y` is the operand that must be aligned. The
9-bit difference goes on to alignment.

### 2. Alignment with guard, round and sticky (`rev_align`)

A sequential adder would shift `y` one place at a time. That needs a counter
and a controller, which this design avoids. Instead it shifts in one
combinational step:

1. A 9-bit conversion unit (see below) turns the signed difference into its
   magnitude, which is the shift amount (0..255).
2. The 24-bit significand of `y` (leading one made explicit) is placed at the
   top of a 256-bit word. A (256, 8) barrel shifter (`rev_barrel_rshift`)
   shifts it right. Each of its eight stages is a row of Fredkin multiplexers.
3. Counting from the top of the shifted word, bits 1–24 are the aligned
   significand, bit 25 is the guard bit and bit 26 is the round bit.
4. The remaining 230 bits are ORed into the sticky bit by a linear cascade of
   reversible OR stages (`rev_sticky_cascade`).

The 256-bit width is wide enough for the largest possible exponent
difference. The cost is that the sticky OR has a very large fan-in, which is
why the cascade is long. The sign of `y` bypasses the shifter. The result is a
28-bit sign-magnitude word: `{sign, sig[23:0], G, R, S}`.

Operand `x` gets the same 28-bit format, `{sign, 1, frac, 000}`.

### 3. Signed addition by conversion (`rev_sm_conv`, `rev_rca`)

Floating-point significands are stored as sign and magnitude. This design
adds them in two's complement: it converts both operands, adds them, and
converts the sum back. The same converter circuit does both directions:

- The sign bit is fanned out by Feynman gates and XORed into every magnitude
  bit.
- A chain of Peres half adders then adds the sign in at the bottom.

For a negative number this forms ~m + 1. For a positive number it leaves the
word unchanged. Applying the circuit twice gives back the original word. The
only odd case is `100…0`, which maps to itself. This case cannot arise in the
adder.

`rev_rca` is a 28-bit ripple carry adder: a Peres half adder at bit 0 and HNG
full adders above it. It returns the sum sign-extended to 29 bits, so the sum
can never overflow. The top bit is a[27] ⊕ b[27] ⊕ carry-out, formed with two
Feynman gates. A 29-bit converter then splits the sum into the result sign
and a 28-bit magnitude.

In that magnitude, bit 26 is the leading-one position of a normalized result.
Bit 27 holds a carry out of it.

### 4. Normalization (`rev_normalize`)

After an addition, the magnitude may need one place to the right. After a
subtraction it may need up to 26 places to the left. Both cases go through
the same two stages in series, so no decision logic is needed:

- **Stage 1.** Magnitude bit 27 drives two things:
  - the select line of 28 Fredkin multiplexers that shift the magnitude one
    place right;
  - the carry input of an 8-bit Peres incrementer on the exponent.
- **Stage 2.** Magnitude bits 26..0 are padded with five zeros to 32 bits.
  This word goes to a 32-input leading zero counter. The 5-bit count drives
  two things:
  - a (32, 5) left barrel shifter (`rev_barrel_lshift`);
  - an 8-bit HNG subtracter that lowers the exponent by the count.

After a stage-1 right shift, bit 26 is already 1, so the count is zero and
stage 2 changes nothing.

#### The leading zero counter (`rev_rlzc_cell`, `rev_rlzcu`)

The counter is a regular array of one small cell. The cell has inputs A and B
from above (B is the more significant) and C and D from its left. It produces:

- `c_out = A + B + C`: "a one has been seen so far";
- `d_out = D + A·B'·C'`: "the first one is in the A half", ORed into the count
  bit carried along the row.

An (n, k) counter has k rows:

- Row 0 has n/2 cells, fed with pairs of input bits, most significant pair on
  the left.
- Row r has n/2^(r+1) cells. They are fed with pairs of the `c_out` signals
  of row r−1.
- In each row the cells are chained from left to right, starting from
  constant zeros.
- The `d_out` of the last cell in row r is bit r of the leading zero count.

Why this works: in row 0, "first one in the A half" means the first one is
the lower bit of its pair, so the count is odd. In row r the inputs are
cumulative "seen" flags for groups of 2^r bits. The condition then means the
first one lies in the lower half of a 2^(r+1)-bit group, which is exactly
count bit r.

A (32, 5) counter uses 31 cells. An all-zero input gives a count of 0.

Example with 8 bits: `0000_0101` has five leading zeros. Rows 0, 1 and 2
output 1, 0 and 1, which is the count 101₂.

### 5. Rounding toward zero

Rounding needs no gates. Bit 31 of the 32-bit shifted word is the implicit
leading one and is dropped. Bits 30..8 become the 23-bit fraction. Bits 7..0
are discarded, which truncates the magnitude. Because the sign is kept
separately, truncating the magnitude is rounding toward zero.

With guard, round and sticky bits kept through alignment, the truncated
result equals the exact sum truncated to 24 bits. The end-to-end test checks
this against an exact 300-bit reference.

## Scope and limits

Supported:

- normal binary32 operands whose exact sum is a non-zero normal number;
- rounding toward zero.

Not supported:

- zero and subnormal operands (the leading significand bit is always taken
  as 1);
- infinities and NaNs;
- exponent overflow and underflow (the exponent wraps modulo 256);
- an exact zero result (for example x + (−x));
- the other IEEE rounding modes.

For all of these the output is not meaningful.

## Where this RTL goes beyond or departs from the reversible design

- **Gate functions only.** Each gate is an ideal logic function. The quantum
  implementations (controlled-V gates and so on) are not modelled, and
  neither are the garbage and constant-input accounting.
- **Peres and HNG definitions.** The standard definitions from the reversible
  logic literature are used (see the table above).
- **Barrel shifters.** Only their function is specified: (256, 8) right and
  (32, 5) left. They are built here as logarithmic stages of Fredkin
  multiplexers. A published reversible barrel shifter with the same function
  could replace them, with the same ports.
- **Sticky OR stage.** Each stage of the sticky cascade is a Peres gate
  (giving a⊕b and ab) followed by a Feynman gate that XORs the two into a+b.
  The reversible design intends one Peres gate per stage. The function is the
  same, but the gate count is higher.
- **Exponent comparison.** The swap subtracter computes exp_a − exp_b: it
  inverts the B exponent and uses a carry-in of 1. The swap happens exactly
  when exp_a < exp_b.
- **Leading zero counter word.** The counter and left-shifter input is
  `{magnitude[26:0], 5'b0}`. This choice makes the count zero right after a
  one-place right shift.
- **Sign-extension bit.** The adder's 29th bit is formed with two Feynman
  gates, as described in section 3.
- **Exponent-difference converter.** The converter that turns the exponent
  difference into a shift amount is a 9-bit instance of the same conversion
  unit.

## Files

| File | Contents |
|---|---|
| `rtl/rfp_pkg.sv` | widths, `fp32_t` struct |
| `rtl/rev_feynman.sv`, `rev_fredkin.sv`, `rev_peres.sv`, `rev_hng.sv` | gates |
| `rtl/rev_subtracter.sv`, `rev_incrementer.sv` | HNG / Peres ripple chains |
| `rtl/rev_cond_swap.sv` | exponent subtracter and operand swap |
| `rtl/rev_sm_conv.sv` | sign-magnitude ↔ two's complement converter (parameter `N`) |
| `rtl/rev_barrel_rshift.sv`, `rev_sticky_cascade.sv`, `rev_align.sv` | alignment |
| `rtl/rev_rca.sv` | 28-bit ripple carry adder with 29-bit result |
| `rtl/rev_rlzc_cell.sv`, `rev_rlzcu.sv` | leading zero counter |
| `rtl/rev_barrel_lshift.sv`, `rev_normalize.sv` | normalization and truncation |
| `rtl/rfp_adder.sv` | top |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Build and
run one with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/rfp_pkg.sv rtl/*.sv tb/rfp_adder_tb.sv --top-module rfp_adder_tb
./obj_dir/Vrfp_adder_tb
```

The end-to-end test `rfp_adder_tb` works as follows:

- It runs a few directed cases and 20 000 random pairs, biased towards close
  exponents and near-cancellation.
- It compares each result with an exact model: a 300-bit integer sum
  truncated to 24 significant bits.
- It skips and counts the pairs whose exact result is outside the supported
  range.
- It also counts how often each mechanism occurred: swap, sticky bit, shift
  past the round bit, negative sum, right normalization, left normalization
  and dropped bits. It fails if any count is zero.

The unit testbenches check:

- the gates exhaustively;
- the shifters and the leading zero counter against `>>`, `<<` and a loop;
- the converters against arithmetic negation, including their
  self-inverse property;
- `rev_align` and `rev_normalize` against arithmetic models.

The network is combinational, so each vector is checked 1 time unit after it
is applied.
