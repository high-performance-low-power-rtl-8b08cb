# 6-tap FIR filter on a digit-serial Montgomery multiplier with an approximate 12:6 compressor

This RTL implements a small modular-arithmetic datapath: a 6 × 6-bit
Montgomery multiplier that consumes its multiplier operand three bits per
clock, and a 5th-order (6-tap) transposed-form FIR filter built from six of
these multipliers. The multiplier follows a published low-power design. Its
usual final carry-propagate stage is replaced by the "Astute" 12:6
compressor: a ripple chain of *modified full adders* whose carry uses an
AND and an OR instead of a majority gate. That carry is wrong for one input
pattern, so the compressor is an approximate adder by construction. The RTL
reproduces that behaviour. It does not correct it.

Everything is 6 bits wide: samples, coefficients, modulus and outputs.

## Block map

```
fir5_top                      6-tap transposed FIR, one sample per 2 clocks
 ├─ mont_mult  ×6             Montgomery product, 2 cycles
 │   ├─ digit_mux             three 2:1 muxes: q[2:0] or q[5:3]
 │   ├─ mont_pe               AND network + 3 carry-save rows  (T = V + P·digit)
 │   │   └─ csa_row ─ full_adder
 │   ├─ mont_dvc              3 rows: add N if odd, halve     ((T + t·N) / 8)
 │   │   └─ csa_row ─ full_adder
 │   ├─ dreg ×3               carry flip-flops: 6 + 6 + 1 bits
 │   └─ astute_compressor     half_adder + 4 × mfa + XOR  → 6-bit product
 ├─ dreg ×5                   delay line D
 └─ carry_forward_adder ×5    6-bit ripple adder A (half_adder + full_adder)
mont_pkg                      sizes M = 6, D = 3, CSW = 10; carry-record type
```

## Montgomery arithmetic in two cycles

With the radix r = 2^6, the multiplier returns a value congruent to
P·Q·2⁻⁶ mod N, where N is odd. Q is split into two 3-bit digits.
Starting from V = 0, each cycle does the following:

1. **Processing element (PE).** T = V + P·digit. The AND network forms the
   rows P&q0, (P&q1)≪1 and (P&q2)≪2. Three carry-save rows of full adders
   add these rows to the two vectors of V. The result is a sum/carry pair.
2. **Division cell (DVC).** V' = (T + t·N)/8. Here t ∈ 0..7 is the unique
   digit that makes the sum divisible by 8. The cell has three rows. Each
   row looks at the LSB of its carry-save value (s0 ⊕ k0). If that LSB is 1,
   the row adds N in a carry-save row. Both vectors now end in 0, so the row
   shifts them right by one bit. This is bit-level Montgomery reduction, and
   it needs no N⁻¹.

In cycle 1 the digit is q[2:0] (`sel = 1`) and the fed-back V is forced to
zero. In cycle 2 the digit is q[5:3] (`sel = 0`) and V comes from the carry
flip-flops. During cycle 2 the compressor output `res` is the product. It is
combinational from the flip-flops and the inputs. P, Q and N must stay
constant for both cycles.

No final subtraction is made. The exact value V = (P·Q + u·N)/64 can be as
large as 124, and the 6-bit output is V mod 64, which is not reduced below
N. An assertion reports an even N.

## The carry record: 13 bits between the cycles

The running value V never goes through a carry-propagate adder. It is held
as 13 "carry bits" C0..C6 and Cc1..Cc6 in three flip-flops: C6..C1 (6 bits),
Cc6..Cc1 (6 bits) and C0 (1 bit). The hardest part of this design to follow
is what these bits weigh. The weights are chosen to match how the
compressor pairs its inputs:

| bit | weight | compressor stage |
|-----|--------|------------------|
| C0  | 1      | O1 (half adder with C1) |
| Cj, j = 1..6 | 2^(j−1) | O(j) |
| Cck, k = 1..5 | 2^k   | O(k+1) (with C(k+1)) |
| Cc6 | 64     | not used (above the 6-bit result) |

So V = C0 + C[6:1] + 2·Cc[6:1]. In `mont_pkg`, `mont_carry_t` is this record
and `carry_value()` evaluates it.

**Why nothing is lost.** Take P, Q < 64, digits and t at most 7, and N < 64.
Then V < 127 after every cycle, T ≤ 567 and T + t·N ≤ 1008 < 2¹⁰. Every
carry-save vector holds a nonnegative part of an exact sum below 2¹⁰, so the
10-bit rows (`CSW`) never drop a carry. After the three halvings, the two
vectors each hold at most 7 bits. The DVC maps them onto the record as
follows:

- The sum vector's bits 0..5 become C1..C6.
- The carry vector's bit 0 becomes C0, and its bits 1..5 become Cc1..Cc5.
- The two bit-6 values are ORed into Cc6. They cannot both be 1, because
  V < 128.

The record is therefore always the exact Montgomery value. The testbenches
check this on every product.

## The Astute compressor and its error

`astute_compressor` adds the record into the 6-bit result:

- **O1:** a half adder on C0 and C1.
- **O2..O5:** four modified full adders, each on (C(k+1), Cck, carry in).
- **O6:** a bare 3-input XOR on (C6, Cc5, carry in), whose carry out is
  dropped.

Cc6 is not an input. The whole compressor uses 15 gates.

The modified full adder (`mfa`) computes sum = a⊕b⊕c and
carry = b ∧ (a ∨ c). This carry matches the majority for every input except
a,b,c = 1,0,1, where it returns 0. Inside the compressor, a = C(k+1),
b = Cck and c = the incoming carry. Mapping the three signals to a, b and c
is a reading of the original schematic, not a certainty.

Measured over all 4096 operand pairs, the output equals V mod 64 for 3058
pairs at N = 3 and 2907 pairs at N = 7. The source claims exact results for
these moduli. No assignment of the three signals to a, b and c reaches that
with this record format: the best gives 3870 and 3646 pairs. To get an exact
multiplier, replace the carry in `mfa.sv` with the majority. The testbenches
compare against the approximate cell, so `tb_mfa`, `tb_astute_compressor`
and the multiplier and filter testbenches would then need their reference
models changed too.

## The FIR filter

```
x(n) ──┬──────┬──────┬──────┬──────┬──────┐
      M(I1)  M(I2)  M(I3)  M(I4)  M(I5)  M(I6)
       └─► D ─► A ─► D ─► A ─► D ─► A ─► D ─► A ─► D ─► A ──► y(n)
```

The sample x(n) drives the P input of all six multipliers, and coefficient
I_k drives the digit-serial Q input. The first product goes into a register.
Each carry-forward adder adds the next product to the register before it.
The output is

  y(n) = I6⊗x(n) + I5⊗x(n−1) + I4⊗x(n−2) + I3⊗x(n−3) + I2⊗x(n−4) + I1⊗x(n−5)  (mod 64)

Here ⊗ is the multiplier's 6-bit product. The adders drop their carry out.
The source's written equation puts I1 on x(n). The RTL follows the drawn
structure instead. To get that ordering, load `coef[0..5]` in reverse.

**Timing.** A phase flip-flop set by reset alternates two cycles:

| cycle | `x_ready` | `y_valid` | what happens |
|-------|-----------|-----------|--------------|
| 1 | 1 | 0 | multipliers use q[2:0]; offer x(n) |
| 2 | 0 | 1 | multipliers use q[5:3]; `y` = y(n); D registers advance at the clock edge ending this cycle |

Hold `x`, `coef` and `n` for both cycles; an assertion reports a change of
`x` or `n` between them. After reset all registers are 0,
so the first five outputs see zero history. The phase flip-flop, the
register enable, the shared modulus port and the reset are choices of this
RTL. The source does not say how the two-cycle multiplier is sequenced
inside the filter.

## Where this RTL departs from or fills in the source

- **PE and division cell insides.** The source gives their function: an AND
  network with an adder network, and an array of full adders fed by N's
  bits. The carry-save rows, the LSB-driven quotient rule and `CSW = 10` are
  this design's.
- **Carry-bit weights and the Cc6 OR.** These are inferred from the
  compressor's pairing, as described above.
- **Operand roles.** P is used whole each cycle and Q three bits at a time.
  One passage of the source names P the multiplier, but its multiplexer
  description selects bits of Q. The RTL follows the multiplexer
  description. The source calls the multiplier "bit serial" in one place
  and digit-serial (d = 3) in another. The RTL is digit-serial.
- **Reset, register enable and valid strobes.** These are added. The source
  mentions none of them.
- **Approximate product.** The product is approximate, as explained in the
  compressor section.
- **Not modelled.** The conventional multiplexer-based reduction cell, which
  the source uses only as a baseline, is not modelled. Neither are the
  transistor-level CMOS/PTL circuits and their power, delay and
  transistor-count figures.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
The shared reference models are in `tb/mont_ref_pkg.sv`. For example, to
build and run the end-to-end filter test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mont_pkg.sv tb/mont_ref_pkg.sv tb/tb_fir5_top.sv \
  --top-module tb_fir5_top -Mdir obj_fir -o sim
./obj_fir/sim
```

Substitute any `tb/tb_<block>.sv`. Verilator finds the modules through `-I`.

| testbench | what it covers |
|-----------|----------------|
| `tb_half_adder`, `tb_full_adder`, `tb_mfa`, `tb_digit_mux` | exhaustive truth tables; `tb_mfa` also checks the 1,0,1 carry error |
| `tb_dreg` | load, hold and reset under random enable |
| `tb_carry_forward_adder` | all 4096 input pairs, mod-64 sum and dropped carry |
| `tb_astute_compressor` | all 4096 inputs against a stage model; counts exact and approximate cases |
| `tb_mont_pe`, `tb_mont_dvc` | exact carry-save sums; the quotient digit for every odd N |
| `tb_mont_mult` | all P, Q for N = 3 and 7, and random operands for the other odd N. Per cycle it checks the exact record value and the quotient digit; it also checks congruence with P·Q·2⁻⁶ mod N, the compressed result, and a rate of 2 cycles per product |
| `tb_fir5_top` | default size, 6 runs × 300 samples with resets and changes of N, checked against a direct-form sum. It requires each of these to happen at least once: the two phases, full delay-line history, a dropped adder carry, an approximate product, a change of modulus, a reset |

All testbenches finish in well under a second.
