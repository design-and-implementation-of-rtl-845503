# RSA engine on a partially interleaved modular Karatsuba-Ofman multiplier

This is synthesizable SystemVerilog for a 1024-bit RSA modular exponentiation
engine, `rsa_top`. Its core is a modular multiplier that combines two ideas:

- **Karatsuba-Ofman splitting.** A 1024-bit product is built from
  half-size products.
- **Bipartite reduction.** A 1024-bit modular reduction is split into two
  half-size reductions that run at the same time. One is a left-to-right
  (classic, Blakley-style) reduction on the upper halves. The other is a
  right-to-left (Montgomery) reduction on the lower halves.

The multiplier (`pikom_mm`) returns `A*B*2^-512 mod N` for 1024-bit
operands in about 640–740 clock cycles. The exponentiation engine runs the
square-and-multiply method on top of it. A public-key operation with
`e = 2^16 + 1` takes about 13,100 cycles. A 1024-bit private-key operation
takes about 1.05 million cycles.

Every wide addition goes through one 32-bit carry lookahead adder per unit,
used once per word. The only logic that works at full width is carry-save
adders, which have no carry propagation, plus one equality compare.

## The multiplication identity

Write `h = K/2` and `r = 2^h`, and split each operand into halves:
`A = A1*r + A0`, and the same for `B` and `N`. The modulus must be odd and
have its top bit set (`2^(K-1) <= N < 2^K`).

Two half-size modular multipliers start together:

```
T2' = A1*B1 - Q1*N1          classic:    T2' = A1*B1 mod N1,  Q1 = floor(A1*B1 / N1)
T0'*r = A0*B0 - Q0'*N0       Montgomery: T0' = A0*B0*r^-1 mod N0, Q0' its quotient
```

With `(x & y)` meaning the concatenation `x*r + y`, the value

```
P = (T2' & T0') + (A0+A1)(B0+B1) - (Q0'+Q1)(N0+N1) - (T0' & T2')
```

expands to `(A*B - (Q1*r + Q0')*N) / r`. So `P ≡ A*B*r^-1 (mod N)`.

The Karatsuba middle term `(A0+A1)(B0+B1)` and the quotient term
`(Q0'+Q1)(N0+N1)` are plain integer products. Each is computed by its own
radix-8 integer multiplier.

The two concatenations are valid only if `T0'` and `T2'` are proper h-bit
numbers. The classic multiplier guarantees this by its final subtractions.
The Montgomery multiplier guarantees it with one correction step (see below).

Before the final reduction, `P` lies roughly in `(-8N, 10N)`. Adding or
subtracting `N` brings it into `[0, N)`. In the 43 test cases of
`tb_pikom_mm`, the result adder made 59 such passes in total. That count
includes the last pass of each run, which only confirms the range.

## Blocks

| module | what it is |
|---|---|
| `rsa_top` | exponentiation controller; one `pikom_mm`, one serial subtractor for `2^K - N` |
| `pikom_mm` | the modular multiplier: one classic, one Montgomery, two integer multipliers, five serial adders |
| `classic_mm_r4` | radix-4 interleaved classic modular multiplier with quotient output (default K = 512) |
| `mont_mm_r4` | radix-4 Booth-encoded Montgomery multiplier with signed quotient output (default K = 512) |
| `int_mult_r8` | radix-8 sequential integer multiplier, two partial products per cycle (default 513 × 513) |
| `serial_addsub` | WIDTH-bit add/subtract that reuses one 32-bit CLA once per word, with the carry in a flip-flop |
| `cla_word`, `cla4` | 32-bit adder made of 4-bit carry lookahead blocks (propagate/generate units plus a lookahead unit) |
| `csa32`, `csa42` | (3,2) and (4,2) carry-save adders |
| `booth_encoder` | radix-4 modified Booth digit selection |
| `mont_encoder` | picks the multiple of N (0, N, 2N or −N) that clears the two low bits |
| `pikom_pkg` | shared constants: word width 32, default operand size 1024 |

Every sequential block has the same handshake:

- Pulse `start` for one cycle with the operands valid. The block registers
  them, and `busy` rises.
- `done` pulses for one cycle when the result is valid.
- The result holds until the next `start`.
- Reset is active-low and asynchronous.

## Classic multiplier (`classic_mm_r4`)

The classic multiplier scans X two bits per cycle from the top. The running
remainder is held as a sum vector S and a carry vector C.

**Each cycle:**

1. The top three bits of S and of C are added into a small estimate `t`
   (0..14). The index is small, so this addition is cheap.
2. A table lookup returns `t*2^K mod N` and `floor(t*2^K / N)`.
3. A (4,2) CSA forms the new vectors from 4·S_low, 4·C_low, the table
   remainder and the partial product `x_i * Y` (0, Y, 2Y or 3Y).
4. A (3,2) CSA accumulates the quotient in carry-save form as
   4·Q_S + 4·Q_C + 4·q_table. The new digit must be shifted together with
   the running quotient.

**Before the loop:**

- 3Y is formed by the serial adder.
- The two 15-entry tables depend only on N. The block fills them itself
  whenever N differs from the previous multiplication's modulus; otherwise
  it reuses them.
  - Each entry is the previous one plus `2^K - N`, reduced by at most one
    more subtraction of N.
  - Both candidates are formed one word per cycle by two chained 32-bit
    CLAs. Each entry takes K/32 + 2 cycles.
  - A fill adds 252 cycles at K = 512. In an exponentiation it happens once,
    and not at all when the next exponentiation uses the same key.

**After the loop:**

1. One "fold" cycle applies the table once more without the shift. This
   leaves `S + C < 3*2^K`.
2. S + C and the two quotient vectors are resolved by word-serial adders.
3. N is subtracted until the result is below N. At most five subtractions
   are needed.
4. The number of subtractions is added to the quotient.

The modulus needs its top bit set. The upper half of a 1024-bit RSA modulus
always has it.

## Montgomery multiplier (`mont_mm_r4`)

The Montgomery multiplier scans X two bits per cycle from the bottom over
`K/2 + 1` iterations.

**The two encoders:**

- The Booth encoder turns the window `{x(i+1), x(i), x(i-1)}` into a digit in
  {−2, …, 2} times 4Y. Because the multiple is of 4Y, the partial product
  never touches the two low bits.
- The Montgomery encoder therefore looks only at the two low bits of S + C
  and at bit 1 of N. It chooses 0, N, 2N or −N, whichever makes the sum
  divisible by 4.
- Both encoders work in parallel. Positive and negative quotient digits go
  into two shift registers, Q− and Q+. The quotient is `(Q+ − Q−)/4`.

**The low-bit adder.** The two low bits of S, C and QN, the completion bit of
a negated QN, and a carry kept from the previous cycle are added by a small
adder. Their total is 0, 4 or 8, so it produces two bits of weight 4:

- one fills the free lowest position of the new carry vector;
- the other is stored for the next cycle.

The remaining bits go through the (4,2) CSA, and the Booth completion bit is
that CSA's carry in.

**No sign extension.** Negative Booth products and −N would normally force
sign extension of the carry-save vectors. Instead, each partial product enters
with a constant offset:

- The Booth product carries `+2^(K+3)`. This is one flipped bit in the
  shifted domain.
- QN carries `+2^(K+2)`.

These offsets are chosen so that the vectors always hold the true partial
result plus exactly `2^(K+2)`, a non-negative number of fixed width. At the
end the offset is removed by flipping the top bit of the resolved sum.

**After the loop:**

1. S + C and Q+ − Q− are resolved by two word-serial adders working in
   parallel.
2. One correction follows. If the value is negative, N is added and 2^K is
   subtracted from the quotient. If it is N or more, N is subtracted and 2^K
   is added to the quotient.

The output T0' then lies in `[0, 2^K)`. The identity `T0'*2^K = X*Y − Q0'*N`
holds exactly, and that identity is what the multiplication identity needs.
T0' is below N whenever `X*Y < N*2^K`.

## Integer multiplier (`int_mult_r8`)

The integer multiplier scans three multiplier bits per cycle from the bottom.
It needs only the multiples 0..7 of Y, and gets them from two operands:

- `I1` chooses from {0, Y, 2Y, 3Y}.
- `I0` chooses from {0, Y, 3Y, 4Y}. 4Y is only a shift of Y.
- Their sum gives every multiple from 0 to 7Y. The pairs (I1, I0) used are:
  0 = (0, 0), Y = (0, Y), 2Y = (Y, Y), 3Y = (2Y, Y), 4Y = (3Y, Y),
  5Y = (2Y, 3Y), 6Y = (3Y, 3Y) and 7Y = (3Y, 4Y).
- The only multiple that needs an addition is 3Y. It is formed once, before
  the loop.

A (4,2) CSA adds S, C, I1 and I0.

- The lowest three bits of the result are final each cycle. Bit 0 is taken
  directly, bit 1 through a half adder, and bit 2 through a full adder.
- The full adder's carry becomes the CSA carry in of the next cycle.
- The retired bits fill the low half of the product.
- The high half is resolved word-serially at the end.
- 3Y is formed before the loop with the serial adder.

In `pikom_mm`, the second multiplier is instantiated two bits wider in X,
because `|Q0' + Q1|` can be up to `h + 3` bits long.

## Schedule inside `pikom_mm`

The multiplier needs no external sequencing: each job starts as soon as its
inputs exist. Times below are for K = 1024.

| job | starts when | typical end (cycle) |
|---|---|---|
| classic multiplier on A1, B1, N1 | start | up to 393 measured (+252 for a new N) |
| Montgomery multiplier on A0, B0, N0 | start | 296 |
| A0+A1, B0+B1, N0+N1 (three serial adders) | start | 18 |
| integer multiplier 1: (A0+A1)(B0+B1) | the sums are ready | about 230 |
| Q0'+Q1, and its negation if negative | both modular multipliers are done | one or two 17-word passes |
| integer multiplier 2: \|Q0'+Q1\|(N0+N1) | Q0'+Q1 is ready | +210 |
| result adder: (T2'&T0') + product 1, then − (T0'&T2') | both modular multipliers and product 1 are ready | overlaps integer multiplier 2 |
| result adder: ∓ product 2 | product 2 is ready | +33 |
| result adder: ±N until 0 ≤ P < N | — | +33 per pass |

A negative `Q0'+Q1` is turned into its magnitude, because the integer
multiplier works on unsigned numbers. Its product is then added instead of
subtracted.

Measured cycle counts, counted from the `start` cycle to the `done` cycle
inclusive:

| unit | this RTL | reference design figure |
|---|---|---|
| Montgomery, K = 512 | 296 | 9K/16 + 8 = 296 |
| classic, K = 512 | up to 393 | 21K/32 + 17 = 353 |
| integer, 513 × 513 | 210 | 11k/24 + 13 = 248 |
| full multiplier, K = 1024 | 641–733 (up to 966 for a new N) | 799 |
| RSA, e = 2^16 + 1 | about 13,100 (+252 for a new key) | 13,579 (10,863 ns at 0.8 ns) |
| RSA, 1024-bit private exponent | about 1,053,000 | about 1,225,000 (0.98 ms at 1.25 GHz) |

The figures in the table assume the classic multiplier's tables are ready,
as the reference figures do. Even so, the classic multiplier is slower than
the reference figure:

- it has the fold cycle;
- it makes a variable number of final subtractions.

The full multiplier is faster than the reference schedule anyway, for two
reasons:

- the operand sums start in cycle 0, not after the operands have been
  loaded into the modular multipliers (cycle 23 in the reference schedule);
- an integer multiplication takes 210 cycles instead of 248.

### Clocking

No clock frequency is claimed, and the RTL has not been through timing
analysis. The paths that are expected to be longest are:

- the (4,2) carry-save adders;
- the 15-way table selection in the classic multiplier;
- two chained 32-bit CLAs in its table fill;
- the 512-bit modulus equality compare at `start`.

None of these has a carry chain wider than 64 bits.

## Exponentiation (`rsa_top`)

`pikom_mm` computes `A*B*r^-1`, so the engine keeps its values scaled by
`r = 2^(K/2)`:

1. **Scaling constant.** `r^2 mod N = 2^K mod N = 2^K − N`. Because N has
   its top bit set, this is a single word-serial subtraction.
2. **Skip leading zeros.** While that subtraction runs, leading zero bits of
   the exponent are skipped: a whole 32-bit word per cycle while the top word
   is zero, then one bit per cycle.
3. **Scale the message.** `Mbar = mm(M, r^2 mod N) = M*r mod N`, and
   `C = Mbar`. This consumes the exponent's top 1.
4. **Square and multiply.** For every remaining exponent bit, from the top:
   `C = mm(C, C)`, and if the bit is 1, `C = mm(C, Mbar)`.
5. **Unscale.** `result = mm(C, 1) = M^e mod N`.

An exponent of 0 returns 1. The inputs must satisfy `M < N`, N odd, and
`2^(K−1) ≤ N < 2^K`.

## Where this RTL departs from the reference design

- Only the high-radix multiplier is implemented. A radix-2 variant with a
  64-bit iterated adder, an earlier and slower design point, is not.
- **Sign extension.** The Montgomery multiplier handles negative partial
  products with the constant offset described above.
- **Final correction.** The Montgomery reference algorithm's final step
  reads "else if P ≤ N then add N". Here it is taken as "if P < 0", which is
  the reading that gives correct results.
- **Quotient alignment.** In the classic multiplier, the table quotient is
  added to the running quotient at the same ×4 alignment. The reference
  algorithm leaves this implicit.
- **Classic set-up and finish.** The classic multiplier computes its own
  tables, word-serially, and only when the modulus changes. The fold cycle
  and the up-to-five final subtractions are this design's way of finishing
  the reduction.
- **Job start times.** Jobs in `pikom_mm` start on data readiness, not on a
  fixed cycle table.
- **Sign of Q0'+Q1.** A negative Q0'+Q1 is handled by its magnitude.
- **Final reduction.** The final reduction both adds and subtracts N as
  needed. It is not limited to three subtractions.
- **Scaling.** The way `rsa_top` obtains the scaling constant and skips
  exponent zeros is this design's own.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_cla4` | exhaustive |
| `tb_cla_word`, `tb_csa32`, `tb_csa42` | random against integer addition |
| `tb_booth_encoder`, `tb_mont_encoder` | every digit against its arithmetic meaning |
| `tb_serial_addsub` | padded and exact widths, latency |
| `tb_classic_mm_r4` (K = 512) | remainder and quotient against wide division, the cycle bound, and both table fill and table reuse |
| `tb_mont_mm_r4` (K = 512) | the exact identity `P*2^K = X*Y − Q0'*N`, range, cycle count, and that all three correction cases occur |
| `tb_int_mult_r8` (513 × 513) | product and cycle bound |
| `tb_pikom_mm` (K = 1024) | `P < N` and `P*2^512 ≡ A*B (mod N)`, cycle bound, and that each mechanism occurs |
| `tb_rsa_top` | whole design at its default size |

For `tb_pikom_mm`, the mechanisms that must occur are: negative Q0'+Q1,
add-N passes, subtract-N passes, and both Montgomery corrections.

`tb_rsa_top` runs the whole design at its default size, with no parameter
overrides, using a real 1024-bit RSA key:

- It encrypts messages with `e = 2^16 + 1` and decrypts them with the
  private exponent, checking that the message comes back.
- It compares every result with a reference exponentiation computed in the
  testbench.
- It checks the number of squarings and multiplications for every exponent.
- It covers exponent 0 and 1, message 0 and 1, and random moduli.

The key was generated offline with a fixed seed. The whole run takes a few
seconds of simulation.

To run a testbench with Verilator, for example the end-to-end test:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv --top-module tb_rsa_top \
    rtl/pikom_pkg.sv tb/tb_rsa_top.sv
./obj_dir/Vtb_rsa_top
```

Each block's opening comment gives its timing and the choices it makes.
Verilator's lint (`-Wall`) reports only unused signals and constants: top
carry bits of the carry-save adders, `busy`/`cout` outputs that some users
do not need, and a correction flag of the Montgomery multiplier that only
the testbenches read.
