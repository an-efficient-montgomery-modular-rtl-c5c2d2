# Montgomery modular multiplier with iteration skipping and a parallel prefix adder

Modular multiplication of very wide integers is the inner operation of RSA-style
public-key arithmetic. This block computes the radix-2 Montgomery product

    S = A * B * 2^-(K+2)  mod N^          (S < 2*N^)

of K-bit numbers (K = 1024 by default) one multiplier bit per clock cycle,
without ever propagating a carry across the word inside the loop. Its ideas:

* **Carry-save accumulation.** The running sum is kept as two vectors (SS, SC).
  Each iteration adds one operand x to them with a single row of full adders,
  so the loop's clock period is one full adder plus one 4-to-1 multiplexer,
  independent of K.
* **One addend per iteration.** Instead of adding `A_i*B` and `q_i*N` separately,
  D^ = B^ + N^ is formed once, before the loop, and each iteration adds one of
  {0, N^, B^, D^}.
* **Selection bits a cycle early.** The quotient bit and multiplier bit that
  pick x for iteration i+1 are computed, and registered, during iteration i.
  The division by two of iteration i is also postponed: the next cycle reads
  the registers through a shift.
* **Skipping empty iterations.** When the next iteration would add zero to a
  pair whose low bits are both zero, it is replaced by shifting by two places
  and the loop index jumps by two.
* **Parallel prefix addition.** The only two carry-propagate additions of an
  operation, B^ + N^ at the start and the carry-save-to-binary conversion at
  the end, are done by a Kogge-Stone adder in one clock each.

## The arithmetic

Radix-2 Montgomery multiplication scans the multiplier A from its least
significant bit. In iteration i it adds `A_i * B`, then adds the modulus if the
sum is odd (quotient bit `q_i`), which makes the sum even, and halves it. After
n iterations the sum is `A*B*2^-n mod N`, bounded by `2N` when the operands are.

This design changes the operands so that the quotient bits are cheap:

* **B^ = B << 3.** B^ has three zero low bits, so adding `A_i * B^` never changes
  the parity or the two bits above it. The quotient bit then depends on the
  carry-save pair alone (`q = SS_0 ^ SC_0`), not on `A_i`. The cost is three
  extra halvings: the loop runs for indices i = -1 .. K+4, K+5 halvings in all
  (the pass at i = -1 only primes the selection bits), and
  `A * B^ * 2^-(K+5) = A * B * 2^-(K+2)`.
* **N^ = 1 (mod 4).** Bit 1 of N^ is zero and bit 0 is one, and B^ is zero in
  both bits. So bits 0..2 of every addend are `x_0 = q`, `x_1 = 0`, `x_2 = q & N^_2`,
  fixed by the selection bits. That is what lets a three-bit look-ahead predict
  the next quotient bits (next section). Any odd modulus N can be brought to this form
  as `N^ = N * (N mod 4)`, which is N or 3N; a result modulo N^ is reduced
  modulo N by at most a few subtractions.

Operand rules: `N^` is K bits with `N^ mod 4 = 1`; `A, B < 2*N^` (K+1 bits). The
result satisfies `S < 2*N^`, so it can be fed straight back as an operand, as
in a square-and-multiply exponentiation. The Montgomery constant is
`R = 2^(K+2)`: a value v enters the domain as `v*R mod N^`. One product with 1 takes
it back out.

Datapath registers are K+6 bits wide: before its delayed halving the carry-save
value stays below `2*D^ < 2^(K+6)`.

## One clock cycle of the loop

```
          SS reg, SC reg (unshifted sum and carry vectors)
              |   >>1 or >>2 (skip_r)          N^  B^  D^
        +-----+-----+                           |   |   |
   M1 (SC operand)  M2 (SS operand)           SM3 <- q^, A^  (FFs)
        |                |                      |
        +------> CCSA (one full-adder row) <----+ x
                         |
                 new SS, SC  --> registers
   M4/M5: bits [2:0] of SS, SC after the same shift --> Skip_D --> q^, A^, skip (FFs)
```

In the cycle of iteration i:

1. M1/M2 present `SS[i] = SS_reg >> s`, `SC[i] = SC_reg >> s`, with s = 1 or,
   if the previous cycle decided to skip, s = 2. This is the postponed halving.
2. SM3 picks x from the registered bits (A^, q^): 00 -> 0, 01 -> N^,
   10 -> B^, 11 -> D^.
3. The CCSA adds `SS[i] + SC[i] + x` into a new sum vector and carry vector,
   which are stored unshifted.
4. In parallel, Skip_D looks at bits 2..0 of SS[i] and SC[i] (taken by two
   small 3-bit multiplexers M4/M5 straight from the registers, so as not to wait
   for the wide multiplexers), at q^, at N^_2 and at the next two multiplier
   bits `A_{i+1}`, `A_{i+2}`. The A register shifts by one or two each cycle to
   provide them.

## Skip detection

Let `(SS[i+1], SC[i+1])` be this cycle's sum halved. Its low two bits follow
from three low bits of the operands, because the low bits of x are known (see
above):

```
SS[i+1]_0 = SS_1 ^ SC_1                    (x_1 = 0)
SC[i+1]_0 = maj(SS_0, SC_0, q^)            (carry out of bit 0, x_0 = q^)
SS[i+1]_1 = SS_2 ^ SC_2 ^ (q^ & N^_2)
SC[i+1]_1 = SS_1 & SC_1                    (carry out of bit 1)

q_{i+1}    = SS[i+1]_0 ^ SC[i+1]_0
skip_{i+1} = ~(A_{i+1} | q_{i+1} | SS[i+1]_0)
q_{i+2}    = SS[i+1]_1 ^ SC[i+1]_1
```

`skip_{i+1} = 1` means iteration i+1 would add x = 0 (A and q both zero) to a
pair whose low bits are both zero (q = 0 and SS_0 = 0 force SC_0 = 0). The
halving of such a pair is exact as two separate shifts, so iteration i+1 is
skipped: the next cycle reads the registers shifted by two, runs iteration
i+2, and the registered selection bits are (q_{i+2}, A_{i+2}) instead of
(q_{i+1}, A_{i+1}). `q_{i+2}` is computed on the assumption of a skip and only
used then.

A skip is refused in the last iteration (i = K+4). Otherwise the loop would
halve once too often and return SS[K+6] instead of SS[K+5].

With random operands about 3 % of the K+6 loop cycles are skipped (measured at
K = 1024); sparse multipliers skip more.

## Carry-propagate steps

Two additions need full carry propagation: D^ = B^ + N^ before the loop and
SS + SC after it. Parameter `PPA_CONV` chooses how:

* `PPA_CONV = 1` (default): a Kogge-Stone prefix adder sits on the M1/M2
  outputs, the same operands the CCSA sees. In the cycle after start, M1/M2
  pass N^ and B^ and the adder writes D^. In the cycle after the loop, M1/M2
  pass the shifted final pair and the adder writes the result. The adder
  forms bit propagate/generate `p = a^b`, `g = a&b`, then `ceil(log2 W)` levels
  of `G = G_j | (P_j & G_{j-2^l})`, `P = P_j & P_{j-2^l}`, and `sum = p ^ carry`.
* `PPA_CONV = 0`: the conversions are done by the carry-save adder itself, in
  its second mode (alpha = 1): two half-adder rows in series, repeated until
  the zero detector sees SC = 0, then SS is the binary value. Each step
  moves a pending carry up by two places, so a long carry chain costs many
  cycles (about K/2 for a chain across the whole word).

## Interface and timing

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| clk     | in  | 1     | clock, rising edge |
| rst_n   | in  | 1     | asynchronous reset, active low |
| start   | in  | 1     | one-cycle pulse while `busy` is low; a, b, n_hat are sampled |
| a       | in  | K+1   | multiplier, `< 2*n_hat` |
| b       | in  | K+1   | multiplicand, `< 2*n_hat` |
| n_hat   | in  | K     | modulus, `n_hat mod 4 = 1` |
| busy    | out | 1     | operation in progress |
| done    | out | 1     | one-cycle pulse; `s` valid from then until the next done |
| s       | out | K+1   | `a*b*2^-(K+2) mod n_hat`, `< 2*n_hat` |

Latency from the clock edge that samples `start` to the edge that raises
`done`:

* `PPA_CONV = 1`: `L + 2`, where `L = K + 6 - (skipped iterations)` is the
  number of loop cycles, so at most K + 8 (1032 for K = 1024).
* `PPA_CONV = 0`: `L + c1 + c2 + 4`, with c1 and c2 the half-adder steps of
  the two conversions (the final conversion's first step is not counted in c2).

Parameters: `K` (modulus width, default 1024, at least 3) and `PPA_CONV`
(default 1). Start pulses while `busy` is high are ignored.

**Clock period.** The loop path is one 4-to-1 multiplexer plus one full adder.
With `PPA_CONV = 1` the two conversion cycles run through the K+6-bit prefix
adder (about 11 prefix levels at K = 1024). That is far longer than the loop
path. To keep the short loop period, constrain those two transfers (into the
D^ and result registers) as multicycle paths, or pipeline the adder.

## Module map

```
scs_mm_new            top: registers, M1/M2, M4/M5, Montgomery datapath
 |- mm_ctrl           controller (states IDLE, PRE, PRE_CONV, LOOP, FINAL, POST_CONV)
 |- sm3               addend multiplexer
 |- ccsa              configurable carry-save adder (full-adder or 2x half-adder row)
 |   '- full_adder    1-bit carry-save cell
 |- ks_adder          Kogge-Stone parallel prefix adder
 |- skip_d            skip detector
 '- zero_d            SC == 0 detector
mm_pkg                operand-select enum, controller state enum, control-word struct
```

The controller's state sequence is IDLE -> PRE -> LOOP -> FINAL -> IDLE
(`PPA_CONV = 1`), or IDLE -> PRE -> PRE_CONV -> LOOP -> FINAL -> POST_CONV
-> IDLE (`PPA_CONV = 0`). It holds the loop index as `cnt = i + 1`.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | checks |
|-----------|--------|
| tb_full_adder | all 8 input combinations against the bit count |
| tb_ccsa | both modes against integer sums (32 bits); repeated half-adder steps reach SC = 0 with the right value |
| tb_ks_adder | 1-, 5-, 32- and 70-bit instances against `a + b + cin`; exhaustive at 5 bits |
| tb_sm3 | all four selections |
| tb_zero_d | zero, all one-hot and random vectors |
| tb_skip_d | exhaustive over all reachable inputs. The reference is integer arithmetic on the low bits: q_{i+1} is bit 1 of SS+SC+x; when skipping, the next quotient bit is bit 2 |
| tb_mm_ctrl | state sequence and control word cycle by cycle, both conversion modes, random skips and conversion lengths |
| tb_scs_mm_new | K = 32, both conversion modes side by side, ~350 operations (corners, random, result chains). Results are checked by modular arithmetic (`S*2^(K+2) = A*B mod N^`, `S < 2N^`). Result and latency are also checked against an algorithm-level model. Each mechanism is counted (skips, refused last-iteration skip, each addend, prefix and multi-step conversions) and must occur at least once |
| tb_scs_mm_new_full | default size K = 1024: corner and random products, plus a square-and-multiply exponentiation in the Montgomery domain checked against ordinary modular arithmetic |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/mm_pkg.sv rtl/*.sv \
          tb/tb_scs_mm_new.sv --top-module tb_scs_mm_new -Mdir obj -o sim
./obj/sim
```

The 1024-bit testbench builds in about half a minute and runs in a few
seconds. The top module carries two assertions: the `n_hat mod 4 = 1` rule,
and that the final sum fits in K+1 bits.

## Where this design fills gaps or departs

* **The new modulus N^.** The scheme's input is a "new modulus" N^, but its
  construction is not defined in the source this design follows. Here the
  caller supplies it, with the rule `N^ = 1 (mod 4)`. That rule is what a
  skip detector using only N^_2 requires.
* **Quotient look-ahead equations.** The skip condition and the output
  selection follow the source. The equations for q_{i+1} and q_{i+2} are
  derived here from the adder arithmetic, so they are not a copy of a
  published gate list. Under the loop invariant `q^ = SS_0 ^ SC_0` a skip
  needs q^ = 0, so the `q^ & N^_2` term never changes a used output. It is kept
  so that the block is exact for any input.
* **Last-iteration skip.** Refused, as above, so that the result is SS[K+5].
* **Complemented-operand adder cell.** The source's CCSA uses a full-adder
  cell fed with the complemented addend ~x. Here the CCSA is a plain
  full-adder row whose third input is gated to zero in half-adder mode. The
  function is the same; the gate-level optimisation is not reproduced.
* **Prefix adder placement and size.** The source adds a parallel prefix
  adder to cut carry-propagation delay, without saying where it goes. Here it
  replaces the two carry-save conversion loops. The standalone `ks_adder`
  defaults to 32 bits, the size given for it; inside the multiplier it is
  K+6 bits.
* **Word size, reset, handshake.** K = 1024 is a choice (a common RSA size);
  no size is given for the multiplier. Reset, the start/busy/done handshake
  and the controller's states are this design's own.
* **Not included:** the earlier multipliers this one is measured against
  (two- and three-level CSA designs with a separate carry-propagate
  converter, and the intermediate design with a fixed 4-to-1 selection and no
  skipping), and the generic multi-operand CSA tree and ripple-carry adder
  used only for comparison.
