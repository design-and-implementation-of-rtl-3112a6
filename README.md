# 16-bit carry-save Montgomery modular multiplier with iteration skipping

This unit computes the Montgomery product

    S = A * B * 2^-(K+2) mod N        (K = 16, N odd, N < 2^K)

which is the step that RSA and Diffie-Hellman exponentiation repeat. It
takes operands in `[0, 2N)` and returns a result in `[0, 2N)`, with no final
conditional subtraction. A result can therefore go straight back in as the
next operand, and a whole exponentiation stays in the Montgomery domain.

The design has three main ideas:

* **One narrow adder row does all the work.** There is no carry-propagate
  adder. The running value is kept as two vectors, a sum vector `SS` and a
  carry vector `SC`, whose sum is the value. The critical path is one
  operand multiplexer plus one full adder, whatever K is.
* **The same row does the two real additions.** The algorithm needs two
  carry-propagate additions: the precomputed operand `D = B + N`, and the
  final conversion of `SS + SC` to a plain number. Both are done on the
  carry-save row by repeating half-adder steps until the carry vector is
  zero. This is the recursion of a parallel self-timed adder (PASTA). The
  row is configurable, so one clock cycle can hold **two** such steps.
* **Iterations that only halve are skipped.** Some iterations add nothing
  and only divide by two. The logic sees each one coming a cycle ahead, and
  the datapath shifts by two places instead of one.

A clocked stand-alone PASTA adder is also included. It is the same
half-adder recursion, as a general K-bit adder.

## Algorithm

Inputs: `A, B < 2N`, odd `N < 2^K`.

```
PRE:   (SS, SC) = (B, N)
       while SC != 0:  (SS, SC) = 2H_CSA(SS, SC)       # two half-adder steps per cycle
       D = SS                                          # D = B + N
LOOP:  (SS, SC) = (0, 0)
       for i = 0 .. K+1:
           q_i = (SS_0 + SC_0 + A_i * B_0) mod 2
           x   = 0, N, B or D   for (A_i, q_i) = 00, 01, 10, 11
           (SS, SC) = (SS + SC + x) / 2                 # one full-adder row
POST:  while SC != 0:  (SS, SC) = 2H_CSA(SS, SC)
       S = SS
```

The loop runs K+2 times. That makes `R = 2^(K+2)`, which is why no final
subtraction is needed:

* **Intermediate values.** `SS + SC` stays below `3N`.
* **Result.** `S = (A*B + Q*N) / 2^(K+2)`, which is below `2N` when
  `4N <= 2^(K+2)`.

All registers (`SS`, `SC`, `B`, `N`, `D`) are K+2 = 18 bits wide.

**How the halving is stored.** The row produces a sum vector and a carry
vector. The carry vector has weight `2^(j+1)` at bit j. Halving therefore
means two things:

* the sum vector is shifted right by one;
* the carry vector is taken as it is.

Bit 0 of the sum is always 0, because q was chosen to make the total even.
An assertion checks this.

## The configurable carry-save row (`ccsa`)

Each bit slice is a full adder made of two half adders:

```
(s1, c1) = HA(SS_j, SC_j)
(s2, c2) = HA(s1, y_j)
three-input mode: y_j = x_j          -> sum = s2, carry = c1 | c2
two-step mode:    y_j = c1_(j-1)     -> sum = s2, carry = c2
```

In three-input mode the slice is an ordinary full adder. In two-step mode,
the only change is a 2:1 select in front of the second half adder: it now
takes the first half adder's carry from the bit below. The row then performs
two PASTA steps in one pass. Both modes keep the value:

* three-input mode: `SS + SC + x = sum + 2*carry`;
* two-step mode: `SS + SC = sum + 2*carry`.

**How long PRE and POST take.** A half-adder step moves every pending carry
at least one place up. PRE and POST therefore take at most about K/2 cycles
each, and usually far fewer. The `zero_d` block ends each phase. It is a
single NOR over the `SC` register.

## Iteration skipping (`skip_ctrl`)

This is the least obvious part of the design.

**When an iteration is only a halving.** Take an iteration with `A_i = 0`
and `q_i = 0`. Then `x = 0`, and `SS_0` must equal `SC_0`. If both bits are
also 0, the iteration adds nothing. Its only effect is an exact division by
two, which a wider shift can do for free.

**The skip condition.** In iteration i, the row produces the halved pair
`(SS[i+1], SC[i+1])`. From that pair `skip_ctrl` works out the next
iteration's quotient bit and whether to skip it:

```
q_{i+1}    = SS[i+1]_0 ^ SC[i+1]_0 ^ (A_{i+1} & B_0)
skip_{i+1} = ~(A_{i+1} | q_{i+1} | SS[i+1]_0)
q_{i+2}    = SS[i+1]_1 ^ SC[i+1]_1 ^ (A_{i+2} & B_0)
```

* **No skip.** The pair is stored as it is. `(q_{i+1}, A_{i+1})` go into
  the select flip-flops `(q^, A^)`.
* **Skip.** The pair is shifted right once more, so it is divided by 4 in
  all. The A shift register moves by two, and `(q_{i+2}, A_{i+2})` go into
  the select flip-flops. The next cycle is iteration i+2.

`q_{i+2}` can use bit 1 of the pair because a skipped iteration only
shifts.

**Why the clock stays short.** The select bits for a cycle always come from
flip-flops. `sm3_mux` drives `x` straight from them, so the look-ahead logic
sits after the adder row and not in front of it.

**Rules this design adds:**

* Iteration 0 is always performed, because no earlier iteration exists to
  skip it from.
* A skip is allowed only while iteration i+1 is still inside the loop.
  Skipping the last iteration (K+1) ends the loop directly.

**Cost.** The loop takes `K + 2 - (skipped iterations)` cycles: between 9
and 18 cycles for K = 16. Iterations cannot be skipped two in a row, so the
loop never takes fewer than `ceil((K+2)/2)` cycles. Uniformly random operands
skip few iterations: about 0.7 of 18 per product on average. A multiplier with many
zero bits skips far more: 9 of 18 iterations when `A = 0`.

## Interface and timing

`mont_mul16_top` (parameter `K = 16`) places two engines side by side. Each
has its own handshake.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `mm_start` | in | 1 | start a product; samples `mm_a`, `mm_b`, `mm_n`; ignored while `mm_busy` |
| `mm_a`, `mm_b` | in | K+1 | operands, each below 2N |
| `mm_n` | in | K | odd modulus |
| `mm_busy` | out | 1 | product in progress |
| `mm_done` | out | 1 | one-cycle pulse; `mm_s` is valid and holds until the next result |
| `mm_s` | out | K+2 | result, below 2N |
| `add_start` | in | 1 | start a PASTA addition |
| `add_a`, `add_b` | in | K | addends |
| `add_busy`, `add_done` | out | 1 | same handshake as the multiplier |
| `add_sum` | out | K+1 | `add_a + add_b` |
| `add_steps` | out | clog2(K+2) | recursion steps the addition needed |

**Multiplier latency.** The count runs from the clock edge that samples
`mm_start` to the cycle in which `mm_done` is high:

    1 + (P + 1) + L + (C + 1) cycles

* `P`: two-step cycles in PRE (at least 1).
* `L`: loop cycles (9 to 18).
* `C`: two-step cycles in POST (may be 0).

A new start is accepted in the cycle in which `mm_done` is high. For K = 16
and uniformly random operands, the total averages about 25 cycles and
ranges from 13 to 32 (P up to 9, C up to 8).

**PASTA adder latency.** The adder finishes in `steps + 2` cycles. `steps`
is at most K; the longest case is `0xFFFF + 1`.

## The PASTA adder (`pasta_adder`)

The adder starts with `S = a ^ b` and `C = (a & b) << 1`. Each clock cycle
it then computes:

    S' = S ^ C
    C' = (S & C) << 1

It stops when every carry is zero, including the carry out of the top bit.
The original adder is self-timed: each bit settles as soon as its inputs
allow. This version is synchronous: one recursion step is one clock cycle,
and completion is sampled on the clock edge. The half-adder row
(`pasta_ha_row`) is shared with `ccsa`.

## Module hierarchy

```
mont_mul16_top
├── scs_mm_new      multiplier: registers, phase controller (mmm_pkg::mm_state_e)
│   ├── sm3_mux     x = 0 / N / B / D from (A^, q^)
│   ├── ccsa        configurable carry-save row
│   │   └── pasta_ha_row x2
│   ├── zero_d      SC == 0
│   └── skip_ctrl   look-ahead q and skip
│       └── q_l x2  quotient bit
└── pasta_adder     stand-alone clocked PASTA adder
    ├── pasta_ha_row
    └── zero_d
```

`mmm_pkg` holds the phase enum and the operand-select encoding.

## Where this design makes its own choices

The following follows a published description of the architecture:

* the overall algorithm;
* the reuse of the carry-save row for `B + N` and for the final conversion;
* the two-step mode;
* the NOR zero detector;
* the simplified operand multiplexer;
* the skip rule.

That description does not give the following, so this design chooses them:

* **Operand range.** Operands below 2N, R = 2^(K+2), registers of K+2 bits.
* **Operand-select mapping.** The AND-OR form of the multiplexer and the
  mapping from `(A, q)` to `x`.
* **Inside of a CCSA bit slice.** Two half adders with a 2:1 select in front
  of the second one.
* **Skip boundaries.** Iteration 0 is always performed; skips stop at the
  end of the loop.
* **Reset and handshake.** Synchronous active-low reset and the
  start/busy/done handshake.
* **Completion check.** Sampled on the register at the start of each cycle,
  so finding `SC = 0` costs one cycle per phase.
* **Clocked PASTA.** The adder is synchronous rather than self-timed.

**Not modelled.** There is no gate-level timing. The delay arguments behind
the architecture are not modelled. Examples are the simplified multiplexer
being about as fast as a 3:1 multiplexer, and the added select costing less
than an XOR.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* **`tb_mont_mul16_top`** (all parameters at their defaults) runs about 150
  random and corner products, plus six modular exponentiations `x^e mod N`
  with 16-bit exponents. The exponentiations use only chained Montgomery
  products and are compared with square-and-multiply on integers. An
  addition stream runs at the same time on the PASTA adder. The testbench
  counts each mechanism and fails if one never happened:
  * skipped and executed iterations, including a skip of the last iteration;
  * all four operand selections;
  * PRE and POST two-step cycles, and a POST with no step;
  * a start ignored while busy;
  * PASTA additions with zero steps and with K steps.
* **`tb_scs_mm_new`** checks about 400 products. Each result must satisfy
  `S * 2^18 == A*B (mod N)` and `S < 2N`. The exact cycle count is compared
  with a bit-level model of the algorithm written on integers.
* **`tb_pasta_adder`** compares sums, recursion step counts and latency with
  a model.
* The combinational blocks are tested exhaustively (`q_l`, `skip_ctrl`) or
  with random vectors against the arithmetic they must satisfy.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mmm_pkg.sv \
          tb/tb_mont_mul16_top.sv --top-module tb_mont_mul16_top -o sim
./obj_dir/sim
```

Every testbench finishes within seconds.

## Changing the size

`K` is a parameter all the way down, and the register widths follow from it.
For RSA-size moduli, set `K` on `mont_mul16_top` to the modulus width, for
example 1024. Two costs grow with it:

* the loop grows linearly, to `K+2` cycles minus the skips;
* PRE and POST take up to about K/2 cycles each in the worst case, which is
  one long carry chain.

The testbenches model values with 64-bit integers. They work for K up to
about 20; larger sizes need wider reference arithmetic.
