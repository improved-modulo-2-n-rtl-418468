# Modulo (2^n + 1) multiplier and a round-iterative IDEA core

IDEA, the block cipher, mixes three operations on 16-bit words: XOR,
addition modulo 2^16, and multiplication modulo 2^16 + 1 in which the word
0 stands for 2^16. The multiplication is by far the largest and slowest of
the three, and three multiplications lie one after the other on the path
through a round. This RTL implements the multiplier structure described in
"Improved Modulo (2^n + 1) Multiplier for IDEA", for any width n from 2 to
32 (16 by default), and an IDEA core that reuses one round of hardware
built from four of these multipliers.

The multiplier's main idea is to keep the zero operand off the critical
path. A zero operand (meaning 2^n) is rare and makes the product easy to
compute, so a small separate circuit handles it, in parallel with the main
multiplier. The main multiplier only has to be right for non-zero operands.
Its n x n partial product matrix costs a single AND gate of delay. The
matrix, plus one constant row, is summed by a tree of modulo carry-save
adders. A modulo carry-lookahead adder then adds the resulting two vectors
and reduces the sum modulo 2^n + 1 in one pass. Each of the two circuits
outputs all zeros when the other one applies, so n OR gates merge them.

## Arithmetic modulo 2^n + 1

The rule behind every block is 2^n = -1 (mod 2^n + 1). A bit that would
land at weight 2^(n+k) can be moved to weight 2^k with its sign flipped.
In hardware, negation is inversion plus a correction: -b = ~b - 1 for a
bit b. So every folded-and-inverted bit adds an excess that is known in
advance:

* **Partial product row j** is X shifted left by j positions and ANDed with
  y_j. Its top j bits are folded to the bottom and inverted (column k holds
  x_(k-j) & y_j for k >= j and ~(x_(n+k-j) & y_j) for k < j). The row is
  worth y_j X 2^j + (2^j - 1). Taken together, the rows are worth
  X Y + (2^n - 1 - n).
* **A carry-save adder row** (n full adders) produces a carry out of its
  top bit at weight 2^n. That carry is inverted and placed at bit 0 of the
  carry vector. This adds exactly +1 to the value carried.
* **The final adder** feeds its inverted carry out back as the carry in.
  This adds +1 again.

A tree that reduces n + 1 rows to two uses n - 1 full-adder rows. The
constant row K must therefore satisfy
K + (2^n - 1 - n) + (n - 1) + 1 = 0 (mod 2^n + 1). That gives **K = 2 for
every n**. The structure only says that "a constant" is added as an extra
row of the matrix. The value 2 is derived here and is checked exhaustively
for n <= 8.

The same bookkeeping explains why the main path is harmless when an
operand is zero. All AND terms are then 0, so the rows, the constant and
the corrections add up to 0 * Y = 0. The final adder produces an n-bit
zero, so the OR with the zero-case result passes that result unchanged.

## The multiplier, block by block

```
 x ─┬──────────────► zero_case_handler ─────────────────────┐
 y ─┼─┬────────────►                                        OR ──► p
    └─┴─► mod_ppg ─► n rows ─┐                              │
                 K = 2 ──────┴► mod_csa_tree ─► sum, carry ─► mod_cla
```

| module | what it does | delay (gate units, n = 16) |
|---|---|---|
| `mod_ppg` | n x n matrix, wrapped bits inverted | 1 |
| `mod_csa_tree` | Wallace tree of modulo CSAs, n + 1 rows to 2 | 6 full-adder levels |
| `mod_cla` | modulo 2^n + 1 carry-lookahead adder | 2 lookahead levels |
| `zero_case_handler` | product when an operand is 0; uses `special_adder` | off the critical path |
| `modmul` | the above plus the final n OR gates | |

**Wallace tree (`mod_csa_tree`).** Each level takes its rows three at a
time, and each triple becomes a sum row and a carry row. Rows left over at
a level pass straight through. A level with r rows therefore leaves
r - floor(r/3). For 17 rows the tree goes 17, 12, 8, 6, 4, 3, 2: six
levels. The package function `csa_levels` computes the depth. A testbench
checks it against the published table of stage counts for 3 to 64 rows.
Each level of the tree is its own generate block, so every wire has a
single level as its source.

**Modulo lookahead adder (`mod_cla`).** The carry network is built on
bit generate g_i = a_i b_i and bit propagate p_i = a_i + b_i (OR). It works
on groups of four:

* The first level forms, inside every 4-bit group, the generate and
  propagate from the group's lowest bit up to every bit.
* Each further level joins four neighbouring groups, written out as a sum
  of products over the lower groups' terms. For n = 16 the second level has
  three blocks, for bits 4-7, 8-11 and 12-15.

After ceil(log4 n) levels, every bit has g(i,0) and p(i,0).

The carry out of the top bit is g(n-1,0). It is inverted and becomes the
carry into bit 0. Every other carry is then c_i = g(i-1,0) + p(i-1,0)
~g(n-1,0), and the sum is s_i = (a_i XOR b_i) XOR c_i. The result is
(a + b + 1) mod (2^n + 1), with the value 2^n given as 0. That is exactly
the IDEA convention, so no conversion is needed.

The sum uses the XOR half-sum even though the propagate is defined as an
OR. With an OR, the sum is wrong whenever both bits are 1.

**Zero-case handler.** The handler works as follows:

1. If x = 0, the product is -y mod (2^n + 1) = 2^n + 1 - y. Taken modulo
   2^n this is ~y + 2. It gives 0 (that is, 2^n) for y = 1, and 1 when y is
   also 0.
2. The operands are bitwise NORed. This yields ~y when x = 0, ~x when
   y = 0, and all ones when both are 0.
3. `special_adder` adds 2. It is an incrementer of bits 1..n-1 with the
   same radix-4 lookahead, using propagate terms only.
4. The NAND of the two operands' OR-reductions gates the result through a
   row of AND gates. The handler's output is therefore zero whenever both
   operands are non-zero.

## The IDEA core (`idea_core`)

One IDEA round is built once and used nine times. The first eight passes
are the full rounds. The ninth pass uses only the first stage, for the
output transformation. The round is cut into four pipeline stages, with one
multiplier in each of the first three:

| stage | work | subkeys of round r |
|---|---|---|
| 1 | s0 = X0 * K0, s1 = X1 + K1, s2 = X2 + K2, s3 = X3 * K3 | 6r .. 6r+3 |
| 2 | t_a = (s0 ^ s2) * K4 | 6r+4 |
| 3 | t_b = ((s1 ^ s3) + t_a) * K5 | 6r+5 |
| 4 | t_c = t_a + t_b; X' = (s0^t_b, s2^t_b, s1^t_c, s3^t_c) | |

Here `*` is `modmul`, `+` is addition mod 2^16 and `^` is XOR. The four
stage registers form a ring: stage 4 feeds stage 1. Each register carries
its block's round count, so every stage picks its own subkeys. After eight
rounds the block enters stage 1 one more time. Stage 1 swaps its two adder
inputs and computes Y = (X0 * K48, X2 + K49, X1 + K50, X3 * K51), which
undoes the exchange of the last round. The result leaves from the stage-1
register, and the slot continues round the ring empty. A new block is
accepted whenever the slot arriving from stage 4 is empty.

Decryption is the same process run with the decryption subkeys. Those are
the multiplicative and additive inverses of the encryption subkeys, in
reverse order.

**Ports.**

* `clk`, `rst_n`: the clock, and an asynchronous active-low reset that
  clears all four stage registers.
* `in_valid`, `in_ready`, `in_block[63:0]`: the input handshake. A block
  is accepted at a rising edge where both `in_valid` and `in_ready` are
  high. Word 0 of the block is in bits 63:48.
* `subkey[52]`: the subkeys, as an array of 16-bit words. They must stay
  stable while blocks that use them are in flight.
* `out_valid`, `out_block[63:0]`: `out_valid` is high for one cycle while
  `out_block` holds a result. The output cannot apply back-pressure.

**Timing.**

* A block accepted at edge c is in the stage-1 register, finished, from
  edge c + 32 (8 rounds x 4 stages). It can be sampled at edge c + 33.
* Up to four blocks are in flight. Four blocks accepted back to back come
  out in four consecutive cycles.
* Each slot needs 36 cycles per block: 32 for the rounds, 1 for the output
  transformation, and 3 to come back round to stage 1. The steady rate is
  therefore four blocks per 36 cycles, or 7.1 bits per clock.

The published CPLD implementation reports 66 Mb/s at 8.25 MHz, which is 8 bits
per clock (one block per 8 cycles, as if only the eight full rounds
counted). This core is about 11 % below that at equal clock.

The subkey schedule is not part of the core. The testbench contains a
behavioural model of the standard schedule, which rotates the 128-bit key
by 25 bits.

## How far to trust it, and where it departs

These parts follow the published multiplier structure:

* the partial product matrix;
* the modulo CSA with inverted end-around carry;
* the radix-4 modulo lookahead adder with feedback of the inverted carry
  out;
* the zero-case handler (NOR, special adder, OR-reductions, NAND, AND
  gates);
* the final OR merge;
* the use of one round of hardware, four pipeline stages and 8.5 passes.

These are choices of this implementation:

* the value of the constant row (derived above);
* the constant 2 of the special adder (derived from the zero-case
  arithmetic);
* the XOR half-sum in the final adder;
* the radix-4 scheme applied to widths that are not powers of 4;
* IDEA's round function, which comes from the cipher's standard
  definition;
* where the four pipeline cuts go;
* the ring of slots and its throughput;
* the handshake, the reset and the subkey port.

The delay and area numbers in the table above come from a gate-count model
in which a two-input gate is 1 and an XOR is 2. The RTL is plain
synthesizable logic and is not hand-mapped to gates, so a synthesis tool is
free to restructure it. Widths below 2 are not supported: the end-around
carry needs at least two bits.

## Verification

Every testbench is self-checking. It prints `TB_RESULT checks=N
failures=M` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_mod_ppg` | row values mod 2^n + 1 and the exact AND bits; n = 16 random, n = 4 exhaustive |
| `tb_mod_csa_tree` | sum + carry = rows + (rows - 2) mod 2^n + 1, for 17/4/3 rows |
| `tb_mod_cla` | (a + b + 1) mod 2^n + 1; n = 8, 5 exhaustive; n = 16, 20 random |
| `tb_special_adder` | v + 2 mod 2^n, exhaustive for n = 16 and 5 |
| `tb_zero_case_handler` | every y with x = 0 and vice versa; zero output for non-zero operands |
| `tb_modmul` | n = 16 corners and 200k random pairs; n = 8 and n = 4 exhaustive |
| `tb_modmul_sweep` | every width 2..32; tree depth against the published stage table |
| `tb_idea_core` | the core at default parameters, against a behavioural IDEA model |

`tb_idea_core` covers the core in these steps:

1. It checks its own reference model against the published test vector.
   The key is 0001 0002 ... 0008, the plaintext 0000 0001 0002 0003, and
   the ciphertext 11FB ED2B 0198 6DE5.
2. It runs that vector through the core and checks the latency.
3. It fills the ring and forces a stall, then checks the exact cycle count
   of 40 blocks.
4. It runs random keys and random blocks with random gaps, then a
   decryption, and finally an all-zero key. The zero key drives zero
   operands into the multipliers.

It counts stalls, full-ring cycles, output transformations, decryptions
and zero operands, and fails if any of them never happened.

To run one testbench with Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Irtl rtl/modmul_pkg.sv rtl/idea_pkg.sv \
    tb/tb_idea_core.sv --top-module tb_idea_core
./obj_dir/Vtb_idea_core
```

The other testbenches need only `rtl/modmul_pkg.sv` before them. Each one
runs in about a second, except `tb_modmul_sweep`, which compiles 31
multiplier widths and takes about a minute to build.

## Files

* `rtl/modmul_pkg.sv`: depth functions of the tree and the lookahead.
* `rtl/mod_ppg.sv`, `rtl/mod_csa_tree.sv`, `rtl/mod_cla.sv`,
  `rtl/special_adder.sv`, `rtl/zero_case_handler.sv`, `rtl/modmul.sv`:
  the multiplier, parameter `N` (default 16).
* `rtl/idea_pkg.sv`, `rtl/idea_core.sv`: the IDEA core (top level).
* `tb/`: one testbench per module, plus `tb_modmul_sweep`.
