# Sign-select adder: two-operand addition through an intermediate signed-digit result

This is a W-bit combinational two's complement adder (32 bits by default). It
adds by first forming a signed-digit difference and then converting that
difference back to binary with multiplexer carry logic. It implements the adder
architecture of D. S. Phatak and I. Koren, "Signed-Digit vs. Conventional
Intermediate Representations in Two Operand Adders". The structure follows that
paper closely. Where the paper leaves something open, the choice made here is
marked below.

## The idea

The sum is rewritten as

    A + B = A - not(B) - 1   (mod 2^W)

Bit by bit, `y_i = a_i - not(b_i)` is a signed digit in {-1, 0, +1}. Each digit
is formed from its own two operand bits, with no signal from the neighbouring
positions. Turning the digit vector back into two's complement is a *borrow*
propagation from the LSB:

- a zero digit passes the incoming borrow on;
- a non-zero digit decides the outgoing borrow by its sign.

The `-1` is the forced borrow into position 0.

That rule is a 2:1 multiplexer, the **sign-select** cell:

    c_(i+1) = R_i ? c_i : T_i

Here `R_i` is 1 when the digit is zero, and `T_i` is the digit's sign. The cell
has the same form as the ordinary carry recursion `c = G | P&c`. Groups of
digits combine with the same operator, so the multiplexers form a look-ahead
tree:

    (R, T) op (R~, T~) = (R & R~,  R ? T~ : T)

**The encoding is the main point.** A digit needs two bits. They are chosen so
that both come out of the operand bits as fast as possible:

| a_i b_i | digit y_i | R_i = a_i xor b_i | T_i = b_i |
|---------|-----------|-------------------|-----------|
| 0 0     | -1        | 0                 | 0         |
| 0 1     |  0        | 1                 | (ignored) |
| 1 0     |  0        | 1                 | (ignored) |
| 1 1     | +1        | 0                 | 1         |

The sign of a zero digit is never used, because the multiplexer passes the
incoming borrow instead. So operand bit `b_i` can serve as the sign bit as it
is: the leaf cell is a single XOR/XNOR pair.

With this choice, logic 0 on a sign wire or a borrow wire means "borrow of -1"
and logic 1 means "no borrow". Every carry wire in the adder then carries
exactly the value of an ordinary binary carry, and the sum bit is
`d_i = R_i xor c_i`.

In the end, the "signed-digit" adder and a conventional carry-look-ahead adder
compute the same function with the same recursion. The signed digits are only
an encoding of the per-bit intermediate result, just as (P, G) are.

Two polarity conventions are fixed here, and both match the cell's logic:

- `R = 1` marks a zero digit.
- `T = b` is 1 for a +1 digit.

The paper's prose in places states the opposite polarities for the encoding it
picks.

## Architecture

The adder combines carry look-ahead with carry select. It has `N = W / B`
blocks of `B` bits.

```
 a,b --> digit_cell x W --(R,T)--+--> ssc (blocks 1..N-1) --+
                                 |                          |
 a0,b0,c_in --> carry_gen (block 0) ------------- c_B ------+--> lookahead_tree
                                 |                                   |
                                 |                      carry into each block, c_W
                                 v                                   v
               rca_block(c=0), rca_block(c=1) per block --> block_mux --> sum
```

| Module | Role |
|---|---|
| `digit_cell` | Leaf cell: `R = a xor b`, `R_n = a xnor b`, `T = b`. |
| `sign_select_mux` | `c_out = R ? c_in : T`, the node of every carry path. |
| `inv_sign_select_mux` | The same function with complemented inputs. In CMOS it is one restoring complex gate. |
| `ssc` | Sign Select Circuit: reduces a block's B digits to the group pair `(R_{B-1:0}, T_{B-1:0})` with a binary tree of sign-select multiplexers. For B = 4 it is two 2-digit multiplexers (M1, M2) feeding a third (M3). |
| `carry_gen` | Carry Generator (CG), used in place of the SSC in block 0 so the adder accepts a variable carry-in. An inverting majority gate gives `not(c1)` from `a0, b0, c_in`. An inverting multiplexer gives `c2`, and the multiplexer chain then gives `c_B`. |
| `lookahead_tree` | Fan-in-two prefix tree over the block pairs. It gives the carry into every block and the carry out `c_W`. |
| `rca_block` | Ripple chain of sign-select multiplexers for one assumed carry-in. Each block has two of them, for carry-in 0 and carry-in 1. |
| `block_mux` | Picks one of the two ripple results by the true block carry. Block 0 uses `c_in` as its carry. |
| `sd_adder` | Top level. Also gives `overflow = c_W xor c_(W-1)`. |
| `sd_adder_pkg` | The `(R, T)` pair type and the group operator. |

### Why the carry generator exists

Block 0 has no tree input: its carry-in is the external `c_in`. If `c_in` had
to pass through the whole SSC, it would arrive late. The CG starts from the
majority of `a0, b0, c_in`, which is exactly `c1`. The inverting majority gate
is about as fast as the XOR/XNOR pair that every other leaf needs. After that,
`c1` replaces digit 0's sign in the block's multiplexer tree, so `c_B` arrives
no later than a normal block's group signals.

### Block size and tree

Block size trades ripple length against the number of block carries the tree
must produce. The paper's choices for each word length are:

| W | 8 | 16 | 32 | 64 | 128 | 256 |
|---|---|----|----|----|-----|-----|
| B | 2 | 2  | 4  | 4  | 4   | 8   |

The delay comparison in the paper also uses 8/4, 16/4, 32/8 and 64/8. The
defaults here are `W = 32`, `B = 4`. The tree always has fan-in two. Its exact
shape is not fixed by the paper. Here it is a divide-and-conquer prefix tree
(`lookahead_tree`, Sklansky arrangement, `ceil(log2 N)` node levels): each element of an
upper group combines with the last prefix of the neighbouring lower group.

## Interface and timing

```
module sd_adder #(int unsigned W = 32, int unsigned B = 4) (
  input  logic [W-1:0] a, b,
  input  logic         c_in,     // 1 adds one more; a + not(b) + 1 = a - b
  output logic [W-1:0] sum,      // a + b + c_in mod 2^W
  output logic         c_out,    // carry out of the MSB
  output logic         overflow  // signed overflow
);
```

- Purely combinational: no clock, no reset, no registers. The result is valid
  one propagation delay after the inputs change.
- The paper gives delays in gate units, not cycles. For 8/16/32/64 bits it
  estimates 6/7/8/9 gate delays under a simple unit-delay model. The RTL does
  not model gate delay.
- Constraints, checked at elaboration: `B` must be a power of two, at least 2.
  `W` must be a multiple of `B` with `W / B >= 2`.

## Where this RTL departs from the circuit

- **Transistor-level detail is abstracted.** The circuit uses transmission-gate
  multiplexers driven by both `R` and `not(R)`, and limits chains to 4 or 6
  series gates by inserting restoring stages. Here every node is a logical 2:1
  multiplexer. The complement rail `r_n` of `digit_cell` exists but is unused
  by the rest of the design.
- **Inverting multiplexer.** `inv_sign_select_mux` is used where the CG uses
  it. The alternative of using restoring inverting multiplexers throughout is
  not applied.
- **Generalisation.** `ssc` and `carry_gen` are drawn for B = 4. They are
  generalised here to any power of two (2, 4 and 8 are tested).
- **c_(W-1) for the overflow flag** is recovered as `sum[W-1] xor R_(W-1)`,
  instead of being routed out of the top ripple block.
- The baseline cells the paper compares against are not included:
  - the borrow-propagating signed-digit cell of the earlier Srinivas–Parhi
    adder;
  - the straight two's-complement-encoded digit cell.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`.

| Testbench | What it checks |
|---|---|
| `tb_digit_cell` | All 4 input pairs against the arithmetic digit value. |
| `tb_sign_select_mux`, `tb_inv_sign_select_mux` | Exhaustive. |
| `tb_ssc` | B = 4 exhaustive; B = 2 and B = 8 random. Checked against a scan for the most significant non-zero digit. |
| `tb_carry_gen` | B = 2 and B = 4 exhaustive, B = 8 random, against bit B of `a + b + c_in`. |
| `tb_rca_block` | B = 4 exhaustive, B = 8 random, against integer addition. |
| `tb_block_mux` | Random. |
| `tb_lookahead_tree` | N = 8 exhaustive (65536 patterns) and N = 7 random, against a prefix scan. |
| `tb_sd_adder` | The top at its defaults (32/4), about 20,000 directed and biased-random vectors, checked against `a + b + c_in` and the signed-overflow rule. |
| `tb_sd_adder_configs` | Every word-length/block-size pairing listed above, 3000 vectors each, up to 256 bits. |

`tb_sd_adder` also counts how often each mechanism occurs, and fails if one
never does:

- external carry-in;
- subtraction (`a + not(b) + 1`);
- overflow;
- carry out;
- a carry crossing all 32 digits;
- the CG passing its majority carry through zero digits;
- a whole block skipped by the tree;
- block multiplexers choosing each candidate.

Running a testbench with plain Verilator:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
  rtl/sd_adder_pkg.sv tb/tb_sd_adder.sv --top-module tb_sd_adder -o sim
./obj_dir/sim
```

Swap in any other `tb_*` for `tb_sd_adder`. To change the size, override the
parameters, for example `sd_adder #(.W(64), .B(4))`.
