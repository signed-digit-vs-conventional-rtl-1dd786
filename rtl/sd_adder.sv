// sd_adder: W-bit two-operand adder built on an intermediate signed-digit
// result and multiplexer (sign-select) carry logic.
//
// A + B is rewritten as A - not(B) - 1 (mod 2^W). The bitwise difference
// y_i = a_i - not(b_i) is a signed digit in {-1, 0, +1} formed independently in
// every position (digit_cell: R_i = a_i xor b_i marks a zero digit, T_i = b_i is
// its sign). The "-1" is the forced borrow into position 0; with the chosen
// encoding a borrow of -1 is logic 0, so the external carry-in c_in enters with
// ordinary carry meaning (0: A + B, 1: A + B + 1). Converting the signed-digit
// vector back to two's complement is a borrow propagation that obeys the same
// recursion as a carry, c_(i+1) = R_i ? c_i : T_i, so every carry wire below
// equals the ordinary binary carry.
//
// Structure (carry look-ahead combined with carry select), N = W / B blocks:
//   - W digit cells;
//   - block 0: carry generator (carry_gen) forming c_B from a0, b0, c_in and
//     the block's digits; blocks 1..N-1: an SSC each, giving (R, T) of the
//     block;
//   - a fan-in-two look-ahead tree (lookahead_tree) over those block signals,
//     giving the carry into every block and the carry out c_W;
//   - per block, two ripple-carry blocks (carry-in 0 and 1) and a block
//     multiplexer selecting by the true carry into the block (c_in for block 0).
// overflow = c_W xor c_(W-1), as for ordinary two's complement addition; c_(W-1)
// is recovered from the selected top sum bit as d_(W-1) xor R_(W-1).
//
// Defaults W = 32, B = 4 are the paper's main configuration (its block size
// table gives 2 for 8 and 16 bits, 4 for 32 to 128 bits, 8 for 256 bits). The
// adder is purely combinational: there is no clock, and a result is valid one
// propagation delay after the operands. Requirements: B a power of two >= 2,
// W a multiple of B with W / B >= 2.
module sd_adder #(
  parameter int unsigned W = 32,  // word length
  parameter int unsigned B = 4    // ripple-carry block size
) (
  input  logic [W-1:0] a,         // operand A (two's complement or unsigned)
  input  logic [W-1:0] b,         // operand B
  input  logic         c_in,      // carry-in (1 adds one more ulp)
  output logic [W-1:0] sum,       // A + B + c_in mod 2^W
  output logic         c_out,     // carry out of the MSB, c_W
  output logic         overflow   // two's complement overflow
);

  localparam int unsigned N = W / B;

  // Leaf cells.
  logic [W-1:0] r, r_n, t;
  for (genvar i = 0; i < W; i++) begin : g_digit
    digit_cell u_cell (.a(a[i]), .b(b[i]), .r(r[i]), .r_n(r_n[i]), .t(t[i]));
  end

  // Group signals. Element 0 holds (R = 0, T = carry out of block 0), so the
  // tree's prefix signs are the true block carries.
  logic [N-1:0] r_grp, t_grp;
  logic [N-1:0] pr, pt;

  carry_gen #(.B(B)) u_cg (
    .a0(a[0]), .b0(b[0]), .c_in(c_in),
    .r(r[B-1:0]), .t(t[B-1:0]),
    .c_out(t_grp[0])
  );
  assign r_grp[0] = 1'b0;

  for (genvar g = 1; g < N; g++) begin : g_ssc
    ssc #(.B(B)) u_ssc (
      .r(r[g*B +: B]), .t(t[g*B +: B]),
      .r_grp(r_grp[g]), .t_grp(t_grp[g])
    );
  end

  lookahead_tree #(.N(N)) u_tree (.r(r_grp), .t(t_grp), .pr(pr), .pt(pt));

  // Carry into every block.
  logic [N-1:0] c_blk;
  always_comb c_blk = {pt[N-2:0], c_in};

  // Carry-select sum blocks.
  for (genvar g = 0; g < N; g++) begin : g_blk
    logic [B-1:0] d_c0, d_c1;
    rca_block #(.B(B)) u_rca0 (.r(r[g*B +: B]), .t(t[g*B +: B]), .c_in(1'b0), .d(d_c0));
    rca_block #(.B(B)) u_rca1 (.r(r[g*B +: B]), .t(t[g*B +: B]), .c_in(1'b1), .d(d_c1));
    block_mux #(.B(B)) u_bm (.d_c0(d_c0), .d_c1(d_c1), .c_blk(c_blk[g]), .d(sum[g*B +: B]));
  end

  always_comb begin
    c_out    = pt[N-1];
    overflow = pt[N-1] ^ (sum[W-1] ^ r[W-1]);
  end

  // The complement rails and the prefix zero indicators are transistor-level
  // details of the original circuit; the multiplexers here select on r alone.
  logic unused_sig;
  always_comb unused_sig = ^{r_n, pr};

  initial begin
    assert (W % B == 0 && W / B >= 2)
      else $fatal(1, "sd_adder: W must be a multiple of B with at least two blocks");
  end

endmodule
