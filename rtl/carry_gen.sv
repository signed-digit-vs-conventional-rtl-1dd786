// carry_gen: Carry Generator (CG) of the least significant block. It replaces
// that block's SSC so the adder can take a variable external carry-in without
// lengthening the critical path.
//
// An inverting majority gate forms not(c1) = not(maj(a0, b0, c_in)) in about the
// time the digit cells need for their XOR/XNOR pair. An inverting sign-select
// multiplexer on digit 1 turns it into the true c2 = R1 ? c1 : T1. Then, for
// k = 1 .. log2(B)-1, the group pair of digits [2^(k+1)-1 : 2^k] (an SSC of
// size 2^k) selects c_(2^(k+1)) = R ? c_(2^k) : T. For B = 4 that is one
// 2-digit SSC (M2 on digits 3:2) and the multiplexer M3 producing c4, as in the
// paper; the loop for other powers of two is this design's generalisation.
// Output c_out is the true carry out of the block (c_B), the carry into block 1.
// Combinational.
module carry_gen #(
  parameter int unsigned B = 4  // block size in digits, a power of two >= 2
) (
  input  logic         a0,     // operand A bit 0
  input  logic         b0,     // operand B bit 0
  input  logic         c_in,   // external carry-in
  input  logic [B-1:0] r,      // zero indicators of the block's digits
  input  logic [B-1:0] t,      // signs of the block's digits
  output logic         c_out   // carry out of the block, c_B
);

  localparam int unsigned L = $clog2(B);

  logic c1_n;                // complemented carry into digit 1
  logic [L:1] c_pow;         // c_pow[k] = carry into digit 2^k

  // Inverting majority gate.
  always_comb c1_n = ~((a0 & b0) | (a0 & c_in) | (b0 & c_in));

  // Inverting multiplexer on digit 1: c2 = R1 ? c1 : T1.
  inv_sign_select_mux u_m1 (.r(r[1]), .t_n(~t[1]), .c_in_n(c1_n), .c_out(c_pow[1]));

  for (genvar k = 1; k < L; k++) begin : g_lvl
    localparam int unsigned LO = 1 << k;
    logic r_g, t_g;
    ssc #(.B(LO)) u_grp (.r(r[2*LO-1:LO]), .t(t[2*LO-1:LO]), .r_grp(r_g), .t_grp(t_g));
    sign_select_mux u_m (.r(r_g), .t(t_g), .c_in(c_pow[k]), .c_out(c_pow[k+1]));
  end

  always_comb c_out = c_pow[L];

  // r[0] and t[0] are not needed: digit 0's carry comes from the majority gate.
  logic unused_digit0;
  always_comb unused_digit0 = r[0] ^ t[0];

  initial begin
    assert (B >= 2 && (B & (B - 1)) == 0)
      else $fatal(1, "carry_gen: B must be a power of two, at least 2");
  end

endmodule
