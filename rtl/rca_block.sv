// rca_block: ripple-carry block of B digits for a fixed assumed carry-in.
//
// The carry ripples through a chain of sign-select multiplexers,
//   c_(i+1) = R_i ? c_i : T_i,
// starting from c_in, and each sum bit is d_i = R_i xor c_i. The adder places
// two of these per block, one with c_in = 0 and one with c_in = 1, so both
// candidate sums are ready when the look-ahead tree delivers the real carry.
// The carry out of the last digit is not formed here: the look-ahead tree
// provides it. Combinational, B-1 multiplexers plus one XOR deep.
module rca_block #(
  parameter int unsigned B = 4  // block size in digits
) (
  input  logic [B-1:0] r,     // per-digit zero indicators (a xor b)
  input  logic [B-1:0] t,     // per-digit signs (b)
  input  logic         c_in,  // assumed carry into the block
  output logic [B-1:0] d      // sum bits of the block
);

  logic [B-1:0] c;  // c[i] = carry into digit i

  assign c[0] = c_in;

  for (genvar i = 0; i < B - 1; i++) begin : g_chain
    sign_select_mux u_mux (.r(r[i]), .t(t[i]), .c_in(c[i]), .c_out(c[i+1]));
  end

  always_comb d = r ^ c;

  // The sign of the last digit only matters for the block carry out, which the
  // look-ahead tree forms.
  logic unused_msb_sign;
  always_comb unused_msb_sign = t[B-1];

endmodule
