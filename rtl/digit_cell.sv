// digit_cell: leaf cell that forms one digit of the intermediate signed-digit
// result y_i = a_i - not(b_i) in the (T12, R1) encoding.
//
// The digit is zero exactly when a_i and b_i differ, and then its sign does not
// matter; when a_i = b_i the digit is +1 for 1/1 and -1 for 0/0, so b_i itself
// is the sign. Hence
//   r   = a xor b   (zero indicator, the "sign-propagate" signal)
//   r_n = a xnor b  (its complement, needed by transmission-gate multiplexers)
//   t   = b         (sign bit, the "sign-generate" signal)
// No signal passes between digit positions. Purely combinational, one XOR/XNOR
// level of delay. The cell structure follows the paper; r_n is kept as a
// separate output because every sign-select multiplexer is drawn with both
// polarities of its select.
module digit_cell (
  input  logic a,    // operand A bit i
  input  logic b,    // operand B bit i
  output logic r,    // 1 when y_i = 0
  output logic r_n,  // complement of r
  output logic t     // sign of y_i when y_i /= 0 (1: +1, 0: -1)
);

  always_comb begin
    r   = a ^ b;
    r_n = ~(a ^ b);
    t   = b;
  end

endmodule
