// inv_sign_select_mux: sign-select cell in its inverting, actively restoring
// form. It receives the complements of the incoming carry and of the sign and
// returns the true outgoing carry:
//   c_out = not( r ? c_in_n : t_n ) = r ? c_in : t
// In CMOS this is one complex gate (two series p-pairs over two series n-pairs)
// that restores the signal level instead of passing it through transmission
// gates. The carry generator of the least significant block uses it right after
// the inverting majority gate, which delivers the complemented carry.
// Combinational.
module inv_sign_select_mux (
  input  logic r,       // zero indicator (select)
  input  logic t_n,     // complement of the sign
  input  logic c_in_n,  // complement of the incoming carry
  output logic c_out    // outgoing carry, true polarity
);

  always_comb c_out = ~(r ? c_in_n : t_n);

endmodule
