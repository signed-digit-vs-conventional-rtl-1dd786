// sign_select_mux: the sign-select cell, the basic node of every carry path.
//
// When the digit (or group) is zero, r = 1 and the incoming carry/borrow c_in
// passes through; otherwise the sign t of the digit dominates:
//   c_out = r ? c_in : t      ( = not(r)&t | r&c_in )
// In the original circuit this is a pair of transmission gates driven by r and
// its complement; here it is a plain 2:1 multiplexer. Combinational.
module sign_select_mux (
  input  logic r,      // zero indicator of the digit / group (select)
  input  logic t,      // sign of the digit / group
  input  logic c_in,   // incoming carry/borrow
  output logic c_out   // outgoing carry/borrow
);

  always_comb c_out = r ? c_in : t;

endmodule
