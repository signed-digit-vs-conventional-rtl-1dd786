// sd_adder_pkg: types and the group operator shared by the sign-select adder.
//
// Every digit of the intermediate signed-digit result y_i = a_i - not(b_i),
// and every group of digits, is carried as a pair (R, T):
//   R = 1 when the digit (or every digit of the group) is zero, so an incoming
//         carry/borrow passes straight through;
//   T = the sign of the most significant non-zero digit, which dominates the
//         incoming carry/borrow when R = 0.
// The encoding is (T12, R1) of the optimal set: R_i = a_i xor b_i, T_i = b_i.
// With it, logic 0 on T or on a carry/borrow wire means a borrow of -1 and
// logic 1 means no borrow, so the carry wires carry exactly the value of an
// ordinary binary carry. The adder is purely combinational.
//
// sel_op() is the multiplexer form of the carry operator,
//   (R, T) op (R~, T~) = (R & R~,  R ? T~ : T),
// which combines an upper group with the adjacent lower group; applied to
// (1, c_j) it yields the carry out of the upper group.
package sd_adder_pkg;

  // Zero-indicator / sign pair of one digit or one group of digits.
  typedef struct packed {
    logic r;  // 1: all digits zero, propagate the incoming carry
    logic t;  // sign of the most significant non-zero digit
  } rt_t;

  // Combine an upper group `hi` with the adjacent lower group `lo`.
  function automatic rt_t sel_op(rt_t hi, rt_t lo);
    rt_t res;
    res.r = hi.r & lo.r;
    res.t = hi.r ? lo.t : hi.t;
    return res;
  endfunction

endpackage
