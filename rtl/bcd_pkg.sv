// Shared types and constants of the BESC-BCD adder.
//
// A BCD digit is a 4-bit code 0..9. The first-stage adder of a digit produces
// a 5-bit binary sum (carry C0 above the 4-bit sum S) in the range 0..19 when
// both operands are valid digits and the carry in is 0 or 1. Sums above 9
// need the excess-six correction.
package bcd_pkg;

  typedef logic [3:0] bcd_digit_t;

  // Binary sum of one digit position: carry C0 and sum bits S3..S0.
  typedef struct packed {
    logic       c0;
    logic [3:0] s;
  } bin_sum_t;

endpackage
