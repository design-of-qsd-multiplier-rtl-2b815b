// qsd_pkg: types shared by the quaternary signed digit (QSD) arithmetic blocks.
//
// A QSD digit takes a value from -3 to 3 and is coded as a 3-bit two's
// complement number (3 = 011, 1 = 001, 0 = 000, -1 = 111, -3 = 101). The code
// 100 (-4) is not a digit and never appears on a valid bus. The intermediate
// carry of the adder's first step only takes -1, 0 or 1 and is coded in
// 2-bit two's complement. A multi-digit QSD number is a packed array of digits
// with digit 0 the least significant; its value is sum(d[i] * 4**i).
package qsd_pkg;

  // One QSD digit, -3..3, 3-bit two's complement.
  typedef logic signed [2:0] qsd_digit_t;

  // Intermediate carry of the first adder step, -1..1, 2-bit two's complement.
  typedef logic signed [1:0] qsd_icarry_t;

endpackage
