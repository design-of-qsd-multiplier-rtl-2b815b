// qsd_step2_adder: second step of the carry-free QSD adder.
//
// Adds the intermediate carry arriving from the next lower digit (cin, -1..1)
// to the intermediate sum of this digit (is, -2..2). The result lies in -3..3
// and so is always a single QSD digit: this step never produces a carry, which
// is why the whole adder has a delay that does not grow with its width.
//
// Combinational, zero latency; a 5-bit input, 3-bit two's complement output,
// as in the source design. The 15-row table of the source design is exactly
// signed addition over this input range, which is how it is written here.
module qsd_step2_adder
  import qsd_pkg::*;
(
  input  qsd_icarry_t cin,  // intermediate carry from digit i-1
  input  qsd_digit_t  is,   // intermediate sum of digit i
  output qsd_digit_t  s     // result digit, -3..3
);

  always_comb s = qsd_digit_t'(3'(cin) + is);

endmodule
