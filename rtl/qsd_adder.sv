// qsd_adder: N-digit carry-free QSD adder.
//
// Adds two N-digit QSD numbers a and b and returns the (N+1)-digit sum. Every
// digit position has an intermediate carry and sum generator (qsd_icsg) that
// splits a[i]+b[i] into a carry ic[i] (-1..1) and a sum is[i] (-2..2), and a
// second step adder (qsd_step2_adder) that adds ic[i-1] to is[i]. Digit 0 gets
// no carry in; the top result digit N is the carry of digit N-1. No carry
// travels further than one digit, so the delay is two digit stages whatever N
// is.
//
// Combinational, zero latency. The structure follows the source design; the
// default width of 128 digits is the largest operand size it names for the
// carry-free adder.
module qsd_adder
  import qsd_pkg::*;
#(
  parameter int unsigned N = 128  // digits per operand
)(
  input  qsd_digit_t [N-1:0] a,
  input  qsd_digit_t [N-1:0] b,
  output qsd_digit_t [N:0]   s    // a + b, N+1 digits
);

  qsd_icarry_t [N-1:0] ic;   // intermediate carries
  qsd_digit_t  [N-1:0] is;   // intermediate sums

  for (genvar i = 0; i < N; i++) begin : g_digit
    qsd_icsg u_icsg (
      .a  (a[i]),
      .b  (b[i]),
      .ic (ic[i]),
      .is (is[i])
    );

    qsd_step2_adder u_step2 (
      .cin ((i == 0) ? qsd_icarry_t'(0) : ic[(i == 0) ? 0 : i-1]),
      .is  (is[i]),
      .s   (s[i])
    );
  end

  // The top digit is the carry out of the last position, sign-extended.
  assign s[N] = qsd_digit_t'(ic[N-1]);

endmodule
