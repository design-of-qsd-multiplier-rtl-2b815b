// qsd_ppg: N-digit QSD partial product generator.
//
// Forms the partial product a * b of an N-digit QSD number a and one QSD digit
// b. N single-digit multipliers (qsd_digit_mult) give, for every position i, a
// product digit m[i] and a carry c[i] of weight 4**(i+1), both in -2..2. The
// digit vector m and the carry vector c shifted up one place are then added
// by a carry-free QSD adder: position i adds m[i] to c[i-1] (a sum in -4..4),
// splits it into intermediate carry and sum, and absorbs the intermediate
// carry of position i-1. These are the three steps of carry-free
// multiplication of the source design.
//
// The result has N+1 digits. Position N of the adder only ever sees c[N-1]
// (-2..2), which never raises an intermediate carry, so the adder's extra top
// digit is always 0 and is left unused.
//
// Combinational, zero latency.
module qsd_ppg
  import qsd_pkg::*;
#(
  parameter int unsigned N = 2    // digits of the multiplicand
)(
  input  qsd_digit_t [N-1:0] a,   // multiplicand
  input  qsd_digit_t         b,   // one multiplier digit
  output qsd_digit_t [N:0]   pp   // a * b, N+1 digits
);

  qsd_digit_t [N-1:0] m;          // product digits
  qsd_digit_t [N-1:0] c;          // product carries
  qsd_digit_t [N:0]   m_ext;      // m with a zero top digit
  qsd_digit_t [N:0]   c_sh;       // c moved up one position
  qsd_digit_t [N+1:0] sum;        // adder result; sum[N+1] is always 0

  for (genvar i = 0; i < N; i++) begin : g_mult
    qsd_digit_mult u_mult (
      .a (a[i]),
      .b (b),
      .c (c[i]),
      .m (m[i])
    );
  end

  assign m_ext = {qsd_digit_t'(0), m};
  assign c_sh  = {c, qsd_digit_t'(0)};

  qsd_adder #(.N(N + 1)) u_add (
    .a (m_ext),
    .b (c_sh),
    .s (sum)
  );

  assign pp = sum[N:0];

endmodule
