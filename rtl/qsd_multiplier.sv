// qsd_multiplier: N-digit by N-digit QSD multiplier.
//
// Multiplies two N-digit QSD numbers a and b. One partial product generator
// (qsd_ppg) per multiplier digit forms pp[j] = a * b[j] with N+1 digits. The
// partial products, each moved up j digit positions, are summed by a chain of
// N-1 carry-free QSD adders (qsd_adder), each 2N digits wide. Because each
// addition is carry free, every adder in the chain costs the same constant
// delay whatever N is.
//
// Width argument: the running sum after adding pp[j] occupies at most N+2+j
// digits (N+1 for pp[0] alone), so the input to every adder fits in 2N digits
// and the top digit dropped between stages is always 0. The product has 2N+1
// digits; in a redundant code the top digit can be non-zero even when the
// value would fit in 2N digits.
//
// Combinational, zero latency. The partial product generator and the
// carry-free adder follow the source design; summing the partial products in
// a linear chain (rather than, for instance, a tree) is this design's choice.
// The default of 2 digits is the size of the multiplier the source design
// shows.
module qsd_multiplier
  import qsd_pkg::*;
#(
  parameter int unsigned N = 2      // digits per operand
)(
  input  qsd_digit_t [N-1:0] a,     // multiplicand
  input  qsd_digit_t [N-1:0] b,     // multiplier
  output qsd_digit_t [2*N:0] p      // a * b, 2N+1 digits
);

  qsd_digit_t [N-1:0][N:0]   pp;    // partial products
  qsd_digit_t [N-1:0][2*N:0] acc;   // running sums, acc[j] = sum of pp[0..j]

  for (genvar j = 0; j < N; j++) begin : g_pp
    qsd_ppg #(.N(N)) u_ppg (
      .a  (a),
      .b  (b[j]),
      .pp (pp[j])
    );
  end

  // pp[0] placed in the full product width.
  assign acc[0] = {{N{qsd_digit_t'(0)}}, pp[0]};

  for (genvar j = 1; j < N; j++) begin : g_sum
    qsd_digit_t [2*N-1:0] shifted;  // pp[j] moved up j digits

    assign shifted = {{(N-1){qsd_digit_t'(0)}}, pp[j]} << (3*j);

    qsd_adder #(.N(2 * N)) u_add (
      .a (acc[j-1][2*N-1:0]),
      .b (shifted),
      .s (acc[j])
    );
  end

  assign p = acc[N-1];

endmodule
