// qsd_mult_top: binary-in, QSD-out multiplier.
//
// Two 2N-bit two's complement operands are converted to N-digit QSD numbers
// and multiplied by the N-digit QSD multiplier (qsd_multiplier). The product
// leaves in QSD form: 2N+1 digits of 3-bit two's complement code, with value
// sum(p[i] * 4**i).
//
// Conversion: each operand is split into bit pairs from the least significant
// end and every pair becomes one 3-bit digit code by gaining a sign bit. Pairs
// below the top get a 0 sign bit (digits 0..3). The top pair holds the
// operand's sign and is sign-extended (digit -2..1). The digits' weighted sum
// is exactly the operand's value, so the conversion is wiring only. Widening
// bit pairs to 3-bit digits before multiplying follows the source design;
// reading the operands as signed is this design's choice.
//
// Purely combinational: the product is valid one propagation delay after the
// operands change, with no clock or reset. The default N = 2 is the size of
// the multiplier the source design shows (two digits, 4-bit operands).
module qsd_mult_top
  import qsd_pkg::*;
#(
  parameter int unsigned N = 2                // QSD digits per operand
)(
  input  logic signed [2*N-1:0] a_bin,        // multiplicand, two's complement
  input  logic signed [2*N-1:0] b_bin,        // multiplier, two's complement
  output qsd_digit_t  [2*N:0]   p_qsd         // product in QSD, 2N+1 digits
);

  qsd_digit_t [N-1:0] a_qsd;                  // multiplicand in QSD
  qsd_digit_t [N-1:0] b_qsd;                  // multiplier in QSD

  for (genvar i = 0; i < N - 1; i++) begin : g_conv
    assign a_qsd[i] = {1'b0, a_bin[2*i+1 -: 2]};
    assign b_qsd[i] = {1'b0, b_bin[2*i+1 -: 2]};
  end

  assign a_qsd[N-1] = {a_bin[2*N-1], a_bin[2*N-1 -: 2]};
  assign b_qsd[N-1] = {b_bin[2*N-1], b_bin[2*N-1 -: 2]};

  qsd_multiplier #(.N(N)) u_mult (
    .a (a_qsd),
    .b (b_qsd),
    .p (p_qsd)
  );

endmodule
