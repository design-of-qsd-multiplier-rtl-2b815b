// qsd_digit_mult: single-digit QSD multiplier.
//
// Multiplies two QSD digits a and b (each -3..3) and recodes the product
// p = a*b (-9..9) as a carry c and a product digit m with p = 4*c + m. Both c
// and m stay within -2..2, so the digit product can be handed to the carry-free
// adder without further carry rippling. The recoding is the one of the
// multiplier's truth table: |p| <= 2 gives c = 0; 3 -> (1,-1), 4 -> (1,0),
// 6 -> (1,2), 9 -> (2,1), and the mirror image for negative products. In
// closed form c = sign(p) * floor((|p|+1)/4) and m = p - 4*c, which is how the
// table is written here. The 3-bit code of both outputs is two's complement.
//
// Purely combinational, no clock, zero cycles of latency. The truth table and
// the output codes follow the source design; the closed-form rule is only a
// compact way of writing the same table.
module qsd_digit_mult
  import qsd_pkg::*;
(
  input  qsd_digit_t a,  // multiplicand digit Ai
  input  qsd_digit_t b,  // multiplier digit Bi
  output qsd_digit_t c,  // carry Ci, -2..2, weight 4
  output qsd_digit_t m   // product digit Mi, -2..2
);

  logic signed [4:0] p;      // full product, -9..9
  logic        [3:0] mag;    // |p|, 0..9
  logic        [1:0] cmag;   // |c|, 0..2

  always_comb begin
    p    = 5'(a) * 5'(b);
    mag  = p[4] ? 4'(-p) : 4'(p);
    cmag = 2'((mag + 4'd1) >> 2);
    c    = p[4] ? qsd_digit_t'(-$signed({1'b0, cmag}))
                : qsd_digit_t'({1'b0, cmag});
    m    = qsd_digit_t'(p - 5'(4 * c));
  end

endmodule
