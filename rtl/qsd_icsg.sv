// qsd_icsg: intermediate carry and sum generator, the first step of the
// carry-free QSD adder.
//
// Adds two digits a and b (each -3..3, the sum -6..6) and splits the sum s as
// s = 4*ic + is with an intermediate carry ic in -1..1 and an intermediate
// sum is in -2..2. The split follows the adder's truth table: sums from -2 to
// 2 keep ic = 0; sums from 3 to 6 give ic = 1 and is = s-4; sums from -6 to -3
// give ic = -1 and is = s+4. Keeping |is| <= 2 and |ic| <= 1 is what lets the
// second step absorb the incoming carry without producing a new one.
//
// Combinational, zero latency. ic is 2-bit and is 3-bit two's complement, as in
// the source design's binary table.
module qsd_icsg
  import qsd_pkg::*;
(
  input  qsd_digit_t  a,   // addend digit
  input  qsd_digit_t  b,   // augend digit
  output qsd_icarry_t ic,  // intermediate carry, weight 4
  output qsd_digit_t  is   // intermediate sum, -2..2
);

  logic signed [3:0] s;    // a + b, -6..6

  always_comb begin
    s = 4'(a) + 4'(b);
    if (s >= 4'sd3) begin
      ic = 2'sd1;
      is = qsd_digit_t'(s - 4'sd4);
    end else if (s <= -4'sd3) begin
      ic = -2'sd1;
      is = qsd_digit_t'(s + 4'sd4);
    end else begin
      ic = 2'sd0;
      is = qsd_digit_t'(s);
    end
  end

endmodule
