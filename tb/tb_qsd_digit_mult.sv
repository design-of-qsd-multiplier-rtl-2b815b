// tb_qsd_digit_mult: exhaustive self-checking test of the single-digit QSD
// multiplier. All 49 digit pairs are applied; the carry and product digit are
// compared with the recoding table of the design (written out here literally,
// product value by product value) and with the identity 4*c + m = a*b. The
// block is combinational, so every result is checked within the same clock
// period as its inputs (zero cycles of latency).
module tb_qsd_digit_mult;
  import qsd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  qsd_digit_t a, b, c, m;

  qsd_digit_mult dut (.a(a), .b(b), .c(c), .m(m));

  // Expected (carry, digit) for each product value.
  function automatic void expect_cm(input int p, output int ec, output int em);
    case (p)
      -9: begin ec = -2; em = -1; end
      -6: begin ec = -1; em = -2; end
      -4: begin ec = -1; em =  0; end
      -3: begin ec = -1; em =  1; end
      -2: begin ec =  0; em = -2; end
      -1: begin ec =  0; em = -1; end
       0: begin ec =  0; em =  0; end
       1: begin ec =  0; em =  1; end
       2: begin ec =  0; em =  2; end
       3: begin ec =  1; em = -1; end
       4: begin ec =  1; em =  0; end
       6: begin ec =  1; em =  2; end
       9: begin ec =  2; em =  1; end
      default: begin ec = 99; em = 99; end
    endcase
  endfunction

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int ec, em;
    for (int ia = -3; ia <= 3; ia++) begin
      for (int ib = -3; ib <= 3; ib++) begin
        @(negedge clk);
        a = qsd_digit_t'(ia);
        b = qsd_digit_t'(ib);
        #1;
        expect_cm(ia * ib, ec, em);
        checks++;
        if (int'(c) != ec || int'(m) != em) begin
          failures++;
          $display("FAIL a=%0d b=%0d: got c=%0d m=%0d, expected c=%0d m=%0d",
                   ia, ib, c, m, ec, em);
        end
        checks++;
        if (4 * int'(c) + int'(m) != ia * ib) begin
          failures++;
          $display("FAIL a=%0d b=%0d: 4c+m=%0d", ia, ib, 4 * int'(c) + int'(m));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
