// tb_qsd_icsg: exhaustive self-checking test of the intermediate carry and
// sum generator. All 49 digit pairs are applied and (ic, is) is compared with
// the split table of the adder's first step, written out here by sum value,
// and with the identity 4*ic + is = a + b. Combinational: checked within the
// clock period the inputs are applied in.
module tb_qsd_icsg;
  import qsd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  qsd_digit_t  a, b, is;
  qsd_icarry_t ic;

  qsd_icsg dut (.a(a), .b(b), .ic(ic), .is(is));

  function automatic void expect_split(input int s, output int ec, output int es);
    case (s)
       6: begin ec =  1; es =  2; end
       5: begin ec =  1; es =  1; end
       4: begin ec =  1; es =  0; end
       3: begin ec =  1; es = -1; end
       2: begin ec =  0; es =  2; end
       1: begin ec =  0; es =  1; end
       0: begin ec =  0; es =  0; end
      -1: begin ec =  0; es = -1; end
      -2: begin ec =  0; es = -2; end
      -3: begin ec = -1; es =  1; end
      -4: begin ec = -1; es =  0; end
      -5: begin ec = -1; es = -1; end
      -6: begin ec = -1; es = -2; end
      default: begin ec = 99; es = 99; end
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
    int ec, es;
    for (int ia = -3; ia <= 3; ia++) begin
      for (int ib = -3; ib <= 3; ib++) begin
        @(negedge clk);
        a = qsd_digit_t'(ia);
        b = qsd_digit_t'(ib);
        #1;
        expect_split(ia + ib, ec, es);
        checks++;
        if (int'(ic) != ec || int'(is) != es) begin
          failures++;
          $display("FAIL a=%0d b=%0d: got ic=%0d is=%0d, expected ic=%0d is=%0d",
                   ia, ib, ic, is, ec, es);
        end
        checks++;
        if (4 * int'(ic) + int'(is) != ia + ib) begin
          failures++;
          $display("FAIL a=%0d b=%0d: 4ic+is=%0d", ia, ib, 4 * int'(ic) + int'(is));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
