// tb_qsd_step2_adder: exhaustive self-checking test of the second step adder.
// All 15 legal input pairs (carry -1..1, intermediate sum -2..2) are applied
// and the result digit is compared with their sum, which must lie in -3..3.
// Combinational: checked within the clock period the inputs are applied in.
module tb_qsd_step2_adder;
  import qsd_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  qsd_icarry_t cin;
  qsd_digit_t  is, s;

  qsd_step2_adder dut (.cin(cin), .is(is), .s(s));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int ic = -1; ic <= 1; ic++) begin
      for (int isv = -2; isv <= 2; isv++) begin
        @(negedge clk);
        cin = qsd_icarry_t'(ic);
        is  = qsd_digit_t'(isv);
        #1;
        checks++;
        if (int'(s) != ic + isv) begin
          failures++;
          $display("FAIL cin=%0d is=%0d: got %0d, expected %0d", ic, isv, s, ic + isv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
