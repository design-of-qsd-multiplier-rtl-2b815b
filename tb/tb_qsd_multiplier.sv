// tb_qsd_multiplier: self-checking test of the N x N digit QSD multiplier.
// The default 2-digit instance is driven with every pair of 2-digit operands
// (49 x 49); a 5-digit instance gets random operands. The value of the
// (2N+1)-digit product must equal the product of the operand values, and
// every digit must be legal (-3..3). Combinational: checked within the clock
// period the inputs are applied in.
module tb_qsd_multiplier;
  import qsd_pkg::*;

  localparam int unsigned NW = 5;
  localparam int NRAND = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  qsd_digit_t [1:0] a2, b2;
  qsd_digit_t [4:0] p2;

  qsd_multiplier dut2 (.a(a2), .b(b2), .p(p2));

  qsd_digit_t [NW-1:0]   aw, bw;
  qsd_digit_t [2*NW:0]   pw;

  qsd_multiplier #(.N(NW)) dutw (.a(aw), .b(bw), .p(pw));

  function automatic longint value_of(input qsd_digit_t d[]);
    longint v = 0;
    for (int i = d.size() - 1; i >= 0; i--) v = v * 4 + longint'(d[i]);
    return v;
  endfunction

  task automatic check_p(input longint av, input longint bv, input qsd_digit_t got[]);
    longint gv = value_of(got);
    checks++;
    if (gv != av * bv) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d", av, bv, gv);
    end
    foreach (got[i]) begin
      checks++;
      if (got[i] == qsd_digit_t'(-4)) begin
        failures++;
        $display("FAIL illegal digit code at position %0d", i);
      end
    end
  endtask

  initial begin : watchdog
    repeat (2401 + NRAND + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    qsd_digit_t g[];
    qsd_digit_t oa[], ob[];
    for (int x = 0; x < 49; x++)
      for (int y = 0; y < 49; y++) begin
        @(negedge clk);
        a2 = {qsd_digit_t'(x / 7 - 3), qsd_digit_t'(x % 7 - 3)};
        b2 = {qsd_digit_t'(y / 7 - 3), qsd_digit_t'(y % 7 - 3)};
        #1;
        g = new[5];
        for (int i = 0; i < 5; i++) g[i] = p2[i];
        check_p(longint'(a2[1]) * 4 + longint'(a2[0]),
                longint'(b2[1]) * 4 + longint'(b2[0]), g);
      end
    for (int k = 0; k < NRAND; k++) begin
      @(negedge clk);
      oa = new[NW];
      ob = new[NW];
      for (int i = 0; i < NW; i++) begin
        aw[i] = qsd_digit_t'(int'($urandom_range(6)) - 3);
        bw[i] = qsd_digit_t'(int'($urandom_range(6)) - 3);
        oa[i] = aw[i];
        ob[i] = bw[i];
      end
      #1;
      g = new[2 * NW + 1];
      for (int i = 0; i <= 2 * NW; i++) g[i] = pw[i];
      check_p(value_of(oa), value_of(ob), g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
