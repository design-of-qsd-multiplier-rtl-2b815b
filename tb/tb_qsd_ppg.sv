// tb_qsd_ppg: self-checking test of the QSD partial product generator.
// The default 2-digit instance is driven with every multiplicand (49) and
// every multiplier digit (7); a 6-digit instance gets random operands. For
// each, the value of the (N+1)-digit partial product must equal value(a) * b
// and every digit must be legal (-3..3). Digit products of magnitude 9, which
// need the carry of magnitude 2, are counted and must occur. Combinational:
// checked within the clock period the inputs are applied in.
module tb_qsd_ppg;
  import qsd_pkg::*;

  localparam int unsigned NW = 6;
  localparam int NRAND = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n9 = 0;

  // default size
  qsd_digit_t [1:0] a2;
  qsd_digit_t       b2;
  qsd_digit_t [2:0] pp2;

  qsd_ppg dut2 (.a(a2), .b(b2), .pp(pp2));

  // wider instance
  qsd_digit_t [NW-1:0] aw;
  qsd_digit_t          bw;
  qsd_digit_t [NW:0]   ppw;

  qsd_ppg #(.N(NW)) dutw (.a(aw), .b(bw), .pp(ppw));

  function automatic longint value_of(input qsd_digit_t d[], input int n);
    longint v = 0;
    for (int i = n - 1; i >= 0; i--) v = v * 4 + longint'(d[i]);
    return v;
  endfunction

  task automatic check_pp(input longint av, input int bv, input qsd_digit_t got[],
                          input int n);
    longint gv = value_of(got, n);
    checks++;
    if (gv != av * bv) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d", av, bv, gv);
    end
    for (int i = 0; i < n; i++) begin
      checks++;
      if (got[i] == qsd_digit_t'(-4)) begin
        failures++;
        $display("FAIL illegal digit code at position %0d", i);
      end
    end
  endtask

  initial begin : watchdog
    repeat (400 + NRAND + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    qsd_digit_t g[];
    qsd_digit_t op[];
    for (int a1 = -3; a1 <= 3; a1++)
      for (int a0 = -3; a0 <= 3; a0++)
        for (int bv = -3; bv <= 3; bv++) begin
          @(negedge clk);
          a2 = {qsd_digit_t'(a1), qsd_digit_t'(a0)};
          b2 = qsd_digit_t'(bv);
          #1;
          if (a0 * bv == 9 || a0 * bv == -9 || a1 * bv == 9 || a1 * bv == -9) n9++;
          g = new[3];
          for (int i = 0; i < 3; i++) g[i] = pp2[i];
          check_pp(longint'(a1) * 4 + longint'(a0), bv, g, 3);
        end
    for (int k = 0; k < NRAND; k++) begin
      @(negedge clk);
      op = new[NW];
      for (int i = 0; i < NW; i++) begin
        aw[i] = qsd_digit_t'(int'($urandom_range(6)) - 3);
        op[i] = aw[i];
      end
      bw = qsd_digit_t'(int'($urandom_range(6)) - 3);
      #1;
      g = new[NW + 1];
      for (int i = 0; i <= NW; i++) g[i] = ppw[i];
      check_pp(value_of(op, NW), int'(bw), g, NW + 1);
    end
    $display("digit products of magnitude 9: %0d", n9);
    checks++;
    if (n9 == 0) begin
      failures++;
      $display("FAIL no digit product of magnitude 9");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
