// tb_qsd_adder: self-checking test of the N-digit carry-free QSD adder at its
// default width (128 digits). Operands are random digit strings plus corner
// cases (all digits 3, all -3, alternating signs, zero), and 64-digit
// operands with the upper digits zero. The value of the
// (N+1)-digit result, sum(s[i] * 4**i) computed in wide integer arithmetic,
// must equal the sum of the operand values, and every result digit must be a
// legal digit (-3..3). The test also counts how often positive and negative
// intermediate carries occur and how often the top digit is non-zero, and
// fails if any of these never happened. Combinational: checked within the
// clock period the inputs are applied in.
module tb_qsd_adder;
  import qsd_pkg::*;

  localparam int unsigned N = 128;
  localparam int unsigned VW = 2 * N + 12;   // width of reference values
  localparam int NRAND = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_top = 0;
  int n_pos = 0;
  int n_neg = 0;

  qsd_digit_t [N-1:0] a, b;
  qsd_digit_t [N:0]   s;

  qsd_adder dut (.a(a), .b(b), .s(s));

  function automatic logic signed [VW-1:0] value_n(input qsd_digit_t [N-1:0] d);
    logic signed [VW-1:0] v = '0;
    for (int i = N - 1; i >= 0; i--) v = v * 4 + VW'(d[i]);
    return v;
  endfunction

  function automatic logic signed [VW-1:0] value_n1(input qsd_digit_t [N:0] d);
    logic signed [VW-1:0] v = '0;
    for (int i = N; i >= 0; i--) v = v * 4 + VW'(d[i]);
    return v;
  endfunction

  function automatic qsd_digit_t rand_digit();
    return qsd_digit_t'(int'($urandom_range(6)) - 3);
  endfunction

  task automatic apply_and_check();
    logic signed [VW-1:0] expv, gotv;
    #1;
    expv = value_n(a) + value_n(b);
    gotv = value_n1(s);
    checks++;
    if (gotv != expv) begin
      failures++;
      $display("FAIL value: got %0d expected %0d", gotv, expv);
    end
    for (int i = 0; i <= N; i++) begin
      checks++;
      if (s[i] == qsd_digit_t'(-4)) begin
        failures++;
        $display("FAIL illegal digit code at position %0d", i);
      end
    end
    if (s[N] != '0) n_top++;
  endtask

  initial begin : watchdog
    repeat (NRAND + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    // corner cases
    for (int k = 0; k < 5; k++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        case (k)
          0: begin a[i] = 3'sd3;  b[i] = 3'sd3;  end
          1: begin a[i] = -3'sd3; b[i] = -3'sd3; end
          2: begin a[i] = (i % 2 == 1) ? 3'sd3 : -3'sd3; b[i] = (i % 2 == 1) ? -3'sd1 : 3'sd2; end
          3: begin a[i] = '0; b[i] = '0; end
          default: begin a[i] = 3'sd2; b[i] = 3'sd1; end
        endcase
      end
      apply_and_check();
    end
    // random operands
    for (int k = 0; k < NRAND; k++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        a[i] = rand_digit();
        b[i] = rand_digit();
        if (int'(a[i]) + int'(b[i]) >= 3) n_pos++;
        if (int'(a[i]) + int'(b[i]) <= -3) n_neg++;
      end
      apply_and_check();
    end
    // 64-digit operands on the full-width adder (upper digits zero)
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        a[i] = (i < 64) ? rand_digit() : '0;
        b[i] = (i < 64) ? rand_digit() : '0;
      end
      apply_and_check();
    end
    $display("positive carries %0d, negative carries %0d, non-zero top digit %0d",
             n_pos, n_neg, n_top);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_top == 0) begin
      failures++;
      $display("FAIL a carry case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
