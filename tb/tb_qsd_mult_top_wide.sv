// tb_qsd_mult_top_wide: end-to-end test of the binary-in, QSD-out multiplier
// built for 8 digits (16-bit two's complement operands). Corner operands (the
// most negative and most positive values, -1, 0, 1) are paired with each
// other, then random operand pairs follow. The internal QSD operands must have the
// values of the binary inputs and the 17-digit product must have the value
// a*b with only legal digits. Combinational: each product is checked within
// the clock period its operands are applied in.
module tb_qsd_mult_top_wide;
  import qsd_pkg::*;

  localparam int unsigned N = 8;
  localparam int NRAND = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [2*N-1:0] a_bin, b_bin;
  qsd_digit_t  [2*N:0]   p_qsd;

  qsd_mult_top #(.N(N)) dut (
    .a_bin (a_bin),
    .b_bin (b_bin),
    .p_qsd (p_qsd)
  );

  function automatic longint value_of(input qsd_digit_t d[]);
    longint v = 0;
    for (int i = d.size() - 1; i >= 0; i--) v = v * 4 + longint'(d[i]);
    return v;
  endfunction

  task automatic apply_and_check(input longint av, input longint bv);
    qsd_digit_t g[];
    @(negedge clk);
    a_bin = (2*N)'(av);
    b_bin = (2*N)'(bv);
    #1;
    g = new[N];
    for (int i = 0; i < N; i++) g[i] = dut.a_qsd[i];
    checks++;
    if (value_of(g) != av) begin
      failures++;
      $display("FAIL a=%0d converts to %0d", av, value_of(g));
    end
    for (int i = 0; i < N; i++) g[i] = dut.b_qsd[i];
    checks++;
    if (value_of(g) != bv) begin
      failures++;
      $display("FAIL b=%0d converts to %0d", bv, value_of(g));
    end
    g = new[2 * N + 1];
    for (int i = 0; i <= 2 * N; i++) begin
      g[i] = p_qsd[i];
      checks++;
      if (p_qsd[i] == qsd_digit_t'(-4)) begin
        failures++;
        $display("FAIL %0d * %0d: illegal digit code at position %0d", av, bv, i);
      end
    end
    checks++;
    if (value_of(g) != av * bv) begin
      failures++;
      $display("FAIL %0d * %0d: product digits give %0d", av, bv, value_of(g));
    end
  endtask

  initial begin : watchdog
    repeat (NRAND + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    longint corner[5];
    corner = '{-(64'sd1 <<< (2 * N - 1)), (64'sd1 <<< (2 * N - 1)) - 1, -1, 0, 1};
    foreach (corner[x])
      foreach (corner[y])
        apply_and_check(corner[x], corner[y]);
    for (int k = 0; k < NRAND; k++)
      apply_and_check(longint'($signed(16'($urandom))), longint'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
