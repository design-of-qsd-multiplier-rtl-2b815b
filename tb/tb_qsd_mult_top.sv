// tb_qsd_mult_top: end-to-end test of the binary-in, QSD-out multiplier at its
// default size (2 digits, 4-bit two's complement operands). Every pair of
// operands (16 x 16) is applied. The internal QSD operands must have the
// values of the binary inputs and the 5-digit QSD product must have the value a*b,
// with only legal digits. The test also counts, by looking into the
// multiplier, how often each mechanism of carry-free multiplication occurred:
// a digit-product carry of magnitude 1 and of magnitude 2, positive and
// negative intermediate carries in the partial product generators and in the
// partial product adder. A mechanism that never occurred counts as a failure.
// How often the top product digit is non-zero is reported for information:
// with binary operands of this size it stays 0. The design is combinational, so each
// product is checked within the clock period its operands are applied in.
module tb_qsd_mult_top;
  import qsd_pkg::*;

  localparam int unsigned N = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [2*N-1:0] a_bin, b_bin;
  qsd_digit_t  [2*N:0]   p_qsd;

  qsd_mult_top dut (
    .a_bin (a_bin),
    .b_bin (b_bin),
    .p_qsd (p_qsd)
  );

  // Internal signals observed to count mechanisms.
  qsd_digit_t  dig_c   [N][N];   // digit-product carries, [partial product][digit]
  qsd_icarry_t ppg_ic  [N][N+1]; // intermediate carries in the partial product adders
  qsd_icarry_t acc_ic  [2*N];    // intermediate carries in the partial product sum

  for (genvar j = 0; j < N; j++) begin : g_peek_pp
    for (genvar i = 0; i < N; i++) begin : g_peek_d
      assign dig_c[j][i] = dut.u_mult.g_pp[j].u_ppg.g_mult[i].u_mult.c;
    end
    for (genvar i = 0; i <= N; i++) begin : g_peek_ic
      assign ppg_ic[j][i] = dut.u_mult.g_pp[j].u_ppg.u_add.ic[i];
    end
  end
  for (genvar i = 0; i < 2 * N; i++) begin : g_peek_acc
    assign acc_ic[i] = dut.u_mult.g_sum[1].u_add.ic[i];
  end

  int n_c1 = 0, n_c2 = 0, n_ppg_pos = 0, n_ppg_neg = 0;
  int n_acc_pos = 0, n_acc_neg = 0, n_top = 0;

  function automatic int value_of(input qsd_digit_t d[]);
    int v = 0;
    for (int i = d.size() - 1; i >= 0; i--) v = v * 4 + int'(d[i]);
    return v;
  endfunction

  initial begin : watchdog
    repeat (300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    qsd_digit_t g[];
    int lo, hi;
    lo = -(1 << (2 * N - 1));
    hi = (1 << (2 * N - 1)) - 1;
    for (int av = lo; av <= hi; av++) begin
      for (int bv = lo; bv <= hi; bv++) begin
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
        // mechanism counts
        for (int j = 0; j < N; j++) begin
          for (int i = 0; i < N; i++) begin
            if (dig_c[j][i] == 3'sd1 || dig_c[j][i] == -3'sd1) n_c1++;
            if (dig_c[j][i] == 3'sd2 || dig_c[j][i] == -3'sd2) n_c2++;
          end
          for (int i = 0; i <= N; i++) begin
            if (ppg_ic[j][i] == 2'sd1) n_ppg_pos++;
            if (ppg_ic[j][i] == -2'sd1) n_ppg_neg++;
          end
        end
        for (int i = 0; i < 2 * N; i++) begin
          if (acc_ic[i] == 2'sd1) n_acc_pos++;
          if (acc_ic[i] == -2'sd1) n_acc_neg++;
        end
        if (p_qsd[2*N] != '0) n_top++;
      end
    end
    $display("digit-product carry |1|: %0d, |2|: %0d", n_c1, n_c2);
    $display("partial product adder carries +1: %0d, -1: %0d", n_ppg_pos, n_ppg_neg);
    $display("partial product sum carries +1: %0d, -1: %0d", n_acc_pos, n_acc_neg);
    $display("non-zero top product digit: %0d", n_top);
    checks++;
    if (n_c1 == 0 || n_c2 == 0 || n_ppg_pos == 0 || n_ppg_neg == 0 ||
        n_acc_pos == 0 || n_acc_neg == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
