// tb_sc_bernstein: checks the stochastic Bernstein core.
// 1. Bit-exact: from a history of input bits the reference counts the ones
//    among x(t), x(t-U), ..., x(t-(n-1)U) and expects y = b[count]; sel is
//    checked too (U = 1 and U = 5 instances).
// 2. Statistical: with independent random input and coefficient streams
//    the fraction of ones must equal sum_i b_i C(n,i) p^i (1-p)^(n-i)
//    within 0.02.
module tb_sc_bernstein;
  localparam int D = 5;
  logic clk = 0, rst_n = 0;
  logic xb;
  logic [D:0] bb;
  logic y1, y5;
  logic [2:0] sel1, sel5;
  int checks = 0, failures = 0;

  sc_bernstein #(.DEGREE(D))             dut1 (.clk, .rst_n, .x_bit(xb), .b_bits(bb), .y_bit(y1), .sel(sel1));
  sc_bernstein #(.DEGREE(D), .DUNIT(5))  dut5 (.clk, .rst_n, .x_bit(xb), .b_bits(bb), .y_bit(y5), .sel(sel5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  bit xh [64];
  int s1, s5, n1, n5, total;
  real p, bv [D+1], expv, binom, m1, m5;

  function automatic real choose(input int n, input int k);
    real r = 1.0;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  initial begin
    foreach (xh[i]) xh[i] = 0;
    xb = 0; bb = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      xb = 1'($urandom); bb = (D+1)'($urandom);
      for (int i = 63; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = xb;
      s1 = 0; s5 = 0;
      for (int i = 0; i < D; i++) begin s1 += int'(xh[i]); s5 += int'(xh[5*i]); end
      #1;
      if (t > 30) begin
        check(int'(sel1) == s1 && y1 == bb[s1], $sformatf("U=1 t=%0d sel %0d/%0d", t, sel1, s1));
        check(int'(sel5) == s5 && y5 == bb[s5], $sformatf("U=5 t=%0d sel %0d/%0d", t, sel5, s5));
      end
      @(negedge clk);
    end
    // statistical: coefficients of sigmoid(2x)
    bv = '{0.12, 0.20, 0.34, 0.66, 0.80, 0.87};
    for (int tc = 0; tc < 4; tc++) begin
      p = 0.1 + 0.27 * tc;
      expv = 0;
      for (int i = 0; i <= D; i++) expv += bv[i] * choose(D, i) * (p ** i) * ((1.0 - p) ** (D - i));
      n1 = 0; n5 = 0; total = 30000;
      for (int t = 0; t < total + 30; t++) begin
        xb = (real'($urandom % 100000) / 100000.0) < p;
        for (int i = 0; i <= D; i++) bb[i] = (real'($urandom % 100000) / 100000.0) < bv[i];
        #1;
        if (t >= 30) begin n1 += int'(y1); n5 += int'(y5); end
        @(negedge clk);
      end
      m1 = real'(n1) / total; m5 = real'(n5) / total;
      $display("p=%.2f  U=1 %.4f U=5 %.4f expected %.4f", p, m1, m5, expv);
      check(m1 - expv < 0.02 && expv - m1 < 0.02, "U=1 mean");
      check(m5 - expv < 0.02 && expv - m5 < 0.02, "U=5 mean");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
