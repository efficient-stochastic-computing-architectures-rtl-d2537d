// tb_sc_rbf_k_sweep: accuracy of the stochastic RBF kernel as the kernel
// coefficient k varies, the sweep the RBF evaluation repeats for several k.
// Two instances of sc_rbf_kernel: the default one (one feature, N = 8,
// 1024-bit streams, unipolar) swept over k = 1, 2, 4, 7, 8, and an N = 16
// instance swept over k = 10, 16 (k must stay at or below N so that
// k1 = k/N is a probability).  For each k the centre is c = 0.5 and x runs
// over 0, 0.05, ..., 1.  The counted result / 1024 is compared with
// exp(-k (x-c)^2): each point within 0.08, the mean absolute error of each
// k below 0.035, and every evaluation must take exactly 2*N*13 + 1024
// cycles from start to done.  The MAE of each k is printed.
module tb_sc_rbf_k_sweep;
  localparam int L = 1024;
  logic clk = 0, rst_n = 0, start8 = 0, start16 = 0;
  logic [0:0][9:0] x, c;
  logic [9:0] k1;
  logic [10:0] r8, r16;
  logic d8, d16;
  int checks = 0, failures = 0;

  sc_rbf_kernel dut8 (.clk, .rst_n, .start(start8), .x, .c, .k1, .y_bit(), .result(r8), .done(d8));
  sc_rbf_kernel #(.N(16)) dut16 (.clk, .rst_n, .start(start16), .x, .c, .k1, .y_bit(), .result(r16),
                                 .done(d16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (250000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic logic [9:0] code(input real p);
    return 10'($rtoi(p * 1023.0 + 0.5));
  endfunction
  function automatic real absr(input real v);
    return v < 0 ? -v : v;
  endfunction

  // one evaluation on the instance of size n; returns result / 1024
  task automatic eval(input int n, output real y);
    int cyc;
    @(negedge clk);
    if (n == 8) start8 = 1; else start16 = 1;
    @(negedge clk);
    start8 = 0; start16 = 0;
    cyc = 1;
    while (!(n == 8 ? d8 : d16)) begin @(negedge clk); cyc++; end
    check(cyc == 2 * n * 13 + L, $sformatf("N=%0d latency %0d", n, cyc));
    y = real'(n == 8 ? r8 : r16) / real'(L);
  endtask

  real ks [7] = '{1.0, 2.0, 4.0, 7.0, 8.0, 10.0, 16.0};
  int  ns [7] = '{8, 8, 8, 8, 8, 16, 16};

  initial begin
    real y, e, xr, mae;
    x = '0; c = '0; k1 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int s = 0; s < 7; s++) begin
      mae = 0;
      for (int i = 0; i <= 20; i++) begin
        xr = 0.05 * i;
        x[0] = code(xr); c[0] = code(0.5); k1 = code(ks[s] / real'(ns[s]));
        e = $exp(-ks[s] * (real'(x[0]) / 1023.0 - real'(c[0]) / 1023.0) ** 2);
        eval(ns[s], y);
        check(absr(y - e) < 0.08, $sformatf("N=%0d k=%.0f x=%.2f: %.3f expected %.3f", ns[s], ks[s], xr, y, e));
        mae += absr(y - e);
      end
      mae /= 21.0;
      $display("N=%0d k=%4.1f  MAE %.4f", ns[s], ks[s], mae);
      check(mae < 0.035, $sformatf("N=%0d k=%.0f MAE %.4f", ns[s], ks[s], mae));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
