// tb_sc_rbf_kernel: end-to-end checks of the stochastic RBF kernel.
// Four instances: univariate unipolar N = 8 (the default), univariate
// unipolar N = 16 with a shared LFSR, univariate bipolar N = 8, and a
// two-feature unipolar kernel.  For several (x, c, k) points the counted
// result / 1024 is compared with exp(-k (x-c)^2) (bipolar:
// exp(-k (xb-cb)^2) with xb = 2 P_x - 1) within 0.08, the mean absolute
// error over the sweep must stay below 0.035, and done must arrive exactly
// 2*N*13 + 1024 cycles after start (delay unit 13, see sc_rbf_unit).
module tb_sc_rbf_kernel;
  localparam int L = 1024;
  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] x0, c0, x1, c1, k8, k16, kbip, k2d;
  logic [10:0] r_a, r_b, r_c, r_d;
  logic d_a, d_b, d_c, d_d;
  int checks = 0, failures = 0;

  sc_rbf_kernel dut_a (.clk, .rst_n, .start, .x(x0), .c(c0), .k1(k8),
                       .y_bit(), .result(r_a), .done(d_a));
  sc_rbf_kernel #(.N(16), .SHARE_LFSR(1'b1)) dut_b (.clk, .rst_n, .start, .x(x0), .c(c0), .k1(k16),
                       .y_bit(), .result(r_b), .done(d_b));
  sc_rbf_kernel #(.BIPOLAR(1'b1)) dut_c (.clk, .rst_n, .start, .x(x0), .c(c0), .k1(kbip),
                       .y_bit(), .result(r_c), .done(d_c));
  sc_rbf_kernel #(.DIMS(2)) dut_d (.clk, .rst_n, .start, .x({x1, x0}), .c({c1, c0}), .k1(k2d),
                       .y_bit(), .result(r_d), .done(d_d));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [9:0] code(input real p);
    return 10'($rtoi(p * 1023.0 + 0.5));
  endfunction
  function automatic real pr(input logic [9:0] v);
    return real'(v) / 1023.0;
  endfunction
  function automatic real absr(input real v);
    return v < 0 ? -v : v;
  endfunction

  real k, ea, eb, ec, ed, ga, gb, gc, gd, xr, cr;
  real mae [4];
  int cyc, npts;

  initial begin
    foreach (mae[i]) mae[i] = 0;
    npts = 0;
    x0 = 0; c0 = 0; x1 = 0; c1 = 0; k8 = 0; k16 = 0; kbip = 0; k2d = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    k = 7.0;  // the coefficient of the source's one-dimensional example
    for (int i = 0; i <= 10; i++) begin
      xr = 0.1 * i; cr = 0.5;
      x0 = code(xr); c0 = code(cr); x1 = code(1.0 - xr); c1 = code(0.45);
      k8  = code(k / 8.0);
      k16 = code(k / 16.0);
      kbip = code(4.0 * (k / 4.0) / 8.0);   // bipolar: k1' = 4k/N, here k = 7/4
      k2d = code(k / 8.0);
      ea = $exp(-k * (pr(x0) - pr(c0)) ** 2);
      eb = ea;
      ec = $exp(-(k / 4.0) * ((2.0 * pr(x0) - 1.0) - (2.0 * pr(c0) - 1.0)) ** 2);
      ed = ea * $exp(-k * (pr(x1) - pr(c1)) ** 2);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!d_a) begin @(negedge clk); cyc++; end
      check(cyc == 2 * 8 * 13 + L, $sformatf("N=8 latency %0d", cyc));
      check(d_c && d_d, "bipolar / 2-D done with N=8 kernel");
      ga = real'(r_a) / L; gc = real'(r_c) / L; gd = real'(r_d) / L;
      while (!d_b) begin @(negedge clk); cyc++; end
      check(cyc == 2 * 16 * 13 + L, $sformatf("N=16 latency %0d", cyc));
      gb = real'(r_b) / L;
      $display("x=%.2f  N8 %.3f/%.3f  N16s %.3f/%.3f  bip %.3f/%.3f  2D %.3f/%.3f",
               xr, ga, ea, gb, eb, gc, ec, gd, ed);
      check(absr(ga - ea) < 0.08, "N=8 unipolar error");
      check(absr(gb - eb) < 0.08, "N=16 shared-LFSR error");
      check(absr(gc - ec) < 0.08, "bipolar error");
      check(absr(gd - ed) < 0.08, "2-D error");
      mae[0] += absr(ga - ea); mae[1] += absr(gb - eb);
      mae[2] += absr(gc - ec); mae[3] += absr(gd - ed);
      npts++;
      repeat (5) @(negedge clk);
    end
    foreach (mae[i]) begin
      $display("MAE[%0d] = %f", i, mae[i] / npts);
      check(mae[i] / npts < 0.035, $sformatf("MAE %0d too large", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
