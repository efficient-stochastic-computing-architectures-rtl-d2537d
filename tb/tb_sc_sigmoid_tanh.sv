// tb_sc_sigmoid_tanh: sweeps the input P_x over 0, 0.03, ..., 0.99 (the
// sweep used to evaluate the unit) on three instances: the default
// sigmoid(2x)/tanh(x) unit, the same unit with a 5-cycle delay step, and a
// sigmoid(4x)/tanh(2x) unit with the second coefficient set.  Each result
// count/1024 is compared with sigmoid(2a(2P_x-1)) and 2 count/1024 - 1 with
// tanh(a(2P_x-1)); per-point and mean-absolute-error bounds are checked, as
// is the start-to-done latency (DEGREE-1)*DUNIT + 1 + 1024 cycles.
module tb_sc_sigmoid_tanh;
  localparam int L = 1024;
  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] x;
  logic [10:0] ca, cb, cc;
  logic da, db, dc;
  int checks = 0, failures = 0;

  sc_sigmoid_tanh dut_a (.clk, .rst_n, .start, .x, .y_bit(), .count(ca), .done(da));
  sc_sigmoid_tanh #(.DUNIT(5)) dut_b (.clk, .rst_n, .start, .x, .y_bit(), .count(cb), .done(db));
  sc_sigmoid_tanh #(.DUNIT(5), .COEF(sc_pkg::SIGMOID4X_COEF)) dut_c (
    .clk, .rst_n, .start, .x, .y_bit(), .count(cc), .done(dc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real absr(input real v);
    return v < 0 ? -v : v;
  endfunction
  function automatic real sigm(input real v);
    return 1.0 / (1.0 + $exp(-v));
  endfunction
  function automatic real tanh_r(input real v);
    return (1.0 - $exp(-2.0 * v)) / (1.0 + $exp(-2.0 * v));
  endfunction

  real p, xb, sa, sb, sc, ea, ec, mae_a, mae_b, mae_c, mae_t;
  int cyc, npts;

  initial begin
    mae_a = 0; mae_b = 0; mae_c = 0; mae_t = 0; npts = 0;
    x = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i <= 33; i++) begin
      p = 0.03 * i;
      x = 10'($rtoi(p * 1023.0 + 0.5));
      xb = 2.0 * real'(x) / 1023.0 - 1.0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!da) begin @(negedge clk); cyc++; end
      check(cyc == 4 + 1 + L, $sformatf("U=1 latency %0d", cyc));
      sa = real'(ca) / L;
      while (!db) begin @(negedge clk); cyc++; end
      check(cyc == 20 + 1 + L, $sformatf("U=5 latency %0d", cyc));
      check(dc, "a=2 unit done with U=5 unit");
      sb = real'(cb) / L; sc = real'(cc) / L;
      ea = sigm(2.0 * xb); ec = sigm(4.0 * xb);
      check(absr(sa - ea) < 0.05, $sformatf("sigmoid(2x) U=1 at %.2f: %.3f vs %.3f", p, sa, ea));
      check(absr(sb - ea) < 0.03, $sformatf("sigmoid(2x) U=5 at %.2f: %.3f vs %.3f", p, sb, ea));
      check(absr(sc - ec) < 0.05, $sformatf("sigmoid(4x) U=5 at %.2f: %.3f vs %.3f", p, sc, ec));
      // the same count read in bipolar format is tanh(x)
      check(absr((2.0 * sb - 1.0) - tanh_r(xb)) < 0.06, $sformatf("tanh(x) at %.2f", p));
      mae_a += absr(sa - ea); mae_b += absr(sb - ea); mae_c += absr(sc - ec);
      mae_t += absr((2.0 * sb - 1.0) - tanh_r(xb));
      npts++;
    end
    mae_a /= npts; mae_b /= npts; mae_c /= npts; mae_t /= npts;
    $display("MAE sigmoid(2x) U=1 %f  U=5 %f  sigmoid(4x) U=5 %f  tanh(x) U=5 %f", mae_a, mae_b, mae_c, mae_t);
    check(mae_a < 0.02, "MAE sigmoid(2x), U=1");
    check(mae_b < 0.008, "MAE sigmoid(2x), U=5");
    check(mae_c < 0.015, "MAE sigmoid(4x), U=5");
    check(mae_t < 0.016, "MAE tanh(x), U=5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
