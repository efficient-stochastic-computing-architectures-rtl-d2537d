// tb_sc_rbf_unit: checks the univariate stochastic RBF core two ways.
// 1. Bit-exact: a reference written from the equations keeps a history of
//    the input bits and forms |x-c| = x^c, squares it with the bit of U
//    cycles before, applies NOT(. & k) and raises to the N-th power by
//    repeated squaring with delays 2U, 4U, 8U, ... (U = 13); every output bit is
//    compared (unipolar N = 8 and bipolar N = 16 instances).
// 2. Statistical: with independent random streams the long-run fraction
//    of ones must match (1 - k1 (x-c)^2)^N within 0.02.
module tb_sc_rbf_unit;
  logic clk = 0, rst_n = 0;
  logic xb, cb, kb;
  logic y8, y16;
  int checks = 0, failures = 0;

  sc_rbf_unit #(.N(8))                  dut8  (.clk, .rst_n, .x_bit(xb), .c_bit(cb), .k_bit(kb), .y_bit(y8));
  sc_rbf_unit #(.N(16), .BIPOLAR(1'b1)) dut16 (.clk, .rst_n, .x_bit(xb), .c_bit(cb), .k_bit(kb), .y_bit(y16));

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

  // histories, index 0 = current cycle; zeros before reset release
  localparam int U = 13;
  localparam int H = 512;
  bit dh [H];
  bit zh [5][H];

  function automatic bit ref_out(input int stages);
    return zh[stages][0];
  endfunction

  // advance reference by one cycle with current inputs (bipolar inverts
  // both inputs, which leaves the XOR unchanged)
  task automatic ref_step(input bit x, input bit c, input bit k);
    for (int i = H - 1; i > 0; i--) begin
      dh[i] = dh[i-1];
      for (int s = 0; s < 5; s++) zh[s][i] = zh[s][i-1];
    end
    dh[0] = x ^ c;
    zh[0][0] = !(dh[0] && dh[U] && k);
    for (int s = 0; s < 4; s++) zh[s+1][0] = zh[s][0] && zh[s][U * (2 << s)];
  endtask

  real px, pc, pk, exp8, exp16, m8, m16, d;
  int n8, n16, total;
  int unsigned u;

  initial begin
    xb = 0; cb = 0; kb = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // reference: the delay registers leave reset holding 0
    foreach (dh[i]) dh[i] = 0;
    foreach (zh[s, i]) zh[s][i] = 0;
    // ---- bit-exact phase ----
    for (int t = 0; t < 4000; t++) begin
      xb = 1'($urandom); cb = 1'($urandom); kb = 1'($urandom);
      ref_step(xb, cb, kb);
      #1;
      if (t > 2 * 16 * U) begin
        check(y8  == ref_out(3), $sformatf("N=8 bit mismatch at %0d", t));
        check(y16 == ref_out(4), $sformatf("N=16 bit mismatch at %0d", t));
      end
      @(negedge clk);
    end
    // ---- statistical phase ----
    for (int tc = 0; tc < 4; tc++) begin
      case (tc)
        0: begin px = 0.50; pc = 0.50; pk = 0.9; end
        1: begin px = 0.80; pc = 0.50; pk = 0.9; end
        2: begin px = 0.20; pc = 0.70; pk = 0.6; end
        default: begin px = 0.95; pc = 0.10; pk = 0.3; end
      endcase
      d = px - pc;
      exp8  = (1.0 - pk * d * d) ** 8;
      exp16 = (1.0 - pk * d * d) ** 16;
      n8 = 0; n16 = 0; total = 40000;
      for (int t = 0; t < total + 2 * 16 * U; t++) begin
        u  = $urandom;
        xb = (real'(u % 100000) / 100000.0) < px;   // x and c share u
        cb = (real'(u % 100000) / 100000.0) < pc;
        kb = (real'($urandom % 100000) / 100000.0) < pk;
        #1;
        if (t >= 2 * 16 * U) begin n8 += int'(y8); n16 += int'(y16); end
        @(negedge clk);
      end
      m8 = real'(n8) / total; m16 = real'(n16) / total;
      $display("case %0d: N=8 %f (exp %f)  N=16 %f (exp %f)", tc, m8, exp8, m16, exp16);
      check(m8  - exp8  < 0.02 && exp8  - m8  < 0.02, $sformatf("N=8 mean %f vs %f", m8, exp8));
      check(m16 - exp16 < 0.02 && exp16 - m16 < 0.02, $sformatf("N=16 mean %f vs %f", m16, exp16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
