// tb_if_neuron: checks the dynamic-threshold neuron against the original
// (subtracting) integrate-and-fire model
//   v(t) = v(t-1) + K(t) - rho,  fire when v(t) > theta,  v := 0 on a spike,
// which must produce the same spike train as the hardware's accumulate-only
// form.  Runs random K sequences with positive, zero and negative rho
// (the negative case switches rho from ACC2 into ACC1), checks the ACC1 /
// ACC2 contents after each step, the one-cycle spike timing, init, and
// saturation of ACC1.
module tb_if_neuron;
  localparam int KW = 9, VW = 16;
  logic clk = 0, rst_n = 0, init = 0, step = 0;
  logic [KW-1:0] k_in;
  logic signed [VW-1:0] theta, rho, u_acc, th_acc;
  logic spike;
  int checks = 0, failures = 0;

  if_neuron #(.KW(KW), .VW(VW)) dut (.clk, .rst_n, .init, .step, .k_in, .theta, .rho,
                                     .spike, .u_acc, .th_acc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  int v, kk, th0, r, fires, nsteps, acc_u, acc_t;
  int neg_cases, pos_cases;

  initial begin
    k_in = '0; theta = '0; rho = '0;
    neg_cases = 0; pos_cases = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int win = 0; win < 300; win++) begin
      th0 = $urandom_range(0, 600);
      case (win % 3)
        0: r = $urandom_range(0, 288);
        1: r = -$urandom_range(1, 60);
        default: r = 144;
      endcase
      if (r < 0) neg_cases++; else pos_cases++;
      theta = VW'(th0); rho = VW'(r);
      init = 1; @(negedge clk); init = 0;
      check(u_acc == 0 && th_acc == VW'(th0) && !spike, "init presets ACC1/ACC2");
      v = 0; acc_u = 0; acc_t = th0;
      nsteps = $urandom_range(4, 16);
      for (int t = 0; t < nsteps; t++) begin
        kk = $urandom_range(0, 288);
        k_in = KW'(kk); step = 1;
        // reference: subtracting model
        v = v + kk - r;
        // accumulate-only model for the accumulator contents
        if (r >= 0) begin acc_u += kk; acc_t += r; end
        else begin acc_u += kk - r; end
        @(negedge clk);
        step = 0;
        check(spike == (v > th0), $sformatf("win %0d step %0d: spike %0d, v=%0d theta=%0d", win, t, spike, v, th0));
        if (v > th0) begin
          v = 0; acc_u = 0; acc_t = th0;
        end
        check(int'(u_acc) == acc_u && int'(th_acc) == acc_t,
              $sformatf("accumulators %0d/%0d expected %0d/%0d", u_acc, th_acc, acc_u, acc_t));
        if ($urandom % 4 == 0) begin
          @(negedge clk);
          check(!spike, "spike lasts one cycle");
        end
      end
    end
    check(neg_cases > 0 && pos_cases > 0, "both signs of rho exercised");
    // saturation: huge threshold, many full-scale steps
    theta = 16'sh7FFF; rho = -16'sd100; init = 1; @(negedge clk); init = 0;
    for (int t = 0; t < 120; t++) begin k_in = 9'd288; step = 1; @(negedge clk); end
    step = 0;
    check(u_acc == 16'sh7FFF, $sformatf("ACC1 saturates (%0d)", u_acc));
    check(!spike, "saturated ACC1 does not exceed the largest threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
