// tb_sc_dnn_top: end-to-end test of the whole design at its default sizes
// (no parameter overrides): a univariate N = 8 stochastic RBF kernel, the
// degree-5 sigmoid(2x)/tanh(x) unit and the 32 x 288 BSNN subarray.
//  * RBF: k = 7, c = 0.5 and five x values; result/1024 against
//    exp(-k (x-c)^2) within 0.08, latency 2*8*13 + 1024 cycles.
//  * Activation: five x values against sigmoid(2x) and tanh(x) within
//    0.05 / 0.1, latency 4 + 1 + 1024 cycles.
//  * BSNN: full weight load, per-row configuration, then 6 windows of 8
//    time steps (the 8-step inference the design targets) checked spike by
//    spike against the signed IF reference, with and without SEW.
// The RBF and activation units run concurrently with the BSNN traffic.
// Mechanism counters: RBF evaluations, activation evaluations, weight
// writes, neuron configurations, window inits, neuron spikes, silent
// neuron-steps, negative-rho rows, SEW suppressions; each must be > 0.
module tb_sc_dnn_top;
  localparam int L = 1024, N = 32, M = 288, T = 8;
  logic clk = 0, rst_n = 0;
  logic rbf_start = 0, act_start = 0;
  logic [0:0][9:0] rbf_x, rbf_c;
  logic [9:0] rbf_k1, act_x;
  logic rbf_y_bit, rbf_done, act_y_bit, act_done;
  logic [10:0] rbf_result, act_count;
  logic snn_wr_en = 0, snn_wr_data = 0, snn_cfg_en = 0, snn_init = 0, snn_step = 0, snn_sew_en = 0;
  logic [4:0] snn_wr_row, snn_cfg_row;
  logic [8:0] snn_wr_col;
  logic signed [15:0] snn_cfg_theta, snn_cfg_rho;
  logic [M-1:0] snn_spikes;
  logic [N-1:0] snn_s_prev, snn_o, snn_s_out;
  logic snn_out_valid;
  int checks = 0, failures = 0;

  sc_dnn_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic real absr(input real v);
    return v < 0 ? -v : v;
  endfunction

  int n_rbf, n_act, n_wr, n_cfg, n_init, n_fire, n_quiet, n_neg, n_sew;
  bit snn_done;

  // ---------------- RBF and activation (concurrent) ----------------
  initial begin : sc_side
    real xr, e, g, xb;
    int cyc;
    n_rbf = 0; n_act = 0;
    rbf_x = '0; rbf_c = '0; rbf_k1 = '0; act_x = '0;
    wait (rst_n);
    for (int i = 0; i < 5; i++) begin
      xr = 0.25 * i;
      rbf_x[0] = 10'($rtoi(xr * 1023 + 0.5)); rbf_c[0] = 10'd512; rbf_k1 = 10'($rtoi(7.0 / 8 * 1023 + 0.5));
      act_x = rbf_x[0];
      @(negedge clk); rbf_start = 1; act_start = 1;
      @(negedge clk); rbf_start = 0; act_start = 0;
      cyc = 1;
      while (!act_done) begin @(negedge clk); cyc++; end
      check(cyc == 4 + 1 + L, $sformatf("activation latency %0d", cyc));
      xb = 2.0 * real'(act_x) / 1023 - 1.0;
      g = real'(act_count) / L; e = 1.0 / (1.0 + $exp(-2.0 * xb));
      check(absr(g - e) < 0.05, $sformatf("sigmoid(2x) %.3f vs %.3f", g, e));
      e = (1.0 - $exp(-2.0 * xb)) / (1.0 + $exp(-2.0 * xb));
      check(absr((2.0 * g - 1.0) - e) < 0.1, $sformatf("tanh(x) %.3f vs %.3f", 2.0 * g - 1.0, e));
      n_act++;
      while (!rbf_done) begin @(negedge clk); cyc++; end
      check(cyc == 2 * 8 * 13 + L, $sformatf("RBF latency %0d", cyc));
      g = real'(rbf_result) / L;
      e = $exp(-7.0 * (real'(rbf_x[0]) / 1023 - 512.0 / 1023) ** 2);
      check(absr(g - e) < 0.08, $sformatf("RBF %.3f vs %.3f", g, e));
      n_rbf++;
    end
  end

  // ---------------- BSNN ----------------
  bit wb [N][M];
  int mu_a [N], theta [N], v [N];
  logic [N-1:0] exp_o [T], sprev [T];
  logic [M-1:0] sp [T];

  initial begin : snn_side
    int m1, mac, oi;
    n_wr = 0; n_cfg = 0; n_init = 0; n_fire = 0; n_quiet = 0; n_neg = 0; n_sew = 0;
    snn_done = 0;
    snn_wr_row = '0; snn_wr_col = '0; snn_cfg_row = '0; snn_cfg_theta = '0; snn_cfg_rho = '0;
    snn_spikes = '0; snn_s_prev = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++) begin
        wb[i][j] = (i == 3) ? 1'b1 : 1'($urandom);
        snn_wr_en = 1; snn_wr_row = 5'(i); snn_wr_col = 9'(j); snn_wr_data = wb[i][j];
        @(negedge clk);
        n_wr++;
      end
    snn_wr_en = 0;
    for (int i = 0; i < N; i++) begin
      m1 = 0;
      for (int j = 0; j < M; j++) m1 += int'(!wb[i][j]);
      mu_a[i] = (i == 3) ? -4 : $urandom_range(0, 20) - 10;
      theta[i] = $urandom_range(0, 30);
      if (m1 + mu_a[i] < 0) n_neg++;
      snn_cfg_en = 1; snn_cfg_row = 5'(i); snn_cfg_theta = 16'(theta[i]); snn_cfg_rho = 16'(m1 + mu_a[i]);
      @(negedge clk);
      n_cfg++;
    end
    snn_cfg_en = 0;
    for (int win = 0; win < 6; win++) begin
      snn_init = 1; @(negedge clk); snn_init = 0; n_init++;
      foreach (v[i]) v[i] = 0;
      for (int t = 0; t < T; t++) begin
        for (int w = 0; w < M; w += 32) sp[t][w +: 32] = $urandom;
        sprev[t] = N'($urandom);
        for (int i = 0; i < N; i++) begin
          mac = 0;
          for (int j = 0; j < M; j++) if (sp[t][j]) mac += wb[i][j] ? 1 : -1;
          v[i] = v[i] + mac - mu_a[i];
          exp_o[t][i] = (v[i] > theta[i]);
          if (exp_o[t][i]) v[i] = 0;
        end
      end
      oi = 0;
      for (int t = 0; t < T + 2; t++) begin
        snn_step = (t < T);
        if (t < T) begin snn_spikes = sp[t]; snn_s_prev = sprev[t]; snn_sew_en = win[0]; end
        @(negedge clk);
        check(snn_out_valid == (t >= 1 && t <= T), $sformatf("out_valid at %0d", t));
        if (snn_out_valid) begin
          check(snn_o == exp_o[oi], $sformatf("win %0d step %0d spikes", win, oi));
          check(snn_s_out == (win[0] ? (~exp_o[oi] & sprev[oi]) : exp_o[oi]), "SEW output");
          n_fire += $countones(exp_o[oi]);
          n_quiet += N - $countones(exp_o[oi]);
          if (win[0]) n_sew += $countones(exp_o[oi] & sprev[oi]);
          oi++;
        end
      end
      snn_step = 0;
    end
    snn_done = 1;
  end

  initial begin : finish
    wait (snn_done && n_rbf == 5);
    $display("rbf %0d act %0d writes %0d cfg %0d inits %0d fires %0d quiet %0d neg-rho %0d sew %0d",
             n_rbf, n_act, n_wr, n_cfg, n_init, n_fire, n_quiet, n_neg, n_sew);
    check(n_rbf > 0, "RBF evaluated");
    check(n_act > 0, "activation evaluated");
    check(n_wr == N * M, "every weight written");
    check(n_cfg == N, "every neuron configured");
    check(n_init > 0, "window init");
    check(n_fire > 0, "neurons fired");
    check(n_quiet > 0, "neurons stayed silent");
    check(n_neg > 0, "negative-rho switching used");
    check(n_sew > 0, "SEW suppression");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
