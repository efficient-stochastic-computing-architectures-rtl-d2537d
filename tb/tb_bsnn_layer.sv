// tb_bsnn_layer: runs the 32 x 288 in-memory BSNN subarray end to end.
// Writes a random binarised kernel matrix bit by bit (row 0 all +1 so its
// rho can be negative), configures theta and rho = M1 + mu/alpha for each
// row, then processes several sliding windows of T = 8 time steps, one
// step per cycle.  The reference is the signed binary IF model
//   v += sum_j w_ij s_j - mu/alpha,  spike when v > theta,  v := 0 after,
// with w_ij in {-1, +1}; it is independent of the XNOR / dynamic-threshold
// form used by the hardware.  Checks every spike, the SEW output
// (~o & s_prev when enabled, o otherwise), that outputs arrive exactly two
// cycles after each step with one step per cycle, and that firing,
// silence, negative rho and SEW suppression all occur.
module tb_bsnn_layer;
  localparam int N = 32, M = 288, VW = 16, T = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_data = 0, cfg_en = 0, init = 0, step = 0, sew_en = 0;
  logic [4:0] wr_row, cfg_row;
  logic [8:0] wr_col;
  logic signed [VW-1:0] cfg_theta, cfg_rho;
  logic [M-1:0] spikes;
  logic [N-1:0] s_prev, o, s_out;
  logic out_valid;
  int checks = 0, failures = 0;

  bsnn_layer #(.N(N), .M(M), .VW(VW)) dut (
    .clk, .rst_n, .wr_en, .wr_row, .wr_col, .wr_data, .cfg_en, .cfg_row, .cfg_theta, .cfg_rho,
    .init, .step, .spikes, .s_prev, .sew_en, .o, .s_out, .out_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  bit wb [N][M];           // 1 = +1, 0 = -1
  int mu_a [N], theta [N], v [N];
  logic [N-1:0] exp_o [T], exp_s [T];
  logic [M-1:0] sp [T];
  logic [N-1:0] sprev [T];
  int mac, m1, n_fire, n_quiet, n_neg, n_sew_kill, cyc_out;
  bit sew_mode;

  // output monitor: outputs of step t must appear 2 cycles after it
  int out_idx, step_cycle [T], cycle;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    cycle = 0; n_fire = 0; n_quiet = 0; n_neg = 0; n_sew_kill = 0;
    wr_row = '0; wr_col = '0; cfg_row = '0; cfg_theta = '0; cfg_rho = '0;
    spikes = '0; s_prev = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // ---- weights, one bit per cycle ----
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++) begin
        wb[i][j] = (i == 0) ? 1'b1 : 1'($urandom);
        wr_en = 1; wr_row = 5'(i); wr_col = 9'(j); wr_data = wb[i][j];
        @(negedge clk);
      end
    wr_en = 0;
    // ---- neuron constants ----
    for (int i = 0; i < N; i++) begin
      m1 = 0;
      for (int j = 0; j < M; j++) m1 += int'(!wb[i][j]);
      mu_a[i] = (i == 0) ? -7 : $urandom_range(0, 30) - 15;
      theta[i] = $urandom_range(0, 40);
      if (m1 + mu_a[i] < 0) n_neg++;
      cfg_en = 1; cfg_row = 5'(i); cfg_theta = VW'(theta[i]); cfg_rho = VW'(m1 + mu_a[i]);
      @(negedge clk);
    end
    cfg_en = 0;
    // ---- sliding windows ----
    for (int win = 0; win < 12; win++) begin
      sew_mode = win[0];
      init = 1; @(negedge clk); init = 0;
      foreach (v[i]) v[i] = 0;
      for (int t = 0; t < T; t++) begin
        for (int w = 0; w < M; w += 32) sp[t][w +: 32] = $urandom;
        if (win % 4 == 2) sp[t] = '0;  // a silent input window
        sprev[t] = N'($urandom);
        for (int i = 0; i < N; i++) begin
          mac = 0;
          for (int j = 0; j < M; j++) if (sp[t][j]) mac += wb[i][j] ? 1 : -1;
          v[i] = v[i] + mac - mu_a[i];
          exp_o[t][i] = (v[i] > theta[i]);
          if (exp_o[t][i]) v[i] = 0;
        end
        exp_s[t] = sew_mode ? (~exp_o[t] & sprev[t]) : exp_o[t];
      end
      // drive T steps back to back, collect outputs as they arrive
      out_idx = 0;
      for (int t = 0; t < T + 3; t++) begin
        if (t < T) begin
          step = 1; spikes = sp[t]; s_prev = sprev[t]; sew_en = sew_mode;
          step_cycle[t] = cycle;
        end else begin
          step = 0;
        end
        @(negedge clk);
        if (out_valid) begin
          check(out_idx < T, "extra out_valid");
          if (out_idx < T) begin
            check(cycle - step_cycle[out_idx] == 2, $sformatf("latency %0d", cycle - step_cycle[out_idx]));
            check(o == exp_o[out_idx], $sformatf("win %0d t %0d o=%h exp %h", win, out_idx, o, exp_o[out_idx]));
            check(s_out == exp_s[out_idx], $sformatf("win %0d t %0d s_out", win, out_idx));
            n_fire += $countones(exp_o[out_idx]);
            n_quiet += N - $countones(exp_o[out_idx]);
            if (sew_mode) n_sew_kill += $countones(exp_o[out_idx] & sprev[out_idx]);
          end
          out_idx++;
        end
      end
      check(out_idx == T, $sformatf("window %0d gave %0d outputs", win, out_idx));
    end
    $display("fires %0d quiet %0d negative-rho rows %0d SEW suppressions %0d", n_fire, n_quiet, n_neg, n_sew_kill);
    check(n_fire > 0, "some neuron fired");
    check(n_quiet > 0, "some neuron stayed silent");
    check(n_neg > 0, "a row with negative rho");
    check(n_sew_kill > 0, "SEW suppressed a residual spike");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
