// tb_bsnn_conv_workload: runs whole hidden convolution layers of the two
// evaluated binary spiking networks through one 32 x 288 bsnn_layer at its
// default size, checking every output spike.
//   * MNIST network, hidden 3x3 conv, 32 -> 32 channels on the 14 x 14 map
//     after the first 2x2 average pooling, T = 4 and T = 8 time steps.
//   * CIFAR-10 network, hidden 3x3 conv, 32 -> 32 channels on the full
//     32 x 32 map, T = 8, with the spike-element-wise residual (SEW) path.
// The map sizes (28x28 / 32x32 images, 'same' zero padding) are standard
// dataset facts; channel counts, kernel size and time steps follow the
// network descriptions.  Input spike maps are rate coded: each input
// position and channel gets a random firing probability and each time step
// draws a Bernoulli spike.  For every layer the testbench loads a fresh
// binarised kernel (one bit per cycle), configures theta and
// rho = M1 + mu/alpha per output channel, then streams every sliding window
// back to back: one init cycle and T step cycles, the window unrolled as
// column (ky*3 + kx)*32 + c.  The residual input s_prev of output channel i
// is the input spike of channel i at the window centre.  The reference is a
// signed convolution followed by the plain IF model (v += sum w*s - mu/alpha,
// fire when v > theta, reset to 0), independent of the XNOR and
// dynamic-threshold form of the hardware.  Checks: each spike and SEW
// output, the two-cycle latency of every step, one step per cycle with no
// stall across windows, and output counts.  Spikes, silences and SEW
// suppressions are counted and must all occur.
module tb_bsnn_conv_workload;
  localparam int N = 32, M = 288, C = 32, HMAX = 32, TMAX = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_data = 0, cfg_en = 0, init = 0, step = 0, sew_en = 0;
  logic [4:0] wr_row, cfg_row;
  logic [8:0] wr_col;
  logic signed [15:0] cfg_theta, cfg_rho;
  logic [M-1:0] spikes;
  logic [N-1:0] s_prev, o, s_out;
  logic out_valid;
  int checks = 0, failures = 0;

  bsnn_layer dut (
    .clk, .rst_n, .wr_en, .wr_row, .wr_col, .wr_data, .cfg_en, .cfg_row, .cfg_theta, .cfg_rho,
    .init, .step, .spikes, .s_prev, .sew_en, .o, .s_out, .out_valid);

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

  typedef struct {
    logic [N-1:0] o;
    logic [N-1:0] s;
    logic [N-1:0] p;
    int           cycle;
  } exp_t;

  bit   wb [N][M];                      // 1 = +1, 0 = -1
  bit   inmap [TMAX][HMAX][HMAX][C];    // input spikes [t][y][x][c]
  int   mu_a [N], theta [N], v [N];
  exp_t expq [$];
  int   cycle, n_fire, n_quiet, n_sew_kill, n_out, layer_fire;

  always @(posedge clk) cycle <= cycle + 1;

  // one clock; compare whatever output the layer presents with the oldest
  // expected step
  task automatic tick(input bit sew_mode);
    exp_t e;
    @(negedge clk);
    if (out_valid) begin
      check(expq.size() > 0, "out_valid with no step pending");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        check(cycle - e.cycle == 2, $sformatf("latency %0d", cycle - e.cycle));
        check(o == e.o, $sformatf("o=%h expected %h", o, e.o));
        check(s_out == e.s, $sformatf("s_out=%h expected %h", s_out, e.s));
        n_out++;
        n_fire += $countones(e.o);
        layer_fire += $countones(e.o);
        n_quiet += N - $countones(e.o);
        if (sew_mode) n_sew_kill += $countones(e.o & e.p);
      end
    end
  endtask

  task automatic run_layer(input string name, input int H, input int T, input bit sew_mode);
    int m1, mac, c0, cyc_start, prob;
    logic [M-1:0] sp;
    logic [N-1:0] spv, ov;
    exp_t e;
    // fresh kernel, one bit per cycle
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++) begin
        wb[i][j] = 1'($urandom);
        wr_en = 1; wr_row = 5'(i); wr_col = 9'(j); wr_data = wb[i][j];
        @(negedge clk);
      end
    wr_en = 0;
    for (int i = 0; i < N; i++) begin
      m1 = 0;
      for (int j = 0; j < M; j++) m1 += int'(!wb[i][j]);
      mu_a[i] = $urandom_range(0, 16) - 8;
      theta[i] = $urandom_range(0, 24);
      cfg_en = 1; cfg_row = 5'(i); cfg_theta = 16'(theta[i]); cfg_rho = 16'(m1 + mu_a[i]);
      @(negedge clk);
    end
    cfg_en = 0;
    // rate-coded input spike map
    for (int y = 0; y < H; y++)
      for (int x = 0; x < H; x++)
        for (int c = 0; c < C; c++) begin
          prob = $urandom_range(0, 100);
          for (int t = 0; t < T; t++) inmap[t][y][x][c] = ($urandom_range(0, 99) < prob);
        end
    // all windows back to back
    layer_fire = 0;
    n_out = 0;
    cyc_start = cycle;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < H; x++) begin
        init = 1; step = 0;
        tick(sew_mode);
        init = 0;
        foreach (v[i]) v[i] = 0;
        for (int t = 0; t < T; t++) begin
          sp = '0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              if (y + ky - 1 >= 0 && y + ky - 1 < H && x + kx - 1 >= 0 && x + kx - 1 < H)
                for (int c = 0; c < C; c++) sp[(ky * 3 + kx) * C + c] = inmap[t][y + ky - 1][x + kx - 1][c];
          for (int i = 0; i < N; i++) spv[i] = inmap[t][y][x][i];
          // reference: signed conv + IF
          for (int i = 0; i < N; i++) begin
            mac = 0;
            for (int ky = 0; ky < 3; ky++)
              for (int kx = 0; kx < 3; kx++)
                if (y + ky - 1 >= 0 && y + ky - 1 < H && x + kx - 1 >= 0 && x + kx - 1 < H)
                  for (int c = 0; c < C; c++)
                    if (inmap[t][y + ky - 1][x + kx - 1][c]) mac += wb[i][(ky * 3 + kx) * C + c] ? 1 : -1;
            v[i] = v[i] + mac - mu_a[i];
            ov[i] = (v[i] > theta[i]);
            if (ov[i]) v[i] = 0;
          end
          e.o = ov;
          e.s = sew_mode ? (~ov & spv) : ov;
          e.p = spv;
          e.cycle = cycle;
          expq.push_back(e);
          step = 1; spikes = sp; s_prev = spv; sew_en = sew_mode;
          tick(sew_mode);
        end
        step = 0;
      end
    c0 = cycle - cyc_start;
    check(c0 == H * H * (T + 1), $sformatf("%s: %0d cycles for %0d windows", name, c0, H * H));
    repeat (3) tick(sew_mode);
    check(expq.size() == 0, $sformatf("%s: %0d steps without output", name, expq.size()));
    check(n_out == H * H * T, $sformatf("%s: %0d outputs", name, n_out));
    $display("%s: %0dx%0d map, T=%0d, %0d windows in %0d cycles, %0d output spikes",
             name, H, H, T, H * H, c0, layer_fire);
  endtask

  initial begin
    cycle = 0; n_fire = 0; n_quiet = 0; n_sew_kill = 0;
    wr_row = '0; wr_col = '0; cfg_row = '0; cfg_theta = '0; cfg_rho = '0;
    spikes = '0; s_prev = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    run_layer("MNIST hidden conv", 14, 4, 1'b0);
    run_layer("MNIST hidden conv", 14, 8, 1'b0);
    run_layer("CIFAR-10 hidden conv + SEW", 32, 8, 1'b1);
    $display("fires %0d quiet %0d SEW suppressions %0d", n_fire, n_quiet, n_sew_kill);
    check(n_fire > 0, "some neuron fired");
    check(n_quiet > 0, "some neuron stayed silent");
    check(n_sew_kill > 0, "SEW suppressed a residual spike");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
