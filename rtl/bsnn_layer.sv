// bsnn_layer: one in-memory binary spiking convolution subarray with its
// integrate-and-fire neurons and residual (SEW) gates.
//
// A 3x3 convolution window of 32 input channels is unrolled into M = 288
// presynaptic spikes; row i of the N x M XNOR subarray holds the binarised
// kernel of output channel i.  Each time step the whole window is applied
// to the bit lines, every row returns its XNOR count K_i in one access,
// and neuron i integrates K_i against its dynamic threshold (see
// if_neuron).  The N postsynaptic spikes o are optionally combined with
// the residual input s_prev by the SEW gate, s_out = ~o & s_prev; with
// sew_en low, s_out = o.
//
// Pipeline, one time step per clock cycle:
//   cycle 0  step with spikes (and s_prev, sew_en): bit lines and word
//            lines are registered
//   cycle 1  subarray count K, neuron integrate/compare, output flip-flop
//   cycle 2  o, s_out and out_valid
// Weight writes (wr_en, one bit per cycle) use the same two-cycle path,
// through the same bit lines, with a single word line raised.  cfg_en
// loads the initial threshold theta and the constant rho of one row.
// init (also pipelined one cycle) presets every neuron; it precedes the
// first step of each window.  Requests are mutually exclusive.
//
// The array organisation, the MAC/IF split, the dynamic threshold and the
// SEW gate follow the source.  One clock per time step, the configuration
// port and the register stages are this design's choices.
module bsnn_layer #(
  parameter int unsigned N  = bsnn_pkg::BSNN_N,
  parameter int unsigned M  = bsnn_pkg::BSNN_M,
  parameter int unsigned VW = bsnn_pkg::BSNN_VW,
  localparam int unsigned KW = $clog2(M + 1),
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CAW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // weight write
  input  logic                 wr_en,
  input  logic [RW-1:0]        wr_row,
  input  logic [CAW-1:0]       wr_col,
  input  logic                 wr_data,
  // per-row neuron configuration
  input  logic                 cfg_en,
  input  logic [RW-1:0]        cfg_row,
  input  logic signed [VW-1:0] cfg_theta,
  input  logic signed [VW-1:0] cfg_rho,
  // inference
  input  logic                 init,
  input  logic                 step,
  input  logic [M-1:0]         spikes,
  input  logic [N-1:0]         s_prev,
  input  logic                 sew_en,
  output logic [N-1:0]         o,
  output logic [N-1:0]         s_out,
  output logic                 out_valid
);

  // ---------------- configuration registers ----------------
  logic signed [VW-1:0] theta_q [N];
  logic signed [VW-1:0] rho_q   [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        theta_q[i] <= '0;
        rho_q[i]   <= '0;
      end
    end else if (cfg_en) begin
      theta_q[cfg_row] <= cfg_theta;
      rho_q[cfg_row]   <= cfg_rho;
    end
  end

  // ---------------- stage 0 -> 1: bit lines and word lines ----------------
  logic [M-1:0]  bl0, bl1, bl_act;
  logic [N-1:0]  wl;
  logic          wr_q, step_q, init_q, sew_q, step_qq, sew_qq;
  logic [N-1:0]  s_prev_q, s_prev_qq;

  bl_driver #(.M(M)) u_bl (
    .clk(clk), .rst_n(rst_n), .mac_en(step), .spikes(spikes),
    .wr_en(wr_en), .wr_col(wr_col), .wr_data(wr_data),
    .bl0(bl0), .bl1(bl1), .bl_act(bl_act));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wl       <= '0;
      wr_q     <= 1'b0;
      step_q   <= 1'b0;
      init_q   <= 1'b0;
      sew_q    <= 1'b0;
      s_prev_q <= '0;
    end else begin
      wl       <= step ? '1 : (wr_en ? (N'(1) << wr_row) : '0);
      wr_q     <= wr_en;
      step_q   <= step;
      init_q   <= init;
      sew_q    <= sew_en;
      s_prev_q <= s_prev;
    end
  end

  // ---------------- stage 1: in-memory MAC and IF neurons ----------------
  logic [N-1:0][KW-1:0] k;

  stt_xnor_subarray #(.N(N), .M(M)) u_array (
    .clk(clk), .wl(wl), .bl0(bl0), .bl1(bl1), .bl_act(bl_act), .wr(wr_q),
    .k_out(k));

  for (genvar i = 0; i < N; i++) begin : g_neuron
    if_neuron #(.KW(KW), .VW(VW)) u_if (
      .clk(clk), .rst_n(rst_n), .init(init_q), .step(step_q), .k_in(k[i]),
      .theta(theta_q[i]), .rho(rho_q[i]), .spike(o[i]), .u_acc(), .th_acc());
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step_qq   <= 1'b0;
      sew_qq    <= 1'b0;
      s_prev_qq <= '0;
    end else begin
      step_qq   <= step_q;
      sew_qq    <= sew_q;
      s_prev_qq <= s_prev_q;
    end
  end

  // ---------------- stage 2: residual SEW gate ----------------
  logic [N-1:0] s_sew;

  sew_gate #(.N(N)) u_sew (.o(o), .s_prev(s_prev_qq), .s_out(s_sew));

  assign s_out     = sew_qq ? s_sew : o;
  assign out_valid = step_qq;

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({wr_en, cfg_en, init, step}))
    else $error("bsnn_layer: more than one request in a cycle");

endmodule
