// sc_dnn_top: the three hardware designs side by side.
//
//  * RBF: a stochastic radial basis function kernel, exp(-k (x-c)^2),
//    computed on 1024-bit streams as (1 - k1 (x-c)^2)^N with N = 8.
//  * Activation: a stochastic sigmoid(2x) / tanh(x) unit built on a
//    degree-5 Bernstein polynomial; one output stream serves both.
//  * BSNN: one in-memory binary spiking convolution subarray of 32 x 288
//    XNOR cells with 32 dynamic-threshold integrate-and-fire neurons and
//    residual SEW gates.
// The designs share only the clock and reset; each brings out its own
// ports (prefixes rbf_, act_, snn_).  Timing of each is given in the
// sub-module headers: RBF start->done 2N+1024+1 cycles, activation
// start->done 5+1024+1 cycles, BSNN one time step per cycle with a
// two-cycle latency.
module sc_dnn_top
  import sc_pkg::*;
  import bsnn_pkg::*;
#(
  parameter int unsigned RBF_DIMS = 1,
  parameter int unsigned RBF_N    = 8,
  parameter int unsigned LENGTH   = SC_LENGTH,
  parameter int unsigned SNN_N    = BSNN_N,
  parameter int unsigned SNN_M    = BSNN_M,
  localparam int unsigned CW      = $clog2(LENGTH + 1),
  localparam int unsigned RW      = (SNN_N > 1) ? $clog2(SNN_N) : 1,
  localparam int unsigned CAW     = (SNN_M > 1) ? $clog2(SNN_M) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // RBF kernel
  input  logic                               rbf_start,
  input  logic [RBF_DIMS-1:0][SC_WIDTH-1:0]  rbf_x,
  input  logic [RBF_DIMS-1:0][SC_WIDTH-1:0]  rbf_c,
  input  logic [SC_WIDTH-1:0]                rbf_k1,
  output logic                               rbf_y_bit,
  output logic [CW-1:0]                      rbf_result,
  output logic                               rbf_done,
  // sigmoid / tanh
  input  logic                               act_start,
  input  logic [SC_WIDTH-1:0]                act_x,
  output logic                               act_y_bit,
  output logic [CW-1:0]                      act_count,
  output logic                               act_done,
  // BSNN subarray
  input  logic                               snn_wr_en,
  input  logic [RW-1:0]                      snn_wr_row,
  input  logic [CAW-1:0]                     snn_wr_col,
  input  logic                               snn_wr_data,
  input  logic                               snn_cfg_en,
  input  logic [RW-1:0]                      snn_cfg_row,
  input  logic signed [BSNN_VW-1:0]          snn_cfg_theta,
  input  logic signed [BSNN_VW-1:0]          snn_cfg_rho,
  input  logic                               snn_init,
  input  logic                               snn_step,
  input  logic [SNN_M-1:0]                   snn_spikes,
  input  logic [SNN_N-1:0]                   snn_s_prev,
  input  logic                               snn_sew_en,
  output logic [SNN_N-1:0]                   snn_o,
  output logic [SNN_N-1:0]                   snn_s_out,
  output logic                               snn_out_valid
);

  sc_rbf_kernel #(.DIMS(RBF_DIMS), .N(RBF_N), .WIDTH(SC_WIDTH), .LENGTH(LENGTH)) u_rbf (
    .clk(clk), .rst_n(rst_n), .start(rbf_start), .x(rbf_x), .c(rbf_c), .k1(rbf_k1),
    .y_bit(rbf_y_bit), .result(rbf_result), .done(rbf_done));

  sc_sigmoid_tanh #(.WIDTH(SC_WIDTH), .LENGTH(LENGTH)) u_act (
    .clk(clk), .rst_n(rst_n), .start(act_start), .x(act_x),
    .y_bit(act_y_bit), .count(act_count), .done(act_done));

  bsnn_layer #(.N(SNN_N), .M(SNN_M), .VW(BSNN_VW)) u_snn (
    .clk(clk), .rst_n(rst_n),
    .wr_en(snn_wr_en), .wr_row(snn_wr_row), .wr_col(snn_wr_col), .wr_data(snn_wr_data),
    .cfg_en(snn_cfg_en), .cfg_row(snn_cfg_row), .cfg_theta(snn_cfg_theta), .cfg_rho(snn_cfg_rho),
    .init(snn_init), .step(snn_step), .spikes(snn_spikes), .s_prev(snn_s_prev),
    .sew_en(snn_sew_en), .o(snn_o), .s_out(snn_s_out), .out_valid(snn_out_valid));

endmodule
