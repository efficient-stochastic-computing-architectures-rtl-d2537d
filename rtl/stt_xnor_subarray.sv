// stt_xnor_subarray: N x M array of XNOR bitcells computing one binarised
// multiply-accumulate per row in a single access.
//
// Row i stores one convolution kernel (M one-bit weights, 1 = +1 and
// 0 = -1 in unipolar form).  When the word lines are raised and the bit
// lines carry the presynaptic spike vector, every row returns
//   K_i = sum_j XNOR(w_ij, s_j),
// the number of cells at the (+1) level.  In the resistive array this
// count sets the merged source-line voltage, which rises linearly with
// K_i; here it is an exact binary count.  With the signed-weight identity
// sum_j w_ij s_j = K_i - M1 (M1 = number of -1 weights) the neuron
// recovers the signed MAC.
//
// Writing: a write pulse with one word line and one active column stores
// the BL0 value into that cell only.
//
// Interface: word lines wl[N], bit-line pairs bl0/bl1[M], column enables
// bl_act[M], write pulse wr, per-row counts k_out[i] (combinational).
module stt_xnor_subarray #(
  parameter int unsigned N  = bsnn_pkg::BSNN_N,
  parameter int unsigned M  = bsnn_pkg::BSNN_M,
  localparam int unsigned KW = $clog2(M + 1)
) (
  input  logic                  clk,
  input  logic [N-1:0]          wl,
  input  logic [M-1:0]          bl0,
  input  logic [M-1:0]          bl1,
  input  logic [M-1:0]          bl_act,
  input  logic                  wr,
  output logic [N-1:0][KW-1:0]  k_out
);

  logic [N-1:0][M-1:0] xnor_bits;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < M; j++) begin : g_col
      stt_xnor_bitcell u_cell (
        .clk(clk), .wl(wl[i]), .bl0(bl0[j]), .bl1(bl1[j]), .bl_act(bl_act[j]),
        .wr(wr), .xnor_out(xnor_bits[i][j]), .w());
    end

    always_comb begin
      k_out[i] = '0;
      for (int j = 0; j < M; j++) k_out[i] = k_out[i] + KW'(xnor_bits[i][j]);
    end
  end

endmodule
