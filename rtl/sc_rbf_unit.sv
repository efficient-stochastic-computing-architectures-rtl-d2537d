// sc_rbf_unit: univariate stochastic radial basis function core.
//
// Computes K(x,c) = exp(-k (x-c)^2) through the limit form
//   K ~ (1 - k1 (x-c)^2)^N,   k1 = k / N          (unipolar inputs)
//   K ~ (1 - k1' (x'-c')^2)^N, k1' = 4k / N,      (bipolar inputs)
// where x' = (1-x)/2 and c' = (1-c)/2 are formed by NOT gates.
// Bit-level datapath, one output bit per cycle:
//   d  = x XOR c              |x-c|; x and c must come from the SAME
//                             random number so the streams are maximally
//                             correlated
//   sq = d AND d(t-U)         (x-c)^2, the U-cycle delay decorrelates
//   z0 = NOT (sq AND k)       1 - k1 (x-c)^2
//   z(s+1) = z(s) AND z(s)(t - U*2^(s+1)),  s = 0 .. log2(N)-1
// The last stage is z^N.  Each squaring delay is longer than the span of
// cycles the stage already depends on, so the two factors never share an
// input bit.  The delay unit U (DUNIT) matters because the random numbers
// come from an LFSR, whose consecutive states are shifted copies of each
// other: with U = 1 the delayed copies stay strongly correlated.  U = 13
// (longer than the 10-bit LFSR) keeps the mean absolute error near 2% for
// k = 7, N = 8 and 16.  The equations and the use of delays for
// decorrelation follow the source; the squaring-tree arrangement and the
// delay lengths are this design's choices.  N must be a power of two.
//
// Interface: stream inputs x_bit, c_bit, k_bit, stream output y_bit
// (combinational from the delay registers).  The delays add up to
// U*(2N-1) cycles, so callers prime the unit for 2*N*U cycles before
// counting.
module sc_rbf_unit #(
  parameter int unsigned N       = 8,
  parameter bit          BIPOLAR = 1'b0,
  parameter int unsigned DUNIT   = 13
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x_bit,
  input  logic c_bit,
  input  logic k_bit,
  output logic y_bit
);

  localparam int unsigned STAGES = $clog2(N);

  initial assert (N >= 2 && (1 << STAGES) == N)
    else $error("sc_rbf_unit: N must be a power of two");

  // Bipolar inputs are converted to unipolar (1-v)/2 by inverting.
  logic xu, cu;
  assign xu = BIPOLAR ? ~x_bit : x_bit;
  assign cu = BIPOLAR ? ~c_bit : c_bit;

  logic d, d_dly, sq;
  assign d = xu ^ cu;

  sc_delay #(.DEPTH(DUNIT)) u_dsq (.clk(clk), .rst_n(rst_n), .d(d), .q(d_dly));
  assign sq = d & d_dly;

  logic [STAGES:0] z;
  assign z[0] = ~(sq & k_bit);

  for (genvar s = 0; s < STAGES; s++) begin : g_pow
    logic z_dly;
    sc_delay #(.DEPTH(DUNIT * (2 << s))) u_dz (.clk(clk), .rst_n(rst_n), .d(z[s]), .q(z_dly));
    assign z[s+1] = z[s] & z_dly;
  end

  assign y_bit = z[STAGES];

endmodule
