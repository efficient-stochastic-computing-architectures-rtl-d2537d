// sc_bernstein: stochastic Bernstein polynomial core
//   B(x) = sum_{i=0..n} b_i * C(n,i) x^i (1-x)^(n-i),  n = DEGREE.
//
// n copies of the input stream, delayed by 0, U, 2U, ..., (n-1)U cycles
// (U = DUNIT) so that they are mutually uncorrelated, are summed by a small binary adder; the
// sum i (the number of ones among the n copies, binomially distributed)
// selects coefficient stream b_i through an (n+1)-input multiplexer.  The
// probability of a one at the output is then B(P_x).  This is the
// structure the source describes, with U = 1 (one flip-flop per step of
// delay) as its default.  When the stream comes from an LFSR, consecutive
// random numbers are shifted copies of each other and U = 1 leaves the
// copies partly correlated; a larger U (for instance 5) lowers the error
// of the approximated function at the cost of more flip-flops.
//
// Interface: input stream x_bit, coefficient streams b_bits[i] = b_i,
// output stream y_bit, combinational from the delay registers and b_bits.
// The output is valid once the longest delay, (DEGREE-1)*U cycles, has
// filled.  sel (the adder output) is brought out for observation.
module sc_bernstein #(
  parameter int unsigned DEGREE = 5,
  parameter int unsigned DUNIT  = 1,
  localparam int unsigned SW    = $clog2(DEGREE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              x_bit,
  input  logic [DEGREE:0]   b_bits,
  output logic              y_bit,
  output logic [SW-1:0]     sel
);

  logic [DEGREE-1:0] xd;

  for (genvar i = 0; i < DEGREE; i++) begin : g_dly
    sc_delay #(.DEPTH(i * DUNIT)) u_d (.clk(clk), .rst_n(rst_n), .d(x_bit), .q(xd[i]));
  end

  always_comb begin
    sel = '0;
    for (int i = 0; i < DEGREE; i++) sel = sel + SW'(xd[i]);
  end

  assign y_bit = b_bits[sel];

endmodule
