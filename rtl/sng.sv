// sng: stochastic number generator (binary-to-stochastic converter).
//
// A comparator turns a binary value into one bit of a stochastic stream
// per cycle: the bit is 1 when the random number does not exceed the value.
// The source compares "random < value"; since an LFSR never produces 0,
// this design compares rnd <= value (equivalently rnd-1 < value), so that
// P(1) = value / (2^WIDTH - 1): code 0 encodes 0 and the all-ones code
// encodes exactly 1.
//
// Purely combinational: bit_out follows value and rnd in the same cycle.
module sng #(
  parameter int unsigned WIDTH = sc_pkg::SC_WIDTH
) (
  input  logic [WIDTH-1:0] value,
  input  logic [WIDTH-1:0] rnd,
  output logic             bit_out
);

  assign bit_out = (rnd <= value);

endmodule
