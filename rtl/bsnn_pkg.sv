// bsnn_pkg: sizes shared by the in-memory binary spiking neural network
// (BSNN) blocks.
//
// A binarised 3x3 convolution with 32 input channels unrolls into a vector
// of M = 288 presynaptic spikes; N = 32 output channels are computed at
// once, so one subarray holds 32 x 288 one-bit weights.  Membrane and
// threshold accumulators are VW-bit signed integers in units of one XNOR
// count (VW is this design's choice).
package bsnn_pkg;

  localparam int unsigned BSNN_N  = 32;   // rows: output channels
  localparam int unsigned BSNN_M  = 288;  // columns: 3 x 3 x 32 synapses
  localparam int unsigned BSNN_VW = 16;   // accumulator width
  localparam int unsigned BSNN_T  = 8;    // time steps per inference

endpackage
