// sew_gate: spike-element-wise (SEW) residual function,
//   s_out = (NOT o) AND s_prev,
// applied bit-wise to N channels.  o are the spikes a layer produced and
// s_prev the spikes entering it from the earlier layer; when a neuron does
// not fire the earlier spike passes unchanged, which gives the residual
// block its identity mapping.  Combinational; follows the source.
module sew_gate #(
  parameter int unsigned N = bsnn_pkg::BSNN_N
) (
  input  logic [N-1:0] o,
  input  logic [N-1:0] s_prev,
  output logic [N-1:0] s_out
);

  assign s_out = ~o & s_prev;

endmodule
