// stt_xnor_bitcell: digital equivalent of the complementary 2T-2R
// STT-MRAM XNOR bitcell.
//
// The cell holds one binary weight w in a pair of magnetic tunnel
// junctions: MTJ0, on bit line BL0, is in the low-resistance (parallel)
// state when w = 1, and MTJ1, on BL1, is parallel when w = 0.  With the
// word line on and the column driven, current flows into the shared source
// line through whichever junction sees V_BL, and the source line settles
// at the higher (+1) level exactly when the driven junction is the
// parallel one, i.e. when XNOR(w, spike) = 1:
//   xnor_out = (w & BL0) | (~w & BL1).
// A write pulse with the word line on and the column driven stores BL0.
//
// Resistances, TMR and variation are analog properties and are not
// modelled; the logic function follows the source.  xnor_out is
// combinational; the write takes effect at the clock edge.
module stt_xnor_bitcell (
  input  logic clk,
  input  logic wl,
  input  logic bl0,
  input  logic bl1,
  input  logic bl_act,
  input  logic wr,
  output logic xnor_out,
  output logic w
);

  always_ff @(posedge clk) begin
    if (wr && wl && bl_act) w <= bl0;
  end

  assign xnor_out = wl && bl_act && !wr && ((w && bl0) || (!w && bl1));

endmodule
