// bl_driver: column decoder and complementary bit-line driver of an
// XNOR-cell subarray.
//
// MAC phase (mac_en): every column j is driven with the pair
//   spike 1 -> BL0 = V_BL, BL1 = 0 ;  spike 0 -> BL0 = 0, BL1 = V_BL
// (V_BL shown as logic 1) and marked active.  Weight write (wr_en): only
// the addressed column is active, carrying the weight on BL0 and its
// complement on BL1; all other columns are left floating (bl_act = 0), as
// each MTJ of a row sharing one source line must be written individually.
// With neither request, no column is driven.
//
// The encoding follows the source; the registered outputs (one cycle from
// request to bit lines) are this design's choice.  mac_en and wr_en must
// not be asserted together.
module bl_driver #(
  parameter int unsigned M  = bsnn_pkg::BSNN_M,
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mac_en,
  input  logic [M-1:0]  spikes,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_col,
  input  logic          wr_data,
  output logic [M-1:0]  bl0,
  output logic [M-1:0]  bl1,
  output logic [M-1:0]  bl_act
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bl0    <= '0;
      bl1    <= '0;
      bl_act <= '0;
    end else if (mac_en) begin
      bl0    <= spikes;
      bl1    <= ~spikes;
      bl_act <= '1;
    end else if (wr_en) begin
      bl0    <= '0;
      bl1    <= '0;
      bl_act <= '0;
      bl0[wr_col]    <= wr_data;
      bl1[wr_col]    <= ~wr_data;
      bl_act[wr_col] <= 1'b1;
    end else begin
      bl0    <= '0;
      bl1    <= '0;
      bl_act <= '0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(mac_en && wr_en))
    else $error("bl_driver: MAC and write requested in the same cycle");
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (wr_col < AW'(M)))
    else $error("bl_driver: write column out of range");

endmodule
