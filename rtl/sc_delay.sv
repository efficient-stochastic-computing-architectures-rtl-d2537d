// sc_delay: chain of DEPTH D flip-flops delaying a one-bit stream.
//
// Stochastic circuits multiply by ANDing streams that must be
// uncorrelated; delaying one copy of a stream by a few cycles decorrelates
// it from the undelayed copy.  DEPTH = 0 is a plain wire.  Reset clears the
// chain.  Output: the input bit of DEPTH cycles earlier.
module sc_delay #(
  parameter int unsigned DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_chain
    logic [DEPTH-1:0] chain;
    always_ff @(posedge clk) begin
      if (!rst_n) chain <= '0;
      else        chain <= DEPTH'({chain, d});
    end
    assign q = chain[DEPTH-1];
  end

endmodule
