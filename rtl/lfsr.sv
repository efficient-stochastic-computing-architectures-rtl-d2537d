// lfsr: maximal-length Fibonacci linear-feedback shift register, the
// random number source of the stochastic number generators.
//
// Each enabled cycle the register shifts left by one and the XOR of the
// tap bits enters at bit 0, so the state walks through all 2^WIDTH-1
// non-zero values.  The polynomial comes from sc_pkg::lfsr_taps (x^10+x^7+1
// for the default 10 bits); the source only states that 10-bit LFSRs are
// used.  Reset loads SEED, which must be non-zero.
//
// Interface: clk, active-low synchronous reset rst_n, en, state (the
// current random number, valid every cycle).
module lfsr #(
  parameter int unsigned    WIDTH = sc_pkg::SC_WIDTH,
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  localparam logic [WIDTH-1:0] TAPS = WIDTH'(sc_pkg::lfsr_taps(WIDTH));

  initial assert (SEED != '0) else $error("lfsr: SEED must be non-zero");

  logic feedback;
  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[WIDTH-2:0], feedback};
  end

endmodule
