// sc_pkg: constants shared by the stochastic-computing (SC) blocks.
//
// A stochastic number is a bit stream whose fraction of ones is the value.
// Streams are generated by comparing a binary value with a pseudo-random
// number from a linear-feedback shift register (LFSR) each clock cycle and
// converted back by counting ones over a fixed window.  The design uses
// 10-bit LFSRs and 1024-cycle windows, as in the evaluation of the source
// architecture; the feedback polynomials and the rounding of the Bernstein
// coefficients to 10-bit codes are this design's choices.
package sc_pkg;

  // Default LFSR width and stream length (10-bit random numbers, 1024 bits
  // per value).
  localparam int unsigned SC_WIDTH  = 10;
  localparam int unsigned SC_LENGTH = 1024;

  // Tap mask of a maximal-length Fibonacci LFSR of the given width: bit
  // (t-1) is set for each term x^t of the feedback polynomial.
  function automatic logic [31:0] lfsr_taps(input int unsigned width);
    case (width)
      4:       return 32'h0000_000C; // x^4+x^3+1
      5:       return 32'h0000_0014; // x^5+x^3+1
      6:       return 32'h0000_0030; // x^6+x^5+1
      7:       return 32'h0000_0060; // x^7+x^6+1
      8:       return 32'h0000_00B8; // x^8+x^6+x^5+x^4+1
      9:       return 32'h0000_0110; // x^9+x^5+1
      10:      return 32'h0000_0240; // x^10+x^7+1
      11:      return 32'h0000_0500; // x^11+x^9+1
      12:      return 32'h0000_0E08; // x^12+x^11+x^10+x^4+1
      13:      return 32'h0000_1C80; // x^13+x^12+x^11+x^8+1
      14:      return 32'h0000_3802; // x^14+x^13+x^12+x^2+1
      15:      return 32'h0000_6000; // x^15+x^14+1
      16:      return 32'h0000_D008; // x^16+x^15+x^13+x^4+1
      default: return 32'h0000_0240;
    endcase
  endfunction

  // Bernstein coefficients of the degree-5 approximation of sigmoid(2ax)
  // as a function of the unipolar input probability P_x, quantised to
  // round(b * 1023) so that code 1023 encodes exactly 1.
  // a = 1 : b = {0.12, 0.20, 0.34, 0.66, 0.80, 0.87}  (sigmoid(2x), tanh(x))
  // a = 2 : b = {0.03, 0.02, 0.00, 1.00, 0.98, 0.96}  (sigmoid(4x), tanh(2x))
  // Element i of the packed array is coefficient b_i.
  localparam logic [5:0][SC_WIDTH-1:0] SIGMOID2X_COEF =
    {10'd890, 10'd818, 10'd675, 10'd348, 10'd205, 10'd123};
  localparam logic [5:0][SC_WIDTH-1:0] SIGMOID4X_COEF =
    {10'd982, 10'd1003, 10'd1023, 10'd0, 10'd20, 10'd31};

endpackage
