// sc_counter: stochastic-to-binary converter.
//
// Counts the ones of a stream over a window of exactly LENGTH cycles.  A
// start pulse clears the count and opens the window with the bit present
// in the same cycle; in the cycle after the LENGTH-th bit, done pulses for
// one cycle and count holds the number of ones (value = count / LENGTH)
// until the next start.  A start while busy restarts the window.
//
// The counter itself is the converter the source names; the start/done
// handshake is this design's choice.
module sc_counter #(
  parameter int unsigned LENGTH = sc_pkg::SC_LENGTH,
  localparam int unsigned CW    = $clog2(LENGTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          bit_in,
  output logic [CW-1:0] count,
  output logic          done,
  output logic          busy
);

  logic [CW-1:0] remaining;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count     <= '0;
      remaining <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        count     <= CW'(bit_in);
        remaining <= CW'(LENGTH - 1);
        busy      <= (LENGTH > 1);
        done      <= (LENGTH == 1);
      end else if (busy) begin
        count     <= count + CW'(bit_in);
        remaining <= remaining - 1'b1;
        if (remaining == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
