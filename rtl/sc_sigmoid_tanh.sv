// sc_sigmoid_tanh: stochastic sigmoid(2ax) / tanh(ax) unit.
//
// The input x in [-1, 1] is given by its unipolar probability P_x
// (x = 2 P_x - 1).  Substituting this into the sigmoid gives
//   sigmoid(2ax) = e^(-2a) / (e^(-2a) + e^(-4a P_x)),
// a function of P_x on [0, 1] that a degree-n Bernstein polynomial
// approximates with coefficients b_i in [0, 1] (COEF).  The output stream,
// read as unipolar, is sigmoid(2ax); the same stream read as bipolar is
// tanh(ax) = 2 sigmoid(2ax) - 1, so one circuit serves both functions.
//
// A single LFSR drives every SNG: the x stream compares with the LFSR
// state, and the coefficient streams with its bit-reversed state, which
// decorrelates them from x (the delays inside sc_bernstein decorrelate the
// copies of x).  The single LFSR, the delays and the Bernstein structure
// follow the source; the bit-reversal is this design's choice.
//
// Operation: a start pulse waits (DEGREE-1)*DUNIT+1 cycles for the delay
// line to fill, then counts LENGTH output bits.  done pulses when count is
// valid:
//   sigmoid(2ax) ~ count / LENGTH,  tanh(ax) ~ 2 count / LENGTH - 1.
// done is high in the cycle that begins (DEGREE-1)*DUNIT + 1 + LENGTH
// clock edges after the edge that samples start (1029 with the defaults).
// x must be held from start to done.  DUNIT is the delay step of the
// Bernstein core (see sc_bernstein).
module sc_sigmoid_tanh #(
  parameter int unsigned WIDTH  = sc_pkg::SC_WIDTH,
  parameter int unsigned LENGTH = sc_pkg::SC_LENGTH,
  parameter int unsigned DEGREE = 5,
  parameter logic [DEGREE:0][WIDTH-1:0] COEF = sc_pkg::SIGMOID2X_COEF,
  parameter logic [WIDTH-1:0] SEED = WIDTH'(1),
  parameter int unsigned DUNIT  = 1,
  localparam int unsigned CW    = $clog2(LENGTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] x,
  output logic             y_bit,
  output logic [CW-1:0]    count,
  output logic             done
);

  localparam int unsigned PRIME = (DEGREE - 1) * DUNIT + 1;
  localparam int unsigned PW    = $clog2(PRIME + 1);

  logic [WIDTH-1:0] rnd, rnd_rev;
  logic             xs;
  logic [DEGREE:0]  bs;

  lfsr #(.WIDTH(WIDTH), .SEED(SEED)) u_lfsr (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .state(rnd));
  assign rnd_rev = {<<{rnd}};

  sng #(.WIDTH(WIDTH)) u_sng_x (.value(x), .rnd(rnd), .bit_out(xs));

  for (genvar i = 0; i <= DEGREE; i++) begin : g_coef
    sng #(.WIDTH(WIDTH)) u_sng_b (.value(COEF[i]), .rnd(rnd_rev), .bit_out(bs[i]));
  end

  sc_bernstein #(.DEGREE(DEGREE), .DUNIT(DUNIT)) u_bern (
    .clk(clk), .rst_n(rst_n), .x_bit(xs), .b_bits(bs), .y_bit(y_bit), .sel());

  logic [PW-1:0] prime_cnt;
  logic          priming, count_start;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prime_cnt <= '0;
      priming   <= 1'b0;
    end else if (start) begin
      prime_cnt <= PW'(PRIME);
      priming   <= 1'b1;
    end else if (priming) begin
      prime_cnt <= prime_cnt - 1'b1;
      if (prime_cnt == PW'(1)) priming <= 1'b0;
    end
  end

  assign count_start = priming && (prime_cnt == PW'(1));

  sc_counter #(.LENGTH(LENGTH)) u_cnt (
    .clk(clk), .rst_n(rst_n), .start(count_start), .bit_in(y_bit),
    .count(count), .done(done), .busy());

endmodule
