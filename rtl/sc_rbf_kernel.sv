// sc_rbf_kernel: complete stochastic RBF kernel
//   K(x, c) = prod_i exp(-k (x_i - c_i)^2),  i = 1 .. DIMS.
//
// For every feature i an LFSR drives two stochastic number generators
// (SNGs) with the same random number, one for x_i and one for c_i, so the
// XOR in sc_rbf_unit yields |x_i - c_i|.  A further SNG encodes the
// coefficient k1 (k/N unipolar, 4k/N bipolar).  The DIMS per-feature
// outputs are multiplied by one AND gate and a counter converts the
// product back to binary: result / LENGTH ~ K(x, c).
//
// SHARE_LFSR = 0 gives the k1 SNG its own LFSR; SHARE_LFSR = 1 feeds it
// the bit-reversed state of the first feature's LFSR (fewer registers,
// slightly more correlation).  Each feature has its own LFSR so that the
// factors of the final AND are uncorrelated.  The LFSR seeds and the
// bit-reversal are this design's choices.
//
// Operation: the LFSRs run continuously after reset.  A start pulse waits
// 2*N*DUNIT cycles to prime the delay lines of the cores, then counts
// LENGTH output bits; done pulses when result is valid.  done is high in
// the cycle that begins 2*N*DUNIT + LENGTH clock edges after the edge that
// samples start (1232 cycles with the defaults).  Inputs must be held from
// start to done.
module sc_rbf_kernel #(
  parameter int unsigned DIMS       = 1,
  parameter int unsigned N          = 8,
  parameter int unsigned WIDTH      = sc_pkg::SC_WIDTH,
  parameter int unsigned LENGTH     = sc_pkg::SC_LENGTH,
  parameter bit          BIPOLAR    = 1'b0,
  parameter bit          SHARE_LFSR = 1'b0,
  parameter int unsigned DUNIT      = 13,
  localparam int unsigned CW        = $clog2(LENGTH + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [DIMS-1:0][WIDTH-1:0] x,
  input  logic [DIMS-1:0][WIDTH-1:0] c,
  input  logic [WIDTH-1:0]           k1,
  output logic                       y_bit,
  output logic [CW-1:0]              result,
  output logic                       done
);

  localparam int unsigned PRIME = 2 * N * DUNIT;
  localparam int unsigned PW    = $clog2(PRIME + 1);

  // Distinct non-zero seed for LFSR number idx.
  function automatic logic [WIDTH-1:0] seed_of(input int unsigned idx);
    return WIDTH'((idx * 347 + 89) % ((1 << WIDTH) - 1) + 1);
  endfunction

  logic [DIMS-1:0][WIDTH-1:0] rnd;
  logic [DIMS-1:0]            xs, cs, ys;
  logic [WIDTH-1:0]           rnd_k;
  logic                       ks;

  for (genvar i = 0; i < DIMS; i++) begin : g_dim
    lfsr #(.WIDTH(WIDTH), .SEED(seed_of(i))) u_lfsr (
      .clk(clk), .rst_n(rst_n), .en(1'b1), .state(rnd[i]));
    sng #(.WIDTH(WIDTH)) u_sng_x (.value(x[i]), .rnd(rnd[i]), .bit_out(xs[i]));
    sng #(.WIDTH(WIDTH)) u_sng_c (.value(c[i]), .rnd(rnd[i]), .bit_out(cs[i]));
    sc_rbf_unit #(.N(N), .BIPOLAR(BIPOLAR), .DUNIT(DUNIT)) u_unit (
      .clk(clk), .rst_n(rst_n), .x_bit(xs[i]), .c_bit(cs[i]), .k_bit(ks),
      .y_bit(ys[i]));
  end

  if (SHARE_LFSR) begin : g_shared
    assign rnd_k = {<<{rnd[0]}};
  end else begin : g_own
    lfsr #(.WIDTH(WIDTH), .SEED(seed_of(DIMS))) u_lfsr_k (
      .clk(clk), .rst_n(rst_n), .en(1'b1), .state(rnd_k));
  end

  sng #(.WIDTH(WIDTH)) u_sng_k (.value(k1), .rnd(rnd_k), .bit_out(ks));

  assign y_bit = &ys;

  // Priming delay before the counting window.
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
    .count(result), .done(done), .busy());

endmodule
