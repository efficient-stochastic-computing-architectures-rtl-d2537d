// if_neuron: integrate-and-fire neuron with a dynamic threshold, the
// digital equivalent of the charge-domain neuron behind each subarray row.
//
// The binarised IF model, scaled so that no multiplier is needed, is
//   u(t) = u(t-1) + K(t) - rho,   fire when u(t) > theta,
// with rho = M1 + mu/alpha (M1 = number of -1 weights in the row, mu/alpha
// the scaled batch-norm mean).  To avoid subtraction the constant rho is
// moved onto the threshold, which then grows every step:
//   ACC1: u(t)  = u(t-1) + K(t)
//   ACC2: th(t) = th(t-1) + rho,  th after init or a spike = theta
//   fire: o(t)  = (u(t) > th(t))
// When rho < 0, ACC2 stays at theta and |rho| is added to ACC1 instead.
// A spike resets ACC1 to 0 and re-precharges ACC2 to theta for the next
// step.  init clears ACC1 and presets ACC2 to theta (the analog circuit
// does this by setting its output flip-flop, which here stays 0).
//
// Timing: one step per clock.  k_in, theta and rho are sampled in the step
// cycle; spike is the output flip-flop and is high for the one cycle after
// a firing step, low otherwise.  The accumulators saturate at the largest
// positive VW-bit value.  Integer rho and theta, saturation and the VW
// width are this design's choices; the model and the reset behaviour
// follow the source.
module if_neuron #(
  parameter int unsigned KW = $clog2(bsnn_pkg::BSNN_M + 1),
  parameter int unsigned VW = bsnn_pkg::BSNN_VW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic                 step,
  input  logic [KW-1:0]        k_in,
  input  logic signed [VW-1:0] theta,
  input  logic signed [VW-1:0] rho,
  output logic                 spike,
  output logic signed [VW-1:0] u_acc,
  output logic signed [VW-1:0] th_acc
);

  localparam logic signed [VW+1:0] VMAX = (VW+2)'((1 << (VW - 1)) - 1);

  logic                 rho_neg;
  logic signed [VW+1:0] u_sum, th_sum;
  logic signed [VW-1:0] u_next, th_next;
  logic                 fire;

  function automatic logic signed [VW-1:0] sat(input logic signed [VW+1:0] v);
    if (v > VMAX)       return VMAX[VW-1:0];
    else if (v < -VMAX) return -VMAX[VW-1:0];
    else                return v[VW-1:0];
  endfunction

  always_comb begin
    rho_neg = rho[VW-1];
    u_sum   = (VW+2)'(u_acc) + (VW+2)'($signed({1'b0, k_in}))
            - (rho_neg ? (VW+2)'(rho) : '0);
    th_sum  = (VW+2)'(th_acc) + (rho_neg ? '0 : (VW+2)'(rho));
    u_next  = sat(u_sum);
    th_next = sat(th_sum);
    fire    = (u_next > th_next);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_acc  <= '0;
      th_acc <= '0;
      spike  <= 1'b0;
    end else if (init) begin
      u_acc  <= '0;
      th_acc <= theta;
      spike  <= 1'b0;
    end else if (step) begin
      spike <= fire;
      if (fire) begin
        u_acc  <= '0;
        th_acc <= theta;
      end else begin
        u_acc  <= u_next;
        th_acc <= th_next;
      end
    end else begin
      spike <= 1'b0;
    end
  end

endmodule
