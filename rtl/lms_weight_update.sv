// lms_weight_update: coefficient adaptation of the LMS filter,
// w_k[n+1] = w_k[n] + mu * u[n-k] * e[n], for k = 0 .. TAPS-1.
//
// Each tap has a signed 64x64 Vedic multiplier forming u[n-k]*e. The step size
// is a power of two, mu = 2^-MU_SHIFT (this design's choice, so that no third
// multiplication is needed): the 128-bit product, which has 2*FRAC_W fractional
// bits, is shifted right arithmetically by FRAC_W + MU_SHIFT, truncated to 64
// bits and added to the weight. The weights are held here and read by the
// filter.
//
// Timing: the products reflect u and e of the previous clock; on a clock with
// upd_en high every weight takes its new value. rst (synchronous, active high)
// clears the weights to zero. Overflow wraps modulo 2^64.
module lms_weight_update
  import lms_pkg::*;
#(
  parameter int unsigned TAPS     = lms_pkg::DEF_TAPS,
  parameter int unsigned FRAC_W   = lms_pkg::DEF_FRAC_W,
  parameter int unsigned MU_SHIFT = lms_pkg::DEF_MU_SHIFT
) (
  input  logic     clk,
  input  logic     rst,
  input  sample_t  u  [TAPS],
  input  sample_t  e,
  input  logic     upd_en,
  output sample_t  w  [TAPS]
);

  product_t prod  [TAPS];
  product_t step  [TAPS];

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    signed_vedic_mult u_mul (.clk, .a(u[k]), .b(e), .p(prod[k]));
    assign step[k] = prod[k] >>> (FRAC_W + MU_SHIFT);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) w[k] <= '0;
    end else if (upd_en) begin
      for (int k = 0; k < TAPS; k++) w[k] <= w[k] + sample_t'(step[k]);
    end
  end

endmodule
