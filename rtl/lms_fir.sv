// lms_fir: filter with variable coefficients, the forward path of the LMS
// adaptive filter: yk = sum_{k=0}^{TAPS-1} u[n-k] * w_k.
//
// A delay line holds the tap-input vector u[n-k]; shift_en pushes the new
// sample x_in into u[0] and moves every older sample one tap down. Each tap has
// its own signed 64x64 Vedic multiplier, and the TAPS products are summed at
// full precision into the 128-bit yk. With FRAC_W fractional bits in samples
// and weights, yk has 2*FRAC_W fractional bits.
//
// Timing: yk reflects the u and w of the previous clock (one register stage,
// inside the multipliers); the sum itself is combinational. The delay line is
// cleared by the synchronous, active-high rst. Sum overflow wraps modulo 2^128.
module lms_fir
  import lms_pkg::*;
#(
  parameter int unsigned TAPS = lms_pkg::DEF_TAPS
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     shift_en,
  input  sample_t  x_in,
  input  sample_t  w  [TAPS],
  output sample_t  u  [TAPS],
  output product_t yk
);

  product_t prod [TAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) u[k] <= '0;
    end else if (shift_en) begin
      u[0] <= x_in;
      for (int k = 1; k < TAPS; k++) u[k] <= u[k-1];
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    signed_vedic_mult u_mul (.clk, .a(u[k]), .b(w[k]), .p(prod[k]));
  end

  always_comb begin
    yk = '0;
    for (int k = 0; k < TAPS; k++) yk += prod[k];
  end

endmodule
