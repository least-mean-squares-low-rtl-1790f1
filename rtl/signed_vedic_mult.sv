// signed_vedic_mult: signed 64x64 multiplication on the unsigned Vedic
// multiplier.
//
// The LMS filter multiplies signed samples, weights and errors, while the
// Vedic multiplier works on unsigned numbers. This wrapper (a choice of this
// design) works in sign-magnitude: both operands are replaced by their
// magnitudes (|-2^63| = 2^63 still fits in 64 unsigned bits), vedic_64x64
// multiplies them, the product sign a[63]^b[63] is carried alongside in a
// register, and the 128-bit product is negated when that sign is set.
//
// Timing: p = a*b (signed, exact, 128 bits) one clock after a and b are applied,
// the same latency as vedic_64x64.
module signed_vedic_mult
  import lms_pkg::*;
(
  input  logic     clk,
  input  sample_t  a,
  input  sample_t  b,
  output product_t p
);

  logic [DATA_W-1:0] mag_a, mag_b;
  logic [PROD_W-1:0] mag_p;
  logic              neg_d, neg_q;

  always_comb begin
    mag_a = a[DATA_W-1] ? DATA_W'(-a) : DATA_W'(a);
    mag_b = b[DATA_W-1] ? DATA_W'(-b) : DATA_W'(b);
    neg_d = a[DATA_W-1] ^ b[DATA_W-1];
  end

  vedic_64x64 u_mul (.clk, .a(mag_a), .b(mag_b), .p(mag_p));

  // sign travels with the product through the multiplier's register stage
  always_ff @(posedge clk) neg_q <= neg_d;

  assign p = neg_q ? -product_t'(mag_p) : product_t'(mag_p);

endmodule
